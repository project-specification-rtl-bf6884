// token_data_in: normal/bypass token or data input selector.
//
// Each chip has two token and two data inputs so that a failed neighbour can
// be routed around. 'bypassin' (configuration bit 9) selects in1, otherwise
// in0, as the chip specification defines. Pairs are received as
// "true AND NOT complement"; the current-mode receiver is analogue and is not
// modelled. Combinational.
module token_data_in (
  input  logic in0, in0B, in1, in1B,
  input  logic bypassin,
  output logic out
);
  assign out = bypassin ? (in1 & ~in1B) : (in0 & ~in0B);
endmodule
