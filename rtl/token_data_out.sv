// token_data_out: normal/bypass token or data output driver.
//
// Drives either the normal output (out0) or the bypass output (out1).
// bypassout[1] high enables out1; bypassout[0] high disables out0 (the chip
// ties both bits to configuration bit 10). The two-bit control is taken from
// the specification's pin list; how its bits split is this design's choice.
// A disabled output is held idle: true line low, complement line high.
// Combinational.
module token_data_out (
  input  logic       in,
  input  logic [1:0] bypassout,
  output logic       out0, out0B,
  output logic       out1, out1B
);
  assign out0  = in & ~bypassout[0];
  assign out0B = ~out0;
  assign out1  = in & bypassout[1];
  assign out1B = ~out1;
endmodule
