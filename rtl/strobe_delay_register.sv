// strobe_delay_register: calibration strobe delay register.
//
// An 8-bit register of which only the 6 LS bits are used: they select one of
// 64 delay steps of the calibration strobe (see strobe_delay_line). Loaded in
// parallel by a one-clock 'load' pulse, cleared by the asynchronous power-up
// reset.
module strobe_delay_register (
  input  logic       clk,
  input  logic       clrB,
  input  logic       load,
  input  logic [7:0] data,
  output logic [5:0] code
);
  logic [7:0] r;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB)     r <= '0;
    else if (load) r <= data;
  assign code = r[5:0];
endmodule
