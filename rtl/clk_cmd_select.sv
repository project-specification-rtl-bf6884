// clk_cmd_select: clock and command input selection.
//
// The chip receives two independent clock/command pairs so that a failed
// source can be replaced by the reserve one. Each pair arrives differentially;
// the ideal receiver is modelled as "true AND NOT complement" (the LVDS
// receiver itself is an analogue cell outside this RTL). The static 'select'
// pin picks pair 0 (low) or pair 1 (high), as the chip specification defines.
// Purely combinational; 'select' must not change while the chip runs.
module clk_cmd_select (
  input  logic clk0, clk0B, clk1, clk1B,
  input  logic com0, com0B, com1, com1B,
  input  logic select,
  output logic clk,
  output logic command
);
  logic c0, c1, m0, m1;
  assign c0 = clk0 & ~clk0B;
  assign c1 = clk1 & ~clk1B;
  assign m0 = com0 & ~com0B;
  assign m1 = com1 & ~com1B;
  assign clk     = select ? c1 : c0;
  assign command = select ? m1 : m0;
endmodule
