// configuration_register: 16-bit chip configuration register.
//
// Data are shifted in serially, MS bit first, while 'shift' is high, then
// copied to the outputs by a one-clock 'load' pulse, so the configuration in
// use does not change while a new value is being shifted in. The power-up
// reset (clrB, asynchronous, active low) clears both registers to zero, the
// specified power-up value; a soft reset is not connected here, so the
// configuration survives it. Bit meanings: see abcd_pkg::config_t.
module configuration_register #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             clrB,
  input  logic             in,
  input  logic             shift,
  input  logic             load,
  output logic [WIDTH-1:0] dataout
);
  logic [WIDTH-1:0] sr;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      sr      <= '0;
      dataout <= '0;
    end else begin
      if (shift) sr <= {sr[WIDTH-2:0], in};
      if (load)  dataout <= sr;
    end
endmodule
