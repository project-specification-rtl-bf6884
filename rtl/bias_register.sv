// bias_register: front-end bias DAC register.
//
// A 16-bit register: bits 4:0 set the shaper bias current DAC (ish), bits
// 12:8 the input transistor bias DAC (ipre), the fields being aligned on byte
// boundaries as specified; the other bits are stored but unused. Loaded in
// parallel by a one-clock 'load' pulse, cleared by the asynchronous power-up
// reset.
module bias_register (
  input  logic        clk,
  input  logic        clrB,
  input  logic        load,
  input  logic [15:0] data,
  output logic [4:0]  ish,
  output logic [4:0]  ipre
);
  logic [4:0] ish_r, ipre_r;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      ish_r  <= '0;
      ipre_r <= '0;
    end else if (load) begin
      ish_r  <= data[4:0];
      ipre_r <= data[12:8];
    end
  assign ish  = ish_r;
  assign ipre = ipre_r;
endmodule
