// pipeline: 132-clock binary L1 pipeline with accumulator register.
//
// Holds the hit pattern of every channel for DEPTH clocks, the L1 trigger
// latency, so that the samples of a triggered crossing can be copied into the
// readout buffer. The specified circuit is a 12x12 multiplexed dynamic cell
// array; here it is a circular memory of DEPTH words of NCH bits written and
// read at the same address (read before write), which gives the same delay.
// The word leaving the pipeline ('tap') is also ORed into the accumulator
// register, which thus marks every channel hit since it was last cleared.
//
// Interface and timing: 'i' sampled at edge n is the tap value during the
// cycle before edge n+DEPTH. While 'level1' is high (the chip drives it with
// the three-clock level3 signal) the output register 'o' captures the tap, or
// the accumulator when 'acen' is set, so o after edge n+DEPTH holds i of edge
// n. clrB (asynchronous, active low: power-up or soft reset) resets the
// pointer and clears the accumulator but leaves the memory, as specified.
module pipeline #(
  parameter int NCH   = abcd_pkg::NCH,
  parameter int DEPTH = 132
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           acen,
  input  logic           level1,
  output logic [NCH-1:0] o
);
  localparam int AW = $clog2(DEPTH);
  logic [NCH-1:0] mem [DEPTH];
  logic [AW-1:0]  ptr;
  logic [NCH-1:0] tap, acc;

  assign tap = mem[ptr];

  always_ff @(posedge clk) mem[ptr] <= i;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      ptr <= '0;
      acc <= '0;
      o   <= '0;
    end else begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      acc <= acc | tap;
      if (level1) o <= acen ? acc : tap;
    end
endmodule
