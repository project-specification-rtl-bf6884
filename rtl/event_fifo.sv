// event_fifo: event tag FIFO of the readout controller.
//
// Each L1 trigger pushes the 12-bit tag {L1 count, beam crossing count}; the
// master pops one tag for every event it reads out and puts it in the module
// header. DEPTH (24) words of WIDTH (12) bits, as specified. A synchronous
// FIFO with a registered occupancy count; dout is the oldest word
// (asynchronous read). A push when full is dropped and a pop when empty is
// ignored (not specified). clrB: asynchronous active-low reset.
module event_fifo #(
  parameter int DEPTH = 24,
  parameter int WIDTH = 12
) (
  input  logic             clk,
  input  logic             clrB,
  input  logic [WIDTH-1:0] din,
  input  logic             push,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             do_push, do_pop;

  assign empty   = cnt == '0;
  assign full    = cnt == (AW+1)'(DEPTH);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end

  // A pop never happens on an empty FIFO in the chip.
  assert property (@(posedge clk) disable iff (!clrB) pop |-> !empty);
endmodule
