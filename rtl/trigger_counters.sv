// trigger_counters: L1 trigger counter and beam crossing counter.
//
// The 4-bit L1 counter counts L1 triggers (level1 pulses) and the 8-bit beam
// crossing counter counts clocks; both wrap. They tag each event in the
// module header. clrB (asynchronous, active low: power-up or soft reset)
// zeroes both; bcresetB (active low, sampled at the clock edge) zeroes the
// beam crossing counter only. Widths as specified.
module trigger_counters #(
  parameter int L1_BITS = 4,
  parameter int BC_BITS = 8
) (
  input  logic               clk,
  input  logic               clrB,
  input  logic               level1,
  input  logic               bcresetB,
  output logic [L1_BITS-1:0] l1cnt,
  output logic [BC_BITS-1:0] bccnt
);
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      l1cnt <= '0;
      bccnt <= '0;
    end else begin
      if (level1)    l1cnt <= l1cnt + 1'b1;
      if (!bcresetB) bccnt <= '0;
      else           bccnt <= bccnt + 1'b1;
    end
endmodule
