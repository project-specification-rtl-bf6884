// readout_buffer: derandomizing readout buffer (barrel store).
//
// Holds the three 128-bit samples of each L1 trigger until the data
// compression logic reads them, smoothing the random arrival of triggers.
// WORDS (24) words hold WORDS/EVENT_WORDS (8) events. A write and a read
// pointer cycle round the RAM. The write pointer may pass the read pointer:
// an event written while 8 events are stored overwrites the oldest one and
// increments the overflow counter; every event read decrements it down to
// zero. 'overflow' is high while the counter is non-zero. When the 4-bit
// counter wraps (16 lost events) 'error' is set and stays set until reset.
// 'data_avail' is high while at least one complete event is stored.
//
// Interface and timing: one word is written per clock while 'write' is high
// and one read per clock while 'read' is high; 'o' is the word at the read
// pointer (asynchronous read). An event is complete after its third write
// edge and leaves after its third read edge. clrB (asynchronous, active low)
// resets pointers, counters and flags. The handling of the read pointer on
// overwrite (it is not moved) is this design's choice.
module readout_buffer #(
  parameter int NCH         = abcd_pkg::NCH,
  parameter int WORDS       = 24,
  parameter int EVENT_WORDS = 3,
  parameter int OVF_BITS    = 4
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           write,
  input  logic           read,
  output logic [NCH-1:0] o,
  output logic           data_avail,
  output logic           overflow,
  output logic           error
);
  localparam int EVENTS = WORDS / EVENT_WORDS;
  localparam int AW = $clog2(WORDS);
  localparam int EW = $clog2(EVENTS + 1);
  localparam int PW = $clog2(EVENT_WORDS);

  logic [NCH-1:0]      mem [WORDS];
  logic [AW-1:0]       wptr, rptr;
  logic [PW-1:0]       wphase, rphase;
  logic [EW-1:0]       events;
  logic [OVF_BITS-1:0] ovf_cnt;
  logic                wr_done, rd_done;

  assign o          = mem[rptr];
  assign wr_done    = write && wphase == PW'(EVENT_WORDS - 1);
  assign rd_done    = read && rphase == PW'(EVENT_WORDS - 1) && events != '0;
  assign data_avail = events != '0;
  assign overflow   = ovf_cnt != '0;

  always_ff @(posedge clk) if (write) mem[wptr] <= i;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      wptr <= '0; rptr <= '0; wphase <= '0; rphase <= '0;
      events <= '0; ovf_cnt <= '0; error <= 1'b0;
    end else begin
      if (write) begin
        wptr   <= (wptr == AW'(WORDS - 1)) ? '0 : wptr + 1'b1;
        wphase <= wr_done ? '0 : wphase + 1'b1;
      end
      // The read pointer may not pass the write pointer: reads of an empty
      // buffer are ignored.
      if (read && events != '0) begin
        rptr   <= (rptr == AW'(WORDS - 1)) ? '0 : rptr + 1'b1;
        rphase <= rd_done ? '0 : rphase + 1'b1;
      end
      // Event count and overflow counter
      if (wr_done && events == EW'(EVENTS)) begin
        ovf_cnt <= ovf_cnt + 1'b1;
        if (ovf_cnt == '1) error <= 1'b1;
        if (rd_done) events <= events - 1'b1;
      end else if (wr_done && !rd_done) begin
        events <= events + 1'b1;
      end else if (rd_done && !wr_done) begin
        events <= events - 1'b1;
      end
      if (rd_done && ovf_cnt != '0 && !(wr_done && events == EW'(EVENTS)))
        ovf_cnt <= ovf_cnt - 1'b1;
    end
endmodule
