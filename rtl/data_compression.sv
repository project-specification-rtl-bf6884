// data_compression: zero-suppression of one event for readout.
//
// Very few channels are hit in an event, so only channels whose 3-bit hit
// pattern meets the selected criterion are sent. When the readout buffer has
// an event (dataavail) and the block is idle, it reads the three 128-bit
// words (buffrd high for three clocks, oldest sample first) and regroups them
// into 128 3-bit patterns {oldest, middle, newest}. The criterion ('mode', see
// abcd_pkg::ro_mode_e) gives a 128-bit match vector. The hit channels are
// then presented one at a time: datavalid, ch, hit, with 'adj' high if the
// next hit is on channel ch+1 and 'end_o' high if this is the last hit. Each
// 'next' pulse advances to the following hit one clock later. After the last
// hit, or when no channel matched, the block shows datavalid=0, end_o=1 until
// a final 'next' releases the event.
//
// An event is still read but not scanned when, in order of priority, the chip
// is in Send_ID mode, the buffer error flag or the buffer overflow flag is
// set (flags sampled as the event is read). Send_ID and error show end_o=1;
// overflow shows overflowout=1; both wait for 'next'.
//
// The next hit is found by a priority encoder in one clock rather than by a
// channel-by-channel scan; this is this design's choice. clrB is an
// asynchronous active-low reset (power-up or soft reset).
module data_compression
  import abcd_pkg::*;
#(
  parameter int NCH = abcd_pkg::NCH
) (
  input  logic                   clk,
  input  logic                   clrB,
  input  logic [NCH-1:0]         i,
  input  logic                   overflow,
  input  logic                   error,
  input  logic                   sendid,
  input  logic                   dataavail,
  input  ro_mode_e               mode,
  input  logic                   next,
  output logic                   overflowout,
  output logic                   adj,
  output logic [$clog2(NCH)-1:0] ch,
  output logic [2:0]             hit,
  output logic                   datavalid,
  output logic                   end_o,
  output logic                   buffrd
);
  localparam int CW = $clog2(NCH);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_HIT, S_DONE, S_OVF} state_e;
  state_e        state;
  logic [1:0]    wcnt;
  logic [NCH-1:0] w0, w1, w2;       // oldest, middle, newest sample
  logic [NCH-1:0] match;
  logic          fl_sendid, fl_error, fl_ovf;
  logic          found, found_after;
  logic [CW-1:0] first, after;

  // Transposed patterns and match vector
  always_comb
    for (int c = 0; c < NCH; c++)
      match[c] = hit_match(mode, {w0[c], w1[c], w2[c]});

  // First matching channel, and first matching channel above 'ch'
  always_comb begin
    found = 1'b0; first = '0;
    found_after = 1'b0; after = '0;
    for (int c = NCH - 1; c >= 0; c--) begin
      if (match[c]) begin
        found = 1'b1;
        first = CW'(c);
        if (CW'(c) > ch) begin
          found_after = 1'b1;
          after = CW'(c);
        end
      end
    end
  end

  assign buffrd      = state == S_LOAD;
  assign datavalid   = state == S_HIT;
  assign end_o       = (state == S_HIT && !found_after) || state == S_DONE;
  assign overflowout = state == S_OVF;
  assign hit         = {w0[ch], w1[ch], w2[ch]};
  assign adj         = state == S_HIT && ch != CW'(NCH - 1) && match[ch + 1'b1];

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      state <= S_IDLE; wcnt <= '0; ch <= '0;
      w0 <= '0; w1 <= '0; w2 <= '0;
      fl_sendid <= 1'b0; fl_error <= 1'b0; fl_ovf <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (dataavail) begin
            state     <= S_LOAD;
            wcnt      <= '0;
            fl_sendid <= sendid;
            fl_error  <= error;
            fl_ovf    <= overflow;
          end
        S_LOAD: begin
          w0   <= w1;
          w1   <= w2;
          w2   <= i;
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd2) state <= S_SCAN;
        end
        S_SCAN:
          if (fl_sendid || fl_error) state <= S_DONE;
          else if (fl_ovf)           state <= S_OVF;
          else if (found) begin
            state <= S_HIT;
            ch    <= first;
          end else                   state <= S_DONE;
        S_HIT:
          if (next) begin
            if (found_after) ch <= after;
            else             state <= S_DONE;
          end
        S_DONE, S_OVF:
          if (next) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
endmodule
