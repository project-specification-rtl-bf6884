// readout_logic: token-passing serial readout of one chip.
//
// The chips of a module are read out in a chain: a chip sends its packet for
// the current event when it holds the token, then passes the token to the
// next chip and forwards that chip's data towards the master. When no packet
// of its own is being sent, datain is forwarded to dataout through one
// register.
//
// On the token the block sends one of these packets (MS bit first):
//   configuration  <000><aaaa><111><config[15:8]><1><config[7:0]>  (Send_ID)
//   buffer error   <000><aaaa><100><1>
//   no data        <000><aaaa><001><1>   (token but no event in the chip)
//   overflow       <000><aaaa><010><1>
//   no hit         <001>
//   physics        <01><aaaa><ccccccc><1><ddd> followed by <1><ddd> for each
//                  further hit on the adjacent channel; a hit that is not
//                  adjacent starts a new <01>... packet.
// aaaa is the chip's 4-bit address, ccccccc the (first) channel, ddd the hit
// pattern, oldest sample first. The packet formats follow the chip's readout
// protocol; the order of precedence between the cases is this design's
// reading of it.
//
// 'next' is pulsed to the data compression logic when a hit has been taken
// into the output shift register, and once more to release a finished event
// (also after error, overflow and configuration packets when an event was
// present), so the event count stays correct.
//
// Timing: the token is accepted in the clock after tokenin is seen and the
// first bit appears on dataout at that edge. tokenout is a one-clock pulse
// that appears together with the last-but-one own bit; a neighbour that
// answers in the same way puts its first bit on this chip's dataout right
// after this chip's last bit, so the stream has no gaps. clrB is an
// asynchronous active-low reset (power-up or soft reset).
module readout_logic
  import abcd_pkg::*;
(
  input  logic        clk,
  input  logic        clrB,
  input  logic        datain,
  input  logic        tokenin,
  input  logic [6:0]  ch,
  input  logic [2:0]  hit,
  input  logic        datavalid,
  input  logic        adj,
  input  logic        end_i,
  input  logic [3:0]  id,
  input  logic        overflow,
  input  logic        error,
  input  logic        sendid,
  input  logic [15:0] config_i,
  output logic        dataout,
  output logic        tokenout,
  output logic        next
);
  typedef enum logic {S_WAIT, S_SEND} state_e;
  state_e      state;
  logic [31:0] sr;
  logic [5:0]  left;
  logic        last, adj_r, release_pending;

  // Candidate segment chosen from the current inputs
  logic [31:0] seg;
  logic [5:0]  seg_len;
  logic        seg_last, seg_next, seg_phys, event_present;

  function automatic logic [31:0] left_align(logic [31:0] v, int len);
    return v << (32 - len);
  endfunction

  assign event_present = datavalid || end_i || overflow;

  // Segment sent at the start of a readout, when the token is accepted
  always_comb begin
    seg = '0; seg_len = 6'd3; seg_last = 1'b1; seg_next = 1'b0; seg_phys = 1'b0;
    if (sendid) begin
      seg      = left_align({5'b0, 3'b000, id, CFG_CODE, config_i[15:8], 1'b1, config_i[7:0]}, 27);
      seg_len  = 6'd27;
      seg_next = event_present;
    end else if (error) begin
      seg      = left_align({21'b0, 3'b000, id, ERR_BUFFER, 1'b1}, 11);
      seg_len  = 6'd11;
      seg_next = event_present;
    end else if (!event_present) begin
      seg      = left_align({21'b0, 3'b000, id, ERR_NO_DATA, 1'b1}, 11);
      seg_len  = 6'd11;
    end else if (overflow) begin
      seg      = left_align({21'b0, 3'b000, id, ERR_OVERFLOW, 1'b1}, 11);
      seg_len  = 6'd11;
      seg_next = 1'b1;
    end else if (!datavalid) begin
      seg      = left_align({29'b0, 3'b001}, 3);
      seg_next = 1'b1;
    end else begin
      seg      = left_align({15'b0, 2'b01, id, ch, 1'b1, hit}, 17);
      seg_len  = 6'd17;
      seg_last = end_i;
      seg_next = 1'b1;
      seg_phys = 1'b1;
    end
  end

  // Continuation segment of a physics packet, loaded as a segment ends
  logic [31:0] cont;
  logic [5:0]  cont_len;
  always_comb
    if (adj_r) begin
      cont     = left_align({28'b0, 1'b1, hit}, 4);
      cont_len = 6'd4;
    end else begin
      cont     = left_align({15'b0, 2'b01, id, ch, 1'b1, hit}, 17);
      cont_len = 6'd17;
    end

  logic accept, seg_end, load_cont, release_now;
  assign accept      = state == S_WAIT && tokenin;
  assign seg_end     = state == S_SEND && left == 6'd1;
  assign load_cont   = seg_end && !last;
  assign release_now = release_pending && !datavalid && end_i;
  assign next        = (accept && seg_next) || load_cont || release_now;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      state <= S_WAIT; sr <= '0; left <= '0; last <= 1'b0; adj_r <= 1'b0;
      release_pending <= 1'b0; dataout <= 1'b0; tokenout <= 1'b0;
    end else begin
      tokenout <= 1'b0;
      if (release_now) release_pending <= 1'b0;
      unique case (state)
        S_WAIT: begin
          dataout <= datain;
          if (tokenin) begin
            state   <= S_SEND;
            dataout <= seg[31];
            sr      <= seg << 1;
            left    <= seg_len - 1'b1;
            last    <= seg_last;
            adj_r   <= adj;
            if (seg_phys && seg_last) release_pending <= 1'b1;
          end
        end
        S_SEND: begin
          dataout <= sr[31];
          sr      <= sr << 1;
          left    <= left - 1'b1;
          if (last && left == 6'd2) tokenout <= 1'b1;
          if (seg_end) begin
            if (last) state <= S_WAIT;
            else begin
              sr    <= cont;
              left  <= cont_len;
              last  <= end_i;
              adj_r <= adj;
              if (end_i) release_pending <= 1'b1;
            end
          end
        end
        default: state <= S_WAIT;
      endcase
    end
endmodule
