// readout_controller: module readout control (master) and trailer (end chip).
//
// In a chip configured as master (header_enable) this block runs the readout
// of the whole chain of chips on one side of a detector module. Every L1
// trigger pushes the tag {L1 count, beam crossing count} into the event
// FIFO. When the FIFO is not empty and no event is being read, the block pops
// a tag and sends the 19-bit module header on ledout:
//   <11101> preamble, <0> data type, <nnnn> L1 count, <bbbbbbbb> BC count, <1>
// It raises tokenout (to this chip's readout logic) with the last-but-one
// header bit, so that the chip's packet follows the header without a gap,
// then forwards the chain's data stream to ledout and watches it for the
// 16-bit trailer 1000 0000 0000 0000. After the trailer it starts on the next
// event. In a slave, tokenin is passed to tokenout unchanged.
//
// In a chip configured as end of chain (trailer_enable) the block appends the
// trailer to the chip's data: when the readout logic passes its token on
// (token_back), the trailer follows the readout logic's last bit directly.
// dataout is the chip's data stream (readout logic output plus trailer).
//
// Timing: ledout is registered, one clock behind dataout. The header layout
// follows the module data format; the trailer detector and the exact token
// timing are this design's choices. clrB: asynchronous active-low reset
// (power-up or soft reset); bcresetB zeroes the beam crossing counter.
module readout_controller
  import abcd_pkg::*;
#(
  parameter int FIFO_DEPTH = 24
) (
  input  logic clk,
  input  logic clrB,
  input  logic datain,
  input  logic tokenin,
  input  logic level1,
  input  logic bcresetB,
  input  logic header_enable,
  input  logic trailer_enable,
  input  logic token_back,
  output logic dataout,
  output logic tokenout,
  output logic ledout
);
  localparam int HDR_BITS = 19;

  // Event tagging
  logic [3:0]  l1cnt;
  logic [7:0]  bccnt;
  logic [11:0] tag;
  logic        fifo_empty, fifo_full, pop;

  trigger_counters u_counters (
    .clk, .clrB, .level1, .bcresetB, .l1cnt, .bccnt
  );

  event_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(12)) u_fifo (
    .clk, .clrB, .din({l1cnt, bccnt}), .push(level1), .pop,
    .dout(tag), .empty(fifo_empty), .full(fifo_full)
  );

  // Trailer generation (end of chain)
  logic [16:0] tsr, tval;
  logic        stream;
  assign stream  = tval[16] ? tsr[16] : datain;
  assign dataout = stream;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      tsr  <= '0;
      tval <= '0;
    end else if (trailer_enable && token_back) begin
      tsr  <= {1'b0, TRAILER};
      tval <= {1'b0, 16'hFFFF};
    end else begin
      tsr  <= tsr << 1;
      tval <= tval << 1;
    end

  // Token generation and header (master)
  typedef enum logic [1:0] {M_IDLE, M_HDR, M_DATA} mstate_e;
  mstate_e              mstate;
  logic [HDR_BITS-1:0]  hsr;
  logic [4:0]           hleft;
  logic [15:0]          tdet;
  logic                 tok_gen;

  assign pop      = header_enable && mstate == M_IDLE && !fifo_empty;
  assign tokenout = header_enable ? tok_gen : tokenin;

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      mstate <= M_IDLE; hsr <= '0; hleft <= '0; tdet <= '0;
      tok_gen <= 1'b0; ledout <= 1'b0;
    end else begin
      tok_gen <= 1'b0;
      unique case (mstate)
        M_IDLE: begin
          ledout <= 1'b0;
          if (pop) begin
            mstate <= M_HDR;
            hsr    <= {PREAMBLE, 1'b0, tag, 1'b1};
            hleft  <= 5'(HDR_BITS);
            tdet   <= '0;
          end
        end
        M_HDR: begin
          ledout <= hsr[HDR_BITS-1];
          hsr    <= hsr << 1;
          hleft  <= hleft - 1'b1;
          if (hleft == 5'd2) tok_gen <= 1'b1;
          if (hleft == 5'd1) mstate  <= M_DATA;
        end
        M_DATA: begin
          ledout <= stream;
          tdet   <= {tdet[14:0], stream};
          if ({tdet[14:0], stream} == TRAILER) mstate <= M_IDLE;
        end
        default: mstate <= M_IDLE;
      endcase
    end
endmodule
