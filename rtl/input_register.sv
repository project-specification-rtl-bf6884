// input_register: input register, edge detection and channel mask register.
//
// Every clock the 128 discriminator outputs 'i' are latched so that the
// pipeline receives a well defined one-clock sample per channel. With
// 'edgemode' set, a channel gives a '1' only in the first clock of a hit (the
// 0-to-1 onset), so each hit writes a single '1' whatever the length of the
// discriminator pulse. The mask register (a 128-bit shift register loaded
// serially, MS bit = channel 127 first, while 'load' is high) masks channels
// with '0'. In test mode ('mode'=1) the mask contents replace the hit data.
// 'pulse' sets every unmasked output for one clock.
//
// Timing: o is registered; a hit sampled at edge n appears on o after edge n
// (edge mode compares with the sample of edge n-1). clrB is the asynchronous
// power-up reset and clears the outputs, history and mask (all masked).
// Detecting the onset rather than the end of a hit, and the reset value of
// the mask, are this design's choices.
module input_register #(
  parameter int NCH = abcd_pkg::NCH
) (
  input  logic           clk,
  input  logic           clrB,
  input  logic [NCH-1:0] i,
  input  logic           load,
  input  logic           sin,
  input  logic           mode,
  input  logic           edgemode,
  input  logic           pulse,
  output logic [NCH-1:0] o
);
  logic [NCH-1:0] mask, prev, sel;

  always_comb begin
    if (mode)          sel = mask;
    else if (edgemode) sel = i & ~prev;
    else               sel = i;
    if (pulse)         sel = '1;
  end

  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      mask <= '0;
      prev <= '0;
      o    <= '0;
    end else begin
      prev <= i;
      o    <= sel & mask;
      if (load) mask <= {mask[NCH-2:0], sin};
    end
endmodule
