// trimdac_register: trim DAC register and per-channel trim store.
//
// Every channel has a 4-bit trim DAC that corrects its comparator offset.
// The register holds a channel address (bits 10:4) and a trim value (bits
// 3:0), as specified; one clock after it is loaded, the value is written
// into the addressed channel's entry of the 128 x 4 trim store, whose
// contents drive the channels' trim DACs. Where that per-channel store sits
// is this design's choice. Loaded in parallel by a one-clock 'load' pulse;
// clrB (asynchronous power-up reset) clears the register and all trims.
module trimdac_register #(
  parameter int NCH = abcd_pkg::NCH
) (
  input  logic                   clk,
  input  logic                   clrB,
  input  logic                   load,
  input  logic [15:0]            data,
  output logic [$clog2(NCH)-1:0] addr,
  output logic [3:0]             trim_val,
  output logic [NCH-1:0][3:0]    trim
);
  localparam int CW = $clog2(NCH);
  logic wr;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) begin
      addr <= '0; trim_val <= '0; wr <= 1'b0; trim <= '0;
    end else begin
      wr <= load;
      if (load) begin
        addr     <= data[4 +: CW];
        trim_val <= data[3:0];
      end
      if (wr) trim[addr] <= trim_val;
    end
endmodule
