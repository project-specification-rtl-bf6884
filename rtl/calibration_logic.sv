// calibration_logic: calibration strobe and calibration line address.
//
// The calibration command makes the chip inject a test charge into one of
// four groups of channels. CAL_LATENCY clocks after the command pulse
// ('calcmd') the block raises 'strobe' for one clock (it then goes through
// the strobe delay line to the front end). 'cald' (CALD1, CALD0) carries the
// two calibration mode bits of the configuration; 'group' is the one-hot
// calibration line: mode 00 pulses channels 3,7,...,127, 01 channels 2,6,...,
// 10 channels 1,5,..., 11 channels 0,4,..., i.e. group[3 - mode], as
// specified. A fixed command-to-strobe latency is specified but not its
// value; CAL_LATENCY is this design's choice. clrB: asynchronous reset.
module calibration_logic #(
  parameter int CAL_LATENCY = 2
) (
  input  logic       clk,
  input  logic       clrB,
  input  logic       calcmd,
  input  logic [1:0] cal_mode,
  output logic       strobe,
  output logic [1:0] cald,
  output logic [3:0] group
);
  logic [CAL_LATENCY-1:0] dly;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB) dly <= '0;
    else       dly <= {dly[CAL_LATENCY-2:0], calcmd};
  assign strobe = dly[CAL_LATENCY-1];
  assign cald   = cal_mode;
  always_comb begin
    group = '0;
    group[2'd3 - cal_mode] = 1'b1;
  end
endmodule
