// threshold_cal_register: threshold / calibration amplitude DAC register.
//
// A 16-bit register whose MS byte is the threshold DAC code and whose LS byte
// is the calibration amplitude DAC code, as specified. It is loaded in
// parallel from the command decoder's data word by a one-clock 'load' pulse
// (the parallel hand-over is this design's choice). Cleared to zero by the
// asynchronous power-up reset. The DACs themselves are analogue.
module threshold_cal_register (
  input  logic        clk,
  input  logic        clrB,
  input  logic        load,
  input  logic [15:0] data,
  output logic [7:0]  threshold,
  output logic [7:0]  calamp
);
  logic [15:0] r;
  always_ff @(posedge clk or negedge clrB)
    if (!clrB)     r <= '0;
    else if (load) r <= data;
  assign threshold = r[15:8];
  assign calamp    = r[7:0];
endmodule
