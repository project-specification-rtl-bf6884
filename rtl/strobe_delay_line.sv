// strobe_delay_line: behavioural model of the calibration strobe delay.
//
// Behavioural model, not synthesizable logic: the real part is an analogue
// delay line. The output follows the input after
//   delay = MIN_DELAY_PS + code * STEP_PS
// picoseconds, a transport delay. The step of 0.8 ns and the 64 steps follow
// the chip specification; the minimum delay is not specified and is a
// parameter (1 ns by default).
module strobe_delay_line #(
  parameter int MIN_DELAY_PS = 1000,
  parameter int STEP_PS      = 800
) (
  input  logic       strobein,
  input  logic [5:0] code,
  output logic       strobeout
);
  // Rising and falling input edges are delayed by separate processes, each
  // toggling its own flag, so that a strobe shorter than the delay is passed
  // unchanged (transport delay); the output is the XOR of the two flags.
  logic rise_t, fall_t;
  initial begin
    rise_t = 1'b0;
    fall_t = 1'b0;
  end
  always @(posedge strobein)
    rise_t <= #((MIN_DELAY_PS + {26'd0, code} * STEP_PS) * 1ps) ~rise_t;
  always @(negedge strobein)
    fall_t <= #((MIN_DELAY_PS + {26'd0, code} * STEP_PS) * 1ps) ~fall_t;
  assign strobeout = rise_t ^ fall_t;
endmodule
