// tb_calibration_logic: checks the strobe appears exactly CAL_LATENCY (2)
// clocks after the command for one clock, and the calibration line decode
// of the four calibration modes (00 -> line 3, 01 -> 2, 10 -> 1, 11 -> 0).
module tb_calibration_logic;
  logic clk = 0, clrB = 1, calcmd = 0;
  logic [1:0] cal_mode = 0, cald;
  logic strobe;
  logic [3:0] group;
  int checks = 0, failures = 0;
  calibration_logic dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int m = 0; m < 4; m++) begin
      cal_mode = 2'(m);
      #1;
      checks += 2;
      if (group !== 4'(1 << (3 - m))) failures++;
      if (cald !== 2'(m)) failures++;
      calcmd = 1;
      @(negedge clk);
      calcmd = 0;
      for (int c = 1; c <= 5; c++) begin
        checks++;
        if (strobe !== (c == 2)) failures++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
