// tb_trigger_counters: random L1 pulses and BC resets against reference
// counters (4-bit L1 count, 8-bit beam crossing count, both wrapping).
module tb_trigger_counters;
  logic clk = 0, clrB = 1, level1 = 0, bcresetB = 1;
  logic [3:0] l1cnt;
  logic [7:0] bccnt;
  logic [3:0] rl1 = 0;
  logic [7:0] rbc = 0;
  int checks = 0, failures = 0;
  trigger_counters dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 1000; n++) begin
      level1   = ($urandom % 3) == 0;
      bcresetB = ($urandom % 97) != 0;
      @(negedge clk);
      if (level1) rl1++;
      rbc = bcresetB ? rbc + 1'b1 : 8'd0;
      checks += 2;
      if (l1cnt !== rl1) failures++;
      if (bccnt !== rbc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
