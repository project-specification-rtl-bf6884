// tb_input_register: loads a random mask serially (channel 127 first), then
// applies random hits in normal, edge-detect, test and pulse modes and
// compares the output with a reference computed in the testbench.
module tb_input_register;
  logic clk = 0, clrB = 1, load = 0, sin = 0, mode = 0, edgemode = 0, pulse = 0;
  logic [127:0] i = '0, o;
  logic [127:0] rmask, rprev, rexp;
  int checks = 0, failures = 0;
  input_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    rprev = '0;
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    // all channels masked after reset
    i = '1; @(negedge clk);
    checks++; if (o !== '0) failures++;
    rmask = {$urandom, $urandom, $urandom, $urandom};
    for (int b = 127; b >= 0; b--) begin
      load = 1; sin = rmask[b];
      @(negedge clk);
    end
    load = 0;
    rprev = i;
    for (int n = 0; n < 400; n++) begin
      mode     = (n >= 300);
      edgemode = (n >= 100 && n < 200);
      pulse    = (n % 37) == 5;
      i = {$urandom, $urandom, $urandom, $urandom};
      if (mode)          rexp = rmask;
      else if (edgemode) rexp = i & ~rprev;
      else               rexp = i;
      if (pulse) rexp = '1;
      rexp &= rmask;
      @(negedge clk);
      rprev = i;
      checks++;
      if (o !== rexp) failures++;
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
