// tb_event_fifo: random pushes and pops against a queue model; checks data
// order, empty/full flags and that 24 tags fit and a 25th is dropped.
module tb_event_fifo;
  logic clk = 0, clrB = 1, push = 0, pop = 0;
  logic [11:0] din = 0, dout;
  logic empty, full;
  logic [11:0] q[$];
  int checks = 0, failures = 0, fulls = 0;
  event_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias, sz;
      bias = (n / 300) % 2 == 0 ? 3 : 1;
      din  = 12'($urandom);
      push = ($urandom % 4) < bias;
      pop  = !empty && ($urandom % 4) >= bias;
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == 24)) failures++;
      if (q.size() != 0 && dout !== q[0]) failures++;
      if (full) fulls++;
      sz = q.size();
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push && sz < 24) q.push_back(din);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
