// tb_readout_buffer: event-level checks of the 24 x 128 readout buffer.
// 1) events written and read back in order with data_avail following the
//    stored event count; 2) a ninth stored event sets OVERFLOW, which clears
//    when one event is read; 3) sixteen overwritten events set ERROR, which
//    stays set until reset; 4) reading an empty buffer changes nothing.
module tb_readout_buffer;
  logic clk = 0, clrB = 1, write = 0, read = 0;
  logic [127:0] i = '0, o;
  logic data_avail, overflow, error;
  logic [127:0] q[$];
  int checks = 0, failures = 0;
  readout_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic put_event();
    for (int w = 0; w < 3; w++) begin
      i = {$urandom, $urandom, $urandom, $urandom};
      q.push_back(i);
      write = 1;
      @(negedge clk);
    end
    write = 0;
  endtask

  task automatic get_event(input bit compare);
    for (int w = 0; w < 3; w++) begin
      read = 1;
      if (compare) begin
        checks++;
        if (o !== q[0]) failures++;
      end
      void'(q.pop_front());
      @(negedge clk);
    end
    read = 0;
  endtask

  task automatic chk(input logic a, input logic ov, input logic er);
    checks += 3;
    if (data_avail !== a) failures++;
    if (overflow !== ov) failures++;
    if (error !== er) failures++;
  endtask

  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    chk(0, 0, 0);
    // 1) in-order readback
    for (int r = 0; r < 5; r++) begin
      int k;
      k = 1 + $urandom % 8;
      for (int e = 0; e < k; e++) put_event();
      chk(1, 0, 0);
      for (int e = 0; e < k; e++) get_event(1);
      chk(0, 0, 0);
    end
    // 4) read of an empty buffer is ignored
    read = 1; repeat (3) @(negedge clk); read = 0;
    chk(0, 0, 0);
    put_event(); get_event(1);
    // 2) overflow
    for (int e = 0; e < 8; e++) put_event();
    chk(1, 0, 0);
    put_event();
    chk(1, 1, 0);
    q.delete();
    get_event(0);
    chk(1, 0, 0);
    // 3) error after 16 overwritten events
    put_event();                       // buffer full again (8 events)
    for (int e = 0; e < 15; e++) put_event();
    chk(1, 1, 0);
    put_event();
    chk(1, 0, 1);                      // counter wrapped
    for (int e = 0; e < 8; e++) get_event(0);
    chk(0, 0, 1);                      // error is sticky
    clrB = 0; @(negedge clk); clrB = 1;
    chk(0, 0, 0);
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
