// tb_readout_controller: master and end-of-chain behaviour.
// A model of the readout logic answers the controller's token with a random
// packet and signals token_back with its last-but-one bit, as the real block
// does. With several L1 triggers queued, the testbench checks that the
// datalink stream is, event after event and without gaps, the header
// <11101><0><L1 count><BC count><1> (counts as they were at the trigger),
// the packet and the 16-bit trailer, and that one token is issued per event.
// It also checks BC reset and that a slave passes tokenin to tokenout.
module tb_readout_controller;
  logic clk = 0, clrB = 1, datain = 0, tokenin = 0, level1 = 0, bcresetB = 1;
  logic header_enable = 1, trailer_enable = 1, token_back = 0;
  logic dataout, tokenout, ledout;
  int checks = 0, failures = 0, tokens = 0, events_done = 0;
  logic [11:0] tags[$];
  logic [3:0] rl1 = 0;
  logic [7:0] rbc = 0;
  bit pkt_q[$];          // packets sent by the model, in order
  int pkt_len[$];        // and their lengths
  bit exp_stream[$];

  readout_controller dut (.*);
  always #5 clk = ~clk;

  // reference counters, sampled like the design at each rising edge
  always @(posedge clk) begin
    if (clrB) begin
      if (level1) tags.push_back({rl1, rbc});
      if (level1) rl1 <= rl1 + 1'b1;
      rbc <= bcresetB ? rbc + 1'b1 : 8'd0;
    end
  end

  // readout logic model
  initial begin
    forever begin
      @(negedge clk);
      if (tokenout && header_enable) begin
        int n;
        bit p[$];
        tokens++;
        p.delete();
        n = 3 + $urandom % 30;
        p.push_back(0);
        for (int b = 1; b < n; b++) p.push_back($urandom % 2);
        foreach (p[b]) pkt_q.push_back(p[b]);
        pkt_len.push_back(n);
        @(negedge clk);
        for (int b = 0; b < n; b++) begin
          datain = p[b];
          token_back = (b == n - 2);
          @(negedge clk);
        end
        datain = 0; token_back = 0;
      end
    end
  end

  task automatic check_event();
    logic [11:0] tag;
    bit got[$];
    int start, len;
    // wait for the preamble
    start = 0;
    for (int t = 0; t < 200 && !ledout; t++) @(negedge clk);
    tag = tags.pop_front();
    exp_stream.delete();
    for (int b = 4; b >= 0; b--) exp_stream.push_back(5'b11101 >> b & 1);
    exp_stream.push_back(0);
    for (int b = 11; b >= 0; b--) exp_stream.push_back(tag[b]);
    exp_stream.push_back(1);
    for (int b = 0; b < 19; b++) begin
      checks++;
      if (ledout !== exp_stream[b]) begin failures++; $display("hdr bit %0d got %b exp %b tag %h t=%0t", b, ledout, exp_stream[b], tag, $time); end
      @(negedge clk);
    end
    // packet from the model then the trailer
    while (pkt_len.size() == 0) @(negedge clk);
    len = pkt_len.pop_front();
    for (int b = 0; b < len; b++) begin
      checks++;
      if (ledout !== pkt_q.pop_front()) begin failures++; $display("pkt bit %0d t=%0t", b, $time); end
      @(negedge clk);
    end
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (ledout !== (b == 0)) begin failures++; $display("trl bit %0d t=%0t", b, $time); end
      @(negedge clk);
    end
    events_done++;
  endtask

  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    repeat (5) @(negedge clk);
    // BC reset
    bcresetB = 0; @(negedge clk); bcresetB = 1;
    repeat (7) @(negedge clk);
    // three triggers close together, then two more later; the datalink
    // checker runs alongside
    fork
      for (int e = 0; e < 5; e++) check_event();
      begin
        for (int k = 0; k < 3; k++) begin
          level1 = 1; @(negedge clk); level1 = 0; repeat (2) @(negedge clk);
        end
        wait (events_done == 3);
        for (int k = 0; k < 2; k++) begin
          repeat ($urandom % 50) @(negedge clk);
          level1 = 1; @(negedge clk); level1 = 0;
          wait (events_done == 4 + k);
        end
      end
    join
    repeat (40) @(negedge clk);
    checks += 2;
    if (tokens != 5) failures++;
    if (ledout !== 0) failures++;
    // slave: token passes through, no header
    header_enable = 0; trailer_enable = 0;
    for (int k = 0; k < 10; k++) begin
      tokenin = $urandom % 2;
      #1;
      checks++;
      if (tokenout !== tokenin) failures++;
      @(negedge clk);
    end
    $display("events=%0d tokens=%0d", events_done, tokens);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
