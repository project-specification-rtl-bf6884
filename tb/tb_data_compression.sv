// tb_data_compression: a readout buffer model supplies random sparse events;
// for each event the testbench computes the matching channels for the
// current criterion (hit, level, edge, test) and checks the presented
// sequence of ch/hit/adj/end, the final datavalid=0/end=1 state, and the
// flush cases (Send_ID, buffer error, buffer overflow), which must still read
// the three words of the event.
module tb_data_compression;
  import abcd_pkg::*;
  logic clk = 0, clrB = 0;
  logic [127:0] i;
  logic overflow = 0, error = 0, sendid = 0, dataavail, next = 0;
  ro_mode_e mode = RO_HIT;
  logic overflowout, adj, datavalid, end_o, buffrd;
  logic [6:0] ch;
  logic [2:0] hit;
  logic [127:0] ev [$];
  int widx = 0;
  int checks = 0, failures = 0, hits_seen = 0, adj_seen = 0, flushes = 0;

  data_compression dut (.*);
  always #5 clk = ~clk;

  assign dataavail = ev.size() >= 3;
  assign i = (ev.size() > 0) ? ev[0] : '0;
  always @(posedge clk) if (buffrd && ev.size() > 0) void'(ev.pop_front());

  task automatic wait_state(output bit ok);
    ok = 0;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      if (datavalid || end_o || overflowout) begin ok = 1; return; end
    end
  endtask

  task automatic run_event(input int density, input int flush);
    logic [127:0] w0, w1, w2;
    logic [127:0] m;
    int list[$];
    bit ok;
    w0 = '0; w1 = '0; w2 = '0;
    for (int c = 0; c < 128; c++) begin
      if ($urandom % 100 < density) w0[c] = 1;
      if ($urandom % 100 < density) w1[c] = 1;
      if ($urandom % 100 < density) w2[c] = 1;
    end
    // clusters of adjacent hits
    if ($urandom % 2) begin int s = $urandom % 120; w1[s +: 3] = 3'b111; end
    for (int c = 0; c < 128; c++)
      if (hit_match(mode, {w0[c], w1[c], w2[c]})) list.push_back(c);
    sendid = (flush == 1); error = (flush == 2); overflow = (flush == 3);
    ev.push_back(w0); ev.push_back(w1); ev.push_back(w2);
    wait_state(ok);
    checks++; if (!ok) failures++;
    checks++; if (ev.size() != 0) failures++;   // all three words read
    if (flush != 0) begin
      flushes++;
      checks += 2;
      if (datavalid) failures++;
      if (flush == 3 ? !overflowout : !end_o) failures++;
    end else begin
      for (int k = 0; k < list.size(); k++) begin
        checks += 5;
        if (!datavalid) failures++;
        if (ch !== 7'(list[k])) failures++;
        if (hit !== {w0[list[k]], w1[list[k]], w2[list[k]]}) failures++;
        if (adj !== (k + 1 < list.size() && list[k+1] == list[k] + 1)) failures++;
        if (end_o !== (k + 1 == list.size())) failures++;
        hits_seen++;
        if (adj) adj_seen++;
        next = 1; @(negedge clk); next = 0;
        if (($urandom % 3) == 0) @(negedge clk);
      end
      checks += 2;
      if (datavalid) failures++;
      if (!end_o) failures++;
    end
    next = 1; @(negedge clk); next = 0;
    sendid = 0; error = 0; overflow = 0;
    @(negedge clk);
    checks++;
    if (datavalid || end_o || overflowout) failures++;
  endtask

  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 200; n++) begin
      mode = ro_mode_e'(n % 4);
      run_event(mode == RO_TEST ? 0 : (n % 3 == 0 ? 0 : 3), 0);
    end
    for (int f = 1; f <= 3; f++) run_event(3, f);
    checks += 2;
    if (adj_seen == 0) failures++;
    if (flushes != 3) failures++;
    $display("hits=%0d adjacent=%0d flushes=%0d", hits_seen, adj_seen, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
