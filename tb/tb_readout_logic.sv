// tb_readout_logic: the readout logic is fed by the data compression logic
// and a model of the readout buffer. For each case (physics data with
// isolated and adjacent hits, no hit, no event, overflow, buffer error,
// Send_ID) the testbench builds the expected bit stream from the packet
// formats, gives the token, and compares dataout bit by bit. It checks that
// tokenout pulses once, together with the last-but-one bit, that the event
// is released afterwards, and that datain is forwarded with one clock delay.
module tb_readout_logic;
  import abcd_pkg::*;
  logic clk = 0, clrB = 0;
  logic [127:0] bw;
  logic overflow = 0, error = 0, sendid = 0, dataavail;
  ro_mode_e mode = RO_LEVEL;
  logic overflowout, adj, datavalid, end_o, buffrd, next;
  logic [6:0] ch;
  logic [2:0] hit;
  logic datain = 0, tokenin = 0, dataout, tokenout;
  logic [3:0] id = 4'hD;
  logic [15:0] cfg = 16'hA5C3;
  logic [127:0] ev [$];
  int checks = 0, failures = 0;
  int n_phys = 0, n_adj = 0, n_nohit = 0, n_nodata = 0, n_ovf = 0, n_err = 0, n_cfg = 0;

  data_compression u_dc (.clk, .clrB, .i(bw), .overflow, .error, .sendid, .dataavail,
    .mode, .next, .overflowout, .adj, .ch, .hit, .datavalid, .end_o, .buffrd);
  readout_logic dut (.clk, .clrB, .datain, .tokenin, .ch, .hit, .datavalid, .adj,
    .end_i(end_o), .id, .overflow(overflowout), .error, .sendid, .config_i(cfg),
    .dataout, .tokenout, .next);

  always #5 clk = ~clk;
  assign dataavail = ev.size() >= 3;
  assign bw = (ev.size() > 0) ? ev[0] : '0;
  always @(posedge clk) if (buffrd && ev.size() > 0) void'(ev.pop_front());

  task automatic push_bits(ref bit q[$], input logic [31:0] v, input int n);
    for (int b = n - 1; b >= 0; b--) q.push_back(v[b]);
  endtask

  // kind: 0 physics, 1 no event, 2 overflow, 3 error, 4 send_id
  task automatic run_case(input int kind, input int nhits);
    logic [127:0] w1;
    int list[$];
    bit exp_q[$];
    int tok_at;
    w1 = '0;
    if (kind != 1) begin
      for (int k = 0; k < nhits; k++) w1[$urandom % 128] = 1;
      if (nhits > 2) w1[($urandom % 100) +: 3] = 3'b111;
      for (int c = 0; c < 128; c++) if (w1[c]) list.push_back(c);
      ev.push_back('0); ev.push_back(w1); ev.push_back('0);
    end
    sendid = kind == 4; error = kind == 3; overflow = kind == 2;
    repeat (8) @(negedge clk);
    // expected stream
    if (kind == 4) begin
      push_bits(exp_q, {3'b000, id, 3'b111, cfg[15:8], 1'b1, cfg[7:0]}, 27); n_cfg++;
    end else if (kind == 3) begin
      push_bits(exp_q, {3'b000, id, 3'b100, 1'b1}, 11); n_err++;
    end else if (kind == 1) begin
      push_bits(exp_q, {3'b000, id, 3'b001, 1'b1}, 11); n_nodata++;
    end else if (kind == 2) begin
      push_bits(exp_q, {3'b000, id, 3'b010, 1'b1}, 11); n_ovf++;
    end else if (list.size() == 0) begin
      push_bits(exp_q, 3'b001, 3); n_nohit++;
    end else begin
      n_phys++;
      for (int k = 0; k < list.size(); k++) begin
        if (k > 0 && list[k] == list[k-1] + 1) begin
          push_bits(exp_q, {1'b1, 3'b010}, 4); n_adj++;
        end else
          push_bits(exp_q, {2'b01, id, 7'(list[k]), 1'b1, 3'b010}, 17);
      end
    end
    // token
    tokenin = 1;
    @(negedge clk);
    tokenin = 0;
    tok_at = -1;
    for (int b = 0; b < exp_q.size(); b++) begin
      checks++;
      if (dataout !== exp_q[b]) failures++;
      if (tokenout) begin
        if (tok_at >= 0) failures++;
        tok_at = b;
      end
      @(negedge clk);
    end
    checks++;
    if (tok_at != exp_q.size() - 2) failures++;
    // forwarded data
    for (int b = 0; b < 20; b++) begin
      logic d;
      d = $urandom % 2;
      datain = d;
      @(negedge clk);
      checks++;
      if (dataout !== d || tokenout) failures++;
    end
    datain = 0;
    // event released
    checks++;
    if (datavalid || end_o || overflowout || ev.size() != 0) failures++;
    sendid = 0; error = 0; overflow = 0;
  endtask

  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 60; n++) run_case(0, n % 7);
    for (int k = 1; k <= 4; k++) run_case(k, 3);
    checks++;
    if (n_phys == 0 || n_adj == 0 || n_nohit == 0 || n_nodata == 0 || n_ovf == 0 ||
        n_err == 0 || n_cfg == 0) failures++;
    $display("physics=%0d adjacent=%0d nohit=%0d nodata=%0d overflow=%0d error=%0d config=%0d",
             n_phys, n_adj, n_nohit, n_nodata, n_ovf, n_err, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
