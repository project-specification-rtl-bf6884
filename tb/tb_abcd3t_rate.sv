// tb_abcd3t_rate: one side of a detector module at the specified trigger
// rate and occupancy.
//
// Six abcd3t chips at default size form one readout chain: chip 0 is the
// master, chip 5 the end chip. Every strip is hit in about 1% of the beam
// crossings (random channels, new pattern every clock) and L1 triggers arrive
// at random with exponentially distributed spacing, 400 clocks on average:
// 100 kHz at a 40 MHz crossing rate. The bench decodes the master's datalink
// and checks that every trigger gives one complete, well-formed event with
// consecutive L1 numbers and a packet from each of the six chips, and that
// the fraction of chip events lost to readout buffer overflow stays at or
// below 1%. It also reports the mean and longest event length on the link.
`timescale 1ns/1ps
module tb_abcd3t_rate;
  import abcd_pkg::*;

  localparam int NCHIP  = 6;
  localparam int NTRIG  = 300;
  localparam real MEAN_GAP = 400.0;  // clocks between triggers

  logic clk = 0, com = 0, resetB = 0, run = 0;
  logic [NCH-1:0] hits [NCHIP];
  logic tok_o [NCHIP], tok_oB [NCHIP], tok_oBP [NCHIP], tok_oBPB [NCHIP];
  logic dat_o [NCHIP], dat_oB [NCHIP], dat_oBP [NCHIP], dat_oBPB [NCHIP];
  logic link [NCHIP], linkB [NCHIP];

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    logic ti, tiB, di, diB;
    if (k == 0) begin : g_first
      assign ti = 0, tiB = 1;
    end else begin : g_tok
      assign ti = tok_o[k-1], tiB = tok_oB[k-1];
    end
    if (k == NCHIP - 1) begin : g_last
      assign di = 0, diB = 1;
    end else begin : g_dat
      assign di = dat_o[k+1], diB = dat_oB[k+1];
    end
    logic [7:0] thr, cala;
    logic [4:0] ish, ipre;
    logic [1:0] trr, cald;
    logic [NCH-1:0][3:0] trim;
    logic cals;
    logic [3:0] calg;
    abcd3t u_chip (
      .clk0(clk), .clk0B(~clk), .clk1(1'b0), .clk1B(1'b1),
      .com0(com), .com0B(~com), .com1(1'b0), .com1B(1'b1), .select(1'b0),
      .resetB, .id(5'(k)), .masterB(k != 0),
      .tokenin(ti), .tokeninB(tiB), .tokeninBP(1'b0), .tokeninBPB(1'b1),
      .datain(di), .datainB(diB), .datainBP(1'b0), .datainBPB(1'b1),
      .tokenout(tok_o[k]), .tokenoutB(tok_oB[k]), .tokenoutBP(tok_oBP[k]),
      .tokenoutBPB(tok_oBPB[k]),
      .dataout(dat_o[k]), .dataoutB(dat_oB[k]), .dataoutBP(dat_oBP[k]),
      .dataoutBPB(dat_oBPB[k]),
      .datalink(link[k]), .datalinkB(linkB[k]),
      .hits(hits[k]), .threshold(thr), .calamp(cala), .ish, .ipre,
      .trim_range(trr), .trim, .cal_strobe(cals), .cald, .cal_group(calg)
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // 1% occupancy: each chip gets three chances of 43% to hit a random
  // channel every clock, about 1.3 hits per crossing
  always @(negedge clk)
    for (int k = 0; k < NCHIP; k++) begin
      hits[k] = '0;
      if (run)
        for (int j = 0; j < 3; j++)
          if ($urandom % 100 < 43) hits[k][$urandom % NCH] = 1'b1;
    end

  // ------------------------------------------------------------- commands
  task automatic send(logic [255:0] v, int n);
    for (int b = n - 1; b >= 0; b--) begin
      com = v[b];
      @(negedge clk);
    end
    com = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic cmd_slow(logic [5:0] addr, logic [5:0] rg, logic [127:0] d, int nd);
    logic [255:0] v;
    v = {7'b101_0111, 8'(12 + nd), addr, rg};
    for (int b = nd - 1; b >= 0; b--) v = {v[254:0], d[b]};
    send(v, 27 + nd);
  endtask

  // ---------------------------------------------------------- link decoder
  // per event: L1 number, length in bits, and per chip whether a packet was
  // seen and whether it was an overflow error
  int ev_l1 [$], ev_len [$], ev_chips [$], ev_ovf [$], ev_bad [$];
  int n_hits;

  function automatic int bits(bit q[$], int i, int n);
    int r = 0;
    for (int b = 0; b < n; b++) r = (r << 1) | ((i + b < q.size()) ? int'(q[i + b]) : 0);
    return r;
  endfunction

  initial begin : decoder
    bit q[$];
    logic [15:0] w;
    logic [4:0] pre;
    pre = 0;
    forever begin
      @(negedge clk);
      pre = {pre[3:0], link[0]};
      if (pre == PREAMBLE && resetB && run) begin
        int i, seen, ovf, bad, l1;
        q.delete();
        for (int b = 0; b < 14; b++) begin @(negedge clk); q.push_back(link[0]); end
        l1 = bits(q, 1, 4);
        bad = (q[0] !== 0 || q[13] !== 1);
        q.delete(); w = 0;
        for (int b = 0; b < 20000; b++) begin
          @(negedge clk);
          q.push_back(link[0]);
          w = {w[14:0], link[0]};
          if (w == TRAILER && q.size() >= 16) break;
        end
        repeat (16) void'(q.pop_back());
        // walk the packets; each chip's data starts with a 0
        i = 0; seen = 0; ovf = 0;
        while (i < q.size() && !bad) begin
          if (bits(q, i, 2) == 2'b01) begin
            int a;
            a = bits(q, i + 2, 4);
            if (a >= NCHIP || q[i + 13] !== 1) bad = 1;
            else seen |= 1 << a;
            n_hits++;
            i += 17;
            while (i < q.size() && q[i] == 1) begin n_hits++; i += 4; end
          end else if (bits(q, i, 3) == 3'b001) begin
            // no-hit packets carry no address: count them in chain order
            for (int k = 0; k < NCHIP; k++)
              if (!seen[k]) begin seen |= 1 << k; break; end
            i += 3;
          end else begin
            int a, code;
            a = bits(q, i + 3, 4);
            code = bits(q, i + 7, 3);
            if (a >= NCHIP || code == 3'b111 || q[i + 10] !== 1) bad = 1;
            else begin
              seen |= 1 << a;
              if (code == ERR_OVERFLOW) ovf++;
            end
            i += 11;
          end
        end
        ev_l1.push_back(l1);
        ev_len.push_back(19 + q.size() + 16);
        ev_chips.push_back(seen);
        ev_ovf.push_back(ovf);
        ev_bad.push_back(bad);
        pre = 0;
      end
    end
  end

  // ------------------------------------------------------------------ main
  initial begin : main
    int sent, ovf_total, maxlen, sumlen, seq_bad, chips_bad, bad_total;
    for (int k = 0; k < NCHIP; k++) hits[k] = '0;
    resetB = 1;
    #1 resetB = 0;
    repeat (3) @(negedge clk);
    resetB = 1;
    repeat (2) @(negedge clk);

    // chip 0 master, chip 5 end chip, level criterion, no channel masked
    for (int k = 0; k < NCHIP; k++) begin
      cmd_slow({1'b1, 5'(k)}, F5_CONFIG,
               128'({2'b00, 1'b1, k == NCHIP - 1, k != 0, 9'b0_0000_0000, RO_LEVEL}), 16);
      cmd_slow({1'b1, 5'(k)}, F5_MASK, '1, 128);
    end
    // flush the undefined pipeline contents, clear counters, start
    repeat (140) @(negedge clk);
    send(7'b101_0100, 7);
    cmd_slow(6'b111111, F5_DATA_TAKE, '0, 0);
    run = 1;
    repeat (200) @(negedge clk);

    sent = 0;
    for (int n = 0; n < NTRIG; n++) begin
      real u;
      int gap;
      u = real'($urandom % 1000000 + 1) / 1.0e6;
      gap = int'(-MEAN_GAP * $ln(u));
      repeat (gap) @(negedge clk);
      send(3'b110, 3);
      sent++;
    end
    for (int t = 0; t < 200000 && ev_l1.size() < sent; t++) @(negedge clk);
    run = 0;

    check(ev_l1.size() == sent, $sformatf("events %0d for %0d triggers", ev_l1.size(), sent));
    ovf_total = 0; maxlen = 0; sumlen = 0; seq_bad = 0; chips_bad = 0; bad_total = 0;
    foreach (ev_l1[e]) begin
      if (ev_l1[e] != (e & 15)) seq_bad++;
      if (ev_chips[e] != (1 << NCHIP) - 1) chips_bad++;
      bad_total += ev_bad[e];
      ovf_total += ev_ovf[e];
      sumlen += ev_len[e];
      if (ev_len[e] > maxlen) maxlen = ev_len[e];
    end
    check(seq_bad == 0, $sformatf("L1 numbers out of sequence: %0d", seq_bad));
    check(chips_bad == 0, $sformatf("events without all %0d chips: %0d", NCHIP, chips_bad));
    check(bad_total == 0, $sformatf("malformed events: %0d", bad_total));
    check(n_hits > 0, "hits read out");
    check(ovf_total * 100 <= sent * NCHIP,
          $sformatf("data loss %0d of %0d chip events", ovf_total, sent * NCHIP));
    $display("triggers=%0d events=%0d hits=%0d lost_chip_events=%0d mean_len=%0d max_len=%0d bits",
             sent, ev_l1.size(), n_hits, ovf_total,
             ev_l1.size() > 0 ? sumlen / ev_l1.size() : 0, maxlen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #8ms;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
