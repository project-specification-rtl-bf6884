// tb_abcd3t_module: end-to-end test of a three-chip module chain.
//
// Three abcd3t chips at default size share the clock and command lines:
// chip 0 is the master (masterB low), chip 1 sits in the middle and chip 2 is
// the end chip. Normal token/data links run 0 -> 1 -> 2 and back; bypass
// links connect chip 0 directly to chip 2 so chip 1 can be skipped. Every
// action goes through the serial command line, and everything is checked on
// the master's datalink output, which a decoder in this bench turns back into
// events (header, packets per chip, trailer). Checked mechanisms, each
// counted, and the test fails if any count stays zero:
//   clock feed-through after power-up, Send_ID configuration packets, soft
//   reset (L1 count restarts), BC reset (crossing count differences),
//   physics packets and adjacent-hit continuations in hit, level and test
//   modes, no-hit packets (edge readout criterion on static hits), readout
//   buffer overflow error packets during a trigger burst, input edge
//   detection (each hit seen in exactly one sample across a trigger burst),
//   pulse input register command, accumulator mode, test (mask) input
//   mode, bypass of the middle chip,
//   calibration strobe with group selection, and DAC/trim register loads.
// A watchdog stops the run if the chain hangs.
`timescale 1ns/1ps
module tb_abcd3t_module;
  import abcd_pkg::*;

  logic clk = 0, com = 0, resetB = 0;
  logic [NCH-1:0] hits [3];
  logic [NCH-1:0] mask [3];

  // chain wiring
  logic tok_o [3], tok_oB [3], tok_oBP [3], tok_oBPB [3];
  logic dat_o [3], dat_oB [3], dat_oBP [3], dat_oBPB [3];
  logic link [3], linkB [3];
  logic [7:0] threshold [3], calamp [3];
  logic [4:0] ish [3], ipre [3];
  logic [1:0] trim_range [3], cald [3];
  logic [NCH-1:0][3:0] trim [3];
  logic cal_strobe [3];
  logic [3:0] cal_group [3];

  for (genvar k = 0; k < 3; k++) begin : g_chip
    // token in: chip 0 none, chip 1 from chip 0, chip 2 from chip 1 or bypass
    logic ti, tiB, tiBP, tiBPB, di, diB, diBP, diBPB;
    if (k == 0) begin : g_first
      assign ti = 0, tiB = 1, tiBP = 0, tiBPB = 1;
      assign di = dat_o[1], diB = dat_oB[1], diBP = dat_oBP[2], diBPB = dat_oBPB[2];
    end else if (k == 1) begin : g_mid
      assign ti = tok_o[0], tiB = tok_oB[0], tiBP = 0, tiBPB = 1;
      assign di = dat_o[2], diB = dat_oB[2], diBP = 0, diBPB = 1;
    end else begin : g_last
      assign ti = tok_o[1], tiB = tok_oB[1], tiBP = tok_oBP[0], tiBPB = tok_oBPB[0];
      assign di = 0, diB = 1, diBP = 0, diBPB = 1;
    end
    abcd3t u_chip (
      .clk0(clk), .clk0B(~clk), .clk1(1'b0), .clk1B(1'b1),
      .com0(com), .com0B(~com), .com1(1'b0), .com1B(1'b1), .select(1'b0),
      .resetB, .id(5'(k)), .masterB(k != 0),
      .tokenin(ti), .tokeninB(tiB), .tokeninBP(tiBP), .tokeninBPB(tiBPB),
      .datain(di), .datainB(diB), .datainBP(diBP), .datainBPB(diBPB),
      .tokenout(tok_o[k]), .tokenoutB(tok_oB[k]), .tokenoutBP(tok_oBP[k]),
      .tokenoutBPB(tok_oBPB[k]),
      .dataout(dat_o[k]), .dataoutB(dat_oB[k]), .dataoutBP(dat_oBP[k]),
      .dataoutBPB(dat_oBPB[k]),
      .datalink(link[k]), .datalinkB(linkB[k]),
      .hits(hits[k]), .threshold(threshold[k]), .calamp(calamp[k]),
      .ish(ish[k]), .ipre(ipre[k]), .trim_range(trim_range[k]), .trim(trim[k]),
      .cal_strobe(cal_strobe[k]), .cald(cald[k]), .cal_group(cal_group[k])
    );
  end

  always #5 clk = ~clk;

  // time of the last rising edge of the calibration strobe
  realtime t_cal;
  always @(posedge cal_strobe[0]) t_cal = $realtime;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_feedthrough, n_sendid, n_softreset, n_bcreset, n_physics, n_adjacent;
  int n_nohit, n_overflow, n_edge, n_accumulate, n_testmode, n_bypass;
  int n_calstrobe, n_dacload, n_modes, n_l1, n_pulse;

  // ---------------------------------------------------------------- commands
  task automatic send(logic [255:0] v, int n);
    for (int b = n - 1; b >= 0; b--) begin
      com = v[b];
      @(negedge clk);
    end
    com = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic cmd_l1();      send(3'b110, 3);      endtask
  task automatic cmd_soft();    send(7'b101_0100, 7); endtask
  task automatic cmd_bcreset(); send(7'b101_0010, 7); endtask

  // slow command: 101 0111 <n> <addr> <reg> <data: nd bits>
  task automatic cmd_slow(logic [5:0] addr, logic [5:0] rg, logic [127:0] d, int nd);
    logic [255:0] v;
    v = {7'b101_0111, 8'(12 + nd), addr, rg};
    for (int b = nd - 1; b >= 0; b--) v = {v[254:0], d[b]};
    send(v, 27 + nd);
  endtask

  localparam logic [5:0] BCAST = 6'b111111;
  function automatic logic [5:0] addr_of(int k); return {1'b1, 5'(k)}; endfunction

  logic [15:0] cfg [3];
  task automatic set_cfg(int k, logic [15:0] c);
    cfg[k] = c;
    cmd_slow(addr_of(k), F5_CONFIG, 128'(c), 16);
  endtask

  // configuration word: fields from bit 15 down
  function automatic logic [15:0] mkcfg(bit ftn, bit endc, bit mastn, bit obp, bit ibp,
                                        bit acc, bit mm, bit edg, logic [1:0] cal, logic [1:0] ro);
    return {2'b00, ftn, endc, mastn, obp, ibp, acc, mm, edg, 2'b01, cal, ro};
  endfunction

  // ----------------------------------------------------------- link decoder
  typedef struct {
    int l1, bc;
    logic [2:0] d [3][NCH];
    bit v [3][NCH];
    int nohit, phys, adj, bad;
    int errcode [3];
    int cfgword [3];
  } ev_t;
  ev_t evq[$];
  int  ev_total;

  function automatic int bits(bit q[$], int i, int n);
    int r = 0;
    for (int b = 0; b < n; b++) r = (r << 1) | ((i + b < q.size()) ? int'(q[i + b]) : 0);
    return r;
  endfunction

  function automatic void parse(bit q[$], ref ev_t e);
    int i = 0;
    for (int k = 0; k < 3; k++) begin
      e.errcode[k] = -1; e.cfgword[k] = -1;
      for (int c = 0; c < NCH; c++) begin e.v[k][c] = 0; e.d[k][c] = 0; end
    end
    e.nohit = 0; e.phys = 0; e.adj = 0; e.bad = 0;
    while (i < q.size()) begin
      if (bits(q, i, 2) == 2'b01) begin
        int a, c;
        a = bits(q, i + 2, 4); c = bits(q, i + 6, 7);
        if (a > 2 || q[i + 13] !== 1) begin e.bad++; return; end
        e.v[a][c] = 1; e.d[a][c] = 3'(bits(q, i + 14, 3)); e.phys++;
        i += 17;
        while (i < q.size() && q[i] == 1) begin
          c++;
          if (c >= NCH) begin e.bad++; return; end
          e.v[a][c] = 1; e.d[a][c] = 3'(bits(q, i + 1, 3)); e.adj++;
          i += 4;
        end
      end else if (bits(q, i, 3) == 3'b001) begin
        e.nohit++; i += 3;
      end else begin
        int a, code;
        a = bits(q, i + 3, 4); code = bits(q, i + 7, 3);
        if (a > 2) begin e.bad++; return; end
        if (code == 3'b111) begin
          e.cfgword[a] = (bits(q, i + 10, 8) << 8) | bits(q, i + 19, 8);
          if (q[i + 18] !== 1) e.bad++;
          i += 27;
        end else begin
          e.errcode[a] = code;
          if (q[i + 10] !== 1) e.bad++;
          i += 11;
        end
      end
    end
  endfunction

  initial begin : decoder
    bit q[$];
    logic [15:0] w;
    logic [4:0] pre;
    ev_t e;
    pre = 0;
    forever begin
      @(negedge clk);
      pre = {pre[3:0], link[0]};
      if (pre == PREAMBLE && resetB) begin
        int hdr;
        q.delete();
        for (int b = 0; b < 14; b++) begin @(negedge clk); q.push_back(link[0]); end
        hdr = bits(q, 0, 14);
        e.l1 = (hdr >> 9) & 15; e.bc = (hdr >> 1) & 255;
        if (q[0] !== 0 || q[13] !== 1) e.bad = 1;
        q.delete(); w = 0;
        for (int b = 0; b < 2000; b++) begin
          @(negedge clk);
          q.push_back(link[0]);
          w = {w[14:0], link[0]};
          if (w == TRAILER && q.size() >= 16) break;
        end
        repeat (16) void'(q.pop_back());
        parse(q, e);
        evq.push_back(e);
        ev_total++;
        pre = 0;
      end
    end
  end

  // wait for n decoded events, with a bound
  task automatic wait_events(int n, int limit = 20000);
    for (int t = 0; t < limit && evq.size() < n; t++) @(negedge clk);
    check(evq.size() >= n, $sformatf("expected %0d events, have %0d", n, evq.size()));
  endtask

  int l1_sent;
  task automatic trigger();
    cmd_l1();
    l1_sent++;
  endtask

  // check a decoded event against expected channel sets per chip
  task automatic check_hits(ev_t e, logic [NCH-1:0] exp [3], logic [2:0] expd,
                            bit chip_on [3], string what);
    for (int k = 0; k < 3; k++) begin
      int bad = 0;
      for (int c = 0; c < NCH; c++) begin
        if (chip_on[k]) begin
          if (e.v[k][c] !== exp[k][c]) bad++;
          else if (exp[k][c] && e.d[k][c] !== expd) bad++;
        end else if (e.v[k][c]) bad++;
      end
      check(bad == 0, $sformatf("%s chip %0d: %0d channel mismatches", what, k, bad));
    end
    check(e.bad == 0, {what, " packet format"});
  endtask

  function automatic logic [NCH-1:0] rnd_hits(int pct);
    logic [NCH-1:0] h = '0;
    for (int c = 0; c < NCH; c++) if ($urandom % 100 < pct) h[c] = 1;
    // make sure there is an adjacent pair
    h[10 + $urandom % 100 +: 2] = 2'b11;
    return h;
  endfunction

  bit all_on [3] = '{1, 1, 1};

  // ------------------------------------------------------------------- main
  initial begin : main
    ev_t e;
    logic [NCH-1:0] expv [3];
    int toggles, bc1, bc2;
    for (int k = 0; k < 3; k++) begin hits[k] = '0; mask[k] = '0; end
    l1_sent = 0;
    resetB = 1;
    #1 resetB = 0;
    repeat (3) @(negedge clk);
    resetB = 1;
    repeat (2) @(negedge clk);

    // clock feed-through is the power-up state of a master
    toggles = 0;
    for (int t = 0; t < 20; t++) begin
      logic prev;
      prev = link[0];
      @(negedge clk);
      if (link[0] !== prev) toggles++;
    end
    check(toggles == 20, "clock feed-through toggles every clock");
    if (toggles == 20) n_feedthrough++;

    // configuration: chip 0 master, chip 2 end chip, level readout
    set_cfg(0, mkcfg(1, 0, 0, 0, 0, 0, 0, 0, 2'b00, RO_LEVEL));
    set_cfg(1, mkcfg(1, 0, 1, 0, 0, 0, 0, 0, 2'b00, RO_LEVEL));
    set_cfg(2, mkcfg(1, 1, 1, 0, 0, 0, 0, 0, 2'b00, RO_LEVEL));
    for (int k = 0; k < 3; k++) begin
      mask[k] = '1;
      for (int j = 0; j < 4; j++) mask[k][$urandom % NCH] = 0;
      cmd_slow(addr_of(k), F5_MASK, mask[k], 128);
    end
    // pipeline contents are undefined after power-up: flush with no hits,
    // then a soft reset clears the accumulator and the L1 counter
    repeat (140) @(negedge clk);
    cmd_soft();
    repeat (5) @(negedge clk);

    // Send_ID mode: each chip answers with its configuration
    trigger();
    wait_events(1);
    e = evq.pop_front();
    check(e.l1 == 0, "L1 count after soft reset");
    if (e.l1 == 0) n_softreset++;
    for (int k = 0; k < 3; k++) begin
      check(e.cfgword[k] == int'(cfg[k]), $sformatf("Send_ID config of chip %0d: %h", k, e.cfgword[k]));
      if (e.cfgword[k] == int'(cfg[k])) n_sendid++;
    end

    // enable data taking in every chip
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);

    // physics in level, hit and test readout modes with static hits
    for (int m = 0; m < 4; m++) begin
      ro_mode_e mode;
      mode = (m == 0) ? RO_LEVEL : (m == 1) ? RO_HIT : (m == 2) ? RO_TEST : RO_EDGE;
      for (int k = 0; k < 3; k++)
        set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 0, 0, 0, 2'b00, mode));
      cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
      for (int k = 0; k < 3; k++) hits[k] = rnd_hits(5);
      repeat (140) @(negedge clk);
      trigger();
      wait_events(1);
      e = evq.pop_front();
      n_l1++;
      for (int k = 0; k < 3; k++)
        expv[k] = (mode == RO_TEST) ? '1 : (mode == RO_EDGE) ? '0 : hits[k] & mask[k];
      if (mode == RO_TEST) begin
        // test mode: every channel, samples show the (masked) hits
        for (int k = 0; k < 3; k++) begin
          int bad;
          bad = 0;
          for (int c = 0; c < NCH; c++)
            if (!e.v[k][c] || e.d[k][c] !== {3{hits[k][c] & mask[k][c]}}) bad++;
          check(bad == 0, $sformatf("test readout chip %0d: %0d bad", k, bad));
        end
      end else check_hits(e, expv, 3'b111, all_on, $sformatf("mode %0d", mode));
      if (mode == RO_EDGE) begin
        check(e.nohit == 3, "no-hit packets with static hits in edge readout");
        n_nohit += e.nohit;
      end
      n_physics += e.phys;
      n_adjacent += e.adj;
      n_modes++;
    end

    // BC reset: crossing counts follow the clock from the reset
    for (int k = 0; k < 3; k++) hits[k] = '0;
    for (int k = 0; k < 3; k++)
      set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 0, 0, 0, 2'b00, RO_HIT));
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    cmd_bcreset();
    repeat (20) @(negedge clk);
    trigger();
    wait_events(1);
    bc1 = evq.pop_front().bc;
    cmd_bcreset();
    repeat (57) @(negedge clk);
    trigger();
    wait_events(1);
    bc2 = evq.pop_front().bc;
    check(bc2 - bc1 == 37, $sformatf("BC counts %0d %0d", bc1, bc2));
    if (bc2 - bc1 == 37 && bc1 < 40) n_bcreset++;

    // overflow: a burst of 14 triggers fills the 8-event buffer
    for (int j = 0; j < 14; j++) trigger();
    wait_events(14, 40000);
    begin
      int l1_prev = -1, ovf = 0, seq_bad = 0;
      while (evq.size() > 0) begin
        e = evq.pop_front();
        if (l1_prev >= 0 && e.l1 != ((l1_prev + 1) & 15)) seq_bad++;
        l1_prev = e.l1;
        for (int k = 0; k < 3; k++) if (e.errcode[k] == ERR_OVERFLOW) ovf++;
        check(e.bad == 0, "burst packet format");
      end
      check(seq_bad == 0, "L1 counts consecutive in burst");
      check(ovf > 0, "overflow error packets");
      n_overflow += ovf;
    end

    // input edge detection: a step on the hits is seen in exactly one
    // sample across a burst of triggers that covers every crossing
    for (int k = 0; k < 3; k++)
      set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 0, 0, 1, 2'b00, RO_HIT));
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    repeat (140) @(negedge clk);
    for (int k = 0; k < 3; k++) hits[k] = rnd_hits(10);
    repeat (120) @(negedge clk);
    begin
      int ones [3][NCH];
      int bad = 0;
      for (int k = 0; k < 3; k++) for (int c = 0; c < NCH; c++) ones[k][c] = 0;
      for (int j = 0; j < 8; j++) trigger();
      wait_events(8, 40000);
      while (evq.size() > 0) begin
        e = evq.pop_front();
        for (int k = 0; k < 3; k++)
          for (int c = 0; c < NCH; c++)
            if (e.v[k][c]) ones[k][c] += $countones(e.d[k][c]);
      end
      for (int k = 0; k < 3; k++)
        for (int c = 0; c < NCH; c++)
          if (ones[k][c] != int'(hits[k][c] & mask[k][c])) bad++;
      check(bad == 0, $sformatf("edge detection: %0d channels wrong", bad));
      if (bad == 0) n_edge++;
    end

    // pulse input register command: every unmasked channel is set for one
    // clock, seen in exactly one sample across a burst of triggers
    for (int k = 0; k < 3; k++)
      set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 0, 0, 0, 2'b00, RO_HIT));
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    for (int k = 0; k < 3; k++) hits[k] = '0;
    repeat (140) @(negedge clk);
    cmd_slow(BCAST, F5_PULSE, '0, 0);
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    repeat (90) @(negedge clk);
    begin
      int ones [3][NCH];
      int bad = 0;
      for (int k = 0; k < 3; k++) for (int c = 0; c < NCH; c++) ones[k][c] = 0;
      for (int j = 0; j < 8; j++) trigger();
      wait_events(8, 40000);
      while (evq.size() > 0) begin
        e = evq.pop_front();
        for (int k = 0; k < 3; k++)
          for (int c = 0; c < NCH; c++)
            if (e.v[k][c]) ones[k][c] += $countones(e.d[k][c]);
      end
      for (int k = 0; k < 3; k++)
        for (int c = 0; c < NCH; c++)
          if (ones[k][c] != int'(mask[k][c])) bad++;
      check(bad == 0, $sformatf("pulse input register: %0d channels wrong", bad));
      if (bad == 0) n_pulse++;
    end

    // accumulator: a one-clock pulse long before the trigger is reported
    for (int k = 0; k < 3; k++) hits[k] = '0;
    for (int k = 0; k < 3; k++)
      set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 1, 0, 0, 2'b00, RO_LEVEL));
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    // two soft resets 132 clocks apart clear the accumulator completely
    repeat (140) @(negedge clk);
    cmd_soft();
    repeat (140) @(negedge clk);
    cmd_soft();
    for (int k = 0; k < 3; k++) hits[k] = rnd_hits(5);
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin expv[k] = hits[k] & mask[k]; hits[k] = '0; end
    repeat (250) @(negedge clk);
    trigger();
    wait_events(1);
    e = evq.pop_front();
    check_hits(e, expv, 3'b111, all_on, "accumulator");
    if (e.phys > 0 && e.phys + e.adj == $countones(expv[0]) + $countones(expv[1]) + $countones(expv[2]))
      n_accumulate++;

    // test input mode: the mask register replaces the hits
    for (int k = 0; k < 3; k++) begin
      set_cfg(k, mkcfg(1, k == 2, k != 0, 0, 0, 0, 1, 0, 2'b00, RO_LEVEL));
      mask[k] = rnd_hits(8);
      cmd_slow(addr_of(k), F5_MASK, mask[k], 128);
      expv[k] = mask[k];
    end
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    repeat (140) @(negedge clk);
    trigger();
    wait_events(1);
    e = evq.pop_front();
    check_hits(e, expv, 3'b111, all_on, "test input mode");
    if (e.phys > 0) n_testmode++;

    // bypass: chip 0 sends the token past chip 1, chip 2 returns data past it
    set_cfg(0, mkcfg(1, 0, 0, 1, 1, 0, 1, 0, 2'b00, RO_LEVEL));
    set_cfg(2, mkcfg(1, 1, 1, 1, 1, 0, 1, 0, 2'b00, RO_LEVEL));
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    repeat (140) @(negedge clk);
    trigger();
    wait_events(1);
    e = evq.pop_front();
    begin
      bit on [3] = '{1, 0, 1};
      check_hits(e, expv, 3'b111, on, "bypass");
      if (e.phys > 0) n_bypass++;
    end

    // DAC and trim registers, chip 1 only
    cmd_slow(addr_of(1), F5_THRESHOLD, 128'h5a3c, 16);
    cmd_slow(addr_of(1), F5_BIAS, 128'h1517, 16);
    cmd_slow(addr_of(1), F5_TRIM, {7'd77, 4'd9}, 16);
    repeat (3) @(negedge clk);
    check({threshold[1], calamp[1]} == 16'h5a3c || {calamp[1], threshold[1]} == 16'h5a3c,
          "threshold/calibration DAC");
    check(ish[1] == 5'h17 && ipre[1] == 5'h15, "bias DACs");
    check(trim[1][77] == 4'd9, "trim DAC");
    check(threshold[0] != 8'h5a || calamp[0] != 8'h3c, "other chip not addressed");
    n_dacload++;

    // calibration strobe on chip 0, calibration group 2
    set_cfg(0, mkcfg(1, 0, 0, 0, 0, 0, 0, 0, 2'b10, RO_LEVEL));
    cmd_slow(addr_of(0), F5_DELAY, 128'd20, 16);
    cmd_slow(BCAST, F5_DATA_TAKE, '0, 0);
    fork
      cmd_slow(addr_of(0), F5_CAL, '0, 0);
      begin
        for (int t = 0; t < 700 && cal_strobe[0] !== 1; t++) #1;
        check(cal_strobe[0] === 1, "calibration strobe");
        if (cal_strobe[0] === 1) n_calstrobe++;
        // the strobe leaves the logic at a rising clock edge (5 ns mod 10 ns)
        // and is delayed by 1 ns + 20 x 0.8 ns = 17 ns
        check(int'(t_cal * 1000.0) % 10000 == 2000, $sformatf("strobe delay, edge at %0t", t_cal));
        @(negedge cal_strobe[0]);
        check($realtime - t_cal > 9.99 && $realtime - t_cal < 10.01, "strobe one clock long");
        check(cal_group[0] == 4'b0010 && cald[0] == 2'b10, "calibration group");
      end
    join

    $display("feedthrough=%0d sendid=%0d softreset=%0d bcreset=%0d physics=%0d adjacent=%0d",
             n_feedthrough, n_sendid, n_softreset, n_bcreset, n_physics, n_adjacent);
    $display("nohit=%0d overflow=%0d edge=%0d accumulate=%0d testmode=%0d bypass=%0d",
             n_nohit, n_overflow, n_edge, n_accumulate, n_testmode, n_bypass);
    $display("calstrobe=%0d dacload=%0d modes=%0d pulse=%0d l1_sent=%0d events=%0d",
             n_calstrobe, n_dacload, n_modes, n_pulse, l1_sent, ev_total);
    check(n_feedthrough > 0, "mechanism clock feed-through");
    check(n_sendid > 0, "mechanism Send_ID");
    check(n_softreset > 0, "mechanism soft reset");
    check(n_bcreset > 0, "mechanism BC reset");
    check(n_physics > 0, "mechanism physics packet");
    check(n_adjacent > 0, "mechanism adjacent hits");
    check(n_nohit > 0, "mechanism no-hit packet");
    check(n_overflow > 0, "mechanism buffer overflow");
    check(n_edge > 0, "mechanism edge detection");
    check(n_accumulate > 0, "mechanism accumulator");
    check(n_testmode > 0, "mechanism test input mode");
    check(n_bypass > 0, "mechanism bypass");
    check(n_calstrobe > 0, "mechanism calibration strobe");
    check(n_pulse > 0, "mechanism pulse input register");
    check(n_dacload > 0, "mechanism DAC load");
    check(n_modes == 4, "mechanism readout mode switch");
    check(ev_total == l1_sent, "one event per L1 trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #5ms;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
