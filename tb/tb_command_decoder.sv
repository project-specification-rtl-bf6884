// tb_command_decoder: sends L1 triggers, fast commands and every slow
// command of the control protocol (to this chip, to another chip and to the
// broadcast addresses) on the serial command line and checks the decoded
// pulses, the serial data delivered with the shift enables, the parallel data
// word, the Send_ID mode and the L1 latency (level1 one clock after the last
// command bit, level3 three clocks long).
module tb_command_decoder;
  import abcd_pkg::*;
  logic clk = 0, clrB = 1, command = 0;
  logic [5:0] id = 6'b101101;
  logic sendidmode, softresetB, calstrobe, loadmaskreg, level1, level3;
  logic loadconfigreg, strobeconfigreg, loaddelayreg, loadthresholdreg;
  logic loadtrimdacreg, loadbiasreg, bcresetB, pulseinputreg, sdata;
  logic [15:0] data;
  int checks = 0, failures = 0;
  int c_l1, c_l3, c_sr, c_bc, c_cal, c_pulse, c_cfg, c_dly, c_thr, c_trim, c_bias;
  bit shifted[$];
  int l1_time, sent_time;

  command_decoder dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (level1) begin c_l1++; l1_time = cyc; end
    if (level3) c_l3++;
    if (!softresetB) c_sr++;
    if (!bcresetB) c_bc++;
    if (calstrobe) c_cal++;
    if (pulseinputreg) c_pulse++;
    if (strobeconfigreg) c_cfg++;
    if (loaddelayreg) c_dly++;
    if (loadthresholdreg) c_thr++;
    if (loadtrimdacreg) c_trim++;
    if (loadbiasreg) c_bias++;
    if (loadconfigreg || loadmaskreg) shifted.push_back(sdata);
  end

  task automatic clear_counts();
    c_l1 = 0; c_l3 = 0; c_sr = 0; c_bc = 0; c_cal = 0; c_pulse = 0;
    c_cfg = 0; c_dly = 0; c_thr = 0; c_trim = 0; c_bias = 0;
    shifted.delete();
  endtask

  task automatic send(input logic [31:0] v, input int n);
    for (int b = n - 1; b >= 0; b--) begin
      command = v[b];
      @(negedge clk);
    end
    command = 0;
    sent_time = cyc;
  endtask

  task automatic slow(input logic [5:0] addr, input logic [5:0] f5, input int nd,
                      input logic [127:0] d);
    send({3'b101, 4'b0111}, 7);
    send(8'(12 + nd), 8);
    send(addr, 6);
    send(f5, 6);
    for (int b = nd - 1; b >= 0; b--) begin
      command = d[b];
      @(negedge clk);
    end
    command = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_eq(input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("mismatch: got %0d want %0d at %0t", got, want, $time);
    end
  endtask

  initial begin
    logic [127:0] d;
    clear_counts();
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    expect_eq(sendidmode, 1);
    // L1 trigger
    send(3'b110, 3);
    repeat (5) @(negedge clk);
    expect_eq(c_l1, 1); expect_eq(c_l3, 3);
    expect_eq(l1_time - sent_time, 1);
    // fast commands
    clear_counts();
    send(7'b1010100, 7); send(7'b1010010, 7); repeat (3) @(negedge clk);
    expect_eq(c_sr, 1); expect_eq(c_bc, 1);
    // configuration register: 16 bits shifted MS first, then one strobe
    clear_counts();
    d = 128'hBEEF;
    slow(id, F5_CONFIG, 16, d);
    expect_eq(c_cfg, 1); expect_eq(shifted.size(), 16);
    for (int b = 0; b < shifted.size(); b++) expect_eq(shifted[b], d[15 - b]);
    expect_eq(sendidmode, 1);
    // enable data taking
    slow(id, F5_DATA_TAKE, 0, '0);
    expect_eq(sendidmode, 0);
    // command to another chip: decoded but ignored
    clear_counts();
    slow(6'b100001, F5_CONFIG, 16, 128'h1234);
    slow(6'b100001, F5_CAL, 0, '0);
    expect_eq(c_cfg, 0); expect_eq(c_cal, 0); expect_eq(shifted.size(), 0);
    expect_eq(sendidmode, 0);
    // a following L1 is still decoded correctly
    send(3'b110, 3); repeat (4) @(negedge clk);
    expect_eq(c_l1, 1);
    // mask register: 128 bits
    clear_counts();
    d = {$urandom, $urandom, $urandom, $urandom};
    slow(id, F5_MASK, 128, d);
    expect_eq(shifted.size(), 128);
    for (int b = 0; b < shifted.size(); b++) expect_eq(shifted[b], d[127 - b]);
    expect_eq(sendidmode, 1);
    slow(id, F5_DATA_TAKE, 0, '0);
    // parallel-loaded registers
    clear_counts();
    slow(id, F5_DELAY, 16, 128'h003F);     expect_eq(data, 16'h003F);
    slow(id, F5_THRESHOLD, 16, 128'h2810); expect_eq(data, 16'h2810);
    slow(id, F5_TRIM, 16, 128'h07F5);      expect_eq(data, 16'h07F5);
    expect_eq(c_dly, 1); expect_eq(c_thr, 1); expect_eq(c_trim, 1);
    expect_eq(sendidmode, 1);
    slow(id, F5_DATA_TAKE, 0, '0);
    slow(id, F5_BIAS, 16, 128'h1F1F);      expect_eq(data, 16'h1F1F);
    expect_eq(c_bias, 1);
    expect_eq(sendidmode, 0);               // field 5 starts with 1
    slow(id, F5_PULSE, 0, '0);
    slow(id, F5_CAL, 0, '0);
    expect_eq(c_pulse, 1); expect_eq(c_cal, 1);
    // broadcast addresses
    clear_counts();
    slow(6'b111111, F5_CAL, 0, '0);
    slow(6'b101111, F5_CAL, 0, '0);
    slow(6'b011111, F5_CAL, 0, '0);         // MS bit clear: no chip
    expect_eq(c_cal, 2);
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
