// tb_strobe_delay_line: measures the delay of rising and falling strobe
// edges for several codes against 1 ns + code * 0.8 ns, first with pulses
// longer than the delay, then with 3 ns pulses much shorter than the delay,
// which a transport delay must pass unchanged.
module tb_strobe_delay_line;
  logic strobein = 0;
  logic [5:0] code = 0;
  logic strobeout;
  int checks = 0, failures = 0;
  realtime t0, t1;
  strobe_delay_line dut (.*);
  initial begin
    #100;
    for (int k = 0; k < 8; k++) begin
      realtime want;
      code = (k == 7) ? 6'd63 : 6'(k * 9);
      want = 1.0 + 0.8 * code;
      #100;
      t0 = $realtime; strobein = 1;
      @(posedge strobeout); t1 = $realtime;
      checks++;
      if (t1 - t0 < want - 0.01 || t1 - t0 > want + 0.01) failures++;
      #25;
      t0 = $realtime; strobein = 0;
      @(negedge strobeout); t1 = $realtime;
      checks++;
      if (t1 - t0 < want - 0.01 || t1 - t0 > want + 0.01) failures++;
    end
    for (int k = 0; k < 6; k++) begin
      realtime want, tr, tf;
      code = 6'(10 + k * 10);
      want = 1.0 + 0.8 * code;
      #100;
      t0 = $realtime;
      fork
        begin strobein = 1; #3; strobein = 0; end
        begin @(posedge strobeout); tr = $realtime; @(negedge strobeout); tf = $realtime; end
      join
      checks += 2;
      if (tr - t0 < want - 0.01 || tr - t0 > want + 0.01) failures++;
      if (tf - t0 < want + 2.99 || tf - t0 > want + 3.01) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
