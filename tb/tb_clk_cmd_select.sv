// tb_clk_cmd_select: exhaustive check of the clock/command input selector.
// All 512 input combinations are applied; the expected outputs are computed
// from the pin table (select low: pair 0, high: pair 1; a pair is 1 when its
// true line is 1 and its complement 0).
module tb_clk_cmd_select;
  logic [8:0] v;
  logic clk, command;
  int checks = 0, failures = 0;
  clk_cmd_select dut (.clk0(v[0]), .clk0B(v[1]), .clk1(v[2]), .clk1B(v[3]),
    .com0(v[4]), .com0B(v[5]), .com1(v[6]), .com1B(v[7]), .select(v[8]), .clk, .command);
  initial begin
    for (int k = 0; k < 512; k++) begin
      logic ec, em;
      v = 9'(k);
      #1;
      ec = v[8] ? (v[2] && !v[3]) : (v[0] && !v[1]);
      em = v[8] ? (v[6] && !v[7]) : (v[4] && !v[5]);
      checks += 2;
      if (clk !== ec) failures++;
      if (command !== em) failures++;
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
