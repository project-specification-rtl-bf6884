// tb_strobe_delay_register: random parallel loads; the 6 LS bits must
// appear on 'code'.
module tb_strobe_delay_register;
  logic clk = 0, clrB = 1, load = 0;
  logic [7:0] data;
  logic [5:0] code;
  logic [7:0] exp_v = '0;
  int checks = 0, failures = 0;
  strobe_delay_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    data = '0;
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 50; n++) begin
      data = 8'($urandom);
      load = ($urandom % 2) == 1;
      @(negedge clk);
      if (load) exp_v = data;
      checks++;
      if (code !== exp_v[5:0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
