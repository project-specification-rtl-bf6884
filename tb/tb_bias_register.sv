// tb_bias_register: random parallel loads; bits 4:0 must appear on 'ish'
// and bits 12:8 on 'ipre'.
module tb_bias_register;
  logic clk = 0, clrB = 1, load = 0;
  logic [15:0] data;
  logic [4:0] ish, ipre;
  logic [15:0] exp_v = '0;
  int checks = 0, failures = 0;
  bias_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    data = '0;
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 50; n++) begin
      data = 16'($urandom);
      load = ($urandom % 2) == 1;
      @(negedge clk);
      if (load) exp_v = data;
      checks += 2;
      if (ish !== exp_v[4:0]) failures++;
      if (ipre !== exp_v[12:8]) failures++;
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
