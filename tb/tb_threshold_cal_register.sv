// tb_threshold_cal_register: random parallel loads; the MS byte must appear
// on 'threshold', the LS byte on 'calamp', and the value must hold without
// 'load'.
module tb_threshold_cal_register;
  logic clk = 0, clrB = 1, load = 0;
  logic [15:0] data;
  logic [7:0] threshold, calamp;
  logic [15:0] exp_v = '0;
  int checks = 0, failures = 0;
  threshold_cal_register dut (.*);
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
      if (threshold !== exp_v[15:8]) failures++;
      if (calamp !== exp_v[7:0]) failures++;
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
