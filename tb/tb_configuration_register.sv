// tb_configuration_register: shifts random 16-bit words in MS bit first,
// checks that the outputs keep the old value while shifting and take the
// new one after 'load', and that the reset value is zero.
module tb_configuration_register;
  logic clk = 0, clrB = 1, in = 0, shift = 0, load = 0;
  logic [15:0] dataout, cur;
  int checks = 0, failures = 0;
  configuration_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    cur = '0;
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    checks++; if (dataout !== 16'h0) failures++;
    for (int n = 0; n < 20; n++) begin
      logic [15:0] w;
      w = 16'($urandom);
      for (int b = 15; b >= 0; b--) begin
        in = w[b]; shift = 1;
        @(negedge clk);
        checks++; if (dataout !== cur) failures++;
      end
      shift = 0; load = 1;
      @(negedge clk);
      load = 0; cur = w;
      checks++; if (dataout !== w) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
