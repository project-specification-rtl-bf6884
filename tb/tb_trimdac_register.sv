// tb_trimdac_register: loads random {address, trim} words and checks the
// register fields and the whole 128 x 4 trim store against a reference array.
module tb_trimdac_register;
  logic clk = 0, clrB = 1, load = 0;
  logic [15:0] data = 0;
  logic [6:0] addr;
  logic [3:0] trim_val;
  logic [127:0][3:0] trim;
  logic [3:0] ref_t [128];
  int checks = 0, failures = 0;
  trimdac_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    foreach (ref_t[c]) ref_t[c] = '0;
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    for (int n = 0; n < 300; n++) begin
      data = 16'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      checks += 2;
      if (addr !== data[10:4]) failures++;
      if (trim_val !== data[3:0]) failures++;
      @(negedge clk);
      ref_t[data[10:4]] = data[3:0];
      for (int c = 0; c < 128; c++) begin
        checks++;
        if (trim[c] !== ref_t[c]) failures++;
      end
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
