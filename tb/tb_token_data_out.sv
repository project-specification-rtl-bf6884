// tb_token_data_out: exhaustive check of the normal/bypass output driver.
// bypassout = 00 drives out0 only, 11 drives out1 only; complements are the
// inverse of their true lines.
module tb_token_data_out;
  logic [2:0] v;
  logic out0, out0B, out1, out1B;
  int checks = 0, failures = 0;
  token_data_out dut (.in(v[0]), .bypassout(v[2:1]), .out0, .out0B, .out1, .out1B);
  initial begin
    for (int k = 0; k < 8; k++) begin
      v = 3'(k);
      #1;
      checks += 4;
      if (out0 !== (v[0] && !v[1])) failures++;
      if (out1 !== (v[0] && v[2]))  failures++;
      if (out0B !== !out0) failures++;
      if (out1B !== !out1) failures++;
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
