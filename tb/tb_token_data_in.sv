// tb_token_data_in: exhaustive check of the normal/bypass input selector.
module tb_token_data_in;
  logic [4:0] v;
  logic out;
  int checks = 0, failures = 0;
  token_data_in dut (.in0(v[0]), .in0B(v[1]), .in1(v[2]), .in1B(v[3]), .bypassin(v[4]), .out);
  initial begin
    for (int k = 0; k < 32; k++) begin
      v = 5'(k);
      #1;
      checks++;
      if (out !== (v[4] ? (v[2] && !v[3]) : (v[0] && !v[1]))) failures++;
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
