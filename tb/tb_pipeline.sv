// tb_pipeline: feeds random 128-bit words and checks that, with level1 high,
// 'o' shows the word written exactly 132 clocks earlier, and that with
// acen the accumulator (OR of every word that left the pipeline since
// reset) is captured instead. Also checks that 'o' holds while level1 is low.
module tb_pipeline;
  localparam int DEPTH = 132;
  logic clk = 0, clrB = 1, acen = 0, level1 = 0;
  logic [127:0] i = '0, o;
  logic [127:0] hist [$];
  logic [127:0] acc, held;
  int checks = 0, failures = 0;
  pipeline dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1 clrB = 0;
    repeat (2) @(negedge clk);
    clrB = 1;
    // fill the pipeline once so that every cell holds a known value
    for (int n = 0; n < DEPTH; n++) begin
      i = '0; hist.push_back(i);
      @(negedge clk);
    end
    // reset the accumulator now that only zeros leave the pipeline
    clrB = 0; @(negedge clk); clrB = 1;
    hist.delete();
    for (int n = 0; n < DEPTH; n++) begin
      i = '0; hist.push_back(i);
      @(negedge clk);
    end
    acc = '0;
    for (int n = 0; n < 1000; n++) begin
      acen   = n >= 700;
      level1 = ($urandom % 3) != 0;
      i = ($urandom % 8 == 0) ? {$urandom, $urandom, $urandom, $urandom} : '0;
      held = o;
      hist.push_back(i);
      @(negedge clk);
      checks++;
      if (level1) begin
        if (o !== (acen ? acc : hist[0])) failures++;
      end else if (o !== held) failures++;
      acc |= hist[0];
      void'(hist.pop_front());
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
