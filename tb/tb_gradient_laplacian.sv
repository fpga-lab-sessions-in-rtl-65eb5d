// tb_gradient_laplacian: self-checking test of gradient_laplacian.
//
// Drives random consistent triples (erosion <= f <= dilation), including
// equal gradients (L = 0) and the full 0..255 range, with random
// thresholds around the gradient. One clock after each strobe it checks
// L- = (L <= 0) with L = (dil - f) - (f - ero) computed in integers, the
// gradient g = dil - ero on 9 bits, and contrast = (g > Th). It also
// checks that out_avail and out_sof follow their inputs by one clock.
module tb_gradient_laplacian;

  logic       clk = 0;
  logic       rst, in_avail, in_sof;
  logic [7:0] f, dil, ero;
  logic [8:0] threshold;
  logic       out_avail, out_sof, l_minus, contrast;
  logic [8:0] grad;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  gradient_laplacian dut (.clk, .rst, .in_avail, .in_sof, .f, .dil, .ero, .threshold,
                          .out_avail, .out_sof, .l_minus, .contrast, .grad);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s = %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; in_avail = 0; in_sof = 0; f = 0; dil = 0; ero = 0; threshold = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 1000; t++) begin
      int fi, di, ei, th, lap, g;
      fi = int'($urandom_range(0, 255));
      di = int'($urandom_range(fi, 255));
      ei = int'($urandom_range(0, fi));
      if (t % 5 == 0) begin          // equal gradients: L = 0
        int d;
        d = int'($urandom_range(0, (fi < 255 - fi) ? fi : 255 - fi));
        di = fi + d; ei = fi - d;
      end
      if (t % 11 == 0) begin di = 255; ei = 0; end
      g  = di - ei;
      th = (t % 3 == 0) ? g : int'($urandom_range(0, 511));
      lap = (di - fi) - (fi - ei);
      @(negedge clk);
      in_avail = 1; in_sof = (t % 13 == 0);
      f = 8'(fi); dil = 8'(di); ero = 8'(ei); threshold = 9'(th);
      @(negedge clk);
      in_avail = 0; in_sof = 0;
      expect_eq("out_avail", int'(out_avail), 1);
      expect_eq("out_sof", int'(out_sof), (t % 13 == 0) ? 1 : 0);
      expect_eq("l_minus", int'(l_minus), (lap <= 0) ? 1 : 0);
      expect_eq("grad", int'(grad), g);
      expect_eq("contrast", int'(contrast), (g > th) ? 1 : 0);
      @(negedge clk);
      expect_eq("out_avail idle", int'(out_avail), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
