// tb_neighborhood_extractor: self-checking test of neighborhood_extractor
// with 6-pixel lines.
//
// Streams random pixels with random idle clocks and keeps the stream in a
// model. In the clock of every strobe n (once two lines and two pixels
// have gone in) the window must hold x33 = pixel n, x32 = n-1, x31 = n-2,
// x23 = n-LW, x22 = n-LW-1, x21 = n-LW-2, x13 = n-2LW, x12 = n-2LW-1 and
// x11 = n-2LW-2.
module tb_neighborhood_extractor;

  localparam int LW = 6;

  logic       clk = 0;
  logic       rst, en;
  logic [7:0] din;
  logic [7:0] win [3][3];
  int         checks = 0, failures = 0;
  byte unsigned hist [$];

  always #5 clk = ~clk;

  neighborhood_extractor #(.WIDTH(8), .LINEWIDTH(LW)) dut (.clk, .rst, .en, .din, .win);

  initial begin
    rst = 1; en = 0; din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk) en = 0;
      @(negedge clk);
      en = 1; din = 8'($urandom);
      hist.push_back(din);
      #1;
      if (n >= 2*LW + 2) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int back;
            back = (2 - r) * LW + (2 - c);
            checks++;
            if (win[r][c] !== hist[n - back]) begin
              failures++;
              if (failures < 10) $display("FAIL: strobe %0d x%0d%0d = %0h, expected %0h",
                                          n, r+1, c+1, win[r][c], hist[n - back]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
