// tb_scan_counter: self-checking test of scan_counter on a 5 x 4 image.
//
// Model: the first strobe after reset has its window centre LINEWIDTH+1
// pixels before pixel (0,0), i.e. at position F-(LINEWIDTH+1) of the frame
// of F pixels; each strobe advances the position by one modulo F, except
// the strobe LINEWIDTH+1 after a sof, whose centre is (0,0). Strobes come
// with random idle clocks, and sof is raised twice on a strobe that does
// not fall on the counters' own frame boundary, so the resync is
// exercised, once with the previous frame complete. Position and flags are
// checked in the clock of each strobe and during idle clocks (they must
// hold).
module tb_scan_counter;

  localparam int LW = 5;
  localparam int CH = 4;
  localparam int F  = LW * CH;

  logic       clk = 0;
  logic       rst, en, sof;
  logic [2:0] col;
  logic [1:0] row;
  logic       first_col, last_col, first_row, last_row;
  int         checks = 0, failures = 0;
  int         pos;        // model position of the centre
  int         sof_at [$]; // strobe numbers that carried sof
  int         n_resync = 0;

  always #5 clk = ~clk;

  scan_counter #(.LINEWIDTH(LW), .COLHEIGHT(CH)) dut (
    .clk, .rst, .en, .sof, .col, .row, .first_col, .last_col, .first_row, .last_row
  );

  task automatic check_pos();
    int r, c;
    r = pos / LW; c = pos % LW;
    checks++;
    if (int'(col) != c || int'(row) != r ||
        first_col != (c == 0) || last_col != (c == LW-1) ||
        first_row != (r == 0) || last_row != (r == CH-1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: pos=%0d got row %0d col %0d flags %b%b%b%b, expected row %0d col %0d",
                 pos, row, col, first_row, last_row, first_col, last_col, r, c);
    end
  endtask

  initial begin
    rst = 1; en = 0; sof = 0; pos = F - (LW + 1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 200; n++) begin
      int gap;
      gap = int'($urandom_range(0, 2));
      if (n >= LW + 1 && (n - (LW + 1)) inside {sof_at}) begin
        if (pos != 0) n_resync++;
        pos = 0;
      end
      repeat (gap) begin
        @(negedge clk) begin en = 0; sof = 0; end
        #1 check_pos();
      end
      @(negedge clk);
      en = 1;
      sof = (n == 33 || n == 33 + F || n == 33 + 2*F + 7);
      if (sof) sof_at.push_back(n);
      #1 check_pos();
      @(posedge clk) pos = (pos + 1) % F;
    end
    @(negedge clk) begin en = 0; sof = 0; end
    checks++;
    if (n_resync == 0) begin
      failures++;
      $display("FAIL: resync never exercised");
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
