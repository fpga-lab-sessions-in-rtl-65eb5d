// tb_contour_detector: end-to-end test of the contour detector on a
// reduced 16 x 12 image, three frames with five filler pixels between
// them, with the reference model and the
// checks of contour_harness. The watchdog fails the run if it does not
// finish in time.
module tb_contour_detector;

  localparam int unsigned LW = 16;
  localparam int unsigned CH = 12;

  logic       clk = 0;
  logic       rst;
  logic [8:0] threshold;
  logic       in_avail, in_sof;
  logic [7:0] in_data;
  logic       out_avail, out_sof, out_contour;
  logic       done;
  int         checks, failures;

  always #5 clk = ~clk;

  contour_harness #(.LW(LW), .CH(CH), .NF(3), .PREFIX(37), .GAP(5), .TH(24)) u_harness (
    .clk, .rst, .threshold, .in_avail, .in_sof, .in_data,
    .out_avail, .out_sof, .out_contour, .done, .checks, .failures
  );

  contour_detector #(.LINEWIDTH(LW), .COLHEIGHT(CH)) dut (
    .clk, .rst, .threshold, .in_avail, .in_sof, .in_data,
    .out_avail, .out_sof, .out_contour
  );

  initial begin
    @(posedge clk);     // the harness clears done at time 0
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
