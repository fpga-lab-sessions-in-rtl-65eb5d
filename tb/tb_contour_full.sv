// tb_contour_full: the contour detector at its default image size (640 x 480),
// two complete frames streamed through, with the reference model and the
// checks of contour_harness. The watchdog fails the run if it does not
// finish in time.
module tb_contour_full;

  localparam int unsigned LW = contour_pkg::LINEWIDTH_DEF;
  localparam int unsigned CH = contour_pkg::COLHEIGHT_DEF;

  logic       clk = 0;
  logic       rst;
  logic [8:0] threshold;
  logic       in_avail, in_sof;
  logic [7:0] in_data;
  logic       out_avail, out_sof, out_contour;
  logic       done;
  int         checks, failures;

  always #5 clk = ~clk;

  contour_harness #(.LW(LW), .CH(CH), .NF(2), .PREFIX(37), .TH(24)) u_harness (
    .clk, .rst, .threshold, .in_avail, .in_sof, .in_data,
    .out_avail, .out_sof, .out_contour, .done, .checks, .failures
  );

  contour_detector dut (
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
    repeat (4000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
