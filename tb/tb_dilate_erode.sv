// tb_dilate_erode: self-checking test of dilate_erode on a 7 x 5 image,
// with an 8-bit and a 1-bit instance fed side by side.
//
// The stream is: frame 0 right after reset without any sof (the counters
// must be aligned by reset alone), frame 1 with sof, three filler pixels,
// frame 2 with sof (the counters must resync), and filler pixels to flush
// the last line out. The 1-bit instance gets bit 0 of every pixel.
// The reference dilation and erosion take the maximum and minimum over
// the part of the 3x3 neighbourhood that lies inside the image. For every
// output strobe the test checks that it comes exactly one clock after its
// input strobe, that it carries the centre LINEWIDTH+1 pixels behind the
// input, out_sof on pixel (0,0), and delta f, epsilon f and f of both
// instances. Strobes are back to back or spaced by idle clocks.
module tb_dilate_erode;

  localparam int LW = 7;
  localparam int CH = 5;
  localparam int F  = LW * CH;
  localparam int NF = 3;
  localparam int LAT = LW + 1;

  logic       clk = 0;
  logic       rst, in_avail, in_sof;
  logic [7:0] in_data;
  logic       out_avail, out_sof, b_avail, b_sof;
  logic [7:0] out_dil, out_ero, out_ctr;
  logic       b_dil, b_ero, b_ctr;
  int         checks = 0, failures = 0;

  byte unsigned img [NF][F];
  int  frame_start [NF];      // input strobe index of each frame's pixel (0,0)
  int  nstrobe;
  bit  is_frame [$];          // per input strobe: belongs to a frame
  int  in_frame [$], in_pix [$];
  longint in_edge [$];
  longint edge_no = 0;
  int  out_idx = 0;

  always #5 clk = ~clk;

  dilate_erode #(.WIDTH(8), .LINEWIDTH(LW), .COLHEIGHT(CH)) dut8 (
    .clk, .rst, .in_avail, .in_sof, .in_data,
    .out_avail, .out_sof, .out_dilate(out_dil), .out_erode(out_ero), .out_center(out_ctr)
  );
  dilate_erode #(.WIDTH(1), .LINEWIDTH(LW), .COLHEIGHT(CH)) dut1 (
    .clk, .rst, .in_avail, .in_sof, .in_data(in_data[0]),
    .out_avail(b_avail), .out_sof(b_sof), .out_dilate(b_dil), .out_erode(b_ero), .out_center(b_ctr)
  );

  function automatic int ref_op(int f, int p, bit erode, bit onebit);
    int r, c, v, res;
    r = p / LW; c = p % LW;
    res = erode ? 255 : 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (r+dr >= 0 && r+dr < CH && c+dc >= 0 && c+dc < LW) begin
          v = int'(img[f][(r+dr)*LW + c+dc]);
          if (onebit) v = v & 1;
          if (erode ? (v < res) : (v > res)) res = v;
        end
    if (onebit && erode) res = res & 1;
    return res;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: output %0d %s = %0d expected %0d", out_idx, what, got, exp);
    end
  endtask

  task automatic strobe(logic [7:0] d, bit sof);
    repeat (($urandom_range(0, 9) < 5) ? 0 : $urandom_range(1, 2)) begin
      in_avail <= 0; in_sof <= 0;
      @(posedge clk);
    end
    in_avail <= 1; in_sof <= sof; in_data <= d;
    nstrobe++;
    @(posedge clk);
  endtask

  initial begin
    for (int f = 0; f < NF; f++) frame_start[f] = -1000000;   // not yet sent
    for (int f = 0; f < NF; f++)
      for (int p = 0; p < F; p++)
        img[f][p] = 8'($urandom);
    rst = 1; in_avail = 0; in_sof = 0; in_data = 0; nstrobe = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    frame_start[0] = nstrobe;
    for (int p = 0; p < F; p++) strobe(img[0][p], 1'b0);
    frame_start[1] = nstrobe;
    for (int p = 0; p < F; p++) strobe(img[1][p], p == 0);
    repeat (3) strobe(8'($urandom), 1'b0);
    frame_start[2] = nstrobe;
    for (int p = 0; p < F; p++) strobe(img[2][p], p == 0);
    repeat (LAT + 2) strobe(8'($urandom), 1'b0);
    in_avail <= 0; in_sof <= 0;
    repeat (5) @(posedge clk);
    expect_eq("number of output strobes", out_idx, nstrobe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    edge_no++;
    if (!rst && in_avail) in_edge.push_back(edge_no);
    if (!rst && out_avail) begin
      longint t;
      int ctr, f, p;
      t = in_edge.pop_front();
      expect_eq("clock latency", int'(edge_no - t), 1);
      expect_eq("1-bit instance strobe", int'(b_avail), 1);
      ctr = out_idx - LAT;      // input strobe index of the window centre
      f = -1; p = -1;
      for (int k = 0; k < NF; k++)
        if (ctr >= frame_start[k] && ctr < frame_start[k] + F) begin
          f = k; p = ctr - frame_start[k];
        end
      if (f >= 0) begin
        expect_eq("out_sof", int'(out_sof), (p == 0) ? 1 : 0);
        expect_eq("1-bit out_sof", int'(b_sof), (p == 0) ? 1 : 0);
        expect_eq("dilation", int'(out_dil), ref_op(f, p, 1'b0, 1'b0));
        expect_eq("erosion", int'(out_ero), ref_op(f, p, 1'b1, 1'b0));
        expect_eq("centre", int'(out_ctr), int'(img[f][p]));
        expect_eq("1-bit dilation", int'(b_dil), ref_op(f, p, 1'b0, 1'b1));
        expect_eq("1-bit erosion", int'(b_ero), ref_op(f, p, 1'b1, 1'b1));
        expect_eq("1-bit centre", int'(b_ctr), int'(img[f][p]) & 1);
      end
      out_idx++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
