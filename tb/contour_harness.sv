// contour_harness: stimulus, reference model and checker for the contour
// detector, shared by the reduced-size and the full-size testbench.
//
// It generates NF test frames of LW x CH grey-level pixels (blocks of
// different grey levels, ramps and a little noise, so that there are strong
// edges, weak edges that the threshold must reject, and zero crossings
// against the image border), computes the expected contour map of every
// frame straight from the definitions (dilation / erosion over the
// in-image part of the 3x3 neighbourhood, Laplacian sign, zero crossing as
// "the neighbourhood holds both an L>0 and an L<=0 pixel", gradient above
// the threshold), and streams the frames into the detector: first PREFIX
// filler pixels that belong to no frame (so the frame-start resync is
// used), then the frames with in_sof on their first pixel, either back to
// back or GAP filler pixels apart, then enough filler pixels to flush the
// last lines out. Strobes come
// back to back or with 1 to 3 idle clocks between them.
//
// Checks: each output strobe follows its input strobe by exactly four
// clocks; out_sof appears exactly 2*(LW+1) pixels after each in_sof; every
// output pixel of every frame equals the reference. It also counts how
// often each mechanism of the design was exercised and fails if one never
// was. `done` rises when the run is over; checks and failures are then
// final.
module contour_harness #(
  parameter int unsigned LW     = 16,
  parameter int unsigned CH     = 12,
  parameter int unsigned NF     = 2,
  parameter int unsigned PREFIX = 37,
  parameter int unsigned GAP    = 0,     // filler pixels between frames
  parameter int unsigned TH     = 24
) (
  input  logic       clk,
  output logic       rst,
  output logic [8:0] threshold,
  output logic       in_avail,
  output logic       in_sof,
  output logic [7:0] in_data,
  input  logic       out_avail,
  input  logic       out_sof,
  input  logic       out_contour,
  output logic       done,
  output int         checks,
  output int         failures
);

  localparam int unsigned F       = LW * CH;
  localparam int unsigned LAT_PIX = 2 * (LW + 1);
  localparam int unsigned LAT_CLK = 4;
  localparam int unsigned TAIL    = LAT_PIX + 5;
  localparam int unsigned FP      = F + GAP;   // strobes per frame period
  localparam int unsigned NSTROBE = PREFIX + NF * FP + TAIL;

  byte unsigned img  [NF][F];
  bit           expc [NF][F];

  // Mechanism counters.
  int n_back2back, n_gap, n_contour, n_zc_rejected, n_border_contour;
  int n_resync, n_frames_out, n_overlap;

  // ---------------------------------------------------------------- images
  function automatic int clampi(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic make_images();
    for (int f = 0; f < int'(NF); f++) begin
      for (int r = 0; r < int'(CH); r++) begin
        for (int c = 0; c < int'(LW); c++) begin
          int v;
          // grey-level blocks of 5 x 7 pixels, level from a hash of the block
          v = (((r / 5) * 37 + (c / 7) * 91 + f * 53) % 5) * 50 + 20;
          // a soft ramp in one part of the image (weak gradients)
          if (c % 23 > 18) v = v + (c % 23) * 2;
          // small noise everywhere
          v = v + int'($urandom_range(0, 6)) - 3;
          img[f][r*LW + c] = byte'(clampi(v));
        end
      end
    end
  endtask

  function automatic int pix(int f, int r, int c);
    return int'(img[f][r*LW + c]);
  endfunction

  // Laplacian sign and gradient at (r,c) of frame f.
  function automatic int morph(int f, int r, int c);
    int mx, mn, x;
    mx = 0; mn = 255;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (r+dr >= 0 && r+dr < int'(CH) && c+dc >= 0 && c+dc < int'(LW)) begin
          x = pix(f, r+dr, c+dc);
          if (x > mx) mx = x;
          if (x < mn) mn = x;
        end
    x = pix(f, r, c);
    // bit 16: L <= 0; bits 15:0: gradient
    return ((((mx - x) - (x - mn)) <= 0) ? 32'h1_0000 : 0) + (mx - mn);
  endfunction

  bit lm [F];   // L <= 0 of the frame being worked on
  int gg [F];   // gradient of the frame being worked on

  task automatic make_reference();
    for (int f = 0; f < int'(NF); f++) begin
      for (int r = 0; r < int'(CH); r++)
        for (int c = 0; c < int'(LW); c++) begin
          int m;
          m = morph(f, r, c);
          lm[r*int'(LW) + c] = m[16];
          gg[r*int'(LW) + c] = m & 32'hFFFF;
        end
      for (int r = 0; r < int'(CH); r++)
        for (int c = 0; c < int'(LW); c++) begin
          bit has_pos, has_neg, zc;
          has_pos = 0; has_neg = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (r+dr >= 0 && r+dr < int'(CH) && c+dc >= 0 && c+dc < int'(LW)) begin
                if (lm[(r+dr)*LW + c+dc]) has_neg = 1;
                else                      has_pos = 1;
              end
          zc = has_pos && has_neg;
          expc[f][r*LW + c] = zc && (gg[r*LW + c] > int'(TH));
          if (zc && !(gg[r*LW + c] > int'(TH))) n_zc_rejected++;
          if (expc[f][r*LW + c]) begin
            n_contour++;
            if (r == 0 || c == 0 || r == int'(CH)-1 || c == int'(LW)-1) n_border_contour++;
          end
        end
    end
  endtask

  // -------------------------------------------------------------- stimulus
  longint in_time [$];
  int     sof_in_idx [$];   // input strobe index of each in_sof
  int     in_idx;

  initial begin
    checks = 0; failures = 0; done = 0;
    rst = 1; in_avail = 0; in_sof = 0; in_data = '0; threshold = 9'(TH);
    in_idx = 0;
    make_images();
    make_reference();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int s = 0; s < int'(NSTROBE); s++) begin
      int gap;
      int f, p;
      gap = ($urandom_range(0, 9) < 4) ? 0 : int'($urandom_range(1, 3));
      if (s > 0) begin
        if (gap == 0) n_back2back++; else n_gap++;
      end
      repeat (gap) begin
        in_avail <= 0; in_sof <= 0; in_data <= 8'($urandom);
        @(posedge clk);
      end
      f = (s - int'(PREFIX)) / int'(FP);
      p = (s - int'(PREFIX)) % int'(FP);
      in_avail <= 1;
      if (s >= int'(PREFIX) && f < int'(NF) && p < int'(F)) begin
        in_data <= img[f][p];
        in_sof  <= (p == 0);
        if (p == 0) sof_in_idx.push_back(s);
      end else begin
        in_data <= 8'($urandom);
        in_sof  <= 0;
      end
      @(posedge clk);
    end
    in_avail <= 0; in_sof <= 0;
    repeat (LAT_CLK + 4) @(posedge clk);
    // Coverage of the mechanisms.
    cover_check("back-to-back strobes", n_back2back);
    cover_check("idle clocks between strobes", n_gap);
    cover_check("contour pixels", n_contour);
    cover_check("zero crossings rejected by the threshold", n_zc_rejected);
    cover_check("contours on the image border", n_border_contour);
    cover_check("frame-start resync", n_resync);
    cover_check("output lines of one frame during the next", n_overlap);
    cover_check("complete output frames", n_frames_out);
    $display("mechanisms: b2b=%0d gap=%0d contour=%0d zc_rejected=%0d border=%0d resync=%0d overlap=%0d frames=%0d",
             n_back2back, n_gap, n_contour, n_zc_rejected, n_border_contour,
             n_resync, n_overlap, n_frames_out);
    done = 1;
  end

  task automatic cover_check(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  // PREFIX not a multiple of the frame size, or filler between frames: the
  // counters, aligned by reset to strobe 0, must be realigned by in_sof.
  initial n_resync = (PREFIX % F != 0 || GAP % F != 0) ? 1 : 0;

  // --------------------------------------------------------------- checker
  int out_idx;
  int pixels_in_frame [NF];
  initial begin
    out_idx = 0;
    for (int f = 0; f < int'(NF); f++) pixels_in_frame[f] = 0;
  end

  // Clock of each input strobe and of each output strobe, both sampled at
  // the same clock edges by this one process.
  longint edge_no = 0;

  always @(posedge clk) begin
    edge_no++;
    if (!rst && in_avail) in_time.push_back(edge_no);
    if (!rst && out_avail) begin
      longint t_in;
      int rel, f, p;
      bit expect_sof;
      // clock latency
      t_in = in_time.pop_front();
      checks++;
      if (edge_no - t_in != longint'(LAT_CLK)) begin
        failures++;
        if (failures < 10) $display("FAIL: output strobe %0d came %0d clocks after its input, expected %0d",
                                    out_idx, edge_no - t_in, LAT_CLK);
      end
      // pixel position
      rel = out_idx - int'(LAT_PIX) - int'(PREFIX);
      f = (rel >= 0) ? rel / int'(FP) : -1;
      p = (rel >= 0) ? rel % int'(FP) : -1;
      if (f >= 0 && f < int'(NF) && p < int'(F)) begin
        expect_sof = (p == 0);
        checks++;
        if (out_sof !== expect_sof) begin
          failures++;
          if (failures < 10) $display("FAIL: out_sof=%0b at frame %0d pixel %0d", out_sof, f, p);
        end
        checks++;
        if (out_contour !== expc[f][p]) begin
          failures++;
          if (failures < 10) $display("FAIL: frame %0d row %0d col %0d: contour %0b, expected %0b",
                                      f, p / int'(LW), p % int'(LW), out_contour, expc[f][p]);
        end
        pixels_in_frame[f]++;
        if (pixels_in_frame[f] == int'(F)) n_frames_out++;
        // last lines of frame f leave while frame f+1 is entering
        if (f + 1 < int'(NF) && sof_in_idx.size() > f + 1 && p >= int'(F - LW)) n_overlap++;
      end
      out_idx++;
    end
  end

endmodule
