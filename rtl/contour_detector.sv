// contour_detector: real-time contour detection by zero crossing of the
// morphological Laplacian, on a raster-scanned 8-bit video stream.
//
// Algorithm, for the 3x3 structuring element (8-neighbourhood plus centre):
//   g_ext = delta f - f,  g_int = f - epsilon f
//   g = g_ext + g_int (gradient),  L = g_ext - g_int (Laplacian)
//   L- = {L <= 0},  L+ = {L > 0} = complement of L-
//   zero crossing Z = delta L+ AND delta L-
//   contour c = Z AND (g > Th)
// The zero crossing is evaluated in its cheaper form
//   Z = delta L-  AND  NOT epsilon L-
// (delta of a complement is the complement of epsilon), so that the binary
// dilation and erosion both work on L- and share one 1-bit neighbourhood
// extractor, exactly as the grey-level dilation and erosion share the 8-bit
// one. No frame is stored: the whole detector holds two 8-bit image lines,
// two 1-bit lines and one 1-bit line of delay compensation.
//
// Data flow:
//   stage 1  dilate_erode, 8 bit: delta f, epsilon f, and f itself taken
//            from the centre of the same window (this is the 8-bit delay
//            compensation of f, at no extra storage)
//   arith    gradient_laplacian: L- bit and contrast bit (g > Th)
//   stage 2  dilate_erode, 1 bit, on L-: delta L-, epsilon L-
//   delay    the contrast bit waits LINEWIDTH+2 strobes in a 1-bit
//            delay_line so it meets the stage-2 result of the same pixel
//   output   c = delta L- AND NOT epsilon L- AND contrast, registered
//
// The algorithm, the complement rewrite of the zero crossing, the sharing
// of neighbourhoods and the operator widths follow the original design.
// Taking f from the window centre instead of a separate 8-bit line delay,
// the start-of-frame signal, the 9-bit threshold, the pipeline registers
// and the default 640 x 480 size are this implementation's choices.
//
// Interface: pixels enter as in_data with a one-clock in_avail strobe each
// (strobes may be back to back or spaced by idle clocks) and in_sof on the
// strobe of pixel (0,0); the contour bit leaves with its own out_avail
// strobe and out_sof on the strobe of pixel (0,0). `threshold` is Th,
// compared with the 9-bit gradient.
//
// Timing: every input strobe gives one output strobe four clocks later.
// The output pixel trails the input by 2*(LINEWIDTH+1) pixels (one line
// plus one pixel per 3x3 stage), so the frame's last two lines come out
// while the next frame, or trailing filler pixels, are fed in. Outputs
// before the first out_sof after reset belong to no frame.
module contour_detector
  import contour_pkg::*;
#(
  parameter int unsigned LINEWIDTH = contour_pkg::LINEWIDTH_DEF,
  parameter int unsigned COLHEIGHT = contour_pkg::COLHEIGHT_DEF
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic [GRAD_W-1:0] threshold,    // contrast threshold Th
  input  logic              in_avail,     // pixel strobe
  input  logic              in_sof,       // strobe of pixel (0,0)
  input  logic [PIX_W-1:0]  in_data,      // grey level
  output logic              out_avail,
  output logic              out_sof,
  output logic              out_contour   // 1 on a contour pixel
);

  // Stage 1: grey-level dilation / erosion.
  logic             s1_avail, s1_sof;
  logic [PIX_W-1:0] s1_dil, s1_ero, s1_f;

  dilate_erode #(.WIDTH(PIX_W), .LINEWIDTH(LINEWIDTH), .COLHEIGHT(COLHEIGHT)) u_stage1 (
    .clk, .rst,
    .in_avail, .in_sof, .in_data,
    .out_avail(s1_avail), .out_sof(s1_sof),
    .out_dilate(s1_dil), .out_erode(s1_ero), .out_center(s1_f)
  );

  // Gradients, Laplacian sign, contrast test.
  logic              a_avail, a_sof, a_lminus, a_contrast;
  logic [GRAD_W-1:0] a_grad;

  gradient_laplacian u_arith (
    .clk, .rst,
    .in_avail(s1_avail), .in_sof(s1_sof),
    .f(s1_f), .dil(s1_dil), .ero(s1_ero), .threshold,
    .out_avail(a_avail), .out_sof(a_sof),
    .l_minus(a_lminus), .contrast(a_contrast), .grad(a_grad)
  );

  // Stage 2: binary dilation / erosion of L-.
  logic s2_avail, s2_sof, s2_dil, s2_ero, s2_center;

  dilate_erode #(.WIDTH(1), .LINEWIDTH(LINEWIDTH), .COLHEIGHT(COLHEIGHT)) u_stage2 (
    .clk, .rst,
    .in_avail(a_avail), .in_sof(a_sof), .in_data(a_lminus),
    .out_avail(s2_avail), .out_sof(s2_sof),
    .out_dilate(s2_dil), .out_erode(s2_ero), .out_center(s2_center)
  );

  // Delay compensation of the contrast bit: stage 2 outputs the pixel
  // LINEWIDTH+1 strobes behind its input, one clock after the strobe.
  logic contrast_d;

  delay_line #(.WIDTH(1), .DEPTH(LINEWIDTH + 2)) u_thr_delay (
    .clk, .rst, .en(a_avail), .din(a_contrast), .dout(contrast_d)
  );

  // Zero crossing and contour.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_avail   <= 1'b0;
      out_sof     <= 1'b0;
      out_contour <= 1'b0;
    end else begin
      out_avail <= s2_avail;
      out_sof   <= s2_sof;
      if (s2_avail) out_contour <= s2_dil & ~s2_ero & contrast_d;
    end
  end

  // The gradient value and the stage-2 centre (L- delayed) are kept for
  // observation in simulation only.
  logic unused_ok;
  assign unused_ok = ^{a_grad, s2_center};

  assert property (@(posedge clk) disable iff (rst) in_sof |-> in_avail)
    else $error("contour_detector: in_sof without in_avail");

endmodule
