// gradient_laplacian: gradients, Laplacian sign and contrast test of the
// grey-level stage.
//
// From the pixel f and its dilation delta f and erosion epsilon f (all at
// the same image position) it forms
//   g_ext = delta f - f          external gradient, 8 bits (delta f >= f)
//   g_int = f - epsilon f        internal gradient, 8 bits (f >= epsilon f)
//   L-    = (g_ext <= g_int)     1 where the morphological Laplacian
//                                L = g_ext - g_int is <= 0
//   g     = g_ext + g_int        morphological gradient, 9 bits
//   contrast = (g > threshold)     contrast test against Th
// The Laplacian itself is never formed: its sign is the comparison of the
// two gradients, which keeps every datapath at 8 or 9 bits.
//
// The operators and their widths (8, 8, 1, 9, 1 bits) follow the original
// data-flow diagram; the register stage and the 9-bit threshold are this
// implementation's choices.
//
// Stream protocol as in dilate_erode. One register stage: outputs follow
// an input strobe by one clock. `threshold` is a static setting (9 bits,
// the width of g).
module gradient_laplacian
  import contour_pkg::*;
(
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              in_avail,
  input  logic              in_sof,
  input  logic [PIX_W-1:0]  f,          // original pixel
  input  logic [PIX_W-1:0]  dil,        // delta f
  input  logic [PIX_W-1:0]  ero,        // epsilon f
  input  logic [GRAD_W-1:0] threshold,  // Th
  output logic              out_avail,
  output logic              out_sof,
  output logic              l_minus,    // L(x) <= 0
  output logic              contrast,     // g(x) > Th
  output logic [GRAD_W-1:0] grad        // g(x), for observation
);

  logic [PIX_W-1:0]  g_ext, g_int;
  logic [GRAD_W-1:0] g;

  always_comb begin
    g_ext = dil - f;
    g_int = f - ero;
    g     = GRAD_W'(g_ext) + GRAD_W'(g_int);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_avail <= 1'b0;
      out_sof   <= 1'b0;
      l_minus   <= 1'b0;
      contrast    <= 1'b0;
      grad      <= '0;
    end else begin
      out_avail <= in_avail;
      out_sof   <= in_sof;
      if (in_avail) begin
        l_minus <= (g_ext <= g_int);
        contrast  <= (g > threshold);
        grad    <= g;
      end
    end
  end

endmodule
