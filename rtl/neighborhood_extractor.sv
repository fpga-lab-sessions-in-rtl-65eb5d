// neighborhood_extractor: 3x3 window of a raster-scanned pixel stream.
//
// The newest pixel of the stream is x33 of the window. Each window row is
// two pixel registers (z^-1) after its right-hand pixel, and the rows are
// chained through a delay line of LINEWIDTH-2 pixels, so that the pixel
// leaving a row re-enters the row above one full image line later:
//
//   x11 <-z^-1- x12 <-z^-1- x13 <-z^-(LINEWIDTH-2)- x21
//   x21 <-z^-1- x22 <-z^-1- x23 <-z^-(LINEWIDTH-2)- x31
//   x31 <-z^-1- x32 <-z^-1- x33 <- new pixel
//
// In total two image rows are stored. This structure follows the original
// design; building the long delays as block-RAM style circular buffers
// (delay_line) and registering x33's neighbours only on strobes are this
// implementation's choices.
//
// Timing: in a clock with `en` high, `win` shows the window whose bottom
// right pixel x33 is `din` itself (combinational path), and whose centre
// x22 is the pixel LINEWIDTH+1 strobes older. All storage advances at the
// end of that clock. The window is indexed win[row][col], row 0 = x1*,
// col 0 = x*1. Window entries that lie outside the image (at borders, or
// before the stream has filled the lines) hold stale pixels; the edge
// handler replaces them.
module neighborhood_extractor #(
  parameter int unsigned WIDTH     = contour_pkg::PIX_W,
  parameter int unsigned LINEWIDTH = contour_pkg::LINEWIDTH_DEF
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             en,       // pixel strobe
  input  logic [WIDTH-1:0] din,      // new pixel
  output logic [WIDTH-1:0] win [3][3]
);

  // Pixel registers (z^-1) of the three window rows, columns 1 and 2
  // (x*1, x*2); column 3 of rows 1 and 2 are the delay-line outputs.
  logic [WIDTH-1:0] x11, x12, x21, x22, x31, x32;
  logic [WIDTH-1:0] x13, x23;

  always_ff @(posedge clk) begin
    if (rst) begin
      {x11, x12, x21, x22, x31, x32} <= '0;
    end else if (en) begin
      x32 <= din;
      x31 <= x32;
      x22 <= x23;
      x21 <= x22;
      x12 <= x13;
      x11 <= x12;
    end
  end

  // Row delay lines: z^-(LINEWIDTH-2) from x31 to x23 and from x21 to x13.
  delay_line #(.WIDTH(WIDTH), .DEPTH(LINEWIDTH - 2)) u_row3_to_row2 (
    .clk, .rst, .en, .din(x31), .dout(x23)
  );
  delay_line #(.WIDTH(WIDTH), .DEPTH(LINEWIDTH - 2)) u_row2_to_row1 (
    .clk, .rst, .en, .din(x21), .dout(x13)
  );

  always_comb begin
    win[0][0] = x11; win[0][1] = x12; win[0][2] = x13;
    win[1][0] = x21; win[1][1] = x22; win[1][2] = x23;
    win[2][0] = x31; win[2][1] = x32; win[2][2] = din;
  end

endmodule
