// edge_handler: border substitution for a 3x3 morphological operator.
//
// When the window centre lies on the first or last row or column of the
// image, part of the window falls outside the image and holds pixels of the
// neighbouring line or frame. Those entries are replaced by a value that
// cannot change the result: the smallest value (all zeros, standing for
// -infinity) for a dilation, and the largest (all ones, +infinity) for an
// erosion, as the original design prescribes. The border flags come from
// the column and row counters.
//
// The centre entry x22 is always inside the image and passes unchanged.
// Purely combinational. Window indexing is win[row][col], row 0 = x1*.
module edge_handler
  import contour_pkg::*;
#(
  parameter int unsigned WIDTH = contour_pkg::PIX_W
) (
  input  morph_op_e        op,          // MORPH_DILATE or MORPH_ERODE
  input  logic             first_row,   // top row of window is outside
  input  logic             last_row,    // bottom row of window is outside
  input  logic             first_col,   // left column of window is outside
  input  logic             last_col,    // right column of window is outside
  input  logic [WIDTH-1:0] win_in  [3][3],
  output logic [WIDTH-1:0] win_out [3][3]
);

  logic [WIDTH-1:0] fill;
  assign fill = (op == MORPH_ERODE) ? '1 : '0;

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        if ((r == 0 && first_row) || (r == 2 && last_row) ||
            (c == 0 && first_col) || (c == 2 && last_col))
          win_out[r][c] = fill;
        else
          win_out[r][c] = win_in[r][c];
      end
    end
  end

endmodule
