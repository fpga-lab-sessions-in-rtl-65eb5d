// max_min: maximum (dilation) or minimum (erosion) of a 3x3 window.
//
// Computes delta f = max over the nine window values when `op` is
// MORPH_DILATE, and epsilon f = min when it is MORPH_ERODE. The nine values
// are reduced by a balanced tree of compare-select stages (rows first, then
// the three row results), four comparator levels deep. The operation
// follows the design; the tree shape is this implementation's choice. Purely combinational;
// the caller registers the result.
module max_min
  import contour_pkg::*;
#(
  parameter int unsigned WIDTH = contour_pkg::PIX_W
) (
  input  morph_op_e        op,
  input  logic [WIDTH-1:0] win [3][3],
  output logic [WIDTH-1:0] result
);

  // Compare-select: the larger operand for a dilation, the smaller for an
  // erosion.
  function automatic logic [WIDTH-1:0] pick(morph_op_e o, logic [WIDTH-1:0] a,
                                            logic [WIDTH-1:0] b);
    if (o == MORPH_ERODE) return (a < b) ? a : b;
    else                  return (a > b) ? a : b;
  endfunction

  logic [WIDTH-1:0] row_res [3];

  always_comb begin
    for (int r = 0; r < 3; r++)
      row_res[r] = pick(op, pick(op, win[r][0], win[r][1]), win[r][2]);
    result = pick(op, pick(op, row_res[0], row_res[1]), row_res[2]);
  end

endmodule
