// tb_edge_handler: self-checking test of edge_handler.
//
// Applies random 8-bit windows with every combination of the four border
// flags and both operations, and checks each of the nine outputs: an entry
// on a flagged row or column must be 0 for a dilation and 255 for an
// erosion, every other entry must pass unchanged.
module tb_edge_handler;
  import contour_pkg::*;

  logic [7:0] win_in  [3][3];
  logic [7:0] win_out [3][3];
  morph_op_e  op;
  logic       first_row, last_row, first_col, last_col;
  int         checks = 0, failures = 0;

  edge_handler #(.WIDTH(8)) dut (.op, .first_row, .last_row, .first_col, .last_col,
                                 .win_in, .win_out);

  initial begin
    for (int t = 0; t < 64; t++) begin
      for (int rep = 0; rep < 8; rep++) begin
        {first_row, last_row, first_col, last_col} = 4'(t);
        op = morph_op_e'(t >> 4);
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            win_in[r][c] = 8'($urandom_range(1, 254));
        #1;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            bit outside;
            logic [7:0] exp;
            outside = (r == 0 && first_row) || (r == 2 && last_row) ||
                      (c == 0 && first_col) || (c == 2 && last_col);
            exp = outside ? ((op == MORPH_ERODE) ? 8'd255 : 8'd0) : win_in[r][c];
            checks++;
            if (win_out[r][c] !== exp) begin
              failures++;
              if (failures < 10) $display("FAIL: flags %b op %0d x%0d%0d = %0d expected %0d",
                                          t[3:0], op, r+1, c+1, win_out[r][c], exp);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
