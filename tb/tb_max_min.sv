// tb_max_min: self-checking test of max_min.
//
// Random 8-bit windows (including windows with repeated values and
// extremes) with both operations; the result must equal the maximum of the
// nine values for a dilation and the minimum for an erosion.
module tb_max_min;
  import contour_pkg::*;

  logic [7:0] win [3][3];
  logic [7:0] result;
  morph_op_e  op;
  int         checks = 0, failures = 0;

  max_min #(.WIDTH(8)) dut (.op, .win, .result);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mx, mn;
      op = morph_op_e'(t & 1);
      mx = -1; mn = 256;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          case (t % 7)
            0: win[r][c] = 8'($urandom_range(0, 3));
            1: win[r][c] = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
            default: win[r][c] = 8'($urandom);
          endcase
          if (int'(win[r][c]) > mx) mx = int'(win[r][c]);
          if (int'(win[r][c]) < mn) mn = int'(win[r][c]);
        end
      #1;
      checks++;
      if (int'(result) != ((op == MORPH_ERODE) ? mn : mx)) begin
        failures++;
        if (failures < 10) $display("FAIL: op %0d result %0d expected %0d", op, result,
                                    (op == MORPH_ERODE) ? mn : mx);
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
