// scan_counter: column and row counters of a raster-scanned stream.
//
// The two counters give the image position (row, col) of the pixel at the
// centre of the 3x3 window, which trails the newest pixel of the stream by
// one line and one pixel (LINEWIDTH+1 pixel strobes). From that position the
// four border flags tell which window rows and columns lie outside the image
// and must be replaced by the edge handler.
//
// The column counter advances on every pixel strobe (`en`) and wraps at
// LINEWIDTH; its wrap enables the row counter, which wraps at COLHEIGHT.
// After reset the first pixel strobe is taken as pixel (0,0) of a frame, so
// the counters start LINEWIDTH+1 pixels before it, at (COLHEIGHT-2,
// LINEWIDTH-1).
//
// Frame resync: a strobe that carries `sof` (start of frame) is pixel (0,0)
// of a new frame, but that pixel reaches the window centre only LINEWIDTH+1
// strobes later; until then the centre still walks through the end of the
// previous frame. So `sof` arms a small down-counter, and the position is
// forced to (0,0) at the strobe where the new frame's first pixel is the
// centre. When frames follow each other without gaps the forced value is
// the one the counters reach anyway; after filler pixels, or when the
// stream starts in mid-frame, it realigns them without disturbing the last
// line of the previous frame. Two sof strobes must be more than
// LINEWIDTH+1 strobes apart.
//
// That the border is found by a column and a row counter follows the
// original design; counting the window centre, the reset alignment and the
// deferred resync are this implementation's choices.
//
// The position and flags are valid combinationally in the clock of the
// strobe they belong to; the counters step at the end of it.
module scan_counter #(
  parameter int unsigned LINEWIDTH = contour_pkg::LINEWIDTH_DEF,
  parameter int unsigned COLHEIGHT = contour_pkg::COLHEIGHT_DEF,
  localparam int unsigned CW = $clog2(LINEWIDTH),
  localparam int unsigned RW = $clog2(COLHEIGHT)
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          en,         // pixel strobe (data available)
  input  logic          sof,        // this strobe carries pixel (0,0)
  output logic [CW-1:0] col,        // column of the window centre
  output logic [RW-1:0] row,        // row of the window centre
  output logic          first_col,  // centre on column 0
  output logic          last_col,   // centre on column LINEWIDTH-1
  output logic          first_row,  // centre on row 0
  output logic          last_row    // centre on row COLHEIGHT-1
);

  localparam int unsigned SW = $clog2(LINEWIDTH + 2);

  localparam logic [CW-1:0] COL_START = CW'(LINEWIDTH - 1);
  localparam logic [RW-1:0] ROW_START = RW'(COLHEIGHT - 2);
  localparam logic [CW-1:0] COL_LAST  = CW'(LINEWIDTH - 1);
  localparam logic [RW-1:0] ROW_LAST  = RW'(COLHEIGHT - 1);
  localparam logic [SW-1:0] SYNC_LOAD = SW'(LINEWIDTH + 1);

  initial begin
    assert (LINEWIDTH >= 4 && COLHEIGHT >= 2)
      else $fatal(1, "scan_counter: image must be at least 4x2");
  end

  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;
  logic [SW-1:0] sync_q;     // strobes until a pending frame start is centred
  logic          line_end;
  logic          centre_sof;

  // The new frame's pixel (0,0) is at the window centre on this strobe.
  assign centre_sof = (sync_q == SW'(1));

  // Position of the current strobe's window centre.
  always_comb begin
    col = centre_sof ? '0 : col_q;
    row = centre_sof ? '0 : row_q;
  end

  assign line_end  = (col == COL_LAST);
  assign first_col = (col == '0);
  assign last_col  = line_end;
  assign first_row = (row == '0);
  assign last_row  = (row == ROW_LAST);

  always_ff @(posedge clk) begin
    if (rst) begin
      col_q  <= COL_START;
      row_q  <= ROW_START;
      sync_q <= '0;
    end else if (en) begin
      // column counter
      col_q <= line_end ? '0 : col + 1'b1;
      // row counter, enabled by the column counter's wrap
      if (line_end) row_q <= (row == ROW_LAST) ? '0 : row + 1'b1;
      else          row_q <= row;
      // pending resync
      if (sof)                 sync_q <= SYNC_LOAD;
      else if (sync_q != '0)   sync_q <= sync_q - 1'b1;
    end
  end

endmodule
