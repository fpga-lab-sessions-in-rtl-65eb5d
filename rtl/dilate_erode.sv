// dilate_erode: 3x3 dilation and erosion of a pixel stream, sharing one
// neighbourhood extractor.
//
// Dilation (max) and erosion (min) over the 8-neighbourhood plus centre
// run on the same input, so they share the costly part: one neighbourhood
// extractor (two image rows of storage) and one pair of column/row
// counters. Each operation has its own edge handler (missing pixels become
// -inf for the dilation, +inf for the erosion) and its own max/min unit.
// The centre pixel x22 of the window is also brought out: it is the input
// pixel delayed by exactly the operator's latency, so a caller that needs
// f alongside delta f and epsilon f gets it without a separate delay line.
//
// Stream protocol, input and output alike: `*_avail` is high for one clock
// per pixel (back-to-back strobes are allowed), `*_data` is valid with it,
// and `*_sof` marks the strobe of pixel (0,0) of a frame. The block is
// driven purely by its input strobes.
//
// Timing: an input strobe produces an output strobe one clock later. The
// output pixel is the result for the window centre, LINEWIDTH+1 input
// pixels (one image line and one pixel) behind the input, since a pixel can
// be processed only once its last neighbour x33 has arrived. The pixels of
// the last image line therefore come out while the first line of the next
// frame (or any trailing strobes) goes in. Outputs before the first
// out_sof after reset belong to no frame.
//
// The sharing of one extractor and one counter pair by the two operators
// follows the original design; the output registers, the centre output and
// the start-of-frame signal are this implementation's additions.
//
// WIDTH is 8 for the grey-level stage and 1 for the binary stage of the
// contour detector.
module dilate_erode
  import contour_pkg::*;
#(
  parameter int unsigned WIDTH     = contour_pkg::PIX_W,
  parameter int unsigned LINEWIDTH = contour_pkg::LINEWIDTH_DEF,
  parameter int unsigned COLHEIGHT = contour_pkg::COLHEIGHT_DEF
) (
  input  logic             clk,
  input  logic             rst,          // synchronous, active high
  input  logic             in_avail,
  input  logic             in_sof,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_avail,
  output logic             out_sof,
  output logic [WIDTH-1:0] out_dilate,   // delta f at the window centre
  output logic [WIDTH-1:0] out_erode,    // epsilon f at the window centre
  output logic [WIDTH-1:0] out_center    // f at the window centre
);

  logic [WIDTH-1:0] win      [3][3];
  logic [WIDTH-1:0] win_dil  [3][3];
  logic [WIDTH-1:0] win_ero  [3][3];
  logic [WIDTH-1:0] dil, ero;
  logic             first_col, last_col, first_row, last_row;

  neighborhood_extractor #(.WIDTH(WIDTH), .LINEWIDTH(LINEWIDTH)) u_neigh (
    .clk, .rst, .en(in_avail), .din(in_data), .win
  );

  scan_counter #(.LINEWIDTH(LINEWIDTH), .COLHEIGHT(COLHEIGHT)) u_count (
    .clk, .rst, .en(in_avail), .sof(in_sof), .col(), .row(),
    .first_col, .last_col, .first_row, .last_row
  );

  edge_handler #(.WIDTH(WIDTH)) u_edge_dil (
    .op(MORPH_DILATE), .first_row, .last_row, .first_col, .last_col,
    .win_in(win), .win_out(win_dil)
  );
  edge_handler #(.WIDTH(WIDTH)) u_edge_ero (
    .op(MORPH_ERODE), .first_row, .last_row, .first_col, .last_col,
    .win_in(win), .win_out(win_ero)
  );

  max_min #(.WIDTH(WIDTH)) u_max (.op(MORPH_DILATE), .win(win_dil), .result(dil));
  max_min #(.WIDTH(WIDTH)) u_min (.op(MORPH_ERODE),  .win(win_ero), .result(ero));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_avail <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_avail <= in_avail;
      out_sof   <= in_avail && first_row && first_col;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_dilate <= '0;
      out_erode  <= '0;
      out_center <= '0;
    end else if (in_avail) begin
      out_dilate <= dil;
      out_erode  <= ero;
      out_center <= win[1][1];
    end
  end

  // A frame start can only come with a pixel.
  assert property (@(posedge clk) disable iff (rst) in_sof |-> in_avail)
    else $error("dilate_erode: in_sof without in_avail");

endmodule
