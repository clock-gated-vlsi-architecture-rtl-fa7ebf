// 3x3 window generator (input buffering) for a raster-ordered pixel stream.
//
// Two line buffers of IMG_WIDTH pixels hold the two previous image rows, so
// that each accepted pixel comes with the pixels one and two rows above it in
// the same column. This three-pixel column is shifted into a 3x3 register
// array from the right. After the pixel at (row, col) has been accepted, the
// window holds rows row-2..row and columns col-2..col, i.e. the neighbourhood
// of pixel (row-1, col-1).
//
// A row and a column counter follow the stream and wrap at the image size, so
// frames may follow each other back to back; reset starts a frame. win_valid
// is high only for windows that lie wholly inside one frame (row >= 2 and
// col >= 2): the one-pixel border of the image gets no result.
//
// Interface and timing: in_valid qualifies pix_in; the window and win_valid
// are registered, one clock after the accepting edge. Cycles without in_valid
// hold the window and clear win_valid. rst is asynchronous, active high.
// Line buffers plus shift registers follow the original architecture; the
// border rule, the frame counters and the valid flag are this design's own.
module window_gen
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 256,
  parameter int unsigned IMG_HEIGHT = 256
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  pixel_t  pix_in,
  output window_t win,
  output logic    win_valid
);

  localparam int unsigned COL_W = (IMG_WIDTH  > 1) ? $clog2(IMG_WIDTH)  : 1;
  localparam int unsigned ROW_W = (IMG_HEIGHT > 1) ? $clog2(IMG_HEIGHT) : 1;

  pixel_t           row1_pix;  // same column, one row above
  pixel_t           row2_pix;  // same column, two rows above
  logic [COL_W-1:0] col;
  logic [ROW_W-1:0] row;
  logic             col_last, row_last;

  line_buffer #(.DEPTH(IMG_WIDTH)) u_lb1 (
    .clk (clk), .rst (rst), .en (in_valid), .din (pix_in),   .dout (row1_pix)
  );

  line_buffer #(.DEPTH(IMG_WIDTH)) u_lb2 (
    .clk (clk), .rst (rst), .en (in_valid), .din (row1_pix), .dout (row2_pix)
  );

  assign col_last = (col == COL_W'(IMG_WIDTH - 1));
  assign row_last = (row == ROW_W'(IMG_HEIGHT - 1));

  // Position of the pixel being accepted.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      col <= col_last ? '0 : col + 1'b1;
      if (col_last) row <= row_last ? '0 : row + 1'b1;
    end
  end

  // 3x3 shift register: the new column enters on the right.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      win       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (row >= ROW_W'(2)) && (col >= COL_W'(2));
      if (in_valid) begin
        win.top_left     <= win.top;
        win.top          <= win.top_right;
        win.top_right    <= row2_pix;
        win.left         <= win.center;
        win.center       <= win.right;
        win.right        <= row1_pix;
        win.bottom_left  <= win.bottom;
        win.bottom       <= win.bottom_right;
        win.bottom_right <= pix_in;
      end
    end
  end

endmodule
