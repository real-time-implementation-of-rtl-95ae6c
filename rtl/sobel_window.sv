// sobel_window: 3x3 pixel window built from shift registers and two row buffers.
//
// The raster-ordered pixel stream enters the newest window row (three registers), leaves
// it into a row buffer, enters the middle window row, leaves it into the second row buffer
// and ends in the oldest window row. With ROW_LEN pixels per streamed row, the row buffers
// are ROW_LEN-3 long, so the three window rows hold the same three columns of three
// consecutive rows. All registers shift when ce is high.
//
// win presents the window as p0..p8, numbered column by column: p0, p1, p2 are the left
// column from top to bottom, p3, p4, p5 the middle one and p6, p7, p8 the right one; p4 is
// the centre. After a shift, p8 is the pixel that just entered. This arrangement (window
// fed from the frame buffer, row buffers between window rows, and the p0..p8 numbering)
// follows the source design; the register-level insides are this design's.
module sobel_window
  import sobel_pkg::*;
#(
  parameter int unsigned ROW_LEN = 92
) (
  input  logic    clk,
  input  logic    ce,
  input  pixel_t  din,
  output window_t win
);

  // w[r][c]: r = 0 oldest (top) row, 2 newest (bottom); c = 0 left column, 2 right column.
  pixel_t w [3][3];
  pixel_t rb_top_out, rb_mid_out;

  always_ff @(posedge clk) begin
    if (ce) begin
      for (int r = 0; r < 3; r++) begin
        w[r][0] <= w[r][1];
        w[r][1] <= w[r][2];
      end
      w[2][2] <= din;
      w[1][2] <= rb_mid_out;
      w[0][2] <= rb_top_out;
    end
  end

  // Newest row -> middle row.
  row_buffer #(.DATA_W(PIX_W), .DEPTH(ROW_LEN - 3)) u_rb_mid (
    .clk (clk),
    .ce  (ce),
    .din (w[2][0]),
    .dout(rb_mid_out)
  );

  // Middle row -> oldest row.
  row_buffer #(.DATA_W(PIX_W), .DEPTH(ROW_LEN - 3)) u_rb_top (
    .clk (clk),
    .ce  (ce),
    .din (w[1][0]),
    .dout(rb_top_out)
  );

  always_comb begin
    for (int c = 0; c < 3; c++)
      for (int r = 0; r < 3; r++)
        win[3*c + r] = w[r][c];
  end

endmodule
