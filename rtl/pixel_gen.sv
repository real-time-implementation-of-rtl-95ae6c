// pixel_gen: BRAM-to-VGA interface that shows the gradient image as a binary picture.
//
// While the beam (hcount, vcount from vga_sync) is inside the IMG_W x IMG_H picture placed
// at (IMG_X0, IMG_Y0) and inside the visible area, the module reads the gradient pixel at
// raster address (vcount-IMG_Y0)*IMG_W + (hcount-IMG_X0) from the output frame buffer.
// When the data return, the pixel is white (r = g = b = 1) if it is greater than
// threshold and black otherwise; everything outside the picture is black. hsync and vsync
// are delayed by the same two pixel clocks as the colour, and all five outputs come
// straight from registers.
//
// Timing, in pixel clocks (ce): the address goes out in the step where the counters show a
// position, the RAM returns the data one step later, and the registered colour and syncs
// appear one step after that. rd_data must come from a RAM whose registered read loads on
// the clock where rd_en is high (frame_ram). Reset drives black with both syncs high
// (inactive).
//
// Reading the picture from block RAM, the one-bit-per-colour output where equal r, g and b
// give black or white, and binarising the gradient with an 8-bit threshold follow the
// source design. The strict "greater than" comparison, the picture position and the
// pipeline are this design's choices.
module pixel_gen
  import sobel_pkg::pixel_t;
#(
  parameter int unsigned IMG_W  = 90,
  parameter int unsigned IMG_H  = 90,
  parameter int unsigned IMG_X0 = 0,
  parameter int unsigned IMG_Y0 = 0,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic [9:0]        hcount,
  input  logic [9:0]        vcount,
  input  logic              video_on,
  input  logic              hsync_in,
  input  logic              vsync_in,
  input  pixel_t            threshold,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  pixel_t            rd_data,
  output logic              r,
  output logic              g,
  output logic              b,
  output logic              hsync,
  output logic              vsync
);

  logic       in_pic;
  logic [9:0] px, py;
  logic       in_pic_d, hsync_d, vsync_d;
  logic       white;

  assign px     = hcount - 10'(IMG_X0);
  assign py     = vcount - 10'(IMG_Y0);
  // Left of or above the picture, px or py wraps round to a large value.
  assign in_pic = video_on && (px < 10'(IMG_W)) && (py < 10'(IMG_H));

  assign rd_en   = ce && in_pic;
  assign rd_addr = ADDR_W'(py * 10'(IMG_W) + px);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pic_d <= 1'b0;
      hsync_d  <= 1'b1;
      vsync_d  <= 1'b1;
      r        <= 1'b0;
      g        <= 1'b0;
      b        <= 1'b0;
      hsync    <= 1'b1;
      vsync    <= 1'b1;
    end else if (ce) begin
      in_pic_d <= in_pic;
      hsync_d  <= hsync_in;
      vsync_d  <= vsync_in;
      r        <= white;
      g        <= white;
      b        <= white;
      hsync    <= hsync_d;
      vsync    <= vsync_d;
    end
  end

  assign white = in_pic_d && (rd_data > threshold);

endmodule
