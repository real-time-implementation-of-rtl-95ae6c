// sobel_pkg: types and constants shared by the Sobel edge detector with VGA output.
//
// The image is a 90 x 90 grey picture with 8 bits per pixel (values 0..255), kept in
// block RAM in raster order (address = row * IMG_W + col). The 3x3 window is handed
// between modules as nine pixels p0..p8 numbered column by column, p0 top-left, p1 below
// it, p2 bottom-left, p3 top-middle and so on up to p8 bottom-right. The VGA numbers are
// the 640x480 at 60 Hz mode: 800 pixel clocks per line, 525 lines per frame.
package sobel_pkg;

  localparam int unsigned PIX_W = 8;           // bits per grey pixel
  localparam int unsigned IMG_W = 90;          // image width in pixels
  localparam int unsigned IMG_H = 90;          // image height in pixels
  localparam int unsigned GRAD_W = 11;         // signed width of Gx, Gy and of |Gx|+|Gy|

  // 640x480 VGA timing in pixel clocks (horizontal) and lines (vertical).
  localparam int unsigned H_DISP = 640;
  localparam int unsigned H_FP   = 16;
  localparam int unsigned H_PW   = 96;
  localparam int unsigned H_BP   = 48;
  localparam int unsigned V_DISP = 480;
  localparam int unsigned V_FP   = 10;
  localparam int unsigned V_PW   = 2;
  localparam int unsigned V_BP   = 33;         // 525 lines in all

  typedef logic [PIX_W-1:0] pixel_t;
  // p0..p8 of the 3x3 window; index k holds pk.
  typedef pixel_t [8:0] window_t;
  typedef logic signed [GRAD_W-1:0] grad_t;

endpackage
