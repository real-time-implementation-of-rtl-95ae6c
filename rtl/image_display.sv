// image_display: Sobel edge detector for a 90 x 90 grey image, shown as a binary edge
// picture on a 640x480 VGA monitor.
//
// Data flow. The grey image sits in the input frame buffer (frame_ram, 8 x 8100). The
// Sobel engine reads it in raster order, slides a 3x3 window over it and writes the
// clamped gradient magnitude |Gx|+|Gy| of every pixel into the output frame buffer. The
// VGA controller (vga_sync) scans the screen continuously; the pixel generator (pixel_gen)
// reads the gradient image from the output frame buffer while the beam is over the
// picture, compares it with the threshold input and drives the one-bit r, g, b lines
// white or black. A mod-2 counter (pixel_clk_div) turns the 50 MHz clock into the 25 MHz
// pixel rate; the engine and the display both step at that rate.
//
// Interface. clk is the 50 MHz clock, rst an active-high synchronous reset. threshold,
// clk, rst, r, g, b, hsync and vsync are the ports of the source design. The source design
// filled the input memory at configuration; here load_we/load_addr/load_data write it
// (raster address row*90+col), and start re-runs the Sobel pass after a new image has
// been loaded. A pass also starts by itself once after reset, which processes whatever the
// input memory holds (its contents after configuration when IN_INIT_FILE names a
// $readmemh file). busy is high during a pass, which lasts 92*92+2 pixel clocks
// (about 0.68 ms). The display shows the output memory at all times, so a pass in progress
// is visible as it is written, and a new threshold takes effect at once.
module image_display
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_X0       = 0,
  parameter int unsigned IMG_Y0       = 0,
  parameter string       IN_INIT_FILE = ""
) (
  input  logic                         clk,
  input  logic                         rst,
  input  pixel_t                       threshold,
  input  logic                         load_we,
  input  logic [$clog2(IMG_W*IMG_H)-1:0] load_addr,
  input  pixel_t                       load_data,
  input  logic                         start,
  output logic                         busy,
  output logic                         r,
  output logic                         g,
  output logic                         b,
  output logic                         hsync,
  output logic                         vsync
);

  localparam int unsigned NPIX   = IMG_W * IMG_H;
  localparam int unsigned ADDR_W = $clog2(NPIX);

  logic              pix_ce;
  logic              auto_start;
  logic              eng_start, eng_done;
  logic              in_re, out_we, out_re;
  logic [ADDR_W-1:0] in_raddr, out_waddr, out_raddr;
  pixel_t            in_rdata, out_wdata, out_rdata;
  logic [9:0]        hcount, vcount;
  logic              hdisplay, vdisplay, hsync_raw, vsync_raw;

  pixel_clk_div u_clk_div (
    .clk    (clk),
    .rst    (rst),
    .pix_ce (pix_ce)
  );

  // One pass right after reset, as if the input memory had been filled at configuration.
  always_ff @(posedge clk) begin
    if (rst) auto_start <= 1'b1;
    else     auto_start <= 1'b0;
  end
  assign eng_start = start || auto_start;

  frame_ram #(.DATA_W(PIX_W), .DEPTH(NPIX), .INIT_FILE(IN_INIT_FILE)) u_in_ram (
    .clk   (clk),
    .we    (load_we),
    .waddr (load_addr),
    .wdata (load_data),
    .re    (in_re),
    .raddr (in_raddr),
    .rdata (in_rdata)
  );

  sobel_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_engine (
    .clk     (clk),
    .rst     (rst),
    .ce      (pix_ce),
    .start   (eng_start),
    .busy    (busy),
    .done    (eng_done),
    .rd_en   (in_re),
    .rd_addr (in_raddr),
    .rd_data (in_rdata),
    .wr_en   (out_we),
    .wr_addr (out_waddr),
    .wr_data (out_wdata)
  );

  frame_ram #(.DATA_W(PIX_W), .DEPTH(NPIX)) u_out_ram (
    .clk   (clk),
    .we    (out_we),
    .waddr (out_waddr),
    .wdata (out_wdata),
    .re    (out_re),
    .raddr (out_raddr),
    .rdata (out_rdata)
  );

  vga_sync #(
    .H_DISP(H_DISP), .H_FP(H_FP), .H_PW(H_PW), .H_BP(H_BP),
    .V_DISP(V_DISP), .V_FP(V_FP), .V_PW(V_PW), .V_BP(V_BP)
  ) u_vga_sync (
    .clk      (clk),
    .rst      (rst),
    .ce       (pix_ce),
    .hcount   (hcount),
    .vcount   (vcount),
    .hdisplay (hdisplay),
    .vdisplay (vdisplay),
    .hsync    (hsync_raw),
    .vsync    (vsync_raw)
  );

  pixel_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .IMG_X0(IMG_X0), .IMG_Y0(IMG_Y0)) u_pixel_gen (
    .clk       (clk),
    .rst       (rst),
    .ce        (pix_ce),
    .hcount    (hcount),
    .vcount    (vcount),
    .video_on  (hdisplay && vdisplay),
    .hsync_in  (hsync_raw),
    .vsync_in  (vsync_raw),
    .threshold (threshold),
    .rd_en     (out_re),
    .rd_addr   (out_raddr),
    .rd_data   (out_rdata),
    .r         (r),
    .g         (g),
    .b         (b),
    .hsync     (hsync),
    .vsync     (vsync)
  );

  // The end of a pass is visible on busy; the pulse itself is not needed.
  logic unused_done;
  assign unused_done = eng_done;

endmodule
