// sobel_engine: one pass of the Sobel edge detector from the input frame buffer to the
// output frame buffer.
//
// A start pulse (taken on any clock while idle) begins a pass; busy stays high until the
// last output pixel is written, and done pulses for one clock then. The pass steps only on
// clocks where ce (the pixel clock enable) is high, one pixel per step.
//
// How it works. A row/column counter walks over the image surrounded by a one-pixel border,
// (IMG_H+2) x (IMG_W+2) positions in raster order. For a position inside the image it
// reads the input RAM (raster address, kept in a running counter); for a border position
// it feeds a zero. One step later the pixel (or the zero) is shifted into the 3x3 window
// (sobel_window, rows IMG_W+2 long). Once the newest pixel of the window is at border row 2
// or later and border column 2 or later, the window is centred on an image pixel; the
// window operator (sobel_operator) then gives that pixel's edge magnitude, which is written
// to the output RAM at the next raster address. The three stages are:
//   S0  counter position -> input RAM address (rd_en, rd_addr)
//   S1  RAM data valid   -> shifted into the window
//   S2  window complete  -> wr_en, wr_addr, wr_data (combinational, gated by ce)
// A pass takes (IMG_H+2)*(IMG_W+2) + 2 enabled clocks and writes IMG_H*IMG_W pixels in
// raster order, one output pixel per enabled clock once the window has filled.
//
// The raster scan with a counter, the window fed from the frame buffer through row
// buffers, the loop over every image pixel (i, j = 1..90) and the storing of the result at
// the pixel's raster address follow the source design. Treating the pixels outside the
// image as zero is this design's reading of that loop, which reaches one pixel beyond each
// edge of the image; the start/busy/done handshake and the stage split are this design's.
// rd_data must come from a RAM with a registered read that loads on the clock where rd_en
// is high (frame_ram).
module sobel_engine
  import sobel_pkg::pixel_t, sobel_pkg::window_t, sobel_pkg::grad_t;
#(
  parameter int unsigned IMG_W  = 90,
  parameter int unsigned IMG_H  = 90,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  pixel_t            rd_data,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output pixel_t            wr_data
);

  localparam int unsigned ROW_LEN = IMG_W + 2;           // streamed row, with border
  localparam int unsigned NUM_ROW = IMG_H + 2;
  localparam int unsigned CW      = $clog2(ROW_LEN + 1);
  localparam int unsigned RW      = $clog2(NUM_ROW + 1);
  localparam int unsigned NPIX    = IMG_W * IMG_H;

  // S0: scan position
  logic [RW-1:0]     row;
  logic [CW-1:0]     col;
  logic              scanning;     // positions left to issue
  logic              s0_inside;
  logic [ADDR_W-1:0] rd_ptr;
  // S1
  logic              s1_valid, s1_inside;
  logic [RW-1:0]     s1_row;
  logic [CW-1:0]     s1_col;
  // S2
  logic              s2_valid;
  logic [RW-1:0]     s2_row;
  logic [CW-1:0]     s2_col;
  logic              s2_out;
  logic [ADDR_W-1:0] wr_ptr;

  pixel_t  win_in;
  window_t win;
  grad_t   gx, gy;
  pixel_t  mag;

  assign s0_inside = (row != '0) && (row <= RW'(IMG_H)) && (col != '0) && (col <= CW'(IMG_W));
  assign rd_en     = ce && scanning && s0_inside;
  assign rd_addr   = rd_ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      scanning <= 1'b0;
      row      <= '0;
      col      <= '0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      s1_valid <= 1'b0;
      s1_inside <= 1'b0;
      s1_row   <= '0;
      s1_col   <= '0;
      s2_valid <= 1'b0;
      s2_row   <= '0;
      s2_col   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        scanning <= 1'b1;
        row      <= '0;
        col      <= '0;
        rd_ptr   <= '0;
        wr_ptr   <= '0;
        s1_valid <= 1'b0;
        s2_valid <= 1'b0;
      end else if (ce) begin
        // S0 -> S1
        if (scanning) begin
          if (col == CW'(ROW_LEN - 1)) begin
            col <= '0;
            if (row == RW'(NUM_ROW - 1)) scanning <= 1'b0;
            else                         row <= row + RW'(1);
          end else begin
            col <= col + CW'(1);
          end
          if (s0_inside) rd_ptr <= rd_ptr + ADDR_W'(1);
        end
        s1_valid  <= scanning;
        s1_inside <= s0_inside;
        s1_row    <= row;
        s1_col    <= col;
        // S1 -> S2
        s2_valid <= s1_valid;
        s2_row   <= s1_row;
        s2_col   <= s1_col;
        // S2: write
        if (s2_out) begin
          wr_ptr <= wr_ptr + ADDR_W'(1);
          if (wr_ptr == ADDR_W'(NPIX - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign win_in = s1_inside ? rd_data : '0;

  sobel_window #(.ROW_LEN(ROW_LEN)) u_window (
    .clk (clk),
    .ce  (ce && s1_valid),
    .din (win_in),
    .win (win)
  );

  sobel_operator u_operator (
    .win (win),
    .gx  (gx),
    .gy  (gy),
    .mag (mag)
  );

  assign s2_out  = s2_valid && (s2_row >= RW'(2)) && (s2_col >= CW'(2));
  assign wr_en   = ce && s2_out;
  assign wr_addr = wr_ptr;
  assign wr_data = mag;

  // gx and gy are not needed here; only the clamped magnitude is stored.
  logic unused_grad;
  assign unused_grad = ^{gx, gy};

  // A pass writes exactly IMG_W*IMG_H pixels: no write may come after the last one.
  a_no_write_when_idle: assert property (@(posedge clk) disable iff (rst) wr_en |-> busy);

endmodule
