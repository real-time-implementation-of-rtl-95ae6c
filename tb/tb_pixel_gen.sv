// tb_pixel_gen: drives the pixel generator with a small picture (6 x 4 placed at column 3,
// row 2) on a small made-up raster (16 x 10, of which 12 x 8 visible), random sync inputs,
// a random pixel enable and a threshold that changes every frame (every other frame it
// equals one of the picture's pixels). The gradient RAM is an
// array model with a registered read on rd_en. After every enabled clock the outputs must
// show the position presented two enabled clocks earlier: white (r = g = b = 1) exactly
// when it lies in the picture and its pixel is greater than the threshold, and the sync
// inputs delayed by the same two steps.
module tb_pixel_gen;
  import sobel_pkg::*;
  localparam int PW = 6, PH = 4, X0 = 3, Y0 = 2;
  localparam int SW = 16, SH = 10, VW = 12, VH = 8;

  typedef struct {
    bit in_pic;
    int value;
    bit hs, vs;
  } step_t;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [9:0] hcount = '0, vcount = '0;
  logic video_on = 1'b0, hsync_in = 1'b1, vsync_in = 1'b1;
  pixel_t threshold = '0, rd_data;
  logic rd_en;
  logic [4:0] rd_addr;
  logic r, g, b, hsync, vsync;
  pixel_t img [PW * PH];
  step_t hist [$];
  int checks = 0, failures = 0, n_white = 0, n_black_in = 0;

  pixel_gen #(.IMG_W(PW), .IMG_H(PH), .IMG_X0(X0), .IMG_Y0(Y0)) dut (
    .clk(clk), .rst(rst), .ce(ce), .hcount(hcount), .vcount(vcount), .video_on(video_on),
    .hsync_in(hsync_in), .vsync_in(vsync_in), .threshold(threshold),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .r(r), .g(g), .b(b), .hsync(hsync), .vsync(vsync));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rd_en) rd_data <= img[rd_addr];

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int x, y;
    step_t s, e;
    for (int k = 0; k < PW * PH; k++) img[k] = pixel_t'($urandom);
    repeat (3) @(negedge clk);
    check(int'(hsync), 1, "hsync in reset");
    check(int'(vsync), 1, "vsync in reset");
    check(int'(r), 0, "black in reset");
    rst = 1'b0;
    for (int frame = 0; frame < 20; frame++) begin
      // half the frames use a threshold equal to a picture pixel, to probe the comparison edge
      threshold = (frame % 2 == 0) ? pixel_t'($urandom) : img[$urandom_range(0, PW * PH - 1)];
      for (int p = 0; p < SW * SH; ) begin
        @(negedge clk);
        x = p % SW; y = p / SW;
        hcount   = 10'(x);
        vcount   = 10'(y);
        video_on = (x < VW) && (y < VH);
        hsync_in = 1'($urandom);
        vsync_in = 1'($urandom);
        ce = 1'($urandom_range(0, 2) != 0);
        if (ce) begin
          s.in_pic = video_on && x >= X0 && x < X0 + PW && y >= Y0 && y < Y0 + PH;
          s.value  = s.in_pic ? int'(img[(y - Y0) * PW + (x - X0)]) : 0;
          s.hs = hsync_in; s.vs = vsync_in;
          hist.push_back(s);
          p++;
        end
        @(posedge clk); #1;
        if (ce && hist.size() >= 2) begin
          e = hist[hist.size() - 2];
          check(int'(r), int'(e.in_pic && e.value > int'(threshold)), "r");
          check(int'(g), int'(r), "g equals r");
          check(int'(b), int'(r), "b equals r");
          check(int'(hsync), int'(e.hs), "hsync delay");
          check(int'(vsync), int'(e.vs), "vsync delay");
          if (e.in_pic && r) n_white++;
          if (e.in_pic && !r) n_black_in++;
        end
      end
    end
    checks += 2;
    if (n_white == 0)    begin failures++; $display("FAIL no white picture pixel"); end
    if (n_black_in == 0) begin failures++; $display("FAIL no black picture pixel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
