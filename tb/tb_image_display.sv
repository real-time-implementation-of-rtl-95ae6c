// tb_image_display: end-to-end test of the whole edge detector at its default size
// (90 x 90 image, 640x480 VGA), with no parameter overridden.
//
// After reset the design runs one pass by itself over whatever the input memory holds. The
// testbench then loads a 90 x 90 test picture through the load port (blocks, a ramp and
// random texture, so that the result has strong edges that hit the 255 clamp, weak ones
// and flat areas), starts a pass and times it: 92*92+2 pixel clocks of 40 ns. It then
// watches three whole VGA frames, one with each threshold 150, 100 and 50, and checks
// every pixel time of each: hsync and vsync against the 640x480 timing (found from the
// first vsync edge), black outside the 90 x 90 picture and, inside it, white exactly
// where the reference Sobel magnitude (zero outside the image, |Gx|+|Gy| clamped to 255)
// is greater than the threshold. It counts how often each mechanism was seen: automatic
// and requested passes, border pixels, clamped pixels, white and black picture pixels,
// sync pulses and threshold changes, and fails if one never happened.
module tb_image_display;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 90, H = 90, NPIX = W * H;
  localparam int HT = 800, VT = 525;
  localparam int PASS_CLOCKS = 2 * ((H + 2) * (W + 2) + 2);

  logic clk = 1'b0, rst = 1'b1;
  pixel_t threshold = 8'd100;
  logic load_we = 1'b0, start = 1'b0;
  logic [12:0] load_addr = '0;
  pixel_t load_data = '0;
  logic busy, r, g, b, hsync, vsync;

  int img [NPIX];
  int mag [NPIX];
  bit clampd [NPIX];
  int checks = 0, failures = 0;
  int n_auto = 0, n_pass = 0, n_border = 0, n_clamp = 0, n_white = 0, n_black = 0;
  int n_hs = 0, n_vs = 0, n_thr = 0;

  image_display dut (.clk(clk), .rst(rst), .threshold(threshold), .load_we(load_we),
                     .load_addr(load_addr), .load_data(load_data), .start(start),
                     .busy(busy), .r(r), .g(g), .b(b), .hsync(hsync), .vsync(vsync));

  always #10 clk = ~clk;    // 50 MHz

  initial begin
    repeat (4_000_000) @(posedge clk);
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

  function automatic int pix(input int rr, input int cc);
    if (rr < 0 || rr >= H || cc < 0 || cc >= W) return 0;
    return img[rr * W + cc];
  endfunction

  task automatic make_reference();
    int n[3][3];
    for (int rr = 0; rr < H; rr++)
      for (int cc = 0; cc < W; cc++) begin
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++) n[dr][dc] = pix(rr + dr - 1, cc + dc - 1);
        mag[rr * W + cc]    = ref_mag(n);
        clampd[rr * W + cc] = (ref_sum(n) > 255);
      end
  endtask

  // One frame starting at a vsync falling edge: every pixel time is two clocks.
  task automatic check_frame();
    int white_exp;
    // find the start of the sync pulse: line 490, pixel 0
    while (vsync !== 1'b1) @(negedge clk);
    while (vsync !== 1'b0) @(negedge clk);
    n_vs++;
    for (int t = 0; t < HT * VT; t++) begin
      int line = (490 + t / HT) % VT;
      int x = t % HT;
      bit in_pic = (x < W) && (line < H);
      // sample both clocks of the pixel time
      for (int half = 0; half < 2; half++) begin
        if (half == 1 || t != 0) @(negedge clk);
        white_exp = in_pic && (mag[line * W + x] > int'(threshold));
        check(int'(hsync), int'(!(x >= 656 && x < 752)), $sformatf("hsync line %0d x %0d", line, x));
        check(int'(vsync), int'(!(line >= 490 && line < 492)), $sformatf("vsync line %0d x %0d", line, x));
        check(int'({r, g, b}), white_exp ? 7 : 0, $sformatf("rgb line %0d x %0d", line, x));
      end
      if (x == 656) n_hs++;
      if (in_pic) begin
        if (white_exp != 0) n_white++; else n_black++;
        if (clampd[line * W + x]) n_clamp++;
        if (line == 0 || line == H - 1 || x == 0 || x == W - 1) n_border++;
      end
    end
  endtask

  initial begin
    int t0, t1;
    // test picture
    for (int rr = 0; rr < H; rr++)
      for (int cc = 0; cc < W; cc++) begin
        int v;
        if (rr >= 20 && rr < 50 && cc >= 15 && cc < 45)      v = 230;   // bright block
        else if (rr >= 60 && cc >= 10 && cc < 80)            v = (cc - 10) * 3;  // ramp
        else if (cc >= 55 && rr < 40)                        v = 90 + $urandom_range(0, 60);
        else                                                 v = 30;
        img[rr * W + cc] = v;
      end
    make_reference();

    repeat (5) @(negedge clk);
    rst = 1'b0;
    // the automatic pass after reset
    @(negedge clk); @(negedge clk);
    if (busy) n_auto++;
    check(int'(busy), 1, "automatic pass after reset");
    while (busy) @(negedge clk);

    for (int a = 0; a < NPIX; a++) begin
      load_we = 1'b1; load_addr = 13'(a); load_data = pixel_t'(img[a]);
      @(negedge clk);
    end
    load_we = 1'b0;

    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time;
    if (busy) n_pass++;
    while (busy) @(negedge clk);
    t1 = $time;
    // busy rises on the start clock and falls on the pixel step of the last write
    checks++;
    if ((t1 - t0) / 20 < PASS_CLOCKS - 2 || (t1 - t0) / 20 > PASS_CLOCKS + 2) begin
      failures++;
      $display("FAIL pass took %0d clocks, expected about %0d", (t1 - t0) / 20, PASS_CLOCKS);
    end
    $display("pass of %0d clocks (%0d ns)", (t1 - t0) / 20, t1 - t0);

    foreach (thr_list[i]) begin
      threshold = pixel_t'(thr_list[i]);
      n_thr++;
      check_frame();
    end

    check(int'(n_auto > 0), 1, "automatic pass seen");
    check(int'(n_pass > 0), 1, "requested pass seen");
    check(int'(n_border > 0), 1, "border pixels shown");
    check(int'(n_clamp > 0), 1, "clamped pixels shown");
    check(int'(n_white > 0), 1, "white pixels shown");
    check(int'(n_black > 0), 1, "black picture pixels shown");
    check(n_hs, 3 * VT, "hsync pulses");
    check(n_vs, 3, "frames");
    check(n_thr, 3, "threshold changes");
    $display("passes auto %0d requested %0d; border %0d clamped %0d white %0d black %0d; hsync %0d vsync %0d thresholds %0d",
             n_auto, n_pass, n_border, n_clamp, n_white, n_black, n_hs, n_vs, n_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int thr_list [3] = '{150, 100, 50};
endmodule
