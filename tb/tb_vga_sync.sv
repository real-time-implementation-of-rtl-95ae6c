// tb_vga_sync: runs the VGA controller at its 640x480 defaults for two full frames with the
// pixel enable on every second clock, and checks each pixel step against the mode's
// timing: 800 pixels per line with a 96-pixel sync pulse starting 16 pixels after the
// 640 visible ones, 525 lines per frame with a 2-line sync pulse starting 10 lines after
// the 480 visible ones. It also counts sync pulses and their lengths from the outputs.
module tb_vga_sync;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [9:0] hcount, vcount;
  logic hdisplay, vdisplay, hsync, vsync;
  int checks = 0, failures = 0;

  vga_sync dut (.clk(clk), .rst(rst), .ce(ce), .hcount(hcount), .vcount(vcount),
                .hdisplay(hdisplay), .vdisplay(vdisplay), .hsync(hsync), .vsync(vsync));

  always #10 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, hs_low_run, hs_pulses, vs_low_steps, vs_pulses;
    logic prev_vs;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    x = 0; y = 0; hs_low_run = 0; hs_pulses = 0; vs_low_steps = 0; vs_pulses = 0;
    prev_vs = 1'b1;
    for (int step = 0; step < 2 * 800 * 525; step++) begin
      // outputs for position (x, y)
      @(negedge clk);
      check(hcount, x, "hcount");
      check(vcount, y, "vcount");
      check(int'(hdisplay), int'(x < 640), "hdisplay");
      check(int'(vdisplay), int'(y < 480), "vdisplay");
      check(int'(hsync), int'(!(x >= 656 && x < 752)), $sformatf("hsync x=%0d", x));
      check(int'(vsync), int'(!(y >= 490 && y < 492)), $sformatf("vsync y=%0d", y));
      if (!hsync) hs_low_run++;
      else if (hs_low_run != 0) begin
        check(hs_low_run, 96, "hsync pulse length");
        hs_pulses++;
        hs_low_run = 0;
      end
      if (!vsync) vs_low_steps++;
      if (prev_vs && !vsync) vs_pulses++;
      prev_vs = vsync;
      // an idle clock in between: nothing may move
      ce <= 1'b0;
      @(posedge clk);
      @(negedge clk);
      check(hcount, x, "hold without ce");
      ce <= 1'b1;
      @(posedge clk);
      ce <= 1'b0;
      x++;
      if (x == 800) begin x = 0; y = (y == 524) ? 0 : y + 1; end
    end
    check(hs_pulses, 2 * 525, "hsync pulses in two frames");
    check(vs_pulses, 2, "vsync pulses in two frames");
    check(vs_low_steps, 2 * 2 * 800, "vsync low pixel times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
