// tb_sobel_window: streams random pixels through the 3x3 window with a short row
// (ROW_LEN = 7) and with the default row (92), with a random shift enable, and checks after
// every shift that p0..p8 hold the pixels of the last three rows of the stream in the
// column-by-column order (p0 top-left, p2 bottom-left, p8 the newest pixel).
module tb_sobel_window;
  import sobel_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    ce_s = 1'b0, ce_l = 1'b0;
  pixel_t  din = '0;
  window_t win_s, win_l;

  sobel_window #(.ROW_LEN(7)) dut_s (.clk(clk), .ce(ce_s), .din(din), .win(win_s));
  sobel_window                dut_l (.clk(clk), .ce(ce_l), .din(din), .win(win_l));

  task automatic run(input int row_len, input int pushes, input bit use_long);
    pixel_t hist [$];
    window_t w;
    int n;
    for (int k = 0; k < pushes; ) begin
      @(negedge clk);
      if ($urandom_range(0, 4) != 0) begin
        din = pixel_t'($urandom);
        hist.push_back(din);
        if (use_long) ce_l = 1'b1; else ce_s = 1'b1;
        k++;
      end
      @(negedge clk);
      ce_s = 1'b0; ce_l = 1'b0;
      w = use_long ? win_l : win_s;
      n = hist.size();
      if (n >= 2 * row_len + 3) begin
        for (int c = 0; c < 3; c++)
          for (int r = 0; r < 3; r++) begin
            checks++;
            if (w[3*c + r] !== hist[n - 1 - (2 - r) * row_len - (2 - c)]) begin
              failures++;
              if (failures < 20)
                $display("FAIL row_len %0d push %0d p%0d: %h vs %h", row_len, n, 3*c + r,
                         w[3*c + r], hist[n - 1 - (2 - r) * row_len - (2 - c)]);
            end
          end
      end
    end
  endtask

  initial begin
    run(7, 500, 1'b0);
    run(92, 2000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
