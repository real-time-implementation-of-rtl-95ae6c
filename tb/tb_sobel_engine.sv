// tb_sobel_engine: runs full 90 x 90 Sobel passes through the engine against an array
// model of the input RAM (registered read on rd_en) and checks every write: raster order
// of the addresses, the value against the reference Sobel magnitude with zero outside the
// image, exactly 8100 reads and 8100 writes, one done pulse, and the pass length of
// 92*92+2 pixel-clock steps. The pixel enable is random in the first pass and on every
// second clock in the second; a start pulse in the middle of a pass must be ignored.
module tb_sobel_engine;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 90, H = 90, NPIX = W * H;
  localparam int PASS_STEPS = (H + 2) * (W + 2) + 2;

  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, start = 1'b0;
  logic busy, done, rd_en, wr_en;
  logic [12:0] rd_addr, wr_addr;
  pixel_t rd_data, wr_data;
  pixel_t img [NPIX];
  int checks = 0, failures = 0;
  int n_rd, n_wr, n_done, steps, clamped, border;
  bit ce_random;

  sobel_engine dut (.clk(clk), .rst(rst), .ce(ce), .start(start), .busy(busy), .done(done),
                    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
                    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rd_en) rd_data <= img[rd_addr];

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pix(input int r, input int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 0;
    return int'(img[r * W + c]);
  endfunction

  function automatic int expected(input int a, output bit clamp);
    int n[3][3];
    int r = a / W, c = a % W;
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++) n[dr][dc] = pix(r + dr - 1, c + dc - 1);
    clamp = (ref_sum(n) > 255);
    return ref_mag(n);
  endfunction

  // clock enable pattern
  logic phase = 1'b0;
  always @(negedge clk) begin
    phase <= ~phase;
    ce    <= ce_random ? 1'($urandom_range(0, 2) == 0) : phase;
  end

  // monitor
  always @(posedge clk) begin
    if (!rst) begin
      bit cl;
      int e;
      if (busy && ce) steps++;
      if (rd_en) begin
        checks++;
        if (int'(rd_addr) != n_rd) begin
          failures++;
          if (failures < 20) $display("FAIL read %0d at address %0d", n_rd, rd_addr);
        end
        n_rd++;
      end
      if (wr_en) begin
        e = expected(n_wr, cl);
        clamped += int'(cl);
        if (n_wr / W == 0 || n_wr / W == H - 1 || n_wr % W == 0 || n_wr % W == W - 1) border++;
        checks += 2;
        if (int'(wr_addr) != n_wr) begin
          failures++;
          if (failures < 20) $display("FAIL write %0d at address %0d", n_wr, wr_addr);
        end
        if (int'(wr_data) != e) begin
          failures++;
          if (failures < 20) $display("FAIL pixel %0d (r%0d c%0d): %0d expected %0d",
                                      n_wr, n_wr / W, n_wr % W, wr_data, e);
        end
        n_wr++;
      end
      if (done) n_done++;
    end
  end

  task automatic make_image(input int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        if (kind == 0) v = $urandom_range(0, 255);
        else if ((r / 15 + c / 20) % 2 == 1) v = 200 + $urandom_range(0, 20);
        else if (c > 60) v = 2 * r;
        else v = 40;
        img[r * W + c] = pixel_t'(v);
      end
  endtask

  task automatic one_pass(input int kind, input bit rnd);
    ce_random = rnd;
    make_image(kind);
    n_rd = 0; n_wr = 0; n_done = 0; steps = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // a start while busy must change nothing
    repeat (3000) @(negedge clk);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    checks += 4;
    if (n_rd != NPIX)   begin failures++; $display("FAIL %0d reads", n_rd); end
    if (n_wr != NPIX)   begin failures++; $display("FAIL %0d writes", n_wr); end
    if (n_done != 1)    begin failures++; $display("FAIL %0d done pulses", n_done); end
    if (steps != PASS_STEPS) begin
      failures++; $display("FAIL pass took %0d steps, expected %0d", steps, PASS_STEPS);
    end
  endtask

  initial begin
    ce_random = 1'b0;
    clamped = 0; border = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    one_pass(0, 1'b1);
    one_pass(1, 1'b0);
    checks += 2;
    if (clamped == 0) begin failures++; $display("FAIL clamp never hit"); end
    if (border == 0)  begin failures++; $display("FAIL border never hit"); end
    $display("clamped %0d border pixels %0d", clamped, border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
