// tb_sobel_operator: drives the combinational window operator with hand-picked and random
// 3x3 windows and compares Gx, Gy and the clamped magnitude with the mask arithmetic of
// the reference package. Covers flat, single-edge, largest-gradient (+-1020) and random
// windows, and counts how often the clamp at 255 was exercised.
module tb_sobel_operator;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  window_t win;
  grad_t gx, gy;
  pixel_t mag;
  int checks = 0, failures = 0, clamped = 0, unclamped = 0;

  sobel_operator dut (.win(win), .gx(gx), .gy(gy), .mag(mag));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int n[3][3]);
    int egx, egy, emag;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[3*c + r] = pixel_t'(n[r][c]);
    #1;
    egx = ref_gx(n); egy = ref_gy(n); emag = ref_mag(n);
    if (ref_sum(n) > 255) clamped++; else unclamped++;
    checks += 3;
    if (int'(gx) != egx || int'(gy) != egy || int'(mag) != emag) begin
      failures++;
      if (failures < 20)
        $display("FAIL gx %0d/%0d gy %0d/%0d mag %0d/%0d", gx, egx, gy, egy, mag, emag);
    end
  endtask

  initial begin
    int n[3][3];
    // flat
    n = '{'{77, 77, 77}, '{77, 77, 77}, '{77, 77, 77}}; apply(n);
    // top row dark, bottom row bright: Gx = +1020
    n = '{'{0, 0, 0}, '{0, 0, 0}, '{255, 255, 255}}; apply(n);
    n = '{'{255, 255, 255}, '{0, 0, 0}, '{0, 0, 0}}; apply(n);
    // left bright, right dark: Gy = +1020
    n = '{'{255, 0, 0}, '{255, 0, 0}, '{255, 0, 0}}; apply(n);
    n = '{'{0, 0, 255}, '{0, 0, 255}, '{0, 0, 255}}; apply(n);
    // both at the extreme: sum 2040
    n = '{'{0, 0, 0}, '{255, 0, 0}, '{255, 255, 0}}; apply(n);
    n = '{'{255, 255, 0}, '{255, 0, 0}, '{0, 0, 0}}; apply(n);
    // a gentle slope under the clamp
    n = '{'{10, 11, 12}, '{12, 13, 14}, '{14, 15, 16}}; apply(n);
    // sum exactly 255 and 256
    n = '{'{0, 0, 0}, '{0, 0, 0}, '{63, 64, 64}}; apply(n);
    n = '{'{0, 0, 0}, '{0, 0, 0}, '{64, 64, 64}}; apply(n);
    for (int k = 0; k < 20000; k++) begin
      int span = (k % 3 == 0) ? 255 : ((k % 3 == 1) ? 40 : 8);
      int base = $urandom_range(0, 255 - span);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) n[r][c] = base + $urandom_range(0, span);
      apply(n);
    end
    checks += 2;
    if (clamped == 0)   begin failures++; $display("FAIL clamp never exercised"); end
    if (unclamped == 0) begin failures++; $display("FAIL unclamped case never exercised"); end
    $display("clamped %0d unclamped %0d", clamped, unclamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
