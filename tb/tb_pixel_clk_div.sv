// tb_pixel_clk_div: checks that the mod-2 counter gives a pixel enable on every second
// clock, starting on the second clock after reset, and again after a second reset.
module tb_pixel_clk_div;
  logic clk = 1'b0, rst = 1'b1;
  logic pix_ce;
  int checks = 0, failures = 0;

  pixel_clk_div dut (.clk(clk), .rst(rst), .pix_ce(pix_ce));

  always #10 clk = ~clk;    // 50 MHz

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int pass = 0; pass < 2; pass++) begin
      rst = 1'b1;
      repeat (3) @(posedge clk);
      #1 check(pix_ce, 1'b0, "low in reset");
      rst = 1'b0;
      ones = 0;
      for (int k = 1; k <= 100; k++) begin
        @(posedge clk); #1;
        check(pix_ce, logic'(k % 2), $sformatf("clock %0d after reset", k));
        ones += int'(pix_ce);
      end
      checks++;
      if (ones != 50) begin failures++; $display("FAIL rate: %0d enables in 100 clocks", ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
