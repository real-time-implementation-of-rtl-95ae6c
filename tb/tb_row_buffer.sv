// tb_row_buffer: pushes a random pixel stream through the row buffer at its default length
// (89) with a random shift enable, and checks that after every shift dout equals the pixel
// pushed 89 shifts earlier and that dout does not move without a shift.
module tb_row_buffer;
  localparam int DEPTH = 89;
  logic clk = 1'b0, ce = 1'b0;
  logic [7:0] din = '0, dout, held;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  row_buffer dut (.clk(clk), .ce(ce), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 10000; k++) begin
      @(negedge clk);
      held = dout;
      ce = 1'($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      if (ce) hist.push_back(din);
      @(negedge clk);
      if (ce) begin
        // dout now shows the pixel that the next shift pushes out: pushed DEPTH-1 shifts ago
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            if (failures < 20) $display("FAIL shift %0d: %h vs %h", hist.size(), dout, hist[hist.size() - DEPTH]);
          end
        end
      end else begin
        checks++;
        if (dout !== held) begin failures++; $display("FAIL dout moved without ce"); end
      end
      ce = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
