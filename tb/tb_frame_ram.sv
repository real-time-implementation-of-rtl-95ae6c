// tb_frame_ram: random writes and enabled/disabled reads on the 8 x 8100 frame buffer,
// compared with an array model: reads return the word one enabled clock later, hold while
// the read enable is low, and return the new word when the same address is written and
// read on one clock (write first). Every address is written and read back once too.
// A second, 16-word instance starts from a $readmemh file whose word k is (37*k + 11) mod
// 256, and is read back before anything is written to it.
module tb_frame_ram;
  localparam int DEPTH = 8100;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [12:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  logic [7:0] exp_q;
  int checks = 0, failures = 0, same_addr = 0;

  frame_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                 .re(re), .raddr(raddr), .rdata(rdata));

  logic [3:0] iraddr = '0;
  logic [7:0] irdata;
  frame_ram #(.DEPTH(16), .INIT_FILE("tb/frame_ram_init.hex")) dut_init (
    .clk(clk), .we(1'b0), .waddr(4'd0), .wdata(8'd0), .re(1'b1), .raddr(iraddr), .rdata(irdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initial contents of the second instance
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); iraddr = 4'(a);
      @(negedge clk);
      checks++;
      if (int'(irdata) != (37 * a + 11) % 256) begin
        failures++;
        $display("FAIL initial word %0d: %h", a, irdata);
      end
    end
    // fill every address
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 13'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // read every address back
    for (int a = 0; a < DEPTH; a++) begin
      re = 1'b1; raddr = 13'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 20) $display("FAIL read %0d: %h vs %h", a, rdata, model[a]);
      end
    end
    // random mix
    exp_q = rdata;
    for (int k = 0; k < 20000; k++) begin
      we = 1'($urandom_range(0, 1));
      re = 1'($urandom_range(0, 2) != 0);
      waddr = 13'($urandom_range(0, DEPTH - 1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 13'($urandom_range(0, DEPTH - 1));
      wdata = 8'($urandom);
      if (re) begin
        if (we && waddr == raddr) begin exp_q = wdata; same_addr++; end
        else exp_q = model[raddr];
      end
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 20) $display("FAIL step %0d: %h vs %h", k, rdata, exp_q);
      end
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL no write-first case hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
