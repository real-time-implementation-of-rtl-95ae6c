// pixel_clk_div: mod-2 counter that makes the 25 MHz pixel rate from the 50 MHz board clock.
//
// A one-bit counter toggles on every clock; pix_ce is high on every second clock, so logic
// that advances only when pix_ce is high runs at half the system clock, i.e. 25 MHz from
// 50 MHz. The mod-2 counter and the 25/50 MHz figures follow the source design. Producing a
// clock enable rather than a divided clock net is this design's choice: everything stays in
// the one clock domain. Reset (synchronous, active high) clears the counter, so the first
// pix_ce comes on the second clock after reset is released.
module pixel_clk_div (
  input  logic clk,
  input  logic rst,
  output logic pix_ce
);

  logic phase;

  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end

  assign pix_ce = phase;

endmodule
