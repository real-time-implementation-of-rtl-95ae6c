// vga_sync: VGA timing controller for the 640x480, 60 Hz mode.
//
// A mod-800 horizontal counter and a mod-525 vertical counter advance on the pixel clock
// enable (25 MHz). Both count from the first visible pixel, so hcount and vcount are the
// screen coordinates directly: the line is display (H_DISP), front porch (H_FP), sync pulse
// (H_PW) and back porch (H_BP); the frame is built the same way out of lines. Decoders on
// the counters give the active-low hsync and vsync pulses and hdisplay/vdisplay, which are
// high while hcount < 640 and vcount < 480. The vertical counter steps when the horizontal
// one wraps.
//
// The counter moduli, the porch and pulse lengths in pixels, the active-low pulses and the
// "count from the display region" scheme follow the source design. The source's timing
// table adds up to 521 lines while its controller uses a mod-525 counter; this design keeps
// the mod-525 counter and the 10-line front porch and 2-line pulse, which leaves a 33-line
// back porch. Outputs are combinational decodes of the counter registers; the pixel
// generator registers them before they leave the chip.
module vga_sync #(
  parameter int unsigned H_DISP = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_PW   = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_DISP = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_PW   = 2,
  parameter int unsigned V_BP   = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hdisplay,
  output logic       vdisplay,
  output logic       hsync,
  output logic       vsync
);

  localparam int unsigned H_TOTAL = H_DISP + H_FP + H_PW + H_BP;   // 800
  localparam int unsigned V_TOTAL = V_DISP + V_FP + V_PW + V_BP;   // 525

  logic h_last, v_last;

  assign h_last = (hcount == 10'(H_TOTAL - 1));
  assign v_last = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (ce) begin
      if (h_last) begin
        hcount <= '0;
        vcount <= v_last ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  assign hdisplay = (hcount < 10'(H_DISP));
  assign vdisplay = (vcount < 10'(V_DISP));
  assign hsync    = !((hcount >= 10'(H_DISP + H_FP)) && (hcount < 10'(H_DISP + H_FP + H_PW)));
  assign vsync    = !((vcount >= 10'(V_DISP + V_FP)) && (vcount < 10'(V_DISP + V_FP + V_PW)));

endmodule
