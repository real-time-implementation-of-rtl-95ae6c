// row_buffer: fixed-length pixel delay line between two rows of the 3x3 window.
//
// Every enabled clock (ce high) the buffer takes one pixel on din and gives back on dout
// the pixel it took DEPTH enabled clocks earlier. It is a circular buffer: a pointer walks
// over DEPTH words; at each step the word under the pointer is read out and overwritten
// with the new pixel. dout is the word under the pointer, so it is valid between steps and
// is sampled together with din by the next window register.
//
// The source design places one row buffer after each of the two upper window rows so that
// the window sees three consecutive image rows; the circular-buffer insides and the length
// (the row length minus the three window registers) are this design's choice. Neither the
// contents nor the pointer are reset: a delay line needs no starting point, and the first
// DEPTH outputs, which are whatever the buffer held, are never used by the engine that
// feeds it (they fall into the zero border rows it streams first).
module row_buffer #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 89,
  parameter int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              ce,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  ptr;

  always_ff @(posedge clk) begin
    if (ce) begin
      mem[ptr] <= din;
      ptr      <= (ptr == PTR_W'(DEPTH - 1)) ? '0 : ptr + PTR_W'(1);
    end
  end

  assign dout = mem[ptr];

endmodule
