// frame_ram: block-RAM frame buffer, one write port and one registered read port.
//
// Holds one image of DEPTH pixels of DATA_W bits in raster order. The design uses two of
// them: one holds the input grey image, the other the gradient image the Sobel engine
// writes and the VGA pixel generator reads. A write takes effect on the clock edge where
// we is high. A read loads rdata from raddr on the clock edge where re is high, so data
// appear one enabled edge after the address; rdata holds while re is low. When one edge
// both writes and reads the same address, rdata takes the data being written
// ("write first").
//
// The 8-bit by 8100-word size and the write-first mode follow the source design, which
// generated this memory with the vendor's block-memory tool and filled it from a file at
// configuration. Here the contents can likewise come from a $readmemh file named by
// INIT_FILE, or be written through the write port at run time; splitting
// the memory into a write and a read port (so that the Sobel engine and the display can
// use one memory at once) and the read enable are this design's choices.
module frame_ram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 8100,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  // Optional contents at configuration: one hexadecimal word per address.
  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      if (we && (waddr == raddr)) rdata <= wdata;
      else                        rdata <= mem[raddr];
    end
  end

endmodule
