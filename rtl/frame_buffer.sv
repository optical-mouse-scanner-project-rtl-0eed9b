// frame_buffer: simple dual-port image memory.
//
// DEPTH words of DATA_W bits, one write port and one read port on the same
// clock. The read is registered: rdata holds mem[raddr] one clock after
// raddr is presented. A write and a read of the same address in the same
// clock return the old word. The scanner uses two: the 128x128 aggregate
// image (DEPTH = 16384) and the 16x16 inset of the current sample
// (DEPTH = 256), both with 6-bit grayscale words, written by the
// aggregator and read by the VGA raster. Sizes follow the scanner's memory
// budget; the port arrangement is this design's choice, and the memory is
// on-chip rather than in the board's external SRAM.
module frame_buffer #(
  parameter int unsigned DEPTH  = 16384,
  parameter int unsigned DATA_W = 6,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
