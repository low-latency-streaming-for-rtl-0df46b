// region_buffer: the on-chip pixel store of the distortion corrector.
//
// A simple dual-port memory of 24-bit pixels. The frame width is split into
// ten regions of equal width; region r occupies DEPTH[r] lines of that width,
// used as a ring of lines by the write and read address controllers. Because
// the displacement is small in the middle of the frame and large at its
// edges, middle regions get shallow rings and edge regions deep ones; the
// default of 1840 region-lines against ten 300-line rings saves 39 %. This
// module only stores: the region layout lives in the controllers' address
// arithmetic, so WORDS is 192 pixels x the sum of the ring depths.
//
// Timing: a write is performed at the clock edge where we is high; a read
// returns the word addressed in the previous clock (read-first block RAM).
// The ten-region adaptive allocation follows the design description; the
// exact depths are this design's choice.
module region_buffer #(
  parameter int unsigned WORDS = 353280,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [23:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [23:0]   rdata
);

  logic [23:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
