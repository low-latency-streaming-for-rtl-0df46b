// blank_map: one bit per output position of half a frame (960 x 1080,
// 1.0 Mbit) telling the read controller that no input pixel is mapped there.
//
// Blanks appear where the displacement grows from one line to the next, so
// a stretch of output rows receives no pixel. The map is computed off-line
// and loaded through the write port. Since the distortion is mirror-symmetric
// only half a frame is stored: the address is Y * HALF + i, with i the
// distance of the column from the frame centre (x - 960 on the right half,
// 959 - x on the left). A read returns the addressed bit one clock later.
// The size and the symmetry follow the design description; the address
// layout and the load port are this design's choices.
module blank_map #(
  parameter int unsigned HALF     = 960,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned AW       = $clog2(HALF * V_ACTIVE)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic          rbit,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wbit
);

  logic mem [HALF * V_ACTIVE];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wbit;
    rbit <= mem[raddr];
  end

endmodule
