// correction_map: the compressed table of vertical displacements alpha(x,y)
// (360 line groups x 960 columns x 1 bit = 345.6 kbit).
//
// The full table would hold a 9-bit alpha for each of the 1920 x 1080
// pixels. Three reductions shrink it 54-fold: the distortion is mirror
// symmetric about the centre column, so only 960 columns are kept; three
// consecutive lines share one row; and each entry stores only the step of
// alpha from its neighbour nearer the centre, which is 0 or 1. With i the
// distance of a column from the centre (x - 960 right of it, 959 - x left of
// it), bit i of group g is alpha(i) - alpha(i-1) and bit 0 is alpha(0); alpha
// is recovered as the running sum of bits 0..i.
//
// Two ports, each returning the addressed bit one clock later: port A serves
// the running sum of the write controller; port B serves its popcount engine
// and, with b_we high, loads the table. Address = g * HALF + i. The
// reductions follow the design description; the bit order, the address
// layout and the load path are this design's choices.
module correction_map #(
  parameter int unsigned HALF   = 960,
  parameter int unsigned GROUPS = 360,
  parameter int unsigned AW     = $clog2(HALF * GROUPS)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic          a_bit,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic          b_wbit,
  output logic          b_bit
);

  logic mem [HALF * GROUPS];

  always_ff @(posedge clk) begin
    a_bit <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wbit;
    b_bit <= mem[b_addr];
  end

endmodule
