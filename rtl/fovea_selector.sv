// fovea_selector: chooses the compression stage of every 12x12 block from its
// squared distance to the gaze point.
//
// The parent strobes in_sample on one pixel of each block (the pixel at
// offset (6,6), near the block centre) with the block column and the band
// bank. The squared distance is compared with four ascending squared radii:
// the stage is the index of the first threshold the distance is below, or 4
// (1/36) when it is below none, so the gaze point keeps full resolution and
// resolution falls ring by ring outwards. The stage is stored per block in a
// two-bank table, one bank per 12-line band, and read combinationally by the
// up-sampler.
//
// Comparing the distance with thresholds follows the design description; the
// threshold values are run-time inputs because none are given, and the
// choice of the sampled pixel is this design's own.
module fovea_selector
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned BLK      = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_sample,
  input  logic [7:0]        in_blk,
  input  logic              in_bank,
  input  logic [23:0]       dist_sq,
  input  logic [3:0][23:0]  thr_sq,
  input  logic              rd_bank,
  input  logic [7:0]        rd_blk,
  output level_t            rd_level
);

  localparam int unsigned NB = H_ACTIVE / BLK;

  level_t lvl_tab [2][NB];
  level_t lvl;

  always_comb begin
    lvl = level_t'(4);
    for (int i = 3; i >= 0; i--)
      if (dist_sq < thr_sq[i]) lvl = level_t'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(NB); i++)
          lvl_tab[b][i] <= '0;
    end else if (in_sample) begin
      lvl_tab[in_bank][in_blk] <= lvl;
    end
  end

  assign rd_level = lvl_tab[rd_bank][rd_blk];

endmodule
