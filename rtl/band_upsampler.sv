// band_upsampler: reads a finished 12-line band back out as full-resolution
// video, each pixel taken from the compression stage chosen for its block.
//
// band_done marks that the compressor has written one band. The up-sampler
// counts such bands as credits and, while it holds one, emits the band in
// raster order at one pixel per clock: for every pixel it addresses all five
// stage memories with (bank, row in band, column), reads the stage of the
// pixel's 12x12 block from the selector, and one clock later picks that
// stage's mean. Because a stage memory returns the mean of the KxK square
// covering the addressed pixel, the picture is up-sampled by replication.
// The bank toggles with every band, matching the writer.
//
// Timing: the first pixel of a band leaves four clocks after band_done, so
// the compressor delays the video by one band (12 lines) plus five clocks.
// The output carries sof on the first pixel of the frame, eol on the last
// pixel of every line, and the stage of every pixel (out_level) so that the
// number of samples a link would have to carry can be counted. Up-sampling
// back to Full-HD follows the design description; replication and the band
// scheduling are this design's choices.
module band_upsampler
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned BLK      = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 band_done,
  output logic                 rd_bank,
  output logic [3:0]           rd_row,
  output logic [10:0]          rd_col,
  output logic [7:0]           lvl_blk,
  input  level_t               lvl,
  input  logic [NLEVELS-1:0][23:0] lvl_rgb,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic                 out_eol,
  output logic [23:0]          out_rgb,
  output level_t               out_level
);

  localparam int unsigned NBANDS = V_ACTIVE / BLK;

  logic [1:0]  credits;
  logic        busy;
  logic        bank_q;
  logic [3:0]  row_q;
  logic [10:0] x_q;
  logic [3:0]  bx_k;     // column inside the block
  logic [7:0]  bx_q;     // block column
  logic [$clog2(NBANDS+1)-1:0] band_q;

  wire last_pix  = (x_q == 11'(H_ACTIVE - 1));
  wire last_row  = (row_q == 4'(BLK - 1));
  wire start     = !busy && (credits != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credits <= '0;
      busy    <= 1'b0;
      bank_q  <= 1'b0;
      row_q   <= '0;
      x_q     <= '0;
      bx_k    <= '0;
      bx_q    <= '0;
      band_q  <= '0;
    end else begin
      credits <= credits + 2'(band_done) - 2'(start);
      if (start) begin
        busy <= 1'b1;
        row_q <= '0;
        x_q   <= '0;
        bx_k  <= '0;
        bx_q  <= '0;
      end else if (busy) begin
        if (last_pix) begin
          x_q  <= '0;
          bx_k <= '0;
          bx_q <= '0;
          row_q <= row_q + 1'b1;
          if (last_row) begin
            busy   <= 1'b0;
            bank_q <= ~bank_q;
            band_q <= (band_q == ($clog2(NBANDS+1))'(NBANDS - 1)) ? '0 : band_q + 1'b1;
          end
        end else begin
          x_q <= x_q + 1'b1;
          if (bx_k == 4'(BLK - 1)) begin
            bx_k <= '0;
            bx_q <= bx_q + 1'b1;
          end else begin
            bx_k <= bx_k + 1'b1;
          end
        end
      end
    end
  end

  assign rd_bank = bank_q;
  assign rd_row  = row_q;
  assign rd_col  = x_q;
  assign lvl_blk = bx_q;

  // stage 1: addresses issued, stage memories answer next clock
  logic   s1_valid, s1_sof, s1_eol;
  level_t s1_lvl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_sof    <= 1'b0;
      s1_eol    <= 1'b0;
      s1_lvl    <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
      out_rgb   <= '0;
      out_level <= '0;
    end else begin
      s1_valid  <= busy;
      s1_sof    <= busy && band_q == '0 && row_q == '0 && x_q == '0;
      s1_eol    <= busy && last_pix;
      s1_lvl    <= lvl;
      out_valid <= s1_valid;
      out_sof   <= s1_sof;
      out_eol   <= s1_eol;
      out_rgb   <= lvl_rgb[(s1_lvl > level_t'(NLEVELS - 1)) ? NLEVELS - 1 : int'(s1_lvl)];
      out_level <= s1_lvl;
    end
  end

  // a band must never arrive while two are already waiting
  assert property (@(posedge clk) disable iff (!rst_n) band_done |-> credits != 2'd3)
    else $error("band_upsampler: band credits overflow");

endmodule
