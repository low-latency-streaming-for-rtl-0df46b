// foveated_compressor: gaze-guided perceptual compression of the Full-HD
// stream (the "Compression" block of the transmitting FPGA).
//
// Five down-sampling stages (1/1, 1/4, 1/9, 1/16, 1/36 of the samples) run in
// parallel on every pixel, next to the distance unit that tracks the squared
// distance to the gaze point with an additive recurrence. At the centre pixel
// of each 12x12 block the distance is compared with four thresholds and the
// stage of the block is recorded. When a 12-line band is complete the
// up-sampler reads it out, taking each block from its stage, so the output is
// again a full-resolution stream whose detail falls off with distance from
// the gaze point. Only the stage choice per block and the means of the chosen
// stage would have to be transmitted; out_level reports the stage of every
// output pixel so that this amount can be counted.
//
// Interface: push-stream video in and out (valid, sof, eol, 24-bit RGB), the
// gaze position (sampled at the first pixel of each frame) and four squared
// radii thr_sq[0] < .. < thr_sq[3]. Timing: the output trails the input by
// one band, i.e. it begins five clocks after the last pixel of a band and is
// emitted at one pixel per clock; input lines must be at least H_ACTIVE
// clocks apart on average. Structure and recurrence follow the design
// description; band buffering, averaging and replication are this design's
// choices.
module foveated_compressor
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned V_ACTIVE = 1080
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic             in_eol,
  input  logic [23:0]      in_rgb,
  input  logic [10:0]      gaze_x,
  input  logic [10:0]      gaze_y,
  input  logic [3:0][23:0] thr_sq,
  output logic             out_valid,
  output logic             out_sof,
  output logic             out_eol,
  output logic [23:0]      out_rgb,
  output level_t           out_level
);

  // ---------------- input position counters ----------------
  logic [10:0] x_q;
  logic [3:0]  row_q, kx_q;
  logic [7:0]  bx_q;
  logic        bank_q;

  logic [10:0] cur_x;
  logic [3:0]  cur_row, cur_kx;
  logic [7:0]  cur_bx;

  assign cur_x   = in_sof ? '0 : x_q;
  assign cur_row = in_sof ? '0 : row_q;
  assign cur_kx  = in_sof ? '0 : kx_q;
  assign cur_bx  = in_sof ? '0 : bx_q;

  wire band_last = in_valid && in_eol && cur_row == 4'(CBLK - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q    <= '0;
      row_q  <= '0;
      kx_q   <= '0;
      bx_q   <= '0;
      bank_q <= 1'b0;
    end else if (in_valid) begin
      if (in_eol) begin
        x_q   <= '0;
        kx_q  <= '0;
        bx_q  <= '0;
        row_q <= (cur_row == 4'(CBLK - 1)) ? '0 : cur_row + 1'b1;
        if (cur_row == 4'(CBLK - 1)) bank_q <= ~bank_q;
      end else begin
        x_q   <= cur_x + 1'b1;
        row_q <= cur_row;
        if (cur_kx == 4'(CBLK - 1)) begin
          kx_q <= '0;
          bx_q <= cur_bx + 1'b1;
        end else begin
          kx_q <= cur_kx + 1'b1;
          bx_q <= cur_bx;
        end
      end
    end
  end

  // band_done is registered so that it follows the last band-memory write
  logic band_done;
  always_ff @(posedge clk) begin
    if (!rst_n) band_done <= 1'b0;
    else        band_done <= band_last;
  end

  // ---------------- distance and stage selection ----------------
  logic [23:0] dist_sq;

  gaze_distance u_dist (
    .clk, .rst_n, .in_valid, .in_sof, .in_eol, .gaze_x, .gaze_y, .dist_sq
  );

  logic       up_bank;
  logic [3:0] up_row;
  logic [10:0] up_col;
  logic [7:0] up_blk;
  level_t     up_lvl;

  fovea_selector #(.H_ACTIVE(H_ACTIVE), .BLK(CBLK)) u_sel (
    .clk, .rst_n,
    .in_sample (in_valid && cur_row == 4'(CBLK / 2) && cur_kx == 4'(CBLK / 2)),
    .in_blk    (cur_bx),
    .in_bank   (bank_q),
    .dist_sq,
    .thr_sq,
    .rd_bank   (up_bank),
    .rd_blk    (up_blk),
    .rd_level  (up_lvl)
  );

  // ---------------- the five down-sampling stages ----------------
  logic [NLEVELS-1:0][23:0] lvl_rgb;

  for (genvar l = 0; l < int'(NLEVELS); l++) begin : g_stage
    block_downsampler #(.K(level_k(l)), .H_ACTIVE(H_ACTIVE), .BLK(CBLK)) u_ds (
      .clk, .rst_n,
      .in_valid, .in_x(cur_x), .in_row(cur_row), .in_bank(bank_q), .in_rgb,
      .rd_bank(up_bank), .rd_row(up_row), .rd_col(up_col), .rd_rgb(lvl_rgb[l])
    );
  end

  // ---------------- up-sampling read-out ----------------
  band_upsampler #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BLK(CBLK)) u_up (
    .clk, .rst_n,
    .band_done,
    .rd_bank  (up_bank),
    .rd_row   (up_row),
    .rd_col   (up_col),
    .lvl_blk  (up_blk),
    .lvl      (up_lvl),
    .lvl_rgb,
    .out_valid, .out_sof, .out_eol, .out_rgb, .out_level
  );

endmodule
