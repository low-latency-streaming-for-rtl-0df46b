// spherical_stream_top: the two FPGAs of the spherical-display streaming
// system, side by side.
//
// Sender (FPGA1): the operator's gaze arrives from the PC over a UART and is
// decoded into a pixel position; the Full-HD camera stream is compressed
// around that position (full resolution at the gaze point, 1/4 .. 1/36 of the
// samples in rings further out) and sent on as full-resolution video.
// Receiver (FPGA2): the stream is corrected for the vertical stretch of the
// spherical screen without a frame buffer and handed to the projector.
//
// The HDMI ports and the DVI/RGB converters on both boards are vendor parts,
// so the top brings out their RGB sides: src_* is the camera video into the
// sender, cmp_* the sender's output towards the HDMI cable, lnk_* the video
// the receiver gets from the cable, and prj_* the corrected video for the
// projector. Joining cmp_* to lnk_* models the cable. Both boards run from
// one clock here. The correction map and blank map are loaded through their
// ports. cmp_level gives the compression stage of each pixel.
module spherical_stream_top
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = 1920,
  parameter int unsigned V_ACTIVE     = 1080,
  parameter int unsigned CLKS_PER_BIT = 1289,
  parameter int unsigned NREG         = NREG_DEF,
  parameter int unsigned DEPTH [NREG] = DEPTH_DEF,
  // derived sizes, not meant to be overridden
  parameter int unsigned HALF         = H_ACTIVE / 2,
  parameter int unsigned MAW          = $clog2(HALF * (V_ACTIVE / MAP_GROUP)),
  parameter int unsigned BMW          = $clog2(HALF * V_ACTIVE)
) (
  input  logic             clk,
  input  logic             rst_n,
  // sender: gaze input and compression thresholds
  input  logic             uart_rxd,
  input  logic [3:0][23:0] thr_sq,
  output logic [10:0]      gaze_x,
  output logic [10:0]      gaze_y,
  output logic             gaze_update,
  // sender: camera video in
  input  logic             src_valid,
  input  logic             src_sof,
  input  logic             src_eol,
  input  logic [23:0]      src_rgb,
  // sender: compressed video out
  output logic             cmp_valid,
  output logic             cmp_sof,
  output logic             cmp_eol,
  output logic [23:0]      cmp_rgb,
  output level_t           cmp_level,
  // receiver: video from the link
  input  logic             lnk_valid,
  input  logic             lnk_sof,
  input  logic             lnk_eol,
  input  logic [23:0]      lnk_rgb,
  // receiver: map loading
  input  logic             cmap_we,
  input  logic [MAW-1:0]   cmap_addr,
  input  logic             cmap_bit,
  input  logic             bmap_we,
  input  logic [BMW-1:0]   bmap_addr,
  input  logic             bmap_bit,
  // receiver: corrected video to the projector
  output logic             prj_valid,
  output logic             prj_sof,
  output logic             prj_eol,
  output logic [23:0]      prj_rgb
);

  // ================= sender =================
  logic       byte_valid;
  logic [7:0] byte_data;

  gaze_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd (uart_rxd), .byte_valid, .byte_data
  );

  gaze_receiver #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_gaze (
    .clk, .rst_n, .byte_valid, .byte_data, .gaze_x, .gaze_y, .gaze_update
  );

  foveated_compressor #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_cmp (
    .clk, .rst_n,
    .in_valid (src_valid), .in_sof (src_sof), .in_eol (src_eol), .in_rgb (src_rgb),
    .gaze_x, .gaze_y, .thr_sq,
    .out_valid (cmp_valid), .out_sof (cmp_sof), .out_eol (cmp_eol), .out_rgb (cmp_rgb),
    .out_level (cmp_level)
  );

  // ================= receiver =================
  distortion_corrector #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .NREG(NREG), .DEPTH(DEPTH)) u_dc (
    .clk, .rst_n,
    .in_valid (lnk_valid), .in_sof (lnk_sof), .in_eol (lnk_eol), .in_rgb (lnk_rgb),
    .cmap_we, .cmap_addr, .cmap_bit, .bmap_we, .bmap_addr, .bmap_bit,
    .out_valid (prj_valid), .out_sof (prj_sof), .out_eol (prj_eol), .out_rgb (prj_rgb)
  );

endmodule
