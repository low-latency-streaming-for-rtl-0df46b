// distortion_corrector: frame-buffer-free vertical distortion correction for
// the spherical display (the "Distortion Correction" block of the receiving
// FPGA).
//
// Projected through a wide-angle lens onto a sphere, the picture is stretched
// upwards, more so towards the left and right edges. The corrector moves
// every input pixel (x, y) down to (x, y + alpha(x,y)) on the fly. The write
// address controller decodes alpha from the 1-bit correction map and writes
// the pixel into the region buffer, a set of ten line rings whose depth
// follows the largest displacement of their column region. The read address
// controller reads an output row as soon as the input line of the same number
// has been written, fills the positions no input pixel reached (flagged in
// the blank map) with the pixel above from the line buffer, and streams the
// corrected picture out in raster order, about one line behind the input
// rather than a frame.
//
// Interface: push-stream video in and out (valid, sof, eol, 24-bit RGB), and
// load ports for the correction map (address g*HALF + i) and the blank map
// (address Y*HALF + i), where i is the distance of a column from the frame
// centre. Both maps are computed off-line. Input lines must be at least
// H_ACTIVE clocks apart on average, and HALF + 2 idle clocks must follow a
// reset or a map load before the first pixel. The structure follows the
// design description; stream format, ring depths and load ports are this
// design's choices.
module distortion_corrector
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned NREG     = NREG_DEF,
  parameter int unsigned DEPTH [NREG] = DEPTH_DEF,
  // derived sizes, not meant to be overridden
  parameter int unsigned HALF     = H_ACTIVE / 2,
  parameter int unsigned GROUPS   = V_ACTIVE / MAP_GROUP,
  parameter int unsigned MAW      = $clog2(HALF * GROUPS),
  parameter int unsigned BMW      = $clog2(HALF * V_ACTIVE)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_sof,
  input  logic           in_eol,
  input  logic [23:0]    in_rgb,
  input  logic           cmap_we,
  input  logic [MAW-1:0] cmap_addr,
  input  logic           cmap_bit,
  input  logic           bmap_we,
  input  logic [BMW-1:0] bmap_addr,
  input  logic           bmap_bit,
  output logic           out_valid,
  output logic           out_sof,
  output logic           out_eol,
  output logic [23:0]    out_rgb
);

  localparam int unsigned BAW = 19;

  function automatic int unsigned sum_depth();
    int unsigned s = 0;
    for (int r = 0; r < int'(NREG); r++) s += DEPTH[r];
    return s;
  endfunction

  localparam int unsigned WORDS = (H_ACTIVE / NREG) * sum_depth();

  initial assert (WORDS <= (1 << BAW)) else $error("region buffer larger than its address space");

  // correction map
  logic [MAW-1:0] ma_addr, mb_addr, cm_b_addr;
  logic           ma_bit, mb_bit;

  assign cm_b_addr = cmap_we ? cmap_addr : mb_addr;

  correction_map #(.HALF(HALF), .GROUPS(GROUPS)) u_cmap (
    .clk,
    .a_addr (ma_addr), .a_bit (ma_bit),
    .b_we   (cmap_we), .b_addr (cm_b_addr), .b_wbit (cmap_bit), .b_bit (mb_bit)
  );

  // write side
  logic           wr_en, line_done;
  logic [BAW-1:0] wr_addr;
  logic [23:0]    wr_rgb;

  write_addr_ctrl #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .NREG(NREG), .DEPTH(DEPTH), .BAW(BAW)) u_wr (
    .clk, .rst_n,
    .in_valid, .in_sof, .in_eol, .in_rgb,
    .ma_addr, .ma_bit, .mb_addr, .mb_bit, .map_load (cmap_we),
    .wr_en, .wr_addr, .wr_rgb, .line_done
  );

  // adaptive pixel store
  logic [BAW-1:0] rd_addr;
  logic [23:0]    rd_rgb;

  region_buffer #(.WORDS(WORDS), .AW(BAW)) u_buf (
    .clk, .we (wr_en), .waddr (wr_addr), .wdata (wr_rgb), .raddr (rd_addr), .rdata (rd_rgb)
  );

  // blank map and line buffer
  logic [BMW-1:0] bm_addr;
  logic           bm_bit;

  blank_map #(.HALF(HALF), .V_ACTIVE(V_ACTIVE)) u_bmap (
    .clk, .raddr (bm_addr), .rbit (bm_bit), .we (bmap_we), .waddr (bmap_addr), .wbit (bmap_bit)
  );

  logic [10:0] lb_raddr, lb_waddr;
  logic [23:0] lb_rdata, lb_wdata;
  logic        lb_we;

  line_buffer #(.H_ACTIVE(H_ACTIVE)) u_lb (
    .clk, .raddr (lb_raddr), .rdata (lb_rdata), .we (lb_we), .waddr (lb_waddr), .wdata (lb_wdata)
  );

  // read side
  read_addr_ctrl #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .NREG(NREG), .DEPTH(DEPTH), .BAW(BAW)) u_rd (
    .clk, .rst_n, .line_done,
    .rd_addr, .rd_rgb, .bm_addr, .bm_bit,
    .lb_raddr, .lb_rdata, .lb_we, .lb_waddr, .lb_wdata,
    .out_valid, .out_sof, .out_eol, .out_rgb
  );

endmodule
