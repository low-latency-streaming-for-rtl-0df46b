// read_addr_ctrl: Read Address Controller of the distortion corrector, with
// blank-area filling.
//
// Because every displacement is zero or positive, output row Y only receives
// pixels from input lines 0..Y; once input line Y has been written (a
// line_done pulse) row Y is final and is read out. Completed lines are
// counted as credits and rows are read back-to-back in raster order at one
// pixel per clock, so the corrected picture trails the input by about one
// line instead of a frame. For each pixel the controller addresses the ring
// slot of the row in the pixel's region, the blank map bit of the position and
// the line buffer entry of the column. One clock later it outputs the stored
// pixel and copies it into the line buffer if the position is not blank;
// if it is blank it outputs the line buffer's pixel, i.e. the last real pixel
// above it in the same column, so gaps are filled downwards. A blank position
// in row 0 has nothing above it and is output black (and black is
// saved for the rows below).
//
// Ring slots: a per-region row counter runs mod DEPTH[r] across frames in step
// with the write controller's line counter. Output is registered: a pixel
// leaves three clocks after its address. sof marks pixel (0,0), eol the last
// pixel of a row. The read-out with blank map and line buffer follows the
// design description; the credit scheduling and the row-0 rule are this
// design's choices.
module read_addr_ctrl
  import sdisp_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned NREG     = NREG_DEF,
  parameter int unsigned DEPTH [NREG] = DEPTH_DEF,
  // derived sizes, not meant to be overridden
  parameter int unsigned HALF     = H_ACTIVE / 2,
  parameter int unsigned BMW      = $clog2(HALF * V_ACTIVE),
  parameter int unsigned BAW      = 19
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           line_done,
  // pixel store
  output logic [BAW-1:0] rd_addr,
  input  logic [23:0]    rd_rgb,
  // blank map
  output logic [BMW-1:0] bm_addr,
  input  logic           bm_bit,
  // line buffer
  output logic [10:0]    lb_raddr,
  input  logic [23:0]    lb_rdata,
  output logic           lb_we,
  output logic [10:0]    lb_waddr,
  output logic [23:0]    lb_wdata,
  // corrected video
  output logic           out_valid,
  output logic           out_sof,
  output logic           out_eol,
  output logic [23:0]    out_rgb
);

  localparam int unsigned RW = H_ACTIVE / NREG;
  typedef int unsigned reg_arr_t [NREG];

  function automatic reg_arr_t calc_base();
    reg_arr_t b;
    int unsigned s = 0;
    for (int r = 0; r < int'(NREG); r++) begin
      b[r] = s * RW;
      s += DEPTH[r];
    end
    return b;
  endfunction

  localparam reg_arr_t BASE = calc_base();

  logic [10:0] credits;
  logic        busy;
  logic [10:0] x_q, yr_q, c_q;
  logic [3:0]  r_q;
  logic [10:0] rmod [NREG];

  wire start    = !busy && credits != '0;
  wire last_pix = x_q == 11'(H_ACTIVE - 1);
  wire row_end  = busy && last_pix;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credits <= '0;
      busy    <= 1'b0;
      x_q     <= '0;
      yr_q    <= '0;
      c_q     <= '0;
      r_q     <= '0;
      for (int r = 0; r < int'(NREG); r++) rmod[r] <= '0;
    end else begin
      credits <= credits + 11'(line_done) - 11'(start);
      if (start) begin
        busy <= 1'b1;
        x_q  <= '0;
        c_q  <= '0;
        r_q  <= '0;
      end else if (busy) begin
        if (last_pix) begin
          busy <= 1'b0;
          yr_q <= (yr_q == 11'(V_ACTIVE - 1)) ? '0 : yr_q + 1'b1;
          for (int r = 0; r < int'(NREG); r++)
            rmod[r] <= (rmod[r] == 11'(DEPTH[r] - 1)) ? '0 : rmod[r] + 1'b1;
        end else begin
          x_q <= x_q + 1'b1;
          if (c_q == 11'(RW - 1)) begin
            c_q <= '0;
            r_q <= r_q + 1'b1;
          end else begin
            c_q <= c_q + 1'b1;
          end
        end
      end
    end
  end

  // ---------------- stage 0: addresses ----------------
  logic [BAW-1:0] base_r;
  logic [10:0]    rmod_r;
  always_comb begin
    base_r = '0;
    rmod_r = '0;
    for (int r = 0; r < int'(NREG); r++)
      if (r_q == 4'(r)) begin
        base_r = BAW'(BASE[r]);
        rmod_r = rmod[r];
      end
  end

  logic [10:0] fold_x;
  assign fold_x   = (x_q < 11'(HALF)) ? 11'(HALF - 1) - x_q : x_q - 11'(HALF);
  assign rd_addr  = base_r + BAW'(32'(rmod_r) * RW) + BAW'(c_q);
  assign bm_addr  = BMW'(32'(yr_q) * HALF + 32'(fold_x));
  assign lb_raddr = x_q;

  // ---------------- stage 1: data back, blank filling ----------------
  logic        s1_valid, s1_sof, s1_eol, s1_row0;
  logic [10:0] s1_x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_sof   <= 1'b0;
      s1_eol   <= 1'b0;
      s1_row0  <= 1'b0;
      s1_x     <= '0;
    end else begin
      s1_valid <= busy;
      s1_sof   <= busy && x_q == '0 && yr_q == '0;
      s1_eol   <= row_end;
      s1_row0  <= yr_q == '0;
      s1_x     <= x_q;
    end
  end

  // a real pixel is saved; in row 0 a blank saves black, so that blanks at
  // the top of a frame never repeat pixels of the previous frame
  assign lb_we    = s1_valid && (!bm_bit || s1_row0);
  assign lb_waddr = s1_x;
  assign lb_wdata = bm_bit ? '0 : rd_rgb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
      out_rgb   <= '0;
    end else begin
      out_valid <= s1_valid;
      out_sof   <= s1_sof;
      out_eol   <= s1_eol;
      if (!bm_bit)      out_rgb <= rd_rgb;
      else if (s1_row0) out_rgb <= '0;
      else              out_rgb <= lb_rdata;
    end
  end

endmodule
