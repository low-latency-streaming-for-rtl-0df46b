// write_addr_ctrl: Write Address Controller of the distortion corrector.
//
// Every incoming pixel (x, y) is written to the pixel store at output row
// y + alpha(x,y), which moves it down by the displacement measured on the
// sphere, with no frame buffer in between. alpha is rebuilt from the 1-bit
// correction map as a running sum along the line: at the left edge it equals
// the sum of all bits of the line's map group; moving towards the centre it
// drops by the bit of the column just left, and right of the centre it grows
// by the bit of the next column. The map bit needed for the next step is
// fetched one clock ahead on port A. The edge value is the popcount of the
// group, computed on port B by a counting engine while the previous group is
// streaming (HALF + 2 clocks, well inside the three lines of a group); two
// result slots, tagged with their group number, hold the current and the next
// group. After reset or after the map has been loaded the engine needs
// HALF + 2 clocks before the first pixel.
//
// Address: the frame is cut into NREG regions of H_ACTIVE/NREG columns;
// region r is a ring of DEPTH[r] lines. A per-region line counter runs mod
// DEPTH[r] across frames, so the slot of output row y + alpha is
// (line counter + alpha) mod DEPTH[r], and the word address is
// BASE[r] + slot * RW + column-in-region. Rows that fall below the frame
// (y + alpha >= V_ACTIVE) are not written. The write and line_done leave one
// clock after the pixel; line_done marks the end of each input line, after
// which all pixels of output row y have been written.
//
// The transformation (x, y) -> (x, y + alpha) and the compressed map follow
// the design description; the running-sum decoding, the popcount engine, the
// ring addressing and the dropping of rows are this design's choices.
module write_addr_ctrl
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
  parameter int unsigned BAW      = 19
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_sof,
  input  logic           in_eol,
  input  logic [23:0]    in_rgb,
  // correction map
  output logic [MAW-1:0] ma_addr,
  input  logic           ma_bit,
  output logic [MAW-1:0] mb_addr,
  input  logic           mb_bit,
  input  logic           map_load,
  // pixel store
  output logic           wr_en,
  output logic [BAW-1:0] wr_addr,
  output logic [23:0]    wr_rgb,
  output logic           line_done
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

  typedef logic [ALPHA_W-1:0] alpha_t;
  typedef logic [8:0]         grp_t;

  initial begin
    assert (H_ACTIVE % NREG == 0) else $error("regions must have equal width");
    assert (V_ACTIVE % MAP_GROUP == 0) else $error("line count must be a multiple of the map group");
    assert (GROUPS % 2 == 0) else $error("an even number of map groups is required");
  end

  // ---------------- position of the pixel on the stream ----------------
  logic [10:0] nx_q, ny_q, cur_x, cur_y;
  logic [1:0]  gk_q, cur_gk;          // line inside the map group
  grp_t        grp_q, cur_grp;
  logic [3:0]  r_q, cur_r;            // region
  logic [10:0] c_q, cur_c;            // column inside region
  alpha_t      alpha_q, cur_alpha;

  assign cur_x   = in_sof ? '0 : nx_q;
  assign cur_y   = in_sof ? '0 : ny_q;
  assign cur_gk  = in_sof ? '0 : gk_q;
  assign cur_grp = in_sof ? '0 : grp_q;
  assign cur_r   = (cur_x == '0) ? '0 : r_q;
  assign cur_c   = (cur_x == '0) ? '0 : c_q;

  // popcount results, two slots tagged by group
  logic [1:0] tag_v;
  grp_t       tag   [2];
  alpha_t     tot   [2];

  assign cur_alpha = (cur_x == '0) ? tot[cur_grp[0]] : alpha_q;

  // map step for the transition x -> x+1: -1 left of centre, +1 right of it
  function automatic logic [MAW-1:0] step_addr(input logic [10:0] x, input grp_t g);
    logic [10:0] i;
    if (x < 11'(HALF - 1)) i = 11'(HALF - 1) - x;
    else if (x >= 11'(HALF) && x < 11'(H_ACTIVE - 1)) i = x + 11'd1 - 11'(HALF);
    else i = '0;
    return MAW'(32'(g) * HALF + 32'(i));
  endfunction

  logic [10:0] nx_next, ny_next;
  logic [1:0]  gk_next;
  grp_t        grp_next;
  alpha_t      alpha_next;

  always_comb begin
    nx_next  = nx_q;
    ny_next  = ny_q;
    gk_next  = gk_q;
    grp_next = grp_q;
    if (in_valid) begin
      if (in_eol) begin
        nx_next = '0;
        if (cur_y == 11'(V_ACTIVE - 1)) begin
          ny_next  = '0;
          gk_next  = '0;
          grp_next = '0;
        end else begin
          ny_next = cur_y + 1'b1;
          if (cur_gk == 2'(MAP_GROUP - 1)) begin
            gk_next  = '0;
            grp_next = cur_grp + 1'b1;
          end else begin
            gk_next  = cur_gk + 1'b1;
            grp_next = cur_grp;
          end
        end
      end else begin
        nx_next  = cur_x + 1'b1;
        ny_next  = cur_y;
        gk_next  = cur_gk;
        grp_next = cur_grp;
      end
    end
    if (cur_x < 11'(HALF - 1))       alpha_next = cur_alpha - alpha_t'(ma_bit);
    else if (cur_x == 11'(HALF - 1)) alpha_next = cur_alpha;
    else                             alpha_next = cur_alpha + alpha_t'(ma_bit);
  end

  // port A always fetches the step bit of the next expected pixel
  assign ma_addr = step_addr(nx_next, grp_next);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nx_q    <= '0;
      ny_q    <= '0;
      gk_q    <= '0;
      grp_q   <= '0;
      r_q     <= '0;
      c_q     <= '0;
      alpha_q <= '0;
    end else begin
      nx_q  <= nx_next;
      ny_q  <= ny_next;
      gk_q  <= gk_next;
      grp_q <= grp_next;
      if (in_valid) begin
        alpha_q <= alpha_next;
        if (cur_c == 11'(RW - 1)) begin
          c_q <= '0;
          r_q <= cur_r + 1'b1;
        end else begin
          c_q <= cur_c + 1'b1;
          r_q <= cur_r;
        end
      end
    end
  end

  // ---------------- popcount engine on port B ----------------
  logic        eng_busy, eng_rd, eng_last;
  grp_t        eng_g;
  logic [10:0] eng_j;
  alpha_t      eng_acc;

  grp_t want_cur, want_nxt;
  assign want_cur = grp_q;
  assign want_nxt = (grp_q == grp_t'(GROUPS - 1)) ? '0 : grp_q + 1'b1;

  wire have_cur = tag_v[want_cur[0]] && tag[want_cur[0]] == want_cur;
  wire have_nxt = tag_v[want_nxt[0]] && tag[want_nxt[0]] == want_nxt;

  assign mb_addr = MAW'(32'(eng_g) * HALF + 32'(eng_j));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      eng_busy <= 1'b0;
      eng_rd   <= 1'b0;
      eng_last <= 1'b0;
      eng_g    <= '0;
      eng_j    <= '0;
      eng_acc  <= '0;
      tag_v    <= '0;
      tag[0]   <= '0;
      tag[1]   <= '0;
      tot[0]   <= '0;
      tot[1]   <= '0;
    end else if (map_load) begin
      eng_busy <= 1'b0;
      eng_rd   <= 1'b0;
      eng_last <= 1'b0;
      tag_v    <= '0;
    end else begin
      eng_rd   <= eng_busy;
      eng_last <= eng_busy && eng_j == 11'(HALF - 1);
      if (eng_rd) eng_acc <= eng_acc + alpha_t'(mb_bit);
      if (eng_last) begin
        tot[eng_g[0]]   <= eng_acc + alpha_t'(mb_bit);
        tag[eng_g[0]]   <= eng_g;
        tag_v[eng_g[0]] <= 1'b1;
      end
      if (eng_busy) begin
        if (eng_j == 11'(HALF - 1)) eng_busy <= 1'b0;
        else eng_j <= eng_j + 1'b1;
      end else if (!eng_rd && !eng_last && (!have_cur || !have_nxt)) begin
        eng_busy <= 1'b1;
        eng_g    <= have_cur ? want_nxt : want_cur;
        eng_j    <= '0;
        eng_acc  <= '0;
        tag_v[have_cur ? want_nxt[0] : want_cur[0]] <= 1'b0;
      end
    end
  end

  // ---------------- ring addressing ----------------
  logic [10:0] ymod [NREG];
  logic [10:0] depth_r, slot_sum, slot;
  logic [11:0] out_row;

  always_comb begin
    depth_r  = '0;
    for (int r = 0; r < int'(NREG); r++)
      if (cur_r == 4'(r)) depth_r = 11'(DEPTH[r]);
  end

  logic [BAW-1:0] base_r;
  always_comb begin
    base_r = '0;
    for (int r = 0; r < int'(NREG); r++)
      if (cur_r == 4'(r)) base_r = BAW'(BASE[r]);
  end

  logic [10:0] ymod_r;
  always_comb begin
    ymod_r = '0;
    for (int r = 0; r < int'(NREG); r++)
      if (cur_r == 4'(r)) ymod_r = ymod[r];
  end

  assign slot_sum = ymod_r + 11'(cur_alpha);
  assign slot     = (slot_sum >= depth_r) ? slot_sum - depth_r : slot_sum;
  assign out_row  = 12'(cur_y) + 12'(cur_alpha);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NREG); r++) ymod[r] <= '0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_rgb    <= '0;
      line_done <= 1'b0;
    end else begin
      wr_en     <= in_valid && out_row < 12'(V_ACTIVE);
      wr_addr   <= base_r + BAW'(32'(slot) * RW) + BAW'(cur_c);
      wr_rgb    <= in_rgb;
      line_done <= in_valid && in_eol;
      if (in_valid && in_eol)
        for (int r = 0; r < int'(NREG); r++)
          ymod[r] <= (ymod[r] == 11'(DEPTH[r] - 1)) ? '0 : ymod[r] + 1'b1;
    end
  end

  // the edge value of the line's group must be ready at its first pixel
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && cur_x == '0 |-> tag_v[cur_grp[0]] && tag[cur_grp[0]] == cur_grp)
    else $error("write_addr_ctrl: displacement of the line edge not ready");
  // a displacement must fit the ring of its region
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> 11'(cur_alpha) < depth_r)
    else $error("write_addr_ctrl: displacement exceeds the region ring depth");

endmodule
