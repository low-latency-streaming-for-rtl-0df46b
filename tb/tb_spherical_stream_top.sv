// tb_spherical_stream_top: end-to-end test of both boards at a reduced frame
// (240 x 60, rings of 8..24 lines, UART at 16 clocks per bit).
//
// The correction and blank maps are loaded, a gaze message is sent over the
// UART, and a camera frame is streamed into the sender; the sender's output
// is looped into the receiver (the HDMI cable). During the first frame a
// second gaze message arrives; it must only take effect with the second
// frame. Checked against tb_ref_pkg: the sender output and its stages
// (ref_compress with the frame's gaze) and the projector output
// (ref_correct of the compressed frame). Mechanisms counted, each of which
// must occur: gaze updates, each of the five stages, blank fills, rows
// dropped below the frame, ring wrap-arounds, and corrected rows that had to
// wait because the link delivered lines back-to-back.
module tb_spherical_stream_top;
  import tb_ref_pkg::*;
  import sdisp_pkg::*;

  localparam int H = 240, V = 60, NREG = 10, HALF = H / 2, G = V / 3, CPB = 16;
  localparam int unsigned DEPTH_T [NREG] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  localparam int MAW = $clog2(HALF * G), BMW = $clog2(HALF * V);
  localparam int NFRAMES = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             uart_rxd = 1;
  logic [3:0][23:0] thr_sq;
  logic [10:0]      gaze_x, gaze_y;
  logic             gaze_update;
  logic             src_valid = 0, src_sof = 0, src_eol = 0;
  logic [23:0]      src_rgb = 0;
  logic             cmp_valid, cmp_sof, cmp_eol;
  logic [23:0]      cmp_rgb;
  level_t           cmp_level;
  logic             lnk_valid, lnk_sof, lnk_eol;
  logic [23:0]      lnk_rgb;
  logic             cmap_we = 0, cmap_bit = 0, bmap_we = 0, bmap_bit = 0;
  logic [MAW-1:0]   cmap_addr = 0;
  logic [BMW-1:0]   bmap_addr = 0;
  logic             prj_valid, prj_sof, prj_eol;
  logic [23:0]      prj_rgb;

  // the HDMI cable between the boards
  assign lnk_valid = cmp_valid;
  assign lnk_sof   = cmp_sof;
  assign lnk_eol   = cmp_eol;
  assign lnk_rgb   = cmp_rgb;

  spherical_stream_top #(.H_ACTIVE(H), .V_ACTIVE(V), .CLKS_PER_BIT(CPB), .NREG(NREG), .DEPTH(DEPTH_T)) dut (.*);

  longint unsigned thr [4] = '{144, 576, 1600, 3600};
  int gxs [NFRAMES] = '{120, 30};
  int gys [NFRAMES] = '{30, 10};
  int depth_i [] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};

  int checks = 0, failures = 0;
  bit cmap [], bmap [];
  int alpha [];
  int unsigned src [], cmp_exp [NFRAMES][], prj_exp [NFRAMES][];
  int lvl_exp [NFRAMES][];

  // mechanism counters
  int n_gaze = 0, n_blank = 0, n_drop = 0, n_wrap = 0, n_wait = 0;
  int lvl_seen [5] = '{0, 0, 0, 0, 0};
  always @(posedge clk) if (rst_n && gaze_update) n_gaze++;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // sender output monitor
  int cx = 0, cy = 0, cf = 0, n_cmp = 0;
  longint lnk_line_end [V];
  always @(posedge clk) if (rst_n && cmp_valid) begin
    if (cmp_sof) begin cx = 0; cy = 0; end
    checks += 2;
    if (cmp_rgb !== 24'(cmp_exp[cf][cy * H + cx])) begin failures++; if (failures < 10) $display("FAIL sender f%0d (%0d,%0d) %h exp %h", cf, cx, cy, cmp_rgb, cmp_exp[cf][cy * H + cx]); end
    if (int'(cmp_level) != lvl_exp[cf][cy * H + cx]) begin failures++; if (failures < 10) $display("FAIL stage f%0d (%0d,%0d)", cf, cx, cy); end
    lvl_seen[cmp_level]++;
    n_cmp++;
    if (cmp_eol) begin
      lnk_line_end[cy] = cyc;
      cx = 0; cy++;
      if (cy == V) begin cy = 0; cf++; end
    end else cx++;
  end

  // projector output monitor
  int px = 0, py = 0, pf = 0, n_prj = 0;
  always @(posedge clk) if (rst_n && prj_valid) begin
    if (prj_sof) begin px = 0; py = 0; end
    if (px == 0) begin
      checks++;
      if (cyc - lnk_line_end[py] > H + 8) begin failures++; $display("FAIL row %0d latency %0d", py, cyc - lnk_line_end[py]); end
      if (cyc - lnk_line_end[py] > 6) n_wait++;
    end
    checks++;
    if (prj_rgb !== 24'(prj_exp[pf][py * H + px])) begin failures++; if (failures < 20) $display("FAIL projector f%0d (%0d,%0d) %h exp %h", pf, px, py, prj_rgb, prj_exp[pf][py * H + px]); end
    n_prj++;
    if (prj_eol) begin
      px = 0; py++;
      if (py == V) begin py = 0; pf++; end
    end else px++;
  end

  task automatic uart_byte(logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  task automatic uart_gaze(int gx, int gy);
    uart_byte(8'hA5); uart_byte(8'(gx >> 8)); uart_byte(8'(gx)); uart_byte(8'(gy >> 8)); uart_byte(8'(gy));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tmp [];
    int l_tmp [];
    for (int i = 0; i < 4; i++) thr_sq[i] = 24'(thr[i]);
    gen_alpha(H, V, NREG, depth_i, 99, cmap, alpha);
    gen_blank(H, V, alpha, bmap);
    for (int f = 0; f < NFRAMES; f++) begin
      src = new[H * V];
      for (int i = 0; i < H * V; i++) src[i] = pix_of(i % H, i / H, f + 20);
      ref_compress(H, V, src, gxs[f], gys[f], thr, tmp, l_tmp);
      cmp_exp[f] = tmp;
      lvl_exp[f] = l_tmp;
      ref_correct(H, V, cmp_exp[f], alpha, bmap, tmp);
      prj_exp[f] = tmp;
    end
    for (int f = 0; f < NFRAMES; f++)
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++) begin
          if (y > 0 && bmap[y * HALF + fold(x, H)]) n_blank++;
          if (y + alpha[y * H + x] >= V) n_drop++;
          if ((f * V + y) % depth_i[x / (H / NREG)] + alpha[y * H + x] >= depth_i[x / (H / NREG)]) n_wrap++;
        end

    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < HALF * G; a++) begin @(negedge clk); cmap_we = 1; cmap_addr = MAW'(a); cmap_bit = cmap[a]; end
    @(negedge clk); cmap_we = 0;
    for (int a = 0; a < HALF * V; a++) begin @(negedge clk); bmap_we = 1; bmap_addr = BMW'(a); bmap_bit = bmap[a]; end
    @(negedge clk); bmap_we = 0;
    uart_gaze(gxs[0], gys[0]);
    repeat (HALF + 10) @(negedge clk);
    checks++;
    if (gaze_x != 11'(gxs[0]) || gaze_y != 11'(gys[0])) begin failures++; $display("FAIL gaze not received"); end

    for (int f = 0; f < NFRAMES; f++) begin
      src = new[H * V];
      for (int i = 0; i < H * V; i++) src[i] = pix_of(i % H, i / H, f + 20);
      fork
        if (f + 1 < NFRAMES) uart_gaze(gxs[f + 1], gys[f + 1]);
      join_none
      for (int y = 0; y < V; y++) begin
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          src_valid = 1; src_sof = (x == 0 && y == 0); src_eol = (x == H - 1);
          src_rgb = 24'(src[y * H + x]);
        end
        @(negedge clk); src_valid = 0; src_sof = 0; src_eol = 0;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
      wait fork;
      for (int w = 0; w < 100 * H && pf < f + 1; w++) @(negedge clk);
      repeat (100) @(negedge clk);
    end

    checks += 2;
    if (n_cmp != NFRAMES * H * V) begin failures++; $display("FAIL %0d sender pixels", n_cmp); end
    if (n_prj != NFRAMES * H * V) begin failures++; $display("FAIL %0d projector pixels", n_prj); end
    $display("gaze updates %0d, stages %0d/%0d/%0d/%0d/%0d, blank fills %0d, dropped %0d, ring wraps %0d, queued rows %0d",
             n_gaze, lvl_seen[0], lvl_seen[1], lvl_seen[2], lvl_seen[3], lvl_seen[4], n_blank, n_drop, n_wrap, n_wait);
    checks += 10;
    if (n_gaze != NFRAMES) failures++;
    for (int l = 0; l < 5; l++) if (lvl_seen[l] == 0) failures++;
    if (n_blank == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
