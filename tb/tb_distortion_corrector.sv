// tb_distortion_corrector: self-checking test of the distortion corrector at
// a reduced frame (240 x 60, ten regions of 24 columns, rings of 8..24 lines).
//
// Two frames are streamed, each with its own random displacement map, loaded
// through the map ports before the frame (so the second load also exercises
// the restart of the popcount engine). Lines have random gaps of 0..4 clocks,
// some back-to-back. Every output pixel is compared with tb_ref_pkg's
// ref_correct. The test also checks that output row Y starts within one line
// time plus a few clocks of the end of input line Y (no frame buffering), and
// counts blank fills, dropped rows and ring wrap-arounds, failing if one of
// them never happened.
module tb_distortion_corrector;
  import tb_ref_pkg::*;

  localparam int H = 240, V = 60, NREG = 10, HALF = H / 2, G = V / 3;
  localparam int unsigned DEPTH_T [NREG] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  localparam int MAW = $clog2(HALF * G), BMW = $clog2(HALF * V);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           in_valid = 0, in_sof = 0, in_eol = 0;
  logic [23:0]    in_rgb = 0;
  logic           cmap_we = 0, cmap_bit = 0, bmap_we = 0, bmap_bit = 0;
  logic [MAW-1:0] cmap_addr = 0;
  logic [BMW-1:0] bmap_addr = 0;
  logic           out_valid, out_sof, out_eol;
  logic [23:0]    out_rgb;

  distortion_corrector #(.H_ACTIVE(H), .V_ACTIVE(V), .NREG(NREG), .DEPTH(DEPTH_T)) dut (.*);

  int checks = 0, failures = 0;
  int depth_i [] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};

  bit          cmap [], bmap [];
  int          alpha [];
  int unsigned src [], exp_pix [];

  // statistics of mechanisms
  int n_blank = 0, n_drop = 0, n_wrap = 0;

  // output monitor
  int ox = 0, oy = 0, frame_out = 0, pix_out = 0;
  longint t_line_end [V];
  longint cyc = 0;
  int max_lat = 0, lat;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sof) begin ox = 0; oy = 0; end
      if (ox == 0) begin
        lat = int'(cyc - t_line_end[oy]);
        if (lat > max_lat) max_lat = lat;
        checks++;
        if (lat > H + 8 || lat < 0) begin
          failures++;
          $display("FAIL latency row %0d: %0d clocks", oy, lat);
        end
      end
      checks++;
      if (out_rgb !== 24'(exp_pix[oy * H + ox])) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d (%0d,%0d): got %h exp %h", frame_out, ox, oy, out_rgb, exp_pix[oy * H + ox]);
      end
      checks++;
      if (out_eol !== (ox == H - 1)) failures++;
      pix_out++;
      if (out_eol) begin
        ox = 0;
        oy++;
        if (oy == V) begin oy = 0; frame_out++; end
      end else ox++;
    end
  end

  task automatic load_maps();
    for (int a = 0; a < HALF * G; a++) begin
      @(negedge clk); cmap_we = 1; cmap_addr = MAW'(a); cmap_bit = cmap[a];
    end
    @(negedge clk); cmap_we = 0;
    for (int a = 0; a < HALF * V; a++) begin
      @(negedge clk); bmap_we = 1; bmap_addr = BMW'(a); bmap_bit = bmap[a];
    end
    @(negedge clk); bmap_we = 0;
    repeat (HALF + 10) @(negedge clk);
  endtask

  task automatic send_frame(int f);
    for (int y = 0; y < V; y++) begin
      for (int x = 0; x < H; x++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (x == 0 && y == 0); in_eol = (x == H - 1);
        in_rgb = 24'(src[y * H + x]);
      end
      @(posedge clk); t_line_end[y] = cyc;
      @(negedge clk); in_valid = 0; in_sof = 0; in_eol = 0;
      if (y % 4 != 0) repeat ($urandom_range(0, 4)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      gen_alpha(H, V, NREG, depth_i, 17 + 31 * f, cmap, alpha);
      gen_blank(H, V, alpha, bmap);
      src = new[H * V];
      for (int i = 0; i < H * V; i++) src[i] = pix_of(i % H, i / H, f);
      ref_correct(H, V, src, alpha, bmap, exp_pix);
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++) begin
          if (y > 0 && bmap[y * HALF + fold(x, H)]) n_blank++;
          if (y + alpha[y * H + x] >= V) n_drop++;
        end
      // ring wrap: slot sum reaches the ring depth (line counter continues across frames)
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++)
          if (((f * V + y) % depth_i[x / (H / NREG)]) + alpha[y * H + x] >= depth_i[x / (H / NREG)]) n_wrap++;
      load_maps();
      send_frame(f);
      wait (frame_out == f + 1);
      repeat (20) @(negedge clk);
    end
    checks++;
    if (pix_out != 2 * H * V) begin failures++; $display("FAIL pixel count %0d", pix_out); end
    $display("blank fills %0d, dropped %0d, ring wraps %0d, worst row latency %0d clocks", n_blank, n_drop, n_wrap, max_lat);
    checks += 3;
    if (n_blank == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
