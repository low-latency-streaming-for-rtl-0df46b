// tb_foveated_compressor: self-checking test of the gaze-guided compressor at
// a reduced frame (240 x 60: 20 x 5 blocks of 12x12).
//
// Two frames with different gaze points are streamed with random line gaps;
// the gaze input is changed in the middle of the first frame to check that the
// position is only taken at the frame start. Every output pixel and its stage
// are compared with tb_ref_pkg's ref_compress. The first pixel of every band
// must leave five clocks after the last input pixel of that band. Each of
// the five stages must occur.
module tb_foveated_compressor;
  import tb_ref_pkg::*;
  import sdisp_pkg::*;

  localparam int H = 240, V = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid = 0, in_sof = 0, in_eol = 0;
  logic [23:0]      in_rgb = 0;
  logic [10:0]      gaze_x = 0, gaze_y = 0;
  logic [3:0][23:0] thr_sq;
  logic             out_valid, out_sof, out_eol;
  logic [23:0]      out_rgb;
  level_t           out_level;

  foveated_compressor #(.H_ACTIVE(H), .V_ACTIVE(V)) dut (.*);

  longint unsigned thr [4] = '{144, 576, 1600, 3600};
  int gxs [2] = '{120, 30};
  int gys [2] = '{30, 10};

  int checks = 0, failures = 0;
  int unsigned src [], exp_pix [];
  int exp_lvl [];
  int lvl_seen [5] = '{0, 0, 0, 0, 0};

  longint cyc = 0;
  longint t_band_end [V / 12];
  always @(posedge clk) cyc <= cyc + 1;

  int ox = 0, oy = 0, frame_out = 0, pix_out = 0, lat;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sof) begin ox = 0; oy = 0; end
      if (ox == 0 && oy % 12 == 0) begin
        lat = int'(cyc - t_band_end[oy / 12]);
        checks++;
        if (lat != 5) begin failures++; $display("FAIL band %0d latency %0d", oy / 12, lat); end
      end
      checks += 2;
      if (out_rgb !== 24'(exp_pix[oy * H + ox])) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %h exp %h", ox, oy, out_rgb, exp_pix[oy * H + ox]);
      end
      if (int'(out_level) != exp_lvl[oy * H + ox]) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) level %0d exp %0d", ox, oy, out_level, exp_lvl[oy * H + ox]);
      end
      lvl_seen[out_level]++;
      pix_out++;
      if (out_eol) begin
        ox = 0; oy++;
        if (oy == V) begin oy = 0; frame_out++; end
      end else ox++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) thr_sq[i] = 24'(thr[i]);
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      src = new[H * V];
      for (int i = 0; i < H * V; i++) src[i] = pix_of(i % H, i / H, f + 5);
      ref_compress(H, V, src, gxs[f], gys[f], thr, exp_pix, exp_lvl);
      gaze_x = 11'(gxs[f]); gaze_y = 11'(gys[f]);
      for (int y = 0; y < V; y++) begin
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_eol = (x == H - 1);
          in_rgb = 24'(src[y * H + x]);
          if (y == 20 && x == 7) begin gaze_x = 11'(200); gaze_y = 11'(50); end
        end
        if (y % 12 == 11) begin @(posedge clk); t_band_end[y / 12] = cyc; end
        @(negedge clk); in_valid = 0; in_sof = 0; in_eol = 0;
        if (y % 3 != 0) repeat ($urandom_range(0, 5)) @(negedge clk);
      end
      wait (frame_out == f + 1);
      repeat (5) @(negedge clk);
    end
    checks++;
    if (pix_out != 2 * H * V) begin failures++; $display("FAIL pixel count %0d", pix_out); end
    for (int l = 0; l < 5; l++) begin
      checks++;
      if (lvl_seen[l] == 0) begin failures++; $display("FAIL stage %0d never used", l); end
    end
    $display("pixels per stage: %0d %0d %0d %0d %0d", lvl_seen[0], lvl_seen[1], lvl_seen[2], lvl_seen[3], lvl_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
