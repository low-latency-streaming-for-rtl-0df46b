// tb_write_addr_ctrl: the write address controller on the 240 x 60 test
// geometry, with the correction map modelled here as a two-port memory with
// one clock of read latency. Two frames with different random maps are
// streamed (map_load is pulsed before each, restarting the popcount engine),
// lines with random gaps. For every pixel the controller's write enable,
// address and data, one clock later, are compared with the ring address
// computed here from the full displacement table: region r = x / 24,
// slot = (line count + alpha) mod DEPTH[r], address = base(r) +
// slot * 24 + x mod 24, no write when y + alpha >= 60. line_done must follow
// every end of line.
module tb_write_addr_ctrl;
  import tb_ref_pkg::*;
  localparam int H = 240, V = 60, NREG = 10, HALF = H / 2, G = V / 3, RW = H / NREG;
  localparam int unsigned DEPTH_T [NREG] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  localparam int MAW = $clog2(HALF * G);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           in_valid = 0, in_sof = 0, in_eol = 0, map_load = 0;
  logic [23:0]    in_rgb = 0;
  logic [MAW-1:0] ma_addr, mb_addr;
  logic           ma_bit, mb_bit;
  logic           wr_en, line_done;
  logic [18:0]    wr_addr;
  logic [23:0]    wr_rgb;

  write_addr_ctrl #(.H_ACTIVE(H), .V_ACTIVE(V), .NREG(NREG), .DEPTH(DEPTH_T)) dut (.*);

  bit cmap [];
  int alpha [];
  int depth_i [] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  always @(posedge clk) begin
    ma_bit <= cmap[ma_addr];
    mb_bit <= cmap[mb_addr];
  end

  int checks = 0, failures = 0, n_drop = 0, n_wr = 0;

  // expectation for the pixel presented in the previous clock
  bit          exp_pending = 0, exp_we = 0, exp_ld = 0;
  int          exp_addr = 0;
  logic [23:0] exp_rgb = 0;

  task automatic check_prev();
    checks += 2;
    if (exp_pending) begin
      if (wr_en !== exp_we || line_done !== exp_ld) begin failures++; $display("FAIL we/line_done %b%b exp %b%b", wr_en, line_done, exp_we, exp_ld); end
      if (exp_we) begin
        checks++;
        if (int'(wr_addr) != exp_addr || wr_rgb !== exp_rgb) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d exp %0d", wr_addr, exp_addr);
        end
      end
    end else if (wr_en !== 0 || line_done !== 0) begin
      failures++; $display("FAIL write without pixel");
    end
    exp_pending = 0;
  endtask

  function automatic int base_of(int r);
    int s = 0;
    for (int q = 0; q < r; q++) s += depth_i[q];
    return s * RW;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, r, yy;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      gen_alpha(H, V, NREG, depth_i, 5 + 11 * f, cmap, alpha);
      @(negedge clk); map_load = 1;
      @(negedge clk); map_load = 0;
      repeat (HALF + 4) begin @(negedge clk); check_prev(); end
      for (int y = 0; y < V; y++) begin
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          check_prev();
          in_valid = 1; in_sof = (x == 0 && y == 0); in_eol = (x == H - 1);
          in_rgb = 24'($urandom);
          a = alpha[y * H + x];
          r = x / RW;
          exp_pending = 1;
          exp_we = (y + a < V);
          exp_ld = (x == H - 1);
          exp_addr = base_of(r) + ((f * V + y) % depth_i[r] + a) % depth_i[r] * RW + x % RW;
          exp_rgb = in_rgb;
          if (exp_we) n_wr++; else n_drop++;
          if ($urandom_range(0, 9) == 0) begin @(negedge clk); check_prev(); in_valid = 0; end
        end
        @(negedge clk); check_prev(); in_valid = 0; in_sof = 0; in_eol = 0;
        repeat ($urandom_range(0, 3)) begin @(negedge clk); check_prev(); end
      end
    end
    checks++;
    if (n_drop == 0 || n_wr == 0) failures++;
    $display("writes %0d dropped %0d", n_wr, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
