// tb_read_addr_ctrl: the read address controller on the 240 x 60 test
// geometry. The pixel store (fixed contents), the blank map (random bits,
// about one in three set) and the line buffer are modelled here as one-clock
// memories. Two frames of line_done pulses are given, partly back-to-back so
// that rows queue up. Every output pixel is compared with: the stored word at
// base(r) + ((frame * 60 + Y) mod DEPTH[r]) * 24 + x mod 24 when the position
// is not blank; otherwise the last non-blank pixel of the column (black in row
// 0). sof, eol and the four-clock start after the first line_done are checked.
module tb_read_addr_ctrl;
  import tb_ref_pkg::*;
  localparam int H = 240, V = 60, NREG = 10, HALF = H / 2, RW = H / NREG;
  localparam int unsigned DEPTH_T [NREG] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  localparam int BMW = $clog2(HALF * V);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic           line_done = 0;
  logic [18:0]    rd_addr;
  logic [23:0]    rd_rgb;
  logic [BMW-1:0] bm_addr;
  logic           bm_bit;
  logic [10:0]    lb_raddr, lb_waddr;
  logic [23:0]    lb_rdata, lb_wdata;
  logic           lb_we;
  logic           out_valid, out_sof, out_eol;
  logic [23:0]    out_rgb;

  read_addr_ctrl #(.H_ACTIVE(H), .V_ACTIVE(V), .NREG(NREG), .DEPTH(DEPTH_T)) dut (.*);

  int depth_i [] = '{24, 20, 16, 12, 8, 8, 12, 16, 20, 24};
  bit bmap [HALF * V];
  logic [23:0] lbm [H];
  always @(posedge clk) begin
    rd_rgb   <= 24'(pix_of(int'(rd_addr), 0, 9));
    bm_bit   <= bmap[bm_addr];
    lb_rdata <= lbm[lb_raddr];
    if (lb_we) lbm[lb_waddr] <= lb_wdata;
  end

  function automatic int base_of(int r);
    int s = 0;
    for (int q = 0; q < r; q++) s += depth_i[q];
    return s * RW;
  endfunction

  int checks = 0, failures = 0, n_blank = 0;
  int ox = 0, oy = 0, fr = 0, n_out = 0;
  logic [23:0] ref_lb [H];
  longint cyc = 0, t_first = -1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [23:0] e;
    int r;
    bit blank;
    r = ox / RW;
    blank = bmap[oy * HALF + fold(ox, H)];
    if (!blank) begin
      e = 24'(pix_of(base_of(r) + ((fr * V + oy) % depth_i[r]) * RW + ox % RW, 0, 9));
      ref_lb[ox] = e;
    end else if (oy == 0) begin
      e = 0; ref_lb[ox] = 0;
    end else begin
      e = ref_lb[ox]; n_blank++;
    end
    if (fr == 0 && ox == 0 && oy == 0) begin
      checks++;
      if (cyc - t_first != 4) begin failures++; $display("FAIL first-row latency %0d", cyc - t_first); end
    end
    checks += 3;
    if (out_rgb !== e) begin failures++; if (failures < 10) $display("FAIL f%0d (%0d,%0d) %h exp %h", fr, ox, oy, out_rgb, e); end
    if (out_sof !== (ox == 0 && oy == 0)) failures++;
    if (out_eol !== (ox == H - 1)) failures++;
    n_out++;
    if (ox == H - 1) begin
      ox = 0; oy++;
      if (oy == V) begin oy = 0; fr++; end
    end else ox++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < HALF * V; i++) bmap[i] = ($urandom_range(0, 2) == 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 2 * V; n++) begin
      @(negedge clk); line_done = 1;
      if (n == 0) begin @(posedge clk); t_first = cyc; end
      @(negedge clk); line_done = 0;
      if (n % 5 != 1) repeat (H + $urandom_range(0, 30)) @(negedge clk);
    end
    for (int w = 0; w < 40 * H && n_out < 2 * H * V; w++) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != 2 * H * V) begin failures++; $display("FAIL %0d pixels", n_out); end
    checks++;
    if (n_blank == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
