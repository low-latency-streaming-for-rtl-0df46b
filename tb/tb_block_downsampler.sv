// tb_block_downsampler: three instances (K = 1, 3 and 6) on 48-pixel lines
// are fed four 12-line bands of random pixels with random gaps, alternating
// the bank. After each band the band memory is read back over every
// (row, column) of the band and compared with the rounded KxK mean computed
// here, including the one-clock read latency.
module tb_block_downsampler;
  localparam int H = 48;
  localparam int KS [3] = '{1, 3, 6};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_bank = 0, rd_bank = 0;
  logic [10:0] in_x = 0, rd_col = 0;
  logic [3:0]  in_row = 0, rd_row = 0;
  logic [23:0] in_rgb = 0;
  logic [23:0] rd_rgb [3];

  for (genvar i = 0; i < 3; i++) begin : g_dut
    block_downsampler #(.K(KS[i]), .H_ACTIVE(H), .BLK(12)) dut (
      .clk, .rst_n, .in_valid, .in_x, .in_row, .in_bank, .in_rgb,
      .rd_bank, .rd_row, .rd_col, .rd_rgb(rd_rgb[i]));
  end

  int checks = 0, failures = 0;
  logic [23:0] band [12][H];

  function automatic logic [23:0] mean_of(int k, int r, int c);
    logic [23:0] m;
    for (int ch = 0; ch < 3; ch++) begin
      int s = 0;
      for (int yy = 0; yy < k; yy++)
        for (int xx = 0; xx < k; xx++)
          s += int'(band[(r / k) * k + yy][(c / k) * k + xx][8 * ch +: 8]);
      m[8 * ch +: 8] = 8'((s + k * k / 2) / (k * k));
    end
    return m;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      for (int r = 0; r < 12; r++)
        for (int x = 0; x < H; x++) begin
          band[r][x] = (b == 3) ? 24'hffffff : 24'($urandom);
          @(negedge clk);
          in_valid = 1; in_x = 11'(x); in_row = 4'(r); in_bank = b[0]; in_rgb = band[r][x];
          if ($urandom_range(0, 5) == 0) begin @(negedge clk); in_valid = 0; end
        end
      @(negedge clk); in_valid = 0;
      rd_bank = b[0];
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < H; c++) begin
          rd_row = 4'(r); rd_col = 11'(c);
          @(negedge clk);
          for (int i = 0; i < 3; i++) begin
            checks++;
            if (rd_rgb[i] !== mean_of(KS[i], r, c)) begin
              failures++;
              if (failures < 10) $display("FAIL K=%0d band %0d (%0d,%0d) got %h exp %h", KS[i], b, r, c, rd_rgb[i], mean_of(KS[i], r, c));
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
