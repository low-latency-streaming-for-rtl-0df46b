// tb_fovea_selector: writes random squared distances for the 20 blocks of
// both banks, with thresholds chosen so that every stage occurs (including
// distances equal to a threshold, which belong to the next stage), and reads
// every entry back. The tables must keep bank 0 when bank 1 is written.
module tb_fovea_selector;
  import sdisp_pkg::*;
  localparam int H = 240, NB = H / 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_sample = 0, in_bank = 0, rd_bank = 0;
  logic [7:0]       in_blk = 0, rd_blk = 0;
  logic [23:0]      dist_sq = 0;
  logic [3:0][23:0] thr_sq;
  level_t           rd_level;

  fovea_selector #(.H_ACTIVE(H), .BLK(12)) dut (.*);

  int checks = 0, failures = 0;
  int expv [2][NB];
  int seen [5] = '{0, 0, 0, 0, 0};
  int thr [4] = '{100, 400, 900, 1600};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, l;
    for (int i = 0; i < 4; i++) thr_sq[i] = 24'(thr[i]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < NB; k++) begin
        if (k < 4) d = thr[k];                       // on a boundary
        else if (k == 4) d = 0;
        else d = $urandom_range(0, 2000);
        l = 4;
        for (int i = 3; i >= 0; i--) if (d < thr[i]) l = i;
        expv[b][k] = l;
        seen[l]++;
        @(negedge clk); in_sample = 1; in_bank = b[0]; in_blk = 8'(k); dist_sq = 24'(d);
        @(negedge clk); in_sample = 0;
      end
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < NB; k++) begin
        rd_bank = b[0]; rd_blk = 8'(k);
        #1;
        checks++;
        if (int'(rd_level) != expv[b][k]) begin failures++; $display("FAIL bank %0d blk %0d got %0d exp %0d", b, k, rd_level, expv[b][k]); end
      end
    for (int l = 0; l < 5; l++) begin checks++; if (seen[l] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
