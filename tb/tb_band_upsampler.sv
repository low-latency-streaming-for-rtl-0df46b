// tb_band_upsampler: the stage memories and the stage table are modelled
// here: stage l answers one clock after the address with a value made from
// (l, bank, row / K, column / K), and block b has stage (b + band) mod 5.
// Two band_done pulses arrive back-to-back and three more with gaps (a 60-line
// frame of five bands). Every output pixel, its stage, sof, eol, the bank
// alternation and the four-clock start after band_done are checked.
module tb_band_upsampler;
  import sdisp_pkg::*;
  localparam int H = 48, V = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        band_done = 0;
  logic        rd_bank;
  logic [3:0]  rd_row;
  logic [10:0] rd_col;
  logic [7:0]  lvl_blk;
  level_t      lvl;
  logic [NLEVELS-1:0][23:0] lvl_rgb;
  logic        out_valid, out_sof, out_eol;
  logic [23:0] out_rgb;
  level_t      out_level;

  band_upsampler #(.H_ACTIVE(H), .V_ACTIVE(V), .BLK(12)) dut (.*);

  function automatic int kof(int l);
    case (l) 0: return 1; 1: return 2; 2: return 3; 3: return 4; default: return 6; endcase
  endfunction
  function automatic logic [23:0] val(int l, int bank, int r, int c);
    return 24'((l << 20) | (bank << 19) | ((r / kof(l)) << 12) | (c / kof(l)));
  endfunction

  int band_cnt = 0;     // band being output, counted by the model
  assign lvl = level_t'((int'(lvl_blk) + band_cnt) % 5);
  always @(posedge clk)
    for (int l = 0; l < NLEVELS; l++) lvl_rgb[l] <= val(l, int'(rd_bank), int'(rd_row), int'(rd_col));

  int checks = 0, failures = 0;
  int ox = 0, oy = 0, n_out = 0;
  longint cyc = 0, t_done [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int l, bank;
    bank = (oy / 12) % 2;
    l = ((ox / 12) + oy / 12) % 5;
    checks += 4;
    if (ox == 0 && oy % 12 == 0) begin
      longint t;
      t = t_done.pop_front();
      checks++;
      if (oy / 12 == 0 && cyc - t != 4) begin failures++; $display("FAIL start latency %0d", cyc - t); end
    end
    if (out_rgb !== val(l, bank, oy % 12, ox)) begin failures++; if (failures < 10) $display("FAIL (%0d,%0d) %h exp %h", ox, oy, out_rgb, val(l, bank, oy % 12, ox)); end
    if (int'(out_level) != l) failures++;
    if (out_sof !== (ox == 0 && oy == 0)) failures++;
    if (out_eol !== (ox == H - 1)) failures++;
    n_out++;
    if (ox == H - 1) begin
      ox = 0; oy++;
      if (oy % 12 == 0) band_cnt++;
    end else ox++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    @(negedge clk); band_done = 1;
    @(posedge clk); t_done.push_back(cyc);
    @(negedge clk); band_done = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulse(); pulse();
    repeat (2 * 12 * H) @(negedge clk);
    for (int b = 2; b < 5; b++) begin pulse(); repeat (12 * H + 30) @(negedge clk); end
    repeat (50) @(negedge clk);
    checks++;
    if (n_out != H * V) begin failures++; $display("FAIL %0d pixels", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
