// tb_correction_map: loads a random 120 x 20 map through port B, then reads
// it on port A and port B at the same time from different addresses, each
// with one clock of latency.
module tb_correction_map;
  localparam int HALF = 120, G = 20, N = HALF * G;
  localparam int AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic          a_bit, b_bit, b_we = 0, b_wbit = 0;

  correction_map #(.HALF(HALF), .GROUPS(G)) dut (.*);

  int checks = 0, failures = 0;
  bit model [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); b_we = 1; b_addr = AW'(i); b_wbit = $urandom_range(0, 1) == 1; model[i] = b_wbit;
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < N; i++) begin
      a_addr = AW'(i); b_addr = AW'(N - 1 - i);
      @(negedge clk);
      checks += 2;
      if (a_bit !== model[i]) begin failures++; if (failures < 10) $display("FAIL A %0d", i); end
      if (b_bit !== model[N - 1 - i]) begin failures++; if (failures < 10) $display("FAIL B %0d", N - 1 - i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
