// tb_blank_map: loads a random pattern into a 120 x 60 blank map and reads
// every bit back with one clock of latency; then rewrites a few bits.
module tb_blank_map;
  localparam int HALF = 120, V = 60, N = HALF * V;
  localparam int AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr = 0, waddr = 0;
  logic          rbit, we = 0, wbit = 0;

  blank_map #(.HALF(HALF), .V_ACTIVE(V)) dut (.*);

  int checks = 0, failures = 0, ones = 0;
  bit model [N];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wbit = ($urandom_range(0, 3) == 0); model[i] = wbit;
    end
    for (int r = 0; r < 2; r++) begin
      @(negedge clk); we = 0;
      for (int i = 0; i < N; i++) begin
        raddr = AW'(i);
        @(negedge clk);
        checks++;
        ones += int'(rbit);
        if (rbit !== model[i]) begin failures++; if (failures < 10) $display("FAIL bit %0d", i); end
      end
      for (int i = 0; i < N; i += 7) begin
        @(negedge clk); we = 1; waddr = AW'(i); wbit = !model[i]; model[i] = wbit;
      end
    end
    checks++;
    if (ones == 0 || ones == 2 * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
