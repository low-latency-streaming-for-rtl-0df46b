// tb_region_buffer: writes a random value to every word of a 3840-word
// buffer (the 240-pixel test geometry), overwrites a random subset, then
// reads every word back, checking the one-clock read latency and that a read
// of the address being written returns the old word.
module tb_region_buffer;
  localparam int W = 3840;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we = 0;
  logic [18:0] waddr = 0, raddr = 0;
  logic [23:0] wdata = 0, rdata;

  region_buffer #(.WORDS(W), .AW(19)) dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] model [W];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 19'(i); wdata = 24'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      a = $urandom_range(0, W - 1);
      @(negedge clk); we = 1; waddr = 19'(a); wdata = 24'($urandom); raddr = 19'(a);
      @(negedge clk); we = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read-first %0d", a); end
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < W; i++) begin
      raddr = 19'(i);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; if (failures < 10) $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
