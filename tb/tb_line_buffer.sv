// tb_line_buffer: fills all 1920 entries, reads them back with one clock of
// latency while rewriting the entry read the clock before (the way the read
// controller uses it), and checks both the old and the new contents.
module tb_line_buffer;
  localparam int H = 1920;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] raddr = 0, waddr = 0;
  logic [23:0] rdata, wdata = 0;
  logic        we = 0;

  line_buffer #(.H_ACTIVE(H)) dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] model [H];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < H; i++) begin
      @(negedge clk); we = 1; waddr = 11'(i); wdata = 24'($urandom); model[i] = wdata;
    end
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i <= H; i++) begin
        @(negedge clk);
        if (i > 0) begin
          checks++;
          if (rdata !== model[i - 1]) begin failures++; if (failures < 10) $display("FAIL pass %0d entry %0d", pass, i - 1); end
          we = (pass == 0); waddr = 11'(i - 1); wdata = 24'($urandom);
          if (pass == 0) model[i - 1] = wdata;
        end else we = 0;
        raddr = 11'(i % H);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
