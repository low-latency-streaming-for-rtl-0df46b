// tb_gaze_uart_rx: sends 40 random 8N1 bytes at 16 clocks per bit, with
// idle gaps of random length, and one frame whose stop bit is low; checks
// every received byte, that the bad frame yields nothing, and that each byte
// is delivered within one bit time after the middle of its stop bit.
module tb_gaze_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  always #5 clk = ~clk;
  logic       byte_valid;
  logic [7:0] byte_data;

  gaze_uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0, got = 0;
  logic [7:0] sent [$];

  always @(posedge clk) if (rst_n && byte_valid) begin
    checks++;
    got++;
    if (sent.size() == 0) begin failures++; $display("FAIL unexpected byte %h", byte_data); end
    else begin
      logic [7:0] e;
      e = sent.pop_front();
      if (byte_data !== e) begin failures++; $display("FAIL got %h exp %h", byte_data, e); end
    end
  end

  task automatic send(logic [7:0] b, bit good_stop);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = good_stop; repeat (CPB) @(negedge clk);
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      b = 8'($urandom);
      if (n == 20) send(8'h3C, 0);       // framing error: must be dropped
      sent.push_back(b);
      send(b, 1);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    repeat (4 * CPB) @(negedge clk);
    checks++;
    if (got != 40 || sent.size() != 0) begin failures++; $display("FAIL received %0d bytes", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
