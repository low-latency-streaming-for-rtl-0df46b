// tb_gaze_receiver: feeds byte strobes directly. Checks the reset position
// (frame centre), that bytes before a sync byte are ignored, that complete
// messages update the gaze with a one-clock pulse, and that positions
// outside the frame are clamped to its last column and row.
module tb_gaze_receiver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        byte_valid = 0;
  logic [7:0]  byte_data = 0;
  logic [10:0] gaze_x, gaze_y;
  logic        gaze_update;

  gaze_receiver #(.H_ACTIVE(1920), .V_ACTIVE(1080)) dut (.*);

  int checks = 0, failures = 0, updates = 0;
  always @(posedge clk) if (rst_n && gaze_update) updates++;

  task automatic put(logic [7:0] b);
    @(negedge clk); byte_valid = 1; byte_data = b;
    @(negedge clk); byte_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic msg(int gx, int gy);
    put(8'hA5); put(8'(gx >> 8)); put(8'(gx)); put(8'(gy >> 8)); put(8'(gy));
  endtask

  task automatic expect_gaze(int gx, int gy);
    repeat (2) @(negedge clk);
    checks++;
    if (gaze_x != 11'(gx) || gaze_y != 11'(gy)) begin
      failures++; $display("FAIL gaze (%0d,%0d) exp (%0d,%0d)", gaze_x, gaze_y, gx, gy);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gx, gy;
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_gaze(960, 540);
    put(8'h12); put(8'h00);               // noise before a message
    expect_gaze(960, 540);
    for (int n = 0; n < 20; n++) begin
      gx = $urandom_range(0, 1919); gy = $urandom_range(0, 1079);
      msg(gx, gy);
      expect_gaze(gx, gy);
    end
    msg(4000, 2000);
    expect_gaze(1919, 1079);
    checks++;
    if (updates != 21) begin failures++; $display("FAIL %0d update pulses", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
