// tb_gaze_distance: streams three 64 x 24 frames with different gaze points
// (one at the frame corner, one outside the middle) and random gaps, changes
// the gaze input in mid-frame, and compares dist_sq with (x-gx)^2 + (y-gy)^2
// for the gaze present at the frame start, for every pixel.
module tb_gaze_distance;
  localparam int H = 64, V = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, in_sof = 0, in_eol = 0;
  logic [10:0] gaze_x = 0, gaze_y = 0;
  logic [23:0] dist_sq;

  gaze_distance dut (.*);

  int checks = 0, failures = 0;
  int gxs [3] = '{0, 40, 1919};
  int gys [3] = '{0, 10, 1079};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      gaze_x = 11'(gxs[f]); gaze_y = 11'(gys[f]);
      for (int y = 0; y < V; y++) begin
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_eol = (x == H - 1);
          if (x == 3 && y == 2) begin gaze_x = 11'(7); gaze_y = 11'(9); end
          #1;
          e = longint'(x - gxs[f]) * longint'(x - gxs[f]) + longint'(y - gys[f]) * longint'(y - gys[f]);
          checks++;
          if (longint'(dist_sq) != e) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d (%0d,%0d) S=%0d exp %0d", f, x, y, dist_sq, e);
          end
          if ($urandom_range(0, 7) == 0) begin
            @(negedge clk); in_valid = 0;
          end
        end
      end
      @(negedge clk); in_valid = 0; in_sof = 0; in_eol = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
