// gaze_distance: squared distance from every pixel of a frame to the gaze
// point, computed without a per-pixel multiplier.
//
// At the first pixel of a frame the gaze (gx, gy) is latched and the
// recurrence is initialised with dx = -gx, dy = -gy and S = dx^2 + dy^2.
// Along a line every pixel adds 2*dx + 1 to S and increments dx. At the end
// of a line dy^2 is advanced by 2*dy + 1, dy by one, dx returns to -gx and
// the next line starts from S = gx^2 + dy^2. Only the frame start uses
// multipliers (gx^2 and gy^2); everything else is adders.
//
// Interface: the pixel stream strobes (valid, sof, eol) of the input video
// and the current gaze. dist_sq is combinational and belongs to the pixel on
// the stream in the same clock, so S(x,y) = (x-gx)^2 + (y-gy)^2 with the gaze
// of the frame start. The recurrence is the one of the design description;
// holding the gaze constant for a whole frame also follows it.
module gaze_distance (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sof,
  input  logic        in_eol,
  input  logic [10:0] gaze_x,
  input  logic [10:0] gaze_y,
  output logic [23:0] dist_sq
);

  typedef logic signed [12:0] sdiff_t;
  typedef logic signed [25:0] ssum_t;

  sdiff_t      dx_q, dy_q, gxn_q;     // gxn_q = -gx of the frame
  logic [23:0] s_q, dy2_q, gx2_q;

  sdiff_t      cur_dx, cur_dy, cur_gxn;
  logic [23:0] cur_s, cur_dy2, cur_gx2;
  logic [23:0] gx2_in, gy2_in;

  assign gx2_in = 24'(gaze_x) * 24'(gaze_x);
  assign gy2_in = 24'(gaze_y) * 24'(gaze_y);

  always_comb begin
    if (in_sof) begin
      cur_dx  = -sdiff_t'({2'b00, gaze_x});
      cur_dy  = -sdiff_t'({2'b00, gaze_y});
      cur_gxn = -sdiff_t'({2'b00, gaze_x});
      cur_gx2 = gx2_in;
      cur_dy2 = gy2_in;
      cur_s   = gx2_in + gy2_in;
    end else begin
      cur_dx  = dx_q;
      cur_dy  = dy_q;
      cur_gxn = gxn_q;
      cur_gx2 = gx2_q;
      cur_dy2 = dy2_q;
      cur_s   = s_q;
    end
  end

  assign dist_sq = cur_s;

  logic [23:0] dy2_next;
  assign dy2_next = 24'(ssum_t'(cur_dy2) + (ssum_t'(cur_dy) <<< 1) + ssum_t'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dx_q  <= '0;
      dy_q  <= '0;
      gxn_q <= '0;
      s_q   <= '0;
      dy2_q <= '0;
      gx2_q <= '0;
    end else if (in_valid) begin
      gxn_q <= cur_gxn;
      gx2_q <= cur_gx2;
      if (in_eol) begin
        dy_q  <= cur_dy + 1'b1;
        dy2_q <= dy2_next;
        dx_q  <= cur_gxn;
        s_q   <= cur_gx2 + dy2_next;
      end else begin
        dx_q  <= cur_dx + 1'b1;
        dy_q  <= cur_dy;
        dy2_q <= cur_dy2;
        s_q   <= 24'(ssum_t'(cur_s) + (ssum_t'(cur_dx) <<< 1) + ssum_t'(1));
      end
    end
  end

endmodule
