// gaze_receiver: turns UART bytes into the gaze position used by the
// compressor.
//
// A message is five bytes: the sync byte 0xA5, then gx[15:8], gx[7:0],
// gy[15:8], gy[7:0]. When the last byte arrives the new position is
// clamped to the frame (0..H_ACTIVE-1, 0..V_ACTIVE-1), placed on
// gaze_x / gaze_y and announced by a one-clock gaze_update pulse. A byte other
// than 0xA5 while waiting for a message is ignored, so the parser regains
// step after a lost byte. After reset the gaze is the frame centre.
//
// That the gaze position comes from the PC over a UART follows the design
// description; the message format, the clamping and the reset value are this
// design's own choices. The compressor samples the position only at the start
// of each frame.
module gaze_receiver #(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned V_ACTIVE = 1080
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  output logic [10:0] gaze_x,
  output logic [10:0] gaze_y,
  output logic        gaze_update
);

  localparam logic [7:0] SYNC = 8'hA5;

  logic [2:0]  idx;     // 0: waiting for sync, 1..4: payload byte expected
  logic [7:0]  gx_hi, gx_lo, gy_hi;
  logic [15:0] gx_new, gy_new;

  assign gx_new = {gx_hi, gx_lo};
  assign gy_new = {gy_hi, byte_data};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx         <= '0;
      gx_hi       <= '0;
      gx_lo       <= '0;
      gy_hi       <= '0;
      gaze_x      <= 11'(H_ACTIVE / 2);
      gaze_y      <= 11'(V_ACTIVE / 2);
      gaze_update <= 1'b0;
    end else begin
      gaze_update <= 1'b0;
      if (byte_valid) begin
        case (idx)
          3'd0: if (byte_data == SYNC) idx <= 3'd1;
          3'd1: begin gx_hi <= byte_data; idx <= 3'd2; end
          3'd2: begin gx_lo <= byte_data; idx <= 3'd3; end
          3'd3: begin gy_hi <= byte_data; idx <= 3'd4; end
          default: begin
            idx         <= '0;
            gaze_x      <= (gx_new >= 16'(H_ACTIVE)) ? 11'(H_ACTIVE - 1) : gx_new[10:0];
            gaze_y      <= (gy_new >= 16'(V_ACTIVE)) ? 11'(V_ACTIVE - 1) : gy_new[10:0];
            gaze_update <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
