// gaze_uart_rx: serial receiver for the gaze coordinates sent by the PC.
//
// The gaze position reaches the compression FPGA over a UART. This receiver
// takes 8N1 frames (start bit, eight data bits LSB first, one stop bit). The
// line is passed through a two-flop synchroniser; a falling edge starts a
// frame, the start bit is checked again half a bit later, and every data bit
// is sampled in the middle of its bit time. A byte is delivered as a one-clock
// pulse on byte_valid with byte_data when the stop bit is seen high; a frame
// with a low stop bit is dropped.
//
// The use of a UART follows the design description; the framing and the rate
// are this design's choice: CLKS_PER_BIT = 1289 is 115200 baud at the
// 148.5 MHz pixel clock.
module gaze_uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1289
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       byte_valid,
  output logic [7:0] byte_data
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e         state;
  logic [1:0]     sync;
  logic [CW-1:0]  cnt;
  logic [2:0]     bitn;
  logic [7:0]     shreg;

  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync       <= 2'b11;
      state      <= IDLE;
      cnt        <= '0;
      bitn       <= '0;
      shreg      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
    end else begin
      sync       <= {sync[0], rxd};
      byte_valid <= 1'b0;
      case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rx ? IDLE : DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (rx) begin
              byte_valid <= 1'b1;
              byte_data  <= shreg;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
