// line_buffer: one line of pixels (1920 x 24 bit, 46.1 kbit) used by the
// read address controller to fill blank positions of the corrected image.
//
// It keeps, for every column, the last non-blank pixel that was output there,
// so a blank position can repeat the pixel directly above it. Simple
// dual-port: a write happens at the clock edge where we is high; a read
// returns the addressed pixel one clock later. Size and use follow the design
// description.
module line_buffer #(
  parameter int unsigned H_ACTIVE = 1920
) (
  input  logic        clk,
  input  logic [10:0] raddr,
  output logic [23:0] rdata,
  input  logic        we,
  input  logic [10:0] waddr,
  input  logic [23:0] wdata
);

  logic [23:0] mem [H_ACTIVE];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
