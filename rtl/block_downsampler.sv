// block_downsampler: one stage of the gaze-guided compressor. It reduces every
// KxK square of pixels to its mean, so the stage keeps 1/(K*K) of the samples
// (K = 1, 2, 3, 4, 6 give the stages 1/1, 1/4, 1/9, 1/16 and 1/36; all divide
// the 12x12 compression block).
//
// How it works: a running horizontal sum adds K neighbouring pixels; at the
// last pixel of each group it is added to a per-column accumulator (one word
// per K columns, a read-modify-write per K pixels). On the last of K rows the
// accumulated square is divided by K*K with rounding and written to a band
// memory that holds the 12/K x H/K means of one 12-line band. The band memory
// has two banks: the parent writes band n into bank n mod 2 while the
// up-sampler reads band n-1 from the other.
//
// Interface: the parent gives each input pixel with its column in_x, its row
// inside the band in_row (0..11) and the bank. The read port takes a bank, a
// full-resolution row in the band and a full-resolution column and returns
// the mean of the square that covers it one clock later, which is exactly
// nearest-neighbour up-sampling. Five parallel stages follow the design
// description; averaging (rather than dropping pixels) and the two-bank band
// memory are this design's choices.
module block_downsampler #(
  parameter int unsigned K        = 6,
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned BLK      = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [10:0] in_x,
  input  logic [3:0]  in_row,
  input  logic        in_bank,
  input  logic [23:0] in_rgb,
  input  logic        rd_bank,
  input  logic [3:0]  rd_row,
  input  logic [10:0] rd_col,
  output logic [23:0] rd_rgb
);

  localparam int unsigned NC    = H_ACTIVE / K;      // means per band row
  localparam int unsigned RPB   = BLK / K;           // mean rows per band
  localparam int unsigned DEPTH = 2 * RPB * NC;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned SW    = 8 + $clog2(K * K); // sum width per channel
  localparam int unsigned CWID  = $clog2(NC + 1);

  typedef logic [SW-1:0] sum_t;
  typedef sum_t [2:0] sum3_t;                         // R, G, B sums

  initial begin
    assert (BLK % K == 0) else $error("K must divide the block size");
    assert (H_ACTIVE % BLK == 0) else $error("line length must be a multiple of the block size");
  end

  logic [23:0] band_mem [DEPTH];

  // ---------------- column position inside the KxK square ----------------
  logic [$clog2(K+1)-1:0] kx_q, cur_kx;
  logic [CWID-1:0]        cx_q, cur_cx;
  sum3_t                  hsum_q, cur_h;
  logic [3:0]             ky;
  logic [3:0]             ry;

  assign cur_kx = (in_x == '0) ? '0 : kx_q;
  assign cur_cx = (in_x == '0) ? '0 : cx_q;
  assign ky     = 4'(in_row % 4'(K));
  assign ry     = 4'(in_row / 4'(K));

  always_comb begin
    for (int c = 0; c < 3; c++)
      cur_h[c] = ((cur_kx == '0) ? sum_t'(0) : hsum_q[c]) + sum_t'(in_rgb[8*c +: 8]);
  end

  wire last_col = (cur_kx == ($clog2(K+1))'(K - 1));
  wire last_row = (ky == 4'(K - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kx_q   <= '0;
      cx_q   <= '0;
      hsum_q <= '0;
    end else if (in_valid) begin
      hsum_q <= cur_h;
      if (last_col) begin
        kx_q <= '0;
        cx_q <= cur_cx + 1'b1;
      end else begin
        kx_q <= cur_kx + 1'b1;
        cx_q <= cur_cx;
      end
    end
  end

  // ---------------- vertical accumulation ----------------
  sum3_t total;

  if (K > 1) begin : g_vacc
    sum3_t colacc [NC];
    sum3_t colacc_rd;

    always_ff @(posedge clk) begin
      if (in_valid && cur_kx == '0) colacc_rd <= colacc[cur_cx];
      if (in_valid && last_col && !last_row) colacc[cur_cx] <= total;
    end

    always_comb begin
      for (int c = 0; c < 3; c++)
        total[c] = ((ky == '0) ? sum_t'(0) : colacc_rd[c]) + cur_h[c];
    end
  end else begin : g_novacc
    assign total = cur_h;
  end

  // ---------------- rounded mean into the band memory ----------------
  logic [23:0] mean;
  always_comb begin
    for (int c = 0; c < 3; c++)
      mean[8*c +: 8] = 8'((total[c] + sum_t'(K * K / 2)) / sum_t'(K * K));
  end

  logic [AW-1:0] waddr, raddr;
  assign waddr = AW'((32'(in_bank) * RPB + 32'(ry)) * NC + 32'(cur_cx));
  assign raddr = AW'((32'(rd_bank) * RPB + 32'(rd_row) / K) * NC + 32'(rd_col) / K);

  always_ff @(posedge clk) begin
    if (in_valid && last_col && last_row) band_mem[waddr] <= mean;
    rd_rgb <= band_mem[raddr];
  end

endmodule
