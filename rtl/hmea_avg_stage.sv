// hmea_avg_stage -- one level of the pipelined averaging-filter downsampler.
//
// Pixels of a W-pixel-wide image arrive in raster order, LANES per beat.
// Each output pixel is the truncated mean of a 2x2 block,
// (a + b + c + d) >> 2: three additions and a shift per pixel.
// On an even row the horizontal pair sums (a + b) of the beat are written to
// a line buffer holding one row of pair sums (W/2 entries).  On the odd row
// the stored sums are read back at the same beat position, added to the new
// pair sums and shifted, so LANES/2 output pixels leave per beat, registered,
// one cycle after the odd-row beat entered.  Only one row of pair sums is
// stored; no image buffer is needed.
//
// `in_sof` marks the first beat of an image and restarts the row/column
// counters.  W must be a multiple of LANES and LANES must be even.
module hmea_avg_stage
  import hmea_pkg::*;
#(
  parameter int W     = 352,
  parameter int LANES = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_sof,
  input  pixel_t in_pix  [LANES],
  output logic   out_valid,
  output pixel_t out_pix [LANES/2]
);

  localparam int BEATS = W / LANES;
  localparam int HALF  = LANES / 2;
  localparam int CW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [8:0]    line_buf [BEATS][HALF];   // pair sums of the last even row
  logic [CW-1:0] col, col_q;
  logic          odd, odd_q;
  logic [8:0]    pair [HALF];

  // position of the current beat (restart on in_sof)
  always_comb begin
    col = in_sof ? '0 : col_q;
    odd = in_sof ? 1'b0 : odd_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '0;
      odd_q <= 1'b0;
    end else if (in_valid) begin
      if (col == CW'(BEATS-1)) begin
        col_q <= '0;
        odd_q <= ~odd;
      end else begin
        col_q <= col + 1'b1;
        odd_q <= odd;
      end
    end
  end

  always_comb begin
    for (int h = 0; h < HALF; h++)
      pair[h] = 9'(in_pix[2*h]) + 9'(in_pix[2*h+1]);
  end

  always_ff @(posedge clk) begin
    if (in_valid && !odd) line_buf[col] <= pair;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && odd;
  end

  always_ff @(posedge clk) begin
    if (in_valid && odd)
      for (int h = 0; h < HALF; h++)
        out_pix[h] <= pixel_t'((10'(line_buf[col][h]) + 10'(pair[h])) >> 2);
  end

endmodule
