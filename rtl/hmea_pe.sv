// hmea_pe -- one processing element of the difference accumulation unit.
//
// Each cycle that `en` is high the PE adds the sum of absolute differences
// of one 4-pixel row pair (current row `cur`, reference row `ref_row`) to its
// accumulator; `clr` together with `en` restarts the sum with this row.
// After the four rows of a 4x4 block the accumulator holds the block SAD of
// the one search position the PE is responsible for.  The row-wise
// organisation (four differences per cycle) is this design's choice.
module hmea_pe
  import hmea_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   clr,
  input  pixel_t cur     [SUB],
  input  pixel_t ref_row [SUB],
  output sad_t   acc
);

  logic [9:0] row_sad;

  always_comb begin
    row_sad = '0;
    for (int j = 0; j < SUB; j++) begin
      if (cur[j] > ref_row[j]) row_sad += 10'(cur[j] - ref_row[j]);
      else                     row_sad += 10'(ref_row[j] - cur[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? '0 : acc) + sad_t'(row_sad);
  end

endmodule
