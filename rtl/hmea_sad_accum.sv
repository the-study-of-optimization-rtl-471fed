// hmea_sad_accum -- SAD accumulator for levels 1 and 2 (block 1) and the
// per-8x8 sums for the four-vector prediction mode (block 2).
//
// A DAU pass yields the 25 SADs of one 4x4 sub-block.  An 8x8 block (level 1)
// needs four passes and a 16x16 macroblock (level 2) sixteen, summed position
// by position.  The accumulator keeps four banks of 25 words, one per 8x8
// quadrant of the macroblock; both DAUs can add a pass in the same cycle
// (ports a and b, which may target the same bank).  `total[p]` is the sum of
// the four banks, i.e. the SAD of the whole block at position p; `quad[q][p]`
// is the SAD of 8x8 quadrant q at position p, which the four-vector mode
// compares separately.  `clr` empties all banks; an add is visible on the
// outputs the cycle after it.  At level 1 every sub-block goes to its own
// bank and only `total` is used.
module hmea_sad_accum
  import hmea_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       add_a,
  input  logic [1:0] bank_a,
  input  sad_t       sad_a [NPOS],
  input  logic       add_b,
  input  logic [1:0] bank_b,
  input  sad_t       sad_b [NPOS],
  output sad_t       quad  [4][NPOS],
  output sad_t       total [NPOS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++)
        for (int p = 0; p < NPOS; p++) quad[q][p] <= '0;
    end else if (clr) begin
      for (int q = 0; q < 4; q++)
        for (int p = 0; p < NPOS; p++) quad[q][p] <= '0;
    end else begin
      for (int q = 0; q < 4; q++)
        for (int p = 0; p < NPOS; p++)
          quad[q][p] <= quad[q][p]
                      + ((add_a && bank_a == 2'(q)) ? sad_a[p] : '0)
                      + ((add_b && bank_b == 2'(q)) ? sad_b[p] : '0);
    end
  end

  always_comb begin
    for (int p = 0; p < NPOS; p++)
      total[p] = quad[0][p] + quad[1][p] + quad[2][p] + quad[3][p];
  end

endmodule
