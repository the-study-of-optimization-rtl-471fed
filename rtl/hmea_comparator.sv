// hmea_comparator -- keeps the least and the second least SAD of a search
// together with their motion vectors.
//
// `clr` empties both entries (SAD = all ones).  Every cycle with `valid` one
// candidate (sad, mv) is compared: a strictly smaller SAD than the best moves
// the best entry to second place; otherwise a strictly smaller SAD than the
// second entry replaces it, unless the candidate repeats the best entry's
// vector (overlapping passes may offer the same position twice).  Ties keep
// the earlier candidate.  Results are registered: they reflect a candidate
// one cycle after it was offered.  Level 0 of HMEA uses both entries (two
// vector candidates); the other levels use the best one.
module hmea_comparator
  import hmea_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic valid,
  input  sad_t sad,
  input  mv_t  mv,
  output sad_t best_sad,
  output mv_t  best_mv,
  output sad_t second_sad,
  output mv_t  second_mv
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad   <= SAD_MAX;
      second_sad <= SAD_MAX;
      best_mv    <= '0;
      second_mv  <= '0;
    end else if (clr) begin
      best_sad   <= SAD_MAX;
      second_sad <= SAD_MAX;
      best_mv    <= '0;
      second_mv  <= '0;
    end else if (valid) begin
      if (sad < best_sad) begin
        best_sad   <= sad;
        best_mv    <= mv;
        if (mv != best_mv || best_sad == SAD_MAX) begin
          second_sad <= best_sad;
          second_mv  <= best_mv;
        end
      end else if (sad < second_sad && mv != best_mv) begin
        second_sad <= sad;
        second_mv  <= mv;
      end
    end
  end

endmodule
