// hmea_dau -- difference accumulation unit (DAU): a +/-2 full search of one
// 4x4 block, producing all 25 SADs in one pass.
//
// The unit holds 25 PEs arranged as 5 stages of 5, as the HMEA architecture
// prescribes: stage k serves vertical offset dy = k-2 and PE j of a stage
// serves horizontal offset dx = j-2.  The search area of a pass is 8x8
// pixels (4 + 2*2 in each direction).  It is split into a left half `pl`
// (columns 0..3) and a right half `pr` (columns 4..7), matching the two
// reference ports of the DAU.
//
// Operation (this design's timing; the published cycle-level schedule of
// the DAU is not reproduced):
//   1. Load the current block: four cycles of `cur_we` with `cur_row`
//      (row `cur_idx`, 4 pixels).
//   2. Stream the search area: eight consecutive cycles of `sw_valid`, rows
//      0..7 in order, `sw_first` high with row 0.  The row is broadcast to all
//      stages (semi-systolic); stage k uses it against current row r-k when
//      0 <= r-k <= 3.
//   3. One cycle after row 7, `sad_valid` pulses and `sad[k*5+j]` holds the
//      SAD for displacement (dy,dx) = (k-2, j-2).  The outputs hold until the
//      next pass starts streaming its search area.
// Throughput: 8 cycles per pass once the current block is loaded, against 16
// pixel pairs per PE; every current and search pixel enters the unit once.
module hmea_dau
  import hmea_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // current block port (C)
  input  logic       cur_we,
  input  logic [1:0] cur_idx,
  input  pixel_t     cur_row [SUB],
  // search-area ports (Pl, Pr): one 8-pixel row per cycle
  input  logic       sw_valid,
  input  logic       sw_first,
  input  pixel_t     pl [SUB],
  input  pixel_t     pr [SUB],
  output logic       sad_valid,
  output sad_t       sad [NPOS]
);

  localparam int NS = 2*LSR+1;   // 5 stages, 5 PEs per stage

  pixel_t     cur_q [SUB][SUB];
  logic [2:0] row_cnt;
  pixel_t     sw_row [2*SUB];

  always_ff @(posedge clk) begin
    if (cur_we) cur_q[cur_idx] <= cur_row;
  end

  // row counter of the search-area stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        row_cnt <= '0;
    else if (sw_valid) row_cnt <= sw_first ? 3'd1 : row_cnt + 3'd1;
  end

  logic [2:0] r;
  assign r = sw_first ? 3'd0 : row_cnt;

  always_comb begin
    for (int j = 0; j < SUB; j++) begin
      sw_row[j]     = pl[j];
      sw_row[j+SUB] = pr[j];
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_stage
    // current row used by this stage for search row r
    logic [1:0] ci;
    logic       lo_ok, hi_ok, act;
    pixel_t     crow [SUB];
    assign ci   = 2'(r - 3'(k));
    // stage k is active for search rows k .. k+3 (bounds that are always
    // true for a 3-bit row counter are left out)
    if (k == 0)          begin : g_lo assign lo_ok = 1'b1;          end
    else                 begin : g_lo assign lo_ok = (r >= 3'(k));   end
    if (k + SUB - 1 >= 7) begin : g_hi assign hi_ok = 1'b1;          end
    else                 begin : g_hi assign hi_ok = (r <= 3'(k+SUB-1)); end
    assign act  = sw_valid && lo_ok && hi_ok;
    assign crow = cur_q[ci];
    for (genvar j = 0; j < NS; j++) begin : g_pe
      pixel_t rrow [SUB];
      for (genvar m = 0; m < SUB; m++) begin : g_tap
        assign rrow[m] = sw_row[j+m];
      end
      hmea_pe u_pe (
        .clk, .rst_n,
        .en      (act),
        .clr     (r == 3'(k)),
        .cur     (crow),
        .ref_row (rrow),
        .acc     (sad[k*NS+j])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sad_valid <= 1'b0;
    else        sad_valid <= sw_valid && (r == 3'd7);
  end

endmodule
