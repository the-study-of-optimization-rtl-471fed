// hmea_downsample -- builds the two coarse levels of the HMEA pyramid.
//
// Level-2 (full resolution) pixels enter four per beat in raster order.  A
// first averaging stage (see hmea_avg_stage) turns every pair of level-2
// rows into one level-1 row, two pixels per beat; a second stage, fed
// directly from the first, turns every pair of level-1 rows into one
// level-0 row, one pixel per beat.  Each output pixel is the truncated mean
// of a 2x2 block of the level below.  Both stages run concurrently with the
// input, so an image of W x H pixels takes W/4 beats per level-2 row
// (88 for a 352-pixel CIF row) and W*H/4 beats in all; level-1 pixels leave
// one cycle and level-0 pixels two cycles after the beat that completes
// them.  Only one row of pair sums is stored per level.
//
// Interface: `in_valid`/`in_sof`/`in_pix` (sof on the first beat of an image);
// `l1_valid`/`l1_pix` and `l0_valid`/`l0_pix` stream the coarse levels in
// raster order.
module hmea_downsample
  import hmea_pkg::*;
#(
  parameter int W = 352
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_sof,
  input  pixel_t in_pix [4],
  output logic   l1_valid,
  output pixel_t l1_pix [2],
  output logic   l0_valid,
  output pixel_t l0_pix
);

  logic   l1_sof, l1_seen;
  pixel_t l0_arr [1];

  // the first level-1 beat after a level-2 start of image restarts stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     l1_seen <= 1'b1;
    else if (in_valid && in_sof)    l1_seen <= 1'b0;
    else if (l1_valid)              l1_seen <= 1'b1;
  end
  assign l1_sof = l1_valid && !l1_seen;

  hmea_avg_stage #(.W(W), .LANES(4)) u_l2_to_l1 (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_sof   (in_sof),
    .in_pix   (in_pix),
    .out_valid(l1_valid),
    .out_pix  (l1_pix)
  );

  hmea_avg_stage #(.W(W/2), .LANES(2)) u_l1_to_l0 (
    .clk, .rst_n,
    .in_valid (l1_valid),
    .in_sof   (l1_sof),
    .in_pix   (l1_pix),
    .out_valid(l0_valid),
    .out_pix  (l0_arr)
  );

  assign l0_pix = l0_arr[0];

endmodule
