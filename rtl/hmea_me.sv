// hmea_me -- three-level hierarchical motion estimation (HMEA) engine for
// one 16x16 macroblock.
//
// Idea: search a coarse copy of the picture exhaustively, then refine.  The
// current macroblock and its search window are averaged down twice (2x2
// mean, see hmea_downsample), giving level 1 (half size) and level 0
// (quarter size).
//   Level 0: full search of the 4x4 block over displacements -4..+4 in both
//            directions (81 positions); the least and second least SAD give
//            two vector candidates.
//   Level 1: for each candidate, a +/-2 full search of the 8x8 block around
//            twice the candidate; the best of the 2 x 25 positions is kept.
//   Level 2: a +/-2 full search of the 16x16 block around twice the level-1
//            vector; the best position is the macroblock vector.  In the same
//            pass the SADs of the four 8x8 quadrants give four vectors for the
//            four-vector (8x8) prediction mode.
// All SADs are produced by two DAUs (hmea_dau), each a +/-2 search of one
// 4x4 sub-block per pass.  A level-0 search is covered by four 5x5 tiles
// centred on (+/-2, +/-2), two passes of the two DAUs; their overlapping
// positions are offered twice and filtered by the comparator.  Level 1 takes
// four 4x4 sub-blocks (two passes) per candidate and level 2 sixteen (eight
// passes); hmea_sad_accum sums them position by position, and the 25 totals
// are then scanned into the comparators, one position per cycle.
//
// Window and range (this design's choice): the level-2 search window is
// 48x48 pixels with the macroblock's own position at (16,16), so the
// displacements -16..+16 are all held on chip; level 1 and level 0 use the
// 24x24 and 12x12 averaged windows.  A refinement centre is clamped so that
// its 5x5 tile stays in the window (|centre| <= 6 at level 1, 14 at level 2).
// The integer-pel result is a vector in -16..+16.
//   Half-pel: the eight half-pel neighbours of the integer vector are then
//            tried (bilinear interpolation of the 48x48 window, rounded up
//            at .5, as in MPEG-4 with rounding control 0); a neighbour
//            replaces the current best only with a strictly smaller SAD and
//            only inside -16.0..+15.5 (half-pel units -32..+31, the range of
//            the 7-bit vector).  Two 16-pixel rows are compared per cycle, 8
//            cycles per neighbour.  The document names half-pel refinement
//            as part of motion estimation; the order and datapath width are
//            this design's choice.
//
// Loading: while the engine is idle, `ld_valid` beats of four pixels in
// raster order write either the current macroblock (`ld_win`=0, 64 beats) or
// the search window (`ld_win`=1, 576 beats); `ld_sof` marks the first beat
// of each.  The averaged levels are built on the fly while loading.  Start
// the search with `start` no earlier than two cycles after the last beat.
//
// Timing: `done` rises 2*(13+50) + 2*(2*13+25) + (8*13+25) + 4 + 64 = 425
// clock edges after the edge that samples `start` (13 cycles per DAU pass,
// one cycle per scanned SAD, one settling cycle per level, one to start and
// 8 x 8 half-pel cycles).  Outputs: mv_mb/sad_mb (integer-pel), mv_half/
// sad_half (half-pel units), mv_8x8/sad_8x8 (four-vector mode).
// `done` pulses for one cycle; the outputs hold until the next `start`.
// Lint note: the engine uses only part of each comparator's outputs (the
// two level-0 vectors, the level-1 best vector, the level-2 and quadrant
// best vectors and SADs); the remaining comparator outputs are left
// unread on purpose and are reported as unused signals.
module hmea_me
  import hmea_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // pixel load port
  input  logic   ld_valid,
  input  logic   ld_win,
  input  logic   ld_sof,
  input  pixel_t ld_pix [4],
  // search control
  input  logic   start,
  output logic   busy,
  output logic   done,
  // results
  output mv_t    mv_mb,
  output sad_t   sad_mb,
  output mv_t    mv_8x8  [4],
  output sad_t   sad_8x8 [4],
  output mv_t    mv_l0   [2],
  output mv_t    mv_l1,
  output hmv_t   mv_half,
  output sad_t   sad_half
);

  // ------------------------------------------------------------------
  // on-chip pyramid memories
  // ------------------------------------------------------------------
  pixel_t cur2 [MB][MB];
  pixel_t cur1 [MB/2][MB/2];
  pixel_t cur0 [MB/4][MB/4];
  pixel_t win2 [SW2][SW2];
  pixel_t win1 [SW1][SW1];
  pixel_t win0 [SW0][SW0];

  logic        ds_cur_v, ds_win_v;
  logic        c1_v, c0_v, w1_v, w0_v;
  pixel_t      c1_p [2], w1_p [2];
  pixel_t      c0_p, w0_p;
  logic [9:0]  ld_cnt;          // level-2 beat counter
  logic [8:0]  cl1_cnt, wl1_cnt; // level-1 beat counters (2 pixels a beat)
  logic [8:0]  cl0_cnt, wl0_cnt; // level-0 pixel counters

  assign ds_cur_v = ld_valid && !ld_win;
  assign ds_win_v = ld_valid &&  ld_win;

  hmea_downsample #(.W(MB)) u_ds_cur (
    .clk, .rst_n,
    .in_valid(ds_cur_v), .in_sof(ld_sof), .in_pix(ld_pix),
    .l1_valid(c1_v), .l1_pix(c1_p), .l0_valid(c0_v), .l0_pix(c0_p)
  );

  hmea_downsample #(.W(SW2)) u_ds_win (
    .clk, .rst_n,
    .in_valid(ds_win_v), .in_sof(ld_sof), .in_pix(ld_pix),
    .l1_valid(w1_v), .l1_pix(w1_p), .l0_valid(w0_v), .l0_pix(w0_p)
  );

  // write positions; a start of image restarts the counters of its target
  logic [9:0] ld_idx;
  logic [8:0] cl1_idx, wl1_idx, cl0_idx, wl0_idx;
  logic       cur_sof, win_sof;
  assign cur_sof = ds_cur_v && ld_sof;
  assign win_sof = ds_win_v && ld_sof;
  assign ld_idx  = ld_sof  ? '0 : ld_cnt;
  assign cl1_idx = cur_sof ? '0 : cl1_cnt;
  assign cl0_idx = cur_sof ? '0 : cl0_cnt;
  assign wl1_idx = win_sof ? '0 : wl1_cnt;
  assign wl0_idx = win_sof ? '0 : wl0_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt  <= '0;
      cl1_cnt <= '0;
      cl0_cnt <= '0;
      wl1_cnt <= '0;
      wl0_cnt <= '0;
    end else begin
      if (ld_valid) ld_cnt <= ld_idx + 1'b1;
      cl1_cnt <= c1_v ? cl1_idx + 1'b1 : cl1_idx;
      cl0_cnt <= c0_v ? cl0_idx + 1'b1 : cl0_idx;
      wl1_cnt <= w1_v ? wl1_idx + 1'b1 : wl1_idx;
      wl0_cnt <= w0_v ? wl0_idx + 1'b1 : wl0_idx;
    end
  end

  always_ff @(posedge clk) begin
    if (ds_cur_v)
      for (int j = 0; j < 4; j++) cur2[int'(ld_idx)/4][(int'(ld_idx)%4)*4+j] <= ld_pix[j];
    if (ds_win_v)
      for (int j = 0; j < 4; j++) win2[int'(ld_idx)/12][(int'(ld_idx)%12)*4+j] <= ld_pix[j];
    if (c1_v)
      for (int j = 0; j < 2; j++) cur1[int'(cl1_idx)/4][(int'(cl1_idx)%4)*2+j] <= c1_p[j];
    if (w1_v)
      for (int j = 0; j < 2; j++) win1[int'(wl1_idx)/12][(int'(wl1_idx)%12)*2+j] <= w1_p[j];
    if (c0_v) cur0[int'(cl0_idx)/4][int'(cl0_idx)%4] <= c0_p;
    if (w0_v) win0[int'(wl0_idx)/12][int'(wl0_idx)%12] <= w0_p;
  end

  // ------------------------------------------------------------------
  // control
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {S_IDLE, S_PASS, S_SCAN0, S_SCAN, S_WAIT, S_HALF, S_DONE} state_t;
  state_t     state;
  logic [2:0] hp;                     // half-pel neighbour
  logic [2:0] hr;                     // half-pel row pair
  logic [1:0] lvl;
  logic [2:0] pass;
  logic       cand;
  logic [3:0] t;
  logic [5:0] sidx;

  // comparator results
  sad_t c0_bs, c0_ss, c1_bs, c1_ss, c2_bs, c2_ss;
  mv_t  c0_bm, c0_sm, c1_bm, c1_sm, c2_bm, c2_sm;
  sad_t q_bs [4], q_ss [4];
  mv_t  q_bm [4], q_sm [4];

  function automatic logic signed [5:0] clampc(input logic signed [6:0] v,
                                                input logic signed [6:0] lim);
    if (v > lim)       return 6'(lim);
    else if (v < -lim) return 6'(-lim);
    else               return 6'(v);
  endfunction

  // tile centre and sub-block offset of each DAU in the current pass
  mv_t        ctr [2];
  logic [3:0] boy [2], box [2];   // sub-block offset in level pixels
  logic [1:0] bank [2];
  mv_t        base;

  always_comb begin
    base = cand ? c0_sm : c0_bm;
    for (int d = 0; d < 2; d++) begin
      ctr[d]  = '0;
      boy[d]  = '0;
      box[d]  = '0;
      bank[d] = '0;
      unique case (lvl)
        2'd0: begin
          ctr[d].y = pass[0] ? 6'sd2 : -6'sd2;
          ctr[d].x = (d == 1) ? 6'sd2 : -6'sd2;
        end
        2'd1: begin
          ctr[d].y = clampc({base.y, 1'b0}, 7'(R1-LSR));
          ctr[d].x = clampc({base.x, 1'b0}, 7'(R1-LSR));
          boy[d]   = pass[0] ? 4'd4 : 4'd0;
          box[d]   = (d == 1) ? 4'd4 : 4'd0;
          bank[d]  = {pass[0], 1'(d)};
        end
        default: begin
          ctr[d].y = clampc({c1_bm.y, 1'b0}, 7'(R2-LSR));
          ctr[d].x = clampc({c1_bm.x, 1'b0}, 7'(R2-LSR));
          boy[d]   = {pass[2:1], 2'b00};          // sub-block row 0..3
          box[d]   = {pass[0], 1'(d), 2'b00};     // sub-block column 0..3
          bank[d]  = {pass[2], pass[0]};
        end
      endcase
    end
  end

  // DAU drive
  logic       cur_we, sw_valid, sw_first;
  logic [1:0] cur_i;
  logic [2:0] sw_r;
  pixel_t     dcur [2][SUB];
  pixel_t     dpl  [2][SUB];
  pixel_t     dpr  [2][SUB];
  logic       dsv  [2];
  sad_t       dsad [2][NPOS];

  assign cur_we   = (state == S_PASS) && (t < 4'd4);
  assign cur_i    = t[1:0];
  assign sw_valid = (state == S_PASS) && (t >= 4'd4) && (t < 4'd12);
  assign sw_first = (state == S_PASS) && (t == 4'd4);
  assign sw_r     = 3'(t - 4'd4);

  always_comb begin
    for (int d = 0; d < 2; d++) begin
      int ry, rx, cy;
      cy = int'(boy[d]) + int'(cur_i);
      ry = int'(boy[d]) + int'(ctr[d].y) - LSR + int'(sw_r);
      rx = int'(box[d]) + int'(ctr[d].x) - LSR;
      for (int j = 0; j < SUB; j++) begin
        unique case (lvl)
          2'd0: begin
            dcur[d][j] = cur0[cy%4][j];
            dpl[d][j]  = win0[(ry+R0)%SW0][(rx+R0+j)%SW0];
            dpr[d][j]  = win0[(ry+R0)%SW0][(rx+R0+SUB+j)%SW0];
          end
          2'd1: begin
            dcur[d][j] = cur1[cy%8][(int'(box[d])+j)%8];
            dpl[d][j]  = win1[(ry+R1)%SW1][(rx+R1+j)%SW1];
            dpr[d][j]  = win1[(ry+R1)%SW1][(rx+R1+SUB+j)%SW1];
          end
          default: begin
            dcur[d][j] = cur2[cy%16][(int'(box[d])+j)%16];
            dpl[d][j]  = win2[(ry+R2)%SW2][(rx+R2+j)%SW2];
            dpr[d][j]  = win2[(ry+R2)%SW2][(rx+R2+SUB+j)%SW2];
          end
        endcase
      end
    end
  end

  for (genvar d = 0; d < 2; d++) begin : g_dau
    hmea_dau u_dau (
      .clk, .rst_n,
      .cur_we   (cur_we),
      .cur_idx  (cur_i),
      .cur_row  (dcur[d]),
      .sw_valid (sw_valid),
      .sw_first (sw_first),
      .pl       (dpl[d]),
      .pr       (dpr[d]),
      .sad_valid(dsv[d]),
      .sad      (dsad[d])
    );
  end

  // accumulator (block 1 / block 2)
  logic acc_clr, acc_add;
  sad_t quad  [4][NPOS];
  sad_t total [NPOS];
  assign acc_clr = (state == S_PASS) && (t == 4'd0) && (pass == 3'd0);
  assign acc_add = (state == S_PASS) && (t == 4'd12) && (lvl != 2'd0) && dsv[0];

  hmea_sad_accum u_acc (
    .clk, .rst_n,
    .clr   (acc_clr),
    .add_a (acc_add), .bank_a(bank[0]), .sad_a(dsad[0]),
    .add_b (acc_add), .bank_b(bank[1]), .sad_b(dsad[1]),
    .quad  (quad),
    .total (total)
  );

  // scan: one candidate per cycle into the comparators
  logic       sc0_v, sc_v, cmp_clr;
  logic [4:0] pidx;
  logic       sdau;
  sad_t       sc0_sad;
  mv_t        sc0_mv, sc_mv;

  assign sdau = (sidx >= 6'd25);
  assign pidx = sdau ? 5'(sidx - 6'd25) : 5'(sidx);

  always_comb begin
    sc0_sad  = dsad[sdau][pidx];
    sc0_mv.y = ctr[sdau].y + 6'(pidx / 5) - 6'sd2;
    sc0_mv.x = ctr[sdau].x + 6'(pidx % 5) - 6'sd2;
    sc_mv.y  = ctr[0].y + 6'(pidx / 5) - 6'sd2;
    sc_mv.x  = ctr[0].x + 6'(pidx % 5) - 6'sd2;
  end

  assign sc0_v   = (state == S_SCAN0);
  assign sc_v    = (state == S_SCAN);
  assign cmp_clr = (state == S_IDLE) && start;

  hmea_comparator u_cmp0 (
    .clk, .rst_n, .clr(cmp_clr), .valid(sc0_v), .sad(sc0_sad), .mv(sc0_mv),
    .best_sad(c0_bs), .best_mv(c0_bm), .second_sad(c0_ss), .second_mv(c0_sm)
  );

  hmea_comparator u_cmp1 (
    .clk, .rst_n, .clr(cmp_clr), .valid(sc_v && lvl == 2'd1),
    .sad(total[pidx]), .mv(sc_mv),
    .best_sad(c1_bs), .best_mv(c1_bm), .second_sad(c1_ss), .second_mv(c1_sm)
  );

  hmea_comparator u_cmp2 (
    .clk, .rst_n, .clr(cmp_clr), .valid(sc_v && lvl == 2'd2),
    .sad(total[pidx]), .mv(sc_mv),
    .best_sad(c2_bs), .best_mv(c2_bm), .second_sad(c2_ss), .second_mv(c2_sm)
  );

  for (genvar q = 0; q < 4; q++) begin : g_q
    hmea_comparator u_cmpq (
      .clk, .rst_n, .clr(cmp_clr), .valid(sc_v && lvl == 2'd2),
      .sad(quad[q][pidx]), .mv(sc_mv),
      .best_sad(q_bs[q]), .best_mv(q_bm[q]), .second_sad(q_ss[q]), .second_mv(q_sm[q])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lvl   <= '0;
      pass  <= '0;
      cand  <= 1'b0;
      t     <= '0;
      sidx  <= '0;
      hp    <= '0;
      hr    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_PASS;
          lvl   <= 2'd0;
          pass  <= '0;
          cand  <= 1'b0;
          t     <= '0;
        end
        S_PASS: begin
          if (t != 4'd12) t <= t + 4'd1;
          else if (lvl == 2'd0) begin
            state <= S_SCAN0;
            sidx  <= '0;
          end else if ((lvl == 2'd1 && pass == 3'd1) || pass == 3'd7) begin
            state <= S_SCAN;
            sidx  <= '0;
          end else begin
            pass <= pass + 3'd1;
            t    <= '0;
          end
        end
        S_SCAN0: begin
          if (sidx != 6'd49) sidx <= sidx + 6'd1;
          else if (pass == 3'd0) begin
            state <= S_PASS;
            pass  <= 3'd1;
            t     <= '0;
          end else
            state <= S_WAIT;
        end
        S_SCAN: begin
          if (sidx != 6'd24) sidx <= sidx + 6'd1;
          else if (lvl == 2'd1 && !cand) begin
            state <= S_PASS;
            cand  <= 1'b1;
            pass  <= '0;
            t     <= '0;
          end else
            state <= S_WAIT;
        end
        S_WAIT: begin
          // comparator results settle; move to the next level
          if (lvl == 2'd2) begin
            state <= S_HALF;
            hp    <= '0;
            hr    <= '0;
          end else begin
            state <= S_PASS;
            lvl   <= lvl + 2'd1;
            cand  <= 1'b0;
            pass  <= '0;
            t     <= '0;
          end
        end
        S_HALF: begin
          hr <= hr + 3'd1;
          if (hr == 3'd7) begin
            hp <= hp + 3'd1;
            if (hp == 3'd7) state <= S_DONE;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // half-pel refinement: the 8 neighbours of the integer vector, two
  // 16-pixel rows per cycle (hp = neighbour, hr = row pair)
  // ------------------------------------------------------------------
  logic signed [1:0] hy, hx;          // half-pel offset of neighbour hp
  logic signed [6:0] hvy, hvx;        // candidate vector in half pels
  logic       h_ok;                   // candidate inside -32..+31
  sad_t       h_acc, h_row, h_sum;
  sad_t       hb_sad;
  hmv_t       hb_mv;

  always_comb begin
    automatic int n = int'(hp) + (hp >= 3'd4 ? 1 : 0);   // skip the centre
    automatic int y0, x0, y1, x1;
    automatic int sum;
    hy  = 2'(n / 3 - 1);
    hx  = 2'(n % 3 - 1);
    hvy = 7'({c2_bm.y, 1'b0}) + 7'(hy);
    hvx = 7'({c2_bm.x, 1'b0}) + 7'(hx);
    h_ok = (hvy >= -7'sd32) && (hvy <= 7'sd31) && (hvx >= -7'sd32) && (hvx <= 7'sd31);
    x0 = 16 + int'(c2_bm.x) + (hx < 0 ? -1 : 0);
    x1 = x0 + (hx != 0 ? 1 : 0);
    // rows/columns of a rejected neighbour may leave the window: clamp
    // the reads (the result is discarded)
    x0 = (x0 < 0) ? 0 : ((x0 > 32) ? 32 : x0);
    x1 = (x1 < 0) ? 0 : ((x1 > 32) ? 32 : x1);
    sum = 0;
    for (int rr = 0; rr < 2; rr++) begin
      automatic int row = 2 * int'(hr) + rr;
      y0 = 16 + int'(c2_bm.y) + row + (hy < 0 ? -1 : 0);
      y1 = y0 + (hy != 0 ? 1 : 0);
      y0 = (y0 < 0) ? 0 : ((y0 > 47) ? 47 : y0);
      y1 = (y1 < 0) ? 0 : ((y1 > 47) ? 47 : y1);
      for (int j = 0; j < MB; j++) begin
        automatic int v = (int'(win2[y0][x0+j]) + int'(win2[y0][x1+j]) +
                           int'(win2[y1][x0+j]) + int'(win2[y1][x1+j]) + 2) / 4;
        automatic int d = int'(cur2[row][j]) - v;
        sum += (d < 0) ? -d : d;
      end
    end
    h_row = sad_t'(sum);
    h_sum = ((hr == 3'd0) ? '0 : h_acc) + h_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_acc  <= '0;
      hb_sad <= SAD_MAX;
      hb_mv  <= '0;
    end else if (state == S_HALF) begin
      h_acc <= h_sum;
      if (hr == 3'd7) begin
        // the integer result is the starting best; strict improvement only
        if (h_ok && h_sum < ((hp == 3'd0) ? c2_bs : hb_sad)) begin
          hb_sad <= h_sum;
          hb_mv  <= '{y: hvy, x: hvx};
        end else if (hp == 3'd0) begin
          hb_sad <= c2_bs;
          hb_mv  <= '{y: 7'({c2_bm.y, 1'b0}), x: 7'({c2_bm.x, 1'b0})};
        end
      end
    end
  end

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);
  assign mv_mb   = c2_bm;
  assign sad_mb  = c2_bs;
  assign mv_8x8  = q_bm;
  assign sad_8x8 = q_bs;
  assign mv_l0   = '{c0_bm, c0_sm};
  assign mv_l1   = c1_bm;
  assign mv_half = hb_mv;
  assign sad_half = hb_sad;

endmodule
