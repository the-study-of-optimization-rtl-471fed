// hmea_model_pkg -- behavioural reference of the hierarchical motion search,
// written directly from the algorithm (2x2 mean pyramid, level-0 full search
// of -4..+4 keeping two candidates, +/-2 refinements at levels 1 and 2 with
// clamped centres, then a half-pel refinement).  Used by the testbenches
// to compute expected vectors and SADs independently of the RTL datapath.
// Candidates are visited in the order the engine visits them so that ties
// resolve the same way.
package hmea_model_pkg;

  typedef struct {
    int mv_y, mv_x, sad;
    int q_y[4], q_x[4], q_sad[4];
    int l0_y[2], l0_x[2];
    int l1_y, l1_x;
    int h_y, h_x, h_sad;     // half-pel result, in half-pel units
  } me_result_t;

  typedef int img16_t [16][16];
  typedef int img48_t [48][48];

  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // SAD of the n x n block at level l for displacement (dy,dx); quadrant
  // q >= 0 restricts the sum to one 8x8 quadrant of the level-2 block.
  function automatic int sad_at(input img16_t c, input img48_t w,
                                int n, int off, int dy, int dx, int q);
    int s = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        if (q >= 0 && ((i / 8) != (q / 2) || (j / 8) != (q % 2))) continue;
        s += iabs(c[i][j] - w[off+i+dy][off+j+dx]);
      end
    return s;
  endfunction

  // one 2x2 mean level: in is n x n (top-left corner used), out n/2 x n/2
  function automatic void down16(input img16_t in, input int n, output img16_t out);
    out = in;
    for (int i = 0; i < n/2; i++)
      for (int j = 0; j < n/2; j++)
        out[i][j] = (in[2*i][2*j] + in[2*i][2*j+1] + in[2*i+1][2*j] + in[2*i+1][2*j+1]) >> 2;
  endfunction

  function automatic void down48(input img48_t in, input int n, output img48_t out);
    out = in;
    for (int i = 0; i < n/2; i++)
      for (int j = 0; j < n/2; j++)
        out[i][j] = (in[2*i][2*j] + in[2*i][2*j+1] + in[2*i+1][2*j] + in[2*i+1][2*j+1]) >> 2;
  endfunction

  function automatic me_result_t hmea(input img16_t c2, input img48_t w2);
    me_result_t r;
    img16_t c1, c0;
    img48_t w1, w0;
    int bs, ss, by, bx, sy, sx;
    int cy, cx, s;
    int tiles_y[4] = '{-2, -2, 2, 2};
    int tiles_x[4] = '{-2, 2, -2, 2};
    down16(c2, 16, c1); down16(c1, 8, c0);
    down48(w2, 48, w1); down48(w1, 24, w0);
    // level 0: two least over -4..+4 (tiles in engine order)
    bs = 32'h7fffffff; ss = 32'h7fffffff; by = 0; bx = 0; sy = 0; sx = 0;
    for (int t = 0; t < 4; t++)
      for (int p = 0; p < 25; p++) begin
        int dy = tiles_y[t] + p / 5 - 2;
        int dx = tiles_x[t] + p % 5 - 2;
        s = sad_at(c0, w0, 4, 4, dy, dx, -1);
        if (s < bs) begin
          if (!(dy == by && dx == bx) || bs == 32'h7fffffff) begin ss = bs; sy = by; sx = bx; end
          bs = s; by = dy; bx = dx;
        end else if (s < ss && !(dy == by && dx == bx)) begin
          ss = s; sy = dy; sx = dx;
        end
      end
    r.l0_y[0] = by; r.l0_x[0] = bx; r.l0_y[1] = sy; r.l0_x[1] = sx;
    // level 1: +/-2 around twice each candidate, best overall
    bs = 32'h7fffffff; by = 0; bx = 0;
    for (int n = 0; n < 2; n++) begin
      cy = clampi(2 * r.l0_y[n], 6); cx = clampi(2 * r.l0_x[n], 6);
      for (int p = 0; p < 25; p++) begin
        int dy = cy + p / 5 - 2, dx = cx + p % 5 - 2;
        s = sad_at(c1, w1, 8, 8, dy, dx, -1);
        if (s < bs) begin bs = s; by = dy; bx = dx; end
      end
    end
    r.l1_y = by; r.l1_x = bx;
    // level 2
    cy = clampi(2 * by, 14); cx = clampi(2 * bx, 14);
    bs = 32'h7fffffff;
    for (int q = 0; q < 4; q++) r.q_sad[q] = 32'h7fffffff;
    for (int p = 0; p < 25; p++) begin
      int dy = cy + p / 5 - 2, dx = cx + p % 5 - 2;
      s = sad_at(c2, w2, 16, 16, dy, dx, -1);
      if (s < bs) begin bs = s; r.mv_y = dy; r.mv_x = dx; end
      for (int q = 0; q < 4; q++) begin
        s = sad_at(c2, w2, 16, 16, dy, dx, q);
        if (s < r.q_sad[q]) begin r.q_sad[q] = s; r.q_y[q] = dy; r.q_x[q] = dx; end
      end
    end
    r.sad = bs;
    // half-pel refinement: the 8 half-pel neighbours of the integer vector,
    // bilinear interpolation rounded up at .5, vector kept in -32..+31 half
    // pels; a neighbour replaces the current best only if strictly better
    r.h_y = 2 * r.mv_y; r.h_x = 2 * r.mv_x; r.h_sad = r.sad;
    for (int p = 0; p < 9; p++) begin
      int hy = p / 3 - 1, hx = p % 3 - 1;
      int vy = 2 * r.mv_y + hy, vx = 2 * r.mv_x + hx;
      if (p == 4 || vy < -32 || vy > 31 || vx < -32 || vx > 31) continue;
      s = 0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int y0 = 16 + r.mv_y + i + (hy < 0 ? -1 : 0), x0 = 16 + r.mv_x + j + (hx < 0 ? -1 : 0);
          int y1 = y0 + (hy != 0 ? 1 : 0), x1 = x0 + (hx != 0 ? 1 : 0);
          int v = (w2[y0][x0] + w2[y0][x1] + w2[y1][x0] + w2[y1][x1] + 2) / 4;
          s += iabs(c2[i][j] - v);
        end
      if (s < r.h_sad) begin r.h_sad = s; r.h_y = vy; r.h_x = vx; end
    end
    return r;
  endfunction

endpackage
