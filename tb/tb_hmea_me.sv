// tb_hmea_me -- self-checking test of the hierarchical motion estimation
// engine.  Each trial builds a random textured 48x48 search window, cuts the
// current macroblock out of it at a chosen displacement (optionally adding
// noise), loads both through the pixel port, runs the search and compares
// the macroblock vector and SAD, the two level-0 candidates, the level-1
// vector, the four 8x8 vectors and the half-pel vector and SAD with the
// behavioural model.  The fixed noise-free trials on the smooth window
// must also recover the planted displacement with SAD 0 (and the half-pel
// result must stay on it, since nothing beats SAD 0); the random trials
// add noise and are checked against the model only (a fast search may miss the true motion).  The
// `done` must rise 425 clock edges after the edge that samples `start`.
`timescale 1ns/1ps
module tb_hmea_me;
  import hmea_pkg::*;
  import hmea_model_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   ld_valid = 0, ld_win = 0, ld_sof = 0, start = 0;
  pixel_t ld_pix [4];
  logic   busy, done;
  mv_t    mv_mb, mv_l1;
  sad_t   sad_mb;
  mv_t    mv_8x8 [4], mv_l0 [2];
  sad_t   sad_8x8 [4];
  hmv_t   mv_half;
  sad_t   sad_half;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmea_me dut (.*);

  int c [16][16];
  int w [48][48];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load();
    for (int b = 0; b < 64; b++) begin
      @(negedge clk);
      ld_valid = 1; ld_win = 0; ld_sof = (b == 0);
      for (int j = 0; j < 4; j++) ld_pix[j] = pixel_t'(c[b/4][(b%4)*4+j]);
    end
    for (int b = 0; b < 576; b++) begin
      @(negedge clk);
      ld_valid = 1; ld_win = 1; ld_sof = (b == 0);
      for (int j = 0; j < 4; j++) ld_pix[j] = pixel_t'(w[b/12][(b%12)*4+j]);
    end
    @(negedge clk);
    ld_valid = 0; ld_sof = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic trial(input int dy, input int dx, input int noise, input int smooth);
    me_result_t r;
    int cyc;
    // window: a smooth bowl with fixed fine detail, or random pixels
    for (int i = 0; i < 48; i++)
      for (int j = 0; j < 48; j++)
        w[i][j] = smooth ? (((i - 20) * (i - 20) + 2 * (j - 26) * (j - 26)) / 8 + (i * 7 + j * 13) % 4) % 256
                         : $urandom_range(0, 255);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int v = w[16+i+dy][16+j+dx] + (noise ? $urandom_range(0, 2*noise) - noise : 0);
        c[i][j] = (v < 0) ? 0 : ((v > 255) ? 255 : v);
      end
    load();
    r = hmea(c, w);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 425, $sformatf("cycles %0d != 425", cyc));
    check(int'(mv_half.y) == r.h_y && int'(mv_half.x) == r.h_x && int'(sad_half) == r.h_sad,
          $sformatf("half-pel (%0d,%0d) sad %0d model (%0d,%0d) sad %0d", int'(mv_half.y),
                    int'(mv_half.x), sad_half, r.h_y, r.h_x, r.h_sad));
    check(int'(mv_mb.y) == r.mv_y && int'(mv_mb.x) == r.mv_x,
          $sformatf("mv (%0d,%0d) model (%0d,%0d)", int'(mv_mb.y), int'(mv_mb.x), r.mv_y, r.mv_x));
    check(int'(sad_mb) == r.sad, $sformatf("sad %0d model %0d", sad_mb, r.sad));
    check(int'(mv_l0[0].y) == r.l0_y[0] && int'(mv_l0[0].x) == r.l0_x[0] &&
          int'(mv_l0[1].y) == r.l0_y[1] && int'(mv_l0[1].x) == r.l0_x[1], "level-0 candidates");
    check(int'(mv_l1.y) == r.l1_y && int'(mv_l1.x) == r.l1_x, "level-1 vector");
    for (int q = 0; q < 4; q++)
      check(int'(mv_8x8[q].y) == r.q_y[q] && int'(mv_8x8[q].x) == r.q_x[q] &&
            int'(sad_8x8[q]) == r.q_sad[q], $sformatf("8x8 quadrant %0d", q));
    if (!noise && smooth) begin
      check(int'(mv_mb.y) == dy && int'(mv_mb.x) == dx && sad_mb == 0,
            $sformatf("planted (%0d,%0d) found (%0d,%0d) sad %0d", dy, dx, int'(mv_mb.y), int'(mv_mb.x), sad_mb));
      check(int'(mv_half.y) == 2*dy && int'(mv_half.x) == 2*dx && sad_half == 0, "planted half-pel");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    trial(0, 0, 0, 1);
    trial(3, -5, 0, 1);
    trial(-12, 9, 0, 1);
    trial(16, -16, 0, 1);
    trial(-7, 14, 6, 1);
    trial(5, 2, 0, 0);
    for (int k = 0; k < 40; k++)
      trial($urandom_range(0, 32) - 16, $urandom_range(0, 32) - 16, $urandom_range(1, 8), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
