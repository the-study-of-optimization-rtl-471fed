// tb_hmea_comparator -- self-checking test of the two-least comparator.
// Random candidate streams (with repeated vectors and ties) are offered and
// the best and second best entries are compared with a reference kept here:
// best = first strictly smallest SAD, second = first strictly smallest SAD
// among the remaining distinct vectors.
`timescale 1ns/1ps
module tb_hmea_comparator;
  import hmea_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  sad_t sad, best_sad, second_sad;
  mv_t  mv, best_mv, second_mv;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmea_comparator dut (.*);

  task automatic run(input int n, input int sad_max);
    int sads [64];
    int vy [64], vx [64];
    int b, s2;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int k = 0; k < n; k++) begin
      vy[k] = $urandom_range(0, 4) - 2;
      vx[k] = $urandom_range(0, 4) - 2;
      // a repeated vector always carries the same SAD, as in the engine
      sads[k] = $urandom_range(0, sad_max);
      for (int m = 0; m < k; m++)
        if (vy[m] == vy[k] && vx[m] == vx[k]) sads[k] = sads[m];
      valid = 1; sad = sad_t'(sads[k]); mv.y = 6'(vy[k]); mv.x = 6'(vx[k]);
      @(negedge clk);
    end
    valid = 0;
    @(negedge clk);
    b = 0;
    for (int k = 1; k < n; k++) if (sads[k] < sads[b]) b = k;
    s2 = -1;
    for (int k = 0; k < n; k++)
      if (!(vy[k] == vy[b] && vx[k] == vx[b]) && (s2 < 0 || sads[k] < sads[s2])) s2 = k;
    checks += 2;
    if (int'(best_sad) != sads[b] || int'(best_mv.y) != vy[b] || int'(best_mv.x) != vx[b]) begin
      failures++; $display("FAIL: best %0d expected %0d", best_sad, sads[b]);
    end
    if (s2 >= 0 && (int'(second_sad) != sads[s2] || int'(second_mv.y) != vy[s2] || int'(second_mv.x) != vx[s2])) begin
      failures++; $display("FAIL: second %0d expected %0d", second_sad, sads[s2]);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) run($urandom_range(2, 50), (k % 2) ? 20 : 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
