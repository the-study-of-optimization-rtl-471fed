// tb_hmea_sad_accum -- self-checking test of the SAD accumulator.  Random
// passes are added through both ports (sometimes into the same bank in the
// same cycle) and every bank word and every total is compared with sums
// kept here; `clr` must empty all banks.
`timescale 1ns/1ps
module tb_hmea_sad_accum;
  import hmea_pkg::*;

  logic       clk = 0, rst_n = 0, clr = 0, add_a = 0, add_b = 0;
  logic [1:0] bank_a = 0, bank_b = 0;
  sad_t       sad_a [NPOS], sad_b [NPOS];
  sad_t       quad [4][NPOS];
  sad_t       total [NPOS];
  int         checks = 0, failures = 0;
  int         ref_q [4][NPOS];

  always #5 clk = ~clk;

  hmea_sad_accum dut (.*);

  task automatic compare();
    for (int q = 0; q < 4; q++)
      for (int p = 0; p < NPOS; p++) begin
        checks++;
        if (int'(quad[q][p]) != ref_q[q][p]) begin
          failures++; $display("FAIL: quad[%0d][%0d]=%0d expected %0d", q, p, quad[q][p], ref_q[q][p]);
        end
      end
    for (int p = 0; p < NPOS; p++) begin
      checks++;
      if (int'(total[p]) != ref_q[0][p] + ref_q[1][p] + ref_q[2][p] + ref_q[3][p]) begin
        failures++; $display("FAIL: total[%0d]", p);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int q = 0; q < 4; q++) for (int p = 0; p < NPOS; p++) ref_q[q][p] = 0;
      compare();
      for (int k = 0; k < 8; k++) begin
        add_a = 1'($urandom_range(0, 1)); add_b = 1'($urandom_range(0, 1));
        bank_a = 2'($urandom_range(0, 3));
        bank_b = (k % 3 == 0) ? bank_a : 2'($urandom_range(0, 3));
        for (int p = 0; p < NPOS; p++) begin
          sad_a[p] = sad_t'($urandom_range(0, 4080));
          sad_b[p] = sad_t'($urandom_range(0, 4080));
          if (add_a) ref_q[bank_a][p] += int'(sad_a[p]);
          if (add_b) ref_q[bank_b][p] += int'(sad_b[p]);
        end
        @(negedge clk);
        add_a = 0; add_b = 0;
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
