// tb_hmea_dau -- self-checking test of the difference accumulation unit.
// Random 4x4 blocks and 8x8 search areas are streamed in; the 25 SADs are
// compared with sums computed here, the result must appear exactly one
// cycle after the eighth search row, and back-to-back passes (new search
// area right after the previous one) must also be correct.
`timescale 1ns/1ps
module tb_hmea_dau;
  import hmea_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       cur_we = 0, sw_valid = 0, sw_first = 0;
  logic [1:0] cur_idx = 0;
  pixel_t     cur_row [SUB];
  pixel_t     pl [SUB], pr [SUB];
  logic       sad_valid;
  sad_t       sad [NPOS];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmea_dau dut (.*);

  int c [4][4];
  int s [8][8];

  task automatic pass(input bit newcur);
    int e;
    if (newcur) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) c[i][j] = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        cur_we = 1; cur_idx = 2'(i);
        for (int j = 0; j < 4; j++) cur_row[j] = pixel_t'(c[i][j]);
      end
      @(negedge clk); cur_we = 0;
    end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) s[i][j] = $urandom_range(0, 255);
    for (int r = 0; r < 8; r++) begin
      if (r > 0 || newcur) @(negedge clk);
      sw_valid = 1; sw_first = (r == 0);
      for (int j = 0; j < 4; j++) begin pl[j] = pixel_t'(s[r][j]); pr[j] = pixel_t'(s[r][j+4]); end
    end
    @(negedge clk);
    sw_valid = 0; sw_first = 0;
    checks++;
    if (!sad_valid) begin failures++; $display("FAIL: sad_valid not one cycle after row 7"); end
    for (int dy = 0; dy < 5; dy++)
      for (int dx = 0; dx < 5; dx++) begin
        e = 0;
        for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          int d = c[i][j] - s[i+dy][j+dx];
          e += (d < 0) ? -d : d;
        end
        checks++;
        if (int'(sad[dy*5+dx]) != e) begin
          failures++;
          $display("FAIL: sad[%0d][%0d]=%0d expected %0d", dy, dx, sad[dy*5+dx], e);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) pass(1);
    for (int k = 0; k < 3; k++) pass(0);
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
