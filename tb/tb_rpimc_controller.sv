// tb_rpimc_controller -- self-checking test of the co-processor controller.
//   * overlapping memory regions and a clock too slow for the load must be
//     rejected (controller stays idle, reject flag set);
//   * with a valid 64x32 configuration (8 macroblocks), IFPS 30 and OFPS 15,
//     every second input frame is coded; GOP_LEN is 3 so the coded frames go
//     intra, inter, inter, intra, ...;
//   * each stage must see every macroblock once, in raster order, MU only in
//     inter frames, and the stages must overlap as the pipeline prescribes
//     (in slot k: MU k, TCE k-1, BG k-2 for inter; TCE k, BG k-1 for intra);
//   * MEM1/MEM2 roles must follow the ping-pong table, OSIZE must equal the
//     sum of the BG byte counts, `irq` must pulse once per coded frame and
//     `clk_en` must be low while sleeping.
// The stage models answer `done` a random 1..6 cycles after `start`.
`timescale 1ns/1ps
module tb_rpimc_controller;
  import rpimc_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0, frame_ready = 0;
  rpimc_cfg_t cfg;
  logic mu_start, tce_start, bg_start, mu_done = 0, tce_done = 0, bg_done = 0;
  logic [7:0] mu_mbx, mu_mby, tce_mbx, tce_mby, bg_mbx, bg_mby;
  logic tce_intra;
  logic [15:0] bg_bytes = 0;
  logic [31:0] cur_base, ref_base, osize;
  rpimc_state_t state_o;
  logic reject, inter, irq, clk_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rpimc_controller #(.C_BLOCK(1200), .GOP_LEN(3)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stage models
  int mu_n, tce_n, bg_n, irq_n, bytes_sum, sleep_bad;
  task automatic responder(ref logic done_sig, input int which);
    int d = $urandom_range(1, 6);
    repeat (d) @(posedge clk);
    #1 done_sig = 1;
    if (which == 2) bg_bytes = 16'($urandom_range(1, 500));
    @(posedge clk);
    #1 done_sig = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (mu_start) begin
      chk(inter, "MU started in an intra frame");
      chk(mu_mbx == 8'(mu_n % 4) && mu_mby == 8'(mu_n / 4), "MU raster order");
      mu_n++;
      fork responder(mu_done, 0); join_none
    end
    if (tce_start) begin
      chk(tce_mbx == 8'(tce_n % 4) && tce_mby == 8'(tce_n / 4), $sformatf("TCE raster order %0d", tce_n));
      chk(tce_intra == !inter, "tce_intra");
      if (inter) chk(mu_n + (mu_start ? 0 : 0) == ((tce_n + 2 < N) ? tce_n + 2 : N), "MU leads TCE by one slot");
      tce_n++;
      fork responder(tce_done, 1); join_none
    end
    if (bg_start) begin
      chk(bg_mbx == 8'(bg_n % 4) && bg_mby == 8'(bg_n / 4), $sformatf("BG raster order %0d", bg_n));
      chk(tce_n == ((bg_n + 2 < N) ? bg_n + 2 : N), "TCE leads BG by one slot");
      bg_n++;
      fork begin
        responder(bg_done, 2);
      end join_none
    end
    if (bg_done) bytes_sum += int'(bg_bytes);
    if (irq) irq_n++;
    if (state_o == ST_SLEEP && clk_en) sleep_bad++;
  end

  task automatic one_frame(input bit coded, input bit exp_inter,
                           input logic [31:0] exp_cur, input logic [31:0] exp_ref);
    int t;
    mu_n = 0; tce_n = 0; bg_n = 0; bytes_sum = 0;
    @(negedge clk); frame_ready = 1;
    @(negedge clk); frame_ready = 0;
    if (!coded) begin
      repeat (20) @(negedge clk);
      chk(state_o == ST_SLEEP && tce_n == 0, "skipped frame not coded");
      return;
    end
    t = 0;
    while (state_o != ST_FINISH && t < 2000) begin @(negedge clk); t++; end
    chk(irq, "irq at finish");
    chk(inter == exp_inter, $sformatf("frame type inter=%0d", inter));
    chk(cur_base == exp_cur && ref_base == exp_ref, "MEM1/MEM2 roles");
    chk(tce_n == N && bg_n == N && mu_n == (exp_inter ? N : 0), "stage counts");
    @(negedge clk);
    chk(osize == 32'(bytes_sum), "OSIZE");
  endtask

  localparam logic [31:0] M1 = 32'h1000_0000, M2 = 32'h1001_0000, MO = 32'h2000_0000;

  initial begin
    cfg = '0;
    cfg.w = 64; cfg.h = 32; cfg.isize = 64*32*3/2; cfg.ifps = 30; cfg.ofps = 15;
    cfg.clock = 20_000_000; cfg.mem1 = M1; cfg.mem2 = M1 + 100; cfg.out = MO;
    irq_n = 0; sleep_bad = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // overlapping regions
    cfg.enable = 1;
    repeat (4) @(negedge clk);
    chk(reject && state_o == ST_IDLE, "overlap rejected");
    cfg.enable = 0; repeat (3) @(negedge clk);
    // overload: 1200 * 8 * 30 = 288000 cycles/s > 200000
    cfg.mem2 = M2; cfg.clock = 200_000; cfg.enable = 1;
    repeat (4) @(negedge clk);
    chk(reject && state_o == ST_IDLE, "overload rejected");
    cfg.enable = 0; repeat (3) @(negedge clk);
    cfg.clock = 288_000; cfg.enable = 1;
    repeat (4) @(negedge clk);
    chk(!reject && state_o == ST_SLEEP && !clk_en, "accepted, sleeping");
    // frames: skip, intra, skip, inter1, skip, inter2, skip, intra, skip, inter1
    one_frame(0, 0, 0, 0);
    one_frame(1, 0, M1, M2);
    one_frame(0, 0, 0, 0);
    one_frame(1, 1, M1, M2);
    one_frame(0, 0, 0, 0);
    one_frame(1, 1, M2, M1);
    one_frame(0, 0, 0, 0);
    one_frame(1, 0, M1, M2);
    one_frame(0, 0, 0, 0);
    one_frame(1, 1, M1, M2);
    chk(irq_n == 5, $sformatf("irq count %0d", irq_n));
    chk(sleep_bad == 0, "clk_en low while sleeping");
    cfg.enable = 0;
    repeat (3) @(negedge clk);
    chk(state_o == ST_IDLE, "disable returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
