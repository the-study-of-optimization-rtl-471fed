// Body shared by the end-to-end testbenches of rpimc_top.  The including
// module defines W, H, NMBX, NMBY, N, DY, DX, M1, M2, MO, MEMSZ, CLK_HZ and
// FRAMES.

  logic        clk = 0, rst_n = 0;
  logic        reg_wr = 0;
  logic [3:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        frame_ready = 0, irq, clk_en;
  logic        mem_req, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  logic        tce_start, tce_intra, tce_done = 0;
  logic [7:0]  tce_mbx, tce_mby, bg_mbx, bg_mby, mu_mbx, mu_mby;
  logic        bg_start, bg_done = 0;
  logic [15:0] bg_bytes = 0;
  logic        mv_valid;
  mv_t         mv_mb;
  sad_t        sad_mb;
  hmv_t        mv_half;
  sad_t        sad_half;
  mv_t         mv_8x8 [4];
  sad_t        sad_8x8 [4];
  logic [31:0] cur_base, ref_base;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  rpimc_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- off-chip memory model ----------------
  byte unsigned mem [MEMSZ];
  int q_addr [$];
  int q_due  [$];
  int cyc = 0, n_stall = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) mem_gnt = ($urandom_range(0, 9) != 0);

  always @(posedge clk) if (rst_n) begin
    if (mem_req && !mem_gnt) n_stall++;
    if (mem_req && mem_gnt) begin
      q_addr.push_back(int'(mem_addr));
      q_due.push_back(cyc + $urandom_range(2, 6));
    end
  end

  // in-order returns: the head returns when due
  always @(negedge clk) begin
    mem_rvalid = 0;
    if (q_addr.size() > 0 && q_due[0] <= cyc) begin
      automatic int a = q_addr.pop_front();
      void'(q_due.pop_front());
      mem_rvalid = 1;
      mem_rdata  = {mem[a+3], mem[a+2], mem[a+1], mem[a]};
    end
  end

  // ---------------- TCE / BG stand-ins ----------------
  int bytes_sum = 0, irq_n = 0, n_sleep = 0;
  // monitors ignore the reset period, when outputs are not yet defined
  always @(posedge clk) if (rst_n) begin
    if (tce_start) fork begin
      repeat ($urandom_range(3, 40)) @(posedge clk);
      #1 tce_done = 1; @(posedge clk); #1 tce_done = 0;
    end join_none
    if (bg_start) fork begin
      repeat ($urandom_range(3, 40)) @(posedge clk);
      #1 bg_done = 1; bg_bytes = 16'($urandom_range(10, 300)); @(posedge clk); #1 bg_done = 0;
    end join_none
    if (bg_done) bytes_sum += int'(bg_bytes);
    if (irq) irq_n++;
    if (!clk_en) n_sleep++;
  end

  // ---------------- pictures ----------------
  function automatic int texel(int i, int j);
    // product of two triangle waves (periods 40 and 56 pixels, longer than
    // the search range), values 0..236
    int ta = (i + 400) % 40, tb = (j + 560) % 56;
    ta = (ta > 20) ? 40 - ta : ta;
    tb = (tb > 28) ? 56 - tb : tb;
    return (ta * tb) / 4 + 2 * ta + 2 * tb;
  endfunction

  // frame k: texel shifted by k*(DY,DX), so frame k = frame k-1 displaced by (-DY,-DX)
  function automatic int pix(int k, int i, int j);
    return texel(i - k * DY, j - k * DX);
  endfunction

  task automatic write_frame(input int k, input logic [31:0] base);
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) mem[int'(base) + i*W + j] = byte'(pix(k, i, j));
  endtask

  // ---------------- expected vectors ----------------
  int cur_k, ref_k;
  int n_mv = 0, n_edge_l = 0, n_edge_r = 0, n_edge_t = 0, n_edge_b = 0;
  img16_t mc;
  img48_t mw;

  always @(posedge clk) if (rst_n) begin
    if (mv_valid) begin
      automatic int bx = int'(mu_mbx), by = int'(mu_mby);
      automatic me_result_t r;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) mc[i][j] = pix(cur_k, by*16 + i, bx*16 + j);
      for (int i = 0; i < 48; i++)
        for (int c = 0; c < 12; c++)
          for (int j = 0; j < 4; j++) begin
            automatic int y = by*16 - 16 + i, x0 = bx*16 - 16 + 4*c;
            if (y < 0) y = 0;
            if (y > H - 1) y = H - 1;
            if (x0 < 0)          mw[i][4*c+j] = pix(ref_k, y, 0);
            else if (x0 > W - 4) mw[i][4*c+j] = pix(ref_k, y, W - 1);
            else                 mw[i][4*c+j] = pix(ref_k, y, x0 + j);
          end
      r = hmea(mc, mw);
      chk(int'(mv_mb.y) == r.mv_y && int'(mv_mb.x) == r.mv_x && int'(sad_mb) == r.sad,
          $sformatf("MB (%0d,%0d): mv (%0d,%0d) sad %0d, model (%0d,%0d) sad %0d", bx, by,
                    int'(mv_mb.y), int'(mv_mb.x), sad_mb, r.mv_y, r.mv_x, r.sad));
      chk(int'(mv_half.y) == r.h_y && int'(mv_half.x) == r.h_x && int'(sad_half) == r.h_sad,
          $sformatf("MB (%0d,%0d): half-pel (%0d,%0d) sad %0d, model (%0d,%0d) sad %0d", bx, by,
                    int'(mv_half.y), int'(mv_half.x), sad_half, r.h_y, r.h_x, r.h_sad));
      for (int q = 0; q < 4; q++)
        chk(int'(mv_8x8[q].y) == r.q_y[q] && int'(mv_8x8[q].x) == r.q_x[q] &&
            int'(sad_8x8[q]) == r.q_sad[q], "8x8 vector");
      if (bx > 0 && bx < NMBX - 1 && by > 0 && by < NMBY - 1)
        chk(int'(mv_mb.y) == (ref_k - cur_k) * DY && int'(mv_mb.x) == (ref_k - cur_k) * DX && sad_mb == 0,
            $sformatf("interior MB (%0d,%0d) true motion: got (%0d,%0d) sad %0d l0 (%0d,%0d)/(%0d,%0d) l1 (%0d,%0d)", bx, by, int'(mv_mb.y), int'(mv_mb.x), sad_mb, r.l0_y[0], r.l0_x[0], r.l0_y[1], r.l0_x[1], r.l1_y, r.l1_x));
      if (bx == 0) n_edge_l++;
      if (bx == NMBX - 1) n_edge_r++;
      if (by == 0) n_edge_t++;
      if (by == NMBY - 1) n_edge_b++;
      n_mv++;
    end
  end

  // ---------------- host ----------------
  task automatic wr(input reg_addr_t a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic rd(input reg_addr_t a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  int n_reject = 0, n_skip = 0, n_intra = 0, n_inter = 0, n_swap = 0;

  initial begin
    logic [31:0] d;
    int coded, t, last_k, k_in, mv_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(REG_W, W); wr(REG_H, H); wr(REG_ISIZE, W*H*3/2);
    wr(REG_IFPS, 30); wr(REG_OFPS, 15); wr(REG_BITRATE, 64000);
    wr(REG_CLOCK, CLK_HZ);
    wr(REG_MEM1, M1); wr(REG_MEM2, M1 + 32'h100); wr(REG_OUT, MO);
    // overlapping MEM1/MEM2: must be refused
    wr(REG_CTRL, 1);
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d);
    chk(d[2] == 1'b1 && d[1:0] == 2'(ST_IDLE), "overlap refused");
    if (d[2]) n_reject++;
    wr(REG_CTRL, 0);
    wr(REG_MEM2, M2);
    wr(REG_CTRL, 1);
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d);
    chk(d[2] == 1'b0 && d[1:0] == 2'(ST_SLEEP), "accepted and sleeping");
    coded = 0; last_k = -1; k_in = 0;
    while (coded < FRAMES) begin
      // input frame k_in arrives; only every second one is coded (30 -> 15 fps)
      @(negedge clk); frame_ready = 1;
      @(negedge clk); frame_ready = 0;
      @(negedge clk);
      if (dut.st_state == ST_SLEEP) begin
        n_skip++;
        k_in++;
        repeat (5) @(negedge clk);
        continue;
      end
      // the frame is being coded: place current and reference pictures
      cur_k = k_in; ref_k = (last_k < 0) ? k_in : last_k;
      write_frame(cur_k, cur_base);
      write_frame(ref_k, ref_base);
      if (dut.st_inter) n_inter++; else n_intra++;
      if (cur_base == M2) n_swap++;
      chk(dut.st_inter == ((coded % 30) != 0), "frame type");
      mv_before = n_mv;
      bytes_sum = 0;
      t = 0;
      while (!irq && t < 2000 * N) begin @(negedge clk); t++; end
      chk(t < 2000 * N, "frame finished");
      // the paper's time slot budget: about 1200 cycles per macroblock
      $display("frame %0d (%s): %0d cycles, %0d per macroblock", k_in,
               dut.st_inter ? "inter" : "intra", t, t / N);
      chk(t <= 1200 * (N + 2), "frame within 1200 cycles per macroblock slot");
      chk(n_mv - mv_before == (dut.st_inter ? N : 0), "one vector per macroblock");
      @(negedge clk);
      rd(REG_OSIZE, d);
      chk(d == 32'(bytes_sum), "OSIZE");
      rd(REG_MODE, d);
      chk(d[0] == dut.st_inter, "MODE register");
      last_k = k_in;
      k_in++;
      coded++;
      repeat (5) @(negedge clk);
    end
    chk(irq_n == FRAMES, "one interrupt per coded frame");
    chk(n_reject > 0, "mechanism: configuration reject");
    chk(n_skip > 0,   "mechanism: skipped input frame");
    chk(n_intra > 0,  "mechanism: intra frame");
    chk(n_inter > 0,  "mechanism: inter frame");
    chk(n_swap > 0,   "mechanism: MEM1/MEM2 swap");
    chk(n_stall > 0,  "mechanism: memory grant stall");
    chk(n_edge_l > 0 && n_edge_r > 0 && n_edge_t > 0 && n_edge_b > 0, "mechanism: edge fill");
    chk(n_sleep > 0,  "mechanism: sleep");
    $display("mechanisms: reject=%0d skip=%0d intra=%0d inter=%0d swap=%0d stall=%0d edges=%0d/%0d/%0d/%0d sleep_cycles=%0d vectors=%0d",
             n_reject, n_skip, n_intra, n_inter, n_swap, n_stall, n_edge_l, n_edge_r, n_edge_t, n_edge_b, n_sleep, n_mv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * N * FRAMES * 8 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
