// tb_rpimc_mb_fetch -- self-checking test of the macroblock/search-window DMA.
//
// A 64x48 luma frame pair sits in a byte-addressed memory model: current
// pixel (y,x) = (7x + 13y) mod 256 and reference pixel = (5x + 11y + 3) mod
// 256, so every pixel can be predicted.  For each macroblock of the frame
// (all 12, which covers every corner and edge case) the test starts a fetch
// and checks every load beat: count (64 current + 576 window words), the
// window flag, the start-of-frame marks, the four pixel values, including
// the edge replication outside the frame, the bound of MAX_OUT outstanding
// reads and that `done` comes exactly two cycles after the last beat.
// Two memory behaviours are used: (a) a grant every cycle with a fixed
// 3-cycle read latency, where the fetch must take exactly 640 + 3 + 3 cycles
// from the start edge to `done`, and (b) random grants with 1..12 cycle
// latency, where the data and the outstanding-read limit are checked.
`timescale 1ns/1ps
module tb_rpimc_mb_fetch;
  import hmea_pkg::*;

  localparam int W = 64, H = 48, MAX_OUT = 8;   // MAX_OUT: the module default
  localparam logic [31:0] CUR = 32'h1000, REF = 32'h3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [7:0] mbx, mby;
  logic busy, done;
  logic mem_req, mem_gnt, mem_rvalid = 1'b0;
  logic [31:0] mem_addr, mem_rdata;
  logic ld_valid, ld_win, ld_sof;
  pixel_t ld_pix [4];

  rpimc_mb_fetch dut (
    .clk, .rst_n, .start, .mbx, .mby, .width(16'(W)), .height(16'(H)),
    .cur_base(CUR), .ref_base(REF), .busy, .done,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ld_valid, .ld_win, .ld_sof, .ld_pix);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int cur_px(int y, int x); return (7*x + 13*y) % 256; endfunction
  function automatic int ref_px(int y, int x); return (5*x + 11*y + 3) % 256; endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // memory model: byte image of both frames, in-order responses
  byte unsigned mem [32'h4000];
  bit   random_mode = 0;
  int   fixed_lat = 3;
  int   q_addr[$], q_due[$];
  int   cyc = 0, outstanding = 0, max_out_seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) mem_gnt = random_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    automatic bit fire = 0;
    if (q_due.size() > 0 && q_due[0] <= cyc) fire = 1;
    mem_rvalid <= 1'b0;
    if (fire) begin
      automatic int a = q_addr.pop_front();
      void'(q_due.pop_front());
      mem_rvalid <= 1'b1;
      mem_rdata  <= {mem[a+3], mem[a+2], mem[a+1], mem[a]};
    end
    if (mem_req && mem_gnt) begin
      automatic int last = (q_due.size() > 0) ? q_due[$] : 0;
      automatic int due  = cyc + (random_mode ? $urandom_range(1, 12) : fixed_lat);
      q_addr.push_back(int'(mem_addr));
      q_due.push_back(due > last ? due : last + 1);
    end
  end

  // reads granted but not yet returned, counted at each clock edge
  always @(negedge clk) if (rst_n) begin
    outstanding = q_addr.size() + int'(mem_rvalid);
    if (outstanding > max_out_seen) max_out_seen = outstanding;
  end

  // beat checker
  int beat = 0, last_beat_cyc = 0, edges = 0;
  always @(posedge clk) if (rst_n && ld_valid) begin
    automatic int e[4];
    automatic bit win = beat >= 64;
    automatic int b = win ? beat - 64 : beat;
    chk(ld_win == win, "window flag");
    chk(ld_sof == (b == 0), "start-of-frame mark");
    for (int j = 0; j < 4; j++) begin
      if (!win) e[j] = cur_px(mby*16 + b/4, mbx*16 + (b%4)*4 + j);
      else begin
        automatic int fy = mby*16 - 16 + b/12, fx = mbx*16 - 16 + (b%12)*4 + j;
        if (fy < 0 || fy >= H || fx < 0 || fx >= W) edges++;
        e[j] = ref_px(clampi(fy, 0, H-1), clampi(fx, 0, W-1));
      end
      chk(int'(ld_pix[j]) == e[j], $sformatf("pixel mb(%0d,%0d) beat %0d lane %0d: %0d != %0d",
                                             mbx, mby, beat, j, ld_pix[j], e[j]));
    end
    beat++;
    last_beat_cyc = cyc;
  end

  task automatic fetch(input int x, input int y, input bit timed);
    int t0, t;
    @(negedge clk);
    mbx = 8'(x); mby = 8'(y); beat = 0;
    start = 1;
    @(posedge clk); t0 = cyc;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    t = 0;
    while (!done && t < 5000) begin @(posedge clk); t++; #1; end
    chk(done, "done");
    chk(beat == 640, $sformatf("beat count %0d", beat));
    chk(cyc - last_beat_cyc == 2, "done two cycles after the last beat");
    if (timed) chk(cyc - t0 == 640 + 3 + 3,
                   $sformatf("fetch time %0d cycles, expected %0d", cyc - t0, 646));
    @(posedge clk); #1;
    chk(!busy, "idle after done");
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        mem[CUR + y*W + x] = 8'(cur_px(y, x));
        mem[REF + y*W + x] = 8'(ref_px(y, x));
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H/16; y++)
      for (int x = 0; x < W/16; x++) fetch(x, y, 1);
    random_mode = 1;
    for (int y = 0; y < H/16; y++)
      for (int x = 0; x < W/16; x++) fetch(x, y, 0);
    chk(max_out_seen <= MAX_OUT, $sformatf("outstanding reads %0d", max_out_seen));
    chk(max_out_seen == MAX_OUT, "outstanding limit reached under random latency");
    chk(edges > 0, "edge pixels exercised");
    $display("edge pixels=%0d max outstanding=%0d", edges, max_out_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
