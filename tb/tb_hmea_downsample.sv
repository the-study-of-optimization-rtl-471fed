// tb_hmea_downsample -- self-checking test of the two-level averaging
// downsampler at its default width (one CIF row, W = 352).  Random W x H
// images (H = 8 rows here; 4 pixels per beat) are streamed in
// back to back; every level-1 and level-0 pixel is compared with the 2x2
// truncated mean computed here, the pixel counts are checked, and the whole
// image must take exactly W/4 input beats per row with the last level-0
// pixel appearing two cycles after the last input beat.
`timescale 1ns/1ps
module tb_hmea_downsample;
  import hmea_pkg::*;

  localparam int W = 352, H = 8;   // W must match the module default

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0, in_sof = 0;
  pixel_t in_pix [4];
  logic   l1_valid, l0_valid;
  pixel_t l1_pix [2];
  pixel_t l0_pix;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  hmea_downsample dut (.*);

  int img [H][W];
  int e1 [H/2][W/2];
  int e0 [H/4][W/4];
  int n1, n0, last_in, last_l0, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  // output checkers
  always @(posedge clk) begin
    if (rst_n && l1_valid) begin
      for (int j = 0; j < 2; j++) begin
        automatic int idx = n1 * 2 + j;
        checks++;
        if (int'(l1_pix[j]) != e1[idx / (W/2)][idx % (W/2)]) begin
          failures++;
          $display("FAIL: l1 pixel %0d = %0d expected %0d", idx, l1_pix[j], e1[idx/(W/2)][idx%(W/2)]);
        end
      end
      n1++;
    end
    if (rst_n && l0_valid) begin
      checks++;
      if (int'(l0_pix) != e0[n0 / (W/4)][n0 % (W/4)]) begin
        failures++;
        $display("FAIL: l0 pixel %0d = %0d expected %0d", n0, l0_pix, e0[n0/(W/4)][n0%(W/4)]);
      end
      n0++;
      last_l0 = cyc;
    end
  end

  task automatic frame(input int gap);
    for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) img[i][j] = $urandom_range(0, 255);
    for (int i = 0; i < H/2; i++) for (int j = 0; j < W/2; j++)
      e1[i][j] = (img[2*i][2*j] + img[2*i][2*j+1] + img[2*i+1][2*j] + img[2*i+1][2*j+1]) >> 2;
    for (int i = 0; i < H/4; i++) for (int j = 0; j < W/4; j++)
      e0[i][j] = (e1[2*i][2*j] + e1[2*i][2*j+1] + e1[2*i+1][2*j] + e1[2*i+1][2*j+1]) >> 2;
    n1 = 0; n0 = 0;
    for (int b = 0; b < W*H/4; b++) begin
      @(negedge clk);
      in_valid = 1; in_sof = (b == 0);
      for (int j = 0; j < 4; j++) in_pix[j] = pixel_t'(img[b / (W/4)][(b % (W/4))*4 + j]);
      last_in = cyc;
      if (gap && (b % 5 == 4)) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (4) @(negedge clk);
    checks += 3;
    if (n1 != W*H/8) begin failures++; $display("FAIL: %0d level-1 beats", n1); end
    if (n0 != W*H/16) begin failures++; $display("FAIL: %0d level-0 pixels", n0); end
    if (last_l0 - last_in != 2) begin failures++; $display("FAIL: level-0 latency %0d", last_l0 - last_in); end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(0);
    frame(0);
    frame(1);
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
