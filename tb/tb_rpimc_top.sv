// tb_rpimc_top -- end-to-end test of the co-processor's motion side.
//
// A 64x48 picture (12 macroblocks) moves by a fixed displacement from frame
// to frame.  The testbench acts as host and as the rest of the platform:
// it programs the registers, writes each input frame into the memory that
// the controller names as current (and the previous frame, standing in for
// the reconstruction, into the reference memory), raises `frame_ready`,
// serves the memory port with random grant stalls and read latency, and
// answers the TCE and BG handshakes after random delays.
// Checks: every macroblock vector, SAD and the four 8x8 vectors against the
// behavioural model applied to the same window (including the edge rule at
// the picture border); interior macroblocks must find the true motion;
// configuration rejection; frame decimation; the intra/inter sequence and
// the MEM1/MEM2 roles; OSIZE; one interrupt per coded frame.  Each mechanism
// (reject, skipped frame, intra frame, inter frame, memory swap, grant stall,
// left/right/top/bottom edge fill, sleep) is counted and must occur.
`timescale 1ns/1ps
module tb_rpimc_top;
  import hmea_pkg::*;
  import rpimc_pkg::*;
  import hmea_model_pkg::*;

  localparam int W = 64, H = 48, NMBX = W/16, NMBY = H/16, N = NMBX*NMBY;
  localparam int DY = 3, DX = -5;            // motion per frame
  localparam logic [31:0] M1 = 32'h0000, M2 = 32'h4000, MO = 32'h8000;
  localparam int FRAMES = 6, MEMSZ = 32'h10000;
  localparam int CLK_HZ = 21_000_000;      // programmed Clock register

`include "tb_rpimc_top_body.svh"

endmodule
