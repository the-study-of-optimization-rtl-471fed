// tb_rpimc_top_cif -- full-size run of the co-processor with every parameter
// at its default: a first CIF picture (352x288, 396 macroblocks) coded as an
// intra frame and the next two coded pictures as inter frames, at 30 -> 15
// frames/s with a 21 MHz clock setting.  The checks are those of
// tb_rpimc_top (see tb_rpimc_top_body.svh): all 396 vectors against the
// behavioural model, true motion on interior macroblocks, register and
// pipeline behaviour, and the mechanism counters.
`timescale 1ns/1ps
module tb_rpimc_top_cif;
  import hmea_pkg::*;
  import rpimc_pkg::*;
  import hmea_model_pkg::*;

  localparam int W = 352, H = 288, NMBX = W/16, NMBY = H/16, N = NMBX*NMBY;
  localparam int DY = 3, DX = -5;            // motion per input frame
  localparam logic [31:0] M1 = 32'h00000, M2 = 32'h30000, MO = 32'h60000;
  localparam int FRAMES = 3, MEMSZ = 32'h70000;
  localparam int CLK_HZ = 21_000_000;      // programmed Clock register

`include "tb_rpimc_top_body.svh"

endmodule
