// rpimc_top -- register-based, platform-independent MPEG-4 co-processor
// (motion side) built around the hierarchical motion estimation engine.
//
// Structure: the register bank (rpimc_regbank) is programmed by the host;
// the controller (rpimc_controller) checks the configuration, runs the frame
// loop and schedules macroblocks through the three-stage pipeline
// MU -> TCE -> BG, one time slot per macroblock.  The motion unit (MU) stage
// is built here: the DMA (rpimc_mb_fetch) loads the current macroblock and
// its 48x48 search window from the off-chip frame memory into the HMEA
// engine (hmea_me), which returns the integer-pel macroblock vector, its
// half-pel refinement and the four 8x8 vectors.  The texture coding engine
// (TCE: DCT/IDCT, quantisation,
// AC/DC prediction), the bitstream generator (BG: variable-length coding
// and headers) and motion compensation are outside this RTL: their start
// and done handshakes, the macroblock positions and the vectors are ports.
//
// Ports:
//   reg_*        register port of the bank (see rpimc_pkg for the map)
//   frame_ready  wake-up event: a new input frame is in memory
//   irq          one-cycle pulse at the end of each coded frame
//   clk_en       low while the co-processor sleeps (drives a clock gate)
//   mem_*        read port to the off-chip frame memory (32-bit words)
//   tce_*, bg_*  stage handshakes of the external texture and bitstream units
//   mv_*         result of the motion unit for the macroblock at mu_mbx/mu_mby,
//                valid with `mv_valid`
//   cur_base, ref_base  roles of MEM1/MEM2 in the current frame
// Timing: the MU stage of a slot takes 640 fetch beats plus the read latency
// plus 425 search cycles (361 integer-pel + 64 half-pel); the slot ends
// when all active stages are done.
// Lint note: the busy flags of the DMA and the engine and the engine's
// level-0/level-1 debug vectors are not needed at this level and are
// reported as unused signals.
module rpimc_top
  import hmea_pkg::*;
  import rpimc_pkg::*;
#(
  parameter int C_BLOCK = 1200,
  parameter int GOP_LEN = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        reg_wr,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // events
  input  logic        frame_ready,
  output logic        irq,
  output logic        clk_en,
  // off-chip memory read port
  output logic        mem_req,
  output logic [31:0] mem_addr,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  // texture coding engine handshake
  output logic        tce_start,
  output logic [7:0]  tce_mbx,
  output logic [7:0]  tce_mby,
  output logic        tce_intra,
  input  logic        tce_done,
  // bitstream generator handshake
  output logic        bg_start,
  output logic [7:0]  bg_mbx,
  output logic [7:0]  bg_mby,
  input  logic        bg_done,
  input  logic [15:0] bg_bytes,
  // motion unit results
  output logic        mv_valid,
  output logic [7:0]  mu_mbx,
  output logic [7:0]  mu_mby,
  output mv_t         mv_mb,
  output sad_t        sad_mb,
  output hmv_t        mv_half,
  output sad_t        sad_half,
  output mv_t         mv_8x8 [4],
  output sad_t        sad_8x8 [4],
  output logic [31:0] cur_base,
  output logic [31:0] ref_base
);

  rpimc_cfg_t   cfg;
  rpimc_state_t st_state;
  logic         st_reject, st_inter;
  logic [31:0]  st_osize;
  logic         mu_start, mu_done;
  logic         f_busy, f_done;
  logic         ld_valid, ld_win, ld_sof;
  pixel_t       ld_pix [4];
  logic         me_busy;
  mv_t          mv_l0 [2];
  mv_t          mv_l1;

  rpimc_regbank u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr), .addr(reg_addr), .wdata(reg_wdata), .rdata(reg_rdata),
    .cfg,
    .st_state, .st_reject, .st_osize, .st_inter
  );

  rpimc_controller #(.C_BLOCK(C_BLOCK), .GOP_LEN(GOP_LEN)) u_ctrl (
    .clk, .rst_n,
    .cfg, .frame_ready,
    .mu_start, .mu_mbx, .mu_mby, .mu_done,
    .tce_start, .tce_mbx, .tce_mby, .tce_intra, .tce_done,
    .bg_start, .bg_mbx, .bg_mby, .bg_done, .bg_bytes,
    .cur_base, .ref_base,
    .state_o(st_state), .reject(st_reject), .osize(st_osize), .inter(st_inter),
    .irq, .clk_en
  );

  rpimc_mb_fetch u_fetch (
    .clk, .rst_n,
    .start(mu_start), .mbx(mu_mbx), .mby(mu_mby),
    .width(cfg.w), .height(cfg.h),
    .cur_base, .ref_base,
    .busy(f_busy), .done(f_done),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .ld_valid, .ld_win, .ld_sof, .ld_pix
  );

  hmea_me u_me (
    .clk, .rst_n,
    .ld_valid, .ld_win, .ld_sof, .ld_pix,
    .start(f_done), .busy(me_busy), .done(mu_done),
    .mv_mb, .sad_mb, .mv_8x8, .sad_8x8, .mv_l0, .mv_l1,
    .mv_half, .sad_half
  );

  assign mv_valid = mu_done;

endmodule
