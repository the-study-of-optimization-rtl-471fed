// rpimc_regbank -- control and status register bank of the co-processor.
//
// The bank is what makes the co-processor independent of its platform: the
// host programs the picture size, frame rates, bit rate, clock frequency and
// the three memory regions, and reads back the state, the coding mode and
// the size of the produced bitstream.  Only a bus wrapper is platform
// specific; this bank offers a plain synchronous register port:
//   write: `wr_en` with `addr`/`wdata`, takes effect at the clock edge;
//   read:  `rdata` is combinational from `addr`.
// Status registers are read-only; writes to them are ignored.  All control
// registers reset to zero (encoding disabled).  `cfg` presents the control
// registers to the controller.
module rpimc_regbank
  import rpimc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [3:0]   addr,
  input  logic [31:0]  wdata,
  output logic [31:0]  rdata,
  output rpimc_cfg_t   cfg,
  // status from the controller
  input  rpimc_state_t st_state,
  input  logic         st_reject,
  input  logic [31:0]  st_osize,
  input  logic         st_inter
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= '0;
    else if (wr_en) begin
      unique case (reg_addr_t'(addr))
        REG_W:       cfg.w       <= wdata[15:0];
        REG_H:       cfg.h       <= wdata[15:0];
        REG_ISIZE:   cfg.isize   <= wdata;
        REG_IFPS:    cfg.ifps    <= wdata[7:0];
        REG_BITRATE: cfg.bitrate <= wdata;
        REG_CLOCK:   cfg.clock   <= wdata;
        REG_MEM1:    cfg.mem1    <= wdata;
        REG_MEM2:    cfg.mem2    <= wdata;
        REG_OFPS:    cfg.ofps    <= wdata[7:0];
        REG_OUT:     cfg.out     <= wdata;
        REG_CTRL:    cfg.enable  <= wdata[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (reg_addr_t'(addr))
      REG_W:       rdata = {16'd0, cfg.w};
      REG_H:       rdata = {16'd0, cfg.h};
      REG_ISIZE:   rdata = cfg.isize;
      REG_IFPS:    rdata = {24'd0, cfg.ifps};
      REG_BITRATE: rdata = cfg.bitrate;
      REG_CLOCK:   rdata = cfg.clock;
      REG_MEM1:    rdata = cfg.mem1;
      REG_MEM2:    rdata = cfg.mem2;
      REG_OFPS:    rdata = {24'd0, cfg.ofps};
      REG_OUT:     rdata = cfg.out;
      REG_CTRL:    rdata = {31'd0, cfg.enable};
      REG_STATUS:  rdata = {29'd0, st_reject, st_state};
      REG_OSIZE:   rdata = st_osize;
      REG_MODE:    rdata = {31'd0, st_inter};
      default:     rdata = '0;
    endcase
  end

endmodule
