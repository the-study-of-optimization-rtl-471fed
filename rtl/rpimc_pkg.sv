// rpimc_pkg -- register map and shared types of the programmable MPEG-4
// co-processor.
//
// The register bank holds the control registers (CRs) written by the host
// and the status registers (SRs) written by the controller.  The register
// names and meanings follow the co-processor's published register table;
// the word addresses, the CTRL register and the status encoding are this
// design's choice.
package rpimc_pkg;

  typedef enum logic [3:0] {
    REG_W       = 4'h0,  // CR: width of the input image (pixels)
    REG_H       = 4'h1,  // CR: height of the input image (pixels)
    REG_ISIZE   = 4'h2,  // CR: size of one input image in memory (bytes)
    REG_IFPS    = 4'h3,  // CR: input frame rate
    REG_BITRATE = 4'h4,  // CR: output bit rate (passed to the bitstream side)
    REG_CLOCK   = 4'h5,  // CR: operating frequency (Hz)
    REG_MEM1    = 4'h6,  // CR: start address of MEM1
    REG_MEM2    = 4'h7,  // CR: start address of MEM2
    REG_OFPS    = 4'h8,  // CR: output frame rate
    REG_OUT     = 4'h9,  // CR: start address of the output bitstream
    REG_CTRL    = 4'hA,  // CR: bit 0 = enable encoding
    REG_STATUS  = 4'hB,  // SR: [1:0] state, [2] configuration rejected
    REG_OSIZE   = 4'hC,  // SR: size of the output bitstream of the last frame
    REG_MODE    = 4'hD   // SR: [0] 1 = inter, 0 = intra
  } reg_addr_t;

  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_ENABLE = 2'd1,
    ST_SLEEP  = 2'd2,
    ST_FINISH = 2'd3
  } rpimc_state_t;

  typedef struct packed {
    logic [15:0] w;
    logic [15:0] h;
    logic [31:0] isize;
    logic [7:0]  ifps;
    logic [31:0] bitrate;
    logic [31:0] clock;
    logic [31:0] mem1;
    logic [31:0] mem2;
    logic [7:0]  ofps;
    logic [31:0] out;
    logic        enable;
  } rpimc_cfg_t;

endpackage
