// rpimc_mb_fetch -- DMA that moves one macroblock and its search window from
// the off-chip frame memories into the motion estimation engine.
//
// On `start` it reads the 16x16 current macroblock at (mbx, mby) from the
// current frame (`cur_base`) and then the 48x48 search window around it from
// the reference frame (`ref_base`), whose top-left pixel is 16 pixels above
// and to the left of the macroblock.  Frames are stored as 8-bit luma, row
// after row, `width` bytes per row; memory words are 32 bits holding four
// pixels, the leftmost in bits 7:0.  Window pixels outside the frame are
// replaced by the nearest edge pixel (rows clamp to 0..height-1; a word left
// of the frame repeats pixel 0 of the row, a word right of it repeats the
// last pixel), so the engine always sees a full window.
//
// Memory port: `mem_req`/`mem_addr` (byte address, word aligned) issue a read
// that is accepted when `mem_gnt` is high; data return in order on
// `mem_rvalid`/`mem_rdata`, any number of cycles later, with at most MAX_OUT
// reads outstanding.  Every returned word is passed on at once as one
// four-pixel beat of the engine's load port (`ld_valid`, `ld_win`, `ld_sof`,
// `ld_pix`).  `done` pulses two cycles after the last beat, when the engine's
// coarse levels are complete.  640 words are read per macroblock; with a
// memory that grants every cycle the fetch takes 640 cycles plus the read
// latency.  The address order and the edge rule are this design's choice.
// `width` must be a multiple of 4, the bases word aligned and MAX_OUT a
// power of two.
module rpimc_mb_fetch
  import hmea_pkg::*;
#(
  parameter int MAX_OUT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  mbx,
  input  logic [7:0]  mby,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic [31:0] cur_base,
  input  logic [31:0] ref_base,
  output logic        busy,
  output logic        done,
  // memory read port
  output logic        mem_req,
  output logic [31:0] mem_addr,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  // engine load port
  output logic        ld_valid,
  output logic        ld_win,
  output logic        ld_sof,
  output pixel_t      ld_pix [4]
);

  localparam int NCUR = 64;    // 16 rows x 4 words
  localparam int NWIN = 576;   // 48 rows x 12 words
  localparam int NTOT = NCUR + NWIN;
  localparam int OW   = $clog2(MAX_OUT + 1);

  typedef enum logic [1:0] {EDGE_NONE, EDGE_LEFT, EDGE_RIGHT} edge_t;
  typedef struct packed {
    edge_t edge_mode;
    logic  win;
    logic  sof;
  } tag_t;

  logic [9:0]    issue_cnt, ret_cnt;
  logic [OW-1:0] outstanding;
  logic          active;
  logic [1:0]    tail;
  tag_t          tag_fifo [MAX_OUT];
  logic [$clog2(MAX_OUT)-1:0] wr_ptr, rd_ptr;

  // address of the next word
  tag_t               tag_n;
  logic signed [17:0] py, px;
  logic [9:0]         widx;
  logic [31:0]        row_addr;

  always_comb begin
    tag_n = '{edge_mode: EDGE_NONE, win: 1'b0, sof: 1'b0};
    if (issue_cnt < 10'(NCUR)) begin
      py       = 18'(mby) * 18'sd16 + 18'(int'(issue_cnt) / 4);
      px       = 18'(mbx) * 18'sd16 + 18'((int'(issue_cnt) % 4) * 4);
      tag_n.sof = (issue_cnt == 0);
      row_addr = cur_base + 32'(py) * 32'(width);
    end else begin
      widx     = issue_cnt - 10'(NCUR);
      py       = 18'(mby) * 18'sd16 - 18'sd16 + 18'(int'(widx) / 12);
      px       = 18'(mbx) * 18'sd16 - 18'sd16 + 18'((int'(widx) % 12) * 4);
      tag_n.win = 1'b1;
      tag_n.sof = (widx == 0);
      if (py < 0) py = '0;
      if (py > 18'(height) - 18'sd1) py = 18'(height) - 18'sd1;
      if (px < 0) begin
        px = '0;
        tag_n.edge_mode = EDGE_LEFT;
      end else if (px > 18'(width) - 18'sd4) begin
        px = 18'(width) - 18'sd4;
        tag_n.edge_mode = EDGE_RIGHT;
      end
      row_addr = ref_base + 32'(py) * 32'(width);
    end
    if (issue_cnt >= 10'(NCUR)) widx = issue_cnt - 10'(NCUR); else widx = '0;
    mem_addr = row_addr + 32'(px);
  end

  assign mem_req = active && issue_cnt < 10'(NTOT) && outstanding < OW'(MAX_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      issue_cnt   <= '0;
      ret_cnt     <= '0;
      outstanding <= '0;
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      tail        <= '0;
    end else begin
      if (start && !busy) begin
        active    <= 1'b1;
        issue_cnt <= '0;
        ret_cnt   <= '0;
      end else begin
        if (mem_req && mem_gnt) begin
          issue_cnt <= issue_cnt + 10'd1;
          wr_ptr    <= wr_ptr + 1'b1;
        end
        if (mem_rvalid) begin
          ret_cnt <= ret_cnt + 10'd1;
          rd_ptr  <= rd_ptr + 1'b1;
          if (ret_cnt == 10'(NTOT-1)) begin
            active <= 1'b0;
            tail   <= 2'd2;
          end
        end
        if (tail != 0) tail <= tail - 2'd1;
      end
      outstanding <= outstanding + OW'(mem_req && mem_gnt) - OW'(mem_rvalid);
    end
  end

  always_ff @(posedge clk) begin
    if (mem_req && mem_gnt) tag_fifo[wr_ptr] <= tag_n;
  end

  // returned word -> load beat
  tag_t rtag;
  assign rtag     = tag_fifo[rd_ptr];
  assign ld_valid = mem_rvalid;
  assign ld_win   = rtag.win;
  assign ld_sof   = rtag.sof;
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      unique case (rtag.edge_mode)
        EDGE_LEFT:  ld_pix[j] = mem_rdata[7:0];
        EDGE_RIGHT: ld_pix[j] = mem_rdata[31:24];
        default:    ld_pix[j] = mem_rdata[8*j +: 8];
      endcase
    end
  end

  assign busy = active || tail != 0;
  assign done = (tail == 2'd1);

endmodule
