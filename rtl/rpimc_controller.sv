// rpimc_controller -- main controller of the programmable MPEG-4
// co-processor: configuration check, frame loop, macroblock pipeline
// scheduling, intra/inter mode and the ping-pong use of the two frame
// memories.
//
// Configuration check (on enable, in one cycle):
//   * the three memory regions MEM1, MEM2 and OUT, each `isize` bytes long,
//     must not overlap: no start address may lie in another region
//     (half-open ranges [start, start+isize));
//   * the load must fit the clock: C_BLOCK * (W*H/256) * IFPS must not
//     exceed CLOCK.
// A failed check leaves the controller idle with the reject flag set.
// Otherwise the number of macroblocks per row and column is derived from W
// and H and the controller sleeps until the host signals a new input frame
// (`frame_ready`, the wake-up event).  Frames are decimated from IFPS to OFPS
// with a phase accumulator: a frame is coded when the accumulated OFPS
// reaches IFPS, otherwise it is skipped.
//
// Frame types and memories: every GOP_LEN-th coded frame is intra, the rest
// inter.  On an intra frame the current image is in MEM1 and the
// reconstruction goes to MEM2; from the second inter frame after an intra
// frame on, the two memories swap roles on every frame, so the current
// frame of one frame is the reference of the next.
//
// Macroblock pipeline: one time slot (TS) per macroblock step.  Inter frames
// use three stages, MU (motion unit) -> TCE (texture coding) -> BG
// (bitstream generation); intra frames skip MU and use TCE -> BG.  In time
// slot k, stage s works on macroblock k-s; a frame of N macroblocks takes
// N+2 (inter) or N+1 (intra) slots.  A slot starts every stage that has a
// macroblock (one-cycle `*_start` with the macroblock position) and ends when
// every started stage has returned its `*_done`.  Stages that have no work in
// a slot are not started (the BG stays suspended in the first slot, the TCE
// in the last).  At the end of the frame the state shows Finish for one cycle,
// `irq` pulses, OSIZE holds the sum of the byte counts the BG reported, and
// the controller sleeps again.  While sleeping `clk_en` is low so that a
// clock gate can stop the datapath.  Clearing the enable bit returns the
// controller to idle at the end of the current frame.
// Lint note: the Bitrate field of the configuration is not read here (rate
// control belongs to the texture and bitstream units), so those bits are
// reported as unused.
module rpimc_controller
  import rpimc_pkg::*;
#(
  parameter int C_BLOCK = 1200,  // cycles per macroblock (one time slot)
  parameter int GOP_LEN = 30     // coded frames from one intra frame to the next
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rpimc_cfg_t   cfg,
  input  logic         frame_ready,
  // stage handshakes
  output logic         mu_start,
  output logic [7:0]   mu_mbx,
  output logic [7:0]   mu_mby,
  input  logic         mu_done,
  output logic         tce_start,
  output logic [7:0]   tce_mbx,
  output logic [7:0]   tce_mby,
  output logic         tce_intra,
  input  logic         tce_done,
  output logic         bg_start,
  output logic [7:0]   bg_mbx,
  output logic [7:0]   bg_mby,
  input  logic         bg_done,
  input  logic [15:0]  bg_bytes,
  // frame memories of the current frame
  output logic [31:0]  cur_base,
  output logic [31:0]  ref_base,
  // status
  output rpimc_state_t state_o,
  output logic         reject,
  output logic [31:0]  osize,
  output logic         inter,
  output logic         irq,
  output logic         clk_en
);

  typedef enum logic [2:0] {C_IDLE, C_CHECK, C_SLEEP, C_SLOT, C_WAIT, C_FINISH} cstate_t;
  cstate_t     st;

  logic [7:0]  nmbx, nmby;
  logic [15:0] nmb, slot, nslots;
  logic [7:0]  phase;
  logic [7:0]  gop_cnt;
  logic [7:0]  inter_cnt;   // inter frames since the last intra frame
  logic        swap;        // MEM2 holds the current frame
  logic        mu_act, tce_act, bg_act;
  logic        mu_pend, tce_pend, bg_pend;
  logic [7:0]  hx, hy;      // position of the macroblock entering the pipeline
  logic [7:0]  p1x, p1y;    // position in the second stage in this slot

  // ---------------- configuration check ----------------
  logic        overlap, overload;
  logic [63:0] load;

  function automatic logic inside_region(input logic [31:0] a, input logic [31:0] b,
                                         input logic [31:0] size);
    return ({1'b0, a} >= {1'b0, b}) && ({1'b0, a} < {1'b0, b} + {1'b0, size});
  endfunction

  always_comb begin
    overlap = inside_region(cfg.mem1, cfg.mem2, cfg.isize) ||
              inside_region(cfg.mem1, cfg.out,  cfg.isize) ||
              inside_region(cfg.mem2, cfg.mem1, cfg.isize) ||
              inside_region(cfg.mem2, cfg.out,  cfg.isize) ||
              inside_region(cfg.out,  cfg.mem1, cfg.isize) ||
              inside_region(cfg.out,  cfg.mem2, cfg.isize);
    load     = 64'(C_BLOCK) * 64'(cfg.w[15:4]) * 64'(cfg.h[15:4]) * 64'(cfg.ifps);
    overload = load > 64'(cfg.clock);
  end

  // ---------------- frame pipeline ----------------
  logic        next_code;    // decimation decision for a new input frame
  logic [8:0]  phase_sum;
  assign phase_sum = {1'b0, phase} + {1'b0, cfg.ofps};
  assign next_code = phase_sum >= {1'b0, cfg.ifps};

  assign nmb = 16'(nmbx) * 16'(nmby);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      reject    <= 1'b0;
      nmbx      <= '0;
      nmby      <= '0;
      slot      <= '0;
      nslots    <= '0;
      phase     <= '0;
      gop_cnt   <= '0;
      inter_cnt <= '0;
      swap      <= 1'b0;
      inter     <= 1'b0;
      osize     <= '0;
      mu_pend   <= 1'b0;
      tce_pend  <= 1'b0;
      bg_pend   <= 1'b0;
      hx <= '0; hy <= '0; p1x <= '0; p1y <= '0;
      mu_mbx <= '0; mu_mby <= '0; tce_mbx <= '0; tce_mby <= '0; bg_mbx <= '0; bg_mby <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (cfg.enable) st <= C_CHECK;
        C_CHECK: begin
          if (overlap || overload || cfg.w[15:4] == 0 || cfg.h[15:4] == 0) begin
            reject <= 1'b1;
            if (!cfg.enable) st <= C_IDLE;   // wait for the host to drop enable
          end else begin
            reject  <= 1'b0;
            nmbx    <= cfg.w[11:4];
            nmby    <= cfg.h[11:4];
            phase   <= '0;
            gop_cnt <= '0;
            st      <= C_SLEEP;
          end
        end
        C_SLEEP: begin
          if (!cfg.enable) st <= C_IDLE;
          else if (frame_ready) begin
            if (next_code) begin
              phase <= 8'(phase_sum - {1'b0, cfg.ifps});
              // frame type and memory roles
              if (gop_cnt == 0) begin
                inter     <= 1'b0;
                inter_cnt <= '0;
                swap      <= 1'b0;
              end else begin
                inter     <= 1'b1;
                inter_cnt <= inter_cnt + 8'd1;
                swap      <= (inter_cnt == 0) ? 1'b0 : ~swap;
              end
              gop_cnt <= (gop_cnt == 8'(GOP_LEN-1)) ? '0 : gop_cnt + 8'd1;
              nslots  <= nmb + ((gop_cnt == 0) ? 16'd1 : 16'd2);
              slot    <= '0;
              osize   <= '0;
              hx <= '0; hy <= '0;
              st      <= C_SLOT;
            end else
              phase <= phase_sum[7:0];
          end
        end
        C_SLOT: begin
          // start the stages of this slot; positions shift one stage per slot
          if (mu_act) begin mu_mbx <= hx; mu_mby <= hy; end
          if (tce_act) begin
            tce_mbx <= inter ? p1x : hx;
            tce_mby <= inter ? p1y : hy;
          end
          if (bg_act) begin bg_mbx <= tce_mbx; bg_mby <= tce_mby; end
          if (inter) begin p1x <= hx; p1y <= hy; end
          if (hx == nmbx - 8'd1) begin hx <= '0; hy <= hy + 8'd1; end
          else hx <= hx + 8'd1;
          mu_pend  <= mu_act;
          tce_pend <= tce_act;
          bg_pend  <= bg_act;
          st       <= C_WAIT;
        end
        C_WAIT: begin
          if (mu_done)  mu_pend  <= 1'b0;
          if (tce_done) tce_pend <= 1'b0;
          if (bg_done) begin
            bg_pend <= 1'b0;
            osize   <= osize + 32'(bg_bytes);
          end
          if (!(mu_pend && !mu_done) && !(tce_pend && !tce_done) && !(bg_pend && !bg_done)) begin
            slot <= slot + 16'd1;
            st   <= (slot + 16'd1 == nslots) ? C_FINISH : C_SLOT;
          end
        end
        C_FINISH: st <= C_SLEEP;
        default:  st <= C_IDLE;
      endcase
    end
  end

  // stage activity in the current slot (stage s works on macroblock slot-s)
  always_comb begin
    if (inter) begin
      mu_act  = slot < nmb;
      tce_act = slot >= 16'd1 && slot < nmb + 16'd1;
      bg_act  = slot >= 16'd2;
    end else begin
      mu_act  = 1'b0;
      tce_act = slot < nmb;
      bg_act  = slot >= 16'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mu_start  <= 1'b0;
      tce_start <= 1'b0;
      bg_start  <= 1'b0;
    end else begin
      mu_start  <= (st == C_SLOT) && mu_act;
      tce_start <= (st == C_SLOT) && tce_act;
      bg_start  <= (st == C_SLOT) && bg_act;
    end
  end

  assign tce_intra = !inter;
  assign cur_base  = swap ? cfg.mem2 : cfg.mem1;
  assign ref_base  = swap ? cfg.mem1 : cfg.mem2;
  assign irq       = (st == C_FINISH);
  assign clk_en    = (st != C_SLEEP) && (st != C_IDLE);

  always_comb begin
    unique case (st)
      C_IDLE, C_CHECK: state_o = ST_IDLE;
      C_SLEEP:         state_o = ST_SLEEP;
      C_FINISH:        state_o = ST_FINISH;
      default:         state_o = ST_ENABLE;
    endcase
  end

endmodule
