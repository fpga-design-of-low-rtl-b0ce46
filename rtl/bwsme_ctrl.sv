// bwsme_ctrl: bandwidth-scalable ME controller. Decides the search range
// (SR) of every MB and the address of its search window.
//   start   latch br, fr, gp; nmb = gp * MB_COLS * MB_ROWS
//   INIT    bandwidth allocation: bw_budget and sr_sys (bw_alloc)
//   DECIDE  SR of MB k: sr_sys for the first MB, otherwise final_sr from
//           the SR prediction unit (sum_mv of the MB's neighbours, bandwidth
//           mode); window origin = MB position + predictor - SR;
//           pulse mb_start to the ME engine
//   RUN     wait for the engine's mb_done; add its bw_used to used_total
//   UPDATE  in parallel, bandwidth efficiency g = (jmvp-jbma)/bw_used and
//           future bandwidth prediction bwfp for the MBs still to code
//   next MB in raster order over the frame, for nmb MBs; then done.
// bw_change, at any time during a run, loads a new br (a sudden change of
// the available bandwidth): before the next MB the bandwidth allocation is
// run again (new bw_budget and sr_sys) and the future bandwidth prediction
// is recomputed from what is left of the new budget.
// mb_x/mb_y name the MB being (or next to be) coded; the engine's mvp and
// sum_mv inputs must refer to that MB. The task split follows the
// reference; the sequencing is this design's choice.
module bwsme_ctrl
  import me_pkg::*;
#(
  parameter int MB_COLS = 11,
  parameter int MB_ROWS = 9,
  parameter int SR_W    = 6,
  parameter int W       = 32,
  parameter int XW      = $clog2(MB_COLS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               bw_change,
  input  logic [W-1:0]       br,
  input  logic [7:0]         fr,
  input  logic [7:0]         gp,
  // ME engine
  output logic               mb_start,
  output logic [SR_W-1:0]    sr,
  output logic [XW-1:0]      mb_x,
  output logic [7:0]         mb_y,
  output logic signed [15:0] win_x0,
  output logic signed [15:0] win_y0,
  input  mv_t                mvp,
  input  logic [9:0]         sum_mv,
  input  logic               mb_done,
  input  logic [COST_W-1:0]  jbma,
  input  logic [COST_W-1:0]  jmvp,
  input  logic [15:0]        bw_used,
  // status
  output logic [15:0]        k,
  output logic [15:0]        nmb,
  output logic [W-1:0]       bw_budget,
  output logic [SR_W-1:0]    sr_sys,
  output logic [W-1:0]       bwfp,
  output logic [W-1:0]       used_total,
  output logic [W-1:0]       g,
  output bw_mode_t           bw_mode,
  output logic               busy,
  output logic               done
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_DECIDE, S_RUN, S_UPDATE, S_NEXT, S_REFP} state_t;
  state_t state;

  logic [W-1:0] br_q;
  logic         chg_pending;
  logic [7:0]   fr_q, gp_q;
  logic         al_init, al_upd, al_busy, al_done;
  logic         ef_start, ef_busy, ef_done;
  logic         al_fin, ef_fin;
  logic [COST_W-1:0] jbma_q, jmvp_q;
  logic [15:0]  bw_used_q;
  logic [9:0]   pred_sr;
  logic [SR_W-1:0] final_sr, sr_d;

  bw_alloc #(.W(W), .SR_W(SR_W), .SR_MAXV(SR_MAX)) u_alloc (
    .clk, .rst_n, .init(al_init), .upd(al_upd), .br(br_q), .fr(fr_q),
    .gp(gp_q), .nmb, .used_total, .k, .bw_budget, .sr_sys, .bwfp,
    .busy(al_busy), .done(al_done));

  bw_eff_calc #(.COST_W(COST_W), .W(W)) u_eff (
    .clk, .rst_n, .start(ef_start), .jmvp(jmvp_q), .jbma(jbma_q),
    .bw_used(bw_used_q), .g, .busy(ef_busy), .done(ef_done));

  sr_pred #(.SR_W(SR_W), .SUMMV_W(10), .W(W)) u_srp (
    .sum_mv, .sr_sys, .used_total, .k, .bwfp, .mode(bw_mode), .pred_sr,
    .final_sr);

  assign sr_d = (k == 0) ? sr_sys : final_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      br_q       <= '0;
      fr_q       <= 8'd1;
      gp_q       <= '0;
      nmb        <= '0;
      k          <= '0;
      mb_x       <= '0;
      mb_y       <= '0;
      sr         <= '0;
      win_x0     <= '0;
      win_y0     <= '0;
      used_total <= '0;
      jbma_q     <= '0;
      jmvp_q     <= '0;
      bw_used_q  <= '0;
      al_fin     <= 1'b0;
      ef_fin     <= 1'b0;
      done       <= 1'b0;
      chg_pending <= 1'b0;
    end else begin
      if (bw_change && state != S_IDLE) begin
        br_q        <= br;
        chg_pending <= 1'b1;
      end
      case (state)
        S_IDLE: if (start) begin
          br_q       <= br;
          fr_q       <= fr;
          gp_q       <= gp;
          nmb        <= 16'(gp) * 16'(MB_COLS * MB_ROWS);
          k          <= '0;
          mb_x       <= '0;
          mb_y       <= '0;
          used_total <= '0;
          done       <= 1'b0;
          state      <= S_INIT;
        end
        S_INIT: if (al_done) state <= (k == 0) ? S_DECIDE : S_REFP;
        S_REFP: if (al_done) state <= S_DECIDE;
        S_DECIDE: begin
          sr     <= sr_d;
          win_x0 <= 16'(mb_x) * 16'(MB_SIZE) + 16'(mvp.x) - 16'(sr_d);
          win_y0 <= 16'(mb_y) * 16'(MB_SIZE) + 16'(mvp.y) - 16'(sr_d);
          state  <= S_RUN;
        end
        S_RUN: if (mb_done) begin
          jbma_q     <= jbma;
          jmvp_q     <= jmvp;
          bw_used_q  <= bw_used;
          used_total <= used_total + W'(bw_used);
          k          <= k + 1'b1;
          al_fin     <= 1'b0;
          ef_fin     <= 1'b0;
          state      <= S_UPDATE;
        end
        S_UPDATE: begin
          if (al_done) al_fin <= 1'b1;
          if (ef_done) ef_fin <= 1'b1;
          if ((al_fin || al_done || k == nmb) && (ef_fin || ef_done))
            state <= S_NEXT;
        end
        S_NEXT: begin
          if (int'(mb_x) == MB_COLS - 1) begin
            mb_x <= '0;
            mb_y <= (int'(mb_y) == MB_ROWS - 1) ? '0 : mb_y + 1'b1;
          end else begin
            mb_x <= mb_x + 1'b1;
          end
          if (k == nmb) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (chg_pending && !bw_change) begin
            chg_pending <= 1'b0;
            state       <= S_INIT;
          end else begin
            state <= S_DECIDE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the engine starts in the cycle after DECIDE registered sr and the window
  logic decide_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) decide_d <= 1'b0;
    else        decide_d <= (state == S_DECIDE);

  assign mb_start = decide_d;
  assign al_init  = ((state == S_IDLE) && start)
                 || ((state == S_NEXT) && chg_pending && !bw_change && k != nmb);
  assign al_upd   = ((state == S_RUN) && mb_done && (k + 1'b1 != nmb))
                 || ((state == S_INIT) && al_done && k != 0);
  assign ef_start = (state == S_UPDATE) && !ef_busy && !ef_fin && !ef_done;
  assign busy     = (state != S_IDLE);
endmodule
