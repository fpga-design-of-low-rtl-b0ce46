// bwsme_eddr_top: bandwidth-scalable motion estimator with error detection
// and data recovery (EDDR) in its processing elements.
// The bandwidth-scalable ME controller turns a memory bandwidth allowance
// (br bytes/s at fr frames/s, gp frames per update period) into a search
// range per MB; the ME engine fetches each MB and its search window from
// an external memory controller through the mem_* handshake, runs a full
// search with two SAD generation modules whose 4x4 PEs are checked by
// residue-and-quotient codes, and returns the best mode and vectors. The
// R-D costs, the bandwidth used and the neighbours' sum_mv go back to the
// controller to decide the next MB's search range.
// Per MB, mb_done pulses with the results for MB (mb_x, mb_y). done pulses
// after gp frames of MB_COLS x MB_ROWS MBs. bw_change during a run loads a
// new br, which takes effect from the next MB. fault_xor is a test input that
// flips bits of individual PE outputs; tie it to zero in normal use.
// Memory handshake: mem_req until mem_ack; one-cycle mem_addr_valid with
// the rectangle (mem_ref: 0 current / 1 reference frame, origin mem_x/y,
// size mem_w x mem_h; origins may lie outside the frame and the memory
// controller is expected to repeat edge pixels); then pixels in raster
// order on mem_dvalid/mem_data; mem_finish after the last pixel.
// The split into a bandwidth-scalable controller and an ME engine, the two
// SAD modules and EDDR around every PE follow the published architecture;
// the frame size, the rectangle-based memory handshake, bw_change and the
// fault_xor test input are this design's own choices.
module bwsme_eddr_top
  import me_pkg::*;
#(
  parameter int MB_COLS = 11,
  parameter int MB_ROWS = 9,
  parameter int NSAD    = 2,
  parameter int LAMBDA  = 4,
  parameter int XW      = $clog2(MB_COLS + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              bw_change,
  input  logic [31:0]                       br,
  input  logic [7:0]                        fr,
  input  logic [7:0]                        gp,
  // memory controller
  output logic                              mem_req,
  input  logic                              mem_ack,
  output logic                              mem_addr_valid,
  output logic                              mem_ref,
  output logic signed [15:0]                mem_x,
  output logic signed [15:0]                mem_y,
  output logic [7:0]                        mem_w,
  output logic [7:0]                        mem_h,
  input  logic                              mem_dvalid,
  input  logic [PIX_W-1:0]                  mem_data,
  input  logic                              mem_finish,
  // per-MB results
  output logic                              mb_done,
  output logic [XW-1:0]                     mb_x,
  output logic [7:0]                        mb_y,
  output logic [5:0]                        sr,
  output mb_mode_t                          mb_mode,
  output logic [3:0][1:0]                   sub_mode,
  output mv_t                               mv,
  output mv_t  [NPART-1:0]                  part_mvd,
  output logic [COST_W-1:0]                 jbma,
  output logic [COST_W-1:0]                 jmvp,
  output logic [15:0]                       bw_used,
  output logic [15:0]                       err_cnt,
  // controller status
  output bw_mode_t                          bw_mode,
  output logic [31:0]                       bw_budget,
  output logic [5:0]                        sr_sys,
  output logic [31:0]                       bwfp,
  output logic [31:0]                       used_total,
  output logic [31:0]                       g,
  output logic [15:0]                       k,
  output logic                              done,
  // test
  input  logic [NSAD-1:0][15:0][SAD4_W-1:0] fault_xor
);
  logic        mb_start, eng_busy, ctrl_busy;
  logic signed [15:0] win_x0, win_y0;
  mv_t         mvp;
  logic [9:0]  sum_mv;
  logic [15:0] nmb;

  bwsme_ctrl #(.MB_COLS(MB_COLS), .MB_ROWS(MB_ROWS), .SR_W(6), .W(32), .XW(XW)) u_ctrl (
    .clk, .rst_n, .start, .bw_change, .br, .fr, .gp, .mb_start, .sr, .mb_x, .mb_y,
    .win_x0, .win_y0, .mvp, .sum_mv, .mb_done, .jbma, .jmvp, .bw_used,
    .k, .nmb, .bw_budget, .sr_sys, .bwfp, .used_total, .g, .bw_mode,
    .busy(ctrl_busy), .done);

  me_engine #(.NSAD(NSAD), .SR_MAX_P(SR_MAX), .MB_COLS(MB_COLS),
              .LAMBDA(LAMBDA), .SR_W(6), .XW(XW)) u_eng (
    .clk, .rst_n, .mb_start, .sr, .mb_x, .mb_y, .win_x0, .win_y0, .mvp,
    .sum_mv, .mb_done, .busy(eng_busy), .mb_mode, .sub_mode, .mv,
    .part_mvd, .jbma, .jmvp, .bw_used, .err_cnt, .mem_req, .mem_ack,
    .mem_addr_valid, .mem_ref, .mem_x, .mem_y, .mem_w, .mem_h, .mem_dvalid,
    .mem_data, .mem_finish, .fault_xor);
endmodule
