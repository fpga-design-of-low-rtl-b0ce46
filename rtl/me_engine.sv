// me_engine: full-search variable-block-size motion estimation engine with
// EDDR-protected processing elements.
// Per MB (mb_start with the search range sr and the window origin): the
// pre-retrieval unit loads the current MB and the (2*sr+16)^2 search window,
// centred on the MB position plus its predicted vector, into the current
// and reference pixel buffers; the control unit then scans all (2*sr+1)^2
// positions, NSAD per cycle through NSAD SAD generation modules (each a
// 4-stage SAD tree of 16 EDDR 4x4 PEs); the mode decision keeps the best
// cost per partition and picks the MB mode; the MB's vector is stored in
// the MV predictor generator and mb_done pulses with the results:
// mb_mode/sub_mode, mv (16x16 vector), part_mvd (per-partition vector
// differences), jbma, jmvp, bw_used (reference pixels loaded) and err_cnt
// (4x4 SADs the EDDR detected as faulty and replaced by recovered values).
// mvp and sum_mv always refer to the MB at (mb_x, mb_y), so the controller
// can decide the search range of the next MB before starting it.
// fault_xor is a test input, one mask per PE, XORed into the PE outputs.
// MB cycle count, mb_start to mb_done, with a memory controller that
// acknowledges one cycle after a request and streams without gaps:
// 274 + (2*sr+16)^2 + (2*sr+1)*ceil((2*sr+1)/NSAD), i.e. the 256 + window
// data beats, two handshakes, the scan at NSAD positions per cycle and the
// 4-stage pipeline drain.
// The engine's parts (pre-retrieval, buffers, two SAD generation modules,
// mode decision, MV predictor, control unit) follow the published
// architecture; the window centring, the scan order and the cycle timing
// are this design's own choices.
module me_engine
  import me_pkg::*;
#(
  parameter int NSAD     = 2,
  parameter int SR_MAX_P = SR_MAX,
  parameter int MB_COLS  = 11,
  parameter int LAMBDA   = 4,
  parameter int SR_W     = 6,
  parameter int XW       = $clog2(MB_COLS + 1),
  parameter int WIN      = 2*SR_MAX_P + MB_SIZE,
  parameter int AW       = $clog2(WIN + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // from the bandwidth-scalable ME controller
  input  logic                         mb_start,
  input  logic [SR_W-1:0]              sr,
  input  logic [XW-1:0]                mb_x,
  input  logic [7:0]                   mb_y,
  input  logic signed [15:0]           win_x0,
  input  logic signed [15:0]           win_y0,
  // back to the controller
  output mv_t                          mvp,
  output logic [9:0]                   sum_mv,
  output logic                         mb_done,
  output logic                         busy,
  output mb_mode_t                     mb_mode,
  output logic [3:0][1:0]              sub_mode,
  output mv_t                          mv,
  output mv_t  [NPART-1:0]             part_mvd,
  output logic [COST_W-1:0]            jbma,
  output logic [COST_W-1:0]            jmvp,
  output logic [15:0]                  bw_used,
  output logic [15:0]                  err_cnt,
  // memory controller
  output logic                         mem_req,
  input  logic                         mem_ack,
  output logic                         mem_addr_valid,
  output logic                         mem_ref,
  output logic signed [15:0]           mem_x,
  output logic signed [15:0]           mem_y,
  output logic [7:0]                   mem_w,
  output logic [7:0]                   mem_h,
  input  logic                         mem_dvalid,
  input  logic [PIX_W-1:0]             mem_data,
  input  logic                         mem_finish,
  // test: PE fault injection
  input  logic [NSAD-1:0][15:0][SAD4_W-1:0] fault_xor
);
  localparam int TAG_W = NSAD + 2*MV_W;
  localparam int PW    = MB_SIZE + NSAD - 1;

  // control
  logic fetch_start, fetch_done, md_clr, scan_valid, mvp_wr;
  logic [NSAD-1:0] slot_valid;
  logic signed [MV_W-1:0] scan_dx, scan_dy;
  logic [SR_W-1:0] sr_q;

  me_ctrl #(.NSAD(NSAD), .PIPE(4), .SR_W(SR_W)) u_ctrl (
    .clk, .rst_n, .mb_start, .sr, .fetch_start, .fetch_done, .md_clr,
    .scan_valid, .slot_valid, .scan_dx, .scan_dy, .sr_q, .mvp_wr,
    .mb_done, .busy);

  // pre-retrieval and buffers
  logic          cur_we, ref_we;
  logic [7:0]    cur_waddr;
  logic [AW-1:0] ref_wx, ref_wy;
  logic [PIX_W-1:0] wdata;
  logic signed [15:0] mb_x0, mb_y0;

  assign mb_x0 = 16'(mb_x) * 16'(MB_SIZE);
  assign mb_y0 = 16'(mb_y) * 16'(MB_SIZE);

  pre_retrieval #(.WIN(WIN), .AW(AW)) u_pre (
    .clk, .rst_n, .start(fetch_start), .mb_x0, .mb_y0, .win_x0, .win_y0,
    .win_size(AW'(2*sr + SR_W'(MB_SIZE))),
    .mem_req, .mem_ack, .mem_addr_valid, .mem_ref, .mem_x, .mem_y, .mem_w,
    .mem_h, .mem_dvalid, .mem_data, .mem_finish,
    .cur_we, .cur_waddr, .ref_we, .ref_wx, .ref_wy, .wdata,
    .done(fetch_done), .bw_used);

  logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] cur_mb;
  logic [MB_SIZE-1:0][PW-1:0][PIX_W-1:0] patch;
  logic [AW-1:0] rx, ry;

  cur_buf u_cur (.clk, .we(cur_we), .waddr(cur_waddr), .wdata, .mb(cur_mb));

  assign rx = AW'(scan_dx + MV_W'(sr_q));
  assign ry = AW'(scan_dy + MV_W'(sr_q));

  ref_buf #(.SR_MAX_P(SR_MAX_P), .NSAD(NSAD), .WIN(WIN), .AW(AW)) u_ref (
    .clk, .we(ref_we), .wx(ref_wx), .wy(ref_wy), .wdata, .rx, .ry, .patch);

  // SAD generation modules
  logic [NSAD-1:0]                       sg_valid;
  logic [NSAD-1:0][TAG_W-1:0]            sg_tag;
  logic [NSAD-1:0][NPART-1:0][SAD_W-1:0] sg_sad;
  logic [NSAD-1:0][15:0]                 sg_err;

  for (genvar n = 0; n < NSAD; n++) begin : g_sad
    logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] ref_mb;
    always_comb
      for (int i = 0; i < MB_SIZE; i++)
        for (int j = 0; j < MB_SIZE; j++)
          ref_mb[i*MB_SIZE + j] = patch[i][j + n];
    sad_gen #(.TAG_W(TAG_W)) u_sad (
      .clk, .rst_n, .in_valid(scan_valid),
      .in_tag({slot_valid, scan_dx, scan_dy}),
      .cur(cur_mb), .ref_mb, .fault_xor(fault_xor[n]),
      .out_valid(sg_valid[n]), .out_tag(sg_tag[n]), .sad(sg_sad[n]),
      .err(sg_err[n]));
  end

  // mode decision
  logic [NSAD-1:0]        o_slot;
  logic signed [MV_W-1:0] o_dx, o_dy;
  logic [NPART-1:0][COST_W-1:0] best_j;

  assign {o_slot, o_dx, o_dy} = sg_tag[0];

  mode_decision #(.NSAD(NSAD), .LAMBDA(LAMBDA)) u_md (
    .clk, .rst_n, .clr(md_clr), .in_valid(sg_valid[0]), .slot_valid(o_slot),
    .sad(sg_sad), .dx0(o_dx), .dy(o_dy), .best_mode(mb_mode), .sub_mode,
    .best_mvd(part_mvd), .best_j, .jbma, .jmvp);

  // MV predictor
  mv_t mvp_q;
  mvp_gen #(.MB_COLS(MB_COLS), .XW(XW), .SUMMV_W(10)) u_mvp (
    .clk, .rst_n, .mb_x, .mb_y, .wr(mvp_wr), .mv_in(mv), .mvp, .sum_mv);

  always_comb begin
    mv.x = mvp_q.x + part_mvd[P16X16].x;
    mv.y = mvp_q.y + part_mvd[P16X16].y;
  end

  // per-MB EDDR error count and predictor latch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_cnt <= '0;
      mvp_q   <= '0;
    end else if (md_clr) begin
      err_cnt <= '0;
      mvp_q   <= mvp;
    end else if (sg_valid[0]) begin
      logic [15:0] e;
      e = err_cnt;
      for (int n = 0; n < NSAD; n++)
        if (o_slot[n]) e = e + 16'($countones(sg_err[n]));
      err_cnt <= e;
    end
  end
endmodule
