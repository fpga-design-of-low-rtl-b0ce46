// tcg: test code generator for one 4x4 block.
// Produces the RQ code of the block SAD, RT = SAD mod M and QT = SAD div M,
// from per-pixel residues and quotients (sixteen rqcg instances), following
// the decomposition RT = |sum r_ij|_M and QT = sum q_ij + (sum r_ij) div M.
// It shares no adder with the PE, so a fault in the PE's sum does not reach
// the test code. Combinational.
// Building the test code from per-pixel residues and quotients follows the
// residue-and-quotient method; keeping the TCG's adders separate from the
// PE's is this design's own choice, so that a PE fault cannot corrupt its
// own check.
module tcg
  import me_pkg::*;
#(
  parameter int M   = RQ_M,
  parameter int R_W = $clog2(M),
  parameter int Q_W = SAD4_W - $clog2(M)
) (
  input  logic [BLK*BLK-1:0][PIX_W-1:0] cur,
  input  logic [BLK*BLK-1:0][PIX_W-1:0] ref_blk,
  output logic [R_W-1:0]                rt,
  output logic [Q_W-1:0]                qt
);
  localparam int PQ_W = PIX_W - $clog2(M) + 1;
  localparam int RS_W = R_W + 4;                   // sum of 16 residues

  logic [BLK*BLK-1:0][R_W-1:0]  r;
  logic [BLK*BLK-1:0][PQ_W-1:0] q;
  logic [RS_W-1:0] rsum;
  logic [Q_W-1:0]  qsum;

  for (genvar k = 0; k < BLK*BLK; k++) begin : g_rq
    rqcg #(.M(M), .PIX_W(PIX_W), .R_W(R_W), .Q_W(PQ_W)) u_rqcg (
      .x(cur[k]), .y(ref_blk[k]), .r(r[k]), .q(q[k]));
  end

  always_comb begin
    rsum = '0;
    qsum = '0;
    for (int k = 0; k < BLK*BLK; k++) begin
      rsum = rsum + RS_W'(r[k]);
      qsum = qsum + Q_W'(q[k]);
    end
    rt = R_W'(rsum % RS_W'(M));
    qt = qsum + Q_W'(rsum / RS_W'(M));
  end
endmodule
