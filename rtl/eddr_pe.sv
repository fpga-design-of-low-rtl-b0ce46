// eddr_pe: one EDDR-protected 4x4 SAD unit. The PE (circuit under test)
// and the TCG see the same pixels; the EDC compares the PE's SAD with the
// TCG's residue/quotient code, and the selector exports the PE's SAD when
// they agree or the DRC's recovered value QT*M+RT when they do not.
// fault_xor is a test input that flips bits of the PE output to emulate a
// faulty PE; tie it to zero in normal use. Combinational.
// PE, TCG, EDC, DRC and the output selector follow the EDDR method; the
// fault_xor test input is this design's own addition.
module eddr_pe
  import me_pkg::*;
#(
  parameter int M = RQ_M
) (
  input  logic [BLK*BLK-1:0][PIX_W-1:0] cur,
  input  logic [BLK*BLK-1:0][PIX_W-1:0] ref_blk,
  input  logic [SAD4_W-1:0]             fault_xor,
  output logic [SAD4_W-1:0]             sad,
  output logic                          err
);
  localparam int R_W = $clog2(M);
  localparam int Q_W = SAD4_W - $clog2(M);

  logic [SAD4_W-1:0] sad_pe, sad_cut, sad_rec;
  logic [R_W-1:0]    rt;
  logic [Q_W-1:0]    qt;

  pe u_pe (.cur(cur), .ref_blk(ref_blk), .sad(sad_pe));
  assign sad_cut = sad_pe ^ fault_xor;

  tcg #(.M(M)) u_tcg (.cur(cur), .ref_blk(ref_blk), .rt(rt), .qt(qt));
  edc #(.M(M)) u_edc (.sad(sad_cut), .rt(rt), .qt(qt), .err(err));
  drc #(.M(M)) u_drc (.rt(rt), .qt(qt), .sad_rec(sad_rec));

  // selector
  assign sad = err ? sad_rec : sad_cut;
endmodule
