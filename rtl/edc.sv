// edc: error detection circuit. Splits the SAD produced by the PE into its
// own residue and quotient modulo M and compares both with the test code
// (RT, QT) from the TCG. err is high when either differs. Combinational.
// Comparing the PE result with the test code follows the EDDR method; the
// exact split by a constant M (64 here) is this design's own choice.
module edc
  import me_pkg::*;
#(
  parameter int M   = RQ_M,
  parameter int R_W = $clog2(M),
  parameter int Q_W = SAD4_W - $clog2(M)
) (
  input  logic [SAD4_W-1:0] sad,
  input  logic [R_W-1:0]    rt,
  input  logic [Q_W-1:0]    qt,
  output logic              err
);
  logic [R_W-1:0] r_pe;
  logic [Q_W-1:0] q_pe;

  always_comb begin
    r_pe = R_W'(sad % SAD4_W'(M));
    q_pe = Q_W'(sad / SAD4_W'(M));
    err  = (r_pe != rt) || (q_pe != qt);
  end
endmodule
