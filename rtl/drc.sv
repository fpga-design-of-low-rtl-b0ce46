// drc: data recovery circuit. Rebuilds a SAD from its RQ test code as
// QT*M + RT, the value exported instead of the PE output when the EDC flags
// an error. Combinational.
// Recovery from the test code follows the EDDR method; the formula QT*M +
// RT is implied by the residue/quotient definition rather than spelled out,
// and M = 64 is this design's own choice.
module drc
  import me_pkg::*;
#(
  parameter int M   = RQ_M,
  parameter int R_W = $clog2(M),
  parameter int Q_W = SAD4_W - $clog2(M)
) (
  input  logic [R_W-1:0]    rt,
  input  logic [Q_W-1:0]    qt,
  output logic [SAD4_W-1:0] sad_rec
);
  always_comb sad_rec = SAD4_W'(qt) * SAD4_W'(M) + SAD4_W'(rt);
endmodule
