// rqcg: residue-and-quotient code generator for one pixel pair.
// Gives r = |X-Y| mod M and q = |X-Y| div M without forming |X-Y| itself:
// X and Y are each split into quotient and residue (X = qx*M + rx), the
// residues and quotients are subtracted separately, and a negative residue
// difference borrows one unit from the quotient difference. When X < Y the
// operands are swapped so that the result is the absolute value.
// Combinational. M is a parameter (default 64, this design's choice; the
// reference leaves the modulus open).
module rqcg #(
  parameter int M     = 64,
  parameter int PIX_W = 8,
  parameter int R_W   = $clog2(M),
  parameter int Q_W   = PIX_W - $clog2(M) + 1
) (
  input  logic [PIX_W-1:0] x,
  input  logic [PIX_W-1:0] y,
  output logic [R_W-1:0]   r,
  output logic [Q_W-1:0]   q
);
  logic [PIX_W-1:0] a, b;
  logic [PIX_W-1:0] qa, qb, ra, rb;

  always_comb begin
    // a >= b after the swap
    if (x >= y) begin a = x; b = y; end
    else        begin a = y; b = x; end
    qa = a / PIX_W'(M);
    ra = a % PIX_W'(M);
    qb = b / PIX_W'(M);
    rb = b % PIX_W'(M);
    if (ra >= rb) begin
      r = R_W'(ra - rb);
      q = Q_W'(qa - qb);
    end else begin
      r = R_W'(ra + PIX_W'(M) - rb);
      q = Q_W'(qa - qb - 1'b1);
    end
  end
endmodule
