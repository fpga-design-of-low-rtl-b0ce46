// mvp_gen: motion vector predictor generator.
// Keeps a single line buffer with the motion vector of the latest MB coded
// in each MB column, plus the top-left vector of the next MB. For the MB at
// (mb_x, mb_y) it gives, combinationally, the H.264 median predictor of the
// left (A), top (B) and top-right (C) neighbours, with top-left (D) taking
// C's place when C lies outside the frame, and sum_mv, the sum of the
// absolute components of the three neighbour vectors used. Unavailable
// neighbours count as zero; in the first MB row the predictor is A.
// wr stores mv_in as the vector of MB (mb_x, mb_y) at the next clock edge.
// Only the 16x16 vector of each MB is kept (one line of vectors), a
// simplification of this design.
// A predictor generator with a one-line MV memory that also forms sum_mv
// follows the published method; using the H.264 median of left, top and
// top-right neighbours is this design's own choice.
module mvp_gen
  import me_pkg::*;
#(
  parameter int MB_COLS = 11,
  parameter int XW      = $clog2(MB_COLS + 1),
  parameter int SUMMV_W = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [XW-1:0]      mb_x,
  input  logic [7:0]         mb_y,
  input  logic               wr,
  input  mv_t                mv_in,
  output mv_t                mvp,
  output logic [SUMMV_W-1:0] sum_mv
);
  mv_t line [MB_COLS];
  mv_t tl;                               // top-left of the next MB
  mv_t a, b, c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MB_COLS; i++) line[i] <= '0;
      tl <= '0;
    end else if (wr) begin
      line[mb_x] <= mv_in;
      tl         <= line[mb_x];
    end
  end

  function automatic logic signed [MV_W-1:0] med3(
      input logic signed [MV_W-1:0] p, q, r);
    logic signed [MV_W-1:0] lo, hi;
    lo = (p < q) ? p : q;
    hi = (p < q) ? q : p;
    if (r < lo)      return lo;
    else if (r > hi) return hi;
    else             return r;
  endfunction

  always_comb begin
    a = (mb_x != 0) ? line[mb_x - 1'b1] : '0;
    b = (mb_y != 0) ? line[mb_x] : '0;
    if (mb_y == 0)                      c = '0;
    else if (int'(mb_x) + 1 < MB_COLS)  c = line[mb_x + 1'b1];
    else if (mb_x != 0)                 c = tl;
    else                                c = '0;
    if (mb_y == 0) mvp = a;
    else begin
      mvp.x = med3(a.x, b.x, c.x);
      mvp.y = med3(a.y, b.y, c.y);
    end
    sum_mv = SUMMV_W'(abs_mv(a.x)) + SUMMV_W'(abs_mv(a.y))
           + SUMMV_W'(abs_mv(b.x)) + SUMMV_W'(abs_mv(b.y))
           + SUMMV_W'(abs_mv(c.x)) + SUMMV_W'(abs_mv(c.y));
  end
endmodule
