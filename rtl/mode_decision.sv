// mode_decision: R-D mode decision of the ME engine.
// Over the search of one MB it keeps, for each of the 41 partitions, the
// lowest cost J = SAD + LAMBDA*(|mvd.x|+|mvd.y|) and the offset (motion
// vector difference to the predictor, which is the search centre) that gave
// it. Each cycle it accepts up to NSAD candidates; candidates are taken in
// slot order and a later one replaces the best only when strictly cheaper.
// clr starts a new MB. From the stored bests it selects, combinationally,
// the MB mode (16x16, 16x8, 8x16 or 8x8 with each 8x8 choosing the cheapest
// of 8x8/8x4/4x8/4x4; ties go to the larger partition) and reports
// jbma = cost of the chosen mode and jmvp = 16x16 cost at the predictor.
// The cost function, LAMBDA and the tie rules are this design's choices.
module mode_decision
  import me_pkg::*;
#(
  parameter int NSAD   = 2,
  parameter int LAMBDA = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  clr,
  input  logic                                  in_valid,
  input  logic [NSAD-1:0]                       slot_valid,
  input  logic [NSAD-1:0][NPART-1:0][SAD_W-1:0] sad,
  input  logic signed [MV_W-1:0]                dx0,   // offset of slot 0
  input  logic signed [MV_W-1:0]                dy,
  output mb_mode_t                              best_mode,
  output logic [3:0][1:0]                       sub_mode, // 0:8x8 1:8x4 2:4x8 3:4x4
  output mv_t  [NPART-1:0]                      best_mvd,
  output logic [NPART-1:0][COST_W-1:0]          best_j,
  output logic [COST_W-1:0]                     jbma,
  output logic [COST_W-1:0]                     jmvp
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPART; p++) begin
        best_j[p]   <= '1;
        best_mvd[p] <= '0;
      end
      jmvp <= '1;
    end else if (clr) begin
      for (int p = 0; p < NPART; p++) begin
        best_j[p]   <= '1;
        best_mvd[p] <= '0;
      end
      jmvp <= '1;
    end else if (in_valid) begin
      logic [NPART-1:0][COST_W-1:0] bj;
      mv_t  [NPART-1:0]             bm;
      logic [COST_W-1:0]            jm;
      bj = best_j;
      bm = best_mvd;
      jm = jmvp;
      for (int n = 0; n < NSAD; n++) begin
        if (slot_valid[n]) begin
          logic signed [MV_W-1:0] dx;
          logic [COST_W-1:0]      rate;
          dx   = dx0 + MV_W'(n);
          rate = COST_W'(LAMBDA) * (COST_W'(abs_mv(dx)) + COST_W'(abs_mv(dy)));
          for (int p = 0; p < NPART; p++) begin
            if (COST_W'(sad[n][p]) + rate < bj[p]) begin
              bj[p]   = COST_W'(sad[n][p]) + rate;
              bm[p].x = dx;
              bm[p].y = dy;
            end
          end
          if (dx == 0 && dy == 0) jm = COST_W'(sad[n][P16X16]);
        end
      end
      best_j   <= bj;
      best_mvd <= bm;
      jmvp     <= jm;
    end
  end

  // mode selection
  logic [COST_W+2:0] c16, c168, c816, c88;
  logic [3:0][COST_W+1:0] sub_cost;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [COST_W+1:0] j88, j84, j48, j44;
      int r8, c8;
      r8 = i / 2;
      c8 = i % 2;
      j88 = (COST_W+2)'(best_j[P8X8 + i]);
      j84 = (COST_W+2)'(best_j[P8X4 + 2*(2*r8) + c8])
          + (COST_W+2)'(best_j[P8X4 + 2*(2*r8+1) + c8]);
      j48 = (COST_W+2)'(best_j[P4X8 + 4*r8 + 2*c8])
          + (COST_W+2)'(best_j[P4X8 + 4*r8 + 2*c8 + 1]);
      j44 = (COST_W+2)'(best_j[P4X4 + 4*(2*r8)   + 2*c8])
          + (COST_W+2)'(best_j[P4X4 + 4*(2*r8)   + 2*c8 + 1])
          + (COST_W+2)'(best_j[P4X4 + 4*(2*r8+1) + 2*c8])
          + (COST_W+2)'(best_j[P4X4 + 4*(2*r8+1) + 2*c8 + 1]);
      sub_cost[i] = j88;
      sub_mode[i] = 2'd0;
      if (j84 < sub_cost[i]) begin sub_cost[i] = j84; sub_mode[i] = 2'd1; end
      if (j48 < sub_cost[i]) begin sub_cost[i] = j48; sub_mode[i] = 2'd2; end
      if (j44 < sub_cost[i]) begin sub_cost[i] = j44; sub_mode[i] = 2'd3; end
    end
    c16  = (COST_W+3)'(best_j[P16X16]);
    c168 = (COST_W+3)'(best_j[P16X8]) + (COST_W+3)'(best_j[P16X8+1]);
    c816 = (COST_W+3)'(best_j[P8X16]) + (COST_W+3)'(best_j[P8X16+1]);
    c88  = (COST_W+3)'(sub_cost[0]) + (COST_W+3)'(sub_cost[1])
         + (COST_W+3)'(sub_cost[2]) + (COST_W+3)'(sub_cost[3]);
    best_mode = MODE_16X16;
    jbma      = COST_W'(c16);
    if (c168 < (COST_W+3)'(jbma)) begin best_mode = MODE_16X8; jbma = COST_W'(c168); end
    if (c816 < (COST_W+3)'(jbma)) begin best_mode = MODE_8X16; jbma = COST_W'(c816); end
    if (c88  < (COST_W+3)'(jbma)) begin best_mode = MODE_8X8;  jbma = COST_W'(c88);  end
  end
endmodule
