// pe: processing element, the circuit under test of the EDDR scheme.
// Computes the sum of absolute differences of one 4x4 block pair,
// SAD = sum |X_ij - Y_ij|. Each pixel pair goes through an 8-bit
// absolute-difference stage; the sixteen results are summed in a 12-bit
// adder tree (the serial 12-bit accumulator of a classic systolic PE,
// unrolled so that a whole search position is handled per cycle).
// Purely combinational: sad is valid in the same cycle as cur/ref.
// Pixels are packed raster order, pixel (i,j) at index 4*i+j.
// The PE's function follows the published method; unrolling the serial
// accumulator into a one-cycle adder tree is this design's own choice,
// needed to compute one search position per cycle.
module pe
  import me_pkg::*;
(
  input  logic [BLK*BLK-1:0][PIX_W-1:0] cur,
  input  logic [BLK*BLK-1:0][PIX_W-1:0] ref_blk,
  output logic [SAD4_W-1:0]             sad
);
  logic [BLK*BLK-1:0][PIX_W-1:0] ad;

  always_comb begin
    for (int k = 0; k < BLK*BLK; k++)
      ad[k] = (cur[k] >= ref_blk[k]) ? cur[k] - ref_blk[k] : ref_blk[k] - cur[k];
  end

  always_comb begin
    sad = '0;
    for (int k = 0; k < BLK*BLK; k++)
      sad = sad + SAD4_W'(ad[k]);
  end
endmodule
