// sr_pred: search range prediction unit (combinational).
// Bandwidth mode from the average reference bandwidth of the k MBs coded
// so far (used_total / k) against the future allowance bwfp:
//   BW_L  average above bwfp                      (reduce the range)
//   BW_N  average within [bwfp - bwfp/4, bwfp]
//   BW_H  average below that interval             (room to widen)
// The comparison is done as used_total against bwfp*k, with no divider.
// For the first MB (k = 0) the mode is BW_N.
//   pred_sr  = sum_mv >> SR_SHIFT_<mode>
//   final_sr = min(sr_sys, max(pred_sr, sum_mv / 4))
// The final_sr formula and the three shift factors' names are the
// reference's; their values, the interval and the use of the shift factors
// as right shifts of sum_mv are this design's choices.
module sr_pred
  import me_pkg::*;
#(
  parameter int SR_W            = 6,
  parameter int SUMMV_W         = 10,
  parameter int W               = 32,
  parameter int SR_SHIFT_LOW    = 3,
  parameter int SR_SHIFT_MIDDLE = 1,
  parameter int SR_SHIFT_HIGH   = 0
) (
  input  logic [SUMMV_W-1:0] sum_mv,
  input  logic [SR_W-1:0]    sr_sys,
  input  logic [W-1:0]       used_total,
  input  logic [15:0]        k,
  input  logic [W-1:0]       bwfp,
  output bw_mode_t           mode,
  output logic [SUMMV_W-1:0] pred_sr,
  output logic [SR_W-1:0]    final_sr
);
  logic [W+15:0] hi_lim, lo_lim, used_w;
  logic [SUMMV_W-1:0] lower, sel;
  logic [W-1:0]       bwfp34;       // 3/4 of bwfp

  always_comb begin
    hi_lim = (W+16)'(bwfp) * (W+16)'(k);
    bwfp34 = bwfp - (bwfp >> 2);
    lo_lim = (W+16)'(bwfp34) * (W+16)'(k);
    used_w = (W+16)'(used_total);
    if (k == 0)               mode = BW_N;
    else if (used_w > hi_lim) mode = BW_L;
    else if (used_w >= lo_lim) mode = BW_N;
    else                      mode = BW_H;
    case (mode)
      BW_L:    pred_sr = sum_mv >> SR_SHIFT_LOW;
      BW_H:    pred_sr = sum_mv >> SR_SHIFT_HIGH;
      default: pred_sr = sum_mv >> SR_SHIFT_MIDDLE;
    endcase
    lower = sum_mv >> 2;
    sel   = (pred_sr > lower) ? pred_sr : lower;
    final_sr = (sel > SUMMV_W'(sr_sys)) ? sr_sys : SR_W'(sel);
  end
endmodule
