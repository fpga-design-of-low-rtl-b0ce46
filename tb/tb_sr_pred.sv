// tb_sr_pred: random sum_mv, system range, bandwidth usage and allowance;
// checks the bandwidth mode, pred_sr and final_sr = min(sr_sys,
// max(pred_sr, sum_mv/4)) against a model, and that all three modes and
// the sr_sys limit occur.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_sr_pred;
  import me_pkg::*;
  logic [9:0] sum_mv, pred_sr;
  logic [5:0] sr_sys, final_sr;
  logic [31:0] used_total, bwfp;
  logic [15:0] k;
  bw_mode_t mode;
  int checks = 0, failures = 0, n_mode[3] = '{0, 0, 0}, n_clip = 0;

  sr_pred #(.SR_W(6), .SUMMV_W(10), .W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint avg_lim, lo_lim;
      int m, p, sel, f;
      sum_mv = 10'($urandom_range(0, 200));
      sr_sys = 6'($urandom_range(0, 16));
      k = 16'($urandom_range(0, 98));
      bwfp = 32'($urandom_range(256, 3000));
      used_total = 32'(k * $urandom_range(200, 3500));
      avg_lim = longint'(bwfp) * k;
      lo_lim = longint'(bwfp - (bwfp >> 2)) * k;
      if (k == 0) m = 1;
      else if (longint'(used_total) > avg_lim) m = 0;
      else if (longint'(used_total) >= lo_lim) m = 1;
      else m = 2;
      p = (m == 0) ? sum_mv >> 3 : (m == 1) ? sum_mv >> 1 : sum_mv;
      sel = p > (sum_mv >> 2) ? p : (sum_mv >> 2);
      f = sel > sr_sys ? sr_sys : sel;
      #1;
      checks++;
      if (int'(mode) != m || int'(pred_sr) != p || int'(final_sr) != f) begin
        failures++; $display("FAIL mode %0d pred %0d final %0d expected %0d %0d %0d", mode, pred_sr, final_sr, m, p, f);
      end
      n_mode[m]++;
      if (sel > sr_sys) n_clip++;
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_clip == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
