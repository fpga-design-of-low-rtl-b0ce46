// tb_bwsme_ctrl: runs the bandwidth-scalable ME controller over two frames
// of 4x3 MBs with a stand-in ME engine that answers each mb_start after a
// random delay with random R-D costs and the bytes of the requested window,
// and presents random predictors and sum_mv. A model of the controller
// checks, MB by MB, the search range, the window origin, the MB position,
// the budget, sr_sys, bwfp and g, across a drop of the bandwidth after
// MB 9. All three bandwidth modes must occur.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_bwsme_ctrl;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int C = 4, R = 3, GP = 2, FR = 30, CHANGE_MB = 10;
  localparam longint BR = 1100 * C * R * FR, BR2 = 600 * C * R * FR;
  logic start = 0, bw_change = 0, mb_start, mb_done = 0, busy, done;
  logic [31:0] br, bw_budget, bwfp, used_total, g;
  logic [7:0] fr, gp, mb_y;
  logic [5:0] sr, sr_sys;
  logic [2:0] mb_x;
  logic signed [15:0] win_x0, win_y0;
  mv_t mvp;
  logic [9:0] sum_mv;
  logic [COST_W-1:0] jbma, jmvp;
  logic [15:0] bw_used, k, nmb;
  bw_mode_t bw_mode;
  int checks = 0, failures = 0, n_mode[3] = '{0, 0, 0};

  bwsme_ctrl #(.MB_COLS(C), .MB_ROWS(R)) dut (.*);

  function automatic longint isq(longint x);
    longint r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  task automatic ck(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint budget, nmb_m, root, srs, used, bwfp_m;
    int PX[GP*C*R+1], PY[GP*C*R+1], SMV[GP*C*R+1];
    br = 32'(BR); fr = FR; gp = GP;
    foreach (PX[i]) begin
      PX[i] = $urandom_range(0, 10) - 5; PY[i] = $urandom_range(0, 10) - 5;
      SMV[i] = $urandom_range(0, 60);
    end
    mvp.x = 8'(PX[0]); mvp.y = 8'(PY[0]); sum_mv = 10'(SMV[0]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    nmb_m = GP * C * R;
    budget = (BR / FR) * GP;
    root = isq(budget / nmb_m);
    srs = (root < 16) ? 0 : ((root - 16) / 2 > 16 ? 16 : (root - 16) / 2);
    bwfp_m = budget / nmb_m; used = 0;
    for (int km = 0; km < nmb_m; km++) begin
      int m, p, sel, srv, px, py, smv;
      longint jm, jb, n;
      px = PX[km]; py = PY[km]; smv = SMV[km];
      if (km == 0) m = 1;
      else if (used > bwfp_m * km) m = 0;
      else if (used >= (bwfp_m - (bwfp_m >> 2)) * km) m = 1;
      else m = 2;
      p = (m == 0) ? smv >> 3 : (m == 1) ? smv >> 1 : smv;
      sel = p > (smv >> 2) ? p : smv >> 2;
      srv = (km == 0) ? int'(srs) : (sel > srs ? int'(srs) : sel);
      if (km > 0) n_mode[m]++;
      while (!mb_start) @(negedge clk);
      ck(int'(sr) == srv, $sformatf("MB %0d sr %0d expected %0d", km, sr, srv));
      ck(int'(mb_x) == km % C && int'(mb_y) == (km / C) % R, "MB position");
      ck(int'(win_x0) == (km % C) * 16 + px - srv && int'(win_y0) == ((km / C) % R) * 16 + py - srv,
         $sformatf("MB %0d window (%0d,%0d)", km, win_x0, win_y0));
      ck(longint'(bw_budget) == budget && longint'(sr_sys) == srs, "budget and sr_sys");
      if (km == CHANGE_MB - 1) begin
        br = 32'(BR2); bw_change = 1; @(negedge clk); bw_change = 0;
      end
      repeat ($urandom_range(5, 40)) @(negedge clk);
      // some MBs report a small fetch so that usage falls behind the pace
      n = (km % 6 < 2) ? 300 : 256 + (2*srv + 16) * (2*srv + 16);
      jb = $urandom_range(100, 20000);
      jm = jb + $urandom_range(0, 5000);
      jbma = 18'(jb); jmvp = 18'(jm); bw_used = 16'(n);
      // the engine presents the next MB's predictor with its results
      mvp.x = 8'(PX[km+1]); mvp.y = 8'(PY[km+1]); sum_mv = 10'(SMV[km+1]);
      mb_done = 1; @(negedge clk); mb_done = 0;
      used += n;
      if (km == CHANGE_MB - 1) begin
        budget = (BR2 / FR) * GP;
        root = isq(budget / nmb_m);
        srs = (root < 16) ? 0 : ((root - 16) / 2 > 16 ? 16 : (root - 16) / 2);
      end
      if (km + 1 < nmb_m) begin
        bwfp_m = (budget > used ? budget - used : 0) / (nmb_m - km - 1);
        while (!mb_start) @(negedge clk);
        ck(longint'(bwfp) == bwfp_m, $sformatf("MB %0d bwfp %0d expected %0d", km, bwfp, bwfp_m));
        ck(longint'(used_total) == used, "used_total");
        ck(longint'(g) == ((jm - jb) << 8) / n, "g");
      end
    end
    while (!done) @(negedge clk);
    ck(1'b1, "done");
    $display("modes L/N/H %0d/%0d/%0d", n_mode[0], n_mode[1], n_mode[2]);
    ck(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all bandwidth modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
