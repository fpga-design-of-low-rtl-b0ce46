// Shared body of the end-to-end testbenches of bwsme_eddr_top. The
// including module defines COLS, ROWS, GP, BR, FR, FAULT_MB and
// instantiates the design as dut, plus the memory model u_mem.
// An independent model of the controller (bandwidth budget, system search
// range, future bandwidth prediction, bandwidth mode, predicted and final
// search range, efficiency) and of the motion-vector predictor runs beside
// the design and is compared MB by MB; a 16x16 full search in the
// testbench checks each MB's vector and costs. The mechanisms of the
// design are counted and each must occur: the three bandwidth modes, a
// search range limited by the system range, a search range change, an
// EDDR error detected and recovered, a memory stall, a frame wrap and a
// sudden bandwidth change.

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int med3(int a, int b, int c);
    int lo = a < b ? a : b, hi = a < b ? b : a;
    return c < lo ? lo : (c > hi ? hi : c);
  endfunction
  function automatic longint isqrt_m(longint x);
    longint r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  int mvx[ROWS][COLS], mvy[ROWS][COLS];
  int n_mode[3] = '{0, 0, 0};
  int n_clip = 0, n_change = 0, n_err = 0, n_wrap = 0;

  // 16x16 full search around (px, py): best cost, its offset, SAD at 0
  task automatic golden16(int mbx, int mby, int px, int py, int srv,
                          output int bjv, output int bdx, output int bdy, output int j0);
    int cur[16][16];
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) cur[i][j] = u_mem.cur_pix(mbx*16 + j, mby*16 + i);
    bjv = 32'h7fffffff;
    for (int dy = -srv; dy <= srv; dy++)
      for (int dx = -srv; dx <= srv; dx++) begin
        int s = 0, c;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int r = u_mem.ref_pix(mbx*16 + px + dx + j, mby*16 + py + dy + i);
            s += iabs(cur[i][j] - r);
          end
        c = s + 4 * (iabs(dx) + iabs(dy));
        if (dx == 0 && dy == 0) j0 = s;
        if (c < bjv) begin bjv = c; bdx = dx; bdy = dy; end
      end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint budget, nmb, per_mb, root, sr_sys_m, used, bwfp_m;
    int k_m, prev_sr;
    fault_xor = '0;
    br = 32'(BR); fr = 8'(FR); gp = 8'(GP); start = 0; bw_change = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;

    nmb      = GP * COLS * ROWS;
    budget   = (BR / FR) * GP;
    per_mb   = budget / nmb;
    root     = isqrt_m(per_mb);
    sr_sys_m = (root < 16) ? 0 : ((root - 16) / 2 > 16 ? 16 : (root - 16) / 2);
    bwfp_m   = per_mb;
    used     = 0;
    prev_sr  = -1;

    for (k_m = 0; k_m < nmb; k_m++) begin
      int mbx, mby, ax, ay, bx, by, cx, cy, px, py, smv, mode_m, pred, lower, sel, srv;
      int bjv, bdx, bdy, j0, n;
      longint jm, jb;
      mbx = k_m % COLS;
      mby = (k_m / COLS) % ROWS;
      if (k_m > 0 && mbx == 0 && mby == 0) n_wrap++;
      if (k_m == FAULT_MB) begin
        fault_xor[0][3]  = 12'h010;
        fault_xor[1][12] = 12'h100;
      end else fault_xor = '0;
      // neighbours from the vectors the design reported
      ax = mbx > 0 ? mvx[mby][mbx-1] : 0;   ay = mbx > 0 ? mvy[mby][mbx-1] : 0;
      bx = mby > 0 ? mvx[mby-1][mbx] : 0;   by = mby > 0 ? mvy[mby-1][mbx] : 0;
      if (mby == 0) begin cx = 0; cy = 0; end
      else if (mbx + 1 < COLS) begin cx = mvx[mby-1][mbx+1]; cy = mvy[mby-1][mbx+1]; end
      else if (mbx > 0) begin cx = mvx[mby-1][mbx-1]; cy = mvy[mby-1][mbx-1]; end
      else begin cx = 0; cy = 0; end
      if (mby == 0) begin px = ax; py = ay; end
      else begin px = med3(ax, bx, cx); py = med3(ay, by, cy); end
      smv = iabs(ax) + iabs(ay) + iabs(bx) + iabs(by) + iabs(cx) + iabs(cy);
      // bandwidth mode and search range
      if (k_m == 0) mode_m = 1;
      else if (longint'(used) > bwfp_m * k_m) mode_m = 0;
      else if (longint'(used) >= (bwfp_m - (bwfp_m >> 2)) * k_m) mode_m = 1;
      else mode_m = 2;
      pred  = (mode_m == 0) ? smv >> 3 : (mode_m == 1) ? smv >> 1 : smv;
      lower = smv >> 2;
      sel   = pred > lower ? pred : lower;
      srv   = (k_m == 0) ? int'(sr_sys_m) : (sel > sr_sys_m ? int'(sr_sys_m) : sel);
      if (k_m > 0) begin
        n_mode[mode_m]++;
        if (sel > sr_sys_m) n_clip++;
      end
      if (prev_sr >= 0 && srv != prev_sr) n_change++;
      prev_sr = srv;

      if (k_m == CHANGE_MB - 1) begin
        // sudden drop of the available bandwidth, effective from the next MB
        br = 32'(BR2);
        bw_change = 1;
        @(negedge clk);
        bw_change = 0;
      end
      while (!mb_done) @(negedge clk);
      jm = jmvp;
      jb = jbma;
      if (k_m == 0) begin
        ck(dut.bw_budget == 32'(budget), $sformatf("bw_budget %0d expected %0d", dut.bw_budget, budget));
        ck(dut.sr_sys == 6'(sr_sys_m), $sformatf("sr_sys %0d expected %0d", dut.sr_sys, sr_sys_m));
      end
      ck(int'(mb_x) == mbx && int'(mb_y) == mby, $sformatf("MB position (%0d,%0d) expected (%0d,%0d)", mb_x, mb_y, mbx, mby));
      ck(int'(sr) == srv, $sformatf("MB %0d sr %0d expected %0d (mode %0d smv %0d)", k_m, sr, srv, mode_m, smv));
      n = (2*srv + 16) * (2*srv + 16);
      ck(int'(bw_used) == n, $sformatf("MB %0d bw_used %0d expected %0d", k_m, bw_used, n));
      golden16(mbx, mby, px, py, srv, bjv, bdx, bdy, j0);
      ck(int'(mv.x) == px + bdx && int'(mv.y) == py + bdy,
         $sformatf("MB %0d mv (%0d,%0d) expected (%0d,%0d)", k_m, mv.x, mv.y, px + bdx, py + bdy));
      ck(int'(jmvp) == j0, $sformatf("MB %0d jmvp %0d expected %0d", k_m, jmvp, j0));
      ck(int'(jbma) <= bjv, $sformatf("MB %0d jbma %0d above the 16x16 cost %0d", k_m, jbma, bjv));
      if (k_m == FAULT_MB) begin
        ck(err_cnt > 0, "EDDR detects the injected PE faults");
        n_err += err_cnt;
      end else ck(err_cnt == 0, $sformatf("MB %0d false EDDR alarm", k_m));
      mvx[mby][mbx] = mv.x;
      mvy[mby][mbx] = mv.y;
      used += n;
      // controller status once its updates are done
      if (k_m == CHANGE_MB - 1) begin
        budget   = (BR2 / FR) * GP;
        root     = isqrt_m(budget / nmb);
        sr_sys_m = (root < 16) ? 0 : ((root - 16) / 2 > 16 ? 16 : (root - 16) / 2);
      end
      if (k_m + 1 < nmb) begin
        bwfp_m = (budget > used ? budget - used : 0) / (nmb - (k_m + 1));
        @(negedge clk);
        while (!mem_req) @(negedge clk);   // next MB has started
        ck(longint'(dut.bwfp) == bwfp_m, $sformatf("MB %0d bwfp %0d expected %0d", k_m, dut.bwfp, bwfp_m));
        ck(longint'(dut.used_total) == used, "used_total");
        ck(longint'(dut.bw_budget) == budget && longint'(dut.sr_sys) == sr_sys_m,
           $sformatf("MB %0d budget %0d sr_sys %0d expected %0d %0d", k_m, dut.bw_budget, dut.sr_sys, budget, sr_sys_m));
        ck(dut.g == 32'(jm > jb ? ((jm - jb) << 8) / n : 0),
           $sformatf("MB %0d g %0d", k_m, dut.g));
      end else begin
        @(negedge clk);
      end
    end
    while (!done) @(negedge clk);
    ck(1'b1, "done");
    $display("modes L/N/H = %0d/%0d/%0d, sr clipped %0d, sr changes %0d, EDDR errors %0d, memory stalls %0d, frame wraps %0d",
             n_mode[0], n_mode[1], n_mode[2], n_clip, n_change, n_err, u_mem.n_gap, n_wrap);
    ck(n_mode[0] > 0, "BW_L mode occurred");
    ck(n_mode[1] > 0, "BW_N mode occurred");
    ck(n_mode[2] > 0, "BW_H mode occurred");
    ck(n_clip > 0, "search range limited by sr_sys");
    ck(n_change > 0, "search range changed");
    ck(n_err > 0, "EDDR error detected and recovered");
    ck(u_mem.n_gap > 0, "memory stall");
    ck(GP < 2 || n_wrap > 0, "frame wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
