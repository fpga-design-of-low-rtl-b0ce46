// tb_me_engine: drives the ME engine as the controller would, for several
// MBs of the first MB row with search ranges 0, 3, 7 and 16, against the
// memory model (no idle cycles). For each MB an independent full search in
// the testbench gives the best cost and vector of all 41 partitions, the
// MB mode and costs, which are compared with the engine's results; it also
// checks the predictor, the reference bytes fetched, the EDDR error count
// and the cycle count (two search positions per cycle). One MB is run with
// a fault injected into one PE of each SAD module: the error count must
// match and the results must be unchanged.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_me_engine;
  import me_pkg::*;
  localparam int NSAD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mb_start = 0;
  logic [5:0] sr = 0;
  logic [3:0] mb_x = 0;
  logic [7:0] mb_y = 0;
  logic signed [15:0] win_x0 = 0, win_y0 = 0;
  mv_t mvp, mv;
  logic [9:0] sum_mv;
  logic mb_done, busy;
  mb_mode_t mb_mode;
  logic [3:0][1:0] sub_mode;
  mv_t [NPART-1:0] part_mvd;
  logic [COST_W-1:0] jbma, jmvp;
  logic [15:0] bw_used, err_cnt;
  logic mem_req, mem_ack, mem_addr_valid, mem_ref, mem_dvalid, mem_finish;
  logic signed [15:0] mem_x, mem_y;
  logic [7:0] mem_w, mem_h, mem_data;
  logic [NSAD-1:0][15:0][SAD4_W-1:0] fault_xor = '0;

  me_engine #(.NSAD(NSAD), .MB_COLS(11)) dut (.*);
  mem_model #(.MOTION(1), .GAPS(1'b0)) u_mem (.*);

  int checks = 0, failures = 0;
  task automatic ck(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // partition rectangles in the engine's order
  function automatic void part_rect(int p, output int x0, output int y0, output int w, output int h);
    if (p == 0)       begin x0 = 0; y0 = 0; w = 16; h = 16; end
    else if (p < 3)   begin x0 = 0; y0 = 8*(p-1); w = 16; h = 8; end
    else if (p < 5)   begin x0 = 8*(p-3); y0 = 0; w = 8; h = 16; end
    else if (p < 9)   begin x0 = 8*((p-5)%2); y0 = 8*((p-5)/2); w = 8; h = 8; end
    else if (p < 17)  begin x0 = 8*((p-9)%2); y0 = 4*((p-9)/2); w = 8; h = 4; end
    else if (p < 25)  begin x0 = 4*((p-17)%4); y0 = 8*((p-17)/4); w = 4; h = 8; end
    else              begin x0 = 4*((p-25)%4); y0 = 4*((p-25)/4); w = 4; h = 4; end
  endfunction

  int bj[NPART], bdx[NPART], bdy[NPART];
  int exp_jmvp;

  // independent full search of MB (mbx, 0) around predictor (px, py)
  task automatic golden(int mbx, int mby, int px, int py, int srv);
    int cur[16][16];
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) cur[i][j] = u_mem.cur_pix(mbx*16 + j, mby*16 + i);
    for (int p = 0; p < NPART; p++) bj[p] = 32'h7fffffff;
    for (int dy = -srv; dy <= srv; dy++)
      for (int dx = -srv; dx <= srv; dx++) begin
        int d[16][16];
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++) begin
            int r = u_mem.ref_pix(mbx*16 + px + dx + j, mby*16 + py + dy + i);
            d[i][j] = (cur[i][j] > r) ? cur[i][j] - r : r - cur[i][j];
          end
        for (int p = 0; p < NPART; p++) begin
          int x0, y0, w, h, s, c;
          part_rect(p, x0, y0, w, h);
          s = 0;
          for (int i = 0; i < h; i++) for (int j = 0; j < w; j++) s += d[y0+i][x0+j];
          c = s + 4 * ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy));
          if (p == 0 && dx == 0 && dy == 0) exp_jmvp = s;
          if (c < bj[p]) begin bj[p] = c; bdx[p] = dx; bdy[p] = dy; end
        end
      end
  endtask

  function automatic int sub_cost(int i, output int m);
    int r8 = i / 2, c8 = i % 2, j88, j84, j48, j44, best;
    j88 = bj[P8X8 + i];
    j84 = bj[P8X4 + 4*r8 + c8] + bj[P8X4 + 4*r8 + 2 + c8];
    j48 = bj[P4X8 + 4*r8 + 2*c8] + bj[P4X8 + 4*r8 + 2*c8 + 1];
    j44 = bj[P4X4 + 8*r8 + 2*c8] + bj[P4X4 + 8*r8 + 2*c8 + 1]
        + bj[P4X4 + 8*r8 + 4 + 2*c8] + bj[P4X4 + 8*r8 + 4 + 2*c8 + 1];
    best = j88; m = 0;
    if (j84 < best) begin best = j84; m = 1; end
    if (j48 < best) begin best = j48; m = 2; end
    if (j44 < best) begin best = j44; m = 3; end
    return best;
  endfunction

  int total_err = 0;

  task automatic run_mb(int mbx, int srv, int exp_px, int exp_py, int n_faulty);
    int px, py, cyc, n, l, mode_e, jb, c168, c816, c88, sm[4];
    mb_x = 4'(mbx); mb_y = 0;
    @(negedge clk);
    px = mvp.x; py = mvp.y;
    ck(px == exp_px && py == exp_py, $sformatf("mvp of MB %0d = (%0d,%0d), expected (%0d,%0d)", mbx, px, py, exp_px, exp_py));
    sr = 6'(srv);
    win_x0 = 16'(mbx*16 + px - srv);
    win_y0 = 16'(py - srv);
    mb_start = 1;
    @(negedge clk);
    mb_start = 0;
    cyc = 1;
    while (!mb_done) begin @(negedge clk); cyc++; end
    golden(mbx, 0, px, py, srv);
    n = (2*srv + 16) * (2*srv + 16);
    l = (2*srv + 1) * ((2*srv + 1 + NSAD - 1) / NSAD);
    ck(cyc == 274 + n + l, $sformatf("MB %0d took %0d cycles, expected %0d", mbx, cyc, 274 + n + l));
    ck(int'(bw_used) == n, $sformatf("bw_used %0d expected %0d", bw_used, n));
    for (int p = 0; p < NPART; p++)
      ck(int'(part_mvd[p].x) == bdx[p] && int'(part_mvd[p].y) == bdy[p],
         $sformatf("MB %0d partition %0d mvd (%0d,%0d) expected (%0d,%0d)", mbx, p,
                   part_mvd[p].x, part_mvd[p].y, bdx[p], bdy[p]));
    ck(int'(mv.x) == px + bdx[0] && int'(mv.y) == py + bdy[0], "16x16 vector");
    ck(int'(jmvp) == exp_jmvp, $sformatf("jmvp %0d expected %0d", jmvp, exp_jmvp));
    c168 = bj[P16X8] + bj[P16X8+1];
    c816 = bj[P8X16] + bj[P8X16+1];
    c88 = 0;
    for (int i = 0; i < 4; i++) c88 += sub_cost(i, sm[i]);
    mode_e = 0; jb = bj[0];
    if (c168 < jb) begin mode_e = 1; jb = c168; end
    if (c816 < jb) begin mode_e = 2; jb = c816; end
    if (c88  < jb) begin mode_e = 3; jb = c88;  end
    ck(int'(mb_mode) == mode_e && int'(jbma) == jb,
       $sformatf("mode %0d jbma %0d expected %0d %0d", mb_mode, jbma, mode_e, jb));
    for (int i = 0; i < 4; i++) ck(int'(sub_mode[i]) == sm[i], "sub-partition mode");
    // slot 0 sees ceil((2sr+1)/2) positions per row, slot 1 the rest
    begin
      int e = 0;
      if (n_faulty > 0) e += (2*srv + 1) * ((2*srv + 2) / 2);
      if (n_faulty > 1) e += (2*srv + 1) * ((2*srv + 1) / 2);
      ck(int'(err_cnt) == e, $sformatf("err_cnt %0d expected %0d", err_cnt, e));
    end
    total_err += err_cnt;
    $display("MB %0d sr=%0d mv=(%0d,%0d) mode=%0d jbma=%0d jmvp=%0d cycles=%0d", mbx, srv,
             mv.x, mv.y, mb_mode, jbma, jmvp, cyc);
  endtask

  initial begin
    int mx, my, lmx, lmy;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_mb(0, 7, 0, 0, 0);
    lmx = mv.x; lmy = mv.y;
    u_mem.true_mv(0, 0, mx, my);
    ck(lmx == mx && lmy == my, "MB 0 finds the true motion");
    run_mb(1, 3, lmx, lmy, 0);
    lmx = mv.x; lmy = mv.y;
    run_mb(2, 0, lmx, lmy, 0);
    lmx = mv.x; lmy = mv.y;
    // one faulty PE in each SAD generation module
    fault_xor[0][5] = 12'h040;
    fault_xor[1][10] = 12'h003;
    run_mb(3, 3, lmx, lmy, 2);
    fault_xor = '0;
    lmx = mv.x; lmy = mv.y;
    run_mb(4, 16, lmx, lmy, 0);
    ck(total_err > 0, "fault injection detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
