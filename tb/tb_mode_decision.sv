// tb_mode_decision: feeds three MBs of random partition SADs for a full
// scan of search range 4 (two candidates per cycle, the second one invalid
// at the end of each row, with idle cycles between) into the mode
// decision, and checks every partition's best cost and offset, the MB
// mode, the 8x8 sub-modes, jbma and jmvp against a model. Each MB uses
// different SAD statistics so that all four MB modes are selected.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_mode_decision;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0;
  logic [1:0] slot_valid = 0;
  logic [1:0][NPART-1:0][15:0] sad;
  logic signed [7:0] dx0, dy;
  mb_mode_t best_mode;
  logic [3:0][1:0] sub_mode;
  mv_t [NPART-1:0] best_mvd;
  logic [NPART-1:0][COST_W-1:0] best_j;
  logic [COST_W-1:0] jbma, jmvp;
  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};

  mode_decision #(.NSAD(2), .LAMBDA(4)) dut (.*);

  int bj[NPART], bx[NPART], by[NPART], j0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // SAD of partition p at a candidate; bias picks which partition sizes win
  function automatic int gen_sad(int p, int bias);
    int base = (p == 0) ? 4000 : (p < 5) ? 2000 : (p < 9) ? 1000 : (p < 25) ? 500 : 250;
    int s = base + $urandom_range(0, base / 2);
    if (bias == 0 && p == 0) s = s / 2;
    if (bias == 1 && p >= 1 && p < 3) s = s / 4;
    if (bias == 2 && p >= 3 && p < 5) s = s / 4;
    if (bias == 3 && p >= 25) s = s / 8;
    return s;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 4; mb++) begin
      int srv = 4, mode_e, jb, c168, c816, c88, sm[4];
      clr = 1; @(negedge clk); clr = 0;
      for (int p = 0; p < NPART; p++) bj[p] = 32'h7fffffff;
      for (int y = -srv; y <= srv; y++)
        for (int x = -srv; x <= srv; x += 2) begin
          in_valid = 1; dx0 = 8'(x); dy = 8'(y);
          for (int n = 0; n < 2; n++) begin
            slot_valid[n] = (x + n <= srv);
            for (int p = 0; p < NPART; p++) begin
              sad[n][p] = 16'(gen_sad(p, mb));
              if (slot_valid[n]) begin
                automatic int c = sad[n][p] + 4 * (iabs(x + n) + iabs(y));
                if (p == 0 && x + n == 0 && y == 0) j0 = sad[n][p];
                if (c < bj[p]) begin bj[p] = c; bx[p] = x + n; by[p] = y; end
              end
            end
          end
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (int'(best_j[p]) != bj[p] || int'(best_mvd[p].x) != bx[p] || int'(best_mvd[p].y) != by[p]) begin
          failures++; $display("FAIL MB %0d part %0d", mb, p);
        end
      end
      c168 = bj[1] + bj[2];
      c816 = bj[3] + bj[4];
      c88 = 0;
      for (int i = 0; i < 4; i++) begin
        automatic int r8 = i / 2, c8 = i % 2, j88, j84, j48, j44, b;
        j88 = bj[5 + i];
        j84 = bj[9 + 4*r8 + c8] + bj[9 + 4*r8 + 2 + c8];
        j48 = bj[17 + 4*r8 + 2*c8] + bj[17 + 4*r8 + 2*c8 + 1];
        j44 = bj[25 + 8*r8 + 2*c8] + bj[25 + 8*r8 + 2*c8 + 1] + bj[25 + 8*r8 + 4 + 2*c8] + bj[25 + 8*r8 + 4 + 2*c8 + 1];
        b = j88; sm[i] = 0;
        if (j84 < b) begin b = j84; sm[i] = 1; end
        if (j48 < b) begin b = j48; sm[i] = 2; end
        if (j44 < b) begin b = j44; sm[i] = 3; end
        c88 += b;
        checks++;
        if (int'(sub_mode[i]) != sm[i]) begin failures++; $display("FAIL MB %0d sub-mode %0d", mb, i); end
      end
      mode_e = 0; jb = bj[0];
      if (c168 < jb) begin mode_e = 1; jb = c168; end
      if (c816 < jb) begin mode_e = 2; jb = c816; end
      if (c88 < jb)  begin mode_e = 3; jb = c88; end
      checks++;
      if (int'(best_mode) != mode_e || int'(jbma) != jb || int'(jmvp) != j0) begin
        failures++; $display("FAIL MB %0d mode %0d jbma %0d jmvp %0d expected %0d %0d %0d", mb, best_mode, jbma, jmvp, mode_e, jb, j0);
      end
      n_mode[best_mode]++;
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0) begin
      failures++; $display("FAIL not every mode selected: %0d %0d %0d %0d", n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
