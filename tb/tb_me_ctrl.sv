// tb_me_ctrl: runs the ME control unit for search ranges 0, 1, 5 and 16,
// with a fetch that completes after a random delay. Checks that every
// search position in [-sr, sr]^2 is issued exactly once and nothing
// outside it, at two positions per cycle, that the MV write comes PIPE+2
// cycles after the last position and mb_done the cycle after it.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_me_ctrl;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mb_start = 0, fetch_done = 0;
  logic [5:0] sr = 0, sr_q;
  logic fetch_start, md_clr, scan_valid, mvp_wr, mb_done, busy;
  logic [1:0] slot_valid;
  logic signed [7:0] scan_dx, scan_dy;
  int checks = 0, failures = 0;

  me_ctrl #(.NSAD(2), .PIPE(4)) dut (.*);

  int seen[33][33];
  int n_scan, last_scan, t_wr, t_done, cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (scan_valid) begin
      n_scan++;
      last_scan = cyc;
      for (int n = 0; n < 2; n++)
        if (slot_valid[n]) begin
          automatic int x = scan_dx + n, y = scan_dy;
          if (x < -16 || x > 16 || y < -16 || y > 16) begin failures++; $display("FAIL position (%0d,%0d)", x, y); end
          else seen[y+16][x+16]++;
        end
    end
    if (mvp_wr) t_wr = cyc;
    if (mb_done) t_done = cyc;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int srv);
    int cnt;
    for (int i = 0; i < 33; i++) for (int j = 0; j < 33; j++) seen[i][j] = 0;
    n_scan = 0;
    sr = 6'(srv);
    mb_start = 1;
    #1;
    checks++;
    if (!fetch_start || !md_clr) begin failures++; $display("FAIL no fetch_start/md_clr"); end
    @(negedge clk);
    mb_start = 0;
    repeat ($urandom_range(1, 30)) @(negedge clk);
    fetch_done = 1;
    @(negedge clk);
    fetch_done = 0;
    while (!mb_done) @(negedge clk);
    @(negedge clk);
    cnt = 0;
    for (int y = -16; y <= 16; y++)
      for (int x = -16; x <= 16; x++) begin
        int in_range = (x >= -srv && x <= srv && y >= -srv && y <= srv);
        checks++;
        if (seen[y+16][x+16] != in_range) begin failures++; $display("FAIL sr %0d position (%0d,%0d) seen %0d", srv, x, y, seen[y+16][x+16]); end
      end
    checks++;
    if (n_scan != (2*srv+1) * ((2*srv+2)/2)) begin failures++; $display("FAIL scan cycles %0d", n_scan); end
    checks++;
    if (t_wr - last_scan != 6 || t_done - t_wr != 1) begin failures++; $display("FAIL drain timing %0d %0d", t_wr - last_scan, t_done - t_wr); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0); run(1); run(5); run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
