// tb_bw_alloc: initialises the bandwidth allocation unit with several
// bandwidths (giving system search ranges from 0 up to the limit of 16)
// and checks bw_budget = (br/fr)*gp, sr_sys = floor((sqrt(budget/nmb)-16)/2)
// and the first bwfp = budget/nmb; then runs future-bandwidth updates for
// random usage and checks bwfp = (budget - used)/(nmb - k), including a
// used total above the budget (bwfp 0).
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_bw_alloc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, upd = 0, busy, done;
  logic [31:0] br, used_total, bw_budget, bwfp;
  logic [7:0] fr, gp;
  logic [15:0] nmb, k;
  logic [5:0] sr_sys;
  int checks = 0, failures = 0;

  bw_alloc #(.W(32), .SR_W(6), .SR_MAXV(16)) dut (.*);

  function automatic longint isq(longint x);
    longint r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_done();
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int per_mb[6] = '{100, 256, 400, 1024, 2304, 9000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (per_mb[i]) begin
      longint b, r, s;
      fr = 30; gp = 8'(1 + i); nmb = 16'(99 * (1 + i));
      br = 32'(per_mb[i] * 99 * 30 + $urandom_range(0, 29));
      init = 1; @(negedge clk); init = 0;
      wait_done();
      b = (longint'(br) / 30) * gp;
      r = isq(b / nmb);
      s = (r < 16) ? 0 : ((r - 16) / 2 > 16 ? 16 : (r - 16) / 2);
      checks++;
      if (longint'(bw_budget) != b || longint'(sr_sys) != s || longint'(bwfp) != b / nmb) begin
        failures++; $display("FAIL init %0d: budget %0d sr_sys %0d bwfp %0d expected %0d %0d %0d", i, bw_budget, sr_sys, bwfp, b, s, b / nmb);
      end
      for (int t = 0; t < 10; t++) begin
        longint e;
        k = 16'($urandom_range(0, int'(nmb) - 1));
        used_total = (t == 9) ? bw_budget + 5 : 32'($urandom_range(0, int'(bw_budget)));
        upd = 1; @(negedge clk); upd = 0;
        wait_done();
        e = (used_total < bw_budget ? longint'(bw_budget) - used_total : 0) / (nmb - k);
        checks++;
        if (longint'(bwfp) != e) begin failures++; $display("FAIL bwfp %0d expected %0d", bwfp, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
