// tb_bw_eff_calc: random R-D costs and bandwidths; checks
// g = ((jmvp - jbma) << 8) / bw_used, and 0 when the search gained nothing.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_bw_eff_calc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [17:0] jmvp, jbma;
  logic [15:0] bw_used;
  logic [31:0] g;
  int checks = 0, failures = 0;

  bw_eff_calc #(.COST_W(18), .FRAC(8), .W(32)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      longint e;
      jbma = 18'($urandom_range(0, 60000));
      jmvp = (t % 7 == 0) ? jbma - 18'($urandom_range(0, 100)) : jbma + 18'($urandom_range(0, 60000));
      bw_used = 16'($urandom_range(256, 2304));
      e = (jmvp > jbma) ? ((longint'(jmvp) - jbma) << 8) / bw_used : 0;
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (longint'(g) != e) begin failures++; $display("FAIL g %0d expected %0d", g, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
