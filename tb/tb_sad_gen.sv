// tb_sad_gen: streams 40 random search positions back to back into the
// SAD generation module and checks that each comes out exactly 4 cycles
// later, in order, with its tag and all 41 partition SADs equal to a
// behavioural computation. Every third position has a fault injected into
// one PE: its err bit must be set and the SADs must still be correct.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_sad_gen;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [15:0] in_tag = 0, out_tag;
  logic [255:0][7:0] cur, rmb;
  logic [15:0][11:0] fault_xor = '0;
  logic [NPART-1:0][15:0] sad;
  logic [15:0] err;
  int checks = 0, failures = 0;

  sad_gen #(.TAG_W(16)) dut (.clk, .rst_n, .in_valid, .in_tag, .cur, .ref_mb(rmb),
    .fault_xor, .out_valid, .out_tag, .sad, .err);

  int exp_sad[40][NPART];
  int exp_err[40];

  function automatic void part_rect(int p, output int x0, output int y0, output int w, output int h);
    if (p == 0)       begin x0 = 0; y0 = 0; w = 16; h = 16; end
    else if (p < 3)   begin x0 = 0; y0 = 8*(p-1); w = 16; h = 8; end
    else if (p < 5)   begin x0 = 8*(p-3); y0 = 0; w = 8; h = 16; end
    else if (p < 9)   begin x0 = 8*((p-5)%2); y0 = 8*((p-5)/2); w = 8; h = 8; end
    else if (p < 17)  begin x0 = 8*((p-9)%2); y0 = 4*((p-9)/2); w = 8; h = 4; end
    else if (p < 25)  begin x0 = 4*((p-17)%4); y0 = 8*((p-17)/4); w = 4; h = 8; end
    else              begin x0 = 4*((p-25)%4); y0 = 4*((p-25)/4); w = 4; h = 4; end
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  // pc counts rising edges; first_in is the edge that samples the first
  // input, first_out the edge count when out_valid is first seen high
  int n_out = 0, pc = 0, first_in = -1, first_out = -1;
  always @(posedge clk) begin
    pc++;
    if (rst_n && in_valid && first_in < 0) first_in = pc;
  end
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic int t = int'(out_tag);
      if (first_out < 0) first_out = pc;
      checks++;
      if (t != n_out) begin failures++; $display("FAIL tag %0d expected %0d", t, n_out); end
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (int'(sad[p]) != exp_sad[t][p]) begin
          failures++; $display("FAIL pos %0d part %0d sad %0d expected %0d", t, p, sad[p], exp_sad[t][p]);
        end
      end
      checks++;
      if (int'(err) != exp_err[t]) begin failures++; $display("FAIL pos %0d err %h", t, err); end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < 256; k++) begin cur[k] = 8'($urandom); rmb[k] = 8'($urandom); end
      fault_xor = '0;
      exp_err[t] = 0;
      if (t % 3 == 0) begin
        automatic int b = $urandom_range(0, 15);
        fault_xor[b] = 12'(1 << $urandom_range(0, 11));
        exp_err[t] = 1 << b;
      end
      for (int p = 0; p < NPART; p++) begin
        automatic int x0, y0, w, h, s = 0;
        part_rect(p, x0, y0, w, h);
        for (int i = 0; i < h; i++)
          for (int j = 0; j < w; j++) begin
            automatic int a = cur[(y0+i)*16 + x0 + j], b = rmb[(y0+i)*16 + x0 + j];
            s += a > b ? a - b : b - a;
          end
        exp_sad[t][p] = s;
      end
      in_valid = 1; in_tag = 16'(t);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (n_out != 40) begin failures++; $display("FAIL %0d outputs", n_out); end
    checks++;
    if (first_out - first_in + 1 != 4) begin
      failures++; $display("FAIL latency %0d", first_out - first_in + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
