// tb_pe: checks the 4x4 SAD processing element against a behavioural SAD,
// on the current/reference block pair of the worked example (SAD 2124),
// on the all-zero and the largest-difference cases, and on random blocks.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_pe;
  import me_pkg::*;
  logic [15:0][7:0] cur, rb;
  logic [11:0] sad;
  int checks = 0, failures = 0;

  pe dut (.cur(cur), .ref_blk(rb), .sad(sad));

  function automatic int ref_sad(logic [15:0][7:0] a, logic [15:0][7:0] b);
    int s = 0;
    for (int k = 0; k < 16; k++) s += (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
    return s;
  endfunction

  task automatic check(int expect_sad);
    #1;
    checks++;
    if (int'(sad) != expect_sad) begin
      failures++;
      $display("FAIL sad=%0d expected %0d", sad, expect_sad);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0[16] = '{128,128,64,255, 128,64,255,64, 64,255,64,128, 255,64,128,128};
    int r0[16] = '{1,1,2,3, 1,2,3,4, 2,3,4,5, 3,4,5,5};
    for (int k = 0; k < 16; k++) begin cur[k] = 8'(c0[k]); rb[k] = 8'(r0[k]); end
    check(2124);
    cur = '0; rb = '0; check(0);
    cur = '1; rb = '0; check(16*255);
    cur = '0; rb = '1; check(16*255);
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 16; k++) begin cur[k] = 8'($urandom); rb[k] = 8'($urandom); end
      check(ref_sad(cur, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
