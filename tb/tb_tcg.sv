// tb_tcg: checks that the test code generator gives RT = SAD mod 64 and
// QT = SAD div 64 of a 4x4 block pair, with SAD computed behaviourally:
// the worked example (SAD 2124: RT 12, QT 33), extremes and random blocks.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_tcg;
  logic [15:0][7:0] cur, rb;
  logic [5:0] rt;
  logic [5:0] qt;
  int checks = 0, failures = 0;

  tcg #(.M(64)) dut (.cur(cur), .ref_blk(rb), .rt(rt), .qt(qt));

  function automatic int ref_sad(logic [15:0][7:0] a, logic [15:0][7:0] b);
    int s = 0;
    for (int k = 0; k < 16; k++) s += (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
    return s;
  endfunction

  task automatic check();
    int s;
    #1;
    s = ref_sad(cur, rb);
    checks++;
    if (int'(rt) != s % 64 || int'(qt) != s / 64) begin
      failures++;
      $display("FAIL sad=%0d rt=%0d qt=%0d", s, rt, qt);
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
    #1;
    checks++;
    if (rt != 6'd12 || qt != 6'd33) begin failures++; $display("FAIL example rt=%0d qt=%0d", rt, qt); end
    cur = '1; rb = '0; check();
    cur = '0; rb = '0; check();
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 16; k++) begin cur[k] = 8'($urandom); rb[k] = 8'($urandom); end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
