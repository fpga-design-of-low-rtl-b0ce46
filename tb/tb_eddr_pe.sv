// tb_eddr_pe: checks one EDDR-protected 4x4 SAD unit. With no fault the
// output equals the behavioural SAD and err stays low; with a random
// non-zero fault mask on the PE output err goes high and the output is
// still the correct SAD (recovered from the RQ code). Includes the worked
// example block pair.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_eddr_pe;
  logic [15:0][7:0] cur, rb;
  logic [11:0] fx, sad;
  logic err;
  int checks = 0, failures = 0, detected = 0;

  eddr_pe #(.M(64)) dut (.cur(cur), .ref_blk(rb), .fault_xor(fx), .sad(sad), .err(err));

  function automatic int ref_sad(logic [15:0][7:0] a, logic [15:0][7:0] b);
    int s = 0;
    for (int k = 0; k < 16; k++) s += (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
    return s;
  endfunction

  task automatic check(bit faulty);
    int s;
    #1;
    s = ref_sad(cur, rb);
    checks++;
    if (int'(sad) != s || err != faulty) begin
      failures++;
      $display("FAIL sad=%0d expected %0d err=%0b fault=%0b", sad, s, err, faulty);
    end
    if (err) detected++;
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
    fx = '0;          check(1'b0);
    fx = 12'h001;     check(1'b1);
    fx = 12'h800;     check(1'b1);
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 16; k++) begin cur[k] = 8'($urandom); rb[k] = 8'($urandom); end
      fx = (t % 2 == 0) ? 12'h000 : 12'(1 + $urandom_range(0, 4094));
      check(fx != 0);
    end
    $display("errors detected and recovered: %0d", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
