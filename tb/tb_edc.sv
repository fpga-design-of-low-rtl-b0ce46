// tb_edc: checks the error detection circuit: no error when (rt, qt) is
// the RQ code of sad, an error when either the residue or the quotient
// differs. Exhaustive over all 4096 SAD values, with one corrupted code
// of each kind per value.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_edc;
  logic [11:0] sad;
  logic [5:0]  rt, qt;
  logic        err;
  int checks = 0, failures = 0;

  edc #(.M(64)) dut (.sad(sad), .rt(rt), .qt(qt), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4096; s++) begin
      sad = 12'(s); rt = 6'(s % 64); qt = 6'(s / 64);
      #1; checks++;
      if (err) begin failures++; $display("FAIL false alarm sad=%0d", s); end
      rt = 6'(s % 64) ^ 6'(1 + $urandom_range(0, 62));
      #1; checks++;
      if (!err) begin failures++; $display("FAIL missed residue error sad=%0d", s); end
      rt = 6'(s % 64); qt = 6'(s / 64) ^ 6'(1 + $urandom_range(0, 62));
      #1; checks++;
      if (!err) begin failures++; $display("FAIL missed quotient error sad=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
