// tb_drc: checks the data recovery circuit rebuilds every SAD value
// 0..4095 from its residue (mod 64) and quotient.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_drc;
  logic [5:0]  rt, qt;
  logic [11:0] sad_rec;
  int checks = 0, failures = 0;

  drc #(.M(64)) dut (.rt(rt), .qt(qt), .sad_rec(sad_rec));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4096; s++) begin
      rt = 6'(s % 64); qt = 6'(s / 64);
      #1; checks++;
      if (int'(sad_rec) != s) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d got %0d", s, sad_rec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
