// tb_rqcg: checks the per-pixel residue/quotient generator exhaustively
// over all 65536 pixel pairs: r = |x-y| mod 64, q = |x-y| div 64.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_rqcg;
  logic [7:0] x, y;
  logic [5:0] r;
  logic [2:0] q;
  int checks = 0, failures = 0;

  rqcg #(.M(64)) dut (.x(x), .y(y), .r(r), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int d;
        x = 8'(a); y = 8'(b);
        #1;
        d = (a > b) ? a - b : b - a;
        checks++;
        if (int'(r) != d % 64 || int'(q) != d / 64) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d r=%0d q=%0d", a, b, r, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
