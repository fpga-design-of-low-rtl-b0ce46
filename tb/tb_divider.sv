// tb_divider: 300 random divisions (including by zero and by one) on the
// 32-bit sequential divider; checks quotient, remainder and that done
// comes exactly 33 cycles after start (load, 32 quotient bits).
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [31:0] num, den, quo, rem;
  int checks = 0, failures = 0;

  divider #(.W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      int cyc = 0;
      logic [31:0] eq, er;
      num = $urandom;
      case (t % 5)
        0: den = 0;
        1: den = 1;
        2: den = $urandom_range(1, 255);
        default: den = $urandom >> $urandom_range(0, 31);
      endcase
      if (den == 0) begin eq = '1; er = num; end
      else begin eq = num / den; er = num % den; end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (quo != eq || rem != er || cyc != 33) begin
        failures++; $display("FAIL %0d / %0d = %0d r %0d (%0d cycles)", num, den, quo, rem, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
