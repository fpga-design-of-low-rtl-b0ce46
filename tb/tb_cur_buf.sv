// tb_cur_buf: writes a random MB into the current pixel buffer one pixel
// per cycle, checks the parallel read, then overwrites random pixels and
// checks again.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_cur_buf;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr, wdata;
  logic [255:0][7:0] mb;
  int model[256];
  int checks = 0, failures = 0;

  cur_buf dut (.clk, .we, .waddr, .wdata, .mb);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < 256; k++) begin
      checks++;
      if (int'(mb[k]) != model[k]) begin failures++; $display("FAIL pixel %0d", k); end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int k = 0; k < 256; k++) begin
      we = 1; waddr = 8'(k); wdata = 8'($urandom); model[k] = wdata;
      @(negedge clk);
    end
    we = 0;
    @(negedge clk);
    compare();
    for (int t = 0; t < 100; t++) begin
      we = ($urandom_range(0, 1) == 1); waddr = 8'($urandom); wdata = 8'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    we = 0;
    @(negedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
