// tb_ref_buf: fills the 48x48 reference buffer with random pixels, then
// reads 200 random 16x17 patches (some reaching past the edge, which must
// read as zero) and compares them with a model array.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_ref_buf;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int WIN = 48, PW = 17;
  logic we = 0;
  logic [5:0] wx, wy, rx, ry;
  logic [7:0] wdata;
  logic [15:0][PW-1:0][7:0] patch;
  int model[WIN][WIN];
  int checks = 0, failures = 0;

  ref_buf #(.SR_MAX_P(16), .NSAD(2)) dut (.clk, .we, .wx, .wy, .wdata, .rx, .ry, .patch);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int y = 0; y < WIN; y++)
      for (int x = 0; x < WIN; x++) begin
        we = 1; wx = 6'(x); wy = 6'(y); wdata = 8'($urandom); model[y][x] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int ox = $urandom_range(0, 40), oy = $urandom_range(0, 40);
      rx = 6'(ox); ry = 6'(oy);
      #1;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < PW; j++) begin
          automatic int e = (oy + i < WIN && ox + j < WIN) ? model[oy+i][ox+j] : 0;
          checks++;
          if (int'(patch[i][j]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d)+(%0d,%0d)", ox, oy, j, i);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
