// tb_mvp_gen: walks three frames of 11x9 MBs in raster order, storing a
// random vector for each MB, and checks the predictor (median of left,
// top and top-right, top-left when top-right is outside the frame; left
// only in the first row) and sum_mv against a model that keeps all vectors.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_mvp_gen;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int C = 11, R = 9;
  logic [3:0] mb_x = 0;
  logic [7:0] mb_y = 0;
  logic wr = 0;
  mv_t mv_in, mvp;
  logic [9:0] sum_mv;
  int vx[R][C], vy[R][C];
  int checks = 0, failures = 0;

  mvp_gen #(.MB_COLS(C)) dut (.*);

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int med3(int a, int b, int c);
    int lo = a < b ? a : b, hi = a < b ? b : a;
    return c < lo ? lo : (c > hi ? hi : c);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < R; y++)
        for (int x = 0; x < C; x++) begin
          int ax, ay, bx, by, cx, cy, px, py, s;
          mb_x = 4'(x); mb_y = 8'(y);
          ax = x > 0 ? vx[y][x-1] : 0;  ay = x > 0 ? vy[y][x-1] : 0;
          bx = y > 0 ? vx[y-1][x] : 0;  by = y > 0 ? vy[y-1][x] : 0;
          if (y == 0) begin cx = 0; cy = 0; end
          else if (x + 1 < C) begin cx = vx[y-1][x+1]; cy = vy[y-1][x+1]; end
          else if (x > 0) begin cx = vx[y-1][x-1]; cy = vy[y-1][x-1]; end
          else begin cx = 0; cy = 0; end
          if (y == 0) begin px = ax; py = ay; end
          else begin px = med3(ax, bx, cx); py = med3(ay, by, cy); end
          s = iabs(ax) + iabs(ay) + iabs(bx) + iabs(by) + iabs(cx) + iabs(cy);
          #1;
          checks++;
          if (int'(mvp.x) != px || int'(mvp.y) != py || int'(sum_mv) != s) begin
            failures++;
            $display("FAIL MB (%0d,%0d) mvp (%0d,%0d) sum %0d expected (%0d,%0d) %0d",
                     x, y, mvp.x, mvp.y, sum_mv, px, py, s);
          end
          vx[y][x] = $urandom_range(0, 40) - 20;
          vy[y][x] = $urandom_range(0, 40) - 20;
          mv_in.x = 8'(vx[y][x]); mv_in.y = 8'(vy[y][x]);
          wr = 1;
          @(negedge clk);
          wr = 0;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
