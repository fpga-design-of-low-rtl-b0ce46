// isqrt: sequential integer square root, digit-by-digit restoring method
// using only shifts, subtractions and comparisons. start loads x; W/2
// cycles later done pulses with root = floor(sqrt(x)). W must be even.
// The bandwidth allocation needs a square root; the digit-by-digit method,
// chosen because it needs only shifts, subtractions and compares, is this
// design's own choice.
module isqrt #(
  parameter int W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  logic [W-1:0]   rad;      // remaining radicand bits
  logic [W/2+1:0] rmd;      // partial remainder
  logic [$clog2(W/2+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      rad  <= '0;
      rmd  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rad  <= x;
        rmd  <= '0;
        root <= '0;
        cnt  <= '0;
      end else if (busy) begin
        logic [W/2+2:0] r2, t;
        r2 = {rmd[W/2:0], rad[W-1:W-2]};
        t  = {1'b0, root, 2'b01};
        if (r2 >= t) begin
          rmd  <= (W/2+2)'(r2 - t);
          root <= {root[W/2-2:0], 1'b1};
        end else begin
          rmd  <= (W/2+2)'(r2);
          root <= {root[W/2-2:0], 1'b0};
        end
        rad <= {rad[W-3:0], 2'b00};
        cnt <= cnt + 1'b1;
        if (int'(cnt) == W/2-1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
