// divider: sequential restoring divider, one quotient bit per cycle.
// start loads num and den; W+1 cycles later done pulses for one cycle with
// quo = num / den and rem = num % den (both unsigned). busy is high in
// between. Division by zero gives an all-ones quotient and rem = num.
// The controller is built from shifters, adders, comparators and a single
// divider as in the published method; the restoring radix-2 structure and
// its timing are this design's own choice.
module divider #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo,
  output logic [W-1:0] rem
);
  logic [W-1:0] d_q;
  logic [$clog2(W+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      rem  <= '0;
      d_q  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        quo  <= num;
        rem  <= '0;
        d_q  <= den;
        cnt  <= '0;
      end else if (busy) begin
        logic [W:0] trial;
        trial = {rem, quo[W-1]} - {1'b0, d_q};
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], quo[W-1]};
          quo <= {quo[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (int'(cnt) == W-1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
