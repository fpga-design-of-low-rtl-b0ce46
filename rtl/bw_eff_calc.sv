// bw_eff_calc: bandwidth efficiency calculator. For a coded MB it gives
//   g = (jmvp - jbma) / bw_used
// the R-D cost saved by the search per reference byte loaded, as an
// unsigned fixed-point number with FRAC fraction bits (a search that saves
// nothing gives 0). start launches one division (W cycles); done pulses when it ends and g
// holds the result from the next cycle on.
// The formula is the reference's; the fixed-point format is this design's.
// The efficiency G = (JMVP - JBMA) / BWused follows the published method;
// the 8 fraction bits, clamping negative gains to 0 and reusing the shared
// divider design are this design's own choices.
module bw_eff_calc #(
  parameter int COST_W = 18,
  parameter int FRAC   = 8,
  parameter int W      = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [COST_W-1:0] jmvp,
  input  logic [COST_W-1:0] jbma,
  input  logic [15:0]       bw_used,
  output logic [W-1:0]      g,
  output logic              busy,
  output logic              done
);
  logic [W-1:0] gain, quo, rem;

  assign gain = (jmvp > jbma) ? W'(jmvp - jbma) << FRAC : '0;

  divider #(.W(W)) u_div (.clk, .rst_n, .start, .num(gain),
    .den(bw_used == 0 ? W'(1) : W'(bw_used)), .busy, .done,
    .quo, .rem);

  // g follows the divider result from the cycle after done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    g <= '0;
    else if (done) g <= quo;
  end
endmodule
