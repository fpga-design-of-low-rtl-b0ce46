// bw_alloc: bandwidth allocation unit of the bandwidth-scalable controller.
// init computes, with one shared divider and a square-root unit:
//   bw_budget = (br / fr) * gp          bytes for the Pupdate period
//   sr_sys    = floor((sqrt(bw_budget / nmb) - 16) / 2), limited to SR_MAXV
// which inverts bw_budget = (2*sr_sys + 16)^2 * nmb, the reference-window
// bytes of nmb MBs searched at +/-sr_sys. upd computes the future bandwidth
// prediction, the remaining budget shared evenly over the MBs not coded yet:
//   bwfp = (bw_budget - used_total) / (nmb - k)      (k = MBs coded so far)
// done pulses when either operation ends; busy is high while one runs.
// br is in bytes/s, fr in frames/s, gp in frames per Pupdate, nmb the MBs
// in Pupdate. The formulas are the reference's; the sequencing and the
// widths are this design's choices.
module bw_alloc #(
  parameter int W      = 32,
  parameter int SR_W   = 6,
  parameter int SR_MAXV = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            upd,
  input  logic [W-1:0]    br,
  input  logic [7:0]      fr,
  input  logic [7:0]      gp,
  input  logic [15:0]     nmb,
  input  logic [W-1:0]    used_total,
  input  logic [15:0]     k,
  output logic [W-1:0]    bw_budget,
  output logic [SR_W-1:0] sr_sys,
  output logic [W-1:0]    bwfp,
  output logic            busy,
  output logic            done
);
  typedef enum logic [2:0] {S_IDLE, S_DIV_RATE, S_DIV_MB, S_SQRT, S_DIV_FP} state_t;
  state_t state;

  logic         div_start, div_done, div_busy;
  logic [W-1:0] div_num, div_den, div_quo, div_rem;
  logic         sq_start, sq_done, sq_busy;
  logic [W/2-1:0] sq_root;

  divider #(.W(W)) u_div (.clk, .rst_n, .start(div_start), .num(div_num),
    .den(div_den), .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem));
  isqrt #(.W(W)) u_sqrt (.clk, .rst_n, .start(sq_start), .x(div_quo),
    .busy(sq_busy), .done(sq_done), .root(sq_root));

  logic [W-1:0] remaining;
  assign remaining = (used_total < bw_budget) ? bw_budget - used_total : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bw_budget <= '0;
      sr_sys    <= '0;
      bwfp      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (init)     state <= S_DIV_RATE;
          else if (upd) state <= S_DIV_FP;
        S_DIV_RATE: if (div_done) begin
          bw_budget <= W'(div_quo * W'(gp));
          state     <= S_DIV_MB;
        end
        S_DIV_MB: if (div_done) state <= S_SQRT;
        S_SQRT: if (sq_done) begin
          if (sq_root < 16)
            sr_sys <= '0;
          else if ((32'(sq_root) - 32'd16) / 2 > SR_MAXV)
            sr_sys <= SR_W'(SR_MAXV);
          else
            sr_sys <= SR_W'((32'(sq_root) - 32'd16) / 2);
          bwfp  <= div_quo;                 // bw_budget / nmb
          state <= S_IDLE;
          done  <= 1'b1;
        end
        S_DIV_FP: if (div_done) begin
          bwfp  <= div_quo;
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // one divider, started on entry to each division state
  state_t state_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state_d <= S_IDLE;
    else        state_d <= state;

  always_comb begin
    div_start = 1'b0;
    div_num   = '0;
    div_den   = '1;
    sq_start  = (state == S_SQRT) && (state_d != S_SQRT);
    case (state)
      S_DIV_RATE: begin div_start = (state_d != S_DIV_RATE); div_num = br;        div_den = W'(fr); end
      S_DIV_MB:   begin div_start = (state_d != S_DIV_MB);   div_num = bw_budget; div_den = W'(nmb); end
      S_DIV_FP:   begin div_start = (state_d != S_DIV_FP);   div_num = remaining;
                        div_den = W'(nmb) - W'(k); end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
endmodule
