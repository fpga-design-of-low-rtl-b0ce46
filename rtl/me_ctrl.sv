// me_ctrl: control unit of the ME engine. Runs one MB per mb_start:
//   FETCH  start the pre-retrieval unit and wait for its done
//   SCAN   full search: for dy = -sr..sr, for dx = -sr..sr in steps of
//          NSAD, issue NSAD horizontally adjacent positions per cycle
//          (slot n is position dx+n, valid while dx+n <= sr)
//   DRAIN  wait for the SAD pipeline (PIPE stages) and the mode decision
//   UPDATE store the MB's vector in the MV predictor line buffer
//   REPORT pulse mb_done
// md_clr clears the mode decision at the start of each MB. busy is high
// from mb_start to mb_done. The scan order is this design's choice.
module me_ctrl
  import me_pkg::*;
#(
  parameter int NSAD = 2,
  parameter int PIPE = 4,
  parameter int SR_W = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   mb_start,
  input  logic [SR_W-1:0]        sr,
  output logic                   fetch_start,
  input  logic                   fetch_done,
  output logic                   md_clr,
  output logic                   scan_valid,
  output logic [NSAD-1:0]        slot_valid,
  output logic signed [MV_W-1:0] scan_dx,
  output logic signed [MV_W-1:0] scan_dy,
  output logic [SR_W-1:0]        sr_q,
  output logic                   mvp_wr,
  output logic                   mb_done,
  output logic                   busy
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_SCAN, S_DRAIN, S_UPDATE, S_REPORT} state_t;
  state_t state;
  logic [3:0] drain_cnt;
  logic signed [MV_W-1:0] srs;

  assign srs = MV_W'(sr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sr_q      <= '0;
      scan_dx   <= '0;
      scan_dy   <= '0;
      drain_cnt <= '0;
    end else begin
      case (state)
        S_IDLE: if (mb_start) begin
          state <= S_FETCH;
          sr_q  <= sr;
        end
        S_FETCH: if (fetch_done) begin
          state   <= S_SCAN;
          scan_dx <= -srs;
          scan_dy <= -srs;
        end
        S_SCAN: begin
          if (scan_dx + MV_W'(NSAD) > srs) begin
            scan_dx <= -srs;
            if (scan_dy == srs) begin
              state     <= S_DRAIN;
              drain_cnt <= '0;
            end else begin
              scan_dy <= scan_dy + 1'b1;
            end
          end else begin
            scan_dx <= scan_dx + MV_W'(NSAD);
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (int'(drain_cnt) == PIPE) state <= S_UPDATE;
        end
        S_UPDATE: state <= S_REPORT;
        S_REPORT: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    fetch_start = (state == S_IDLE) && mb_start;
    md_clr      = (state == S_IDLE) && mb_start;
    scan_valid  = (state == S_SCAN);
    for (int n = 0; n < NSAD; n++)
      slot_valid[n] = scan_valid && (scan_dx + MV_W'(n) <= srs);
    mvp_wr  = (state == S_UPDATE);
    mb_done = (state == S_REPORT);
    busy    = (state != S_IDLE);
  end
endmodule
