// pre_retrieval: pre-retrieval control unit of the ME engine.
// On start it fetches the current MB (16x16 at mb_x0, mb_y0 of the current
// frame) and then the search window (win_size x win_size at win_x0, win_y0
// of the reference frame) from the memory controller, and writes each
// returned pixel into the current or reference pixel buffer.
// Each fetch follows the handshake order request - acknowledge - address -
// finish: mem_req is held until mem_ack; mem_addr_valid then presents the
// rectangle (frame select, origin, width, height) for one cycle; the memory
// controller returns the pixels in raster order, one per mem_dvalid, and
// pulses mem_finish after the last one. done pulses when both fetches are
// complete; bw_used is the number of reference pixels received for this MB.
// The handshake order is from the reference description; the rectangle
// address format and byte-wide data are this design's choices.
module pre_retrieval
  import me_pkg::*;
#(
  parameter int WIN = 2*SR_MAX + MB_SIZE,
  parameter int AW  = $clog2(WIN + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [15:0]  mb_x0,
  input  logic signed [15:0]  mb_y0,
  input  logic signed [15:0]  win_x0,
  input  logic signed [15:0]  win_y0,
  input  logic [AW-1:0]       win_size,
  // memory controller side
  output logic                mem_req,
  input  logic                mem_ack,
  output logic                mem_addr_valid,
  output logic                mem_ref,
  output logic signed [15:0]  mem_x,
  output logic signed [15:0]  mem_y,
  output logic [7:0]          mem_w,
  output logic [7:0]          mem_h,
  input  logic                mem_dvalid,
  input  logic [PIX_W-1:0]    mem_data,
  input  logic                mem_finish,
  // buffer side
  output logic                cur_we,
  output logic [7:0]          cur_waddr,
  output logic                ref_we,
  output logic [AW-1:0]       ref_wx,
  output logic [AW-1:0]       ref_wy,
  output logic [PIX_W-1:0]    wdata,
  output logic                done,
  output logic [15:0]         bw_used
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_ADDR, S_DATA, S_DONE} state_t;
  state_t state;
  logic   phase_ref;                   // 0: current MB, 1: search window
  logic [AW-1:0] px, py;               // position inside the rectangle
  logic [AW-1:0] w_cur;
  logic signed [15:0] wx0_q, wy0_q;
  logic [AW-1:0] win_size_q;

  assign w_cur = phase_ref ? win_size_q : AW'(MB_SIZE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase_ref  <= 1'b0;
      px         <= '0;
      py         <= '0;
      bw_used    <= '0;
      win_size_q <= AW'(MB_SIZE);
      wx0_q      <= '0;
      wy0_q      <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state      <= S_REQ;
          phase_ref  <= 1'b0;
          bw_used    <= '0;
          win_size_q <= win_size;
          wx0_q      <= win_x0;
          wy0_q      <= win_y0;
        end
        S_REQ:  if (mem_ack) state <= S_ADDR;
        S_ADDR: begin
          state <= S_DATA;
          px    <= '0;
          py    <= '0;
        end
        S_DATA: begin
          if (mem_dvalid) begin
            if (phase_ref) bw_used <= bw_used + 16'd1;
            if (px == w_cur - 1'b1) begin
              px <= '0;
              py <= py + 1'b1;
            end else begin
              px <= px + 1'b1;
            end
          end
          if (mem_finish) begin
            if (phase_ref) state <= S_DONE;
            else begin
              phase_ref <= 1'b1;
              state     <= S_REQ;
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req        = (state == S_REQ);
    mem_addr_valid = (state == S_ADDR);
    mem_ref        = phase_ref;
    mem_x          = phase_ref ? wx0_q : mb_x0;
    mem_y          = phase_ref ? wy0_q : mb_y0;
    mem_w          = 8'(w_cur);
    mem_h          = 8'(w_cur);
    cur_we         = (state == S_DATA) && mem_dvalid && !phase_ref;
    ref_we         = (state == S_DATA) && mem_dvalid &&  phase_ref;
    cur_waddr      = 8'(py) * 8'(MB_SIZE) + 8'(px);
    ref_wx         = px;
    ref_wy         = py;
    wdata          = mem_data;
    done           = (state == S_DONE);
  end

  // handshake rules
  a_ack_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_ack |-> mem_req);
  a_data_in_data_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_dvalid || mem_finish) |-> state == S_DATA);
endmodule
