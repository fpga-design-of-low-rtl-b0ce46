// tb_top_full: end-to-end test of the bandwidth-scalable motion estimator
// with EDDR at its default size: one QCIF frame (176x144 pixels, 11x9 MBs)
// with search ranges up to 16, memory stalls, one MB with injected PE
// faults and a drop of the available bandwidth after MB 39. See
// tb_top_body.svh for what is checked.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_top_full;
  import me_pkg::*;
  localparam int COLS = 11, ROWS = 9, GP = 1, FR = 30, FAULT_MB = 20;
  localparam longint BR = 1100 * COLS * ROWS * FR;   // about 1100 bytes per MB
  localparam longint BR2 = 600 * COLS * ROWS * FR;   // drops to about 600
  localparam int CHANGE_MB = 40;
  localparam int WATCHDOG = 20000000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, bw_change;
  logic [31:0] br;
  logic [7:0] fr, gp;
  logic mem_req, mem_ack, mem_addr_valid, mem_ref, mem_dvalid, mem_finish;
  logic signed [15:0] mem_x, mem_y;
  logic [7:0] mem_w, mem_h, mem_data;
  logic mb_done, done;
  logic [3:0] mb_x;
  logic [7:0] mb_y;
  logic [5:0] sr, sr_sys;
  mb_mode_t mb_mode;
  logic [3:0][1:0] sub_mode;
  mv_t mv;
  mv_t [NPART-1:0] part_mvd;
  logic [COST_W-1:0] jbma, jmvp;
  logic [15:0] bw_used, err_cnt, k;
  bw_mode_t bw_mode;
  logic [31:0] bw_budget, bwfp, used_total, g;
  logic [1:0][15:0][SAD4_W-1:0] fault_xor;

  bwsme_eddr_top dut (.*);
  mem_model #(.FRAME_W(16*COLS), .FRAME_H(16*ROWS), .MOTION(1), .GAPS(1'b1)) u_mem (.*);

  `include "tb_top_body.svh"
endmodule
