// mem_model: behavioural model of the external memory controller and frame
// store, for simulation only (not synthesizable). It answers the
// motion estimator's fetch handshake: on mem_req it acknowledges, takes the
// rectangle on mem_addr_valid, returns its pixels in raster order on
// mem_dvalid/mem_data (with random idle cycles when GAPS is set) and
// pulses mem_finish after the last one. Coordinates outside the frame read
// the nearest edge pixel. The frames are generated, not stored: the
// reference frame is a pseudo-random texture; the current frame is the
// reference moved, MB by MB, by a known motion vector true_mv(mbx, mby)
// (zero when MOTION is 0), so the best vector of each MB is known.
// This is a behavioural model only (not synthesizable intent): the memory
// controller and frame store are outside the estimator. The synthetic
// texture and the motion field are this testbench's own choice.
module mem_model #(
  parameter int FRAME_W = 176,
  parameter int FRAME_H = 144,
  parameter int MOTION  = 1,
  parameter bit GAPS    = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req,
  output logic              mem_ack,
  input  logic              mem_addr_valid,
  input  logic              mem_ref,
  input  logic signed [15:0] mem_x,
  input  logic signed [15:0] mem_y,
  input  logic [7:0]        mem_w,
  input  logic [7:0]        mem_h,
  output logic              mem_dvalid,
  output logic [7:0]        mem_data,
  output logic              mem_finish
);
  int st = 0;
  int rx, ry, rw, rh, i;
  bit rsel;
  int n_req = 0, n_gap = 0;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int ref_pix(int x, int y);
    int unsigned h;
    x = clampi(x, 0, FRAME_W - 1);
    y = clampi(y, 0, FRAME_H - 1);
    h = (32'(x) * 32'd73856093) ^ (32'(y) * 32'd19349663) ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'((h >> 16) & 32'hff);
  endfunction

  function automatic void true_mv(int mbx, int mby, output int mx, output int my);
    if (MOTION == 0) begin mx = 0; my = 0; end
    else begin
      mx = ((mbx * 3 + mby * 5) % 9) - 4;
      my = ((mbx * 7 + mby) % 7) - 3;
    end
  endfunction

  function automatic int cur_pix(int x, int y);
    int mx, my;
    x = clampi(x, 0, FRAME_W - 1);
    y = clampi(y, 0, FRAME_H - 1);
    true_mv(x / 16, y / 16, mx, my);
    return ref_pix(x + mx, y + my);
  endfunction

  initial begin
    mem_ack = 0; mem_dvalid = 0; mem_finish = 0; mem_data = 0;
  end

  always @(posedge clk) begin
    mem_ack    <= 1'b0;
    mem_finish <= 1'b0;
    mem_dvalid <= 1'b0;
    if (!rst_n) st = 0;
    else case (st)
      0: if (mem_req && !mem_ack) begin mem_ack <= 1'b1; st = 1; n_req++; end
      1: if (mem_addr_valid) begin
           rx = mem_x; ry = mem_y; rw = mem_w; rh = mem_h; rsel = mem_ref;
           i = 0; st = 2;
         end
      2: if (GAPS && $urandom_range(0, 7) == 0) n_gap++;
         else begin
           int px, py;
           px = rx + i % rw;
           py = ry + i / rw;
           mem_dvalid <= 1'b1;
           mem_data   <= 8'(rsel ? ref_pix(px, py) : cur_pix(px, py));
           i++;
           if (i == rw * rh) st = 3;
         end
      3: begin mem_finish <= 1'b1; st = 0; end
      default: st = 0;
    endcase
  end
endmodule
