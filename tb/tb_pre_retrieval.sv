// tb_pre_retrieval: runs three fetches (search windows of 16, 22 and 48
// pixels, one partly outside the frame) against the memory model with
// random stalls. Checks the handshake order request, acknowledge, address,
// finish, the rectangles requested, every pixel written into the current
// and reference buffers, the bytes counted and the done pulse.
// Expected values come from a behavioural model written independently in
// this testbench; the stimulus and its sizes are this testbench's own choice.
module tb_pre_retrieval;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic signed [15:0] mb_x0, mb_y0, win_x0, win_y0;
  logic [5:0] win_size;
  logic mem_req, mem_ack, mem_addr_valid, mem_ref, mem_dvalid, mem_finish;
  logic signed [15:0] mem_x, mem_y;
  logic [7:0] mem_w, mem_h, mem_data;
  logic cur_we, ref_we, done;
  logic [7:0] cur_waddr, wdata;
  logic [5:0] ref_wx, ref_wy;
  logic [15:0] bw_used;
  int checks = 0, failures = 0;

  pre_retrieval #(.WIN(48)) dut (.*);
  mem_model #(.MOTION(1), .GAPS(1'b1)) u_mem (.*);

  int curm[256], refm[48][48];
  int n_cur = 0, n_ref = 0, n_done = 0, n_addr = 0;
  bit saw_ack = 0;
  always @(posedge clk) if (rst_n) begin
    if (cur_we) begin curm[cur_waddr] = wdata; n_cur++; end
    if (ref_we) begin refm[ref_wy][ref_wx] = wdata; n_ref++; end
    if (done) n_done++;
    if (mem_ack) saw_ack = 1;
    if (mem_addr_valid) begin
      n_addr++;
      checks++;
      if (!saw_ack) begin failures++; $display("FAIL address before acknowledge"); end
      saw_ack = 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(int mx, int my, int wx, int wy, int ws);
    n_cur = 0; n_ref = 0; n_done = 0;
    mb_x0 = 16'(mx); mb_y0 = 16'(my); win_x0 = 16'(wx); win_y0 = 16'(wy); win_size = 6'(ws);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (n_cur != 256 || n_ref != ws*ws || n_done != 1 || int'(bw_used) != ws*ws) begin
      failures++; $display("FAIL counts cur=%0d ref=%0d done=%0d bw=%0d", n_cur, n_ref, n_done, bw_used);
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (curm[16*i+j] != u_mem.cur_pix(mx + j, my + i)) begin failures++; $display("FAIL cur (%0d,%0d)", j, i); end
      end
    for (int i = 0; i < ws; i++)
      for (int j = 0; j < ws; j++) begin
        checks++;
        if (refm[i][j] != u_mem.ref_pix(wx + j, wy + i)) begin failures++; $display("FAIL ref (%0d,%0d)", j, i); end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fetch(32, 16, 30, 14, 16);
    fetch(0, 0, -3, -3, 22);
    fetch(160, 128, 144, 112, 48);
    checks++;
    if (n_addr != 6) begin failures++; $display("FAIL %0d address phases", n_addr); end
    $display("memory stalls: %0d", u_mem.n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
