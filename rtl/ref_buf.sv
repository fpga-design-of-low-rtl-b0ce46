// ref_buf: reference pixel buffer holding the search window of one MB.
// Size WIN x WIN with WIN = 2*SR_MAX+16; a window for search range SR
// occupies its top-left (2*SR+16)^2 corner. Written one pixel per cycle at
// (wx, wy). Read port: a patch of 16 rows by (15+NSAD) columns at origin
// (rx, ry), combinational, enough for NSAD horizontally adjacent search
// positions. Pixels outside the array read as zero.
// A reference pixel buffer is part of the published architecture; the
// window size for a search range of 16, the patch read port and zero for
// out-of-window reads are this design's own choices.
module ref_buf
  import me_pkg::*;
#(
  parameter int SR_MAX_P = SR_MAX,
  parameter int NSAD     = 2,
  parameter int WIN      = 2*SR_MAX_P + MB_SIZE,
  parameter int AW       = $clog2(WIN + 1),
  parameter int PW       = MB_SIZE + NSAD - 1
) (
  input  logic                                 clk,
  input  logic                                 we,
  input  logic [AW-1:0]                        wx,
  input  logic [AW-1:0]                        wy,
  input  logic [PIX_W-1:0]                     wdata,
  input  logic [AW-1:0]                        rx,
  input  logic [AW-1:0]                        ry,
  output logic [MB_SIZE-1:0][PW-1:0][PIX_W-1:0] patch
);
  logic [PIX_W-1:0] mem [WIN][WIN];

  always_ff @(posedge clk)
    if (we && wx < AW'(WIN) && wy < AW'(WIN)) mem[wy][wx] <= wdata;

  always_comb begin
    for (int i = 0; i < MB_SIZE; i++)
      for (int j = 0; j < PW; j++) begin
        if (int'(ry) + i < WIN && int'(rx) + j < WIN)
          patch[i][j] = mem[int'(ry) + i][int'(rx) + j];
        else
          patch[i][j] = '0;
      end
  end
endmodule
