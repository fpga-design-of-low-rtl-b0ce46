// cur_buf: current pixel buffer. Holds the 16x16 current MB. The
// pre-retrieval unit writes one pixel per cycle at a raster address; the
// SAD generation modules read all 256 pixels in parallel. Written as a
// register array; one write port, whole-array read.
// A current-MB buffer is part of the published architecture; its byte-wide
// write port and fully parallel read are this design's own choice.
module cur_buf
  import me_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  we,
  input  logic [7:0]                            waddr,
  input  logic [PIX_W-1:0]                      wdata,
  output logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] mb
);
  logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] mem;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign mb = mem;
endmodule
