// sad_gen: SAD generation module for variable-block-size motion estimation.
// For one search position it takes the 16x16 current MB and the 16x16
// reference block and delivers all 41 H.264 partition SADs, through a SAD
// tree of four pipeline stages:
//   stage 1: sixteen EDDR-protected 4x4 PEs (eddr_pe)
//   stage 2: 8x4 and 4x8 sums
//   stage 3: 8x8, 16x8 and 8x16 sums
//   stage 4: 16x16 sum
// One new position can enter every cycle; results leave 4 cycles later with
// out_valid and the position's tag. Partition order in sad (me_pkg P*):
// 16x16; 16x8 top,bottom; 8x16 left,right; 8x8 raster; 8x4 raster (row of
// 4-pixel strips, then column); 4x8 raster; 4x4 raster. Pixels are packed
// raster order (row*16+col). err has one bit per 4x4 PE that the EDDR found
// faulty for this position (its SAD has already been replaced by the
// recovered value). The four-stage split is this design's choice.
module sad_gen
  import me_pkg::*;
#(
  parameter int TAG_W = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic [TAG_W-1:0]                    in_tag,
  input  logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] cur,
  input  logic [MB_SIZE*MB_SIZE-1:0][PIX_W-1:0] ref_mb,
  input  logic [15:0][SAD4_W-1:0]             fault_xor,
  output logic                                out_valid,
  output logic [TAG_W-1:0]                    out_tag,
  output logic [NPART-1:0][SAD_W-1:0]         sad,
  output logic [15:0]                         err
);
  // ---------------- stage 1: 4x4 PEs with EDDR ----------------
  logic [15:0][SAD4_W-1:0] s4_c;
  logic [15:0]             e_c;

  for (genvar b = 0; b < 16; b++) begin : g_pe
    logic [15:0][PIX_W-1:0] cb, rb;
    always_comb begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          cb[4*i+j] = cur   [((b/4)*4+i)*MB_SIZE + (b%4)*4 + j];
          rb[4*i+j] = ref_mb[((b/4)*4+i)*MB_SIZE + (b%4)*4 + j];
        end
    end
    eddr_pe u_eddr (.cur(cb), .ref_blk(rb), .fault_xor(fault_xor[b]),
                    .sad(s4_c[b]), .err(e_c[b]));
  end

  logic [3:0]              v;
  logic [3:0][TAG_W-1:0]   tag;
  logic [15:0][SAD_W-1:0]  s4_1, s4_2, s4_3;
  logic [15:0]             e1, e2, e3;
  logic [7:0][SAD_W-1:0]   s84_2, s48_2, s84_3, s48_3;
  logic [3:0][SAD_W-1:0]   s88_3;
  logic [1:0][SAD_W-1:0]   s168_3, s816_3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag <= {tag[2:0], in_tag};
    // stage 1
    for (int b = 0; b < 16; b++) s4_1[b] <= SAD_W'(s4_c[b]);
    e1 <= e_c;
    // stage 2: 8x4 (8 wide, 4 tall) and 4x8 (4 wide, 8 tall)
    s4_2 <= s4_1;
    e2   <= e1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 2; c++)
        s84_2[2*r+c] <= s4_1[4*r+2*c] + s4_1[4*r+2*c+1];
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++)
        s48_2[4*r+c] <= s4_1[8*r+c] + s4_1[8*r+4+c];
    // stage 3: 8x8, 16x8, 8x16
    s4_3  <= s4_2;
    e3    <= e2;
    s84_3 <= s84_2;
    s48_3 <= s48_2;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++)
        s88_3[2*r+c] <= s84_2[4*r+c] + s84_2[4*r+2+c];
    for (int r = 0; r < 2; r++)
      s168_3[r] <= s84_2[4*r] + s84_2[4*r+1] + s84_2[4*r+2] + s84_2[4*r+3];
    for (int c = 0; c < 2; c++)
      s816_3[c] <= s48_2[2*c] + s48_2[2*c+1] + s48_2[4+2*c] + s48_2[4+2*c+1];
    // stage 4: 16x16 and output register
    sad[P16X16] <= s168_3[0] + s168_3[1];
    for (int i = 0; i < 2; i++)  sad[P16X8+i] <= s168_3[i];
    for (int i = 0; i < 2; i++)  sad[P8X16+i] <= s816_3[i];
    for (int i = 0; i < 4; i++)  sad[P8X8+i]  <= s88_3[i];
    for (int i = 0; i < 8; i++)  sad[P8X4+i]  <= s84_3[i];
    for (int i = 0; i < 8; i++)  sad[P4X8+i]  <= s48_3[i];
    for (int i = 0; i < 16; i++) sad[P4X4+i]  <= s4_3[i];
    err <= e3;
  end

  assign out_valid = v[3];
  assign out_tag   = tag[3];
endmodule
