// tb_pipelined_cam: end-to-end test of the CAM in the test-chip arrangement:
// 256 entries of 144 bits, five segments (8 + 4 x 34 bits), 64-entry local
// blocks, gated local search-lines on the second and third segments only and
// conventional ones elsewhere. cam_driver supplies the stimulus and checks
// results, latency and local search-line activity.
module tb_pipelined_cam;
  localparam int unsigned NE   = 256;
  localparam int unsigned NSEG = 5;
  localparam int unsigned FW   = 8;
  localparam int unsigned SW   = 34;
  localparam int unsigned BR   = 64;
  localparam logic [NSEG-1:0] HM = 5'b00110;
  localparam int unsigned WIDTH = FW + (NSEG - 1) * SW;
  localparam int unsigned AW    = $clog2(NE);
  localparam int unsigned NBLK  = NE / BR;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                      rst_n, search_valid, wr_en, wr_entry_valid;
  logic [WIDTH-1:0]          search_key, wr_data;
  logic [AW-1:0]             wr_addr, match_addr;
  logic                      result_valid, match_hit, match_multi;
  logic [NE-1:0]             match_vec;
  logic [NSEG-1:0][NBLK-1:0] lsl_active;

  pipelined_cam #(
    .N_ENTRIES(NE), .N_SEG(NSEG), .FIRST_SEG_W(FW), .SEG_W(SW),
    .BLOCK_ROWS(BR), .HIER_MASK(HM)
  ) dut (.*);

  cam_driver #(
    .NE(NE), .NSEG(NSEG), .FW(FW), .SW(SW), .BR(BR), .HM(HM), .N_SEARCH(3000)
  ) drv (.*);
endmodule
