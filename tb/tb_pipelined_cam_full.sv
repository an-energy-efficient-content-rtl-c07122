// tb_pipelined_cam_full: end-to-end test of the CAM at its default size,
// 1024 entries of 144 bits in five segments with 64-entry local blocks and
// gated local search-lines on segments two to five. The array is filled
// with uniformly distributed random words and searched mostly with keys
// that match one entry; cam_driver checks every result, the latency and the
// local search-line activity, and prints how often each segment and block
// was switched on.
module tb_pipelined_cam_full;
  import cam_pkg::*;
  localparam int unsigned WIDTH = CAM_WIDTH;
  localparam int unsigned NE    = CAM_ENTRIES;
  localparam int unsigned NSEG  = CAM_NSEG;
  localparam int unsigned AW    = $clog2(NE);
  localparam int unsigned NBLK  = NE / CAM_BLOCK_ROWS;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                      rst_n, search_valid, wr_en, wr_entry_valid;
  logic [WIDTH-1:0]          search_key, wr_data;
  logic [AW-1:0]             wr_addr, match_addr;
  logic                      result_valid, match_hit, match_multi;
  logic [NE-1:0]             match_vec;
  logic [NSEG-1:0][NBLK-1:0] lsl_active;

  pipelined_cam dut (.*);

  cam_driver #(.N_SEARCH(1500)) drv (.*);
endmodule
