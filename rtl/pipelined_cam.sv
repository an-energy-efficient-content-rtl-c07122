// pipelined_cam: energy-efficient binary CAM with pipelined match-lines and
// hierarchical search-lines.
//
// Every entry's match-line is cut into N_SEG segments (by default 8 bits,
// then four of 34 bits: 144 bits). Segment k of a search is compared in
// pipeline stage k, and only entries whose earlier segments all matched have
// segment k enabled. Since random words almost always differ within the first
// 8 bits, the wide later segments are rarely switched on. The search-lines
// are split in two levels: one global search-line set per segment, sampled by
// a gsl_driver, and one local set per block of BLOCK_ROWS entries, driven by a
// receiver that only fires when some entry of the block has its segment
// enabled. HIER_MASK bit k selects this gated scheme for segment k; a clear
// bit gives conventional search-lines that toggle on every search.
//
// Interface:
//   search_valid/search_key  one search word per cycle, sampled at the rising
//                            edge.
//   wr_en/wr_addr/wr_data/   write (wr_entry_valid=1) or invalidate
//   wr_entry_valid           (wr_entry_valid=0) one entry at the rising edge.
//   result_valid, match_vec, result of the search sampled N_SEG rising edges
//   match_hit, match_multi,  earlier: one bit per entry, and the lowest
//   match_addr               matching address.
//   lsl_active[k][b]         local search-lines of segment k, block b are
//                            driven in this cycle (the count of active
//                            blocks sets the search-line energy).
// Timing: throughput one search per cycle, latency N_SEG cycles. A write
// takes effect at once, so a search already in flight compares its remaining
// segments against the new data.
//
// Follows the document: segment widths, 64-entry local blocks, falling-edge
// local receivers, segment flip-flops that enable the next segment. This
// design's own choices: the write port and entry valid bits, the skew
// registers that align search data with the stages, the default HIER_MASK
// (first segment conventional, since it is enabled for every entry anyway),
// and the lowest-address match encoder.
module pipelined_cam
  import cam_pkg::*;
#(
  parameter int unsigned N_ENTRIES   = CAM_ENTRIES,
  parameter int unsigned N_SEG       = CAM_NSEG,
  parameter int unsigned FIRST_SEG_W = CAM_FIRST_SEG_W,
  parameter int unsigned SEG_W       = CAM_SEG_W,
  parameter int unsigned BLOCK_ROWS  = CAM_BLOCK_ROWS,
  parameter logic [N_SEG-1:0] HIER_MASK = {{(N_SEG-1){1'b1}}, 1'b0},
  localparam int unsigned WIDTH  = FIRST_SEG_W + (N_SEG - 1) * SEG_W,
  localparam int unsigned AW     = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1,
  localparam int unsigned N_BLK  = N_ENTRIES / BLOCK_ROWS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // search
  input  logic                        search_valid,
  input  logic [WIDTH-1:0]            search_key,
  // write
  input  logic                        wr_en,
  input  logic [AW-1:0]               wr_addr,
  input  logic [WIDTH-1:0]            wr_data,
  input  logic                        wr_entry_valid,
  // result
  output logic                        result_valid,
  output logic [N_ENTRIES-1:0]        match_vec,
  output logic                        match_hit,
  output logic                        match_multi,
  output logic [AW-1:0]               match_addr,
  // activity of the local search-lines
  output logic [N_SEG-1:0][N_BLK-1:0] lsl_active
);

  // ---------------------------------------------------------------------------
  // Entry valid bits and write decode
  // ---------------------------------------------------------------------------
  logic [N_ENTRIES-1:0] entry_valid;
  logic [N_ENTRIES-1:0] wr_sel;

  always_comb begin
    wr_sel = '0;
    if (wr_en) wr_sel[wr_addr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     entry_valid          <= '0;
    else if (wr_en) entry_valid[wr_addr] <= wr_entry_valid;
  end

  // ---------------------------------------------------------------------------
  // Search valid pipeline: sv_q[k] is set while stage k compares a search.
  // ---------------------------------------------------------------------------
  logic [N_SEG:0] sv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sv_q <= '0;
    else        sv_q <= {sv_q[N_SEG-1:0], search_valid};
  end

  assign result_valid = sv_q[N_SEG];

  // ---------------------------------------------------------------------------
  // Segment enables: stage 0 is enabled for every valid entry during a search;
  // stage k by the flip-flop at the end of segment k-1.
  // ---------------------------------------------------------------------------
  logic [N_ENTRIES-1:0] seg_en [N_SEG];
  logic [N_ENTRIES-1:0] seg_q  [N_SEG];

  always_comb begin
    seg_en[0] = sv_q[0] ? entry_valid : '0;
    for (int unsigned k = 1; k < N_SEG; k++) seg_en[k] = seg_q[k-1];
  end

  // ---------------------------------------------------------------------------
  // Segments: global search-line driver plus one column of local blocks each.
  // ---------------------------------------------------------------------------
  for (genvar k = 0; k < N_SEG; k++) begin : g_seg
    localparam int unsigned SW  = seg_width(k, FIRST_SEG_W, SEG_W);
    localparam int unsigned OFF = seg_offset(k, FIRST_SEG_W, SEG_W);

    logic [SW-1:0] gsl;

    gsl_driver #(.W(SW), .SKEW(k)) u_gsl (
      .clk   (clk),
      .rst_n (rst_n),
      .key   (search_key[OFF +: SW]),
      .gsl   (gsl)
    );

    for (genvar b = 0; b < N_BLK; b++) begin : g_blk
      cam_block #(.W(SW), .ROWS(BLOCK_ROWS), .HIER(HIER_MASK[k])) u_blk (
        .clk        (clk),
        .rst_n      (rst_n),
        .gsl        (gsl),
        .en         (seg_en[k][b*BLOCK_ROWS +: BLOCK_ROWS]),
        .wr_sel     (wr_sel[b*BLOCK_ROWS +: BLOCK_ROWS]),
        .wr_data    (wr_data[OFF +: SW]),
        .ml_q       (seg_q[k][b*BLOCK_ROWS +: BLOCK_ROWS]),
        .lsl_active (lsl_active[k][b])
      );
    end
  end

  // ---------------------------------------------------------------------------
  // Result
  // ---------------------------------------------------------------------------
  assign match_vec = seg_q[N_SEG-1];

  match_encoder #(.N(N_ENTRIES)) u_enc (
    .match_vec (match_vec),
    .hit       (match_hit),
    .multi     (match_multi),
    .addr      (match_addr)
  );

  // The entries must divide evenly into local blocks.
  if (N_ENTRIES % BLOCK_ROWS != 0) begin : g_bad_rows
    $error("N_ENTRIES must be a multiple of BLOCK_ROWS");
  end

endmodule
