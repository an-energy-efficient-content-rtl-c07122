// cam_block: one local block of the CAM array.
//
// A block is ROWS entries tall and one match-line segment wide. It owns one
// local search-line receiver shared by all its rows and one ml_segment per
// row. The receiver is enabled when any row's segment enable is set, so a
// block whose words have all mismatched in earlier segments keeps its local
// search-lines still (HIER=1). With HIER=0 the block behaves as a
// conventional segment whose search-lines are driven every cycle.
//
// Interface: gsl is the global search-line value for this segment; en holds
// the rows' segment enables for this cycle; wr_sel (one-hot or zero) and
// wr_data write the segment bits of one row; ml_q holds the rows' segment
// flip-flops; lsl_active tells that the local amplifiers fire this cycle.
// Timing: ml_q[r] = en[r] && match, one rising edge after en. The block
// organisation follows the document; the OR of the enables is the simplest
// way to give the "activated only if a segment is activated" rule.
module cam_block #(
  parameter int unsigned W    = 34,
  parameter int unsigned ROWS = 64,
  parameter bit          HIER = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W-1:0]    gsl,
  input  logic [ROWS-1:0] en,
  input  logic [ROWS-1:0] wr_sel,
  input  logic [W-1:0]    wr_data,
  output logic [ROWS-1:0] ml_q,
  output logic            lsl_active
);

  logic [W-1:0] lsl;

  lsl_receiver #(.W(W), .HIER(HIER)) u_rx (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (|en),
    .gsl   (gsl),
    .lsl   (lsl),
    .fired (lsl_active)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    ml_segment #(.W(W)) u_seg (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (wr_sel[r]),
      .wr_data (wr_data),
      .en      (en[r]),
      .lsl     (lsl),
      .ml_q    (ml_q[r])
    );
  end

  // At most one row is written at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr_sel));

endmodule
