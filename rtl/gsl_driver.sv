// gsl_driver: global search-line flip-flop of one match-line segment.
//
// At each rising clock edge the flip-flop samples the segment's slice of the
// search word and holds it on the global search-lines for the whole cycle, so
// that the local-block receivers can pick it up at the falling edge. Because
// the match-line is pipelined, segment k of a word is compared k cycles after
// segment 0; SKEW delay registers in front of the flip-flop line the search
// data up with that stage. The sampling flip-flop follows the document; the
// skew chain is this design's way of aligning the pipelined stages.
//
// Interface: key is the W-bit slice presented with the search, gsl the global
// search-line value. Timing: gsl shows key SKEW+1 rising edges after key was
// applied (SKEW cycles of skew plus the sampling edge). Low-swing electrical
// drive is not modelled; gsl carries the logic value.
module gsl_driver #(
  parameter int unsigned W    = 34,
  parameter int unsigned SKEW = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] key,
  output logic [W-1:0] gsl
);

  // skew_q[0] is the key as applied; skew_q[i] is the key of i cycles ago.
  // The sampling flip-flop loads skew_q[SKEW].
  logic [W-1:0] skew_q [SKEW+1];

  always_comb skew_q[0] = key;

  for (genvar i = 1; i <= SKEW; i++) begin : g_skew
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) skew_q[i] <= '0;
      else        skew_q[i] <= skew_q[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gsl <= '0;
    else        gsl <= skew_q[SKEW];
  end

endmodule
