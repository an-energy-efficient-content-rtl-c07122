// ml_segment: one entry's segment of a pipelined match-line.
//
// Holds W bits of a stored word (the SRAM half of W NOR CAM cells), compares
// them with the local search-lines and senses the match-line segment. With
// the precharge-low scheme the line starts each cycle at ground; when the
// segment is enabled a current source charges it, and only a line without a
// pulldown path (every bit equal) rises far enough to trip the sense
// amplifier. A disabled segment has its current source off and reads as a
// mismatch. The flip-flop at the end of the segment captures the result at
// the rising edge and is the enable of the next segment, so a word that
// mismatches here never activates its later segments.
//
// Interface: wr_en/wr_data write the stored bits at the rising edge; en is
// the segment enable (previous segment's flip-flop, or entry valid for the
// first segment); lsl the local search-lines, settled after the falling edge;
// ml_q the segment flip-flop. Timing: ml_q shows en && (stored == lsl) one
// rising edge after en was presented. The compare, sensing and flip-flop
// follow the document; the analog sensing is represented by its logic
// result, and the stored bits have no reset, as in an SRAM.
module ml_segment #(
  parameter int unsigned W = 34
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         en,
  input  logic [W-1:0] lsl,
  output logic         ml_q
);

  logic [W-1:0] stored;
  logic [W-1:0] miss; // cells whose stored bit differs from the search bit
  logic         sensed;   // sense-amplifier output at the end of evaluation

  always_ff @(posedge clk) begin
    if (wr_en) stored <= wr_data;
  end

  always_comb begin
    miss = stored ^ lsl;
    sensed = en && (miss == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ml_q <= 1'b0;
    else        ml_q <= sensed;
  end

endmodule
