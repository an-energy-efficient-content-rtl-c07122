// lsl_receiver: low-swing receiver and local search-line amplifier of one
// local block.
//
// The global search-lines swing only a fraction of the supply. Each local
// block has a receiver, clocked on the falling edge, that senses them and
// drives the block's short local search-lines with a full-swing copy. The
// receiver fires only when at least one match-line segment of the block is
// enabled in this cycle; otherwise the local search-lines keep their last
// value and do not toggle, which is where the search-line energy is saved.
// HIER=0 gives the conventional search-line scheme instead: the lines follow
// the global data every cycle, whatever the enables.
//
// Interface: en is the block's enable, valid from the rising edge; gsl is the
// global search-line value; lsl the local search-lines, updated at the
// falling edge of the same cycle; fired tells that the amplifiers are active
// in this cycle. The falling-edge sampling follows the document; the HIER
// switch and the reset value are this design's choices.
module lsl_receiver #(
  parameter int unsigned W    = 34,
  parameter bit          HIER = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] gsl,
  output logic [W-1:0] lsl,
  output logic         fired
);

  assign fired = HIER ? en : 1'b1;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)     lsl <= '0;
    else if (fired) lsl <= gsl;
  end

endmodule
