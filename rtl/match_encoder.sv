// match_encoder: returns the address of the matching entry.
//
// Scans the match vector from address 0 upward and reports the lowest set
// position, whether any bit is set and whether more than one is. A CAM
// returns the addresses of matching words; choosing the lowest address when
// several match, and flagging that case, are this design's choices.
//
// Interface: match_vec in, hit/multi/addr out; purely combinational. addr is
// 0 when hit is low.
module match_encoder #(
  parameter int unsigned N = 1024,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  match_vec,
  output logic          hit,
  output logic          multi,
  output logic [AW-1:0] addr
);

  always_comb begin
    hit   = 1'b0;
    multi = 1'b0;
    addr  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (match_vec[i]) begin
        if (!hit) addr = AW'(i);
        multi = multi | hit;
        hit   = 1'b1;
      end
    end
  end

endmodule
