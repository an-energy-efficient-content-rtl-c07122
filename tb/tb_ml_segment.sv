// tb_ml_segment: writes random words into one 34-bit match-line segment and
// searches it with the stored word, with the word carrying a single flipped
// bit, and with random words, each with the segment enabled or disabled. The
// segment flip-flop must show enable AND (every bit equal) one rising edge
// later; single-bit mismatches in every bit position are covered.
module tb_ml_segment;
  localparam int unsigned W = 34;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en, en;
  logic [W-1:0] wr_data, lsl;
  logic ml_q;
  logic [W-1:0] model;
  logic exp_q;
  int checks = 0, failures = 0;
  int n_match = 0, n_miss = 0, n_dis = 0;

  always #5 clk = ~clk;

  ml_segment #(.W(W)) dut (.clk, .rst_n, .wr_en, .wr_data, .en, .lsl, .ml_q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    wr_en = 1'b0; en = 1'b0; wr_data = '0; lsl = '0;
    @(negedge clk);
    checks++;
    if (ml_q !== 1'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      if (c % 20 == 0) begin
        wr_en   = 1'b1;
        wr_data = {$urandom, $urandom};
        model   = wr_data;
        en      = 1'b0;
        @(negedge clk);
        wr_en = 1'b0;
      end
      case ($urandom_range(0, 2))
        0: lsl = model;
        1: lsl = model ^ (W'(1) << (c % W));
        default: lsl = {$urandom, $urandom};
      endcase
      en    = ($urandom_range(0, 3) != 0);
      exp_q = en && (lsl == model);
      if (!en) n_dis++;
      else if (exp_q) n_match++;
      else n_miss++;
      @(negedge clk);
      checks++;
      if (ml_q !== exp_q) begin failures++; $display("c=%0d en=%b got %b exp %b", c, en, ml_q, exp_q); end
    end
    checks++;
    if (n_match == 0 || n_miss == 0 || n_dis == 0) begin failures++; $display("cases not covered"); end
    $display("matches=%0d mismatches=%0d disabled=%0d", n_match, n_miss, n_dis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
