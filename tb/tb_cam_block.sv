// tb_cam_block: fills a 64-row local block (and a conventional HIER=0 copy)
// with random 34-bit words, some duplicated, then each cycle drives a global
// search word and a random set of row enables, sometimes none. One rising
// edge later every row's segment flip-flop must equal enable AND
// (stored == search word); the gated block must report its local search-lines
// active exactly when some row is enabled, the conventional one always.
module tb_cam_block;
  localparam int unsigned W    = 34;
  localparam int unsigned ROWS = 64;

  logic clk = 1'b0;
  logic rst_n;
  logic [W-1:0]    gsl, wr_data;
  logic [ROWS-1:0] en, wr_sel, ml_h, ml_c, exp_ml;
  logic            act_h, act_c;
  logic [W-1:0]    mem [ROWS];
  int checks = 0, failures = 0;
  int n_idle = 0, n_busy = 0, n_hits = 0;

  always #5 clk = ~clk;

  cam_block #(.W(W), .ROWS(ROWS), .HIER(1'b1)) u_h (
    .clk, .rst_n, .gsl, .en, .wr_sel, .wr_data, .ml_q(ml_h), .lsl_active(act_h));
  cam_block #(.W(W), .ROWS(ROWS), .HIER(1'b0)) u_c (
    .clk, .rst_n, .gsl, .en, .wr_sel, .wr_data, .ml_q(ml_c), .lsl_active(act_c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    gsl = '0; wr_data = '0; en = '0; wr_sel = '0;
    @(negedge clk);
    rst_n = 1'b1;
    // fill: rows 8i and 8i+1 share a word to give multiple hits
    for (int r = 0; r < ROWS; r++) begin
      if (r % 8 == 1) mem[r] = mem[r-1];
      else            mem[r] = W'({$urandom, $urandom});
      wr_sel = '0;
      wr_sel[r] = 1'b1;
      wr_data = mem[r];
      @(negedge clk);
    end
    wr_sel = '0;
    for (int c = 0; c < 800; c++) begin
      // global search-lines change just after the rising edge, like the
      // global flip-flop; enables likewise
      @(posedge clk);
      #1;
      if ($urandom_range(0, 1) == 0) gsl = mem[$urandom_range(0, ROWS - 1)];
      else                           gsl = W'({$urandom, $urandom});
      case ($urandom_range(0, 3))
        0:       en = '0;
        1:       en = {$urandom, $urandom};
        2:       en = ROWS'(1) << $urandom_range(0, ROWS - 1);
        default: en = '1;
      endcase
      for (int r = 0; r < ROWS; r++) exp_ml[r] = en[r] && (mem[r] == gsl);
      checks += 2;
      if (act_h !== (|en)) begin failures++; $display("c=%0d act_h=%b", c, act_h); end
      if (act_c !== 1'b1)  begin failures++; $display("c=%0d act_c=%b", c, act_c); end
      if (|en) n_busy++; else n_idle++;
      if (|exp_ml) n_hits++;
      @(posedge clk);
      #1;
      checks += 2;
      if (ml_h !== exp_ml) begin failures++; $display("c=%0d HIER got %h exp %h", c, ml_h, exp_ml); end
      if (ml_c !== exp_ml) begin failures++; $display("c=%0d CONV got %h exp %h", c, ml_c, exp_ml); end
      en = '0;
    end
    checks++;
    if (n_idle == 0 || n_busy == 0 || n_hits == 0) begin failures++; $display("cases not covered"); end
    $display("idle=%0d busy=%0d with_hits=%0d", n_idle, n_busy, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
