// tb_lsl_receiver: drives random global search-line data and random block
// enables; after each falling edge checks that a gated receiver copied the
// global lines only when enabled (and otherwise held its value), and that a
// conventional receiver (HIER=0) copied them every cycle.
module tb_lsl_receiver;
  localparam int unsigned W = 34;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic [W-1:0] gsl;
  logic [W-1:0] lsl_h, lsl_c;
  logic fired_h, fired_c;
  logic [W-1:0] exp_h;
  int checks = 0, failures = 0;
  int n_fired = 0, n_held = 0;

  always #5 clk = ~clk;

  lsl_receiver #(.W(W), .HIER(1'b1)) u_h (.clk, .rst_n, .en, .gsl, .lsl(lsl_h), .fired(fired_h));
  lsl_receiver #(.W(W), .HIER(1'b0)) u_c (.clk, .rst_n, .en, .gsl, .lsl(lsl_c), .fired(fired_c));

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    gsl   = '0;
    exp_h = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      @(posedge clk);
      #1;
      gsl = {$urandom, $urandom};
      en  = ($urandom_range(0, 2) == 0);
      checks += 2;
      if (fired_h !== en)   begin failures++; $display("fired_h wrong"); end
      if (fired_c !== 1'b1) begin failures++; $display("fired_c wrong"); end
      if (en) begin exp_h = gsl; n_fired++; end
      else    n_held++;
      @(negedge clk);
      #1;
      checks += 2;
      if (lsl_h !== exp_h) begin failures++; $display("HIER c=%0d got %h exp %h", c, lsl_h, exp_h); end
      if (lsl_c !== gsl)   begin failures++; $display("CONV c=%0d got %h exp %h", c, lsl_c, gsl); end
    end
    checks++;
    if (n_fired == 0 || n_held == 0) begin failures++; $display("enable cases not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
