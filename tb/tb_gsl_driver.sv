// tb_gsl_driver: checks that the global search-line flip-flop shows each
// search slice exactly SKEW+1 rising edges after it was applied, for a
// zero-skew and a three-cycle-skew instance, with random data every cycle.
module tb_gsl_driver;
  localparam int unsigned W = 34;

  logic clk = 1'b0;
  logic rst_n;
  logic [W-1:0] key;
  logic [W-1:0] gsl0, gsl3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gsl_driver #(.W(W), .SKEW(0)) u0 (.clk, .rst_n, .key, .gsl(gsl0));
  gsl_driver #(.W(W), .SKEW(3)) u3 (.clk, .rst_n, .key, .gsl(gsl3));

  // hist[i] is the key applied i+1 rising edges ago
  logic [W-1:0] hist [8];

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    key   = '0;
    foreach (hist[i]) hist[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    if (gsl0 !== '0 || gsl3 !== '0) begin failures++; $display("reset value wrong"); end
    checks++;
    for (int c = 0; c < 200; c++) begin
      key = {$urandom, $urandom};
      @(posedge clk);
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = key;
      @(negedge clk);
      if (c >= 4) begin
        checks += 2;
        if (gsl0 !== hist[0]) begin failures++; $display("SKEW0 c=%0d got %h exp %h", c, gsl0, hist[0]); end
        if (gsl3 !== hist[3]) begin failures++; $display("SKEW3 c=%0d got %h exp %h", c, gsl3, hist[3]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
