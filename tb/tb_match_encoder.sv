// tb_match_encoder: drives match vectors with no, one and several set bits
// into a 1024-entry and a 16-entry encoder and compares hit, multiple-match
// and lowest address with values counted out in the testbench.
module tb_match_encoder;
  localparam int unsigned N = 1024;

  logic [N-1:0] mv;
  logic hit, multi;
  logic [9:0] addr;
  logic [15:0] mv_s;
  logic hit_s, multi_s;
  logic [3:0] addr_s;
  int checks = 0, failures = 0;

  match_encoder #(.N(N))  dut   (.match_vec(mv),   .hit,          .multi,          .addr);
  match_encoder #(.N(16)) dut_s (.match_vec(mv_s), .hit(hit_s),   .multi(multi_s), .addr(addr_s));

  task automatic check_big();
    int cnt = 0;
    int low = 0;
    for (int i = N - 1; i >= 0; i--) if (mv[i]) begin cnt++; low = i; end
    #1;
    checks++;
    if (hit !== (cnt > 0) || multi !== (cnt > 1) || (cnt > 0 && addr !== 10'(low)) || (cnt == 0 && addr !== '0)) begin
      failures++;
      $display("N=1024 cnt=%0d low=%0d got hit=%b multi=%b addr=%0d", cnt, low, hit, multi, addr);
    end
  endtask

  initial begin
    mv = '0; mv_s = '0;
    check_big();
    for (int i = 0; i < N; i += 37) begin mv = '0; mv[i] = 1'b1; check_big(); end
    mv = '0; mv[N-1] = 1'b1; check_big();
    for (int t = 0; t < 200; t++) begin
      mv = '0;
      repeat ($urandom_range(1, 4)) mv[$urandom_range(0, N - 1)] = 1'b1;
      check_big();
    end
    for (int v = 0; v < 65536; v += 7) begin
      int cnt = 0;
      int low = 0;
      mv_s = 16'(v);
      for (int i = 15; i >= 0; i--) if (mv_s[i]) begin cnt++; low = i; end
      #1;
      checks++;
      if (hit_s !== (cnt > 0) || multi_s !== (cnt > 1) || addr_s !== 4'(low)) begin
        failures++;
        $display("N=16 v=%h got hit=%b multi=%b addr=%0d", v, hit_s, multi_s, addr_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
