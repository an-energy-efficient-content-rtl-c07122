// tb_activated_blocks: sweeps the number of local blocks whose gated
// search-lines fire during one search, in the test-chip arrangement (256
// entries, 64-entry blocks, gated search-lines on the second and third
// segments). The stored words are built so that exactly one entry in each of
// the first n blocks matches the key in its first two segments, and no other
// entry matches the first segment. A search must then fire n blocks in the
// second segment and n in the third, 2n in all, for n = 0 to 4, and the
// gated blocks of the other rows must stay still. The conventional segments
// are reported active on every cycle.
module tb_activated_blocks;
  localparam int unsigned NE   = 256;
  localparam int unsigned NSEG = 5;
  localparam int unsigned FW   = 8;
  localparam int unsigned SW   = 34;
  localparam int unsigned BR   = 64;
  localparam logic [NSEG-1:0] HM = 5'b00110;
  localparam int unsigned WIDTH = FW + (NSEG - 1) * SW;
  localparam int unsigned AW    = $clog2(NE);
  localparam int unsigned NBLK  = NE / BR;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                      rst_n, search_valid, wr_en, wr_entry_valid;
  logic [WIDTH-1:0]          search_key, wr_data;
  logic [AW-1:0]             wr_addr, match_addr;
  logic                      result_valid, match_hit, match_multi;
  logic [NE-1:0]             match_vec;
  logic [NSEG-1:0][NBLK-1:0] lsl_active;

  pipelined_cam #(
    .N_ENTRIES(NE), .N_SEG(NSEG), .FIRST_SEG_W(FW), .SEG_W(SW),
    .BLOCK_ROWS(BR), .HIER_MASK(HM)
  ) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] key;
  logic [WIDTH-1:0] word;
  int fired [NSEG];

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w = {w, $urandom};
    return w;
  endfunction

  task automatic write_entry(int a, logic [WIDTH-1:0] d);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d; wr_entry_valid = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; search_valid = 1'b0; search_key = '0;
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; wr_entry_valid = 1'b0;
    key = rand_word();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n <= int'(NBLK); n++) begin
      // background: every entry differs from the key in its first segment
      for (int a = 0; a < NE; a++) begin
        word = rand_word();
        word[0] = ~key[0];
        // one entry per chosen block matches the first two segments and
        // differs in the third
        if (a % BR == 5 && a / BR < n) begin
          word[FW + SW - 1:0] = key[FW + SW - 1:0];
          word[FW + SW]       = ~key[FW + SW];
        end
        write_entry(a, word);
      end
      search_valid = 1'b1;
      search_key   = key;
      @(negedge clk);
      search_valid = 1'b0;
      foreach (fired[k]) fired[k] = 0;
      for (int c = 0; c < int'(NSEG) + 1; c++) begin
        for (int k = 0; k < int'(NSEG); k++)
          for (int b = 0; b < int'(NBLK); b++) fired[k] += int'(lsl_active[k][b]);
        if (result_valid) begin
          checks++;
          if (match_hit !== 1'b0) begin failures++; $display("n=%0d unexpected hit", n); end
        end
        @(negedge clk);
      end
      $display("n=%0d blocks fired: segment2=%0d segment3=%0d total=%0d",
               n, fired[1], fired[2], fired[1] + fired[2]);
      checks += 3;
      if (fired[1] != n) begin failures++; $display("segment 2 fired %0d blocks, expected %0d", fired[1], n); end
      if (fired[2] != n) begin failures++; $display("segment 3 fired %0d blocks, expected %0d", fired[2], n); end
      // the conventional segments drive their search-lines on every cycle
      if (fired[0] != int'((NSEG + 1) * NBLK)) begin failures++; $display("segment 1 activity %0d", fired[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
