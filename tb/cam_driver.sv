// cam_driver: stimulus and scoreboard for the pipelined CAM, shared by the
// end-to-end testbenches.
//
// It resets the CAM, fills every entry with uniformly distributed random
// words (a few entries duplicated, a few left invalid), then issues one
// search per cycle with occasional bubbles. Search keys are a stored word,
// a stored word with one bit flipped in a chosen segment (so that the word
// drops out of the pipeline exactly there), a random word, or the word of an
// invalid entry. Halfway through it drains the pipeline, rewrites and
// invalidates some entries and searches on.
//
// The reference model works on whole words: for each search it computes
// which entries reach each stage (valid and equal in all earlier segments),
// the expected match vector, lowest address and flags, and which local blocks
// must fire in each later cycle. Results are checked when result_valid rises,
// together with the latency of N_SEG cycles; local search-line activity is
// checked every cycle. Each mechanism (single, multiple and no match, drop
// out in each segment, gated and fired blocks, bubbles, back-to-back
// searches, writes, invalid entries) is counted and must occur.
module cam_driver #(
  parameter int unsigned NE       = 1024,
  parameter int unsigned NSEG     = 5,
  parameter int unsigned FW       = 8,
  parameter int unsigned SW       = 34,
  parameter int unsigned BR       = 64,
  parameter logic [NSEG-1:0] HM   = 5'b11110,
  parameter int unsigned N_SEARCH = 2000,
  localparam int unsigned WIDTH = FW + (NSEG - 1) * SW,
  localparam int unsigned AW    = (NE > 1) ? $clog2(NE) : 1,
  localparam int unsigned NBLK  = NE / BR
) (
  input  logic                       clk,
  output logic                       rst_n,
  output logic                       search_valid,
  output logic [WIDTH-1:0]           search_key,
  output logic                       wr_en,
  output logic [AW-1:0]              wr_addr,
  output logic [WIDTH-1:0]           wr_data,
  output logic                       wr_entry_valid,
  input  logic                       result_valid,
  input  logic [NE-1:0]              match_vec,
  input  logic                       match_hit,
  input  logic                       match_multi,
  input  logic [AW-1:0]              match_addr,
  input  logic [NSEG-1:0][NBLK-1:0]  lsl_active
);

  typedef logic [NSEG-1:0][NBLK-1:0] act_t;

  typedef struct {
    int            issue_cyc;
    logic [NE-1:0] vec;
  } exp_t;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_single = 0, n_multi = 0, n_none = 0, n_bubble = 0, n_b2b = 0;
  int n_write = 0, n_inval = 0, n_invalid_key = 0;
  int n_gated = 0, n_fired_h = 0;
  int n_drop [NSEG];       // entries that stopped at segment k (k>0: after matching earlier ones)
  longint n_reach [NSEG];  // entry-stage activations
  longint n_blk_fired [NSEG];

  logic [WIDTH-1:0] mem [NE];
  logic             vld [NE];
  act_t             exp_act [int];
  exp_t             q [$];
  logic [WIDTH-1:0] segmask [NSEG];
  act_t             idle_act;
  logic             last_sv;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int k = 0; k < NSEG; k++) begin
      int unsigned off, w;
      off = (k == 0) ? 0 : FW + (k - 1) * SW;
      w   = (k == 0) ? FW : SW;
      segmask[k] = '0;
      for (int unsigned i = 0; i < w; i++) segmask[k][off + i] = 1'b1;
      n_drop[k] = 0; n_reach[k] = 0; n_blk_fired[k] = 0;
    end
    for (int k = 0; k < NSEG; k++)
      for (int b = 0; b < NBLK; b++) idle_act[k][b] = !HM[k];
  end

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w = {w, $urandom};
    return w;
  endfunction

  // Model one search issued at rising edge c0.
  function automatic void model_search(logic [WIDTH-1:0] key, int c0);
    logic [NE-1:0] reach;
    logic [NE-1:0] vec;
    exp_t e;
    reach = '0;
    for (int i = 0; i < NE; i++) reach[i] = vld[i];
    for (int k = 0; k < NSEG; k++) begin
      act_t a;
      logic [NE-1:0] nxt;
      a = exp_act.exists(c0 + k) ? exp_act[c0 + k] : idle_act;
      for (int b = 0; b < NBLK; b++) begin
        logic any;
        any = 1'b0;
        for (int r = 0; r < BR; r++) any |= reach[b * BR + r];
        a[k][b] = HM[k] ? any : 1'b1;
        if (HM[k]) begin
          if (any) n_fired_h++; else n_gated++;
        end
        if (any) n_blk_fired[k]++;
      end
      exp_act[c0 + k] = a;
      for (int i = 0; i < NE; i++) begin
        nxt[i] = reach[i] && (((mem[i] ^ key) & segmask[k]) == '0);
        if (reach[i]) n_reach[k]++;
        if (reach[i] && !nxt[i]) n_drop[k]++;
      end
      reach = nxt;
    end
    vec = reach;
    e.issue_cyc = c0;
    e.vec = vec;
    q.push_back(e);
  endfunction

  task automatic write_entry(int a, logic [WIDTH-1:0] d, logic v);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = d; wr_entry_valid = v;
    mem[a] = d; vld[a] = v;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic do_search(logic [WIDTH-1:0] key);
    search_valid = 1'b1;
    search_key   = key;
    if (last_sv) n_b2b++;
    last_sv = 1'b1;
    model_search(key, cyc + 1);
    @(negedge clk);
    search_valid = 1'b0;
  endtask

  task automatic bubble();
    search_valid = 1'b0;
    last_sv = 1'b0;
    n_bubble++;
    @(negedge clk);
  endtask

  task automatic pick_and_search();
    int r, e, k;
    logic [WIDTH-1:0] key;
    r = $urandom_range(0, 99);
    e = $urandom_range(0, NE - 1);
    if (r < 10) begin
      bubble();
      return;
    end else if (r < 50) begin
      key = mem[e];
      if (!vld[e]) n_invalid_key++;
    end else if (r < 75) begin
      k = $urandom_range(0, NSEG - 1);
      key = mem[e];
      for (int i = 0; i < WIDTH; i++)
        if (segmask[k][i] && ($urandom_range(0, SW) == 0 || (k == 0 && i == 0) ||
            (k > 0 && i == FW + (k - 1) * SW)))
          key[i] = ~key[i];
    end else begin
      key = rand_word();
    end
    do_search(key);
  endtask

  // checks every cycle, just after the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      act_t ea;
      ea = exp_act.exists(cyc) ? exp_act[cyc] : idle_act;
      if (exp_act.exists(cyc)) exp_act.delete(cyc);
      checks++;
      if (lsl_active !== ea) begin
        failures++;
        if (failures < 10) $display("cyc=%0d lsl_active mismatch", cyc);
      end
      if (result_valid) begin
        exp_t e;
        int cnt, low;
        if (q.size() == 0) begin
          failures++;
          $display("cyc=%0d unexpected result", cyc);
        end else begin
          e = q.pop_front();
          cnt = 0; low = 0;
          for (int i = NE - 1; i >= 0; i--) if (e.vec[i]) begin cnt++; low = i; end
          if (cnt == 0) n_none++; else if (cnt == 1) n_single++; else n_multi++;
          checks += 3;
          if (cyc - e.issue_cyc != int'(NSEG)) begin
            failures++; $display("latency %0d", cyc - e.issue_cyc);
          end
          if (match_vec !== e.vec) begin
            failures++;
            if (failures < 10) $display("cyc=%0d match_vec mismatch (exp %0d hits)", cyc, cnt);
          end
          if (match_hit !== (cnt > 0) || match_multi !== (cnt > 1) ||
              (cnt > 0 && match_addr !== AW'(low))) begin
            failures++;
            if (failures < 10) $display("cyc=%0d encoder got hit=%b multi=%b addr=%0d exp cnt=%0d low=%0d",
                                        cyc, match_hit, match_multi, match_addr, cnt, low);
          end
        end
      end
    end
  end

  task automatic finish();
    $display("searches: single=%0d multi=%0d none=%0d bubbles=%0d back_to_back=%0d",
             n_single, n_multi, n_none, n_bubble, n_b2b);
    $display("writes=%0d invalidations=%0d invalid_entry_keys=%0d", n_write, n_inval, n_invalid_key);
    $display("hierarchical blocks: fired=%0d gated=%0d", n_fired_h, n_gated);
    for (int k = 0; k < NSEG; k++)
      $display("segment %0d: entry activations=%0d dropped_here=%0d blocks_fired=%0d",
               k, n_reach[k], n_drop[k], n_blk_fired[k]);
    checks++;
    if (n_single == 0 || n_multi == 0 || n_none == 0 || n_bubble == 0 || n_b2b == 0 ||
        n_write == 0 || n_inval == 0 || n_invalid_key == 0 || n_gated == 0 || n_fired_h == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    for (int k = 0; k < NSEG; k++) begin
      checks++;
      if (n_drop[k] == 0) begin failures++; $display("no drop-out in segment %0d", k); end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst_n = 1'b0;
    search_valid = 1'b0; search_key = '0;
    wr_en = 1'b0; wr_addr = '0; wr_data = '0; wr_entry_valid = 1'b0;
    last_sv = 1'b0;
    for (int i = 0; i < NE; i++) begin mem[i] = '0; vld[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fill: uniform random words; entry 3 repeated in the last block; every
    // 50th entry left invalid
    for (int i = 0; i < NE; i++) begin
      logic [WIDTH-1:0] d;
      d = (i == NE - 2) ? mem[3] : rand_word();
      if (i % 50 == 7) begin
        write_entry(i, d, 1'b0);
        n_inval++;
      end else begin
        write_entry(i, d, 1'b1);
        n_write++;
      end
    end
    // first half of the searches
    for (int s = 0; s < N_SEARCH / 2; s++) pick_and_search();
    // drain, then change the contents
    repeat (NSEG + 1) bubble();
    for (int j = 0; j < 20; j++) begin
      int a;
      a = $urandom_range(0, NE - 1);
      if (j % 4 == 0) begin write_entry(a, mem[a], 1'b0); n_inval++; end
      else            begin write_entry(a, rand_word(), 1'b1); n_write++; end
    end
    write_entry(NE - 1, mem[0], 1'b1);  // duplicate of entry 0
    n_write++;
    do_search(mem[0]);
    for (int s = 0; s < N_SEARCH / 2; s++) pick_and_search();
    repeat (NSEG + 2) bubble();
    finish();
  end

  // watchdog
  initial begin
    repeat (NE + 4 * N_SEARCH + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
