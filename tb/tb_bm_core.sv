// tb_bm_core: searches random texts for random patterns with the Boyer-Moore
// engine and compares every reported match position, the match count and the
// number of alignments with the reference model; the count is also checked
// against a plain left-to-right scan.  Half the runs feed the text with random
// stalls, the other half at full rate, where a search of N characters must
// take N + 1 clocks (N + 2 if the last alignment ends on the last character).  Small alphabets make full matches,
// last-character-only matches and jumps of every size frequent.
module tb_bm_core;
  import bm_pkg::*;
  import bm_ref_pkg::*;
  localparam int unsigned PM = 16;
  localparam int unsigned JW = $clog2(PM + 1);
  logic clk = 0, rst_n = 0;
  logic pat_clear = 0, pat_wr = 0, start = 0;
  char_t pat_char = '0;
  logic [JW-1:0] pat_len;
  pos_t text_len = '0;
  logic busy, done;
  logic txt_valid = 0, txt_ready;
  char_t txt_char = '0;
  logic match_valid;
  pos_t match_pos, match_count, align_count;
  int checks = 0, failures = 0;
  int n_full = 0, n_stall = 0;

  bm_core #(.PAT_MAX(PM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input text_t text, input int n, input text_t pat, input int m,
                     input bit stall);
    int exp_pos[$], got_pos[$];
    int aligns, cyc, idx, last_end;
    // load pattern
    @(negedge clk); pat_clear = 1;
    @(negedge clk); pat_clear = 0;
    for (int i = 0; i < m; i++) begin
      pat_wr = 1; pat_char = pat[i];
      @(negedge clk);
    end
    pat_wr = 0;
    check(int'(pat_len) == m, "pattern length");
    bm_search(text, n, pat, m, exp_pos, aligns, last_end);
    text_len = pos_t'(n); start = 1;
    @(negedge clk);
    start = 0;
    idx = 0; cyc = 0;
    while (!done && cyc < 20 * n + 200) begin
      txt_valid = (idx < n) && (!stall || $urandom_range(0, 3) != 0);
      txt_char  = (idx < n) ? text[idx] : 8'h00;
      if (stall && !txt_valid && txt_ready) n_stall++;
      @(posedge clk);
      if (txt_valid && txt_ready) idx++;
      #1;
      if (match_valid) got_pos.push_back(int'(match_pos));
      cyc++;
      @(negedge clk);
    end
    txt_valid = 0;
    @(posedge clk); #1;
    if (match_valid) got_pos.push_back(int'(match_pos));
    check(done, "search ends");
    check(got_pos == exp_pos, $sformatf("positions: got %p exp %p", got_pos, exp_pos));
    check(int'(match_count) == exp_pos.size(), "match_count");
    check(int'(match_count) == naive_count(text, n, pat, m), "count vs plain scan");
    check(int'(align_count) == aligns, $sformatf("alignments %0d exp %0d", align_count, aligns));
    if (!stall && m > 0)
      check(cyc == engine_clocks(n, last_end),
            $sformatf("cycles %0d exp %0d", cyc, engine_clocks(n, last_end)));
    n_full += exp_pos.size();
  endtask

  initial begin
    text_t text, pat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int n = $urandom_range(0, 400);
      automatic int m = $urandom_range(1, PM);
      automatic int alpha = $urandom_range(2, 6);
      text = new[n];
      pat  = new[m];
      foreach (text[i]) text[i] = 8'(97 + $urandom_range(0, alpha - 1));
      foreach (pat[i])  pat[i]  = 8'(97 + $urandom_range(0, alpha - 1));
      // plant the pattern a few times
      if (n >= m) repeat ($urandom_range(0, 4)) begin
        automatic int at = $urandom_range(0, n - m);
        for (int i = 0; i < m; i++) text[at+i] = pat[i];
      end
      run(text, n, pat, m, t % 2 == 1);
    end
    // the worked example: "conf" in "reconfigurable", found at position 2
    text = new[14]; pat = new[4];
    foreach (text[i]) text[i] = "reconfigurable" >> (8 * (13 - i));
    foreach (pat[i])  pat[i]  = "conf" >> (8 * (3 - i));
    run(text, 14, pat, 4, 0);
    check(match_pos == 2 && match_count == 1, "conf found at 2 in reconfigurable");
    check(align_count == 4, "reconfigurable: 4 alignments, jumps 2, 4, 4, 4");
    check(n_full > 0 && n_stall > 0, "matches and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
