// tb_string_lookup_top: end-to-end test of the string lookup chip at its
// default sizes.  Texts are downloaded into the text memory and searched, and
// other texts are streamed in over the external pins, some with random gaps; the
// pattern is reloaded between searches.  Every match position, the match
// count and the number of alignments are compared with the reference model,
// and for memory-fed searches the clock count from start to done must be
// N + 4, or N + 5 when the last alignment ends on the last character (three
// clocks to bring the first character out of memory, then the engine's N + 1
// or N + 2); pin-fed searches with no gaps take N + 3 (or N + 4).  It also counts how often each mechanism of the design happened
// and fails if one never did: full match, last character matching without a
// full match, a jump to an earlier pattern character, a jump of M, the engine
// waiting on an empty FIFO, both text sources, the end of text with
// characters still owed, a character shifted in during a comparison clock,
// and comparisons in consecutive clocks (a jump of one).  A full FIFO is only
// counted: the engine takes a character every clock, so it rarely fills.
module tb_string_lookup_top;
  import bm_pkg::*;
  import bm_ref_pkg::*;
  localparam int unsigned PM = PAT_MAX_DEF;
  localparam int unsigned AW = TEXT_AW_DEF;
  logic clk = 0, rst_n = 0;
  logic pat_clear = 0, pat_wr = 0;
  char_t pat_char = '0;
  logic [$clog2(PM+1)-1:0] pat_len;
  logic tm_we = 0;
  logic [AW-1:0] tm_addr = '0;
  char_t tm_wdata = '0;
  logic ext_mode = 0, ext_valid = 0, ext_ready;
  char_t ext_char = '0;
  logic start = 0;
  pos_t text_len = '0;
  logic busy, done, match_valid;
  pos_t match_pos, match_count, align_count;
  int checks = 0, failures = 0;

  // mechanism counters
  int c_full = 0, c_last_only = 0, c_jump_occ = 0, c_jump_m = 0;
  int c_fifo_empty_wait = 0, c_fifo_full = 0, c_mem_runs = 0, c_ext_runs = 0;
  int c_end_owed = 0, c_early_shift = 0, c_back_to_back = 0;

  string_lookup_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // observe the engine's internals to count mechanisms
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.res_valid) begin
      if (dut.u_core.full_match) c_full++;
      else begin
        if (dut.u_core.last_match) c_last_only++;
        if (dut.u_core.jump < dut.u_core.pat_len) c_jump_occ++;
        else c_jump_m++;
      end
    end
    if (dut.u_core.busy && dut.u_core.txt_ready && !dut.u_core.txt_valid) c_fifo_empty_wait++;
    if (dut.u_fifo.count == 3'(4) && dut.u_fifo.in_valid) c_fifo_full++;
    if (dut.u_core.u_shift.filling && dut.u_core.u_shift.text_end) c_end_owed++;
    if (dut.u_core.eval && dut.u_core.shift_en) c_early_shift++;
    if (dut.u_core.eval && dut.u_core.res_valid) c_back_to_back++;
  end

  task automatic load_pattern(input text_t pat, input int m);
    @(negedge clk); pat_clear = 1;
    @(negedge clk); pat_clear = 0;
    for (int i = 0; i < m; i++) begin
      pat_wr = 1; pat_char = pat[i];
      @(negedge clk);
    end
    pat_wr = 0;
  endtask

  task automatic download(input text_t text, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      tm_we = 1; tm_addr = AW'(i); tm_wdata = text[i];
    end
    @(negedge clk); tm_we = 0;
  endtask

  task automatic search(input text_t text, input int n, input text_t pat, input int m,
                        input bit ext, input bit gaps);
    int exp_pos[$], got_pos[$];
    int aligns, cyc, idx, last_end;
    bm_search(text, n, pat, m, exp_pos, aligns, last_end);
    ext_mode = ext; text_len = pos_t'(n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; idx = 0;
    while (!done && cyc < 20 * n + 200) begin
      ext_valid = ext && (idx < n) && (!gaps || $urandom_range(0, 4) != 0);
      ext_char  = (idx < n) ? text[idx] : 8'h00;
      @(posedge clk);
      if (ext_valid && ext_ready) idx++;
      #1;
      if (match_valid) got_pos.push_back(int'(match_pos));
      cyc++;
      @(negedge clk);
    end
    ext_valid = 0;
    @(posedge clk); #1;
    if (match_valid) got_pos.push_back(int'(match_pos));
    check(done, "search ends");
    check(got_pos == exp_pos, $sformatf("positions: got %0d exp %0d", got_pos.size(), exp_pos.size()));
    check(int'(match_count) == exp_pos.size(), "match_count");
    check(int'(align_count) == aligns, "alignments");
    if (!ext) begin
      check(cyc == engine_clocks(n, last_end) + 3,
            $sformatf("cycles %0d exp %0d", cyc, engine_clocks(n, last_end) + 3));
      c_mem_runs++;
    end else begin
      if (!gaps)
        check(cyc == engine_clocks(n, last_end) + 2,
              $sformatf("pin-fed cycles %0d exp %0d", cyc, engine_clocks(n, last_end) + 2));
      c_ext_runs++;
    end
  endtask

  initial begin
    text_t text, pat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(0, 3000);
      automatic int m = $urandom_range(1, PM);
      automatic int alpha = $urandom_range(2, 8);
      automatic bit ext = (t % 3 == 2);
      text = new[n]; pat = new[m];
      foreach (text[i]) text[i] = 8'(65 + $urandom_range(0, alpha - 1));
      foreach (pat[i])  pat[i]  = 8'(65 + $urandom_range(0, alpha - 1));
      if (n >= m) repeat ($urandom_range(1, 6)) begin
        automatic int at = $urandom_range(0, n - m);
        for (int i = 0; i < m; i++) text[at+i] = pat[i];
      end
      load_pattern(pat, m);
      if (!ext) download(text, n);
      search(text, n, pat, m, ext, t % 2 == 0);
    end
    $display("mechanisms: full=%0d last_only=%0d jump_occ=%0d jump_M=%0d fifo_empty_wait=%0d fifo_full=%0d mem_runs=%0d ext_runs=%0d end_owed=%0d early_shift=%0d back_to_back=%0d",
             c_full, c_last_only, c_jump_occ, c_jump_m, c_fifo_empty_wait, c_fifo_full,
             c_mem_runs, c_ext_runs, c_end_owed, c_early_shift, c_back_to_back);
    check(c_full > 0, "full match happened");
    check(c_last_only > 0, "last-character-only match happened");
    check(c_jump_occ > 0, "occurrence jump happened");
    check(c_jump_m > 0, "jump of M happened");
    check(c_fifo_empty_wait > 0, "engine waited on empty FIFO");
    check(c_mem_runs > 0 && c_ext_runs > 0, "both text sources used");
    check(c_end_owed > 0, "text ended with characters owed");
    check(c_early_shift > 0, "character shifted during a comparison");
    check(c_back_to_back > 0, "comparisons in consecutive clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
