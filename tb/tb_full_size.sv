// tb_full_size: the string lookup chip at its default sizes on texts the size
// of the two test texts it was characterised with: an English play of 32,681
// characters and a Spanish play of 65,387 characters.  The texts are made up
// here from a small word list with the searched names planted in them, as
// often as each name occurs in the real plays; every search is checked
// against the reference model and the planted count, its clock count (N + 4,
// or N + 5 when the last alignment ends on the last character) is checked, and
// the count and the time at 100 MHz are printed.
module tb_full_size;
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

  string_lookup_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic text_t to_text(input string s);
    text_t t = new[s.len()];
    foreach (t[i]) t[i] = s[i];
    return t;
  endfunction

  // Filler words hold none of the searched names.  Names are spread evenly.
  function automatic text_t make_text(input int n, input string names[$], input string filler[$]);
    text_t t = new[n];
    string q[$];
    int len = 0, next_mark, k = 0, gap;
    q = names;
    q.shuffle();
    gap = n / (q.size() + 1);
    next_mark = gap;
    while (len < n) begin
      string w;
      if (k < q.size() && len >= next_mark) begin
        w = q[k]; k++; next_mark += gap;
      end else w = filler[$urandom_range(0, filler.size() - 1)];
      for (int i = 0; i < w.len() && len < n; i++) begin t[len] = w[i]; len++; end
      if (len < n) begin t[len] = " "; len++; end
    end
    return t;
  endfunction

  task automatic run_text(input text_t text, input int n, input string pats[$], input int counts[$]);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      tm_we = 1; tm_addr = AW'(i); tm_wdata = text[i];
    end
    @(negedge clk); tm_we = 0;
    foreach (pats[p]) begin
      text_t pat = to_text(pats[p]);
      int m = pats[p].len();
      int exp_pos[$], got_pos[$];
      int aligns, cyc, last_end;
      @(negedge clk); pat_clear = 1;
      @(negedge clk); pat_clear = 0;
      for (int i = 0; i < m; i++) begin
        pat_wr = 1; pat_char = pat[i];
        @(negedge clk);
      end
      pat_wr = 0;
      bm_search(text, n, pat, m, exp_pos, aligns, last_end);
      text_len = pos_t'(n);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin
        @(posedge clk); #1;
        if (match_valid) got_pos.push_back(int'(match_pos));
        cyc++;
      end
      check(got_pos == exp_pos, {pats[p], ": match positions"});
      check(int'(match_count) == counts[p],
            $sformatf("%s: %0d occurrences, planted %0d", pats[p], match_count, counts[p]));
      check(int'(align_count) == aligns, {pats[p], ": alignments"});
      check(cyc == engine_clocks(n, last_end) + 3,
            $sformatf("%s: cycles %0d exp %0d", pats[p], cyc, engine_clocks(n, last_end) + 3));
      $display("%-11s N=%0d M=%0d found=%0d alignments=%0d clocks=%0d (%0.4f ms at 100 MHz)",
               pats[p], n, m, match_count, align_count, cyc, real'(cyc) / 1.0e5);
    end
  endtask

  initial begin
    string en_names[$], es_names[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // English text: name occurrences as in the real play
    repeat (60) en_names.push_back("Romeo");
    repeat (2)  en_names.push_back("Enter Romeo");
    repeat (25) en_names.push_back("Juliet");
    repeat (46) en_names.push_back("Capulet");
    repeat (28) en_names.push_back("Montague");
    repeat (3)  en_names.push_back("therefore");
    run_text(make_text(32681, en_names,
               '{"the", "and", "I", "to", "a", "of", "my", "is", "that", "in", "you", "me",
                 "love", "night", "thou", "thy", "with", "not", "be", "Nurse", "Friar", "sir"}),
             32681, '{"Romeo", "Juliet", "Capulet", "Montague", "therefore", "Enter Rome"},
             '{62, 25, 46, 28, 3, 2});
    // Spanish text
    repeat (66) es_names.push_back("Segismundo");
    repeat (43) es_names.push_back("Clarin");
    repeat (46) es_names.push_back("Rosaura");
    repeat (60) es_names.push_back("Clotaldo");
    run_text(make_text(65387, es_names,
               '{"que", "de", "el", "la", "y", "en", "a", "no", "es", "mi", "vida", "sueno",
                 "cielo", "rey", "Basilio", "Astolfo", "Estrella", "torre", "con", "por"}),
             65387, '{"Segis", "Clarin", "Rosaura", "Clotaldo", "Segismund", "Segismundo"},
             '{66, 43, 46, 60, 66, 66});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
