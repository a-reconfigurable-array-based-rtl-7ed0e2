// bm_ref_pkg: reference model of the Boyer-Moore search used by the engine
// testbenches, written as plain sequential code independent of the RTL.
//
// bm_search walks the text the way the engine's rules say: align the pattern
// at s, compare; on a full match record s and move by M; otherwise move by the
// distance from the last pattern position to the nearest earlier pattern
// character equal to the text character under the last position (M if none).
// It returns the match positions, the number of alignments compared and the
// text position just past the last alignment (-1 if there was none).
// naive_count counts non-overlapping occurrences scanning left to right, a
// second, unrelated check of the match count.
package bm_ref_pkg;
  typedef byte unsigned text_t[];

  function automatic void bm_search(input text_t text, input int n,
                                    input text_t pat, input int m,
                                    output int pos[$], output int aligns,
                                    output int last_end);
    int s;
    pos = {};
    aligns = 0;
    last_end = -1;
    if (m == 0) return;
    s = 0;
    while (s + m <= n) begin
      bit full;
      int j;
      aligns++;
      last_end = s + m;
      full = 1;
      for (int i = 0; i < m; i++) if (text[s+i] != pat[i]) full = 0;
      if (full) begin
        pos.push_back(s);
        s += m;
      end else begin
        j = m;
        for (int k = m - 1; k >= 1; k--)
          if (pat[m-1-k] == text[s+m-1]) j = k;
        s += j;
      end
    end
  endfunction

  // Clocks the engine needs for a search at full stream rate: one per text
  // character, one to end, and one more when the last alignment ends on the
  // last character (its comparison result comes a clock after the text ends).
  function automatic int engine_clocks(input int n, input int last_end);
    return n + 1 + ((last_end == n) ? 1 : 0);
  endfunction

  function automatic int naive_count(input text_t text, input int n,
                                     input text_t pat, input int m);
    int c, s;
    c = 0;
    s = 0;
    while (s + m <= n) begin
      bit full;
      full = 1;
      for (int i = 0; i < m; i++) if (text[s+i] != pat[i]) full = 0;
      if (full) begin c++; s += m; end
      else s++;
    end
    return c;
  endfunction
endpackage
