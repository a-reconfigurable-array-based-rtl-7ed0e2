// pattern_reg: the Pattern register of the string lookup engine.
//
// The pattern is loaded one character per clock, first character first, while
// pat_wr is high.  Characters enter at slot 0 and older ones move up, so after
// loading a pattern p[0..M-1] slot k holds p[M-1-k]: slot 0 is always the last
// pattern character, the one the engine compares first.  The loaded length M
// counts the writes and saturates at PAT_MAX (if more are written, the last
// PAT_MAX characters are kept).  pat_clear empties the register in one cycle.
// The register is written only while the engine is idle (the caller's duty).
//
// The document shows the pattern as a register that feeds the comparators; the
// serial load port, the reversed slot order and the saturating length are
// choices of this design.
module pattern_reg
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pat_clear,  // forget the stored pattern
  input  logic                         pat_wr,     // append pat_char
  input  char_t                        pat_char,
  output char_t                        pat_rev [PAT_MAX], // pat_rev[k] = p[M-1-k]
  output logic [$clog2(PAT_MAX+1)-1:0] pat_len     // M
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_len <= '0;
      for (int k = 0; k < int'(PAT_MAX); k++) pat_rev[k] <= '0;
    end else if (pat_clear) begin
      pat_len <= '0;
      for (int k = 0; k < int'(PAT_MAX); k++) pat_rev[k] <= '0;
    end else if (pat_wr) begin
      pat_rev[0] <= pat_char;
      for (int k = 1; k < int'(PAT_MAX); k++) pat_rev[k] <= pat_rev[k-1];
      if (pat_len != ($clog2(PAT_MAX+1))'(PAT_MAX)) pat_len <= pat_len + 1'b1;
    end
  end
endmodule
