// text_window: the Text register of the string lookup engine.
//
// A shift register of PAT_MAX characters that holds the part of the text the
// pattern is currently aligned with.  Each cycle with shift_en high, the next
// text character enters slot 0 and the rest move up one slot, so slot 0 holds
// the text character aligned with the last pattern character and slot k the
// one aligned with pattern character M-1-k.  A jump of J positions is made by
// shifting J characters in, one per clock, as the shift-in control directs.
// clear empties the window at the start of a search.
//
// The document describes the text as a register fed one character per clock;
// the slot order is this design's choice, made to match pattern_reg.
module text_window
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  shift_en,
  input  char_t char_in,
  output char_t win [PAT_MAX]   // win[0] = newest character
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(PAT_MAX); k++) win[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < int'(PAT_MAX); k++) win[k] <= '0;
    end else if (shift_en) begin
      win[0] <= char_in;
      for (int k = 1; k < int'(PAT_MAX); k++) win[k] <= win[k-1];
    end
  end
endmodule
