// bm_pkg: types and default sizes shared by the Boyer-Moore string lookup engine.
//
// Characters are 8-bit ASCII codes, one per text position, as the design's
// throughput figure (bits per character times clock rate) assumes.  The
// default maximum pattern length (16) and text memory depth (64 Ki
// characters, enough for a 65,387-character text) are this design's own
// choices; the text memory size follows from the largest text searched.
package bm_pkg;
  localparam int unsigned CHAR_W      = 8;      // ASCII character width
  localparam int unsigned PAT_MAX_DEF = 16;     // longest pattern the engine holds
  localparam int unsigned TEXT_AW_DEF = 16;     // text memory address width (64 Ki chars)
  localparam int unsigned POS_W       = 32;     // width of text positions and lengths

  typedef logic [CHAR_W-1:0] char_t;
  typedef logic [POS_W-1:0]  pos_t;
endpackage
