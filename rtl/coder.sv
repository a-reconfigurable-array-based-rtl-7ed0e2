// coder: the Coder block, turning comparison results into the next jump.
//
// Combinational.  While res_valid is high it reads the comparison results and
// gives the number of text characters to shift in before the next alignment:
//   * full match: report a match (match = 1) and jump M, past the occurrence;
//   * otherwise: jump k, the smallest k >= 1 with occ[k] set, which lines the
//     nearest pattern character equal to the text character under the last
//     pattern position up with it; if there is none, jump M.
// This is the bad-character rule of Boyer-Moore in its Horspool form.  jump
// is always between 1 and M for 1 <= M.
//
// The document gives the jump rules for a mismatch of the last character and
// for a full match.  When the last character matches but an earlier one does
// not, it says nothing; this design then uses the same occurrence rule, which
// never skips an occurrence.
module coder
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic                         res_valid,
  input  logic                         full_match,
  input  logic [PAT_MAX-1:0]           occ,
  input  logic [$clog2(PAT_MAX+1)-1:0] pat_len,
  output logic                         jump_valid,
  output logic [$clog2(PAT_MAX+1)-1:0] jump,
  output logic                         match
);
  localparam int unsigned JW = $clog2(PAT_MAX + 1);

  always_comb begin
    jump = pat_len;
    if (!full_match) begin
      for (int k = int'(PAT_MAX) - 1; k >= 1; k--)
        if (occ[k]) jump = JW'(k);
    end
    jump_valid = res_valid;
    match      = res_valid && full_match;
  end
endmodule
