// comparison: the Comparison block, all character comparisons of one
// alignment done in parallel.
//
// When eval is high the current text window is compared with the pattern in
// one clock, in two phases split by a pipeline register:
//   phase 1 (the eval cycle): every comparator works at once.  eq[k] tells
//     whether window slot k equals pattern slot k (slot 0 is the last pattern
//     character); occ[k], for 1 <= k < M, tells whether the text character
//     under the last pattern character (window slot 0) equals pattern slot k.
//     These vectors are registered.
//   phase 2 (the next cycle, res_valid high): last_match is eq[0]; full_match
//     is the AND of eq[0..M-1], found concurrently with the last-character
//     check; occ is handed on for the coder to pick the alignment from.
// The result therefore appears one clock after eval, the single cycle of
// latency the document attributes to this block.  Lanes k >= M are masked.
//
// Which comparisons are made and the one-cycle pipeline follow the document;
// how the work is split between the two phases is this design's choice.
module comparison
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         eval,
  input  char_t                        win     [PAT_MAX],
  input  char_t                        pat_rev [PAT_MAX],
  input  logic [$clog2(PAT_MAX+1)-1:0] pat_len,
  output logic                         res_valid,
  output logic                         last_match,
  output logic                         full_match,
  output logic [PAT_MAX-1:0]           occ
);
  logic [PAT_MAX-1:0] eq_d, occ_d;
  logic [PAT_MAX-1:0] eq_q;

  // phase 1: parallel comparators
  always_comb begin
    for (int k = 0; k < int'(PAT_MAX); k++) begin
      eq_d[k]  = (k >= int'(pat_len)) || (win[k] == pat_rev[k]);
      occ_d[k] = (k >= 1) && (k < int'(pat_len)) && (win[0] == pat_rev[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      eq_q      <= '0;
      occ       <= '0;
    end else begin
      res_valid <= eval;
      if (eval) begin
        eq_q <= eq_d;
        occ  <= occ_d;
      end
    end
  end

  // phase 2: reduce the registered comparisons
  assign last_match = eq_q[0];
  assign full_match = &eq_q;
endmodule
