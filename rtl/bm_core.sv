// bm_core: the Boyer-Moore string lookup engine.
//
// Wires the five parts of the engine together: the Pattern register, the Text
// window register, the Comparison block, the Coder and the Shift-in Control.
// After start the engine takes M characters of text (M = loaded pattern
// length) to align pattern and text at position 0, then repeats: compare all
// characters in parallel (one clock of latency), let the coder pick the jump
// J (1..M), and shift J further characters in, one per clock, the first of
// them already during the comparison clock.  Each full
// match is reported for one clock on match_valid with the 0-based text
// position of its first character on match_pos, registered one clock after
// the coder decides, and counted on match_count (cleared by start).  done
// rises when the text is used up.  The engine takes one text character per
// clock and compares the next alignment while it shifts, so with a text stream
// that never stalls a search of N characters takes N + 1 clocks from start to
// done, or N + 2 when the last alignment ends on the last character: the one
// clock of comparison latency is paid once, not per alignment.
//
// Text arrives as a valid/ready character stream, from on-chip memory through
// a FIFO or from outside the chip.  The pattern may only be loaded while the
// engine is not busy.
//
// The block structure and the jump rules follow the document; the stream
// interface, the output registers and the counters are this design's choices.
module bm_core
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // pattern load
  input  logic                         pat_clear,
  input  logic                         pat_wr,
  input  char_t                        pat_char,
  output logic [$clog2(PAT_MAX+1)-1:0] pat_len,
  // search control
  input  logic                         start,
  input  pos_t                         text_len,
  output logic                         busy,
  output logic                         done,
  // text stream
  input  logic                         txt_valid,
  input  char_t                        txt_char,
  output logic                         txt_ready,
  // results
  output logic                         match_valid,
  output pos_t                         match_pos,
  output pos_t                         match_count,
  output pos_t                         align_count   // alignments compared (D)
);
  localparam int unsigned JW = $clog2(PAT_MAX + 1);

  char_t              pat_rev [PAT_MAX];
  char_t              win     [PAT_MAX];
  logic               win_clear, shift_en, eval;
  logic               res_valid, last_match, full_match;
  logic [PAT_MAX-1:0] occ;
  logic               jump_valid, match;
  logic [JW-1:0]      jump;
  pos_t               consumed;
  pos_t               align_start;  // start position of the compared alignment

  pattern_reg #(.PAT_MAX(PAT_MAX)) u_pattern (
    .clk, .rst_n, .pat_clear, .pat_wr, .pat_char, .pat_rev, .pat_len
  );

  text_window #(.PAT_MAX(PAT_MAX)) u_text (
    .clk, .rst_n, .clear(win_clear), .shift_en, .char_in(txt_char), .win
  );

  comparison #(.PAT_MAX(PAT_MAX)) u_cmp (
    .clk, .rst_n, .eval, .win, .pat_rev, .pat_len,
    .res_valid, .last_match, .full_match, .occ
  );

  coder #(.PAT_MAX(PAT_MAX)) u_coder (
    .res_valid, .full_match, .occ, .pat_len, .jump_valid, .jump, .match
  );

  shift_in_ctrl #(.PAT_MAX(PAT_MAX)) u_shift (
    .clk, .rst_n, .start, .pat_len, .text_len, .jump_valid, .jump,
    .in_valid(txt_valid), .in_ready(txt_ready),
    .win_clear, .shift_en, .eval, .consumed, .busy, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_valid <= 1'b0;
      align_start <= '0;
      match_pos   <= '0;
      match_count <= '0;
      align_count <= '0;
    end else begin
      match_valid <= match;
      if (eval) align_start <= consumed - pos_t'(pat_len);
      if (match) begin
        match_pos   <= align_start;
        match_count <= match_count + 1'b1;
      end else if (win_clear) begin
        match_count <= '0;
      end
      if (win_clear)   align_count <= '0;
      else if (eval)   align_count <= align_count + 1'b1;
    end
  end

  // last_match feeds no decision of its own: the coder's occurrence rule
  // already covers a matching last character.
  logic unused_last_match;
  assign unused_last_match = last_match;
  a_pattern_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(pat_wr || pat_clear));
endmodule
