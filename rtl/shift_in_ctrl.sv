// shift_in_ctrl: the Shift-in Control block, the engine's sequencer.
//
// At heart a down-counter: it holds the number of text characters still to be
// shifted into the text window before the next comparison, and takes one
// character per clock from the text stream (valid/ready) until it reaches
// zero, waiting while the stream has nothing to give.
//
// The comparison block needs one clock before the coder knows the jump J.
// That clock is not lost: every jump is at least one character, so in the
// clock that compares (eval high) the first character of the next jump is
// already shifted in.  When the jump arrives the counter is loaded with J
// less that character.  A jump of 1 is thus used up at once and the next
// alignment is compared in the very next clock.  The engine so spends one
// clock per text character; the comparison latency shows only once, at the
// end of the text.  States:
//   IDLE/DONE  waiting for start
//   FILL       shifting the M characters of the first alignment, or the rest
//              of a jump
//   EVAL       the window is aligned: compare, and shift one character
//   WAIT       the jump of the previous comparison is here; if nothing more
//              is owed this clock compares again (eval high), otherwise it
//              shifts like FILL
// The search ends (DONE) when characters are still owed but all text_len
// characters have been taken; the last complete alignment has been compared
// and its result given by then.  With a stream that never stalls a search of
// N characters takes N + 1 clocks, or N + 2 when the last alignment ends on
// the last character.  A pattern of length 0 ends the search at once.
// consumed counts characters taken since start; in an eval clock the compared
// alignment ends at text position consumed - 1.
//
// The down-counter, the one-character-per-clock rate and the single clock of
// comparison latency follow the document; the state names, the stream
// handshake, the early shift and the end-of-text rule are this design's
// choices.
module shift_in_ctrl
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX = PAT_MAX_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(PAT_MAX+1)-1:0] pat_len,
  input  pos_t                         text_len,
  // jump from the coder, valid in WAIT
  input  logic                         jump_valid,
  input  logic [$clog2(PAT_MAX+1)-1:0] jump,
  // text character stream
  input  logic                         in_valid,
  output logic                         in_ready,
  // window control
  output logic                         win_clear,
  output logic                         shift_en,
  output logic                         eval,
  output pos_t                         consumed,
  output logic                         busy,
  output logic                         done
);
  localparam int unsigned JW = $clog2(PAT_MAX + 1);

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_EVAL, S_WAIT, S_DONE} state_t;
  state_t        state;
  logic [JW-1:0] cnt;
  logic          early_q;    // a character of the coming jump went in at eval
  logic [JW-1:0] pending;
  logic          text_end;
  logic          filling;

  assign text_end  = (consumed == text_len);
  // characters still owed before the next comparison
  assign pending   = (state == S_WAIT) ? (jump - JW'(early_q)) : cnt;
  assign eval      = (state == S_EVAL) || ((state == S_WAIT) && (pending == '0));
  assign filling   = ((state == S_FILL) || (state == S_WAIT)) && (pending != '0);
  assign in_ready  = (eval || filling) && !text_end;
  assign shift_en  = in_ready && in_valid;
  assign win_clear = start && ((state == S_IDLE) || (state == S_DONE));
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      early_q  <= 1'b0;
      consumed <= '0;
    end else begin
      consumed <= consumed + pos_t'(shift_en);
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          cnt      <= pat_len;
          early_q  <= 1'b0;
          consumed <= '0;
          state    <= (pat_len == '0) ? S_DONE : S_FILL;
        end
        S_FILL, S_EVAL, S_WAIT: begin
          if (eval) begin
            early_q <= shift_en;
            state   <= S_WAIT;
          end else if (text_end) begin
            state <= S_DONE;
          end else begin
            cnt     <= pending - JW'(shift_en);
            early_q <= 1'b0;
            state   <= (pending - JW'(shift_en) == '0) ? S_EVAL : S_FILL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The coder answers exactly one clock after each eval, with a jump of 1..M.
  a_jump_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT) |-> (jump_valid && jump >= 1 && jump <= pat_len));
  a_no_jump_outside_wait: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_WAIT) |-> !jump_valid);
endmodule
