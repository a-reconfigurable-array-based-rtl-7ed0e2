// text_fifo: the on-chip FIFO that supplies text characters to the engine.
//
// A synchronous first-in first-out buffer of DEPTH characters with valid/ready
// handshakes on both sides: in_ready is low when it is full, out_valid high
// when it holds a character.  A push and a pop can happen in the same clock.
// flush empties it in one clock.  count tells how many characters it holds.
//
// The document names an on-chip FIFO as the usual source of text for the
// shift-in control; its depth (4) and handshake are this design's choices.
module text_fifo
  import bm_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       in_valid,
  input  char_t                      in_char,
  output logic                       in_ready,
  output logic                       out_valid,
  output char_t                      out_char,
  input  logic                       out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  char_t         buf_q [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_char  = buf_q[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < int'(DEPTH); i++) buf_q[i] <= '0;
    end else if (flush) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        buf_q[wr_ptr] <= in_char;
        wr_ptr        <= next_ptr(wr_ptr);
      end
      if (pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (count == CW'(DEPTH)) |-> !push);
endmodule
