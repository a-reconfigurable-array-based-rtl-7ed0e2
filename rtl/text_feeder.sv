// text_feeder: reads the stored text out of text memory into the text FIFO.
//
// After start it reads addresses 0 .. text_len-1 in order, one per clock, and
// pushes each character into the FIFO the clock after its read.  A read is
// issued only while the FIFO has room for it and for the read already in
// flight, so no character is ever dropped and the FIFO never overflows; with
// a consumer taking one character per clock the feeder keeps up with it.
// busy is high until every character has been pushed.
//
// The document keeps the text in on-chip memory and feeds the engine from a
// FIFO; this address sequencer between the two is this design's own.
module text_feeder
  import bm_pkg::*;
#(
  parameter int unsigned AW    = TEXT_AW_DEF,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  pos_t                       text_len,
  // text memory read port
  output logic                       rd_en,
  output logic [AW-1:0]              rd_addr,
  input  char_t                      rd_data,
  // FIFO write side
  input  logic [$clog2(DEPTH+1)-1:0] fifo_count,
  output logic                       push,
  output char_t                      push_char,
  output logic                       busy
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  pos_t issued;
  logic inflight;
  logic active;

  assign rd_en     = active && (issued != text_len) &&
                     ((fifo_count + CW'(inflight)) < CW'(DEPTH));
  assign rd_addr   = issued[AW-1:0];
  assign push      = inflight;
  assign push_char = rd_data;
  assign busy      = active || inflight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued   <= '0;
      inflight <= 1'b0;
      active   <= 1'b0;
    end else if (start) begin
      issued   <= '0;
      inflight <= 1'b0;
      active   <= 1'b1;
    end else begin
      inflight <= rd_en;
      if (rd_en) issued <= issued + 1'b1;
      if (active && issued == text_len) active <= 1'b0;
    end
  end
endmodule
