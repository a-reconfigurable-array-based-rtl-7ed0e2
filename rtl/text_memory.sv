// text_memory: on-chip block memory that holds the text to be searched.
//
// A simple dual-port RAM of 2**AW characters: the write port loads (downloads)
// the text before a search, the read port gives the character at rd_addr one
// clock after rd_en (synchronous read, as block RAM does).  Contents are not
// initialised; only written locations are ever read.
//
// Keeping the text in on-chip memory follows the document's test setup; the
// port arrangement and the 64 Ki-character default depth (enough for the
// longer, 65,387-character test text) are this design's choices.
module text_memory
  import bm_pkg::*;
#(
  parameter int unsigned AW = TEXT_AW_DEF
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  char_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output char_t         rd_data
);
  char_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
