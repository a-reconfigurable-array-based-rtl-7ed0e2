// string_lookup_top: string lookup chip built around a Boyer-Moore engine.
//
// The text to be searched is first written into on-chip text memory through
// the tm_* port, and the pattern into the engine's pattern register through
// the pat_* port.  A start pulse then flushes the text FIFO, starts the text
// feeder (memory -> FIFO) and starts the engine (FIFO -> engine), which
// reports every occurrence of the pattern on match_valid / match_pos, counts
// them on match_count and raises done at the end of the text.
//
// With ext_mode high the text comes from outside the chip instead, over the
// ext_* valid/ready pins into the same FIFO, and the text memory sits idle;
// text_len still gives the number of characters to search.  ext_mode must be
// held steady during a search.
//
// Timing: the engine takes one text character per clock.  A search of N
// characters from text memory takes N + 4 clocks from the clock with start
// high to the first clock with done high (N + 5 when the last alignment ends
// on the last character): one clock to flush the FIFO, two to bring the first
// character out of memory through the FIFO, and the engine's N + 1 (or N + 2).
// Fed from the pins with no gaps, starting in the clock after start, it takes
// one clock less (no memory read).  done drops while a new search starts.
//
// The memory and external text sources, and the one-character-per-clock
// engine, follow the document; port names, the FIFO and the mode pin are this
// design's choices.  text_len must not exceed 2**TEXT_AW in memory mode.
module string_lookup_top
  import bm_pkg::*;
#(
  parameter int unsigned PAT_MAX    = PAT_MAX_DEF,
  parameter int unsigned TEXT_AW    = TEXT_AW_DEF,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // pattern load
  input  logic                         pat_clear,
  input  logic                         pat_wr,
  input  char_t                        pat_char,
  output logic [$clog2(PAT_MAX+1)-1:0] pat_len,
  // text memory download
  input  logic                         tm_we,
  input  logic [TEXT_AW-1:0]           tm_addr,
  input  char_t                        tm_wdata,
  // external text pins
  input  logic                         ext_mode,
  input  logic                         ext_valid,
  input  char_t                        ext_char,
  output logic                         ext_ready,
  // search control
  input  logic                         start,
  input  pos_t                         text_len,
  output logic                         busy,
  output logic                         done,
  // results
  output logic                         match_valid,
  output pos_t                         match_pos,
  output pos_t                         match_count,
  output pos_t                         align_count
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic              rd_en;
  logic [TEXT_AW-1:0] rd_addr;
  char_t             rd_data;
  logic              feed_push, feed_busy;
  char_t             feed_char;
  logic              f_in_valid, f_in_ready;
  char_t             f_in_char;
  logic              f_out_valid, f_out_ready;
  char_t             f_out_char;
  logic [CW-1:0]     f_count;
  logic              core_start;
  logic              core_busy;
  logic              core_done;

  // A search starts in the clock after the start pulse, once the FIFO has
  // been flushed.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_start <= 1'b0;
    else        core_start <= start;
  end

  text_memory #(.AW(TEXT_AW)) u_mem (
    .clk, .we(tm_we), .wr_addr(tm_addr), .wr_data(tm_wdata),
    .rd_en, .rd_addr, .rd_data
  );

  text_feeder #(.AW(TEXT_AW), .DEPTH(FIFO_DEPTH)) u_feeder (
    .clk, .rst_n, .start(start && !ext_mode), .text_len,
    .rd_en, .rd_addr, .rd_data,
    .fifo_count(f_count), .push(feed_push), .push_char(feed_char),
    .busy(feed_busy)
  );

  // text source select: memory feeder or external pins
  always_comb begin
    if (ext_mode) begin
      f_in_valid = ext_valid;
      f_in_char  = ext_char;
    end else begin
      f_in_valid = feed_push;
      f_in_char  = feed_char;
    end
  end
  assign ext_ready = ext_mode && f_in_ready && !start;

  text_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .flush(start),
    .in_valid(f_in_valid && !start), .in_char(f_in_char), .in_ready(f_in_ready),
    .out_valid(f_out_valid), .out_char(f_out_char), .out_ready(f_out_ready),
    .count(f_count)
  );

  bm_core #(.PAT_MAX(PAT_MAX)) u_core (
    .clk, .rst_n,
    .pat_clear, .pat_wr, .pat_char, .pat_len,
    .start(core_start), .text_len, .busy(core_busy), .done(core_done),
    .txt_valid(f_out_valid), .txt_char(f_out_char), .txt_ready(f_out_ready),
    .match_valid, .match_pos, .match_count, .align_count
  );

  assign busy = core_busy || core_start || start;
  assign done = core_done && !core_start && !start;

  // feeder progress is visible through the FIFO; its busy flag is kept for
  // the assertion below
  a_feed_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !ext_mode) |-> (text_len <= pos_t'(2**TEXT_AW)));
  a_feed_idle_in_ext: assert property (@(posedge clk) disable iff (!rst_n)
    ext_mode |-> !(feed_busy && feed_push));
endmodule
