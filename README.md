# Boyer-Moore string lookup engine

This design finds every occurrence of a short string, the *pattern* (up to 16
characters), in a long *text* (up to 64 Ki characters in on-chip memory, or
any length streamed in over pins). It reports where each occurrence starts and
how many there are. It is a hardware version of the Boyer-Moore search in its
bad-character form. The pattern is laid over the text and compared from its
last character. When the text does not match, the pattern jumps ahead by as
much as the mismatching text character allows, often the full pattern length.

The hardware does two things a program cannot:

* **All comparisons of one alignment happen in one clock.** For every pattern
  position there is a comparator against the text, and another against the
  text character under the last pattern position.
* **The text moves through at one character per clock.** This holds whatever
  the jumps are. At 100 MHz with 8-bit characters that is 800 Mbit/s.

A search of N characters takes N + 1 clocks after the first character
arrives, or N + 2 when the last alignment ends exactly on the last character.

## How a search proceeds

Take the pattern `conf` (M = 4) and the text `reconfigurable` (N = 14):

| step | text under the pattern | last-position text char | decision | jump |
|------|------------------------|-------------------------|----------|------|
| 1 | `reco` | `o` | no match; `o` is pattern char 1, two places before the last | 2 |
| 2 | `conf` | `f` | full match at position 2 | 4 (M) |
| 3 | `igur` | `r` | `r` is not in the pattern | 4 |
| 4 | `able` | `e` | `e` is not in the pattern | 4 |

After step 4 fewer than M characters are left, so the search ends. That is
four alignments for 14 characters.

The jump rule, worked out by the **coder**, is:

* **Full match:** report it and jump M. The search therefore finds
  non-overlapping occurrences, the same ones a left-to-right scan that skips
  past each hit would find. In `aaaa`, `aa` is found at 0 and 2, not at 1.
* **Otherwise:** let `c` be the text character under the last pattern
  position. Jump by the smallest k ≥ 1 for which pattern character M-1-k
  equals `c`. This lines up the nearest earlier copy of `c` in the pattern. If
  there is no such k, jump M.

This rule applies whether the last character matched or not. It never jumps
over an occurrence.

## Blocks

```
            tm_* (download)                     ext_* pins
                  |                                  |
            +-------------+   +-------------+        |
            | text_memory |-->| text_feeder |--+     |
            +-------------+   +-------------+  |     |
                                             ext_mode mux
                                                 |
                                           +-----------+
                                           | text_fifo |
                                           +-----------+
                                                 | valid/ready, 1 char
  +--------------------------------- bm_core ---------------------------------+
  |  pattern_reg ----+                                                        |
  |                  v                                                        |
  |  text_window -> comparison --(1 clock)--> coder --jump--> shift_in_ctrl   |
  |       ^                                                       |           |
  |       +------------------------ shift_en ---------------------+           |
  +---------------------------------------------------------------------------+
```

| module | role |
|---|---|
| `bm_pkg` | character type (8-bit), default sizes |
| `pattern_reg` | pattern register. It is loaded one character per clock, and slot k holds pattern character M-1-k, so slot 0 is always the last pattern character. |
| `text_window` | shift register of the last 16 text characters. Slot 0 is the newest character, the one under the last pattern position. |
| `comparison` | all comparators. Phase 1 compares and registers; phase 2 reduces the registered bits to `last_match` and `full_match` and passes on the occurrence vector `occ`. |
| `coder` | priority encoder turning `full_match` / `occ` into the jump, and the match flag |
| `shift_in_ctrl` | down-counter and state machine. It decides when to shift, when to compare and when the text is used up. |
| `bm_core` | the five above, plus match position, match count and alignment count |
| `text_memory` | 64 Ki x 8 simple dual-port RAM with synchronous read |
| `text_fifo` | 4-entry character FIFO in front of the engine |
| `text_feeder` | reads the text memory in address order into the FIFO, without overrunning it |
| `string_lookup_top` | everything above, with the memory / pin source switch |

Because the pattern and window are stored reversed, slot k of one always
faces slot k of the other. The comparators need no index arithmetic on M.
Lanes k ≥ M are masked out.

## Timing of the engine loop

Getting one character per clock needs care. The comparison has one clock of
latency, so the jump is only known in the clock after the compare. Paying that
clock on every alignment would cost N + D clocks for D alignments. With short
patterns on ordinary text, D is N/5 to N/3.

Every jump is at least 1. So in the comparison clock (`eval` high) the shift-in
control already shifts in one character, before it knows the jump. The window
register keeps the compared contents until the clock edge, so the comparison
still sees the old window. In the next clock the coder's jump J arrives, and
the counter is loaded with J - 1. When J = 1 nothing more is owed, and that
same clock is the next comparison. Comparisons then happen in back-to-back
clocks, each one shifting the window by one character.

```
clock      :  e    w/s   s     s     e    w=e   w/s ...
             cmp  J=4   fill  fill  cmp  J=1   J=..
characters :  1    1     1     1     1    1     1
```

Here `e` is a comparison clock, `w` is the clock the jump arrives and `s` is a
shift clock. A stalled FIFO only delays shifting; the counter waits. The
search ends when characters are still owed and all `text_len` characters have
been taken. By then the last complete alignment has been compared and
reported.

Measured at full rate:

* **Engine (`bm_core`):** from the clock after `start` to `done` takes N + 1
  clocks, or N + 2 if the last alignment ends on character N-1.
* **Whole top from text memory:** from the clock with `start` high to the
  first clock with `done` high takes 3 more: N + 4 or N + 5. One clock flushes
  the FIFO, one reads the memory and one writes the FIFO.
* **Whole top from the pins, no gaps:** N + 3 or N + 4, because there is no
  memory read.

Match results come one clock after the coder decides. `match_valid` is high
for one clock, and `match_pos` holds the 0-based start of the occurrence.

## Using the top

1. **Load the pattern.** Pulse `pat_clear`, then hold `pat_wr` high for one
   clock per character, first character first. `pat_len` shows M. Loading
   more than 16 characters keeps the last 16.
2. **Load the text**, either:
   * write it with `tm_we` / `tm_addr` / `tm_wdata` and keep `ext_mode` low, or
   * set `ext_mode` high and stream the characters on `ext_valid` /
     `ext_char`, honouring `ext_ready`. Only characters sent after the start
     pulse count, because `start` flushes the FIFO.
3. **Run the search.** Set `text_len` to N and pulse `start` for one clock.
   `busy` stays high until `done`. Read `match_valid` / `match_pos` as
   matches come, and `match_count` and `align_count` at the end.

The pattern must not change while `busy` is high; an assertion checks this.
In memory mode `text_len` must not exceed 2^16; this is also asserted.

Reset is asynchronous and active low. The text memory is not reset: only
written locations should be searched.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `PAT_MAX` | 16 | longest pattern; sets the number of comparators |
| `TEXT_AW` | 16 | text memory address width (65,536 characters) |
| `FIFO_DEPTH` | 4 | text FIFO entries |
| `CHAR_W` (package) | 8 | ASCII characters |

The test texts this engine was sized for have 32,681 and 65,387 characters,
and their patterns are 5 to 10 characters long. Both fit the defaults. The
comparator array grows linearly with `PAT_MAX`. The coder's priority encoder
and the AND of the match bits are the longest logic paths, and they grow with
it too.

## Where this design makes its own choices

These points are not fixed by the algorithm's hardware description. They were
chosen here:

* **Full match.** The jump after a full match is M, as in the reference
  description of the method. Overlapping occurrences are therefore not
  reported.
* **Last character matches, earlier one does not.** This case uses the same
  occurrence rule as a mismatch. A jump of 1 would also be correct, but
  slower.
* **Early shift.** The character shifted in during the comparison clock is
  how one-clock-per-character and a one-clock comparison pipeline are made to
  hold together.
* **Interfaces.** The serial pattern load, the valid/ready text stream, the
  FIFO depth, the feeder, the `ext_mode` pin and the result counters are all
  this design's. The original prototype built the memory-fed and pin-fed
  variants as separate designs.
* **Reported timings.** The prototype's reported times for the two test texts
  at 100 MHz are about 1.3 to 1.4 clocks per character. They also get shorter
  for longer patterns, which points to a cost per alignment. This design
  follows the stated goal of at most one clock per character instead. On
  texts of the same length it needs 0.327 ms and 0.654 ms at 100 MHz,
  whatever the pattern. Those reported times also include whatever the test
  setup added around the search.
* **What is left out.** Clock frequency, FPGA placement and the download
  link from a host are outside the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_full_size \
    rtl/bm_pkg.sv tb/bm_ref_pkg.sv tb/tb_full_size.sv -o sim
./obj_dir/sim
```

Replace `tb_full_size` with any other testbench. Other modules are found
through `-I`.

| testbench | what it checks |
|---|---|
| `tb_pattern_reg`, `tb_text_window`, `tb_text_fifo`, `tb_text_memory`, `tb_text_feeder` | each storage block against a software model |
| `tb_comparison`, `tb_coder` | comparator outputs and jump rule on random and planted patterns |
| `tb_shift_in_ctrl` | sequencing against a stand-in coder with random jumps and stream stalls; exact clock count |
| `tb_bm_core` | 300 random searches plus the `conf`/`reconfigurable` example, against the reference model in `bm_ref_pkg` and a plain scan; clock count |
| `tb_string_lookup_top` | end-to-end, memory and pin sources, pattern reloads. It counts and requires each mechanism: full match, last-character-only match, occurrence jump, jump of M, FIFO underrun, end of text, early shift, back-to-back compares. |
| `tb_full_size` | default sizes; two generated texts of 32,681 and 65,387 characters with twelve patterns of 5 to 10 characters planted at fixed counts; prints the clock count and time at 100 MHz |

The reference model (`tb/bm_ref_pkg.sv`) is plain sequential code. It applies
the jump rule above to the whole text and returns the match positions, the
number of alignments and where the last alignment ended. From that, the
expected clock count is N + 1, plus 1 if the last alignment ends at N.
