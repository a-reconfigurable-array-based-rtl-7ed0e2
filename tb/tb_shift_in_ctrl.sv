// tb_shift_in_ctrl: runs the shift-in control against a stand-in coder that
// answers every eval one clock later with a random jump of 1..M, and a text
// stream whose valid is random (or always high).  It checks that exactly M,
// then exactly J characters are taken between comparisons (one of them may go
// in during the comparison clock itself), that eval comes only when nothing is
// owed, that the search ends only when the text is used up, and, with a stream
// that never stalls, that a search takes N + 1 clocks, N + 2 when the last
// comparison is made with the whole text taken.
module tb_shift_in_ctrl;
  import bm_pkg::*;
  localparam int unsigned PM = 8;
  localparam int unsigned JW = $clog2(PM + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [JW-1:0] pat_len = '0;
  pos_t text_len = '0;
  logic jump_valid = 0;
  logic [JW-1:0] jump = '0;
  logic in_valid = 0, in_ready;
  logic win_clear, shift_en, eval, busy, done;
  pos_t consumed;
  int checks = 0, failures = 0;
  int stalls = 0;

  shift_in_ctrl #(.PAT_MAX(PM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stand-in coder
  logic [JW-1:0] next_jump;
  always_ff @(posedge clk) begin
    jump_valid <= eval;
    jump       <= next_jump;
  end

  task automatic run(input int m, input int n, input bit stall);
    int owed, taken, evals, cyc;
    bit prepaid, finished, exact_end;
    @(negedge clk);
    pat_len = JW'(m); text_len = pos_t'(n); start = 1;
    @(negedge clk);
    start = 0;
    owed = m; taken = 0; evals = 0; cyc = 0; finished = 0;
    prepaid = 0; exact_end = 0;
    while (!finished) begin
      in_valid  = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      next_jump = JW'($urandom_range(1, m));
      #1;
      check(consumed == pos_t'(taken), "consumed count");
      // a jump arrives: the character shifted at its eval is already paid
      if (jump_valid) begin
        owed = int'(jump) - (prepaid ? 1 : 0);
        prepaid = 0;
      end
      if (stall && !in_valid && in_ready) stalls++;
      if (eval) begin
        check(owed == 0, "eval only when nothing is owed");
        evals++;
        exact_end = (taken == n);
        if (shift_en) begin prepaid = 1; taken++; end
      end else if (shift_en) begin
        check(owed > 0, "no shift beyond what is owed");
        owed--; taken++;
      end
      @(posedge clk); #1;
      cyc++;
      if (done) begin
        finished = 1;
        check(taken == n, $sformatf("all text taken (%0d of %0d)", taken, n));
        check(owed > 0 || prepaid == 0, "ends only with characters owed");
        if (!stall)
          check(cyc == n + 1 + (exact_end ? 1 : 0),
                $sformatf("cycles %0d exp %0d", cyc, n + 1 + (exact_end ? 1 : 0)));
      end
      if (cyc > 10 * n + 100) begin
        check(0, "search did not end"); finished = 1;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      automatic int m = $urandom_range(1, PM);
      run(m, $urandom_range(0, 200), t % 2 == 1);
    end
    // pattern length 0 ends at once
    @(negedge clk); pat_len = '0; text_len = 10; start = 1;
    @(negedge clk); start = 0; #1;
    check(done && !busy, "M = 0 ends at once");
    check(stalls > 0, "stream stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
