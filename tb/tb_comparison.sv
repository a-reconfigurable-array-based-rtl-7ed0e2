// tb_comparison: drives random windows against random patterns (often
// planted so that the whole pattern or its last character matches) and checks
// last_match, full_match and occ one clock after eval, and that res_valid
// follows eval with exactly one clock of latency.
module tb_comparison;
  import bm_pkg::*;
  localparam int unsigned PM = 8;
  logic clk = 0, rst_n = 0, eval = 0;
  char_t win [PM];
  char_t pat_rev [PM];
  logic [$clog2(PM+1)-1:0] pat_len = '0;
  logic res_valid, last_match, full_match;
  logic [PM-1:0] occ;
  int checks = 0, failures = 0;
  int n_full = 0, n_last_only = 0;

  comparison #(.PAT_MAX(PM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (win[k]) begin win[k] = '0; pat_rev[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      automatic int m = $urandom_range(1, PM);
      automatic int mode = $urandom_range(0, 2);
      bit e_full, e_last;
      logic [PM-1:0] e_occ;
      @(negedge clk);
      pat_len = ($clog2(PM+1))'(m);
      foreach (pat_rev[k]) pat_rev[k] = 8'($urandom_range(65, 68));
      foreach (win[k])     win[k]     = 8'($urandom_range(65, 68));
      if (mode == 0) for (int k = 0; k < m; k++) win[k] = pat_rev[k];
      if (mode == 1) win[0] = pat_rev[0];
      e_full = 1;
      for (int k = 0; k < m; k++) if (win[k] != pat_rev[k]) e_full = 0;
      e_last = (win[0] == pat_rev[0]);
      e_occ = '0;
      for (int k = 1; k < m; k++) e_occ[k] = (win[0] == pat_rev[k]);
      eval = 1;
      @(negedge clk);
      eval = 0;
      // scramble the inputs: the result must come from the registered phase
      foreach (win[k]) win[k] = 8'($urandom);
      check(res_valid == 1, "res_valid one clock after eval");
      check(full_match == e_full, $sformatf("full_match t=%0d", t));
      check(last_match == e_last, $sformatf("last_match t=%0d", t));
      check(occ == e_occ, $sformatf("occ t=%0d got %b exp %b", t, occ, e_occ));
      if (e_full) n_full++;
      if (e_last && !e_full) n_last_only++;
      @(negedge clk);
      check(res_valid == 0, "res_valid is a single pulse");
    end
    check(n_full > 0 && n_last_only > 0, "both match cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
