// tb_pattern_reg: loads random patterns into pattern_reg and checks the
// reversed slot order, the length count, its saturation at PAT_MAX and clear.
module tb_pattern_reg;
  import bm_pkg::*;
  localparam int unsigned PM = 16;
  logic clk = 0, rst_n = 0, pat_clear = 0, pat_wr = 0;
  char_t pat_char = '0;
  char_t pat_rev [PM];
  logic [$clog2(PM+1)-1:0] pat_len;
  int checks = 0, failures = 0;

  pattern_reg #(.PAT_MAX(PM)) dut (.*);
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
    byte unsigned p[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int m = $urandom_range(1, 20);
      @(negedge clk); pat_clear = 1;
      @(negedge clk); pat_clear = 0;
      check(pat_len == 0, "clear empties");
      p = {};
      for (int i = 0; i < m; i++) begin
        p.push_back(8'($urandom));
        pat_char = p[$]; pat_wr = 1;
        @(negedge clk);
      end
      pat_wr = 0;
      begin
        automatic int em = (m > int'(PM)) ? int'(PM) : m;
        check(int'(pat_len) == em, $sformatf("len %0d exp %0d", pat_len, em));
        for (int k = 0; k < em; k++)
          check(pat_rev[k] == p[m-1-k], $sformatf("slot %0d", k));
      end
      // hold: no write, nothing changes
      @(negedge clk);
      check(pat_rev[0] == p[m-1], "holds without write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
