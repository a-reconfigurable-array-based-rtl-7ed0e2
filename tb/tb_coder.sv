// tb_coder: exhaustive-ish random check of the coder's jump rule against a
// reference: M on a full match, else the smallest set occurrence index k >= 1
// below M, else M.
module tb_coder;
  import bm_pkg::*;
  localparam int unsigned PM = 16;
  logic res_valid, full_match;
  logic [PM-1:0] occ;
  logic [$clog2(PM+1)-1:0] pat_len;
  logic jump_valid, match;
  logic [$clog2(PM+1)-1:0] jump;
  int checks = 0, failures = 0;

  coder #(.PAT_MAX(PM)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      automatic int m = $urandom_range(1, PM);
      int ej;
      res_valid  = $urandom_range(0, 1);
      full_match = ($urandom_range(0, 3) == 0);
      occ = '0;
      // occurrences only below M, as the comparison block produces them
      for (int k = 1; k < m; k++) occ[k] = ($urandom_range(0, 4) == 0);
      pat_len = ($clog2(PM+1))'(m);
      #1;
      ej = m;
      if (!full_match) for (int k = 1; k < m; k++) if (occ[k] && ej == m) ej = k;
      checks++;
      if (int'(jump) != ej || jump_valid != res_valid || match != (res_valid && full_match)) begin
        failures++;
        $display("FAIL m=%0d full=%0b occ=%b jump=%0d exp %0d", m, full_match, occ, jump, ej);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
