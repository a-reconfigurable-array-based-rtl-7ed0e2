// tb_text_fifo: random pushes and pops against a queue model; checks the
// order of the data, the full and empty flags, the count and flush.
module tb_text_fifo;
  import bm_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  char_t in_char = '0, out_char;
  logic [$clog2(D+1)-1:0] count;
  byte unsigned q[$];
  int checks = 0, failures = 0, fulls = 0;

  text_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      @(negedge clk);
      flush     = ($urandom_range(0, 499) == 0);
      in_valid  = $urandom_range(0, 1);
      in_char   = 8'($urandom);
      out_ready = $urandom_range(0, 2) == 0 ? 1'b0 : 1'b1;
      if (t % 1000 > 800) out_ready = 0;   // let it fill
      #1;
      check(int'(count) == q.size(), "count");
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) check(out_char == q[0], "order");
      if (q.size() == D) fulls++;
      begin
        automatic bit pop = out_valid && out_ready, push = in_valid && in_ready;
        @(posedge clk);
        if (flush) q = {};
        else begin
          if (pop) void'(q.pop_front());
          if (push) q.push_back(in_char);
        end
      end
    end
    check(fulls > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
