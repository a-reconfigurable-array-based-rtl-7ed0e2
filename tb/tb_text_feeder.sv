// tb_text_feeder: connects text_feeder to a behavioural memory (one clock
// read latency) and a software FIFO drained at a random rate.  Checks that
// the characters arrive in address order, that exactly text_len of them come,
// that the FIFO never overflows, and that with a full-rate consumer the
// feeder delivers one character per clock.
module tb_text_feeder;
  import bm_pkg::*;
  localparam int unsigned AW = 10;
  localparam int unsigned D  = 4;
  logic clk = 0, rst_n = 0, start = 0;
  pos_t text_len = '0;
  logic rd_en, push, busy;
  logic [AW-1:0] rd_addr;
  char_t rd_data = '0, push_char;
  logic [$clog2(D+1)-1:0] fifo_count;
  byte unsigned mem [2**AW];
  byte unsigned q[$];
  int checks = 0, failures = 0;

  text_feeder #(.AW(AW), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];
  assign fifo_count = ($clog2(D+1))'(q.size());

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

  initial begin
    foreach (mem[a]) mem[a] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(0, 2**AW);
      automatic bit full_rate = (t % 2 == 0);
      automatic int got = 0, cyc = 0, popped = 0;
      q = {};
      @(negedge clk); text_len = pos_t'(n); start = 1;
      @(negedge clk); start = 0;
      #1;
      while (busy || q.size() > 0) begin
        automatic bit pop = (q.size() > 0) && (full_rate || $urandom_range(0, 2) == 0);
        automatic bit psh = push;
        automatic byte unsigned pc = push_char;
        if (pop) check(q[0] == mem[popped], "address order");
        @(posedge clk);
        #1;
        cyc++;
        if (pop) begin void'(q.pop_front()); popped++; end
        if (psh) begin
          q.push_back(pc); got++;
          check(q.size() <= D, "no overflow");
        end
        @(negedge clk);
        if (cyc > 20 * n + 100) break;
      end
      check(got == n && popped == n, $sformatf("count %0d exp %0d", got, n));
      if (full_rate && n > 0)
        check(cyc <= n + 3, $sformatf("rate: %0d clocks for %0d", cyc, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
