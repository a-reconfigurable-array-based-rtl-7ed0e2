// tb_text_memory: writes random characters to random addresses of a small
// text_memory, mirrors them in an array, and reads them back, checking the
// data one clock after rd_en and that it holds while rd_en is low.
module tb_text_memory;
  import bm_pkg::*;
  localparam int unsigned AW = 8;
  logic clk = 0, we = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  char_t wr_data = '0, rd_data;
  byte unsigned model [2**AW];
  int checks = 0, failures = 0;

  text_memory #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every location once so that every read is defined
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    for (int t = 0; t < 5000; t++) begin
      byte unsigned exp;
      @(negedge clk);
      we = $urandom_range(0, 1);
      wr_addr = AW'($urandom); wr_data = 8'($urandom);
      rd_en = 1; rd_addr = AW'($urandom);
      exp = model[rd_addr];  // read-before-write on a same-address collision
      if (we) model[wr_addr] = wr_data;
      @(negedge clk);
      we = 0; rd_en = 0;
      checks++;
      if (rd_data != exp) begin
        failures++;
        $display("FAIL addr %0d got %02x exp %02x", rd_addr, rd_data, exp);
      end
      @(negedge clk);
      checks++;
      if (rd_data != exp) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
