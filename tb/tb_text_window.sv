// tb_text_window: shifts random characters into text_window, with random
// gaps and clears, and compares every slot with a software shift register.
module tb_text_window;
  import bm_pkg::*;
  localparam int unsigned PM = 16;
  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0;
  char_t char_in = '0;
  char_t win [PM];
  byte unsigned model [PM];
  int checks = 0, failures = 0;

  text_window #(.PAT_MAX(PM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[k]) model[k] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 199) == 0);
      shift_en = $urandom_range(0, 3) != 0;
      char_in  = 8'($urandom);
      @(posedge clk);
      if (clear) foreach (model[k]) model[k] = 0;
      else if (shift_en) begin
        for (int k = PM - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = char_in;
      end
      #1;
      for (int k = 0; k < int'(PM); k++) begin
        checks++;
        if (win[k] != model[k]) begin
          failures++;
          $display("FAIL t=%0d slot %0d got %02x exp %02x", t, k, win[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
