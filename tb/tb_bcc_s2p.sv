// tb_bcc_s2p: feeds random serial bits with random gaps and checks that
// every third bit yields one p_valid pulse with {b2,b1,b0}, first bit in
// bit 0, and that `clear` restarts the grouping.
module tb_bcc_s2p;
  import bcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0, s_in = 1'b0, p_valid;
  codeword_t p_out;
  int checks = 0, failures = 0, n = 0, words = 0;
  codeword_t acc;

  bcc_s2p dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
      clear    = 1'b0;
      if (i == 301) begin
        clear = 1'b1;
        n = 0;
      end else if ($urandom % 2) begin
        in_valid = 1'b1;
        s_in     = 1'($urandom);
        acc[n]   = s_in;
        n++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      clear    = 1'b0;
      checks++;
      if (n == 3) begin
        words++;
        if (!p_valid || p_out !== acc) begin
          failures++;
          $display("word %0d: valid %b out %b exp %b", words, p_valid, p_out, acc);
        end
        n = 0;
      end else if (p_valid) begin
        failures++;
        $display("unexpected p_valid at %0d", i);
      end
    end
    checks++;
    if (words < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
