// tb_bcc_p2s: loads random codewords and checks that they leave bit 0
// first, one bit per shift strobe with idle cycles between, and that `last`
// marks the third bit.
module tb_bcc_p2s;
  import bcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, s_out, last;
  codeword_t p_in = '0;
  int checks = 0, failures = 0;

  bcc_p2s dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 100; w++) begin
      codeword_t c;
      c = 3'($urandom);
      @(negedge clk) begin load = 1'b1; p_in = c; end
      @(negedge clk) load = 1'b0;
      for (int b = 0; b < 3; b++) begin
        repeat ($urandom % 3) begin
          checks++;
          if (s_out !== c[b]) failures++;
          @(negedge clk);
        end
        checks++;
        if (s_out !== c[b] || last !== (b == 2)) begin
          failures++;
          $display("word %0d bit %0d: s_out %b exp %b last %b", w, b, s_out, c[b], last);
        end
        if (b < 2) begin
          shift = 1'b1;
          @(negedge clk) shift = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
