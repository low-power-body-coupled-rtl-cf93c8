// tb_bcc_fsk_mod: holds the select line at 1, then at 0, for 20,000 cycles
// each and counts rising zero crossings of the modulator output (1 MHz ->
// 200, 500 kHz -> 100 at a 100 MHz clock); then toggles the select line at
// random and checks that the output always equals the selected tone.
module tb_bcc_fsk_mod;
  import bcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, s_out = 1'b1;
  sample_t fsk_out, dds1_out, dds2_out;
  int checks = 0, failures = 0;

  bcc_fsk_mod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_tone(input logic sel, input int exp_cross);
    int ncross = 0;
    sample_t prev;
    @(negedge clk) s_out = sel;
    prev = fsk_out;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (prev < 0 && fsk_out >= 0) ncross++;
      prev = fsk_out;
    end
    checks++;
    if (ncross < exp_cross - 1 || ncross > exp_cross + 1) begin
      failures++;
      $display("select %b: %0d crossings, expected %0d", sel, ncross, exp_cross);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    count_tone(1'b1, 200);
    count_tone(1'b0, 100);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if ($urandom % 20 == 0) s_out = ~s_out;
      #1;
      checks++;
      if (fsk_out !== (s_out ? dds1_out : dds2_out)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
