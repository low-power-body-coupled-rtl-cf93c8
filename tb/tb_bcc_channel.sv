// tb_bcc_channel: compares the channel with a reference 10-bit LFSR
// (x^10 + x^7 + 1, seed 1): noise = LFSR / 4 (8 bits), rx_in = tx_out | noise.
// Also checks that the noise sequence repeats after 1023 cycles.
module tb_bcc_channel;
  import bcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t tx_out = '0, rx_in;
  logic [7:0] noise;
  int checks = 0, failures = 0;

  bcc_channel dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] lf;
  logic [7:0] first [4];

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    lf = 10'd1;
    for (int t = 0; t < 2100; t++) begin
      tx_out = sample_t'($urandom);
      #1;
      checks++;
      if (noise !== lf[9:2] || rx_in !== (tx_out | {4'b0, lf[9:2]})) begin
        failures++;
        if (failures < 10) $display("t=%0d noise %h exp %h rx %h", t, noise, lf[9:2], rx_in);
      end
      if (t < 4) first[t] = noise;
      if (t >= 1023 && t < 1027) begin
        checks++;
        if (noise !== first[t - 1023]) failures++;
      end
      @(negedge clk);
      lf = {lf[8:0], lf[9] ^ lf[6]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
