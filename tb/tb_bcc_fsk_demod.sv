// tb_bcc_fsk_demod: a modulator (bcc_fsk_mod, reset together with the
// demodulator) sends 300 random bits of SPB = 20 samples; low-bit noise is
// OR-ed in. The demodulator must return every bit, with s_valid exactly one
// cycle after each symbol's last sample and nowhere else.
module tb_bcc_fsk_demod;
  import bcc_pkg::*;
  localparam int SPB = 20;
  localparam int NB  = 300;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, s_out = 1'b0, s_in, s_valid;
  sample_t fsk_out, rx_in;
  logic [7:0] noise = '0;
  int checks = 0, failures = 0;

  bcc_fsk_mod   src (.clk, .rst_n, .s_out, .fsk_out, .dds1_out(), .dds2_out());
  bcc_fsk_demod #(.SPB(SPB)) dut (.clk, .rst_n, .en, .rx_in, .s_in, .s_valid);

  assign rx_in = fsk_out | sample_t'(noise);
  always #5 clk = ~clk;

  initial begin
    repeat (NB * SPB + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_bit;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (137) @(negedge clk);
    prev_bit = 1'b0;
    for (int j = 0; j <= NB; j++) begin
      logic b;
      b = 1'($urandom);
      for (int k = 0; k < SPB; k++) begin
        en    = (j < NB);
        s_out = b;
        noise = 8'($urandom);
        #1;
        checks++;
        if (k == 0 && j > 0) begin
          if (!s_valid || s_in !== prev_bit) begin
            failures++;
            if (failures < 10) $display("symbol %0d: valid %b s_in %b exp %b", j - 1, s_valid, s_in, prev_bit);
          end
        end else if (s_valid) begin
          failures++;
          $display("stray s_valid at symbol %0d sample %0d", j, k);
        end
        @(negedge clk);
        if (j == NB) break;
      end
      prev_bit = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
