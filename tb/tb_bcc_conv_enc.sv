// tb_bcc_conv_enc: random input bits through the (3,1,4) encoder, compared
// with a reference written from the generator vectors G0=[0101],
// G1=[1011], G2=[1111] over F3..F0 (F3 newest), including `clear`.
module tb_bcc_conv_enc;
  import bcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  codeword_t code;
  ce_state_t state;
  int checks = 0, failures = 0;

  bcc_conv_enc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] ref_f;   // ref_f[3] newest
  logic [2:0] exp_c;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_f = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      din   = 1'($urandom);
      en    = ($urandom % 4) != 0;
      clear = (i % 97) == 50;
      #1;
      exp_c[0] = din ^ ref_f[2] ^ ref_f[0];                 // 0101
      exp_c[1] = din ^ ref_f[3] ^ ref_f[1] ^ ref_f[0];               // 1011
      exp_c[2] = din ^ ref_f[3] ^ ref_f[2] ^ ref_f[1] ^ ref_f[0];    // 1111
      checks++;
      if (code !== exp_c || state !== ref_f) begin
        failures++;
        if (failures < 10) $display("step %0d: code %b exp %b state %b exp %b", i, code, exp_c, state, ref_f);
      end
      @(posedge clk);
      if (clear)   ref_f = '0;
      else if (en) ref_f = {din, ref_f[3:1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
