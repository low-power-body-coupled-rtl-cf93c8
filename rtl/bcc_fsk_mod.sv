// bcc_fsk_mod: binary FSK modulator.
//
// Two DDS instances run continuously: DDS1 with FCW1 = 10485 (1 MHz at a
// 100 MHz clock) and DDS2 with FCW2 = 5243 (500 kHz). The control logic is a
// MUX with the serial bit `s_out` as select line: 1 sends the DDS1 sample,
// 0 the DDS2 sample (source design). Both oscillators keep running across
// symbols, so the output is phase-continuous within each tone. `fsk_out` is
// combinational from the registered DDS samples and the select line.
module bcc_fsk_mod
  import bcc_pkg::*;
#(
  parameter int unsigned ACC_W = 20,
  parameter int unsigned FCW1  = 10485,
  parameter int unsigned FCW2  = 5243
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    s_out,
  output sample_t fsk_out,
  output sample_t dds1_out,
  output sample_t dds2_out
);
  bcc_dds #(.ACC_W(ACC_W), .OUT_W(SAMPLE_W)) u_dds1 (
    .clk, .rst_n, .fcw(ACC_W'(FCW1)), .sample(dds1_out)
  );
  bcc_dds #(.ACC_W(ACC_W), .OUT_W(SAMPLE_W)) u_dds2 (
    .clk, .rst_n, .fcw(ACC_W'(FCW2)), .sample(dds2_out)
  );

  assign fsk_out = s_out ? dds1_out : dds2_out;
endmodule
