// bcc_fsk_demod: FSK demodulator.
//
// The receiver runs its own DDS1 (1 MHz) and DDS2 (500 kHz), identical to
// the transmitter's and started by the same reset, so their samples line up
// with the received ones. Each received sample is matched against both
// local samples; as in the source design, a match with DDS1 means 1 and a
// match with DDS2 means 0. Because the channel noise only sets low bits, a
// match compares the top MATCH_BITS bits of the samples, and the decision
// for a symbol of SPB samples is a vote: `s_in` = 1 when more samples
// matched DDS1 than DDS2; a tie gives 0. The compared bit count and the
// vote are this design's choices. FCW1 is not exactly 2 * FCW2, so the two
// tones drift slowly against each other; at rare relative phases their top
// bits agree for a whole symbol, and that symbol may be decided wrongly
// (about 1 in 10^5 at SPB = 20, about 1.5 % at SPB = 6). The Viterbi
// decoder corrects these.
//
// Timing: while `en` is high, symbols start at the first enabled cycle and
// last SPB cycles; `s_valid` pulses with `s_in` the cycle after a symbol's
// last sample. Dropping `en` restarts the symbol count.
module bcc_fsk_demod
  import bcc_pkg::*;
#(
  parameter int unsigned SPB        = 20,
  parameter int unsigned MATCH_BITS = 4,
  parameter int unsigned ACC_W      = 20,
  parameter int unsigned FCW1       = 10485,
  parameter int unsigned FCW2       = 5243
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t rx_in,
  output logic    s_in,
  output logic    s_valid
);
  localparam int unsigned CNT_W = $clog2(SPB + 1);

  sample_t dds1, dds2;
  bcc_dds #(.ACC_W(ACC_W), .OUT_W(SAMPLE_W)) u_dds1 (
    .clk, .rst_n, .fcw(ACC_W'(FCW1)), .sample(dds1)
  );
  bcc_dds #(.ACC_W(ACC_W), .OUT_W(SAMPLE_W)) u_dds2 (
    .clk, .rst_n, .fcw(ACC_W'(FCW2)), .sample(dds2)
  );

  logic             hit1, hit2;
  logic [CNT_W-1:0] pos, m1, m2, m1_n, m2_n;

  assign hit1 = (rx_in[SAMPLE_W-1 -: MATCH_BITS] == dds1[SAMPLE_W-1 -: MATCH_BITS]);
  assign hit2 = (rx_in[SAMPLE_W-1 -: MATCH_BITS] == dds2[SAMPLE_W-1 -: MATCH_BITS]);
  assign m1_n = m1 + CNT_W'(hit1);
  assign m2_n = m2 + CNT_W'(hit2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos     <= '0;
      m1      <= '0;
      m2      <= '0;
      s_in    <= 1'b0;
      s_valid <= 1'b0;
    end else begin
      s_valid <= 1'b0;
      if (!en) begin
        pos <= '0;
        m1  <= '0;
        m2  <= '0;
      end else if (pos == CNT_W'(SPB-1)) begin
        pos     <= '0;
        m1      <= '0;
        m2      <= '0;
        s_in    <= (m1_n > m2_n);
        s_valid <= 1'b1;
      end else begin
        pos <= pos + 1'b1;
        m1  <= m1_n;
        m2  <= m2_n;
      end
    end
  end
endmodule
