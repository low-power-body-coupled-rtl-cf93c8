// tb_bcc_tr: end-to-end test of the transceiver at its default parameters
// (SPB = 20 samples per channel bit, 20 data bits per frame). Sends eight
// frames of random data back to back through transmitter, channel and
// receiver and checks that every frame's data comes out of the decoder in
// order, that the receiver finds every header, and the per-frame timing:
// (40 + 72) * 20 cycles of transmission and the first decoded bit
// STEPS + 4 cycles after `tx_done`. It also counts how often each mechanism
// of the design acted and fails if one never did: header sent and found,
// TX MUX and RX DEMUX switches, both FSK tones sent and detected, channel
// noise, tail bits, Viterbi traceback, output shift register.
module tb_bcc_tr;
  import bcc_pkg::*;
  localparam int SPB    = 20;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;
  localparam int FRAME  = (40 + 3 * STEPS) * SPB;
  localparam int NFR    = 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, din = 1'b0;
  logic din_ready, tx_busy, tx_done, tx_sel, rx_sel, frame_sync, dout, dout_valid;
  sample_t tx_out, rx_in;
  logic [39:0] hdr_bits;
  int checks = 0, failures = 0, cyc = 0;

  bcc_tr dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_start = 0, n_sync = 0, n_txsel = 0, n_rxsel = 0, n_tone1 = 0, n_tone0 = 0;
  int n_noise = 0, n_tail = 0, n_trace = 0, n_out = 0, n_hdr_ok = 0;
  logic txs_d = 0, rxs_d = 0, tb_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (start && !tx_busy) n_start++;
    if (frame_sync) n_sync++;
    if (frame_sync && hdr_bits == 40'hC5_5555_CCA5) n_hdr_ok++;
    if (tx_sel && !txs_d) n_txsel++;
    if (rx_sel && !rxs_d) n_rxsel++;
    if (dut.u_rx.s_valid) begin
      if (dut.u_rx.s_in) n_tone1++; else n_tone0++;
    end
    if (rx_in != tx_out) n_noise++;
    if (dut.u_tx.take && !din_ready) n_tail++;
    if (dut.u_rx.u_vd.tb_busy && !tb_d) n_trace++;
    if (dout_valid) n_out++;
    txs_d <= tx_sel; rxs_d <= rx_sel; tb_d <= dut.u_rx.u_vd.tb_busy;
  end

  // expected output stream
  logic exp_q [$];
  int first_out = -1, done_cyc = -1, start_cyc = -1, bad_bits = 0;
  always @(negedge clk) begin
    if (tx_done) done_cyc = cyc;
    if (dout_valid) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output bit");
      end else if (exp_q.pop_front() !== dout) begin
        failures++;
        bad_bits++;
      end
    end
  end

  initial begin
    repeat (NFR * (FRAME + 200) + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (40) @(negedge clk);
    for (int fr = 0; fr < NFR; fr++) begin
      logic [N_DATA-1:0] d;
      int k;
      d = N_DATA'($urandom);
      if (fr == 0) d = '1;          // all ones
      if (fr == 1) d = '0;          // all zeros
      for (int i = 0; i < N_DATA; i++) exp_q.push_back(d[i]);
      start = 1'b1;
      start_cyc = cyc;
      @(negedge clk) start = 1'b0;
      k = 0;
      while (!tx_done) begin
        din = d[k % N_DATA];
        #1;
        if (din_ready) k++;
        @(negedge clk);
      end
      done_cyc = cyc;
      checks++;
      if (done_cyc - start_cyc != FRAME + 1 || k != N_DATA) begin
        failures++;
        $display("frame %0d: %0d cycles, %0d data bits taken", fr, done_cyc - start_cyc, k);
      end
      first_out = -1;
      repeat (STEPS + N_DATA + 10) @(negedge clk);
      checks++;
      if (first_out != done_cyc + STEPS + 4) begin
        failures++;
        $display("frame %0d: first decoded bit %0d cycles after done", fr, first_out - done_cyc);
      end
      // back-to-back: next start right away (no idle gap) for odd frames
      if (fr % 2 == 0) repeat ($urandom % 30) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bits never came out", exp_q.size()); end
    $display("frames %0d, headers found %0d (correct %0d), TX MUX switches %0d, RX DEMUX switches %0d",
             n_start, n_sync, n_hdr_ok, n_txsel, n_rxsel);
    $display("tone-1 symbols %0d, tone-0 symbols %0d, noisy samples %0d, tail bits %0d, tracebacks %0d, output bits %0d",
             n_tone1, n_tone0, n_noise, n_tail, n_trace, n_out);
    checks++; if (n_start != NFR || n_sync != NFR || n_hdr_ok != NFR) failures++;
    checks++; if (n_txsel != NFR || n_rxsel != NFR) failures++;
    checks++; if (n_tone1 == 0 || n_tone0 == 0) failures++;
    checks++; if (n_noise == 0) failures++;
    checks++; if (n_tail != 4 * NFR) failures++;
    checks++; if (n_trace != NFR || n_out != NFR * N_DATA) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
