// tb_bcc_tr_rate: the transceiver at a short symbol, SPB = 6 samples per
// channel bit, i.e. 3 * 6 = 18 cycles per data bit on the payload, about
// the rate the design is meant to reach (5.56 Mbps of payload at 100 MHz).
// With symbols this short the two tones sometimes look alike to the
// demodulator, so raw channel-bit errors appear even on the nominal
// channel. 2000 frames of 20 random bits are sent back to back; the test
// requires every decoded bit to be right, counts the raw errors the Viterbi
// decoder corrected (must be non-zero, so correction really happened), and
// checks the frame period (40 + 72) * SPB + 1 cycles and the payload time
// of 18 cycles per trellis step (data or tail bit).
module tb_bcc_tr_rate;
  import bcc_pkg::*;
  localparam int SPB    = 6;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;
  localparam int FRAME  = (40 + 3 * STEPS) * SPB;
  localparam int NFR    = 2000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, din = 1'b0;
  logic din_ready, tx_busy, tx_done, tx_sel, rx_sel, frame_sync, dout, dout_valid;
  sample_t tx_out, rx_in;
  logic [39:0] hdr_bits;
  int checks = 0, failures = 0, cyc = 0;

  bcc_tr #(.SPB(SPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic cq [$], dq [$];
  int raw_err = 0, raw_n = 0, dec_err = 0, dec_n = 0, syncs = 0, sel_cyc = 0;
  logic t_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tx.take || dut.u_tx.p2s_shift) cq.push_back(1'b0);
  end
  always @(posedge clk) begin
    if (t_d) cq[cq.size() - 1] = dut.u_tx.s_out;
    t_d <= dut.u_tx.take || dut.u_tx.p2s_shift;
  end
  always @(negedge clk) begin
    if (tx_sel) sel_cyc++;
    if (dut.u_rx.s_valid && rx_sel) begin
      raw_n++;
      if (cq.pop_front() !== dut.u_rx.s_in) raw_err++;
    end
    if (dout_valid) begin
      dec_n++;
      if (dq.pop_front() !== dout) dec_err++;
    end
    if (frame_sync) syncs++;
  end

  initial begin
    repeat (NFR * (FRAME + 10) + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (40) @(negedge clk);
    t0 = cyc;
    for (int fr = 0; fr < NFR; fr++) begin
      logic [N_DATA-1:0] d;
      int k;
      d = N_DATA'($urandom);
      for (int i = 0; i < N_DATA; i++) dq.push_back(d[i]);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      k = 0;
      while (!tx_done) begin
        din = d[k % N_DATA];
        #1;
        if (din_ready) k++;
        @(negedge clk);
      end
    end
    t1 = cyc;
    repeat (STEPS + N_DATA + 10) @(negedge clk);
    $display("%0d frames in %0d cycles (%0d per frame), payload %0d cycles per trellis step",
             NFR, t1 - t0, (t1 - t0) / NFR, sel_cyc / (NFR * STEPS));
    $display("raw channel-bit errors %0d/%0d, decoded-bit errors %0d/%0d, headers %0d",
             raw_err, raw_n, dec_err, dec_n, syncs);
    checks++; if ((t1 - t0) != NFR * (FRAME + 1)) failures++;
    checks++; if (sel_cyc != NFR * 3 * STEPS * SPB) failures++;
    checks++; if (syncs != NFR || dec_n != NFR * N_DATA) failures++;
    checks++; if (dec_err != 0) failures++;
    checks++; if (raw_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
