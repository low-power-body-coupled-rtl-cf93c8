// tb_bcc_tr_noise: bit-error-rate run of the whole transceiver over the
// body-channel model. Two transceivers run side by side on the same random
// data: `nom` at the default channel (LFSR noise / 4, 8 bits, which never
// reaches the bits the demodulator compares) and `hvy` with the scaling
// factor 2 instead of 4 (9-bit noise, which does corrupt demodulator
// decisions). For each it counts raw channel-bit errors (demodulator
// decision against the transmitted coded bit) and decoded-bit errors.
// Pass criteria: the nominal channel gives no decoded errors; on the heavy
// channel the raw errors happen and the decoder output has fewer than a
// tenth of them as bit errors, showing the convolutional code at work.
module tb_bcc_tr_noise;
  import bcc_pkg::*;
  localparam int SPB    = 20;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;
  localparam int FRAME  = (40 + 3 * STEPS) * SPB;
  localparam int NFR    = 2000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, din = 1'b0;
  int checks = 0, failures = 0;

  logic rdy [2], busy [2], done [2], txs [2], rxs [2], fsync [2], dout [2], dv [2];
  sample_t txo [2], rxi [2];
  logic [39:0] hb [2];

  bcc_tr nom (.clk, .rst_n, .start, .din, .din_ready(rdy[0]), .tx_busy(busy[0]), .tx_done(done[0]),
              .tx_sel(txs[0]), .tx_out(txo[0]), .rx_in(rxi[0]), .rx_sel(rxs[0]), .frame_sync(fsync[0]),
              .hdr_bits(hb[0]), .dout(dout[0]), .dout_valid(dv[0]));
  bcc_tr #(.SCALE_SHIFT(1)) hvy (
              .clk, .rst_n, .start, .din, .din_ready(rdy[1]), .tx_busy(busy[1]), .tx_done(done[1]),
              .tx_sel(txs[1]), .tx_out(txo[1]), .rx_in(rxi[1]), .rx_sel(rxs[1]), .frame_sync(fsync[1]),
              .hdr_bits(hb[1]), .dout(dout[1]), .dout_valid(dv[1]));

  always #5 clk = ~clk;

  // transmitted coded bits, captured at each symbol start, matched with the
  // receiver's decisions in order
  logic cq0 [$], cq1 [$], dq0 [$], dq1 [$];
  int raw_err [2] = '{0, 0}, raw_n [2] = '{0, 0}, dec_err [2] = '{0, 0}, dec_n [2] = '{0, 0};
  int syncs [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    if (nom.u_tx.take || nom.u_tx.p2s_shift) cq0.push_back(1'b0);  // placeholder, filled below
    if (hvy.u_tx.take || hvy.u_tx.p2s_shift) cq1.push_back(1'b0);
  end
  // record the serial bit one cycle after a load or shift, when it is valid
  logic t0_d = 0, t1_d = 0;
  always @(posedge clk) begin
    if (t0_d) cq0[cq0.size() - 1] = nom.u_tx.s_out;
    if (t1_d) cq1[cq1.size() - 1] = hvy.u_tx.s_out;
    t0_d <= nom.u_tx.take || nom.u_tx.p2s_shift;
    t1_d <= hvy.u_tx.take || hvy.u_tx.p2s_shift;
  end
  always @(negedge clk) begin
    if (nom.u_rx.s_valid && nom.u_rx.sel) begin
      raw_n[0]++;
      if (cq0.pop_front() !== nom.u_rx.s_in) raw_err[0]++;
    end
    if (hvy.u_rx.s_valid && hvy.u_rx.sel) begin
      raw_n[1]++;
      if (cq1.pop_front() !== hvy.u_rx.s_in) raw_err[1]++;
    end
    if (dv[0]) begin dec_n[0]++; if (dq0.pop_front() !== dout[0]) dec_err[0]++; end
    if (dv[1]) begin dec_n[1]++; if (dq1.pop_front() !== dout[1]) dec_err[1]++; end
    if (fsync[0]) syncs[0]++;
    if (fsync[1]) syncs[1]++;
  end

  initial begin
    repeat (NFR * (FRAME + 100) + 5000) @(posedge clk);
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
      for (int i = 0; i < N_DATA; i++) begin dq0.push_back(d[i]); dq1.push_back(d[i]); end
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      k = 0;
      while (!done[0]) begin
        din = d[k % N_DATA];
        #1;
        if (rdy[0]) k++;
        @(negedge clk);
      end
      repeat (STEPS + N_DATA + 10) @(negedge clk);
    end
    $display("nominal channel: %0d/%0d raw channel-bit errors, %0d/%0d decoded-bit errors, %0d headers",
             raw_err[0], raw_n[0], dec_err[0], dec_n[0], syncs[0]);
    $display("heavy channel:   %0d/%0d raw channel-bit errors, %0d/%0d decoded-bit errors, %0d headers",
             raw_err[1], raw_n[1], dec_err[1], dec_n[1], syncs[1]);
    checks++; if (dec_err[0] != 0) failures++;
    checks++; if (dec_n[0] != NFR * N_DATA || syncs[0] != NFR) failures++;
    checks++; if (raw_err[1] == 0) failures++;
    checks++; if (dec_n[1] != NFR * N_DATA) failures++;
    checks++; if (dec_err[1] * 10 >= raw_err[1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
