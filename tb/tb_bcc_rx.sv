// tb_bcc_rx: a transmitter (bcc_tx) feeds the receiver; the testbench sits
// in the channel. It ORs random noise into the low 8 bits and, per frame:
//   frame type 0: clean payload;
//   frame type 1: one header bit inverted -> the frame must be ignored;
//   frame type 2: three payload symbols replaced by the other tone (taken
//                 from reference DDSs), which the demodulator then reads
//                 wrongly -> the Viterbi decoder must still return the data.
// Checks: one frame_sync per good frame with the recovered header, the
// receiver DEMUX switching to data in the same cycle as the transmitter's,
// staying there for 3*24*SPB + 1 cycles, the decoded bits in order, and
// the first decoded bit STEPS + 4 cycles after the transmitter's `done`.
module tb_bcc_rx;
  import bcc_pkg::*;
  localparam int SPB    = 20;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;
  localparam int FRAME  = (40 + 3 * STEPS) * SPB;
  localparam logic [39:0] HDR = 40'hC5_5555_CCA5;
  localparam int NFR = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, din = 1'b0;
  logic din_ready, tx_busy, tx_done, tx_sel;
  sample_t tx_out, rx_in, ref1, ref2;
  logic rx_sel, frame_sync, dout, dout_valid;
  logic [39:0] hdr_bits;
  int checks = 0, failures = 0, cyc = 0;

  bcc_tx tx (.clk, .rst_n, .start, .din, .din_ready, .busy(tx_busy), .done(tx_done),
             .sel(tx_sel), .tx_out);
  bcc_rx dut (.clk, .rst_n, .rx_in, .sel(rx_sel), .frame_sync, .hdr_bits, .dout, .dout_valid);
  bcc_dds r1 (.clk, .rst_n, .fcw(20'd10485), .sample(ref1));
  bcc_dds r2 (.clk, .rst_n, .fcw(20'd5243),  .sample(ref2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // channel: noise plus deliberate corruption
  int ftype = 0, hdr_pos = 0, sym_pos = 0;
  logic [7:0] noise = '0;
  logic flip_hdr, flip_sym;
  assign flip_hdr = (ftype == 1) && tx_busy && !tx_sel && (hdr_pos / SPB == 9);
  assign flip_sym = (ftype == 2) && tx_sel &&
                    ((sym_pos / SPB == 7) || (sym_pos / SPB == 31) || (sym_pos / SPB == 55));
  always_comb begin
    if (flip_hdr)      rx_in = ~tx_out;
    else if (flip_sym) rx_in = (tx_out == ref1) ? ref2 : ref1;
    else               rx_in = tx_out | sample_t'(noise);
  end
  always @(posedge clk) begin
    noise <= 8'($urandom);
    if (tx_busy && !tx_sel) hdr_pos <= hdr_pos + 1; else hdr_pos <= 0;
    if (tx_sel) sym_pos <= sym_pos + 1; else sym_pos <= 0;
  end

  // monitors
  int syncs = 0, nout = 0, sel_len = 0, misalign = 0, done_cyc = 0, first_out = -1;
  logic [N_DATA-1:0] got;
  logic rx_sel_d = 1'b0;
  always @(negedge clk) begin
    if (frame_sync) begin
      syncs++;
      checks++;
      if (hdr_bits !== HDR) begin failures++; $display("header %h", hdr_bits); end
    end
    if (rx_sel !== rx_sel_d && rx_sel && !tx_sel) misalign++;
    if (rx_sel) sel_len++;
    rx_sel_d = rx_sel;
    if (tx_done) done_cyc = cyc;
    if (dout_valid) begin
      if (nout == 0) first_out = cyc;
      got[nout % N_DATA] = dout;
      nout++;
    end
  end

  initial begin
    repeat (NFR * (FRAME + 400) + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < NFR; fr++) begin
      logic [N_DATA-1:0] d;
      int syncs0;
      d = N_DATA'($urandom);
      ftype = fr % 3;
      syncs0 = syncs;
      nout = 0; sel_len = 0; first_out = -1;
      repeat (50 + $urandom % 50) @(negedge clk);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      k = 0;
      while (!tx_done) begin
        din = d[k % N_DATA];
        #1;
        if (din_ready) k++;
        @(negedge clk);
      end
      repeat (STEPS + N_DATA + 20) @(negedge clk);
      if (ftype == 1) begin
        checks++;
        if (syncs != syncs0 || nout != 0 || sel_len != 0) begin
          failures++;
          $display("frame %0d (bad header): syncs %0d outputs %0d", fr, syncs - syncs0, nout);
        end
      end else begin
        checks++;
        if (syncs != syncs0 + 1) begin failures++; $display("frame %0d: %0d syncs", fr, syncs - syncs0); end
        checks++;
        if (sel_len != 3 * STEPS * SPB + 1) begin failures++; $display("frame %0d: DEMUX in data for %0d cycles", fr, sel_len); end
        checks++;
        if (nout != N_DATA || got !== d) begin
          failures++;
          $display("frame %0d type %0d: %0d bits %h exp %h", fr, ftype, nout, got, d);
        end
        checks++;
        if (first_out != done_cyc + 1 + STEPS + 3) begin
          failures++;
          $display("frame %0d: first bit %0d cycles after done", fr, first_out - done_cyc);
        end
      end
    end
    checks++;
    if (misalign != 0) begin failures++; $display("DEMUX switched off the symbol boundary %0d times", misalign); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
