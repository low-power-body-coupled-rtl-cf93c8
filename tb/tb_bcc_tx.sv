// tb_bcc_tx: sends three frames and checks every output sample against a
// reference: the header bits C55555CC A5 as full-scale levels, SPB cycles
// each, then 3*(20+4) coded bits from a reference encoder, each SPB samples
// of the matching tone taken from two reference DDSs reset with the
// transmitter (1 -> FCW 10485, 0 -> FCW 5243). Also checks sel, the 20
// din_ready strobes per frame, the idle level and the frame length
// (40 + 72) * SPB cycles up to `done`.
module tb_bcc_tx;
  import bcc_pkg::*;
  localparam int SPB    = 20;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;
  localparam int FRAME  = (40 + 3 * STEPS) * SPB;
  localparam logic [39:0] HDR = 40'hC5_5555_CCA5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, din = 1'b0;
  logic din_ready, busy, done, sel;
  sample_t tx_out, ref1, ref2;
  int checks = 0, failures = 0;

  bcc_tx dut (.*);
  bcc_dds ref_dds1 (.clk, .rst_n, .fcw(20'd10485), .sample(ref1));
  bcc_dds ref_dds2 (.clk, .rst_n, .fcw(20'd5243),  .sample(ref2));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * FRAME + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] enc(input logic [3:0] f, input logic u);
    return {u ^ f[3] ^ f[2] ^ f[1] ^ f[0], u ^ f[3] ^ f[1] ^ f[0], u ^ f[2] ^ f[0]};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < 3; fr++) begin
      logic [N_DATA-1:0] d;
      logic [3*STEPS-1:0] coded;
      logic [3:0] f;
      int taken, errs, done_at;
      d = N_DATA'($urandom);
      f = '0;
      for (int t = 0; t < STEPS; t++) begin
        logic u;
        u = (t < N_DATA) ? d[t] : 1'b0;
        coded[3*t +: 3] = enc(f, u);
        f = {u, f[3:1]};
      end
      repeat (11 + fr * 7) @(negedge clk);
      checks++;
      if (tx_out !== sample_t'(0) || busy) begin failures++; $display("not idle before frame %0d", fr); end
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      taken = 0; errs = 0; done_at = -1;
      for (int p = 0; p <= FRAME; p++) begin
        sample_t e;
        logic esel;
        din = d[taken % N_DATA];
        #1;
        if (p < 40 * SPB) begin
          e = HDR[39 - p / SPB] ? sample_t'(12'h7FF) : sample_t'(12'h800);
          esel = 1'b0;
        end else if (p < FRAME) begin
          e = coded[(p - 40 * SPB) / SPB] ? ref1 : ref2;
          esel = 1'b1;
        end else begin
          e = '0;
          esel = 1'b0;
        end
        checks++;
        if (tx_out !== e || sel !== esel) begin
          errs++;
          if (errs < 5) $display("frame %0d sample %0d: got %0d exp %0d sel %b", fr, p, tx_out, e, sel);
        end
        if (din_ready) begin
          checks++;
          // strobe in the last cycle before the codeword's first symbol
          if ((p + 1 - 40 * SPB) != taken * 3 * SPB) begin
            errs++;
            $display("frame %0d: din_ready %0d at sample %0d", fr, taken, p);
          end
          taken++;
        end
        if (done) done_at = p;
        @(negedge clk);
      end
      failures += errs;
      checks++;
      if (taken != N_DATA) begin failures++; $display("frame %0d: %0d din_ready strobes", fr, taken); end
      checks++;
      if (done_at != FRAME) begin failures++; $display("frame %0d: done at %0d, expected %0d", fr, done_at, FRAME); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
