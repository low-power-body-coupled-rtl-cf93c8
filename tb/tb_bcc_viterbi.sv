// tb_bcc_viterbi: encodes random frames (20 data bits + 4 zero tail bits)
// with a reference encoder, flips 0 to 4 channel bits spaced at least six
// trellis steps apart, and checks that the decoder returns the data bits in
// order, the first one STEPS + 3 cycles after the last codeword, the 20 on
// consecutive cycles. A second decoder with 100-bit frames first gets a
// frame of random words, which drives the path metrics past half range so
// that their normalisation runs, and must then still decode clean frames.
module tb_bcc_viterbi;
  import bcc_pkg::*;
  localparam int N_A = 20;
  localparam int N_B = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_a = 1'b0, v_a = 1'b0, dout_a, dv_a, busy_a;
  logic start_b = 1'b0, v_b = 1'b0, dout_b, dv_b, busy_b;
  codeword_t p_a = '0, p_b = '0;
  int checks = 0, failures = 0, cyc = 0, norm_b = 0;

  bcc_viterbi #(.N_DATA(N_A)) dut_a (.clk, .rst_n, .start(start_a), .in_valid(v_a), .p_in(p_a),
                                     .dout(dout_a), .dout_valid(dv_a), .busy(busy_a));
  bcc_viterbi #(.N_DATA(N_B)) dut_b (.clk, .rst_n, .start(start_b), .in_valid(v_b), .p_in(p_b),
                                     .dout(dout_b), .dout_valid(dv_b), .busy(busy_b));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (v_b && dut_b.all_msb) norm_b++;

  // output collectors
  logic [N_B-1:0] got_a, got_b;
  int na = 0, nb = 0, first_a = -1, last_a = -1;
  always @(negedge clk) begin
    if (dv_a) begin
      got_a[na] = dout_a;
      if (na == 0) first_a = cyc;
      last_a = cyc;
      na++;
    end
    if (dv_b) begin got_b[nb] = dout_b; nb++; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] enc(input logic [3:0] f, input logic u);
    return {u ^ f[3] ^ f[2] ^ f[1] ^ f[0], u ^ f[3] ^ f[1] ^ f[0], u ^ f[2] ^ f[0]};
  endfunction

  // send one frame to decoder A (sel=0) or B (sel=1)
  task automatic send(input bit sel, input int n, input logic [N_B-1:0] d,
                      input int nerr, input bit garbage, output int last_in);
    logic [3:0] f;
    int next_err;
    f = '0;
    next_err = 2 + $urandom % 4;
    @(negedge clk);
    if (sel) start_b = 1'b1; else start_a = 1'b1;
    @(negedge clk);
    start_a = 1'b0; start_b = 1'b0;
    for (int t = 0; t < n + 4; t++) begin
      logic u;
      logic [2:0] c;
      u = (t < n) ? d[t] : 1'b0;
      c = enc(f, u);
      f = {u, f[3:1]};
      if (garbage) c = 3'($urandom);
      if (nerr > 0 && t == next_err) begin
        c[$urandom % 3] ^= 1'b1;
        nerr--;
        next_err = t + 6 + $urandom % 3;
      end
      if (sel) begin v_b = 1'b1; p_b = c; end else begin v_a = 1'b1; p_a = c; end
      last_in = cyc;
      @(negedge clk);
      v_a = 1'b0; v_b = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    int li;
    logic [N_B-1:0] d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < 10; fr++) begin
      d = {N_B{1'b0}};
      d[N_A-1:0] = N_A'($urandom);
      na = 0;
      send(1'b0, N_A, d, fr % 5, 1'b0, li);
      repeat (N_A + 40) @(negedge clk);
      checks++;
      if (na != N_A || got_a[N_A-1:0] !== d[N_A-1:0]) begin
        failures++;
        $display("A frame %0d (%0d errors): %0d bits %h exp %h", fr, fr % 5, na, got_a[N_A-1:0], d[N_A-1:0]);
      end
      checks++;
      if (first_a != li + N_A + 4 + 3 || last_a != first_a + N_A - 1) begin
        failures++;
        $display("A frame %0d: first bit %0d cycles after the last word, last %0d", fr, first_a - li, last_a - first_a);
      end
    end
    // decoder B: garbage frame, then clean frames with errors
    d = '0;
    send(1'b1, N_B, d, 0, 1'b1, li);
    repeat (2 * N_B + 40) @(negedge clk);
    checks++;
    if (norm_b == 0) begin failures++; $display("metric normalisation never ran"); end
    for (int fr = 0; fr < 3; fr++) begin
      for (int i = 0; i < N_B; i += 32) d[i +: 32] = $urandom;
      nb = 0;
      send(1'b1, N_B, d, 12, 1'b0, li);
      repeat (2 * N_B + 40) @(negedge clk);
      checks++;
      if (nb != N_B || got_b !== d) begin
        failures++;
        $display("B frame %0d: %0d bits, mismatch %h", fr, nb, got_b ^ d);
      end
    end
    $display("normalisations in B: %0d", norm_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
