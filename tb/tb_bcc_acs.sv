// tb_bcc_acs: all eight butterflies with random 6-bit path metrics and
// received words, compared with a reference written directly from the
// encoder equations (state {F3,F2,F1,F0}, F3 newest).
module tb_bcc_acs;
  import bcc_pkg::*;
  logic [2:0] rx;
  logic [5:0] lo [8], hi [8], n0 [8], n1 [8];
  logic [1:0] dec [8];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < 8; b++) begin : g
    bcc_acs #(.BFLY(b)) dut (.rx, .pm_lo(lo[b]), .pm_hi(hi[b]), .pm_n0(n0[b]), .pm_n1(n1[b]), .dec(dec[b]));
  end

  function automatic logic [2:0] enc(input logic [3:0] f, input logic u);
    return {u ^ f[3] ^ f[2] ^ f[1] ^ f[0], u ^ f[3] ^ f[1] ^ f[0], u ^ f[2] ^ f[0]};
  endfunction
  function automatic int hdist(input logic [2:0] a, input logic [2:0] c);
    return int'(a[0] != c[0]) + int'(a[1] != c[1]) + int'(a[2] != c[2]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      rx = 3'($urandom);
      for (int b = 0; b < 8; b++) begin
        lo[b] = 6'($urandom % 48);
        hi[b] = (it % 5 == 0) ? lo[b] : 6'($urandom % 48);   // ties too
      end
      #1;
      for (int b = 0; b < 8; b++) begin
        for (int u = 0; u < 2; u++) begin
          int a, c, m;
          logic d;
          a = int'(lo[b]) + hdist(enc({b[2:0], 1'b0}, u[0]), rx);
          c = int'(hi[b]) + hdist(enc({b[2:0], 1'b1}, u[0]), rx);
          d = (c < a);
          m = d ? c : a;
          checks++;
          if (dec[b][u] !== d || ((u == 0) ? n0[b] : n1[b]) !== 6'(m)) begin
            failures++;
            if (failures < 10) $display("bfly %0d u %0d: got %0d/%b exp %0d/%b", b, u, (u == 0) ? n0[b] : n1[b], dec[b][u], m, d);
          end
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
