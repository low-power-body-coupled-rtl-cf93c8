// tb_bcc_tbm: builds decision vectors for a known state path (random data
// bits, four zero tail bits, the decision bit of each state on the path
// set to the bottom bit of its predecessor, all other bits random) and
// checks that the traceback returns the 20 data bits, STEPS + 1 cycles after
// the last vector, for several frames with `clear` between them.
module tb_bcc_tbm;
  import bcc_pkg::*;
  localparam int N_DATA = 20;
  localparam int STEPS  = N_DATA + 4;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, dec_valid = 1'b0, blk_valid, busy;
  logic [15:0] dec = '0;
  logic [N_DATA-1:0] blk;
  int checks = 0, failures = 0, cyc = 0, last_in = 0, got_cyc = -1;

  bcc_tbm #(.N_DATA(N_DATA)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (blk_valid) got_cyc = cyc;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int fr = 0; fr < 6; fr++) begin
      logic [STEPS-1:0] u;
      logic [3:0] s, sn;
      u = {4'b0, N_DATA'($urandom)};
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      s = '0;
      for (int t = 0; t < STEPS; t++) begin
        sn = {u[t], s[3:1]};
        dec = 16'($urandom);
        dec[sn] = s[0];
        dec_valid = 1'b1;
        last_in = cyc;
        @(negedge clk);
        dec_valid = 1'b0;
        repeat ($urandom % 3) @(negedge clk);
        s = sn;
      end
      got_cyc = -1;
      repeat (STEPS + 5) @(negedge clk);
      checks++;
      if (got_cyc != last_in + STEPS + 1) begin
        failures++;
        $display("frame %0d: block after %0d cycles", fr, got_cyc - last_in);
      end
      checks++;
      if (blk !== u[N_DATA-1:0]) begin
        failures++;
        $display("frame %0d: blk %h exp %h", fr, blk, u[N_DATA-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
