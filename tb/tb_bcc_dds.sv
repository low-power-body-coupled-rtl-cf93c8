// tb_bcc_dds: runs the DDS at FCW 10485 (1 MHz at 100 MHz) and 5243
// (500 kHz) and compares every sample with a cycle-accurate model built on
// $sin (frequency register, phase register, output register), allowing the
// error of the 8-segment approximation. Also counts rising zero crossings
// over 20,000 cycles against Fout = Fclk*FCW/2**20 and checks the peaks.
module tb_bcc_dds;
  import bcc_pkg::*;
  localparam int ACC_W = 20;
  localparam int N     = 20000;
  localparam int TOL   = 20;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] s1, s2;
  int checks = 0, failures = 0;

  bcc_dds #(.ACC_W(ACC_W)) dut1 (.clk, .rst_n, .fcw(20'd10485), .sample(s1));
  bcc_dds #(.ACC_W(ACC_W)) dut2 (.clk, .rst_n, .fcw(20'd5243),  .sample(s2));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  longint unsigned fq [2], ph [2];
  int exp_s [2];
  int ncross [2], maxv [2], minv [2];
  logic signed [11:0] prev [2];

  function automatic int ideal(longint unsigned p);
    return int'($floor(2047.0 * $sin(2.0 * PI * real'(p) / real'(1 << ACC_W)) + 0.5));
  endfunction

  initial begin
    fq = '{0, 0}; ph = '{0, 0}; exp_s = '{0, 0};
    ncross = '{0, 0}; maxv = '{0, 0}; minv = '{0, 0}; prev = '{0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      @(posedge clk);
      // model the register update of this edge
      exp_s[0] = ideal(ph[0]);
      exp_s[1] = ideal(ph[1]);
      ph[0] = (ph[0] + fq[0]) % (1 << ACC_W);
      ph[1] = (ph[1] + fq[1]) % (1 << ACC_W);
      fq[0] = 10485;
      fq[1] = 5243;
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        int got;
        got = (k == 0) ? int'(s1) : int'(s2);
        checks++;
        if (got - exp_s[k] > TOL || exp_s[k] - got > TOL) begin
          failures++;
          if (failures < 10) $display("t=%0d dds%0d: got %0d exp %0d", t, k + 1, got, exp_s[k]);
        end
        if (prev[k] < 0 && got >= 0) ncross[k]++;
        if (got > maxv[k]) maxv[k] = got;
        if (got < minv[k]) minv[k] = got;
        prev[k] = 12'(got);
      end
    end
    // 20000 cycles: 1 MHz -> 200 periods, 500 kHz -> 100 periods
    checks++;
    if (ncross[0] < 199 || ncross[0] > 201) begin failures++; $display("dds1 crossings %0d", ncross[0]); end
    checks++;
    if (ncross[1] < 99 || ncross[1] > 101) begin failures++; $display("dds2 crossings %0d", ncross[1]); end
    checks++;
    if (maxv[0] < 2030 || minv[0] > -2030 || maxv[1] < 2030 || minv[1] > -2030) begin
      failures++;
      $display("peaks %0d %0d %0d %0d", maxv[0], minv[0], maxv[1], minv[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
