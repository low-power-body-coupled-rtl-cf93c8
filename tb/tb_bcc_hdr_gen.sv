// tb_bcc_hdr_gen: checks that the header generator sends the 40-bit header
// C55555CC A5 MSB first, one bit per shift strobe, and reloads on `load`.
module tb_bcc_hdr_gen;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, hdr_bit;
  int checks = 0, failures = 0;
  localparam logic [39:0] EXP = 40'hC5_5555_CCA5;

  bcc_hdr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      for (int i = 39; i >= 0; i--) begin
        checks++;
        if (hdr_bit !== EXP[i]) begin
          failures++;
          $display("header bit %0d: got %b exp %b", 39 - i, hdr_bit, EXP[i]);
        end
        // hold a few cycles without shifting: bit must stay
        @(negedge clk);
        checks++;
        if (hdr_bit !== EXP[i]) failures++;
        shift = 1'b1;
        @(negedge clk) shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
