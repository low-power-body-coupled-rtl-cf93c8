// tb_bcc_hdr_rec: sends baseband header frames (SPB = 20 cycles per bit,
// random noise OR-ed into the low 8 bits) to the header recovery unit.
// A header with one wrong bit must not give `sync`; the right header must
// give exactly one `sync` pulse, SPB/2 + 1 cycles after the last bit
// starts, with `bit_end` in the last cycle of that bit and the recovered
// 40 bits equal to C55555CC A5. `clear` must empty the register.
module tb_bcc_hdr_rec;
  import bcc_pkg::*;
  localparam int SPB = 20;
  localparam logic [39:0] HDR = 40'hC5_5555_CCA5;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, clear = 1'b0, sync, bit_end;
  logic [39:0] hdr_bits;
  sample_t rx_in = '0;
  int checks = 0, failures = 0, cyc = 0, syncs = 0, sync_cyc = -1;
  logic [39:0] hdr_at_sync = '0;

  bcc_hdr_rec #(.SPB(SPB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (sync) begin syncs++; sync_cyc = cyc; hdr_at_sync = hdr_bits; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send 40 bits; returns the cycle in which the last bit started
  task automatic send(input logic [39:0] bits, output int last_start);
    for (int i = 39; i >= 0; i--) begin
      if (i == 0) last_start = cyc;
      for (int k = 0; k < SPB; k++) begin
        rx_in = (bits[i] ? sample_t'(12'h7FF) : sample_t'(12'h800)) | sample_t'($urandom % 256);
        if (i == 0) begin
          checks++;
          if (bit_end !== (k == SPB - 1)) begin
            failures++;
            $display("bit_end %b at phase %0d", bit_end, k);
          end
        end
        @(negedge clk);
      end
    end
    rx_in = sample_t'($urandom % 256);  // idle level with noise
  endtask

  initial begin
    int ls;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (7) @(negedge clk);
    // wrong header: one preamble bit flipped
    send(HDR ^ 40'h00_0100_0000, ls);
    repeat (3 * SPB) @(negedge clk);
    checks++;
    if (syncs != 0) begin failures++; $display("sync on a wrong header"); end
    // right header, started at an odd offset
    repeat (5) @(negedge clk);
    send(HDR, ls);
    repeat (3 * SPB) @(negedge clk);
    checks++;
    if (syncs != 1) begin failures++; $display("syncs = %0d", syncs); end
    checks++;
    if (sync_cyc != ls + SPB / 2 + 1) begin
      failures++;
      $display("sync at cycle %0d, last bit started at %0d", sync_cyc, ls);
    end
    checks++;
    if (hdr_at_sync !== HDR) begin failures++; $display("hdr_bits %h", hdr_at_sync); end
    // clear empties the register
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    checks++;
    if (hdr_bits !== '0) failures++;
    // a second frame is found again
    send(HDR, ls);
    repeat (2 * SPB) @(negedge clk);
    checks++;
    if (syncs != 2) begin failures++; $display("second frame: syncs = %0d", syncs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
