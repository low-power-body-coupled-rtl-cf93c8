// bcc_channel: model of the human-body channel.
//
// A Fibonacci LFSR (LFSR_W bits, maximal length) stands for the noise
// generator; its value divided by the scaling factor 4 (a right shift by
// SCALE_SHIFT = 2) gives 8-bit noise, which is OR-ed into the transmitted
// sample. This is the channel of the source design; the LFSR width,
// polynomial and seed are this design's choices. The OR only ever sets
// bits, in the low LFSR_W-SCALE_SHIFT bits of the sample.
//
// rx_in is combinational from tx_out and the noise register, so the channel
// adds no latency.
module bcc_channel
  import bcc_pkg::*;
#(
  parameter int unsigned LFSR_W      = 10,
  parameter int unsigned SCALE_SHIFT = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t tx_out,
  output sample_t rx_in,
  output logic [LFSR_W-SCALE_SHIFT-1:0] noise
);
  localparam int unsigned NOISE_W = LFSR_W - SCALE_SHIFT;

  // Feedback taps for a maximal-length sequence (x^W + ... + 1)
  function automatic logic [LFSR_W-1:0] taps();
    case (LFSR_W)
      8:       return LFSR_W'(8'hB8);
      9:       return LFSR_W'(9'h110);
      10:      return LFSR_W'(10'h240);
      11:      return LFSR_W'(11'h500);
      12:      return LFSR_W'(12'h829);
      13:      return LFSR_W'(13'h100D);
      14:      return LFSR_W'(14'h2015);
      15:      return LFSR_W'(15'h6000);
      default: return LFSR_W'(16'hD008);
    endcase
  endfunction

  logic [LFSR_W-1:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= LFSR_W'(1);
    else        lfsr <= {lfsr[LFSR_W-2:0], ^(lfsr & taps())};
  end

  assign noise = NOISE_W'(lfsr >> SCALE_SHIFT);
  assign rx_in = tx_out | sample_t'(noise);
endmodule
