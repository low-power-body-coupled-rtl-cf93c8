// bcc_s2p: serial-in parallel-out converter, 1-bit demodulated stream to
// 3-bit codewords for the Viterbi decoder.
//
// Each `in_valid` shifts `s_in` in from the top (right shift), so after three
// bits the register holds {C2,C1,C0} with the first received bit in bit 0,
// matching bcc_p2s. A 2-bit counter marks the third bit; `p_valid` pulses
// for one cycle with the codeword on `p_out`. `clear` restarts the count at
// a frame boundary. Function per the source design; counter and handshake
// are this design's choices.
module bcc_s2p
  import bcc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      in_valid,
  input  logic      s_in,
  output codeword_t p_out,
  output logic      p_valid
);
  codeword_t  sr;
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      cnt     <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      if (clear) begin
        cnt <= '0;
      end else if (in_valid) begin
        sr <= {s_in, sr[CODE_N-1:1]};
        if (cnt == 2'(CODE_N-1)) begin
          cnt     <= '0;
          p_valid <= 1'b1;
        end else begin
          cnt <= cnt + 2'd1;
        end
      end
    end
  end

  assign p_out = sr;
endmodule
