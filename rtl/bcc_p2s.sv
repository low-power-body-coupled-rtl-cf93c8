// bcc_p2s: parallel-in serial-out converter for the 3-bit codeword.
//
// Three D flip-flops hold the codeword; a 2-bit counter counts the bits
// sent. On `load` the codeword {C2,C1,C0} is captured and C0 appears on
// `s_out` the next cycle; each `shift` strobe moves to C1 and then C2
// (right shift). `last` is high while C2 is on s_out, telling the frame
// controller to load the next codeword at the end of that symbol. The
// structure follows the source design; the bit order C0 first is this
// design's choice.
module bcc_p2s
  import bcc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic      shift,
  input  codeword_t p_in,
  output logic      s_out,
  output logic      last
);
  codeword_t  sr;
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else if (load) begin
      sr  <= p_in;
      cnt <= '0;
    end else if (shift) begin
      sr  <= {1'b0, sr[CODE_N-1:1]};
      cnt <= (cnt == 2'(CODE_N-1)) ? 2'd0 : cnt + 2'd1;
    end
  end

  assign s_out = sr[0];
  assign last  = (cnt == 2'(CODE_N-1));
endmodule
