// bcc_conv_enc: (3,1,4) rate-1/3 convolutional encoder.
//
// Four shift-register bits F3..F0 and three modulo-2 adders produce a 3-bit
// codeword per input bit with generators G0=[0101], G1=[1011], G2=[1111]
// (see bcc_pkg). The codeword is combinational from `din` and the
// current state so that it can be loaded into the P2S converter in the same
// cycle; on `en` the state shifts right with din entering F3. `clear` puts
// the encoder back in the all-zero state at the start of a frame (this
// design's choice: the frame ends with zero tail bits so the decoder can
// trace back from state 0).
module bcc_conv_enc
  import bcc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      en,
  input  logic      din,
  output codeword_t code,
  output ce_state_t state
);
  ce_state_t f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      f <= '0;
    else if (clear)  f <= '0;
    else if (en)     f <= {din, f[CE_MEM-1:1]};
  end

  // Modulo-2 adders
  assign code[0] = din ^ f[2] ^ f[0];
  assign code[1] = din ^ f[3] ^ f[1] ^ f[0];
  assign code[2] = din ^ f[3] ^ f[2] ^ f[1] ^ f[0];
  assign state   = f;
endmodule
