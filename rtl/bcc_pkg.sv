// bcc_pkg: types, constants and functions shared by the body-coupled
// transceiver (BCC) blocks.
//
// Frame: a 32-bit preamble (C55555CC) and an 8-bit start-of-frame word (A5)
// form the 40-bit header, followed by the rate-1/3 convolutionally coded,
// FSK-modulated payload. Samples on the body channel are 12-bit two's
// complement words.
//
// The (3,1,4) code uses four shift-register bits F3..F0 besides the input
// bit. F3 holds the newest bit, F0 the oldest (the register shifts right:
// F <= {din, F[3:1]}). The codeword for input din from state F is
//   C0 = din ^ F2 ^ F0                (G0 = [0101] over F3..F0)
//   C1 = din ^ F3 ^ F1 ^ F0           (G1 = [1011])
//   C2 = din ^ F3 ^ F2 ^ F1 ^ F0      (G2 = [1111])
// The equations and generators follow the source design; which end of the
// register is newest is this design's choice. The trellis has 16 states,
// so the Viterbi decoder uses 8 butterfly ACS units with 2 decisions each.
package bcc_pkg;

  localparam int unsigned SAMPLE_W  = 12;          // DDS / channel sample width
  localparam int unsigned HDR_BITS  = 40;          // 32-bit preamble + 8-bit SOF
  localparam logic [31:0] PREAMBLE  = 32'hC555_55CC;
  localparam logic [7:0]  SOF       = 8'hA5;
  localparam logic [39:0] HEADER    = {PREAMBLE, SOF}; // sent MSB first
  localparam int unsigned CODE_N    = 3;           // codeword length n
  localparam int unsigned CE_MEM    = 4;           // shift-register bits F3..F0
  localparam int unsigned N_STATES  = 16;          // 2**CE_MEM trellis states
  localparam int unsigned TAIL_BITS = CE_MEM;      // zero bits that flush the encoder

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [CE_MEM-1:0]          ce_state_t;
  typedef logic [CODE_N-1:0]          codeword_t;

  // Header levels on the channel: a header bit is sent as a full-scale
  // baseband level, so the receiver reads it from the sign bit.
  localparam sample_t HDR_ONE  = sample_t'(12'h7FF);
  localparam sample_t HDR_ZERO = sample_t'(12'h800);
  localparam sample_t IDLE_LVL = sample_t'(12'h000);

  // Convolutional encoder output for input bit u leaving state f.
  function automatic codeword_t ce_code(input ce_state_t f, input logic u);
    codeword_t c;
    c[0] = u ^ f[2] ^ f[0];
    c[1] = u ^ f[3] ^ f[1] ^ f[0];
    c[2] = u ^ f[3] ^ f[2] ^ f[1] ^ f[0];
    return c;
  endfunction

  // Hamming distance between two codewords (hard-decision branch metric).
  function automatic logic [1:0] hamming3(input codeword_t a, input codeword_t b);
    codeword_t d;
    d = a ^ b;
    return 2'(d[0]) + 2'(d[1]) + 2'(d[2]);
  endfunction

endpackage
