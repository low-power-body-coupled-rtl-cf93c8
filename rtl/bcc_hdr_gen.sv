// bcc_hdr_gen: preamble / start-of-frame generator.
//
// The 32-bit preamble (C55555CC) and 8-bit SOF (A5) are fixed values held in
// a small ROM (here the constant HEADER). On `load` the 40-bit header is
// copied into a shift register; every `shift` strobe moves to the next bit.
// `hdr_bit` is the bit being sent, preamble MSB first, then SOF MSB first.
// The header values follow the source design; serialising MSB first and the
// load/shift strobes are this design's choices.
//
// Interface: load and shift are single-cycle strobes (load wins). hdr_bit is
// registered state, valid the cycle after load.
module bcc_hdr_gen
  import bcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic shift,
  output logic hdr_bit
);
  logic [HDR_BITS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= HEADER;
    else if (shift)  sr <= {sr[HDR_BITS-2:0], 1'b0};
  end

  assign hdr_bit = sr[HDR_BITS-1];
endmodule
