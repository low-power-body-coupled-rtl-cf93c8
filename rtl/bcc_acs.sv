// bcc_acs: add-compare-select butterfly of the Viterbi decoder.
//
// The trellis has 16 states s = {F3,F2,F1,F0}. Butterfly BFLY (0..7) takes
// the path metrics of the two states {BFLY,0} and {BFLY,1} (pm_lo, pm_hi),
// which both lead to the states {0,BFLY} (input bit 0) and {1,BFLY}
// (input bit 1). For each of the two new states it adds the Hamming
// distance between the received 3-bit word and the codeword of each branch,
// compares the two sums and selects the smaller one. dec[i] is the decision
// bit of new state {i,BFLY}: 1 when the path from {BFLY,1} survived. Ties
// keep the {BFLY,0} path. Eight of these units give the 16 decision bits
// per trellis step, as in the source design; the butterfly pairing is this
// design's reading of "two decision bits per ACS unit". Purely
// combinational.
module bcc_acs
  import bcc_pkg::*;
#(
  parameter int unsigned BFLY = 0,
  parameter int unsigned PM_W = 6
) (
  input  codeword_t       rx,
  input  logic [PM_W-1:0] pm_lo,
  input  logic [PM_W-1:0] pm_hi,
  output logic [PM_W-1:0] pm_n0,   // new metric of state {0,BFLY}
  output logic [PM_W-1:0] pm_n1,   // new metric of state {1,BFLY}
  output logic [1:0]      dec
);
  localparam ce_state_t P_LO = ce_state_t'({BFLY[2:0], 1'b0});
  localparam ce_state_t P_HI = ce_state_t'({BFLY[2:0], 1'b1});

  logic [PM_W-1:0] c_lo0, c_hi0, c_lo1, c_hi1;

  always_comb begin
    // add
    c_lo0 = pm_lo + PM_W'(hamming3(ce_code(P_LO, 1'b0), rx));
    c_hi0 = pm_hi + PM_W'(hamming3(ce_code(P_HI, 1'b0), rx));
    c_lo1 = pm_lo + PM_W'(hamming3(ce_code(P_LO, 1'b1), rx));
    c_hi1 = pm_hi + PM_W'(hamming3(ce_code(P_HI, 1'b1), rx));
    // compare and select
    dec[0] = (c_hi0 < c_lo0);
    dec[1] = (c_hi1 < c_lo1);
    pm_n0  = dec[0] ? c_hi0 : c_lo0;
    pm_n1  = dec[1] ? c_hi1 : c_lo1;
  end
endmodule
