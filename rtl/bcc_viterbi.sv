// bcc_viterbi: hard-decision Viterbi decoder for the (3,1,4) code.
//
// Structure (source design): 16 path-metric registers of PM_W = 6 bits,
// eight butterfly ACS units (bcc_acs) that produce 16 decision bits per
// received 3-bit word, the traceback module (bcc_tbm) with its decision
// memory and counter, and an output data shift register. The traceback
// delivers a block of N_DATA = 20 decoded bits, which the shift register
// sends out LSB first (right shift), one bit per cycle on `dout` with
// `dout_valid`.
//
// This design's choices: `start` (one pulse before the first word of a
// frame) sets state 0's metric to 0 and all others to 16, which drops paths
// from other start states within four steps. Metrics are kept in range by
// clearing their MSB whenever all 16 have it set; the spread of the metrics
// stays below 32, so nothing is lost. A frame is N_DATA data bits plus four
// zero tail bits, i.e. STEPS = N_DATA + 4 trellis steps.
//
// Timing: one ACS step per `in_valid`; the traceback starts the cycle after
// the last word, takes STEPS cycles, and the N_DATA output bits follow on
// consecutive cycles.
module bcc_viterbi
  import bcc_pkg::*;
#(
  parameter int unsigned N_DATA = 20,
  parameter int unsigned PM_W   = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      in_valid,
  input  codeword_t p_in,
  output logic      dout,
  output logic      dout_valid,
  output logic      busy
);
  localparam int unsigned STEPS = N_DATA + TAIL_BITS;
  localparam int unsigned OC_W  = $clog2(N_DATA + 1);

  logic [PM_W-1:0]     pm     [N_STATES];
  logic [PM_W-1:0]     pm_new [N_STATES];
  logic [N_STATES-1:0] dec;
  logic                all_msb;

  // Eight ACS butterflies: inputs states 2b, 2b+1; outputs states b, b+8
  for (genvar b = 0; b < N_STATES/2; b++) begin : g_acs
    logic [1:0] d;
    bcc_acs #(.BFLY(b), .PM_W(PM_W)) u_acs (
      .rx    (p_in),
      .pm_lo (pm[2*b]),
      .pm_hi (pm[2*b+1]),
      .pm_n0 (pm_new[b]),
      .pm_n1 (pm_new[b + N_STATES/2]),
      .dec   (d)
    );
    assign dec[b]                = d[0];
    assign dec[b + N_STATES/2]   = d[1];
  end

  always_comb begin
    all_msb = 1'b1;
    for (int s = 0; s < N_STATES; s++) all_msb &= pm_new[s][PM_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_STATES; s++) pm[s] <= '0;
    end else if (start) begin
      for (int s = 0; s < N_STATES; s++) pm[s] <= (s == 0) ? '0 : PM_W'(16);
    end else if (in_valid) begin
      for (int s = 0; s < N_STATES; s++)
        pm[s] <= all_msb ? {1'b0, pm_new[s][PM_W-2:0]} : pm_new[s];
    end
  end

  // Traceback module
  logic [N_DATA-1:0] blk;
  logic              blk_valid, tb_busy;

  bcc_tbm #(.N_DATA(N_DATA), .STEPS(STEPS)) u_tbm (
    .clk, .rst_n,
    .clear     (start),
    .dec_valid (in_valid),
    .dec,
    .blk,
    .blk_valid,
    .busy      (tb_busy)
  );

  // Output data shift register
  logic [N_DATA-1:0] osr;
  logic [OC_W-1:0]   ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      osr        <= '0;
      ocnt       <= '0;
      dout       <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (blk_valid) begin
        osr  <= blk;
        ocnt <= OC_W'(N_DATA);
      end else if (ocnt != '0) begin
        dout       <= osr[0];
        dout_valid <= 1'b1;
        osr        <= osr >> 1;
        ocnt       <= ocnt - 1'b1;
      end
    end
  end

  assign busy = tb_busy || (ocnt != '0);
endmodule
