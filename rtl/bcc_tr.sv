// bcc_tr: body-coupled communication transceiver, transmitter -> body
// channel -> receiver, with 1-bit data in and 1-bit data out.
//
// bcc_tx frames the data (40-bit header, then rate-1/3 convolutionally
// coded FSK payload), bcc_channel corrupts the 12-bit samples with LFSR
// noise, and bcc_rx finds the header, demodulates, and Viterbi-decodes the
// payload. Both ends share the clock and reset, which keeps the receiver's
// reference oscillators in step with the transmitter's.
//
// The three-part structure (TX, body channel, RX) and the 1-bit data
// interface follow the source design; the shared clock and reset, and the
// start/ready handshake, are this design's choices.
//
// Interface: pulse `start` while `tx_busy` is low to send a frame; supply a
// data bit on `din` in each cycle where `din_ready` is high (N_DATA per
// frame). The decoded bits come out on `dout` with `dout_valid`, in order,
// after the frame's last sample plus the traceback (N_DATA+4 cycles).
// `frame_sync` pulses when the receiver recognises the header; `rx_sel` is
// the receiver's DEMUX select. `tx_out` and `rx_in` expose the channel.
module bcc_tr
  import bcc_pkg::*;
#(
  parameter int unsigned SPB         = 20,
  parameter int unsigned N_DATA      = 20,
  parameter int unsigned LFSR_W      = 10,
  parameter int unsigned SCALE_SHIFT = 2,
  parameter int unsigned MATCH_BITS  = 4,
  parameter int unsigned ACC_W       = 20,
  parameter int unsigned FCW1        = 10485,
  parameter int unsigned FCW2        = 5243
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                din,
  output logic                din_ready,
  output logic                tx_busy,
  output logic                tx_done,
  output logic                tx_sel,
  output sample_t             tx_out,
  output sample_t             rx_in,
  output logic                rx_sel,
  output logic                frame_sync,
  output logic [HDR_BITS-1:0] hdr_bits,
  output logic                dout,
  output logic                dout_valid
);
  bcc_tx #(.SPB(SPB), .N_DATA(N_DATA), .ACC_W(ACC_W), .FCW1(FCW1), .FCW2(FCW2)) u_tx (
    .clk, .rst_n, .start, .din, .din_ready,
    .busy (tx_busy),
    .done (tx_done),
    .sel  (tx_sel),
    .tx_out
  );

  bcc_channel #(.LFSR_W(LFSR_W), .SCALE_SHIFT(SCALE_SHIFT)) u_ch (
    .clk, .rst_n, .tx_out, .rx_in, .noise()
  );

  bcc_rx #(.SPB(SPB), .N_DATA(N_DATA), .MATCH_BITS(MATCH_BITS), .ACC_W(ACC_W),
           .FCW1(FCW1), .FCW2(FCW2)) u_rx (
    .clk, .rst_n, .rx_in,
    .sel (rx_sel),
    .frame_sync,
    .hdr_bits,
    .dout,
    .dout_valid
  );
endmodule
