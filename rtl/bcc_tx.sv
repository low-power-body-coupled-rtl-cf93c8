// bcc_tx: BCC transmitter.
//
// A frame is the 40-bit header (preamble C55555CC, SOF A5) followed by the
// payload: N_DATA data bits and four zero tail bits, each coded by the
// rate-1/3 convolutional encoder into three channel bits. Every channel bit
// lasts SPB clock cycles (samples). The path of a data bit, as in the
// source design: convolutional encoder -> P2S converter -> FSK modulator
// (DDS1 1 MHz for 1, DDS2 500 kHz for 0) -> TX MUX. The TX MUX (`sel`)
// sends the header while sel = 0 and the FSK samples while sel = 1. Header
// bits go out as full-scale baseband levels (+2047 for 1, -2048 for 0);
// between frames the output is 0. Those levels, the tail bits and the frame
// controller are this design's choices.
//
// Interface: `start` (while idle) begins a frame. `din` is taken in every
// cycle where `din_ready` is high, N_DATA times per frame, always in the last
// cycle of the preceding channel bit. `busy` covers the frame; `done`
// pulses after its last sample. `tx_out` is combinational from registers.
// Frame length: (40 + 3*(N_DATA+4)) * SPB cycles.
module bcc_tx
  import bcc_pkg::*;
#(
  parameter int unsigned SPB    = 20,
  parameter int unsigned N_DATA = 20,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned FCW1   = 10485,
  parameter int unsigned FCW2   = 5243
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    din,
  output logic    din_ready,
  output logic    busy,
  output logic    done,
  output logic    sel,
  output sample_t tx_out
);
  localparam int unsigned STEPS = N_DATA + TAIL_BITS;
  localparam int unsigned SC_W  = $clog2(SPB);
  localparam int unsigned BC_W  = $clog2(HDR_BITS > STEPS ? HDR_BITS : STEPS);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} tx_state_e;

  tx_state_e       state;
  logic [SC_W-1:0] sym_cnt;
  logic [BC_W-1:0] bit_cnt;   // header bit or data-bit (trellis step) index
  logic            sym_end;

  // strobes to the sub-blocks
  logic      hdr_load, hdr_shift, take, p2s_shift, p2s_last, enc_in;
  logic      hdr_bit, s_out;
  logic [BC_W-1:0] take_idx;
  codeword_t code;
  sample_t   fsk_out;

  assign sym_end   = (state != S_IDLE) && (sym_cnt == SC_W'(SPB-1));
  assign hdr_load  = (state == S_IDLE) && start;
  assign hdr_shift = (state == S_HDR) && sym_end && (bit_cnt != BC_W'(HDR_BITS-1));
  // a new codeword is taken at the end of the header and after each C2
  assign take      = sym_end && (((state == S_HDR) && (bit_cnt == BC_W'(HDR_BITS-1))) ||
                                 ((state == S_DATA) && p2s_last && (bit_cnt != BC_W'(STEPS-1))));
  assign take_idx  = (state == S_HDR) ? '0 : bit_cnt + 1'b1;
  assign din_ready = take && (take_idx < BC_W'(N_DATA));
  assign enc_in    = din_ready ? din : 1'b0;   // tail bits are zero
  assign p2s_shift = (state == S_DATA) && sym_end && !p2s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sym_cnt <= '0;
      bit_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_HDR;
          sym_cnt <= '0;
          bit_cnt <= '0;
        end
        S_HDR: begin
          sym_cnt <= sym_end ? '0 : sym_cnt + 1'b1;
          if (sym_end) begin
            if (bit_cnt == BC_W'(HDR_BITS-1)) begin
              state   <= S_DATA;
              bit_cnt <= '0;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end
        S_DATA: begin
          sym_cnt <= sym_end ? '0 : sym_cnt + 1'b1;
          if (sym_end && p2s_last) begin
            if (bit_cnt == BC_W'(STEPS-1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  bcc_hdr_gen u_hdr (
    .clk, .rst_n, .load(hdr_load), .shift(hdr_shift), .hdr_bit
  );

  bcc_conv_enc u_ce (
    .clk, .rst_n, .clear(hdr_load), .en(take), .din(enc_in), .code, .state()
  );

  bcc_p2s u_p2s (
    .clk, .rst_n, .load(take), .shift(p2s_shift), .p_in(code), .s_out, .last(p2s_last)
  );

  bcc_fsk_mod #(.ACC_W(ACC_W), .FCW1(FCW1), .FCW2(FCW2)) u_fsk (
    .clk, .rst_n, .s_out, .fsk_out, .dds1_out(), .dds2_out()
  );

  // TX MUX
  assign sel  = (state == S_DATA);
  assign busy = (state != S_IDLE);
  always_comb begin
    if (sel)                  tx_out = fsk_out;
    else if (state == S_HDR)  tx_out = hdr_bit ? HDR_ONE : HDR_ZERO;
    else                      tx_out = IDLE_LVL;
  end

  // Handshake rules: data is only requested inside a frame, and `done`
  // ends it.
  a_ready_in_frame: assert property (
    @(posedge clk) disable iff (!rst_n) din_ready |-> busy)
    else $error("din_ready outside a frame");
  a_done_ends_frame: assert property (
    @(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("done while a frame is still running");
endmodule
