// bcc_rx: BCC receiver.
//
// The DEMUX (`sel`) routes the channel samples either to the header
// recovery unit (sel = 0) or to the FSK demodulator (sel = 1). While
// searching, the header recovery unit looks for the 40-bit header; when it
// is found (`frame_sync`), the receiver waits for the end of the last header
// bit and switches the DEMUX to data, so the first payload symbol starts on
// the exact symbol boundary. The demodulated bits pass through the S2P
// converter into the Viterbi decoder, three channel bits per codeword.
// After 3*(N_DATA+4) channel bits the DEMUX returns to header search, and
// the decoder emits the N_DATA decoded bits on `dout` / `dout_valid`. The
// chain follows the source design; deriving `sel` from the header detection
// is this design's choice.
//
// The local DDSs of the demodulator must run in step with the
// transmitter's: both sides are reset together and share the clock, and the
// channel adds no latency.
module bcc_rx
  import bcc_pkg::*;
#(
  parameter int unsigned SPB        = 20,
  parameter int unsigned N_DATA     = 20,
  parameter int unsigned MATCH_BITS = 4,
  parameter int unsigned ACC_W      = 20,
  parameter int unsigned FCW1       = 10485,
  parameter int unsigned FCW2       = 5243
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sample_t             rx_in,
  output logic                sel,
  output logic                frame_sync,
  output logic [HDR_BITS-1:0] hdr_bits,
  output logic                dout,
  output logic                dout_valid
);
  localparam int unsigned STEPS  = N_DATA + TAIL_BITS;
  localparam int unsigned NSYM   = CODE_N * STEPS;
  localparam int unsigned SYM_W  = $clog2(NSYM + 1);

  typedef enum logic [1:0] {R_SEARCH, R_ALIGN, R_DATA} rx_state_e;

  rx_state_e        state;
  logic [SYM_W-1:0] nsym;
  logic             bit_end, s_in, s_valid, p_valid, leave;
  codeword_t        p_out;

  assign sel   = (state == R_DATA);
  assign leave = sel && s_valid && (nsym == SYM_W'(NSYM-1));

  bcc_hdr_rec #(.SPB(SPB)) u_hrec (
    .clk, .rst_n,
    .en      (!sel),
    .clear   (leave),
    .rx_in,
    .sync    (frame_sync),
    .bit_end,
    .hdr_bits
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_SEARCH;
      nsym  <= '0;
    end else begin
      unique case (state)
        R_SEARCH: if (frame_sync) state <= bit_end ? R_DATA : R_ALIGN;
        R_ALIGN:  if (bit_end)    state <= R_DATA;
        R_DATA: begin
          if (s_valid) nsym <= nsym + 1'b1;
          if (leave) begin
            state <= R_SEARCH;
            nsym  <= '0;
          end
        end
        default: state <= R_SEARCH;
      endcase
    end
  end

  // The last symbol's decision arrives one cycle after its last sample; the
  // demodulator stays enabled for that cycle so the decision is not lost.
  bcc_fsk_demod #(.SPB(SPB), .MATCH_BITS(MATCH_BITS), .ACC_W(ACC_W),
                  .FCW1(FCW1), .FCW2(FCW2)) u_dem (
    .clk, .rst_n, .en(sel), .rx_in, .s_in, .s_valid
  );

  bcc_s2p u_s2p (
    .clk, .rst_n, .clear(frame_sync), .in_valid(s_valid), .s_in, .p_out, .p_valid
  );

  bcc_viterbi #(.N_DATA(N_DATA)) u_vd (
    .clk, .rst_n,
    .start    (frame_sync),
    .in_valid (p_valid),
    .p_in     (p_out),
    .dout,
    .dout_valid,
    .busy     ()
  );
endmodule
