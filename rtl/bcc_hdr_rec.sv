// bcc_hdr_rec: header recovery unit of the receiver.
//
// While the receiver DEMUX routes the channel to it (`en`), this unit
// recovers the baseband header bits and watches for the 40-bit header
// (preamble C55555CC followed by SOF A5). A header bit is read from the
// sign of the received sample (a full-scale positive level is 1). Bit
// timing: a phase counter restarts at every level change and wraps every
// SPB cycles; the bit is sampled at phase SPB/2, the middle of the bit, and
// shifted into a 40-bit register. When that register equals the header,
// `sync` pulses (one cycle after the sampling cycle). `bit_end` is high in
// the last cycle of each bit period, which the receiver uses to start the
// payload exactly on the next symbol boundary. `clear` empties the register
// so that a header already seen cannot match again.
//
// The source design names this unit and its job, header recovery; the
// sign-level detection, transition-based bit timing and mid-bit sampling
// are this design's own.
module bcc_hdr_rec
  import bcc_pkg::*;
#(
  parameter int unsigned SPB = 20   // samples (clock cycles) per channel bit
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clear,
  input  sample_t             rx_in,
  output logic                sync,
  output logic                bit_end,
  output logic [HDR_BITS-1:0] hdr_bits
);
  localparam int unsigned PH_W = $clog2(SPB);

  logic            b, prev;
  logic [PH_W-1:0] cnt_q, ph;
  logic [HDR_BITS-1:0] sr, sr_next;
  logic            sample_now;

  assign b          = ~rx_in[SAMPLE_W-1];
  assign ph         = (b != prev) ? '0 : cnt_q;
  assign sample_now = en && (ph == PH_W'(SPB/2));
  assign bit_end    = en && (ph == PH_W'(SPB-1));
  assign sr_next    = {sr[HDR_BITS-2:0], b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= 1'b1;
      cnt_q <= '0;
      sr    <= '0;
      sync  <= 1'b0;
    end else begin
      sync <= 1'b0;
      if (clear) begin
        sr    <= '0;
        cnt_q <= '0;
      end else if (en) begin
        prev  <= b;
        cnt_q <= (ph == PH_W'(SPB-1)) ? '0 : ph + 1'b1;
        if (sample_now) begin
          sr   <= sr_next;
          sync <= (sr_next == HEADER);
        end
      end
    end
  end

  assign hdr_bits = sr;
endmodule
