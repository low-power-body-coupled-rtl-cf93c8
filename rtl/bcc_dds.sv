// bcc_dds: direct digital synthesiser producing a sine wave for a given
// frequency control word (FCW).
//
// Fout = Fclk * FCW / 2**ACC_W. With ACC_W = 20 and a 100 MHz clock,
// FCW 10485 gives 1 MHz and FCW 5243 gives 500 kHz, the two FSK tones.
// Stages, as in the source design:
//   phase accumulator - frequency register + adder + phase register;
//   complementor      - in quadrants 2 and 4 (phase bit ACC_W-2 set) the
//                       ten bits below the two quadrant bits are inverted,
//                       turning the ramp into a triangle;
//   MUX tree          - a quarter sine built from 8 linear segments: the top
//                       3 triangle bits select a base value and slope from
//                       a small ROM, the lower 7 bits interpolate;
//   format converter  - the phase MSB (second half of the period) negates
//                       the magnitude, giving a two's complement sample.
// Segment ROM: base[k] = round(2047*sin(pi/2*k/8)), slope[k] = base[k+1] -
// base[k] with base[8] = 2047; error below 0.6 % of full scale. The segment
// count and the multiply for the interpolation are this design's choices.
//
// Timing: the accumulator and the output are registers; `sample` follows
// the phase register by one cycle. After reset the phase is 0, so every
// instance with the same FCW produces the same samples in the same cycle.
module bcc_dds
  import bcc_pkg::*;
#(
  parameter int unsigned ACC_W = 20,
  parameter int unsigned OUT_W = SAMPLE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ACC_W-1:0]        fcw,
  output logic signed [OUT_W-1:0] sample
);
  localparam int unsigned TRI_W = 10;   // triangle (quarter-wave address) width
  localparam int unsigned SEG_W = 3;    // 8 segments
  localparam int unsigned FRAC_W = TRI_W - SEG_W;

  logic [ACC_W-1:0] fcw_q;   // frequency register
  logic [ACC_W-1:0] phase;   // phase register

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcw_q <= '0;
      phase <= '0;
    end else begin
      fcw_q <= fcw;
      phase <= phase + fcw_q;
    end
  end

  // Complementor
  logic [TRI_W-1:0] tri_addr;
  assign tri_addr = phase[ACC_W-2] ? ~phase[ACC_W-3 -: TRI_W] : phase[ACC_W-3 -: TRI_W];

  // Segment ROM (MUX tree)
  logic [10:0] base;
  logic [8:0]  slope;
  always_comb begin
    unique case (tri_addr[TRI_W-1 -: SEG_W])
      3'd0: begin base = 11'd0;    slope = 9'd399; end
      3'd1: begin base = 11'd399;  slope = 9'd384; end
      3'd2: begin base = 11'd783;  slope = 9'd354; end
      3'd3: begin base = 11'd1137; slope = 9'd310; end
      3'd4: begin base = 11'd1447; slope = 9'd255; end
      3'd5: begin base = 11'd1702; slope = 9'd189; end
      3'd6: begin base = 11'd1891; slope = 9'd117; end
      default: begin base = 11'd2008; slope = 9'd39; end
    endcase
  end

  logic [15:0] interp;
  logic [10:0] mag;
  assign interp = 16'(slope) * 16'(tri_addr[FRAC_W-1:0]);
  assign mag    = base + 11'(interp >> FRAC_W);

  // Format converter: 11-bit magnitude scaled to OUT_W-1 bits, sign from MSB
  logic signed [OUT_W-1:0] mag_s;
  generate
    if (OUT_W - 1 >= 11) begin : g_wide
      assign mag_s = OUT_W'({mag, {(OUT_W-12){1'b0}}});
    end else begin : g_narrow
      assign mag_s = OUT_W'(mag >> (12 - OUT_W));
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= '0;
    else        sample <= phase[ACC_W-1] ? -mag_s : mag_s;
  end
endmodule
