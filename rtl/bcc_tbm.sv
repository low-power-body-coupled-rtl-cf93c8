// bcc_tbm: traceback module of the Viterbi decoder.
//
// A memory of STEPS decision vectors (16 bits each, one bit per trellis
// state) is written at the address given by a step counter, one vector per
// received codeword. When the vector of the last trellis step of a frame
// has been written, the traceback starts from state 0 (the frame ends with
// zero tail bits, so state 0 is the end of the optimum path) and walks back
// one step per cycle: the input bit of step t is the top bit of the state
// reached by it, and the decision bit of that state at step t gives the
// bottom bit of the state before it. The N_DATA data bits found on the way
// are collected into a block; `blk_valid` pulses for one cycle with the
// block (bit t = data bit t) when the walk reaches step 0.
//
// The source design gives the memory, the counter, the 16-bit decision
// vectors and the 20-bit output block. Tail termination and tracing back a
// whole frame at once are this design's choices.
//
// Timing: the traceback takes STEPS cycles; `busy` is high meanwhile.
// Decision vectors arriving while busy are ignored; the frame format leaves
// far more time between frames than the traceback needs, and an assertion
// flags a vector that arrives during a traceback.
module bcc_tbm
  import bcc_pkg::*;
#(
  parameter int unsigned N_DATA = 20,
  parameter int unsigned STEPS  = N_DATA + TAIL_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                dec_valid,
  input  logic [N_STATES-1:0] dec,
  output logic [N_DATA-1:0]   blk,
  output logic                blk_valid,
  output logic                busy
);
  localparam int unsigned A_W = $clog2(STEPS);

  logic [N_STATES-1:0] mem [STEPS];
  logic [A_W-1:0]      wcnt;       // write counter
  logic [A_W-1:0]      raddr;      // traceback address
  ce_state_t           st;         // state on the traced path
  logic [N_STATES-1:0] rd;

  assign rd = mem[raddr];

  always_ff @(posedge clk) begin
    if (dec_valid && !busy) mem[wcnt] <= dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      raddr     <= '0;
      st        <= '0;
      busy      <= 1'b0;
      blk       <= '0;
      blk_valid <= 1'b0;
    end else begin
      blk_valid <= 1'b0;
      if (clear) begin
        wcnt <= '0;
        busy <= 1'b0;
      end else if (busy) begin
        if (raddr < A_W'(N_DATA)) blk[raddr] <= st[CE_MEM-1];
        st <= {st[CE_MEM-2:0], rd[st]};
        if (raddr == '0) begin
          busy      <= 1'b0;
          blk_valid <= 1'b1;
        end else begin
          raddr <= raddr - 1'b1;
        end
      end else if (dec_valid) begin
        if (wcnt == A_W'(STEPS-1)) begin
          wcnt  <= '0;
          raddr <= A_W'(STEPS-1);
          st    <= '0;
          busy  <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

  // Handshake rule: no decision vector while the traceback runs.
  a_no_dec_while_busy: assert property (
    @(posedge clk) disable iff (!rst_n) (dec_valid && !clear) |-> !busy)
    else $error("decision vector dropped during traceback");
endmodule
