// spn_serial_ctrl: controller of the fully serial datapath.
//
// The clock in which p_flag is accepted loads the plaintext (sel = {1,0});
// then, for each of the R rounds one clock per 4-bit sub-block, leftmost
// first (sel = {0,j}, j = 0..B/4-1), and one clock for the permutation
// (sel = {1,1}), during which the key schedule steps to the next round:
// 1 + R*(B/4 + 1) clocks per block (21 for the 16-bit, 4-round SPN):
// p_flag in clock 0, c_flag from clock 21. In
// the sub-block clocks of round R, last_round is high so that the final
// round key is mixed in behind the S-box. c_flag rises when the block is
// done and stays high, with the ciphertext held, until the next key or
// block is accepted. p_flag and k_flag are taken only when ready is high
// (between blocks). The sel encoding and the 5-clocks-per-round schedule
// follow the serial design; ready, en and holding c_flag are this
// design's own.
module spn_serial_ctrl
  import spn_pkg::*;
#(
  parameter int unsigned B  = 16,
  parameter int unsigned R  = 4,
  parameter int unsigned SW = $clog2(B / 4) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          k_flag,
  input  logic          p_flag,
  output ks_ctrl_t      ks_ctrl,
  output logic [SW-1:0] sel,
  output logic          en,          // selectable register load enable
  output logic          last_round,  // mix RK_{R+1} behind the S-box
  output logic          c_flag,
  output logic          ready
);
  localparam int unsigned NSUB = B / 4;
  localparam int unsigned LW   = SW - 1;

  typedef enum logic [1:0] {NOKEY, IDLE, SUB, PERM} state_t;

  logic done_q;   // IDLE with a finished block in the register

  state_t          state_q;
  logic [LW-1:0]   idx_q;     // sub-block in the SUB state
  rcnt_t           round_q;   // current round, 1..R

  assign ready      = (state_q == IDLE);
  assign c_flag     = (state_q == IDLE) && done_q;
  assign last_round = (state_q == SUB) && (round_q == rcnt_t'(R));

  always_comb begin
    ks_ctrl = '0;
    sel     = '0;
    en      = 1'b0;
    unique case (state_q)
      SUB: begin
        sel = {1'b0, idx_q};
        en  = 1'b1;
      end
      PERM: begin
        sel             = {1'b1, LW'(1)};
        en              = 1'b1;
        ks_ctrl.advance = 1'b1;
      end
      default: ;
    endcase
    if (k_flag && (ready || state_q == NOKEY)) begin
      ks_ctrl.load_key = 1'b1;
    end else if (ready && p_flag) begin
      sel           = {1'b1, LW'(0)};   // load the plaintext
      en            = 1'b1;
      ks_ctrl.start = 1'b1;             // key state back to the cipher key
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= NOKEY;
      done_q  <= 1'b0;
      idx_q   <= '0;
      round_q <= rcnt_t'(1);
    end else begin
      unique case (state_q)
        NOKEY: if (k_flag) state_q <= IDLE;
        IDLE: begin
          if (k_flag) begin
            done_q <= 1'b0;
          end else if (p_flag) begin
            state_q <= SUB;
            done_q  <= 1'b0;
            idx_q   <= '0;
            round_q <= rcnt_t'(1);
          end
        end
        SUB: begin
          if (idx_q == LW'(NSUB - 1)) state_q <= PERM;
          idx_q <= idx_q + LW'(1);
        end
        PERM: begin
          idx_q <= '0;
          if (round_q == rcnt_t'(R)) begin
            state_q <= IDLE;
            done_q  <= 1'b1;
          end else begin
            state_q <= SUB;
            round_q <= round_q + rcnt_t'(1);
          end
        end
        default: state_q <= NOKEY;
      endcase
    end
  end

  initial begin
    assert (R >= 1 && R <= MAX_ROUNDS) else $error("spn_serial_ctrl: R out of range");
  end

  // Only the codes of the serial schedule are ever driven.
  a_sel_legal: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (!sel[SW-1] || sel[LW-1:0] <= LW'(1)));
endmodule
