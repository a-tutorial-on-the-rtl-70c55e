// spn_key_schedule: on-the-fly round key generation.
//
// Holds the kappa-bit cipher key and the kappa-bit key state K'. One key
// schedule step turns the key state of round r into that of round r+1:
//   1. rotate K' left by ALPHA,
//   2. replace its leftmost 4 bits by their S-box image,
//   3. XOR the 5-bit round count r into bits GAMMA..GAMMA-4.
// The round key RK_r is the leftmost B bits of the key state of round r.
// The step itself, its parameters and the rule "round key = leftmost B
// bits" are the cipher's; the control interface is this design's own.
//
// Interface (ctrl is a ks_ctrl_t):
//   load_key  capture k as the cipher key; the key state restarts from it.
//   start     the datapath is in round 1 this cycle: the "current" key
//             state is the stored cipher key instead of K', and the round
//             count is 1. Used so that a new block can start in the same
//             cycle in which the previous result is still being read.
//   advance   K' <= the key state STEPS steps after the current one.
//   rk[i]     round key of the current round + i, for i < STEPS+LOOKAHEAD,
//             combinational from the current state. STEPS > 1 serves the
//             unrolled datapath, LOOKAHEAD = 1 lets the serial datapath see
//             RK_{r+1} while it works on round r.
//   rk_state  leftmost B bits of the key state register itself: after the
//             R steps of an encryption it is the final round key RK_{R+1}.
// Priority: load_key, then advance, then start (start alone reloads K'
// from the cipher key). Registers update on the rising clock edge; rst_n is
// an asynchronous active-low reset that clears both key registers.
module spn_key_schedule
  import spn_pkg::*;
#(
  parameter int unsigned KAPPA     = 80,
  parameter int unsigned B         = 64,
  parameter int unsigned ALPHA     = 61,
  parameter int unsigned GAMMA     = 19,
  parameter int unsigned STEPS     = 1,
  parameter int unsigned LOOKAHEAD = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ks_ctrl_t             ctrl,
  input  logic [KAPPA-1:0]     k,
  output logic [B-1:0]         rk [STEPS+LOOKAHEAD],
  output logic [B-1:0]         rk_state,
  output rcnt_t                rcnt
);
  localparam int unsigned NK = STEPS + LOOKAHEAD;

  logic [KAPPA-1:0] key_q;     // cipher key
  logic [KAPPA-1:0] state_q;   // key state K'
  rcnt_t            r_q;       // round count belonging to state_q

  logic [KAPPA-1:0] chain [NK+1];
  rcnt_t            cur_r;

  function automatic logic [KAPPA-1:0] ks_step(input logic [KAPPA-1:0] s, input rcnt_t r);
    logic [KAPPA-1:0] t;
    t = (s << ALPHA) | (s >> (KAPPA - ALPHA));
    t[KAPPA-1 -: 4] = sbox4(t[KAPPA-1 -: 4]);
    t[GAMMA -: RCNT_W] = t[GAMMA -: RCNT_W] ^ r;
    return t;
  endfunction

  always_comb begin
    chain[0] = ctrl.start ? key_q : state_q;
    cur_r    = ctrl.start ? rcnt_t'(1) : r_q;
    for (int i = 0; i < NK; i++) begin
      chain[i+1] = ks_step(chain[i], cur_r + rcnt_t'(i));
    end
  end

  for (genvar i = 0; i < NK; i++) begin : g_rk
    assign rk[i] = chain[i][KAPPA-1 -: B];
  end

  assign rk_state = state_q[KAPPA-1 -: B];
  assign rcnt     = r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q   <= '0;
      state_q <= '0;
      r_q     <= rcnt_t'(1);
    end else if (ctrl.load_key) begin
      key_q   <= k;
      state_q <= k;
      r_q     <= rcnt_t'(1);
    end else if (ctrl.advance) begin
      state_q <= chain[STEPS];
      r_q     <= cur_r + rcnt_t'(STEPS);
    end else if (ctrl.start) begin
      state_q <= key_q;
      r_q     <= rcnt_t'(1);
    end
  end

  initial begin
    assert (KAPPA >= B) else $error("spn_key_schedule: KAPPA must be at least B");
    assert (GAMMA >= RCNT_W - 1 && GAMMA < KAPPA) else $error("spn_key_schedule: GAMMA out of range");
    assert (ALPHA > 0 && ALPHA < KAPPA) else $error("spn_key_schedule: ALPHA out of range");
  end
endmodule
