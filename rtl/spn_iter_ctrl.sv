// spn_iter_ctrl: controller of the iterative datapaths (basic iterative,
// loop-unrolled and parallel).
//
// A small state machine. K_flag (k_flag) says the cipher key is on K: the
// controller tells the key schedule to capture it. P_flag (p_flag) says a
// plaintext block is on P: the controller selects P into the round function
// (sel = 1), loads the state register and starts the key schedule; for the
// next ITERS-1 cycles it selects the register feedback (sel = 0) and steps
// the key schedule once per cycle. ITERS is the number of register loads per
// block: R for one round per cycle, R/m when m rounds are unrolled. After
// the last load it raises C_flag (c_flag), which stays high, with C valid,
// until the next block or key is accepted.
//
// Timing: p_flag accepted in cycle 0 -> c_flag high from cycle ITERS.
// A new p_flag is accepted whenever ready is high, including the cycle in
// which c_flag is high, so blocks can follow each other every ITERS cycles.
// p_flag while busy, and k_flag while busy, are ignored (ready low).
// The flags, the controller/datapath split and the sel multiplexer follow
// the basic iterative architecture; the ready output, the holding of
// C_flag and ignoring flags while busy are this design's own choices.
module spn_iter_ctrl
  import spn_pkg::*;
#(
  parameter int unsigned ITERS = 31
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     k_flag,
  input  logic     p_flag,
  output ks_ctrl_t ks_ctrl,
  output logic     sel,      // 1: round function takes P, 0: feedback
  output logic     load,     // state register enable
  output logic     c_flag,
  output logic     ready
);
  typedef enum logic [1:0] {NOKEY, IDLE, RUN, DONE} state_t;

  localparam int unsigned CW = (ITERS > 1) ? $clog2(ITERS) : 1;

  state_t        state_q, state_d;
  logic [CW-1:0] cnt_q, cnt_d;     // register loads done in this block

  logic accept_k, accept_p;

  assign ready    = (state_q == IDLE) || (state_q == DONE);
  assign accept_k = k_flag && (state_q != RUN);
  assign accept_p = p_flag && ready && !k_flag;

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    ks_ctrl = '0;
    sel     = 1'b0;
    load    = 1'b0;
    if (accept_k) begin
      ks_ctrl.load_key = 1'b1;
      state_d          = IDLE;
    end else if (accept_p) begin
      sel             = 1'b1;
      load            = 1'b1;
      ks_ctrl.start   = 1'b1;
      ks_ctrl.advance = 1'b1;
      cnt_d           = CW'(1);
      state_d         = (ITERS == 1) ? DONE : RUN;
    end else if (state_q == RUN) begin
      load            = 1'b1;
      ks_ctrl.advance = 1'b1;
      cnt_d           = cnt_q + CW'(1);
      if (cnt_q == CW'(ITERS - 1)) state_d = DONE;
    end
  end

  assign c_flag = (state_q == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= NOKEY;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  initial begin
    assert (ITERS >= 1 && ITERS <= MAX_ROUNDS) else $error("spn_iter_ctrl: ITERS out of range");
  end

  // The datapath only loads while a block is being processed.
  a_load_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (accept_p || state_q == RUN));
endmodule
