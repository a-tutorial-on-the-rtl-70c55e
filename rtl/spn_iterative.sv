// spn_iterative: basic iterative SPN encryption, one round per clock.
//
// One round function in hardware, a B-bit state register fed back through
// a 2:1 multiplexer, an on-the-fly key schedule and a last round
// correction at the output. The defaults are the 64-bit SPN with an
// 80-bit key and 31 rounds (the PRESENT-80 configuration).
//
// Use: pulse k_flag with the key on k (once per key). When ready is high,
// pulse p_flag with a block on p. The first round is computed from p in
// that cycle; R cycles later c_flag rises and c holds the ciphertext until
// the next block or key is accepted. Latency R cycles, one block every R
// cycles when p_flag is given as soon as ready allows. This follows the
// basic iterative architecture; ready, the flag handshake details and the
// reset are this design's choices (see spn_iter_ctrl).
module spn_iterative
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter int unsigned KAPPA   = 80,
  parameter int unsigned R       = 31,
  parameter int unsigned ALPHA   = 61,
  parameter int unsigned GAMMA   = 19,
  parameter bit          COMPACT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             k_flag,
  input  logic [KAPPA-1:0] k,
  input  logic             p_flag,
  input  logic [B-1:0]     p,
  output logic             ready,
  output logic             c_flag,
  output logic [B-1:0]     c
);
  ks_ctrl_t     ks_ctrl;
  logic         sel, load;
  logic [B-1:0] rk [1];
  logic [B-1:0] rk_last;
  logic [B-1:0] d;
  rcnt_t        rcnt;

  spn_iter_ctrl #(.ITERS(R)) u_ctrl (
    .clk, .rst_n, .k_flag, .p_flag, .ks_ctrl, .sel, .load, .c_flag, .ready);

  spn_key_schedule #(.KAPPA(KAPPA), .B(B), .ALPHA(ALPHA), .GAMMA(GAMMA),
                     .STEPS(1), .LOOKAHEAD(0)) u_ks (
    .clk, .rst_n, .ctrl(ks_ctrl), .k, .rk, .rk_state(rk_last), .rcnt);

  spn_iter_datapath #(.B(B), .UNROLL(1), .COMPACT(COMPACT)) u_dp (
    .clk, .rst_n, .sel, .load, .p, .rk, .rk_last, .d, .c);
endmodule
