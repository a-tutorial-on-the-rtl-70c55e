// spn_unrolled: SPN encryption with M rounds unrolled per clock.
//
// Same organisation as the basic iterative design, but the combinational
// logic between the multiplexer and the state register is M round functions
// in a chain, fed by M round keys (RK_A..RK_D for M = 4) that the key
// schedule produces together by chaining M key schedule steps. A block
// takes R/M register loads; R must be a multiple of M. The defaults are the
// 4-round 16-bit SPN with 4 rounds unrolled, so a block completes in a
// single clock (the "m = R" end of the range); larger R, or the 64-bit SPN,
// are set by parameters.
//
// Use and timing as spn_iterative, with R/M cycles in place of R.
module spn_unrolled
  import spn_pkg::*;
#(
  parameter int unsigned B       = 16,
  parameter int unsigned KAPPA   = 20,
  parameter int unsigned R       = 4,
  parameter int unsigned ALPHA   = 13,
  parameter int unsigned GAMMA   = 8,
  parameter int unsigned M       = 4,
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
  logic [B-1:0] rk [M];
  logic [B-1:0] rk_last;
  logic [B-1:0] d;
  rcnt_t        rcnt;

  spn_iter_ctrl #(.ITERS(R / M)) u_ctrl (
    .clk, .rst_n, .k_flag, .p_flag, .ks_ctrl, .sel, .load, .c_flag, .ready);

  spn_key_schedule #(.KAPPA(KAPPA), .B(B), .ALPHA(ALPHA), .GAMMA(GAMMA),
                     .STEPS(M), .LOOKAHEAD(0)) u_ks (
    .clk, .rst_n, .ctrl(ks_ctrl), .k, .rk, .rk_state(rk_last), .rcnt);

  spn_iter_datapath #(.B(B), .UNROLL(M), .COMPACT(COMPACT)) u_dp (
    .clk, .rst_n, .sel, .load, .p, .rk, .rk_last, .d, .c);

  initial begin
    assert (M >= 1 && R % M == 0) else $error("spn_unrolled: R must be a multiple of M");
  end
endmodule
