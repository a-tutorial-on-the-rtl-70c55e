// spn_parallel: M basic iterative datapaths working side by side.
//
// M plaintext blocks p[0..M-1] are taken together on one p_flag and
// encrypted concurrently, each by its own multiplexer, round function,
// state register and last round correction. One controller and one key
// schedule serve all lanes, so every lane uses the same key. After R
// cycles all M ciphertexts c[0..M-1] are valid together under c_flag:
// M blocks every R cycles, for about M times the datapath area. The lane
// count M is not fixed by the architecture; 4 is this design's default.
// Use and timing as spn_iterative.
module spn_parallel
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter int unsigned KAPPA   = 80,
  parameter int unsigned R       = 31,
  parameter int unsigned ALPHA   = 61,
  parameter int unsigned GAMMA   = 19,
  parameter int unsigned M       = 4,
  parameter bit          COMPACT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             k_flag,
  input  logic [KAPPA-1:0] k,
  input  logic             p_flag,
  input  logic [B-1:0]     p [M],
  output logic             ready,
  output logic             c_flag,
  output logic [B-1:0]     c [M]
);
  ks_ctrl_t     ks_ctrl;
  logic         sel, load;
  logic [B-1:0] rk [1];
  logic [B-1:0] rk_last;
  rcnt_t        rcnt;

  spn_iter_ctrl #(.ITERS(R)) u_ctrl (
    .clk, .rst_n, .k_flag, .p_flag, .ks_ctrl, .sel, .load, .c_flag, .ready);

  spn_key_schedule #(.KAPPA(KAPPA), .B(B), .ALPHA(ALPHA), .GAMMA(GAMMA),
                     .STEPS(1), .LOOKAHEAD(0)) u_ks (
    .clk, .rst_n, .ctrl(ks_ctrl), .k, .rk, .rk_state(rk_last), .rcnt);

  for (genvar i = 0; i < M; i++) begin : g_lane
    logic [B-1:0] d;
    spn_iter_datapath #(.B(B), .UNROLL(1), .COMPACT(COMPACT)) u_dp (
      .clk, .rst_n, .sel, .load, .p(p[i]), .rk, .rk_last, .d, .c(c[i]));
  end
endmodule
