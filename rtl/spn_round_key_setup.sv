// spn_round_key_setup: round key setup - computes all R+1 round keys once
// per cipher key and holds them in registers.
//
// After k_flag (key on k) it runs the key schedule one step per clock and
// writes RK_1 .. RK_{R+1} into an (R+1) x B register array, one key per
// cycle; keys_valid rises R+1 cycles after k_flag and every round key is
// then available at the same time on rk[0..R] (rk[r-1] = RK_r). This is
// what the pipelined datapath needs, since all its stages work at once.
// The storage costs (R+1)*B bits (2048 for the 64-bit, 31-round SPN). A
// k_flag during setup restarts it. The write-one-key-per-cycle sequencing
// and the register (rather than RAM) storage are this design's choices.
module spn_round_key_setup
  import spn_pkg::*;
#(
  parameter int unsigned B     = 64,
  parameter int unsigned KAPPA = 80,
  parameter int unsigned R     = 31,
  parameter int unsigned ALPHA = 61,
  parameter int unsigned GAMMA = 19
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             k_flag,
  input  logic [KAPPA-1:0] k,
  output logic             keys_valid,
  output logic [B-1:0]     rk [R+1]
);
  localparam int unsigned IW = $clog2(R + 1);

  ks_ctrl_t      ks_ctrl;
  logic [B-1:0]  ks_rk [1];
  logic [B-1:0]  ks_rk_state;
  rcnt_t         ks_rcnt;
  logic          busy_q;
  logic [IW-1:0] idx_q;      // index of the round key written this cycle

  always_comb begin
    ks_ctrl          = '0;
    ks_ctrl.load_key = k_flag;
    ks_ctrl.advance  = busy_q && !k_flag;
  end

  spn_key_schedule #(.KAPPA(KAPPA), .B(B), .ALPHA(ALPHA), .GAMMA(GAMMA),
                     .STEPS(1), .LOOKAHEAD(0)) u_ks (
    .clk, .rst_n, .ctrl(ks_ctrl), .k, .rk(ks_rk), .rk_state(ks_rk_state), .rcnt(ks_rcnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      keys_valid <= 1'b0;
      idx_q      <= '0;
    end else if (k_flag) begin
      busy_q     <= 1'b1;
      keys_valid <= 1'b0;
      idx_q      <= '0;
    end else if (busy_q) begin
      idx_q <= idx_q + IW'(1);
      if (idx_q == IW'(R)) begin
        busy_q     <= 1'b0;
        keys_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy_q && !k_flag) rk[idx_q] <= ks_rk[0];
  end
endmodule
