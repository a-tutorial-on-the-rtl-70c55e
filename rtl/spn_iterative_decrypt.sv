// spn_iterative_decrypt: basic iterative decryption with stored round keys.
//
// Decryption runs the network backwards with the inverse S-box. It is
// written in the same shape as encryption: R rounds of key mixing, inverse
// substitution and inverse permutation, with the permutation of the last
// round undone by the output correction (forward permutation, then RK_1).
// For that shape the round keys are applied in reverse order, and all but
// the outer two have their bits reordered by the inverse permutation:
//     RK*_1 = RK_{R+1},  RK*_i = INV_PERM(RK_{R+2-i}) for 2 <= i <= R,
//     RK*_{R+1} = RK_1.
// (The 16-bit permutation is its own inverse; the 64-bit one is not.)
// Since the last round key is only reached by running the whole key
// schedule, the keys are computed once per key and stored (round key setup);
// the round key of each clock is read from that store.
//
// Interface: pulse k_flag with the key on k; ready rises when the R+1 round
// keys are stored (R+2 clocks after the k_flag edge). Then pulse c_flag with a ciphertext
// on c while ready is high; p_flag rises R clocks later with the plaintext
// on p, held until the next block or key, and a new block may be given in
// that clock. Flags while busy are ignored. The datapath, controller and
// key store are the encryption ones; the round key order follows the
// reverse structure of the cipher, and the interface is this design's own.
module spn_iterative_decrypt
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
  input  logic             c_flag,
  input  logic [B-1:0]     c,
  output logic             ready,
  output logic             p_flag,
  output logic [B-1:0]     p
);
  localparam int unsigned IW = $clog2(R + 1);

  ks_ctrl_t      ks_ctrl;        // unused: keys come from the store
  logic          sel, load, ctrl_ready, keys_valid, have_key_q, k_take;
  logic [B-1:0]  keys [R+1];     // keys[i] = RK_{i+1}
  logic [B-1:0]  rk [1];
  logic [B-1:0]  rk_sel, rk_perm, rk_q;
  logic [B-1:0]  d;              // decryption state register
  logic [IW-1:0] j_q, j_next;    // index into keys of this / the next clock's key

  // A key is taken when no block is under way.
  assign k_take = k_flag && (ctrl_ready || !have_key_q);
  assign ready  = ctrl_ready && keys_valid;

  spn_iter_ctrl #(.ITERS(R)) u_ctrl (
    .clk, .rst_n, .k_flag(k_take), .p_flag(c_flag && keys_valid), .ks_ctrl, .sel, .load,
    .c_flag(p_flag), .ready(ctrl_ready));

  spn_round_key_setup #(.B(B), .KAPPA(KAPPA), .R(R), .ALPHA(ALPHA), .GAMMA(GAMMA)) u_keys (
    .clk, .rst_n, .k_flag(k_take), .k, .keys_valid, .rk(keys));

  // The round key of the next clock is read from the store one clock
  // ahead and registered (rk_q), so the store's read multiplexer is off
  // the round path. The clock that takes c uses RK_{R+1} directly.
  assign j_next = (sel ? IW'(R) : j_q) - IW'(1);
  assign rk_sel = keys[j_next];
  for (genvar i = 0; i < B; i++) begin : g_rk_perm
    assign rk_perm[i] = rk_sel[perm_dest(i, B)];
  end
  assign rk[0] = sel ? keys[R] : rk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_q        <= '0;
      rk_q       <= '0;
      have_key_q <= 1'b0;
    end else begin
      if (load) begin
        j_q  <= j_next;
        rk_q <= rk_perm;
      end
      if (k_take) have_key_q <= 1'b1;
    end
  end

  spn_iter_datapath #(.B(B), .UNROLL(1), .COMPACT(1'b0), .INVERSE(1'b1)) u_dp (
    .clk, .rst_n, .sel, .load, .p(c), .rk, .rk_last(keys[0]), .d, .c(p));
endmodule
