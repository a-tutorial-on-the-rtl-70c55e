// spn_serial: fully serialised SPN encryption with a single S-box.
//
// The B-bit state sits in the selectable register. Each clock of a round's
// substitution phase, the output multiplexer picks one 4-bit sub-block, it
// is XORed with the matching 4 bits of the round key, passed through the
// one S-box and written back into the same sub-block; after B/4 such
// clocks one more clock applies the permutation inside the register. The
// last round differs from the others by a key mixing in place of the
// permutation. Here, as the serial design proposes, a second 4-bit key
// mixing sits behind the S-box: it adds zeros in rounds 1..R-1 and the
// matching bits of RK_{R+1} in round R; the permutation that round R still
// applies is undone by inverse-permutation wiring between the register and
// the output c.
//
// Use: pulse k_flag with the key on k; when ready, pulse p_flag with p.
// c_flag rises 1 + R*(B/4 + 1) clocks later (21 for the default 16-bit,
// 4-round SPN) and c holds the ciphertext until the next block or key.
// Defaults: the 16-bit SPN with a 20-bit key, ALPHA = 13, GAMMA = 8. The
// S-box is the compact 14-gate network by default (COMPACT = 1), the form
// that suits an area-driven design.
module spn_serial
  import spn_pkg::*;
#(
  parameter int unsigned B       = 16,
  parameter int unsigned KAPPA   = 20,
  parameter int unsigned R       = 4,
  parameter int unsigned ALPHA   = 13,
  parameter int unsigned GAMMA   = 8,
  parameter bit          COMPACT = 1'b1
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
  localparam int unsigned SW = $clog2(B / 4) + 1;
  localparam int unsigned LW = SW - 1;

  ks_ctrl_t      ks_ctrl;
  logic [SW-1:0] sel;
  logic          en, last_round;
  logic [B-1:0]  rk [2];        // RK_r and RK_{r+1}
  logic [B-1:0]  rk_state;
  rcnt_t         rcnt;
  logic [B-1:0]  d;
  nibble_t       sub_out, rk_nib, rk_last_nib, sbox_in, sbox_y, sbox_out;

  spn_serial_ctrl #(.B(B), .R(R)) u_ctrl (
    .clk, .rst_n, .k_flag, .p_flag, .ks_ctrl, .sel, .en, .last_round, .c_flag, .ready);

  spn_key_schedule #(.KAPPA(KAPPA), .B(B), .ALPHA(ALPHA), .GAMMA(GAMMA),
                     .STEPS(1), .LOOKAHEAD(1)) u_ks (
    .clk, .rst_n, .ctrl(ks_ctrl), .k, .rk, .rk_state, .rcnt);

  // Round-key bits of the sub-block being processed.
  always_comb begin
    rk_nib      = '0;
    rk_last_nib = '0;
    for (int j = 0; j < B / 4; j++) begin
      if (sel[LW-1:0] == LW'(j)) begin
        rk_nib      = rk[0][B-1-4*j -: 4];
        rk_last_nib = rk[1][B-1-4*j -: 4];
      end
    end
  end

  assign sbox_in = sub_out ^ rk_nib;

  if (COMPACT) begin : g_compact
    spn_sbox_compact u_sbox (.x(sbox_in), .y(sbox_y));
  end else begin : g_table
    spn_sbox #(.INVERSE(1'b0)) u_sbox (.x(sbox_in), .y(sbox_y));
  end

  assign sbox_out = sbox_y ^ (last_round ? rk_last_nib : 4'h0);

  spn_selectable_register #(.B(B), .SW(SW)) u_reg (
    .clk, .rst_n, .en, .sel, .sbox_out, .p, .d, .sub_out);

  // Inverse permutation wiring to the output.
  for (genvar i = 0; i < B; i++) begin : g_out
    assign c[i] = d[perm_dest(i, B)];
  end
endmodule
