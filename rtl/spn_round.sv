// spn_round: one full SPN round as combinational logic.
//
//   d_next = PERMUTE( SBOX_LAYER( d ^ rk ) )
//
// Key mixing is B two-input XORs of state and round-key bits; the
// substitution layer is B/4 copies of the 4-bit S-box, S-box j taking
// bits 4j+3..4j (bit 4j+3 is S-box input x3); the permutation is wiring
// only: bit i of the S-box layer output goes to bit perm_dest(i). This is
// the round structure of the cipher. COMPACT selects the 14-gate S-box
// network instead of the table form; which S-box a given architecture uses
// is a parameter here, where the cipher fixes only the mapping. INVERSE
// builds the decryption round INV_PERMUTE( INV_SBOX_LAYER( d ^ rk ) )
// instead; its inverse S-box always uses the table form.
module spn_round
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter bit          COMPACT = 1'b0,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [B-1:0] d,
  input  logic [B-1:0] rk,
  output logic [B-1:0] d_next
);
  logic [B-1:0] x;   // after key mixing
  logic [B-1:0] y;   // after substitution

  assign x = d ^ rk;

  for (genvar j = 0; j < B / 4; j++) begin : g_sbox
    if (INVERSE) begin : g_inverse
      spn_sbox #(.INVERSE(1'b1)) u_sbox (.x(x[4*j +: 4]), .y(y[4*j +: 4]));
    end else if (COMPACT) begin : g_compact
      spn_sbox_compact u_sbox (.x(x[4*j +: 4]), .y(y[4*j +: 4]));
    end else begin : g_table
      spn_sbox #(.INVERSE(1'b0)) u_sbox (.x(x[4*j +: 4]), .y(y[4*j +: 4]));
    end
  end

  for (genvar i = 0; i < B; i++) begin : g_perm
    if (INVERSE) begin : g_inv
      assign d_next[i] = y[perm_dest(i, B)];
    end else begin : g_fwd
      assign d_next[perm_dest(i, B)] = y[i];
    end
  end

  initial begin
    assert (B % 16 == 0 && B >= 16) else $error("spn_round: B must be a multiple of 16");
  end
endmodule
