// spn_last_round: last round correction, combinational.
//
//   c = INV_PERMUTE(d) ^ rk
//
// The iterative, unrolled, parallel and pipelined datapaths apply the same
// full round (with its permutation) in every round, although the cipher's
// last round ends with a key mixing instead of a permutation. This block
// sits between the final state register and the output: it undoes the
// permutation by wiring (bit perm_dest(i) of d goes back to bit i) and mixes
// in the final round key RK_{R+1}. No register: c is valid in the same
// cycle as d. With INVERSE (decryption, whose rounds apply the inverse
// permutation) the forward permutation is applied instead.
module spn_last_round
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [B-1:0] d,
  input  logic [B-1:0] rk,
  output logic [B-1:0] c
);
  logic [B-1:0] u;   // state with the permutation undone

  for (genvar i = 0; i < B; i++) begin : g_invperm
    if (INVERSE) begin : g_fwd
      assign u[perm_dest(i, B)] = d[i];
    end else begin : g_inv
      assign u[i] = d[perm_dest(i, B)];
    end
  end

  assign c = u ^ rk;
endmodule
