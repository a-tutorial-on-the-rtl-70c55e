// spn_ref_pkg: bit-level reference model of the SPN, for testbenches only.
//
// Written independently of the RTL: the S-box is a case table, the
// permutation uses the form "bit 4q+s goes to s*(B/4)+q" (sub-block q,
// bit s within it), and the key schedule rotates bit by bit. Widths are
// run-time arguments on 128-bit containers so that one model serves the
// 16-bit and the 64-bit ciphers.
package spn_ref_pkg;

  typedef logic [127:0] word_t;

  function automatic logic [3:0] ref_sbox(input logic [3:0] x);
    case (x)
      4'h0: return 4'hC;  4'h1: return 4'h5;  4'h2: return 4'h6;  4'h3: return 4'hB;
      4'h4: return 4'h9;  4'h5: return 4'h0;  4'h6: return 4'hA;  4'h7: return 4'hD;
      4'h8: return 4'h3;  4'h9: return 4'hE;  4'hA: return 4'hF;  4'hB: return 4'h8;
      4'hC: return 4'h4;  4'hD: return 4'h7;  4'hE: return 4'h1;  default: return 4'h2;
    endcase
  endfunction

  function automatic logic [3:0] ref_inv_sbox(input logic [3:0] y);
    for (int v = 0; v < 16; v++) if (ref_sbox(4'(v)) == y) return 4'(v);
    return 4'h0;
  endfunction

  function automatic word_t ref_perm(input word_t d, input int b);
    word_t o = '0;
    for (int i = 0; i < b; i++) o[(i % 4) * (b / 4) + i / 4] = d[i];
    return o;
  endfunction

  function automatic word_t ref_inv_perm(input word_t d, input int b);
    word_t o = '0;
    for (int i = 0; i < b; i++) o[i] = d[(i % 4) * (b / 4) + i / 4];
    return o;
  endfunction

  function automatic word_t ref_subst(input word_t x, input int b);
    word_t o = x;
    for (int j = 0; j < b / 4; j++) o[4*j +: 4] = ref_sbox(x[4*j +: 4]);
    return o;
  endfunction

  function automatic word_t ref_mask(input int w);
    word_t m = '0;
    for (int i = 0; i < w; i++) m[i] = 1'b1;
    return m;
  endfunction

  // Full round: key mixing, substitution, permutation.
  function automatic word_t ref_round(input word_t d, input word_t rk, input int b);
    return ref_perm(ref_subst((d ^ rk) & ref_mask(b), b), b);
  endfunction

  // One key schedule step on a kappa-bit key state.
  function automatic word_t ref_ks_step(input word_t s, input int kappa, input int alpha,
                                        input int gamma, input int r);
    word_t t = '0;
    logic [3:0] top;
    for (int i = 0; i < kappa; i++) t[(i + alpha) % kappa] = s[i];
    for (int i = 0; i < 4; i++) top[i] = t[kappa - 4 + i];
    top = ref_sbox(top);
    for (int i = 0; i < 4; i++) t[kappa - 4 + i] = top[i];
    for (int i = 0; i < 5; i++) t[gamma - 4 + i] = t[gamma - 4 + i] ^ 1'(r >> i);
    return t;
  endfunction

  function automatic word_t ref_rk(input word_t s, input int kappa, input int b);
    return (s >> (kappa - b)) & ref_mask(b);
  endfunction

  // Round key r (1-based) of cipher key k.
  function automatic word_t ref_round_key(input word_t k, input int r, input int b, input int kappa,
                                          input int alpha, input int gamma);
    word_t s = k;
    for (int i = 1; i < r; i++) s = ref_ks_step(s, kappa, alpha, gamma, i);
    return ref_rk(s, kappa, b);
  endfunction

  // Encryption as the cipher defines it: R-1 full rounds, then key mixing,
  // substitution and a final key mixing.
  function automatic word_t ref_encrypt(input word_t p, input word_t k, input int b, input int kappa,
                                        input int rounds, input int alpha, input int gamma);
    word_t s = k;
    word_t d = p & ref_mask(b);
    for (int r = 1; r < rounds; r++) begin
      d = ref_round(d, ref_rk(s, kappa, b), b);
      s = ref_ks_step(s, kappa, alpha, gamma, r);
    end
    d = ref_subst(d ^ ref_rk(s, kappa, b), b);
    s = ref_ks_step(s, kappa, alpha, gamma, rounds);
    return d ^ ref_rk(s, kappa, b);
  endfunction

  function automatic word_t rand_word();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
