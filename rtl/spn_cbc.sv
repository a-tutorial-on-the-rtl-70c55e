// spn_cbc: cipher block chaining (CBC) mode on the basic iterative engines.
//
// CBC chains each block to the previous ciphertext: encryption sends
// P_i ^ C_{i-1} through the cipher, decryption computes
// P_i = D_K(C_i) ^ C_{i-1}, with C_0 the initialisation vector (IV). Each
// block needs the result of the one before, so the single-block iterative
// engine suits it. DECRYPT = 0 builds the encrypting side on spn_iterative,
// DECRYPT = 1 the decrypting side on spn_iterative_decrypt.
//
// Interface: k_flag/k load the key, iv_flag/iv the IV (taken when ready;
// in_flag is ignored in that clock). in_flag/din give a block (plaintext
// when encrypting, ciphertext when decrypting) while ready is high;
// out_flag/dout give the result R clocks later (31 at the default) and hold
// it until the next block starts. As with the engines, the next block may
// be given in the clock out_flag is high, so blocks follow each other every
// R clocks. The chaining follows the mode's definition; the register that
// keeps C_{i-1} and the flags are this design's own.
module spn_cbc
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter int unsigned KAPPA   = 80,
  parameter int unsigned R       = 31,
  parameter int unsigned ALPHA   = 61,
  parameter int unsigned GAMMA   = 19,
  parameter bit          DECRYPT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             k_flag,
  input  logic [KAPPA-1:0] k,
  input  logic             iv_flag,
  input  logic [B-1:0]     iv,
  input  logic             in_flag,
  input  logic [B-1:0]     din,
  output logic             ready,
  output logic             out_flag,
  output logic [B-1:0]     dout
);
  logic         take, iv_take;
  logic [B-1:0] chain_q;     // C_{i-1} (the IV before the first block)

  assign iv_take = iv_flag && ready;
  assign take    = in_flag && ready && !iv_flag && !k_flag;

  if (!DECRYPT) begin : g_enc
    logic         pending_q; // a block is running; its C is not yet in chain_q
    logic [B-1:0] chain_now;

    // The block given in the clock its predecessor finishes chains to the
    // ciphertext on the engine output, not yet in chain_q.
    assign chain_now = (pending_q && out_flag) ? dout : chain_q;

    spn_iterative #(.B(B), .KAPPA(KAPPA), .R(R), .ALPHA(ALPHA), .GAMMA(GAMMA)) u_eng (
      .clk, .rst_n, .k_flag, .k, .p_flag(take), .p(din ^ chain_now),
      .ready, .c_flag(out_flag), .c(dout));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        chain_q   <= '0;
        pending_q <= 1'b0;
      end else if (iv_take) begin
        chain_q   <= iv;
        pending_q <= 1'b0;
      end else begin
        if (pending_q && out_flag) chain_q <= dout;
        if (take)                  pending_q <= 1'b1;
        else if (out_flag)         pending_q <= 1'b0;
      end
    end
  end else begin : g_dec
    logic [B-1:0] mask_q;    // C_{i-1} of the block being decrypted
    logic [B-1:0] p_raw;

    spn_iterative_decrypt #(.B(B), .KAPPA(KAPPA), .R(R), .ALPHA(ALPHA), .GAMMA(GAMMA)) u_eng (
      .clk, .rst_n, .k_flag, .k, .c_flag(take), .c(din),
      .ready, .p_flag(out_flag), .p(p_raw));

    assign dout = p_raw ^ mask_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        chain_q <= '0;
        mask_q  <= '0;
      end else if (iv_take) begin
        chain_q <= iv;
      end else if (take) begin
        mask_q  <= chain_q;
        chain_q <= din;
      end
    end
  end
endmodule
