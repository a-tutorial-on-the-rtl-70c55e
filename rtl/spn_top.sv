// spn_top: the five SPN encryption architectures, the decryption engine
// and the CTR and CBC modes side by side.
//
// Each architecture is a complete encryption engine for the same cipher
// family with its own key, plaintext and ciphertext ports; only clock and
// reset are shared. They are alternatives on the area/throughput scale,
// collected in one top so that all of them can be built and compared:
//   it_*  basic iterative, 64-bit block, 80-bit key, 31 rounds,
//         one round per clock (31 clocks per block)
//   ur_*  loop unrolled, 16-bit block, 20-bit key, 4 rounds all
//         unrolled (one clock per block)
//   pa_*  parallel, four 64-bit iterative lanes on one key schedule
//         (4 blocks per 31 clocks)
//   pp_*  pipelined, 64-bit, 31 stages, all round keys precomputed
//         (one block per clock after 31 clocks of latency)
//   se_*  fully serial, 16-bit block, one compact S-box
//         (21 clocks per block)
//   dc_*  basic iterative decryption, 64-bit, stored round keys; takes
//         a ciphertext with dc_c_flag and gives the plaintext with
//         dc_p_flag 31 clocks later
//   ct_*  counter (CTR) mode on the pipeline: ct_ctr_flag/ct_ctr load the
//         starting counter, each block is XORed with the encrypted
//         counter (the same operation decrypts)
//   ce_*  cipher block chaining (CBC) encryption on an iterative engine
//   cd_*  CBC decryption on the iterative decryption engine; both CBC
//         sides load the initialisation vector with iv_flag/iv and take
//         a block with in_flag/din, giving the result on out_flag/dout
// The handshake of every engine is k_flag/k to load a key, p_flag/p to
// start a block (iterative-style engines take it only while ready is
// high), and c_flag/c for the result; see each module for its timing.
// Which engine gets which block size follows the examples the designs are
// described with; putting them in one top is this design's choice.
module spn_top (
  input  logic        clk,
  input  logic        rst_n,
  // basic iterative
  input  logic        it_k_flag,
  input  logic [79:0] it_k,
  input  logic        it_p_flag,
  input  logic [63:0] it_p,
  output logic        it_ready,
  output logic        it_c_flag,
  output logic [63:0] it_c,
  // loop unrolled
  input  logic        ur_k_flag,
  input  logic [19:0] ur_k,
  input  logic        ur_p_flag,
  input  logic [15:0] ur_p,
  output logic        ur_ready,
  output logic        ur_c_flag,
  output logic [15:0] ur_c,
  // parallel
  input  logic        pa_k_flag,
  input  logic [79:0] pa_k,
  input  logic        pa_p_flag,
  input  logic [63:0] pa_p [4],
  output logic        pa_ready,
  output logic        pa_c_flag,
  output logic [63:0] pa_c [4],
  // pipelined
  input  logic        pp_k_flag,
  input  logic [79:0] pp_k,
  output logic        pp_key_ready,
  input  logic        pp_p_flag,
  input  logic [63:0] pp_p,
  output logic        pp_c_flag,
  output logic [63:0] pp_c,
  // serial
  input  logic        se_k_flag,
  input  logic [19:0] se_k,
  input  logic        se_p_flag,
  input  logic [15:0] se_p,
  output logic        se_ready,
  output logic        se_c_flag,
  output logic [15:0] se_c,
  // basic iterative decryption
  input  logic        dc_k_flag,
  input  logic [79:0] dc_k,
  input  logic        dc_c_flag,
  input  logic [63:0] dc_c,
  output logic        dc_ready,
  output logic        dc_p_flag,
  output logic [63:0] dc_p,
  // CTR mode
  input  logic        ct_k_flag,
  input  logic [79:0] ct_k,
  output logic        ct_key_ready,
  input  logic        ct_ctr_flag,
  input  logic [63:0] ct_ctr,
  input  logic        ct_p_flag,
  input  logic [63:0] ct_p,
  output logic        ct_c_flag,
  output logic [63:0] ct_c,
  // CBC encryption
  input  logic        ce_k_flag,
  input  logic [79:0] ce_k,
  input  logic        ce_iv_flag,
  input  logic [63:0] ce_iv,
  input  logic        ce_in_flag,
  input  logic [63:0] ce_din,
  output logic        ce_ready,
  output logic        ce_out_flag,
  output logic [63:0] ce_dout,
  // CBC decryption
  input  logic        cd_k_flag,
  input  logic [79:0] cd_k,
  input  logic        cd_iv_flag,
  input  logic [63:0] cd_iv,
  input  logic        cd_in_flag,
  input  logic [63:0] cd_din,
  output logic        cd_ready,
  output logic        cd_out_flag,
  output logic [63:0] cd_dout
);
  spn_iterative u_iterative (
    .clk, .rst_n, .k_flag(it_k_flag), .k(it_k), .p_flag(it_p_flag), .p(it_p),
    .ready(it_ready), .c_flag(it_c_flag), .c(it_c));

  spn_unrolled u_unrolled (
    .clk, .rst_n, .k_flag(ur_k_flag), .k(ur_k), .p_flag(ur_p_flag), .p(ur_p),
    .ready(ur_ready), .c_flag(ur_c_flag), .c(ur_c));

  spn_parallel u_parallel (
    .clk, .rst_n, .k_flag(pa_k_flag), .k(pa_k), .p_flag(pa_p_flag), .p(pa_p),
    .ready(pa_ready), .c_flag(pa_c_flag), .c(pa_c));

  spn_pipeline u_pipeline (
    .clk, .rst_n, .k_flag(pp_k_flag), .k(pp_k), .key_ready(pp_key_ready),
    .p_flag(pp_p_flag), .p(pp_p), .c_flag(pp_c_flag), .c(pp_c));

  spn_serial u_serial (
    .clk, .rst_n, .k_flag(se_k_flag), .k(se_k), .p_flag(se_p_flag), .p(se_p),
    .ready(se_ready), .c_flag(se_c_flag), .c(se_c));

  spn_iterative_decrypt u_decrypt (
    .clk, .rst_n, .k_flag(dc_k_flag), .k(dc_k), .c_flag(dc_c_flag), .c(dc_c),
    .ready(dc_ready), .p_flag(dc_p_flag), .p(dc_p));

  spn_ctr u_ctr (
    .clk, .rst_n, .k_flag(ct_k_flag), .k(ct_k), .key_ready(ct_key_ready),
    .ctr_flag(ct_ctr_flag), .ctr(ct_ctr), .p_flag(ct_p_flag), .p(ct_p),
    .c_flag(ct_c_flag), .c(ct_c));

  spn_cbc #(.DECRYPT(1'b0)) u_cbc_enc (
    .clk, .rst_n, .k_flag(ce_k_flag), .k(ce_k), .iv_flag(ce_iv_flag), .iv(ce_iv),
    .in_flag(ce_in_flag), .din(ce_din), .ready(ce_ready), .out_flag(ce_out_flag), .dout(ce_dout));

  spn_cbc #(.DECRYPT(1'b1)) u_cbc_dec (
    .clk, .rst_n, .k_flag(cd_k_flag), .k(cd_k), .iv_flag(cd_iv_flag), .iv(cd_iv),
    .in_flag(cd_in_flag), .din(cd_din), .ready(cd_ready), .out_flag(cd_out_flag), .dout(cd_dout));
endmodule
