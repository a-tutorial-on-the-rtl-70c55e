// spn_ctr: counter (CTR) mode on the pipelined engine.
//
// In CTR mode the block cipher encrypts a running counter, not the data;
// the result is a keystream that is XORed with the plaintext. Counter values
// are known in advance, so the pipeline can take a new one every clock.
// Each block presented with p_flag sends the current counter into the
// pipeline and increments the counter; the plaintext travels beside the
// pipeline in a delay line of the same R stages, and meets its keystream
// block when it leaves: c = E_K(counter) ^ p. Decryption is the same
// operation with ciphertext in and plaintext out.
//
// Interface: k_flag/k load the key (key_ready rises when the pipeline's
// round keys are stored); ctr_flag/ctr loads the initial counter. After
// both, p_flag/p may be given every clock; c_flag/c follow R clocks later
// (31 at the default), one per clock. A block given before a counter has
// been loaded, or while key_ready is low, is ignored. A new key drops the
// blocks in flight, as the pipeline does. The counter is B bits and wraps.
// The mode follows its usual definition; the delay line, the counter
// increment of one per block and the flags are this design's own.
module spn_ctr
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
  output logic             key_ready,
  input  logic             ctr_flag,
  input  logic [B-1:0]     ctr,
  input  logic             p_flag,
  input  logic [B-1:0]     p,
  output logic             c_flag,
  output logic [B-1:0]     c
);
  logic [B-1:0] ctr_q;
  logic         have_ctr_q, take;
  logic [B-1:0] keystream;
  logic [B-1:0] pdelay [R];   // plaintext beside the pipeline stages

  assign take = p_flag && key_ready && have_ctr_q && !ctr_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctr_q      <= '0;
      have_ctr_q <= 1'b0;
    end else if (ctr_flag) begin
      ctr_q      <= ctr;
      have_ctr_q <= 1'b1;
    end else if (take) begin
      ctr_q <= ctr_q + B'(1);
    end
  end

  spn_pipeline #(.B(B), .KAPPA(KAPPA), .R(R), .ALPHA(ALPHA), .GAMMA(GAMMA)) u_pipe (
    .clk, .rst_n, .k_flag, .k, .key_ready, .p_flag(take), .p(ctr_q),
    .c_flag, .c(keystream));

  always_ff @(posedge clk) begin
    pdelay[0] <= p;
    for (int s = 1; s < R; s++) pdelay[s] <= pdelay[s-1];
  end

  assign c = keystream ^ pdelay[R-1];
endmodule
