// spn_pipeline: fully pipelined SPN encryption, one round per stage by default.
//
// R round functions in a row, each followed by its own B-bit state register
// D_1..D_R, then the last round correction with RK_{R+1} and no register.
// With RPS > 1 a stage holds RPS consecutive rounds and registers sit only
// between stages, giving R/RPS stages (R must be a multiple of RPS): fewer
// registers and clocks of latency, but a longer path per clock.
// Round keys come from spn_round_key_setup, which holds all of them at once.
// Every register loads on every rising edge (no feedback, no multiplexer):
// a block on p in cycle t is in D_1 in cycle t+1 and comes out on c in
// cycle t+R/RPS, and a new block can enter in every cycle. A valid bit travels
// with each block; c_flag is the valid bit of D_R. p_flag is ignored until
// key_ready is high, and a new key (k_flag) drops the valid bits of the
// blocks in flight, since their remaining rounds would use the new keys.
// Stage structure, timing and rounds per stage follow the pipelined
// architecture; the valid
// bits, key_ready and the flush on a key change are this design's choices.
// Defaults: 64-bit, 80-bit key, 31 rounds and stages (RPS = 1).
module spn_pipeline
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter int unsigned KAPPA   = 80,
  parameter int unsigned R       = 31,
  parameter int unsigned ALPHA   = 61,
  parameter int unsigned GAMMA   = 19,
  parameter bit          COMPACT = 1'b0,
  parameter int unsigned RPS     = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             k_flag,
  input  logic [KAPPA-1:0] k,
  output logic             key_ready,
  input  logic             p_flag,
  input  logic [B-1:0]     p,
  output logic             c_flag,
  output logic [B-1:0]     c
);
  localparam int unsigned NS = R / RPS;   // pipeline stages

  logic [B-1:0]  rk [R+1];
  logic [B-1:0]  stage_in [R];   // input of round function r+1
  logic [B-1:0]  stage_out [R];  // output of round function r+1
  logic [B-1:0]  dreg [NS];      // state register behind stage s+1
  logic [NS-1:0] valid_q;

  spn_round_key_setup #(.B(B), .KAPPA(KAPPA), .R(R), .ALPHA(ALPHA), .GAMMA(GAMMA)) u_keys (
    .clk, .rst_n, .k_flag, .k, .keys_valid(key_ready), .rk);

  for (genvar s = 0; s < R; s++) begin : g_stage
    if (s == 0) begin : g_first
      assign stage_in[s] = p;
    end else if (s % RPS == 0) begin : g_next
      assign stage_in[s] = dreg[s/RPS - 1];
    end else begin : g_chain
      assign stage_in[s] = stage_out[s-1];
    end
    spn_round #(.B(B), .COMPACT(COMPACT)) u_round (
      .d(stage_in[s]), .rk(rk[s]), .d_next(stage_out[s]));
    if ((s + 1) % RPS == 0) begin : g_reg
      always_ff @(posedge clk) dreg[s/RPS] <= stage_out[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid_q <= '0;
    else if (k_flag) valid_q <= '0;
    else             valid_q <= {valid_q[NS-2:0], p_flag && key_ready};
  end

  assign c_flag = valid_q[NS-1];

  spn_last_round #(.B(B)) u_last (.d(dreg[NS-1]), .rk(rk[R]), .c(c));

  initial begin
    assert (NS >= 2) else $error("spn_pipeline: needs at least two stages");
    assert (R % RPS == 0) else $error("spn_pipeline: R must be a multiple of RPS");
  end
endmodule
