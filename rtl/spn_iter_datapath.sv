// spn_iter_datapath: input multiplexer, UNROLL chained round functions,
// state register and last round correction - the datapath shared by the
// basic iterative (UNROLL = 1), loop-unrolled (UNROLL = m) and parallel
// architectures. With INVERSE the rounds use the inverse S-box and the
// inverse permutation, and the output correction the forward permutation,
// which turns the same structure into the decryption datapath.
//
// Each cycle with load high, the register takes UNROLL rounds applied to
// either the plaintext p (sel = 1) or its own output (sel = 0), round j of
// the chain using rk[j]. The intermediate states between the unrolled
// rounds exist only as wires. The output c is the register passed through
// the last round correction with rk_last, combinationally; it is the
// ciphertext once the controller says the block is done. The structure is
// the one of the iterative architectures; the load enable and the
// asynchronous active-low reset of the register are this design's own.
module spn_iter_datapath
  import spn_pkg::*;
#(
  parameter int unsigned B       = 64,
  parameter int unsigned UNROLL  = 1,
  parameter bit          COMPACT = 1'b0,
  parameter bit          INVERSE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel,
  input  logic         load,
  input  logic [B-1:0] p,
  input  logic [B-1:0] rk [UNROLL],
  input  logic [B-1:0] rk_last,
  output logic [B-1:0] d,
  output logic [B-1:0] c
);
  logic [B-1:0] stage [UNROLL+1];

  assign stage[0] = sel ? p : d;

  for (genvar j = 0; j < UNROLL; j++) begin : g_round
    spn_round #(.B(B), .COMPACT(COMPACT), .INVERSE(INVERSE)) u_round (
      .d(stage[j]), .rk(rk[j]), .d_next(stage[j+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    d <= '0;
    else if (load) d <= stage[UNROLL];
  end

  spn_last_round #(.B(B), .INVERSE(INVERSE)) u_last (.d(d), .rk(rk_last), .c(c));
endmodule
