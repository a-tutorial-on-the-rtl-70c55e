// spn_selectable_register: the state register of the serial datapath.
//
// B bits held as B/4 sub-blocks of 4 bits; sub-block j = 0 is the leftmost
// (bits B-1..B-4). In front of each sub-block sits a 4-input multiplexer
// whose 2-bit select picks
//   00  the S-box output (shared by all sub-blocks),
//   01  the sub-block's own value (feedback, unchanged),
//   10  the matching 4 bits of the plaintext,
//   11  the 4 register bits that the permutation moves into this sub-block
//       (for the leftmost 16-bit sub-block: d15 d11 d7 d3),
// so a whole round's permutation is done in one clock. Behind the register
// an output multiplexer, driven by the low bits of sel, picks the sub-block
// that goes to the key mixing and S-box.
//
// sel = {mode, index} (3 bits for B = 16). mode 0: sub-block `index` takes
// the S-box output, all others feed back. mode 1, index 0: every sub-block
// loads plaintext; mode 1, any other index: every sub-block takes its
// permuted bits. For the leftmost sub-block this is select =
// {sel_msb, OR of the index bits}; the other sub-blocks decode their own
// index. The codes with mode 1 and index > 1 are unused by the controller.
// The register loads on the rising edge when en is high; the enable and
// the asynchronous active-low reset are this design's additions, so that
// the finished ciphertext can be held.
module spn_selectable_register
  import spn_pkg::*;
#(
  parameter int unsigned B  = 16,
  parameter int unsigned SW = $clog2(B / 4) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [SW-1:0] sel,
  input  nibble_t       sbox_out,
  input  logic [B-1:0]  p,
  output logic [B-1:0]  d,
  output nibble_t       sub_out
);
  localparam int unsigned NSUB = B / 4;

  logic [B-1:0] d_perm;   // register bits after the permutation wiring
  logic [B-1:0] d_next;

  for (genvar i = 0; i < B; i++) begin : g_perm
    assign d_perm[perm_dest(i, B)] = d[i];
  end

  for (genvar j = 0; j < NSUB; j++) begin : g_sub
    localparam int unsigned HI = B - 1 - 4 * j;   // top bit of sub-block j
    logic [1:0] msel;
    always_comb begin
      if (sel[SW-1]) msel = {1'b1, sel[SW-2:0] != '0};
      else           msel = {1'b0, sel[SW-2:0] != (SW-1)'(j)};
      unique case (msel)
        2'b00:   d_next[HI -: 4] = sbox_out;
        2'b01:   d_next[HI -: 4] = d[HI -: 4];
        2'b10:   d_next[HI -: 4] = p[HI -: 4];
        default: d_next[HI -: 4] = d_perm[HI -: 4];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= d_next;
  end

  always_comb begin
    sub_out = '0;
    for (int j = 0; j < NSUB; j++) begin
      if (sel[SW-2:0] == (SW-1)'(j)) sub_out = d[B-1-4*j -: 4];
    end
  end

  initial begin
    assert (B % 16 == 0 && B >= 16) else $error("spn_selectable_register: B must be a multiple of 16");
  end
endmodule
