// spn_sbox: the 4-bit S-box of the SPN as a lookup table.
//
// y = S(x), purely combinational, no clock. Written as a table so that
// synthesis is free to build it as minimised two-level (sum-of-products)
// logic, the low-delay form suited to the high-speed architectures
// (parallel, pipelined). The mapping is the cipher's S-box; the choice of
// describing it as a table is this design's own. With INVERSE = 1 the
// module computes the inverse S-box instead.
module spn_sbox
  import spn_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  nibble_t x,
  output nibble_t y
);
  always_comb begin
    y = INVERSE ? inv_sbox4(x) : sbox4(x);
  end
endmodule
