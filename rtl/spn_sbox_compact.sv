// spn_sbox_compact: the same 4-bit S-box as spn_sbox, built from the
// 14-gate network of two-input gates (9 XOR, 2 AND, 2 OR) and one
// inverter.
//
// Combinational, no clock. The network computes y0 first and derives the
// other three outputs from shared temporaries; its longest path is eight
// gates deep, so it is smaller but slower than a two-level table. The
// gate sequence is the published minimised form of this S-box; signal
// names t1..t4 follow its temporaries, each reassignment given a new name
// here because hardware wires cannot be reassigned.
module spn_sbox_compact
  import spn_pkg::*;
(
  input  nibble_t x,
  output nibble_t y
);
  logic t1a, t2a, t3, t2b, t1b, t2c, t4a, t4b, t2d, t2e;

  always_comb begin
    // y0 = x0 ^ x3 ^ x2 & (x1 ^ x2)
    t1a  = x[1] ^ x[2];
    t2a  = x[2] & t1a;
    t3   = x[3] ^ t2a;
    y[0] = x[0] ^ t3;
    // y1
    t2b  = t1a & t3;
    t1b  = t1a ^ y[0];
    t2c  = t2b ^ x[2];
    t4a  = x[0] | t2c;
    y[1] = t1b ^ t4a;
    // y3
    t4b  = ~x[0];
    t2d  = t2c ^ t4b;
    y[3] = y[1] ^ t2d;
    // y2
    t2e  = t2d | t1b;
    y[2] = t2e ^ t3;
  end
endmodule
