// spn_pkg: types, constants and pure functions shared by every SPN
// (substitution-permutation network) module.
//
// The cipher is the PRESENT-style SPN: a 4-bit S-box, a bit permutation
// that spreads the four output bits of each S-box over four different
// S-boxes of the next round, and XOR key mixing. The permutation is given
// for any block size B that is a multiple of 16 by the closed form
//     bit i  ->  (i * B/4) mod (B-1)   for i < B-1,   bit B-1 -> B-1
// which reproduces both the 16-bit and the 64-bit permutation tables of the
// SPNs this design implements. The 16-bit permutation is its own inverse,
// the 64-bit one is not (applied twice it maps i to 4i mod 63).
//
// The key schedule step is the generalised PRESENT schedule: rotate the
// kappa-bit key state left by ALPHA, pass the leftmost 4 bits through the
// S-box, and XOR the 5-bit round count into bits GAMMA..GAMMA-4. The round
// key of a round is the leftmost B bits of the key state.
//
// The S-box values, the permutation and the schedule follow the cipher
// definition; the closed-form permutation and the packaging as functions
// are this design's own.
package spn_pkg;

  // Width of the round count mixed into the key state (rounds < 32).
  localparam int unsigned RCNT_W = 5;

  typedef logic [3:0]        nibble_t;
  typedef logic [RCNT_W-1:0] rcnt_t;

  // 4-bit S-box (input index -> output), most significant entry first.
  localparam logic [63:0] SBOX_TABLE   = 64'h2174_8FE3_DA09_B65C;
  // Its inverse.
  localparam logic [63:0] INVSBOX_TABLE = 64'hA970_364B_D21C_8FE5;

  function automatic nibble_t sbox4(input nibble_t x);
    return SBOX_TABLE[{x, 2'b00} +: 4];
  endfunction

  function automatic nibble_t inv_sbox4(input nibble_t x);
    return INVSBOX_TABLE[{x, 2'b00} +: 4];
  endfunction

  // Destination of state bit i under the B-bit permutation.
  function automatic int unsigned perm_dest(input int unsigned i, input int unsigned b);
    if (i == b - 1) return b - 1;
    return (i * (b / 4)) % (b - 1);
  endfunction

  // Control bundle from a controller to the key schedule.
  typedef struct packed {
    logic load_key;  // capture the cipher key K (key state restarts from it)
    logic start;     // this cycle processes round 1: use the cipher key
    logic advance;   // step the key state on to the next round(s)
  } ks_ctrl_t;

  // Largest round count R the 5-bit count can hold (the count mixed in
  // runs from 1 to R).
  localparam int unsigned MAX_ROUNDS = (1 << RCNT_W) - 1;

endpackage
