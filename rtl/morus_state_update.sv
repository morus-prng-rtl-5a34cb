// MORUS-1280 StateUpdate, fully combinational.
//
// Five rounds, one per state block. Round r rewrites block S_r as
//   S_r = Rotl_256_64(S_r ^ (S_{r+1} & S_{r+2}) ^ S_{r+3} ^ m, b_r)
// (indices mod 5, the message m is left out of round 0) and then rotates
// block S_{r+3} as a whole by w_r bits. Later rounds use the blocks already
// rewritten by earlier ones, so the five rounds form a chain of AND/XOR
// layers; the whole update is evaluated in one clock cycle by the engine.
//
// Interface: s_in/s_out are the five blocks before and after the update,
// msg is the 256-bit message block. No clock, no latency.
//
// The round structure and constants follow the MORUS-1280 cipher; doing all
// five rounds in a single cycle is this design's choice.
module morus_state_update
  import morus_pkg::*;
(
  input  state_t s_in,
  input  blk_t   msg,
  output state_t s_out
);

  always_comb begin
    state_t s;
    s = s_in;
    // round 0
    s[0] = rotl_words(s[0] ^ (s[1] & s[2]) ^ s[3], B0);
    s[3] = rotl_blk(s[3], W0);
    // round 1
    s[1] = rotl_words(s[1] ^ (s[2] & s[3]) ^ s[4] ^ msg, B1);
    s[4] = rotl_blk(s[4], W1);
    // round 2
    s[2] = rotl_words(s[2] ^ (s[3] & s[4]) ^ s[0] ^ msg, B2);
    s[0] = rotl_blk(s[0], W2);
    // round 3
    s[3] = rotl_words(s[3] ^ (s[4] & s[0]) ^ s[1] ^ msg, B3);
    s[1] = rotl_blk(s[1], W3);
    // round 4
    s[4] = rotl_words(s[4] ^ (s[0] & s[1]) ^ s[2] ^ msg, B4);
    s[2] = rotl_blk(s[2], W4);
    s_out = s;
  end

endmodule
