// MORUS-1280 constants and helper functions shared by the cipher datapath.
//
// MORUS-1280 keeps five 256-bit state blocks S0..S4. Each block is handled
// as four 64-bit words; word 0 sits in bits [63:0]. Two kinds of rotation are
// used: a rotation of every 64-bit word by b bits (the Rotl_256_64 operation)
// and a rotation of the whole 256-bit block by w bits, which with w a
// multiple of 64 only moves words around.
//
// The rotation amounts, the Fibonacci-derived constant loaded into S4 and the
// 16 initialization steps are those of the MORUS-1280 cipher family. How a
// 128-bit key and IV map onto words (key word K0 in the low 32 bits) is a
// choice of this design.
package morus_pkg;

  localparam int unsigned BLK_W      = 256;
  localparam int unsigned NUM_BLK    = 5;
  localparam int unsigned INIT_STEPS = 16;

  typedef logic [BLK_W-1:0] blk_t;
  // state[i] is block S_i
  typedef blk_t [NUM_BLK-1:0] state_t;

  // Per-round rotation of each 64-bit word (b0..b4) and of the whole block (w0..w4).
  localparam int unsigned B0 = 13, B1 = 46, B2 = 38, B3 = 7, B4 = 4;
  localparam int unsigned W0 = 64, W1 = 128, W2 = 192, W3 = 128, W4 = 64;

  // const0 || const1 (bytes 00 01 01 02 03 05 08 0d ... 28 dd) as four
  // little-endian 64-bit words, word 0 in the low bits.
  localparam blk_t CONST_S4 = {64'hdd28_b573_4231_1120, 64'hf12f_c26d_5518_3ddb,
                               64'h6279_e990_5937_2215, 64'h0d08_0503_0201_0100};

  // Rotate each 64-bit word of a block left by b bits (0 < b < 64).
  function automatic blk_t rotl_words(input blk_t x, input int unsigned b);
    blk_t r;
    for (int j = 0; j < 4; j++) begin
      r[64*j +: 64] = (x[64*j +: 64] << b) | (x[64*j +: 64] >> (64 - b));
    end
    return r;
  endfunction

  // Rotate a whole block left by w bits (0 < w < 256).
  function automatic blk_t rotl_blk(input blk_t x, input int unsigned w);
    return (x << w) | (x >> (BLK_W - w));
  endfunction

  // Keystream of one encryption step: S0 ^ (S1 <<< 192) ^ (S2 & S3).
  // The ciphertext is the plaintext XORed with it.
  function automatic blk_t keystream(input state_t s);
    return s[0] ^ rotl_blk(s[1], 192) ^ (s[2] & s[3]);
  endfunction

endpackage
