// Reference model of MORUS-1280-128 used by the testbenches.
//
// Written independently of the RTL, in the style of a software
// implementation: the state is an array of 5 x 4 64-bit words and every
// round is spelled out word by word, with whole-block rotations done as word
// moves. It also models the PRNG use of the cipher: Initialize with a 128-bit
// key (four 32-bit words, K0 least significant) and a fixed IV, then
// encryption of a 128-bit counter, of which the low 128 ciphertext bits are
// kept as four 32-bit numbers.
package tb_morus_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t st_t [5][4];

  function automatic w64_t rl(w64_t x, int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  function automatic void upd(ref st_t s, input w64_t m [4]);
    w64_t t;
    for (int i = 0; i < 4; i++) s[0][i] = rl(s[0][i] ^ s[3][i] ^ (s[1][i] & s[2][i]), 13);
    t = s[3][3]; s[3][3] = s[3][2]; s[3][2] = s[3][1]; s[3][1] = s[3][0]; s[3][0] = t;
    for (int i = 0; i < 4; i++) s[1][i] = rl(s[1][i] ^ m[i] ^ s[4][i] ^ (s[2][i] & s[3][i]), 46);
    t = s[4][3]; s[4][3] = s[4][1]; s[4][1] = t;
    t = s[4][2]; s[4][2] = s[4][0]; s[4][0] = t;
    for (int i = 0; i < 4; i++) s[2][i] = rl(s[2][i] ^ m[i] ^ s[0][i] ^ (s[3][i] & s[4][i]), 38);
    t = s[0][0]; s[0][0] = s[0][1]; s[0][1] = s[0][2]; s[0][2] = s[0][3]; s[0][3] = t;
    for (int i = 0; i < 4; i++) s[3][i] = rl(s[3][i] ^ m[i] ^ s[1][i] ^ (s[4][i] & s[0][i]), 7);
    t = s[1][3]; s[1][3] = s[1][1]; s[1][1] = t;
    t = s[1][2]; s[1][2] = s[1][0]; s[1][0] = t;
    for (int i = 0; i < 4; i++) s[4][i] = rl(s[4][i] ^ m[i] ^ s[2][i] ^ (s[0][i] & s[1][i]), 4);
    t = s[2][3]; s[2][3] = s[2][2]; s[2][2] = s[2][1]; s[2][1] = s[2][0]; s[2][0] = t;
  endfunction

  // Pack/unpack between the word array and 5 x 256-bit vectors (block i in
  // bits [256*i +: 256], word j of a block in bits [64*j +: 64]).
  function automatic logic [1279:0] pack(st_t s);
    logic [1279:0] v;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 4; j++) v[256*i + 64*j +: 64] = s[i][j];
    return v;
  endfunction

  function automatic void unpack(logic [1279:0] v, ref st_t s);
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 4; j++) s[i][j] = v[256*i + 64*j +: 64];
  endfunction

  // Initialize: S0 = IV || 0, S1 = K || K, S2 = 1s, S3 = 0, S4 = constants,
  // 16 updates with a zero message, then S1 ^= K || K.
  function automatic void init(ref st_t s, input logic [31:0] k [4], input logic [127:0] iv);
    w64_t z [4];
    w64_t kk [4];
    kk[0] = {k[1], k[0]}; kk[1] = {k[3], k[2]}; kk[2] = kk[0]; kk[3] = kk[1];
    for (int j = 0; j < 4; j++) z[j] = '0;
    s[0][0] = iv[63:0]; s[0][1] = iv[127:64]; s[0][2] = '0; s[0][3] = '0;
    for (int j = 0; j < 4; j++) begin
      s[1][j] = kk[j];
      s[2][j] = '1;
      s[3][j] = '0;
    end
    s[4][0] = 64'h0d08050302010100; s[4][1] = 64'h6279e99059372215;
    s[4][2] = 64'hf12fc26d55183ddb; s[4][3] = 64'hdd28b57342311120;
    for (int r = 0; r < 16; r++) upd(s, z);
    for (int j = 0; j < 4; j++) s[1][j] ^= kk[j];
  endfunction

  // One Generate step: encrypt the counter, return the four numbers
  // (number 0 in bits [31:0]) and advance the state.
  function automatic logic [127:0] gen_step(ref st_t s, input logic [127:0] ctr);
    w64_t m [4];
    logic [127:0] c;
    m[0] = ctr[63:0]; m[1] = ctr[127:64]; m[2] = '0; m[3] = '0;
    c[63:0]   = m[0] ^ s[0][0] ^ s[1][1] ^ (s[2][0] & s[3][0]);
    c[127:64] = m[1] ^ s[0][1] ^ s[1][2] ^ (s[2][1] & s[3][1]);
    upd(s, m);
    return c;
  endfunction

endpackage
