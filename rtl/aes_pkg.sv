// aes_pkg: types, constants and GF(2^8) helpers shared by the Rijndael
// cryptoprocessor (128-bit block, 128-bit key, Nr = 10 rounds).
//
// The 128-bit state is held with byte B0 in bits [127:120] and B15 in bits
// [7:0]; bytes fill the 4x4 state column by column (B0..B3 form column 0),
// which is the byte layout of the block and key states used throughout.
// Round key word W(i) of a 128-bit round key is bits [127:96], W(i+3) bits
// [31:0].
//
// The S-box tables are not typed in: they are computed at elaboration time
// from their definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the affine map), so the ROM contents follow the
// standard without a data file.
//
// The byte layout and the round count follow the original 128-bit design;
// computing the ROM images instead of listing them is this design's choice.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Number of rounds for Nb = 4, Nk = 4.
  localparam int unsigned NR = 10;

  // 256 x 8 look-up table, entry a in bits [8*a+7 : 8*a].
  typedef logic [255:0][7:0] rom256_t;

  // Control word of the round datapath. The names follow the control signals
  // of the original architecture; control3 and control7 only steer a value to one
  // of two consumers and are realised as plain fan-out, and control4 is not
  // needed because ShiftRow always starts from the state register.
  typedef struct packed {
    logic dec;      // control5/control6 (cod_dec): 1 = inverse transforms
    logic c1_fb;    // control1: 0 = data in, 1 = MixColumn output feedback
    logic c2_bs;    // control2: 0 = control1 path, 1 = ByteSub output
    logic c8_ark;   // control8: 0 = ByteSub output, 1 = ByteSub output ^ key
    logic c9_mc;    // control9: state register takes 0 = AddRoundKey, 1 = MixColumn
    logic st_en;    // state register load enable
  } core_ctrl_t;

  // Multiply by x modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Divide by x (inverse of xtime), used to step RCON backwards.
  function automatic byte_t inv_xtime(byte_t a);
    return a[0] ? ({1'b0, a[7:1]} ^ 8'h8d) : {1'b0, a[7:1]};
  endfunction

  // General GF(2^8) product by shift and add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t s);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = s[(i+2)%8] ^ s[(i+5)%8] ^ s[(i+7)%8];
    return b ^ 8'h05;
  endfunction

  function automatic rom256_t gen_sbox();
    rom256_t t;
    for (int a = 0; a < 256; a++) t[a] = affine(gf_inv(byte_t'(a)));
    return t;
  endfunction

  function automatic rom256_t gen_inv_sbox();
    rom256_t t;
    for (int a = 0; a < 256; a++) t[a] = gf_inv(inv_affine(byte_t'(a)));
    return t;
  endfunction

  // The two ROM images, evaluated once for all ROM instances.
  localparam rom256_t SBOX_TABLE     = gen_sbox();
  localparam rom256_t INV_SBOX_TABLE = gen_inv_sbox();

  // ROT of the key schedule: cyclic one-byte left rotation of a word.
  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
