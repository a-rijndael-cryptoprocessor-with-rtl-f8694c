// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is built from log/antilog
// tables of the generator 03, the state is handled as a 4x4 byte matrix, and
// the cipher and inverse cipher follow the textbook round order. The
// byte order matches the RTL: byte Bk of a 128-bit value is bits
// [127-8k -: 8], B0..B3 form column 0.
package aes_ref_pkg;

  typedef logic [7:0] u8;
  typedef u8 tab_t [256];
  typedef logic [127:0] rkeys_t [11];

  function automatic u8 mul2(u8 a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    u8 r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic tab_t make_sbox();
    tab_t ex, lg, s;
    u8 p = 1;
    for (int i = 0; i < 255; i++) begin
      ex[i] = p;
      lg[p] = u8'(i);
      p = p ^ mul2(p);            // p *= 03
    end
    for (int a = 0; a < 256; a++) begin
      u8 inv, x;
      inv = (a == 0) ? 8'h00 : ex[(255 - int'(lg[a])) % 255];
      x = inv;
      // s = inv ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 63
      s[a] = inv ^ {x[6:0], x[7]} ^ {x[5:0], x[7:6]} ^ {x[4:0], x[7:5]} ^ {x[3:0], x[7:4]} ^ 8'h63;
    end
    return s;
  endfunction

  function automatic tab_t make_inv_sbox();
    tab_t s = make_sbox(), si;
    for (int a = 0; a < 256; a++) si[s[a]] = u8'(a);
    return si;
  endfunction

  function automatic u8 getb(logic [127:0] v, int r, int c);
    return v[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] v, bit inv);
    tab_t s = inv ? make_inv_sbox() : make_sbox();
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = s[v[127-8*k -: 8]];
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inv);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = inv ? getb(v, r, (c + 4 - r) % 4) : getb(v, r, (c + r) % 4);
    return o;
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] w, bit inv);
    u8 a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    if (!inv)
      return {mul(a0,2)^mul(a1,3)^a2^a3, a0^mul(a1,2)^mul(a2,3)^a3,
              a0^a1^mul(a2,2)^mul(a3,3), mul(a0,3)^a1^a2^mul(a3,2)};
    return {mul(a0,14)^mul(a1,11)^mul(a2,13)^mul(a3,9), mul(a0,9)^mul(a1,14)^mul(a2,11)^mul(a3,13),
            mul(a0,13)^mul(a1,9)^mul(a2,14)^mul(a3,11), mul(a0,11)^mul(a1,13)^mul(a2,9)^mul(a3,14)};
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] v, bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = mix_col(v[127-32*c -: 32], inv);
    return o;
  endfunction

  function automatic rkeys_t expand_key(logic [127:0] key);
    logic [31:0] w [44];
    tab_t s = make_sbox();
    u8 rc = 1;
    rkeys_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {s[t[31:24]], s[t[23:16]], s[t[15:8]], s[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    rkeys_t rk = expand_key(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    rkeys_t rk = expand_key(key);
    logic [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
