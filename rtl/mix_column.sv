// mix_column: MixColumn / inverse MixColumn of one 4-byte state column.
//
// Each output byte is the XOR of the four input bytes a3..a0, each multiplied
// by a constant of the fixed polynomial: c(x) = 03x^3 + 01x^2 + 01x + 02 for
// encryption and c(x) = 0Bx^3 + 0Dx^2 + 09x + 0E for decryption. The
// constant products are built from xtime (multiply by 02) and XORs, and each
// output is reduced by a two-level XOR tree. Port byte a0 is the first byte of
// the column (row 0). Combinational; `dec` selects the inverse.
//
// The constants and the XOR-tree structure follow the original architecture;
// the xtime-based multipliers are this design's choice.
module mix_column
  import aes_pkg::*;
(
  input  logic  dec,
  input  word_t col_in,    // {a0, a1, a2, a3}: row 0 in bits [31:24]
  output word_t col_out    // {b0, b1, b2, b3}
);

  byte_t a [4];
  byte_t x2 [4], x4 [4], x8 [4];
  byte_t m1 [4], m2 [4], m3 [4];          // products for encryption
  byte_t m9 [4], mb [4], md [4], me [4];  // products for decryption
  byte_t b [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i]  = col_in[31-8*i -: 8];
      x2[i] = xtime(a[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
      m1[i] = a[i];
      m2[i] = x2[i];
      m3[i] = x2[i] ^ a[i];
      m9[i] = x8[i] ^ a[i];
      mb[i] = x8[i] ^ x2[i] ^ a[i];
      md[i] = x8[i] ^ x4[i] ^ a[i];
      me[i] = x8[i] ^ x4[i] ^ x2[i];
    end
    for (int i = 0; i < 4; i++) begin
      // b_i = c0*a_i ^ c1*a_(i+1) ^ c2*a_(i+2) ^ c3*a_(i+3), indices mod 4,
      // with the coefficients of x^0..x^3 of the fixed polynomial.
      if (dec)
        b[i] = (me[i] ^ mb[(i+1)%4]) ^ (md[(i+2)%4] ^ m9[(i+3)%4]);
      else
        b[i] = (m2[i] ^ m3[(i+1)%4]) ^ (m1[(i+2)%4] ^ m1[(i+3)%4]);
    end
    col_out = {b[0], b[1], b[2], b[3]};
  end

endmodule
