// sbox_rom: one S-box / inverse S-box element of ByteSub.
//
// Two asynchronous 256 x 8 look-up ROMs, the S-box and its inverse, share the
// 8-bit address; `dec` selects which one drives the 8-bit output. The ROM
// contents are generated once at elaboration from the GF(2^8) definition
// in aes_pkg. Purely combinational: the output follows the address in the same
// cycle. Sixteen of these make up ByteSub; four, with `dec` tied low, serve
// the key scheduler.
//
// Two 256 x 8 ROMs per byte follow the original architecture; the ROM
// contents are the standard Rijndael S-box.
module sbox_rom
  import aes_pkg::*;
(
  input  logic  dec,   // 0 = S-box, 1 = inverse S-box
  input  byte_t addr,
  output byte_t data
);

  always_comb data = dec ? INV_SBOX_TABLE[addr] : SBOX_TABLE[addr];

endmodule
