// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with the
// 128-bit round key. Combinational.
//
// The plain XOR is the original architecture's key addition.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  always_comb state_out = state_in ^ round_key;

endmodule
