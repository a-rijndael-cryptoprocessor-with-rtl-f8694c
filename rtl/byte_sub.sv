// byte_sub: ByteSub / inverse ByteSub of the whole 128-bit state.
//
// Sixteen independent sbox_rom elements, one per state byte (Data_in k ->
// Data_out k), all switched between the forward and the inverse table by the
// common `dec` select. Combinational.
//
// Sixteen asynchronous ROM look-ups are the original architecture's
// ByteSub.
module byte_sub
  import aes_pkg::*;
(
  input  logic   dec,
  input  block_t din,
  output block_t dout
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    sbox_rom u_sbox (
      .dec  (dec),
      .addr (din [127-8*k -: 8]),
      .data (dout[127-8*k -: 8])
    );
  end

endmodule
