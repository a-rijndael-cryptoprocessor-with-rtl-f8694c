// shift_row: ShiftRow / inverse ShiftRow as wiring plus multiplexers.
//
// Byte Bk of the state sits in row k%4 and column k/4. ShiftRow rotates row r
// left by r columns, the inverse rotates it right by r. Rows 0 and 2 move the
// same way in both directions, so the even-numbered output lines are pure
// wiring; only the odd-numbered lines (rows 1 and 3) carry a 2:1 multiplexer
// switched by `dec`. Combinational.
//
// Wiring plus multiplexers on the odd lines only follows the original
// architecture.
module shift_row
  import aes_pkg::*;
(
  input  logic   dec,
  input  block_t din,
  output block_t dout
);

  function automatic int unsigned src_enc(int unsigned k);
    return 4 * (((k / 4) + (k % 4)) % 4) + (k % 4);
  endfunction

  function automatic int unsigned src_dec(int unsigned k);
    return 4 * (((k / 4) + 4 - (k % 4)) % 4) + (k % 4);
  endfunction

  for (genvar k = 0; k < 16; k++) begin : g_line
    if (k % 2 == 0) begin : g_wire
      assign dout[127-8*k -: 8] = din[127-8*src_enc(k) -: 8];
    end else begin : g_mux
      assign dout[127-8*k -: 8] = dec ? din[127-8*src_dec(k) -: 8]
                                      : din[127-8*src_enc(k) -: 8];
    end
  end

endmodule
