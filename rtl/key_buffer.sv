// key_buffer: 128-bit store for the start key of the current cipher key.
//
// It keeps the round key that starts every block of the current direction:
// the first round key (the cipher key) for encryption, the last round key
// (round 10) for decryption, together with a flag `buf_last` saying which of
// the two it holds. Writing (`we`) takes the key scheduler's registers. The
// flag lets the controller notice a change of direction and convert the
// stored key with the scheduler; that flag is this design's addition.
//
// Storing the start key of each direction for reuse follows the original
// architecture.
module key_buffer
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  block_t key_in,
  input  logic   last_in,
  output block_t key_out,
  output logic   buf_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_out  <= '0;
      buf_last <= 1'b0;
    end else if (we) begin
      key_out  <= key_in;
      buf_last <= last_in;
    end
  end

endmodule
