// key_scheduler: on-the-fly forward and reverse round-key generator.
//
// The current round key is held as four 32-bit words in registers a, b, c
// and d (W(i)..W(i+3)) and is the `round_key` output. One `step` produces the
// next round key in one clock:
//   forward (dec=0): a' = a ^ F(d), b' = b ^ a', c' = c ^ b', d' = d ^ c'
//   reverse (dec=1): b' = a ^ b, c' = b ^ c, d' = c ^ d, a' = a ^ F(d')
// where F(w) = S-box(ROT(w)) ^ {RCON, 0, 0, 0}. The cod_dec multiplexers pick
// the second XOR operand of b, c and d (the new word to the left when going
// forward, the old register to the left when going back) and the input of
// ROT (register d forward, the new d' in reverse). Four forward S-box ROMs
// serve ROT/S-box.
//
// RCON is kept in an 8-bit register: `load` sets it to 01 when the loaded key
// is the first round key (`load_last`=0) and to 36, the constant of round
// Nr = 10, when it is the last one; a forward step multiplies it by x after
// use, a reverse step divides it by x. `load` (the control multiplexers in
// front of the registers) has priority over `step`. Reset value of all
// registers is zero; the register of RCON is this design's own choice.
//
// The register structure, the XOR chain, the cod_dec multiplexers and the
// forward/reverse equations follow the original on-the-fly scheduler.
module key_scheduler
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,        // copy key_in into registers a..d
  input  logic   load_last,   // key_in is the last round key (RCON = 36)
  input  block_t key_in,
  input  logic   step,        // advance one round key
  input  logic   dec,         // cod_dec: 0 = forward, 1 = reverse
  output block_t round_key
);

  word_t ra, rb, rc, rd;
  word_t na, nb, nc, nd;
  word_t rot_in, sub_out, f_out;
  byte_t rcon_q;

  // Reverse scheduling: the new W(i+3) = c ^ d feeds ROT.
  word_t rev_d;
  always_comb rev_d = rc ^ rd;

  // Multiplexer in front of ROT: register d (forward) or c ^ d (reverse).
  always_comb rot_in = rot_word(dec ? rev_d : rd);

  for (genvar k = 0; k < 4; k++) begin : g_sbox
    sbox_rom u_sbox (.dec(1'b0), .addr(rot_in[31-8*k -: 8]), .data(sub_out[31-8*k -: 8]));
  end

  always_comb f_out = sub_out ^ {rcon_q, 24'h0};

  always_comb begin
    na = ra ^ f_out;
    // cod_dec multiplexers select the left-hand XOR operand.
    nb = rb ^ (dec ? ra : na);
    nc = rc ^ (dec ? rb : nb);
    nd = rd ^ (dec ? rc : nc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ra, rb, rc, rd} <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      {ra, rb, rc, rd} <= key_in;
      rcon_q <= load_last ? 8'h36 : 8'h01;
    end else if (step) begin
      {ra, rb, rc, rd} <= {na, nb, nc, nd};
      rcon_q <= dec ? inv_xtime(rcon_q) : xtime(rcon_q);
    end
  end

  assign round_key = {ra, rb, rc, rd};

endmodule
