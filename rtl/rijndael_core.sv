// rijndael_core: round datapath of the cost-effective Rijndael architecture
// (one round per clock, encryption and decryption on the same hardware).
//
// One ShiftRow/ShiftRow^-1, one ByteSub/ByteSub^-1 (sixteen ROMs) and four
// MixColumn/MixColumn^-1 units are shared by both directions; the
// multiplexers control1, control2, control8 and control9 choose the order in
// which a round passes through them, and control5/control6 (`ctrl.dec`)
// switch every unit to its inverse. A single 128-bit state register holds the
// block between rounds; ShiftRow always reads it.
//
// Per-cycle function, with s the state register and k the round key:
//   encryption  round 0     : s <= din ^ k                 (c1=0 c2=0 c9=0)
//               rounds 1..9 : s <= MC(SB(SR(s))) ^ k      (c1=1 c2=0 c8=0 c9=0)
//               round 10    : s <= SB(SR(s)) ^ k          (c2=1 c9=0)
//   decryption  round 0     : s <= din ^ k                 (c1=0 c2=0 c9=0)
//               rounds 1..9 : s <= MC'(SB'(SR'(s)) ^ k)   (c8=1 c9=1)
//               round 10    : s <= SB'(SR'(s)) ^ k        (c2=1 c9=0)
// so both directions take 11 clocks per block, as in the source architecture.
//
// Departure from the original datapath: there, one AddRoundKey serves both
// directions, which makes encryption (AddRoundKey before ShiftRow) and
// decryption (AddRoundKey between ByteSub^-1 and MixColumn^-1) visit the
// shared units in different cyclic orders and closes a combinational loop
// through the multiplexers. Here the key addition of decryption rounds 1..9
// uses a second 128-bit XOR bank in front of MixColumn^-1 (`u_ark_dec`), so
// the network is loop free. Where the state register sits is also this
// design's choice. Interface: `ctrl` and `round_key` are used in the cycle
// they are presented; `dout` is the state register.
module rijndael_core
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  core_ctrl_t ctrl,
  input  block_t     din,
  input  block_t     round_key,
  output block_t     dout
);

  block_t state_q;
  block_t mux1, mux2, mux8, mux9;
  block_t sr_out, bs_out, mc_out, ark_out, ark_dec_out;

  shift_row u_shift_row (.dec(ctrl.dec), .din(state_q), .dout(sr_out));
  byte_sub  u_byte_sub  (.dec(ctrl.dec), .din(sr_out),  .dout(bs_out));

  // Key addition of decryption rounds 1..9, ahead of MixColumn^-1.
  add_round_key u_ark_dec (.state_in(bs_out), .round_key(round_key), .state_out(ark_dec_out));

  // control8: MixColumn input.
  always_comb mux8 = ctrl.c8_ark ? ark_dec_out : bs_out;

  for (genvar c = 0; c < 4; c++) begin : g_mixcol
    mix_column u_mix_column (
      .dec     (ctrl.dec),
      .col_in  (mux8  [127-32*c -: 32]),
      .col_out (mc_out[127-32*c -: 32])
    );
  end

  // control1: external data or MixColumn feedback.
  always_comb mux1 = ctrl.c1_fb ? mc_out : din;
  // control2: control1 path or ByteSub output (last round).
  always_comb mux2 = ctrl.c2_bs ? bs_out : mux1;

  add_round_key u_ark (.state_in(mux2), .round_key(round_key), .state_out(ark_out));

  // control9: state register source.
  always_comb mux9 = ctrl.c9_mc ? mc_out : ark_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state_q <= '0;
    else if (ctrl.st_en) state_q <= mux9;
  end

  assign dout = state_q;

endmodule
