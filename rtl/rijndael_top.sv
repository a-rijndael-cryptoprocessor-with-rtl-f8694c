// rijndael_top: 128-bit Rijndael cryptoprocessor with an on-the-fly key
// scheduler and a 32-bit I/O bus.
//
// Data path: text_interface (4 x 32 -> 128 bits) feeds the round datapath
// rijndael_core, whose result leaves through out_interface (128 -> 4 x 32
// bits). Key path: key_interface (4 x 32 -> 128 bits) and key_buffer feed,
// through the multiplexer control2, the key_scheduler whose registers give
// the round key of every cycle. The key buffer keeps the start key of the
// current direction, so repeated blocks reuse it; a change of direction costs
// one conversion of 10 scheduler steps plus 3 cycles, a new cipher key 2
// cycles. A block takes 11 cycles in the core; blocks of the same direction
// that are waiting run back to back, one every 11 cycles.
//
// Bus use: write a key as four words W(0)..W(3) with key_we while key_ready;
// write a block as four words with text_we while text_ready, text_dec (1 =
// decrypt) given with the fourth word. The result appears as four words on
// text_out while out_valid is high, the first word one cycle after round 10.
//
// The block structure (interfaces, key multiplexer, scheduler, key buffer,
// round datapath) follows the original top level; the bus protocol and the
// direction bit per block are this design's choices.
module rijndael_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  key_we,
  input  word_t key_in,
  output logic  key_ready,
  input  logic  text_we,
  input  word_t text_in,
  input  logic  text_dec,
  output logic  text_ready,
  output logic  out_valid,
  output logic  out_dec,
  output word_t text_out,
  output logic  busy
);

  logic       key_valid, key_take;
  block_t     if_key;
  logic       blk_valid, blk_dec, blk_take;
  block_t     blk;
  logic       buf_we, buf_last_in, buf_last;
  block_t     buf_key;
  logic       ks_load, ks_sel_buf, ks_load_last, ks_step, ks_dec;
  block_t     ks_key_in, round_key;
  core_ctrl_t core_ctrl;
  block_t     core_out;
  logic       res_valid, res_dec;

  key_interface u_key_if (
    .clk, .rst_n, .key_we, .key_word(key_in), .key_ready,
    .key_valid, .key(if_key), .key_take
  );

  text_interface u_text_if (
    .clk, .rst_n, .text_we, .text_word(text_in), .text_dec, .text_ready,
    .blk_valid, .blk_dec, .blk, .blk_take
  );

  // control2: new cipher key or buffered start key into the scheduler.
  always_comb ks_key_in = ks_sel_buf ? buf_key : if_key;

  key_scheduler u_key_sched (
    .clk, .rst_n, .load(ks_load), .load_last(ks_load_last), .key_in(ks_key_in),
    .step(ks_step), .dec(ks_dec), .round_key
  );

  key_buffer u_key_buf (
    .clk, .rst_n, .we(buf_we), .key_in(round_key), .last_in(buf_last_in),
    .key_out(buf_key), .buf_last
  );

  rijndael_core u_core (
    .clk, .rst_n, .ctrl(core_ctrl), .din(blk), .round_key, .dout(core_out)
  );

  out_interface u_out_if (
    .clk, .rst_n, .res_valid, .res_dec, .res(core_out),
    .out_valid, .out_dec, .text_out
  );

  controller u_ctrl (
    .clk, .rst_n, .key_valid, .key_take, .blk_valid, .blk_dec, .blk_take,
    .buf_last, .buf_we, .buf_last_in, .ks_load, .ks_sel_buf, .ks_load_last,
    .ks_step, .ks_dec, .core_ctrl, .res_valid, .res_dec, .busy
  );

endmodule
