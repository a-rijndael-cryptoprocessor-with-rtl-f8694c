// text_interface: gathers a 128-bit text block from a 32-bit bus.
//
// Each cycle with `text_we` high takes one word while `text_ready` is high;
// the first word holds bytes B0..B3 and ends up in bits [127:96]. The
// direction bit `text_dec` (1 = decrypt) is sampled with the fourth word.
// The block is then offered with `blk_valid` until the controller takes it
// with `blk_take`, which frees the buffer at once, so the next block can be
// written while the current one is being processed. Word order, the
// direction bit and the handshake are this design's choices.
//
// The original architecture fixes only the 32-bit input and 128-bit output.
module text_interface
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   text_we,
  input  word_t  text_word,
  input  logic   text_dec,
  output logic   text_ready,
  output logic   blk_valid,
  output logic   blk_dec,
  output block_t blk,
  input  logic   blk_take
);

  logic [1:0] cnt_q;
  logic       full_q;
  logic       dec_q;
  block_t     blk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      full_q <= 1'b0;
      dec_q  <= 1'b0;
      blk_q  <= '0;
    end else if (full_q) begin
      if (blk_take) full_q <= 1'b0;
    end else if (text_we) begin
      blk_q <= {blk_q[95:0], text_word};
      cnt_q <= cnt_q + 2'd1;
      if (cnt_q == 2'd3) begin
        full_q <= 1'b1;
        dec_q  <= text_dec;
      end
    end
  end

  assign text_ready = !full_q;
  assign blk_valid  = full_q;
  assign blk_dec    = dec_q;
  assign blk        = blk_q;

endmodule
