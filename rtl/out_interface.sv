// out_interface: sends a 128-bit result over a 32-bit bus.
//
// A one-cycle `res_valid` captures `res` (and its direction bit); over the
// next four cycles `out_valid` is high and `text_out` carries bits [127:96],
// [95:64], [63:32] and [31:0] in turn, with `out_dec` telling whether the
// words are plaintext (1) or ciphertext (0). The core delivers at most one
// result every 11 cycles, so a capture never meets a word still waiting; an
// assertion checks this. There is no back-pressure: the receiver must take a
// word in every cycle `out_valid` is high. This protocol is this design's
// choice.
//
// The original architecture fixes only the 128-bit input and 32-bit output.
module out_interface
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   res_valid,
  input  logic   res_dec,
  input  block_t res,
  output logic   out_valid,
  output logic   out_dec,
  output word_t  text_out
);

  block_t     buf_q;
  logic [2:0] left_q;   // words still to send
  logic       dec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q  <= '0;
      left_q <= '0;
      dec_q  <= 1'b0;
    end else if (res_valid) begin
      buf_q  <= res;
      left_q <= 3'd4;
      dec_q  <= res_dec;
    end else if (left_q != 0) begin
      buf_q  <= {buf_q[95:0], 32'h0};
      left_q <= left_q - 3'd1;
    end
  end

  assign out_valid = (left_q != 0);
  assign out_dec   = dec_q;
  assign text_out  = buf_q[127:96];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> left_q <= 3'd1)
    else $error("out_interface: result arrived before the previous one was sent");

endmodule
