// key_interface: gathers a 128-bit cipher key from a 32-bit bus.
//
// Each cycle with `key_we` high takes one word while `key_ready` is high; the
// first word written is W(0) and ends up in bits [127:96]. After the fourth
// word `key_valid` rises and the key is held until the controller takes it
// with `key_take`; no words are accepted meanwhile (`key_ready` low). The
// word order and this valid/take handshake are this design's choices.
//
// The original architecture fixes only the 32-bit input and 128-bit output.
module key_interface
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_we,
  input  word_t  key_word,
  output logic   key_ready,
  output logic   key_valid,
  output block_t key,
  input  logic   key_take
);

  logic [1:0] cnt_q;
  logic       full_q;
  block_t     key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      full_q <= 1'b0;
      key_q  <= '0;
    end else if (full_q) begin
      if (key_take) full_q <= 1'b0;
    end else if (key_we) begin
      key_q <= {key_q[95:0], key_word};
      cnt_q <= cnt_q + 2'd1;
      if (cnt_q == 2'd3) full_q <= 1'b1;
    end
  end

  assign key_ready = !full_q;
  assign key_valid = full_q;
  assign key       = key_q;

endmodule
