// tb_text_interface: writes blocks word by word with a direction bit,
// checks assembly order, the direction taken with the fourth word, refusal
// while full and release by blk_take.
module tb_text_interface;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, text_we, text_dec, text_ready, blk_valid, blk_dec, blk_take;
  word_t  text_word;
  block_t blk;
  text_interface dut (.clk, .rst_n, .text_we, .text_word, .text_dec, .text_ready,
                      .blk_valid, .blk_dec, .blk, .blk_take);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; text_we = 0; text_word = '0; text_dec = 0; blk_take = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic block_t b = rand128();
      automatic bit d = n[0] ^ n[2];
      for (int w = 0; w < 4; w++) begin
        chk(text_ready && !blk_valid, "ready before word");
        text_we = 1; text_word = b[127-32*w -: 32];
        text_dec = (w == 3) ? d : !d;        // only the fourth word counts
        @(posedge clk); #1;
        text_we = 0;
      end
      chk(blk_valid && !text_ready, "valid after four words");
      chk(blk === b, "assembled block");
      chk(blk_dec === d, "direction bit");
      text_we = 1; text_word = 32'h01234567;
      @(posedge clk); #1 text_we = 0;
      chk(blk_valid && blk === b, "held while full");
      blk_take = 1;
      @(posedge clk); #1 blk_take = 0;
      chk(!blk_valid && text_ready, "released by take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
