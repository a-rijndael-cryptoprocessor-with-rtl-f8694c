// tb_key_interface: writes keys word by word, checks assembly order, the
// valid flag after the fourth word, that words are refused while a key is
// waiting, and release by key_take.
module tb_key_interface;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, key_we, key_ready, key_valid, key_take;
  word_t  key_word;
  block_t key;
  key_interface dut (.clk, .rst_n, .key_we, .key_word, .key_ready, .key_valid, .key, .key_take);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; key_we = 0; key_word = '0; key_take = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic block_t k = rand128();
      for (int w = 0; w < 4; w++) begin
        chk(key_ready && !key_valid, "ready before word");
        key_we = 1; key_word = k[127-32*w -: 32];
        @(posedge clk); #1;
        key_we = 0;
        if (n % 2 == 1) begin @(posedge clk); #1; end   // gaps between words
      end
      chk(key_valid && !key_ready, "valid after four words");
      chk(key === k, "assembled key");
      // a word written while full is ignored
      key_we = 1; key_word = 32'hdeadbeef;
      @(posedge clk); #1 key_we = 0;
      chk(key_valid && key === k, "held while full");
      key_take = 1;
      @(posedge clk); #1 key_take = 0;
      chk(!key_valid && key_ready, "released by take");
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
