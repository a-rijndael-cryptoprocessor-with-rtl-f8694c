// tb_add_round_key: XOR of random states and keys, and the first key
// addition of the published AES-128 example.
module tb_add_round_key;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  block_t state_in, round_key, state_out;
  add_round_key dut (.state_in, .round_key, .state_out);

  task automatic check(block_t exp);
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL %h ^ %h got=%h exp=%h", state_in, round_key, state_out, exp);
    end
  endtask

  initial begin
    state_in  = 128'h3243f6a8885a308d313198a2e0370734;
    round_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 check(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      automatic block_t a = rand128(), b = rand128(), e;
      state_in = a; round_key = b;
      for (int k = 0; k < 128; k++) e[k] = (a[k] != b[k]);
      #1 check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
