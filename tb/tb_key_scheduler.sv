// tb_key_scheduler: forward scheduling from the cipher key and reverse
// scheduling from the last round key, one round key per clock, compared with
// a conventional key expansion; the published last round key of the AES-128
// example; and that load takes priority over step.
module tb_key_scheduler;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, load, load_last, step, dec;
  block_t key_in, round_key;
  key_scheduler dut (.clk, .rst_n, .load, .load_last, .key_in, .step, .dec, .round_key);

  task automatic check(block_t exp, string what, int r);
    checks++;
    if (round_key !== exp) begin
      failures++;
      $display("FAIL %s round %0d got=%h exp=%h", what, r, round_key, exp);
    end
  endtask

  task automatic schedule_both(block_t key);
    rkeys_t rk = expand_key(key);
    // forward
    load = 1; load_last = 0; key_in = key; step = 0; dec = 0;
    @(posedge clk); #1;
    load = 0;
    check(rk[0], "load", 0);
    for (int r = 1; r <= 10; r++) begin
      step = 1; dec = 0;
      @(posedge clk); #1;
      check(rk[r], "forward", r);
    end
    step = 0;
    // reverse from the last round key
    load = 1; load_last = 1; key_in = rk[10];
    @(posedge clk); #1;
    load = 0;
    for (int r = 9; r >= 0; r--) begin
      step = 1; dec = 1;
      @(posedge clk); #1;
      check(rk[r], "reverse", r);
    end
    step = 0;
  endtask

  initial begin
    rst_n = 0; load = 0; load_last = 0; step = 0; dec = 0; key_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    schedule_both(128'h2b7e151628aed2a6abf7158809cf4f3c);
    // published last round key of this cipher key
    load = 1; load_last = 0; key_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(posedge clk); #1 load = 0;
    repeat (10) begin step = 1; dec = 0; @(posedge clk); #1; end
    step = 0;
    check(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round 10 (published)", 10);
    // hold without step
    repeat (3) @(posedge clk);
    #1 check(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "hold", 10);
    // load has priority over step
    load = 1; step = 1; key_in = 128'h000102030405060708090a0b0c0d0e0f;
    @(posedge clk); #1 load = 0; step = 0;
    check(128'h000102030405060708090a0b0c0d0e0f, "load priority", 0);
    for (int n = 0; n < 30; n++) schedule_both(rand128());
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
