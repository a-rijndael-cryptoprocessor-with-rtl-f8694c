// tb_rijndael_core: drives the round datapath with the control words of the
// 11 rounds and the reference round keys; checks the state after every round
// against the reference intermediate values, the result of the published
// AES-128 examples and of random blocks, both directions, and that a block
// takes exactly 11 clocks.
module tb_rijndael_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n;
  core_ctrl_t ctrl;
  block_t     din, round_key, dout;
  rijndael_core dut (.clk, .rst_n, .ctrl, .din, .round_key, .dout);

  function automatic core_ctrl_t ctrl_of(bit dec, int r);
    core_ctrl_t c = '0;
    c.st_en = 1; c.dec = dec;
    if (r == 0) ;
    else if (r == 10) c.c2_bs = 1;
    else if (!dec) c.c1_fb = 1;
    else begin c.c8_ark = 1; c.c9_mc = 1; end
    return c;
  endfunction

  // Runs one block; checks every round's state and returns the clocks used.
  task automatic run(bit dec, block_t key, block_t text, output block_t res, output int cycles);
    rkeys_t rk = expand_key(key);
    block_t s = '0;
    cycles = 0;
    for (int r = 0; r <= 10; r++) begin
      // reference state after round r
      if (!dec) begin
        if (r == 0) s = text ^ rk[0];
        else begin
          s = shift_rows(sub_bytes(s, 0), 0);
          if (r != 10) s = mix_columns(s, 0);
          s ^= rk[r];
        end
      end else begin
        if (r == 0) s = text ^ rk[10];
        else begin
          s = sub_bytes(shift_rows(s, 1), 1) ^ rk[10 - r];
          if (r != 10) s = mix_columns(s, 1);
        end
      end
      ctrl = ctrl_of(dec, r);
      din = text;
      round_key = dec ? rk[10 - r] : rk[r];
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (dout !== s) begin
        failures++;
        $display("FAIL dec=%0d round %0d got=%h exp=%h", dec, r, dout, s);
      end
    end
    ctrl = '0;
    din = rand128();
    res = dout;
  endtask

  task automatic check_eq(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    block_t res, k, p;
    int cyc;
    rst_n = 0; ctrl = '0; din = '0; round_key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, res, cyc);
    check_eq(res, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    checks++; if (cyc != 11) begin failures++; $display("FAIL cycles %0d", cyc); end
    run(1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, res, cyc);
    check_eq(res, 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");
    checks++; if (cyc != 11) begin failures++; $display("FAIL cycles %0d", cyc); end
    run(0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, res, cyc);
    check_eq(res, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");
    // idle cycles keep the state
    repeat (3) @(posedge clk);
    #1 check_eq(dut.dout, 128'h3925841d02dc09fbdc118597196a0b32, "hold");
    for (int n = 0; n < 20; n++) begin
      k = rand128(); p = rand128();
      run(0, k, p, res, cyc);
      check_eq(res, encrypt(k, p), "random encrypt");
      run(1, k, res, res, cyc);
      check_eq(res, p, "random decrypt");
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
