// tb_rijndael_top: end-to-end test of the cryptoprocessor through its 32-bit
// bus. Keys and blocks are written word by word, results are collected from
// text_out and compared with the reference cipher. The stimulus covers the
// published AES-128 examples, runs of encryptions and decryptions of random
// blocks under several random keys, and mixes of both directions, so that
// every mechanism happens: key load into the buffer, reuse of the buffered
// key, forward pre-scheduling before decryption, reverse conversion before
// encryption, back-to-back blocks, and both directions in the core. Each is
// counted and must occur. It also checks the 11-cycle block rate and the
// 12-cycle latency from taking a block to its first output word.
module tb_rijndael_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  rst_n, key_we, key_ready, text_we, text_dec, text_ready, out_valid, out_dec, busy;
  word_t key_in, text_in, text_out;

  rijndael_top dut (.clk, .rst_n, .key_we, .key_in, .key_ready, .text_we, .text_in, .text_dec,
                    .text_ready, .out_valid, .out_dec, .text_out, .busy);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- stimulus
  block_t exp_q [$];
  bit     exp_dec_q [$];
  int     outstanding = 0;
  block_t cur_key;

  task automatic write_key(block_t k);
    while (outstanding != 0) @(posedge clk);
    #1;
    for (int w = 0; w < 4; w++) begin
      while (!key_ready) begin @(posedge clk); #1; end
      key_we = 1; key_in = k[127-32*w -: 32];
      @(posedge clk); #1;
      key_we = 0;
    end
    cur_key = k;
  endtask

  task automatic write_block(bit dec, block_t b);
    exp_q.push_back(dec ? decrypt(cur_key, b) : encrypt(cur_key, b));
    exp_dec_q.push_back(dec);
    outstanding++;
    for (int w = 0; w < 4; w++) begin
      while (!text_ready) begin @(posedge clk); #1; end
      text_we = 1; text_in = b[127-32*w -: 32]; text_dec = dec;
      @(posedge clk); #1;
      text_we = 0;
    end
  endtask

  // ---------------------------------------------------------------- results
  block_t got;
  int     wcnt = 0, results = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got = {got[95:0], text_out};
      wcnt++;
      if (wcnt == 4) begin
        block_t e;
        bit     d;
        e = exp_q.pop_front();
        d = exp_dec_q.pop_front();
        wcnt = 0;
        results++;
        outstanding--;
        checks++;
        if (got !== e || out_dec !== d) begin
          failures++;
          $display("FAIL result %0d dec=%0d got=%h exp=%h", results, d, got, e);
        end
      end
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_key_load = 0, n_reuse = 0, n_fwd_pre = 0, n_rev_conv = 0;
  int n_b2b = 0, n_enc = 0, n_dec = 0;
  int cyc = 0, last_take = -100, take_to_out = -1;
  logic prev_round10 = 0, buf_touched = 1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.key_take) n_key_load++;
      if (dut.u_ctrl.state_q == dut.u_ctrl.S_CONVERT && dut.u_ctrl.rnd_q == 0)
        if (dut.ks_dec) n_rev_conv++; else n_fwd_pre++;
      if (dut.buf_we) buf_touched = 1;
      if (dut.blk_take) begin
        if (dut.blk_dec) n_dec++; else n_enc++;
        if (!buf_touched) n_reuse++;
        buf_touched = 0;
        if (prev_round10) begin
          n_b2b++;
          checks++;
          if (cyc - last_take != 11) begin
            failures++;
            $display("FAIL back-to-back interval %0d", cyc - last_take);
          end
        end
        last_take = cyc;
        take_to_out = 0;
      end else if (take_to_out >= 0) begin
        take_to_out++;
      end
      if (dut.res_valid) begin
        checks++;
        if (take_to_out != 11 && !(dut.blk_take)) begin
          failures++;
          $display("FAIL latency %0d", take_to_out + 1);
        end
      end
      prev_round10 = (dut.u_ctrl.state_q == dut.u_ctrl.S_RUN) && (dut.u_ctrl.rnd_q == 10);
    end
  end

  // ---------------------------------------------------------------- script
  initial begin
    block_t k;
    rst_n = 0; key_we = 0; key_in = '0; text_we = 0; text_in = '0; text_dec = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // published examples
    write_key(128'h000102030405060708090a0b0c0d0e0f);
    write_block(0, 128'h00112233445566778899aabbccddeeff);
    write_block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    write_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    write_block(0, 128'h3243f6a8885a308d313198a2e0370734);
    write_block(0, 128'h3243f6a8885a308d313198a2e0370734);
    write_block(1, 128'h3925841d02dc09fbdc118597196a0b32);
    write_block(1, 128'h3925841d02dc09fbdc118597196a0b32);
    write_block(0, rand128());
    // random keys, runs of one direction and mixed directions
    for (int n = 0; n < 6; n++) begin
      k = rand128();
      write_key(k);
      for (int i = 0; i < 4; i++) write_block(n[0], rand128());
      for (int i = 0; i < 6; i++) write_block(1'($urandom_range(0, 1)), rand128());
    end
    while (outstanding != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(results == 67, $sformatf("results received: %0d", results));
    chk(!busy, "idle at the end");
    $display("mechanisms: key_load=%0d buffer_reuse=%0d forward_prescheduling=%0d reverse_conversion=%0d back_to_back=%0d encrypt=%0d decrypt=%0d",
             n_key_load, n_reuse, n_fwd_pre, n_rev_conv, n_b2b, n_enc, n_dec);
    chk(n_key_load > 0, "key load happened");
    chk(n_reuse > 0, "buffered key reused");
    chk(n_fwd_pre > 0, "forward pre-scheduling happened");
    chk(n_rev_conv > 0, "reverse conversion happened");
    chk(n_b2b > 0, "back-to-back blocks happened");
    chk(n_enc > 0 && n_dec > 0, "both directions ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
