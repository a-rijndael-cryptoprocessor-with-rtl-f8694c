// tb_controller: exercises the sequencer with a behavioural key buffer flag
// and checks, cycle by cycle, the datapath control words of all 11 rounds in
// both directions, the scheduler steps and reloads, the key load (2 cycles),
// the direction conversions (10 steps forward or reverse, then a buffer
// write), back-to-back blocks every 11 cycles and the result strobe one
// cycle after the last round.
module tb_controller;
  import aes_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, key_valid, key_take, blk_valid, blk_dec, blk_take;
  logic       buf_last, buf_we, buf_last_in;
  logic       ks_load, ks_sel_buf, ks_load_last, ks_step, ks_dec;
  core_ctrl_t core_ctrl;
  logic       res_valid, res_dec, busy;

  controller dut (.clk, .rst_n, .key_valid, .key_take, .blk_valid, .blk_dec, .blk_take,
                  .buf_last, .buf_we, .buf_last_in, .ks_load, .ks_sel_buf, .ks_load_last,
                  .ks_step, .ks_dec, .core_ctrl, .res_valid, .res_dec, .busy);

  // Behavioural flag of the key buffer.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) buf_last <= 1'b0;
    else if (buf_we) buf_last <= buf_last_in;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic core_ctrl_t exp_ctrl(bit dec, int r);
    core_ctrl_t c = '0;
    c.st_en = 1; c.dec = dec;
    if (r == 0) ;
    else if (r == 10) c.c2_bs = 1;
    else if (!dec) c.c1_fb = 1;
    else begin c.c8_ark = 1; c.c9_mc = 1; end
    return c;
  endfunction

  // Checks one block from its first round; leaves time just after round 10.
  task automatic check_run(bit dec);
    for (int r = 0; r <= 10; r++) begin
      chk(core_ctrl == exp_ctrl(dec, r), $sformatf("ctrl dec=%0d round %0d", dec, r));
      chk(blk_take == (r == 0), "blk_take only in round 0");
      if (r < 10) chk(ks_step && !ks_load && ks_dec == dec, "scheduler steps");
      else        chk(ks_load && ks_sel_buf && !ks_step, "scheduler reload in round 10");
      @(posedge clk); #1;
      if (r == 0) blk_valid = 0;
    end
    chk(res_valid && res_dec == dec, "result strobe after round 10");
  endtask

  // Checks a conversion of the buffered key, starting in its first step.
  task automatic check_convert(bit reverse);
    for (int i = 0; i < 10; i++) begin
      chk(ks_step && ks_dec == reverse && core_ctrl.st_en == 0, "conversion step");
      @(posedge clk); #1;
    end
    chk(buf_we && buf_last_in == !reverse, "converted key stored");
    @(posedge clk); #1;
  endtask

  task automatic wait_take();
    int n = 0;
    while (!blk_take && n < 100) begin @(posedge clk); #1; n++; end
    chk(blk_take, "block taken");
  endtask

  initial begin
    rst_n = 0; key_valid = 0; blk_valid = 0; blk_dec = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!busy && ks_load && ks_sel_buf, "idle reloads from buffer");
    // new cipher key
    key_valid = 1;
    #1 chk(key_take && ks_load && !ks_sel_buf && !ks_load_last, "key into scheduler");
    @(posedge clk); #1 key_valid = 0;
    chk(buf_we && !buf_last_in, "key into buffer");
    @(posedge clk); #1;
    chk(!busy, "back to idle");
    // encryption, direct start
    blk_valid = 1; blk_dec = 0;
    @(posedge clk); #1;
    check_run(0);
    // two decryption blocks: forward pre-scheduling, then back to back
    blk_valid = 1; blk_dec = 1;
    @(posedge clk); #1;                    // IDLE sees the mismatch
    check_convert(0);
    wait_take();
    check_run_keep(1);
    // the second block was offered during the first: no gap
    check_run(1);
    // encryption after decryption: reverse conversion
    @(posedge clk); #1;
    blk_valid = 1; blk_dec = 0;
    @(posedge clk); #1;
    check_convert(1);
    wait_take();
    check_run(0);
    // a key waiting at the end of a run stops back-to-back issue
    blk_valid = 1; blk_dec = 0;
    wait_take();
    for (int r = 0; r < 10; r++) begin
      if (r == 5) begin blk_valid = 1; key_valid = 1; end
      @(posedge clk); #1;
      if (r == 0) blk_valid = 0;
    end
    chk(core_ctrl.c2_bs && ks_load, "round 10");
    @(posedge clk); #1;
    chk(!busy && key_take, "key before the next block");
    key_valid = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    wait_take();
    check_run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // As check_run, but offers the next block of the same direction at once.
  task automatic check_run_keep(bit dec);
    for (int r = 0; r <= 10; r++) begin
      chk(core_ctrl == exp_ctrl(dec, r), $sformatf("ctrl dec=%0d round %0d", dec, r));
      if (r == 0) begin @(posedge clk); #1; blk_valid = 0; @(posedge clk); #1; blk_valid = 1; blk_dec = dec; r++; end
      else begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
