// tb_key_buffer: writes keys with both flag values and checks that the
// buffer keeps them, and its flag, until the next write.
module tb_key_buffer;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, we, last_in, buf_last;
  block_t key_in, key_out;
  key_buffer dut (.clk, .rst_n, .we, .key_in, .last_in, .key_out, .buf_last);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    block_t k;
    bit l;
    rst_n = 0; we = 0; last_in = 0; key_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(key_out === '0 && !buf_last, "reset value");
    for (int n = 0; n < 30; n++) begin
      k = rand128(); l = n[0];
      we = 1; key_in = k; last_in = l;
      @(posedge clk); #1;
      we = 0; key_in = rand128(); last_in = !l;
      chk(key_out === k && buf_last === l, "written");
      repeat (1 + n % 4) @(posedge clk);
      #1 chk(key_out === k && buf_last === l, "held");
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
