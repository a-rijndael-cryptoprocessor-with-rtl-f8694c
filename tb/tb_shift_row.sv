// tb_shift_row: ShiftRow and its inverse on random states and on a state
// whose bytes are their own indices, compared with the reference.
module tb_shift_row;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   dec;
  block_t din, dout;
  shift_row dut (.dec, .din, .dout);

  task automatic check(block_t exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL dec=%0d in=%h got=%h exp=%h", dec, din, dout, exp);
    end
  endtask

  initial begin
    din = 128'h000102030405060708090a0b0c0d0e0f;
    dec = 0; #1 check(128'h00050a0f04090e03080d02070c01060b);
    dec = 1; #1 check(128'h000d0a0704010e0b0805020f0c090603);
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      dec = 0; #1 check(shift_rows(din, 0));
      dec = 1; #1 check(shift_rows(din, 1));
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
