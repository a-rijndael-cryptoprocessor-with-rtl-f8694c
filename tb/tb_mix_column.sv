// tb_mix_column: MixColumn and its inverse on published column pairs
// (db135345 <-> 8e4da1bc, f20a225c <-> 9fdc589d) and on random columns.
module tb_mix_column;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  dec;
  word_t col_in, col_out;
  mix_column dut (.dec, .col_in, .col_out);

  task automatic check(word_t exp);
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL dec=%0d in=%h got=%h exp=%h", dec, col_in, col_out, exp);
    end
  endtask

  initial begin
    dec = 0; col_in = 32'hdb135345; #1 check(32'h8e4da1bc);
    dec = 0; col_in = 32'hf20a225c; #1 check(32'h9fdc589d);
    dec = 1; col_in = 32'h8e4da1bc; #1 check(32'hdb135345);
    dec = 1; col_in = 32'h9fdc589d; #1 check(32'hf20a225c);
    for (int n = 0; n < 500; n++) begin
      col_in = $urandom;
      dec = 0; #1 check(mix_col(col_in, 0));
      dec = 1; #1 check(mix_col(col_in, 1));
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
