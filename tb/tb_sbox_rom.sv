// tb_sbox_rom: exhaustive check of both ROM tables against the reference
// S-box and against published entries (S(00)=63, S(53)=ED, S^-1(63)=00).
module tb_sbox_rom;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  dec;
  byte_t addr, data;
  sbox_rom dut (.dec, .addr, .data);

  task automatic check(u8 exp, string what);
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL %s dec=%0d addr=%02h got=%02h exp=%02h", what, dec, addr, data, exp);
    end
  endtask

  initial begin
    automatic tab_t s = make_sbox(), si = make_inv_sbox();
    for (int d = 0; d < 2; d++)
      for (int a = 0; a < 256; a++) begin
        dec = d[0]; addr = u8'(a);
        #1 check(d != 0 ? si[a] : s[a], "table");
      end
    dec = 0; addr = 8'h00; #1 check(8'h63, "S(00)");
    dec = 0; addr = 8'h53; #1 check(8'hed, "S(53)");
    dec = 1; addr = 8'h63; #1 check(8'h00, "Si(63)");
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
