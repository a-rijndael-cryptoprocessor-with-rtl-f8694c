// tb_byte_sub: random 128-bit states through ByteSub and its inverse,
// compared with the reference, plus the round-trip identity.
module tb_byte_sub;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   dec;
  block_t din, dout;
  byte_sub dut (.dec, .din, .dout);

  initial begin
    block_t fwd;
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      dec = 0; #1;
      fwd = dout;
      checks++;
      if (dout !== sub_bytes(din, 0)) begin failures++; $display("FAIL fwd %h -> %h", din, dout); end
      dec = 1; #1;
      checks++;
      if (dout !== sub_bytes(din, 1)) begin failures++; $display("FAIL inv %h -> %h", din, dout); end
      din = fwd; #1;
      checks++;
      if (dout !== sub_bytes(fwd, 1)) failures++;
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
