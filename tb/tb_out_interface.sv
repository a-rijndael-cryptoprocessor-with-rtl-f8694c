// tb_out_interface: captures results and checks that exactly four words
// follow, in order, in the four cycles after the capture, with the direction
// bit, and that nothing is sent afterwards.
module tb_out_interface;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n, res_valid, res_dec, out_valid, out_dec;
  block_t res;
  word_t  text_out;
  out_interface dut (.clk, .rst_n, .res_valid, .res_dec, .res, .out_valid, .out_dec, .text_out);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; res_valid = 0; res_dec = 0; res = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!out_valid, "idle after reset");
    for (int n = 0; n < 20; n++) begin
      automatic block_t r = rand128();
      automatic bit d = n[0];
      res_valid = 1; res = r; res_dec = d;
      @(posedge clk); #1;
      res_valid = 0; res = rand128();
      for (int w = 0; w < 4; w++) begin
        chk(out_valid, "valid during words");
        chk(text_out === r[127-32*w -: 32], $sformatf("word %0d", w));
        chk(out_dec === d, "direction");
        @(posedge clk); #1;
      end
      chk(!out_valid, "done after four words");
      repeat (n % 8) @(posedge clk);
      #1;
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
