// tb_throughput: sustained-rate workload. Streams 32 encryptions and then 32
// decryptions of random blocks under one key through the 32-bit bus, with the
// writer keeping the text interface full, and measures the clocks between
// consecutive blocks entering the core. Encryption and decryption must both
// sustain one block per 11 clocks; the only extra cost is one key conversion
// (pre-scheduling) before the first decryption. The rate is also reported in
// Mbit/s for a 38.8 MHz clock (128 bits / 11 clocks = 451.5 Mbit/s).
module tb_throughput;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 32;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  rst_n, key_we, key_ready, text_we, text_dec, text_ready, out_valid, out_dec, busy;
  word_t key_in, text_in, text_out;

  rijndael_top dut (.clk, .rst_n, .key_we, .key_in, .key_ready, .text_we, .text_in, .text_dec,
                    .text_ready, .out_valid, .out_dec, .text_out, .busy);

  block_t key, exp_q [$];
  block_t got;
  int     wcnt = 0, results = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got = {got[95:0], text_out};
      wcnt++;
      if (wcnt == 4) begin
        block_t e;
        e = exp_q.pop_front();
        wcnt = 0;
        results++;
        checks++;
        if (got !== e) begin failures++; $display("FAIL result %0d got=%h exp=%h", results, got, e); end
      end
    end
  end

  // Clock of every block entering the core.
  int cyc = 0, takes[$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.blk_take) takes.push_back(cyc);
  end

  task automatic write_block(bit dec, block_t b);
    exp_q.push_back(dec ? decrypt(key, b) : encrypt(key, b));
    for (int w = 0; w < 4; w++) begin
      while (!text_ready) begin @(posedge clk); #1; end
      text_we = 1; text_in = b[127-32*w -: 32]; text_dec = dec;
      @(posedge clk); #1;
      text_we = 0;
    end
  endtask

  initial begin
    int enc_span, dec_span, gap;
    rst_n = 0; key_we = 0; key_in = '0; text_we = 0; text_in = '0; text_dec = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    key = rand128();
    for (int w = 0; w < 4; w++) begin
      key_we = 1; key_in = key[127-32*w -: 32];
      @(posedge clk); #1;
    end
    key_we = 0;
    for (int i = 0; i < N; i++) write_block(0, rand128());
    for (int i = 0; i < N; i++) write_block(1, rand128());
    while (results < 2 * N) @(posedge clk);
    enc_span = takes[N-1] - takes[0];
    dec_span = takes[2*N-1] - takes[N];
    gap      = takes[N] - takes[N-1];
    $display("encryption: %0d blocks in %0d clocks after the first (%0.2f clocks/block, %0.1f Mbit/s at 38.8 MHz)",
             N, enc_span, real'(enc_span) / (N - 1), 128.0 * 38.8 / (real'(enc_span) / (N - 1)));
    $display("decryption: %0d blocks in %0d clocks after the first (%0.2f clocks/block); switch to decryption: %0d clocks",
             N, dec_span, real'(dec_span) / (N - 1), gap);
    checks++; if (enc_span != 11 * (N - 1)) begin failures++; $display("FAIL encryption rate"); end
    checks++; if (dec_span != 11 * (N - 1)) begin failures++; $display("FAIL decryption rate"); end
    // round 10, idle, 10 conversion steps, store, idle, then the block
    checks++; if (gap != 11 + 1 + 10 + 1 + 1) begin failures++; $display("FAIL conversion cost %0d", gap); end
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
