// controller: sequencer of the Rijndael cryptoprocessor.
//
// It drives the control signals of the round datapath (control1, 2, 5, 6, 8, 9),
// of the key path (key interface take, the key multiplexer control2, key
// scheduler load/step/cod_dec, key buffer write) and of the text interfaces.
//
// States:
//   IDLE     the key scheduler is reloaded from the key buffer every cycle, so
//            a block can start at once. A new cipher key has priority: it is
//            loaded into the scheduler (KEYSTORE follows). A waiting block whose
//            direction matches the buffer content starts (RUN); otherwise the
//            buffer is converted first (CONVERT).
//   KEYSTORE the key buffer takes the new cipher key (first round key).
//   CONVERT  10 scheduler steps turn the buffered key into the start key of
//            the other direction: forward pre-scheduling to the last round
//            key before decryption, reverse scheduling back to the first
//            round key before encryption.
//   STORE    the converted key is written back to the key buffer.
//   RUN      rounds 0..10, one per cycle (11 cycles per block); the scheduler
//            steps along with the rounds and is reloaded from the buffer in
//            round 10, so a following block of the same direction starts in the
//            next cycle. `res_valid` pulses the cycle after round 10.
// Reverse conversion for encryption after decryption, the priority of a new
// key and the states themselves are this design's choices.
//
// The original architecture names its control signals but not their
// sequencer; this FSM is this design's own.
module controller
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // key interface
  input  logic       key_valid,
  output logic       key_take,
  // text interface
  input  logic       blk_valid,
  input  logic       blk_dec,
  output logic       blk_take,
  // key buffer
  input  logic       buf_last,
  output logic       buf_we,
  output logic       buf_last_in,
  // key scheduler and its input multiplexer (control2 of the top)
  output logic       ks_load,
  output logic       ks_sel_buf,
  output logic       ks_load_last,
  output logic       ks_step,
  output logic       ks_dec,
  // round datapath
  output core_ctrl_t core_ctrl,
  // result
  output logic       res_valid,
  output logic       res_dec,
  output logic       busy
);

  typedef enum logic [2:0] {S_IDLE, S_KEYSTORE, S_CONVERT, S_STORE, S_RUN} state_e;

  state_e     state_q, state_d;
  logic [3:0] rnd_q, rnd_d;
  logic       mode_q, mode_d;
  logic       next_same;

  // A waiting block that can follow the current run without a pause.
  always_comb next_same = blk_valid && !key_valid && (blk_dec == mode_q) && (buf_last == mode_q);

  always_comb begin
    state_d      = state_q;
    rnd_d        = rnd_q;
    mode_d       = mode_q;
    key_take     = 1'b0;
    blk_take     = 1'b0;
    buf_we       = 1'b0;
    buf_last_in  = 1'b0;
    ks_load      = 1'b0;
    ks_sel_buf   = 1'b1;
    ks_load_last = buf_last;
    ks_step      = 1'b0;
    ks_dec       = 1'b0;
    core_ctrl    = '0;

    unique case (state_q)
      S_IDLE: begin
        ks_load = 1'b1;
        if (key_valid) begin
          ks_sel_buf   = 1'b0;
          ks_load_last = 1'b0;
          key_take     = 1'b1;
          state_d      = S_KEYSTORE;
        end else if (blk_valid) begin
          rnd_d = '0;
          if (blk_dec == buf_last) begin
            mode_d  = blk_dec;
            state_d = S_RUN;
          end else begin
            state_d = S_CONVERT;
          end
        end
      end

      S_KEYSTORE: begin
        buf_we      = 1'b1;
        buf_last_in = 1'b0;
        state_d     = S_IDLE;
      end

      S_CONVERT: begin
        ks_step = 1'b1;
        ks_dec  = buf_last;          // last key in buffer: go back to round 0
        rnd_d   = rnd_q + 4'd1;
        if (rnd_q == 4'(NR - 1)) state_d = S_STORE;
      end

      S_STORE: begin
        buf_we      = 1'b1;
        buf_last_in = !buf_last;
        state_d     = S_IDLE;
      end

      S_RUN: begin
        core_ctrl.st_en = 1'b1;
        core_ctrl.dec   = mode_q;
        ks_dec          = mode_q;
        if (rnd_q == 4'd0) begin
          blk_take = 1'b1;                 // c1 = data in, c2 = control1 path
        end else if (rnd_q == 4'(NR)) begin
          core_ctrl.c2_bs = 1'b1;          // last round: no MixColumn
        end else if (!mode_q) begin
          core_ctrl.c1_fb = 1'b1;          // encryption: MC then key
        end else begin
          core_ctrl.c8_ark = 1'b1;         // decryption: key then MC^-1
          core_ctrl.c9_mc  = 1'b1;
        end
        if (rnd_q == 4'(NR)) begin
          ks_load = 1'b1;                  // reload the start key
          if (next_same) begin
            rnd_d   = '0;
            state_d = S_RUN;
          end else begin
            state_d = S_IDLE;
          end
        end else begin
          ks_step = 1'b1;
          rnd_d   = rnd_q + 4'd1;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      rnd_q     <= '0;
      mode_q    <= 1'b0;
      res_valid <= 1'b0;
      res_dec   <= 1'b0;
    end else begin
      state_q   <= state_d;
      rnd_q     <= rnd_d;
      mode_q    <= mode_d;
      res_valid <= (state_q == S_RUN) && (rnd_q == 4'(NR));
      res_dec   <= mode_q;
    end
  end

  assign busy = (state_q != S_IDLE);

  // Handshake rules: only take what is offered; never step and load the
  // scheduler in the same clock.
  a_key_take: assert property (@(posedge clk) disable iff (!rst_n) key_take |-> key_valid)
    else $error("controller: key taken while none is waiting");
  a_blk_take: assert property (@(posedge clk) disable iff (!rst_n) blk_take |-> blk_valid)
    else $error("controller: block taken while none is waiting");
  a_ks_excl:  assert property (@(posedge clk) disable iff (!rst_n) !(ks_load && ks_step))
    else $error("controller: scheduler load and step together");

endmodule
