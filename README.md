# Rijndael (AES-128) cryptoprocessor with an on-the-fly key scheduler

This is a compact AES-128 engine that encrypts and decrypts on one shared
round datapath, one round per clock. Its key scheduler computes round keys
as it goes, with no round-key memory. Running forwards, it goes from the
cipher key to the last round key, as encryption needs. Running in reverse,
it goes from the last round key back to the first, as decryption needs.
A block takes 11 clocks in either direction. Blocks of one direction run
back to back, so at a 38.8 MHz clock the core sustains
128 bit / 11 clocks = 451.5 Mbit/s. Keys and data move over a 32-bit bus.

The architecture is that of a published FPGA design (a Virtex XCV1000E
implementation). The RTL here follows its block structure: the shared
datapath, the ShiftRow and ByteSub units, the four MixColumn units, the
register-based key scheduler, the key buffer and the 32-bit interfaces. The
sequencing, the bus protocol and a few datapath details are this design's
own choices, and are listed under "Departures and own choices".

## Data layout

All 128-bit values use the FIPS-197 byte order. Byte B0 is bits
[127:120] and B15 is bits [7:0]. The state is a 4x4 byte matrix filled column by column: B0..B3 are column 0,
B4..B7 column 1, and so on. Row r of column c is byte B(4c+r). A round key is
four 32-bit words: W(i) is bits [127:96] and W(i+3) is bits [31:0]. On the
32-bit bus, the first word of a key or block is bits [127:96].

## The round datapath (`rijndael_core`)

There is one ShiftRow/ShiftRow⁻¹ unit, one ByteSub/ByteSub⁻¹ unit (sixteen
256x8 ROM pairs) and four MixColumn/MixColumn⁻¹ units. A single `dec` bit
switches all of them to their inverses. A 128-bit state register `s` holds
the block between rounds, and ShiftRow always reads it. Multiplexers decide
which units a round passes through:

| round | encryption                   | decryption                      |
|-------|------------------------------|---------------------------------|
| 0     | `s <= in ^ k0`               | `s <= in ^ k10`                 |
| 1..9  | `s <= MC(SB(SR(s))) ^ k_r`   | `s <= MC⁻¹(SB⁻¹(SR⁻¹(s)) ^ k_(10-r))` |
| 10    | `s <= SB(SR(s)) ^ k10`       | `s <= SB⁻¹(SR⁻¹(s)) ^ k0`       |

The control word `core_ctrl_t` (in `aes_pkg`) has these fields:

- `c1_fb` (control1) picks the external block or the MixColumn feedback.
- `c2_bs` (control2) picks that result or the ByteSub output, used in the last round.
- `c8_ark` (control8) picks the MixColumn input: ByteSub output, or ByteSub output XOR key.
- `c9_mc` (control9) picks what the state register loads: AddRoundKey output or MixColumn output.
- `dec` is control5/control6.
- `st_en` is the state register enable.

In the original datapath one AddRoundKey serves both directions. That makes
encryption and decryption visit the shared units in different cyclic
orders, and the multiplexers then form a combinational loop. The loop is
never active, but it is a false path for timing analysis, and lint and
synthesis tools trip over it. This design therefore gives decryption
rounds 1..9 a second 128-bit XOR bank (`u_ark_dec`), placed between
ByteSub⁻¹ and MixColumn⁻¹, where the inverse cipher adds the key. The
network is then loop free. The cost is 128 XOR gates.

**Building blocks:**

- `shift_row` is pure wiring. Rows 0 and 2 move the same way in both directions, so only the odd-indexed output bytes (rows 1 and 3) have a 2:1 multiplexer.
- `byte_sub` holds 16 `sbox_rom` elements.
- `sbox_rom` holds two 256x8 asynchronous ROMs, the S-box and its inverse, selected by `dec`. The ROM images are computed at elaboration by `aes_pkg::gen_sbox` / `gen_inv_sbox` from the definition: the multiplicative inverse in GF(2⁸) mod x⁸+x⁴+x³+x+1, followed by the affine map s = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63, and the inverse of both. No data file is needed.
- `mix_column` transforms one column. Each output byte is a two-level XOR tree of four constant products, with c(x) = 03x³+01x²+01x+02 for encryption and 0Bx³+0Dx²+09x+0E for decryption. The products are built from `xtime`.
- `add_round_key` is a 128-bit XOR.

## The on-the-fly key scheduler (`key_scheduler`)

Registers a, b, c, d hold the current round key W(i)..W(i+3). That key is
the `round_key` output, and it is used by the datapath in the same clock.
Let F(w) = S-box(ROT(w)) ⊕ {RCON, 00, 00, 00}, where ROT rotates a word left
by one byte. One `step` then computes:

- **forward** (`dec=0`): a' = a ⊕ F(d), b' = b ⊕ a', c' = c ⊕ b', d' = d ⊕ c'
- **reverse** (`dec=1`): b' = a ⊕ b, c' = b ⊕ c, d' = c ⊕ d, a' = a ⊕ F(d')

Both directions share the four XORs and the four S-box ROMs. Small
multiplexers choose the left operand of the b, c and d XORs, and whether ROT
sees d or c ⊕ d. RCON is an 8-bit register. A load sets it to 01 when the
loaded key is round key 0 (`load_last=0`), and to 36, the round-10
constant, when it is round key 10. Each step then multiplies it by x going
forwards, or divides it by x going backwards. A load has priority over a
step.

## Key buffer, direction changes and sequencing (`key_buffer`, `controller`)

This is the least obvious part of the design. Encryption starts from round
key 0 and decryption from round key 10. The key buffer stores the start key
of the direction in current use, plus a flag `buf_last` that says which of
the two keys it holds.

| state    | what happens |
|----------|--------------|
| IDLE     | Every clock, the scheduler is reloaded from the buffer, so a block can start at once. A complete new key has priority: it goes into the scheduler, and then into the buffer (KEYSTORE, 2 clocks in total). A waiting block whose direction matches the flag starts RUN. Otherwise the buffer is converted first. |
| CONVERT  | The scheduler takes 10 steps from the buffered key. Forward steps are the pre-scheduling of the last round key before decryption. Reverse steps return to round key 0 before encryption. |
| STORE    | The converted key is written back to the buffer, and the flag flips. |
| RUN      | Rounds 0..10, one per clock. The scheduler steps with the rounds and is reloaded from the buffer in round 10. If a block of the same direction is already waiting, and no new key is, the next block's round 0 follows directly. |

Timing that follows from this:

- **Block rate.** Blocks of one direction run one per 11 clocks.
- **Result.** The result is in the state register after round 10. `res_valid` pulses in the next clock, and the first output word appears one clock later.
- **Direction change.** The first block after a change waits 13 clocks longer than a back-to-back block would (10 steps, STORE, and one IDLE clock).
- **New key.** A new key waits for the running block to finish, and then takes 2 clocks.

## Bus interface (`rijndael_top`, `key_interface`, `text_interface`, `out_interface`)

| port | dir | meaning |
|------|-----|---------|
| `key_we`, `key_in[31:0]`, `key_ready` | in/in/out | Key words W(0)..W(3). A word is accepted in any clock with `key_we` and `key_ready` both high. After the fourth word the key is pending (`key_ready` low) until the controller takes it. |
| `text_we`, `text_in[31:0]`, `text_dec`, `text_ready` | in/in/in/out | Block words, first word = bits [127:96]. `text_dec` (1 = decrypt) is sampled with the fourth word. The buffer frees as soon as the core takes the block, so the next block can be written during the current one's 11 clocks. |
| `out_valid`, `out_dec`, `text_out[31:0]` | out | The result as four words in four consecutive clocks. There is no back-pressure. `out_dec` = 1 marks plaintext. |
| `busy` | out | The controller is not idle. |

`clk` is the single clock. `rst_n` is an asynchronous, active-low reset of
all registers. After reset the buffer holds an all-zero round key 0, so a
key should be written before the first block.

## Files

`rtl/` has one module or package per file:

- `aes_pkg` holds types, constants, the control word, GF(2⁸) functions and the ROM images.
- The datapath modules are `sbox_rom`, `byte_sub`, `shift_row`, `mix_column`, `add_round_key` and `rijndael_core`.
- The key path modules are `key_scheduler` and `key_buffer`.
- The interface modules are `key_interface`, `text_interface` and `out_interface`.
- `controller` is the sequencer, and `rijndael_top` is the top level.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`), plus:

- `aes_ref_pkg.sv` is an independent behavioural AES-128 model. Its S-box is built from log/antilog tables, and it has a textbook key expansion, cipher and inverse cipher.
- `tb_rijndael_top.sv` runs the whole design end to end. It covers the FIPS-197 examples, 60 random blocks under 6 random keys with mixed directions, and counts of every mechanism.
- `tb_throughput.sv` measures the sustained rate: 11.00 clocks per block in both directions, and 24 clocks from the last encryption to the first decryption across a direction change.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_rijndael_top.sv \
    --top-module tb_rijndael_top -o sim
./obj_dir/sim
```

Replace `tb_rijndael_top` with any other testbench name. Verilator finds
the modules through `-Irtl`. The design has no parameters. The round count
is `aes_pkg::NR` = 10 and is fixed, because the datapath and key registers
are sized for a 128-bit block and key.

## Departures and own choices

- **Decryption key addition.** A second XOR bank does the key addition of decryption rounds 1..9 (see above). Where the state register sits is also this design's choice.
- **Unused multiplexers.** Of the original multiplexer controls, control3 and control7 are plain fan-out here, and control4 is not needed.
- **RCON and the buffer flag.** The RCON register and the key-buffer flag are this design's own.
- **Reverse conversion.** Going back from decryption to encryption, the buffered last round key is reverse-scheduled to round key 0. The cipher key is not stored anywhere else.
- **Own choices.** The controller, its state encoding, the priority of a new key over waiting blocks, the bus word order, the handshakes and the reset behaviour are all this design's own.
- **Only AES-128.** The design handles 128-bit blocks with 128-bit keys only. Rijndael's 192/256-bit block and key sizes would need a wider datapath and a different scheduler.
- **Not verified.** The FPGA figures of the original (38.8 MHz, 2,580 slices on an XCV1000E) are not reproduced or checked here. What simulation confirms is the clock-cycle behaviour: 11 clocks per block, so 451.5 Mbit/s at 38.8 MHz.
