# Three lightweight 64-bit block ciphers on a 32-bit datapath

Small IoT devices need encryption that costs little area and power but
still moves data quickly. This RTL implements three lightweight block
ciphers that all encrypt a 64-bit block under a 128-bit key, each built
around a 32-bit datapath so that they can be compared like for like:

| core          | cipher        | structure                         | rounds | busy cycles per block |
|---------------|---------------|-----------------------------------|--------|-----------------------|
| `led_core`    | LED-128       | SPN, serial: 4 cycles per round   | 48     | 192                   |
| `simon_core`  | SIMON 64/128  | Feistel, 1 round + 1 key step per cycle | 44 | 44                   |
| `simeck_core` | SIMECK 64/128 | Feistel, 1 round + 1 key step per cycle | 44 | 44                   |

The cores are alternatives, not a pipeline. `lwc_top` instantiates all
three side by side with separate ports (prefixes `led_`, `simon_`,
`simeck_`) and a shared clock and reset, so one can pick the core that
suits an application's area, throughput or power budget. Only encryption
is implemented.

Throughput at clock frequency f is 64·f / (busy cycles): for example
64 bits × 133.76 MHz / 192 = 44.6 Mbit/s for LED-128, or
64 × 141.89 MHz / 44 = 206 Mbit/s for SIMON. This figure leaves out the
four load cycles and two output cycles that a block also spends in the
core, so the sustained rate with back-to-back blocks is
64·f / 198 for LED-128 and 64·f / 50 for SIMON and SIMECK.

## The shared port protocol

All three cores have the same ports and the same controller (`lwc_ctrl`):

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | clock, rising edge |
| `rst_n`     | in  | 1  | asynchronous active-low reset of the controller |
| `in_valid`  | in  | 1  | a load word is offered |
| `in_ready`  | out | 1  | the core is in its load state |
| `key_in`    | in  | 32 | key word 0..3, least significant word first |
| `data_in`   | in  | 32 | plaintext word 0..1 in the first two load words, ignored in the last two |
| `busy`      | out | 1  | rounds are being computed |
| `out_valid` | out | 1  | `data_out` holds a ciphertext word |
| `data_out`  | out | 32 | ciphertext: low word, then high word on the next cycle |

A block goes through the core like this:

```
cycle:     L0  L1  L2  L3 | R0 R1 ... R(N-1) | O_lo O_hi | L0 ...
in_valid    1   1   1   1 |  x  x       x    |  x    x   |  1
in_ready    1   1   1   1 |  0  0       0    |  0    0   |  1
busy        0   0   0   0 |  1  1       1    |  0    0   |  0
out_valid   0   0   0   0 |  0  0       0    |  1    1   |  0
```

A load word is taken on every rising edge where `in_valid && in_ready`;
gaps between words are allowed. After the fourth word the core is busy for
exactly N cycles (192 or 44) and ignores `in_valid`. The two ciphertext
words follow on two consecutive cycles; there is no output back-pressure,
so the receiver must take them. The next block can be loaded from the
cycle after the high word. After reset the controller waits for load
word 0; the datapath registers are not reset, since every block loads
them.

## LED-128: the serial 32-bit datapath

LED's state is a 4×4 matrix of 4-bit cells. Here it sits in a 64-bit
register, row-major, cell (0,0) in bits 63:60. The 128-bit key is split
into K1 (key bits 127:64) and K2 (bits 63:0). LED has no key schedule:
the 48 rounds are grouped into 12 steps of four rounds, and K1 and K2 are
XORed into the state alternately at the start of each step (K1 first).
After the last step K1 is added once more. A round is

1. **AddConstants**: column 0 gets the row index XOR the key-size nibble
   (key size 128 = 0x80, so rows 0–3 get 8, 9, 2, 3). Column 1 gets the
   top three bits of a 6-bit round constant in rows 0 and 2, and the
   bottom three in rows 1 and 3. The constant is a shift register that
   shifts left each round and shifts in rc5 ⊕ rc4 ⊕ 1; it starts at 0x01.
2. **SubCells**: the 4-bit PRESENT S-box on every cell.
3. **ShiftRows**: row i rotates left by i cells.
4. **MixColumnsSerial**: each column is multiplied by the MDS matrix
   M = A⁴ over GF(2⁴) with x⁴+x+1:
   `[4 1 2 2; 8 6 5 6; B E A 9; 2 2 F B]`.

Only 32 bits of logic are available, so a round takes four cycles. The
64-bit state register is rewritten half at a time:

| phase | 32-bit unit used | what is written |
|-------|------------------|-----------------|
| 0 | `led_subcells32` on rows 0–1 | rows 0–1 ← SubCells(AddConstants(rows 0–1 ⊕ key word)) |
| 1 | `led_subcells32` on rows 2–3 | rows 2–3 ← the same for rows 2–3 |
| 2 | `led_mixcol32` on columns 0–1 of the shifted state | whole state ← ShiftRows(state), then columns 0–1 mixed |
| 3 | `led_mixcol32` on columns 2–3 | columns 2–3 mixed; next round constant |

Phases 0 and 1 finish AddConstants and SubCells for the whole state
before ShiftRows moves any cell. Phase 2 does the full 64-bit ShiftRows in
wiring and mixes the two columns that are then complete. Columns 2–3 of
the shifted state are kept in the register until phase 3 mixes them. The
key word only enters in phases 0 and 1 of the first round of a step. It
comes from a 4:1 multiplexer over {K1, K2} × {rows 0–1, rows 2–3}, where
bit 2 of the round number picks K2. A 2:1 multiplexer picks the 32-bit
half for the S-box layer, and a 64-bit 2:1 multiplexer picks the shifted
or unshifted state for the mix unit.

The final K1 addition costs no cycle: it is a 32-bit XOR on `data_out`.
This works because the key register never changes during encryption. So
48 rounds × 4 cycles = 192 busy cycles.

`led_mixcol32` forms the product with M in one step. The LED
specification describes it as four serial applications of A. The
testbench reference uses the serial form, so the two are checked against
each other.

## SIMON 64/128

The state is two 32-bit words, l (high) and r (low). One round
(`simon_round`) is

    l' = (ROL1(l) & ROL8(l)) ^ ROL2(l) ^ r ^ k,   r' = l

The key schedule (`simon_keygen`) holds four 32-bit words a..d =
k[i] .. k[i+3]. The current round key is a. In the same cycle as the
round, it shifts d→c→b→a and writes into d

    t = ROR3(k[i+3]) ^ k[i+1]
    k[i+4] = 0xFFFFFFFC ^ z3[i] ^ k[i] ^ t ^ ROR1(t)

where z3 is the 62-bit SIMON constant sequence for this block and key
size, stored as a constant (`lwc_pkg::SIMON_Z3`, bit 61 is used in round
0). Register d has one 2:1 input multiplexer, key word or feedback. The
key is therefore loaded through the same shift path, least significant
word first. Plaintext enters the same way: the multiplexer in front of
register l chooses between `data_in` and the round output, and l shifts
into r. The loaded block is {word 1, word 0} = {l, r}.

## SIMECK 64/128

SIMECK uses SIMON's Feistel shape with different rotations
(`simeck_round`):

    f(x) = (x & ROL5(x)) ^ ROL1(x),   l' = r ^ f(l) ^ k,   r' = l

Its key schedule (`simeck_keygen`) reuses the round function itself. The
key words form the shift (t2, t1, t0, k0), with k0 the current round key.
Each step computes

    k0 ← t0,  t0 ← t1,  t1 ← t2,  t2 ← k0 ^ f(t0) ^ 0xFFFFFFFC ^ z_i

The bit z_i comes from a 6-bit LFSR (x⁶+x+1, all ones at load), so no
sequence table is needed. Load shifts key words into t2, least
significant first. After four loads k0 holds the lowest key word and t2
the highest.

## Files

| file | content |
|------|---------|
| `rtl/lwc_pkg.sv` | widths, round counts, state enum, S-box, GF(2⁴) multiply, MDS matrix, SIMON z3, shared rotate functions |
| `rtl/lwc_ctrl.sv` | load/run/output sequencer shared by the cores, with assertions |
| `rtl/led_subcells32.sv`, `rtl/led_mixcol32.sv`, `rtl/led_core.sv` | LED-128 |
| `rtl/simon_round.sv`, `rtl/simon_keygen.sv`, `rtl/simon_core.sv` | SIMON 64/128 |
| `rtl/simeck_round.sv`, `rtl/simeck_keygen.sv`, `rtl/simeck_core.sv` | SIMECK 64/128 |
| `rtl/lwc_top.sv` | the three cores side by side |
| `tb/lwc_ref_pkg.sv` | behavioural reference models of the three ciphers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lwc_image` |
| `tb/lwc_core_agent.sv`, `tb/lwc_image_agent.sv` | drivers used by the top-level testbenches |

Each `ROUNDS` parameter defaults to the cipher's round count. The
constants are specific to 64-bit blocks and 128-bit keys. Changing
`ROUNDS` only gives reduced-round variants; the testbenches' reference
models and vectors assume the full count.

## Verification

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`.

* The reference models in `tb/lwc_ref_pkg.sv` reproduce the published
  test vectors: LED-128 (all-zero → `3decb2a0850cdba1`;
  P = `0123456789abcdef`, K = `0123456789abcdef0123456789abcdef` →
  `d6b824587f014fc2`), SIMON 64/128 and SIMECK 64/128 (K =
  `1b1a1918131211100b0a090803020100`, P = `656b696c20646e75` →
  `44c8fc20b9dfa07a` and `45ce69025f7ab7ed`).
* Unit testbenches compare the round, key-schedule, S-box/constant and
  mix units with independent formulations over thousands of random
  inputs.
* The core testbenches encrypt the vector and 40 random blocks each. They
  insert idle gaps between load words and raise `in_valid` while the core
  is busy. They also check that the core is busy for exactly 192 or 44
  cycles, and that a reset in the middle of a block returns the core to
  its load state, after which it encrypts correctly.
* `tb_lwc_top` runs all three cores at once through `lwc_top` at default
  parameters, 30 blocks each. It counts gapped loads, back-to-back
  blocks, ignored words while busy, LED K1 and K2 step additions
  (exactly six of each per block) and cycles with all three cores busy.
  It fails if any of these never happens.
* `tb_lwc_image` is the image-encryption workload. Each core encrypts the
  same generated 256×256 8-bit greyscale image: a smooth pattern with a
  little noise, so neighbouring pixels are strongly correlated. Each row
  is cut into 8-pixel blocks, and the 8192 blocks are encrypted
  independently under one key. The testbench checks every block against
  the model. It also requires the cipher image to have entropy above
  7.99 bits and adjacent-pixel correlation below 0.02 in magnitude.
  Measured: plain image entropy 7.44, correlation 0.996. Cipher images
  have entropy 7.9973–7.9974 and correlations within ±0.007 for all
  three ciphers.

To run one with plain Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/lwc_pkg.sv tb/lwc_ref_pkg.sv tb/tb_lwc_top.sv --top-module tb_lwc_top
./obj_dir/Vtb_lwc_top
```

Each test finishes in seconds.

## Where this RTL makes its own choices

* **Interface**: the word order (least significant first), the
  `in_valid`/`in_ready` load handshake, output without back-pressure, and
  reset of only the controller. The original architecture specifies only
  the four-cycle, 32-bit load of key and message in parallel.
* **LED round schedule**: the four-phase order above is this design's
  own. It uses the units the architecture lists: key and message
  registers, a 4:1 and a 32-bit 2:1 key/half multiplexer, a 64-bit 2:1
  multiplexer, a 32-bit S-box layer, and ShiftRows over 64 bits.
  Doing the final key addition on the output keeps the stated
  192-cycle latency.
* **Cipher constants** (LED round constants, MDS matrix, key-size nibble,
  SIMON z3, SIMECK LFSR and C = 2³²−4) follow the cipher
  specifications.
* **Flip-flop count**: these cores have 212 (LED), 204 (SIMON) and 210
  (SIMECK) flip-flops, counting the 12-bit controller. The SIMON and
  SIMECK datapaths match the 192 state-and-key bits (64 + 128) that the
  architecture lists. For LED it lists 320 flip-flops where this design
  needs 192 for state and key plus a 6-bit round constant. The extra
  registers are not described, so they are not reproduced.
* **Not implemented**: SIMON decryption (the inverse round is defined,
  but the architecture is evaluated for encryption only), and any
  block-chaining mode. Blocks are encrypted independently.
