# Pipelined AES-128 encryption with time-shared block-RAM S-boxes

This is a fully unrolled, pipelined AES-128 encryption core (FIPS-197). Each
of the ten rounds is its own pipeline stage with its own round-key
generator, so every block carries its own key through the pipeline and no
key schedule has to be precomputed. The design saves logic in the S-boxes:
instead of sixteen S-box tables per round, each round uses four dual-port
256 x 8 RAMs for the state and one for the key. Each RAM serves four bytes
in two clock slots, two bytes per port per slot. With ten rounds that is
fifty S-box RAMs, which map onto fifty FPGA block RAMs. MixColumns uses
only shifts and XORs.

## Data flow

```
plaintext cols ─► state_input ─┐
                               ├─► add_round_key (initial round) ─► aes_round 1 ─► ... ─► aes_round 10 ─► ciphertext
key cols ──────► state_input ──┘          key ───────────────────►  (state, key)         (no MixColumns)
```

Each `aes_round` contains:

```
state_in ─► round_datapath ──────────────┐
             4 x subbytes_tdm            ├─► add_round_key ─► state register ─► state_out
             ShiftRows (wiring)          │
             4 x mix_column (not FINAL)  │
key_in ───► key_gen_round ───────────────┴──────────────────► key register ───► key_out
             subbytes_tdm on word 3, RotWord, Rcon, XOR chain
```

### State and byte order

A 128-bit state holds bytes s0..s15 with s0 in bits 127:120, as in
FIPS-197. Column c is bytes 4c..4c+3 (bits `127-32c -: 32`), row 0 being the
most significant byte of the column. The top takes plaintext and key as
four 32-bit columns each, `plaintext_col[0]` being column 0; the ciphertext
comes out as one 128-bit word in the same byte order.

## The time-shared S-box (`subbytes_tdm`, `sbox_dpram`)

This is the part that sets the timing of the whole pipeline.

`sbox_dpram` is a true dual-port 256 x 8 RAM with a registered read on each
port and "no read on write" behaviour (a port that writes keeps its old
output). Its contents are computed at elaboration by
`aes_pkg::sbox_table()`: the function walks p through all non-zero field
elements as powers of 3 and q through their inverses as powers of 1/3, and
stores the affine map of q, `q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^
rotl(q,4) ^ 0x63`, at p; entry 0 is 0x63. In the SubBytes units the write
ports are tied to zero, so the RAM is used as a two-port ROM.

`subbytes_tdm` substitutes one 32-bit word (bytes In1..In4) with one such
RAM:

| cycle after `start` | port A address | port B address | RAM outputs at the end of the cycle |
|---|---|---|---|
| 0 | In1 | In3 | S(In1), S(In3), captured into the q0 holding registers at the end of cycle 1 |
| 1 | In2 | In4 | S(In2), S(In4) |
| 2 | – | – | `dout = {q0a, A, q0b, B}` valid, `dout_valid` = 1 |

A one-bit slot counter, restarted by `start`, drives the two address
multiplexers. The two time-division demultiplexers are the q0 holding
registers plus the RAM output registers themselves.

## Round timing and throughput

* `aes_round`: `in_stb` pulses in the first cycle new inputs are present.
  SubBytes results are ready two cycles later, and the round's output
  registers load at the end of that cycle. `out_stb` pulses three cycles
  after `in_stb`.
* The key generator computes `w0 ^ RotWord(SubWord(w3)) ^ Rcon` and the
  following words combinationally in that same third cycle, so the round's
  inputs must stay stable for three cycles. The top therefore accepts at
  most **one block every three cycles**. An assertion in `aes_round` checks
  this rule.
* **Latency:** 1 cycle in the input registers + 10 x 3 cycles = **31 cycles**
  from the accepting clock edge to `out_valid`.
* Up to eleven blocks are in flight: one in the input registers and one per
  round.

## Top-level interface (`aes_encrypt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears only the control strobes) |
| `in_valid` / `in_ready` | in / out | 1 | a block is accepted when both are high; `in_ready` is low for the two cycles after an accept |
| `plaintext_col`, `key_col` | in | 4 x 32 | plaintext and cipher key as columns |
| `out_valid` | out | 1 | one-cycle pulse, 31 cycles after the accept |
| `ciphertext` | out | 128 | result; holds until the next result |
| `round_key` | out | 10 x 128 | `round_key[i]` is the key register of round i+1, i.e. round key i+1 of the block that round last processed |

The output cannot be stalled. A consumer must take each result in its
`out_valid` cycle. Parameter `NROUNDS` (default 10) is the number of
rounds; the last round leaves out MixColumns. Only AES-128 is implemented.
The 12- and 14-round variants for 192- and 256-bit keys would need a
different key expansion.

## Modules

| file | role |
|---|---|
| `aes_pkg.sv` | shared types (`state_t`, `word_t`, `byte_t`), `xtime`, `sbox_table`, `rcon_of` |
| `aes_encrypt_top.sv` | input handshake, input registers, initial AddRoundKey, ten rounds |
| `state_input.sv` | concatenates four columns into the 128-bit input register |
| `aes_round.sv` | one round: data path, key generator, AddRoundKey, end-of-round registers |
| `round_datapath.sv` | four `subbytes_tdm`, ShiftRows wiring, four `mix_column` (bypassed when `FINAL`) |
| `key_gen_round.sv` | next round key from the previous one; `RCON` parameter |
| `add_round_key.sv` | 128-bit XOR, output as four columns |
| `subbytes_tdm.sv` | four-byte SubBytes over two slots with one `sbox_dpram` |
| `sbox_dpram.sv` | dual-port S-box RAM |
| `mix_column.sv` | MixColumns of one column from four `mixcol_byte` |
| `mixcol_byte.sv` | `2*in1 ^ 3*in2 ^ in3 ^ in4` |
| `gf_mul2.sv` | shift left; if the 9-bit result exceeds 255, XOR with 283 (0x11B) |
| `gf_mul3.sv` | `gf_mul2(x) ^ x` |

## Where this design follows the original and where it does not

These parts follow the original architecture:

* unrolled ten-round pipeline with a register at the end of every round;
* initial AddRoundKey, and a final round without MixColumns;
* per-round key generation;
* the two-slot dual-port-RAM SubBytes with its slot assignment (In1/In3,
  then In2/In4);
* MixColumns built from a ×2 shift-and-reduce unit and a ×3 = ×2 ⊕ x unit;
* ShiftRows and RotWord as pure wiring;
* fifty S-box RAMs.

These are this design's own choices:

* **Single clock, three-cycle issue interval.** The original was drawn as a
  multi-rate block diagram and gives no cycle-level schedule. The handshake,
  the 3-cycle issue interval and the 31-cycle latency are choices made here.
  The original reports its latency only as 3.930 ns, which is one clock
  period at its reported 254.453 MHz.
* **XOR where the original diagrams label the gates "and".** The original
  diagrams label the gate that sums the four MixColumns terms, and the one
  that adds x in the ×3 unit, as AND. The accompanying description calls
  that addition XOR. XOR is what AES requires, and it is what is built.
* **Standard results.** The design gives the FIPS-197 results, for example
  66e94bd4ef8a2c3b884cfa59ca342b2e for all-zero plaintext and key. That
  block's first round key, 62636363 62636363 62636363 62636363, matches the
  original design's published simulation. Its other published values,
  including the ciphertext, do not match the standard; this design does not
  reproduce them.
* The S-box RAM's read latency (one cycle), its write-collision rule
  (port B wins) and the computed initial contents.
* The ShiftRows crossing pattern, the RotWord direction and the order of
  the MixColumns coefficients are taken from the AES standard.
* The SubBytes slot counter is restarted by each `start` rather than
  free-running.

Not reproduced: the FPGA results (block-RAM and slice counts, clock rate),
which depend on the vendor flow. A generic synthesis of this RTL gives
102,400 memory bits (50 x 2 Kbit) and about 3,650 flip-flop bits.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They compare against `tb/aes_ref_pkg.sv`,
a reference AES written independently of the RTL: its S-box is found by
brute-force inverse search, and it multiplies with a polynomial
multiply-and-reduce routine. They also check known answers from FIPS-197
(appendix B and C.1 vectors, the appendix-B round-1 state, and
MixColumns test columns).

* `tb_gf_mul2`, `tb_gf_mul3`: all 256 inputs.
* `tb_sbox_dpram`: all 256 entries on both ports, read latency, no read on
  write, cross-port writes.
* `tb_subbytes_tdm`, `tb_round_datapath`, `tb_key_gen_round`,
  `tb_aes_round`: exact cycle of validity and exact values, for normal and
  final rounds and for round constants 0x01 and 0x36.
* `tb_aes_encrypt_top`: runs at the default ten rounds, about 6,000 cycles.
  It covers the known-answer vectors, the zero-key round-key outputs, 400
  blocks offered continuously (throttled by `in_ready`, 11 in flight) and
  100 with random gaps, each with its own random key. It checks every
  ciphertext and a latency of exactly 31 cycles, and fails if throttling,
  minimum-interval issue or a full pipeline never occurred.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_encrypt_top.sv --top-module tb_aes_encrypt_top
./obj_dir/Vtb_aes_encrypt_top
```

Substitute any other `tb_<module>.sv` for other blocks. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/<module>.sv`.
Lint's only remaining warnings are unused package constants.
