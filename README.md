# AES-128 crypto engine with a combinational, table-free S-box

This is an iterative AES-128 engine that encrypts and decrypts 128-bit blocks
with one 128-bit secret key. Its central idea is the S-box. A conventional
implementation stores the 256-entry substitution table in ROM/LUTs. Here every
S-box is computed in gates instead. The byte is mapped into the composite field
GF((2^4)^2), inverted there with small 4-bit and 2-bit arithmetic, mapped back
and passed through the AES affine transform. The decryption direction reuses
the same inverter. The engine runs one round per clock and loads a new block
once the previous result has been taken.

```
            key_in ──► key_expansion ──(rk_idx / rk)──┐
                      44 x 32-bit words, 4 S-boxes    │
                                                      ▼
 in_data ──► aes_core: state reg ◄── round_datapath ◄─┘
                        │            (16 S-boxes, ShiftRows,
                        ▼             MixColumns, 2 key XORs)
                     out_data
```

## The S-box in logic (`sbox_comb`)

Forward S-box: `x → δ → inverse in GF((2^4)^2) → δ⁻¹ → AT → y`.
Inverse S-box: `x → AT⁻¹ → δ → inverse → δ⁻¹ → y`.

One `inv` input drives two multiplexers, one before δ and one after δ⁻¹. The
mappings and the inverter are shared by both directions.

**Affine transform (`affine_transform`).** AT multiplies the byte by an 8×8 bit
matrix and XORs 0x63. The first matrix row, `11111000`, gives output bit 7, and
each following row is rotated one place right. AT⁻¹ uses the rows `01010010,
00101001, 10010100, 01001010, 00100101, 10010010, 01001001, 10100100` and the
constant 0x05. In both matrices the top row yields the most significant output
bit, and each row's MSB multiplies input bit 7.

**Isomorphic mapping (`isomap`).** δ takes a byte from the AES polynomial basis
(modulo x⁸+x⁴+x³+x+1) to the tower representation, and δ⁻¹ takes it back. Both
are plain 8×8 bit matrices:

| | rows (top row → bit 7) |
|---|---|
| δ  | 10100000 11011110 10101100 10101110 11000110 10011110 01010010 01000011 |
| δ⁻¹ | 11100010 01000100 01100010 01110110 00111110 10011110 00110000 01110101 |

**Tower field.** δ and δ⁻¹ are only correct for one tower, which the helper
functions in `aes_pkg` implement:

* GF(2²): polynomial x²+x+1. The inverse equals the square: `{q1, q1^q0}`.
* GF(2⁴) = GF(2²)[x]/(x²+x+φ), with φ = {10}.
* GF(2⁸) = GF(2⁴)[x]/(x²+x+λ), with λ = {1100}.

**Inversion (`gf_mul_inverse`).** A byte is split into `b·x + c`, with b the
upper nibble and c the lower nibble. Its inverse is

```
(b·x + c)⁻¹ = b·d⁻¹ · x + (b ⊕ c)·d⁻¹,   d = λ·b² ⊕ c·(b ⊕ c)
```

The GF(2⁴) inverse of d follows the same formula one level down, using
GF(2²). Squaring and multiplying by λ are linear (XORs only). An input of zero
gives zero, which the S-box needs. The result is a few hundred gates with no
storage. The block testbench checks it exhaustively against the standard S-box
table in both directions.

## One round in both directions (`round_datapath`)

| direction | order of steps |
|---|---|
| encrypt | SubBytes → ShiftRows → MixColumns → AddRoundKey |
| decrypt | InvShiftRows → InvSubBytes → AddRoundKey → InvMixColumns |

The last round (`last = 1`) bypasses (Inv)MixColumns.

Both directions share one bank of 16 S-boxes, one `shift_rows` and one
`mix_columns`. Their direction is set by `inv`. Two details make this work
without combinational loops:

* A byte-wise substitution commutes with a byte permutation. The S-boxes can
  therefore always come first, and the (inverse) row shift second.
* The key is added after MixColumns when encrypting but before InvMixColumns
  when decrypting. So there are two 128-bit XOR banks, and only the mixer's
  input is multiplexed.

The other transforms:

* `shift_rows` rotates row r left by r bytes, or right by r bytes for the
  inverse. Row 0 is wiring only.
* `mix_columns` multiplies each column by the circulant matrix with first row
  (02 03 01 01), or (0e 0b 0d 09) for the inverse. The products are built from
  `xtime`.
* `add_round_key` is a 128-bit XOR.

State layout (FIPS-197): byte i is `state[127-8i -: 8]`, at row i%4 and column
i/4.

## Key schedule (`key_expansion`)

`start` copies the key into w[0..3]. Each of the next 10 cycles then produces one
group of four words:

```
w[4i]   = w[4i-4] ⊕ SubWord(RotWord(w[4i-1])) ⊕ Rcon(i)
w[4i+j] = w[4i+j-4] ⊕ w[4i+j-1]                 (j = 1..3)
```

Rcon is 01, 02, 04, …, 80, 1b, 36. SubWord uses four more `sbox_comb`
instances. All 44 words stay in a register array, 1408 flip-flops. Round key r
(`w[4r..4r+3]`) is read combinationally by index, which lets decryption walk
the keys backwards.

Timing of `busy` and `done`:

* `busy` is high during the 10 expansion cycles.
* `done` rises on the 10th clock edge after the start edge.
* A `start` while busy is ignored.

## Control and timing (`aes_core`, `aes_crypto_top`)

| port group | signals | meaning |
|---|---|---|
| key | `key_valid`/`key_ready`, `key_in` | `key_ready` is high when no expansion runs and no block is in flight |
| status | `keys_valid` | the schedule for the last key is complete |
| input | `in_valid`/`in_ready`, `in_decrypt`, `in_data` | `in_ready` needs an idle core and `keys_valid`; `in_decrypt` = 1 means decrypt |
| output | `out_valid`/`out_ready`, `out_decrypt`, `out_data` | the result is held until `out_ready` |

How a block moves through the core:

1. **Accept edge.** The core registers `in_data ⊕ round key 0` when encrypting,
   or `in_data ⊕ round key 10` when decrypting.
2. **Rounds.** The next 10 edges run rounds 1..10. Encryption uses key r;
   decryption uses key 10−r. `rk_idx` asks the key store for the right key in
   the same cycle.
3. **Output.** `out_valid` rises on the 10th edge after the accept edge.
   An assertion checks that the output stays stable while `out_ready` is low.
4. **Next block.** It is accepted on the cycle after the result is taken, so
   at best a block starts every 12 cycles.

Both key expansion and block processing take 10 cycles.

Clocking, reset and size:

* Reset is asynchronous and active low.
* The critical path is one full round: S-box logic, row shift, MixColumns and
  XOR.
* After generic synthesis the top is about 3.9k word-level cells and 1.5k
  flip-flop bits.

## Where this design goes beyond, or departs from, the published description

* **Architecture.** The published description does not say whether the rounds
  are unrolled or iterated, nor what the handshakes or reset look like.
  One round per clock, the valid/ready ports and the asynchronous reset are
  this design's choices.
* **Interface width.** The reported FPGA design used only 16 I/O pins. These
  ports are 128 bits wide (395 pins in all), more than the 232 of the target
  Spartan-6 device. Fitting that device would need a narrow wrapper that
  shifts key and data in and out.
* **δ matrix.** δ is used as the exact matrix inverse of δ⁻¹. With it, the
  S-box reproduces the standard table for all 256 inputs.
* **Taken from the AES standard (FIPS-197).** The order of steps in the
  inverse cipher, the InvMixColumns coefficients, the Rcon values and the
  reduction polynomial.
* **Key sizes.** Only 128-bit keys are supported. AES-192 and AES-256 (12 and
  14 rounds) are mentioned in the source but were not part of the reported
  implementation.
* **`NR_P` parameter.** It sizes the round count and the key array, but the key
  recurrence is the AES-128 one. Do not change it.
* **ROM baseline not built.** The ROM-based S-box the source compares against
  is not part of this design. Its LUT, delay and memory figures are not
  reproduced; this RTL has not been put through FPGA implementation.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, `NR`, `xtime`, `rcon`, GF(2²)/GF(2⁴) helpers, bit-matrix product |
| `rtl/affine_transform.sv`, `rtl/isomap.sv`, `rtl/gf_mul_inverse.sv` | S-box stages |
| `rtl/sbox_comb.sv`, `rtl/sub_bytes.sv` | one S-box, 16 S-boxes |
| `rtl/shift_rows.sv`, `rtl/mix_columns.sv`, `rtl/add_round_key.sv` | the other round steps |
| `rtl/round_datapath.sv` | one round, either direction |
| `rtl/key_expansion.sv` | key schedule and round-key store |
| `rtl/aes_core.sv` | round controller, state register, handshakes |
| `rtl/aes_crypto_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | reference AES model for the testbenches |
| `tb/sbox_table.hex` | the standard 256-entry S-box table, row = high nibble |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ref_selftest` |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each also has
a watchdog that stops it and counts a failure.

**Reference model.** `aes_ref_pkg` is written independently of the RTL:

* The S-box is computed as a²⁵⁴ followed by a rotate-and-XOR affine map.
* The cipher works on a 4×4 byte array.

`tb_ref_selftest` checks this model against the FIPS-197 examples (C.1,
Appendix B and the A.1 key schedule) and against `sbox_table.hex`.

**S-box stages** (exhaustive over all 256 byte values):

* `sbox_comb`: both directions against the table.
* `gf_mul_inverse`: checks x·inv(x) = 1 using an independently written tower
  multiplier.
* `isomap`: checks the round trip, and that δ turns AES products into tower
  products.
* `affine_transform`: checks against the rotation form of AT and AT⁻¹.

**Round steps and round.** Random states, plus the intermediate values of
round 1 of the FIPS-197 Appendix B example.

**Key schedule.** Every round key for the FIPS key and 20 random keys. Also
checks the 10-cycle timing and that a start while busy is ignored.

**Controller.** 32 blocks, each checked for the 10-cycle latency, for
`in_ready` staying low while busy, and for the output being held.

**Top level** (`tb_aes_crypto_top`, no parameter overrides):

* The FIPS vectors and 200 random blocks with random modes, gaps, rekeys and
  output back-pressure, checked against the reference model.
* The latency of every block.
* That each mechanism occurs at least once: key load, rekey, encryption,
  decryption, mode switch, a block waiting for the schedule, a block waiting
  for a busy core, a key waiting for a busy core, and a stalled output.

To simulate with Verilator (from the directory above `rtl/` and `tb/`, because
`$readmemh` uses the path `tb/sbox_table.hex`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_crypto_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_crypto_top.sv
./obj_dir/Vtb_aes_crypto_top
```

The same command with another `tb_<module>` runs a single block's test.

Lint warnings that remain:

* `rst_n` is reported as both synchronous and asynchronous. This comes from the
  `disable iff` of the output-hold assertion.
* `shift_rows` shows row-0 outputs wired straight to inputs. That is the
  function of ShiftRows.
