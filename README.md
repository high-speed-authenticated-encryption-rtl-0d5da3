# Key-synthesized AES-GCM

AES-GCM encrypts and authenticates data. It combines AES in counter mode with
GHASH, a chain of multiplications in GF(2^128) by a hash key H. Some
applications change the key only rarely: VPN links re-key weekly or monthly,
and memory encryption keeps its key for months. For them this core builds
the key into the logic. A new key means a new build of the design, which is
loaded as a new FPGA configuration. In exchange, two costly parts of a
general AES-GCM engine disappear:

* **No AES key schedule.** The eleven AES-128 round keys are constants.
  Each AddRoundKey becomes an XOR with a constant: bits where the key is 0
  cost no logic, and bits where it is 1 become inverters.
* **No general GF(2^128) multiplier.** H = E(K, 0^128) is a constant too.
  The GHASH multiplier only has to multiply by this one value. That turns it
  into a network of XOR gates with no AND gates. It is small enough to
  finish in one clock, so GHASH takes one block per clock without any
  pipeline hazard.

The core takes one 128-bit block per clock. At 216 to 242 MHz on Virtex-4 or
Virtex-5 FPGAs, that is 27.7 to 30.9 Gbit/s.

## Data flow

```
             +-----------+   counter    +---------------------------+
in_data ---->| counter   |------------->| AES-128, constant keys    |--- keystream --+
  (IV)       | J0, inc32 |              | 50/40/70-clock pipeline   |                |
             +-----------+              +---------------------------+                v
in_data ---------------- delay line, same depth as the AES pipeline -------------->( XOR )
                                                                                    |
                                                                             [register] --> out_data (C)
                                                                                    |
                                                     +------ Y <---------+          |
                                                     v                   |          v
                                                  ( XOR ) <-----------------------  C / AAD / length
                                                     |                   |
                                                 ( * H )  constant H     |
                                                     |                   |
                                                 [register Y] -----------+--> XOR E(K,J0) --> tag
```

`aes_gcm_top` wires these parts together:

| module | role |
|---|---|
| `aes_gcm_pkg` | types, and the elaboration-time functions: key expansion, `aes_encrypt` for H, the S-box table, the GHASH table, and GF(2^4) helpers |
| `gcm_counter` | J0 = IV‖0^31‖1 when a message starts, then `inc32` for each text block |
| `aes_keysynth` | the pipelined AES-128 with constant round keys |
| `aes_round` | one round, split into register stages |
| `aes_subbytes` | 16 S-boxes of one of three styles |
| `sbox_bram`, `sbox_lut`, `sbox_composite` | the three S-box styles |
| `ghash_fixed` | the register Y ← (Y ⊕ X)·H |
| `gf128_fixed_mult` | the constant-H multiplier |

## Interface of `aes_gcm_top`

Parameters:

* `KEY`: the AES-128 key. The default is 000102…0f.
* `STYLE`: which S-box to build. One of `SBOX_BRAM` (the default),
  `SBOX_LUT` or `SBOX_COMPOSITE`.

A message is a stream of typed beats on `in_valid`, `in_kind`, `in_data` and
`in_mask`:

| `in_kind` | content of `in_data` | action |
|---|---|---|
| `BK_IV` | 96-bit IV in bits [127:32] | starts a message: E(K, J0) is computed and kept, Y is cleared |
| `BK_AAD` | an additional-data block | hashed only |
| `BK_TEXT` | a plaintext block | encrypted, and the ciphertext is hashed |
| `BK_LEN` | len(A)‖len(C) in bits, 64 bits each | hashed, then the tag is produced |

Rules for the stream:

* Send one IV beat, then any number of AAD beats, then any number of text
  beats, then one length beat.
* `in_mask` marks the valid bytes of a beat. Bit 15 is byte 0, which is
  `in_data[127:120]`. Bytes outside the mask are zeroed before hashing and
  in the ciphertext. This is how a short last AAD or text block is sent.
* Idle clocks are allowed anywhere. A new message may start on the clock
  right after a length beat.
* There is no back-pressure. Every beat is accepted.

Outputs:

* **Ciphertext:** `out_valid`, `out_data` and `out_mask`. They appear
  LATENCY + 1 clocks after the plaintext beat.
* **Tag:** `tag` is valid for one clock while `tag_valid` is high. That is
  LATENCY + 2 clocks after the length beat.

LATENCY is the AES pipeline depth, given by `aes_gcm_pkg::aes_latency`: 50
clocks with block-RAM S-boxes, 40 with LUT S-boxes and 70 with
composite-field S-boxes.

The reset `rst_n` is asynchronous and active low. It clears the valid bits,
the counter, Y and the saved E(K, J0). The pipeline data registers are not
reset.

## The fixed-operand GHASH multiplier

The usual bit-serial multiply X = A·H loops over the 128 bits of A. At each
step it adds the current multiple of H when A_i = 1, then shifts H one place
(multiplies it by x) and reduces it with R = 11100001‖0^120. The shifting
and reducing depend on H alone. With H fixed, that half of the loop runs at
elaboration in `aes_gcm_pkg::ghash_table` and leaves a table
T[i] = H·x^i for i = 0…127. The hardware does only the other half:

    X = XOR of T[i] over all i with A_i = 1

Each output bit j is the XOR of the bits A_i for which bit j of T[i] is 1.
Synthesis keeps the table's ones as XOR inputs and drops its zeros. On
average that gives 64-input XOR trees with no AND gates. Changing the key
changes this wiring.

Bit order follows GCM. Field bit i of a block is vector bit [127-i], so
"shift right" in the GCM text is `>>` on the vector.

Some published listings of this algorithm store T[i] after the shift instead
of before it. That gives H·x^(i+1), which is not the GCM product. This design
stores T[i] before the shift.

## The AES pipeline and its three S-boxes

The pipeline is the initial AddRoundKey with K0 and a register, then rounds 1
to 10. Each round (`aes_round`) has these register stages:

1. SubBytes, with the S-box's own registers
2. a register after ShiftRows
3. a register after MixColumns
4. a register after AddRoundKey

Round 10 has no MixColumns and so no stage 3.

The S-box styles are:

* **Block RAM** (`sbox_bram`, 2 clocks): a 256×8 ROM with a synchronous
  read, then a register. This style uses the fewest logic slices.
* **LUT** (`sbox_lut`, 1 clock): the same table written as constant logic,
  then a register. It suits FPGAs with 6-input LUTs.
* **Composite field** (`sbox_composite`, 4 clocks): needs no memory. The byte
  is mapped into GF((2^4)^2), with GF(2^4) = GF(2)[x]/(x^4+x+1) and
  y^2 + y + λ, λ = {1100}. It is then inverted as
  {d⁻¹·a_h, d⁻¹·(a_h⊕a_l)} with d = λ·a_h² ⊕ (a_h⊕a_l)·a_l. The registers
  sit after these stages:
  1. the mapping into the composite field
  2. the computation of d
  3. the GF(2^4) inversion
  4. the two GF(2^4) multiplications

  After the last register come the inverse mapping and the AES affine map,
  with no further register. The mapping matrix is this design's own choice.
  It sends x to the root {0010,0001} of the AES polynomial, and it has been
  checked on all 256 inputs.

The key, the round keys, H, the S-box table and T are all computed by
SystemVerilog constant functions in `aes_gcm_pkg`. No tables are read from
files. For the default key, some of the resulting constants are:

* K1 = d6aa74fdd2af72fadaa678f1d6ab76fe
* K10 = 13111d7fe3944a17f307a78b4d2b30c5
* H = c6a13b37878f5b826f4f8162a1c8d879

## Where this RTL goes beyond the published architecture

These parts are this design's own choices:

* **Length block.** The published block diagram ends GHASH with the last
  ciphertext block. This core follows NIST SP 800-38D instead: it hashes the
  len(A)‖len(C) block and masks the result with E(K, J0). The tags
  therefore match standard GCM.
* **Interface details.** The beat protocol, the byte masks, 96-bit IVs only,
  the delay line that lines up plaintext with keystream, and the reset
  behaviour are not specified by the architecture.
* **Clock speed.** No timing or area figures are reproduced here. Those
  depend on the FPGA and on synthesis. In simulation, only the one block per
  clock rate and the latencies are verified.
* **Key delivery.** A key-specific design is a secret in its own right,
  because its configuration bitstream reveals the key. The intended system
  sends that bitstream encrypted, and the FPGA's own configuration
  decryptor loads it. That protocol is outside the RTL.

## Simulating

Every testbench in `tb/` prints one `TB_RESULT checks=N failures=M` line and
stops. The reference models in `tb/gcm_ref_pkg.sv` (AES, S-box, bit-serial
GF(2^128) multiplication) are written separately from the RTL package. The
testbenches also check published values:

* the FIPS-197 AES example
* the round keys and H of the default key
* the GCM test cases with the all-zero key and with key feffe992…

For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_gcm_pkg.sv tb/gcm_ref_pkg.sv tb/tb_aes_gcm_full.sv --top tb_aes_gcm_full
./obj_dir/Vtb_aes_gcm_full
```

| testbench | what it covers |
|---|---|
| `tb_aes_gcm_full` | default build, one complete message: AAD, 8 text blocks, short blocks, tag, exact clock of every output |
| `tb_aes_gcm_top` | four cores (the three S-box styles with key feffe992…, and LUT S-boxes with the zero key), the published GCM cases and random messages (back to back, idle clocks, AAD-only); counts that each of these situations occurred |
| `tb_aes_keysynth` | round keys, known answers, back-to-back blocks through all three styles, latency |
| `tb_aes_round`, `tb_aes_subbytes`, `tb_sbox_*` | round and S-box stages against the reference, latency |
| `tb_gf128_fixed_mult`, `tb_ghash_fixed` | the constant-H multiplier and the GHASH register |
| `tb_gcm_counter` | J0, inc32 and its 32-bit wrap |

Elaborating a whole core takes Verilator a few minutes. Most of that time
goes to the 160 S-box instances and the 128×128 GHASH constant.
`tb_aes_gcm_top` builds four cores and is the slowest to compile.
