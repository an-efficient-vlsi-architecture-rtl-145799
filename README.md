# Sub-pipelined AES-128 encryptor

This core encrypts one 128-bit block per clock cycle with AES-128. It gets that throughput by
building all ten AES rounds as separate hardware ("loop unrolling") and by cutting each
round into stages. A register sits after every AES transformation, not just at the end of
each round. The data path has no feedback, so every stage moves forward on every clock. A
new plaintext, with its own key if needed, can enter on each cycle. Its ciphertext leaves
41 cycles later.

The trade is area for speed. The core holds 41 blocks in flight and about 10,400
flip-flops. It uses 200 S-box tables: 160 in the data path and 40 in the key schedule.
Each round's critical path is only as long as one transformation.

## Pipeline structure

```
 plain_text ─►[IN]─┐
                   ⊕──►[ARK0]──► ROUND 1 ──► ROUND 2 ──► … ──► ROUND 9 ──► ROUND 10 ──► cipher_text
 cipher_key ─►[IN]─┘              ▲           ▲                  ▲           ▲
                   │              │           │                  │           │
                   └──► key expansion unit (round keys 0 … 10, each delayed to its round)

 ROUND 1..9 :  SubBytes ─►[R]─► ShiftRows ─►[R]─► MixColumns ─►[R]─► AddRoundKey ─►[R]
 ROUND 10   :  SubBytes ─►[R]─► ShiftRows ─►[R]─────────────────────► AddRoundKey ─►[R]
```

`[IN]` are the input registers for plaintext and key. `[ARK0]` holds the plaintext after the
initial key addition. `[R]` are the registers inside each round. The last register of round 10
is the output register.

| stage                          | registers | cycle the block is held (0 = input register) |
|--------------------------------|-----------|----------------------------------------------|
| input registers                | 1         | 0                                            |
| initial AddRoundKey            | 1         | 1                                            |
| round r = 1..9                 | 4 each    | 4r−2, 4r−1, 4r, 4r+1                         |
| round 10 (no MixColumns)       | 3         | 38, 39, 40                                   |

So a block put on the ports in cycle *t* appears on `cipher_text` with `out_valid` in cycle
*t* + 41. Treat the core as a pipeline of k = 41 segments. Then *n* back-to-back blocks take
k + n − 1 cycles from the first input to the last output, against n·k cycles for a core
that handles one block at a time. For long streams the speedup approaches 41. The
end-to-end testbench checks the k + n − 1 figure with 123 blocks.

The register after ShiftRows stores a pure permutation of wires, so it adds no logic depth
to cut. It is kept so that every transformation has its register, as in the architecture
this design follows. Removing it is the first thing to try if the design needs to save area
(see *Changing the design*).

## Key expansion runs beside the data

AES-128 needs eleven round keys of four 32-bit words each (44 words). Round key 0 is the
cipher key. Each later round key comes from the one before it in a single step:

```
w4 = w0 ⊕ g(w3)   w5 = w1 ⊕ w4   w6 = w2 ⊕ w5   w7 = w3 ⊕ w6
g(w) = SubWord(RotWord(w)) ⊕ (Rcon[i] << 24),  Rcon[i] = x^(i−1) in GF(2^8)
```

`aes_key_step` is one such step. `aes_key_expansion` chains ten of them, one step per round.
Each step is followed by a register and then a short delay line. These deliver round key *r*
in exactly the cycle when round *r*'s AddRoundKey reads it. That is the cycle in which the
block sits in the round's last internal register:

| round key | 0 | 1 | 2 | … | 9  | 10 |
|-----------|---|---|---|---|----|----|
| cycle     | 0 | 4 | 8 | … | 36 | 39 |

The function `aes_pkg::key_use_cycle(r)` gives this table. Because the keys travel with the
data, every block can use a different key, and changing keys costs no cycles. The price is
39 × 128 key-pipeline flip-flops. If the key never changes, a single set of eleven key
registers would do the same job.

## The four transformations

The state is the 128-bit block read as a 4×4 byte matrix, column by column, in FIPS-197
order. Byte 0 is in bits 127:120, and byte *n* sits in row *n* mod 4, column *n*/4. Every
port in the design uses this order. So `128'h3243f6a8…` means that 0x32 is byte 0.

- **SubBytes** (`aes_sub_bytes`, `aes_sbox`) sends each byte through the S-box. The S-box
  is a 256-entry table, and the RTL does not contain it as a list of numbers. The package
  function `aes_pkg::build_sbox` computes it at elaboration from the definition: take
  the multiplicative inverse in GF(2^8) modulo x⁸+x⁴+x³+x+1, with 0 mapped to 0. The inverse
  is formed as a²⁵⁴. Then apply the affine map
  b'ᵢ = bᵢ ⊕ bᵢ₊₄ ⊕ bᵢ₊₅ ⊕ bᵢ₊₆ ⊕ bᵢ₊₇ ⊕ 0x63ᵢ, with indices taken mod 8. The hardware only
  reads the constant table, and synthesis maps it to a ROM or to LUT logic.
- **ShiftRows** (`aes_shift_rows`) rotates row *r* left by *r* bytes,
  s'[r][c] = s[r][(c + r) mod 4]. It is wiring only.
- **MixColumns** (`aes_mix_columns`) multiplies each column by the circulant matrix
  [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02] over GF(2^8). Multiplication by 02 is
  `xtime` (shift left, then XOR 0x1b if the top bit was set). Multiplication by 03 is
  `xtime(a) ⊕ a`.
- **AddRoundKey** (`aes_add_round_key`) XORs state column *c* with key word w[4·round + c].
  The same module performs the initial key addition.

`aes_round` puts the four transformations in that order, each followed by its register. With
the parameter `FINAL = 1` it leaves out MixColumns and becomes round 10.

## Interface

| port          | dir | width | meaning                                                  |
|---------------|-----|-------|----------------------------------------------------------|
| `clk`         | in  | 1     | clock; all registers use the rising edge                 |
| `rst_n`       | in  | 1     | asynchronous active-low reset                            |
| `in_valid`    | in  | 1     | `plain_text` and `cipher_key` hold a block in this cycle |
| `plain_text`  | in  | 128   | plaintext block                                          |
| `cipher_key`  | in  | 128   | AES-128 key for this block                               |
| `out_valid`   | out | 1     | `cipher_text` holds a result in this cycle               |
| `cipher_text` | out | 128   | ciphertext block, 41 cycles after its input              |

There is no ready signal or back-pressure. The core accepts a block on every cycle in which
`in_valid` is high and never stalls. Idle cycles (bubbles) pass through as cycles in which
`out_valid` stays low. Reset clears only the valid flags. Blocks in flight at reset are
dropped, and the data registers keep whatever they held.

Known answer: plaintext `3243f6a8885a308d313198a2e0370734` with key
`2b7e151628aed2a6abf7158809cf4f3c` gives `3925841d02dc09fbdc118597196a0b32`.

## What follows the reference architecture and what is this design's own

The following come from the architecture this core implements:

- ten unrolled rounds;
- input registers for plaintext and key;
- the initial key addition with its register;
- a register at the end of every round and after every transformation inside it;
- three stages in round 10;
- one central key-expansion unit that feeds every round;
- the S-box defined as GF(2^8) inversion followed by an affine map;
- the key-step structure (g function plus an XOR chain);
- the output rate of one block per clock.

The following are this design's own choices:

- **Handshake and reset.** The architecture specifies neither. The valid flags and their
  asynchronous reset were added here.
- **Per-block keys.** The key schedule is pipelined beside the data, so every block can use
  its own key. The original description only shows the key register feeding the expansion
  unit.
- **Contents of g, Rcon, the reduction polynomial, the MixColumns matrix and the byte
  order.** These come from the AES standard (FIPS-197), which the architecture relies on
  without restating.
- **Latency.** The 41-cycle figure follows from the register placement; no number is given
  for it.

What is not here:

- **Decryption.** The inverse cipher (InvSubBytes, InvShiftRows, InvMixColumns and reversed
  round keys) was left as future work by the architecture, and is not built.
- **AES-192 and AES-256.** They are only mentioned; the core is AES-128 throughout.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected values come from a separate behavioural model,
`tb/aes_ref_pkg.sv`. That model is written differently from the RTL: it finds the S-box
inverse by search, applies the affine map in rotate form, works on a [row][column] byte array,
and runs the standard word-by-word key schedule. Published FIPS-197 values are also checked
literally.

| testbench              | what it shows                                                                 |
|------------------------|-------------------------------------------------------------------------------|
| `tb_aes_sbox`          | all 256 entries; 00→63, 01→7c, 53→ed, ff→16                                   |
| `tb_aes_sub_bytes`     | FIPS-197 round-1 SubBytes; 500 random states                                  |
| `tb_aes_shift_rows`    | an index pattern showing where every byte moves; FIPS example; random states  |
| `tb_aes_mix_columns`   | FIPS round-1 and db135345→8e4da1bc; random states                             |
| `tb_aes_add_round_key` | FIPS initial key addition; random pairs                                       |
| `tb_aes_key_step`      | every step of the FIPS key schedule; round keys 1 and 10 literally; random keys |
| `tb_aes_key_expansion` | a new key every clock; all eleven outputs checked at their cycles of use       |
| `tb_aes_round`         | normal and final round, random stream with bubbles; latency 4 and 3; reset     |
| `tb_aes_encryptor`     | two FIPS known answers; 123 back-to-back blocks with a new key each, pipeline completely full, k+n−1 timing; 600 cycles of random traffic with bubbles and key changes; reset with blocks in flight; exact 41-cycle latency for every block |

Each `aes_round` also carries a concurrent assertion: `out_valid` may only rise exactly
STAGES cycles after an `in_valid`. Run simulations with `--assert` to enable it.

The end-to-end test runs the top at its only configuration, since the top has no
parameters. It takes well under a second.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_encryptor.sv \
    --top-module tb_aes_encryptor -o sim
./obj_dir/sim
```

Replace `tb_aes_encryptor` with any other testbench name to run that block. To lint the
RTL alone, run `verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/aes_encryptor.sv`.
The only warning is about `aes_pkg::LATENCY`, which the RTL does not need; it is there for
users of the core, and the end-to-end testbench checks it against the measured latency.

## Changing the design

- **Fewer registers per round.** Change the registers in `aes_round.sv` and set
  `ROUND_STAGES` / `FINAL_STAGES` in `aes_pkg.sv` to match. The key delays in
  `aes_key_expansion` are derived from those constants through `key_use_cycle`. The round
  itself is not derived from them, so the two must be kept in step by hand. Update
  `LATENCY` in `tb_aes_encryptor.sv` and the per-round expectations in `tb_aes_round.sv`
  too.

## Files

`rtl/aes_pkg.sv` holds the types, the GF(2^8) helpers, the S-box construction and the timing
constants. The modules are `aes_sbox`, `aes_sub_bytes`, `aes_shift_rows`, `aes_mix_columns`,
`aes_add_round_key`, `aes_round`, `aes_key_step`, `aes_key_expansion` and the top,
`aes_encryptor`. Each file opens with a comment on its function, interface and timing.
