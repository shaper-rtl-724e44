# SHAPER accelerator RTL

Two-party privacy-preserving machine learning mixes two kinds of cryptography.
Additive secret sharing (SS) is cheap to compute but chatty on the network.
Additively homomorphic Paillier encryption (AHE) needs little communication
but costs 3072-bit modular arithmetic. SHAPER is an accelerator that does
both, so a host can keep the SS and AHE parts of a protocol on one device and
overlap them with network time.

This repository holds synthesizable SystemVerilog for that accelerator:

- a VLIW instruction front end;
- an AHE unit with 14 Paillier lanes, each built around a pipelined 3072-bit
  modular multiplier;
- an SS unit with a Keccak random generator and 32 integer engines;
- a shared scratchpad, a data mover and control registers.

Paillier encryption is complete, down to the final CRT recombination that
the host does. Decryption and the ciphertext-arithmetic instructions are not
executed (see "Departures and gaps").

## Block diagram

```
             CSR port ──► shaper_csr ──seed──► (SS unit CSPRNG)        irq ◄──
 bundles ──► vliw_parser ──┬──► ahe_unit ──────────────┐
                           │     14 × paillier_ctrl    │
                           │        └ mm_engine        │
                           │     pre_table (11520×3072)│
                           ├──► ss_unit ───────────────┤   scratchpad
                           │     csprng → sync_fifo    ├── 6144 × 3072 bit,
                           │     32 × int_engine       │   4 ports
                           └──► spm_mover ─────────────┘
                                  │            │
                      device memory port   host DMA request port
```

`shaper_top` connects everything. Device memory (on-board DRAM) and the
host's PCIe DMA engine are outside the design, so their ports come out of
the top.

## Instructions and bundles

A bundle (`b_slots`, three `shaper_pkg::instr_t`) carries instructions that
software has already checked are independent. Each instruction has the
fields `{op, len, p0, p1, p2}`. Pointers count whole 3072-bit lines.

| op | fields | unit |
|---|---|---|
| `AHE.init` | len, p0 = device-memory address | mover → key registers + table |
| `AHE.enc` | p0 = plaintext line, p1 = random-exponent line, p2 = output line | AHE |
| `AHE.dec/ccadd/pcadd/pcmul` | — | AHE (sets `illegal`, not executed) |
| `SS.gen` | len, p2 | SS |
| `Int.add`, `Int.mul` | len, p0, p1, p2 | SS |
| `SPM.ld`, `SPM.st` | len, p0 = scratchpad, p1 = device memory | mover |
| `DM.ld`, `DM.st` | len, p0 = device memory, p1 = host address | mover → host DMA |

How the parser dispatches (`vliw_parser`):

- Every slot whose unit is ready leaves in the same cycle.
- A slot whose unit is busy, or whose unit an earlier slot of the bundle
  already uses, waits for that unit.
- The next bundle is accepted when all slots have left.
- When `b_fence` is set, the bundle's instructions leave only while every
  unit is idle. This lets software order a bundle after the results of
  long-running earlier work. Scheduling is otherwise static, as in the
  original design.

## The modular multiplier (`mm_engine`)

This is the heart of the design and the hardest part to follow. It computes
`c = a·b mod m` for an odd modulus `m` of up to 3072 bits. It uses radix
`k = 72` and `τ = ⌈3072/72⌉ = 43` rounds.

**Algorithm.** Each round does two things:

- It adds the next 72-bit digit `b_i` times `a` into the accumulator `c`
  (multiply-accumulate).
- It shifts `a` left by 72 bits and reduces it mod `m` (shift-reduce).

The two halves are independent except at the very end. After the last
digit, `c` is at most about `τ·m·2^k`. A final reduction with a wider bound
of `D = 72 + ⌈log2 43⌉ = 78` bits brings it below `m`.

**Quick Barrett reduction.** The reduction `QR(x, m, D)` estimates the
quotient from the most significant bits only:

- `x' = x >> (l − D − 2)`, where `l` is the bit length of `m`.
- `γ = (x' · m') >> (2D + 2)`, where `m' = ⌊2^(2D+2) / (m̂ + 1)⌋` and
  `m̂ = m >> (l − D − 2)`.
- `r = x − (γ + 1)·m` always lies in `[−m, 2m)`.
- One conditional add or subtract of `m` finishes the reduction.

When a modulus is loaded:

- the engine finds `l` with a leading-one detector;
- two bit-serial dividers (`recip_div`) compute `m'` for `D = 72` and
  `D = 78`, which takes about 160 cycles.

Any odd modulus from about 80 to 3072 bits works. The testbench runs 3072-,
2000- and 200-bit moduli.

**Pipeline.** One round goes around a ring of five stages, four cycles each.
The stages are named after the published design:

| Stage | Work |
|---|---|
| Div | `γ` estimate (product of the top bits of `x` and `m'`) |
| RC | `(γ + 1)·m` and `b_i·a`, both in `block_mul` block multipliers |
| CSA | carry-save merge of `x − (γ+1)·m` and of `c + b_i·a` |
| Add | 128-bit-chunk carry-select addition (`carry_select_adder`) |
| CS | conditional ±m |

Timing:

- Five multiplications sit in the ring at once, one per stage.
- A single MM takes `(τ + 1)·5·4 = 880` cycles.
- An engine finishes one MM every 176 cycles when kept full.
- The published engine needs 172 cycles. The difference is the extra pass
  this design spends on the final-round reduction.

`block_mul` forms the 72×3072 product from 72×72 sub-products. Even-indexed
products are gathered into one integer and odd-indexed products into
another, so neither has overlapping fields. The wide adder splits its
operands into 128-bit chunks:

- each chunk computes both `x+y` and `x+y+1`;
- the carry from the chunk below picks one.

Wide combinational paths (the adder, the 72-bit multiplies) get the full
four-cycle stage. In timing terms they are multicycle paths.

**Interface.** The ports are:

- `m_load`/`m_in` load a modulus; `m_busy` is high while `m'` is computed.
- `in_valid/in_ready/in_a/in_b/in_tag` start a multiplication.
- `out_valid/out_c/out_tag` return results, in completion order.
- `in_ready` is high only in the cycle in which the CS-to-Div slot is free.

## Paillier encryption (`paillier_ctrl`, `pre_table`, `ahe_unit`)

The encryption follows the DJN variant of Paillier with CRT:

```
cp = ((m·n mod p²) + 1) · hs^a mod p²
cq = ((m·n mod q²) + 1) · hs^a mod q²
tc = (cq − cp) · (p⁻² mod q²) mod q²
c  = cp + tc · p²        (done by the host, 6144-bit)
```

Here `a` is a 1536-bit random exponent and `hs` is a public-key constant.

The fixed-base powers `hs^a` use a pre-computed table:

- For both bases (`hs mod p²`, `hs mod q²`), it holds `base^(d·2^(4j))` for
  every 4-bit window `j < 384` and digit `d = 1..15`.
- That is 11520 lines of 3072 bits (35.4 Mbit).
- An exponentiation is then one MM per non-zero window, at most 384 per base.

Each lane (`paillier_ctrl`) owns one MM engine. It keeps the pipeline full
by multiplying table entries into five independent partial products, one per
ring slot, and combines them at the end. It then does:

- the `m·(n mod p²)` step and the `+1` step;
- the two final MMs;
- the CRT subtraction;
- the multiplication by `p⁻² mod q²`.

The AHE unit has:

- 14 lanes;
- five key registers: `p²`, `q²`, `n mod p²`, `n mod q²`, `p⁻² mod q²`;
- one copy of the table, with a round-robin arbiter over the lanes' read
  requests.

For each `AHE.enc`, the unit:

1. reads the plaintext line and the exponent line from the scratchpad;
2. starts a free lane;
3. writes `cp` to `p2` and `tc` to `p2+1` when the lane finishes.

When all lanes are busy, the instruction stalls the parser.

`AHE.init` loads the keys and the table:

- It streams `5 + 11520` lines from device memory.
- The first five lines go to the key registers (order as above).
- The rest go to the table at line `(base·384 + j)·15 + d − 1`.

Host software builds this stream when it changes keys.

Performance at the defaults:

- One encryption occupies a lane for about 135k cycles.
- It measures 155k cycles end to end in the full-size testbench.
- With 14 lanes that is one encryption per about 11k cycles, or 39 µs at
  285 MHz. The published number is 33.7 µs.

## Secret-sharing unit (`ss_unit`, `csprng`, `sync_fifo`, `int_engine`)

Random generator:

- A Keccak-f[1600] sponge with the SHA3-256 rate of 1088 bits is seeded from
  the CSRs.
- It runs one round per cycle.
- It squeezes 17 64-bit words per permutation into a FIFO whenever the FIFO
  has room.

Scratchpad lines:

- A line holds 32 64-bit values in its low 2048 bits. Lane `i` is in bits
  `64i+63 .. 64i`.
- The upper bits of a written line are zero.

Instructions:

- `SS.gen` pops one word per cycle and writes a line for every 32 words. It
  waits while the FIFO is empty.
- `Int.add` and `Int.mul` take three cycles per line: read both operands,
  run all 32 engines, write the result (mod 2^64).

## Memory, mover, CSRs

Scratchpad (`scratchpad`):

- 6144 lines of 3072 bits, sized from the 512 block RAMs of the original
  implementation.
- Reads take one cycle.
- Port 0 belongs to AHE, ports 1–2 to SS and port 3 to the mover.
- On a write conflict the lower port wins.

Mover (`spm_mover`):

- It issues one device-memory request per cycle (`dm_req_valid/ready`) and
  takes read data back in order (`dm_rsp_valid`).
- `DM.ld/st` raise `host_valid` with length and addresses. The instruction
  finishes on `host_done` from the host's DMA engine.

CSR map (64-bit words, `shaper_csr`):

| Address | Register |
|---|---|
| 0–16 | seed words |
| 17 | control: bit 0 loads the seed, bit 1 clears the interrupt |
| 18 | status `{illegal, rng_seeded, all_idle, irq}` |
| 19 | bundles accepted |

`irq` rises when the whole accelerator goes from busy to idle.

## Departures and gaps

- **Only encryption of the AHE instructions is built.** The other opcodes
  set the sticky illegal flag.
  - Decryption needs a 6144-by-3072-bit reduction and an `x·y/z` quotient
    mode of the multiplier, which are only outlined for the original design.
  - Ciphertext addition and plaintext multiplication work on 6144-bit
    ciphertexts. How the 3072-bit engines handle those is not specified.
- **The multiplier takes 176 cycles per MM**, against 172 published.
- **`n mod p²` and `n mod q²` are key-setup constants.** The published
  micro-program multiplies by `n` directly.
- **The random exponent is supplied by the host** in a scratchpad line.
- **Table memory is one copy with one arbitrated read port.** The original
  implementation spends far more on-chip RAM on it, probably several copies
  for bandwidth.
- **These are this design's own choices:** the bundle format, fence bit, CSR
  map, bus protocols, FIFO depth (512) and scratchpad port count.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          rtl/shaper_pkg.sv tb/tb_shaper_top.sv --top-module tb_shaper_top
./obj_dir/Vtb_shaper_top
```

`tb_shaper_top` runs the whole accelerator at reduced size: 256-bit moduli,
3 lanes, 4 integer engines, a 256-line scratchpad. It includes behavioural
device-memory and host-DMA models and runs a program of DM.ld, AHE.init,
SPM.ld, six encryptions, SS.gen, Int.add/mul, SPM.st, DM.st and an illegal
instruction. It checks:

- every result in host memory, against big-integer arithmetic done in the
  testbench;
- that each mechanism actually happened: fence wait, slot wait, all-lanes
  stall, FIFO underrun stall, AHE and SS running together, memory
  backpressure.

`tb_shaper_full` instantiates `shaper_top` with every parameter at its
default. It performs one 3072-bit encryption, including the full
11525-line `AHE.init` stream, which the testbench computes itself (about
1.5 minutes in verilator).

`tb_mm_engine` runs the 3072-bit multiplier directly and checks its 880-cycle
latency and 176-cycle issue rate.

Expected lint output:

- The multiplier's verilator lint lists unused high bits of the divider
  quotients. The widths come from the reduction bounds.
- The SS unit ignores the upper 1024 bits of scratchpad read data.
- Assertions sample `rst_n` synchronously in `disable iff`, which verilator
  reports as a mixed sync/async reset.
