# AES-256-GCM for CCSDS telemetry frames

This RTL encrypts and authenticates space-link telemetry (TM) transfer frames
with AES-256-GCM. It follows the CCSDS Space Data Link Security (SDLS)
baseline mode for TM:

- the transfer-frame header stays in clear and is authenticated as
  associated data;
- the frame data is encrypted;
- a 16-bit Security Parameter Index (SPI) and the 96-bit IV go in a security
  header;
- the 128-bit GCM tag becomes the security trailer.

At its centre is a single AES-GCM engine whose cost and speed are chosen at
synthesis time. The main knob is **N**, the number of cascaded AES round
stages. It trades area for clocks per block (CPB):

| N | 1 | 2 | 3 | 4 | 5 | 7 | 14 |
|---|---|---|---|---|---|---|----|
| CPB = ceil(14/N) | 14 | 7 | 5 | 4 | 3 | 2 | 1 |

Throughput is 128·f/CPB bits per second.

There are four more synthesis-time choices:

- the S-box: a look-up table, or composite-field arithmetic;
- the key expansion: one unit per stage, or one shared unit;
- the GHASH multiplier: single-cycle, or a four-cycle Karatsuba-Ofman design;
- whether the decryption/verification logic is built.

The module `tm_security_module` wraps the engine into a frame processor with
two clock domains. Its defaults are a one-stage core with a four-cycle KOA-2
multiplier, run on a fast security clock of about 275 MHz next to a 120 MHz
transmitter. That gives 128·275 MHz/14 = 2.514 Gb/s, just above a 2.508 Gb/s
link. The other intended setting uses one 120 MHz clock for everything with
N = 3: 128·120/5 = 3.072 Gb/s.

## What a frame becomes

```
in : | TF header (hdr_bytes) | frame data (data_bytes)                          |
out: | TF header | SPI (2 B) | IV (12 B) | ciphertext (data_bytes) | MAC (16 B) |
```

- A = TF header, P = frame data, C = E_GCM(K, IV, A, P). The tag covers A and C.
- The IV is taken from the configuration for the first frame after `enable`.
  It is then incremented by one (as a 96-bit number) for every further frame,
  so an IV is never reused under one key.
- Frames enter as `IN_B`-byte beats (default 4), first byte in the most
  significant bits. Each frame starts on a new beat.
- Frames leave as `OUT_B`-byte beats (default 4). `data_out_keep` has one bit
  per valid byte, and `data_out_last` marks the last beat of a frame.
- All streams use valid/ready handshakes.

## The AES core: cascaded recycled rounds

Each `aes_stage` holds one AES round (SubBytes, ShiftRows, MixColumns,
AddRoundKey) and a 128-bit round buffer. A multiplexer feeds the round
either with a new block or with the buffer, so one stage performs RPS =
ceil(14/N) consecutive rounds in RPS cycles. Stage *s* does rounds
s·RPS+1 … s·RPS+RPS. When N does not divide 14 (N = 3, 4 or 5), the last
stage finishes early and holds the finished block for the remaining counts.

How blocks move through the stages:

- All stages share one counter `cnt` (0 … RPS−1).
- When `cnt` is 0, every stage takes the block from the stage before it, and
  stage 0 takes a new input block. The initial AddRoundKey with rk[0] is
  applied on the way into stage 0.
- So a block enters every CPB cycles and leaves N·RPS cycles later: 14 cycles
  for N = 1, 7 and 14, and 15 or 16 for the others.
- If the output is not accepted, the whole chain stops with it.

There are two ways to produce the round keys:

- **Local KEU (`GLOBAL_KEU = 0`).** The pair {rk[r−1], rk[r]} travels with the
  block in two 128-bit registers per stage. Each round advances it by one
  AES-256 key-schedule step (`aes_key_step`). No set-up time is needed, but the
  key must stay stable while blocks are in flight.
- **Global KEU (`GLOBAL_KEU = 1`).** `aes_keu_global` computes all fifteen round
  keys into registers, one per cycle, in 14 cycles after `key_load`. The
  stages pick their key by round number. This pays off for large N, where N
  local pairs would cost more than fifteen shared registers.

There are two S-box implementations:

- `SBOX_LUT` is a 256-entry table. It is computed at elaboration from the
  GF(2^8) inverse and the affine map, so no data file is read.
- `SBOX_CFA` maps the byte into GF((2^4)^2) and inverts it there with one
  GF(16) inversion. GF(16) uses x^4+x+1, and the extension uses y^2+y+λ. λ
  and the basis-change matrices are found at elaboration.

Both give identical results. The choice only changes area and timing.

## GHASH and the Karatsuba multiplier

GHASH computes Y_i = (Y_{i−1} ⊕ X_i)·H in GF(2^128) modulo
x^128+x^7+x^2+x+1. GCM numbers bits backwards: bit 127 of a block is the
coefficient of x^0. The multipliers therefore bit-reverse both factors,
multiply carry-lessly, reduce, and reverse the result.

`gf128_koa_mul` is the carry-less multiplier. It splits each factor into
halves, forms hh, ll and mm = (a_h⊕a_l)(b_h⊕b_l), and combines them as
hh·x^W ⊕ (mm⊕hh⊕ll)·x^(W/2) ⊕ ll. It repeats this split `DEPTH` times and
uses schoolbook products at the leaves.

There are two multipliers:

- **`gf128_mult_single` (MULT_SINGLE).** A full 128×128 Karatsuba tree with
  KOA levels, followed by reduction and a result register. One product per
  cycle, latency 1.
- **`gf128_mult_multi` (MULT_MULTI).** One 64×64 sub-multiplier, with KOA−1
  further Karatsuba levels inside it. It is used three times:
  - cycle 0: hh, from the live inputs, which are also registered;
  - cycle 1: ll;
  - cycle 2: mm;
  - cycle 3: combine and reduce.

  The result appears after 4 cycles, and a new product can start every 4
  cycles. This is enough for CPB ≥ 4. For faster cores, use the
  single-cycle multiplier or the parallel unit below.

`ghash_unit` adds three things around the multiplier: the H register, the
zero-padding unit (`ghash_pad`) and the running value Y. Y is forwarded
combinationally on the cycle a product completes.

`ghash_par` (selected with `GH_UNITS` = 2 or 4) keeps the four-cycle
multipliers but runs 2 or 4 of them side by side. It hashes blocks in
groups of g ≤ `GH_UNITS`, using

Y' = (Y ⊕ X_1)·H^g ⊕ X_2·H^(g−1) ⊕ … ⊕ X_g·H,

which is the same as g ordinary GHASH steps.

- After H is loaded, the same multipliers compute H^2, and for four units
  also H^3 and H^4, in 4 or 8 cycles. These powers are kept in registers.
- A group is launched when it is full, or when the length block arrives.
  The length block is always last, so the final group may be shorter.
- The next group is collected while the current one is being multiplied. The
  first block of a new group is accepted in the same cycle the previous group
  is launched.

The unit therefore takes one block every 2 cycles with two units, and one
every cycle with four. That matches N = 7 and N = 14.

## Sequencing one message (`gcm_control`, `gctr_unit`)

For every message, `gctr_unit` feeds the AES core with this sequence:

1. 0^128, which gives H;
2. J0 = IV‖0x00000001, which gives E(J0);
3. the counter blocks IV‖2, IV‖3, … (32-bit increment of the low word).

The control FSM steps through these states:

- **IDLE** – waits for `start`.
- **HKEY** – loads E(0) into the H register.
- **EJ0** – stores E(J0).
- **AAD** – hashes the blocks of A, the last one zero-padded.
- **DATA** – XORs each input block with its keystream block. The last partial
  block is truncated. The ciphertext is hashed: the output when encrypting,
  the input when decrypting.
- **LEN** – hashes len(A)‖len(C), both in bits.
- **WAIT** – waits for the last product. The tag is then T = Y ⊕ E(J0).

With `DECRYPT_EN = 1`, starting with `decrypt = 1` also sets `mac_match` when T
equals the received MAC. With `DECRYPT_EN = 0`, that comparator and the input
multiplexer are not built.

Note: H and E(J0) are recomputed for every message, two AES blocks of
overhead. With N = 1 and a 70-block frame this lowers the sustained rate to
70/72 of the peak (about 2.44 Gb/s at 275 MHz). Caching H per key would
remove half of that overhead; it is not done here.

## The TM Security Module (`tm_security_module`)

```
data_in ─► tm_input_if ──128──► aes_gcm ──C, MAC──► tm_output_handler ─128─► tm_output_if ─► data_out
          (FIFO, aligner)  └─A──► tm_data_synch_buffer ─A─┘   ▲ SPI‖IV           (FIFO, PISO)
cfg ─► tm_config_status ─► K, IV, len(A)‖len(C), SPI ─────────┘
```

- **`tm_input_if`**
  - Dual-clock Gray-pointer FIFO (`async_fifo`), then a splitter that cuts the
    beats at the header/data boundary (a beat may hold both).
  - A `byte_packer` regroups the bytes into left-aligned 128-bit blocks. Each
    segment starts a new block, and a short last block carries its byte count.
- **`tm_data_synch_buffer`**
  - A 4-entry FIFO of header blocks. A header block is accepted only when both
    the AES-GCM module and this buffer take it.
- **`tm_output_handler`**
  - Emits, byte-contiguously: the header blocks, 14 bytes of SPI‖IV, the
    ciphertext blocks and the 16-byte tag.
  - A second `byte_packer` closes the gaps that partial blocks leave.
- **`tm_output_if`**
  - A FIFO back to the TM clock. Its word is {last, byte count, 128-bit data}.
  - Then a parallel-in serial-out shifter sends `OUT_B` bytes per beat.
- **`tm_config_status`**
  - Registers written through a 32-bit port (table below).
  - A frame counter on `status_frames`.
- **Frame sequencer (in the top)**
  - Starts one GCM message per frame when four conditions hold:
    - the module is enabled;
    - the engine is idle;
    - the handler is idle;
    - the first header block of a frame is waiting.

| cfg_addr | register |
|----------|----------|
| 0  | bit 0: enable |
| 1  | SPI [15:0] |
| 2–4 | initial IV, most significant word first |
| 5–12 | key K, most significant word first |
| 13 | header length in bytes (≥ 1, reset 6) |
| 14 | frame-data length in bytes (≥ 1, reset 16) |

How the two clock domains are kept safe:

- Change the configuration only while enable is 0.
- The security domain reads those registers without synchronizers. Only
  `enable` is synchronized, through two flops.
- `clk_tm` and `clk_sec` may be the same clock.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| aes_gcm, tm_security_module | N | 1 | AES stages: 1, 2, 3, 4, 5, 7 or 14 (others are rejected at elaboration) |
| | SBOX | SBOX_LUT | SBOX_LUT or SBOX_CFA |
| | GLOBAL_KEU | 0 | 1 = one shared key expansion unit |
| | MULT | MULT_MULTI | MULT_SINGLE or MULT_MULTI |
| | KOA | 2 | Karatsuba levels (1–4) |
| | DECRYPT_EN | 1 (aes_gcm), 0 (top) | build decryption and tag comparison |
| | GH_UNITS | 1 | 1 = one multiplier of kind MULT; 2 or 4 = parallel four-cycle multipliers |
| tm_security_module | IN_B, OUT_B | 4, 4 | bytes per input and output beat |

## How this departs from, or goes beyond, the architecture it implements

- **Taken from the architecture:**
  - the cascaded single-round stages and the set of N;
  - local versus global key expansion;
  - LUT versus composite-field S-boxes;
  - the three-products-plus-reduction multi-cycle multiplier;
  - the selectable Karatsuba depth;
  - the option of 2 or 4 parallel multi-cycle multipliers with stored powers
    of H;
  - the optional verification logic;
  - the padding unit;
  - the division of the TM module into input interface, synch buffer, output
    handler, output FIFO/PISO and configuration/status.
- **Choices made here:**
  - all handshakes, reset behaviour (asynchronous, active low), widths of the
    TM-side beats, FIFO depths and the register map;
  - the placement of the round buffer after AddRoundKey;
  - the composite-field polynomials;
  - the IV-increment policy;
  - the fact that H and E(J0) come from the same AES core ahead of the data;
  - in the parallel GHASH, the grouping scheme and how the powers of H are
    computed.
- **Not built:**
  - the TM transmitter and its modulation/coding, which lie outside this
    module.
  - a frame error control field (none is appended).
- **Not reproduced:** maximum frequencies and FPGA resource counts. The RTL
  is technology independent and has no vendor primitives.
- **Lint warning left in place:** verilator reports SYNCASYNCNET on the reset
  nets. The assertions sample `rst_n` synchronously (`disable iff`), while
  the flops use it as an asynchronous reset. This is intended.

## Verification

Every block has a self-checking testbench in `tb/`. Expected values come from
an independent reference model, `tb/tb_gcm_ref_pkg.sv`, which contains:

- a byte-wise AES-256 using log/exp tables;
- a bit-serial GF(2^128) multiplier;
- GCM on byte queues.

Some tests also use published GCM vectors. The testbenches:

| testbench | what it shows |
|-----------|---------------|
| tb_aes_sbox | all 256 bytes, both implementations |
| tb_aes_key_step | every schedule step for random keys |
| tb_aes_stage | one stage run as a full AES-256 with local and external round keys, and a middle stage (rounds 6–10) |
| tb_aes_keu_global | all 15 round keys, ready after 14 cycles |
| tb_aes_core | all seven N, local/global KEU, LUT/CFA; latency and CPB spacing; back-pressure |
| tb_gctr_unit | order and values of E(0), E(J0), E(CB_i), also with no data blocks; one and three stages; random back-pressure |
| tb_gf128_mult | both multipliers at KOA 1–4 against the bit-serial product; 1- and 4-cycle timing |
| tb_ghash_pad, tb_ghash_unit | padding masks and length block; GHASH chains with both multipliers |
| tb_aes_gcm | five configurations (N = 1/LUT/local/KOA-2, N = 3/CFA/global/KOA-1, N = 14/LUT/global/single-cycle, N = 7 with two parallel multipliers, N = 14 with four): GCM test cases 13–16 and random messages, encryption and decryption, a corrupted tag, output spacing equal to CPB, random stalls |
| tb_tm_input_if, tb_tm_data_synch_buffer, tb_tm_output_handler, tb_tm_output_if, tb_tm_config_status | each TM block on its own, including clock crossing |
| tb_tm_security_module | whole module at its default parameters, two clocks: a published vector and four random frames. Counts output stalls, AES stalls, beats split between header and data, partial blocks, IV advances and status updates, and fails if any never happens |
| tb_tm_single_clock | the same at N = 3 on one clock |

Run one with verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/aes_gcm_pkg.sv tb/tb_gcm_ref_pkg.sv tb/tb_aes_gcm.sv --top-module tb_aes_gcm
./obj_dir/Vtb_aes_gcm
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. Each has a
watchdog that reports a failure if the run hangs.
