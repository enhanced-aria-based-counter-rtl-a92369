# ARIA-128 CTR-DRBG in SystemVerilog

A deterministic random bit generator (DRBG) produces an unpredictable bit stream
from a short secret seed. CTR-DRBG, the block-cipher variant of NIST SP 800-90A, keeps
a secret internal state of two values, a cipher key `Key` and a counter `V`. It
produces output by encrypting `V+1, V+2, ...` under `Key`. After every request it
replaces `Key` and `V` with fresh cipher output, so an attacker who later recovers
the state cannot work back to earlier output. This IP implements CTR-DRBG with the
Korean block cipher ARIA-128 (RFC 5794): 128-bit key, 128-bit block and a 256-bit
seed (`seedlen` = key + block).

The design has three main ideas:

* **Two cipher cores side by side.** The state update always needs exactly two
  blocks, `Enc(Key,V+1)` and `Enc(Key,V+2)`. The derivation function always needs
  exactly two CBC-MAC chains over the same data. Both therefore run on two ARIA cores
  at once, and output generation does the same (`TWIN_CTR`): 256 bits per step.
* **One module for instantiate and reseed.** The two operations differ only in their
  starting state (zero for instantiate, the current state for reseed), so a single
  `drbg_if` does both.
* **A register (SFR) interface.** A host drives everything through 32-bit registers:
  lengths, mode bits, input words, commands, status and the 256-bit output.

## Hierarchy

```
drbg_top                     state registers Key, V; command sequencing
├── drbg_sfr                 SFR register bank (host interface)
├── drbg_if                  instantiate / reseed
│   ├── drbg_df              derivation function
│   │   ├── aria_key_sched
│   │   └── aria_enc_core x2 (the two BCC chains)
│   └── iuf                  state update
│       ├── aria_key_sched   (KEY_SCHED)
│       └── aria_enc_core x2 (C0_ENC_CORE, C1_ENC_CORE)
└── drbg_gf                  generate
    ├── iuf
    └── twin_ctr             CTR output, two blocks per step
        ├── aria_key_sched
        └── aria_enc_core x2
aria_enc_core, aria_key_sched -> aria_round -> aria_sbox (32 per round unit)
aria_pkg                     types, constants, S-box tables, diffusion, key rotations
```

There are 7 encryption cores and 4 key schedules in total, each with its own round
unit. No core is shared between `drbg_if` and `drbg_gf`. This costs area but keeps
the two modules independent.

## The operations

The notation follows SP 800-90A. `||` is concatenation and `Enc` is ARIA-128.

**Update** (`iuf`):

```
(Key', V') = split( (Enc(Key, V+1) || Enc(Key, V+2)) XOR data )   counters mod 2^128
```

`data` is 256 bits. If `i_data_en` is low, `data` counts as zero.

**Instantiate** (`drbg_if`, `i_reseed = 0`):

```
seed = df(Entropy || Nonce || PS)     with the derivation function
seed = Entropy XOR PS                 without it (256-bit entropy; PS 256 bits or absent)
(Key, V) = Update(seed, Key = 0, V = 0)
```

**Reseed** (`drbg_if`, `i_reseed = 1`): the same, starting from the current `Key, V`.
The additional input takes the place of PS.

**Generate** (`drbg_gf`):

```
PRE_CTR  (optional)  (Key, V) = Update(AD, Key, V)
CTR_RUN              for i in 0..n-1: out_i = Enc(Key, V+1) || Enc(Key, V+2); V += 2
IUF_RUN              (Key, V) = Update(AD, Key, V)
```

`AD` is the 256-bit additional input. If `AD_EN` is clear, it counts as zero.

## State update module (`iuf`)

A four-state FSM, `IUF_IDLE → IUF_KS → IUF_ENC → IUF_END → IUF_IDLE`:

| state | work | leaves on |
|---|---|---|
| `IUF_IDLE` | capture `i_key`, `i_value`, `i_data`, `i_data_en` | `i_iuf_en` |
| `IUF_KS` | key schedule expands `Key` | `w_key_expand` (key schedule done) |
| `IUF_ENC` | C0 encrypts `V+1` and C1 encrypts `V+2`, in parallel; results go to `r_enc_buffer0/1` | core 0 done |
| `IUF_END` | `o_iuf_data = {buf0, buf1} ^ (i_data_en ? i_data : 0)`, one-clock `o_iuf_done` | always |

An update takes 21 clocks, counted from the clock that samples `i_iuf_en` to
`o_iuf_done`. An assertion checks that the two cores finish in the same clock.

## Derivation function (`drbg_df`)

The derivation function compresses an input string of any length into 256
well-mixed bits. It builds the message

```
S = L || N || input || 0x80 || 0...0        L = input length in bytes, N = 32 (output bytes)
```

padded to whole 128-bit blocks, and computes two CBC-MACs under the fixed key
`K0 = 00 01 02 … 0F`. One chain is prefixed by the block `IV0 = 0^128`, the other by
`IV1 = 00000001 || 0^96`. The results become a new key `K` and a block `X`, and the
output is `Enc(K,X) || Enc(K,Enc(K,X))`.

The two chains see the same blocks of `S`. `drbg_df` therefore keeps one 96-bit
block buffer and feeds each completed block, XORed with each chain value, to the two
cores in the same clock. The module inserts the header words `L` and `N`, the pad
word `0x80000000` and the zero fill itself, one word per clock. Only the input words
come from outside. The input port is a 32-bit stream with a ready/valid pair: a word
moves in any clock where `i_data_en` and `o_data_ready` are both high. `o_data_ready`
is high only while the block buffer is filling, and drops while the cores are
encrypting.

Cost: 4 word clocks plus 14 encryption clocks per block of `S`, plus about 50 clocks
of fixed overhead (two key expansions, the IV block and the two final encryptions).

## Output generation (`drbg_gf`, `twin_ctr`)

There are four states, `IDLE`, `PRE_CTR`, `CTR_RUN` and `IUF_RUN`. A start with
`i_pre_ctr_en` high goes to `PRE_CTR`. A start with it low goes straight to
`CTR_RUN`. This fits the usual rule: the pre-update runs when there is additional
input and no reseed has just consumed it. The update unit takes its `Key, V` from
the module input in `PRE_CTR` and from the CTR result (`V+n`) in `IUF_RUN`. The CTR
unit takes its `Key, V` from the pre-update, or from the input when `PRE_CTR` is
skipped.

`twin_ctr` offers each 256-bit word on `o_data` with `o_data_valid`, and holds it
until `i_out_ready` is high. An assertion checks that the word stays stable. The
first word appears 20 clocks after the start. With no back-pressure, a new word
follows every 15 clocks.

## ARIA-128 core

* `aria_round` is one combinational round: key XOR, substitution layer and
  diffusion. Odd rounds use SL1 (S-boxes SB1, SB2, SB3, SB4 on bytes 0, 1, 2, 3,
  repeating). Even rounds use SL2 (SB3, SB4, SB1, SB2). The last round uses SL2 and
  skips the diffusion. Each byte lane has the two S-boxes it can need and a mux.
* `aria_enc_core` runs one round per clock. The load takes one clock and the 12
  rounds take 12, with the final whitening key `ek13` XORed in the last. The
  ciphertext is valid 13 clocks after the start.
* `aria_key_sched` computes `W1 = FO(W0,C1)`, `W2 = FE(W1,C2)^W0` and
  `W3 = FO(W2,C3)^W1` one per clock on its own round unit. The 13 round keys are then
  fixed XOR/rotate combinations of `W0..W3` (rotated right by 19 and 31 bits and
  left by 61 and 31 bits).
  The keys are valid 4 clocks after the start, and stay stable until the next start.
* The S-boxes are not stored as data. `aria_pkg::build_sboxes` computes them at
  elaboration. SB1 is the AES S-box (affine map of the GF(2^8) inverse). SB2 is
  `B·x^247 ⊕ 0xE2`, with the columns of `B` in `SB2_COL`. SB3 and SB4 are the
  inverse permutations of SB1 and SB2. Powers come from exp/log tables over the
  generator 0x03.

## SFR interface (`drbg_sfr`)

The bus is synchronous: a write happens in the clock where `i_sfr_wr` is high.
`o_sfr_rdata` follows `i_sfr_addr` combinationally. `i_sfr_rd` matters only when
reading `OUT7`.

| addr | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | W | bit0 INST, bit1 RESEED, bit2 GEN, bit3 ZEROIZE (one-clock commands, read back as 0) |
|      |      | RW | bit4 DF_EN, bit5 PRE_CTR_EN, bit6 AD_EN |
| 0x04 | STATUS | R | bit0 BUSY, bit1 DATA_READY, bit2 OUT_FULL, bit3 DONE, bit4 INSTANTIATED; write 1 to bit3 to clear DONE |
| 0x08 | ELEN | RW | entropy length in bits; includes the nonce when the DF is used (reset 256) |
| 0x0C | PSLEN | RW | personalization string or reseed additional input length in bits (reset 0) |
| 0x10 | N | RW | DF header word N, in bytes (reset 32) |
| 0x14 | GENLEN | RW | 256-bit words per GEN (reset 1) |
| 0x18 | DATA | W | next input word; dropped unless DATA_READY is set |
| 0x20–0x3C | AD0–AD7 | RW | 256-bit additional input for GEN, AD0 most significant |
| 0x40–0x5C | OUT0–OUT7 | R | last output word, OUT0 most significant; reading OUT7 frees the buffer |

`o_irq` mirrors DONE. A typical host sequence:

1. Write ELEN and PSLEN.
2. Write CTRL with INST (and DF_EN if wanted).
3. For each input word, entropy first and then PS, poll DATA_READY and write DATA.
4. Wait for DONE, then clear it.
5. For output, write GENLEN (and AD0–AD7 with AD_EN/PRE_CTR_EN if wanted) and
   command GEN.
6. For each word, wait for OUT_FULL and read OUT0–OUT7. Then wait for DONE.

`drbg_top` ignores any command given while BUSY, and RESEED or GEN before an
instantiate. ZEROIZE clears `Key`, `V` and INSTANTIATED.

## Timing summary (clocks)

| operation | clocks |
|---|---|
| key expansion | 4 |
| one block encryption | 13 |
| state update (`iuf`) | 21 |
| derivation function | about 50 + 18 per 128-bit block of S (plus input stalls) |
| GEN, one 256-bit word, no PRE_CTR | 45 at the top level, measured |
| GEN, each further word | +15 |

## Verification

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from an
independent software model of ARIA-128 and CTR-DRBG, which reproduces the RFC 5794
ARIA-128 example (key `000102…0f`, plaintext `00112233…ff`, ciphertext
`d718fbd6ab644c739da95f3be6451778`). The testbenches carry these values as constants.

| testbench | covers |
|---|---|
| `tb_aria_key_sched` | round keys ek1, ek7, ek13 for 4 keys; latency |
| `tb_aria_enc_core` | RFC 5794 vector and 3 random blocks; latency |
| `tb_iuf` | zero state, counter wrap at `V = 2^128-1`, data / no data; latency; FSM order |
| `tb_drbg_df` | 2, 5, 8, 12 and 16 input words (every pad position); random input gaps |
| `tb_drbg_if` | instantiate and reseed, with and without DF, with and without PS |
| `tb_twin_ctr` | counter wrap inside a run, timing, random back-pressure |
| `tb_drbg_gf` | with and without PRE_CTR and AD, multi-word output, back-pressure |
| `tb_drbg_sfr` | register map, command pulses, DATA gating, output buffer, DONE/irq |
| `tb_drbg_top` | full sequence through the SFR: rejected commands, INST with DF, GEN, RESEED without DF, GEN with PRE_CTR+AD, RESEED with DF, ZEROIZE, INST without DF; counts each mechanism |

The top has no parameters, so `tb_drbg_top` runs the design exactly as built. To run
one testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
          rtl/aria_pkg.sv tb/tb_drbg_top.sv --top-module tb_drbg_top -o sim
./obj_dir/sim
```

The official certification vectors for ARIA CTR-DRBG were not available, so
agreement with them has not been shown. Agreement with SP 800-90A depends on the
software model, which was written from the standard. The ARIA part of it is anchored
by the RFC vector.

## Where this design departs from, or goes beyond, its source description

* The source describes the blocks (update FSM and datapath, integrated
  instantiate/reseed module with its port list, generate FSM with its multiplexers,
  twin CTR, SFR support) but not the ARIA cipher or the derivation function. Those
  follow RFC 5794 and SP 800-90A.
* The update module's table of ports lists no data input. The data input
  (`i_data`, 256 bits, with `i_data_en`) comes from the update block diagram. With
  `i_data_en` low the module outputs the bare cipher blocks (data = 0), not zero.
* The key schedule is described as making 12 round keys. ARIA-128 has 12 rounds but
  needs 13 keys, and all 13 are produced.
* How instantiate and reseed are told apart is not specified. `i_reseed` selects the
  starting state. The nonce has no length field of its own, so it is counted in ELEN.
* The generate FSM is described both as always entering `PRE_CTR` and as entering it
  only when `i_pre_ctr_en` is set. The second reading is built.
* In generate, the 256-bit additional input is used as given. It is not passed
  through the derivation function, as SP 800-90A does when the DF is in use. A host
  needing that must supply the processed value.
* No reseed counter, reseed interval, prediction-resistance logic or health tests
  are built. None are described.
* All lengths are whole 32-bit words. Without the DF, entropy must be 256 bits and
  PS 256 or 0 bits. The DF always returns 256 bits.
* The SFR register map, the output handshake, reset values and command rules are
  this design's own. The source only says an SFR interface exists.
* The source reports one overall run time (3.85 ms) without a clock frequency or an
  operation sequence. It cannot be compared with the clock counts above.
* Nothing here is hardened against side channels. The S-boxes are plain lookup
  tables.

## Changing the design

* A different 128-bit cipher needs a new `aria_enc_core` and `aria_key_sched` with
  the same ports. Nothing above them depends on ARIA.
* Throughput: `aria_enc_core` can unroll two rounds per clock without any interface
  change. The modules wait for `o_done` pulses, not fixed counts.
* Area: the four key schedules and seven cores could be shared between `drbg_if` and
  `drbg_gf`, because only one operation runs at a time.
