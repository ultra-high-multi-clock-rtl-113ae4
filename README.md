# PRBS framer array with key encryption

This is a clocked bank of pseudo-random binary sequence (PRBS) generators. Ten
linear feedback shift registers run side by side. Their sizes span the usual
telecom test patterns, from 2^7-1 up to 2^255-1. One generator word at a time is
masked with a 256-bit key to give an "encrypted" word. The same key then unmasks
it again. Thirty-two of these framer arrays form the chip. They are bundled four
at a time into 1024-bit super frames. Two smaller parts sit beside them:

- a stand-alone 8-bit encrypt/decrypt unit built around the 2^7-1 pattern;
- a free-running bit counter that derives very slow "Tera ... Xona Hertz"
  clocks, with periods of 2^40 ... 2^90 input clocks.

The RTL is SystemVerilog-2017 and fully synchronous on one clock. It compiles
cleanly with Verilator 5 (`--lint-only -Wall`) and with the slang front end of
Yosys.

## Block hierarchy

```
prbs_asic_top
├── prbs_super_frame_array        NUM_SOC = 32 arrays, GROUP = 4
│   └── prbs_framer_array  ×32    256-bit key, pattern select
│       ├── prbs_generator_array  ten prbs_lfsr, zero-extended to 256 bits
│       │   └── prbs_lfsr  ×10
│       ├── prbs_data_comparator  pattern select + prbs_xor_cipher (encrypt)
│       └── prbs_xor_cipher       decrypt
├── prbs_encdec                   8-bit unit: prbs_lfsr + 2 × prbs_xor_cipher
└── prbs_rtc_clock                90-bit bit counter, six derived clocks
```

`prbs_pkg` holds the shared types: `word_t` (256 bits), the `pattern_e`
select codes and the tap table.

## The pattern generators (`prbs_lfsr`)

This is the part that needs the most care. It does **not** behave like a
textbook PRBS generator.

Each generator is a register of cells D0 ... DN (`state[0]` is D0). On every
clock edge the contents move one cell up, towards DN. D0 receives

    D0' = NOT (DN XOR DM)

Reset clears the register to all zeros. Because the feedback is XNOR, the
all-zero state is allowed: the register fills with ones from the bottom. The
2^7-1 generator, for example, produces 01, 03, 07, 0F, 1F, 3F, 7F, FE, ...

| select code | pattern | register cells | taps (N, M) |
|---|---|---|---|
| 0 `PRBS7`   | 2^7-1   | 8   | 7, 6 |
| 1 `PRBS10`  | 2^10-1  | 11  | 10, 3 |
| 2 `PRBS15`  | 2^15-1  | 16  | 15, 14 |
| 3 `PRBS23`  | 2^23-1  | 24  | 23, 18 |
| 4 `PRBS31`  | 2^31-1  | 32  | 31, 28 |
| 5 `PRBS47`  | 2^47-1  | 48  | 47, 42 |
| 6 `PRBS51`  | 2^51-1  | 52  | 51, 48 |
| 7 `PRBS63`  | 2^63-1  | 64  | 63, 58 |
| 8 `PRBS127` | 2^127-1 | 128 | 127, 123 |
| 9 `PRBS255` | 2^255-1 | 256 | 255, 247 |

The register is N+1 cells wide, not N. The taps are cells N and M, counted
from 0. So the sequence obeys s[t] = NOT(s[t-1-N] XOR s[t-1-M]). That is the
recurrence of x^(N+1) + x^(M+1) + 1, not of the polynomial 1 + x^M + x^N in the
pattern's name. This layout comes from the source's own published simulation:
only it reproduces the printed words, including 7F → FE. As a result the
periods are **not** 2^N-1. They are 63 states for the 8-cell generator, 1533
for the 11-cell one and 255 for the 16-cell one. The testbench checks the first
two.

If you need true ITU-T O.150 maximal-length sequences, change one line in
`prbs_lfsr`. Use an N-cell register `state[N-1:0]` with feedback from cells
N-1 and M-1. Nothing else in the design depends on this detail, but
`tb_prbs_ref_pkg` and the published-value checks would have to follow.

The tap table uses the polynomials 1 + x^M + x^N listed with the patterns.
Some companion lists give different pairs, for instance (10,7), or 42/48 for
the 47- and 51-bit patterns. Some also name 2^48-1 and 2^52-1 instead of
2^47-1 and 2^51-1, and one list adds a 2^18-1 pattern, which is not built.
The polynomial list was used throughout. It matches the register lengths
drawn for the encryption block.

## Encryption and decryption (`prbs_xor_cipher`, `prbs_data_comparator`)

The original names the combining block a "data comparator". Its printed results
show a bitwise XOR with the key: key 55 turns 01 into 54 and 7F into 2A. Since
XOR undoes itself, one `prbs_xor_cipher` cell encrypts and a second one, given
the encrypted word and the same key, decrypts. The decrypted output therefore
always equals the PRBS output. That is the expected result, and the testbenches
check it.

It is a mask, not a cipher. Anyone holding one PRBS word and its encrypted
word recovers the key. Treat it as scrambling, not as security.

Each framer array has ten generators but only one 256-bit output. The source
does not say how they share it. This design adds a 4-bit `sel` input
(`pattern_e`) that picks one generator word, zero-extended to 256 bits. Codes
10-15 pick an all-zero word, so the encrypted output is then the key itself.
All ten generators keep running whatever is selected. Switching `sel` therefore
shows each pattern at its current point, with no restart.

## Timing

- All generators and the counter are registers with an **asynchronous,
  active-high** reset (`reset`/`rst`).
- Every generator steps on **every** clock. There is no enable.
- PRBS, encrypted and decrypted outputs are combinational from the generator
  registers, the key and `sel`. All three change together after a clock edge,
  as in the published waveform. A new key or select shows at once, in the same
  cycle. Register the outputs outside if you need a clean clock-to-output path.
  In a framer array that path is a 10:1 256-bit mux plus two XOR levels.

## Framer arrays and super frames (`prbs_framer_array`, `prbs_super_frame_array`)

`prbs_framer_array` matches the published 256-bit core. It has key(255:0),
clock and reset inputs and PRBSOUT/PRBSEncr/PRBSDecr(255:0) outputs, plus the
added `sel`.

`prbs_super_frame_array` instantiates `NUM_SOC = 32` of them, each with its own
key and select. It concatenates each group of `GROUP = 4` into a super frame:
array `4g+p` sits at bits `[256p +: 256]` of super frame `g`. That gives eight
1024-bit super frames for each of PRBS, encrypted and decrypted data. Per-array
keys are this design's choice. All arrays share clock and reset, so with one
shared key all 32 would output identical words.

## Real-time bit counter (`prbs_rtc_clock`)

This is a 90-bit up-counter that starts at 0 on reset and wraps. A derived clock
with period 2^E input clocks is counter bit E-1. It is low for the first
2^(E-1) clocks, then high for as long.

| output | E (default) | period in input clocks |
|---|---|---|
| `tera_clk`  | 40 | 2^40 |
| `peta_clk`  | 50 | 2^50 |
| `exa_clk`   | 60 | 2^60 |
| `zetta_clk` | 70 | 2^70 |
| `yotta_clk` | 80 | 2^80 |
| `xona_clk`  | 90 | 2^90 |

These outputs are ordinary counter bits, meant as slow timing references. Do
not use them as clocks without a proper clock-enable scheme. The source also
names a "Weka Hertz" rate but gives no period for it. The obvious next step,
2^100, is not built. The source's timing diagram suggests the generators might
advance on a derived clock. Here they step on every input clock, as its
simulation shows, and the derived clocks drive nothing inside.

## The 8-bit unit (`prbs_encdec`)

This unit has the published ports key(7:0), clock, reset, PRBSEncr(7:0) and
PRBSDecr(7:0), plus `prbs_out`. Inside are one 2^7-1 generator and two XOR
cells. With key 8'h55 after reset it gives:

| clock | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| prbs_out  | 01 | 03 | 07 | 0F | 1F | 3F | 7F | FE |
| prbs_encr | 54 | 56 | 52 | 5A | 4A | 6A | 2A | AB |
| prbs_decr | 01 | 03 | 07 | 0F | 1F | 3F | 7F | FE |

These are the published numbers, and `tb_prbs_encdec` checks them.

## Size

At the defaults, synthesis to generic cells gives about 20,500 flip-flops:

- 639 per framer array × 32;
- 8 for the 8-bit unit;
- 90 for the counter.

It also gives about 16,700 single-bit XORs.

## Simulating

Every testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. Each has a watchdog. With plain Verilator, run
from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/prbs_pkg.sv tb/tb_prbs_ref_pkg.sv tb/tb_prbs_asic_top.sv \
    --top-module tb_prbs_asic_top
./obj_dir/Vtb_prbs_asic_top
```

Replace the testbench name to run another one:

| testbench | what it covers |
|---|---|
| `tb_prbs_lfsr` | sequence vs. model, published 2^7-1 words, periods 63 and 1533, async reset |
| `tb_prbs_xor_cipher` | all 65,536 8-bit data/key pairs, random 256-bit words, round trip |
| `tb_prbs_encdec` | published key-55 waveform, then random keys |
| `tb_prbs_generator_array` | all ten generators for 1000 clocks, mid-run reset |
| `tb_prbs_data_comparator` | every select code including unused ones, random data |
| `tb_prbs_framer_array` | random select/key every clock, reset, every pattern selected |
| `tb_prbs_rtc_clock` | counter and derived clocks with exponents shrunk to 2 ... 7 |
| `tb_prbs_super_frame_array` | 32 arrays, slot placement in super frames |
| `tb_prbs_asic_top` | whole chip, derived-clock exponents shrunk to 2 ... 7; counts each mechanism (every pattern, key change, reset, 8-bit wrap, every derived clock rising) |
| `tb_prbs_asic_top_full` | whole chip at default parameters, 400 clocks |

The reference model in `tb/tb_prbs_ref_pkg.sv` describes each generator as a
bit sequence, s[t] = NOT(s[t-1-N] XOR s[t-1-M]), rather than as a register.
Each testbench runs in well under a second.

## Limits and departures

- Sequence periods differ from the pattern names; see the generator section.
- The pattern `sel` input, per-array keys and the zero word for unused select
  codes are additions. The source leaves these points open.
- No clock source is included. The design takes one ordinary clock. The
  "Tera ... Weka Hertz" rates exist only as counter-derived outputs.
- The second level of grouping, super frames of super frames, is left to the
  user: all eight super frames are brought out side by side.
- The derived clocks at their full exponents were checked only for staying low
  over 400 clocks. Their edges were checked at shrunk exponents.
