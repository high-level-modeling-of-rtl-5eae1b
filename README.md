# AES-128 in quantum-dot cellular automata, modelled in SystemVerilog

Quantum-dot cellular automata (QCA) compute with two kinds of cell group only:
the three-input **majority gate** and the **inverter**. Data do not flow
freely: a QCA layout is cut into *clock zones*, each driven by one of four
clock phases shifted by 90 degrees. A zone passes its value on while its
phase is high and freezes it while the phase is low, so every zone behaves
like a level-sensitive latch, and four zones in a row make one clock of
delay. Every QCA wire is therefore a pipeline, and any circuit of useful size
is deeply pipelined.

This repository models a complete AES-128 encryption core at that level:
zone latches, majority gates and inverters, wired into multiplexers, XOR
gates, GF(2^8) multipliers, an S-box, MixColumns, rounds and the whole
unrolled cipher. Simulating it with an ordinary HDL simulator replaces a
cell-level QCA simulation, which does not scale to a design of this size.
The model is synthesizable SystemVerilog, but it describes a QCA circuit, not
a circuit meant for CMOS.

Beside it sits a conventional synchronous implementation of the same cipher
(`aes_hdl`), unrolled with one register stage per round, as the reference
point a QCA design is compared with.

| | QCA model `aes_qca` | conventional `aes_hdl` |
|---|---|---|
| clocking | four zone clocks `clk0..clk3` | one clock `clk` |
| latency | 254 clocks | 10 clocks |
| throughput | one 128-bit block per clock | one 128-bit block per clock |
| key schedule | none: 11 round keys are inputs, held stable | inside, one step per stage, per block |
| storage | about 5.0 million zone latches | 10 x (128 + 128) flip-flops |

## 1. The clocking model

`clk0..clk3` are square waves with 50 % duty cycle, each a quarter period
behind the previous one. With period P, `clk0` is high in [0, P/2), `clk1` in
[P/4, 3P/4), `clk2` in [P/2, P) and `clk3` in [3P/4, 5P/4). Latches two zones
apart are never open at the same time, so a value cannot race through.

`zone_latch` is the only storage element:

* `clr_n = 0`: output 0 (clear wins);
* `clk = 1`: output follows input;
* `clk = 0`: output holds.

`qca_wire` chains four of them on `clk0`, `clk1`, `clk2`, `clk3`. Its input is
captured when `clk0` falls; its output changes when `clk3` rises and holds
for a full period. **Every QCA module in this repository obeys the same
convention**: the first latches sit in zone 0, the last in zone 3, and the
delay is a whole number of clocks. Modules can therefore be chained with no
glue, and their latencies add up.

When driving the model from a testbench:

* change inputs while `clk0` is low (the testbenches do it when `clk3` rises);
* read outputs when `clk0` falls;
* at the k-th fall of `clk0` the output of a D-clock module is the function
  of the input captured at the (k-D)-th fall.

`tb/qca_clock_gen.sv` generates the four phases.

## 2. Gate-level building blocks

| module | made of | delay |
|---|---|---|
| `majority` | out = 1 if two or more inputs are 1 | 0 |
| `inverter` | NOT | 0 |
| `zone_latch` | one latch per bit | one zone |
| `qca_wire` | 4 zone latches | 1 |
| `mux2_1` | 3 majority, 1 inverter, 7 zone latches | 1 |
| `xor2` | 3 majority, 1 inverter, 16 zone latches | 2 |

AND and OR are majority gates with one input tied to 0 or to 1.

* **`mux2_1`** computes `OR(AND(a, NOT sel), AND(b, sel))`. Zone 0 latches
  `a`, `b` and `sel`. Zone 1 latches the two ANDs. Zones 2 and 3 carry the OR
  out. `sel = 0` selects `a_in`.
* **`xor2`** computes `AND(OR(a,b), NOT AND(a,b))` over eight zones.

All the primitives have a `WIDTH` parameter, default 1. It places `WIDTH`
identical copies side by side. `mux256_1` and `sbox_8` have a `LANES`
parameter for the same purpose, and every lane has its own select. The
circuit is the same as one instance per bit, but simulators see far fewer
processes. That matters:

* one instance per bit: a single byte S-box takes 0.8 GB in Verilator's
  front end, so the full cipher is out of reach;
* with lanes: the whole cipher lints in under a minute in about 3 GB.

## 3. The S-box: a 256-entry lookup built from 2-to-1 multiplexers

SubBytes is the bulk of the design: about 97 % of the latches. Each byte
S-box (`sbox_8`) is built as a lookup table, not as GF(2^8) logic: simpler
and uniform, though larger. It uses eight 256-to-1 multiplexers (`mux256_1`,
instances `bit0_ins`..`bit7_ins`):

* all eight take the input byte as their select;
* multiplexer k has its 256 data inputs tied to bit k of every S-box entry.

The constant table is not typed in. `aes_pkg::SBOX_COLUMNS` is computed once at
elaboration from the S-box definition: the inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1, taken as a^254, then the FIPS-197 affine map with constant
0x63.

**`mux16_1`** (8 clocks) is a tree of fifteen `mux2_1` in four levels.

* Each level is followed by a one-clock `qca_wire`, so a level costs two
  clocks.
* Select bit L is delayed by 2L clocks through wires, so it reaches level
  L+1 together with the data.
* Each of its `WIDTH` lanes has its own select and its own select wires.

**`mux256_1`** (16 clocks) is seventeen 16-to-1 multiplexers.

* Sixteen work in parallel on `sel[3:0]`. They are written as one
  sixteen-lane `mux16_1`, where lane j picks from `data[16j+15:16j]`.
* The seventeenth picks among their outputs with `sel[7:4]`. That select is
  delayed 8 clocks by wires.

**`sbox_128`** is sixteen byte S-boxes, one per byte of the state: 16 clocks.
It is written as one `sbox_8` with `LANES = 16`; byte i is lane i.

## 4. MixColumns in GF(2^8)

The state is column-major as in FIPS-197: byte k = 4 x column + row, in bits
`[127-8k -: 8]`.

| module | function | delay | structure |
|---|---|---|---|
| `mult_2x` | xtime | 2 | 3 `xor2` (bits 1, 3, 4 with bit 7); the other 5 bits through 2-clock wires |
| `wire_2clock_8` | 8-bit wire | 2 | 2 `qca_wire` per bit |
| `xor2_8`, `xor2_128_aes` | bitwise XOR | 2 | `xor2` |
| `mult_3x` | 3x = 2x ^ x | 4 | `mult_2x` beside `wire_2clock_8`, then `xor2_8` |
| `mat_mult_row` | one output byte `2a ^ 3b ^ c ^ d` | 8 | see below |
| `mat_mult` | one column times the circulant [2 3 1 1] | 8 | four `mat_mult_row` |
| `mix_column` | whole state | 8 | four `mat_mult`, column c in bits `[127-32c -: 32]` |

`mat_mult_row` is scheduled so that every XOR sees operands of equal age:

```
t=2   2a (mult_2x)          c^d (xor2_8)
t=4   2a delayed 2          3b (mult_3x)
t=6   2a^3b (xor2_8)        c^d delayed 4
t=8   (2a^3b)^(c^d) (xor2_8)
```

`shift_row` is a fixed crossing of wires: row r rotates left by r bytes. It
has no latches and no clock pins, and adds no delay.

## 5. Rounds and the unrolled cipher

* `aes_round` (26 clocks) = `sbox_128` (16) -> `shift_row` (0) ->
  `mix_column` (8) -> `xor2_128_aes` with the round key (2).
* `aes_final_round` (18 clocks) is the same without MixColumns.
* `aes_qca` (parameter `NR` = 10) chains:
  * `xor2_128_aes` with round key 0 (2 clocks);
  * `NR-1` rounds;
  * the final round.

  Latency is 2 + 9 x 26 + 18 = **254 clocks**. A new plaintext may enter
  every clock, so up to 254 blocks are in flight.

The round key enters each XOR with no delay, so the keys must not change
while blocks are in flight. `round_key[i]` is round key i of the standard
AES-128 schedule; producing the keys is left to the user of the model. With
the four-phase clock at 100 GHz, this gives a latency of 2.54 ns and
12.8 Tbit/s.

`clr_n` clears every latch in the model to 0. There is no valid signal:
after a clear, the first 254 outputs are not meaningful.

## 6. The conventional pipeline `aes_hdl`

`aes_hdl` is a single-clock design with `NR` = 10 register stages.

* Stage r holds the state after round r and the round key r.
* Stage 1 also does the initial AddRoundKey.
* Each stage computes the next round key with `aes_key_round`: RotWord,
  SubWord and Rcon of FIPS-197. So each block carries its own key.
* SubBytes and MixColumns are combinational, from the `aes_pkg` functions.
* `in_valid`, `data_in` and `key_in` are sampled on the rising edge.
  `out_valid` and `data_out` appear 10 edges later.
* `rst_n` (asynchronous, active low) clears only the valid pipeline.

## 7. Top level

`aes_top` puts the two implementations side by side. They share no signals:

* `qca_*` ports go to `aes_qca`;
* `hdl_*` ports go to `aes_hdl`.

## 8. Where this model goes beyond or departs from its source description

The description this design follows gives the module hierarchy, the gate
counts of the multiplexer and the XOR, and the latencies. The following are
this design's own decisions:

* **16-to-1 multiplexer delay.** The source gives both 10 clocks and a
  16-clock S-box built from two levels of 16-to-1 multiplexers. These cannot
  both hold. The 16-clock S-box also gives the 26-clock round and the
  254-clock cipher, so 8 clocks per 16-to-1 multiplexer is used.
* **Wire and multiplexer counts.** The tree uses the 15 two-input
  multiplexers a 16-input tree needs (17 is also stated) and 27 wires (52 is
  stated).
* **`mat_mult`.** Each output byte uses one multiply-by-2, one multiply-by-3,
  three XOR2s and three two-clock wires. The source lists only one of each
  of the first three, which cannot produce four output bytes.
* **Zones and gate roles.** The zone each latch sits in, which majority gate
  is the AND and which the OR, and the select polarity of `mux2_1` are
  choices made here. The gate and latch counts match.
* **Insides of `mult_2x`.** Not given in the source; built as described in
  section 4.
* **Key schedule.** None in the QCA model. In `aes_hdl` it is built from
  FIPS-197, which the source does not describe.
* **`WIDTH` and `LANES` parameters.** The vectorised primitives, the
  sixteen-lane first level of `mux256_1` and the sixteen-lane `sbox_8` in
  `sbox_128` are an encoding choice. The circuit is the same.
* **`aes_hdl` control.** The valid pipeline and its reset are additions.
* **Decryption.** Only encryption is built. The inverse round (inverse
  ShiftRows, inverse S-box, inverse MixColumns) is not modelled.

## 9. Simulation

Both simulators need the package first. For example, with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_round_tb.sv --top-module aes_round_tb
obj_dir/Vaes_round_tb
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops.

Every module has its own testbench, `tb/<module>_tb.sv`. The end-to-end
tests come in three sizes:

* `aes_qca_tb` runs the QCA cipher shortened to 3 rounds;
* `aes_top_tb` runs both ciphers shortened to 2 rounds;
* `aes_top_full_tb` runs `aes_top` at full size.

The shortened runs stay within about two minutes. The full-size run takes
several minutes to build.

How the testbenches check results:

* **Reference model.** `tb/aes_ref_pkg.sv` is written independently of the
  RTL. Its S-box comes from log/antilog tables over the generator 3.
* **Latency.** A QCA testbench feeds a new random input every clock. It
  compares each output with the reference value of the input exactly D clocks
  earlier, so a wrong latency fails as surely as a wrong value.
* **Clear.** Each QCA testbench also checks that the output is 0 while
  `clr_n` is low.

Known-answer tests:

* `aes_round_tb` applies FIPS-197 round 1: state
  00102030405060708090a0b0c0d0e0f0 and key d6aa74fdd2af72fadaa678f1d6ab76fe
  must give 89d810e8855ace682d1843d8cb128fe4 after 26 clocks.
* `aes_top_full_tb` encrypts plaintext 00112233445566778899aabbccddeeff
  under key 000102030405060708090a0b0c0d0e0f. It expects
  69c4e0d86a7b0430d8cdb78070b4c55a from both ciphers after 254 and 10
  clocks, followed by random blocks.
* The end-to-end testbenches also count how often each mechanism occurs:
  clear, blocks in flight together, and pipeline bubbles.

Cost of the full model:

| run | time | memory |
|---|---|---|
| one round (`aes_round_tb`), build and run | about 40 s | 1 GB |
| `aes_qca` lint in Verilator | about 1 min | 3 GB |
| full-size `aes_qca` (ten rounds), build and run | about 7 min | 3 GB |

Smaller pieces take seconds.

Latch count of the QCA model, from the structure:

* `mux16_1`: 213 per lane. The tree has 15 x 7 latches in `mux2_1` and
  15 x 4 in wires; the select wires add 12 x 4.
* `mux256_1`: 16 x 213 + 213 + 128 = 3,749 per lane.
* `sbox_8`: 29,992 per lane.
* `sbox_128`: 479,872.
* `mix_column`: 15,104.
* `xor2_128_aes`: 2,048.
* Round: 497,024. Final round: 481,920.
* `aes_qca`: 2,048 + 9 x 497,024 + 481,920 = 4,957,184 zone latches.
