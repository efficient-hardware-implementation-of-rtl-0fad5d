# A 119-stage superpipelined DES encryption core

DES encrypts a 64-bit block in sixteen identical Feistel rounds. This design
unrolls all sixteen rounds in hardware. It then cuts every round into single
operations, each with its own register: the expansion, the XOR with the
sub-key, the eight S-box lookups, the straight permutation and the final XOR.
The longest path between two registers is then one S-box lookup or one XOR,
so the clock can run fast. The pipeline is 119 stages deep. It accepts a new
plaintext block **and a new key** on every clock cycle, and delivers one
ciphertext per cycle, each 119 cycles after its block went in. The published
FPGA implementation of this scheme reports 286.369 MHz on a Spartan-3E. That
is 64 bit × 286.369 MHz = 18.3 Gbit/s. This RTL has not been through FPGA
place-and-route, so that figure is not confirmed here.

The key schedule is unrolled and pipelined too, beside the data path. Each
block carries its own key through the pipe, so the key may change from one
block to the next. No key has to be loaded or precomputed.

Only encryption is built. There is no decryption mode.

## The stage schedule

One cost of cutting a round into stages is that its inputs are needed at
different depths. The right half enters the expansion at once. The sub-key is
needed one stage later, at the key XOR. The left half is not needed until the
last stage of the round. Everything a stage consumes must therefore reach it
on the same clock edge. Values that are ready early wait in plain shift
registers (`des_delay`, "no-operation" stages) until their partner is ready.
Getting these delays right is most of the design.

Stage *n* below is the register that holds a block *n* clock edges after the
block was sampled at the input.

| stage(s) | data path | key path |
|---|---|---|
| 1 | initial permutation | parity drop (64 → 56 bits) |
| 2 | right half registered (left half goes into a delay line) | C/D registered |
| 3 | expansion E(R) | C, D rotated left (round 1) |
| 4, 5 | E(R) waits two cycles | 4: C/D combined; 5: compression P-box → sub-key 1 |
| 6 | E(R) xor K1 | |
| 7 | 48 bits split into eight 6-bit blocks | |
| 8 | eight S-box lookups | |
| 9 | eight 4-bit results combined to 32 bits | |
| 10 | straight permutation P | C/D state for round 2 ready (after 7 delay stages) |
| 11 | R1 = L0 xor P, L1 = R0 (end of round 1) | C, D rotated for round 2 |
| 12 | expansion E(R1) | compression → sub-key 2 |
| 13 | E(R1) xor K2 | |
| 14–16 | split, S-boxes, combine | |
| 17 | straight permutation P | C/D for round 3 ready (after 6 delay stages) |
| 18 | R2 = L1 xor P, L2 = R1 (end of round 2) | rotation for round 3 |
| … | rounds 3–16, 7 stages each | same pattern, 7 stages per round |
| 116 | end of round 16 | |
| 117 | halves swapped: {R16, L16} | |
| 118 | final permutation | |
| 119 | output register → `ciphertext` | |

Count: 1 + 10 + 15 × 7 + 3 = 119.

Inside one round (`des_round_pipe`), the left and right halves travel beside
the seven-stage f-function chain in delay lines. In rounds 2–16 the left half
waits 6 registers and then meets the permutation output in the final XOR. The
right half waits 7 registers and leaves as the new left half. Round 1 is
longer, for two reasons:

* It has an extra register (the split) before the expansion.
* Its expanded right half waits two cycles for sub-key 1. That sub-key comes
  out of a key path four stages deep: split, rotate, combine, compress.

Round 1 therefore takes 10 stages, and its half-delays are 9 and 10. Two
parameters of the same module, `SPLIT_REG` and `E_DELAY`, cover both round
shapes.

The key path (`des_key_round`) has the same shape in every round. The C/D
state of round *r*−1 arrives one stage before round *r*'s data. It is rotated
left by 1 bit (rounds 1, 2, 9, 16) or by 2 bits (all other rounds), then
compressed to the 48-bit sub-key in the next stage. That sub-key is a
register output exactly when round *r*'s key XOR samples it. The rotated state
then waits 6 registers (7 after round 1) to meet round *r*+1. Round 16's
rotated state is not passed on.

## Board input/output unit

`des_fpga_top` is the whole system as it sits on the evaluation board.

* **Stored inputs:** four plaintexts and four keys are held inside the chip,
  as the `PLAINTEXTS` and `CIPHERKEYS` parameters.
* **Selection:** two 4×1 multiplexers (`des_mux4`) pick one of each.
  Switches `sw[1:0]` (Sw1, Sw0) select the plaintext and `sw[3:2]` (Sw3, Sw2)
  select the key.
* **Output:** the 64-bit `ciphertext` output is what the board's LCD shows in
  hexadecimal. The LCD controller is not part of this RTL.

The default contents hold three published test pairs and one FIPS pair:

| switches (Sw3..Sw0) | plaintext | key | ciphertext |
|---|---|---|---|
| 0000 | 123456ABCD132536 | AABB09182736CCDD | C0B7A8D05F3A829C |
| 0101 | 0000000000000000 | 22234512987ABB23 | 4789FD476E82A5F1 |
| 0110 | 0000000000000001 | 22234512987ABB23 | 0A4ED5C15A63FEA3 |
| 1111 | 8787878787878787 | 0E329232EA6D0D73 | 0000000000000000 |

Any other switch combination also works. The remaining key (133457799BBCDFF1)
is the key of the FIPS worked example.

## Interfaces and timing

`des_superpipe` (the core):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst` | in | 1 | synchronous, active-high; clears every pipeline register |
| `plaintext` | in | 64 | sampled on every rising edge |
| `cipherkey` | in | 64 | 64-bit key including parity bits, sampled with the plaintext |
| `ciphertext` | out | 64 | encryption of the pair sampled 119 edges earlier |

There is no valid signal. The pipe always runs, and output *n* belongs to the
input sampled at edge *n* − 119. After a reset the output stays meaningless
until 119 cycles after the first real input. The first cycle after reset reads
zero.

Bit order follows the DES standard with DES bit 1 in bit 63. A hex value
written the usual way, such as `64'h123456ABCD132536`, is therefore the block
exactly as published.

`des_fpga_top`: `clk`, `rst`, `sw[3:0]`, `ciphertext[63:0]`, with the same
119-cycle latency from a switch setting to its ciphertext.

## Module map

| module | role |
|---|---|
| `des_pkg` | types, the standard DES tables, permutation functions, stage constants (`LATENCY` = 119) |
| `des_fpga_top` | stored inputs, switch multiplexers, core |
| `des_mux4` | 4×1 multiplexer of W-bit words |
| `des_superpipe` | the 119-stage core: stage 1, 16 rounds, swap, final permutation, output register |
| `des_round_pipe` | one round as a register chain, with its half-delays |
| `des_key_round` | one round of the pipelined key schedule |
| `des_delay` | N-register delay line (N = 0 is a wire) |
| `des_sbox` | S-box S1..S8 (`BOX` parameter) |
| `des_expansion`, `des_straight_pbox` | E and P boxes of the f-function |
| `des_initial_perm`, `des_final_perm` | IP and its inverse |
| `des_parity_drop`, `des_compression_pbox` | PC-1 (64 → 56) and PC-2 (56 → 48) |

The permutation and S-box modules are combinational. Their tables are the
standard DES tables (FIPS 46-3), kept in `des_pkg`. A permutation entry *t* at
output position *i* means "output bit *i* is input bit *t*". Both count from 1
at the most significant bit.

## Where this RTL departs from the published design, and what it adds

* **Where each round's key rotation sits.** The published design rotates the
  next round's C/D halves early, inside the previous round. It then delays
  them 6 or 7 cycles before compressing. Here each rotation sits directly
  before its compression. The sub-key still reaches each key XOR at the same
  stage as in the published schedule: stage 6 for round 1, stage 13 for
  round 2, then 7 stages later per round.
* **Round-1 half delays.** The published text gives delays of 8 (left) and 9
  (right) for round 1. Here they are 9 and 10, because they are counted from
  the stage-1 register rather than from a later stage. The total is the same.
* **Round-1 depth.** The published text counts round 1 once as "1 + 11" cycles
  and elsewhere as 11. The 119-cycle total it states throughout requires 11,
  and this RTL has 119.
* **Output register.** A register at stage 119 makes the ciphertext appear
  exactly 119 edges after the input is sampled.
* **Reset.** The published design has a `rst` pin but does not describe it.
  Here it is a synchronous, active-high clear of every register.
* **Tables.** The S-box and permutation contents are not printed in the
  published material. The standard tables are used. The published test pairs
  and the FIPS vectors confirm the result end to end.
* **Stored words.** The published material gives the three test pairs but not
  the full contents of the stored arrays. The fourth plaintext and two of the
  keys are FIPS test values. The switch-to-index weighting (Sw0, Sw2 low) is
  this design's choice.
* **No switch synchroniser.** The first pipeline register samples the
  multiplexed words directly.
* **Not built:**
  * the LCD controller, which is not described;
  * decryption.
* **Area.** Synthesised generically, the design has about 5,960 plain
  flip-flop bits and about 48,300 bits in fixed-length delay lines. The
  published implementation reports 3,712 flip-flops on an XC3S500E. This is
  plausible only if its tools put the delay lines into LUT shift registers;
  whether these do was not checked with vendor tools. The bare core needs 194
  signal pins. The board top needs 70.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `des_ref_pkg` is an unpipelined, loop-based DES used as the reference. It
  shares the standard tables with the design but none of its structure.
* The tables themselves are pinned down by known answers:
  * the three published test pairs;
  * the FIPS worked example (0123456789ABCDEF / 133457799BBCDFF1 →
    85E813540F0AB405), including its intermediate values (sub-key 1
    1B02EFFC7072, IP output, E output, S-box output, R1 = EF4A6544);
  * the all-zero vector (→ 8CA64DE9C1B123A7).
* The permutation testbenches also check structural properties:
  * IP followed by FP gives back the input;
  * parity bits do not reach the key state;
  * the eight bits dropped by PC-2 do not reach the sub-key;
  * every S-box row is a permutation of 0..15.
* `tb_des_round_pipe` and `tb_des_key_round` feed a new random input every
  cycle to each configuration. They check each result at its exact latency.
* `tb_des_superpipe` streams 600 blocks with a new random key on every cycle.
  It checks each ciphertext exactly 119 cycles later, and checks that the
  result is not there one cycle earlier. It resets the core mid-stream and
  restarts it.
* `tb_des_fpga_top` runs the board design with all defaults. The switches
  change every cycle, and all 16 settings occur. It checks the four pairs of
  the table above by value and every other result against the reference. It
  also counts plaintext changes, key changes, back-to-back outputs and the
  reset.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/des_pkg.sv tb/des_ref_pkg.sv \
    tb/tb_des_fpga_top.sv --top-module tb_des_fpga_top
./obj_dir/Vtb_des_fpga_top
```

Replace the testbench name for any other block. Each run takes a few seconds.

## Changing it

* **Stored vectors:** override `PLAINTEXTS` / `CIPHERKEYS` on `des_fpga_top`.
  Word 0 is the last element of the packed concatenation.
* **Core only:** instantiate `des_superpipe` and drive `plaintext` and
  `cipherkey` directly.
* **Stage split:** to change how the rounds are split, edit
  `des_round_pipe` / `des_key_round`. Keep this alignment: the sub-key
  register must be valid in the cycle before the key XOR.
* **Latency:** if you change the stage split, also update `ROUND1_STAGES` /
  `ROUND_STAGES` in `des_pkg`. They only describe the structure, but the
  testbenches take the expected latency (`LATENCY`) from them.
