# Lehmer random number generator in hardware: seven ways to multiply by 16807 modulo 2^31 − 1

The Lehmer ("minimal standard") generator produces 31-bit pseudo-random numbers with the recurrence

    Z(n+1) = a · Z(n) mod M,    a = 7^5 = 16807,    M = 2^31 − 1 (a Mersenne prime)

Any seed in 1 … M−1 starts a cycle through all of 1 … M−1. The seed 0 and the all-ones word (which is congruent to 0) are fixed points, so never load them.

A general 31 × 15-bit multiplier followed by a division is not needed. This repository implements the generator several ways. All of them rest on two facts about arithmetic modulo 2^31 − 1:

1. **Multiplying by 2^i is a rotation.** Since 2^31 ≡ 1 (mod M), the bits that a shift by i pushes out above bit 30 come back in at bit 0. So `Z·2^i mod M = rotl(Z, i)`. Call this E_i.
2. **A carry out of bit 30 is worth 1 at bit 0.** A 31-bit adder becomes a modulo-M adder once its carry out is fed back as its carry in. This is called an end-around (cyclic) carry.

The multiplier 16807 is `100 0001 1010 0111` in binary, with ones at bit positions 14, 8, 7, 5, 2, 1 and 0. So the whole multiplication is the modulo-M sum of seven rotated copies of Z:

    R = (E14 + E8 + E7 + E5 + E2 + E1 + E0) mod M

It can also be written with five copies and one subtraction, because 16807 = 2^14 + 2^8 + 2^7 + 2^5 + 2^3 − 1:

    R = (E14 + E8 + E7 + E5 + E3 − Z) mod M

Every implementation here computes one of these two sums. They differ only in how much hardware works on the sum at once: all 31 bits of all operands, one operand per clock, or one bit per clock.

## Arithmetic modulo 2^31 − 1

**Carry-propagate adder/subtracter** (`cpa_mod_m`). The adder computes `A ± B = d31·2^31 + S`, then returns `S + d31`. For subtraction, d31 is a borrow worth −1, so the borrow out is fed back as the borrow in. Drawn literally, that feedback is a combinational loop. This design breaks the loop:

- a first ripple chain, started with carry 0, produces only the carry out;
- the result chain is then started with that carry.

Both forms give the same result. A carry out of 1 with carry-in 0 stays 1 with carry-in 1, because some position generates it. A carry out of 0 means no position generates a carry, so feeding back 0 changes nothing.

Each bit of the result chain is a 1-bit adder (`add1`, a + b + c = 2d + s) or a 1-bit subtracter (`sub1`, a − b − c = −2d + s), chosen by `sub`.

**Two zeros.** Modulo-M arithmetic in this form is one's-complement arithmetic, so 0 has two encodings: all zeros and all ones. An adder whose inputs sum to a multiple of M may return all ones. This never affects the generator, because a·Z mod M is never 0 for a valid seed.

**Negation is free.** The 31-bit complement of Z is M − Z, which is −Z modulo M. No "+1" is needed, unlike two's-complement arithmetic.

**Carry-save adder** (`csa_mod_m`). It is 31 independent full adders, giving `2·D + S = A + B + C`. Modulo M, 2·D is simply D rotated left by one, so the adder outputs the sum vector S and the rotated carry vector D^ = rotl(D, 1). No carry crosses a bit position, so the delay is one full adder. Three words in, two words out, and the pair still represents the sum modulo M.

**Carry-save incrementer** (`cs_inc`). A row of half adders for two words. With `INC = 1`, bit 0 also adds a constant 1: `s0 = ~(a0 ^ b0)`, `d0 = a0 | b0`. So `(s + dh) mod M = (a + b + INC) mod M`.

## The implementations

| Generator (top-level output) | Next-number circuit | Cycles per number | Arithmetic hardware |
|---|---|---|---|
| `z_wp[0]`, main form | `nrn_csa_tree` | 1 | 5 carry-save adders in 4 levels + 1 carry-propagate adder |
| `z_wp[1]` | `nrn_csa_sub` | 1 | 4 carry-save adders + half-adder row + 1 carry-propagate adder |
| `z_wp[2]` | `nrn_cpa_chain` | 1 | 6 carry-propagate adders in series (slowest) |
| `z_wp[3]` | `nrn_cpa_tree` | 1 | 6 carry-propagate adders in 3 levels |
| `z_wp[4]` | `nrn_bitslice` | 1 | 31 column cells in a ring |
| `z_ws` | `lrng_word_serial` | 6 | 1 carry-propagate adder/subtracter |
| `z_bs` | `lrng_bit_serial` | 219 | 1 full adder |

The five word-parallel generators are the same circuit, `lrng_word_parallel`, with a different combinational next-random-number (NRN) circuit selected by `ARCH`. That circuit is:

- a 31-bit Z register;
- a three-way multiplexer in front of it (keep Z, load R, load the seed);
- the NRN circuit between the register's output and the multiplexer.

In delay units of a 1-bit adder, assuming simple ripple carries, the forms compare as follows:

- chain of carry-propagate adders: about 6 × 31;
- tree of carry-propagate adders: about 3 × 31;
- carry-save tree: 4 + one 31-bit carry propagation. This is why it is the main form.

### Carry-save tree (`nrn_csa_tree`)

    level 1:  CSA_a(E14, E8, E7)        CSA_b(E2, E1, Z)
    level 2:  CSA_c(D^a, S_a, E5)
    level 3:  CSA_d(S_c, D^b, S_b)
    level 4:  CSA_e(D^c, D^d, S_d)
    final:    R = (S_e + D^e) mod M      (carry-propagate, end-around carry)

Seven operands need five 3:2 reductions to reach two operands; here they fit in four levels.

### Five terms minus Z (`nrn_csa_sub`)

    level 1:  CSA1(E14, E8, E7)         CSA2(E5, E3, ~Z)
    level 2:  CSA3(D^1, S1, D^2)
    level 3:  CSA4(D^3, S3, S2)
    level 4:  half-adder row on (D^4, S4)
    final:    carry-propagate adder mod M

The published arrangement makes level 4 an incrementer, reasoning that −Z = ~Z + 1. That holds modulo 2^31 but not modulo 2^31 − 1: with the increment, the circuit returns a·Z + 1. This design therefore instantiates `cs_inc` with `INC = 0`. The row keeps its place in the structure but adds nothing. `cs_inc` with `INC = 1` is still available and tested on its own.

### Carry-propagate chain and tree (`nrn_cpa_chain`, `nrn_cpa_tree`)

- The chain sums `((((E14 + E8) + E7) + E5) + E2) + E1) + Z`.
- The tree sums `(E14 + E8) + (E7 + E5)` and `E2 + (E1 + Z)`, then adds the two results.

### Bit-slice ring (`nrn_bitslice`, `nrn_bitslice_cell`, `count7`)

This form works column by column instead of word by word. Column k of the seven rotated words holds bit k of E14, E8, E7, E5, E2, E1 and E0, which is seven bits of Z picked by fixed wiring. Cell k processes that column in three levels:

1. A 7:3 counter (`count7`, four full adders) counts the ones in column k: `count_k = 4·w4_k + 2·w2_k + w1_k`. The weight-2 bit belongs to column k+1 and the weight-4 bit to column k+2.
2. A full adder (the 3:2 stage) adds w1_k, w2_(k−1) and w4_(k−2). Its carry goes to column k+1.
3. A second full adder (the carry-propagate stage) adds the 3:2 sum, the 3:2 carry from column k−1 and the ripple carry, producing bit k of R.

Between neighbouring cells run a 3-bit bus `d = {w4_(k−1), w4_k, w2_k}` (w4_(k−1) just passes through), the 3:2 carry `e`, and the ripple carry `c`.

Modulo M, column 30's outputs feed column 0, so the cells form a ring. The count and 3:2 signals only look backwards around the ring and never depend on themselves. Only the ripple carry closes a loop. As in `cpa_mod_m`, that loop is broken with a second row of cells started with carry 0, whose final carry becomes the carry into column 0 of the result row. Only the ripple-carry part is needed twice; the counters of the two rows compute the same values and a synthesis tool can merge them.

### Word-serial generator (`lrng_word_serial`)

One `cpa_mod_m`, an accumulator and a step counter add one rotated copy per clock:

    R = Z + E1, then + E2, + E5, + E7, + E8, + E14

That is six additions, and Z is written at the edge that ends the sixth. With `SIX_TERMS = 1` the sequence is `E14 + E8, + E7, + E5, + E3, − Z` (five cycles, the last one subtracting).

### Bit-serial generator (`lrng_bit_serial`, `bs_datapath`, `bs_control`)

This form uses a single full adder. The datapath (`bs_datapath`) has:

- register A, the accumulator: shifts right, with the sum bit entering at bit 30;
- register B: rotates right;
- flip-flop C: the carry;
- a 5-bit step counter k, with `zk` flagging k = 0.

The adder adds A[0], B[0] and C. One 31-cycle pass therefore leaves A + B in A.

The carry in C is kept from one pass to the next. Its carry out of bit 30 thus enters bit 0 of the next pass, which is exactly the end-around carry, spread out in time.

The control unit (`bs_control`: next-state logic, state register, opcode logic) runs:

| Step | Cycles | Action |
|---|---|---|
| load | 1 | A ← Z, B ← E1, C ← 0, k ← 30 |
| passes 1–6 | 6 × 31 | add E1, E2, E5, E7, E8, E14. In each pass's last cycle (zr), B is loaded with the next rotation from a multiplexer and k is reloaded |
| pass 7 | 31 | B cleared: adds 0 plus the carry still in C |
| done | 1 | Z ← A |

That is 217 adder cycles, and 219 clock edges from accepting the request to the new Z: 2.19 µs at 100 MHz.

Pass 7 can never leave a carry of its own. That would require pass 6 to sum to 2^32 − 1, i.e. A, E14 and C all ones, which does not occur even for Z = all ones. An assertion in `lrng_bit_serial` checks it.

## Interface and timing

All generators use the same operation code:

| `op` | Operation |
|---|---|
| 0 | nop: Z keeps its value |
| 1 | next: Z ← 16807·Z mod M |
| 2 | seed: Z ← seed |
| 3 | treated as nop |

Common behaviour:

- Reset is synchronous and active low, and sets Z to 1.
- All registers update on the rising edge of `clk`.
- Seeds are loaded unchecked.

Timing per form:

- **Word-parallel:** op = 1 produces a new Z at every clock edge.
- **Serial forms:** `busy` goes high at the edge that accepts op = 1 and falls at the edge that writes the new Z. While `busy` is high, `op` is ignored, including seed loads.

`lrng_top` has no parameters. Its ports are:

- `clk`, `rst_n`;
- for the five word-parallel generators, which share their inputs: `op_wp`, `seed_wp`, `z_wp[5]`;
- for the word-serial generator: `op_ws`, `seed_ws`, `z_ws`, `busy_ws`;
- for the bit-serial generator: `op_bs`, `seed_bs`, `z_bs`, `busy_bs`.

Shared constants and types are in `rtl/lrng_pkg.sv`: the word width W = 31, the rotation list, the `op_e` encoding, the NRN selector `nrn_arch_e`, the bit-serial opcodes, and `lrot()`.

## Where this design makes its own choices

- **Not specified in the original description, chosen here:**
  - reset behaviour (Z = 1);
  - the treatment of op = 3;
  - the busy handshake of the serial generators;
  - the word-serial datapath;
  - the rotation multiplexer that feeds the bit-serial B register;
  - the states of the bit-serial control unit;
  - the seventh, carry-absorbing pass.
- **Bit-slice signal bundling:** how the count bits of the bit-slice cells are grouped into the 3-bit bus between cells is a reading of the published cell diagrams. The 3:2 carry between neighbours is a separate 1-bit port.
- **Loop breaking:** end-around carries use a carry pre-pass instead of a combinational loop (see above).
- **No increment in `nrn_csa_sub`:** the published incrementer stage would make the circuit compute a·Z + 1, so the row is built with `INC = 0`.
- **Bit-serial cycle count:** the published estimate of 217 clock cycles per number is met by the adder (217 cycles); loading and copying add two more. The same source quotes 22 µs at 100 MHz for that count, but 217 cycles at 10 ns is 2.17 µs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Reference values are computed in the testbench with 64-bit integers (`16807·Z % (2^31−1)`).

| Testbench | Covers |
|---|---|
| `tb_add1`, `tb_sub1`, `tb_count7`, `tb_nrn_bitslice_cell` | exhaustive |
| `tb_cpa_mod_m`, `tb_csa_mod_m`, `tb_cs_inc` | random and corner operands; checked modulo M |
| `tb_nrn` | all five NRN circuits against the reference for corner and random Z |
| `tb_lrng_word_parallel` | operations, 2000 consecutive numbers, and the 10000th number from seed 1 (1043618065, the standard check value of this generator) |
| `tb_lrng_word_serial` | both term sequences, results, the 6- and 5-cycle latencies, and an op ignored while busy |
| `tb_bs_datapath` | one and two passes with kept carry, and the zk timing |
| `tb_lrng_bit_serial` | results, the 219-cycle latency, and corner seeds |
| `tb_lrng_top` | end to end at the default configuration: 10000 numbers on all five word-parallel generators, 300 word-serial and 40 bit-serial numbers |

`tb_lrng_top` also counts the design's mechanisms and fails if any never occurs: seed load, nop, end-around carry, rotated carry-save carry, and ops ignored while busy.

To run a testbench with Verilator 5, from the repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv \
              rtl/lrng_pkg.sv tb/tb_lrng_top.sv --top-module tb_lrng_top
    ./obj_dir/Vtb_lrng_top

Replace `tb_lrng_top` with any other testbench name. The whole set runs in well under a minute.

To change the design:

- pick a different NRN circuit with `lrng_word_parallel #(.ARCH(...))`;
- use the five-term word-serial form with `lrng_word_serial #(.SIX_TERMS(1))`.

The multiplier and modulus are fixed by the rotation lists in `lrng_pkg`. A different multiplier needs new rotation lists, and the connections of the trees would change with them.
