# SPEEDY-r-192: a single-cycle, ultra low-latency block cipher in SystemVerilog

SPEEDY is a block cipher for places where encryption has to fit inside one clock cycle
of a fast processor: secure caches, memory encryption, pointer authentication. It gives up
small area, low energy and cheap decryption. In return it aims at the shortest possible
path from plaintext to ciphertext in CMOS standard cells. The cipher is meant to be built
fully unrolled, as one combinational circuit between two register stages. This RTL builds
it that way.

The main instance is **SPEEDY-6-192**: a 192-bit block, a 192-bit key and 6 rounds. That
gives 128-bit security. With 7 rounds it gives full 192-bit security. 5 rounds are offered
where a lower level is enough. The round count is a parameter. The decryption unit, the
inverse of the cipher, is also provided.

## Where the speed comes from

Three choices keep the critical path short:

1. **A 6-bit S-box made of two levels of NAND gates.** NAND is one of the fastest and most
   "input-hungry" gates in any CMOS library. Each of the six output bits is the OR of four
   AND terms over the inputs and their complements. Written as NAND-of-NANDs, that is two
   gate levels with no output inverter. Every first-level gate drives exactly one gate.
   Despite this shallow structure the S-box is cryptographically strong: differential
   uniformity 8 and linearity 24, the best any 6-bit S-box of this kind reaches.
2. **Few linear layers, each three XOR levels deep.** MixColumns comes only after every
   second S-box layer. It XORs 7 bits of a column, and the round key and round constant
   are folded into the same tree as an 8th input. Eight inputs make a balanced tree of
   exactly three XOR levels (`speedy_mc_ark`).
3. **Everything else is wiring.** ShiftColumns and the key schedule are bit permutations,
   so they cost no gates and no delay.

Per inner round the critical path is therefore: S-box (2 NAND levels), S-box (2 NAND levels),
XOR tree (3 levels).

## The state and its bit order

The 192-bit state is a 32 x 6 array: 32 rows of 6 bits, with one S-box per row. Bit
`[i,j]` is row `i`, column `j`. Index 0 is always the most significant. In a
`logic [191:0]`, bit `[i,j]` sits at position `191 - (6*i + j)`. So `[0,0]` is the MSB, and
row `i` is the slice `[191-6i -: 6]`, with column 0 as the S-box's most significant
input. The plaintext, key and ciphertext ports all use this order. `speedy_pkg::pos()`
does the index arithmetic. Row indices wrap modulo 32 and column indices modulo 6.

## The round operations

| Operation | Definition | RTL |
|---|---|---|
| SubBox (SB) | 6-bit S-box on every row | `speedy_sb_layer`, `speedy_sbox` |
| ShiftColumns (SC) | column `j` rotated up by `j`: `y[i,j] = x[i+j, j]` | `speedy_shift_columns` |
| MixColumns (MC) | `y[i,j] = XOR of x[i+a, j]` for `a` in {0,1,5,9,15,21,26} | inside `speedy_mc_ark` |
| AddRoundConstant | XOR with `c_r` | inside `speedy_mc_ark` |
| AddRoundKey | XOR with `k_r` | initial XOR, `speedy_mc_ark`, final XOR |

With `r` rounds, rounds `R_0 .. R_(r-2)` are

    R_q = A_c(q) o MC o SC o SB o SC o SB o A_k(q)

The last round has no MixColumns, no second ShiftColumns and no constant. It ends with an
extra key addition instead:

    R_(r-1) = A_k(r) o SB o SC o SB o A_k(r-1)

so the cipher uses `r+1` round keys and `r-1` round constants. `speedy_encrypt` arranges
the unrolled datapath as follows:

    s_0        = plaintext ^ k_0
    s_(q+1)    = MC(SC(SB(SC(SB(s_q))))) ^ c_q ^ k_(q+1)     -- speedy_round, q = 0..r-2
    ciphertext = SB(SC(SB(s_(r-1)))) ^ k_r

The first ShiftColumns feeds each S-box of the second layer with bits from six different
S-boxes of the first layer. Since the MixColumns offsets are never more than 6 apart, one
round makes every output bit depend on every input bit.

### The S-box

`speedy_sbox` writes each coordinate as a NAND of four NANDs, one inner NAND per product
term:

    y0 = x3.~x5 + x3.x4.x2 + ~x3.x1.x0 + x5.x4.x1
    y1 = x5.x3.~x2 + ~x5.x3.~x4 + x5.x2.x0 + ~x3.~x0.x1
    y2 = ~x3.x0.x4 + x3.x0.x1 + ~x3.~x4.x2 + ~x0.~x2.~x5
    y3 = ~x0.x2.~x3 + x0.x2.x4 + x0.~x2.x5 + ~x0.x3.x1
    y4 = x0.~x3 + x0.~x4.~x2 + ~x0.x4.x5 + ~x4.~x2.x1
    y5 = x2.x5 + ~x2.~x1.x4 + x2.x1.x0 + ~x1.x0.x3

Here `x0` is the MSB (port bit 5). As a table, `S(0x00..0x0f)` =
`08 00 09 03 38 10 29 13 0c 0d 04 07 30 01 20 23`. The complete 64-entry table is in
`tb/speedy_ref_pkg.sv`, which the testbench compares against.

The RTL expresses the gates as `~&{...}` operators. It does not instantiate library
cells. To get the low latency that motivates the cipher, a synthesis flow should keep
this NAND-NAND structure, for example by mapping it to NAND2/3/4 cells and protecting
them from restructuring in the first compile pass.

### Key schedule

`k_0` is the master key. Each later round key is a fixed bit permutation of the previous
one: the bit at position `p = 6i+j` moves to position `(7p + 1) mod 192`. For example,
bit 0 moves to 1, bit 1 to 8, bit 27 to 190 and bit 137 to 0. `speedy_key_schedule`
produces all `r+1` keys at once, as wiring.

### Round constants

`c_q` is the `q`-th 192-bit slice of the binary expansion of `pi - 3`, first digit first:
`c_0 = 243f6a8885a308d3 13198a2e03707344 a4093822299f31d0`, and so on.
`speedy_pkg::PI_FRAC` holds the first 36 64-bit words. That covers ciphers with up to 13
rounds. `speedy_encrypt` and `speedy_decrypt` stop elaboration with an error if `ROUNDS` is
larger.

## Decryption

Encryption is the primary direction. Many uses (CTR, GCM, CMAC, pointer authentication)
need nothing else. `speedy_decrypt` is the exact inverse and takes the same master key:

    t_(r-1)   = SB^-1(SC^-1(SB^-1(ciphertext ^ k_r))) ^ k_(r-1)
    t_q       = SB^-1(SC^-1(SB^-1(SC^-1(MC^-1(t_(q+1) ^ c_q))))) ^ k_q,   q = r-2 .. 0

The inverse MixColumns is again a cyclic matrix, but with 19 taps: 0, 4, 5, 6, 7, 10, 12,
14, 15, 16, 18, 19, 20, 21, 22, 23, 24, 25 and 28 (`speedy_inv_mix_columns`). The inverse
S-box has no shallow NAND form. `speedy_sbox_inv` is a 64-entry lookup table that is
computed during elaboration by inverting the forward S-box equations. Expect decryption
to be markedly slower and larger than encryption. This is inherent to the cipher.

## Top level and timing (`speedy_top`)

`speedy_top` holds one encryption unit and one decryption unit side by side. Each unit has
the same shape:

    *_in_valid, data, key --> input registers --> unrolled cipher --> output register --> *_out_valid, result

- Inputs presented with `*_in_valid = 1` before rising edge N are captured at edge N. The
  result is registered at edge N+1. The whole cipher is one combinational path of one
  clock period.
- A new block can enter every cycle. There is no back-pressure and no stall.
- `rst_n` is an asynchronous, active-low reset that clears all registers. Blocks in
  flight are dropped.
- Parameters: `ROUNDS` (default 6) and `ROWS` (default 32, i.e. 192 bits). Only
  `ROWS = 32` has the MixColumns taps and the key-schedule constants of the specification.
  The inverse MixColumns taps are valid only for 32 rows.

The two registers around the combinational cipher reproduce the setup in which the cipher
is meant to be timed. The valid signals, the reset and putting both units in one top are
choices of this implementation.

## Files

| File | Contents |
|---|---|
| `rtl/speedy_pkg.sv` | constants: sizes, MixColumns taps, key-schedule parameters, pi digits, index helper |
| `rtl/speedy_sbox.sv` | 6-bit S-box as two-level NAND trees |
| `rtl/speedy_sb_layer.sv` | 32 S-boxes in parallel |
| `rtl/speedy_shift_columns.sv` | ShiftColumns and (`INVERSE=1`) its inverse |
| `rtl/speedy_mc_ark.sv` | MixColumns merged with the round constant and the next round key |
| `rtl/speedy_key_schedule.sv` | all round keys by bit permutation |
| `rtl/speedy_round.sv` | one inner round |
| `rtl/speedy_encrypt.sv` | unrolled encryption |
| `rtl/speedy_sbox_inv.sv`, `rtl/speedy_inv_sb_layer.sv` | inverse S-box and layer |
| `rtl/speedy_inv_mix_columns.sv` | inverse MixColumns |
| `rtl/speedy_decrypt.sv` | unrolled decryption |
| `rtl/speedy_top.sv` | registered encryption and decryption units |
| `tb/speedy_ref_pkg.sv` | untimed reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design with `tb/speedy_ref_pkg.sv`. That reference is written
independently of the RTL. Its S-box is the 64-entry table, not the NAND equations. Its
linear layers are loops over the index formulas, and its constants are kept as 64-bit
words. Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_speedy_sbox`: all 64 inputs against the table. It also computes, from the RTL's own
  outputs, the properties the design rests on: a bijection, uniformity 8, linearity 24,
  and algebraic degrees 5, 3, 3, 3, 4, 5 of `y0..y5`. It also checks the full 6 x 6 tables of
  1-bit to 1-bit differential probabilities and linear correlations.
- `tb_speedy_sbox_inv`, `tb_speedy_sb_layer`, `tb_speedy_shift_columns`,
  `tb_speedy_mc_ark`, `tb_speedy_inv_mix_columns`, `tb_speedy_key_schedule` and
  `tb_speedy_round` use single-bit walks and random states. The key-schedule test also
  spot-checks positions of the permutation table. The round test also checks full
  diffusion: flipping any one of the 192 input bits, over 4000 random states, changes
  every output bit at least once. Some of these dependencies are rare; the rarest
  input/output pair changes in about 0.5 % of states.
- `tb_speedy_encrypt` and `tb_speedy_decrypt` cover 5, 6 and 7 rounds with random data.
  Each also checks one fixed known-answer triple per round count, produced by a separate
  software model of the same specification:

      plaintext  a13a632451070e4382a27f26a40682f3fe9ff68028d24fdb
      key        764c4f6254e1bff208e95862428faed01584f4207a7e8477
      5 rounds   65cdcac54e49c99f141959c0a1385b879e00dd7e144d4ca8
      6 rounds   ab95d506a9d0916eee882a640f257f87d2b6ab4613add11c
      7 rounds   0dc194ba6b381b6f363db861403aefe01de2d9318394f673

  These vectors have **not** been compared with the cipher designers' published
  reference vectors. Both models follow the bit order described above. If your
  reference implementation orders bits differently, check that first.
- `tb_speedy_top` runs `speedy_top` with its default parameters (SPEEDY-6-192). It sends
  3000 cycles of blocks with random gaps. It checks every ciphertext and the exact
  latency of two edges. It feeds every ciphertext back through the decryption unit and
  resets the design in mid-stream. It counts back-to-back blocks, idle gaps, round trips,
  cycles with both units busy, and the reset. A situation that never occurred counts as a
  failure.

To run a testbench with Verilator (5.x):

    verilator --binary -Wno-fatal --top-module tb_speedy_top -Irtl -Itb \
        rtl/speedy_pkg.sv tb/speedy_ref_pkg.sv tb/tb_speedy_top.sv
    ./obj_dir/Vtb_speedy_top

`-Irtl -Itb` lets Verilator find each module in the file of the same name. The packages
must come first on the command line.

## Limits and departures

- **No cell-level netlist.** The cipher's best latency comes from instantiating NAND and
  XOR cells directly and keeping them through synthesis. This RTL describes the same gate
  structure in portable SystemVerilog but leaves cell choice to the tool. Without
  constraints, a synthesis tool may restructure the S-box.
- **XNOR option not built.** In libraries where XNOR is faster than XOR, the MixColumns
  tree can use XNOR gates, with the inversion absorbed into the input inverters of the
  next S-box layer. This is a technology-specific variant and is not provided.
- **Round count is fixed at build time.** The default build runs 6 rounds. Set `ROUNDS`
  to 5 or 7 for the other recommended instances. There is no run-time round selection.
- **Other block sizes.** The modules are written for a general number of rows `l`.
  However, the MixColumns taps, their inverse and the key-schedule parameters must be
  chosen for each `l`. Only `l = 32` has been verified.
- **No side-channel protection.** Like any plain unrolled implementation, this one leaks
  through power and timing to an adversary who can observe it.
- **Decryption structure.** The inverse datapath is derived from the encryption. It is not
  latency-optimised: the constant XOR sits outside the inverse MixColumns, and the
  inverse S-box is a lookup table.
