# DES encryption core: sixteen unrolled rounds, registers behind the S-boxes, full scan

This is a hardware implementation of the Data Encryption Standard (FIPS 46) in
encrypt direction. It takes a 64-bit plaintext and a 64-bit key and produces the
64-bit ciphertext. All sixteen rounds and the whole key schedule are laid out
side by side in hardware. The only storage in the datapath is a 4-bit register
behind each of the 8 S-boxes of each round: 16 × 8 × 4 = 512 flip-flops.
Everything else is wiring and XOR gates.

What you get from this structure:

- The ciphertext is correct 16 clocks after the plaintext and key are applied,
  as long as both are held steady for those 16 clocks.
- Each register-to-register path crosses one S-box look-up plus a chain of
  XOR gates, rather than sixteen rounds of logic (see "Size and timing" for
  the exact depth).
- Every flip-flop is a multiplexed scan cell. The cells form two scan chains of
  256, so the core can be tested after manufacture with full-scan test patterns.

## Interface

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock, rising edge |
| `pt`       | in  | 64    | plaintext |
| `key`      | in  | 64    | key, including the 8 parity bits (they are ignored) |
| `ct`       | out | 64    | ciphertext |
| `test_se`  | in  | 1     | scan enable: 0 = normal operation, 1 = shift the scan chains |
| `test_si1` | in  | 1     | scan chain 1 input (rounds 1–8) |
| `test_so1` | out | 1     | scan chain 1 output |
| `test_si2` | in  | 1     | scan chain 2 input (rounds 9–16) |
| `test_so2` | out | 1     | scan chain 2 output |

One parameter, `FILLER_OR` (default 0), is passed down through
`des_keysched` to `des_pc1`. When it is 1, the first PC-1 output bit (key
bit 57) passes through a two-input OR gate (`my_or2`) whose inputs are both
tied to that bit. This reproduces the hierarchical-layout variant of the core.
The gate only gives the placement flow a standard cell to place at the top
level, and the ciphertext is identical either way.

**Bit numbering.** The standard numbers bits 1..64 starting from the most
significant bit. All vectors here are declared `[N-1:0]`, with standard bit 1 in
the MSB. Hex values therefore read the same way as in published DES test
vectors: `key = 64'h133457799BBCDFF1` means exactly what the standard means.

**Protocol.** There is no start, valid or reset signal. To encrypt a block:

1. Drive `pt` and `key` with `test_se = 0`.
2. Hold them for 16 rising clock edges.
3. Read `ct` after the 16th edge.

Then apply the next block. One block can be encrypted every 16 clocks. Before the
16th edge, `ct` holds a mix of old and new data and must be ignored.

## Why 16 clocks, and why this is not a pipeline

This is the least obvious part of the design. Each round block (`des_roundfunc`)
computes

    L_i = R_{i-1}                                   (a wire)
    R_i = L_{i-1} xor P( Sreg_i )                   (combinational)
    Sreg_i <= S( E(R_{i-1}) xor K_i )               (at every rising edge)

Only the S-box outputs are stored. The L and R halves flow between rounds as
wires. After the inputs change, the data settles one round per clock:

- Edge 1: round 1's register takes the S-box value computed from the new R0
  and K1, which is correct. R1 is now correct.
- Edge 2: round 2's register sees a correct R1 and becomes correct.
- Edge *n*: round *n* becomes correct, which also depends on correct L values.
  Those come through wires from rounds n−1 and n−2, which are already right.

So `ct` is correct after the 16th edge. A register that starts with a random
value simply gets overwritten within those 16 edges. This is why no reset is
needed.

Despite the 16 register stages, this is **not** a 16-stage pipeline. R_i also
depends, through wires, on L_{i-1} = R_{i-2}, and that path reaches all the way
back to `pt`. If a second block entered while the first was still settling, it
would corrupt the first. Throughput is therefore one block per 16 clocks, not
one per clock.

One side effect shows up in simulation. DES has a complementation property:
DES(~k, ~p) = ~DES(k, p). If two consecutive blocks are related this way, every
S-box input stays the same, so `ct` becomes valid after only a few clocks. The
published test set contains three such pairs. The testbench therefore checks
the exact 16-clock latency only when the round-16 S-box value actually changes.

## The datapath

- **Initial and final permutations** (`des_ip`, `des_fp`): pure rewiring with the
  standard IP and IP⁻¹ tables. `des_fp` gets R16 on its first input and L16 on
  its second. This wiring is how the final swap of the halves is done; there is
  no separate swap stage.
- **Round** (`des_roundfunc`) contains:
  - the expansion E (`des_xp`, 32→48 bits);
  - the key XOR (`des_xor1`), which also splits the result into eight 6-bit groups;
  - eight S-boxes with their registers (`des_sbox`, one module, parameter `BOX` = 1..8);
  - the permutation P (`des_pp`);
  - the output XOR with L_{i-1} (`des_xor2`).

  Inside an S-box, the 6-bit input b1..b6 selects row b1b6 and column b2b3b4b5.
  The table is a constant array in `des_pkg`, which synthesis maps to a 64×4 ROM
  or to logic.
- **Key schedule** (`des_keysched`): fully combinational, with no registers.
  - PC-1 (`des_pc1`) drops the parity bits and splits the key into the 28-bit
    halves C0 and D0.
  - Sixteen stages of fixed left rotations (1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2,
    2, 2, 2, 1 places) produce C_i and D_i.
  - A PC-2 selection (`des_pc2`) per stage gives the round key K_i.

  Because the round keys follow `key` with no storage, the key must be held just
  as steadily as `pt`.

All constant tables are in `rtl/des_pkg.sv`. They are written as the standard
prints them: 1-based source bit positions, in output order. The translation to
`[N-1:0]` indices happens in one place in each permutation module:
`out[W-1-i] = in[N - TABLE[i]]`.

## Scan test mode

Every S-box register bit is a `scan_dff`: a D flip-flop with a 2:1 multiplexer
in front of it. With `scan_enable` = 1 the flop takes `scan_in`; with 0 it takes
the functional `d`. Its `q` output also serves as the scan output.

The cells are chained as follows:

    test_si1 -> round 1: S1 bit1, S1 bit2, S1 bit3, S1 bit4, S2 bit1, ... S8 bit4
             -> round 2 ... -> round 8 -> test_so1
    test_si2 -> round 9 ... -> round 16 -> test_so2

Each chain holds 256 flops.

Operation:

- With `test_se` = 1, each clock shifts both chains by one place. After 256
  clocks, the first bit shifted in sits in the last flop of its chain.
- Unloading after a normal encryption shows the S-box outputs of every round.
  The first bit out of chain 1 is bit 4 of round 8's S8.
- To capture the response to a loaded state, drop `test_se` for one clock.

Two parts of this are choices of this design rather than given facts:

- **Chain order.** Only the number of chains (two) is given; the order above is
  this design's choice.
- **Multiplexer polarity.** The usual drawing of this cell labels its inputs in
  a way that could be read as the opposite polarity. This design follows the
  written description of the cell's behaviour: scan enable high selects the scan
  input.

## Files and hierarchy

    desenc                    top: DES core with scan ports
    ├── des_keysched          combinational key schedule
    │   ├── des_pc1
    │   │   └── my_or2        only when FILLER_OR = 1
    │   └── des_pc2 ×16
    ├── des_ip
    ├── des_roundfunc ×16     one round
    │   ├── des_xp
    │   ├── des_xor1
    │   ├── des_sbox ×8       (BOX = 1..8)
    │   │   └── scan_dff ×4
    │   ├── des_pp
    │   └── des_xor2
    └── des_fp
    des_pkg                   types, tables, S-box look-up and rotate functions

Testbenches in `tb/`:

- One self-checking testbench per module (`tb_<module>.sv`).
- `des_ref_pkg.sv`: a behavioural DES reference model plus the 34 known-answer
  vectors of the classic DES validation set.
- `tb_check.svh`: a compare macro shared by the testbenches.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

## Verification

- **`tb_desenc`** is the end-to-end test. It runs the top at its only
  configuration and covers:
  - the 34 known-answer vectors;
  - 300 random blocks against the reference model;
  - the exact 16-clock latency;
  - a full unload of both scan chains, compared bit by bit with the S-box
    outputs the reference model predicts for each round;
  - a 256-clock load of random patterns through both chains;
  - a correct encryption after returning to functional mode.

  It counts each of these mechanisms and fails if any never happened.
- **`tb_desenc_kat`** reproduces the classic timing of the known-answer run:
  34 vectors, 16 clocks of 500 ns each, 272,000 ns in total. The scan inputs are
  tied to 1 with `test_se` = 0. A second core built with `FILLER_OR` = 1 runs
  alongside and must produce the same ciphertexts.
- **Module testbenches** check each block against textbook values from the
  well-known worked example. That example uses key 133457799BBCDFF1 and
  plaintext 0123456789ABCDEF, with these intermediate values:
  - IP = CC00CCFF F0AAF0AA;
  - K1 = 1B02EFFC7072;
  - E(R0) = 7A15557A1555;
  - round-1 S-box output 5C82B597;
  - P = 234AA9BB;
  - R1 = EF4A6544.

  The module testbenches also check random inputs against the reference model,
  and structural properties: FP undoes IP, PC-1 ignores the parity bits, and
  every S-box row is a permutation of 0..15.

The reference model and the RTL share the constant tables in `des_pkg`. The
known-answer vectors are independent of both, and they pass, so the tables are
checked as well.

To simulate with Verilator (run from the folder that holds `rtl/` and `tb/`):

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/des_pkg.sv tb/des_ref_pkg.sv tb/tb_desenc.sv --top-module tb_desenc
    ./obj_dir/Vtb_desenc

Replace `tb_desenc` with any other testbench name to run a module test. The
testbenches write their delays in nanoseconds, hence `--timescale 1ns/1ps`
(`tb_desenc_kat` checks the total run time against 272,000 ns). To lint
the RTL alone:

    verilator --lint-only -Wall -Irtl -y rtl rtl/des_pkg.sv rtl/desenc.sv --top-module desenc

The top lints without messages. A sub-module linted on its own reports the
package tables it does not use.

## Size and timing

After generic synthesis, the top has:

- 512 flip-flops;
- 128 S-box ROMs of 64×4 bits each;
- the XOR and multiplexer logic.

There are no latches and no combinational loops.

The shortest register-to-register path is one round:

    S-box register → P → XOR with L → E → key XOR → S-box look-up → next S-box register

Both P and E are pure wiring, so in gates that is two XOR levels plus one
S-box look-up. The longest path is not this one. Because L_i = R_{i-1}, the
round equations unfold to R_i = R_{i-2} xor P(Sreg_i), a chain of XORs that
skips every other round. Round 1's register therefore reaches round 16's S-box
input through R1, R3, ..., R15: eight XOR levels, then the key XOR and the
S-box look-up. Static timing has to cover that path, even though functionally
it only matters while a block is settling.

## Departures and limits

- **Encryption only.** There is no decrypt mode. Decryption would use the same
  structure with the round keys in reverse order, but it is not built.
- **No reset.** There is also no start, busy or valid flag. The 16-clock
  protocol above is the whole interface.
- **No inverted flop output.** The `qb` output of a library scan cell is not
  modelled, because nothing here uses it.
- **No automatic test patterns.** The scan structure is written into the RTL.
  ATPG patterns are not part of this design; only shift and capture are
  exercised in simulation.
- **Unknown chain order.** The order of the cells in the two chains is this
  design's choice, as noted above.
