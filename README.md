# VLCSPA-M: a variable-latency carry speculative adder with modified carry generators

A ripple or carry-select adder spends most of its delay waiting for carries that
rarely travel far. For random operands, a carry that crosses a whole block of a
dozen or so bits is uncommon. This adder takes advantage of that. It cuts an
N-bit addition into independent blocks. Each block guesses its carry-in from the
bits of the block just below it, and does not wait for the real carry. Usually
the guess is right and the sum is ready after one block delay, in one clock
cycle. When it is wrong, a small detector flags it and a correction stage
repairs the sum in a second cycle. The input registers hold the operands for
that extra cycle. The result is always exact. Only the latency varies: 1 cycle,
or 2 in the rare error case.

The default configuration is a 16-bit adder made of four 4-bit blocks, with
three carry predictors.

## Structure

```
            a, b
              |
        +-----v------+ VALID (load enable)
        | data_latch |<--------------------------------+
        +-----+------+                                 |
              | a_q, b_q                               |
        +-----v-----------------------------+          |
        | cspa_m                            |          |
        |  carry_predictor 0..M-2           |          |
        |  block_adder 0..M-1               |          |
        |   (mod_carry_gen, carry_gen,      |          |
        |    per-bit mux, sum_gen)          |          |
        +--+-----------+--------------------+          |
     SUM*  |           | C_out^i, C_out^i*             |
           |    +------v----------+  ER                |
           |    | error_detection |-------+------------+
           |    +------+----------+       |
           |           | Err_block        |
           |    +------v---------+        |
           +--->| error_recovery |        |
           |    +------+---------+        |
           |           | SUMREC (reg)     |
           |  0   +----v-+ 1              |
           +----->| mux  |<---------------+ select
                  +--+---+
                     v sum, cout
```

| Module | Role |
|---|---|
| `vlcspa_m` | Top level: wires the parts together and holds the ER-selected output multiplexer |
| `data_latch` | Operand registers with load enable VALID; makes VALID from ER |
| `cspa_m` | The speculative adder: M block adders and M-1 carry predictors |
| `block_adder` | One block: two carry chains (carry-in 1 and 0), a mux per bit, sum generator |
| `mod_carry_gen` | One-gate first stage of a chain: AND when tied to 0, OR when tied to 1 |
| `carry_gen` | 1-bit carry generator, majority(a, b, cin) |
| `sum_gen` | Sum bits: a ^ b ^ carry |
| `carry_predictor` | Guesses a block's carry-out from its own upper bits |
| `error_detection` | Err_block[i] = C_out^i ^ C_out^i*, ER = OR of all |
| `error_recovery` | Adds the missed carries back into SUM*; registered |
| `cspa_pkg` | Default sizes and the block-count and block-width functions |

## The speculative adder

The operands are split into M = ceil(N/K) blocks. All blocks are K bits wide
except the top one, which takes the N-(M-1)K bits left over. The adder has no
carry-in, so block 0 is an ordinary ripple adder tied to 0.

Every other block builds its carries twice, in two ripple chains: one as if its
carry-in were 1 and one as if it were 0. Because each chain starts from a
constant, its first stage collapses to a single gate. With carry-in 0 the carry
is `a & b`, and with carry-in 1 it is `a | b`. These are the *modified carry
generators*. They save one full carry generator per chain and one gate delay at
the bottom of the chain. The stages above are ordinary 1-bit carry generators.
A 2:1 multiplexer per bit picks the carry of the chain that matches the block's
carry-in. The sum generator XORs the operand bits with the selected carries.

The carry-in of block i+1 comes from *carry predictor i*, not from block i. The
predictor looks only at block i's own operand bits. By default it uses all K of
them (`PRED_BITS` = K); with a smaller `PRED_BITS` it uses the upper ones. It
computes their carry-out as if nothing came in from below. So every block
adder and every predictor works in parallel, and the critical path is one
block's carry chain plus a mux.

## Why a wrong guess is easy to detect and exact to repair

A predictor assumes a carry-in of 0, so it can only *miss* a carry, never invent
one. Block i computes its real carry-out C_out^i for the carry-in it was given.
The prediction C_out^i* is wrong exactly when the two differ, and then
C_out^i = 1 and C_out^i* = 0. `error_detection` XORs each pair into
`err_block[i]` and ORs them into `er`.

Write SUM* for the speculative sum, with each block's result placed at its bit
offset. Summing the blocks one by one gives an exact identity:

    a + b = {C_out^(M-1), SUM*} + sum over i of err_block[i] * 2^((i+1)K)

Each wrong guess left out exactly one carry, at the bottom of the next block.
`error_recovery` adds those carries back: block i+1 of SUM* is incremented by
`err_block[i]`. One case needs care. If block i+1's speculative bits are all
ones, the increment overflows. The lost carry then travels through block i+1
into block i+2, and detection does not flag that because block i+1's
prediction was "right" for the wrong carry-in. The per-block incrementers are
therefore chained: an overflow is passed up to the next block and finally into
the carry-out. With that chain the recovered sum is always exact. The
testbenches check this against plain arithmetic, including lost carries that
cross several blocks.

With `PRED_BITS` = K, block 0 is exact and its predictor always agrees with
it, so `err_block[0]` stays 0. It can be 1 only with a shorter predictor.

## Variable latency: ER, VALID and the input registers

The operand registers load only when `valid` = 1. `valid` is ER XOR a
counterpart register `er_cp`, which is 1 except during a recovery cycle:

| cycle after the operands are taken | er | er_cp | valid | sum shows |
|---|---|---|---|---|
| no error, first cycle | 0 | 1 | 1 | SUM* (final) |
| error, first cycle | 1 | 1 | 0 | not final; operands held |
| error, second cycle | 1 | 0 | 1 | SUMREC (final) |

`er_cp <= ~(er & er_cp)`. A plain inverter (`valid = ~er`) would deadlock,
because the held operands keep raising ER. The XOR with the counterpart lets the
recovery cycle release the registers.

Interface timing, all on the rising edge of `clk`:

* Present `a` and `b`. They are taken at the first rising edge where `valid` = 1.
  Hold them while `valid` = 0.
* `sum` and `cout` are final in every cycle where `valid` = 1. They belong to
  the operands taken at the previous load. That is one cycle after loading
  without an error, two with one.
* `er` and `err_block` describe the operands currently in the registers.
* `rst_n` is an asynchronous active-low reset. It clears all registers; `valid`
  is 1 after reset and the first "result" is 0 + 0.

The original design gates the register clock with VALID through an AND gate.
Here that is a load enable, which does the same thing without a gated clock.
SUMREC is registered, so the recovered value comes from a flip-flop in the
second cycle. The correction path therefore has a whole cycle of its own.

## How often the second cycle is needed

The error rate depends on the block size, not much on the width. These are
measured over uniformly random operands with the wide configurations in
`tb_vlcspa_m_workloads`:

| N | K (= PRED_BITS) | additions needing recovery |
|---|---|---|
| 16 | 4 | 5.8 % (default) |
| 64 | 14 / 10 | 0.0075 % / 0.245 % |
| 128 | 15 / 11 | 0.008 % / 0.246 % |
| 256 | 16 / 12 | 0.012 % / 0.254 % |
| 512 | 17 / 13 | 0.009 % / 0.224 % |
| 32 | 8 (PRED_BITS 4) | 8.9 % |

These block sizes are the window sizes published for 0.01 % and 0.25 % error
rates at each width, and the measured rates agree with them. The average
latency is 1 + error rate cycles per addition.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 16 | adder width |
| `K` | 4 | block width (top block takes the remainder; N must exceed K) |
| `PRED_BITS` | 4 | how many upper bits of a block each predictor uses (1..K) |

The 16-bit width is the published configuration. The original description
gives three carry predictors, hence four blocks and K = 4. The predictor length
is not given, so it defaults to the whole block.

## Choices made where the original description is open or inconsistent

* **Modified generators only in the first stage.** The description suggests
  replacing the carry generators by single AND/OR gates. Done literally for
  every stage, the block sums would be wrong even when the guessed carry is
  right, and the error detection could not repair them. Here only the first
  stage of each chain is a single gate. Also, one block-adder drawing labels
  the gates the other way round (AND for the chain tied to 1). This RTL follows
  the text, where OR goes with carry-in 1 and AND with carry-in 0, because only
  that is a correct carry.
* **Chained recovery increments.** The recovery drawing shows independent
  per-block corrections. The carry between them is added here so that
  recovery is always exact (see above).
* **The counterpart of ER** in the VALID logic is not specified. It is taken as
  the `er_cp` register described above.
* **Carry-out port** `cout`, an active-low asynchronous reset, and the use of
  `valid` as the result strobe are additions of this RTL.
* The published results (delay, power, FPGA utilisation, layout) are
  implementation figures and are not reproduced by RTL.

## Simulating

Every module is in `rtl/<name>.sv`. `cspa_pkg.sv` must be read first. Each
testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cspa_pkg.sv tb/tb_vlcspa_m.sv --top-module tb_vlcspa_m -Mdir obj
./obj/Vtb_vlcspa_m
```

| Testbench | What it covers |
|---|---|
| `tb_mod_carry_gen`, `tb_carry_gen`, `tb_sum_gen` | exhaustive truth tables |
| `tb_block_adder` | 4-bit, first-block and 3-bit variants, exhaustive |
| `tb_carry_predictor` | full-block and upper-3-of-6-bit predictors, exhaustive |
| `tb_cspa_m` | 16-bit and 10-bit adders against a block-level model, and the identity above |
| `tb_error_detection` | all 64 carry pairs |
| `tb_error_recovery` | random and overflowing corrections, reset value |
| `tb_data_latch` | VALID sequence and register hold against a model |
| `tb_vlcspa_m` | the whole adder at its defaults: 40007 additions, directed, biased and random |
| `tb_vlcspa_m_workloads` | the wide configurations in the table above |

`tb/vl_driver.sv` is the shared stimulus and checker of the two end-to-end
testbenches. It holds operands until they are taken. It checks each sum,
carry-out, ER, Err_block and the 1- or 2-cycle latency against its own model.
It also requires that one-cycle additions, recoveries, stalls, chained lost
carries and carry-outs all occur, plus several simultaneous wrong predictions
in configurations with at least five blocks.
