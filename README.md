# Probabilistic Gallager B LDPC decoder

This is a fully parallel hard-decision decoder for a length-1296 quasi-cyclic
LDPC code, written in synthesizable SystemVerilog. It runs Gallager B (GaB),
the simplest iterative bit-level decoding rule. Every node of the code's Tanner
graph has its own small unit, and one decoding iteration takes one clock cycle.

Plain Gallager B is cheap and fast, but its error-correction is weak. Its
iterations often end up cycling through the same few states around small
harmful subgraphs of the code (trapping sets), and never reach a codeword.
Tracking those states would need a large memory. The decoder does something
cheaper. If a frame has not converged after `k` ordinary iterations, every
variable node starts xoring a random bit into its channel value before it
forms its messages. This kicks the decoder out of the cycle. The hardware cost
is one random bit per variable node plus one 32-bit LFSR. The clock rate is
almost unchanged, because the random bit is just one more input to each
variable node's majority logic.

Default configuration: N = 1296 code bits, variable degree dv = 4, check
degree dc = 8, so the rate is 0.5 and there are 648 parity checks. The same
RTL with `DC = 16` decodes the rate-0.75 code of the same length (324 checks).

## Decoding rules

Every edge of the Tanner graph carries one bit in each direction. In each
iteration the following steps happen.

**Check node (CNU), `pgab_cnu`.** On every edge it returns the xor of the
messages that arrived on its *other* dc-1 edges. In hardware this is the
parity of all dc inputs, xored with the edge's own input.

**Variable node (VNU), `pgab_vnu`.** It has six 1-bit inputs: four check
messages, the received channel bit `r` and the random bit `p`. For every
edge `e` it counts

    t = (p xor r) + (number of ones among the other three check messages)

and sends

    1   if t > b
    0   if t < b
    r   if t = b,        where b = ceil(dv/2) = 2.

With `p = 0` this is ordinary Gallager B for dv = 4. A received 0 is sent as 1
only if all three other checks say 1, and a received 1 is sent as 0 only if
all three say 0. Otherwise the node repeats `r`. With `p = 1`, the node
counts as if it had received the opposite bit, but a tie still gives the true
`r`. As a result two of the three other checks, not all three, are enough to
overturn the received bit. The full rule:

| r | p | other checks = 1 | message sent |
|---|---|------------------|--------------|
| 0 | 0 | 0, 1, 2 / 3      | 0 / 1        |
| 1 | 0 | 0 / 1, 2, 3      | 0 / 1        |
| 0 | 1 | 0, 1 / 2, 3      | 0 / 1        |
| 1 | 1 | 0, 1 / 2, 3      | 0 / 1        |

The random bit only affects the messages sent to the checks. The VNU's **hard
decision** is the majority of `r` and all four check messages, without `p`.
There are five votes, so there is never a tie (for an odd dv a tie keeps `r`).

**Stopping.** Every CNU also receives the hard decisions of its dc variables
and returns their parity, which is 1 when that check is violated.
`pgab_syndrome` NORs the 648 parity bits into the stop decision. Decoding stops
as soon as the hard decisions form a codeword, or when the iteration limit is
reached.

## The code: parity-check matrix

H is a 4 x dc array of Z x Z circulant permutation matrices, with
Z = N/dc (162 at rate 0.5, 81 at rate 0.75). Check `c = i*Z + u` (block
row `i`) is connected to variable `j*Z + ((u + s(i,j)) mod Z)` in every
block column `j`. So each variable meets exactly one check in each block row,
and each check meets exactly one variable in each block column.

The shifts `s(i,j)` are in `pgab_pkg`:

| rate | table | property |
|------|-------|----------|
| 0.5 (dc = 8, Z = 162) | `SHIFT_R050` | no cycles of length 4 or 6 (girth 8) |
| 0.75 (dc = 16, Z = 81) | `SHIFT_R075` | no cycles of length 4 |
| any other N/dv/dc | `s = (i*j) mod Z` | no 4-cycles when (dv-1)(dc-1) < Z |

These shifts were chosen for this implementation, by a random search that
rejects short cycles. They are not the shifts of any particular published
code. Error-rate figures therefore apply to this code only. To use another
code of the same shape, replace the tables. The testbench reference model in
`tb/pgab_ref_pkg.sv` holds its own copy of the tables, so update that copy
too.

A convenient consequence for testing: every check sees exactly one bit of each
block column. So any word made of an even number of whole block columns of
ones is a codeword, for example the all-one word.

## Architecture and timing

```
             r_i (1296)                          prob_i
                |                                  |
   +------------v-----------+   p (1296)   +-------v-------+
   | pgab_core              |<-------------| pgab_rng      |
   |  1296 x pgab_vnu       |   gated by   | 32-bit LFSR + |
   |  H-matrix wiring       |   prob_en    | 1296-bit reg  |
   |  648 x pgab_cnu        |              +---------------+
   |  regs: r, messages,    |
   |        hard decisions  |--syn (648)--> pgab_syndrome --valid--+
   +------------^-----------+                                     |
                | load, step                                      |
           +----+---------------------------------------------+   |
           | pgab_ctrl: start/done, iteration count, k switch |<--+
           +--------------------------------------------------+
```

`pgab_core` holds all decoder state:

- the channel word: 1296 bits;
- the VNU-to-CNU message on every edge: 5184 bits;
- the hard decisions: 1296 bits.

Check messages and syndrome bits are combinational from these registers. One
`step` evaluates the whole graph (CNUs, then VNUs) and writes the new messages
and decisions, so **one iteration is one cycle**. Together with the 1296-bit
random register and the 32-bit LFSR, the design has 9131 flip-flops.

A frame with channel word `r_i` goes through these cycles:

| cycle | what happens |
|-------|--------------|
| 0 | `start_i` high while `busy_o` is low. `r_i` is loaded: every VNU sends `r` on all edges and its decision is `r`. The limit `max_iter_i`, the switch-over `k_iter_i` and (not latched) `prob_i` are taken. |
| 1 ... | Each cycle the controller checks the syndrome of the current decisions. If it is zero, the frame ends with success. If `iter_o == max_iter`, the frame ends with failure. Otherwise one iteration runs. |
| I + 2 | `done_o` is high for one cycle. `success_o`, `iter_o` (= I) and `dec_o` stay valid until the next start. |

A word that is already a codeword takes 0 iterations and 2 cycles. Frames do
not overlap, so the system throughput is `N * f_clk / (I_avg + 2)` bits per
second. On the rate-0.5 code at crossover 0.03, the testbenches see about
5 iterations on average.

`prob_en` is high for iterations `k, k+1, ...` (counting from 0), that is,
after `k` iterations have failed to converge. Before that, the random bits
are forced to 0 and the decoder is plain GaB. Setting `k_iter_i >= max_iter_i`
gives plain Gallager B throughout.

## Random bit source

`pgab_rng` holds a 32-bit Fibonacci LFSR with polynomial
x^32 + x^22 + x^2 + x + 1. In every cycle that performs an iteration:

1. the LFSR advances 8 steps;
2. its low byte, from before the advance, is compared with `prob_i`;
3. the result (1 when `byte < prob_i`) is shifted into a 1296-bit register.

Bit `v` of that register is VNU `v`'s random input. Because the register
shifts by one place per iteration, each VNU sees a different bit each
iteration, and P(p = 1) = `prob_i` / 256. For example, 205 gives about 0.8 and
26 about 0.1. The LFSR is seeded with the `SEED` parameter at reset. It keeps
running across frames, so decoding the same word twice can take different
iteration counts.

How strongly to disturb is a run-time choice. In the channel tests below,
settings of about 0.8 and 0.1 behave similarly.

## Interface of `pgab_decoder`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all state to 0, LFSR to `SEED`) |
| `start_i` | in | 1 | start a frame (ignored while busy) |
| `r_i` | in | N | hard-decision channel word, sampled in the start cycle |
| `max_iter_i` | in | ITER_W | iteration limit |
| `k_iter_i` | in | ITER_W | plain GaB iterations before the random disturbance starts |
| `prob_i` | in | PROB_W | P(random bit = 1) x 2^PROB_W |
| `busy_o` | out | 1 | frame in progress |
| `done_o` | out | 1 | one-cycle end-of-frame pulse |
| `success_o` | out | 1 | the frame ended in a codeword |
| `iter_o` | out | ITER_W | iterations performed |
| `dec_o` | out | N | decoded word (current hard decisions) |
| `valid_o` | out | 1 | live syndrome decision: `dec_o` is a codeword |

Parameters: `N` (1296), `DV` (4), `DC` (8), `ITER_W` (8), `PROB_W` (8),
`SEED` (32'hACE12468). The package `pgab_pkg` holds the defaults, the shift
tables and the controller state type. `N` must be a multiple of `DC`.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. All of them check
the design against values computed independently. The reference model in
`tb/pgab_ref_pkg.sv` is a separate edge-by-edge software model of the whole
decoder, including the LFSR.

| testbench | what it covers |
|-----------|----------------|
| `tb_pgab_vnu` | all 64 input combinations, dv = 4 and dv = 3, messages and decision |
| `tb_pgab_cnu` | random vectors, dc = 8 and dc = 16 |
| `tb_pgab_syndrome` | zero, every single-bit, and random syndromes (648 checks) |
| `tb_pgab_rng` | cycle-by-cycle against an LFSR model; measured P(1) for five settings; hold when not stepping |
| `tb_pgab_ctrl` | load/step sequencing, `I + 2` latency, limit, k switch, start ignored while busy |
| `tb_pgab_core` | both codes at N = 1296: decisions and all syndrome bits after every iteration, with random `p` |
| `tb_pgab_decoder` | full default size, 60 frames end to end (see below) |
| `tb_pgab_decoder_r075` | the same with `DC = 16` (rate 0.75) |
| `tb_pgab_fer` | binary symmetric channel, GaB versus PGaB |

`tb_pgab_decoder` compares the iteration count, success flag, decoded word and
done latency of every frame with the model. It also requires each of these to
happen at least once: a frame that is already a codeword, a frame fixed by
plain iterations, a frame fixed only after the switch to probabilistic mode, a
frame stopped at the limit, a frame in plain-GaB mode, and a corrected
transmission.

`tb_pgab_fer` decodes 40 frames per crossover probability, each with three
decoder settings. It gave these frame errors out of 40:

| crossover | GaB | PGaB, P(p=1) = 0.8 | PGaB, P(p=1) = 0.1 |
|-----------|-----|------------------|------------------|
| 0.01 | 0 | 0 | 0 |
| 0.02 | 0 | 0 | 0 |
| 0.03 | 3 | 0 | 0 |
| 0.04 | 9 | 3 | 4 |

In the PGaB runs, the switch happens after `k` = 10 iterations, and the limit
is 60. The PGaB runs also needed fewer iterations on average (4.8 against 8.3
at 0.03). Forty frames show the trend only. Error rates in the 1e-6 range and
below need far longer runs.

### Running with Verilator

Any testbench builds the same way, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pgab_pkg.sv tb/pgab_ref_pkg.sv rtl/*.sv tb/tb_pgab_decoder.sv \
  --top-module tb_pgab_decoder -o sim
./obj_dir/sim
```

The full-size decoder takes one to two minutes to build. It then decodes
about 40 frames per second, reference model included.

## Where this design makes its own choices

The overall structure follows the published architecture. The sizes match it
too (1296 VNUs, 648 or 324 CNUs, a 32-bit LFSR and a 1296-bit random
register), as do the GaB and PGaB node rules and the switch to probabilistic
mode after `k` iterations. The following points are this implementation's own
choices:

- **Circulant shifts.** The exact H matrix was not available. The shift tables
  above are new, so error rates are not those of the original code.
- **Tie case of the PGaB rule.** When the count equals the threshold, the VNU
  sends the true channel bit, not `p xor r`. This follows the published rule as
  written. Sending `p xor r` instead is a one-line change in `pgab_vnu`.
- **Hard decision.** The hard decision is the majority of `r` and all check
  messages, without `p`.
- **Meaning of the probability setting.** `prob_i` is taken to be P(p = 1).
  It is a run-time input rather than a fixed 0.8.
- **Random bit generation.** The LFSR polynomial, the 8 steps per iteration,
  the byte comparison and the seed are all choices of this design.
- **Frame protocol.** The frame handshake, the 8-bit iteration limit, the
  start-of-frame initialisation and the reset values are also choices of this
  design.
- **One iteration per clock.** The message registers sit at the VNU outputs
  and the check side is combinational, so each iteration takes one clock.
- **Topology.** The H-matrix wiring sits inside `pgab_core`, not in a module
  of its own.

Not included: the GDBF, PGDBF and Min-Sum decoders, which serve only as
points of comparison, and a separate GaB-only build without the random
source. Plain GaB is available at run time through `k_iter_i`.

## Files

- `rtl/pgab_pkg.sv`: defaults, circulant shift tables, LFSR step, controller state type
- `rtl/pgab_vnu.sv`, `rtl/pgab_cnu.sv`: node units
- `rtl/pgab_core.sv`: node arrays, H-matrix wiring, decoder state
- `rtl/pgab_rng.sv`: random bit source
- `rtl/pgab_syndrome.sv`: stop decision
- `rtl/pgab_ctrl.sv`: frame and iteration control, with assertions on the iteration limit and on load/step exclusivity
- `rtl/pgab_decoder.sv`: top level
- `tb/pgab_ref_pkg.sv`: reference model; `tb/tb_*.sv`: testbenches
