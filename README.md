# mPLD-XOR: a programmable XOR-of-terms fabric with modulo-two counters

Arithmetic and coding functions are much smaller as XORs of products (ESOP)
than as ORs of products. The catch is the wide XOR gate they need, which is
slow and large in CMOS. The mPLD-XOR avoids that gate by working in time.
In every clock cycle it evaluates one term per output channel. Each term is a
wide OR of selected input lines, taken from a memristive diode gate. The term
clocks a modulo-two counter (a T flip-flop). After m cycles the counter holds
the XOR of the m terms, whatever m is. So the fan-in of the XOR is unlimited,
and the latency in cycles equals the number of terms of the longest output.

The inputs are complemented literals, so a diode OR of selected lines is the
NAND of the true literals. A single selected line is a literal. With true and
complemented rails available (dual-rail mode), a term can be a NAND, AND,
NOR, OR or a literal. This is the "generalized AND-XOR" structure. Term
inversions are absorbed at the output: the result is on Q or on ~Q,
depending on whether the number of inverted terms is even or odd.

What the fabric computes is set by a control memory (a crossbar ReRAM).
Column t of that memory is the control word of cycle t. Loading a different
image changes the function, and no other reconfiguration is needed. Finished
results are written into target memristors. Optional feedback flip-flops
return results to the fabric as extra literals, which allows multilevel XOR
networks.

This repository holds a synthesizable, single-clock SystemVerilog model of the
fabric. It also holds testbenches that run a 3-bit adder, a 3-bit multiplier
and N-bit adders up to 16 bits on it.

## Structure

```
            in[N_IN] ──► inverters (and true rail if DUAL_RAIL)
                              │  lines (+ feedback lines)
 mem_driver ──one-hot──► reram ──control word──┐
 (m-bit shifter)          (ROWS x COLS)       │
                                              ▼
        ┌────────── per counter j = 0..K-1 (xor_slice) ──────────┐
        │ hybrid_driver: line_i AND sel_ji AND clock phase        │
        │ diode_or:      term = OR of driven lines                │
        │ mod2_counter:  q ^= term, cleared by CLR(j+1)           │
        └──────────────────────────────────────────────────────────┘
              │ q_nx (state at the end of the cycle)
              ├──► feedback_reg (Sig enables) ──► feedback lines
              ▼
 output_store: P/~P transmission gates ─► source memristors ─► shared wire
               tm_driver (Ctrl, CLR0) selects the next target memristor
               target := NOT(wire)   (volistor NOT)
```

| File | Role |
|---|---|
| `rtl/mpld_pkg.sv` | row map of a control word (functions of K, N_FB, L) |
| `rtl/reram.sv` | control crossbar: column read, whole-column programming port |
| `rtl/mem_driver.sv` | one-hot shifter that reads column t in cycle t after reset |
| `rtl/diode_and.sv`, `rtl/diode_or.sv` | programmable diode gates. A memristor in HRS disconnects its input |
| `rtl/hybrid_driver.sv` | one 3-input diode AND per line (control bit, line, clock phase) |
| `rtl/mod2_counter.sv` | T flip-flop with synchronous CLR and a next-state output |
| `rtl/xor_slice.sv` | one channel: driver bank + diode OR + counter |
| `rtl/feedback_reg.sv` | feedback D flip-flops with Sig enables |
| `rtl/tm_driver.sv` | pointer to the next target memristor, advanced by Ctrl |
| `rtl/output_store.sv` | transmission gates, source/target memristors, volistor-NOT write |
| `rtl/mpld_xor.sv` | top level |

## The control word

One ReRAM column drives one cycle. Its rows, from row 0, are:

| rows | signal | effect in that cycle |
|---|---|---|
| 0 | Ctrl | store: write the selected rail into the next target |
| 1 | CLR0 | target pointer back to the first target, all targets back to LRS (1) |
| 2 .. K+1 | CLR1..CLRk | clear counter j to 0 (wins over a toggle) |
| K+2 .. 5K+1 | P1, ~P1, ..., P2k, ~P2k | transmission gates. Gate 2j−1 carries Q of counter j, gate 2j carries ~Q |
| 5K+2 .. | Sig1..Sig_f | feedback flip-flop f loads counter f (only if N_FB > 0) |
| then K fields of L rows | select bits | line i of counter j takes part in this cycle's term |

A field has L = (DUAL_RAIL ? 2·N_IN : N_IN) + N_FB lines. The input lines
come first, in the order ~In_1..~In_n, or in dual-rail mode In_1, ~In_1,
In_2, ~In_2, and so on. The feedback lines follow. With K = 3 and six
complemented inputs, a word is 35 rows without feedback and 47 rows with
three feedback flip-flops. These match the control-memory sizes of the
published adder (35 × 8) and multiplier (47 × 12) programs.

A transmission gate conducts when P = 1 or ~P = 0, which is the behaviour of
the n and p devices. Programs therefore keep ~P = 1 wherever P = 0. An
assertion in `output_store` checks that every P/~P pair is complementary
whenever a store happens.

## Timing and the store path

- Write the control image through `prog_we`/`prog_col`/`prog_data`, one
  column per clock. The array is non-volatile and is never reset.
- Apply the inputs and pulse `rst` for one cycle. Column 1 is read in the
  first cycle after `rst` falls, column 2 in the second, and so on. After
  column COLS the shifter empties and `busy` drops.
- A term read in cycle t changes its counter at the rising edge that ends
  cycle t.
- Results can be stored in the same cycle as their last term. The
  transmission gates and the feedback flip-flops both see `q_nx`, the
  counter state after the coming edge. The original circuit does the same
  within one clock period: the counter toggles while CLK is high, and the
  store happens in that cycle.
- Volistor NOT: all source memristors sit on one wire, so the wire is the OR
  of the rails connected to it. The addressed target switches to HRS (0)
  when the wire is high and otherwise stays in LRS (1). A target therefore
  holds the complement of the rail applied. To keep X, apply ~X. A write can
  only clear a target, which is why CLR0 sets all targets back to 1 at the
  start of a run.
- `tm_state` lists the results in the order in which they were stored, not
  by output index.

## Programs

A program is a list of terms per counter and cycle, plus the control bits.
`tb/mpld_prog_pkg.sv` builds images from such lists. Its helpers are
`init`, `term(col, counter, line_mask)`, `clr`, `store(col, counter,
use_not_q)` and `sig`. It also contains the two 3-bit programs below.

**3-bit adder.** The sum and carry outputs are

    S0 = a0^b0
    S1 = a1^b1^a0b0
    S2 = a2^b2^a1b1^a1a0b0^b1a0b0
    Co = a2b2^a2a1b1^a2a1a0b0^a2b1a0b0^b2a1b1^b2a1a0b0^b2b1a0b0

Counter 1 computes S0 in cycles 2–3 and stores it in cycle 3. It is cleared
in cycle 4 and computes S1 in cycles 5–7. Counter 2 computes S2 in cycles
2–6. Counter 3 computes Co in cycles 2–8. The stores happen in cycles 3, 6,
7 and 8, in the order S0, S2, S1, Co. The whole program takes 8 cycles and a
35 × 8 control image.

**3-bit multiplier (with feedback).** Two internal signals are computed
first and kept in feedback flip-flops:

    IP0 = a2b0 ^ a1b1 ^ a0a1b0b1
    IC0 = a0a1b0b1 ^ a1a2b0b1 ^ a0a1a2b0b1

IP0 is the column-2 partial sum and IC0 its carry. The six product bits are
then:

| product bit | expression |
|---|---|
| p2 | IP0 ^ a0b2. Counter 1 continues after IP0 without a clear |
| p3 | IC0 ^ a2b1 ^ a1b2 ^ IP0·a0b2. Counter 2 continues after IC0 |
| p4 | a2b2 ^ a1a2b1b2 ^ a1a2b0b1 ^ a0a1a2b0b1b2 ^ IP0·a0a2b1b2 ^ IC0·a1b2 ^ IP0·a0a1b2 (7 terms on counter 3) |
| p5 | a0a1a2b0b2 ^ a1a2b1b2 ^ a0a2b0b1b2 |
| p1 | a1b0 ^ a0b1 |
| p0 | a0b0 |

The stores happen in cycles 5, 7, 8, 9, 10 and 11, in the order p2, p3, p4,
p5, p1, p0. The program needs 11 cycles and 47 × 11 control bits.

This decomposition is this repository's own. It was derived from the
positive-polarity Reed–Muller forms of the product bits, simplified with the
feedback signals. The published multiplier uses four internal signals and
12 cycles.

**3-bit multiplier without feedback** (`tb/tb_mpld_xor_mult_nofb.sv`). On the
plain fabric every product bit is a single XOR of products. The program
uses the positive-polarity Reed–Muller forms: 1, 2, 4, 8, 9 and 3 products
for p0..p5, 27 in all. The longest bit, p4, occupies one counter for nine
cycles. A second counter computes p3 and then p2. The third computes p0,
p1 and p5, with a clear between them. The program needs 14 cycles and
35 × 14 control bits. The published no-feedback program takes 40 cycles.

**N-bit ripple adders** are generated by `tb/tb_mpld_xor_adder16.sv`. The
carry c(i+1) = a_i b_i ^ a_i c_i ^ b_i c_i is computed on counter i mod 3
and kept in that counter's feedback flip-flop. The sum s_i = a_i ^ b_i ^ c_i
is computed on counter (i+2) mod 3. A greedy list scheduler places each
operation in the earliest cycle where its carry is available and its store
cycle is free. The resulting cycle count is D_1 = 3 and
D_N = D_(N−1) + 3, except D_N = D_(N−1) + 2 when (N−1) mod 3 = 2. This gives
8 cycles for 3 bits and 43 for 16 bits. The work per bit explains the slope:
6 terms and 2 clears are 8 counter-cycles, shared among 3 counters.

## Parameters of `mpld_xor`

| parameter | default | meaning |
|---|---|---|
| N_IN | 6 | primary inputs |
| K | 3 | counters (output channels) |
| N_FB | 3 | feedback flip-flops. Set 0 for the plain fabric |
| DUAL_RAIL | 0 | 0: complemented inputs only. 1: true and complemented rails |
| N_TM | 6 | target memristors |
| ROWS × COLS | 64 × 16 | control ReRAM. ROWS must cover the row map (checked at start-up) |

The defaults are the published example fabric: six inputs, three counters,
a 64 × 16 control memory, and the six targets and three feedback flip-flops
of the multiplier version. Feedback flip-flop f takes counter f, wrapping
around when N_FB > K. Its line carries the counter state Q unchanged. A
result computed with an odd number of inverted terms therefore arrives
complemented, which is the form needed to AND it as a true literal.

## What is modelled and what is not

The fabric is modelled at the logic level only. The following are abstracted
away:

- memristor electrical behaviour, meaning the state equations, RC delays and
  leakage;
- the precharge pull-down of the diode OR, the pull-up of the diode AND, the
  ReRAM reference resistors and all bias voltages;
- the separate clocking of each counter by its diode OR. Here every counter
  toggles on the common clock edge when its term is 1.

Choices made here where the published description is silent or ambiguous:

- **Row placement.** The rows of the Sig bits and the feedback lines within
  the control word are placed by this design.
- **Programming port.** The ReRAM is programmed through a whole-column
  synchronous port.
- **Shifter start and stop.** A run starts after `rst`, and the shifter
  stops after its last column.
- **CLR0.** CLR0 resets the target pointer and re-initialises the targets.
  The published text groups CLR0 with the counter clears, but the
  block-level schematic wires it to the target drivers, and the model
  follows the schematic.
- **Feedback mapping.** Which counter feeds which feedback flip-flop, and
  the polarity of the feedback line, are chosen here.
- **16-bit adder latency.** For the 16-bit adder the published text quotes
  42 cycles, while its closed-form delay gives 43. The generated schedule
  reproduces the closed form for every N from 1 to 16.

Not built:

- the AND-type variant, which uses diode AND gates and positive literals;
- the published 40-cycle multiplier program without feedback, which is not
  listed in the text and would not fit 16 columns (the 14-cycle schedule
  above replaces it);
- the stateful-logic implementations used for comparison.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mpld_pkg.sv tb/mpld_prog_pkg.sv tb/tb_mpld_xor.sv \
    --top-module tb_mpld_xor -o sim && ./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_mpld_xor` | default fabric. The multiplier and then the adder, for all 64 operand pairs. It checks store cycles and counts toggles, clears, feedback captures and uses, Q and ~Q stores, and reprogramming |
| `tb_mpld_xor_adder` | 35 × 8 fabric without feedback running the adder. Checks store cycles 3, 6, 7, 8 |
| `tb_mpld_xor_adder16` | N-bit adders for N = 1..16 on a 32-input fabric. Checks cycle counts against the closed form and sums against A + B |
| `tb_mpld_xor_dual` | dual-rail fabric with random generalized-ESOP programs |
| `tb_mpld_xor_mult_nofb` | 35 × 16 fabric without feedback running the 14-cycle multiplier for all 64 operand pairs |
| `tb_mpld_single` | single-output circuit from the parts: 16-column shifter, 64 × 16 ReRAM holding only the select bits, one 64-line channel with an external CLR. Replays the three-toggle example, then random programs |
| `tb_xor_slice` | 64-line channel (32 dual-rail inputs). Three toggles leave Q high, then random term sequences |
| `tb_<block>` | one per leaf block, each against an independent model |

All testbenches run in well under a second.
