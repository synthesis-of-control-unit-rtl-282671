# Microprogram control unit with modified operational linear chains

A control unit for a *linear* algorithm: a flow-chart made mostly of operational nodes
(boxes that issue microoperations), with few decisions. Runs of consecutive boxes, called
operational linear chains, are stored at consecutive control-memory addresses, so a counter
can step through them. Logic is needed only where a chain ends and the next address depends
on the logic conditions.

In the classic form of this unit, the next-address logic decodes the **full address** of
the last box of each chain. That makes it a Moore machine with many product terms. Here
each chain that does not end the algorithm gets **one extra microinstruction** appended.
That word holds only a short code for the chain's *class*: chains whose ends lead to the
same decision belong to the same class. The next-address logic then decodes only that code
and the conditions. This gives the small product-term count of an equivalent Mealy machine.
The extra words go into spare locations that the embedded memory has anyway. The cost is
one idle cycle of the data path at the end of each chain.

## Structure

```
            +------------------------------- tau (field FB) ------+
            |                                                      |
   x ----> CC --phi--> CT --T--> CM --+-- y0 ---> CT (+1 / load)   |
                       ^  ^           +-- y1..y5 ---> y (gated by y0)
                  start  clk          +-- yE ---> TF (reset)
                                                  TF <-- start (set)
                                                  TF --> fetch --> CM, CT
```

| Module | Role |
|---|---|
| `cmcu_u2` | top: wires the four parts together |
| `cmcu_ct` | address counter CT: loads the start address on `start`; adds 1 when `y0 = 1`; loads `phi` when `y0 = 0`; holds while `fetch = 0` |
| `cmcu_cm` | control memory CM: 2^R words, asynchronous read, outputs zero while `fetch = 0` |
| `cmcu_cc` | next-address circuit CC: a sum of products driven by a table, with one product term per transition |
| `cmcu_tf` | fetch flip-flop TF: set by `start`, reset by `yE` |
| `cmcu_pkg` | sizes, word layout, and the example microprogram and transition table |

## Microinstruction word

Seven bits, most significant first:

| bit | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| operational (`y0 = 1`) | 1 | y1 | y2 | y3 | y4 | y5 | yE |
| additional (`y0 = 0`) | 0 | tau1 | 0 | 0 | 0 | 0 | 0 |

Bit 5 carries either microoperation y1 or the class code. For that reason the top drives
`y` to zero whenever `y0 = 0`. Otherwise the class code would appear as a spurious y1. With
more classes the code field FB takes the upper `R1` bits of the microoperation field.

## The example microprogram

The default contents implement this flow-chart, with microoperations shown in brackets:

```
start -> b1[y1] -> D1
D1:  x1          -> b2[y2 y3] -> b3[y4] -> b4[y2 y4] -> D1
     /x1 & x2    -> b5[y3] -> b6[y4] -> D1
     /x1 & /x2   -> b7[y2 y5] -> b8[y3] -> D2
D2:  x3          -> b9[y1 y2] -> b10[y3] -> end
     /x3         -> b8
```

The chains are <b1>, <b2 b3 b4>, <b5 b6>, <b7 b8> and <b9 b10>. The first three end at
decision D1 and form class B1 (code 0). <b7 b8> ends at D2 and forms class B2 (code 1).
<b9 b10> ends the algorithm and gets no extra word. The extra words are O1 to O4. The ten
boxes plus four extra words fill 14 of the 16 words. Address T1..T4 has T1 as its most
significant bit:

| addr | word | addr | word | addr | word | addr | word |
|---|---|---|---|---|---|---|---|
| 0000 | b1 | 0100 | b4 | 1000 | O3 (B1) | 1100 | b9 |
| 0001 | O1 (B1) | 0101 | O2 (B1) | 1001 | b7 | 1101 | b10, yE |
| 0010 | b2 | 0110 | b5 | 1010 | b8 | 1110 | free (0) |
| 0011 | b3 | 0111 | b6 | 1011 | O4 (B2) | 1111 | free (0) |

## Next-address circuit

CC has one row per transition. A row is taken when `tau == K` and `(x & XMASK) == (XVAL & XMASK)`.
The outputs `phi` (D1..D4) are the OR of the target addresses of the taken rows. The
example needs five rows:

| h | class | condition | target | phi |
|---|---|---|---|---|
| 1 | B1 (0) | x1 | b2 | 0010 |
| 2 | B1 (0) | /x1 x2 | b5 | 0110 |
| 3 | B1 (0) | /x1 /x2 | b7 | 1001 |
| 4 | B2 (1) | x3 | b9 | 1100 |
| 5 | B2 (1) | /x3 | b8 | 1010 |

For example, D3 = /tau1·x1 + /tau1·/x1·x2 + tau1·/x3. The classic unit would decode the
address of every chain end, which gives 11 terms for the same flow-chart. That reduction
from 11 terms to 5 is where the hardware saving comes from.

In a well-formed table every `(tau, x)` pair matches exactly one row of its class. If none
matches, `phi` is 0000. The unit never loads that value from a valid microprogram.

## Timing

- The rising edge that sees `start = 1` loads CT with 0000 and sets `fetch`. b1 executes in
  the next cycle.
- Each cycle executes the word at `addr`. `y`, `ou_en` and `y_end` are valid in that cycle,
  and CT updates on the following edge.
- An additional word costs one cycle with `ou_en = 0`. `x` is sampled in that cycle, so it
  must already reflect the results of the chain's last microoperation.
- A path through chains of F1, F2, ... boxes takes (F1 + 1) + (F2 + 1) + ... cycles. The
  final chain adds no extra cycle. `fetch` drops after the edge that sees `yE`.
- `ou_en` (`fetch & y0`) is meant as the clock enable of the data path. Stopping the data
  path's timing pulses during additional words is how the unit keeps it idle.

## Choices this design makes

These points are not fixed by the method. They are this implementation's own choices:

- One rising-edge clock, with an active-low asynchronous reset `rst_n` that clears CT and
  TF. `start` is a one-cycle synchronous pulse. If it coincides with `yE`, `start` wins.
- The control memory is read asynchronously, so a word executes in the same cycle that its
  address sits in CT. A block RAM with a registered read would need either the opposite
  clock edge or a one-cycle shift of the whole timing.
- The last box b10 is stored with `y0 = 1` as well as `yE = 1`. Its microoperation y3 is
  therefore issued, rather than suppressed as an idle cycle. The counter step it causes is
  never used, because fetching stops on the same edge.
- Don't-care bits of additional words, and the free words, are stored as zeros.
- `x` comes from the data path, which is outside this design. The top exposes `x`, `y` and
  `ou_en` for it.

## Built-in checks

When the top is elaborated, it checks three size rules and stops with an error if any fails:

- `R = ceil(log2 M)`, where `M` is the number of boxes.
- `R1 = ceil(log2 I)`, where `I` is the number of classes.
- The memory has at least `NC` spare words, one for each extra microinstruction.

An assertion also runs in simulation. Every additional word must select exactly one row of
the transition table. This catches overlapping rows and missing rows in a new table.

## Changing the microprogram

Everything specific to the example is in `cmcu_pkg`:

- `GAMMA1_CM` is the memory contents. Build entries with `op_mi(fy, ye)` and `add_mi(k)`.
- `GAMMA1_K`, `GAMMA1_XMASK`, `GAMMA1_XVAL` and `GAMMA1_PHI` form the transition table.
- `GAMMA1_START` is the first address.

For another flow-chart, proceed in this order:

1. Find the chains.
2. Append an extra word to every chain that does not end the algorithm. The memory must have
   `2^R - M >= number of such chains`.
3. Place each chain at consecutive addresses.
4. Group the chains by the decision that follows them, and give each group a code of
   `R1 = ceil(log2 I)` bits.
5. Write one table row per branch.

Then set `M`, `R`, `N`, `L`, `I`, `R1`, `H` and `NC` to match. `cmcu_cc`, `cmcu_cm` and `cmcu_ct` also take
these as parameters, so one instance can be retargeted on its own.

## Simulation

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=... failures=...`:

- `cmcu_cc_tb`: all 16 `(tau, x)` cases against the branch rules; exactly one term active.
- `cmcu_ct_tb`: 2000 random cycles of start, hold, count and load against a model.
- `cmcu_cm_tb`: every word, and zero output while not fetching.
- `cmcu_tf_tb`: random set and reset.
- `cmcu_u2_tb`: 300 back-to-back runs of the example with random conditions. A model that
  walks the flow-chart, and knows no addresses, predicts `y`, `ou_en`, `y_end`, `fetch` and
  the length of each run. The testbench also checks that every one of the following happens:
  counting up, idle cycles, all five transition rows, the end of the algorithm, and a restart.
  It runs the top at its default (full) size.

With Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/cmcu_pkg.sv tb/cmcu_u2_tb.sv --top-module cmcu_u2_tb
./obj_dir/Vcmcu_u2_tb
```

Replace `cmcu_u2_tb` with any other testbench name to run that one instead.

Lint reports ascending bit ranges (`[1:N]`, `[1:R]`). They are deliberate: bit 1 of `x`,
`y`, `phi` and `addr` is x1, y1, D1 and T1.
