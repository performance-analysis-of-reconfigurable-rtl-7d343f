# Reconfigurable multichannel FIR filter with a switchable multiplier unit

This is an 8-bit, 16-tap FIR filter for eight input channels. Its main idea is that the
multiplier can be swapped at run time. A single *reconfigurable multiplier unit* holds four
multiplier structures: Wallace tree, radix-4 Booth, sequential shift-and-add and Dadda. A
control code per channel chooses which one computes that channel's products. The unit and
one accumulation adder are shared in time by all channels and all taps. This is a
resource-sharing (time-division) filter: the hardware has one multiplier and one adder, however
many channels and taps there are. The price is a clock that must run several hundred times
faster than the sample rate.

The adders follow one theme as well. Both the multipliers' final adders and the
accumulation adder are **square-root carry-select adders** (SQRT CSLA). The accumulation
adder is *retimed*: a register cutset splits it into two pipeline halves.

The RTL follows the architecture published as *"Performance Analysis of Reconfigurable
Multiplier Unit for FIR Filter Design"*. That description gives the algorithms of the four
multipliers, the FIR equation, the grouped carry-select adder with retiming, and the
sizes (8-bit data, 16 taps H(0)..H(15), channels CH1..CH8). It does not give the block
diagram's details: the schedule, the handshakes, the widths of the sums or the position of
the cutset. Those are choices made here. They are listed in
[Design choices and departures](#design-choices-and-departures).

## The filter equation

For every channel `c` and every input vector `n`:

    y_c[n] = sum_{k=0..15} H(k) * x_c[n-k]

All channels use the same coefficients H(0)..H(15). Samples and coefficients are signed
8-bit two's-complement numbers. Each output is the exact 20-bit sum, with no rounding or
saturation: 16 products of at most 2^14 in magnitude always fit in 20 bits.

## Block structure

```
             coef_we/addr/wdata                     mode[0..7]
                    |                                   |
              +-----------+                       +-----------+
              | coef_bank |<------ rd_tap --------| rfir_ctrl |---> y_valid, y_ch, y_data
              +-----------+                       |  (TDM     |<--- in_valid / in_ready
 x_in[0..7]  +-------------------+  rd_ch, rd_tap |  sequencer)|
 ----------->| sample_delay_line |<---------------|           |
             +-------------------+                +-----------+
                    | x[n-k]     | H(k)          start,sel ^ | done   add,clear | ^ acc
                    v            v                         | v                  v |
             +------------------------------------------------+      +-------------------+
             | reconfig_mult_unit                             |      | rfir_mac          |
             |  wallace_mult  booth_mult  dadda_mult          |----->|  sqrt_csla        |
             |  shift_add_mult            -> multiplier mux   | prod |  (RETIME=1) + acc |
             +------------------------------------------------+      +-------------------+
```

| Module | Role |
|---|---|
| `rfir_top` | Top level; wires the blocks below together |
| `rfir_ctrl` | Time-multiplexing sequencer: walks channels and taps, selects the multiplier, emits outputs |
| `coef_bank` | 16 programmable coefficient registers |
| `sample_delay_line` | 8 x 16 sample registers, x[n] .. x[n-15] per channel |
| `reconfig_mult_unit` | The four multipliers, operand isolation and the multiplier mux |
| `wallace_mult`, `dadda_mult`, `booth_mult` | Combinational 8x8 signed multipliers |
| `shift_add_mult` | Sequential 8x8 signed multiplier, one bit per clock |
| `rfir_mac` | Accumulator on a retimed SQRT CSLA |
| `sqrt_csla` | Square-root carry-select adder, optionally retimed |
| `rfir_pkg` | Sizes, the `mult_sel_e` select code, adder grouping functions |

## How one input vector is processed

This is the part that needs the most care when you use or change the design.

1. While the filter is idle, `in_ready` is high. A cycle with `in_valid` high accepts the
   vector `x_in[0..7]`. All eight delay lines shift at once, and the controller latches
   `mode[0..7]`. A later change of `mode` therefore only affects the next vector.
2. For channel 0, then channel 1, and so on up to channel 7, and within a channel for tap
   k = 0..15, the controller does the following:
   - It addresses `x_c[n-k]` and `H(k)` and pulses `start` on the multiplier unit, with the
     channel's multiplier type.
   - When `done` arrives, it passes the product to the accumulator. For k = 0 it also
     asserts `clear`, so the sum starts from zero.
   - When the accumulator reports the new sum, it moves on to the next tap.
3. After tap 15 it presents the channel's sum on `y_data`, with `y_ch = c` and a one-cycle
   `y_valid` pulse.
4. After channel 7 it returns to idle.

The cost of one product depends on the multiplier type:

| Multiplier | Cycles per product | Where the cycles go |
|---|---|---|
| Wallace, Booth, Dadda | 4 | start, product register, adder cutset, accumulator register |
| Shift-and-add | N + 4 = 12 | start, 8 add-and-shift steps plus operand load, adder cutset, accumulator register |

A vector takes exactly `1 + sum over channels of 16 * (4 or 12)` cycles. That is 513 cycles
with tree multipliers only and 1537 with shift-and-add on every channel. The clock must be
at least that many times the input sample rate. This is the cost of sharing one multiplier
among 128 products per vector.

Only one product is in flight at a time. That keeps the accumulator loop simple: the retimed
adder's one-cycle latency never meets a stale accumulator value. The schedule could overlap
the multiply of tap k+1 with the add of tap k. That would cut the tree case to about 2 cycles
per product, but it is not done here.

## The four multipliers

All four compute the same function: an 8x8 signed product, exact in 16 bits. So the
multiplier type changes timing, area and switching activity, never the result. Each one is
tested on all 65536 operand pairs.

**Signed partial products (Wallace, Dadda).** The bits `a[j] & b[i]` use the modified
Baugh-Wooley form:
- The terms that pair exactly one sign bit are inverted.
- A constant 1 is added in columns N and 2N-1.

The plain unsigned sum of the matrix is then the two's-complement product, modulo 2^16.

**Wallace tree (`wallace_mult`).** The partial products are kept as rows of 16 bits. Each
layer takes the rows three at a time and turns every triple into two rows:
- a bit-wise sum row, `x ^ y ^ z`;
- a carry row, `maj(x, y, z)` shifted one column left.

Rows left over pass through unchanged. For 8 bits the row count falls 9 -> 6 -> 4 -> 3 -> 2,
and a 16-bit SQRT CSLA adds the last two rows. The layer structure is computed by constant
functions and built with `generate`.

**Dadda (`dadda_mult`).** The same bits are sorted into 16 columns by weight. Each stage has
a target height from the Dadda sequence (6, 4, 3, 2 for 8 bits). A stage reduces each column
only down to that target:
- It uses a full adder while the column is at least two bits above the target.
- It uses a half adder when the column is one bit above.

The carries count towards the next column's height in the same stage. The number of full and
half adders per column and stage comes from a constant function (`sched`). Generate loops
place them. A 16-bit SQRT CSLA does the final addition.

**Radix-4 Booth (`booth_mult`).** The multiplier is scanned in overlapping triples
`{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`. Each triple is recoded into a digit:

| Triple | Digit |
|---|---|
| 000, 111 | 0 |
| 001, 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101, 110 | -1 |

Each digit selects 0, a or 2a, inverts it when the digit is negative, and shifts it by 2i.
The +1 that completes each negation goes into a separate correction row. The four
partial-product rows and the correction row pass through a carry-save chain, and then into
the SQRT CSLA.

**Shift-and-add (`shift_add_mult`).** This is the classic sequential multiplier. The product
register holds `{hi (9 bits), lo (8 bits)}`, with the multiplier Q in `lo`. Each clock does
one step:
1. If the LSB is 1, M is added to `hi`.
2. The whole register shifts right arithmetically.

In the last step, the one that sees Q's sign bit, the unit subtracts M instead of adding it
(`hi + ~M + 1` on a 9-bit SQRT CSLA). Timing: `done` pulses N + 1 cycles after `start` (one
load cycle and N steps), and `p` holds the product until the next start.

**The unit around them (`reconfig_mult_unit`).** `sel` (`mult_sel_e`: 0 Wallace, 1 Booth,
2 shift-and-add, 3 Dadda) chooses the structure. Only the chosen structure sees the operands.
The three combinational trees get zeros when they are not selected, and the shift-and-add
unit is only started when it is selected. The unused structures therefore do not toggle. This
operand isolation is how this design reduces power with a multiplier unit that holds four
multipliers. A tree product is registered, so `done` comes 1 cycle after `start`. For
shift-and-add, `done` comes N + 1 cycles after `start`.

## The square-root carry-select adder and its cutset

`sqrt_csla` splits the operands into ripple-carry groups of growing size: 2, 2, 3, 4, 5, and
then 6, 7, ... if the adder is wider. For 16 bits that gives five groups.
- Group 1 ripples with the real carry-in.
- Every later group computes two results in parallel: one for carry-in 0 and one for
  carry-in 1.
- A chain of 2:1 multiplexers then picks one result per group, from the carry of the group
  below.

Because the groups grow, the ripple delay of each group roughly matches the arrival time of
its select carry.

With `RETIME = 1`, a register cutset sits between the conditional-sum ripple groups and the
multiplexer chain. The long ripple paths are in one cycle and the select chain is in the
next. The adder then has a latency of one cycle and still accepts one addition per cycle.
`out_valid` follows `in_valid` with the same latency.

The design uses the adder in three places:

| Instance | Width | Mode |
|---|---|---|
| Final adder of the Wallace, Dadda and Booth multipliers | 16 bits | Combinational |
| Add/subtract of the shift-and-add multiplier | 9 bits | Combinational |
| Accumulation adder in `rfir_mac` | 20 bits, groups 2+2+3+4+5+4 | Retimed |

## Top-level interface (`rfir_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset (all state, coefficients and samples reset to 0) |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, 4, 8 | Write H(`coef_addr`) = `coef_wdata` (signed) |
| `mode[0:7]` | in | 2 each | Multiplier type per channel (`rfir_pkg::mult_sel_e`), latched per vector |
| `in_valid`, `in_ready` | in/out | 1 | Input vector handshake; `in_ready` is high only while idle |
| `x_in[0:7]` | in | 8 each | One signed sample per channel |
| `y_valid`, `y_ch`, `y_data` | out | 1, 3, 20 | One output per channel per vector, channels in order 0..7 |

Parameters: `N = 8` (data width), `NTAP = 16`, `NCH = 8`, and `ACC_W = 2N + log2(NTAP) = 20`.
All modules take these parameters, so other sizes can be built. Only the defaults have been
simulated end to end.

Coefficients should be written while the filter is idle. A write during a vector is allowed
and takes effect for the products started after it. To run a shorter filter, program the
unused high taps to zero. A 7-tap filter is H(7)..H(15) = 0. The cycle count stays the same.

Assertions check the handshakes:
- The multiplier is never started while it is busy.
- No add is issued while the accumulator is busy.
- An accumulator result only arrives while the controller is waiting for one.

## Design choices and departures

The published description fixes the four multiplier algorithms, the grouped carry-select
adder with retiming, the 8-bit, 16-tap, 8-channel sizes and the time-shared organisation. The
following were chosen here:

- **Number format.** Signed two's complement throughout. The Booth recoding implies signed
  operands, so the other three multipliers are signed too, and all four give identical
  results.
- **Booth radix.** The algorithm description mixes radix-2 rules ("01 add, 10 subtract")
  with radix-4 steps (shift by two positions). Standard radix-4 recoding is used, unrolled
  into a combinational array.
- **Adder groups.** The group sizes are 2, 2, 3, 4, 5 for the 16-bit adder. The published
  text lists group sizes that add up to more than 16 bits, while it calls the adder 16 bits
  wide. The 16-bit width was kept.
- **Cutset position.** A single cutset sits between the ripple groups and the select-mux
  chain. The original figure may place the registers differently.
- **Schedule.** The schedule, the handshakes, the per-channel latching of the mode and the
  20-bit full-precision output are this design's own. So is operand isolation as the
  power-saving mechanism.
- **Channel arrangement.** Eight input channels each give their own output. One summary of
  the published design speaks of a single input channel producing several outputs. The
  eight-channel reading follows the results section, which feeds CH1..CH8.
- **Not modelled.** The area, power and delay figures quoted for a 180 nm implementation are
  outside the RTL's scope. The same holds for the note that a shared filter needs a
  proportionally faster clock: here that factor is 513 to 1537, see above.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the block's outputs with
values computed independently, such as the `*` and `+` operators or a behavioural reference,
and checks latencies wherever they are fixed. Each prints `TB_RESULT checks=<n> failures=<m>`
and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_wallace_mult`, `tb_dadda_mult`, `tb_booth_mult` | All 65536 signed operand pairs |
| `tb_shift_add_mult` | All 65536 pairs, latency N+1, busy, starts ignored while busy |
| `tb_reconfig_mult_unit` | 4000 random products over all types, latency per type, operand isolation |
| `tb_sqrt_csla` | Combinational 16-bit and retimed 20-bit adders, random and corner cases, one-cycle latency |
| `tb_rfir_mac` | 500 random accumulation groups, clear, ready and two-cycle result timing |
| `tb_coef_bank`, `tb_sample_delay_line` | Register contents against a shadow model |
| `tb_rfir_ctrl` | The sequencer against testbench models of the datapath; outputs and exact cycle counts |
| `tb_rfir_top` | End to end at the default sizes (see below) |

`tb_rfir_top` runs 80 vectors through the complete filter at its default sizes and checks
every output and the cycle count of every vector. It also counts each mechanism and fails if
one never happens:
- every multiplier type;
- a channel switching type between vectors;
- coefficient reprogramming;
- an input vector waiting while the filter is busy;
- the full accumulation range (all samples and coefficients -128);
- the 7-tap configuration, in the last 20 vectors.

Run a testbench with plain Verilator from the repository root. Give the package first, and
let `-y rtl` find the other modules:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/rfir_pkg.sv tb/tb_rfir_top.sv --top-module tb_rfir_top
./obj_dir/Vtb_rfir_top
```

Every testbench finishes in well under a second.

Lint notes: in the combinational adder instances, `sqrt_csla` leaves `clk`, `rst_n` and
`in_valid` unused. These ports exist only for the retimed configuration.
