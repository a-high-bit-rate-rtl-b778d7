# Serial-serial multiplier with counter-based column accumulation

This is an N x N unsigned multiplier whose two operands arrive one bit per
clock each, as they would over a narrow serial link. X comes most significant
bit first and Y least significant bit first. Most serial-serial multipliers
add partial products with a chain of full adders as the bits come in. This one
adds nothing while the bits arrive. In each cycle it forms one row of partial
products, at most one bit per product column. Each column has a small
asynchronous ripple counter that counts the ones arriving in it. The clocked
path is therefore only a flip-flop and an AND gate.

After N cycles the counters hold every column sum. Their bits, each placed at
its own weight, form a bit matrix that is at most clog2(N)+1 bits high, where a
parallel multiplier's matrix is N bits high. A Dadda tree reduces that short
matrix to two rows, and a ripple-carry adder adds them into the 2N-bit product.

The default size is N = 8. All RTL is parameterised by N.

## Block diagram

```
 x_bit (MSB first) --> [D] --+--> LSR (stored X bits) --+
                             |                          |  AND gates, one per column
 y_bit (LSB first) --> [D] --+--> RSR (stored Y bits) --+--> pp[0 .. 2N-2]
                                                                 |
                                  one ripple counter per column  v
                                  ssm_counter_bank --> counts --> sum register
                                                                 |
                                                          placed by weight
                                                                 |
                                  ssm_dadda (Dadda tree) --> two rows
                                                                 |
                                  ssm_rca (ripple-carry adder) --> product register
 ssm_ctrl: bit count, first/last bit, capture, counter clear, in_ready
```

## How the rows are formed

Suppose the i-th bit pair (i = 0 .. N-1) has just been caught in the two input
flip-flops, so the new bits are x[N-1-i] and y[i]. The LSR holds the X bits
received earlier and the RSR the Y bits: `lsr[k] = x[N-1-i+k]` and
`rsr[k] = y[i-k]`. Row i contains every product that uses at least one of the
two new bits:

| column          | bit                                   |
|-----------------|---------------------------------------|
| N-1             | `x[N-1-i] & y[i]`, the two new bits   |
| N-1+k, k >= 1   | `lsr[k] & y[i]` = `x[N-1-i+k] y[i]`   |
| N-1-k, k >= 1   | `x[N-1-i] & rsr[k]` = `x[N-1-i] y[i-k]` |

Register stages not yet filled hold zeros, so row i has 2i+1 possible ones and
spans columns N-1-i .. N-1+i. Here is the N = 8 case, with column 7 in the
middle and the more significant columns to the left:

```
row 0                             x7y0
row 1                        x7y1 x6y1 x6y0
row 2                   x7y2 x6y2 x5y2 x5y1 x5y0
row 3              x7y3 x6y3 x5y3 x4y3 x4y2 x4y1 x4y0
row 4         x7y4 x6y4 x5y4 x4y4 x3y4 x3y3 x3y2 x3y1 x3y0
 ...
```

Over N rows every product x[a]y[b] appears exactly once, so all N^2 partial
products are formed in N cycles. No column ever gets two bits in one cycle,
which is why a counter per column can replace an adder.

## The column counters

Column c receives one bit in each of N - |c-(N-1)| rows. Its counter is
clog2 of that number plus one bits wide. For N = 8 the widths from column 0 to
column 14 are 1,2,2,3,3,3,3,4,3,3,3,3,2,2,1.

Each counter (`ssm_ripple_counter`) is a chain of toggle flip-flops. Each one
is a D flip-flop with its inverted output fed back to D. The first flip-flop
is clocked by the AND of the clock and the column bit. Each later flip-flop is
clocked by the inverted output of the one before it, so the carry ripples down
the chain with no clock. All stages have an asynchronous active-low clear.

The AND gate uses the **inverted** clock. The column bits come from flip-flops
clocked on the rising edge, so they change just after it. Gating the low half
of the cycle gives a clean clock pulse. A one is counted at the **falling**
edge of the cycle in which it is presented. The ripple has settled long
before the next rising edge, when the register of column sums may sample the
result.

Two things follow for anyone changing the design:

- The counters are a separate set of derived clocks. Static timing has to
  treat each counter stage as its own clock domain. The path from the
  counters to the register of column sums has half a cycle, from the falling
  edge to the next rising edge.
- The counters are cleared only by their asynchronous clear. The controller
  drives it from a flip-flop (`cnt_rst_n`). It is pulsed low for one cycle
  after reset and for one cycle after each product has been captured.

## From counts to product

Bit b of column c's count weighs 2^(c+b). Placing every count bit at its
weight gives a new bit matrix. For N = 8 its column heights, from column 0 to
column 15, are

```
1 1 2 2 2 3 3 3 3 3 4 3 3 3 2 0      (41 bits; an 8 x 8 AND array has 64, up to 8 high)
```

`ssm_dadda` reduces this matrix with Dadda's method. The stage height limits
are 2, 3, 4, 6, 9, 13, ..., each the floor of 1.5 times the one before. The
first stage aims at the largest limit below the tallest column, and each later
stage at the next limit down, until two rows remain. Within a stage, each
column gets the fewest full adders that bring it down to the limit, counting
the carries it receives from the column below. A half adder is added when one
bit would still be too many.

For N = 8 the counter matrix needs two stages (heights 3, then 2), using 9 full
adders and 5 half adders. The same module can also reduce a plain N x N AND
array. For 8 x 8 it then reproduces the textbook Dadda multiplier: four stages
with heights 6, 4, 3, 2, 35 full adders and 7 half adders. The testbench checks
this.

The placement of every adder is computed during elaboration by functions in
`ssm_pkg`, which run the algorithm on the column heights. Generate loops then
build the tree. Inside a column, the full adders take the lowest bits, the half
adders the next ones, and the remaining bits pass straight through. Carries out
of the top column are dropped. They are always zero, because a 2N-bit product
cannot overflow.

`ssm_rca` adds the two rows with a 2N-bit ripple-carry chain. The sum is
loaded into the product register one cycle after the column sums were
registered.

## Interface and timing (`ssm_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | asynchronous reset, active low |
| `in_valid`  | in  | 1     | `x_bit`/`y_bit` hold a bit pair |
| `in_ready`  | out | 1     | the pair is taken at the rising edge when both are high |
| `x_bit`     | in  | 1     | X, most significant bit first |
| `y_bit`     | in  | 1     | Y, least significant bit first |
| `out_valid` | out | 1     | one-cycle pulse: `product` has a new value |
| `product`   | out | 2N    | X*Y; holds until the next result |

Cycle by cycle, for an operation sent without pauses:

- Edge 1 takes bit 0, and row 0 is counted at the following falling edge.
  Edge i+1 takes bit i in the same way.
- Edge N takes bit N-1. During the next cycle (the *capture cycle*) row N-1 is
  counted, and `in_ready` is low.
- Edge N+1 copies the column sums into a register (`cnt_q`). The counters are
  cleared during the following cycle. Meanwhile the Dadda tree and the adder
  work on the registered sums.
- Edge N+2 registers the product and raises `out_valid`. The same edge can
  take the first bit of the next operation. That is one result every N+1
  cycles.

The product is therefore registered N+1 edges after the first bit is taken.
Only three kinds of clocked path exist:

- a flip-flop and an AND gate, into the counters;
- the counters' ripple, which has half a cycle;
- the Dadda tree plus the 2N-bit ripple-carry adder, which has one full cycle.

The last path is the one to pipeline or declare multicycle if the bit rate
must go higher. The sum register holds its value for N+1 cycles, so a
multicycle constraint is safe if the product register is loaded later.

The sender may drop `in_valid` between bits at any time. Rows are formed only
in cycles that follow a taken bit, and the operand registers shift only on
taken bits, so pauses do not change the result. After reset, `in_ready` stays
low for one cycle while the counters are cleared.

## Where this RTL makes its own choices

These parts are not specified by the method and were chosen here:

- The valid/ready handshake, pausing between bits, the product register with
  `out_valid`, and the controller (`ssm_ctrl`) as a whole.
- The counters count at the falling edge (inverted clock into the gate).
- The LSR/RSR are cleared on the first bit of each operation. The counters are
  cleared one cycle after each capture, and one cycle after reset. This costs
  one idle cycle per operation.
- The column sums are registered at the end of the capture cycle. The Dadda
  tree and the adder then get a full cycle, instead of the half cycle that
  remains after the counters settle.
- The final adder spans all 2N columns. A parallel 8 x 8 Dadda multiplier
  needs only 14 bits, because its lowest and highest columns never hold two
  bits.
- The order of bits inside a Dadda column, as described above.

The method itself describes a complete multiplication in n cycles. Here the
rows are formed and counted in N cycles, as described. Clearing the counters
and registering the result add one cycle of throughput and two of latency.

## Files

| file | content |
|------|---------|
| `rtl/ssm_pkg.sv` | types, counter widths, matrix shapes, Dadda planning functions |
| `rtl/ssm_top.sv` | the multiplier |
| `rtl/ssm_ctrl.sv` | bit counting, capture, counter clear, handshake |
| `rtl/ssm_ppgen.sv` | input flip-flops, LSR/RSR, per-column AND gates |
| `rtl/ssm_shift_reg.sv` | LSR/RSR shift register |
| `rtl/ssm_counter_bank.sv` | one counter per column |
| `rtl/ssm_ripple_counter.sv` | asynchronous ones-counter |
| `rtl/ssm_dadda.sv` | Dadda reduction tree |
| `rtl/ssm_full_adder.sv`, `rtl/ssm_half_adder.sv` | (3,2) and (2,2) counters |
| `rtl/ssm_rca.sv` | final ripple-carry adder |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ssm_exhaustive` and `tb_ssm_sizes` (driven through `tb_ssm_size_run`) |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. A
watchdog ends a hung run. For example, the whole multiplier at N = 8:

```
verilator --binary --timing --assert -Irtl rtl/ssm_pkg.sv tb/tb_ssm_top.sv \
          --top-module tb_ssm_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench, changing the file and top name.
`ssm_pkg.sv` must come first; the other modules are found through `-Irtl`.

`tb_ssm_top` sends 400 operations. They include all-ones and zero operands,
runs of back-to-back operations with `in_valid` held high (so `in_ready` holds
the sender back), and operations with random pauses between bits. It checks
every product and its timing, and it fails if any of these situations never
occurred.

`tb_ssm_exhaustive` sends all 65536 pairs of 8-bit operands back to back. It
checks every product and that the run takes exactly N+1 cycles per result.
`tb_ssm_sizes` runs multipliers with N = 2, 3, 5, 12, 16 and 24 side by side,
which exercises the elaboration-time Dadda plan on matrices of other shapes.

The block testbenches check the following against models written
independently of the RTL:

- every row's column bits, and that the rows sum to X*Y;
- the counter counts at the falling edge, and every column reaches its full
  count;
- the Dadda plan (stage heights and adder counts) and its sums;
- the adder, exhaustively at 4 bits and randomly at 16;
- the controller's handshake, cycle by cycle.

A note on simulation with two-state simulators such as Verilator: an
asynchronous clear acts only on its falling edge. The ripple counters have no
other clock during reset, so the controller gives them a fresh clear edge in
the first cycle after every reset. Do not remove that cycle unless your
simulator models reset levels at time zero.
