# Pre-compiled surviving-path memory for a 16-state Viterbi decoder

A Viterbi decoder's add-compare-select (ACS) unit produces, in every
decoding cycle, one decision bit per trellis state. The surviving-path
memory (SPM) stores these decisions and follows the survivor back far
enough (the convergence length L) to decode data. Two classical SPMs are
at opposite ends of a trade-off:

* an **exchange register** (ER) keeps, per state, the whole survivor and
  updates all of it every cycle: short latency (L cycles), but L columns
  of N multiplexers switch every cycle, which costs area and power;
* a **trace-back** (TB) keeps decision vectors in memory and walks back one
  step per multiplexer per cycle: cheap, but slow or with long latency.

This RTL implements two hybrids that **pre-compile** the trace-back: a
small exchange register condenses every block of h decision vectors into
a look-up table that says, for each state, which state its survivor came
from h cycles earlier. Following a pointer through these tables traces
back h steps per table look-up, so a trace over L+h decisions takes only
L/h+1 look-ups. Two units are provided, for v = 4 (N = 16 states), L = 64
and h = 8:

| unit | exchange register | other storage | decoded | latency |
|------|-------------------|---------------|---------|---------|
| `ptb_spm`, pre-compiled trace-back (PTB) | ER(8,8): 8 bits per state | 9 tables of 16 x 8 bits | 8 bits / 8 cycles | 80 cycles |
| `pcp_spm`, pre-compiled pointer (PCP) | ER(4,8): 4 bits per state | 9 tables of 16 x 4 bits, FIFO of 40 vectors | 8 bits / 8 cycles | 80 cycles |

`spm_top` holds both units side by side, each with its own decision input
and decoded output. Fed the same decisions, they produce identical bits.
The ACS unit that feeds them is not part of this design.

The architecture follows the paper "High Speed Low Power Architecture for
Memory Management in a Viterbi Decoder". Its published implementation
results (gate counts, 92 and 90 MHz in 0.8 um, 5 and 3 mW/MHz against
19 mW/MHz for a 64-column exchange register) come from the authors'
VHDL. This RTL is an independent implementation and has not been
characterised in a technology.

## Trellis and bit conventions

Everything depends on one convention, so it comes first. A state is the
last v encoder input bits, newest bit in the MSB. The decision bit `d` of
state `s` is the input bit that leaves the state register, so

    predecessor(s, d) = {s[v-2:0], d}          (spm_pkg::pred_node)

A decision vector `dec[i]` is the decision of state i. Because the
decision of the state at time t is the input bit of time t-v, the decoded
decisions are the data bits delayed by v.

An **ER(h,l)** (`er_hl`) has one h-bit register per state. Decision
vectors are grouped in blocks of l. During the first h vectors of a block
each register takes its predecessor's register shifted right by one, with
its own new decision in the MSB; during the remaining l-h vectors it only
copies its predecessor's register. At the end of a block, the register of
state i holds the h *oldest* decisions of the block along i's survivor:
MSB = decision at t2+h, LSB = decision at t2+1, t2 being the block start.
Its v low bits are exactly the state the survivor passed through at t2.
That is what makes the register a look-up table:

* ER(h,h) (PTB): the table gives h survivor bits plus the pointer;
* ER(v,h) (PCP): the table gives only the pointer (and the v oldest bits).

Worked 4-state example (v = 2, h = l = 4) used by the testbenches, with
decision vectors V1..V8 for states 0..3:

    V1 0111  V2 1000  V3 0011  V4 0110  V5 1011  V6 1101  V7 0100  V8 1001

gives the tables (state 0..3) `0011 1101 1000 0101` at t = 4 and
`1111 0010 0010 1001` at t = 8. From state 0 at t = 8: entry `1111`,
pointer 3; at t = 4, entry of state 3 is `0101`, pointer 1 at t = 0.

## The pre-compiled trace-back chain (`psp_tracer`)

Both units use the same chain. It holds NB+1 tables (NB = L/h = 8), block
0 newest. Time runs in decoding cycles, counted from the cycle in which a
table becomes complete (the *shift cycle*, flagged by `er_hl.full`):

| cycle after shift | action |
|---|---|
| 0 | tables move one place down the chain, the exchange register's table enters block 0; the pointer is loaded from that table's entry for state 0 |
| 1 .. NB-1 | pointer <= v low bits of block k's entry at the pointer (k = cycle) |
| NB | the entry of block NB at the pointer is the output (`out_valid`) |

With NB = h = 8 the output cycle is also the next shift cycle: the output
reads the registers just before they shift and the next trace begins in
the same cycle. Tracing from an arbitrary state (state 0) is safe because
the first NB tables cover NB·h = L decisions, the convergence length, so
survivors are taken to have merged by the time the oldest table is
reached (that is what the convergence length means).

Latency, from the decoding cycle in which the oldest decision of a block
enters to the cycle its decoded bits leave, is (NB+1)·h + NB = 80. Nothing
is output until the chain holds NB+1 real tables; after that, one block of
h bits leaves every h decoding cycles.

## PTB unit (`ptb_spm`)

ER(8,8) feeding the chain with 8-bit entries. The output is the selected
8-bit entry of the oldest table: `out_bits[7]` is the newest decision of
the decoded block, `out_bits[0]` the oldest. Storage: 8 + 9 x 8 = 80
decision vectors in flip-flops.

## PCP unit (`pcp_spm`)

Before convergence only the pointer is needed, so the exchange register
is cut to ER(4,8) and the chain carries 4-bit entries. The chain's output
gives the 4 oldest decisions of the decoded block and, in `out_ptr`, the
state at the block's end. The other h-v = 4 decisions come from the
decision vectors themselves:

* `decision_fifo` receives, in every block, the vectors of its last h-v
  cycles (those the ER(4,8) only copies pointers for). It is a circular
  buffer of (NB+2)·(h-v) = 40 vectors, written one vector per cycle and
  read one block of h-v vectors at a time;
* `comb_traceback` traces those h-v vectors back from `out_ptr` through a
  chain of 16-to-1 multiplexers, in the same cycle.

`out_bits = {trace-back bits, pointer-chain bits}`; the FIFO block is
popped when the output is produced. An assertion checks that the block is
always complete in the FIFO at that moment.

## Interfaces

All units: `clk`, synchronous active-low `rst_n`, `dec_valid` and
`dec[2**V-1:0]` in; `out_valid` and `out_bits[H-1:0]` out. `dec_valid`
marks a decoding cycle; when it is low the unit holds completely, so a
stalled ACS simply stretches time. `out_valid` is only ever high in a
cycle with `dec_valid` high and is combinational from registers.

Parameters (`V`, `L`, `H`) may be changed as long as h divides L and
L/h <= h (so one trace fits in one block period); for the PCP unit also
h > v. The units check this with an elaboration-time assertion.

## Where this RTL departs from, or adds to, the paper

* Start-up, reset, the `dec_valid` stall input and the bit order of the
  output are this design's choices.
* The first table look-up is taken straight from the exchange register in
  the shift cycle; this is what lets NB+1 look-ups fit into an h-cycle
  period when NB = h.
* The PCP FIFO holds one block more than the paper's memory count
  (40 rather than 36 vectors, 80 rather than 72 vectors for the whole
  unit), because the trace-back reads the oldest block after the newest
  block's vectors have already arrived. The paper's FIFO is made of
  latches; this one is a clocked register array.
* The latency matches the paper's formula for both units: 80 cycles for
  v = 4, L = 64, h = 8, and 19 cycles for the 4-state example with L = 12.
* The paper's figure of the PTB shows the decoded word of the example as
  `1101`; this RTL outputs the selected table entry `0101`, which is what
  the PCP figure of the same example assembles from its two halves.
* For the PCP unit at larger h the paper's latency formula has a second
  term for a trace-back that takes one step per cycle (91 cycles for
  h = 16, 121 for h = 32). Here the h-v steps are one combinational
  chain, so the latency stays (L/h+1)·h + L/h (84, 98), at the cost of a
  longer combinational path when h-v is large; at the default h-v = 4 the
  first term dominates and both give 80.
* Operating points with h < 8 (several traces in flight at
  once) are not supported.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`:

* `er_hl_tb`: every exchange-register state of the 4-state example,
  including the partially defined ones, the ER(2,4) pointer tables, and
  random ER(8,8)/ER(4,8) tables against an explicit trace-back.
* `psp_tracer_tb`: the example's four tables give pointers 2, 0, 3 and
  entry `0101` (`01` with 2-bit entries); random chains against a model,
  including the output cycle.
* `comb_traceback_tb`, `decision_fifo_tb`: example values and random
  tests against models (the FIFO is filled to the brim and read while
  written).
* `ptb_spm_tb`, `pcp_spm_tb`: default size and the 4-state size with
  random decisions and stalls; every block against a bit-by-bit
  trace-back, every output cycle against the 80 (19) cycle latency.
* `spm_tradeoff_tb`: other operating points of the same decoder, PTB
  with h = 16 and 32 and PCP with ER(4,16) and ER(4,32), against the
  reference and the latencies 84 and 98 cycles.
* `spm_top_tb`: both units at the default parameters with independent
  stalls, 3000 decision vectors each; checks blocks, latency and that the
  units agree, and counts table shifts, FIFO writes and pops, traces that
  end in a shift cycle, trace-back results and stalls.

Test data are random decisions around a random true path: the true
state's decision always points at the true predecessor. The testbenches
print how many blocks equal the true data, for information only.

To run one, e.g. the top (the package must be read first):

    verilator --binary --timing --assert -Wno-fatal --top-module spm_top_tb \
        rtl/spm_pkg.sv $(ls rtl/*.sv | grep -v spm_pkg) tb/spm_top_tb.sv
    ./obj_dir/Vspm_top_tb

It runs in well under a second. Every testbench has a watchdog that
counts a failure if the simulation does not end in time.
