# Run-time programmable period tester for feedback shift registers

Searching for nonlinear feedback shift registers (NLFSRs) with maximal period
means testing millions of candidate feedback functions. A register of order N
has maximal period when, started from any nonzero state, it runs through all
2^N - 1 nonzero states before it repeats. The usual FPGA approach builds one
circuit per candidate and resynthesises for every new function. That is hopeless
for a bulk search. This design instead takes the feedback function as **data**:
an order N and two bit masks. One fixed circuit steps the register once per
clock and reports whether the function is maximal. A host streams candidates in
and collects verdicts. Nothing is rebuilt between candidates.

The functions it handles have a linear part plus one product term:

    f(x_0 .. x_{N-1}) = XOR of the x_i selected by LFSR  XOR  AND of the x_i selected by NLFSR

This covers all linear functions, and also the "square m-sequence" form
`g + x_i + x_i*x_j` (g a primitive linear function) that the search targets.

## The test procedure

The tester applies this rule to one function:

1. Load `state = 1`.
2. Each clock, compute the feedback bit
   * `b_lin  = parity(state & LFSR)`
   * `b_prod = floor(popcount(state & NLFSR) / popcount(NLFSR))`
   * `bit    = b_lin ^ b_prod`

   and shift: `state = ((state << 1) | bit)`, truncated to N bits.
3. If `state` is 1 again after k steps:
   * k < 2^N - 1: the period is k, not maximal. **Stop at once** (early exit).
   * k = 2^N - 1: maximal.
4. If 2^N - 1 steps pass without state 1 coming back, the register has fallen
   into a cycle that does not contain state 1 (a singular function does this).
   The verdict is not maximal.

Only one state has to be watched: if state 1 first comes back after exactly
2^N - 1 steps, the register has been through every nonzero state. The early exit
is what makes bulk screening fast. A random candidate usually falls into a short
cycle, and its test ends after a small fraction of 2^N cycles. Only maximal
functions and functions that never return to 1 cost the full 2^N - 1 cycles.

The product term is evaluated the way the rule states it, as an integer quotient
of two popcounts. The numerator can never exceed the denominator, so the
quotient is 1 exactly when the two counts are equal. In other words, every
variable in the product is 1. The hardware therefore builds the "divider" as
two popcounts and an equality compare (`feedback_eval`). An all-zero product mask
would be a division by zero. This design defines its value as 0, which makes the
function purely linear.

`2^N - 1` is the N-bit all-ones word. The tester computes it once when it loads a
job. It then serves both as the truncation mask of the state and as the
terminal value of the step counter.

## Encoding a function: which bit is which variable

This is the part most likely to trip up a user. The register shifts towards the
MSB, and the new bit enters at bit 0. The conventional notation writes the
register map as `(x_0, ..., x_{N-1}) -> (x_1, ..., x_{N-1}, f)`, with `x_0` the
oldest bit, the one that leaves. Under that notation, **variable x_i is state
bit N-1-i**. Two examples:

* The primitive trinomial x^23 + x^5 + 1 is the recurrence
  `s_{k+23} = s_k + s_{k+5}`. It uses x_0 and x_5, so `LFSR = (1<<22) | (1<<17)`,
  `NLFSR = 0`, `order = 23`.
* The degree-30 function
  `x0+x1+x4+x6+x8+x12+x14+x16+x23+x28 + x9 + x9*x22` has `LFSR` with bits
  29-i for i in {0,1,4,6,8,9,12,14,16,23,28}, and `NLFSR` with bits 20 and 7
  (for x9 and x22). It is maximal: 1,073,741,823 steps.

The testbench function `vars(n, '{...})` in `tb/uffng_fpga_top_full_tb.sv` builds
masks from variable indices this way. A function without an x_0 term is
singular: it is not a permutation of the states, and the test always runs to
the end and reports "not maximal".

Mask bits at or above N are ignored. Bits of `NLFSR` above N are cleared when
the job is loaded, so they cannot make the product unreachable.

## Datapath

    host link ──in_valid/in_ready/in_job──▶ job_buffer ──▶ period_tester ──out_valid/out_ready/out_result──▶ host link
                                            (FIFO, 16)      (feedback_eval inside)

| module | role |
|---|---|
| `uffng_pkg` | `job_t {order, lfsr, nlfsr}` and `result_t {job, maximal, steps}`; `NMAX_DEF = 32` |
| `feedback_eval` | combinational feedback bit: parity, two popcounts, equality compare |
| `period_tester` | IDLE / RUN / DONE controller, 32-bit state and step counter, verdict register |
| `job_buffer` | first-word-fall-through circular FIFO with occupancy count |
| `uffng_fpga_top` | buffer feeding one tester; the top of the design |

**Why a buffer.** Candidates arrive over a slow link, and test lengths vary
enormously (a handful of cycles up to 2^N). The buffer holds the functions that
arrive while the tester is busy. When a test ends, the next function is already
at the FIFO head. In the original system this job is done by a soft processor
that keeps the incoming data in its memory. Here it is a hardware queue, and the
processor and the link itself are outside the design (see *Not included*).

**Handshakes and timing.** Every port pair is valid/ready; a transfer happens on
a rising edge where both are high.

* A job written into an empty buffer reaches the tester on the next edge.
* A test of k steps takes k cycles. `out_valid` rises after the k-th step edge.
  So from the edge where a job is written into an empty buffer to the edge where
  its verdict can be taken is k + 2 cycles.
* The verdict is held stable until `out_ready`, which is asserted. While it is
  held, the tester is stalled.
* When the verdict is taken and a job is waiting, the tester loads the next job
  **on the same edge**. Back to back, a function therefore costs k + 1 cycles:
  one step cycle per state plus a single load cycle.
* `out_result.steps` is k. For a function that is not maximal and that returned
  early, this is the period of the cycle through state 1. For a run that never
  returned, it is 2^N - 1.
* `busy` is high while the register is being stepped. `buf_count` gives the
  number of functions waiting.

Reset is asynchronous and active-low. It empties the buffer and idles the
tester. The FIFO storage itself is not reset.

**Sizes.** The state, masks and step counter are 32 bits (`NMAX_DEF`), so orders
1 to 32 are accepted at run time. This covers the benchmark orders 23 to 30 and
the stated target of degree 32. An out-of-range order is caught only by an
assertion. `BUF_DEPTH` defaults to 16 entries of 102 bits. After generic
synthesis the top is about 80 word-level cells, 183 flip-flop bits and 1,120
memory bits.

## How far it follows the source design

Taken from the source:

* the test rule: start at 1, a linear mask plus a single product mask, an integer
  popcount quotient for the product, and a verdict at step 2^N - 1;
* the run-time programmability: no resynthesis per function;
* the buffering stage: it hands over the next function as soon as a test is done.

Choices of this design, where the source says nothing:

* one step per clock;
* valid/ready handshakes, the result format and the reported step count;
* asynchronous reset;
* the FIFO structure and its depth of 16;
* a 32-bit maximum order;
* a single tester instance. The source does not say how many testers its FPGA
  build holds.

One deliberate departure from the rule as usually written. Read literally, the
loop checks "state == 1 → not maximal" on every iteration, including the last
one. That would make a maximal verdict impossible. This design follows the
stated intent instead: a return to 1 before step 2^N - 1 means not maximal, and
the check at step 2^N - 1 decides.

The published degree-30 example functions are listed as a linear part plus a
product x_i*x_j. With the bit convention above, and with the form's `+ x_i` term
included, all three generate m-sequences. Without that term, none of them does.
The testbench uses the first one with the `+ x9` term.

## Not included

* **The soft processor and the host link.** The original system talks to the PC
  through a vendor soft processor over an unspecified external interface. Neither
  is built. The `in_*` and `out_*` ports are where they connect.
* **Host-side tools.** Building primitive polynomials, enumerating candidates in
  lexicographic order, and the CPU and GPU versions of the test are software on
  the host. The FPGA only tests what it is sent.
* **Throughput figures.** The source reports the time to test a 100 MB package
  of candidates per order. Those times depend on its encoding of a function and
  on its clock, neither of which is given, so they are not reproduced here.

## Verification

Each testbench checks itself. It ends with a single line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `feedback_eval_tb` | 3,000 random and directed mask/state triples against the popcount/division definition |
| `period_tester_tb` | For orders 3 to 9, every linear mask that contains x_0 is tested. The number found maximal equals the number of primitive polynomials, φ(2^n−1)/n (2, 2, 6, 6, 18, 16, 48). 400 random nonlinear functions of orders 1 to 12 are checked against a software model, for verdict and step count. Each test must take exactly k cycles. The verdict must hold under back-pressure, and a new job must load on the edge its result leaves. |
| `job_buffer_tb` | Random traffic against a queue model, in phases that fill and drain the buffer. Full and empty must both occur. |
| `uffng_fpga_top_tb` | 600 mixed candidates of orders 2 to 14 go through the top, with bursts, pauses and random back-pressure. Every verdict is checked against the model. The k + 1 cycle back-to-back hand-over is checked. Each mechanism must occur at least once: buffer full, tester starved, early exit, maximal, maximal nonlinear, no-return run, result stall, back-to-back hand-over. |
| `uffng_fpga_top_full_tb` | Default parameters, with full-length runs. x^23+x^5+1 is maximal. Three order-23 nonlinear functions match the model. x^29+x^2+1 is maximal after 536,870,911 steps. With `+degree30`, the degree-30 function above is maximal after 1,073,741,823 steps. |

The software model (`tb/uffng_ref_pkg.sv`) is written from the rule with real
popcounts and division, not from the RTL's compare.

Simulation runs at roughly 2 million cycles per second. The default full-size run
takes about 4 minutes, and the `+degree30` run adds about 8 minutes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/uffng_pkg.sv tb/uffng_ref_pkg.sv tb/uffng_fpga_top_tb.sv \
        --top-module uffng_fpga_top_tb -o sim
    ./obj_dir/sim

To run another bench, substitute its name. The full-size bench accepts
`+degree30`: `./obj_dir/sim +degree30`.

To change the maximum order, edit `NMAX_DEF` in `rtl/uffng_pkg.sv`. The state,
masks, counter and order field all follow it. To change the buffer depth, set
`BUF_DEPTH` on `uffng_fpga_top`.
