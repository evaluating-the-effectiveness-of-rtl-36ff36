# On-chip path delay measurement with scan latches and signature registers

This is SystemVerilog RTL for the chip side of a scan-based path-delay
measurement architecture. The design follows the paper "Evaluating the
Effectiveness of Detecting Small Delay Defects using Signature Analysis
Technique and Scan Design".

The method works like this. To find out how long a path between two
flip-flops really takes on a given die, the chip applies the same
launch/capture test to that path many times. Each time it shortens the
capture clock by one resolution step. While the clock is longer than the
path delay, the capture flip-flop sees the new value. Once the clock is
shorter, it sees the old value. The step at which the result flips is the
path delay, measured to one resolution step.

With plain scan, every one of those repetitions needs a full scan-in of
the test vector and a full scan-out of the response, on a slow tester
clock. This architecture removes both:

* **Extra latches** keep the test vector once it has been scanned in. Each
  repetition reloads the vector into the flip-flops in one clock.
* **Signature registers** (one per cluster of flip-flops) compact the
  response of each repetition on chip. Only a short signature per path
  leaves the chip at the end. The tester tells which step the response
  flipped at by comparing that signature with the signatures of every
  possible flip point. It needs no stored expected responses.

An on-chip **variable clock generator** produces the launch/capture
double pulse with a programmable spacing. Several paths, one per cluster,
are measured in parallel.

## Structure

```
                 sci                                              sco
                  |                                                ^
   +--------------v--+   +-----------------+        +-----------------+
   | cluster 0       |-->| cluster 1       |-->...->| cluster M-1     |
   | N scan FFs      |   | N scan FFs      |        | NFF-(M-1)N FFs  |
   +--------+--------+   +--------+--------+        +--------+--------+
            | tail                | tail                     | tail
        +---v---+             +---v---+                  +---v---+
  0 --->| SIG_0 |------------>| SIG_1 |---> ... -------->|SIG_M-1|---> sgo
        +---^---+   (shift)   +---^---+                  +---^---+
            | sck[0]              | sck[1]                   | sck[M-1]
        bcd_decoder slices  <---  scj (encoded, from tester)

  latch_array: one extra latch per flip-flop (or shared), loaded by lk
  clk = cs ? vcg double pulse (from ref_clk, trg, cnt) : tck
```

| Module | Role |
|---|---|
| `sdm_top` | The whole chip-side architecture (top level) |
| `meas_scan_ff` | Scan flip-flop with three modes: normal, scan, reload from latch |
| `vector_latch` | One extra level-sensitive latch |
| `latch_array` | All extra latches, with an optional sharing map |
| `scan_cluster` | N scan flip-flops chained head to tail |
| `sig_reg` | Reconfigurable single-input signature register / shift register |
| `bcd_decoder` | Encoded tester lines `scj` to one-hot capture enables `sck` |
| `vcg` | Variable clock generator: trigger-started launch/capture double pulse |
| `clk_select` | Chooses the chip clock: tester clock or double pulse |
| `sdm_pkg` | Mode encoding and default constants |

## The measurement sequence

The tester drives the whole sequence; the chip has no sequencer of its
own. For one test vector:

1. **Scan in** the vector: `cs=0`, `{se0,se1}=11`, NFF tester clocks on
   `sci`. The first bit in ends up in the last flip-flop.
2. **Store** it: pulse `lk` high. The latches follow the flip-flops while
   `lk=1` and hold after it falls.
3. For each **stage** (a set of at most one target path per cluster that
   the vector sensitizes): clear the signature registers with `rst_sig`,
   set `sge=1`, then for N_meas clock widths W = W0, W0-1, ...:
   1. **Reload**: `{se0,se1}=10`, one `tck`. Every flip-flop takes its
      latch bit.
   2. **Launch and capture**: `se0=0`, `cnt=W`, `cs=1`, raise `trg`. The
      generator's first pulse clocks the flip-flops in functional mode and
      launches the transitions. The second pulse, W reference periods
      later, captures the path outputs. Then lower `cs` and `trg`.
   3. **Compact**: `{se0,se1}=11`, N `tck` shifts. The response captured in
      cell k of a cluster with S cells reaches the cluster tail after
      S-1-k shifts. On shift clock c = S-k, `scj` selects that cluster's
      register, which compacts the tail bit. Within one decoder slice only
      one register may capture per clock, so two targets in the same slice
      must sit at different positions. Targets in different slices can be
      captured on the same clock.
4. **Read out**: `sge=0`, M x SIG_LEN `tck` clocks. The signatures leave on
   `sgo`, SIG_M-1 first, MSB first.
5. A further stage of the same vector goes back to step 3. The latches
   still hold the vector, so it needs no new scan-in.

A clock-width step costs 1+N tester clocks plus one double pulse. That is
independent of the chip size. Plain scan would need a full scan-in and
scan-out, about NFF to 2 x NFF tester clocks, per step. This is where the
measurement-time saving comes from.

**Reading the result.** Suppose the path has a delay of D reference
periods. The response bit is then the "new" value for W >= D and the
"old" value for W < D. The N_meas compacted bits are therefore one of
N_meas+1 possible sequences. The tester computes the signature of each
and looks up the one it read. The testbench does this for every path and
compares the result with the true delay. With N_meas = 100 or 200 and
8-bit signatures it found exactly one match every time. In general,
though, an 8-bit signature can alias: two boundaries can give the same
signature, since there are 201 boundaries and only 256 signature values.
A longer `SIG_LEN` makes that less likely.

## Blocks in detail

**Scan flip-flop (`meas_scan_ff`).** A D flip-flop behind two
multiplexers. `se1` chooses between the scan input `si` (1) and the latch
line (0). `se0` chooses between that and the functional input `d` (0).

| se0 | se1 | next q |
|---|---|---|
| 0 | x | d (normal) |
| 1 | 1 | si (scan shift) |
| 1 | 0 | latch (reload) |

**Extra latches (`vector_latch`, `latch_array`).** The latches are D
latches, transparent while `lk=1`. By default each flip-flop has its own
latch. The parameter `LATCH_OWNER` (16 bits per flip-flop) lets
flip-flops share latches to save area:

* entry 0: the flip-flop owns a latch;
* entry k: the flip-flop reads the latch of flip-flop k-1, which must own
  one.

Sharing is only correct if the sharing flip-flops need the same bit in
every vector measured. Choosing the groups from the test set (in the
paper, within a routing window) happens before the chip is built, and
its result goes into this parameter.

**Signature register (`sig_reg`).** A LEN-bit internal-XOR LFSR with one
serial input.

* With `sge=1` and `sck=1` it computes
  `s <= {s[LEN-2:0], in} ^ (s[LEN-1] ? POLY : 0)` on each rising clock.
  The signature is the remainder of the captured bit stream divided by
  x^LEN + POLY. With `sck=0` it holds.
* With `sge=0` it is a plain shift register `sgi -> sgo` that shifts on
  every clock.

The default is 8 bits with x^8+x^4+x^3+x^2+1.

**Capture decoder (`bcd_decoder`).** It decodes a slice of N capture
enables from ceil(log2(N+1)) tester lines. Code 0 selects none and code k
selects enable k-1. `sdm_top` uses ceil(M/SLICE) slices.

**Variable clock generator (`vcg`).** Three flip-flops synchronize and
edge-detect `trg` against `ref_clk`. The first output pulse comes on the
third reference edge after `trg` rises. The second pulse rises
max(`cnt`,2) reference periods after the first. Each pulse is one
reference period high. The resolution of the measurement is therefore
one `ref_clk` period. `trg` must return low before the next pair; an edge
during a pair is ignored.

**Clock select (`clk_select`).** `clk = cs ? pulse : tck`. It is a plain
multiplexer, so the tester may switch `cs` only while both clocks are
low.

## Top-level interface (`sdm_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NFF` | 12 | scan flip-flops; clusters M = ceil(NFF/N) |
| `N` | 3 | flip-flops per cluster (last cluster holds the rest) |
| `SIG_LEN`, `SIG_POLY` | 8, 8'h1D | signature length and feedback polynomial |
| `SLICE` | 2 | capture enables per decoder slice |
| `CNT_W` | 8 | width of `cnt` (clock widths up to 255 reference periods) |
| `LATCH_OWNER` | all 0 | latch sharing map |

Pins:

* clocks and resets: `tck`, `ref_clk`, `rst_ff` (flip-flops and
  generator), `rst_sig` (signature registers);
* clock generation: `cs`, `trg`, `cnt`;
* scan: `se0`, `se1`, `lk`, `sci`, `sco`;
* signatures: `sge`, `scj[NSLICE][ENC_W]`, `sgo`;
* functional path: `func_d`, `func_q`. They connect the flip-flops to the
  logic whose paths are measured, which sits outside this module.
  Flip-flop j of cluster i is bit i*N+j.

Resets are asynchronous and active high. All storage except the latches
uses the rising edge of the selected clock.

## Where this RTL departs from the paper or fills gaps

* **Clock generator.** The paper uses an analog phase-interpolator
  generator with picosecond steps. Here it is replaced by a digital
  counter, which makes the resolution one `ref_clk` period.
* **Decoder code width.** The paper sizes the `scj` code at ceil(log2 N)
  bits. This RTL uses ceil(log2(N+1)) so that "no capture", needed on
  most shift clocks, has a code of its own.
* **Signature length.** The paper's evaluation uses 8-bit signature
  registers; its worked example and gate-level description use 4 bits.
  8 is the default. The 4-bit register is also tested.
* **Filled gaps.** The paper gives none of these, so they are this
  design's choices:
  * the signature polynomial and LFSR form;
  * shifting in read-out mode regardless of `sck`;
  * the read-out chain order and its zero input;
  * the reset style;
  * the latch polarity;
  * the `LATCH_OWNER` encoding;
  * the default size NFF=12 and SLICE=2.
* **Test application.** The testbenches use launch-on-capture: the first
  pulse is a functional clock.
* **Read-out timing.** The paper reports a 0.71 ns delay from `sge` to
  `sgo` for its implementation. Here `sgo` is a register output: a change
  of `sge` reaches it only through the next clock edge.
* **Pins.** The paper names a single scan-enable pin, but its flip-flop
  needs two selects. Both `se0` and `se1` are pins.
* **Not built.** The tester, the analog generator, and the design-time
  search for latch sharing. The benchmark circuits used in the paper's
  evaluation have 179 to 1728 flip-flops. The RTL holds them by setting
  `NFF` (for example NFF=179 gives 60 clusters). The default build has 12.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

* `tb_sdm_top`: the chip at its default parameters. It plays tester and
  circuit under test. The circuit model is a delay line of a known number
  of `ref_clk` periods per path. The testbench makes 36 path measurements in 9
  stages, with N_meas = 100 and 200. It checks:
  * every reload and capture;
  * every signature;
  * that each estimated delay equals the true one;
  * 1+N tester clocks per step;
  * that `cs` is switched only while both clocks are low;
  * that every mechanism (shift, store, reload, pass, fail, parallel and
    idle captures, second stage, read-out) happened.
* `tb_sdm_top_shared`: the same with 11 flip-flops and a shared-latch
  map. This gives a short last cluster and 8 latches.
* `tb_sdm_example`: the paper's small worked example. It has three
  flip-flops in one cluster and a 4-bit signature register. The normal
  clock is 10 ns and the resolution 2 ns, so five tests run at widths of
  10, 8, 6, 4 and 2 reference periods of 1 ns. Each delay is located
  within its 2 ns interval.
* The block testbenches use random stimulus against independent models:
  the signature model is polynomial division, the generator is checked by
  counting reference edges.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdm_pkg.sv \
    tb/tb_sdm_top.sv --top-module tb_sdm_top -o sim
./obj_dir/sim
```

Use the same command for any other testbench, replacing the `tb_*.sv`
file and the top module name. `sdm_pkg.sv` must come first. Each
testbench runs in well under a second.

Lint gives two warnings that are expected:

* It may report `NOLATCH` for `vector_latch`, although synthesis infers
  the intended latch.
* It may report unused constants of `sdm_pkg`.
