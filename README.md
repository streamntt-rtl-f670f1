# StreamNTT in SystemVerilog: a streaming NTT accelerator for HBM FPGAs

Lattice-based post-quantum cryptography spends most of its time in the
number-theoretic transform (NTT), and servers doing such cryptography need
thousands of transforms per second. This RTL is a throughput-oriented NTT
engine modelled on the StreamNTT architecture for HBM-equipped FPGAs such as
the Alveo U280. It was written as plain RTL from the published description of
that accelerator, which itself was built with high-level synthesis.

Three ideas shape it:

* **Every stage is its own hardware.** All log2(n) butterfly stages exist at
  once and work on successive polynomials, like an assembly line. Each stage
  has NBU butterflies side by side, and each butterfly is pipelined to accept
  a new pair every cycle.
* **Reordering lives inside the butterfly.** The distance between the two
  coefficients a butterfly combines halves from one stage to the next. An
  *integrated circular butterfly unit* (ICBU) therefore combines the butterfly
  with a small circular reorder buffer. It writes results in one order and
  reads them out in the order the next stage needs, with both sides running
  at full rate.
* **Many small pipelines, not one big one.** Each pipeline (an *instance*) is
  fed by one HBM channel and writes to the neighbouring channel. Sixteen
  instances on 32 channels avoid wide multiplexers and cross-channel
  arbitration.

At the default configuration there are 16 instances. Each handles n = 1024
coefficients with q = 3221225473 (32-bit coefficients) and NBU = 4. That is
log2(n)·NBU·NNI = 10·4·16 = 640 butterflies. Each instance finishes one
polynomial every n/(2·NBU) = 128 cycles.

## What is computed

For a polynomial a(x) = a_0 + … + a_{n-1}x^{n-1} and a prime q, the
accelerator computes the negacyclic NTT

    A_k = Σ_j a_j · ψ^(j·(2k+1))  mod q,      k = 0 … n-1

Here ψ is a primitive 2n-th root of unity mod q (parameter `PSI`), so
ω = ψ² is an n-th root. The transform is the iterative radix-2
Cooley-Tukey algorithm with ψ folded into the twiddles. Stage s
(s = 0 … log2(n)-1) has stride str(s) = n / 2^(s+1). For each stride group b
(a block of 2·str coefficients) and each j < str, it computes:

    t            = ψ^bitrev(2^s + b) · a[b·2str + j + str]      mod q
    a[b·2str + j]        ← a[b·2str + j] + t                    mod q
    a[b·2str + j + str]  ← a[b·2str + j] − t                    mod q

`bitrev` reverses log2(n) bits. The results come out in **bit-reversed
order**: output position p holds A_bitrev(p). All twiddles are computed at
elaboration time by functions in `ntt_pkg`, so no table files are needed.

## Organisation

```
 HBM ch 2i ──► ntt_instance i ──► HBM ch 2i+1          (i = 0 … NNI-1)

 ntt_instance:
   words ─► in_scatter ─┬─► fifo ─► lstage_line 0   ─► fifo ─┐
                        ├─► fifo ─► lstage_line 1   ─► fifo ─┤
                        │            …                       ├─► xstage_module ─► words
                        └─► fifo ─► lstage_line NBU-1 ─► fifo ┘

 lstage_line i:  icbu(s=0) ─► icbu(s=1) ─► … ─► icbu(s=NL-1)      NL = log2 n − log2 NBU − 1
 xstage_module:  NBU × (log2 NBU + 1) butterflies, strides NBU, NBU/2, … 1
```

Butterfly i of an early stage handles j = i, i+NBU, i+2·NBU, … In these
stages the stride is larger than NBU, so lane i only ever talks to lane i of
the next stage. Each lane's chain of units forms one module, an **L-stage
line**, with no FIFOs inside. Once the stride is NBU or less, each
butterfly's results go to several butterflies of the next stage. These
**X-stages** are merged into one module that works on a whole window of
2·NBU consecutive coefficients per cycle. That window arrives with all
results in place, so it needs no reorder buffer. Between modules, depth-2
FIFOs carry the coefficient pairs.

With n = 1024 and NBU = 4 there are 7 L-stages (strides 512 … 8) and 3
X-stages (strides 4, 2, 1).

### Word format at the ports

Each input or output word has 2·NBU coefficients of W bits: 8 × 32 = 256
bits at the defaults, the width of one HBM channel port. Coefficient slot s
occupies bits `[s*W +: W]`.

* **Input word t** (t = 0 … n/(2·NBU)−1): slot i holds a[t·NBU + i], and slot
  i+NBU holds a[n/2 + t·NBU + i]. So each word carries NBU coefficients from
  the lower half of the polynomial and the matching NBU from the upper half.
  Lane i receives exactly the stage-0 pair (a_j, a_{j+n/2}) it needs. This
  layout is this design's choice. A memory reader produces it by reading the
  two halves of the polynomial alternately.
* **Output word k**: slot e holds output position k·2·NBU + e, which is
  A_bitrev(k·2·NBU+e).

Polynomials follow each other with no separator: the instance counts words.
After reset it runs freely. There is no start/stop control, only the
valid/ready handshakes.

## The integrated circular butterfly unit (`icbu`)

This is the heart of the design and the part that needs the most care.

Take lane i of stage s, with stride str and L = str/NBU. Its input is
divided into **windows** (stride groups). Each window is L pairs
(a_m, a_{m+str}), where m = b·2·str + c·NBU + i and c = 0 … L−1. The next
stage has half the stride, so the unit must send out pairs (a_m, a_{m+str/2})
instead. It does this with a buffer of 2L words, the same size as the
original unit (2·str/NBU).

*Logical slots.* Write number c of a window stores the butterfly's "sum"
result in logical slot c and its "difference" result in slot L+c. Read number
r′ of a window (r′ = 0 … L−1) takes logical slots hi·L + lo and
hi·L + L/2 + lo, where hi is the top bit of r′ and lo the remaining bits.
Reads r′ < L/2 produce the pairs of the window's first half and the rest the
second half. This matches `rbuf[wptr]`/`rbuf[wptr+str]` on the write side
and `rbuf[rptr]`/`rbuf[rptr+str/2]` on the read side, counted in lane-local
entries.

*Circular reuse without extra space.* The next window must start writing
while the current one is still being read, or the rate would halve. Read r′
frees two physical slots. Write c = r′ of the next window needs exactly those
two slots if every second window swaps the two top bits of the slot address.
The unit therefore uses the identity mapping for even windows and the swap
for odd windows. The parity is one bit of the write or read counter.

*Flow control.* The unit keeps two counters, W (writes) and R (reads).

* Write W may happen once read W−L has happened. A read in the same cycle
  counts, because the buffer is read before the clock edge writes it.
* Read R (position r′ in its window) needs writes up to r′ + L/2 of its
  window when r′ < L/2, and up to r′ otherwise.

In steady state this gives one pair per cycle on both sides, even for the
smallest L-stage buffer (L = 2, 4 entries). The read side lags the write side
by L/2 + 1 pairs.

The butterfly pipeline (3 cycles) stalls as a whole when the buffer cannot
accept its result. That is how a pipelined loop in HLS behaves. The output is
a register that holds its value until it is taken.

*Four banks.* The buffer is split into four banks of L/2 entries each, selected
by the two top bits of the physical slot address. The two slots of a write
always differ in one of those bits, and so do the two slots of a read. Each
bank therefore needs only one write port and one read port.

*Shared twiddle table.* The unit does not hold its own twiddle table. It
shows the stride group of its input pair on `tw_grp` and takes the twiddle
on `tw` in the same cycle. In an L-stage line, stages 2p and 2p+1 share one
two-port table (`twiddle_rom_dp`). Their twiddles ψ^bitrev(2^s + b) form the
contiguous range 2^(2p) … 2^(2p+2)−1 of one table, and each unit reads it
through its own port. An odd last stage has a table of its own.

The unit needs L ≥ 2, i.e. str ≥ 2·NBU. That holds for every L-stage by
construction.

## The X-stage module (`xstage_module`)

This module joins the NBU lanes. It takes a window once every lane has a
pair, and it stalls as one pipeline. Lane i supplies elements i and i+NBU of
window k, i.e. of coefficients k·2·NBU … k·2·NBU+2·NBU−1. The module then
runs log2(NBU)+1 stages of NBU butterflies each. In the stage with stride
str, butterfly i combines elements g·2·str + j and g·2·str + j + str, where
g = i / str and j = i mod str. Its twiddle belongs to stride group
k·(NBU/str) + g. The str butterflies of one group always read the same
entry, so they share one table. The table is indexed by the window number,
which each stage counts as windows enter it. Latency is
3·(log2 NBU + 1) cycles (9 at the defaults), with one window per cycle.

## Butterfly and modular arithmetic

`bu_core` computes t = tw·a_js mod q in `mod_mul` (two stages). It then forms
x = a_j + q − t and y = a_j + t, each followed by a single conditional
subtraction of q, and registers the results. Only the product needs a real
modular reduction; the additions only need this correction.

`mod_mul` uses **Barrett reduction** with k = W. It works for any modulus
with 2^(W−1) ≤ q < 2^W, which covers all four moduli below. The original
accelerator used a different reduction, specialised to its moduli.

## Timing (measured in simulation)

| configuration | NBU | cycles per polynomial (per instance) | latency, first word in to last word out |
|---|---|---|---|
| n = 1024, q = 3221225473 (default, 16 instances) | 4 | 128 | ≈300 cycles |
| n = 1024, q = 12289 | 8 | 64 | ≈170 cycles |
| n = 256, q = 8380417 | 8 | 16 | ≈64 cycles |
| n = 256, q = 7681 | 16 | 8 | ≈46 cycles |

At 306 MHz, the clock reported for the original U280 build, the default
configuration would give 16 · 306 MHz / 128 ≈ 38 M polynomials/s if the
memory always kept up. A simulated batch of 10,000 polynomials (625 per
instance, memory side always ready) took 80,173 cycles, 128.3 cycles per
polynomial per instance, i.e. 38.2 M polynomials/s at 306 MHz. The original
accelerator measured 32.4 M polynomials/s on the board, including real HBM
behaviour.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | transform size n (power of two, ≥ 4·NBU) |
| `Q` | 3221225473 | prime modulus, 2^(W−1) ≤ Q < 2^W, q ≡ 1 mod 2n |
| `W` | 32 | coefficient width |
| `PSI` | 1168849724 | primitive 2n-th root of unity mod Q |
| `NBU` | 4 | butterflies per stage (power of two) |
| `NNI` | 16 | number of instances |
| `NCH` | 32 | HBM channels, must be 2·NNI |

Other configurations used with this architecture, with PSI values that work:
(256, 7681): W = 13, NBU = 16, PSI = 4055; (256, 8380417): W = 23, NBU = 8,
PSI = 6757063; (1024, 12289): W = 14, NBU = 8, PSI = 1945. For a smaller n
with the default q, use PSI = 1168849724^(1024/n) mod q.

The reference arithmetic is 64-bit, so Q must be below 2^32.

NBU sets how much memory bandwidth an instance uses. Each instance reads and
writes one word of 2·NBU·W bits per cycle, on its own pair of channels. The
rule used for the original configurations is NBU = EBW / (W · f_clk), where
EBW is the effective bandwidth of one HBM channel. Smaller coefficients
therefore allow more butterflies per stage.

## Where this RTL departs from the original design

* **Modular reduction:** Barrett here, where the original uses a
  special-form method.
* **Twiddle tables:** the tables are constant arrays with combinational reads
  (LUT ROM), not registered BRAM reads. Which butterflies share a table is
  this design's choice: pairs of L-stages, and same-group X-stage
  butterflies. The tables of lane i and lane i' at the same L-stage are
  identical but not shared, because the lanes are separate modules.
* **Reorder buffer banks:** the buffer uses four banks, as the original does.
  How slots map onto the banks is this design's choice.
* **Buffer address scheme and flow control** (window-parity bit swap) are
  this design's own. Only the buffer size, the circular use and the
  half-stride read come from the original.
* **HBM and AXI:** the memory channels and their AXI port logic are not part
  of this RTL. Each channel is a valid/ready word stream at the top level.
  The input word layout (lower and upper half interleaved) is this design's
  choice.
* **Pipeline depths and FIFO depths** (3-cycle butterfly, depth-2 FIFOs) are
  choices. The original left them to the HLS tool.
* **Reset:** an active-low synchronous reset clears counters and valid bits.
  Data registers and buffers are not reset.

## Verification

Each module has a self-checking testbench in `tb/`. Results are compared with
arithmetic written independently in `tb/ntt_ref_pkg.sv`: a direct O(n²)
evaluation of the NTT definition, and a whole-array butterfly stage for the
per-stage tests.

| testbench | what it covers |
|---|---|
| `tb_streamntt_top` | full default configuration (16 × n=1024). Every result is checked. The rate is one polynomial per 128 cycles. Checks input stalls, output holds and all instances running together |
| `tb_throughput` | 10,000 polynomials through the full default configuration; reports the sustained rate and checks every result |
| `tb_workloads` | one instance each of (256, 7681, NBU 16), (256, 8380417, NBU 8), (1024, 12289, NBU 8) |
| `tb_ntt_instance` | n = 64 pipeline with and without random gaps and back-pressure, including its rate |
| `tb_icbu` | stage 1 (16-entry buffer) and stage 3 (4-entry buffer); one pair per cycle; buffer-full waits |
| `tb_lstage_line`, `tb_xstage_module` | the merged modules against the whole-array stages, with their rate and latency |
| `tb_bu_core`, `tb_mod_mul`, `tb_twiddle_rom`, `tb_twiddle_rom_dp`, `tb_stream_fifo`, `tb_in_scatter` | the building blocks |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ntt_pkg.sv tb/ntt_ref_pkg.sv tb/tb_streamntt_top.sv \
    --top-module tb_streamntt_top -o sim
./obj_dir/sim
```

The full-size top-level test takes about a minute to build and a few seconds
to run.

## Files

`rtl/`: `ntt_pkg` (shared constants and twiddle functions), `streamntt_top`,
`ntt_instance`, `in_scatter`, `stream_fifo`, `lstage_line`, `icbu`,
`xstage_module`, `bu_core`, `mod_mul`, `twiddle_rom`, `twiddle_rom_dp`.
`tb/`: `ntt_ref_pkg` and one `tb_<module>` per module, plus `tb_throughput` and `tb_workloads`.
