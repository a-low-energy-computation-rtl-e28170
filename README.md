# SVM classification accelerator for low-energy biomedical monitoring

Wearable and implantable monitors must recognise physiological states, such
as an abnormal heartbeat, from a patient's signals on a power budget of
microwatts to milliwatts. A data-driven detector has two stages: feature
extraction, then a trained classifier. Feature extraction is cheap but needs
flexibility, so it stays in software on a small processor. The classifier is
a support vector machine (SVM) with a non-linear kernel, and it dominates the
energy. Its cost grows with the number of support vectors (N_SV, thousands)
and their dimension (D_SV, tens to hundreds).

This RTL is the dedicated classifier that sits next to such a processor. It
evaluates the polynomial-kernel SVM decision

    class = sgn( sum_i  F_i * (x . sv_i + beta)^d  -  b ),   d = 1..4

for one test vector `x`. It uses six multiply-accumulate units in parallel,
because the design point is a slow clock at a very low supply voltage.
Reconfiguration is limited to where applications differ:

* model size (D_SV, N_SV) and the number of MAC units in use;
* arithmetic precision (8, 10 or 12 bits) and accumulator truncation;
* kernel order (linear, quadratic, cubic, quartic).

The architecture follows the accelerator published by Shoaib, Jha and Verma
("A Low-energy Computation Platform for Data-driven Biomedical Monitoring
Algorithms", DAC 2011). The published work describes a transistor-level
design in a 150 nm FD-SOI process. This RTL is a synthesizable description of
its logic. The section "Where this RTL departs from the published design"
lists every point where it departs from that design or fills a gap.

## Block diagram

```
             host (processor)
   cfg_*  tv_*      sv_*              coef_*        clear/start
     |      |        |                   |              |
 +---v---+  |  +-----v------+      +-----v------+  +----v------+
 |status |  |  |SV preload 0|-->   |kernel coef |  |control_blk|--> busy, done,
 | regs  |  |  |SV preload 1|-->.. |  buffer    |  | sequencer |    rejects, seq_count
 +---+---+  |  |   ...  5   |      +-----+------+  +--+--+--+--+
     | cfg  |  +-----+------+ sv[j]      | F          |  |  |  SEL_BUF, SEL_MAC,
     |  +---v----+   |                   |            |  |  |  mac_en/clr, ker_en
     |  |TV line |   |                   |            |  |  |
     |  | buffer |   |                   |            |  |  |
     |  +---+----+   |                   |            |  |  |
     |      | x[d]   |                   |            |  |  |
     |  +---v--------v---+  dot[0..5]  +-v-----------+|  |  |
     |  | MAC engine     |--> SEL_MAC->| poly_kernel |<--+--+
     |  | 6 x vp_mac     |    mux      | (+beta)^d*F |--> class_res (24 b)
     |  +----------------+  top 12 b   | + REG 24    |--> class_pos (sign)
     |                                 +-------------+
```

| Module         | Role                                                                 |
|----------------|----------------------------------------------------------------------|
| `svm_accel`    | top level; wires the blocks below                                    |
| `svm_pkg`      | sizes, configuration record `cfg_t`, register map, select encodings  |
| `status_regs`  | programmable configuration, legality check `cfg_ok`                  |
| `control_blk`  | write-phase gating, compute sequencer, saturating buffer counter     |
| `sv_tv_buffer` | 4 x 16 x 12-bit register file: shift-register write, mux-tree read   |
| `mux_tree`     | hierarchical 2:1 read multiplexer of a buffer                        |
| `mac_engine`   | six `vp_mac` units sharing the TV word                               |
| `vp_mac`       | variable-precision radix-4 Booth MAC with a 16-bit accumulator       |
| `booth_enc`    | one Booth partial product `x * delta_i(y)`                           |
| `cba`          | carry-bypass adder with 4-bit groups (all adders of MAC and kernel)  |
| `kcoef_buffer` | per-support-vector scale factors F_i                                 |
| `poly_kernel`  | `(DOT_PROD + beta)^d * F` and the 24-bit class accumulator           |

Default sizes, all in `svm_pkg`: 6 MACs, 12-bit words, buffers of four
16-word banks (64 words), a 16-bit MAC accumulator, a 24-bit class
accumulator and 8192 write sequences per classification. These are the
published numbers.

## How a model is mapped onto the buffers (write sequences)

This is the part to understand before using the accelerator. Each buffer
(the TV line buffer and each of the six SV preload buffers) holds only 64
words. A real model is far larger: for example 10,000 support vectors of 256
dimensions. A classification is therefore a series of **write sequences**. In
each one the host refills the buffers and the accelerator adds that part's
contribution to the 24-bit class accumulator. The accumulator is only reset
by `clear`, which also loads `-b`, so the sum runs over all sequences. Up to
8192 sequences are allowed after a `clear`.

Within one sequence, with the registers `DIM` = D (dimensions held) and
`NSV` = Nb (support vectors per SV buffer), where `D * Nb <= 64`:

* The TV buffer holds `x[0..D-1]` at addresses 0..D-1.
* SV buffer `j` holds `Nb` support vectors one after another. The SV in slot
  `n` has dimension `d` at address `n*D + d`. MAC `j` works on buffer `j`,
  so one sequence covers up to `6*Nb` support vectors.
* The coefficient buffer holds `F` for slot `(n, j)` at address `n*6 + j`.

For `n = 0..Nb-1` the sequencer runs D MAC cycles. In each cycle all active
MACs take TV word `d` and their own SV word; the address is a counter that
runs up to `D*Nb` and stops there. The sequencer then runs one kernel cycle
per active MAC: `SEL_MAC` = 0..nmac-1 feeds dot product `k` and `F[n*6+k]`
to the kernel. Then it clears the MACs. **A sequence takes
`Nb * (D + nmac)` clock cycles** from the edge that takes `start` to the
edge that raises `done`.

**Dot products longer than 64 dimensions** are split into 64-dimension
chunks, one per sequence, with `Nb = 1`:

* The first chunk runs with `dot_cont = 0, dot_last = 0`. It clears the MAC
  accumulators and skips the kernel.
* Middle chunks run with `dot_cont = 1, dot_last = 0`. They keep the
  accumulators.
* The last chunk runs with `dot_cont = 1, dot_last = 1` and runs the kernel.

For example, D_SV = 256 takes 4 sequences for each group of 6 support
vectors.

**Load order.** Every buffer is a shift register whose input is address 0:
each write moves every word one place up. The host therefore sends each
buffer's highest address first and address 0 last.

* The TV buffer and the coefficient buffer need only as many writes as
  they have words in use.
* The six SV buffers form one chain: buffer 0's top word feeds buffer 1.
  Every SV load therefore shifts the whole chain, 6 x 64 words: buffer 5's
  words first, then buffer 4's, and so on down to buffer 0.

Loads are accepted only while `busy` is low, one word per clock per port.
This is the "write phase". A load or register write attempted during a
computation is dropped and flagged on `load_reject` / `cfg_reject`. A
`start` is refused (`start_reject`) when the configuration is illegal or
8192 sequences have already run.

## Variable-precision MAC (`vp_mac`)

The multiplier is radix-4 Booth. Six encoders (`booth_enc`) turn the 12-bit
multiplier `y` into digits `delta_i = y[2i-1] + y[2i] - 2*y[2i+1]`, each in
{-2..2}. They produce partial products `PP_i = x * delta_i`, weighted `4^i`.

Precision is scaled by adding fewer partial products:

* A p-bit operand is placed in the top p bits of `y`. The lowest
  `(12-p)/2` digits are then zero.
* Partial products PP2..PP5 are compressed by two rows of 3:2 compressors
  and added by **CBA-0**. Its result is the 8-bit product.
* **CBA-1** adds PP1 for the 10-bit product.
* **CBA-2** adds PP0 for the 12-bit product.
* The precision-select multiplexer (`prec`) picks CBA-0, 1 or 2, which gives
  a 16-, 20- or 24-bit product. The adders that are not needed see constant
  zero inputs; in silicon they are power-gated.

Operands are two's complement. A p-bit operand sits right-aligned and
sign-extended in its 12-bit buffer word.

The truncation-select multiplexer (`trunc`) keeps the **most significant**
8, 10 or 12 bits of the product. The 16-bit adder **CBA-3** adds them,
sign-extended, into the accumulator, which wraps on overflow. Stronger
truncation leaves more headroom, so longer dot products fit. With 8-bit
truncation, 256 terms cannot overflow 16 bits.

Timing: the multiplier and adders are combinational from the buffer read to
the accumulator register, which updates on every clock with `en`.

## Polynomial kernel (`poly_kernel`)

The kernel input DOT_PROD is the top 12 bits of the selected MAC's 16-bit
accumulator.

```
V  = DOT_PROD + beta                       CBA0, 12 bit, wraps
R  = V*V                                   MUL0  12x12x24
S  = R * (SEL0 ? R : V)                    MUL1  12x12x24  (4th / 3rd power)
KR = SEL2 ? S : (SEL1 ? R : V)             order 1..4
K  = KR * F                                MUL2  12x12x24
REG24 <= REG24 + K                         CBA1, 24 bit, on ker_en (Ker_CLK0)
```

| order | SEL2 | SEL1 | SEL0 |
|-------|------|------|------|
| 1     | 0    | 0    | x    |
| 2     | 0    | 1    | x    |
| 3     | 1    | x    | 0    |
| 4     | 1    | x    | 1    |

**Number format:**

* `DOT_PROD`, `V`, `R`, `S`, `KR`, `beta` and `F` are read as Q1.11
  fractions in [-1, 1).
* A 24-bit product that goes back into a 12-bit multiplier or multiplexer is
  shifted right by 11 and saturated to 12 bits.
* `K` keeps the full product (Q2.22), so the class accumulator counts in
  units of 2^-22.
* `clear` loads the `BIAS` register (which should hold `-b`, in the same
  units) into the accumulator.
* `class_pos` is 1 when the accumulator is >= 0.

The whole path from DOT_PROD to REG 24 is combinational. One support vector
is absorbed per clock.

`F_i` plays the role of `alpha_i * y_i` of the SVM decision, with any
normalisation folded in. It comes from the kernel coefficient buffer, one
word per support vector.

## Buffers (`sv_tv_buffer`, `mux_tree`)

Each buffer has four banks of 16 x 12-bit registers, chained as one shift
register for writes. Reads go through a tree of 2:1 multiplexers (six
levels, one select bit per level) instead of a long bit line. In silicon,
each bank has its own supply, so banks not needed for a small model can be
switched off (`bank_on` in the `CTRL` register) to save leakage.
Here a switched-off bank loses its contents: it reads as zero and passes
zero up the chain. Switching off banks therefore suits small models:

* Load the SV chain with all banks on, then switch the unused upper banks
  off.
* The TV buffer can be reloaded with banks off, as long as D fits in the
  banks that are on.

`buf_reset` clears all buffers.

## Status registers

Writes use `cfg_we/cfg_addr/cfg_wdata` and are refused while `busy` is high.
`cfg_rdata` reads back the addressed register.

| addr | name    | bits                                                        | reset |
|------|---------|-------------------------------------------------------------|-------|
| 0    | `DIM`   | [6:0] D: dimensions per sequence, 1..64                     | 1     |
| 1    | `NSV`   | [6:0] Nb: SVs per SV buffer per sequence, D*Nb <= 64        | 1     |
| 2    | `NMAC`  | [2:0] MAC units in use, 1..6                                | 6     |
| 3    | `ARITH` | [1:0] precision, [3:2] truncation (0 = 8, 1 = 10, 2 = 12 b) | 12/12 |
| 4    | `KSEL`  | [0] SEL0, [1] SEL1, [2] SEL2                                | order 2 |
| 5    | `BETA`  | [11:0] beta (Q1.11)                                         | 0     |
| 6    | `BIAS`  | [23:0] start value of the class accumulator (-b)            | 0     |
| 7    | `CTRL`  | [3:0] bank power, [4] dot_cont, [5] dot_last                | F, 0, 1 |

A configuration is legal (`cfg_ok`) when:

* D and Nb are non-zero and D * Nb <= 64;
* 1..6 MACs are in use;
* the precision and truncation codes are 0..2;
* Nb = 1 whenever `dot_cont` is set or `dot_last` is clear.

## Throughput of the evaluated workloads

The two arrhythmia classifiers both have 10,000 support vectors and a
quadratic kernel; the figures are what the workload testbench measures.

| workload                       | sequences | compute cycles | load cycles |
|--------------------------------|-----------|----------------|-------------|
| wavelet features, D_SV = 256   | 6668      | 436,752        | 2,997,266   |
| morphology features, D_SV = 26 | 834       | 53,342         | 330,284     |

Arithmetic settings: wavelet uses 8-bit precision and truncation; morphology
uses 12-bit precision and 10-bit truncation.

At 3 beats per second the wavelet case needs about 1.3 MHz for the compute
phase alone. The published MAC reaches 520 kHz at 0.4 V in the slow (cold)
corner, 1.0 MHz at room temperature, and about three times more with a
supply less than 50 mV higher. Streaming every support vector through the
one-word-per-clock load port costs about seven times the compute cycles. The
source does not give the bandwidth of its buffer refill path; a wider load
path is the obvious place to extend this RTL.

The small shapes used for the published energy measurements each fit in
one sequence, except 8 x 50, which needs two. Compute cycles: 4 x 5: 10,
8 x 10: 28, 16 x 15: 66, 8 x 25: 70, 8 x 50: 126. The leftover MAC slots of
the last sequence are filled with F = 0.

## Where this RTL departs from the published design

* **Sequence scheme.** The chunking of long dot products (`dot_cont`,
  `dot_last`), the per-sequence layout, the SV-slot numbering of the
  coefficients and the 8192-sequence limit are this design's reading. The
  published text gives 8192 write sequences and a maximum of 4095 support
  vectors at 256 dimensions. This RTL does not enforce the 4095 limit: 8192
  sequences reach 10,000 support vectors at 256 dimensions.
* **Register map, handshakes, reset values** and the rejection rules are
  this design's own.
* **DOT_PROD.** The 16 -> 12-bit step between the MAC accumulator and the
  12-bit kernel input (top 12 bits) is not specified in the source and is
  chosen here.
* **Fixed point.** The Q1.11 kernel format, the saturation of fed-back
  products, the wrap of CBA0 and of the accumulators, and two's-complement
  operands are chosen here.
* **Mux assignments.** Which input of each kernel multiplexer a select value
  picks is chosen here; only the functions are specified.
* **Adder widths.** CBA-0/1/2 are full product width (24 bits) rather than
  the narrower widths of a hand-optimised tree. The read tree is plain
  binary, with six levels.
* **Kernel coefficient buffer.** Its contents (one F per support-vector
  slot), size (384 words) and shift loading are this design's. The source
  only places such a buffer in front of the kernel.
* **Clock gating and power.**
  * The gated write clocks are write enables on one clock.
  * Bank power-down is modelled as loss of contents.
  * Unused adders get zero inputs.
  * Supply scaling, the process and leakage are outside RTL.
* **No overlap of phases.** The MAC array waits while the kernel reads its
  six results, which costs `nmac` cycles per group of support vectors.
* **Not included.** The host processor, its memories, the feature
  extraction (segmentation, wavelet and morphology features, done in
  software) and offline training are outside the accelerator. Only the
  polynomial kernels are built, not RBF.

## Simulating

Every testbench is self-checking. It prints one line
`TB_RESULT checks=N failures=M`, has a watchdog, and compares against an
integer reference model written independently of the RTL.

```
verilator --binary --timing --assert -Irtl -Itb rtl/svm_pkg.sv \
    tb/tb_svm_accel.sv --top-module tb_svm_accel -o sim
./obj_dir/sim
```

Substitute any testbench below for `tb_svm_accel`. `-Irtl` lets verilator
find each module in `rtl/<name>.sv`.

| testbench                | what it covers                                                   |
|--------------------------|------------------------------------------------------------------|
| `tb_svm_accel`           | end to end at default sizes (see the list below)                 |
| `tb_table2_points`       | the small published measurement shapes, kernel orders 2–4        |
| `tb_arrhythmia_workload` | the two 10,000-SV arrhythmia classifiers, with random data       |
| `tb_vp_mac`              | all 9 precision/truncation pairs against integer products        |
| `tb_poly_kernel`         | kernel orders 1–4, saturation, accumulation, sign                |
| `tb_control_blk`         | cycle counts, SEL_BUF/SEL_MAC/coefficient sequences, limits      |
| `tb_sv_tv_buffer`        | chained loads, short loads, hold, bank gating, reset             |
| `tb_mac_engine`, `tb_status_regs`, `tb_kcoef_buffer`, `tb_mux_tree`, `tb_booth_enc`, `tb_cba` | their blocks |

`tb_svm_accel` exercises:

* every precision, truncation and kernel order;
* multi-sequence classification and a chunked 192-dimension dot product;
* partial MAC arrays and a full 64-word buffer;
* bank gating;
* all three reject paths and the 8192-sequence limit.

The whole suite runs in well under a minute. The workload testbench takes
about 10 seconds.

To change a size, edit `svm_pkg` (for example `N_MAC`). Keep the following in
step with it:

* `BUF_DEPTH` must stay a power of two for the read tree's address.
* The register fields in `svm_pkg::cfg_t` must be wide enough.
