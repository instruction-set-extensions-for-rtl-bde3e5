# Forward-error-correction instructions for a multithreaded SIMD vector unit

Baseband processing for software-defined radio spends most of its time in a
few kernels: convolutional encoding, the add-compare-select step of Viterbi
decoding, the add-saturate-compare-select step of turbo decoding, and Galois
field arithmetic for Reed-Solomon codes. On a plain DSP each of these turns
into many shifts, masks, branches or table look-ups per bit or symbol. This
design adds ten vector operations for those kernels to the SIMD unit of a
token-threaded DSP core. Each operation runs in every one of the four
16-bit vector lanes at once.

The extensions sit in a pipeline that has eight threads and eight stages.
The threads issue in a fixed rotation, so each operation has several cycles
of slack, and fairly deep logic fits without adding stages or hazard
hardware. All operations here complete in the first execute stage. Three
more execute stages are still free.

## The vector unit and its threads (`sb_vpu`, `token_scheduler`)

One thread issues per clock cycle. A *token* names it. `token_scheduler`
holds a next-thread table. On each clock edge the token moves from its
current holder to that thread's entry in the table. After reset the
order is

    T0 -> T7 -> T2 -> T5 -> T4 -> T3 -> T6 -> T1 -> T0 ...

The table can be rewritten (`sched_cfg_*`) to run round robin, even/odd or
any other order. A new entry takes effect the next time the token passes that
thread.

Each operation then goes through eight stages:

| stage | what happens here                                            |
|-------|--------------------------------------------------------------|
| ID    | decoded operation captured with its thread number            |
| RR    | the thread's vector, accumulator and GF configuration registers are read |
| E1    | the four `vpe_ext` lanes and the `reduction_unit` compute    |
| E2-E4 | result carried (room for up to three more stages of logic)   |
| XF    | transfer                                                     |
| WB    | register write; VSTORE / VACCRD results appear on the ports  |

Suppose an operation issues in cycle 0. It writes back at the clock edge
that ends cycle 8. Its store output (`st_*` or `acc_*`) is visible during
cycle 8. With an order that visits all eight threads, the same thread does
not issue again before cycle 8. Its next operation reads registers in
cycle 10, after the write. That guarantee is why the unit has **no
forwarding paths and no dependency checks**.

If you reprogram the token order to a cycle shorter than eight threads, the
guarantee is lost. In that case the software must leave gaps: issue no
operation, i.e. `instr_valid = 0`. The assertion `a_no_reissue` reports any
thread that issues while one of its operations is still before WB.

Each thread has its own registers:

* 8 vector registers of 64 bits. Each holds four 16-bit elements, one per
  lane.
* 4 accumulators of 40 bits.
* One Galois-field configuration register: polynomial `P` (8 bits) and
  length code `L` (3 bits).

### Operations

Operations arrive already decoded as a `vinstr_t`: an opcode, destination
`vd`, sources `va`, `vb` and `vc`, and an accumulator index `ac`. The
compound-instruction encoding of the host processor is not modelled.

| op                    | per lane (a, b, c = elements of va, vb, vc)                   |
|-----------------------|---------------------------------------------------------------|
| `UPDATE_SHIFTER`      | vd = shift a[IL-1:0] into state c[CL-1:0]; lengths in b        |
| `CONVOLVE`            | vd[1:0] = { ^(a & b[15:8]), ^(a & b[7:0]) } on 8-bit states    |
| `ACS_SELECT_METRIC`   | vd = max(b + a, c - a)                                         |
| `ACS_SET_FLAG`        | vd = (b + a > c - a) ? 0 : 1                                   |
| `SELECT_STATE`        | vd = (a == 0) ? b : c                                          |
| `ASCS_TURBO`          | vd = max(sat16(a - b), sat16(a + b))                           |
| `GFMUL` / `GFMAC`     | vd[7:0] = a[7:0] (x) b[7:0] (xor c[7:0] for GFMAC); vd[15:8] = 0 |
| `GFMUL2` / `GFMAC2`   | the same on both bytes of the lane                             |
| `VMULREDS`            | ac = sat40 sum over lanes of sat32(2 * a * b), see below       |
| `SET_GFCFG`           | GF config = { L = va lane0[10:8], P = va lane0[7:0] }          |
| `VLOAD` / `VSTORE` / `VACCRD` | vd = `ld_data` / `st_data` = va / `acc_data` = ac      |

The ACS metrics wrap at 16 bits and are compared as signed numbers. A tie
selects the second metric, with flag 1.

`VLOAD`, `VSTORE` and `VACCRD` stand in for the load/store unit and the
accumulator bus, which are outside this RTL. `SET_GFCFG` is this design's
way of loading the special-purpose GF register.

The `ev` output reports special cases of the operation in WB:

* `ev[0]`: a turbo metric was clamped.
* `ev[1]`: an ACS lane chose the second metric.
* `ev[2]`: a vmulreds product was clamped.
* `ev[3]`: the vmulreds accumulator was clamped.

## Programmable convolutional encoding (`conv_update_shifter`, `conv_convolve`)

A rate k/n convolutional encoder is a shift register plus XOR networks. For
example, the classic rate-1/2, constraint-length-3 code has generators 7
(111) and 5 (101). Two operations make every parameter programmable.

**update_shifter** shifts Input Length (IL) new bits into a register of
Constraint Length (CL) bits, moving it to the right:

    next = ({data[IL-1:0], state[CL-1:0]} >> IL)[CL-1:0]

Bit 0 of the data is the oldest new bit. CL and IL each range from 1 to 8.
The lengths operand stores them as CL-1 in bits 6:4 and IL-1 in bits 2:0,
so one register holds both encoder constants.

The hardware has three logarithmic barrel shifters, each with three levels
of 2:1 multiplexers:

1. **Align.** Shift the state left by 8-CL, so that its newest bit sits at
   bit 7. Bits above CL fall off.
2. **Insert.** Shift `{data, aligned}` right by IL. The oldest IL state
   bits drop out and IL data bits come in at the top.
3. **Return.** Shift right by 8-CL, so that the result is right-aligned
   again. The amount 8-CL is the bitwise complement of the 3-bit code
   CL-1, so no subtractor is needed.

**convolve** computes each output bit as the XOR of the state bits that its
tap word selects. There are two 8-bit tap words, for at most two output
bits. A shorter constraint length simply has zero taps above it.

A rate-1/2 encoder step is therefore `update_shifter` followed by
`convolve`, in all four lanes at once.

## Viterbi and turbo metric updates (`viterbi_acs`, `select_state`, `turbo_ascs`)

The Viterbi add-compare-select step uses one datapath for two operations.
It forms both candidate metrics:

    Metric1 = PM1 + BM
    Metric2 = PM2 - BM

It then compares them. The `output_sel` input returns either the winning
metric (`acs_select_metric`) or the decision flag (`acs_set_flag`). The
flag is 0 when Metric1 wins and 1 on a tie or when Metric2 wins.
`select_state` uses that flag later to pick each state's surviving
predecessor.

Why one branch metric serves both paths: in a rate-1/2 code whose
generators both tap the newest and the oldest bit, the two branches
entering a state carry complementary code bits. Their correlation metrics
are therefore BM and -BM. The (7,5) and the constraint-length-5 GSM codes
are of this kind.

Metrics are correlations, so larger is better. They are signed 16-bit
values that wrap rather than saturate. Normalise them in software if a
packet is long enough to reach 2^15.

`turbo_ascs` computes the saturated sum and the saturated difference of two
metrics and keeps the larger. Both results are clamped to the 16-bit range.

## Galois-field multiply-accumulate (`gf_multiplier`, `gf_poly_reduce`, `gf_mac_unit`)

Reed-Solomon coding needs multiplication in GF(2^m). The field size m and
the field polynomial must be programmable. Each GF unit works in four steps:

1. An 8x8 carry-less multiplier forms the 15-bit product C. It is an array
   of AND gates followed by XOR trees.
2. A left shifter moves C up by 8-m.
3. A fixed reduction modulo x^8 + P runs in seven stages. Each stage
   clears one product bit from bit 14 down to bit 8 and uses eight AND and
   eight XOR gates.
4. A right shifter moves the 8-bit remainder back down by 8-m.

Why the two shifters work: multiplying both C and the field polynomial by
x^(8-m) multiplies the remainder by the same factor. So one degree-8
reduction unit serves every field size. This fixes the format of the
configuration register:

* `L` = m-1.
* `P` holds the field polynomial's coefficients below x^m, shifted left
  by 8-m.
* For the DVB-T field GF(256), with x^8+x^4+x^3+x^2+1: L = 7 and
  P = 8'h1D.
* For GF(16), with x^4+x+1: L = 3 and P = 8'h30.

Operands must be elements of the field, i.e. below 2^m.

A GFMAC unit also XORs an accumulator byte into the result when `mac` is
set. A GFMUL unit (`HAS_ACC = 0`) leaves that out. `sb_vpu` and `vpe_ext`
have two parameters for this:

* `NGF` sets how many units each lane has. The default is 2, which gives
  eight GF multiplies per vector operation.
* `GF_MAC` selects GFMAC (1, the default) or GFMUL units. With GFMUL
  units, gfmac/gfmac2 return the plain product. The accumulate is then a
  separate XOR in software.

## Sum of squares (`reduction_unit`)

`VMULREDS` combines the four lanes into a 40-bit accumulator. Each lane
product is a Q15 fractional multiply: 2·a·b, saturated to 32 bits. Only
(-1)·(-1) saturates. The four products are added to the accumulator in
lane order, with a 40-bit saturation after each addition. The Q15 format
and the lane order are choices made here.

## Files

| file | contents |
|------|----------|
| `rtl/sb_vpu_pkg.sv` | sizes, `vop_e` opcodes, `vinstr_t`, `gfcfg_t`, operand field positions |
| `rtl/sb_vpu.sv` | top: threads, registers, pipeline, four lanes, reduction unit |
| `rtl/token_scheduler.sv` | token-triggered thread order |
| `rtl/vpe_ext.sv` | one lane's extension datapath and opcode decode |
| `rtl/conv_update_shifter.sv`, `rtl/conv_convolve.sv` | convolutional encoding |
| `rtl/viterbi_acs.sv`, `rtl/select_state.sv`, `rtl/turbo_ascs.sv` | trellis metric updates |
| `rtl/gf_multiplier.sv`, `rtl/gf_poly_reduce.sv`, `rtl/gf_mac_unit.sv` | GF arithmetic |
| `rtl/reduction_unit.sv` | vmulreds |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All logic is synthesizable. Apart from the pipeline and register files in
`sb_vpu` and the table in `token_scheduler`, the modules are purely
combinational. Reset is asynchronous and active low, and clears every
register.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/sb_vpu_pkg.sv tb/tb_sb_vpu.sv --top-module tb_sb_vpu -o sim
    ./obj_dir/sim

Replace `sb_vpu` with any module name to run its testbench.

`tb_sb_vpu` runs the top at its default parameters. Every thread executes
a random program of about 10,000 operations in total. A per-thread register
model predicts every stored vector and accumulator. The testbench also
checks:

* the 8-cycle issue-to-result latency;
* a chain of dependent operations in one thread;
* three token-order changes: round robin, even/odd, and back to the reset
  order.

Three further testbenches run the workloads the unit was designed for, on
the full unit at default parameters:

* `tb_conv_encoder_workload`. It encodes a 512-bit packet with a
  constraint-length-5, rate-1/2 code. The packet is cut into 32 segments,
  one per lane of each of the eight threads. Each segment starts from the
  state left by the bits before it. Per bit the thread issues VLOAD,
  UPDATE_SHIFTER, CONVOLVE and VSTORE. The whole packet takes 544 cycles.
* `tb_viterbi_workload`. It decodes 344 trellis steps of the (7,5) code
  from 6-bit soft pairs. The four states map onto the four lanes. The
  testbench computes the branch metrics, gathers the predecessor metrics
  and traces back, since those steps belong to the processor's other
  units. The result is compared with an independent integer Viterbi
  decoder.
* `tb_rs_syndrome_workload`. It computes the 16 syndromes of DVB-T
  RS(204,188) codewords with GFMAC2, by Horner's rule, with eight
  syndromes per vector. It checks a clean codeword (all syndromes zero)
  and one with eight symbol errors. Both words together take 3311 cycles,
  on four threads.

`tb_sb_vpu` fails if any of the following never happened: one of the operations, a
turbo clamp, either ACS decision, a product or accumulator clamp, or any of
the eight GF field sizes. The block testbenches compare against references
written independently from the operation definitions. The GF multiplier is
checked exhaustively, and update_shifter over every length pair.

## How far to trust it, and where it departs from the source design

* **Verified behaviour.** Every module passes its testbench, and each
  testbench fails on a deliberately broken copy of its module. The turbo
  operation is tested on its own and inside the random program. No turbo
  decoder is run. Timing and area have not been evaluated.
* **Viterbi metrics.** This RTL forms PM1 + BM and PM2 - BM, following
  the unit's block diagram. The written operation definition that comes
  with the same diagram subtracts BM on both paths. That form makes the
  decision independent of BM. Decoding the Viterbi workload with it gets
  about a third of the bits wrong.
* **Example constraint length.** The 7,5 example encoder is taken as
  constraint length 3 (the state includes the newest bit), as the prose
  says. A drawing of it reads 2.
* **GF polynomial width.** `P` is 8 bits wide, because each reduction
  stage needs eight AND gates. A drawing of the unit marks the P input as
  3 bits.
* **Extension units are separate.** The ACS and turbo datapaths are kept
  separate, although they could share their adder, subtractor and
  comparator.
* **Missing processor parts.** The instruction fetch and branch unit, the
  integer and load/store unit, the caches, the data memory, the bus
  interface, the SIMD instruction queue, the shuffle unit and the lanes'
  ordinary arithmetic are not included. The top exposes their connection
  points instead: the issue port, `ld_data`, `st_*` and `acc_*`.
* **Choices made here.** These are not given by the source design:
  * 8 vector registers and 4 accumulators per thread;
  * operand packing within a lane;
  * the `SET_GFCFG` path;
  * the Q15 product in vmulreds;
  * how the token table is written.
* **Workload fit.** The workloads the unit targets all fit its operand
  ranges:
  * a constraint-length-5, rate-1/2 encoder;
  * soft-decision Viterbi with 6-bit inputs;
  * 16-bit turbo metrics;
  * DVB-T RS(204,188) over GF(256).

  Their packets live in data memory, outside this unit.
