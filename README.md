# Presto: an in-memory lattice-FHE co-processor for a RISC-V host

Homomorphic encryption schemes built on (module) lattices, such as BFV, CKKS and
TFHE, spend most of their time on one kind of data: polynomials with a few
hundred to a few thousand coefficients, each reduced modulo a word-sized prime
q. The work on them is simple: coefficient-wise add and multiply, the
number-theoretic transform (NTT) that turns polynomial products into
coefficient-wise ones, rotations by powers of X, and Galois automorphisms
X -> X^k. What costs time is moving the data. Presto keeps the polynomials in
many small memory banks and puts a modular ALU next to every bank, so each
operation happens where the data already is. A RISC-V host drives it with
custom instructions and never touches the coefficients itself.

This RTL is a synthesizable model of that co-processor: 32 processing engines
(PEs) of 16 banks each, the controller that decodes and schedules the custom
instructions, the networks between banks and between PEs, an AXI4-Lite port for
the host and a 64-bit DMA port to off-chip memory. It is written in
SystemVerilog-2017, and every block has a self-checking testbench.

## The storage array

| level | contents |
|---|---|
| bank | two polynomial buffers PBUF0/PBUF1 of 32 x 32-bit words, an 8 x 32-bit register file (RF), a modular ALU |
| PE | 16 banks, an intra-PE cyclic shifter, a registered 512-bit output line |
| array | 32 PEs, so 32 x 16 x (2 x 32 + 8) x 32 b = 1152 kb |

A 512-coefficient polynomial fills one PBUF of one PE. Coefficient `i` is in
bank `i mod 16`, entry `i div 16`. So one *row* (the same entry in all 16 banks)
holds 16 consecutive coefficients. It also forms one 512-bit *line*, with bank
`b` in bits `[32b+31:32b]`. All movement between PEs, and between the array and
the outside world, goes a line at a time. A polynomial of dimension
`n = 2^logn > 512` is split across consecutive PEs, 512 coefficients each.

Every bank of a PE executes the same 57-bit control word in a given cycle. The
word is defined in `presto_pkg.sv` as the struct `ctrl_t`. Its `bank_en` field
decides which banks write, and its `shift` field sets the intra-PE shifter. So
a single word can do all of the following:
- a full-row operation (16 coefficients per cycle);
- a one-bank update (used for host word writes and the automorphism);
- a cross-bank butterfly.

Each bank's ALU (`mod_alu.sv`) has two results, so that a butterfly can write
both of its outputs in one cycle:
- `CT`: `x + w*y` and `x - w*y`;
- `GS`: `x + y` and `(x - y)*w`;
- `HBF` and `HBI`: the two half-butterflies, where a bank computes the lower or
  the upper output of a butterfly whose partner sits in another bank.

All operations are single-cycle and combinational. The ALU reduces with the
`%` operator, so synthesis has to produce the reduction circuit.

## The NTT schedule inside one PE

`ntt_fsm.sv` runs a 512-point negacyclic NTT in place on one PBUF of every
selected PE, with all PEs in lockstep. The forward transform is Cooley–Tukey
with natural-order input and bit-reversed output. It uses the twiddle
`zeta[k] = psi^bitrev9(k)`, where psi is a primitive 1024-th root of unity mod q.
A stage with butterfly distance `len` uses twiddle `k = 256/len + g` for group
`g`.

**Stages with len = 256 down to 16 (bank-local).** Both inputs of a butterfly sit
in the same bank, at entries `e` and `e + len/16`. Each bank reads both, runs one
CT butterfly and writes both results in one cycle, so a stage takes 16 cycles.
All 16 lanes of a row share one group, so one twiddle serves every bank.

**Stages with len = 8, 4, 2, 1 (cross-bank).** The partners sit in banks `b` and
`b xor len` of the same entry. Each row takes three cycles:
- **A.** The shifter rotates the row by `+len`. Each lower bank (bit `log2 len` of
  its index clear) sees its partner and writes `x + w*y` into RF[7].
- **B.** The shifter rotates by `16 - len`. Each upper bank writes `y - w*x` into
  RF[7].
- **C.** Every bank copies RF[7] back into the PBUF.

That is 96 cycles per stage. Both halves must read the old values, which is why
results go through the RF first.

**Totals.** The forward NTT takes `5 x 16 + 4 x 96 = 464` cycles. The inverse
runs the same stages in reverse order with Gentleman–Sande butterflies and
inverse twiddles. It ends with 32 cycles that multiply by `n^-1`, for 496 cycles
in all. RF entry 7 of every bank is overwritten.

**Where the twiddles come from.** The NTT FSM owns a table of 1024 words
(forward twiddles at 0..511, inverse ones at 512..1023), plus q and n^-1. Each
cycle it puts one twiddle per bank on a 512-bit line. The inter-PE network
broadcasts that line to every PE, where it arrives as operand `w`. Software
loads the table with configuration instructions. No modulus is hard-wired.

## Instruction set

The instructions use three custom opcodes of the RISC-V base map:
- custom-0 `0001011` (OP-HE);
- custom-2 `1011011` (OP-HE-LOAD);
- custom-3 `1111011` (OP-HE-STORE).

The host's extension dispatcher passes each instruction, plus the values of its
rs1 and rs2, on the `inst*` port. The field layout is R-type:

| opcode | funct3 | meaning |
|---|---|---|
| OP-HE | `{srcB, srcA, dst}` PBUF selects | funct7 = 0 VADD, 1 VSUB, 2 VADDS (+RF), 3 VNEG, 4 VMOV, 5 VROT (x X^rs2), 6 VMUL, 7 VMULS (x RF), 8 NTT, 9 INTT, 10 AUTO; rs1 = PE mask; rd[9:7] = RF index |
| OP-HE-LOAD | 0 | vector load: rs1 = byte address, rs2[4:0] = PE, rd[7] = PBUF |
| OP-HE-LOAD | 1 | scalar load rs2 into RF[rd[9:7]] of every bank of the PEs in mask rs1 |
| OP-HE-LOAD | 2 | configuration: rs1 = index (0..511 twiddles, 512..1023 inverse twiddles, 1024 q, 1025 n^-1), rs2 = value |
| OP-HE-STORE | 0 | vector store: rs1 = byte address, rs2[4:0] = PE, rd[7] = PBUF |

For AUTO, the operands are:
- rs1[4:0] is the first PE.
- rs1[11:8] is log2 of the dimension (9 to 14).
- rs2 is the odd Galois element k.

The instruction transforms PBUF srcA into PBUF dst, which must be a different
buffer. Any other encoding is dropped and counted on `illegal_cnt`. A
configuration index out of range sets `cfg_err`.

## Controller: queue, issue and ownership

`he_decoder` feeds a 32-entry queue (`ext_scheduler`). Four sequencers execute
instructions:
- **MEM**: loads, stores, scalar broadcast, automorphism, host word access;
- **ELM**: element-wise operations and rotation;
- **MUL**: dyadic and scalar multiply;
- **NTT**: transforms and configuration.

Each cycle the scheduler issues the oldest queued entry that meets all of these
conditions:
- it is the oldest entry of its class (each class runs in order);
- its sequencer is idle;
- its PE mask overlaps no older queued entry and no running instruction;
- for MEM or NTT, the other one of those two is not running, because both drive
  the shared write-back line.

So later work on other PEs overtakes a stalled instruction. For example, a
multiply on PE 7 runs while a long automorphism occupies PEs 4 and 5. The
queue deasserts `inst_ready` when full. Configuration writes use an all-ones
mask, so they act as a barrier.

Each sequencer drives one 57-bit word together with the PEs it applies to this
cycle. The control crossbar (`ctrl_xbar`) gives every PE the word of its owner,
or a NOP. The scheduler keeps the owners disjoint, and an assertion checks this.

## Data paths around the PEs

- **Intra-PE NoC** (`intra_pe_noc`): output lane `b` = source lane
  `(b + shift) mod 16`. The source is either the PE's own port-A row or the line
  arriving from outside.
- **Inter-PE NoC** (`inter_pe_noc`): selects one PE's output line for reading.
  It builds the write-back line from one of four sources:
  - that PE line;
  - a host word repeated 16 times;
  - a DMA line;
  - the constant line (twiddles, or the scalar of a scalar load).
- **Galois fetcher** (`galois_fetcher`): for X -> X^k in dimension n it produces,
  for i = 0..n-1, the destination `i*k mod 2n` (folded into 0..n-1) and whether
  the coefficient is negated. It does this incrementally with one adder, no
  multiplier. The MEM FSM moves one coefficient every two cycles. It reads the
  source row in the first cycle. In the second it sends the row through the
  inter-PE NoC, shifts it to the destination bank and writes that single bank.
  With k = 2n - 1 the same instruction is the index map of TFHE sample
  extraction: it moves coefficient i to n - i and negates it (coefficient 0
  stays where it is).
- **CPU interface** (`cpu_if`): an AXI4-Lite slave for single 32-bit words.
  Byte address bits [16:2] are {PE[4:0], PBUF, coefficient[8:0]}. The MEM FSM
  serves a host access when it is idle. A write takes one cycle and a read two.
- **Off-chip DMA** (`offchip_dma`): a 64-bit memory port with a req/gnt
  handshake and in-order read data of any latency. One line is 8 beats, lowest
  bits first, so one polynomial is 256 beats. A load writes each line into the
  PE the cycle it is complete. A store buffers one line while it writes it out.
  Writes have priority over reads.

## Timing summary

| operation | cycles |
|---|---|
| VADD / VSUB / VADDS / VNEG / VMOV / VMUL / VMULS | 32 (one row per cycle, every selected PE at once) |
| VROT | 64 |
| NTT / INTT | 464 / 496 |
| SLOAD | 1 |
| AUTO, dimension n | 2n + 1 |
| VLOAD / VSTORE | 256 memory beats plus latency |

## Where this RTL departs from the original architecture

- **PBUF storage.** The buffers are built from flip-flops. The original uses
  latch-based buffers for density; the behaviour at the ports is the same.
- **NTT size.** The NTT works inside one PE (512 points). The original also
  runs NTTs of dimension 1024 to 16384 across PEs. Those cross-PE stages are
  not built, so TFHE bootstrapping (N = 2048) and CKKS bootstrapping
  (N = 16384) cannot run yet. Element-wise work, rotation and Galois
  automorphisms of larger polynomials do work.
- **Modular reduction.** It uses a plain `%` in one cycle, with no dedicated
  Montgomery or Barrett circuit and no pipelining. The published chip reaches
  1 GHz; this RTL makes no timing claim.
- **NTT throughput.** The original quotes a peak of 3.23 M NTT/s at 512 points.
  This schedule takes 464 cycles per transform in each PE. At 1 GHz that is
  2.2 M/s per PE, or about 69 M/s when all 32 PEs work in parallel.
- **This design's own definitions.** Everything below is invented here; the
  original describes only the blocks and their widths:
  - the instruction field layout;
  - the issue rules;
  - the control-word fields;
  - the AXI address map;
  - the DMA protocol;
  - all sequencer schedules.
- **Outside the RTL.** The host RISC-V core and the DRAM appear only as ports.
  A behavioural DRAM model is in `tb/dram_model.sv`. The board bridge to the
  host (FPGA, PCIe) is not modelled.

## Verification

Each module in `rtl/` has a testbench `tb/tb_<module>.sv`. Each one:
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- compares against arithmetic computed in the testbench itself (`tb/tb_fhe_pkg.sv`
  holds the modulus q = 3·2^30 + 1, a reference NTT and a schoolbook negacyclic
  product).

The main testbenches cover the following:
- **`tb_ntt_fsm`** checks the transform against the reference, and
  `INTT(NTT(a)·NTT(b))` against the schoolbook product. It also checks the
  464/496-cycle counts.
- **`tb_elm_fsm`** checks all element-wise operations, and rotations by X^r for
  r = 0, 1, 17, 300, 511 and 700.
- **`tb_mem_fsm`** builds a 4-PE system with the real NoC, DMA and Galois
  fetcher, and a DRAM that refuses grants at random. It checks:
  - load/store round trips;
  - scalar broadcast;
  - automorphisms for several k at exactly 2n+1 cycles;
  - host word access.
- **`tb_presto_top`** runs the whole co-processor at full size. It runs:
  - RLWE (BFV-style) encryption on two PEs;
  - decryption on a third PE;
  - an automorphism of a 1024-coefficient polynomial over two PEs;
  - a rotation;
  - a scalar multiply;
  - a burst of 40 additions that fills the queue;
  - AXI reads and writes;
  - an illegal instruction.

  It compares every stored result. It also counts these events and fails if
  any of them never happened:
  - out-of-order issue;
  - sequencers running concurrently;
  - queue-full backpressure;
  - memory stalls;
  - NTT and INTT;
  - cross-bank stages;
  - Galois sign flips;
  - rotation;
  - scalar broadcast;
  - AXI reads and writes;
  - illegal drops.

Encryption plus decryption takes about 6800 cycles there, most of it DRAM
traffic.

To simulate a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_presto_top \
  -y rtl -y tb +libext+.sv rtl/presto_pkg.sv tb/tb_fhe_pkg.sv tb/tb_presto_top.sv
./obj_dir/Vtb_presto_top +verilator+rand+reset+2
```

Replace `tb_presto_top` with any other testbench name. The full-size top-level
run takes well under a minute.
