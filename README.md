# A shared, virtualized vector processor for small multicores

Several simple scalar cores each run a thread with a little vector code.
Giving every core its own vector unit wastes area and power, because each
thread keeps a vector unit busy only a small fraction of the time. This
design lets up to four cores share one four-lane floating-point vector
processor (VP) at the same time. Instructions of different threads are
interleaved inside the VP pipeline (simultaneous multithreading). Three
kinds of virtualization make that safe without recompiling the programs:

* **Register virtualization.** Each thread names vector registers r0-r31.
  A lookup table maps {thread, register} to a physical register, so two
  threads never collide in the vector register file (VRF).
* **Lane and memory virtualization.** The number of active lanes can be
  changed at run time, for power gating. Vector length (VL) and memory
  addresses are rescaled in hardware, so the same binary runs on 1, 2 or
  4 lanes. A thread can also be moved into the upper half of the vector
  memory (VM), so two copies of one program do not overwrite each other.
* **Thread fusion.** A switch in front of the instruction FIFOs can copy
  one core's instruction stream into a second FIFO under a second thread
  ID. Two data sets are then processed while the core runs its control
  code only once.

Two more pieces come from the same line of work:

* A ring-shaped inter-lane **shuffle network**. It moves elements between
  the lanes' private memories and register slices.
* Per-lane **reorder tables (RLT)** that change the element order in which
  a lane's decoder walks a vector.

A separate, small design sits beside the VP in the top level. It is a
dual-pipeline MIPS-like processor that shows **instruction fusion** for
scalar code. In fused mode only one pipeline fetches and decodes. The
second pipeline executes a register-renamed copy of each instruction.

All RTL is SystemVerilog-2017. Everything in `rtl/` is synthesizable.
Floating-point arithmetic is written behaviourally inside a pipelined
wrapper.

## System structure

```
 core 0..3 word streams ──► fusion_switch ──► 4 × vinstr_fifo (16 × 32, FWFT)
                                                   │
                                             vp_arbiter (round robin)
                                                   │ {instruction, operand}
                       tlt (128 entries) ◄──► vector_controller: RR → HD → IS
                                                   │ lane_op broadcast
                        ┌──────────────┬───────────┴──┬──────────────┐
                     lane 0         lane 1         lane 2         lane 3
                   (vector_lane: ALU FIFO/decoder/FPU/WB, LDST FIFO/decoder, vrf_bank)
                        │              │              │              │
                    vm_bank 0      vm_bank 1      vm_bank 2      vm_bank 3   ◄── vm_host_mux ◄── host port
                        └────── shuffle_net (ring, 4 stages) ───────┘
```

`svp_top` wires this together and brings out these ports:

* one valid/ready word stream per core;
* the TLT write port (written by a control core running the register
  manager);
* the configuration registers;
* the host VM port;
* the lane power-gate enables;
* status and event signals;
* the `mips_*` ports of the fused dual-pipeline processor.

The scalar cores, the system bus, DMA and the register-manager software
are outside the RTL. Their connection points are these ports.

## Vector instruction format

Each instruction is one 32-bit word (`vp_pkg::vinstr_t`):

| bits  | field   | meaning |
|-------|---------|---------|
| 31:28 | op      | VADD VSUB VMUL (vector-vector), `_S` forms (vector-scalar), VLD/VST (unit stride), VLD_S/VST_S (strided), VSHUF, VRLT, NOP |
| 27:23 | dst     | virtual destination register |
| 22:18 | src1    | virtual source 1 (for a store: the data register) |
| 17:13 | src2    | virtual source 2 |
| 12:11 | vl      | 0 → 16, 1 → 32, 2 → 64 elements |
| 10:9  | tid     | thread ID |
| 0     | use_rlt | shuffle: walk elements through the RLT |

Some instructions carry one more 32-bit word: scalar operands, loads,
stores and VRLT. That word follows the instruction in the same FIFO, and
`vp_pkg::has_data()` says which instructions have one. The operand word
means:

* unit-stride address: bits 11:0;
* strided access: address in bits 15:0, stride in bits 27:16;
* scalar: an IEEE single-precision value;
* VRLT: eight 4-bit RLT entries.

## Pipeline and timing

**Arbitration.** The arbitrator polls the non-empty FIFOs in round-robin
order. Handing a packet to the controller takes 2 cycles for a plain
instruction and 3 when an operand word is popped too. Instructions from
different cores can therefore enter the VP every other cycle.

**Vector controller (3 stages).**

* **RR:** the thread ID and the three register names index the
  triple-ported TLT.
* **HD:** each thread has a hazard unit. It remembers the thread's last ALU
  and last load/store instruction, and counts how many of each are still
  in the lanes. A RAW, WAW or WAR match against an in-flight slot stalls
  the instruction here, and the stall backs up into the arbitrator.
* **IS:** the instruction is virtualized and pushed into the ALU FIFO or the
  LDST FIFO of every active lane.
* `in_ready` drops only on a hazard or on a full lane FIFO.

**Lanes.** All active lanes get the same operation and run in lockstep,
one element per cycle each. Latencies counted from the cycle the
controller accepts an instruction (all are checked in `tb_vp_core`):

| path  | stages after the controller | first element written |
|-------|-----------------------------|-----------------------|
| ALU   | FIFO ×2, decode ×2, operand fetch ×2, FP ×6, WB | 16 cycles |
| store | FIFO ×2, decode ×2, fetch ×2, address ×2 → VM write | 11 cycles |
| load  | same as store, then VM read data and write-back | 13 cycles |

Each decoder takes a new operation only after issuing the last element of
the previous one, so one idle cycle falls between consecutive operations.
Peak use per lane is therefore:

* 80 % with 4 elements per lane;
* 88.9 % with 8;
* 94.1 % with 16.

The FP unit adds, subtracts and multiplies in IEEE single precision. It
rounds to nearest-even and flushes denormals to zero. Products are ready
after 4 cycles but are held in a result buffer, so every result comes out
after 6.

## Virtualization and address mapping

**Lane state.** The lane-state register holds L = log2(active lanes), which
is 0, 1 or 2. The controller rescales each instruction:

* Elements per lane = VL >> L.
* A physical register p starts at lane-local VRF address p·(VL >> L).
  A VL-64 register is therefore the same storage as two VL-32 registers or
  four VL-16 registers.
* A VM base address N in the instruction becomes N << (2 − L) in the lane.

**Host side.** The host sees the VM as one word-addressed memory,
interleaved across the active banks:

* the low L address bits select the bank;
* the remaining bits are the address inside the bank.

Together these rules put element i of an array at host address 4N + i in
every lane configuration. A program compiled once runs unchanged on 4, 2
or 1 lanes. Lanes and banks that are switched off are reported on
`lane_pg`.

**Thread state.** Each thread has one thread-state bit. When it is set,
that thread's VM addresses get their top bank-address bit flipped, so the
thread works in the upper half of every bank. A separate bit does the same
for the host port. Two copies of one program can then run on disjoint
data.

**Register renaming.** The TLT has 128 entries: 4 threads × 32 names,
each mapping to a 6-bit physical name. After reset, entry i maps to
i mod 32. Software running on a control core is expected to load it
through `tlt_we`.

## Thread fusion

`fusion_switch` sits between the core streams and the FIFOs. With
`fuse_en` set, every word from core `fuse_src` is written both into its
own FIFO and into FIFO `fuse_dst`. In the copy's instruction words the
thread ID is replaced by `fuse_tid`. Operand words are recognised and
copied unchanged. The core is held back when either FIFO is full. The two
copies then rename to different physical registers and, through the
thread-state bit, use different VM halves.

## Shuffle network and reorder tables

`shuffle_net` is a ring of N = 4 nodes per stage: an entry row plus
N − 1 switching stages.

* Each cycle every lane may inject one packet {destination lane, VRF
  address, data}.
* A packet moves one lane further around the ring per stage.
* A packet that has reached its destination waits in that node's bypass
  buffer until the last stage.
* Latency is N cycles, and throughput is N packets per cycle.

This holds as long as the packets injected in one cycle go to distinct
lanes. If that rule is broken, two packets collide: the one already in the
bypass buffer is lost and `conflict` is raised.

`VSHUF rd, rs, rt` writes `RD[RT[i]] = RS[i]`:

* the low two bits of RT[i] give the destination lane;
* the remaining bits give the element index inside that lane's slice.

The lane injects the packet from the ALU decoder in place of an FP
operation. Arriving packets are written through the ALU write port in the
slot an FP result would use.

Each lane has a 16 × 4-bit RLT. `VRLT` programs eight entries of one lane:

* `src1[1:0]` selects the lane;
* `dst[0]` selects entries 0-7 or 8-15;
* the operand word holds the entries.

With `use_rlt`, a lane's decoder visits element RLT[k] at step k instead
of element k. Different lanes can then send to different lanes in the
same cycle. `tb_vp_core` uses this to transpose a 4 × 4 matrix in one
conflict-free shuffle, with lane l programmed as k → (k + l) mod 4.

## Fused dual-pipeline processor (`fused_mips`)

This is a separate, scalar design.

* **Structure.** Two five-stage pipelines (IF, ID, EX, MEM, WB) share a
  32-entry register file and dual-ported instruction and data memories.
* **Normal mode.** Each cycle the pair at pc and pc+4 is fetched, one
  instruction per pipeline.
* **Mode switch.** The instruction "fuse switch" (opcode `6'h3f`) toggles
  the mode.
* **Fused mode.** Only pipeline 0 fetches and decodes. Its decoder also
  produces a copy for pipeline 1 with bit 4 of every register name set
  (r2 → r18). Each copy therefore works in its own half of the register
  file, and r16 must be kept at zero by software.
* **Branches.** The copy's branches are executed but do not steer the
  program counter.

Other behaviour:

* forwarding from MEM and WB, with a one-cycle load-use stall;
* no branch delay slot;
* when both pipelines write the same register or memory word in one
  cycle, pipeline 1 wins;
* the all-ones word halts fetching, which is useful in simulation.

The supported instructions are ADDU SUBU AND OR SLT SLL MUL ADDIU ORI LUI
LW SW BEQ BNE BLEZ BGTZ J.

## Simulating

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. To
build and run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
    -y rtl -Irtl -Itb +libext+.sv rtl/fp_pkg.sv rtl/vp_pkg.sv \
    tb/tb_vp_core.sv --top-module tb_vp_core -o tb_vp_core --Mdir obj
./obj/tb_vp_core +verilator+seed+$RANDOM
```

The testbenches use `$urandom`, so every seed runs a different random
test. What the larger ones cover:

* `tb_svp_top` runs the whole system at its default sizes (4 cores,
  16-word FIFOs, 4 lanes, 64 KB VM). It goes through these phases, and
  checks VM contents against values worked out in the testbench:
  * four cores run VL-64 programs on their own data, with renamed
    registers;
  * one core's stream is fused into a second thread in the upper VM half;
  * two lanes run at VL 16 while the other two are gated;
  * a 4 × 4 transpose uses the shuffle network and the RLTs;
  * the scalar processor runs a fused loop.

  It also counts how often each mechanism happens: hazard stalls, full
  lane FIFOs, core back-pressure, round-robin turns, fusion, gated lanes,
  and the scalar processor's mode switches and stalls. Any mechanism that
  never happens counts as a failure.
* `tb_vp_core` checks the 16/11/13-cycle latencies, a VL-64 program, the
  upper-half mapping, two-lane mode and the RLT transpose.
* `tb_vp_bench` runs benchmark-style kernels with four threads
  interleaved on the VP:
  * a 16 × 16 matrix product per thread, using scalar-vector multiplies and
    two vector registers;
  * the vector part of a dot product at VL 16, 32 and 64.

  It checks every result and prints each kernel's cycle count, for
  example about 13,800 cycles for the four matrix products.
* `tb_fused_mips` sets up two data sets in normal mode and sums both with
  one fused loop. It checks the results, checks that fetch and decode
  unit 1 stay idle, and counts paired retirements.

## Departures from the source and own choices

* **Bit layouts.** The bit positions of the instruction fields, the opcode
  values and the operand-word formats are this design's own. Only the
  field widths were given: 5-bit register names, a 2-bit VL and a 2-bit
  thread ID.
* **Thread ID.** The thread ID is always the 2-bit field. The FIFO position
  does not replace it. The fusion switch rewrites it in the copy. Four
  threads are supported, where the source's fused prototype has two.
* **Renaming.** Every thread is renamed through the TLT, including in the
  fusion case.
* **Store timing.** The store is written at the end of the second
  address-generation stage. This matches the stated 11-cycle store fill,
  which is one cycle shorter than drawing a separate memory stage after
  address generation.
* **Control registers.** The configuration registers are written through a
  port, not by a decoded control instruction.
* **Unspecified sizes and policies.** These were chosen here:
  * lane FIFO depth: 4;
  * multiplier latency: 4 cycles, padded to 6;
  * which hazard kinds are checked: RAW, WAW, WAR;
  * the shuffle ring's direction of travel;
  * the shuffle rule (distinct destinations per cycle);
  * the VSHUF and VRLT semantics;
  * the TLT reset mapping.
* **RLT example.** One lane's printed RLT example is not a permutation. The
  permutation (3,0,1,2) implied by the issued element order was used.
* **Floating point.** The arithmetic is behavioural single-precision, not
  a gate-level adder/multiplier. Denormals are flushed to zero.
* **Scalar processor.** The instruction subset, the fuse-switch encoding,
  forwarding and the halt word are this design's own.
* **Not included.**
  * The scalar cores (application and control cores).
  * The system bus, DMA and system memory.
  * The register-management and scheduling software.
  * The power switches. They appear only as `lane_pg` enables.

## Known limits

* The testbenches check function and the documented latencies. They do
  not check timing closure or area.
* Each lane's VRF slice is 256 words. The whole VRF therefore holds only
  16 VL-64 registers, so four threads that each need seven VL-64
  registers cannot run at once.
* The VM is 64 KB. Keeping the full data of four large matrix or image
  workloads in it at the same time does not fit. Such workloads must be
  staged through the host port.
