# BDT accelerator on an AHB-Lite bus

A boosted-decision-tree (BDT) classifier laid out in logic is extremely fast.
All comparisons of all trees happen at once, and a result is ready a few
cycles after the features are. Such a model has wide parallel ports: one
18-bit input per feature and one 18-bit output per class. A small
microcontroller system offers a 32-bit bus instead. This design puts the two
together. It wraps the tree model in an adapter that works as a bus master.
Given two addresses, the adapter fetches the feature vector from any memory
on the bus, runs the model and stores the class scores back, without the
processor moving a word. The processor only writes a few control registers
through a second, slave, bus port and waits for DONE.

The model holds all its parameters (thresholds and leaf scores) as
constants. An inference therefore moves only N_FEATURES words in and
N_CLASSES words out. The cost of an inference is almost entirely the memory
traffic, and the design aims to run that traffic at the full speed of
whatever memory it talks to.

Both bus ports follow AMBA AHB-Lite. The default size is a 4-feature,
3-class model, the size of a classifier for the Iris flower data set.

## Blocks

```
                 control port (AHB-Lite slave)
                          |
 bdt_accel        +----------------+
                  | ahb_ctrl_slave |  IN_PTR OUT_PTR WR_CYC RD_CYC TOT_CYC CTRL
                  +----------------+
                          | in_ptr, out_ptr, go_ahead / done, timers
                  +----------------+          bdt_model_wrapper
  memory port <-->|  ahbl_master   |--f_in,en-->  data_loader  --x,x_vld--> model
 (AHB-Lite master)|                |<--c_out----  data_unloader <--y,y_vld-- model
                  +----------------+--cnt_out->                 (bdt_top or regfile_model)
```

| file | role |
|---|---|
| `rtl/bdt_pkg.sv` | shared widths, AHB encodings, register offsets, example tree contents |
| `rtl/bdt_accel.sv` | top: the three parts wired together, both bus ports brought out |
| `rtl/ahb_ctrl_slave.sv` | six 32-bit control/status registers on an AHB-Lite slave |
| `rtl/ahbl_master.sv` | bus master: read phase, wait for the model, write phase, cycle counters |
| `rtl/bdt_model_wrapper.sv` | loader + model + unloader |
| `rtl/data_loader.sv` | 32-bit words in, parallel 18-bit feature vector out |
| `rtl/data_unloader.sv` | class score selected by index, out as a 32-bit word |
| `rtl/bdt_top.sv` | the tree ensemble |
| `rtl/regfile_model.sv` | stand-in model that returns its inputs one cycle later |

## Using it from software

Register map on the slave port (byte offsets; the interconnect decodes the
rest through HSEL):

| offset | name | access | content |
|---|---|---|---|
| 0x00 | IN_PTR | rw | address of the first feature word |
| 0x04 | OUT_PTR | rw | address for the first class score |
| 0x08 | WR_CYC | ro | cycles the last run spent writing |
| 0x0C | RD_CYC | ro | cycles the last run spent reading |
| 0x10 | TOT_CYC | ro | cycles of the whole last run |
| 0x14 | CTRL | rw | bit 0 GO_AHEAD, bit 1 DONE (read only) |

Store the features as one 32-bit word each, in consecutive words. Only the
low 18 bits of each word are used, as a signed fixed-point number. Then
write IN_PTR and OUT_PTR and write 1 to CTRL. Poll CTRL until bit 1 is set,
or watch the `done` pin. The result buffer then holds one word per class:
the 18-bit signed score, zero-padded in bits 31:18. Write 0 to CTRL before
the next run. DONE clears, and the next 1 starts a new run. While GO_AHEAD
stays high after a run, nothing restarts.

The slave answers reads with no wait state. It takes writes with one wait
state: the register is written in a WRITE state that holds HREADYOUT low
for one cycle. HRESP is always OKAY.

## The bus master and its timing

This is the part that decides performance, and the part to read before
changing anything.

**Overlapped transfers.** AHB splits every transfer into an address phase
and a data phase, and the next address phase may run during the current
data phase. The master always does this. In the same clock edge that ends
a read data phase (HREADY high), three things happen:

- the word on HRDATA passes straight to the data loader, since `f_in` is
  HRDATA and `en` is combinational;
- the address phase on the bus is accepted;
- the next address is put out.

A memory that adds W wait states therefore costs exactly W+1 cycles per
word. The master adds nothing of its own. A block RAM with two wait states
runs at 3 cycles per word.

**Bursts.** Reads are issued as one incrementing burst of undefined length
(HBURST = INCR). The first beat is NONSEQ and the rest are SEQ, so memories
that stream bursts can serve later beats faster. At a 1 KB page boundary
the master starts a new burst with NONSEQ, as AHB requires. Writes are
single NONSEQ transfers, back to back.

**Write data.** While in the write phase, `cnt_out` tells the unloader which
class is in the address phase. Its word is loaded into the HWDATA register
at the edge that accepts that address phase. HWDATA then holds through
however many wait states follow, and also after the last write: it never
drops back to zero at the end of a data phase.

**States.** IDLE → READ (all N_FEATURES reads) → WAIT_Y (bus idle until the
model's `y_vld`) → WRITE (all N_CLASSES writes) → WRITE_F (set DONE) →
IDLE.

**Counters.** RD_CYC counts cycles in READ, WR_CYC cycles in WRITE, and
TOT_CYC every cycle from the first read address to WRITE_F. If every
transfer sees W wait states:

```
RD_CYC  = 1 + N_FEATURES * (W + 1)
WR_CYC  = 1 + N_CLASSES  * (W + 1)
TOT_CYC = RD_CYC + WR_CYC + (model latency + 2)
```

Here the model latency is 3 + clog2(N_TREES) for the tree ensemble and 1
for the register file. Simulated figures for the register-file stand-in:

| run | 2 wait states (block RAM) R / W / T | 1 wait state (embedded SRAM) R / W / T |
|---|---|---|
| 100 in / 100 out | 301 / 301 / 605 | 201 / 201 / 405 |
| 50 / 50 | 151 / 151 / 305 | 101 / 101 / 205 |
| 10 / 10 | 31 / 31 / 65 | 21 / 21 / 45 |
| tree model 4 / 3 | 13 / 10 / 33 | 9 / 7 / 26 |

Measurements of the original hardware, on the same kinds of memory, follow
the same slopes: 3 cycles per word on block RAM and 2 on embedded SRAM.
Their fixed overheads are a few cycles higher (read 3N+5, write 3N+1 on
block RAM), because that implementation counts from different start and
stop points. External SDRAM took about 27 cycles per word to read and 20 to
write there. Its controller is not part of this design.

## The tree model (`bdt_top`)

Each tree is a complete binary tree of depth DEPTH. Internal nodes are
numbered in heap order. At node n the test is `x[f] <= t`: when it holds,
the walk goes to node 2n+1 (left), otherwise to 2n+2. Instead of walking,
the circuit does the following:

1. **Compare.** Every node of every tree compares its feature with its
   threshold in parallel. This stage is registered.
2. **Select.** For each leaf, the AND of the comparison results on its path
   (each taken plain on a left step, inverted on a right step) is the
   leaf's activation. Exactly one leaf per tree is active, and it selects
   that tree's score from the leaf-score table. This stage is registered.
3. **Sum.** Each class has N_TREES trees. A binary adder tree, registered at
   every level, sums their scores.
4. **Bias and output.** The class bias is added, the result is wrapped to
   18 bits, and it is held on `y`. All bits of `y_vld` pulse for one cycle.

The latency is 3 + clog2(N_TREES) cycles (8 at the default of 20 trees per
class), and a new vector may enter every cycle. Scores are 18-bit signed
fixed point, and sums wrap on overflow.

**The contents are placeholders.** Split features, thresholds, leaf scores
and class biases come from four small functions in `bdt_pkg`. They are
arithmetic formulas that give a deterministic, non-trivial ensemble for
testing. To run a trained model, replace those four functions (or the
localparams they feed in `bdt_top`) with the trained values. Also set
N_TREES and DEPTH; pad a shallower tree by giving both children of a cut
node the same leaf score. The circuit does not change.

## Loader, unloader and the register-file stand-in

The **data loader** is a shift register of N_FEATURES 18-bit entries.
Each `en` pulse shifts the low 18 bits of the bus word in at the top, so
the first word read ends in `x[0]`. A pulse counter raises `x_vld` one
cycle after the last word. The **data unloader** is a multiplexer over the
class scores, indexed by `cnt_out` (zero beyond the last class). It also
ANDs the per-class valid flags into the one `y_vld` the master waits on.
With N_CLASSES large this multiplexer is the widest piece of logic outside
the model.

`regfile_model` has the model's ports. It stores its inputs on `x_vld` and
shows them on `y` one cycle later. Built with `MODEL_RF = 1` and
N_FEATURES = N_CLASSES = N, the accelerator copies N words from IN_PTR to
OUT_PTR (low 18 bits). This is the way to check the bus side and measure
memory speed without a trained model.

## Parameters

| parameter | default | meaning |
|---|---|---|
| N_FEATURES | 4 | features read per run |
| N_CLASSES | 3 | class scores written per run |
| N_TREES | 20 | trees per class (tree model) |
| DEPTH | 3 | tree depth (tree model) |
| MODEL_RF | 0 | 1 selects the register-file stand-in (needs N_FEATURES = N_CLASSES) |

The feature and class counters are 16 bits wide, so up to 65535 of each
are possible. The fixed 18/32-bit widths are in `bdt_pkg`.

## Where this departs from, or adds to, the original design

- The trained trees of the original models are not reproduced. The
  ensemble structure is the original's, but the numbers are placeholders
  (see above), and so are the tree count and depth.
- The original master had a READ_S / READ / STANDBY / READ_F state
  sequence. Here one READ state with an address counter and a data-phase
  flag does the same job with the same bus timing.
- `x_vld` comes from the data loader's own counter.
- DONE is readable in CTRL bit 1 as well as on a pin.
- DONE clears when GO_AHEAD is written 0.
- The exact start and stop points of the cycle counters are this design's.
- The register offsets, the 1 KB burst restart, zero padding of output
  words, and the AND of the valid flags are this design's choices.
- Not handled: AHB error responses (HRESP is ignored by the master), and
  HPROT / HMASTLOCK, which are constants.
- Not included: the processor subsystem, the bus interconnect, the
  memories and the SDRAM controller. The accelerator connects to them
  through its two AHB-Lite ports.

## How far it is verified

All testbenches below pass in verilator, with every variable starting at a
random value. Each block's testbench also fails on a deliberately broken
copy of its block. The RTL passes `verilator --lint-only -Wall` with only warnings: unused
bits and package constants, and the reset net being used both as an
asynchronous reset and in assertion `disable iff` clauses. It also
elaborates in a second front end (slang). It has not been placed and
routed, so clock frequency and FPGA resource use are unknown. The 100 MHz
of the original system is plausible for the master and slave, whose logic
is shallow. For a large ensemble the single-cycle leaf selection in
`bdt_top` is the path to watch. The AHB behaviour has been checked only
against the memory model in `tb/`, not against real memory controllers.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bdt_pkg.sv tb/bdt_ref_pkg.sv tb/tb_bdt_accel.sv --top-module tb_bdt_accel
./obj_dir/Vtb_bdt_accel
```

| testbench | what it runs |
|---|---|
| `tb_bdt_accel` | the top at its default size: ten inferences over memories with 0–3 wait states, including one across a 1 KB page, against a tree-walking reference; checks all three counters and that every mechanism occurs |
| `tb_workloads` | register-file runs with 10, 50 and 100 words, at 2 and 1 wait states (the table above) |
| `tb_ahbl_master`, `tb_ahb_ctrl_slave`, `tb_bdt_model_wrapper`, `tb_bdt_top`, `tb_data_loader`, `tb_data_unloader`, `tb_regfile_model` | one block each |

Testbench helpers:

- `tb/ahb_mem_model.sv` is an AHB-Lite memory whose wait states can be set
  at run time, separately for NONSEQ and SEQ beats. It also flags AHB
  protocol errors.
- `tb/bdt_ref_pkg.sv` scores a vector by walking the trees one level at a
  time.
- `tb/accel_harness.sv` drives one register-file accelerator for
  `tb_workloads`.

`ahbl_master` and `ahb_ctrl_slave` contain assertions for the AHB rules they
must keep: an address phase holds while HREADY is low, write data holds
through its data phase, and only word-aligned word transfers are made.
