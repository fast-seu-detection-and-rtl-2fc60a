# Self-testing systolic accelerator with partial-reconfiguration recovery

An SRAM FPGA in a radiation environment can have its configuration memory
upset. When that happens inside a neural-network accelerator, the result is
wrong logic: a stuck adder bit, a broken multiplier, a corrupted stored
weight. Scrubbing the configuration or rebooting the device is too slow for
inference that must keep running.

This design tests the accelerator's datapath with the datapath itself, while
inference runs. A matrix multiplication in *testing mode* pushes three extra
input vectors through the systolic array. With the weight checksums that were
built while the weights were loading, those vectors give two values per column
that are known constants when nothing is wrong. The test costs exactly three
extra cycles per multiplication and needs almost no extra hardware.

When a check fails, the accelerator stops. It keeps the index of the failing
instruction and interrupts the host processor. The host then:

1. reloads only the accelerator's part of the FPGA (dynamic partial
   reconfiguration, DPR);
2. rewrites the weights;
3. resumes from the last good instruction.

The activations are kept outside the reconfigured region, in an
ECC-protected buffer, so no finished work is lost.

The RTL covers:

- the accelerator, a TinyTPU-style 14 × 14 weight-stationary int8 array with
  32-bit accumulation;
- the self-test and its fault diagnosis;
- the memory-mapped host interface;
- the ECC-protected buffer;
- the decoupler that isolates the region during reconfiguration;
- the majority voter in front of the triplicated host processor.

These parts are not included: the processor itself, the vendor reconfiguration
controller, the configuration port and the DDR memory. Their signals are ports
of `repair_top`.

## The checksum self-test

Take column *j* of the array, with weights w<sub>ij</sub> in rows i = 0..N−1.
The column computes Σ<sub>i</sub> x<sub>i</sub>·w<sub>ij</sub> plus whatever
enters the first-row adder from above (`psum_top`).

**While weights load** (`t_load_weights`). Each weight vector also passes
through a 16-bit side lane of the accumulators, next to the 32-bit
accumulation lane. An FPGA DSP accumulator is 48 bits wide, so one DSP can
hold both lanes. The lane sums each column:

  C<sub>A,j</sub> = Σ<sub>i</sub> w<sub>ij</sub>, stored in both R0<sub>j</sub> and R1<sub>j</sub>.

**After the operand vectors** (`t_matmul`). Three test vectors follow the
operands, one per cycle:

| Vector | Inputs x<sub>i</sub> | First-row adder | Fault-free column result |
|---|---|---|---|
| ones | +1 | 0 | C<sub>SA,j</sub> = Σ w<sub>ij</sub> |
| minus ones | −1 | −1 | −Σ w<sub>ij</sub> − 1 = ¬C<sub>SA,j</sub> (bitwise complement) |
| zeros | 0 | 0 | 0 |

When these results reach the accumulators they are combined with R0 and R1:

  a<sub>j</sub> = C<sub>SA,j</sub> − R0<sub>j</sub>  (written back to R0)
  a\*<sub>j</sub> = ¬C<sub>SA,j</sub> + R1<sub>j</sub>  (written back to R1)

In a fault-free column, a<sub>j</sub> = 0 and a\*<sub>j</sub> = all ones.

What each vector catches:

- The +1 and −1 vectors between them drive every multiplier and every adder
  bit of the column to both values. A stuck bit therefore breaks at least one
  of the two sums.
- The zero vector catches a sum bit stuck at 1 in the least significant
  position. Both checksums can hide that fault, but the zero vector cannot.

The comparison is modulo 2<sup>16</sup>, the width of the side lane.

### Diagnosis (`error_detection_unit`)

Every test is an XOR reduction. Each column is classified as follows:

| Observation | Class |
|---|---|
| zero-vector result ≠ 0 | array column fault |
| a, a\* correct | no fault |
| a, a\* wrong but a XOR a\* = all ones, and C<sub>SA</sub> XOR ¬C<sub>SA</sub> = all ones | weight bit flip |
| a XOR a\* ≠ all ones, and the C<sub>SA</sub> pair is complementary | accumulator fault |
| anything else | array column fault |

- A weight bit flip shifts both checksums by the same amount, so the pair
  stays complementary.
- A broken accumulator lane spoils only the combination with R0 and R1.
- A broken array cell spoils the raw C<sub>SA</sub> pair.

The STATUS register reports the most severe class seen (array > accumulator >
weight). The per-column flags are in WGT, ACC and SA.

A weight flip is transient: reloading the weights clears it. The other two
classes are configuration faults and need the region reloaded.

## Instructions

Each instruction is 80 bits, pushed by the host as three 32-bit words:

| Bits | Field |
|---|---|
| 79:72 | opcode |
| 71:48 | buffer address (weight or unified buffer, in vectors) |
| 47:32 | accumulator address |
| 31:0 | length (vectors) |

The opcode splits into three parts:

- `opcode[2:0]` is the operation:
  - 0 nop
  - 1 load_weights
  - 2 matmul
  - 3 activation
  - 4 synchronize
  - 7 halt
- `opcode[3]` selects the testing variant (`t_load_weights`, `t_matmul`).
- `opcode[4]` is the accumulate flag of matmul (add into the accumulators
  instead of overwriting them). For activation it selects sigmoid instead of
  ReLU.

The named encodings are in `tpu_pkg` (`OPC_*`).

**load_weights.** Reads up to N weight vectors and writes them into array
rows 0..L−1. Rows that are not written are cleared.

**matmul.** Streams L operand vectors from the unified buffer through the
array into accumulators `acc_addr`….

**activation.** Reads L accumulator vectors and requantises them to int8:

  s = sat<sub>16</sub>(acc >>> shift)

ReLU gives clamp(s, 0, 127). The sigmoid is a hard sigmoid, clamp(64 + s, 0, 127). The shift is a host register
(CTRL[12:8]). The result is written to the unified buffer at `buf_addr`.

**synchronize.** Waits until the datapath is idle, then raises the sync
interrupt. Fetching continues.

**halt.** Waits until the datapath is idle, then stops fetching.

A `t_matmul` must follow a `t_load_weights`, because the check consumes R0 and
R1. A program can put testing mode on every multiplication, or only on the
last one of each layer. The second choice costs 3 cycles per layer, but a
failure then means the whole layer is recomputed.

## Pipeline timing

These figures are checked cycle-exactly by `control_unit_tb` and `tinytpu_tb`.

- **Pop.** An instruction is popped in one cycle. It then issues one vector per
  cycle.
- **Multiplication length.**
  - A matmul of L vectors occupies the issue stage for L + 1 cycles.
  - A `t_matmul` takes L + 4 cycles, so testing mode costs exactly 3 cycles.
  - Back-to-back multiplications overlap their drain.
- **Path of one vector.** A vector issued in cycle c takes these steps:
  - it enters the skew stage (`systolic_data_setup`) in c + 1;
  - it leaves the array skewed, column j N + j cycles after row 0;
  - `accumulator_bank` de-skews it and has it aligned in c + 2N.
- **Check result.** The check of a `t_matmul` is decided two cycles after its
  zero vector reaches the accumulators. By then the next instruction is
  already running.
- **Hazards.** The design is a simple in-order pipe:
  - load_weights, synchronize and halt wait for the array and the activation
    path to drain;
  - activation waits for the array to drain;
  - matmul waits for pending activation writes.

**On a failed check**, the control unit does four things:

- it stops fetching;
- it flushes the instruction FIFO;
- it stores the program counter of the failing `t_matmul` in ERR_PC;
- it raises the error interrupt.

Instructions already in flight complete. The program counter counts popped
instructions since the host last cleared it, so ERR_PC is the index of the
failing instruction in the program the host pushed.

## Platform and recovery

```
 processor A ┐                     ┌───────────── reconfigurable region ─────────────┐
 processor B ├─ tmr_voter ── dfx_decoupler ── tinytpu (host interface, FIFO, control,│
 processor C ┘   (bus, DPR         │            weight buffer, array, accumulators,  │
        ▲         request)         │            detection, activation)              │
        │                          └────────────────────┬────────────────────────────┘
        └── GPIO {error, sync, alive, pc[15:0]}     unified_buffer (ECC, static)
```

**Voting.** The host processor is triplicated. `repair_top` takes two kinds of
outputs from each replica:

- its AXI4-Lite request;
- a one-bit reconfiguration request.

Each is voted bit-wise, two out of three. The single response and the 19
status bits go back to all three replicas. `tmr_mismatch` reports a replica
that disagrees.

**Decoupling.** While the reconfiguration controller holds `dfx_decouple`,
every signal crossing the region boundary is forced to 0, in both directions.
`rp_rst_n` restarts the freshly loaded accelerator. The `alive` status bit
rises one cycle after that reset, and the host polls it.

**Host recovery sequence.** This is software, modelled in `repair_top_tb`:

1. On the error interrupt, read ERR_PC and the fault class.
2. Request partial reconfiguration. Wait for `alive`.
3. Rewrite the weight buffer. The reloaded region starts empty; the unified
   buffer and its activations survived.
4. Clear the program counter, then push the program again from the
   `t_load_weights` that precedes the failing `t_matmul`. Start.
5. If an error follows a reconfiguration, increment a counter. When the counter
   exceeds 2, reboot the whole device. The fault is then permanent for DPR
   purposes, and the model counts a reboot.

**ECC on the unified buffer.** Each 32-bit word is stored as 39 bits: a
Hamming code plus overall parity. A single-bit error is corrected on every
read. A double-bit error is detected. Both are counted (CSR UB_ECC). There is
no scrubbing, so a corrected word stays wrong in memory until it is rewritten.

## Host address map

This is an AXI4-Lite slave, one transaction at a time. Bits [21:20] of the
byte address select the region:

| Region | Contents | Layout |
|---|---|---|
| 0 | weight buffer (write only) | vector = addr[19:4], word = addr[3:2], element k of a word in byte k |
| 1 | unified buffer (read/write) | same layout |
| 2 | instruction FIFO | words 0, 1, 2 = instruction bits 31:0, 63:32, 79:64; the write to word 2 pushes, SLVERR if full |
| 3 | registers | word = addr[7:2] |

The registers:

| Word | Name | Contents |
|---|---|---|
| 0 | CTRL | write: bit0 start, bit1 clear sync, bit2 clear error, bit3 clear pc, bits 12:8 activation shift |
| 1 | STATUS | bit0 running, 1 sync, 2 error, 3 alive, 4 FIFO empty, 5 FIFO full, 6 busy, 9:8 fault class |
| 2 | PC | program counter |
| 3 | ERR_PC | index of the failing `t_matmul` |
| 4, 5, 6 | WGT, ACC, SA | per-column fault flags |
| 7 | ERR_CNT | failed checks since reset |
| 8 | UB_ECC | [15:0] corrected, [31:16] uncorrectable |

Write latency: `bvalid` comes one cycle after the write is taken.

Read latency: `rvalid` comes two cycles after `arvalid`.

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| N (array side) | 14 | described design |
| operand / weight width | 8 | described design |
| accumulator width | 32 | described design |
| checksum lane | 16 | this design: 48-bit DSP minus 32 |
| weight buffer | 32768 vectors (448 KiB) | this design |
| unified buffer | 4096 vectors | this design |
| accumulators | 512 vectors | this design |
| instruction FIFO | 32 entries | this design |

What fits in the weight buffer:

- The three CNN benchmarks fit with all weights resident. They need 40 874,
  91 648 and 39 472 int8 parameters.
- The 15-layer anomaly-detection MLP has 1 479 881 parameters and does not fit.
  The host must reload weights between layers, which the interface allows at
  any time between a halt and the next start.

## Files

| Module | Role |
|---|---|
| `tpu_pkg` | instruction, opcode, vector-select, accumulator-op, fault-class and AXI4-Lite types; address map |
| `mac_cell` | weight-stationary multiply-accumulate cell |
| `systolic_array` | N × N grid of cells |
| `systolic_data_setup` | input skew and test-vector insertion |
| `accumulator_bank` | de-skew, accumulators, checksum lane, R0/R1, Eq. (a, a\*) |
| `error_detection_unit` | XOR comparison and diagnosis |
| `activation_unit` | requantisation, ReLU, hard sigmoid |
| `weight_buffer`, `unified_buffer` | memories; the unified buffer has SECDED |
| `instr_fifo` | instruction FIFO with flush |
| `control_unit` | fetch, sequencing, hazards, program counter, error stop |
| `host_interface` | AXI4-Lite slave and registers |
| `tinytpu` | the accelerator (reconfigurable region) |
| `dfx_decoupler` | region isolation |
| `tmr_voter` | two-out-of-three voter |
| `repair_top` | platform top |

Every module has a testbench `tb/<module>_tb.sv` that checks against
independently computed values and prints
`TB_RESULT checks=… failures=…`.

`tb/repair_top_tb.sv` runs the platform at its default parameters. It runs a
four-tile layer with ReLU and sigmoid outputs, and it models the host, the
reconfiguration controller and the reconfiguration delay. It injects faults
by forcing internal nets:

- weight flips, cured once by reconfiguration and once by a weight reload alone;
- stuck array partial-sum bits;
- a stuck accumulator checksum bit;
- a flipped unified-buffer bit;
- a fault that persists across reconfiguration and forces a reboot;
- one corrupted processor replica.

It counts each mechanism (test penalty, each fault class, flush, DPR, resume,
reboot, ECC correction, voter mismatch, decoupling) and fails if one never
happened.

`tb/dense_layer_tb.sv` runs a tiled fully connected layer on the accelerator
at its default size:

- 28 inputs and 28 outputs, cut into 2 × 2 weight tiles;
- a batch of 32 input vectors;
- partial sums accumulated across the input tiles;
- ReLU on one output tile and sigmoid on the other.

It runs the layer under three policies and measures the cycles from start to
the synchronize interrupt:

| Policy | Cycles | Overhead |
|---|---|---|
| no testing mode | 390 | — |
| testing mode on all four multiplications | 402 | 12 = 3 × 4 |
| testing mode on the last multiplication only | 393 | 3 |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tpu_pkg.sv $(ls rtl/*.sv | grep -v tpu_pkg) \
    tb/repair_top_tb.sv --top-module repair_top_tb
./obj_dir/Vrepair_top_tb
```

Swap the testbench file and top module to run any other bench. List
`tpu_pkg.sv` first and only once, so the package compiles before its users.
The other modules can be given in any order.

The benches use no X/Z and initialise everything they read. They use
`$urandom` for stimulus. Each run prints one `TB_RESULT checks=… failures=…`
line. `repair_top_tb` also prints one line per detected error and the count
of every mechanism.

On one CPU core, building and running `repair_top_tb` takes about 40 seconds.

## Where this design goes beyond or departs from the description

**Choices of this design.** The description does not give these:

- the opcode encoding;
- the address map;
- the memory depths;
- the 16-bit checksum lane;
- the requantisation and the hard-sigmoid line;
- the hazard rules;
- the status bit order;
- the one-bit reconfiguration request;
- the region reset;
- the SECDED code.

**Diagnosis details.** Two rules are this design's reading:

- a non-zero zero-vector result counts as an array fault;
- a weight flip is reported only when the raw C<sub>SA</sub> pair is also
  complementary.

**Weight flips in the recovery model.** The method allows a weight flip to be
cured by reloading the weights alone. The recovery flow chart, however, sends
every error to partial reconfiguration. The testbench host follows the flow
chart by default. One scenario shows the shortcut instead: the host reads the
weight-flip class from STATUS, clears the error, rewrites the weights and
resumes, with no reconfiguration.

**Reboot threshold.** The recovery flow chart reboots when the post-reconfiguration
error counter exceeds 2, which gives three reconfiguration attempts. The prose
speaks of errors during two attempts. The testbench follows the flow chart.

**Not modelled:**

- the processor, its memories and UART;
- the vendor reconfiguration controller, configuration port and DDR bitstream store;
- the AXI interconnect. With one slave, the voted bus connects directly.

The reconfiguration delay in the testbench is 400 cycles, not the roughly 14 ms
that the real controller needs.
