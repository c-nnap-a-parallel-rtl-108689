# SAT: a Sum And Threshold processor for ADAM binary neural networks

ADAM (Advanced Distributed Associative Memory) is a two-stage binary
associative memory. To recall, it splits an input image into small groups of
bits (tuples) and decodes each tuple into one active line. It counts, for
every class bit, how many active lines have a link set to that bit. It keeps
the L class bits with the highest counts. It then counts again through a
second binary matrix and keeps the output lines whose count reaches the
number of class bits. Almost all of the work is counting bits of binary
matrices.

The SAT processor does that counting and thresholding in hardware. It works
on sixteen matrix bits per clock, beside a DSP. It sits in a C node of the
C-NNAP machine, where double-buffered memories let the DSP prepare the next
image while the SAT recalls the current one. This repository is
synthesizable SystemVerilog for the SAT and for the node's memory subsystem.

## The recall, step by step

| step | who | what |
|---|---|---|
| tupling | DSP (software) | For each tuple *t* of size δ with value *v*, the tuple pointer is `t·2^δ + v`, the matrix line it activates |
| stage one summing | SAT | For each 16-wide column of the stage one matrix, sum the lines the tuple pointers select; store the 16 summed values |
| stage one thresholding | SAT | L-max: find the L highest summed values; store the *indices* (class bit addresses) of those bits |
| stage two summing and thresholding | SAT | For each 16-wide column of the stage two matrix, sum the lines the class bit addresses select; an output bit is 1 when its count equals τ, the number of class bits set (Willshaw) |
| encoding | DSP (software) | Turn the 1-of-2^σ output lines back into image bits |

### Matrix layout and address calculation

A matrix is stored as a sequence of *columns*. A column covers 16 class bits
(stage one) or 16 output lines (stage two). It is a run of `col_len` 16-bit
words, one per matrix line, and bit *i* of a word is the link from that line
to class bit (or output line) 16·c + *i*. To sum column *c*, the SAT reads
the word at `offset + pointer` for each pointer and clocks the sixteen
counters with it. Each counter whose bit is 1 counts up. Moving to the next
column adds `col_len` to `offset` (`sat_weight_addr`). For example, with
base 0x2000 and pointers 1, 6 and 8, column 0 reads 0x2001, 0x2006 and
0x2008, and column 1 reads 0x2000 + M + 1, and so on.

Stage two uses the same counters and address unit. Its lines are the class
bits, so its `col_len` is normally the class size. Its pointers are the class
bit addresses that stage one left in buffer memory.

### L-max thresholding (`sat_stage1_thresh`)

The hardware has one stored threshold, an equality and a magnitude comparison
against it, and a class count compared with the class size to end a pass. It
finds the L highest values iteratively:

1. **Find pass.** Read all `class_size` summed values and keep the largest one
   that is *below the previous threshold* (any value in the first iteration).
   If that largest value is 0, stop: no reachable class bit is left.
2. The largest value becomes the current threshold.
3. **Match pass.** Read all values again. For each value equal to the
   threshold, write its index to the next slot of the class bit address list.
4. If fewer than L addresses are stored, go to 1.

Every value equal to a threshold is taken, so ties can give more than L
class bits. τ (output `tau`) is the number actually stored, and stage two
thresholds against τ. For example, with the values 54 23 5 54 12 5 8 9 2 54
and L = 3, one iteration stores the addresses 0, 3 and 9. With L = 4, a second
iteration adds address 1.

Storing addresses instead of the whole class pattern means stage two touches
only τ lines per column, not every class bit. Only about log2 of the class
size bits are set, so this saves most of stage two's work.

### Stage two and Willshaw thresholding (`sat_stage2`)

For each stage two column, the controller sums the τ lines named by the
class bit addresses. It compares all sixteen counts with τ in one cycle and
writes the 16-bit thresholded word to `out_addr + column`. The sixteen
summed values are written too (to `sv2_addr + 16·column`) only if the
control block asks for it. With τ = 0 every count equals τ, so every output
bit is set.

## Control block

The DSP starts the SAT with the buffer address of a 15-word control block
(`sat_pkg`). All addresses are 16-bit SAT word addresses.

| word | field |
|---|---|
| 0 | bit 0: store stage two sums; bits 2:1: last stage (0 stage one sum, 1 thresholding, 2 full recall) |
| 1 | number of tuple pointers |
| 2 | stage one column length (lines) |
| 3 | stage one weights base |
| 4 | number of stage one columns, ⌈class size / 16⌉ |
| 5 | class size (values thresholded) |
| 6 | L |
| 7 | tuple pointer list address |
| 8 | stage one summed values address (column *c* at +16·*c*) |
| 9 | class bit address list address |
| 10 | stage two weights base |
| 11 | stage two column length (normally the class size) |
| 12 | number of stage two columns |
| 13 | thresholded output words address (one word per column) |
| 14 | stage two summed values address |

`tau` and `iters` (the thresholding iterations) are outputs of the SAT. They
are not written to memory.

## Timing

There is one clock, and the SAT cycle is taken as 50 ns (20 MHz). The
memories return read data one cycle after the address. Counted from the
cycle of the stage's start pulse to its done pulse:

| stage | cycles |
|---|---|
| control load | 17 |
| stage one summing | 2 + n_cols1 · (3·n_tuples + 17) |
| thresholding | 1 + iterations · (3·class_size + 6), plus class_size + 4 if the values run out before L bits |
| stage two | 2 + n_cols2 · (3·τ + 2, or + 18 when sums are stored) |

The start of the SAT to the interrupt takes 22 + the sum of the last three,
or 20 + stage one alone, or 21 + stage one + thresholding when it stops
early. Each matrix line costs 3 cycles (pointer read, weights read, count),
so summing 32 bits of matrix data takes 300 ns.

These state machines are this design's own. The published estimate of
execution time for the original hardware is, in SAT cycles:

    a/16·(3.5·b/d + 34) + (r·2^s/16)·(3.5·t + 35) + i·(4.5·a + 3·f)

Here *a* is the class size, *b* the input bits, *d* and *s* the tuple sizes,
*r* the number of stage two tuples, *t* the class bits set, *i* the
iterations and *f* the matches per iteration. This RTL takes fewer cycles
than that estimate on every workload tested, because it spends fewer cycles
per column.

## The node around the SAT (`cnnap_node`)

| memory | host-side area | SAT-side area | switched by |
|---|---|---|---|
| weights (`weights_memory`) | W1, 32-bit host bus: the DSP writes new weights | W2, 16-bit SAT bus: read only | `w_swap` |
| buffer (`buffer_memory`) | B1, 32-bit local bus: image, tuple pointers, control block; VME-visible | B2, 16-bit SAT bus: read/write | `b_swap` |
| DSP (`dsp_memory`) | 32-bit DSP bus only | – | – |

Each area holds 2^16 16-bit words. A 32-bit host word *n* holds SAT words 2*n*
(low half) and 2*n*+1 (high half). With `swap = 0`, area 0 is on the host
side. A typical pipeline:

1. Load job A into the host-side areas.
2. Swap, and start the SAT.
3. While it runs, load job B into the host-side areas.
4. On the interrupt, acknowledge it, swap, and start the SAT on B.
5. Read A's results from the host side.

An assertion flags a swap while the SAT is busy. The DSP32C, the SCSI
controller and disks, the VME interface chips and the bus arbitration logic
are outside `cnnap_node`. Their side of each bus is a port.

The DSP-facing SAT signals are:

* `sat_start`: a one-cycle pulse, given together with `sat_ctrl_addr`.
* `sat_irq`: a level, held until `sat_irq_ack`.
* `sat_busy`, `sat_phase`, `sat_tau` and `sat_iters`: status.

## What follows the architecture and what is this design's

Taken from the architecture:

* sixteen 16-bit counters working in parallel on a 16-bit weights word;
* matrices stored as 16-bit-wide columns, addressed as offset + pointer, with the column length added per column;
* iterative L-max thresholding with comparators against a stored threshold;
* class bits stored as relative addresses;
* stage two reusing the summing hardware, Willshaw thresholding, and stage two sums stored only on request;
* the SAT block structure: interrupt handler, control data loader, three stages;
* two switchable areas in the weights and buffer memories, controlled by the DSP;
* bus widths of 16 (SAT) and 32 (host, local, DSP).

This design's own choices:

* the control block layout and the start, interrupt and acknowledge handshake;
* the early-stop field;
* memory sizes (16-bit word addresses) and the half-word packing;
* synchronous one-cycle memories and all state machine timing;
* taking all ties, and stopping when only zero sums are left;
* the counters wrapping on overflow;
* the phase multiplexing of the shared hardware.

### Limits

Addresses and tuple pointers are 16 bits. A stage one column can therefore
have at most 65,536 lines, and both matrices must share 65,536 weights words.

* A 22 × 22 image (tuple size 4, class size 32) fits easily. Its recall takes
  about 150 µs.
* A 230 × 230 image needs 211,600 lines per column and does not fit.
* The inputs of 4,000 to 250,000 bits (tuple size 4, class sizes 50–150) do
  not fit either. The largest inputs that fit with a stage two of the same
  size are 2048, 1024 and 768 bits for class sizes 50, 100 and 150.

Wider memories would need wider pointers, or multi-word pointers, in the
control block and the tuple list.

Tupling and encoding are DSP software here, as in the original system. The
testbenches do them.

## Files

| file | content |
|---|---|
| `rtl/sat_pkg.sv` | widths, control block struct, stop and phase enums |
| `rtl/sat_sum_counters.sv` | sixteen 16-bit summing counters |
| `rtl/sat_weight_addr.sv` | offset + pointer address unit |
| `rtl/sat_ctrl_loader.sv` | control block reader |
| `rtl/sat_stage1_sum.sv` | stage one summing controller |
| `rtl/sat_stage1_thresh.sv` | L-max thresholding |
| `rtl/sat_stage2.sv` | stage two summing and Willshaw thresholding |
| `rtl/sat_irq_handler.sv` | stage sequencer and interrupt |
| `rtl/sat_processor.sv` | the SAT |
| `rtl/weights_memory.sv`, `rtl/buffer_memory.sv`, `rtl/dsp_memory.sv` | node memories |
| `rtl/cnnap_node.sv` | top: memories and SAT |
| `tb/adam_ref_pkg.sv` | reference model of the recall, ADAM training, cycle formulas |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workloads` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build one with Verilator 5, for example the end-to-end test of the
node at its default sizes:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/sat_pkg.sv tb/adam_ref_pkg.sv tb/tb_cnnap_node.sv --top-module tb_cnnap_node
    ./obj_dir/Vtb_cnnap_node

Replace the last file and the top module name to run another testbench.

| testbench | what it runs |
|---|---|
| `tb_cnnap_node` | Four jobs through the swapped memories, each loaded while the previous one runs. The buffer contents, τ, iterations, cycle counts and recalled patterns are compared with the reference model. |
| `tb_sat_processor` | Seven scenarios, including random weights (several iterations, ties, running out of values), both early stops, stored sums and L = 0. |
| `tb_workloads` | The small two-stage example, a 22 × 22 image and class sizes 50/100/150. It also checks each cycle count against the published estimate. |
| unit testbenches | Every module against values computed in the testbench. |

The testbenches drive a trained ADAM memory and check that the recall
returns the stored output. They also check every word the SAT writes
against an independent model.
