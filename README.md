# Superconducting SFQ processors in SystemVerilog: a SIMT prototype core and SuperNPU

## Design idea

Single-flux-quantum (SFQ) logic runs at tens of GHz. Every SFQ gate is clocked, so every gate is a pipeline stage. Pipelines are therefore very deep, and there is no cheap random-access memory. Storage is built from loops of DFFs (shift registers) that can only be read at one port while they turn.

Both designs here are built around those two facts.

- **The 4-bit SIMT prototype processor** hides its deep pipeline with fine-grained multithreading. Twelve threads run one instruction stream. One thread issues every second cycle. A thread's next instruction comes one 24-cycle slot later, which is exactly the pipeline depth, so no hazard logic is needed. The register file, data memory, sign flags and instruction memory are all loops that turn with the issuing thread.
- **SuperNPU** is a weight-stationary systolic neural processing unit (256 x 64 PEs, 15-stage PEs, 8 weights per PE). It avoids long shifts through its memories:
  - the buffers are split into many short shift-register chunks;
  - the psum and ofmap buffers are merged into one chunk pool, so a result chunk simply becomes the next mapping's psum source;
  - a data alignment unit (DAU) feeds each PE row from the shared ifmap stream, with bubbles and delays, instead of storing duplicated ifmap copies.

The two designs are independent. The top module `sfq_system_top` places them side by side. They share only clock and reset, and each keeps its own ports (prefixes `proc_` and `npu_`).

Parameters default to the published sizes. Memories that are loops of DFFs in hardware are modelled as arrays with a rotating port position. This is cycle-equivalent at the ports and keeps simulation fast.

## The SIMT prototype processor (`sfqp_*`)

| Module | Role |
|---|---|
| `sfqp_pkg` | opcodes, decoded-instruction struct |
| `sfqp_imem` | 24-entry loop of 10-bit instructions; advances once per slot, plus a skip offset |
| `sfqp_ir` | instruction register and decoder (format: 6-bit opcode, two 2-bit fields or a 4-bit offset) |
| `sfqp_regfile` | loop of 12 thread entries, 4 registers x 4 bits each |
| `sfqp_dmem` | loop of 12 thread entries, 4 words x 4 bits each; host load one entry per cycle |
| `sfqp_sfr` | loop of 12 sign flags; write tap 4 threads behind the read tap |
| `sfqp_alu` | 4-bit add/subtract and sign |
| `sfqp_ctrl` | start, issue every second cycle, slot sequencing, skip with delay slot, halt |
| `sfqp_core` | the 24-stage pipeline joining them |

**Instruction set.** NOP, HLT, SKS0 (skip `offset` entries if the sign flag is 0), LI, SW, ADD, ADDS0 and SUBS0 (conditional on sign flag 0), SUB, ADDI, SUBI, LW. The opcode bit patterns follow the published instruction table.

**Timing.**
- The controller loads the instruction register, then issues threads 0..11 on the even cycles of a 24-cycle slot, so it runs at 0.5 operations per cycle.
- Register and memory results are written at stage 24, just as the same thread issues again. Consecutive instructions must therefore be independent; the published program is written that way.
- The sign flag is written at stage 8. This makes it visible to the very next instruction, which the published program needs (`SUBI` followed directly by `ADDS0`).
- A taken skip is applied after one delay slot.
- HLT is not issued. After it the loops keep turning, so the final state of every thread passes the read-out ports (`rf_entry`, `dm_entry`, `head_thread`) within 24 cycles.

**Host protocol.**
1. Write 24 instruction words with `im_load_en`.
2. Write 12 thread data entries with `dm_load_en`.
3. Pulse `start` and wait for `halted`.

The published 2-by-2 matrix-vector element program takes 41 slots (984 cycles plus 2 cycles of start-up).

## SuperNPU (`snpu_*`)

| Module | Role |
|---|---|
| `snpu_pkg` | configuration structs: DAU row, layer, mapping |
| `snpu_sr_chunk` | one shift-register chunk: LEN entries, LANES x 8 bits, rotating port, origin flag |
| `snpu_ifmap_buf` | 64 chunks x 1536 entries x 256 lanes (24 MB), write decoder plus read multiplexer |
| `snpu_out_buf` | integrated psum/ofmap buffer: 256 chunks x 1536 entries x 64 lanes (24 MB), with psum, ofmap and host-read selections |
| `snpu_dau_row` | one DAU row: controller, selector and programmable delay line |
| `snpu_dau` | 256 DAU rows and their configuration registers |
| `snpu_pe` | 15-stage PE with 8 weight registers |
| `snpu_nw_link` | the DFFs of the store-and-forward network branches; one instance carries the 63 branches of a PE row |
| `snpu_pe_array` | 256 x 64 PEs, ifmap east, psums south, weight shift chains, column skew/deskew |
| `snpu_ctrl` | the mapping sequencer |
| `snpu_top` | everything joined, plus a 128 KB weight buffer (2048 x 64 weights) |

### PE and array

A PE computes `psum_in + pixel * weight[wsel]` modulo 256 in 15 feedback-free stages:
- stage 1 captures the pixel and the selected weight;
- stage 2 takes the partial sum from the PE above;
- stages 3 to 10 each add one shifted partial product;
- the rest only delay.

Because the psum joins at stage 2, row r+1 must receive a pixel 14 cycles after row r. The DAU provides this skew. A pixel is presented once per active weight register (`wsel` = 0..nk-1), so one pixel feeds up to 8 x 64 filters.

Column c sees a pixel c cycles after column 0. The array therefore delays psum lane c by c cycles on entry and by 63-c cycles on exit, so the buffers exchange whole aligned words.

Array latency is (ROWS-1)(STAGES-1) + STAGES + COLS-1 cycles. The array takes one slot of ROWS x COLS MACs per cycle.

### Data alignment unit

Each DAU row has three parts:
- **Controller.** Follows the (y, x) position of the streamed ifmap pixel. It marks a pixel as needed when y-ky and x-kx are non-negative multiples of the stride and fall inside the output map.
- **Selector.** Picks the row's channel lane, or inserts a zero bubble with valid 0.
- **Delay line.** Delays the result by the programmed delay plus the fixed skew row x 14.

For a K x K filter on a W-wide image, row (c, ky, kx) gets delay ((K-1)W + (K-1) - (ky W + kx)) x nk. All rows then deliver the pixels of one output position in the same slot.

### Buffers and the mapping sequence

The host fills the buffers and configures the mapping:
1. Append words to an ifmap chunk. Lane = channel, in raster order.
2. Append 2048 words to the weight buffer. For register k, entries k·256 .. k·256+255 hold PE rows 255 down to 0.
3. Write the DAU row configurations and the layer configuration.
4. Start a mapping with `map_in`. It gives the ifmap chunk, the psum chunk and whether to use it, the output chunk, the number of streamed entries `npix` and the number of registers `nk`.

`snpu_ctrl` then runs four phases:
- **WLOAD:** nk x 257 cycles.
- **REWIND:** turns every selected chunk to entry 0. This takes at most one chunk length, which is the whole point of dividing the buffers.
- **STREAM:** exactly npix x nk cycles, with no stall.
- **DRAIN:** a fixed number of cycles. During it the ifmap chunk is turned back to entry 0 for the next host fill.

For every valid result slot, the output chunk receives one 64-lane word. Lane c of slot k is filter k·64 + c. With `use_psum`, the word first adds the psum chunk's entry in the same order. Selecting an earlier mapping's output chunk as the psum chunk is how channel groups larger than 256 rows are accumulated. No data moves between buffers.

The host reads results through the `ho_*` selection, from the chunk's origin (`ho_at_origin`).

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`, except the mapping sequencer `snpu_ctrl`, which is tested inside `tb_snpu_top`. Processor blocks run at full size. NPU blocks run at reduced sizes set by parameters.

- **Processor end to end** (`tb_sfqp_core`). The published program runs on all 12 threads with random data. The test checks:
  - every thread's registers, data memory and sign flag;
  - the run length (41 slots);
  - the issue rate of 0.5.
- **NPU end to end** (`tb_snpu_top`). This test uses 8 x 4 PEs, 2 registers, 64-entry chunks and a host model (`snpu_host`). It runs three convolution mappings against a reference model:
  - stride 1 with 2 registers;
  - stride 1 accumulating on the first result through the psum chunk;
  - stride 2.

  It checks every result word, the stream length (npix x nk cycles) and the weight-load length.
- **System** (`tb_sfq_system_top`). Both hosts run at once on `sfq_system_top`. It counts every mechanism and fails if any never happens: conditional skip, halt, conditional add, weight loading, chunk rewinding, DAU bubbles, DAU delay bypassing, multi-register slots, psum accumulation and stride selection.
- **Block tests.** These check cycle-exact latencies: PE 15 cycles, array latency formula, DAU 1 + delay + skew, one-cycle links. They also check the loop behaviour of every memory against models.

Each block also has a deliberately broken copy, used to confirm that its testbench detects the fault.

**Largest size simulated.**
- The processor was simulated at its full published size.
- The NPU was simulated at up to 8 x 4 PEs, 2 weight registers and 64-entry chunks.

The full-size NPU (256 x 64 PEs, 8 registers, 64 + 256 chunks of 1536 entries, about 48 MB of buffer state) is compiled and elaborated, but not simulated. Its build is too large for a practical simulation turn-around. The full-size top therefore has no testbench of its own.

## What follows the publication and what is this implementation's own

**Taken from the publication:**
- processor: 12 threads, 24 pipeline stages, 4-bit data, 24-entry instruction memory, 4 registers, 4 data words and 1 sign flag per thread, 10-bit instruction format, instruction set, the matrix-vector program, issue rate 0.5;
- NPU: 256 x 64 PEs, 8-bit data, 15-stage PEs, 8 registers per PE, weight-stationary dataflow with store-and-forward links, 24 MB ifmap and 24 MB output buffers, 128 KB weight buffer, division into 64 ifmap chunks and 256 output chunks, the integrated psum/ofmap buffer, the DAU's controller/selector/delay structure and bubbles with a valid bit.

**This implementation's own choices:**
- the PE's internal staging;
- the psum width of 8 bits (from 256 B/cycle per 256 columns);
- the column skew/deskew registers;
- the DAU's pixel-selection rule and its power-of-two strides;
- the delay-line bound (chunk length - 1 plus the row skew);
- the mapping sequencer, host ports and word orders;
- the chunk length of 1536 (capacity / chunk count / lane bytes);
- the sign-flag write stage (8);
- skip decided on thread 0's flag;
- the program-load ports.

## Differences from the publication and open points

- **Instruction memory size.** The text gives both 20 and 24 entries. 24 is used: it matches the 240-bit memory and the 24-line program.
- **Program listing.** The program listing's conditional-skip mnemonic is read as "skip 6 entries if sign flag = 0". Six is the offset that closes the loop: after the delay slot in entry 20, it skips entries 21, 22, 23, 0, 1 and 2 and lands on entry 3, the first `LW`. The listing's conditional add and store mnemonics are read as ADDS0 and SW.
- **Overflow in the example program.** With matrix elements -4..3 and vector elements 0..2, an element a1·b1 + a2·b2 can reach 12 or -16. That is outside the 4-bit range, so results wrap modulo 16. The publication states the ranges were chosen to avoid overflow.
- **Data path abstraction.** The processor computes the ALU result at issue and carries it down the 24 stages. This matches the gate-level pipeline's behaviour, not its structure.
- **Chunk length and layer size.** One chunk lane holds one channel of at most 1536 pixels. Layers with larger channel planes (for example 224 x 224 inputs, 55 x 55 outputs) must be split by the host into row bands with halo rows, one mapping per band.
- **Filters larger than the array.** Filters with more than 256 weights (C·K·K) take several mappings accumulated through psum chunks.
- **Not modelled:**
  - off-chip memory (HBM, 300 GB/s) and memory stalls: the host ports stand in for it;
  - the on-chip clock generator: the clock is an input;
  - power, frequency and the publication's performance estimator.
- **Buffer conflicts.** The buffers assume that selections moving in the same cycle name different chunks. Assertions check this.
