# IMAP-CE style linear SIMD processor array

This is synthesizable SystemVerilog for a single-chip image-recognition processor built around one idea.
An image is stored one column per processing element (PE). A row of 128 PEs then works on a whole image row in one instruction.
The PEs are simple 8-bit, 4-issue VLIW datapaths. Each has its own 2 KB RAM and sits in a ring with its two neighbours.

A control processor (CP) fetches instructions and broadcasts PE bundles to all PEs. It also supplies scalar operands and reads back an OR-reduction of PE data. That gives it branch conditions and search results.

Three other parts keep the array fed:
- a DMA engine that moves whole image rows between the PE RAMs and external SDRAM, with optional line scaling;
- an arbiter that shares the SDRAM port with the CP and a host;
- four video shift registers that capture camera lines on their own clock.

The CP itself, the SDRAM controller and the host bus are not included (see "What is not here"). Their connections are ports of the top, `imap_ce`.

Default sizes, all parameters of `imap_ce`:

| parameter | default | meaning |
|---|---|---|
| `NPE` | 128 | PEs in the ring, in 16 groups of 8 |
| `NREG` | 24 | 8-bit registers per PE |
| `DEPTH` | 2048 | bytes of local memory (IMEM) per PE |
| `QDEPTH` | 32 | entries in each of the two DMA request queues |
| `NCH` | 4 | video shift-register channels of 128 × 8 bits |

## The broadcast pipeline and its timing

The hardest part to use correctly is the timing between the CP and the array. `pe_array` contains two broadcast registers:
- **BC1** registers the 4-slot instruction bundle (`instr`).
- **BC2** registers the scalar pair `cr1`/`cr2` (`scalar`).

The bundle is presented on `instr` in cycle *t*. Then:
- cycle *t*+1: every PE is in its operand-read stage (iRF);
- cycle *t*+2: the execute stage (EX);
- cycle *t*+3: the write-back stage (iWB).

The scalar pair belonging to that bundle must be presented in cycle *t*+1. It is then registered by BC2 and meets the bundle in EX.

A status request (`sts`) is ORed over all PEs in two registered levels: first within each group of 8, then across the 16 groups. `ped`/`ped_valid` appear in cycle *t*+4.

Inside each PE, results are forwarded from EX and from iWB back to iRF. Back-to-back dependent register operations therefore run without stalls.

There is one exception. A load (`ld`, `ldt`) delivers its byte in iWB. The bundle directly after a load must not read the loaded register. The hardware does not interlock; the program has one load delay slot.

Nothing in the array ever stalls. The only back-pressure is `lsu_hold`, described under DMA.

## PE instruction bundle

`pe_instr_t` (in `imap_pkg`) has four slots. Each slot holds an opcode, a mask bit and three 5-bit register fields `r1`, `r2`, `r3`. Below, `irN` means the register that field `rN` names, and `irNP` means the register pair `irN` (low byte), `irN+1` (high byte).

| slot | unit | operations |
|---|---|---|
| `a` | ADD | `add sub` (with carry/borrow flag), unsigned saturating `sadd ssub`, `abs` = \|ir1−ir2\|, 3-input `max min`, `mv`, `mv2` (ir3 = cr1), `pdp`, mask control `mif mifc melse mend` |
| `l` | LOG | `and or xor not`, 1-bit shifts `sll srl sra`, `sts`, `sml` |
| `m` | MUL / COMM | `mul` (ir3P = ir1 × ir2, unsigned), neighbour moves `mvr mvl` (8 bit) and `mvrp mvlp` (16 bit) |
| `s` | LSU | `ld st` at address cr1+cr2, `ldt stt` at address cr1+ir2P (a per-PE table index) |

Register write priority within one bundle is LSU > MUL > LOG > ADD when two slots name the same register.

`mvr` reads the left neighbour and `mvl` the right one. PE 0 is leftmost, and the ring closes from PE 127 back to PE 0.

`pdp` writes `cr2` into `ir3` of the single PE whose index equals `cr1`. It is the way back from the CP into one PE, for example to return a value read through `ped`.

## Masking: mr, mf and sml

Each PE has two 1-bit mask registers:
- **`mr`**: when a slot's mask bit is 1, PEs with `mr = 0` discard that slot's register or memory write.
- **`mf`**: holds the PEs that the last test turned off, so that an else-branch and the end of the conditional can be built.

The operations:
- `mif`: `fs = flag(r3 field, ir1 − ir2)`, then `mr = fs & mr` and `mf = ~fs & mr`. The old `mr` is used on both right-hand sides.
- `mifc`: the same, but it subtracts the borrow of the previous `sub`/`mif` and ANDs in the previous zero result. A pair of compares therefore tests 16-bit values.
- `melse`: swaps `mr` and `mf`.
- `mend`: `mr |= mf`, `mf = 0`. This restores the mask that was in force before the `mif`.
- `sml`: keeps `mr` only in the leftmost PE whose `mr` is 1. The other PEs' `mr` bits are moved into `mf`, so a following `mend` undoes it. The leftmost-one search is a prefix-OR network in the `rdu`, built by the same two-level grouping as the status OR.

The r3 field of `mif`/`mifc` chooses the flag type:
- 0: eq
- 1: ne
- 2: ltu
- 3: geu
- 4: lt (signed)
- 5: ge (signed)
- 6: gtu
- 7: leu

Nesting deeper than one level needs the program to save `mf` state in registers. This is a design choice: the original architecture names four mask operations but defines only two.

## External memory interface

- **`dma_queue`.** Two FIFOs of 32 descriptors: high and low priority. The engine always takes the high queue first. `dq_full` gives each queue's full flag. Pushing into a full queue is an error and is asserted against.
- **`dma_desc_t`.** Fields:
  - direction: IMEM→EMEM, EMEM→IMEM, or video line→EMEM;
  - the first IMEM row;
  - the first EMEM 64-bit word;
  - the EMEM pitch in words;
  - the number of rows;
  - the scaler step;
  - for video, the channel.
- **`dma_engine`.** Handles one row at a time.
  - To the IMEMs, one row is one byte per PE, i.e. one 128-byte row. The engine uses a single cycle for it, and every IMEM is read or written at once.
  - Row data passes through **`line_buffer`**: 16 registers of 64 bits, one per group of 8 PEs, shifted one word per cycle.
  - The 16-word burst to or from EMEM is locked in the arbiter, so it is never split.
  - **`line_scaler`** sits on the path from the line buffer to EMEM. It resamples a row by nearest neighbour: output pixel *j* = input pixel ⌊*j*·step/64⌋. That covers 25 % to 400 % (step 256 down to 16). Pixels past the end of the line become 0.
  - `dma_done` pulses once per finished descriptor.
- **IMEM access by the DMA.** The PE RAMs are single-port. The DMA's row cycle is granted only in a cycle where no LSU operation is in EX. While the DMA waits, `lsu_hold` is high. The CP must then leave the LSU slot empty until `lsu_hold` drops. That happens as soon as the LSU operations already in the pipeline have left EX. Each DMA row costs the array exactly one IMEM cycle.
- **`mem_arbiter`.** Fixed priority: CP (port 0) first, then host (1), then DMA (2).
  - A master that raises `lock` with a granted request keeps the port until it drops `lock` and its last word has been accepted.
  - Reads may return later and out of step with requests. They are routed back by the tag the arbiter attaches (`emem_tag` out, `emem_rtag` back).
  - The memory side is a 64-bit word port with a 23-bit word address (64 MB), valid/ready handshake.

## Video shift registers

`video_sr` runs on `vclk`:
- After `hsync`, each cycle with `vvalid` shifts one pixel per channel into four 128-byte chains.
- `vmode` sets how many pixels each PE position receives: 1, 2 or 4. The 1, 2 or 4 channels of a group then act as one long chain of 128, 256 or 512 pixels.
- When a full line has been shifted in, it is copied to a capture register. A toggle then crosses to `clk` through three flip-flops, and `line_irq` pulses for one `clk` cycle.
- The captured line stays stable until the next line completes. A DMA descriptor of type "video line → EMEM" copies it out.
- `vout` shows the pixel that leaves each chain.

## Top level: `imap_ce`

`imap_ce` connects `pe_array`, `dma_queue`, `dma_engine` (with its `line_buffer` and `line_scaler`), `mem_arbiter` and `video_sr`. Its ports are plain signals and the packed structs of `imap_pkg`:
- **CP side:** `instr`, `scalar`, `ped`, `ped_valid` and `lsu_hold`; `dq_push`, `dq_prio`, `dq_desc` and `dq_full`; `dma_busy` and `dma_done`.
- **CP and host EMEM ports:** `cp_*` and `host_*`.
- **SDRAM port:** `emem_*`.
- **Video:** `vclk`, `vrst_n`, `vmode`, `hsync`, `vvalid`, `vin`, `vout` and `line_irq`.

Reset is synchronous and active low: `rst_n` for the system clock, `vrst_n` for the video clock.

## Simulating

Every file in `rtl/` holds one module or the package, named after the file, so verilator finds the modules by itself once the package is given first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/imap_pkg.sv tb/tb_imap_ce.sv --top-module tb_imap_ce
./obj_dir/Vtb_imap_ce
```

Each testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N failures=M` and stops, and it has a watchdog. There is one per module: ALU, LOG, MUL, register file, IMEM, RDU, PE, PE array, line buffer, line scaler, DMA queue, DMA engine, arbiter, video SRs. Most of them compare against a reference model under random stimulus.

`tb_imap_ce` runs the full chip at the default sizes, with no overrides. It plays the CP, a host and an SDRAM with random ready and read delays, and a camera. It runs:
- a 128 × 240 8-bit image loaded by DMA;
- binarisation, a 3 × 3 average, and a 256-bin histogram in two row-systolic passes around the ring;
- a search with `sml`/`sts`/`pdp`;
- a 50 % scaled copy back to EMEM;
- a 512-pixel video line in 4-pixel-per-PE mode, taken to EMEM by DMA;
- host traffic throughout.

It checks every result against a model. It also counts each mechanism: masked writes, 16-bit compares, `sml`, `sts`, ring moves, table loads, `pdp`, `lsu_hold` waits, DMA priority, arbiter contention, scaling and the line interrupt. A mechanism that never happens counts as a failure. It takes about 24 k cycles, under a minute including the build.

## Where this design departs from, or adds to, the original architecture

The following are this design's own choices where the architecture description is silent:
- the bit encoding and the slot of each operation;
- the flag types;
- the unsigned saturation;
- the write priority between slots;
- the load delay slot;
- the reset values (registers 0, `mr` 1, `mf` 0);
- the descriptor format;
- the queue and arbiter priorities;
- the nearest-neighbour scaler;
- the video capture register and synchroniser.

Other points:
- **Shift direction.** The description lists `sll` with a right-shift formula. Here `sll` shifts left as its name says, and `srl`/`sra` are added.
- **`mifc` formula.** The published formula leaves the borrow out of the `mf` update. Here it is used in both `mr` and `mf`, so that `mf` stays the complement of the new `mr` within the old one.
- **Mask operations.** Only `mif` and `mifc` of the four mask operations are defined there. `melse`, `mend` and the `sml`-into-`mf` rule are this design's.
- **DMA rectangles.** The DMA moves whole rows only. The original engine accepts any rectangle of the 2-D memory plane.
- **Video output.** It only streams out what was shifted in. There is no path to load an output line from the PEs.
- **Multi-chip.** Multi-chip links and PE numbers above 127 are not built.

## What is not here

- **Control processor.** Its instruction set and caches are not specified closely enough to build. The top testbench drives the bundle, scalar, queue and memory ports in its place.
- **SDRAM controller and SDRAM.** The arbiter's 64-bit word port is brought out instead.
- **PCI/CPU/I2C host interfaces.** Only named in the original architecture; the host appears as a second EMEM master port.
