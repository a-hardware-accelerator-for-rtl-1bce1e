# Programmable morphology PE array for video segmentation

Most video object segmentation algorithms spend their time on a few image
operations: morphological gradients, edge detection, cleaning up masks, and
watershed flooding. All of these can be written as chains of seven 3x3
neighbourhood operations: dilation, erosion, their conditional (geodesic) forms,
their masked forms, and "no operation". This RTL implements an accelerator
built around that idea. A host computer keeps the irregular, software-friendly
parts of an algorithm. The accelerator streams whole frames through an array of
36 small programmable processing elements (PEs). Each PE applies one
neighbourhood operation per pixel per clock, and a small control unit repeats
passes without help from the host, including "repeat until nothing changes".

The architecture follows the one published by S.-Y. Chien, Y.-W. Huang and
L.-G. Chen ("A Hardware Accelerator for Video Segmentation Using Programmable
Morphology PE Array"). That description gives the block structure, the operation
set, the PE and interconnect diagrams and the array shape. It does not give
encodings, tile sizes, the instruction set or the host interface. Those are
this design's own choices, listed in
[Departures and filled-in details](#departures-and-filled-in-details).

## From segmentation steps to PE operations

With `(+)` for dilation, `(-)` for erosion and `B` the 3x3 element:

| Step | As PE operations |
|---|---|
| Morphological gradient | `GRA = I (+) B - I (-) B`. One PE dilates in its upper byte lane and erodes in its lower lane, both on the same image. Its interconnection unit subtracts the two. |
| Edge detector | `Edge = Th(GRA) (-) B - Th(GRA) (-) B (-) B`. Gradient, then a threshold to 0/255, two erosions and a subtraction. |
| Small-region removal | A dilation followed by repeated conditional erosions, `(X (-) B) max Y`. |
| Edge fitting | The same, with conditional dilations against the complement of the edge map, which the interconnection unit can invert. |
| Watershed flooding | Masked erosion. |

Watershed flooding is the least obvious of these. Every pixel first gets a
unique label, in order of gray level and then raster order. Then, gray level by
gray level, each pixel of the current level takes the minimum label of its
neighbourhood, repeated until no label changes. That is an erosion applied only
where the gray level equals `g`. Labels travel as 16-bit data and gray levels
as the 8-bit Ref. The mask selects `th_a <= Ref <= th_b`, with `th_a = th_b = g`.

On the 5x5 example used to illustrate the method, four "until no change" loops
with the cross-shaped element give exactly the published basins. The 3x3
square element gives three more pixels to basin 0.

Gray levels:
```
2 2 1 0 0
3 3 2 1 0
1 2 3 2 1
0 1 2 3 2
0 0 1 2 3
```

Initial labels:
```
12 13  6  0  1
20 21 14  7  2
 9 17 22 15  8
 3 10 18 23 16
 4  5 11 19 24
```

Result (two basins, labels 0 and 3):
```
0 0 0 0 0
0 0 0 0 0
3 3 0 0 0
3 3 3 0 0
3 3 3 3 0
```

## The PE: two 8-bit sub-PEs on one 3x3 window (`morph_pe`)

A PE receives one pixel per clock in raster order. A pixel is a 24-bit word:
16-bit data plus an 8-bit Ref.

**Window.** Two registers and a line delay of W-2 words per image row build
the three rows of the window. The line delays are `delay_line`: a circular
memory with one read and one write per cycle. The centre of the window is the
input delayed by W+1 cycles. Ref, the valid flag and the start-of-frame flag go
through their own (W+1)-word delay, so they arrive together with the centre.

**Tile edges.** Row and column counters follow the centre pixel. Neighbours
outside the H x W tile are replaced by the identity of the operation: 0 for
max, all ones for min. Nothing from the previous line, or from the previous
frame, leaks into a result, and frames can follow each other without a gap.

**Operations.** The two sub-PEs are the upper and lower bytes of the data
word. Each sub-PE computes the max and the min over its structuring element:
either the 3x3 square (8-connected) or the cross (4-connected). Its decision
logic then produces one of the following:

| op | result |
|---|---|
| `OP_NOP` | centre |
| `OP_DIL` | max |
| `OP_ERO` | min |
| `OP_CDIL` | min(max, Ref) |
| `OP_CERO` | max(min, Ref) |
| `OP_MDIL` | mask ? max : centre |
| `OP_MERO` | mask ? min : centre |

In 8-bit mode each lane has its own operation and its own element. That is
what allows a dilation and an erosion of the same image to run side by side.

**16-bit mode.** With `mode16` the two sub-PEs join. Every comparison is
decided by the upper byte, and by the lower byte when the upper bytes are
equal. Both lanes then take the same winner. In this mode the 8-bit Ref is
zero-extended for conditional operations.

**Mask and change.**
- `mask_gen` compares the centre-aligned Ref with `th_a` and `th_b`.
- `change` is sticky. It goes high once any result of the current tile
  differs from its centre pixel, and clears at the next start of frame.
  The control unit uses it to decide "until no change".
- A PE whose `activated` bit is 0 passes the centre pixel unchanged.

**Start-up.** The delay memories are not reset. For the first W+1 cycles after
reset the PE therefore ignores the flags coming out of its delay line.

Latency: W+2 cycles, with registered outputs.

## The programmable interconnection unit (`interconnect_unit`)

This unit sits behind every PE and forms the word for the next PE. It adds one
pipeline register.

- **Data.** Either pass all 16 bits unchanged (`pass16`), or build each byte
  from one of these sources (`dsel_e`): the same half, the other half, the
  arithmetic result, the threshold byte (255 where the mask is high, else 0)
  or Ref.
- **Arithmetic.** `hi - lo` clamped at 0 (`sub = 1`), or `hi + lo` saturated
  at 255.
- **Ref** (`rsel_e`): Ref, inverted Ref, the arithmetic result, or the lower
  data byte. Routing a computed image into Ref lets the next PE threshold it
  or use it as a condition.
- **Thresholds.** `th_a` and `th_b` are passed on, or incremented by one
  (saturating). Consecutive PEs can therefore work on consecutive gray levels.

A PE plus its interconnection unit is a MacroPE (`macro_pe`). Its latency is
W+3 cycles.

## The array (`pe_pipeline`, `pe_array`)

A row is a chain of N = 9 MacroPEs, and four rows work in parallel. The frame
is cut into four overlapping vertical tiles, one per row and one per SRAM bank.

- **SIF frames.** The default tile is 106 x 240: 352/4 = 88 columns of its own
  plus 9 columns of overlap on each side. Nine chained 3x3 operations damage
  at most 9 border columns, so the 88 columns each tile owns come out exact
  after one pass.
- **Input side.** An input buffer registers the four words read from the
  SRAM banks.
- **Cascade mode.** Row k takes its input from row k-1 instead of bank k. The
  four rows then form one chain of 36 MacroPEs on the tile in bank 0, with
  the thresholds continuing from row to row. In this mode only bank 0 is
  written.
- **Output side.** An output buffer registers the results and the per-bank
  write enables.

Latency from the array input to its output: 2 + N(W+3) cycles, or
2 + 4N(W+3) in cascade mode.

## Control unit and program (`control_unit`)

The host writes a program of up to 32 instructions and four configuration sets
of 36 MacroPE configurations each, then pulses `start`. The program always
starts with SRAM0 as the source. `done` pulses at `I_HALT`.

| instruction | effect |
|---|---|
| `I_PASS` | Streams every tile from the source SRAM through the array into the destination, using configuration set `cfg_set` and thresholds `th_a` and `th_b`. Without `in_place` the destination is the other SRAM and becomes the next source (ping-pong). With `in_place` results overwrite the source; this is safe because writes trail reads by the array latency, and every pixel still needed is held in the PEs' line delays. `cascade` selects cascade mode. |
| `I_LOOP n` ... `I_ENDL` | Runs the body n times. The only cost is the fetch cycle of the instructions themselves (zero-overhead loop). |
| `I_UNTIL n` ... `I_ENDL` | Runs the body until a pass reports no change, or at most n times. |
| `I_SWAP` | Exchanges the source and destination SRAM. |
| `I_HALT` | Stops and pulses `done`. |

Loops do not nest.

Encodings (see `morph_pkg`; MSB first):
- `instr_t` (33 bits): `op[3] in_place cascade cfg_set[2] th_a[8] th_b[8] count[10]`
- `mpe_cfg_t` (22 bits): `pe_cfg_t` then `ic_cfg_t`
  - `pe_cfg_t`: `activated mode16 op_hi[3] se_hi op_lo[3] se_lo`
  - `ic_cfg_t`: `pass16 hsel[3] lsel[3] sub rsel[2] inc_a inc_b`
- `pix_t` (24 bits): `data[16] ref_px[8]`

## Memories, DMA and the host side (`tile_sram`, `dma_engine`, `seg_accel`)

**SRAMs.** SRAM0 and SRAM1 each hold four banks of W x H pixel words. All
banks are read at one address and written at one address, with one write
enable per bank. Reads take one cycle and return the old word when a read and
a write collide.

**DMA.** The DMA engine moves `len` words between one bank and the host
streams:
- host to SRAM: one word per clock when the host supplies one;
- SRAM to host: one word per two clocks, and it waits on `h_out_ready`.

Its descriptor is `dir`, `sram`, `bank`, `addr` and `len`.

**Host interface.** The system bus (PCI in the original system) is not
modelled. The top level brings out:
- write ports for the program and the configuration sets;
- `start`, `busy`, `done`, `last_change` and `pass_count`;
- the DMA descriptor;
- two valid/ready pixel streams.

While `busy` is high the control unit owns both SRAMs, and the host must not
start a DMA transfer.

A typical job:
1. DMA the four tiles into SRAM0.
2. Run the program.
3. DMA the results back from whichever SRAM the program left them in.

## Timing at the default size

One pass over all four tiles takes W*H + N(W+3) + 3 = 26424 cycles from the
first read to the last write, plus two cycles of fetch and closing. At the
40 MHz clock of the original design that is 0.66 ms for nine 3x3 operations
on a whole SIF frame. The throughput is:
- 1.44e9 16-bit pixel operations per second, or twice that as 8-bit lanes;
- 13,600 (16-bit) or 27,200 (8-bit) whole-SIF-frame 3x3 operations per second.

The original work quotes 22,140 16-bit and 44,280 8-bit "morphological
operations per second" at 40 MHz without stating the unit. Only the 2:1 ratio
can be confirmed.

## Departures and filled-in details

Taken from the original description:
- two 8-bit sub-PEs per PE, joined for 16-bit operation;
- the seven operations and both structuring elements;
- conditional erosion as a union with the reference;
- masked operation restricted to one gray level;
- a mask generator fed by two thresholds, and a change output;
- an interconnection unit with an adder/subtractor, 0/255 thresholding, Ref
  inversion, +1 on both thresholds and a pipeline register;
- 24-bit buses, four rows of nine MacroPEs and overlapped tiles;
- two SRAMs used in ping-pong, a DMA, and a control unit with zero-overhead
  loops, in-place operation and self-control.

Chosen here:
- tile size 106 x 240, and one SRAM bank per tile;
- the mask rule `th_a <= Ref <= th_b`;
- conditional dilation as min with Ref (the dual of the given conditional
  erosion);
- the Ref format in 16-bit mode (zero-extended);
- identity padding at tile edges;
- every multiplexer selection and encoding;
- the instruction set;
- cascade mode as the meaning of the array's row-to-row multiplexers;
- saturation of the interconnect arithmetic;
- the host interface;
- reset behaviour: asynchronous active-low; memories are not cleared.

Known differences from the published figures:
- The original PE uses 8 comparators through a partial-result-reuse scheme
  that is not described. This PE uses plain comparator chains: the same
  function, with more comparators.
- The original reports 2712 bits of delay-line memory per MacroPE
  (97,632 bits in all). This PE uses 2(W-3)x16 + Wx10 = 4356 bits at W = 106,
  because it keeps both lanes' line delays at full width plus a 10-bit
  Ref/flag delay.
- The original's gate counts are not matched or targeted.
- Multiscale gradient needs a division by three, which the interconnect
  arithmetic does not provide. Its sum has to be finished by the host or
  approximated.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it exercises |
|---|---|
| `tb_delay_line` | exact delay with random enable gaps; depth 2 |
| `tb_morph_pe` | all operations x elements x 8/16-bit, inactive PE, Ref and Mask outputs, change flag, back-to-back frames, latency W+2 |
| `tb_interconnect_unit` | 2000 random configurations and inputs against a model |
| `tb_macro_pe` | gradient + threshold + Ref routing + threshold increment; 16-bit conditional erosion; latency W+3 |
| `tb_pe_pipeline` | random configurations of a 3-MacroPE chain; thresholds out; change OR; latency |
| `tb_pe_array` | parallel and cascade modes with random configurations; bank enables; latency |
| `tb_tile_sram` | random reads and writes, collisions, per-bank enables |
| `tb_dma_engine` | both directions, gaps and back-pressure, rate |
| `tb_control_unit` | ping-pong, loops, until-loop termination, swap, cascade, configuration sets, pass length |
| `tb_seg_accel` | end to end at 4 rows x 3 MacroPEs, 5x5 tiles: the watershed example above, then gradient, conditional loops, swap and a 12-MacroPE cascade; counts that each mechanism occurred |
| `tb_seg_accel_post` | binary post-processing at 4 rows x 9 MacroPEs, 40x18 tiles: small-region elimination (dilate by B_n, then conditional erosions against the original) with a different n = 3, 5, 7, 9 on each row, and edge fitting (ten MacroPEs in cascade, Ref inverted halfway); expected images come from image-level code in the testbench, and the hole-filling rule is checked by construction |
| `tb_seg_accel_full` | default size: four 106x240 tiles, the Eq. (5) edge detector in one pass, DMA in and out, pass length 26424 cycles (about 15 s of simulation) |

The array-level testbenches share a reference model written from the
operation definitions (`tb/morph_model.svh`) and host tasks
(`tb/accel_host.svh`). Run them from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/morph_pkg.sv tb/tb_seg_accel.sv --top-module tb_seg_accel
./obj_dir/Vtb_seg_accel
```

To change the size, override `ROWS`, `N`, `W`, `H` and `PROG_DEPTH` on
`seg_accel`. `W` must be at least 4 and `H` at least 2. Port widths of the
address and length fields follow `$clog2(W*H)`.

## Files

- `rtl/morph_pkg.sv`: operation, configuration, pixel and instruction types.
- `rtl/delay_line.sv`, `rtl/mask_gen.sv`, `rtl/morph_pe.sv`: the PE.
- `rtl/interconnect_unit.sv`, `rtl/macro_pe.sv`, `rtl/pe_pipeline.sv`,
  `rtl/pe_array.sv`: the array.
- `rtl/tile_sram.sv`, `rtl/dma_engine.sv`, `rtl/control_unit.sv`,
  `rtl/seg_accel.sv`: memories, DMA, control and the top level.
