# Homogeneous multistage processor array for real-time image processing

Many image-processing applications run as a chain of steps, and each step has
its own parallel work. Road-side recognition for lane keeping is the example
used here: many candidate road models are tried on every frame, and the best
one is kept. This architecture maps such a chain onto a pipeline of processor
clusters. Each *stage* is a cluster of identical soft processors. Inside a
stage the processors are wired as a binary hypercube of point-to-point FIFO
links. Consecutive stages are joined by one-way FIFO links, node j to node j.
A video path puts every camera frame in front of every processor, so no
processor has to forward image data to another.

This repository holds the SystemVerilog for everything in that system except
the processors themselves: the FIFO links, the hypercube wiring, the
per-node memories, the frame generator, the video bus and the per-node frame
grabbers. Every port that a processor would use is brought out at the top
level, `multistage_top`. A testbench or a processor model can then play the
processors.

The published architecture was built on an FPGA with MicroBlaze soft
processors and Xilinx FSL (Fast Simplex Link) FIFOs. It gives the topology,
the node counts, the 64 KB memories, the 256 x 256 frame size and the block
diagram of the video path. It does not give signal-level protocols, FIFO
depths or word formats. Those are this implementation's own choices, and they
are listed below.

## The array

```
 host words ──FSL──► frame generator ──► video bus ──┬──────────────────────┐
                     (double buffer)                 │                      │
                                            stage 1: 2^D1 nodes    stage 2: 2^D2 nodes
                                            hypercube of FIFO      hypercube of FIFO
                                            links                  links
                                            node j ──one-way FIFO──► node j
```

A **node** has these parts:

* a processor, which is outside this RTL;
* a 64 KB dual-port local memory (`local_memory`): an instruction port and a
  data port, 32-bit words, byte enables;
* a frame grabber (`frame_grabber`) on the video bus;
* one bidirectional link (`fsl_bidir_link`) per hypercube dimension.

A **stage** (`hypercube_stage`) is 2^D nodes. Node n is linked to node
n XOR 2^d on dimension d, so every node has D links. Any two nodes are at most
D hops apart. The hardware does no routing: a word for a node that is not a
neighbour is forwarded by the processors in between. The usual collective
patterns each take D steps:

* broadcast by recursive doubling: in step d, nodes 0..2^d-1 send on
  dimension d;
* gather in the reverse order.

**Between stages** (`interstage_links`), stage-1 node j writes into a one-way
FIFO read by stage-2 node j. This holds for every j that exists in both
stages. Nothing flows back upstream.

In the intended application, stage 1 works on the right-hand road side and
stage 2 on the left. Within a stage, each node evaluates one road hypothesis.
Node 0 sends the current road model to all the others and collects their
scores. This is the split-compute-merge ("SCM") pattern. It keeps the
candidate with the maximum score. The processors run this as software; the
hardware supplies the links and the image data.

Default size: two stages of 8 nodes (`D1 = D2 = 3`). This is the largest
configuration that was measured. A 16 + 8 example is obtained with `D1 = 4`.

## The video path, step by step

This is the part of the design with the most timing detail.

**Host link.** Frames arrive on an FSL link (`gen_wr`/`gen_full`). Each
32-bit word carries four 8-bit pixels in raster order, pixel 0 in bits 7:0.
A word with the control bit set is the first word of a frame. It resets the
write pointer, so a sender can always resynchronise after a partial frame.

**Frame generator (V_Swap).** The generator writes incoming words into its
input buffer, one word per cycle. Once the input buffer holds a whole
`FRAME_W x FRAME_H` frame, it waits for the output buffer to finish
streaming. Then the two buffers swap (`gen_v_swap`, one cycle). Three cycles
after the swap, the output side sends the frame one pixel per cycle, with
no gaps. Meanwhile the input side fills the other buffer.

The input side fills four times faster than the bus drains. A second frame
therefore finishes long before the first has been sent. Until the swap, the
generator stops reading the host link: `gen_stall` is high, the link fills,
and `gen_full` holds the host back. Frames can follow each other with only
one idle bus cycle between them.

**Video bus.** The bus registers each pixel and tags it with its column and
row. It broadcasts the result to every grabber. `V_Sync` is high together
with the last pixel of a frame, so the grabbers can swap buffers without an
idle cycle. A start-of-frame flag from the generator forces the position back
to (0, 0).

**Frame grabber (V_Sync).** Each grabber holds a window `(x0, y0, width,
height)`, set through its configuration port. Pixels inside the window are
written to the input buffer at consecutive addresses. The window is
therefore stored row by row and packed, with pixel (x0, y0) at address 0.

At V_Sync the last pixel is still captured, and then the buffers swap. The
event port pulses `evt_frame` for one cycle and reports:

* `evt_pixels`, the number of pixels now in the output buffer;
* `evt_clipped`, set if the window held more pixels than the buffer.

The processor reads the output buffer on the video memory port, with
one-cycle read latency. It has until the next V_Sync to do so, which is one
whole frame time. A new window written on the configuration port takes effect
only at the next V_Sync, so a frame is never captured with a mix of two
windows.

The default window is the whole frame. Windows let a stage split the image:
node j can take band j, or a region of interest.

## Link protocol (all FIFO links)

| signal | side | meaning |
|---|---|---|
| `wr.write`, `wr.ctrl`, `wr.data[31:0]` | producer → link | write one word; do not write while `full` |
| `full` | link → producer | no room |
| `rd.exists`, `rd.ctrl`, `rd.data` | link → consumer | head word, first-word fall-through |
| `rd_en` | consumer → link | pop the head word; only while `exists` |

A word written in cycle t is visible to the consumer in cycle t+1. The
default depth is 16 words. The design enforces both rules: a write while
full is dropped, and a pop while empty is ignored. Assertions also flag
both cases in simulation.

## Top-level ports

`multistage_top` has one clock and one asynchronous active-low reset. Its
ports fall into these groups:

* **Host input:** `gen_wr`, `gen_full`.
* **Generator status:** `gen_v_swap`, `gen_stall`.
* **Per-stage ports:** `s1_*` for stage 1 and `s2_*` for stage 2, each an
  array indexed by node:
  * hypercube links: `hc_wr`, `hc_full`, `hc_rd_en`, `hc_rd`, indexed
    `[node][dimension]`;
  * memory ports: `ma_*` (instruction) and `mb_*` (data);
  * grabber ports: `cfg_valid`/`cfg_win`, `evt_frame`/`evt_pixels`/
    `evt_clipped` and `vm_en`/`vm_addr`/`vm_data`.
* **Inter-stage links:** `s1_is_wr`/`s1_is_full` on the stage-1 side,
  `s2_is_rd_en`/`s2_is_rd` on the stage-2 side.
* **Inter-stage status:** `is_busy`.

Shared types (`fsl_wr_t`, `fsl_rd_t`, `video_beat_t`, `window_t`,
`pixel_t`) are in `rtl/mpsoc_pkg.sv`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `D1`, `D2` (nodes per stage = 2^D) | 3, 3 | measured configuration of 8 processors per stage |
| `FRAME_W`, `FRAME_H` | 256, 256 | frame size of the original system |
| `MEM_BYTES` (local memory per node) | 65536 | 64 KB per processor, as in the original system |
| `BUF_PIXELS` (each grabber buffer) | 65536 | one complete frame |
| `FIFO_DEPTH` | 16 | chosen here (usual FSL default) |

Frame sizes need not be powers of two, but `FRAME_W x FRAME_H` must be a
multiple of 4. The 256 x 192 frames used for the speed measurements work with
`FRAME_H = 192`.

Sizing against the original use:

* A 256 x 256 frame fits exactly in each grabber buffer.
* Four hypotheses need four of the eight nodes of a stage.
* The bus moves a frame in 65,536 cycles. At 200 MHz that is 0.33 ms, far
  below the 55 ms per frame needed for 18 frames per second.
* The recognition time itself depends on the processor software and is not
  modelled.

## Choices made here, and departures from the original

* **Not included:**
  * the soft processors (vendor IP);
  * the Ethernet-to-FSL receiver (only named in the original);
  * the display output;
  * the alternative stage type built on a packet DMA router, which is only
    named. The array uses the point-to-point FIFO stage, as in the measured
    system.

  The ports of the parts that are left out are brought out instead.
* **Two stages only.** The architecture allows any number of stages. The top
  level builds the two-stage pipeline used by the application. More stages
  are made by chaining `hypercube_stage` and `interstage_links` the same way.
* **Every node has a frame grabber**, and all nodes of both stages see every
  frame. The original text also says at one point that only node 0 of each
  stage receives the image. The per-node grabber with its two buffers is what
  the described hardware contains, and that is what is built.
* **Chosen here:**
  * the signal protocols of all ports;
  * the pixel packing on the host link, and the control-bit frame start;
  * 8-bit pixels;
  * one pixel per clock on the video bus;
  * V_Sync coinciding with the last pixel;
  * window semantics, deferred window update, event contents and clipping;
  * FIFO depth 16;
  * the dual-port, byte-enabled, read-first local memory;
  * a single clock domain.
* Memories are plain arrays that synthesis tools map to block RAM. They are
  not reset. Everything a processor or testbench reads must be written
  first.
* A lint tool notes that the reset net is used both as an asynchronous reset
  and, inside the FIFO assertions, as a synchronous disable. This is
  intended: assertions are not checked during reset.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends a
hung run with a failure.

| testbench | what it covers |
|---|---|
| `tb_fsl_fifo` | latency, full after exactly DEPTH words, ordering and control bit under random traffic |
| `tb_fsl_bidir_link` | simultaneous random streams in both directions |
| `tb_local_memory` | both ports, byte enables, read-first, the full 64 KB address range |
| `tb_frame_generator` | control-bit resync, four frames back to back, swap-to-first-pixel latency, input stall |
| `tb_video_bus` | coordinates, V_Sync placement, idle gaps, restart |
| `tb_frame_grabber` | default window, deferred reconfiguration, clipping, reading the old frame during capture |
| `tb_hypercube_stage` | link n ↔ n XOR 2^d, broadcast and gather, private memories, per-node windows |
| `tb_interstage_links` | node-j-to-node-j pairing, back-pressure |
| `tb_multistage_top` | full default size; see below |
| `tb_workload_fig2` | 16-node stage 1 and 8-node stage 2, at 256 x 256 |
| `tb_workload_4x4_256x192` | 4 nodes per stage, at 256 x 192 |

`tb_multistage_top` runs the default configuration with no parameter
overrides. It sends three 256 x 256 frames and checks frame 0 whole in every
grabber. Frames 1 and 2 are checked as 128 x 32 bands, right half in stage 1
and left half in stage 2; every pixel of frame 1 is compared. The test also
runs the broadcast and gather over both hypercubes and the local-memory
traffic, and fills an inter-stage link until it is full. It counts each of
these events and fails if one never happened:

* host-link back-pressure;
* V_Swap;
* generator stall;
* grabber events;
* windowed captures;
* hypercube words;
* inter-stage words;
* inter-stage back-pressure;
* memory accesses.

It also checks the transport time: a frame takes `W*H + 4` cycles from
V_Swap to the grabbers' event. It runs in about 15 seconds. The two workload testbenches share the
parameterised `tb_array_harness`.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mpsoc_pkg.sv tb/tb_multistage_top.sv --top-module tb_multistage_top -Mdir obj
./obj/Vtb_multistage_top
```

Replace the testbench name to run any other one. Everything is plain
IEEE 1800-2017 SystemVerilog and uses no simulator-specific code.

## Files

* `rtl/mpsoc_pkg.sv`: shared types and constants.
* `rtl/fsl_fifo.sv`, `rtl/fsl_bidir_link.sv`, `rtl/interstage_links.sv`:
  the links.
* `rtl/local_memory.sv`, `rtl/frame_grabber.sv`, `rtl/hypercube_stage.sv`:
  the node and the stage.
* `rtl/frame_generator.sv`, `rtl/video_bus.sv`: the video path.
* `rtl/multistage_top.sv`: the two-stage array.
* `tb/`: the testbenches listed above.
