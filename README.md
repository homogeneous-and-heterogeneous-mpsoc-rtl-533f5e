# Spidergon NoC multimedia MPSoC

This is a low-power chip for real-time audio, image and video processing. It has
no wide shared bus. Instead, every processing engine and every frame memory sits
behind a network interface (NI) on a small network-on-chip (NoC). The network
carries 128-bit flits. Each engine talks 32-bit AMBA AHB. Because the network is
four times wider than any single bus, eight tiles can stream at the same time
without the network becoming the bottleneck.

Two platforms share the same network building blocks:

* **The heterogeneous MPSoC** is built in full here. One control processor
  configures specialised tiles over the NoC:
  * two motion-estimation (ME) tiles;
  * a 1D/2D transform tile;
  * a 1D/2D filter tile;
  * a pixel-transformation tile;
  * a source-coding tile;
  * a digital-input class-D audio amplifier (DIAA) tile;
  * an external-memory controller with DMA;
  * seven 3 Mbit SRAM tiles.
* **The homogeneous MPSoC** uses eight identical DSP tiles on a one-port-per-router
  version of the same network. Its network is built here. The DSP tiles are
  processor IP that this design does not contain, so their network links are
  brought out as ports of the top.

## The network

### Topology: Spidergon with eight routers

The eight routers form a ring. Router `r` has three network links:

* **Right** goes to router `r+1`.
* **Left** goes to router `r-1`.
* **Across** goes to router `r+4`, the opposite side of the ring.

Router ports are numbered 0 Left, 1 Right, 2 Across, 3 NI1 and 4 NI2.

* In the heterogeneous platform every router has two local ports, so 16 NIs fit.
* In the homogeneous platform every router has one local port (4-port routers).

The longest route crosses three routers:

| Ring distance | Route |
|---|---|
| 0 | local port |
| 1 or 2 | along the ring (Right, or Right–Right) |
| 7 or 6 | along the ring the other way (Left, or Left–Left) |
| 4 | Across |
| 5 | Across, then Right |
| 3 | Across, then Left |

`noc_pkg::spidergon_route` computes these routes.

### Packets and flits

A link carries one flit per cycle, together with these sideband signals:

* `flit_id`: single, first, intermediate or last;
* a 2-bit error field;
* an atomic bit;
* `four_be`, one byte-enable-style mask bit per 32-bit piece.

Every packet begins with a header flit. Its low bits hold two headers:

* **The network layer header** is a 9-bit source route made of three 3-bit
  port selections, plus a 2-bit priority.
* **The transport layer header** holds the opcode, the source NI, a 28-bit
  address, the number of 32-bit cells (1–4) and the error code of a response.

Data travels in separate payload flits. An AHB `INCR4` burst of four words
becomes one header flit plus one full 128-bit payload flit. A single word
becomes a header flit plus a payload flit in which one lane is valid.

### Router (`noc_router`)

* **Source routing.** A router takes its output port from the low three bits of
  the route in the header. It then shifts the route right by three bits, so the
  next router finds its own field in the same place.
* **Wormhole switching.** A header that wins an output holds it until the
  packet's last flit has passed.
* **Credit-based flow control.** Each output starts with 2 credits. That is the
  depth of the input buffer at the far end of the link. One credit comes back
  for every flit the far router pops.
* **Arbitration** (`lru_arbiter`) is done per output in two steps. The highest
  priority wins first. Among requests of equal priority, the least recently
  granted input wins. Every NI injects at the same priority, so in practice the
  arbitration is plain LRU.
* **Latency.** The input FIFO (`noc_fifo`) is the router's only register. The
  output link is driven combinationally from the head of that FIFO. A flit that
  arrives in cycle *k* therefore leaves in cycle *k+1* when nothing blocks it.
  Crossing one, two or three routers costs 1, 2 or 3 cycles. The testbenches
  measure exactly this.

### Network interfaces (`ni_initiator`, `ni_target`)

An NI has two parts:

* **The shell** speaks AHB.
* **The kernel** builds and takes apart packets (`ni_kernel_tx`,
  `ni_kernel_rx`).

Between the two sit dual-clock FIFOs (`bisync_fifo`: Gray-coded pointers and
two-flop synchronisers). These FIFOs do two jobs. They convert 32-bit data to
128-bit flits and back, and they cross between the tile clock (`hclk`) and the
network clock (`nclk`).

The output is **store-and-forward**. A packet is injected only when it is
complete, so a path through the network is never held by a half-built packet.

**Initiator NI** (the processor side):

* It takes an AHB transfer, looks up the route to the target NI named by
  `HADDR[31:28]`, and sends a request.
* It holds the AHB bus in wait states until the response packet returns.
* Writes are **not posted**: they also wait for a write response. This way an
  error in the target reaches the master as an AHB ERROR response.

**Target NI** (the tile side):

* It replays each request cell as an AHB transfer on its tile.
* It packs the read data or the write status into a response.
* It sends the response back to the source NI named in the transport header.

Address map, seen from the processor: NI id = router × 2 + local port.

| id | tile | id | tile |
|---|---|---|---|
| 0 | SRAM0 | 8 | Transform |
| 1 | Filter | 9 | SRAM3 |
| 2 | processor (initiator) | 10 | SRAM4 |
| 3 | SRAM1 | 11 | ME0 |
| 4 | DIAA | 12 | ME1 |
| 5 | External memory + DMA | 13 | SRAM5 |
| 6 | Source coding | 14 | SRAM6 |
| 7 | SRAM2 | 15 | Pixel transform |

Inside a tile, the byte address is `HADDR[27:0]`.

## The tiles

Every tile is an AHB slave with a small register map. The register map is
listed in each tile's opening comment. A run works like this:

1. The processor loads the tile's local memory through the NoC.
2. It writes `CTRL.start`.
3. It waits for `STATUS.done`, or for the tile's interrupt line.
4. It reads the results back.

Each tile also counts the cycles of its last run.

* **SRAM tile (`sram_tile`).** 98,304 × 32-bit words, which is 3 Mbit. A read
  takes one cycle. An access past the end is answered with an AHB ERROR.
* **Motion estimation (`me_tile`, `me_search_engine`).**
  * The search engine is a 16×16 array of absolute-difference units followed by
    an adder tree and a running minimum. It evaluates one candidate vector per
    cycle, which is 256 absolute differences per cycle.
  * The tile holds two banks. Each bank has a 16×16 current block and a 48×48
    search area (±16 pixels), 40 kbit in total. The processor fills one bank
    while the other is searched.
  * The search is adaptive. The predicted vector is tried first. If early stop
    is enabled and the predictor's SAD is below the threshold, the search ends
    there. Otherwise a full raster search over ±RANGE follows.
* **Transform (`transf_tile`, `dct_engine`).**
  * An engine computes an 8-point DCT-II with four radix-2 butterflies followed
    by Q15 coefficient products. The coefficients are cos(kπ/16).
  * Arithmetic is block floating point: each 8-sample vector shares one
    exponent, chosen so that the 16-bit outputs do not overflow.
  * In 2D mode, a row pass is followed by a transpose and a column pass on each
    8×8 block. In 1D (audio) mode the second engine is bypassed.
  * The buffers hold 1024 input samples and 1024 output samples of 16 bits.
* **Filter (`filter_tile`).** It processes one sample per clock and has two
  modes:
  * a causal 8-tap FIR with Q12 taps;
  * an edge-preserving 3-point rational filter.

  A FIFO aligns the input with the output, so the tile can estimate the noise
  level (the mean |x − y| per 64 samples). It can also use that estimate to
  retune the rational filter.
* **Pixel transform (`pixel_transf_tile`).** It processes one pixel per clock
  and can apply:
  * a 256-entry look-up table (gamma, contrast, log/linear curves);
  * a 3×3 colour matrix (BT.601 RGB→YCbCr at reset);
  * 2:1 horizontal decimation.

  The output is then clipped.
* **Source coding (`source_coding_tile`).** It applies Exp-Golomb
  variable-length coding (unsigned, or signed with the H.264 mapping) and packs
  the codes into 32-bit words.
* **DIAA (`diaa_tile`).** This is a sample FIFO followed by four stages:
  1. **Oversampler** (`diaa_oversampler`): zero padding and a polyphase FIR,
     interpolating by M ≤ 16.
  2. **Noise shaper** (`diaa_noise_shaper`): an error-feedback requantiser from
     16 bits down to p ≤ 6 bits, of order K ≤ 5.
  3. **Multi-level PWM** (`diaa_pwm`): binary or ternary.
  4. **Dead time** (`diaa_deadtime`): inserted on the two H-bridge legs. The
     four gate signals leave the chip.

  If the FIFO runs empty, the tile counts an underrun.
* **External memory controller (`ext_mem_ctrl`).** It has a 1 Mbit local buffer
  and a DMA engine. The engine copies LEN words between the buffer and a simple
  request/grant external memory port, in either direction.

## How far to trust it

Each block has a self-checking testbench in `tb/`. The testbench compares the
block against values computed independently, and it measures latencies where
they matter:

* one cycle per router crossed;
* TPP + 2 cycles in the oversampler;
* one candidate per cycle in ME;
* one sample per cycle in the filter and pixel tiles.

`tb_mpsoc_top` runs the whole chip at its default sizes, with every memory at
full size, and drives the processor's AHB port. It exercises and counts:

* every route shape;
* `INCR4` bursts and AHB errors;
* full and early-stopped motion searches;
* 1D and 2D transforms;
* FIR and rational filtering;
* the pixel look-up table;
* Exp-Golomb coding;
* DMA in both directions;
* PWM gate activity;
* traffic on the homogeneous network;
* several tiles running at once.

Credit stalls and output contention in the routers are counted too.

### Where this design departs from, or goes beyond, a plain reading of the architecture

* **Transform tile:** only the DCT coefficient set is provided. There is no FFT
  mode.
* **Source-coding tile:** it does not implement CABAC.
* **Filter tile:** it works on 1D data only. There is no 2D block scan and no
  IIR.
* **Pixel transform:** frame-size conversion is limited to 2:1 horizontal
  decimation.
* **External memory controller:** it speaks a simple word-at-a-time handshake,
  not DDR.
* **DIAA:** the PWM correction loop is missing, because it needs analog
  feedback from the power stage.
* **Not included at all:**
  * the control processor (its AHB master port is a top-level port);
  * the homogeneous platform's DSP tiles;
  * the power bridge and the LC filter.
* **Arbitrary design choices.** These were all picked here and can be changed
  freely:
  * the register maps;
  * the NI placement of the tiles;
  * the header bit layout;
  * the "Right = +1" orientation;
  * non-posted writes;
  * the rational-filter formula;
  * the noise-estimation and tuning rule;
  * the colour-conversion coefficients;
  * the ME search order.
* **Atomic flag:** it is carried through the network but never acted on. There
  is no locking.

## Simulating

Each testbench is self-contained. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run.
Plain Verilator 5 is enough:

```
verilator --binary --timing -Itb -y tb -y rtl rtl/noc_pkg.sv tb/tb_noc_router.sv --top-module tb_noc_router
./obj_dir/Vtb_noc_router
```

To run a different testbench, replace `tb_noc_router`. For the whole chip,
`tb_mpsoc_top` simulates about 110 µs and finishes in well under a minute.
Testbenches use `$urandom` for their stimulus. They initialise everything they
read, so they also run on a two-state simulator.

The main parameters all default to the sizes of the architecture:

* `FLIT_W` = 128;
* 8 routers;
* router buffers of 2 flits;
* 3 Mbit SRAM tiles (`SRAM_WORDS` = 98304 words);
* ME block 16 with range ±16;
* 1024-sample transform and filter buffers;
* DIAA with M ≤ 16, K = 5, p = 6.

For quicker experiments, most of them can be overridden on the individual
blocks.
