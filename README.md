# Hub-and-side multi-chiplet deep-learning accelerator

Ten identical neural cores are spread over seven small dies: one HUB die
holding four cores plus all of the system's external interfaces, and six
SIDE dies holding one core each. A SIDE die connects to the HUB only, over a
short parallel die-to-die (D2D) link on an interposer. So the system grows by
adding SIDE dies, while the HUB stays the single point that talks to the
host and to DRAM. Each core is a *Flexible Neural Core* (FNC). Its multipliers
can be regrouped at run time for 16-, 8- or 4-bit weights. Its weight buffer
can be split between its eight processing elements in four ways.

This repository is a synthesizable SystemVerilog model of that system's
digital logic: the cores, the chiplet router units, the D2D link controllers,
a HUB packet router and the seven-die top level. The analog and bought-in
parts are not modelled (see *What is not here*).

At the top level's defaults (10 cores, each 8 PEs x 16 columns x 4 MAC pairs)
the MAC count per cycle is 5120 for 16x8-bit, 10240 for 8x8-bit and 20480
for 8-bit x 4-bit products. At 1 GHz that is 10, 20 and 40 TOPS.

## System structure

```
              host packets (64-bit flits)            APB (CLRU registers)
                         |                                  |
   +---------------------+------ HUB die -------------------+-------------+
   |  hub_router --> targets 0..3: pkt_target -> fnc   (four cores)       |
   |             --> targets 4..9: clru k -> d2d_ctrl k  ------------------+---- 2x8-bit lanes + credit
   +-----------------------------------------------------------------------+        |
                                                                     SIDE die k: d2d_ctrl -> pkt_target -> fnc
```

* `accel_top` wires one `hub_chiplet` to `N_SIDE` (6) `side_chiplet`s.
* All traffic is packets of 64-bit flits. A head flit (`accel_pkg::head_t`)
  holds `kind` (WRITE, READ, RESP), `target` (0-3 HUB cores, 4-9 SIDE dies),
  `len` (data flits), `tag` and a 32-bit word address. A WRITE carries `len`
  data flits. A READ is answered by a RESP head that echoes the request,
  followed by `len` data flits.
* `pkt_target` runs WRITE and READ packets against a core's memory-mapped
  host port. It reads one word per two cycles.
* The host port of a core (word address, 20 bits) has three regions:
  `[19:18]=0` is the LLC, `=1` is the weight buffer (write only), and `=3` is
  control. Writing control address 0 starts an instruction; the write is
  ignored while the core is busy. Reading control address 1 returns
  `{done_count, busy}`.

## The Flexible Neural Core

`fnc` contains a unified LLC buffer, a configurable weight buffer, an
interconnect that copies LLC words into the PEs' L1 buffers, eight
`flex_pe`s, an element-wise unit, a pooling unit, a scaling unit, and the
instruction controller `fnc_ctrl`.

### MAC pair and the precision modes

The central trick is `mac_pair`. It holds eight 4x4-bit multipliers and
combines their partial products with shifts, in one of three ways:

| mode (`prec_e`) | activations | weights | products per pair | outputs |
|---|---|---|---|---|
| `P_A8W8` | A0, A1 (8 b) | W0, W1 (8 b) | 2 | `psum_a = A0*W0 + A1*W1` |
| `P_A8W4` | A0, A1 (8 b) | W0..W3 (4 b) | 4 | `psum_a = A0*W0 + A1*W2`, `psum_b = A0*W1 + A1*W3` |
| `P_A16W8` | A0 (16 b) | W0 (8 b) | 1 | `psum_a = A0*W0` |

All operands are two's complement. A multiplier works on 4-bit digits. The
top digit of each operand is sign-extended and the lower digits are
zero-extended, so each is a 5x5 signed multiply. The digit products are then
summed with shifts of 0, 4, 8 or 12 bits.

In 8x4 mode a column of the array produces two output channels (`psum_b`
is in use). In the other two modes it produces one. Either way every
multiplier is busy, and that is why the peak rate doubles each time the
width halves. The way products are grouped into channels and the operand
signedness are choices of this model.

### PE, MAC array and post-processing

A `flex_pe` is an L1 buffer (1024 x 64 bits), a `mac_array` of 16 columns x
4 MAC pairs, and `post_proc`. On each step, the array latches a 64-bit
activation vector from L1 and a 1024-bit weight row (16 columns x 4 pairs x
16 bits), and then adds the pair sums into 32-bit accumulators. A step
marked *first* clears the accumulators. Weights are held in registers for
one step, and loading the next set overlaps the current multiply. The
activation vector goes to all columns at once; it is not shifted through
the array.

`post_proc` applies a right shift with round-half-up, an optional ReLU, and
saturation to int8 (int16 in 16x8 mode). It then packs the results into
64-bit words: 2 words in A8W8 mode, 4 in the other modes.

### Weight buffer modes

`weight_buffer` has 8 banks, each of 16 sub-banks (one per column) x 128
rows x 64 bits, for 128 KB in total. The mode (`wb_mode_e`) sets how many
banks are merged into one address space shared by a group of PEs:

| mode | banks per group | PEs per group | rows per group |
|---|---|---|---|
| UMA | 1 | 1 | 128 |
| Dual-NUMA | 2 | 2 | 256 |
| Quad-NUMA | 4 | 4 | 512 |
| Full-NUMA | 8 | 8 | 1024 |

One read address goes to all groups in the same cycle. In a merged group the
upper address bits select the bank, and the row read is broadcast to every
PE of the group. Fewer groups give a larger weight space per output-channel
block; more groups let different PEs work on different output channels.
Together with the L1 multicast mask, this is how a layer is split into
8, 4, 2 or 1 tiles.

### Instruction set (`accel_pkg`)

| op | fields | action | busy cycles |
|---|---|---|---|
| LOADL1 | mask, src, dst, cnt | copy LLC[src+i] into L1[dst+i] of every PE in mask | cnt+2 |
| CONV | prec, wbmode, l1a, wa, k, dst, shift, relu | k steps (weight row wa+i, L1 word l1a+i); results of PE p written to LLC dst + p*n_words | k+4+8*n_words |
| ELTW | src0, src1, dst, cnt | saturating int8 add, 8 lanes | 3*cnt+1 |
| POOL | src0, src1, dst, cnt | int8 max, 8 lanes | 3*cnt+1 |
| SCALE | src0, src1[7:0]=mult, dst, cnt, shift | sat8(round(a*mult >> shift)) | 3*cnt+1 |

The instruction set and its encodings belong to this model; the source
only names the controller.

## Chiplet router unit (CLRU) and D2D link

`clru` sits between the HUB router and one D2D port. It has four FIFOs:

* FIFO0: requests from the HUB, after splitting at 4 KB pages. A request
  that crosses a 512-word page leaves as one packet per page.
* FIFO1: flits arriving from the link.
* FIFO2: response packets, found by the data parser, going back to the HUB.
* FIFO3: request packets from the SIDE die, brought out as `rreq_*`.

APB registers, at word address = `paddr[3:2]`:

| word address | register |
|---|---|
| 0 | enable (reset 1). While it is 0, HUB requests are held back. |
| 1 | packets sent |
| 2 | packets received |
| 3 | packets created by page splitting |

`d2d_ctrl` sends a 64-bit flit as four beats of 2 lanes x 8 bits.
`lane_tx_first` marks the first beat. Flow control uses credits. The sender
starts with 16 credits, the depth of the receive FIFO. It spends one credit
per flit and gets one back each time the far side pops a flit. `stalled`
shows a flit waiting for a credit. With credits available, the link moves
one flit every 4 cycles.

The 2x8 lanes match the physical link: 2 lanes x 8 bits x 12 Gb/s =
192 Gb/s each way. In this model one beat moves per core clock; the 12 Gb/s
serialisation belongs to the PHY, which is not modelled.

`hub_router` sends each host packet to the target named in its head. It
merges the targets' responses round-robin and keeps a packet together once
it has started. `conflict` is high when more than one response is waiting
at the start of a packet.

## What follows the source design and what is this model's own

From the source design:

* seven dies, with 4 + 6 cores
* 8 PEs per core, 16 columns x 8 MAC rows per PE
* eight 4x4 multipliers per MAC pair, and the three precision modes
* a weight buffer of 8 banks x 16 sub-banks, with UMA, Dual-, Quad- and
  Full-NUMA modes
* LLC, L1, post-processing, element-wise, pooling and scaling units and an
  instruction controller in each core
* the CLRU's APB registers, four FIFOs, data parser and 4 KB boundary
  handling
* D2D links of 2 lanes x 8 bits

This model's own:

* all buffer depths (LLC 256 KB, L1 8 KB per PE, weight buffer 128 KB per
  core)
* accumulator width, operand signedness, and the rounding and saturation
* the instruction set, the packet format and the host map
* FIFO depths, D2D framing and credits
* the router

Known departures:

* One core's buffers total 448 KB. A SIDE die in the source has 439 KB of
  on-chip memory. The four HUB cores here hold 1.75 MB against the source's
  1.7 MB for the whole HUB die.
* The source draws the activations as a systolic-like stream; here each
  activation vector goes to all 16 columns in the same cycle.
* The source places the 4 KB boundary logic on the CLRU's bus side, next to
  the parser. Here it splits requests on their way out to the link.
* The source gives two clock ranges (100 MHz-1 GHz and 600 MHz-1.2 GHz).
  Nothing in the RTL depends on the clock. The TOPS numbers above assume
  1 GHz.
* A core's IO DMA is reduced to the word-wide host port.

## What is not here

These parts are not modelled:

* PCIe 3.0 x8 endpoint
* GDDR6 controller and PHY
* the RISC-V system controller
* the HUB's system memory and DMA
* PLLs
* the D2D analog PHY (12 Gb/s per pin, 55 um bumps)
* the RDL interposer and package

Both the PCIe endpoint and the GDDR6 interface are bought-in IP. The rest
are either analog parts or only named by the source. In their place,
`accel_top` brings out:

* the host packet ports, where PCIe and the DMA would connect
* the APB port, where the RISC-V controller would connect
* the `rreq_*` streams, for requests that SIDE dies send toward the HUB

No SIDE die issues such requests in this model.

There is no model of off-chip memory bandwidth, so the flattening speedup the
source reports when scaling from 1 to 10 cores (x6.25) is not reproduced.
Networks whose INT8 weights exceed the on-chip buffers (3.75 MB over the ten
cores) can only run layer by layer, with weights rewritten through the host
port. That covers ResNet-50, YOLOv5s and VGG-16. SqueezeNet and YOLOv5n fit.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/accel_pkg.sv tb/tb_fnc.sv --top-module tb_fnc -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_mac_pair` | random and corner operands for all three modes |
| `tb_mac_array` | random steps, clears and accumulation, with a reduced column count |
| `tb_post_proc`, `tb_eltwise_unit`, `tb_pooling_unit`, `tb_scaling_unit` | random comparison against reference functions |
| `tb_l1_buffer`, `tb_llc_buffer`, `tb_weight_buffer` | memory contents, read latency, port collisions, all four weight-buffer modes |
| `tb_flex_interconnect`, `tb_flex_pe` | multicast and gather; one PE's full pipeline |
| `tb_fnc` | every precision x weight-buffer mode, multicast loads, vector instructions, and the exact busy cycle counts above |
| `tb_sync_fifo`, `tb_pkt_target`, `tb_d2d_ctrl`, `tb_clru`, `tb_hub_router` | packet and flow-control blocks under random back-pressure |
| `tb_accel_top` | end-to-end test (below) |

`tb_accel_top` runs the whole system at its default size. It uses all ten
cores, each with its own precision and weight-buffer mode. It includes
multicast and unicast L1 loads, a request split at a 4 KB page, credit
stalls on HUB and SIDE links, router conflicts and the three vector
instructions. It checks every result word against a reference model and
counts a failure for any of these mechanisms that never occurred. Building
it takes around ten minutes, because every core's memories are full size.

Any Verilator warnings left are unused-signal notices for fields the
packet heads carry but a block does not need, and the asynchronous-reset
nets used by the assertions' `disable iff`.
