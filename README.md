# SFQ-RDP: a reconfigurable floating point datapath accelerator

Scientific kernels such as finite-difference stencils and integral recursions
spend their time in small, regular data flow graphs (DFGs) of floating point
additions, subtractions and multiplications. This design runs such a DFG
spatially. A large two-dimensional array of processing elements (PEs) is
configured once, so that every DFG node sits on its own PE and every edge is a
fixed route between rows. After that, a new set of operands enters at the top
of the array on every clock, and a new set of results leaves at the bottom on
every clock.

The architecture was conceived for single-flux-quantum (SFQ) superconducting
logic. SFQ logic is naturally gate-level pipelined, and there a latch costs
nothing. This RTL is an ordinary synchronous, technology-neutral model of the
same organisation: one register stage per PE row, 64-bit IEEE-754 arithmetic
and a bit-serial configuration chain. It also includes the DMA engine and
scratchpad memory that connect the array to a host's main memory.

## System

```
 host processor ──control──┐
        │                  ▼
   main memory ◄──► lsrdp_dma ◄──► lsrdp_spm ◄──► lsrdp_array
                 (m_* port)       (host port)   (one vector per clock)
```

`sfq_rdp_top` holds the DMA engine, the scratchpad (SPM) and the array. The
host processor and main memory stay outside: the host drives the control
ports, and main memory answers the `m_*` port. One job runs like this:

1. The host shifts the DFG's configuration bit-stream into `cfg_in`, one bit
   per clock while `cfg_en` is high.
2. DMA (`dma_dir = 0`) copies operand vectors from main memory into the SPM
   input banks. There is one bank per array input port.
3. `run_start` with `run_len = n` streams vectors 0..n-1 through the array.
   The SPM stores the n result vectors in its output banks, one bank per
   output port.
4. DMA (`dma_dir = 1`) copies the result banks back to main memory.

## The PE array (`lsrdp_array`)

Defaults are the medium configuration: W = 32 columns, H = 16 rows (512 PEs),
19 input ports on top and 12 output ports at the bottom.

* **Checkerboard of functional units.** PE (r, c) multiplies when r + c is
  odd, and adds or subtracts otherwise. A DFG has to be placed so that each
  operation lands on a PE of the right kind.
* **One-directional flow.** Data only move downward, one row per clock. A
  value that is needed several rows further down must be carried by transfer
  units through the rows in between.
* **PE structures.** Each PE has three operand inputs (`in0`, `in1`, `in2`)
  and two registered outputs. A 2-bit mode chooses what the outputs carry:

  | mode | out0 | out1 |
  |---|---|---|
  | FU   (0) | FU(in0, in1) | 0 |
  | T    (1) | 0 | in2 |
  | FU+T (2) | FU(in0, in1) | in2 |
  | T+T  (3) | in0 | in2 |

  An adder PE has one extra configuration bit that selects in0 − in1 instead
  of in0 + in1.
* **Timing.** Every PE output is registered, whether it comes from the FU or
  from a transfer unit. Values that reach a row by different paths therefore
  stay aligned. A vector applied with `in_valid` comes out with `out_valid`
  exactly H + 1 clocks later: H PE rows plus the registered output
  cross-bar. The array accepts a vector every clock and never stalls. The
  mapping fixes the schedule.

## Operand routing networks and connection length

Above every PE there is an operand routing network (ORN, `lsrdp_orn`). It is
a cross-bar whose three outputs are the PE's three operands.

Routing between rows is horizontal-distance limited. The ORN above column c
sees only the PEs in columns c−MCL … c+MCL of the row above, where MCL is the
maximum connection length. It sees both outputs of each of those PEs, so it
has 2·(2·MCL + 1) inputs. For the medium array MCL = 6, which gives 26
inputs. ORN input 2·k + m is output m of column c − MCL + k. Columns outside
the array read as zero.

A DFG whose edges jump further than MCL columns cannot be mapped directly.
It must either be placed differently or relayed sideways through transfer
PEs. MCL is the main cost knob: the size of every ORN grows linearly with it.

Each ORN output has a 5-bit select code:

* codes below N_IN pick that input;
* code N_IN picks the tile's 64-bit **immediate register** (a constant such
  as a stencil coefficient);
* larger codes give zero.

Row 0's ORNs read the 19 input ports instead of a PE row, and any port can
reach any column. The output ports are fed by one registered cross-bar: port
o picks any of the 2·W last-row outputs (code 2·c + m) or zero (codes of 2·W
and above).

## Configuration bit-stream

The whole array is programmed through one serial chain (`cfg_chain_seg`
segments linked end to end). This is the part a tool writer must get exactly
right.

* While `cfg_en` is high, the chain shifts one bit per clock. The first bit
  sent ends up in chain bit 0. Send the image least significant bit first,
  over `CFG_BITS` clocks.
* Tile (r, c) occupies bits `[(r·W + c)·TILE_CFG_W +: TILE_CFG_W]`, where
  TILE_CFG_W = 3·SEL_W + 67. From bit 0 of the tile upwards:

  | bits | field |
  |---|---|
  | `SEL_W·j +: SEL_W`, j = 0,1,2 | ORN select of operand in_j |
  | `3·SEL_W +: 2` | PE mode |
  | `3·SEL_W + 2` | SUB (adder PEs; ignored by multipliers) |
  | `3·SEL_W + 3 +: 64` | immediate register |

* SEL_W = ⌈log2(max(2·(2·MCL+1), N_IN) + 2)⌉, which is 5 for the default.
* The output cross-bar follows, in the top N_OUT·OSEL_W bits of the image,
  with port o at `o·OSEL_W`. OSEL_W = ⌈log2(2·W + 1)⌉, which is 7 for the
  default.
* The medium array has 82 bits per tile and 42,068 bits in all, so loading
  it takes 42,068 clocks.
* `cfg_out` is the bit that leaves the chain. While a new image is loaded,
  the previous image comes out in the order it was sent. This can be used to
  verify the chain.
* Reset clears the whole chain: every select becomes code 0 and every PE
  becomes an adder or multiplier in FU mode with a zero immediate.

The testbenches contain a small image builder (`set_tile` and `set_out`
tasks) that encodes this layout. It is the quickest way to map a new DFG by
hand.

## Floating point units

`fp_add` and `fp_mul` are combinational IEEE-754 binary64 units:

* Rounding is round-to-nearest-even.
* inf − inf, inf·0 and any NaN operand return the quiet NaN
  `7FF8000000000000`.
* Overflow returns ±∞.
* Subnormal inputs are treated as zero, and results below the normal range
  are flushed to zero.
* Exact cancellation returns +0.

Apart from the flush-to-zero, results are bit-identical to a standard double
precision processor. The testbenches check this against the simulator's own
`real` arithmetic. In a real implementation these units would be deeply
pipelined. In this model the PE's output register is their only stage.

## Scratchpad and DMA

`lsrdp_spm` has 19 input banks and 12 output banks of 256 64-bit words each.
Host-side addresses are `{bank, offset}`: banks 0..18 are inputs and banks
19..30 are outputs. Reads return data one clock after the request. Host
writes into output banks are ignored. A streaming run of n vectors takes
n + (H + 1) + 2 clocks from `run_start` to `run_done`: one clock for the bank
read, the array latency, and one clock for the result write.

`lsrdp_dma` moves one 64-bit word at a time. Its memory handshake:

* `m_req` is held, with a stable address, until `m_gnt`.
* Read data arrive with `m_rvalid` on any later clock.

An assertion checks the first rule. A command is `start` with `dir`,
`mem_addr`, `spm_addr` and `len`; `busy` stays high until `done` pulses.
Since SPM addresses are `{bank, offset}`, one DMA command fills one bank, or
several whole banks.

## Sizes

| parameter | small | medium (default) | large |
|---|---|---|---|
| W × H | 13 × 13 | 32 × 16 | 58 × 25 |
| input / output ports | 19 / 12 | 19 / 12 | 38 / 24 |
| ORN inputs (MCL) | 22 (5) | 26 (6) | 26 (6) |

The medium size is the default; it is the one the 512-PE DFG class was sized
for. All sizes are parameters of `sfq_rdp_top` and `lsrdp_array`: `W`, `H`,
`MCL`, `N_IN`, `N_OUT`, and also `SPM_DEPTH`. The medium size is simulated
end to end; the large size passes lint but has not been simulated.

The published DFG classes for heat, vibration, Poisson and electron
repulsion integral kernels need up to 128 PEs (class S) or 512 PEs (class M)
with 19/12 ports. Both classes fit the default array, provided their longest
connection is within MCL. Classes L (1024 PEs, 38/24 ports) and XL need a
larger array.

## What follows the published architecture and what is this design's own

These follow the architecture:

* the 2-D pipelined array;
* 64-bit floating point ADD/SUB and MUL in a checkerboard;
* the FU / T / FU+T / T+T structures, with three inputs and two outputs per
  PE;
* cross-bar ORNs with 2·(2·MCL+1) inputs and three outputs, one per column
  in every row;
* input ports on top and output ports at the bottom, each joined to the
  array through an ORN;
* one 64-bit immediate register per PE;
* bit-serial configuration through a single chain;
* the medium/large dimensions and port counts;
* a DMA engine and a scratchpad between main memory and the array.

This design chose:

* all encodings: mode values, select codes, the zero code, and reaching the
  immediate register through an ORN select code;
* the chain order and field layout;
* the extra SUB bit: the architecture budgets 2 configuration bits per PE,
  which the four structures already use;
* which input feeds which unit in each structure;
* zero on unused outputs;
* one clock per row, the valid bit, and the registered output cross-bar;
* full cross-bars at the input and output ports;
* flush-to-zero arithmetic;
* the whole SPM organisation (banked per port, 256 words) and the DMA
  protocol.

Not modelled:

* the host processor;
* main memory: its 16 modules, two channels, 1800 Mb/s per pin and 24 GB/s
  aggregate rate are not modelled;
* the mapping tool chain (placement, routing, port positioning and
  bit-stream generation);
* SFQ-specific circuit timing.

## Simulating

Each `tb/tb_<module>.sv` is a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lsrdp_pkg.sv \
          tb/tb_sfq_rdp_top.sv --top-module tb_sfq_rdp_top
./obj_dir/Vtb_sfq_rdp_top
```

* `tb_sfq_rdp_top` runs the whole flow on an 8 × 5 array:
  * DMA in, configure, stream, DMA out;
  * then reconfigure and do it again;
  * it counts every mechanism: DMA in each direction, configuration load,
    reconfiguration, all four PE structures, immediate operands, SUB and
    streaming;
  * it checks the run's exact clock count.
* `tb_sfq_rdp_top_full` does the same at the default 32 × 16 size. It builds
  in about 1.5 minutes and runs in seconds.
* `tb_lsrdp_workloads` maps four small update kernels side by side on the
  default 32 × 16 array: a 1-D heat stencil, a 2-D Poisson Jacobi step, a
  1-D vibration (wave) step and an electron-repulsion-integral recursion
  step. It uses 18 of the 19 input ports and streams 64 vectors through all
  four at once.
* `tb_lsrdp_array` checks the array alone, including its H + 1 latency and
  the chain read-back.
* The unit testbenches cover the FP units, PE, ORN, tile, chain segment, SPM
  and DMA.

All synthesizable sources are in `rtl/`, one module or package per file. Shared types (`word_t`,
`pe_mode_e`, `pe_cfg_t`) are in `lsrdp_pkg.sv`.
