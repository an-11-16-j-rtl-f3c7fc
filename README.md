# rDXE: a ring of decoder engines for small language models

The design keeps every weight of a small language model in on-chip SRAM,
spread over several identical decoder execution engines (DXEs) wired in a
ring. Weights never move. Tokens do. Each DXE holds one or more decoder
layers, runs them on one token at a time and passes the 128-element-wide
result to the next DXE over a quad-SPI link. Consecutive tokens, possibly from
different requests, follow each other around the ring. The result is a
token-level pipeline. A request that finishes early frees its place at once,
and a new request can join at any time, with no padding and no batch barrier.

Two further ideas make each DXE efficient:

- **Vector recompute (VRC).** RMSNorm and Softmax are not separate passes. The
  MAC array computes the matrix-vector product on the raw input (the RMSNorm
  gain is folded into the weights). Meanwhile the tile's vector engine
  computes the normalisation factor: the reciprocal RMS, or the reciprocal of
  the exponential sum. Each result waits in a small FIFO (the RCU) until the
  factor arrives, and is then scaled by it.
- **Irregular write, uniform read (iWuR).** A new key is written byte by byte
  into the KV cache of VAC `pos % 16`, so a later QK product reads whole
  128-bit rows. A new value is written column by column into the VAC's own KV
  cache, so a PV product also reads whole rows. Tiles can share one tile's
  keys and values over the VLINK (grouped-query attention).

## Hierarchy (rtl/)

| module | role |
|---|---|
| `rdxe` | top: `N_DXE` DXEs in a ring (i -> i+1), host links on every DXE |
| `dxe` | one engine: I/O, token buffer, controller, 8 tiles, global PPU |
| `io_interface` (`io_rx`, `io_tx`) | ring and host links: 16 channels x 4 lines each. A beat takes two link clocks. `SPI_DIV=16` gives 800 Mb/s at 200 MHz. |
| `token_buffer` | 3 token slots (receive / compute / send overlap), broadcast port |
| `top_ctrl` | instruction file (64 x 128 bit), load address router, layer-slot sequencer, ring/host transmit |
| `global_ppu` | joins the tiles' partial sums by row. Residual add: `x + round(sum >> shift)`, saturated to INT8 |
| `dxt` | tile: 16 VACs on a systolic HLINK, rr-SRAM, activation reuse buffer, vector engine, GBUS, VLINK |
| `vac` | 16-multiplier MAC, RCU, PPU, 16 KiB weight memory, 16 KiB KV cache |
| `mac_unit`, `rcu`, `ppu` | dot product; RC scaling `(acc*rc)>>>24`; requantise, concatenate, route |
| `vector_engine` | reciprocal RMS (5 Newton-Raphson steps), running max of scores, exponential LUT, exact reciprocal of the sum, GELU |
| `gbus` | 32-bit round-robin bus from the 16 VACs to rr-SRAM, KV caches or the global PPU |
| `vlink` | passes a group leader's KV read data to the tiles of its GQA group |
| `wmem`, `kv_cache`, `rr_sram`, `act_reuse_buffer` | memories with synchronous reads |

Default sizes are 4 DXEs x 8 tiles x 16 VACs. Each VAC has 16 KiB of weights
and 16 KiB of KV cache, so each DXE holds 4 MB. `d_model` can be at most 1024
and the context at most 1024 tokens.

## Programming model

Everything reaches a DXE as frames on a link. A frame is a 128-bit header
(`hdr_t`: command, request, position, pass, beat count, address) followed by
128-bit beats. There are four commands:

- `LOAD` writes weights or KV data through a unified address. Bits [31:28]
  give the region, [27:25] the tile, [24:21] the VAC and [20:0] the word.
- `INSTR` fills the instruction file.
- `CFG` sets the layer slots: the program counter of each slot, the number of
  slots, the number of ring passes, symmetric order, the GQA group size, the
  KV stride per request and whether this DXE closes the ring.
- `TOKEN` carries a token with its request and position.

An instruction (`instr_t`) is either a tile operation (`OP_DXT`), a residual
add (`OP_RES`) or the end of a slot (`OP_END`). A tile operation has these
fields:

- weight source: WMEM, K or V;
- activation source: token buffer, rr-SRAM, rr-SRAM through GELU, or rr-SRAM
  through exp;
- destination: rr-SRAM, K write, V write or global PPU;
- RC mode: none, RMS or Softmax;
- rows, beats, addresses, shift and tile mask.

One decoder layer is 10 instructions (see the test program in `tb/tb_rdxe.sv`).

Layer sharing comes from repeating the slot list over `n_pass` trips around
the ring. When `sym` is set, the slot order is reversed on odd passes, which
gives symmetric sharing. Tokens from the host enter DXE 0. A token leaves
through the host link of the DXE that closes the ring on the last pass.

## Numerics

Activations and weights are INT8; accumulation is 32 bits. The RC factor is
a 25-bit unsigned Q1.24 value. Requantisation is an arithmetic shift that
rounds half up, followed by saturation. The vector engine works in integer
and fixed point:

- **exp:** a 16-entry LUT, indexed by the scaled distance to the running
  maximum.
- **Softmax reciprocal:** a 25-cycle restoring divider computes
  `floor(2^24 / sum)`.
- **GELU:** a piecewise quadratic on the INT8 input.

The text does not give the vector engine's number format. This design uses
the integer and fixed-point formats above.

## Verification (tb/)

Every block has a self-checking testbench `tb_<block>.sv` with a watchdog.
Each prints `TB_RESULT checks=N failures=M`.

- **`tb_rdxe`** runs a two-DXE ring at reduced size (`d_model` 128, link
  divider 4). Three requests of 3, 2 and 2 tokens are in flight; the third
  joins late. The 2 layer slots per DXE run for 2 symmetric passes. Every
  element of every output token is compared with a bit-exact integer
  reference model. The test also counts each mechanism and fails if any
  count is zero: symmetric slot reversal, broadcast and unicast inputs, RMS
  and Softmax recompute, GELU, iWuR key writes, local value writes, GQA
  sharing, residual add, stall, ring forwarding, host output and loads.
- **`tb_dxe`** runs the same test on a single DXE whose ring output loops
  back to its input. It also covers the tile and the controller.
- **`tb_rdxe_full`** runs the top with default parameters (4 DXEs, full
  memories, 800 Mb/s links) on one two-token request.

The three ring-level testbenches share one body of code; only their size
parameters differ. A ring test takes about 20 s to build and runs 150k
cycles in about 15 s. The full-size test takes a few minutes. To run one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rdxe rtl/rdxe_pkg.sv tb/tb_rdxe.sv -o sim && obj_dir/sim
```

The same command runs any block testbench, for example `tb_vac`.

## Where this departs from the published chip

- The ring defaults to 4 DXEs, as in the chip's block diagrams. The system
  evaluation uses 7; set `N_DXE`.
- GQA groups hold 1, 2, 4 or 8 tiles (`gqa_log2` = 0 to 3).
  Groups of 3 to 6 heads cannot be formed.
- Only half of each DXE's 4 MB holds weights; the other half is KV cache.
  The published chip's split is not known.
- A one-beat row (16 inputs) needs the activation reuse buffer to be
  write-through. The buffer forwards a word that is written and read in the
  same cycle.

## Not implemented

These parts of the chip are not implemented:

- clock generation and clock muxing;
- embedding, LM head and sampling (the host supplies and receives token
  vectors);
- any DRAM path.

The instruction set, frame format, memory sizes and link protocol are this
design's own choices; the published description of the chip does not give
them.
