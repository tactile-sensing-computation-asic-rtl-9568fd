# Tactile-sensing compute chip: an int8 dot-product accelerator on a packet ring

This is synthesizable SystemVerilog for the compute chip of a two-chip tactile-sensing
system. A control chip reads the tactile sensor's ADC bytes and streams them to the
compute chip. The compute chip runs a small quantized recurrent network over them: a
single-layer GRU with int8 weights and activations. The two chips sit on a
unidirectional packet ring. Everything the compute chip does is triggered by packets
from the control chip:

- load a program;
- stream in a frame of sensor bytes;
- kick the program off;
- read back the int8 results.

The weight matrices do not live on the chip. They stay in an external QSPI flash, and
the program pulls them in through a Wishbone bus.

The core is a deep learning accelerator (DLA) with `LANES` parallel dot-product lanes.
In one step, every lane multiplies the same `VEC`-element int8 input word by its own
weight row and sums the products in a pipelined adder tree. A combinational special
function unit (SFU) then requantizes the sum and applies an activation. The result
goes into the lane's accumulation memory in the same cycle. With the defaults (8 lanes
× 8 elements), that is 64 multiply-accumulates per step, giving eight output neurons
at a time.

The partition follows the original chip: top level, ring node, ring wrapper, DLA core,
control FSM, dot-product lane, adder tree, SFU, and the input, weight and accumulation
memories. The chip description leaves several things open:

- the instruction set beyond its 40-bit field layout;
- the packet format;
- all memory sizes;
- the number of lanes;
- the SFU's exact functions.

These are choices made here, and each one is marked as such below and in the file
headers.

## How one frame is processed

```
 control chip ──ring──► ring_node ──local──► ring_ctrl ──► dla ──Wishbone──► QSPI flash
      ▲                    │ (other ids: forwarded)            (weights)
      └──────ring──────────┘◄── RESULT / DONE packets ◄──┘
```

1. **Program load.** The control chip sends `WR_INSTR` packets, one 40-bit instruction
   each, into the 256-entry instruction buffer. A 207-instruction program fits.
2. **Frame.** `WR_INPUT` packets carry four packed ADC bytes each, plus a byte mask.
   They land in input memory A.
3. **Kick.** `KICK` starts the program at the given pc. It also swaps the two banks of
   input memory A, so the frame just written becomes the one the program reads. The
   next frame can then be written into the other bank while this one is processed.
   This is the ping-pong buffering.
4. **Execution.** The program loads weight rows from flash (`WLOAD`), runs dot products
   (`DOT`), feeds results back as inputs (`COPY`) and loops (`LDI`/`ADDI`/`BNZ`). When
   it reaches `HALT`, the chip sends a `DONE` packet to whichever chip kicked it.
5. **Results.** `RD_RESULT` packets read single accumulation entries. Each reply is a
   `RESULT` packet. `CLR_RESULT` zeroes the result buffer before the next frame.

`KICK`, `CLR_RESULT` and `RD_RESULT` are accepted only while the core is idle. Until
then the packet stays at the head of the ring input (ready low), so the ring stalls
behind it. A control chip can therefore queue the reads for a frame right behind its
kick, and they are answered as soon as the run ends.

## The ring

Every chip has a 6-bit ring id, the `my_id` input of `dla_chip`. Six bits leave room
for the control chip plus 63 compute chips, which is the architectural ceiling of the
system. `ring_node` delivers packets addressed to `my_id` to the chip. It forwards all
others unchanged and in order to `ring_out`, and merges in the chip's own packets. When
a forwarded packet and a local one want `ring_out` in the same cycle, the grant
alternates between them. `ring_out` comes from a one-packet register. All channels are
valid/ready: a packet moves on a rising edge where both are high.

A packet is a 72-bit `ring_pkg::ring_pkt_t`:

| field | bits | meaning |
|-------|------|---------|
| `dest` | 6 | ring id of the destination |
| `src`  | 6 | ring id of the sender (replies go here) |
| `cmd`  | 4 | command, below |
| `addr` | 16 | command address |
| `data` | 40 | command data |

| cmd | code | `addr` | `data` |
|-----|------|--------|--------|
| `WR_INSTR` | 1 | instruction index | instruction |
| `WR_INPUT` | 2 | byte address in input memory A (multiple of 4) | `[31:0]` four int8 bytes, low byte first; `[35:32]` byte mask |
| `KICK` | 3 | start pc | – |
| `RD_RESULT` | 4 | `{lane, entry}`: entry in the low `log2(ACC_DEPTH)` bits | – |
| `RESULT` | 5 | – | `[31:0]` the entry read (sent by the chip) |
| `DONE` | 6 | – | – (sent by the chip to the last kicker) |
| `CLR_RESULT` | 7 | – | – |

Other codes are accepted and dropped. On the physical chip, DDR source-synchronous
links (BSG links) carry the ring between chips. They are not part of this RTL. The ring
appears at `dla_chip` as plain valid/ready packet ports, ready to be attached to such a
link.

## The DLA core

```
                 ┌──────────── ctrl (FSM, instr_buf, regfile, wb_master) ────────────┐
                 │ addresses, enables, SFU function, accumulate flag                   │
  ring ─► in_mem A (2 banks) ─┐                                                        │
          in_mem B (1 bank) ──┴─► act ─► lane 0: wmem ─► dp (VEC mults + at) ─► sfu ─► acc_mem
                                      ─► lane 1: ...                                    │
                                      ─► lane LANES-1                                   │
          in_mem B ◄──────────────────────── COPY: low byte of every lane ◄──────────────┘
```

- **Input memory A** (`in_mem`, `BANKS=2`) holds `INA_DEPTH` words of `VEC` int8 values
  per bank. The ring writes into one bank while the program reads the other.
- **Input memory B** (`in_mem`, `BANKS=1`) receives lane results through `COPY`. This is
  how a recurrent hidden state becomes the input of the next step.
- **Weight memory** (`wmem`, one per lane) holds `W_DEPTH` rows of `VEC` int8 weights.
  `WLOAD` fills it from flash.
- **Dot-product lane** (`dp`): `VEC` signed 8×8 multiplies feed the adder tree `at`. The
  tree has `ceil(log2 VEC)` levels, and the last `STAGES` of them are registered. When
  the DOT asks for it, the lane adds the previous value of the accumulation entry.
- **SFU** (`sfu`) is combinational. Its output is written to the accumulation memory in
  the same cycle the lane's sum appears.
- **Accumulation memory** (`acc_mem`, one per lane) has `ACC_DEPTH` signed 32-bit
  entries. It holds partial sums and final int8 results, and serves as the result
  buffer.

All memories are plain arrays with one write port and one synchronous read port. Read
data appears the cycle after the read and holds until the next read. A synthesis flow
can map them onto SRAM macros.

## Instruction set

The field layout is the chip's own:

| bits | field |
|------|-------|
| 39:35 | opcode |
| 34 | mode-0 |
| 33 | mode-1 |
| 32:30 | reg-id-0 |
| 29:27 | reg-id-1 |
| 26:0 | payload |

The register ids select one of eight 32-bit registers. The opcodes and the meaning of
each field are defined here (`dla_pkg`):

| opcode | name | effect |
|--------|------|--------|
| 0 | `NOP` | – |
| 1 | `HALT` | stop; pulse `done` (a `DONE` packet goes out) |
| 2 | `LDI` | `r[id0] = payload` (zero-extended) |
| 3 | `ADDI` | `r[id0] = r[id1] + payload` (sign-extended from 27 bits) |
| 4 | `BNZ` | if `r[id0] != 0`, jump to `payload` |
| 5 | `WLOAD` | copy `payload[11:0]` rows from flash byte address `r[id0]` into the weight memory of lane `payload[15:12]`, from row `r[id1]` on |
| 6 | `DOT` | every lane: `acc[payload[7:0]] = SFU(Σ in[r[id0]]·w[r[id1]] (+ acc[payload[7:0]] if mode-0))`; input from memory B if mode-1; SFU function `payload[10:8]`, shift `payload[15:11]` |
| 7 | `COPY` | byte `payload[15:8] + l` of input-B word `r[id0]` = low byte of lane `l`'s entry `payload[7:0]` |

Other opcodes act as `NOP`. A weight row is `VEC` bytes at consecutive flash addresses,
element 0 first. `WLOAD` reads it as `VEC/4` little-endian 32-bit Wishbone words.

A dot product longer than `VEC` is built in pieces. The first `DOT` has mode-0 clear
and SFU function `PASS`. The middle pieces have mode-0 set and `PASS`. The last piece
has mode-0 set and the requantizing function. A `BNZ` loop over `ADDI`-stepped address
registers keeps the program short. `tb/dla_tb_pkg.sv` builds such a program:

- a 48-input layer with int8 requantization;
- a `COPY` of the eight results into input memory B;
- one recurrent step through hard tanh.

### Timing

Instructions run one at a time, with no overlap:

| step | cycles |
|------|--------|
| fetch (any instruction) | 1 |
| `LDI`, `ADDI`, `BNZ`, `NOP`, `HALT` | 1 |
| `DOT` | 2 + `STAGES`: execute, issue, adder tree |
| `COPY` | 2 |
| `WLOAD`, per row | `VEC/4` Wishbone reads, plus 1 write cycle |
| accepting `KICK` | 1 |
| clearing the result buffer | `ACC_DEPTH` cycles |

A Wishbone read costs 2 cycles plus the slave's wait states. A one-`DOT` program
therefore takes 1 + (3 + `STAGES`) + 2 cycles from kick to `done`. The testbenches
check this count.

## SFU and number formats

Activations and weights are int8. Products are 16 bits, the adder-tree output
`16 + log2(VEC)` bits, and accumulators 32 bits. The SFU first requantizes:
`r = (x + 2^(shift-1)) >>> shift`, an arithmetic shift with round-half-up. It then
applies one of these functions:

| code | function | result |
|------|----------|--------|
| 0 | `PASS` | `x` unchanged (partial sums) |
| 1 | `REQ` | `r` saturated to [-128, 127] |
| 2 | `RELU` | `max(r, 0)` saturated to 127 |
| 3 | `SIGM` | hard sigmoid `clamp(r/4 + 32, 0, 64)` |
| 4 | `TANH` | hard tanh `clamp(r, -64, 64)` |

For the two gate functions, int8 values are read as Q1.6, so 64 stands for 1.0. Codes
5–7 behave as `REQ`. The chip description says the SFU is combinational, activates,
and requantizes. The function set and the piecewise-linear forms are choices made here,
picked to cover a GRU's gates.

## What is not here, and where this RTL departs from the original chip

- **The GRU's element-wise gate arithmetic is missing.** This covers `z ⊙ h`,
  `(1 − z) ⊙ n` and `r ⊙ (W h)`. The instruction set has matrix-vector products,
  activations and state feedback, but no element-wise multiply. A complete GRU cell
  therefore cannot run on this core alone. The original chip's instruction set is not
  known in enough detail to add the right operation.
- **The BSG DDR link channels and the QSPI flash controller are not included.** The
  ring appears as valid/ready ports and the flash as a Wishbone master port.
  `tb/wb_flash_model.sv` stands in for the flash behind its controller.
- **The scan chain, the pad ring and the control chip are not part of this RTL.** The
  control chip is the SERV-based master with its DMA.
- **Sizes are choices made here.** These cover the lane count, `VEC`, memory depths and
  adder-tree stages. The original chip fixes them at build time, but their values are
  not known.
- **The packet format and command set are defined here.** The same holds for result
  readout one entry per packet, and for the rule that a kick swaps the ping-pong banks.
- **Reset is asynchronous and active low.** The control chip is expected to sequence
  it.

## Parameters

All are parameters of `dla_chip` and are passed down.

| parameter | default | meaning |
|-----------|---------|---------|
| `LANES` | 8 | dot-product lanes (output neurons per step) |
| `VEC` | 8 | int8 elements per input word and weight row (multiple of 4) |
| `STAGES` | 2 | registered adder-tree levels (0 … log2 `VEC`) |
| `IB_DEPTH` | 256 | instructions |
| `INA_DEPTH` | 64 | words per bank of input memory A |
| `INB_DEPTH` | 64 | words of input memory B |
| `W_DEPTH` | 256 | weight rows per lane |
| `ACC_DEPTH` | 256 | accumulation entries per lane (`DOT` and `COPY` address 256) |

`LANES` must not exceed `VEC` if `COPY` is to move every lane's result.

## Files

| file | contents |
|------|----------|
| `rtl/dla_pkg.sv` | instruction format, opcodes, SFU codes, `mk_instr` |
| `rtl/ring_pkg.sv` | ring packet and commands |
| `rtl/dla_chip.sv` | chip top level |
| `rtl/ring_node.sv` | ring stop: deliver, forward, merge |
| `rtl/ring_ctrl.sv` | packets to core commands and back |
| `rtl/dla.sv` | DLA core |
| `rtl/ctrl.sv` | control FSM |
| `rtl/instr_buf.sv`, `rtl/regfile.sv`, `rtl/wb_master.sv` | parts of the control path |
| `rtl/dp.sv`, `rtl/at.sv`, `rtl/sfu.sv` | lane datapath |
| `rtl/in_mem.sv`, `rtl/wmem.sv`, `rtl/acc_mem.sv` | memories |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_frame_loop.sv` | per-frame operating loop with a recurrent state, one chip |
| `tb/tb_chip_pipeline.sv` | two chips on one ring, one layer each |
| `tb/dla_tb_pkg.sv` | flash contents, reference SFU, test program and its expected results |
| `tb/wb_flash_model.sv` | behavioural Wishbone flash |

## Simulating

Every testbench checks itself. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Build and run one with
Verilator 5, for example the end-to-end test of the whole chip at its default sizes:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dla_pkg.sv rtl/ring_pkg.sv tb/dla_tb_pkg.sv -y rtl -y tb \
  tb/tb_dla_chip.sv --top-module tb_dla_chip -Mdir obj_tb_dla_chip
./obj_tb_dla_chip/Vtb_dla_chip
```

Swap in another `tb_<module>` to test a single block. To lint the design, run
`verilator --lint-only -Wall rtl/dla_pkg.sv rtl/ring_pkg.sv -y rtl rtl/dla_chip.sv`.

`tb_dla_chip` plays the control chip. In sequence, it:

1. programs the chip;
2. sends frame 1 and kicks;
3. writes frame 2 into the idle bank during the run, while forwarding 200 packets for
   another chip;
4. reads all results and compares them with a reference model;
5. kicks again with the reads queued right behind, so the ring stalls;
6. checks frame 2;
7. clears the results and reads back zeros.

It counts how often each mechanism happened and fails if one never did: forwarding,
ring stall, ping-pong writes, arbitration, output back-pressure, weight loads,
accumulation, input-B use and clearing. `tb_dla` runs the same program directly on the
core and also checks the DOT cycle count.

`tb_frame_loop` runs the chip's normal operating loop. A load program brings in the
weights once, and a second program zeroes the recurrent state. Then, for each of five
frames, the testbench:

1. resets the result buffer;
2. streams the frame in;
3. kicks the frame program;
4. reads the outputs.

The frame program computes `h_t = hardtanh(requant(W x_t + U h_{t-1}))`. The input
part is accumulated over four words of input memory A and the recurrent part comes from
input memory B. `COPY` carries `h_t` to the next frame. The testbench checks every
output against a reference that carries its own state, and checks that no weights are
reloaded.

`tb_chip_pipeline` puts two chips on one ring, the multi-chip arrangement in which
each chip holds one layer's weights in its own flash. The testbench acts as the
control chip at ring id 0, and the ring runs 0 → chip A (id 1) → chip B (id 2) → 0.
Chip A computes layer 1 (32 inputs, ReLU). The testbench reads its outputs and sends
them to chip B, which computes layer 2. The next frame is sent to chip A at the same
time, so the two chips run in parallel. Packets for B pass through A, and A's replies
pass through B. B's queued reads stall the ring while B runs. Every output of both
layers is checked.

The unit testbenches compare each block with an independent reference:

- random vectors for `at`, `dp` and `sfu`, with reference sums and a division-based
  requantization model;
- reference arrays for the memories;
- a recorded access trace for `ctrl`;
- packet bookkeeping for the ring blocks.
