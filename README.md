# Falcon: a programmable SIMD co-processor for cryptography

Falcon is a small co-processor that runs cryptographic code for a low-power
host CPU. It is not built for one cipher. It is a general 256-bit SIMD machine
whose lane width can be changed at run time, from thirty-two 8-bit lanes to
one 256-bit lane. Symmetric ciphers and hashes use the narrow lanes together
with two bit-moving instructions, PERMUTE and BITSLICE. Public-key arithmetic
uses the wide lanes and a multi-cycle long multiply. The machine has no
data-dependent branches. Control flow is limited to hardware counted loops,
so the instruction stream is fully known in advance and the fetch unit never
mispredicts. Instructions are mostly 16 bits long, because on a cacheless
microcontroller the energy cost of fetching instructions is significant.

This repository holds synthesizable SystemVerilog for the whole co-processor
(`rtl/`), a reference model and self-checking testbenches (`tb/`). Everything
simulates with plain Verilator.

## Programmer's model

| state | size | notes |
|---|---|---|
| R0..R15 | 16 x 256 bits | every instruction works on whole registers |
| lane width W | 8, 16, 32, 64, 128 or 256 | global, set by `SET_WIDTH`; there are 256/W lanes |
| mask | 32 bits, one per byte | set by `SET_MASK`; a lane is masked when the mask bit of its lowest byte is 1 |
| loop stack | 4 entries | (start address, remaining count), inside the fetch unit |

A masked lane keeps its old value. Every instruction except BITSLICE writes its
destination under the mask. BITSLICE uses the mask on its *source* instead:
bits taken from a masked lane read as zero, and every destination bit is
written.

### Encodings

Instructions are 16-bit words. Memory is fetched in 32-bit *bundles*, and the
word in bits 15:0 of a bundle executes first.

```
register form   [15:11] opcode  [10:8] R3[2:0]  [7:4] R2  [3:0] R1
immediate form  [15:11] opcode  [10:4] imm7                [3:0] R1
LDi             [15:11] opcode  [10:7] 0  [6:4] L-code     [3:0] R1
                then max(1, L/16) immediate words, least significant first
loop            [15:11] opcode  [10:0] count ; must start a bundle, and the
                second word of that bundle is ignored
```

R3 has only three bits in the word. Its top bit is R1[3], so a two-operand
form `op R1, R2` is written by setting R3 = R1[2:0].

Width codes, used by `SET_WIDTH` (imm7) and by LDi (L-code), are
log2(width) - 3. So 0 means 8 bits and 5 means 256 bits.

| opcode | mnemonic | operation (per lane unless noted) |
|---|---|---|
| 0 | NOP | none; also used to pad a bundle before a loop instruction |
| 1 | HALT | ends the program once all earlier instructions have written back |
| 2 | SET_WIDTH w | W = 8 << w (executed in decode) |
| 3 | SET_MASK R1 | the mask bits of each lane's bytes = the lane's LSB |
| 4 | LDi R1, imm | load an L-bit immediate (see below) |
| 5 | PERMUTE R1, R2, R3 | R1[i] = R3[R2[i] mod lanes] |
| 6 | BITSLICE R1, R2 | bit transpose, see below |
| 7, 8, 9 | ADD, SUB, MUL R1, R2, R3 | R1 = R2 op R3, modulo 2^W (MUL keeps the low W bits) |
| 10..13 | AND, OR, XOR, NOT | bitwise; NOT R1, R2 |
| 14..17 | SLi, SRi, ROLi, RORi R1, imm7 | R1 is shifted or rotated in place; shifts by W or more give 0 |
| 18, 19 | LD R1, R2 / ST R1, R2 | 256 bits at the byte address in R2[31:0] |
| 20, 21 | IN R1 / OUT R1 | 256 bits from the input FIFO or to the output FIFO |
| 22, 23 | LOOP_BEGIN n / LOOP_END | the loop body runs n + 1 times; loops nest 4 deep |
| 24 | MOV R1, R2 | copy |

**LDi spreading.** The load width L and the lane width W decide where the
immediate goes. If L < W, every lane receives the immediate, zero extended.
If L >= W, the immediate is repeated to fill 256 bits, and that pattern is cut
into lanes. For example, an 8-bit load at W = 32 sets the low byte of all
eight lanes. A 128-bit load at W = 32 gives lanes 0 and 4 the same word.

**PERMUTE** is a gather. Lane i of the result is the lane of R3 that is named
by the low bits of lane i of R2. With four lanes, R3 = (x0, x1, x2, x3) and
R2 = (1, 3, 0, 2) give R1 = (x1, x3, x0, x2).

**BITSLICE** treats the 256 bits as an N x W bit matrix (N = 256/W lanes of
W bits) and transposes it. Bit j of output lane i, where output lanes are
256/W bits wide, is bit i of input lane j. Applying it at width W and then at
width 256/W gives back the original value (only W = 16 is its own inverse).
The DES half-block permutation shows why this pair of instructions exists.
Eight 32-bit half blocks are stored one per 32-bit lane. `BITSLICE` at W = 32
makes each byte hold bit k of all eight blocks. A `PERMUTE` at W = 8 with a
256-bit index loaded by one LDi reorders those bytes. A final `BITSLICE` at
W = 8 returns the blocks to their own lanes. That is three instructions plus
the index load, where shifting and masking needs over a hundred.

## Host interface

The host sees four 32-bit registers. An access completes in the cycle in
which `host_ready` is high.

| address | register | access |
|---|---|---|
| 0x0 | PROG_PTR | A write of a word-aligned address inside [PROG_BASE, PROG_BASE + PROG_SIZE), 64 KB by default, starts a program there. One cycle later a start pulse clears all internal state (registers, mask, width, loop stack, FIFOs, pipeline). Any other address sets the bad-pointer flag, and nothing runs. DATA_IN and DATA_OUT accesses wait during the start cycle, so that no word is lost to the clear. |
| 0x4 | STATUS | bit 0 busy, bit 1 done (HALT reached), bit 2 bad pointer, bit 3 loop-stack error, bits 15:8 input FIFO fill, bits 23:16 output FIFO fill |
| 0x8 | DATA_IN | A write pushes a word into the 16-entry input FIFO. It waits while the FIFO is full. |
| 0xC | DATA_OUT | A read pops a word from the 16-entry output FIFO. It waits while the FIFO is empty. |

Besides the register port, `falcon_top` has three status pins: `busy`,
`done` and `error`. `done` rises when HALT completes, one cycle before the
done bit in STATUS. `error` is the OR of the loop-stack error and the
bad-pointer flag.

Both memory ports use the same simple bus. A request (`valid`, `we`, `addr`,
`wdata`) is accepted when `ready` is high. One response (`valid`, `rdata`)
comes back later, in order. Each requester has one transfer in flight at a
time. Two configurations are available:

- `SHARED_MEM = 1` (default). Instruction fetch and LD/ST share `mem_*`
  through `falcon_bus_arb`, and data requests win. The `spm_*` port is then
  unused and driven to zero.
- `SHARED_MEM = 0`. LD/ST use a private scratchpad bus (`spm_*`), for example
  key storage the host cannot reach. Fetch keeps `mem_*` to itself.

## Microarchitecture

```
 host ──► falcon_ctrl ──start──► everything
             │  ▲
        in FIFO  out FIFO ◄──────────────┐
             │                           │
 mem ◄──► falcon_bus_arb ◄── falcon_fetch (PC, pre-decode, loop stack)
             ▲                    │ 32-bit bundles
             │               fetch buffer (8)
             │                    │
             │              falcon_decode (1 word/cycle, LDi, SET_WIDTH)
             │                    │ micro-ops with lane width
             │              falcon_backend: read ─► execute ─► write back
             └── falcon_lsu ◄──────┘  (16 units, permute, bitslice, shifter, masks)
```

### Frontend

`falcon_fetch` requests one bundle at a time. The next request is issued in
the cycle the response arrives, so a memory that answers in one cycle gives a
bundle per cycle. A pre-decoder tracks instruction boundaries across bundles.
It skips the immediate words of LDi, so an immediate that happens to look like
a loop opcode is never mistaken for one. Loop instructions are executed in
fetch and never enter the fetch buffer:

- `LOOP_BEGIN n` pushes (address of the next bundle, n) onto the loop stack.
- `LOOP_END` looks at the top entry. If its count is above zero, the count is
  lowered by one and fetch jumps back to the saved address. If the count is
  zero, the entry is popped and fetch falls through.

This is why loop instructions must start a bundle: the pre-decoder only looks
at the first word. A push onto a full stack or a pop from an empty one sets a
sticky error, which the host sees in STATUS. After the bundle holding HALT,
fetch stops. A request is issued only while the 8-entry buffer has room.

`falcon_decode` takes one 16-bit word per cycle from the buffer head. An LDi
gathers its immediate words, one per cycle, then issues a single micro-op
carrying the already-spread 256-bit value. The spread pattern for each (L, W)
pair is pure wiring, followed by one selection. SET_WIDTH changes the width
register in decode. Every micro-op carries the width in force when it was
decoded. NOPs and SET_WIDTH issue nothing.

### Backend

The backend has three stages: register read, execute and write back. The
16 x 256-bit register file is built from sixteen 16 x 16-bit slices, one per
execution unit. Operands are forwarded from the execute stage (in the cycle it
completes) and from write back. A forwarded value is merged byte by byte with
the older value under the byte enables, so masked lanes forward correctly.
With these paths no read-after-write hazard causes a stall. An instruction
waits in register read only while a multi-cycle instruction occupies execute.

Each of the 16 `falcon_exec_unit`s computes A + B + C x D on 16 bits with a
32-bit result. The unit can split into two 8-bit MACs, and it has a 16-bit
logic unit. The widths map onto the units as follows:

- **8-bit lanes.** Each unit is two 8-bit MACs. ADD, SUB and MUL take one
  cycle.
- **16 to 256-bit ADD/SUB.** The units of one lane form a carry chain: each
  unit adds the carry (bit 16) of the unit below through its C x D input with
  D = 1. The result is ready in one cycle. SUB adds the inverted operand plus
  one.
- **16-bit MUL.** One cycle.
- **MUL with lanes of 32 bits or more.** Schoolbook multiplication over
  K = W/16 cycles. In cycle i, digit i of the multiplier is steered to every
  unit of the lane. Unit j adds digit (j - i) of the multiplicand times that
  digit to its 16-bit accumulator. The upper half of each unit's 32-bit sum
  ripples into the unit above in the same cycle. Only the low W bits of the
  product are kept. A 256-bit multiply takes 16 cycles.
- **PERMUTE.** `falcon_permute` has eight ports. Each port moves a 32-bit
  window that can start at any byte. 8-bit lanes need 4 passes, 16-bit lanes
  2, and 32-bit or wider lanes 1 (a lane wider than 32 bits is moved as
  several 32-bit chunks by several ports in the same pass).
- **BITSLICE and the shifts/rotates.** Combinational: one block per width,
  then a selection by the current width.
- **LD/ST/IN/OUT.** Execute until `falcon_lsu` has moved eight 32-bit words,
  least significant first. An empty input FIFO or a full output FIFO makes
  the instruction wait. This is how a program blocks on the host.

| instruction | execute cycles |
|---|---|
| logic, shifts, ADD/SUB (any W), MUL (W <= 16), BITSLICE, LDi, MOV | 1 |
| MUL, W = 32 / 64 / 128 / 256 | 2 / 4 / 8 / 16 |
| PERMUTE, W = 8 / 16 / >= 32 | 4 / 2 / 1 |
| IN, OUT | 8 when the FIFO allows |
| LD, ST | 8 bus transfers, at least 2 cycles each |

## Departures and choices

The published description of Falcon names the units and their behaviour but
leaves many details open. The points below are this implementation's own
choices, or places where it differs from that description.

- **Instruction set details.** The opcode numbers, the width codes, HALT, the
  immediate shift forms, MOV, and the LD/ST/IN/OUT operand conventions are
  all this implementation's own. The description names SET_WIDTH, SET_MASK,
  LDi, PERMUTE, BITSLICE, the loop instructions, shifts by an immediate and
  the logic operations. It gives the field layout but no opcode table.
- **Mask polarity.** A mask bit of 1 disables the lane.
- **PERMUTE direction.** The worked 4-lane example (sources x0..x3, selector
  1 3 0 2, result x1 x3 x0 x2) is a gather. One sentence of the prose reads
  like a scatter. The gather was implemented.
- **Digit broadcast for long multiplies.** This uses dedicated multiplexers in
  the backend. In the description, the permutation network carries the
  digits.
- **Multiply result.** Only the low W bits are kept. There is no high-half or
  carry-out instruction, so wider modular arithmetic (a full 255-bit x 255-bit
  product, 2048-bit RSA) must be composed in software from narrower lanes.
- **Bus.** The evaluation system used AXI-Lite. Here both ports use the
  single-outstanding valid/ready bus described above, so a bridge is needed
  to attach to AXI-Lite.
- **Program window and register map.** These are not specified in the
  description. PROG_BASE and PROG_SIZE are parameters, 0 and 64 KB by
  default.
- **Reset and start values.** After start, W = 8, all lanes are unmasked, and
  all registers and both FIFOs are empty or zero.

Not included:

- The scratchpad memory itself, the 64 KB SRAM, the host CPU and the AXI-Lite
  interconnect. These are outside the co-processor. Testbenches use a
  behavioural memory (`tb/falcon_mem_model.sv`) and act as the host.

## What the design can run

All six evaluated algorithms fit the default configuration.

| algorithm | fit |
|---|---|
| Bitsliced AES-128 | Logic ops, shifts, PERMUTE, BITSLICE; two blocks per register. |
| ChaCha20 | 32-bit add, XOR and rotate-by-immediate. `tb_falcon_chacha20` runs two blocks in parallel in 438 cycles, including host transfers. |
| SHA-256 | 32-bit add, shifts, rotates and logic; constants come from LDi or LD. |
| Curve25519 | Field elements fit one 256-bit lane. Full products and reductions are built in software from narrower multiplies, because only the low half of a product is kept. |
| RSA-2048 | Operands live in memory, and limb arithmetic is done in software. The registers hold only 4096 bits in total. |
| R-LWE | 16-bit coefficient arithmetic, 16 coefficients per register. |

## Verification

`tb/falcon_ref_pkg.sv` holds an instruction-level reference model and an
assembler. The model computes every operation lane by lane from its
definition, with no knowledge of the datapath. Each block has its own
self-checking testbench that compares against independently computed values:

| testbench | what it checks |
|---|---|
| `tb_falcon_top` | The whole co-processor at its default parameters, running one generated program against the reference model. The program covers all widths, LDi in both spreading forms, masks, PERMUTE in 4, 2 and 1 passes, BITSLICE, the DES permutation (also checked against the DES P table directly), 256-bit multiplies, nested loops, LD/ST and a random instruction mix. The host feeds input and drains output slowly. A second program overflows the loop stack. Seventeen mechanisms are counted: loop jump, loop exit, forwarding, register-read stall, waits on empty input, on full output and on memory, 4-pass and 2-pass permutes, the 16-cycle multiply, masked writes, BITSLICE, bus conflicts, a full fetch buffer, host stalls on each FIFO, and loop-stack overflow. Any that never happens is a failure. Cycle counts of PERMUTE and the long multiply are checked. |
| `tb_falcon_chacha20` | The ChaCha20 block function on the whole co-processor. Rows of the state are in R0..R3, one block per four 32-bit lanes. PERMUTE turns the column rounds into diagonal rounds, and a hardware loop runs the ten double rounds. The output is checked against the standard test vector and an independent model. |
| `tb_falcon_backend` | Random micro-op streams at random widths with random gaps, against the reference model. A memory unit model answers after random delays. HALT must wait for the last write-back. |
| `tb_falcon_fetch` | Random programs with nested loops and loop-like LDi immediates. The fetched stream is compared with a loop interpreter. Also checks stack overflow. |
| `tb_falcon_decode` | The fields of every micro-op, LDi spreading at every load width under every lane width, and that nothing issues after HALT. |
| `tb_falcon_permute`, `tb_falcon_bitslice`, `tb_falcon_exec_unit`, `tb_falcon_lane_ctrl`, `tb_falcon_regfile` | Datapath blocks, checked exhaustively or randomly against direct definitions. Includes the published 4-lane examples, pass counts, and the BITSLICE inverse. |
| `tb_falcon_lsu`, `tb_falcon_bus_arb`, `tb_falcon_ctrl`, `tb_falcon_fifo`, `tb_falcon_loop_stack` | Protocols and back-pressure. |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To
run one:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  rtl/falcon_pkg.sv tb/falcon_ref_pkg.sv -y rtl -y tb \
  --top-module tb_falcon_top tb/tb_falcon_top.sv
./obj_dir/Vtb_falcon_top +verilator+rand+reset+2 +nrand=300 +verilator+seed+7
```

`+nrand=N` sets the length of the random part of the top-level program
(default 80). `+trace` prints the reference model's and the RTL's write-back
traces side by side.

Not verified:

- The `SHARED_MEM = 0` (separate scratchpad bus) configuration. Every
  testbench uses the shared bus.
- Timing closure, area and power. Only behaviour has been simulated.

## Files

| file | content |
|---|---|
| `rtl/falcon_pkg.sv` | widths, opcodes, micro-op and bus types |
| `rtl/falcon_top.sv` | the co-processor |
| `rtl/falcon_ctrl.sv` | host registers |
| `rtl/falcon_fetch.sv`, `rtl/falcon_loop_stack.sv` | fetch, pre-decode, loops |
| `rtl/falcon_fifo.sv` | fetch buffer and data FIFOs |
| `rtl/falcon_decode.sv` | decode and LDi spreading |
| `rtl/falcon_backend.sv` | pipeline, forwarding, long multiply |
| `rtl/falcon_exec_unit.sv` | 16-bit MAC / dual 8-bit MAC / logic unit |
| `rtl/falcon_regfile.sv`, `rtl/falcon_regfile_slice.sv` | register file |
| `rtl/falcon_permute.sv`, `rtl/falcon_bitslice.sv`, `rtl/falcon_shifter.sv`, `rtl/falcon_lane_ctrl.sv` | the remaining datapath blocks |
| `rtl/falcon_lsu.sv`, `rtl/falcon_bus_arb.sv` | memory unit and bus sharing |
| `tb/` | reference model, memory model and testbenches |
