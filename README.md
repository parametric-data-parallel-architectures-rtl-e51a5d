# A parametric vector coprocessor for TLM field solvers

The transmission-line matrix (TLM) method models electromagnetic fields on a 3-D mesh of nodes. Every
time step does two things to every node. *Scatter* is arithmetic local to the node. *Connect* swaps
pulses with the neighbouring nodes. The innermost loop runs along one mesh axis and does the same
single-precision work for every node, so it maps naturally onto short vectors.

This RTL is a vector coprocessor for that loop. It sits beside a 32-bit Sparc V8 RISC CPU and runs in
lockstep with the CPU's pipeline. It has VLMAX single-precision lanes (16 by default) and its own
path to memory: a vector data cache and an AHB bus master. The CPU runs the loop control and the
scalar code, and passes vector opcodes and scalars to the coprocessor over a dedicated channel.
Published instruction-count studies of this architecture report that, with 16 lanes, a vectorised
TLM code runs roughly ten times fewer instructions than scalar code. Meshes tried ranged from thin
(2×2×250 000 nodes) to cubic (100³ nodes), and an 80×100×125 mesh behaved much the same in all six
axis orders.

The CPU itself is not included, nor are its caches, the SDRAM controller, the SDRAM or the bus
arbiter. The top level, `vcop`, brings out the coprocessor channel and an AHB master port.

```
             coprocessor channel                           AHB
  RISC CPU  <------------------->  vcop  ------------------------------>  SDRAM ctrl
  (not here)  opc/valid/din/holdn   |                                     (not here)
                      dout/holdn    +- vdecode     opcode -> control fields
                                    +- vrf         VRMAX x VLMAX x 32, 3R/1W, byte enables
                                    +- srf         SRMAX x 32 scalar registers
                                    +- vperm       3-operand byte permute
                                    +- vlane xVLMAX  fp_mul -> mux -> fp_add -> result reg
                                    +- vacc        VACC0, VACC1
                                    +- vmem        memory pipe
                                         +- vdcache  vector cache (even/odd line banks)
                                         +- wbuf     write buffer
                                         +- ahb_master  bus controller
```

## Programmer's model

| State | Size | Use |
|---|---|---|
| VR0 .. VR(VRMAX-1) | VLMAX × 32-bit floats each | vector operands |
| SR0 .. SR(SRMAX-1) | 32 bit | addresses (base + index), values from the CPU, splat source |
| VACC0, VACC1 | VLMAX × 32-bit floats each | multiply-accumulate targets |
| VLEN | 10 bit | number of **bytes** an operation affects (resets to 4·VLMAX) |

The defaults are VLMAX = 16, VRMAX = 16 and SRMAX = 8.

The opcode is 20 bits wide: `[19:16]` operation, `[15:12]` d, `[11:8]` a, `[7:4]` b and `[3:0]` c.
The encoding is defined in `rtl/vcop_pkg.sv`.

| Code | Mnemonic | Effect |
|---|---|---|
| 0 | MVSR2VLEN | VLEN ← SR[a][9:0] |
| 1 | MVSR2CSR | SR[d] ← din (from the CPU) |
| 2 | MVCSR2R | dout ← SR[a] (to the CPU) |
| 3 | MVSR2CVEL | VR[d].elem[c] ← din |
| 4 | MVCVEL2R | dout ← VR[a].elem[c] |
| 5 | VLDU | VR[d] bytes 0..VLEN-1 ← mem[SR[a]+SR[b] ...], any byte alignment |
| 6 | VSTU | mem[SR[a]+SR[b] ...] ← VR[d] bytes 0..VLEN-1, any byte alignment |
| 7 | VPERM | VR[d].byte[j] ← {VR[a],VR[b]}.byte[VR[c].byte[j] mod 8·VLMAX] |
| 8 | VSPLAT | every element of VR[d] ← SR[a] |
| 9/10/11 | VFPADD / VFPSUB / VFPMUL | VR[d] ← VR[a] op VR[b], elements under VLEN |
| 12 | VFPMAC | VACC[c0] ← (c1 ? 0 : VACC[c0]) + VR[a]·VR[b]; VR[d] ← the same value |

Rules that apply to every instruction:

- **Byte order.** Memory is big-endian, as on the Sparc host. Byte 4i+k of a vector is element i,
  bits [31-8k -: 8]. VLEN counts these bytes.
- **What VLEN masks.** A load or store moves exactly VLEN bytes; VLEN above 4·VLMAX counts as
  4·VLMAX. An FP add, subtract or multiply writes element i only if all four of its bytes lie below
  VLEN. Unselected bytes and elements of VR[d] keep their old value.
- **Instructions VLEN does not mask.** VPERM, VSPLAT and VFPMAC ignore VLEN and write the whole
  register.
- **Permute builds the sub-element moves.** A splat of one element, a rotate across two registers,
  and byte or halfword shuffles are all a VPERM with a suitable control vector.

## Pipeline and the coprocessor channel

This is the part that needs the most care when the design is connected to a CPU.

| Stage | What happens |
|---|---|
| **D** | The opcode is on `cop_opc` with `cop_valid`. Decode. The register files are read combinationally and bypassed. The VLEN byte mask is formed. Permute and splat are computed. For a load or store, SR[a]+SR[b] is formed. |
| **E** | FP stage 1: multiply, or pass operand a through. A load or store runs in the memory pipe; the whole pipeline waits until it completes. `cop_din` now carries the CPU's value for MVSR2CSR or MVSR2CVEL. SR[d] is written at the end of E. |
| **M** | FP stage 2: add or subtract operand b, add the accumulator, or pass through. The accumulators are written at the end of M. A value for the CPU is on `cop_dout` during this cycle. |
| **W** | Intermediate result register. VR[d] is written at the end of W under the instruction's byte mask. |

**Channel timing.** A value from the CPU arrives on `cop_din` one cycle after its opcode was
accepted. A value for the CPU is on `cop_dout` two cycles after acceptance, plus any cycles in which
the pipeline was frozen. An opcode is accepted on a rising edge where `cop_valid`, `cop_holdn` and
`cop_holdn_in` are all high, and `cop_no` equals the `COP_ID` parameter.

**Two kinds of stall:**

- **Hazard.** The instruction in D reads a vector register that an instruction in E or M will still
  write. `cop_holdn` goes low, the CPU keeps the same opcode on the channel, and a bubble enters E
  while the older instructions move on. The wait is one or two cycles.
- **Freeze.** Either a load or store is in E and the memory pipe has not finished, or the CPU
  lowers `cop_holdn_in` for its own reasons. Every stage holds. `cop_holdn` is low in the first case.

`cop_holdn_in` must be the CPU's own stall only. It must not be derived from `cop_holdn`, or a
hazard would never clear.

**Bypasses:**

- A vector result in W is merged, byte by byte under its mask, into any operand read in D.
- A scalar being written from `cop_din` in E is forwarded to SR reads in D.
- The accumulators need no bypass. They are read and written in the same stage, so back-to-back
  VFPMACs on one accumulator run at full rate.

## Floating point

- `fp_mul` and `fp_add` are combinational IEEE-754 binary32 units. Each takes one pipeline stage.
- Rounding is to nearest, ties to even.
- Subnormal inputs count as zero, and results below the normal range flush to a signed zero.
- Overflow gives ±infinity. Every invalid operation, and every NaN input, gives the quiet NaN
  0x7FC00000.
- VFPMAC is not fused. The product is rounded in stage 1 and the sum in stage 2.
- The critical path is a full 24×24 multiply with rounding in E, and an align, add, normalise and
  round in M. A timing-driven implementation would probably move part of each into the neighbouring
  stage.

## Memory pipe (`vmem`)

A vector access of up to 4·VLMAX bytes at any byte address touches at most two consecutive cache
lines, because a line holds one whole vector.

- **Cache lookup.** `vdcache` is direct-mapped and keeps even and odd lines in separate banks. Both
  lines an access touches are therefore looked up in the same cycle, and they never evict each other.
- **Loads.** A missing line is fetched by `ahb_master` as an incrementing burst of VLMAX words. The
  two-line window is then rotated by the address offset. A load that hits both lines completes two
  cycles after its request.
- **Stores.** The cache is write-through without allocate. Each touched word goes into `wbuf` with
  four byte enables, one word per cycle; the store waits while the buffer is full. If the word's
  line is cached, the cache copy is updated in the same cycle. `ahb_master` drains the buffer in the
  background, taking priority over fills. A full word is one AHB word transfer; a partial word
  becomes one byte transfer per enabled byte.
- **Ordering.** A fill waits until the write buffer is empty, so a load always sees earlier stores.
- **Bus behaviour.** The master requests the bus with `HBUSREQ`. It drives addresses only in cycles
  when it owns the bus, and restarts a burst that lost the grant with a NONSEQ beat. `HRESP` is
  ignored: errors, retries and splits are not handled.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `VLMAX` | 16 | the main configuration of the architecture (16 single-precision lanes) |
| `VRMAX` | 16 | programmer's model (VR0..VR15) |
| `SRMAX` | 8 | programmer's model (SR0..SR7) |
| `NLINES` | 64 | this design's choice (4 KiB cache at VLMAX = 16) |
| `WB_DEPTH` | 8 | this design's choice |
| `COP_ID` | 0 | this design's choice |

The register counts and the lane count are general. VRMAX is limited to 16 by the 4-bit register
fields, and VLMAX to 16 by the 4-bit element index of MVSR2CVEL and MVCVEL2R.

## What follows the original architecture and what is this design's own

Taken from the architecture:

- the programmer's model: register counts, the two accumulators, and a 10-bit VLEN that counts bytes;
- the instruction list;
- the 20-bit opcode and the names of the channel signals;
- the placement of the vector FP work in two stages after decode, followed by an intermediate result
  register before the register file;
- a memory pipe made of an unaligned-address stage, a vector cache, a merge stage, a write buffer and
  an AHB bus master.

This design's own choices:

- the opcode encoding and the channel timing details;
- the hazard and bypass scheme;
- the permute semantics: the instruction is described as a three-operand "bitwise" permute that can
  build splats and other sub-element moves, and a byte permute is what can do that;
- which instructions VLEN masks;
- the floating-point rounding and subnormal policy;
- the cache organisation, size and policy, the write-buffer depth and the AHB protocol details;
- a third read port on the register file, which lets VPERM read all three sources in one cycle.
  Each lane's register slice was drawn with two read ports.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
Files are found by module name, so pass the packages first and add the folders with `-I`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/vcop_pkg.sv tb/fp_ref_pkg.sv tb/tb_vcop.sv --top-module tb_vcop
./obj_dir/Vtb_vcop
```

The same command works for every `tb_<block>`.

`tb_vcop` runs the top level at its default size with:

- 3000 random instructions from a CPU model that also stalls at random;
- an AHB memory model with random wait states and random loss of the grant.

A reference model executes each instruction when it is accepted. The testbench compares:

- every value returned on `cop_dout`, including its latency;
- at the end, all registers, the accumulators, VLEN and 16 KiB of memory.

It also counts each mechanism and fails if any of them never happened: hazard stall, vector bypass,
scalar bypass, memory freeze, cache fill, two-line unaligned load, write-buffer full, CPU freeze,
VLEN masking, accumulate with and without clear, permute, splat and element moves, and loss of the
bus grant. It takes well under a second to simulate.

`tb_tlm_row` runs a real TLM time-stepping kernel on the top level at its default size. It is a
one-dimensional line of 125 shunt nodes, which matches one side of an 80×100×125 mesh, run for 4
time steps. Scatter is one add and two subtracts per node. Connect exchanges pulses with the
neighbouring nodes, using loads offset by one element, and the line ends absorb. The line is
processed in 16-node strips, and the last strip of 13 nodes runs under VLEN. The final pulse arrays
in memory are compared with a single-precision reference. With one wait state per bus beat the
kernel takes about 24 cycles per node and time step. Memory traffic dominates: the write-through
stores drain at one word per bus transfer.

The FP testbenches check against binary64 arithmetic rounded to binary32 (`tb/fp_ref_pkg.sv`). For
a single add, subtract or multiply this double rounding gives the correctly rounded result.
`tb/ahb_mem_model.sv` is the behavioural AHB memory and arbiter.

## Not included

- The Sparc V8 CPU with its instruction and data caches and its own AHB master.
- The SDRAM controller, the SDRAM and the bus arbiter and decoder.

The testbenches model the CPU's side of the channel and the memory, and nothing more. The
multiprocessor arrangement envisaged for later (several CPU and coprocessor pairs sharing memory)
is not built either.
