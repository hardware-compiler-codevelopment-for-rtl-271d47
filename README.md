# VIRAM-1 vector coprocessor and embedded-DRAM memory system

Media code (audio, video, image and radar kernels) runs the same short
operation over long arrays of narrow numbers. VIRAM-1 handles such code with a
vector coprocessor beside a simple scalar core. The coprocessor has four
identical 64-bit *lanes*. One vector instruction works on up to 128 elements,
and each lane does several of those elements per cycle. The main memory is
14 MB of DRAM on the same die: eight banks, each with a 256-bit interface.
There is no data cache.

This RTL builds that machine without its scalar core. That means the
coprocessor, the memory crossbar, the eight DRAM banks and a two-channel DMA
engine. Two ideas make it work, and they take most of the space below:

* **Virtual processor width (VPW).** The element width is a run-time register:
  64, 32 or 16 bits. The same 64-bit lane datapath then does 1, 2 or 4
  element operations per cycle. A vector register holds 32, 64 or 128
  elements.
* **The delayed pipeline.** DRAM is slow: 25 ns, which is 5 cycles at
  200 MHz. Every pipeline is therefore built as long as a load. A load
  requests memory at stage 0 and writes its register at stage 14. Arithmetic
  and stores read their operands at that same stage 14. An add that uses a
  loaded value can then issue one cycle after the load and follow it group by
  group, with no stall, even though each load waits a full DRAM access.

## Block map

```
 scalar core (not built) ── vi_* ──┐             sc_req/gnt/rsp (scalar port)
                                   v                         │
  ┌──────────────────────── vcoproc ───────────────────────┐ │
  │ vinstq → issue control (3 sequencers, interlocks)      │ │
  │   ├─ varith_unit 0 ─┐   (4 × varith_lane each,         │ │
  │   ├─ varith_unit 1 ─┤    velem_alu, fxp_madd)          │ │
  │   ├─ vmem_unit ─────┼── vrf  (32 × 8 groups × 256 b)   │ │
  │   ├─ vperm_unit ────┤   vfrf (16 × 128 b flags)        │ │
  │   └─ vflag_unit ────┘                                  │ │
  └─────── 4 load ports, 4 store ports ────────────────────┘ │
                 │                          dma_engine ── sb_* (system bus)
                 v                              │            │
          mem_xbar (10 ports: 4 store, 4 load, DMA, scalar) ◄┘
                 │
     dram_bank 0 … dram_bank 7   (1.75 MB each, 256-bit, 5-cycle latency)
```

`viram1_top` wires all of this together. The scalar core's two connections
are top-level ports: the coprocessor instruction port and one crossbar port.
The DMA engine's system bus is also a set of ports. `viram_pkg` holds the
shared sizes, types and layout functions.

## Elements, groups and VPW

A vector register is 2048 bits, kept as 8 *groups* of 256 bits. Each group is
one 64-bit word in each lane. Let k = 64/VPW be the number of elements in one
lane word. Element `i` is stored at:

* group `g = i / (4k)`
* lane `l = i mod 4`
* sub-word `s = (i mod 4k) / 4` inside that lane's word

Consecutive elements therefore go round-robin over the lanes. A group always
holds 4k consecutive elements, and in memory those elements fill exactly one
256-bit word. For a unit-stride access, one group per cycle is one memory
word per cycle. The memory unit converts between the two orders.

All units handle one group per cycle. An instruction of length VL therefore
takes `ceil(VL / 4k)` cycles in its unit:

| VPW | elements per register | ops per lane per cycle | rate, 2 units at 200 MHz |
|-----|------------------------|------------------------|---------------------------|
| 64  | 32                     | 1                      | 1.6 Gop/s                 |
| 32  | 64                     | 2                      | 3.2 Gop/s                 |
| 16  | 128                    | 4                      | 6.4 Gop/s                 |

`varith_lane` gives each lane three sets of element ALUs: 4×16, 2×32 and
1×64 bits. The current VPW selects which result is used. This trades area for
simplicity: a real design would split the carry chains of one 64-bit adder.

A SETVPW instruction changes VPW, and a SETVL instruction changes VL, which
is clamped to the maximum vector length. Both take effect for the following
instructions at once. Each instruction keeps the VL and VPW it was dispatched
with.

## Issue and the delayed pipeline

This is the part to understand first.

### Stage numbers (counted from issue)

| unit       | stage 0                          | 1..13                     | 14                               | 15      | 16              |
|------------|----------------------------------|---------------------------|----------------------------------|---------|-----------------|
| load       | address generation, DRAM request | DRAM latency (T at 1)     | register write (VW)              |         |                 |
| store      | address generation               | idle                      | read data and mask (VR), DRAM write |      |                 |
| arithmetic | –                                | idle delay stages         | read operands and mask (VR)      | execute | write (VW)      |

### Three sequencers

The three sequencers serve arithmetic unit 0, arithmetic unit 1 and the
memory unit. Each holds one instruction and issues one group per cycle, so
up to three vector instructions are in flight at once. An arithmetic
instruction goes to whichever arithmetic unit is free.

### Issue rules

Order between instructions is kept by two rules, checked every cycle for
every sequencer (`vcoproc`):

1. **Chaining.** An instruction can share a vector register with an older
   instruction that another sequencer is still issuing. It then issues group
   `g` only after the older one has issued group `g`. Every unit reads at
   stage 14 and a load writes at stage 14, so following one group behind is
   enough for read-after-write, write-after-read and write-after-write order.
   A flag-register dependence instead waits for the older instruction to
   finish issuing, because the flag bits of a group move when VPW changes.
2. **Write-time counters.** Each vector register and each flag register has a
   counter: the number of cycles until its last pending write lands. A group
   may issue only if both of these hold:
   * every register it reads is written by its read stage (counter ≤ 14;
     0 for the index register of an indexed load, which is read at stage 0);
   * every register it writes was last written before its own write stage.

   The counters count down every unfrozen cycle.

With these rules, a load followed by a dependent add issues the add's first
group exactly one cycle after the load's (`tb_vcoproc` checks this).

### Stalls

A DRAM bank can refuse a request, either because another port addresses the
same bank or because the bank is still busy with a row change. If any
request of the stage-0 load or the stage-14 store is refused, the memory unit
raises `stall`. The whole coprocessor then freezes for that cycle: every
pipeline register, every sequencer and every counter. Granted parts of the
request are remembered and not sent again.

Vector permutations and flag logic are rare. They wait until all units are
empty and then run alone.

## Memory unit and memory system

* **Unit-stride** loads and stores move a whole group per cycle. They may
  start at any byte address: a misaligned group touches two memory words and
  uses two ports in the same cycle.
* **Strided and indexed** accesses use four address generators: four
  elements per cycle, one per port. At narrower VPW a group therefore takes
  64/VPW micro-ops. Indexed accesses read the index register at stage 0.
  These elements must be aligned to their own size.
* Loads return data into a 16-slot buffer, so arrival order and time do not
  matter before stage 14. This allows up to 64 words to be outstanding.
* Masks apply to stores through byte enables. A masked-off element is never
  written to memory.
* Memory data can be as wide as the elements or narrower: 8, 16 or 32 bits
  (`mw` field). Narrow data are packed densely in memory and sign- or
  zero-extended on load (`munsigned`). On store they are truncated. A
  unit-stride group of 16-bit elements read from 8-bit memory therefore
  covers only 16 bytes.
* A store writes at stage 14, but a later load reads at stage 0. A load that
  must see an earlier store to the same addresses has to wait until the store
  is done, by software waiting for `v_idle`. The unit does not compare
  addresses.

**Crossbar (`mem_xbar`).** Consecutive 256-bit words are interleaved over the
8 banks: bank = word address mod 8. In each cycle, each ready bank grants the
lowest-numbered port addressing it. The port order is vector stores, vector
loads, DMA, then scalar. Responses carry the port number and a tag and are
steered back to their port.

**Bank (`dram_bank`).** Each bank holds 57344 words of 256 bits. A read
always returns its word exactly 5 cycles after acceptance, which is the
latency the delayed pipeline budgets for. Each bank remembers its open row
(32 words in this design):

* An access to the open row does no activation, and the bank accepts one
  every cycle.
* An access to another row activates it (`act` output) and blocks the bank
  for 4 more cycles, because the bank is a single sub-bank with no
  overlapping accesses.

Sequential code therefore runs at full rate. Strided and indexed code may
conflict. The array is written as a plain SystemVerilog memory, where a chip
would use a DRAM macro.

**DMA (`dma_engine`).** Two channels, each programmed with a system-bus word
address, a DRAM byte address, a length in words and a direction. The engine
moves one word at a time and alternates between busy channels.

## Fixed-point multiply-add (`fxp_madd`)

W = saturate(Z + round(X·Y >> shift)), with all four operands at the element
width n:

* X and Y contribute only their upper or lower n/2 bits, so the product fits
  in n bits.
* There are four rounding modes: truncate, nearest with ties up, nearest with
  ties to even, and round to odd.
* The result saturates to the signed n-bit range.

Because inputs and outputs have the same width, no wide accumulators are
needed. Precision is chosen through VPW. Saturating add and subtract (ADDS,
SUBS) use the same saturation.

## Masks, flags and permutations

* There are 16 flag registers of 128 bits. Each instruction selects vf0 or
  vf1 as its mask with one bit (`msel`).
* Masked-off elements are computed but not written. Every lane has the same
  control, and a sparse mask costs as much time as a full one.
* Compares write one flag bit per active element. `vflag_unit` does and,
  or, xor, not and move on whole flag registers.
* Flags reset to all ones, so unmasked code needs no set-up.
* The permutation unit (`vperm_unit`) does three operations:
  * **vhalf:** the upper half of the first VL elements moves down. Repeating
    vhalf plus an add reduces a vector to one value, and every lane stays
    busy.
  * **Left butterfly:** `vd[i] = vs[i+d]` where `(i mod 2d) < d`.
  * **Right butterfly:** `vd[i] = vs[i-d]` where `(i mod 2d) ≥ d`.

  These serve FFTs. Elements that are not moved keep their old value in
  `vd`. The unit reads the whole source register in 8 cycles and writes the
  result in 8.

## The instruction record

The coprocessor takes one `vinstr_t` per handshake on `vi_valid`/`vi_ready`.
Its fields are:

* opcode
* registers `vd`, `vs1` and `vs2` (`vs2` is also the index register)
* flag registers `fd`, `fs1` and `fs2`
* `msel`
* `vs`, which takes the scalar as the second operand
* fixed-point controls `hi`, `rnd` and `shamt`
* address mode, byte base and byte stride
* memory data width `mw` and `munsigned`, which selects zero- instead of
  sign-extension
* a 64-bit scalar, which also carries VL, VPW or the butterfly radix

Both the record and the opcode list (see `viram_pkg`) are this design's own.
The real machine encodes vector instructions as MIPS coprocessor instructions.

## What is not here, and other departures

* The scalar MIPS64 core with its caches and FPU, the JTAG port and the
  SYSAD bus interface are not built. Their connections are top-level ports.
* Floating point is not built. In the real chip, one of the two arithmetic
  units does single precision.
* The two-level TLB is not built, and neither are restartable page faults or
  speculative loads. Addresses are physical.
* Some parts are this design's own choices:
  * the execute depth (one stage)
  * the row size
  * the crossbar port order and interleaving
  * the queue depth (4)
  * the issue rules
  * the permutation implementation (whole-register buffer rather than
    lane-local moves)
  * the DMA programming interface

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends. The behavioural memory
`tb/tb_vec_mem.sv` stands in for the crossbar in the memory-unit and
coprocessor tests, and refuses requests at random to provoke stalls. To
build and run one testbench with Verilator, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/viram_pkg.sv tb/tb_vcoproc.sv --top-module tb_vcoproc
./obj_dir/Vtb_vcoproc
```

What the larger tests cover:

* **`tb_viram1_top`** runs the whole chip at full size: 14 MB of DRAM and
  default parameters. Data come in by DMA. The programs include:
  * vector add with a misaligned store
  * strided and indexed loads
  * the chroma-key loop with masked stores
  * fixed-point multiply-add
  * a vhalf reduction
  * a butterfly stage
  * DMA out on both channels
  * 8-bit memory data loaded at VPW 16, zero- and sign-extended, and
    stored back at 8 and 16 bits

  The test counts each mechanism (stall, chaining, misaligned access, each
  VPW, masked store, permutation, flag operation, row activation and row
  hit, DMA in and out, saturation, 8-bit memory data) and fails if any of
  them never happened.
* **`tb_vcoproc`** runs random programs against an instruction-level model,
  with random memory refusals.
* **`tb_vmem_unit`** checks every access mode against a byte-level memory
  model, including the exact write-back cycle.
