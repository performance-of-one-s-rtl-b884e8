# One's complement data cache

A conventional cache has 2^s sets and places memory line A in set A mod 2^s,
i.e. in the s address bits just above the line offset. Data walked with a stride
that shares a factor of two with 2^s (a row of a column-major matrix whose column
length is an even number of lines, for example) then piles into a few sets and
evicts itself, however large the cache and however many ways it has.

This design gives the cache **2^s − 1 sets**, an odd number, and places line A in
set **A mod (2^s − 1)**. A power-of-two stride is now coprime with the set count
and spreads over all sets. The modulus is cheap because 2^s ≡ 1 (mod 2^s − 1):
the residue of a number is the sum of its s-bit pieces in **one's complement
arithmetic**, which is an ordinary s-bit add with the carry out fed back into
the least significant bit. A few such s-bit adders next to the ALU produce the
cache index from the base register and the displacement of a load or store.
They work at the same time as the ALU forms the memory address, so the lookup
starts no later than in a conventional cache.

The RTL is a small MIPS R2000/R3000-style load/store datapath around such a
cache. Its default size is 2047 sets × 1 way × 16-byte lines, a 32 KB-class
direct-mapped data cache.

## Files

| file | contents |
|---|---|
| `rtl/oc_pkg.sv` | default geometry, MIPS opcodes, ALU and write-back select enums |
| `rtl/oc_adder.sv` | s-bit one's complement (end-around-carry) adder |
| `rtl/oc_fold.sv` | residue of a W-bit value mod 2^S − 1 (sum of S-bit subfields) |
| `rtl/oc_index_gen.sv` | cache address {tag, index, offset} from base + displacement |
| `rtl/oc_cache.sv` | the cache: 2^S − 1 sets, tag/data memories, matching, LRU, refill |
| `rtl/oc_regfile.sv` | 32 × 32 register file |
| `rtl/oc_alu.sv` | address adder with carry out (plus pass-through for LUI) |
| `rtl/oc_cpu_top.sv` | top: instruction register, register file, operand MUX, ALU, index generator, address registers, cache, write-back MUX |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_oc_row_walk` |
| `tb/oc_mem_model.sv`, `tb/oc_row_walk_run.sv` | behavioural main memory; one row-walk run |

## Computing the index

Let l = log2(line bytes) and the effective address be EA = base + sext(disp).
The cache wants I = (EA >> l) mod (2^S − 1). `oc_index_gen` forms it without
waiting for EA:

1. `rb` = fold(base >> l): the one's complement sum of the S-bit pieces of the
   base register's line-address bits.
2. `rd` = fold(sext(disp) >> l): the same for the sign-extended displacement,
   taken as a 32-bit pattern.
3. `rb + rd`, plus the carry out of the low l bits (base + disp)[l−1:0]. This
   carry is the only place where the offset bits reach the line address.
4. The 32-bit ALU add may wrap past 2^32. It always does for a negative
   displacement, whose two's complement pattern is close to 2^32. When it
   wraps, the line address loses 2^(32−l), which is 2^((32−l) mod S) modulo
   2^S − 1. The index with this constant subtracted is formed in parallel,
   and the ALU carry out picks between the two indices.

The result equals (EA >> l) mod (2^S − 1) for every base and displacement.
`tb_oc_index_gen` checks this against integer arithmetic for 40,000 random
cases, positive and negative wraps included.

**Two zeros.** In one's complement, all-zeros (+0) and all-ones (−0) both mean 0.
The index generator may output either. The cache's set decoder maps both to
physical set 0, and sets 1 … 2^S − 2 are used directly.

**Tag.** The tag is EA's own tag field (the bits above offset and index), as in a
conventional cache, plus **one extra bit**: whether EA's S index bits are all
ones. Without it two lines could not be told apart: one whose low S line-address
bits are 0, and one whose bits are 2^S − 1 with the same upper bits. Both fall
into the same set (2^S − 1 ≡ 0) with the same tag. With the extra bit,
{tag, set} identifies a line uniquely. `tb_oc_cache` and `tb_oc_cpu_top` access
such line pairs on purpose.

The fold is a chain of `oc_adder`s: ceil(28/11) = 3 pieces (2 adders) per
operand for the default. The two folds and the final add are the three s-bit
adders of the block diagram. The offset carry, the wrap correction and the extra
tag bit are this implementation's additions. Each is needed for an exact mapping
on a 32-bit machine.

## The cache (`oc_cache`)

* Geometry: `S`, `WAYS`, `LINE_BYTES`. There are NSETS = 2^S − 1 sets, so the
  default holds 2047 × 16 = 32,752 bytes, one line short of 32 KB.
* Inputs: the cache address (tag, index, offset) and the memory address, kept
  apart. The cache address is used for lookup and placement. The memory address
  is used only toward main memory, to fetch a line on a miss and to write a
  store through. No memory address ever has to be rebuilt from a set number.
* Lookup: tag compare in every way of the set, as in a set-associative cache.
* Replacement: an invalid way first, otherwise LRU (an age rank per way per set).
* Stores: write-through, no write allocate. A store hit also updates the line.
* Reset: synchronous, active low. It clears the valid bits and LRU ranks. The
  tag and data arrays are not reset.

Timing (one request at a time):

| access | resp_valid |
|---|---|
| load hit | 1 clock after the request is accepted |
| load miss | 1 clock after the memory returns the line |
| store | 1 clock after the memory acknowledges the write |

Memory channel: `mem_req_valid/ready` carry an address, a write enable and one
data word. `mem_resp_valid` then pulses once, with the whole line for a read or
as the acknowledgement of a write. Refill addresses are line-aligned.

Assertions check three things: a memory request is held stable until accepted,
no response arrives unasked, and the set number stays below 2^S − 1.

## The datapath (`oc_cpu_top`)

The datapath executes one instruction at a time. It steps through IF, RD, ALU,
MEM and WB as states of a sequencer, not as a pipeline.

* **IF** latches `instr` into the instruction register (`instr_valid/instr_ready`).
* **RD** reads the base register and the second operand.
* **ALU**: the ALU forms EA (through an operand MUX: register, sign-extended
  immediate or LUI immediate). At the same time the index generator forms the
  cache address. EA goes into the memory address register, {tag, index, offset}
  into the cache address register.
* **MEM** sends both to the cache and waits.
* **WB**: a three-input MUX writes the register file from the ALU result, from
  the cache word on a hit, or from the word on the main-memory bus on a miss.
  `retire_valid` pulses, with `retire_hit`, `retire_index` and `retire_addr`.

Supported instructions: LW, SW, ADDIU, LUI and ADDU. Any other instruction
retires without effect. Accesses are whole words, and alignment is not checked.

Latency: an ALU instruction retires 2 clocks after acceptance and a load hit 5.
A miss or a store adds the memory time. A third register-file read port
(`dbg_reg_addr/dbg_reg_data`) exposes the registers. The main memory channel is
the cache's, brought out as top-level ports.

## What is not here

* **The rest of the processor**: instruction fetch, the pipeline with its
  hazards, the full ALU, multiply/divide, exceptions, the instruction cache.
  Instructions enter through a port.
* **Main memory**: it is outside the design. `tb/oc_mem_model.sv` is a
  behavioural stand-in with a fixed latency.
* **Address translation**: not built. The cache is indexed and tagged by
  whatever address it is given, which suits a virtually addressed cache. For a
  physically addressed cache, put the index generator after the TLB, at the
  cost of a longer cache access.
* **Second level**: a one's complement second-level cache with a prime set
  count, for inclusion, is not built. `oc_cache` with a larger `S` gives
  2^S − 1 sets, which is prime only for some S (e.g. 2, 3, 5, 7, 13).
* **Performance study**: the miss-ratio study on SPEC92 traces is not
  reproduced, because those traces are not available here. Two small workloads
  are simulated instead (next section).

## Testbenches and workloads

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_oc_adder` | exhaustive S = 5, random S = 11, against (a + b) mod (2^S − 1) |
| `tb_oc_fold` | random and edge values, two geometries |
| `tb_oc_index_gen` | index, tag and offset for random base/displacement in two geometries; wraps, offset carries, all-ones index fields |
| `tb_oc_cache` | 2-way 15-set and direct-mapped 31-set caches; random loads/stores over colliding lines, against an LRU model with full line addresses and a shadow memory; −0 indices, evictions, store hit/miss, hit latency |
| `tb_oc_regfile`, `tb_oc_alu` | against simple models |
| `tb_oc_cpu_top` | the top **at its default parameters**, end to end (see below) |
| `tb_oc_row_walk` | the eight-line matrix-row example, direct-mapped and 2-way |

`tb_oc_cpu_top` checks, for every instruction, the register value, the memory
address, the index (mod 2047), hit or miss against a reference cache, the load
data and the latencies. It contains a strided walk: 16 lines 2^11 lines
(32 KB) apart, walked twice. In a 2048-set cache all 16 would share one set and
miss every time. Here they occupy 16 sets, and all 16 accesses of the second
pass hit.

`tb_oc_row_walk` uses an eight-line cache and a row whose elements lie 2 lines
apart. A conventional cache with 8 sets (or 4 sets of 2 ways) keeps at most four
of them. The one's complement cache has 7 sets (S = 3) or 3 × 2 ways (S = 2) and
holds the whole row of 7 or 6 elements. Over 4 passes it misses 7 and 6 times
(compulsory misses only), against 25 and 24 for the conventional reference.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/oc_pkg.sv tb/tb_oc_cpu_top.sv \
          --top-module tb_oc_cpu_top -Mdir obj && ./obj/Vtb_oc_cpu_top
```

Files are found by module name through `-Irtl -Itb`. The package must be given
first.

## Changing the configuration

`S`, `WAYS` and `LINE_BYTES` are parameters of `oc_cpu_top`, `oc_cache` and
`oc_index_gen`, with defaults in `oc_pkg`. Examples:

* 4 KB direct-mapped, 16-byte lines: S = 8, 255 sets.
* 32 KB 2-way, 64-byte lines: S = 8, WAYS = 2, LINE_BYTES = 64.
* 64 KB, 16-byte lines: S = 12.

Requirements: LINE_BYTES is a power of two of at least 4, WAYS is a power of two,
and S is smaller than 32 − log2(LINE_BYTES).

The data and tag arrays have no reset and are written as plain arrays, so a
synthesis tool can map them to RAM. The valid bits and LRU ranks are flip-flops.
