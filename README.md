# LAD-ECC: a register file ECC that protects what matters, once

A GPU streaming multiprocessor keeps tens of thousands of 32-bit registers in a large
banked register file. Protecting every register with a full SEC-DED code costs energy on
every write (encoding), on every read (checking) and all the time (leakage of the code
storage). This design cuts that cost in two ways:

* **Approximation awareness (AP-ECC).** In floating-point data an upset in the low
  mantissa bits barely changes the result. Each thread's register therefore carries a
  6-bit SEC-DED code over bits 31..15 only: sign, exponent and the upper 8 mantissa bits.
  Errors in bits 14..0 are tolerated. They are neither reported nor corrected.
* **Duplication awareness (DA-ECC).** Often all 32 threads of a warp hold the same value
  in a register, for example a block dimension or a loop bound. The compiler marks such
  operands in the instruction. For a duplicate warp-register one 7-bit SEC-DED code over
  the whole 32-bit register of the first active thread replaces the 32 per-thread codes,
  and the per-thread code fields are power gated. A duplicate read checks only that
  thread and gives its corrected value to every thread. An upset in any other thread's
  copy therefore never reaches the program.

Each ECC table entry also has a parity bit. If the stored code itself is hit, verification
is skipped instead of "correcting" good data with a bad code. The next write of that
warp-register repairs the entry.

The RTL is a complete SM register-file slice in synthesizable SystemVerilog. It has the
banks, bank arbitration, the interconnect, one operand collector, and the LAD-ECC write
and read logic with the ECC table.

## Register file organisation

| item | value |
|---|---|
| capacity | 128KB per SM |
| banks | 32, each 4KB = 256 entries x 128 bits, 1 read + 1 write port |
| bank entry | four 32-bit registers (four consecutive threads) |
| warp-register | one register of all 32 threads = the same entry of 8 consecutive banks |
| bank groups | 4 (banks 0-7, 8-15, 16-23, 24-31) |
| warp-registers | 1024 (10-bit address) |

Warp-register `a` lives in bank group `a[1:0]`, entry `a[9:2]`. Thread `t` of it is in
bank `8*a[1:0] + t/4`, register slot `t%4`. Consecutive warp-register numbers therefore
fall into different groups. Each group can do one warp-register read and, independently,
accept a write in every cycle. A read of the warp-register being written in the same
cycle returns the old value, and so does its ECC entry, so data and code always match.

## The two codes

Both codes are Hamming SEC-DED codes built by the same generic logic (`ecc_gen`,
`ecc_chk`):

| code | protects | data bits | Hamming bits | + overall parity | width |
|---|---|---|---|---|---|
| AP-ECC (per thread, divergent) | bits 31..15 | 17 | 5 | 1 | 6 |
| full (duplicate path) | bits 31..0 | 32 | 6 | 1 | 7 |

Data bit k takes the k-th code position that is not a power of two. Hamming bit i is the
XOR of the data bits whose position has bit i set, which is a small XOR tree. The top bit
is the parity of everything else. When checking:

| syndrome | overall parity | result |
|---|---|---|
| 0 | ok | no error |
| points to a position | wrong | single error: the data bit there is flipped back (`ce`) |
| beyond the last position | wrong | uncorrectable (`ue`) |
| non-zero | ok | double error, uncorrectable (`ue`) |

Bits below the protected range pass through untouched.

In 2-input XOR gates, the 6-bit generator needs 59 (38 for the Hamming bits, 21 for the
overall parity) and the 7-bit one 121 (84 and 37). The 6-bit generator is therefore about
half the logic per register value, and so is the switching energy spent per encoding.

## Writing a warp-register (`lad_ecc_wb`, `ecc_table`)

A writeback carries the warp-register number, the active-thread mask, the data and the
destination's duplication bit. The duplication bit drives a demultiplexer (DMUX1):

* **divergent** (`wb_dup = 0`): 32 AP-ECC generators encode each active thread's
  register. The ECC table replaces those threads' 6-bit fields and keeps the others. Its
  parity bit is recomputed over the merged entry.
* **duplicate** (`wb_dup = 1`): one full generator encodes the first active thread
  (lowest set mask bit). The ECC table stores the 7-bit code and its parity in the
  duplication part of the entry. It switches the entry to duplicate mode, which gates the
  32 per-thread fields.

The generators on the unused path see all-zero inputs, so they do not toggle. The banks
are written in the same cycle, so the ECC adds no cycle to a write.

ECC table entry, one per warp-register:

```
traditional part : parity | ecc[31] | ... | ecc[0]    (1 + 32 x 6 = 193 bits)
duplication part : parity | ecc                        (1 + 7 = 8 bits)
mode bit         : 1 = duplicate (traditional part gated), 0 = divergent (duplication part gated)
```

Only the live part is powered. A gated part is modelled as having lost its contents: it
reads as zero until it is written again. Against a per-thread 7-bit code for every
register, the per-thread storage shrinks by one bit per register, 32K bits = 4KB per SM.

## Reading a warp-register (`lad_ecc_rd`)

The banks and the ECC table are read in the same cycle. One cycle later the read logic of
that bank group receives the raw warp-register, both ECC parts and the operand's
duplication bit. It then works in the same cycle, as combinational logic, so checking adds
no cycle to a read:

1. DMUX2 picks the path from the operand's duplication bit in the instruction.
2. The parity of that path's ECC part is checked. If it fails, the code is untrusted: the
   raw data go out unchecked and `ecc_invalid` is set. On the duplicate path the first
   active thread's raw value still goes to every thread.
3. **Divergent:** 32 AP-ECC checkers, one per active thread, correct or flag bits
   31..15. Inactive threads pass unchecked.
4. **Duplicate:** one full checker verifies the first active thread. Its corrected value
   is driven to all 32 threads.

What a program sees after one upset in register storage:

| where | divergent warp-register | duplicate warp-register |
|---|---|---|
| bits 31..15 of a thread | corrected, `ce` for that thread | first thread: corrected, `ce`; other threads: not visible |
| bits 14..0 of a thread | delivered as stored, nothing reported | first thread: corrected; other threads: not visible |
| one bit of the ECC entry | raw data, `ecc_invalid` | first thread's raw value, `ecc_invalid` |

Two upsets in the protected bits of one code word are reported as `ue` and are not
corrected. The register file is never written back with corrected data, so the upset stays
in storage until the next write.

## Duplication information

The compiler finds divergent values by reachability from thread-dependent sources such as
the thread index. It appends one bit per operand to every instruction: 1 for duplicate,
0 for divergent. The highest bit is the destination; below it come the sources, first
source first. With `nsrc` sources, source `i` is bit `nsrc-1-i` of `dup_info` and the
destination is bit `nsrc`. Example:

```
add.u32 %r4, %r3, %r2     bits 0 0 1   ->  r4 divergent, r3 divergent, r2 duplicate
                          dup_info = 3'b001, nsrc = 2
```

The hardware trusts these bits. The compiler must mark a warp-register duplicate only if
every thread that reads it holds the value that was encoded. A divergent write with a
partial thread mask into a warp-register that is still in duplicate mode leaves the
unwritten threads without a valid per-thread code, because those fields were gated. The
marking is assumed never to produce this case.

## Operand collection and bank conflicts (`operand_collector`, `bank_arbiter`, `rf_crossbar`)

One collector unit takes one instruction at a time (`in_valid`/`in_ready`) with up to 4
source warp-registers. Every cycle the bank arbiter grants at most one pending read per
bank group, with a fixed priority of lowest operand first. Two sources in the same group
are a bank conflict and are served in successive cycles. The verified result comes back
one cycle after the read and is routed to its slot by the crossbar. When all sources are
present, `out_valid` rises and stays up until `out_ready`.

Timing, counted in clock edges after the edge that accepts the instruction: with no
conflict the operands are presented after 2 edges. Each extra read in the busiest bank
group adds one edge. An instruction without sources is presented at once. `bank_conflict`
is high in every cycle in which a read lost arbitration.

## Top level: `lad_ecc_rf`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (mode bits, collector state) |
| `in_valid`, `in_ready`, `in_instr` | in/out/in | `instr_t` | instruction: warp id, `nsrc`, 4 source warp-registers, `dup_info`, active mask |
| `out_valid`, `out_ready` | out/in | 1 | dispatch handshake |
| `out_warp_id`, `out_nsrc`, `out_mask`, `out_dst_dup` | out | | instruction fields; the destination's duplication bit, to be returned with the writeback |
| `out_opnd[4]` | out | `rd_result_t` | per source: 32 x 32-bit data, `dup`, `ecc_invalid`, per-thread `ce`, `ue` |
| `wb_valid`, `wb_wreg`, `wb_mask`, `wb_dup`, `wb_data` | in | 1, 10, 32, 1, 32x32 | writeback, one per cycle, effective at the clock edge |
| `ecc_gen_count` | out | 6 | register values encoded this cycle |
| `ecc_chk_count` | out | 8 | register values verified this cycle |
| `bank_conflict` | out | 1 | a read lost bank arbitration this cycle |
| `dup_entries` | out | 11 | warp-registers in duplicate mode (per-thread ECC gated) |

The warp scheduler, the issue stage and the SIMD execution units are outside this RTL.
Instructions enter and leave through the ports, and physical warp-register numbers are
given directly. The counters are there so that the ECC work behind the energy savings can
be measured: encodings and verifications against the 32 per warp-register access that a
per-thread scheme needs.

Module tree:

```
lad_ecc_rf
├── lad_ecc_wb            DMUX1, 32 x ecc_gen (AP-ECC), 1 x ecc_gen (full)
├── register_file         32 x rf_bank
├── ecc_table
├── operand_collector     bank_arbiter, rf_crossbar
└── 4 x lad_ecc_rd        DMUX2, 32 x ecc_chk (AP-ECC), 1 x ecc_chk (full)
lad_ecc_pkg               sizes, types, code helpers, address mapping
```

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. For
example, with plain Verilator from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lad_ecc_pkg.sv tb/ecc_ref_pkg.sv tb/lad_ecc_rf_tb.sv --top-module lad_ecc_rf_tb
./obj_dir/Vlad_ecc_rf_tb
```

| testbench | what it shows |
|---|---|
| `ecc_gen_tb`, `ecc_chk_tb` | both codes against a textbook reference (`tb/ecc_ref_pkg.sv`): encoding, correction of every single error, detection of double errors, blindness to bits 14..0 |
| `rf_bank_tb`, `register_file_tb` | storage, write masks, read latency, read-before-write, thread-to-bank layout |
| `ecc_table_tb` | both entry parts, gating, merge of partial writes, parity, `dup_entries` |
| `lad_ecc_wb_tb`, `lad_ecc_rd_tb` | both paths of the write and read sides, including injected errors and corrupt entries |
| `bank_arbiter_tb`, `rf_crossbar_tb`, `operand_collector_tb` | arbitration (exhaustive), routing, exact dispatch latency and conflict count; the collector also carries assertions (held dispatch, at most one read per bank group) |
| `lad_ecc_rf_tb` | full size, end to end: random traffic with concurrent writebacks, then injected upsets of every kind; each mechanism must occur |
| `soft_error_campaign_tb` | 1000 single-bit upsets at every bit offset (about 960,000 checks, a few seconds), once with `PROT_LSB = 15` and once with `PROT_LSB = 0`; prints per bit how many were corrected, hidden by the broadcast or reached the program (only bits 14..0 of divergent registers with AP-ECC) |
| `dup_traffic_tb` | random traffic in which 44.20% of writes and 40.96% of operand reads are duplicate (typical shares for GPU programs); checks every operand and that the encodings and verifications counted equal those expected (it measures about 42% and 40% fewer than one per thread) |
| `uniform_kernel_tb` | a five-instruction fragment computing `tid + ctaid*ntid`; checks the result and that it needs 67 encodings and 101 verifications instead of 160 and 288 |

All testbenches run at the default sizes within seconds. Sizes are set by the constants
in `lad_ecc_pkg`. The top's parameter `PROT_LSB` (default `AP_LSB` = 15) moves the start of
the per-thread protected range, and the code and table widths follow from it.

## Limits and departures

* The top's parameter `PROT_LSB` (default 15) is the lowest bit the per-thread code
  covers. 15 is AP-ECC. 0 gives 7-bit per-thread fields over all 32 bits, for a program in
  which any corrupted bit is harmful (a crash or hang rather than a slightly wrong
  number). `soft_error_campaign_tb` runs both settings; in the second no divergent upset
  reaches the program. On the duplicate path all 32 bits are always protected.
* The 6th AP-ECC bit is an overall parity bit, which makes the 6-bit code SEC-DED like the
  7-bit one. The bit ordering in the code word is this design's own.
* The duplicate path keeps a full-width 7-bit code, and AP-ECC is used for the per-thread
  codes only.
* Power gating is modelled logically: the gated part loses its contents. No power
  switches are modelled.
* Sizing the ECC logic's gates against upsets is a circuit technique and is not
  represented.
* Corrected data are not written back to the banks.
* Bank-group interleaving of addresses, the fixed-priority arbiter, a single operand
  collector, the handshakes and the statistics outputs are this design's choices.
