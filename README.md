# Data-dependent defect tolerance for a hybrid CMOS/nanodevice memory

A nanodevice crossbar memory is dense, but many of its cells are defective. The
common defect is an *open* cell: nothing is stored there, and the cell always
reads back as 1. An open cell is harmless when a 1 is stored in it. It causes
an error only when a 0 is stored there. Classic defect tolerance ignores this.
It treats every defective cell as an error and sizes the ECC for all of them.

This design sizes the ECC for **half** of the defects instead. The trick is
conditional bit flipping. Take a stretch of cells with `d` open cells. For any
codeword, either the word or its bit-wise complement puts a 1 on at least half
of those cells. So at most `floor(d/2)` open cells can cause errors. Each
write therefore works like this:

1. Write the codeword.
2. Read it straight back and count the mismatches, `N_err`.
3. If `N_err` is more than the code can spare for defects (`t_def`), write
   the inverted codeword over it.
4. Record a one-bit flip flag for the block in CMOS memory.

Reads undo the flip before decoding. The price is write time: a write is either
write-read or write-read-write. The trade-off parameter `DELTA` adds
correction capability above `floor(d/2)`. A larger `DELTA` makes flips rarer
and lowers the write cost, but leaves less room for user data.

The RTL is SystemVerilog (IEEE 1800-2017). It has been checked with Verilator 5
(lint and simulation) and with the slang front end of Yosys.

## Memory organisation

```
 host ──► ddft_controller ──────────────► cell port ──► nano_array
          │  bch_genpoly  (g(x) for t)        ▲          (usable cells,
          │  bch_encoder  (bit-serial)        │           open = reads 1,
          │  bch_decoder  (syndrome/BM/Chien) │           transient faults)
          ├─ seg_table   (start cell, code)   │
          └─ flip_mem    (1 bit per block)    │
 cfg ───► segment_allocator ──────────────────┘  (owns the port while configuring)
```

* The usable cells of the crossbar form one linear address space of `CELLS`
  cells. The defective nanowires are already left out of that space.
* The cells are divided into consecutive **segments**. Each segment holds one
  codeword, and each codeword stores one `K`-bit logical block.
* Every segment has its own code, taken from a **code group**: shortened
  narrow-sense binary BCH codes over one field GF(2^M) that differ only in
  their correction capability `t`. Code index `i` has `t = T_TR + i`.
  - `T_TR` errors are kept for transient (random read) faults.
  - The remaining `i` errors are the defect budget, so `t_def = i`.
* The parity length of the code with capability `t` is the sum of the sizes of
  the distinct cyclotomic cosets of 1, 3, …, 2t-1 (modulo 2^M-1). The
  codeword length is `l = K + parity`.
  - Default group: `K = 512`, GF(2^10). Lengths run from 682 bits (t = 17)
    to 1022 bits (t = 57).
  - t = 57 is the largest `t` whose shortened code still fits in a 1023-bit
    BCH code.

### Segment allocation (`segment_allocator`)

Allocation runs once, after reset, when `cfg_start` is pulsed. Two pointers,
`head` and `tail`, walk the array. A segment is the half-open range
`[head, tail)`.

1. Start with the weakest code: `i = 0`, `tail = head`.
2. Move `tail` forward by the extra length of code `i` over code `i-1` (the
   whole length for `i = 0`). Probe each new cell by writing 0 and reading it
   back: a cell that reads 1 is open. Count the open cells, `N_def`.
3. If `i >= floor(N_def/2) + DELTA`, the segment is found. Store
   `(head, i)` as the next logical address and set `head = tail`.
4. Otherwise try the next stronger code. If there is none, move `head` to
   just past the first open cell of this attempt, then restart at step 1.

Allocation stops in either case:

* the tail would run off the end of the array, or
* all `NBLK` logical addresses are used.

`nseg` then gives the number of usable blocks. For each block the CMOS side
keeps 24 bits at the default size: a 17-bit start cell and a 6-bit code index
in `seg_table`, plus the flip bit in `flip_mem`. Only the growth from one code
to the next is needed, and it comes from the coset rule. No table of code
lengths is stored.

Step 4 rescans cells, so a dense cluster of open cells can take many
attempts.

| Array | Allocation time (default latencies) | Segments |
|---|---|---|
| Default 128,450 cells, 3% open, plus an 80-cell open cluster | about 4.0 M cycles, 59 head skips | 151 |

### Writing and reading a block (`ddft_controller`)

**Write**

1. Look up `(head, code)` in `seg_table`.
2. Get `g(x)` for `t = T_TR + code`. The controller reuses the previous
   polynomial if `t` is unchanged.
3. Encode the block into the controller's codeword register, one bit per
   cycle.
4. Write the `l` cells.
5. Read the `l` cells back and count the mismatches, `N_err`. This count
   includes any transient faults on the read-back.
6. If `N_err > t_def`, write the inverted codeword, parity included.
7. Store the flip bit in `flip_mem`.

**Read**

1. Look up the segment and the flip bit.
2. Stream the `l` cells, each XOR the flip bit, into the decoder.
3. Return the `K` user bits together with the number of corrected bits and a
   failure flag.

Cycle counts use one cell per access, `WLAT = 20` per write and `RLAT = 1` per
read. The 20:1 ratio matches the write/read access-time estimate this scheme
was evaluated with.

| Operation | Cycles (`g(x)` already known) |
|---|---|
| write, not flipped | `l·(WLAT+RLAT) + l + 9` |
| write, flipped | `l·(2·WLAT+RLAT) + l + 9` |
| read | `l·RLAT + (l + 2t + 5) + 7` |
| new `g(x)` (extra) | ≤ `2t + deg g + 2` (621 for t = 57) |

`resp_nerr` has two meanings:

* after a write: `N_err`, which feeds the flip decision;
* after a read: the number of bits corrected.

`resp_fail` is set in two cases:

* the decoder gave up (more than `t` errors);
* the address is at or above `nseg`.

The statistics counters (`st_*`) count block writes, flipped writes, reads,
and cell writes and reads. They are the inputs to write time and write energy
estimates.

## The shared BCH codec

All codes of the group share one encoder and one decoder. `t` and `l` are
selected per word.

* **`bch_genpoly`** builds `g(x)` at run time. For each odd `j ≤ 2t-1` it first
  checks whether `j` leads its cyclotomic coset. In GF(2^M), doubling an
  exponent rotates its M-bit pattern, so `j` is a leader if no rotation of it
  is smaller. For a leader it multiplies out the minimal polynomial
  `∏(x + α^(j·2^k))`, one factor per cycle. It then multiplies `g(x)` by that
  polynomial over GF(2) in one cycle.
* **`bch_encoder`** is a systematic division LFSR with programmable taps
  (`g`) and a programmable length (`r = deg g`).
  - Bit order: user bits first, `data[K-1]` first; then the parity bits,
    highest degree first.
  - Cell `head + n` holds bit `n` of this order.
* **`bch_decoder`** has four stages:
  1. The word shifts into a buffer while `bch_syndrome` computes
     S_1…S_2TMAX by Horner's rule, with constant multipliers.
  2. `bch_bm` (inversionless Berlekamp–Massey) finds the error locator in
     `2t` cycles. A shifting window of syndromes avoids wide multiplexers.
  3. `bch_chien` tests positions 0…l-1, one per cycle. As it goes, the buffer
     rotates and the bits found in error are flipped. After `l` steps the
     user bits sit at a fixed place whatever the code length.
  4. Decoding fails if the locator is longer than `t` or has a different
     number of roots in range. A failed word is returned uncorrected.

The field uses the polynomial basis. The primitive polynomials are in
`ddft_pkg::prim_poly`; the default GF(2^10) uses x^10+x^3+1. Group sizes are
derived from parameters at elaboration (`bch_rlen`, `coset_incr`, `gf_alpha`).

## The array model (`nano_array`)

This is a behavioural model, not synthesizable logic.

* Each cell is open, independently, with probability `P_BIT_PPM`/10^6. An
  open cell always reads 1.
* Each read is inverted with probability `P_TF_PPM`/10^6 (transient fault).
  The draw comes from an xorshift generator.
* The defect map is drawn at time zero from `SEED`. A testbench may also set
  `open_def[i]` directly.
* Port protocol: hold `op` (`MEM_WRITE`/`MEM_READ`) with `addr` and `wdata`.
  The access completes in the cycle where the combinational `ack` is high
  (`rdata` is valid then). A new access may start in the next cycle.

## Files

| File | Contents |
|---|---|
| `rtl/ddft_pkg.sv` | defaults, `mem_op_e`, GF(2^m) and coset helper functions |
| `rtl/ddft_top.sv` | the complete memory |
| `rtl/ddft_controller.sv` | write/read procedure with conditional flipping |
| `rtl/segment_allocator.sv` | segment allocation |
| `rtl/seg_table.sv`, `rtl/flip_mem.sv` | CMOS configuration memories |
| `rtl/bch_genpoly.sv`, `rtl/bch_encoder.sv` | encoding side of the codec |
| `rtl/bch_decoder.sv`, `rtl/bch_syndrome.sv`, `rtl/bch_bm.sv`, `rtl/bch_chien.sv` | decoding side |
| `rtl/nano_array.sv` | behavioural array model |
| `tb/tb_*.sv` | self-checking testbenches; `tb_bch_ref_pkg.sv` is the reference BCH arithmetic |

## Parameters of `ddft_top`

| Parameter | Default | Meaning |
|---|---|---|
| `M`, `K`, `TMAX` | 10, 512, 57 | field, user bits per block, strongest code |
| `T_TR` | 17 | errors kept for transient faults (see below) |
| `DELTA` | 6 | defect margin of the allocation rule |
| `CELLS` | 128450 | usable cells: (1-0.3)^2 of a 512×512 crossbar at 30% nanowire defects |
| `NBLK` | 256 | logical block addresses |
| `P_BIT_PPM`, `P_TF_PPM` | 30000, 1000 | open-defect probability, transient fault rate (model) |
| `WLAT`, `RLAT` | 20, 1 | cycles per cell write / read (model) |

`T_TR` is the smallest `t_tr` whose binomial tail, `P(more than t_tr faults in
l bits)`, stays at or below a block error rate of 1e-15. One value, taken at
the longest word, is used for every code of a group.

| Configuration | `M`, `K`, `TMAX` | `T_TR` at p_tf = 1e-3 | at 5e-3 |
|---|---|---|---|
| Group I (default) | 10, 512, 57 | 17 | 31 |
| Group II | 11, 1024, 106 | 21 | 44 |
| Group III | 12, 2048, 198 | 29 | 65 |

## Simulating

Each testbench is a top module with no ports. It prints
`TB_RESULT checks=N failures=F`, and a watchdog ends it if it hangs. With
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ddft_pkg.sv tb/tb_bch_ref_pkg.sv tb/tb_ddft_top.sv --top-module tb_ddft_top
./obj_dir/Vtb_ddft_top
```

Swap in the name of any other testbench. Every testbench checks its outputs
against values worked out independently: the reference package builds `g(x)`
from all the cyclotomic exponents and encodes by long division.

* **`tb_ddft_top`**: end to end at the default size, about 30 s.
  - Allocates the full array, with a planted 80-cell open cluster.
  - Checks every segment's code against the true defect map.
  - Writes all 151 blocks, some with all-zero data to force flips, and reads
    them all back.
  - Requires each mechanism to occur at least once:
    - several codes in use;
    - head skips;
    - plain writes and flipped writes;
    - corrected reads;
    - reads of flipped blocks;
    - polynomial reuse and rebuild;
    - an out-of-range address rejected.
* **`tb_ddft_groups`**: Groups II and III on reduced arrays (30,000 and 40,000
  cells), with allocation, flipped and plain writes, and read-back.
* **`tb_ddft_controller`**:
  - exact `N_err` and flip decision for planted defects;
  - exact write and read cycle counts;
  - corrected-bit counts;
  - the unmapped-address failure.
* **`tb_segment_allocator`**: the exact segment list against a software run
  of the procedure, the head skip, and the cycle count.
* **`tb_bch_*`**: the codec units at full Group I size (t up to 57),
  including the latencies given above.
* **`tb_nano_array`**, **`tb_seg_table`**, **`tb_flip_mem`**: the model and
  the memories.

## Where this RTL goes beyond, or departs from, the scheme

* **Nanowire exclusion is not implemented.** Finding defective nanowires and
  remapping rows and columns are left out. The array model already presents
  only the usable cells.
* **Defect detection** is a write-0/read-back probe per cell. This is this
  design's choice. A transient fault during a probe can hide an open cell or
  report a good one as open; the `DELTA` margin absorbs the occasional miss.
* **Pointer convention.** The procedure can also be read with an inclusive
  tail pointer (`head = tail + 1`). That reading would give segments one cell
  longer than their codewords. This design uses `[head, tail)`, so a segment
  is exactly one codeword long. In step 4 the new head is the cell after the
  first open one, and the tail restarts there.
* **Code group membership** is every `t` from `T_TR` to `TMAX`. The group's
  field and `t_max` are as specified. The choice of `T_TR` as one
  conservative value for all lengths is this design's.
* **`N_err`** is counted by comparing the read-back with the codeword kept in
  the controller, not by the decoder. The flipped word is not read back again.
* **Interfaces** are this design's choices: one cell per access, bit-serial
  codec, registered CMOS memories, `NBLK = 256`, and a default open-defect
  rate of 3% (the scheme is evaluated over a range of defect rates).
* **Synthesis**: every module except `nano_array` is synthesizable. The
  codec is bit-serial. Its largest parts are the 2·TMAX syndrome registers
  and the roughly 3·(TMAX+1) GF multipliers of the Berlekamp–Massey unit.
  `ddft_controller` holds an `LMAX`-bit codeword register and `bch_decoder`
  an `LMAX`-bit word buffer.
