# Defect- and transient-fault-tolerant hybrid CMOS/nanodevice memory

A nanodevice crossbar memory has too many defective cells for spare rows and
columns to repair. It also suffers random transient bit flips. This design
handles both with one mechanism: strong BCH codes whose strength is chosen
**per stored block**.

The cell array is cut into *segments*. Each segment holds one BCH codeword
and is given the weakest code from a group of eight. That code must correct:

- every defective cell inside the segment, and
- the number of transient errors needed to keep the block error rate below
  a target (1e-15).

So clean regions use short, cheap codes and dirty regions use strong ones. A
small fault-free CMOS table records where each segment starts and which code
it uses. Every access reads that table first, then encodes or decodes the
block with one shared, bit-serial BCH encoder and decoder.

A second variant has three levels:

- the array is divided into small *indivisible units*;
- units with too many defects are skipped inside a segment;
- the per-segment map of used and skipped units is itself stored, BCH
  protected, in the nanodevice array;
- only a short pointer to that map stays in CMOS.

Everything is SystemVerilog 2017. Everything is synthesizable except the
behavioural model of the nanodevice array.

## Block map

```
hybrid_mem_top
├── bch_code_table     builds the 8 generator polynomials of the group after reset
├── bch_encoder        serial systematic LFSR encoder, selectable g(x) and r
├── bch_decoder        serial decoder, 1 bit in / 1 bit out per cycle
│   ├── bch_syndrome   2·T_MAX syndromes, Horner form
│   ├── bch_ibm        inversion-free Berlekamp–Massey (binary, t iterations)
│   ├── bch_chien      Chien search + output correction
│   └── bit_fifo       holds received bits until the Chien search reaches them
├── nano_mem_array     behavioural cell array: defects, stuck values, transient flips
├── cmos_config_mem    two-level table: {head/64, code} per logical block
├── seg_alloc2         two-level segment allocation (steps 1–5)
├── ft_mem_ctrl        logical block read/write through the table and the codec
├── unit_classifier    marks indivisible units usable / unusable
├── seg_alloc3         three-level segment planning (steps 1–6)
├── cmos_config_mem    second-level table of the three-level plan
└── ft_mem_ctrl3       stores first-level words; three-level block read/write
```

`bch_pkg` holds the shared GF(2^m) arithmetic. It supports fields up to
GF(2^13), the size of the largest code group.

## The code group

A group is defined over one field GF(2^m). It has eight binary primitive BCH
codes, with correction capability

    t_i = round(i · t_max / 7),   i = 0 … 7.

Code 0 has no parity (t = 0) and is used for a defect-free segment.

| field    | n    | t_max | r_max |
|----------|------|-------|-------|
| GF(2^10) | 1023 | 57    | 510   |
| GF(2^11) | 2047 | 106   | 1023  |
| GF(2^12) | 4095 | 198   | 2038  |
| GF(2^13) | 8191 | 366   | 4095  |

The default build uses GF(2^10), giving t = 0, 8, 16, 24, 33, 41, 49, 57 and
r = 0, 80, 160, 235, 315, 375, 445, 510.

The generator polynomials are not stored. After reset, `bch_code_table`:

1. walks the odd powers α^j;
2. skips any power whose cyclotomic coset was already seen;
3. builds each minimal polynomial with GF multiplications;
4. multiplies it into g(x).

Each code's g(x) and r are snapshotted when the run passes its t. The
computed r_max matches the table above for all four fields.

Primitive polynomials are the usual textbook ones: x^10+x^3+1, x^11+x^2+1,
x^12+x^6+x^4+x+1 and x^13+x^4+x^3+x+1. Words shorter than n are shortened
codes: k information bits plus r parity bits.

## The serial decoder

The decoder takes one received bit per cycle and emits one corrected bit
per cycle. It has three stages that overlap on consecutive words:

- **Syndromes.** All 2·T_MAX syndromes S_j are updated in Horner form as the
  bits arrive. In parallel, β = α^-(n-1) is tracked so the Chien search
  knows where a shortened word starts.
- **Error locator.** The inversion-free Berlekamp–Massey algorithm runs only
  the odd steps, which is enough for binary codes. That is t iterations of
  2 cycles each, where t is the strength of *this* word's code, so weak
  codes finish early.
- **Chien search.**
  - First, T_MAX+1 set-up cycles scale Λ_i by β^i and find deg Λ.
  - Then each cycle tests one position and flips the matching bit from the
    FIFO.
  - A word is reported as uncorrectable (`out_fail` with `out_last`) when the
    number of roots differs from deg Λ.

For an isolated word, the first corrected bit leaves **n + 2t + T_MAX + 3**
cycles after the first received bit. The testbenches check this figure.

## Two-level allocation (`seg_alloc2`)

The allocator runs once at bring-up. It scans the defect map with two
pointers, head and tail:

1. Put the tail l_u cells after the head and start with code 0.
2. Count the defects t_def in the span. Add t_trans, the transient
   allowance for a word of this length.
3. If the current code's t ≥ t_def + t_trans, write {head/64, code} to the
   next CMOS entry. Move the head to the next 64-aligned cell after the
   tail.
4. Otherwise, if a code with enough t exists, switch to the weakest such
   code. Extend the span to l_u + r and go back to step 2.
5. Otherwise, move the head to the next 64-aligned cell past the span's
   first defect, and start again.

Two details of this design:

- **Alignment.** Segment heads are 64-cell aligned. A CMOS entry is
  therefore 12 + 3 = 15 bits instead of 18 + 3.
- **t_trans.** This is the smallest t for which

      Σ_{i>t} C(l,i) p^i (1-p)^(l-i) ≤ E_target.

  It depends only on the word length, so it is computed off chip, once per
  code, and given to the top as the `t_trans` port. The end-to-end
  testbench computes it with real arithmetic. For l = 1022 it gives:

  | p_tf      | t_trans |
  |-----------|---------|
  | 1 per mille | 17    |
  | 5 per mille | 31    |
  | 1 %       | 44      |
  | 5 %       | 115     |

  The last value is above t_max, so no code in the group can protect a
  block at a 5 % fault rate.

## Accessing a block (`ft_mem_ctrl`)

A request has a logical block number. The controller:

1. reads the CMOS entry for that block;
2. forms the head address and the code;
3. on a **write**, streams the l_u user bits and then r parity bits from the
   encoder into consecutive cells starting at the head;
4. on a **read**, streams the l_u + r cells into the decoder and collects
   the l_u corrected information bits.

The response returns the data, the number of corrected bits and a failure
flag. The failure flag is set for an uncorrectable word or a block number
beyond the allocated count; an out-of-range request fails after 1 cycle.

| operation | cycles, request accepted to response |
|-----------|--------------------------------------|
| write     | 4 + l_u + r                          |
| read      | 2n + 2t + T_MAX + 7, where n = l_u + r |

## The three-level scheme (`unit_classifier`, `seg_alloc3`, `ft_mem_ctrl3`)

**Classification.** The array is divided into l_c-cell units. A unit with
more than ⌊l_c/m⌋ defects is unusable. With l_c = 32 and m = 10, that means
4 or more defects. `unit_classifier` walks the defect map once, one cell per
cycle.

**Data segment.** `seg_alloc3` repeats steps 1–5 counting usable cells only:

- unusable units inside a span are stepped over;
- each unit the span touches gets one bit in an s-bit vector (1 = used);
- heads always sit on unit boundaries;
- a span longer than S_MAX = 64 units is relocated, as in step 5.

**First-level word (step 6).** When a data segment is accepted, its
first-level word is {head unit, s, code, vector}. The same two-level
procedure then places this word on consecutive cells right after the data
span. The code is shortened to the word's length. The second-level CMOS
entry is {word head, word code, s}, and s fixes the shortened length.

**Storing the first-level word.** The planner hands each accepted word to
`ft_mem_ctrl3` and waits (`emit_ready`) until the controller is free. The
controller encodes the word and writes it into the array. The bits go in
this order: vec[s-1] … vec[0], then head unit, s and code. This puts the
fixed fields at fixed bit positions when the word is read back, whatever
its length. Each accepted segment also pulses `l1_valid` with the
first-level fields. The counts `num_seg3`, `n_unusable`, `n3_step4` and
`n3_step5` are brought out.

**Access.** A three-level access costs two serial decodes:

1. Read the second-level CMOS entry.
2. Read and decode the first-level word, which is L1_FIX + s + r bits long.
3. Check that its s equals the CMOS s. An uncorrectable word or a mismatch
   fails the access.
4. Stream the data codeword cell by cell from the head unit. At the end of
   each unit, the address jumps to the next unit whose vector bit is 1,
   found by a priority search over the vector.

With n1/t1 for the first-level word and n2/t2/r2 for the data word:

| operation | cycles, request accepted to response               |
|-----------|----------------------------------------------------|
| read      | (2n1 + 2t1 + T_MAX + 6) + (2n2 + 2t2 + T_MAX + 6) |
| write     | (2n1 + 2t1 + T_MAX + 6) + 3 + l_u + r2             |

## The nanodevice array model

`nano_mem_array` is a behavioural model, not a circuit.

- It holds one bit per cell, a defect flag and a stuck value.
- A defective cell ignores writes and reads back its stuck value.
- Reads are synchronous.
- Each read flips with probability `tf_ppm`/10^6, driven by a 32-bit
  xorshift generator, and `tf_count` counts the flips.
- Defects are placed through the `def_*` port. `dm_addr`/`dm_defect` give
  the allocators combinational access to the defect map.

Defective nanowires are assumed to have been removed from the address space
already. Only open-cell defects are modelled.

## Parameters of the top

| parameter | default | meaning |
|-----------|---------|---------|
| M         | 10      | field degree of the code group |
| T_MAX     | 57      | strongest code's t |
| R_MAX     | 510     | strongest code's parity length |
| L_U       | 512     | user bits per block |
| N_CELLS   | 262144  | cells in the array (512 × 512) |
| ALIGN     | 64      | segment head alignment |
| L_C       | 32      | indivisible unit length (three-level) |
| S_MAX     | 64      | longest usable-unit vector (three-level) |

For the other code groups, set M, T_MAX and R_MAX from the table above. For
example, use L_U = 1024 with GF(2^11), and L_U = 2048 with GF(2^12) and
L_C = 64.

## Bring-up and simulation

Pulse `init_start`. The code table, the two-level allocator, the classifier
and the three-level planner then run in that order. The planner stores its
first-level words as it goes. `init_done` rises when all of them have
finished, and after that `req_*` accesses are accepted.

The `mode3` input picks the scheme that serves accesses: 0 for two-level,
1 for three-level. Both schemes use the same cells. So after writing in
two-level mode, run bring-up again before switching to `mode3 = 1`; this
rewrites the first-level words. Change `mode3` only while no access is in
flight.

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=… failures=…`. To build one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bch_pkg.sv tb/tb_gf_pkg.sv rtl/*.sv tb/tb_hybrid_mem_top.sv \
    --top tb_hybrid_mem_top
./obj_dir/Vtb_hybrid_mem_top
```

`tb_hybrid_mem_top` runs the full default size, a 512 × 512 array, in about
a second. It:

- places random defects at a rate of 0.3 %, a dense cluster, and a band of
  unusable units;
- compares the allocation table entry by entry with a software model;
- writes and reads back blocks with transient faults at 1 per mille.

It counts these mechanisms, and each one must occur:

- code upgrades (step 4);
- relocations (step 5);
- several codes in use;
- corrected bits;
- injected faults;
- address rejection;
- three-level segments with skipped units;
- after a mode switch and a second bring-up, three-level writes and reads.
  Each must decode its first-level word correctly, must never write into a
  skipped unit, and must return intact data.

`tb_ft_mem_ctrl3` checks the three-level controller on its own. It uses a
hand-made plan and checks the cycle formulas above.

`tb_workloads` runs the two larger configurations end to end on the full
array: GF(2^11) with 1024-bit blocks at p_tf = 1 per mille, and GF(2^12)
with 2048-bit blocks at 5 per mille. Both use 64-cell units, and the second
sets S_MAX = 128. Each one brings the memory up and checks that the
strongest code reaches the t and r of the table. It then writes and reads
blocks under transient faults, first through the two-level scheme and then,
after a mode switch, through the three-level scheme. It takes about
20 seconds.

## Where this design goes beyond the source description

These points are this design's own choices:

- the eight-way spread of t;
- the primitive polynomials;
- every handshake and the cycle timing;
- the alignment rule used in step 5;
- the first-level word layout and where it is placed;
- S_MAX;
- computing t_trans off chip;
- holding both schemes in one top, selected by `mode3`;
- the s check on the decoded first-level word;
- leaving the second-level CMOS entry uncoded, since CMOS is taken as
  reliable. Two decodes per access are therefore the first-level word and
  the data word.
- Nanowire defects are not modelled. The array is taken to be already
  stripped of defective wires, so only open-cell defects appear.

The source gives the transient fault rates both as 1 and 5 per mille and as
1 and 5 %. This design takes per mille: at 5 % no code of a group could meet
the target, as the table above shows.
