# FlashLook: hash-based route lookup at 100 Gbps

A router has to find, for every packet, the longest prefix in its forwarding
table that matches the destination address. At 100 Gbps with minimum-size
packets that is one IPv4 lookup every 4 ns (250 M lookups/s) and one IPv6
lookup every 6 ns, against tables of millions of prefixes: far too large for
on-chip memory, and far too fast for a single DRAM.

FlashLook answers every lookup with **one DRAM read per prefix length set**,
all issued in parallel, plus a few on-chip memories:

* Prefixes are **expanded** to a handful of fixed lengths, so each length set
  is an exact-match table, and exact match can be done by hashing.
* Each length set is a **hash table of small bins** in DRAM. A bin is read
  in a single burst and holds a few compressed entries.
* **HashTune** picks, per small group of bins, the hash function (out of a
  pool of 16) that spreads that group's entries best, so very few bins
  overflow. The few entries that still do not fit go to an on-chip
  **black sheep memory (BSM)**.
* The tables are **copied** into many DRAM banks. A bank can only be opened
  once every 60 ns, so the scheduler sends each lookup to copies that are
  currently idle. With 9 DRAM chips the IPv4 and IPv6 tables both run at
  line rate, at the same time.

This repository holds the synthesizable FPGA side of that: the two lookup
engines, HashTune, bin matching, the BSMs, the IPv4 direct table, and the
DRAM bank scheduler with its update write path. Each comes with a
self-checking testbench.

## Length sets and where they live

| Prefix lengths | Expanded to | Table            | Memory              |
|----------------|-------------|------------------|---------------------|
| IPv4 /0-/18    | /18         | direct table     | on-chip, 2^18 x 8 bit |
| IPv4 /19-/24   | /24         | IPv4/24          | DRAM, 96 Mbit per copy |
| IPv4 /25-/32   | /32         | IPv4/32          | DRAM, 32 Mbit per copy |
| IPv6 /25-/32   | /32         | IPv6/32          | DRAM, 32 Mbit per copy |
| IPv6 /33-/40   | /40         | IPv6/40          | DRAM, 32 Mbit per copy |
| IPv6 /41-/48   | /48         | IPv6/48          | DRAM, 96 Mbit per copy |
| IPv6 /4-/24, /49-/64 | -     | on-chip hashes   | not in this RTL; reached through the `v6_oc_*` ports |

Expansion copies a prefix into all its longer descendants of the target
length; a longer original prefix overwrites what a shorter one expanded into.
The lookup reads all tables of its family and keeps the result of the longest
table that matched. For IPv6 only the upper 64 bits (the network part) are
looked at.

## Keys: implicit, verify, index and aggregation bits

The key of a table is the leading *L* bits of the address. It is split, most
significant bit first, into

    [ implicit | verify | index | aggregation ]

* **index** bits select a *bin group* directly. They are never stored.
* **verify** bits are hashed to pick a bin within the group, and are stored
  in the bin so the entries of a group can be told apart.
* the last bit, the **aggregation** bit, picks one of two next hops: two
  sibling prefixes that differ only in their last bit share one entry
  `{verify, NH0, NH1}`. NH0 serves the sibling ending in 0, NH1 the one
  ending in 1. This roughly halves the number of entries.
* IPv6 keys drop the three leading bits `001` (global unicast space), so an
  address outside 2000::/3 must be handled elsewhere.

| Table   | verify | index (address bits, MSB = 1) | aggr. | entry bits | bin bits | entries per bin *c* | bins per group |
|---------|-------:|-------------------------------|:-----:|-----------:|---------:|--------------------:|---------------:|
| IPv4/24 | 5  | 18 (bits 6-23)  | yes | 21 | 64  | 3 | 6  |
| IPv4/32 | 15 | 16 (bits 16-31) | yes | 31 | 128 | 4 | 4  |
| IPv6/32 | 13 | 15 (bits 17-31) | yes | 29 | 64  | 2 | 16 |
| IPv6/40 | 21 | 16 (bits 25-40) | no  | 29 | 64  | 2 | 8  |
| IPv6/48 | 26 | 18 (bits 30-47) | yes | 42 | 128 | 3 | 3  |

Bins per group is the table size divided by the bin size and by the number
of index values (e.g. IPv4/24: 96 Mbit / 64 bit / 2^18 = 6). All of these
numbers come from `rtl/flashlook_pkg.sv`, and every other module derives its
widths from there.

Next hop ID 0 means "no route". An all-zero entry is therefore empty, and no
valid bit is needed.

## Bins and the black sheep memory

A bin is read in one DRAM burst: a 4-burst (64 bits, one word) or an 8-burst
(128 bits, two words). Its layout, most significant bit first:

    normal:    [ entry 0 | entry 1 | ... | entry c-1 | ... | ovf=0 ]
    overflow:  [ entry 0 | ... | entry c-2 | BSM row pointer | ... | ovf=1 ]

Bit 0 is the overflow flag. When more than *c* entries hash into a bin, the
bin switches to its overflow organisation. The last entry slot then holds a
pointer to a BSM row, and that row holds up to eight further entries. The
BSM is an on-chip RAM with one 8-entry row per overflowed bin, and all eight
entries of a row are compared in parallel. A lookup that lands in an
overflowed bin therefore still costs one DRAM read, plus one on-chip read.

`bin_match` decodes both organisations and compares the verify bits.
`bsm` matches a row.

## HashTune

With one fixed hash function the fullest bins overflow. FlashLook instead
keeps, for every bin group, a 4-bit **hash ID** in an on-chip table (2^18 x
4 bit = 1 Mbit for IPv4/24). When a group is built, the control plane tries
all functions of the pool and stores the one with the fewest overflows. A
lookup reads the group's hash ID (indexed by the index bits) and hashes the
verify bits with that function.

Hardware (`hashtune`, `hash_pool`, `hash_id_table`):

* The pool is H3 universal hashing. Function *f* XORs together one 16-bit
  constant row per set verify bit. The rows are computed at elaboration by
  `h3_row(f, i)`, an integer mix of *f* and *i*.
* The 16-bit hash *h* is reduced to a bin of the group by
  `bin = (h * bins_per_group) >> 16`, which works for group sizes that are
  not powers of two.
* The bin's word address is `(index * bins_per_group + bin) << (1 if
  128-bit bins)`, relative to the table's base in the bank.

Only the verify bits are hashed, so both children of an aggregated entry
always land in the same bin.

How much this helps is measured by `tb/tb_hashtune_pool_eval.sv`. It fills
a full-size IPv4/24 table (2^18 groups x 6 bins x 3 entries) with about
2.69 M uniformly random /24 prefixes, an average of 1.7 per bin. It then
hashes every entry with 64 instances of the RTL hash functions. Entries that
do not fit in their bin:

| Functions per group | 1 (best single) | 2 | 4 | 8 | 16 | 32 | 64 |
|---------------------|------:|------:|------:|-----:|-----:|----:|----:|
| Overflowing entries | 72,333 | 35,575 | 10,991 | 4,227 | 1,816 | 973 | 517 |

With the default pool of 16 functions:

* 97.5% of the overflows go away compared with the best single function.
* 1,785 bins overflow, against 8192 BSM rows.
* No bin holds more than 5 entries. An overflowed bin can take 2 entries
  plus 8 in its BSM row.

Real tables are less uniform than random prefixes, which raises all of
these counts. For this reason the BSM is sized well above the figures
measured here.

## DRAM copies and the bank scheduler

The DRAM is 9 chips of 4 banks. The tables are laid out in a pattern that
repeats every three chips (bank numbers 0-3 within a chip):

| Bank | Chip 0 of group     | Chip 1 of group     | Chip 2 of group     |
|------|---------------------|---------------------|---------------------|
| 0    | IPv4/24 + IPv6/32   | IPv4/24 + IPv6/32   | IPv4/24 + IPv6/32   |
| 1    | IPv4/32 + IPv6/48   | IPv4/32 + IPv6/48   | IPv4/32 + IPv6/48   |
| 2    | IPv4/24 + IPv6/40   | IPv4/24 + IPv6/40   | IPv4/24 + IPv6/40   |
| 3    | IPv4/32 + IPv6/32   | IPv4/32 + IPv6/48   | IPv4/32 + IPv6/40   |

The IPv4 tables start at word 0. An IPv6 table sits at word 1,572,864 (the
free part of an IPv4/24 bank, or the lower part of bank 3) or at word 524,288
(below IPv4/32). This gives 18 copies of each IPv4 table and 12 of each IPv6
table.

A bank may be opened once every 60 ns, which is 15 lookup cycles (`TRC`).
`dram_sched` keeps a busy counter per bank. For each lookup it picks, for
every table the lookup needs, the lowest-numbered idle bank holding a copy.
It grants the lookup only if all of its tables found one; otherwise the
lookup waits. The two engines take turns at picking first, and the second
engine can still be granted in the same cycle on the banks left over.

Throughput that follows from this:

* IPv4 needs 15 copies for one lookup per cycle and has 18, so it never
  stalls on its own.
* IPv6 needs one bank in each of three sets of 12, so it can run at most 12
  lookups per 15 cycles (0.8 per cycle, 3.2 ns per lookup). That beats the
  6 ns target.
* When both run together, IPv4/24 and IPv6 tables share banks and the
  scheduler stalls one or the other.

### Bin writes in the spare bank time

The three spare IPv4 copies leave 3 of every 18 bank accesses free. At
250 MHz that is 50 M accesses per second, which are used for updates.

An updated bin must reach every copy of its table (18 for IPv4, 12 for
IPv6). `dram_sched` holds one pending write and, each cycle, writes one copy
into a bank that is idle and was not given to a lookup.

Two rules keep writes from hurting lookups:

* **Look-ahead on every write.** A write may take a bank only if the
  lookups still have enough copies afterwards. For every table in that bank
  and every horizon *k* < `TRC`, the copies that are free, or come free
  within *k* cycles, must still cover *k* line-rate lookups after the write
  takes its bank. Line rate is one lookup per cycle for IPv4 and one per
  1.5 cycles for IPv6. A simpler rule (leave one copy free) is not enough:
  after a pause, writes and lookups together can use up every copy before
  the first one comes back. The lookups then stall, and the stall sets up
  the same burst again.
* **Lookups pick around the write.** Among the free copies, a lookup
  prefers one the pending write does not still need. Otherwise lookups
  that keep cycling through the same 15 banks would starve the write.

With IPv4 lookups at one per cycle, the testbenches see about 23 bin
writes per 1500 cycles (roughly 3.8 M bin updates per second) and no lookup
stall. While a write is in progress some copies hold the new bin and some
the old. Each copy is a consistent bin, so a lookup sees either the old or
the new route.

## Lookup pipeline and timing

`lookup_engine` is instantiated once per family (`IS_V6`). One lookup enters
per cycle:

| Stage        | Work |
|--------------|------|
| S0           | accept; read each table's hash ID; read the on-chip table |
| S1           | form bin addresses; scheduler grants copies (lookup waits here, `in_ready` low, until it does); bank reads issued |
| S1+DRAM_LAT  | bins return; `bin_match` per table; BSM read for overflowed bins |
| S2           | BSM match; pick the longest level that matched |
| out          | registered result |

Latency is `DRAM_LAT + 3` cycles from acceptance (19 at the default
`DRAM_LAT = 16`) when the scheduler grants at once. Results leave in order
and carry the request's tag. They also report which level matched (`src`)
and whether the BSM supplied the answer (`bsm`). There is no output
back-pressure.

Priority is IPv4/32, then IPv4/24, then the direct table. For IPv6 it is
long on-chip, then /48, /40, /32, then short on-chip.

## Updating the tables

`flashlook_top` has one update port (`upd_valid`/`upd_ready`, then
`upd_kind`, `upd_tbl`, `upd_addr`, `upd_mask`, `upd_data`):

* `UPD_DIRECT` writes a row of the direct table. The table is split into 8
  parallel blocks, and `upd_mask` chooses which of the 8 neighbouring
  entries to write, so a short prefix expands with few writes.
* `UPD_HID` writes the hash ID of a bin group of table `upd_tbl`.
* `UPD_BSM` writes a BSM row.
* `UPD_BIN` writes a DRAM bin (`upd_data[127:0]`, at word `upd_addr` of
  table `upd_tbl`) to every copy, as described above. `upd_ready` stays low
  until the last copy is written.

The first three take effect in one cycle. Changing or withdrawing a route
rewrites the affected bins, plus at most a hash ID or BSM row. Adding a
route may make a group overflow. The new entry can then go to the BSM, or
the group can be rehashed with another function, which rewrites the
group's 3-16 bins.

Deciding what to write is control-plane software and is not in this RTL:
expansion, aggregation, choosing hash functions and allocating BSM rows. The
testbench package `tb/fl_tb_pkg.sv` contains a software version of it
(`tbl_builder`) that shows the full procedure. The end-to-end testbench
uses it to apply route changes, withdrawals and insertions through the
update port. It rebuilds the affected tables and writes every entry that
differs.
When tables are first loaded, the testbench fills the DRAM model directly.

## Where this RTL departs from, or adds to, the published design

* **IPv6 on-chip hash tables** (/4-/24 and /49-/64) are not built. Only
  their sizes are known. The engine asks for them on `v6_oc_req`/`v6_oc_addr`
  and takes their next hops on `v6_oc_short_nh`/`v6_oc_long_nh` one cycle
  later.
* **BSM depth**: IPv4/24 has 8192 rows (1.4 Mbit). The other tables have
  1024, 512, 512 and 256 rows, 1.95 Mbit in total. The original budget is
  about 1 Mbit, counted as entries actually used. With fixed 8-entry rows,
  one row per overflowed bin is needed, and a 2M-prefix table with 16 hash
  functions overflows about 6000 bins.
* **Hash ID tables** total 688,128 x 4 bit = 2.75 Mbit over the five
  tables, slightly more than the published 2.5 Mbit.
* **On-chip memory in total**: about 6.8 Mbit is built (2 Mbit direct
  table, 2.75 Mbit hash IDs, 1.95 Mbit BSMs). The IPv6 on-chip tables would
  add 3.5 Mbit, giving about 10.3 Mbit against the published 9 Mbit.
* **Choices of this design** where the original gives none:
  * the hash family (H3) and its constants;
  * the multiply-shift bin reduction;
  * the position of the IPv6 index bits;
  * the IPv6 bin capacities (as many entries as fit);
  * the overflow flag at bit 0 and the pointer in the last slot;
  * the DRAM word address map;
  * the copy-selection and engine-priority rule;
  * how bin writes share the banks with lookups (the look-ahead rule);
  * the update port encoding;
  * 8 direct-table blocks.
* **One clock domain**: all timing is counted in 4-ns lookup cycles. The
  DRAM controller is outside and is assumed to return a read exactly
  `DRAM_LAT` cycles after the request. Real DDR2 needs a controller that
  keeps this fixed latency. Only the 60 ns row cycle is modelled, and a
  write is taken to hold its bank for the same 60 ns as a read.

## Files

| File | Contents |
|------|----------|
| `rtl/flashlook_pkg.sv` | table geometry, DRAM layout, H3 constants, enums |
| `rtl/flashlook_top.sv` | top: two engines, scheduler, direct table, update decode |
| `rtl/lookup_engine.sv` | pipeline of one address family |
| `rtl/hashtune.sv` | key split, hash ID read, bin address |
| `rtl/hash_pool.sv` | pool of H3 functions and bin reduction |
| `rtl/hash_id_table.sv` | hash ID RAM |
| `rtl/bin_match.sv` | bin decode and verify match |
| `rtl/bsm.sv` | black sheep memory |
| `rtl/direct_table.sv` | IPv4/18 direct table |
| `rtl/dram_sched.sv` | bank busy timers and copy selection |
| `tb/fl_tb_pkg.sv` | software table builder and LPM reference |
| `tb/dram_model.sv` | behavioural DRAM banks (fixed latency, counts 60 ns violations) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. Each one
has a watchdog that ends a hung run. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/flashlook_pkg.sv tb/fl_tb_pkg.sv -y rtl -y tb \
        tb/tb_flashlook_top.sv --top-module tb_flashlook_top
    ./obj_dir/Vtb_flashlook_top

Replace `tb_flashlook_top` with any other `tb_<module>`. `tb_flashlook_top`
runs the whole design at its default size (9 chips, full-size tables, 16 hash
functions) in five phases:

1. IPv4 alone at one lookup per cycle, checking the 19-cycle latency.
2. IPv6 alone, checking at least one lookup per 1.5 cycles.
3. Both families together, with scheduler stalls.
4. Route changes, withdrawals and new prefixes through the update port,
   DRAM bins included.
5. Bin writes next to full-rate IPv4 lookups, which must not stall.

It checks every result against a plain longest-prefix-match model. It also
counts that each mechanism occurred at least once: every table level, BSM
hits for both families, both children of aggregated entries, stalls, several
hash IDs in use, and no DRAM bank read within 60 ns. It takes a few seconds.
`tb_lookup_engine` runs both engine variants with a shorter DRAM latency and
a random-grant scheduler. `tb_hashtune_pool_eval` is the HashTune overflow
measurement described above; it takes under ten seconds.

To change the size, override `NCHIP`, `TRC`, `POOL` or `DRAM_LAT` on
`flashlook_top`. The table geometry is in the functions of
`flashlook_pkg`.
