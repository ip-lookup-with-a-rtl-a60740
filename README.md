# Blooming-Tree IP lookup engine

A router must find, for every packet, the longest prefix in its forwarding table that
matches the packet's 32-bit destination address. This engine does it with mostly small
on-chip memories and, in the common case, a single access to external SRAM.

The forwarding table is split by prefix length:

* **Lengths 0..15** are few. They are expanded into a **Direct Addressing (DA)** table of
  2^15 entries indexed by the top 15 address bits. One read gives the answer.
* **Lengths 16..32** go to the **BT-array**. It has 17 *Blooming Trees*, one per length.
  Each tree is a compact Bloom-filter-like structure that works as a **minimal perfect
  hash**: it maps each of its n prefixes to a distinct SRAM address in a block of n
  words. For any other key it either says "absent" or returns some address (a false
  positive). All 17 trees are queried in parallel. The longest length that claims a match
  is then confirmed by reading its SRAM entry. On a false positive the next longest is
  tried.

An output controller picks the result. A confirmed BT-array hit always wins, because its
prefix is longer than any DA prefix. Otherwise the DA entry is used, if it is valid. The
result is a 32-bit next hop and a 3-bit output port (8 ports).

```
             +--------------------------- bt_array ---------------------------+
 in_ip ---+->| h3_hash_bank -> 17 x mphf -> candidate FIFO -> sram_query      |--+
          |  |  (17 keys)      (match bit +  (address,        (priority enc., |  |
          |  |                  SRAM addr)    17 matches,      SRAM reads)    |  |
          |  +-------------------------------- 17 addresses) -----------------+  |
          |                                                  sram_* <-> SRAM     v
          +--> direct_addressing ---------------------------------------> output_controller --> out_*
```

## The Blooming Tree as a perfect hash (`mphf`)

This is the part that needs the most explanation. Each of the 17 trees has the same fixed
shape. Its input is a 16-bit key, the H3 hash of the address masked to the tree's length.
The key is cut into fields, most significant bit first:

| bits  | field   | use                                           |
|-------|---------|-----------------------------------------------|
| 15:9  | section | one of 128 sections                            |
| 8:5   | bin     | one of 16 bins in the section (2048 bins in all) |
| 4     | b1      | branch taken at layer 1                        |
| 3     | b2      | branch taken at layer 2                        |
| 2:0   | unused  |                                               |

The tree has three layers and a lookup table, all stored one section per memory row:

| memory  | per section     | total        | content |
|---------|-----------------|--------------|---------|
| layer 0 | 16 bins x 5 bit | 2048 x 5 bit | Huffman-coded element count of each bin: *c* ones, then zeros (c = 0..4) |
| layer 1 | 16 x 2 bit      | 4096 bit     | one 2-bit block per bin |
| layer 2 | 32 x 2 bit      | 8192 bit     | one 2-bit block per layer-1 bit |
| LUT     | 1 x 20 bit      | 128 x 20 bit | SRAM address of the first element of the section |

The layers form a binary tree of depth two below each bin. **A node that holds exactly
one element is a leaf, and its block in the next layer is all zeros (a "zero block").** A
node with two or more elements has a non-zero block. In that block, bit *v* is 1 when
child *v* (selected by b1 or b2) holds at least one element. The bits of layer 2 are
leaves themselves. So a bin holds at most 4 elements (2 x 2), and two keys with the same
section, bin, b1 and b2 cannot both be stored.

Elements are numbered in tree order: section, then bin, then child 0 before child 1. The
SRAM address of a key is

```
LUT[section]
  + sum of the element counts of the earlier bins of the section   (popcount of layer 0)
  + leaves to the left of the key inside its own bin
```

where the last term is found by walking the tree:

* c = 0: the key is absent.
* c = 1: the bin is a single leaf, offset 0.
* c >= 2: the layer-1 block must have bit b1 set, otherwise the key is absent. If b1 = 1,
  the offset starts at the leaf count of child 0. That count is 1 if child 0's layer-2
  block is zero, and otherwise the number of ones in that block. Then, if the layer-2
  block on the key's path is zero, the child is the leaf. Otherwise bit b2 must be set,
  and one more is added when b2 = 1 and bit 0 is set.

A stored key always gets its own address. The addresses of one tree's n keys are exactly
LUT[0] .. LUT[0]+n-1. A key that is not stored but lands on a leaf gets that leaf's
address. This is a false positive, and the SRAM check rejects it.

Capacity: the storage has room for 2048 bins x 4 leaves = 8192 keys per tree, or
17 x 8192 = 139,264 prefixes of length 16..32. A randomly hashed set cannot come close
to that. Two keys of one length that agree in their top 13 bits cannot be stored
together, and the expected number of such pairs is about n^2/16384 for n prefixes of a
length. All 17 trees also share one hash function, which makes this worse. In
simulation, a collision-free Q was found for 72 random prefixes per length (1,224 in
all) but not for 80. Larger tables would need a hash per tree, deeper trees, or a
control plane that does more than draw Q at random. This is the main limit of the
design.

Timing: the section rows are read in the first cycle. The popcounts and the walk take
the second. The result is registered, so latency is 2 and one key is accepted per cycle.

## Hashing (`h3_hash_bank`)

Keys come from the H3 hash family. A 32 x 16 boolean matrix Q has one row per address
bit. The key is the XOR of the rows whose address bit is 1:
`key = XOR_k (ip[k] ? Q[k] : 0)`. For the tree of length L only the L most significant
address bits take part. So one shared Q gives 17 different keys, and the host bits of an
address never change the key. Q is held in flip-flops, because every row is used in
every cycle. Software writes it one row at a time.

When a new prefix causes an unresolvable collision in any tree (a bin with more than 4
elements, or two keys sharing a full path), the software picks a new Q, rebuilds all 17
trees and reloads them. The hardware does not have to change.

## Confirming candidates (`sram_query`, `priority_encoder`)

Each SRAM word holds one forwarding entry: prefix (32 bits), prefix length (6 bits),
next hop (32 bits) and port (3 bits). `sram_query` takes the 17 match bits and 17
candidate addresses of one lookup:

1. The priority encoder selects the highest remaining match bit, which is the longest
   length.
2. The unit reads that address.
3. The entry is accepted if its length equals the candidate length and its prefix equals
   the address masked to that length.
4. Otherwise the bit is cleared and the next one is tried.

When no bit remains, the BT-array reports a miss. Every false positive at a length above
the true match costs one extra read. A lookup that no tree matched costs no SRAM read.
With 40 random prefixes per length, the end-to-end test measures about 0.2 rejected false
positives and 0.9 to 1.0 SRAM reads per lookup. About 14 % of the lookups that hit needed
more than one read.

SRAM port: `sram_req` is a one-cycle read strobe with `sram_addr`. The memory answers
with `sram_rvalid`/`sram_rdata` after any fixed or variable delay. Only one read is
outstanding at a time.

## Direct Addressing (`direct_addressing`)

This is a table of 32,768 entries of {valid, next hop, port}, indexed by `ip[31:17]`, with
a synchronous read (latency 1). The software expands each prefix of length L <= 15 into
the 2^(15-L) entries it covers, shortest first, so that longer prefixes overwrite shorter
ones. A default route (length 0) is the expansion to all entries. The table is not
cleared at reset.

## Ordering, flow control and timing (`bt_array`, `output_controller`, `iplookup_top`)

* Requests use `in_valid`/`in_ready` and are accepted when both are high. Results come
  out in request order as one-cycle `out_valid` pulses. There is no output back-pressure.
* Hashing and the trees are fully pipelined. The SRAM check handles one lookup at a
  time. A FIFO between them holds candidates, and a second FIFO in the output controller
  holds DA results until the BT-array answers. A counter limits the number of lookups in
  flight to `DEPTH` (default 8), which keeps both FIFOs from overflowing. When the limit
  is reached, `in_ready` goes low.
* Latency, for an idle engine and an SRAM that answers S cycles after it samples a read:
  out_valid rises **6 + R(S+2)** cycles after the accepting edge, minus one when the
  BT-array confirmed a hit. R is the number of SRAM reads. With no BT match this is 6
  cycles. For a clean BT hit it is 7 + S.
* Throughput is set by the SRAM check: about one lookup per S + 3 cycles when most
  lookups need one read.
* Reset is asynchronous and active low. It clears control state and valid flags but no
  table contents.

Extra outputs: `out_plen` gives the matched length (0 for a DA match or a miss).
`out_from_bt` is set when the BT-array supplied the answer. `out_nreads` gives the SRAM
reads the lookup used.

## Loading the tables

All tables are written through one configuration port, `cfg` (`iplookup_pkg::cfg_wr_t`).
A write with `we = 1` for one cycle is applied at the next clock edge:

| `target`  | `bt`   | `addr`      | `data` |
|-----------|--------|-------------|--------|
| `CFG_Q`   | -      | address bit k (0..31) | Q row, bits 15:0 |
| `CFG_LUT` | L - 16 | section     | 20-bit SRAM address of the section's first element |
| `CFG_CBF` | L - 16 | section     | 80 bits: bin j in bits 5j+4..5j, c ones from the top |
| `CFG_L1`  | L - 16 | section     | 32 bits: bin j's block in bits 2j+1..2j (bit 2j = child 0) |
| `CFG_L2`  | L - 16 | section     | 64 bits: block of (bin j, child v) in bits 2(2j+v)+1..2(2j+v) |
| `CFG_DA`  | -      | DA index    | {valid, next hop, port} |

How a tree is built for the set of keys of one length, with base address A:

1. Group the keys by bin.
2. Number the elements bin by bin in tree order, starting at A.
3. Write each bin's count, its layer-1 block and its layer-2 blocks as described above.
4. Set LUT[s] to A plus the number of elements in sections 0..s-1.
5. Write each prefix's SRAM entry at its number.

The testbenches contain this procedure (`tb/tb_lookup_pkg.sv`, class `bt_image`) and use
A = (L-16) x 8192. The SRAM itself is outside the engine.

## Where this design makes its own choices

The split at length 16, the 17 trees, the H3 hash, the tree sizes (128 x 16 bins of 5
bits, 2 + 2 bits per node, 128 x 20-bit LUT), the 16-bit keys, the longest-first SRAM
confirmation, the 15-bit DA index and the 32-bit/3-bit outputs all follow the published
scheme. The following are this implementation's own choices:

* the key bit layout, with its three unused low bits;
* the exact meaning of layer bits in the fixed-depth tree (zero block = single element);
* one Q matrix shared by all lengths;
* Q in flip-flops rather than block RAM;
* the SRAM word layout;
* the DA entry format and prefix expansion;
* both FIFOs, the in-flight limit and the request handshake;
* the configuration bus format;
* all pipeline depths;
* reading a whole section per cycle, instead of the narrow 2048 x 5 layer-0 memory.

The control software that builds the tables, and the SRAM device, are not part of the RTL.

## Files

| file | content |
|------|---------|
| `rtl/iplookup_pkg.sv` | sizes, SRAM entry, route, DA entry and configuration types |
| `rtl/iplookup_top.sv` | top level: BT-array, DA, output controller |
| `rtl/bt_array.sv` | hashing, 17 trees, candidate FIFO, SRAM check |
| `rtl/h3_hash_bank.sv` | Q matrix and 17 masked H3 hashes |
| `rtl/mphf.sv` | one Blooming-Tree perfect hash |
| `rtl/priority_encoder.sv` | longest-match selection |
| `rtl/sram_query.sv` | SRAM confirmation state machine |
| `rtl/direct_addressing.sv` | short-prefix table |
| `rtl/output_controller.sv` | result merge |
| `rtl/sync_fifo.sv` | small FIFO |
| `tb/tb_lookup_pkg.sv` | table builder and H3 reference used by the testbenches |
| `tb/sram_model.sv` | behavioural SRAM |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_capacity` |

## Verification

Every testbench checks the module against values computed independently: the H3
definition, a builder that numbers tree leaves one by one, or a linear longest-prefix
search. Each prints `TB_RESULT checks=N failures=M`.

* `tb_iplookup_top` runs at the default sizes. It builds a table of 680 BT prefixes (40 per length) and
  60 short prefixes (lengths 8 to 15), loads all tables through `cfg`, and checks 200 isolated lookups for
  latency. It then streams 4,000 lookups, updates the table under a new Q, and streams
  4,000 more. It requires each of these to occur at least once: BT hit, DA hit, BT hit
  over a DA match, miss, false positive rejected, hit after a false positive,
  back-pressure, and a Q change after a collision.
* `tb_mphf` loads 1,500 keys into a full-size tree and checks all member addresses
  (distinct and exactly base..base+n-1), 3,000 random keys and the latency.
* `tb_capacity` grows the table by 8 prefixes per length until no collision-free Q is
  found in 1,000 tries. It loads the largest size that worked into the engine and looks
  up every prefix.
* `tb_bt_array`, `tb_h3_hash_bank`, `tb_sram_query`, `tb_direct_addressing`,
  `tb_output_controller` and `tb_priority_encoder` test their modules alone.

Not verified: timing closure or resource use on an FPGA, and behaviour with a
real SRAM controller.

To simulate with Verilator 5 (example for the top level):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/iplookup_pkg.sv tb/tb_lookup_pkg.sv tb/tb_iplookup_top.sv \
  --top-module tb_iplookup_top -o sim
./obj_dir/sim
```

The simulator is two-state, so the testbenches create a falling reset edge at start-up.
The end-to-end run takes a few seconds.
