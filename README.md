# Two-level IPv6 route lookup with hash RAMs and a CAM

This is a longest-prefix-match engine for IPv6 destination addresses. It takes
one 128-bit address per clock cycle and returns the next hop of the longest
matching route eight cycles later. It relies on the shape of real IPv6 tables:
almost all prefixes are at most 64 bits long, and more than 90 % of them have a
length that is a multiple of 8 (/32 and /48 dominate). Those prefixes are looked
up by exact match in one hash RAM per length. The few other prefixes are split
into a hashed part and a short tail, and the tail is resolved in a second level
of small directly-indexed RAMs. A CAM takes whatever collides in the hash RAMs.

## How a route is stored

Routes are divided by length L (at most 64):

| Length | Called | Stored in |
|---|---|---|
| 16, 24, 32, 40, 48, 56, 64 | hash prefix | hash RAM HR(L) |
| 17..63, not a multiple of 8 | expanded prefix | hash segment (first i = 8*floor(L/8) bits) in HR(i), tail (L-i = 1..7 bits) in expanded RAM group ER(i+1, i+7) |
| 0..15 | short prefix | CAM |
| any, when its hash RAM word is taken by another prefix | collision | CAM |

**Hash RAMs.** There are seven, HR(16) to HR(64). Each has 2^16 words, addressed
by XOR-folding the prefix into 16 bits (prefix bit b lands on address bit
b mod 16; for HR(16) the hash is the prefix itself). A word holds:

```
{ F, E, prefix[i-1:0], next_hop[7:0], index[IDX_W-1:0] }
```

- `F` means a hash prefix of length i lives in this word, with next hop `next_hop`.
- `E` means `prefix` is also the hash segment of one or more expanded prefixes.
  Their tails are stored in the expanded RAM group at base `index`.

A hash prefix and a hash segment with the same value share one word. The word's
prefix field is therefore compared against the address once, and the result
serves both uses.

**Expanded RAMs.** There are six groups, one behind each of HR(16)..HR(56), and
each group has seven RAMs, 42 in all. RAM d of a group (d = 1..7) holds tails of
d bits. Its word `{H, next_hop}` for index x and tail y sits at address {x, y},
that is x*2^d + y. All seven RAMs share the same base index x. So once a hash
segment has an index, all of its tails of any length are addressed directly,
and no second comparison is needed: `H` alone says whether the route exists.
Index values come from one counter per group. The counter advances each time a
new hash segment needs an index. It never steps back on delete, so a hash
segment keeps its index for as long as the hash RAM word exists.

**CAM.** It holds up to `CAM_DEPTH` entries `{valid, prefix[63:0], length, next_hop}`.
An entry matches when the address's first `length` bits equal its prefix. The CAM
reports its longest matching entry.

## Lookup pipeline

All memories are read in parallel. A lookup always walks the same eight
stages, so results leave in order, one per cycle.

| Stage | Work |
|---|---|
| 1 | register the address |
| 2 | XOR-fold the first 16, 24, ..., 64 bits into seven hash RAM addresses; CAM registers the address |
| 3 | read the seven hash RAMs; CAM compares all entries and registers its longest match |
| 4 | compare each stored prefix with the address: `F` and equal gives a hash-prefix candidate; `E` and equal enables expanded group i with the word's index |
| 5 | read the seven RAMs of each enabled expanded group at {index, next 1..7 address bits} |
| 6 | turn each full expanded word of an enabled group into a candidate (length i+d) |
| 7 | priority comparator: the longest of 50 candidates (7 hash RAM, 42 expanded RAM, 1 CAM) |
| 8 | output register: `res_valid`, `res_hit`, `res_len`, `res_nh` |

The hash-RAM and CAM candidates wait in delay registers until stage 6, so all 50
candidates meet in one cycle. Equal lengths can only arise when the same route
is held twice: in a hash or expanded RAM and also in the CAM (see below). The
RAM copy then wins. `res_hit` low means no route matches. Install a /0 route
(it goes to the CAM) to get a default.

## Table maintenance

`table_update` applies one insert or delete at a time through a valid/ready
handshake (`upd_valid`, `upd_ready`). It answers with `upd_rsp_valid` and an
`upd_status_e` code. Lookups keep running meanwhile. A lookup that overlaps an
update of the same entry may see the table before or after that update.

Insert of a prefix P of length L:

1. If L > 64, answer `ST_BADLEN`. If L < 16, go to the CAM.
2. Read the word of HR(i) at hash(P[first i bits]). Here i = L for a hash
   prefix, i = 8*floor(L/8) otherwise.
3. Hash prefix. If the word is empty, or holds this prefix, set `F` and write the
   next hop, keeping `E` and the index. Answer `ST_HR`. Otherwise go to the CAM.
4. Expanded prefix, when the word is empty or holds this hash segment:
   - If `E` is already set, write `{H=1, next hop}` into the expanded RAM at the
     word's index. Answer `ST_ER`.
   - Otherwise take the group's next index from the counter. Set `E`, store the
     index in the word and write the expanded word. Answer `ST_ER`.
   - If the counter is spent, go to the CAM.
5. Anything else is a collision and goes to the CAM. The CAM answers `ST_CAM`,
   or `ST_FULL` when no entry is free. Re-inserting a route only updates its
   next hop.

Delete:

- A hash prefix whose word has `E` set loses only `F` and its next hop. The
  word stays, because it still anchors expanded prefixes.
- A hash prefix whose word has no `E` has the whole word cleared.
- An expanded prefix only has its expanded RAM word cleared (`H=0`). `E` and the
  index stay, and the index is reused by later tails of the same hash segment.
- Every delete is also sent to the CAM. This removes a copy stored there at a
  time when the hash RAM word belonged to another prefix. The answer is
  `ST_HR`/`ST_ER` when the route was found in a RAM, else the CAM's
  `ST_CAM`/`ST_NOTFOUND`.

Response time, counted from the accepting clock edge:

| Case | Cycles |
|---|---|
| insert into a hash or expanded RAM | 4 |
| any delete, or an insert that falls through to the CAM | 6 |
| short prefix | 3 |
| bad length | 1 |

## Parameters and sizes

| Parameter | Default | Meaning |
|---|---|---|
| `HASH_W` | 16 | hash RAM address width, 2^16 words per hash RAM |
| `IDX_W` | 8 | index width, i.e. 256 hash segments with tails per expanded group |
| `CAM_DEPTH` | 2944 | CAM entries |
| `NH_W` (package) | 8 | next-hop width |

The 16-bit hash address, the field layout of both RAM kinds, seven hash RAMs,
42 expanded RAMs and the 8-stage pipeline come from the original description of
the scheme. The next-hop and index widths are this implementation's choice. The
CAM depth is derived from a CAM budget of 28.75 kB at 80 bits per entry.

At the defaults the engine stores:

- hash RAMs: 7 x 65536 words of 2+i+16 bits, about 26.6 Mbit;
- expanded RAMs (read only for addresses whose hash segment has `E` set): 6 x 256 x (2+4+...+128) words of 9 bits, about 3.5 Mbit;
- CAM: 2944 x 80 bits.

How well it fits different tables:

- **A 1797-route table** with the length mix of a public IPv6 table fits easily. The
  full-size test loads one with random prefix values. 1660 routes land in hash
  RAMs, 120 in expanded RAMs and 17 in the CAM.
- **A table of 65535 routes** with the same length mix does not fit the CAM.
  Under uniform hashing, roughly 13000 of its /32 and /48 routes would collide
  in the 16-bit hash RAMs, against 2944 CAM entries. Widen `HASH_W` or deepen
  the CAM for tables that large.

## Where this differs from the original scheme, or goes beyond it

- **Prefixes shorter than 16 bits go to the CAM.** The scheme has no HR(8) and
  no expanded group for lengths 9..15.
- **The index counters are in hardware, one per group.** The original fills
  them in by software. A spent counter sends the prefix to the CAM.
- **Colliding expanded prefixes go to the CAM.** An expanded prefix whose
  hash-segment word holds a different prefix is treated as a collision.
- **The hash words carry more than 9 + i bits.** The original quotes 9 + i.
  Here a word carries 2 flags, the i-bit prefix, the next hop and the index.
- **Only a hard reset can clear the tables.** The hash and expanded RAMs start
  empty (memory initial value) and are not cleared by `rst`. The CAM valid bits
  and the counters are.
- **The FPGA board, the clock rate and the host-side table builder are not part
  of this RTL.**

## Files

`rtl/`:

- `ipv6_lookup_pkg.sv`: widths, the candidate type `match_t`, and the operation, status and controller state enums.
- `xor_hash.sv`: the XOR fold.
- `hash_ram.sv`, `expanded_ram.sv`: the two memory kinds.
- `first_level_lookup.sv`: stages 2-4.
- `second_level_lookup.sv`: stages 5-6.
- `cam_lookup.sv`: the CAM.
- `priority_comparator.sv`: stage 7.
- `table_update.sv`: the maintenance controller.
- `ipv6_lookup.sv`: the top.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus:

- `ipv6_ref_pkg.sv`: a plain software longest-prefix-match reference.
- `tb_ipv6_lookup.sv`: the end-to-end test. It uses a 24-entry CAM and a 2-bit
  index, so that collisions, a spent counter, a full CAM and every delete case
  all occur. It counts each of them.
- `tb_ipv6_lookup_full.sv`: runs the top at default size with the 1797-route
  table and 3000 back-to-back lookups.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ipv6_lookup_pkg.sv tb/ipv6_ref_pkg.sv \
  rtl/xor_hash.sv rtl/hash_ram.sv rtl/expanded_ram.sv rtl/first_level_lookup.sv \
  rtl/second_level_lookup.sv rtl/cam_lookup.sv rtl/priority_comparator.sv \
  rtl/table_update.sv rtl/ipv6_lookup.sv tb/tb_ipv6_lookup.sv \
  --top-module tb_ipv6_lookup -o sim
./obj_dir/sim
```

Replace the top module name to run another testbench. The full-size test builds
in under a minute and runs in about a second.
