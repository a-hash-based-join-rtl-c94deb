# HIMOD database coprocessor: a hash filter for relational joins

A relational join compares every tuple of one relation with every tuple of
another on a join attribute. When both relations are large, most comparisons
are between tuples that cannot match. This coprocessor (DBCP) sits beside a
host processor and does the cheap part of the join in hardware. It cuts both
relations into pairs of small lists whose keys very probably match one to one.
Tuples that certainly have no partner are dropped. The host then runs the
exact comparison and builds result tuples only inside each list pair.

The coprocessor has three ideas:

* **Mapping hash coders.** They produce a bucket address from a 16-character
  key in three clock cycles, with no arithmetic.
* **Five independent coders.** Each has its own bit array store (BAS), a
  256 x 1 bit memory. A target key whose bits are not set in every active
  store cannot have a matching source key.
* **The stack oriented filter technique (SOFT).** The five stores form a
  stack. A list pair is divided bucket by bucket with one coder, and each
  bucket is divided again with the next coder, up to five levels deep. The
  division stops when every key of a pair falls in one bucket of every coder
  still active. Such a pair very probably holds one key value.

## Block structure

```
                    host bus (CIRs)                memory (DMA master)
                          |                              |
                 +--------+---------+           +--------+---------+
                 | bus_interface_   |  start,   |  join_controller |
                 | unit             |  operands |  (coprocessor    |
                 |  CIRs, pair FIFO |---------->|   control unit)  |
                 +--------+---------+<----------+--------+---------+
                          | prime loading   pairs        | keys, stack, scan control
                          v                              v
                 +-------------------------------------------------+
                 | filter_unit                                     |
                 |  5 x ( mapping_hash_coder -> bit_array_store    |
                 |        hash_addr_comparator )                   |
                 |  bas_stack, AND filter, soft_detect             |
                 +-------------------------------------------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/himod_pkg.sv` | package | sizes, tuple layout, event counter struct, prime rows and the formula for the initial RAM contents |
| `rtl/xor_module.sv` | `xor_module` | 16-input, four-level XOR tree: one hash bit |
| `rtl/prime_ram.sv` | `prime_ram` | 64 x 16 prime RAM with a two-cycle read |
| `rtl/mapping_hash_coder.sv` | `mapping_hash_coder` | 16 prime RAMs and 16 XOR modules: key to K-bit bucket |
| `rtl/bit_array_store.sv` | `bit_array_store` | 2^K x 1 store, next-bucket address register with increment, address multiplexer |
| `rtl/hash_addr_comparator.sv` | `hash_addr_comparator` | first address register, XOR/OR compare, JK flip-flop |
| `rtl/bas_stack.sv` | `bas_stack` | stack pointer over the five stores |
| `rtl/soft_detect.sv` | `soft_detect` | AND gates, 5:1 multiplexer and JK flip-flop: the "identical" decision |
| `rtl/filter_unit.sv` | `filter_unit` | the five coders, stores and comparators; the AND filter |
| `rtl/join_controller.sv` | `join_controller` | state machine that runs the SOFT join over linked lists in memory |
| `rtl/bus_interface_unit.sv` | `bus_interface_unit` | coprocessor interface registers, DSACK, list pair FIFO |
| `rtl/himod_dbcp.sv` | `himod_dbcp` | top level |

## The mapping hash coder

Each key is 16 ASCII characters. Character *j* addresses its own 64-word RAM
with its low six bits; the RAM holds 16-bit primes. The 16 primes read out are
XORed bit by bit. Bit *i* of the result is the XOR of bit *i* of all 16 primes,
computed by a four-level tree (`xor_module`). The low K bits of the 16-bit
result are the bucket address. K = 8 gives 256 buckets.

Timing is fixed and pipelined. The RAM read takes two clocks: an address
register, then a data register. The XOR tree and its output register take one
more. So `hash_valid` follows `key_valid` by exactly three cycles, and a new
key can enter every cycle.

Every prime is odd, so bit 0 of an XOR of 16 primes would always be 0. To fix
this, the word at every even RAM address holds its prime plus one.

Five coders are statistically independent because each holds a different prime
table. The tables come from seven rows of 14 primes (`PRIME_ROWS` in
`himod_pkg`). Word *a* of coder *c* is

    prime_init(c, a) = PRIME_ROWS[a / 10][a % 10 + c] + (a even ? 1 : 0)

So each coder sees the same rows shifted one place further. Words 60..63
use row 6. All 16 RAMs of a coder start with the same table. The host can
overwrite any word through the register select CIR. A write reaches all 16
RAMs of one coder.

## Bit array stores and the stack

Each store is 2^K flip-flops, so clearing it takes one cycle. It has three uses:

* **mark:** a source key sets the bit at its hash address;
* **probe:** a target key reads the bit at its hash address;
* **next bucket:** an address register with an incrementer searches upward
  for the next 1 bit, one address per clock. It keeps its position while
  higher levels are worked on, and this is what lets the join resume after a
  pop. A multiplexer chooses whether the store is addressed by the hash or by
  this register.

`bas_stack` holds the stack pointer `sp` (0..4). Stores `sp` and above are
*active*. Stores below `sp` hold the search state of the levels underneath and
are not touched. Push at level 4 and pop at level 0 are ignored.

The filter decision for a target key is the AND of the addressed bits of the
active stores. A key that misses in any one of them has no partner, and is
dropped.

## Deciding that a list pair cannot be divided further

Each coder has a `hash_addr_comparator`:

1. At the start of a scan, `clr` arms a load flip-flop and sets the JK
   flip-flop to 1.
2. The first address seen is loaded into the address register.
3. Every later address is XORed with the register. The OR of the XOR bits
   drives K of the JK flip-flop. So `same` stays 1 only while every address
   equals the first.

`soft_detect` combines the five `same` outputs. Its AND gate for level *l*
is the AND of comparators *l*..4. A 5:1 multiplexer steered by `sp` picks the
gate for the current level. At the end of a scan, its output is clocked into
a JK flip-flop: `identical`. The comparators see every source key and every
target key that passes the filter.

## The join, step by step

The relations are linked lists in memory. A tuple is at least five 32-bit
words (word addresses):

| Offset | Content |
|---|---|
| +0..+3 | key, character 4w+j in bits 8j+7:8j of word w |
| +4 | next tuple, 0 = end of list |
| +5.. | rest of the tuple, never touched |

Each stack level *l* has a hash table at `tbl_base + l * 2^(K+1)`. Bucket *b*
holds two list heads: source at `+2b`, target at `+2b+1`.

For a list pair (S, T) at level `sp`, `join_controller`:

1. **Clear.** It clears the active stores, the comparators and the SOFT
   flip-flop, and writes 0 to every word of this level's table.
2. **Scan the source list.** For each tuple it reads the four key words and
   hashes the key on all five coders. It marks the active stores and links
   the tuple at the head of its bucket's source list. The bucket is the
   address from coder `sp`. Linking rewrites the tuple's next pointer, which
   is safe: the list being walked is read ahead of that write.
3. **Scan the target list.** It hashes each key the same way. A tuple whose
   bits are not all set in the active stores is dropped (`discards`). The
   others are linked into their bucket's target list.
4. **Decide.** The SOFT result is captured.
   * If *identical*, every key landed in one bucket of every active coder.
     The controller sends that bucket's (S, T) heads to the host (`merges`).
   * Else, at level 4, no store is left to divide with. The controller sends
     the host every bucket that has both source and target tuples
     (`drains`).
   * Else it searches the current store for the next bucket whose source and
     target lists are both non-empty. It pushes and runs steps 1-4 on that
     bucket's lists at level `sp+1` (`pushes`).
5. **Resume.** When a level has no bucket left, it pops (`pops`). At the
   level below, the search continues from the saved next-bucket register.
   When the lowest level has no bucket left, the join is done.

A pair offered while the host's pair FIFO is full waits (`stalls`). The seven
event counters are brought out on the `stats` port.

Because of this order, the recursion never needs a software stack. The
position at each level is the next-bucket register of that level's store. The
lists of the buckets not yet visited are still intact in that level's table.

The coprocessor guarantees two things:

* every matching (source, target) pair of tuples ends up together in exactly
  one list pair sent to the host;
* no list pair is sent twice.

A list pair may still hold keys that do not match, which happens after a
collision in all active coders. The host must compare keys exactly.

## The filter-only pass: union, difference, intersection, project

The same filter serves the other set operations. For them, each tuple (or a
16-character slice of it) is the key. Command 0x0002 runs one pass at stack
level 0 with all five stores active, and never divides further:

1. The level-0 table is cleared.
2. Every source tuple is marked in the five stores and linked into its
   coder-0 bucket.
3. Every target tuple is probed. If all five bits are set, the target is
   linked into the target list of its coder-0 bucket: it may have a
   duplicate, and the host compares it inside that bucket. Otherwise it
   certainly has no duplicate, and is chained onto a *rejected* list
   (`discards`).
4. The head of the rejected list is written at `tbl_base + 5 * 2^(K+1)`,
   the word after the five level tables. Then `done` pulses.

How the host uses the result:

* **Union** emits every source tuple, every rejected target, and every
  passing target that has no equal source tuple in its bucket.
* **Intersection** uses only the buckets. The rejected list is dropped.
* **Difference** removes equal pairs from each bucket.
* **Project** (duplicate elimination) runs the pass with an empty target
  list. Duplicates can then only sit in the same bucket.

The same pass with an empty target list also divides a relation into 2^K
sub-lists by the first coder. This is how a relation too large for one
filter pass is cut into subset files.

Reading relations from secondary storage and keeping track of subset files
is left to host software.

## Host interface

Registers (byte offsets, 32 bits wide). The offsets follow the M68000-family
coprocessor register map.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | response | read | bit 15 join running, bit 14 list pair waiting, bit 13 last join finished |
| 0x02 | control | write | bit 0: abandon the running join and empty the pair FIFO |
| 0x0A | command | write | 0x0001: start a join; 0x0002: start a filter-only pass (both ignored while busy) |
| 0x10 | operand | write | source list head, target list head, table base, in that order; the order restarts at each command write |
| 0x10 | operand | read | pops the waiting pair: source head, then target head |
| 0x14 | register select | write | load a prime: bits 31:29 coder, 21:16 word, 15:0 value |

The host bus is asynchronous: the coprocessor need not share the host's
clock. The strobe (`cs` and `ds`) passes a two-flop synchronizer. The access
takes place in the first clock where the synchronized strobe is high. `dsack`
rises on the next edge, the third clock edge after the strobe. It stays high,
with `rdata` valid, until the third edge after the strobe is released.

The handshake is four-phase. The host holds `rw`, `addr` and `wdata` with the
strobe, and starts no new cycle before `dsack` has fallen.

The memory port is a word-addressed master. A transfer completes in a cycle
where `mem_req` and `mem_ack` are both high, and read data is taken in that
cycle. Each tuple costs five reads and one write for the link, plus one read
and one write of a bucket head. The next-bucket search costs one clock per
store address.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `K` | 8 | top, filter, controller, stores | bucket address bits: 2^K buckets and store bits |
| `PAIRS` | 4 | top, bus interface | list pairs that can wait for the host |
| `NUM_CODERS` | 5 | package | coders = stores = stack levels |
| `KEY_CHARS` | 16 | package | characters per key |

## Where this design departs from, or adds to, the original description

* **Control unit.** The original control unit is a two-level microcoded
  sequencer whose microcode is not published. Here a state machine runs the
  same join algorithm.
* **Set operations.** For project, union, difference and intersection,
  only the hardware filter pass is built. The exact in-bucket comparisons
  are left to the host, as for the join.
* **Host bus.** The host bus is reduced to a register interface at the
  standard coprocessor offsets, with a four-phase DSACK handshake. There are
  no response primitives, save/restore or bus arbitration.
* **Memory master.** The memory port is a plain request/acknowledge master.
* **Chosen in this design:** the tuple layout, the hash table layout, the
  clearing of each level's table, the pair FIFO and the register bit
  assignments.
* **Empty buckets.** The original examines the store bits to drop source
  tuples with no target partner. Here, buckets whose source or target list
  is empty are skipped when choosing the next bucket, to the same effect.
* **Prime table.** The published prime table covers coders 0..3 only. Coder
  4 also needs a 14th prime in each row; seven primes were chosen for these
  (7001, 7717, 3011, 5237, 8111, 2477, 6133). One published entry, 5627, is
  not prime (it is 17 x 331). It is kept as published, which does no harm to
  the hash.
* **Clock.** The clock generator and the 20 MHz figure are outside the RTL.
  Nothing here depends on the frequency.

## Testbenches and simulation

Every block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Shared testbench code:

* `tb/himod_ref_pkg.sv`: a serial reference model of the hash, and a random
  key generator;
* `tb/tb_mem.sv`: a memory with random wait states;
* `tb/tb_join_env.sv`: builds random relations, with many duplicate keys,
  as linked lists. It then checks the list pairs the coprocessor returns
  against a brute-force join. It also checks that every matching tuple pair
  is covered exactly once, and that no pair is spurious or returned twice.

The block testbenches check these latencies and counts:

* `mapping_hash_coder_tb`: checks the three-cycle latency against the
  reference hash.
* `prime_ram_tb`: checks the published table entries and the two-cycle read.

The top-level testbenches:

* `himod_dbcp_tb` runs the whole chip through its host bus at K = 2 and with
  a 2-entry pair FIFO. With few buckets, the lists must be divided down to
  the fifth level. It counts pushes, pops, discards, identical decisions,
  fifth-level drains, merges, FIFO stalls and prime reloading. Each must
  happen at least once.
* `himod_dbcp_full_tb` uses every default: 256 buckets, five levels and
  16-character keys. It joins 1024 source tuples with 1024 target tuples,
  the size of the data sets the hash coder was designed for. It then runs a
  filter-only pass over the same relations. It takes about ten seconds.
* `himod_dbcp_workload_tb` runs the five joins of a name-relation
  experiment at default parameters, each on its own coprocessor. The
  experiment splits 2048 tuples into source and target relations:
  155/1893, 646/1402, 799/1249, 1196/852 and 1961/87. Random keys replace
  the names. The key pools are sized so that the results come close to the
  experiment's 355, 919, 902, 846 and 205 tuples. Each join must be exact.
  The testbench prints how many tuples were handed to the host, and the
  cycle count. It takes about half a minute.

The join testbenches also run filter-only passes. The result is checked
against five reference bit arrays:

* every tuple is in exactly one place;
* every target whose bits are all set is in its bucket;
* every target whose bits are not all set is on the rejected list;
* no rejected target has an equal source key.

To run one with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/himod_pkg.sv tb/himod_ref_pkg.sv tb/himod_dbcp_full_tb.sv \
    --top-module himod_dbcp_full_tb -o sim
./obj_dir/sim
```

Replace the testbench name for any other block. The packages must come first
on the command line, and `-y` finds the rest. The simulator starts
uninitialised state at random (`+verilator+rand+reset+2`); every register
that is read has a reset.
