# Exact multi-string matching with a Bloomier filter

This design scans a byte stream, one byte per clock, for any of up to
n = 16384 stored strings of L = 32 bytes each. It reports every position where
the last 32 bytes equal a stored string, together with that string's index.
Only on-chip memory is used, and the logic does not grow with the number of
strings.

The main idea is to use hashing that does not only say *whether* the window
might be a stored string, but also *which* one. Then one full-width compare
settles the question. There is never more than one candidate to compare, so
the worst-case rate is fixed. No false positives reach the output, and no
off-chip memory is needed.

## How a window is looked up

A **Bloomier filter** with k = 2 hash functions encodes a function from the
string set to indices:

* The **lookup table** D has m = 2n words of log2(n) bits.
* Each string x has two word addresses, h1(x) and h2(x).
* The host fills D so that `D[h1(x)] ^ D[h2(x)] = p(x)` for every stored
  string x. Here p(x) is x's index in the **result table**, which holds the
  n strings themselves.

For a window that is not a stored string, the same XOR still yields some
index. That is the filter's false positive. The matcher therefore reads the
string at that index and compares it with the whole window. The match is
declared only if they are equal. The index is output as `string_id`.

### Why the table can be filled

For each stored string, one of its two words is chosen as its own word, tau(x).
That word is then written last, as `D[tau(x)] = D[other(x)] ^ p(x)`. This works
if the strings can be ordered so that each string's tau(x) is not touched by
any string written before it. The host finds such an order by **peeling**:

* Think of a graph whose nodes are lookup words and whose edges are strings.
* Repeatedly take a word that only one remaining string uses, and make it
  that string's tau.
* Write the strings in the reverse of the peeling order.

Peeling fails for strings that lie on a cycle of this graph, or whose two
hashes coincide. With m = 2n the graph sits right at the threshold where cycles
appear, so a handful of strings usually cannot be encoded. In one simulation run, with
random strings on the first hash choice:

| n | strings left unencoded |
|---|---|
| 16384 | 2 |
| 4096 | 13 |
| 32768 | 74 |

A host then chooses new hash functions (new initial hash values or new
permutation tables) and tries again. Another option is to handle those few
strings some other way. The hardware has no part in this. Setup is host
software, and the testbenches contain a model of it.

## Hashing: pipelined Pearson hash

Each hash is built from **Pearson's hash**. It starts with `h = IHV` (the
initial hash value). Then, for each byte c in turn, it computes `h = T[h ^ c]`,
where T is a 256-entry permutation of 0..255.

* One Pearson element (`phe`) gives one byte.
* A hash block (`pearson_hash`, "PH") runs two elements with the same table
  but different IHVs. It joins the two bytes, `{hash(ihv_a), hash(ihv_b)}`,
  and keeps the low log2(2n) = 15 bits as the lookup address.
* The two blocks PH1 and PH2 use different permutation tables. They share the
  IHV pair: `ihv_a` goes to the first element of each block, `ihv_b` to the
  second.

**The pipeline.** Each `phe` is pipelined in L stages. Stage i has its own
register and its own copy of T. It does one XOR and one table read per clock.
The byte order is the part that needs care:

* The hash takes the window's **oldest** byte first.
* A window that is completed at clock t received its i-th byte at clock
  t − L + i. That is exactly the clock at which stage i works on it.
* So every stage simply consumes the byte entering *now*. On each clock the
  last stage finishes the hash of the window that the new byte completes.
* L hashes are in flight at once, each one stage further along, and no second
  copy of the window is needed.

The reference model in `tb/tb_bsm_pkg.sv` (`pearson_ref`) defines the hash
the same way.

**Loading T.** The L copies of T in an element are written together: one
host write updates every stage. `t_we[0]` loads PH1's table and `t_we[1]`
loads PH2's.

## Pipeline and timing

| edge | what happens |
|---|---|
| E0 | the byte is accepted: the window shifts and the last Pearson stage finishes the window's hash |
| E1 | both lookup words are read, one per port of a dual-port memory |
| E2 | `pointer = word_a ^ word_b` is registered |
| E3 | the candidate string is read from the result table |
| E4 | `out_valid`, `match` and `string_id` are valid |

After reset, a decision comes out for every accepted byte from the L-th byte
on, exactly 4 clocks after that byte. `in_valid` may drop at any time. The
window and hash pipelines then hold, and the back end keeps draining. The
throughput is 8 bits per clock.

The result is registered at two points in the published architecture: after
the hashes, and after the XOR. In this RTL those are E0 and E2. The two
memory reads are synchronous, like FPGA block RAM reads.

## Modules

| file | role |
|---|---|
| `rtl/bsm_pkg.sv` | default sizes (L = 32, n = 16384) and width helpers |
| `rtl/data_window.sv` | L-byte shift register, newest byte in bits [7:0]; `full` once L bytes have arrived |
| `rtl/phe.sv` | one Pearson hashing element, L pipeline stages, one table copy per stage |
| `rtl/pearson_hash.sv` | PH block: two `phe`, address = low log2(2n) bits of the two bytes |
| `rtl/lookup_table.sv` | 2n × log2(n) words, two registered read ports, one write port |
| `rtl/result_table.sv` | n × 8L-bit strings plus a per-entry `used` bit, registered read, write port |
| `rtl/bloomier_matcher.sv` | top: wires the above, XOR decode, compare, valid pipeline |

Parameters of the top:

* `STR_BYTES` (L, default 32).
* `NUM_STRINGS` (n, default 16384). It must be a power of two up to 32768,
  because the two hash bytes address at most 2^16 lookup words.

At the defaults the memories hold:

* lookup table: 32768 × 14 bits
* result table: 16384 × 256 bits

Together that is 4,653,056 bits, about 4.4 Mbit. On top of that come 4 × 32
copies of a 256-byte permutation table, which are small distributed memories
on an FPGA.

### Host port

Loading and updating goes through plain write ports that run alongside the
stream:

* `t_we`/`t_addr`/`t_data`: permutation tables
* `ihv_a`/`ihv_b`: initial hash values (static inputs)
* `lut_we`/`lut_addr`/`lut_data`: lookup words
* `rt_we`/`rt_addr`/`rt_data`/`rt_used`: strings

Writing `rt_used = 0` retires an entry at once. The testbench does this in
the middle of a stream. Adding a string, or rehashing, changes lookup words
that other strings use. Windows that are evaluated while such a rewrite is
half done may see a mix of old and new contents.

## Where this RTL goes beyond or departs from the published design

These points are choices made here:

* **Byte order of the hash.** The oldest byte is hashed first, as described
  above.
* **Concatenation order.** The two PHE bytes are joined as
  `{hash(ihv_a), hash(ihv_b)}`.
* **IHVs and tables.** The two elements of a PH share one permutation table
  and differ by IHV. The blocks PH1 and PH2 differ by table and share the IHV
  pair.
* **Shared table storage.** An FPGA build can store the tables of two
  elements that share an IHV in one 256 × 16 memory. Here every element keeps
  its own copies, which gives the same function.
* **Separate write ports.** The memories have their own write port. On a
  dual-port block RAM, host writes would have to share a port with the
  lookups.
* **The `used` bit.** The result table has a per-entry `used` bit, cleared by
  reset. Without it, an entry that was never loaded could match a window that
  equals its leftover contents.
* **Valid handling.** The `in_valid` pause, the `full` flag and the
  `out_valid` pipeline are added here. The published design assumes one byte
  arrives every clock, with no gaps.
* **Reset.** Only control state is reset. The tables, the hash stages and
  the window copies are not reset.
* **Out of scope.** Grouping strings by length or by prefix is left out. It
  is an optimisation that depends on the string set.

## Simulating

Every testbench in `tb/` checks itself and ends with the line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_data_window` | the window and `full` flag, with random pauses and a reset |
| `tb_phe` | one element against the Pearson reference, with pauses and two table loads |
| `tb_pearson_hash` | a PH address against two reference hashes |
| `tb_lookup_table`, `tb_result_table` | the memories against shadow arrays, including same-edge read/write and used bits |
| `tb_bloomier_matcher` | the whole matcher at the default size (details below) |
| `tb_matcher_sizes` | the same end-to-end harness (`tb_matcher_harness`) at L = 16 / n = 4096, L = 48 / n = 8192 and L = 64 / n = 32768 |

`tb_bloomier_matcher` runs the matcher at its default size. It does a full
host setup with 16384 random strings. It then streams 60,000 bytes with
stored, unstored and one-bit-corrupted strings embedded, and with random
pauses. Midway, one string is retired. The testbench checks every decision,
its 4-clock latency and `string_id`. It also counts each of these mechanisms
and fails if any never happens:

* true matches
* false positives removed by the compare
* pointers to unused entries
* input pauses
* live updates

Example with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_bloomier_matcher \
  -Irtl -Itb rtl/bsm_pkg.sv tb/tb_bsm_pkg.sv tb/tb_bloomier_matcher.sv \
  -y rtl -y tb -o sim
./obj_dir/sim
```

The full-size run builds in a few seconds and simulates in under a second.

## How far it has been checked

* Every RTL file passes Verilator lint and the slang front end.
* Every testbench above passes.
* For each testbench, a copy of its module with one deliberate bug was run
  against it, and the testbench failed.

Nothing has been placed and routed. Clock rate and FPGA resource use are
therefore unknown. The published implementation runs at 260 MHz on a
Virtex-4 FX100, about 2.1 Gbit/s.
