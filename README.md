# IPv4 address filter with a reconfigurable cuckoo hash function pair

A network filter must decide for every packet whether its source IPv4
address is on a list (a blacklist, a list of hosts to monitor) in the few
nanoseconds a high-speed link allows. This design keeps the list in a
**cuckoo hash table** with two parts and two hash functions `h` and `g`:
an address can only ever sit at `h(x)` in part 0 or at `g(x)` in part 1,
so a lookup is always exactly two parallel memory reads and a compare.

How full such a table can get before an insertion fails depends on how
well the two hash functions work *together* on the actual set of addresses.
Instead of a fixed general-purpose hash, the design therefore uses a
**reconfigurable hash function**: a 43-stage pipeline whose stages are
small configurable feedback functions, like a nonlinear feedback shift
register unrolled in space, with a different feedback function in every
stage. Software searches (by an evolutionary algorithm, not part of this
RTL) for a configuration that lets the given address set fill the table as
far as possible, and uploads it into a configuration register. The
hardware hashes one address per clock cycle whatever the configuration.

The design follows the filter described in R. Dobai, J. Korenek,
L. Sekanina, "Evolutionary design of hash function pairs for network
filters", *Applied Soft Computing*, 2017. The hash component, the
configuration format and the cuckoo procedure are theirs; the packet
parser, the memory interface, the sharing of the pipeline between lookup
and insertion and all handshakes are this implementation's own choices
(listed under "Choices and departures").

## Packet path

```
 pkt_hdr ─► ip_extractor ─► hash_pair (43 stages) ─► lookup_unit ─► packet_filter ─► verdict / log
              1 cycle        h, g, addr, tag           reads part0[h],     drop or
                                                       part1[g], compare   monitor
```

| step | module | cycles |
|---|---|---|
| take source address from the frame header | `ip_extractor` | 1 |
| compute `h` and `g` | `hash_pair` | 43 (`32 + HASH_BITS - 1`) |
| read both table parts | external memory | `RD_LAT` (2) |
| compare | `lookup_unit` | 1 |
| drop / log | `packet_filter` | 1 |
| **total, packet in to verdict** | `ip_filter_top` | **48** |

A new packet can enter every cycle and nothing in the packet path ever
stalls. Frames that are not IPv4 travel the same path without a memory
read and come out unmatched, so verdicts always leave in arrival order
and with the same latency.

## The reconfigurable hash function

### Stages

The hash state `S` is `HASH_BITS` = 12 bits wide. It starts at a constant
seed (0 for `h`, 1 for `g`) and passes through
`N_ST = 32 + 12 - 1 = 43` registered stages. Stage `i+1`:

1. shifts the state one place towards the MSB (`S[i+1][j] = S[i][j-1]`),
   dropping the old MSB;
2. writes the output of its function block `F[i+1]` into bit 0.

Stages 1..32 each mix in one address bit (`I_k` = address bit `k`, bit 0
first). The last 11 stages mix in 0: they only exist so that the last
address bit, which enters at bit 0 of stage 32, is shifted through all 12
bits and influences every hash bit. The hash is the state after stage 43.

### Function block

Each stage has its own configurable function block (`function_block.sv`):

```
F = I  ^  XOR_j (M[j] & S[j])  ^  (S[selA] & S[selB])  ^  (En & S[selC] & S[selD])
```

* `M` (12 bits) chooses which state bits enter the XOR;
* `selA`, `selB` pick the two inputs of a mandatory AND term;
* `selC`, `selD` pick those of a second AND term that `En` switches on.

At most two AND terms were chosen because feedback functions of
maximum-period NLFSRs mostly need no more. The configuration of one block
is one word of `HASH_BITS + 4*clog2(HASH_BITS) + 1` = 29 bits:

```
bit  28   27..24  23..20  19..16  15..12  11..0
     En   selD    selC    selB    selA    M
```

Select codes `>= HASH_BITS` (12..15 here) are outside the configuration
space; they select a constant 0.

A whole configuration is 2 functions x 43 blocks x 29 bits = 2494 bits,
held in flip-flops in `config_register.sv`. Any content, including the
all-zero reset value, is a legal configuration and gives a working hash;
how well it hashes depends strongly on the configuration (see "How good
a configuration must be" below).

### Input sequencer and pipelining

Stage `k+1` works on an address `k` cycles after the address entered, so
it needs bit `k` of that address delayed by `k` cycles. `input_sequencer`
provides exactly that with a triangle of shift registers (bit 0 undelayed,
bit 31 delayed 31 cycles, 496 flip-flops). One sequencer feeds both hash
functions. Result: a new address every cycle, each hash 43 cycles after
its address.

`hash_pair` adds a 43-deep side chain carrying a valid bit, the request
kind (lookup or insertion), the address and a tag, so that these leave
together with `h` and `g`.

## Cuckoo insertion

`cuckoo_inserter.sv` adds one address `x` at a time:

1. write `x` at `h(x)` in part 0;
2. if that slot was empty: done;
3. otherwise the previous occupant `y` is pushed out; hash `y`, write it
   into the *other* part at its position there (`g(y)` in part 1), and so
   on, alternating parts;
4. if the pushed-out address is `x` itself, the walk has gone round a
   cycle: the insertion fails (an *unresolvable collision*). The table then
   holds exactly the addresses it held before, rearranged, and `x` is
   returned as "not inserted".

Each step costs one trip through the hash pipeline (43 cycles), one read
(`RD_LAT`), one write and a few cycles of control: about 50 cycles per
push-out. Insertion is slow on purpose: the inserter uses the hash
pipeline and the memory ports only in cycles that no packet needs, so
table maintenance never delays a lookup. The result of each command
(`ins_res_ok`, `ins_res_ip`, `ins_res_kicks` = number of push-outs) is what
software needs to decide that the table is "full" for the current hash
pair and a new configuration should be searched for.

Two additions of this implementation: if `x` is already at `h(x)`, nothing
is written and the command succeeds; and a walk is cut off after
`MAX_KICKS` push-outs (default `4 * 2^HASH_BITS`), reporting the address
pushed out last as lost. With two tables the failure rule of step 4 always
ends a walk first in practice; the guard only bounds the worst case.

## External table memory and its sharing

The table (2 parts x 2^12 records of `{valid, ip[31:0]}`, 33 bits each)
is too large for on-chip memory in the intended use and lives in external
memory. Its two ports, one per part, are ports of `ip_filter_top`:
`mem_req`, `mem_we`, `mem_addr`, `mem_wdata` out; `mem_rvalid`,
`mem_rdata` in. A write happens in the cycle of the request; a read must
return data exactly `RD_LAT` cycles after its request (an assertion in
`table_arbiter` checks `mem_rvalid` against this). A memory with variable
latency needs an adapter in front of these ports.

`table_arbiter.sv` gives the ports, in order of priority, to lookups
(both parts at once), host writes (`tw_*`, one record of one part), and
the inserter. A waiting host write or inserter access holds its request
until granted.

## Configuration changes

Software uploads a configuration one word per cycle
(`cfg_wr_en/fn/idx/data`); a word is used from the next cycle on, also by
addresses already in the pipeline. Records already in the table stay
where the old hash pair put them, so after a new configuration the table
must be rebuilt: clear it with host writes and insert the addresses again,
or write a table that software has built for the new configuration
directly with host writes. Packets can be held back, or their verdicts
ignored, while this happens.

## Parameters (`ip_filter_top`)

| parameter | default | meaning |
|---|---|---|
| `HASH_BITS` | 12 | hash width; table = 2 x 2^HASH_BITS records; 32 + HASH_BITS - 1 stages |
| `RD_LAT` | 2 | read latency of the external memory, cycles |
| `PKT_ID_W` | 16 | width of the packet tag carried to the verdict |
| `MAX_KICKS` | 4 << HASH_BITS | push-out limit of one insertion |

Larger tables only need a larger `HASH_BITS`: 13 gives 16k records, 16 gives
128k records (47 stages). The address width is fixed at 32 (IPv4).

## Files

`rtl/` (one module or package per file):

| file | contents |
|---|---|
| `hash_pkg.sv` | sizes, width functions, request kind, filter action, table record type |
| `function_block.sv` | configurable feedback function of one stage |
| `input_sequencer.sv` | triangular delay line for the address bits |
| `reconf_hash.sv` | one 43-stage hash function |
| `hash_pair.sv` | sequencer + two hash functions (seeds 0 and 1) + side chain |
| `config_register.sv` | configuration storage and upload port |
| `ip_extractor.sv` | Ethernet/IPv4 source-address parser |
| `lookup_unit.sv` | two-part read and compare |
| `cuckoo_inserter.sv` | cuckoo insertion engine |
| `table_arbiter.sv` | memory-port sharing |
| `packet_filter.sv` | drop / monitor decision |
| `ip_filter_top.sv` | top level |

`tb/`: a self-checking testbench per module (`tb_<module>.sv`), plus

* `tb_hash_ref_pkg.sv`: reference models written from the description,
  not from the RTL: a function block evaluated bit by bit, a hash as a
  loop over the stages, cuckoo insertion on two arrays;
* `ext_mem_model.sv`: behavioural model of the external table memory;
* `tb_ip_filter_top.sv`: end-to-end test at `HASH_BITS = 5`;
* `tb_ip_filter_full.sv`: the top at its default parameters;
* `tb_ip_filter_tables.sv` with helper `tb_table_fill.sv`: the larger
  table sizes.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/hash_pkg.sv tb/tb_hash_ref_pkg.sv tb/tb_ip_filter_full.sv \
    --top-module tb_ip_filter_full -o sim
obj_dir/sim
```

Replace the testbench name for the others. The testbenches use `$urandom`;
add `+verilator+seed+N` to vary the data.

What the testbenches establish:

* the function block, sequencer, single hash and hash pair agree with the
  reference for random and structured configurations, with the hash
  exactly 43 cycles after its address;
* the inserter gives the same result, push-out count and final table as the
  reference cuckoo insertion, including both ways of failing;
* the arbiter keeps its priorities and returns only the inserter's read
  data to it;
* end to end (`tb_ip_filter_top`), with insertions running under packet
  traffic, every mechanism occurs and is counted: configuration upload,
  insertion without and with push-outs, repeated insertion, unresolvable
  collision, inserter waiting for the pipeline and for a memory port,
  host writes and host writes waiting, hits, misses, non-IPv4 frames,
  drop and monitor modes, and reconfiguration with rebuild; all verdicts
  taken on a stable table match the reference, and every verdict arrives
  in order after 48 cycles;
* at full size (`tb_ip_filter_full`, about 10 s), random addresses are
  inserted into the 8k table until the first unresolvable collision, and
  then every stored address and as many absent ones are looked up back to
  back, one per cycle. This is done twice: with one function block shaped
  like a published example copied into every stage (about 27 % of the
  records filled), then, after clearing the table with host writes and
  uploading a new configuration, with random invertible stages (about
  33 % with the default seed);
* `tb_ip_filter_tables` (about 1.5 min) does the same for tables of 16k,
  32k, 64k and 128k records (`HASH_BITS` 13 to 16) with random invertible
  stages; the first failure came at 48-52 % load for 16k-64k and, in an
  unlucky draw, at 11 % for 128k. The point of the first failure varies
  from run to run.

### How good a configuration must be

A stage drops the state MSB. If its function does not contain that bit
linearly (mask bit set, not used by an AND term), two states can map to
the same next state, and a run of such stages, especially in the 11 zero
stages, shrinks the set of reachable hashes. Configurations drawn
completely at random are therefore poor hashes: in tests they filled only
3-9 % of a table. Configurations whose stages are all invertible behave
like good random hash functions and reach roughly the 50 % that cuckoo
hashing with two independent functions allows. A configuration tuned for
the address set is what makes the table fill further: the original work
reports 61-64 % of an 8k table on real address sets with evolved
configurations, against 25-55 % for conventional hash functions. Neither
those address sets nor the search are part of this repository, so these
figures are not reproduced here.

## Choices and departures

* **Latency 43 vs 44 cycles.** The hash component is built with 43
  registered stages, one per function block, giving 43 cycles. The
  original resource table lists 44 cycles for its implementation,
  probably counting an extra input or output register.
* **Shift direction.** State bits move from bit 0 towards bit 11 and the
  new bit enters at bit 0; this is the only reading under which the last
  address bit reaches every output bit in the 11 zero stages.
* **Bit order.** Address bit `k` (bit 0 = least significant bit of the
  address as a 32-bit number in network order) is mixed in at stage `k+1`.
* **Seeds** are constants (0 and 1), not configurable.
* **Configuration word layout**, upload port, reset value (all zeros) and
  the fact that a new word acts immediately are this design's choice.
* **Packet side.** Only the decision is produced (verdict and log record
  per packet tag); buffering the packet bodies is left to the surrounding
  system. The parser handles untagged Ethernet II + IPv4 only.
* **Memory.** Fixed read latency, one port per table part, lookups first;
  none of this is fixed by the original.
* **Insertion vs. lookup.** While an insertion moves records, a lookup of
  an address that is being moved can miss for a few cycles. Rebuild the
  table, or insert, when such misses are acceptable.
* **Resources.** The original reports about 951 LUTs and 1664 registers
  for the hash component on a Zynq XC7Z020 at 260 MHz. Here the hash
  pair alone has about 1400 flip-flops plus the 43-deep side chain, and
  the configuration register adds 2494 flip-flops. Timing has not been
  measured.
* **Not included:** the evolutionary search and its software table
  simulator, which run on a host and deliver only the configuration words,
  and the external memory device itself.
