# Decision-tree insertion policy for a last-level cache

A last-level cache (LLC) sees a filtered access stream. The L1 and L2 caches above it
already catch most reuse, so many blocks that reach the LLC are never touched again. Plain
LRU replacement inserts every new block at the most-recently-used (MRU) end of the recency
stack. A dead block then has to drift through all 16 stack positions before it is evicted,
and it pushes out blocks that would have been reused.

This design keeps LRU's recency stack but lets the cache choose *where a missing block
enters it*: at the LRU end, in the middle, or at the MRU end. The choice is made at run time
by a small decision tree of two "set duels". A few sets of the cache are leaders that each
always use one candidate policy. Saturating counters keep score of their misses, and all
other sets follow the winner. The tree is a reduced form of an earlier five-leaf
decision-tree policy (LRU, near-LRU, middle, near-MRU, MRU). The two "near" positions are
dropped, which leaves three leaves and less state to train.

The RTL models the tag side of the cache: lookup, hit promotion, victim choice, insertion
and the policy state. It reports which way hit or was filled and which block was evicted.
A data array can be attached to those outputs, but none is included.

## The recency stack

Each set has 16 ways. Each way carries a 4-bit *rank*: rank 0 is the LRU end, rank 15 the
MRU end. The ranks of a set always form a permutation of 0..15. All stack updates use one
operation: *move way w to rank p*. The ways between the old and new rank shift by one to
close the gap. Two uses follow:

| event | way moved | new rank |
|---|---|---|
| hit | the way that hit | 15 (MRU) |
| miss | the victim: first invalid way, else the way at rank 0 | 0, 7 or 15, chosen by the policy |

Inserting at rank 0 means the new block is the next victim unless it is hit first. This
suits streaming data. Rank 7 gives a block half a stack of protection. Rank 15 is classic
LRU. `lru_stack_update` is this arithmetic, and it is purely combinational.

## The decision tree

```
                 duel 1: middle vs MRU        (count1)
                /                    \
   duel 2: LRU-end vs middle          insert at MRU (rank 15)
          (count2)
         /          \
 insert at LRU     insert at middle
   (rank 0)          (rank 7)
```

### Set roles

`set_type_decoder` assigns every set one role. Within each block of 32 consecutive sets:

| offset | role | inserts at |
|---|---|---|
| 0 | middle leader | rank 7, always |
| 1 | MRU leader | rank 15, always; this is plain LRU |
| 2 | adaptive leader | rank 0 while `switched`=0, rank 15 while `switched`=1 |
| 3-31 | follower | the decision below |

With 1024 sets there are 32 leaders of each kind and 928 followers.

### Counters

Both counters are 10 bits wide (log2 of the number of sets), saturate, and reset to 512,
half the number of sets. Only misses in leader sets move them:

| miss in | count1 | count2 | switched |
|---|---|---|---|
| MRU leader | +1 | | |
| middle leader | -1 | -1 | |
| adaptive leader | | +1; if already at 1023: back to 512 | toggles when count2 was at 1023 |
| follower | | | |

A leader group that misses more pushes its counter toward the side where it loses. So
`count1 < 512` means MRU insertion beat middle insertion. `count2 >= 512` means middle
insertion beat the adaptive leaders.

### Follower decision

```
count1 <  512                    -> MRU
count1 >= 512 and switched = 0   -> middle if count2 >= 512, else LRU end
count1 >= 512 and switched = 1   -> MRU
```

The `switched` bit lets the second duel test more than one alternative to middle
insertion. The adaptive leaders start out testing LRU-end insertion. If that clearly loses
(count2 saturates at the top), they switch to MRU insertion and count2 restarts at the
midpoint. While `switched` is 1, the followers whose round-1 winner is "middle" insert at
MRU. If the adaptive leaders lose again, `switched` toggles back. The rule that flips
`switched` is this design's own. The published description only says the bit tracks the
policy used by the adaptive leaders.

The whole policy state is 21 flip-flops: two 10-bit counters and one bit. That is on top
of the 4-bit rank per way that any true-LRU cache already stores.

## Cache organisation and timing (`dta_llc`)

Defaults: 1 MiB capacity, 16 ways, 64-byte lines, so 1024 sets. Addresses are 64-bit byte
addresses, split as tag [63:16], set index [15:6] and offset [5:0]. The state of a set is
one 848-bit row in `set_ram`: per way a valid bit, a 48-bit tag and a 4-bit rank. The row
memory has a synchronous read port and a whole-row write port, like an SRAM macro.

| cycle | what happens |
|---|---|
| after reset | 1024 cycles clearing the rows; `req_ready_o` is low |
| 0 | `req_valid_i && req_ready_o`: the request is accepted and its row read |
| 1 | tags compared; the row is updated and written back; on a miss the policy counters are updated |
| 2 | `resp_valid_o` is high for one cycle; a new request can be accepted in this cycle |

Throughput is one access every two cycles and latency is two cycles. A second access to
the same set never sees a stale row, because the write-back happens before the next read.
Every miss allocates. The response carries:

- `resp_hit_o` and `resp_way_o`;
- `resp_ins_pos_o`, the insertion choice (`INS_LRU`, `INS_MIDDLE` or `INS_MRU`);
- `resp_set_type_o`;
- `resp_evict_o` and `resp_evict_addr_o`, the line address of the replaced block.

`count1_o`, `count2_o`, `switched_o` and `switch_event_o` expose the policy for
observation.

There is a single request port. When several cores share the cache, their accesses must be
serialised in front of it.

Two run-time checks are built in. The first is a valid/ready rule: a request that was not
accepted must stay valid with the same address. The second checks that the ranks of every
set looked up are a permutation.

## What follows the published scheme and what does not

Taken from the published scheme:

- the three insertion positions and the 16-entry stack, with the middle at rank 7;
- the two-level tree: middle vs MRU first, then LRU vs middle;
- the four set roles;
- the two counters and their thresholds at half the number of sets;
- the follower decision, including MRU when `switched` is 1;
- the 1 MiB, 16-way size. The scheme's description uses this size for the cache of the
  earlier decision-tree policy it modifies; its own evaluation does not state a size.

This design's own choices:

- the counters' step directions, width, saturation and reset value;
- which sets are leaders (offsets 0-2 of every 32);
- the rule that flips `switched`;
- the line size and address width;
- filling invalid ways first;
- the row layout;
- the two-cycle handshake;
- clearing the rows after reset.

One point of the published description reads two ways. One listing of the follower cases
also requires `count2 >= 512` for the two MRU outcomes. The algorithm itself ignores count2
there, and this design follows the algorithm.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_lru_stack_update` | directed moves, plus 3000 random permutations, moves and valid masks, against an ordered-list model of the stack |
| `tb_set_type_decoder` | the role of all 1024 sets, and 32 leaders of each kind |
| `tb_set_ram` | random reads and writes against a shadow array, read latency, and old data on a collision |
| `tb_dta_insert_policy` | about 26,500 biased random misses; the decision for all four roles and the counters after every clock, against an integer model; every branch of the tree and at least two switches must occur |
| `tb_dta_llc` | full default size, about 39,000 accesses in phases that steer the counters; every response against a complete reference model (recency lists, tags, counters); two-cycle latency; the 1024-cycle clear |
| `tb_dta_llc_thrash` | full default size, a cyclic pattern of 20 lines per 16-way set for 6 rounds |

`tb_dta_llc` requires each of these to occur at least once:

- hits;
- fills of empty ways;
- evictions;
- follower fills at the LRU end, at the middle, at MRU by round 1 and at MRU by `switched`;
- switches;
- back-to-back acceptance.

On the thrash pattern, plain LRU gets no hits at all. This cache gets 73,280 hits out of
122,880 accesses, and the followers settle on LRU-end insertion. The testbench compares
against an in-file LRU model.

No real program traces have been run. The miss counts of the published evaluation are not
reproduced here.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/dta_pkg.sv tb/tb_dta_llc.sv --top-module tb_dta_llc -o sim
./obj_dir/sim
```

Every run takes well under a second.

## Files

| file | contents |
|---|---|
| `rtl/dta_pkg.sv` | `ins_pos_e`, `set_type_e`, insertion-position helper |
| `rtl/lru_stack_update.sv` | recency-stack move and victim choice |
| `rtl/set_type_decoder.sv` | leader/follower roles |
| `rtl/dta_insert_policy.sv` | counters, `switched`, decision tree |
| `rtl/set_ram.sv` | per-set row memory |
| `rtl/dta_llc.sv` | top: controller tying them together |

Parameters worth changing: `CACHE_BYTES`, `LINE_BYTES`, `WAYS`, `MIDDLE_POS`,
`LEADER_STRIDE` and `ADDR_W` on `dta_llc`. The number of sets and all widths derive from
them. `LEADER_STRIDE` must be a power of two of at least 4.
