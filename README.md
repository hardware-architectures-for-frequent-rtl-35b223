# Frequent itemset mining accelerator with equivalence-class partitioning

Frequent itemset mining finds every set of items that occurs together in at
least `S_min` transactions of a dataset. This design does it in hardware
using *vertical binary vectors*. Each item is stored as a bit vector with one
bit per transaction. The support of an itemset is the number of set bits in
the AND of its items' vectors. Intersection and support counting therefore
reduce to AND gates and a population count.

The search space is split into **equivalence classes**. The class of item `a`
holds every itemset whose smallest item is `a`. Classes are disjoint, so they
can be mined one after another by a single accelerator (the *compact*
configuration) or in parallel by several (the *dual-core* configuration, the
default here). Inside a class the accelerator works breadth-first over a list
of itemsets that it keeps in external memory. It joins pairs that share a
prefix, much like Eclat. The number of items and the number of transactions
are limited only by external memory: a vector longer than the on-chip buffers
is processed in chunks.

## How a job runs

The host (a processor outside this RTL) writes the dataset into the 32-bit
external memory: item `i` is a vector of `W = ceil(n_trans/32)` words at
`vec_base + i*W`, bit `t % 32` of word `t / 32` set when transaction `t`
holds the item. It sets the configuration ports of `fim_top` and pulses
`start`.

1. **Items mining** (core 0 only). Each item's vector is streamed into the
   prefix BRAM while its bits are counted. A frequent item appends
   `{label, support}` (two words) to the frequent-item list at `fi_base`.
2. **Itemset mining** (all cores at once). Core `c` mines the classes
   `class_start[c] .. class_start[c+1]-1` of the frequent-item list. The last
   core mines up to the end of the list. `class_start = {0, 1}` gives the
   split used for two cores: core 0 takes the class of the first frequent
   item, which is the largest class, and core 1 takes all the others.
3. `done` pulses. `nf` is the length of the frequent-item list. For each core,
   `n_itemsets[c]` records of frequent itemsets with two or more items lie
   from `res_base[c]` to `res_end[c]`.

The result record (see `fim_pkg`) has a fixed stride of `2 + LW + W` words,
where `LW = MAX_K/2 = 16`:

| offset | content |
|---|---|
| 0 | cardinality k |
| 1 | support |
| 2 .. 1+LW | label: item j in bits `[16*(j%2) +: 16]` of word `2 + j/2`, unused items 0 |
| 2+LW .. | binary vector of the itemset, W words |

The records are both the output and the working list of the search.

## Mining one equivalence class

This is the part that needs the most care. For the class of frequent item
`p`:

* **2-itemsets.** `p`'s vector goes into the prefix BRAM. Each later frequent
  item `q`, in turn, goes into the suffix BRAM. The pair is intersected and
  counted. A frequent `pq` is appended as a record. The prefix stays in its
  BRAM for the whole pass.
* **k-itemsets.** A pointer `i` walks the class's records from the first one.
  Record `i` becomes the prefix. A second pointer `j` scans the records after
  it. Record `j` is joined with `i` only if it has the same cardinality and
  the same first k-1 items. The join writes label(i) followed by the last
  item of j. At the first record that fails either test, the prefix is
  *flushed* and `i` moves on. The class ends when `i` reaches the write
  pointer.

The scan can stop at the first mismatch because of the order in which records
are appended. Records that share a (k-1)-prefix are always contiguous, and the
records a prefix creates have cardinality k+1, so they come after the
cardinality-k group. For items a, b, c, d, all frequent except acd:

| prefix | suffix | new | frequent | then |
|---|---|---|---|---|
| ab | ac | abc | yes | keep ab |
| ab | ad | abd | yes | next is abc (k=3): flush ab |
| ac | ad | acd | no | next is abc: flush ac |
| ad | - | - | - | flush ad |
| abc | abd | abcd | no | flush; abd has no partner; class done |

Only frequent itemsets are written. Infrequent candidates leave no trace, so
the Apriori property is enforced without any extra check.

## Inside an accelerator (`fim_core`)

* **Prefix and suffix BRAMs** (`dp_bram`): true dual-port memories of
  `DEPTH = 31250` words. One vector of a million transactions fits in each.
* **Load Prefix / Load Suffix** (`vector_loader`): copy one chunk of up to
  DEPTH words from external memory into port A, issuing one read per cycle.
* **Intersection and counting** (`intersect_count`): in the counting pass,
  both ports of both BRAMs are read. Two prefix words are ANDed with two
  suffix words, and the 64 resulting bits are counted per cycle.
* **Support register, S_min register, comparator** (`support_acc`): the
  partial counts accumulate over all chunks, and `frequent = support >= S_min`.
* **Result store** (`result_writer`): if the itemset is frequent, the
  controller writes the record header (cardinality, support, concatenated
  label). The writer then reads the BRAMs again and writes the AND of each
  word pair to the record, one word per cycle.
* **Controller**: one FSM holds both stages. Its states are listed in
  `fim_pkg::core_state_t`. Labels are read from memory one word at a time
  into two label registers, one for the prefix and one for the suffix, each
  `MAX_K` items.

**Chunking and buffer reuse.** The vectors are processed in chunks of
`DEPTH` words. Each BRAM records the memory address of the chunk it holds,
and a load is skipped when the wanted chunk is already there. When a vector
fits in one chunk (up to 1,000,000 transactions), a prefix is therefore
loaded once for all its suffixes, and the write-out pass needs no reload.
Longer vectors reload the prefix chunks for every suffix, and again for the
write-out.

**Cost of one join** with a vector of W words that fits one chunk: loading
the suffix takes about W cycles plus the memory latency. Counting takes
`ceil(W/2)` cycles plus 4. A frequent result adds `2 + LW` single-word header
writes and then W vector writes. The prefix load is paid once per prefix. The
items stage takes about W cycles per item.

## Several cores (`fim_top`, `pe_scheduler`, `mem_arbiter`)

`pe_scheduler` runs the items stage on core 0. It then starts every core with
its class range and pulses `done` when all have finished. The cores exchange
nothing: they only read the shared frequent-item list and item vectors, and
each writes its own record area. `mem_arbiter` gives the one memory port to
the cores round-robin, one request per cycle. A FIFO of master numbers routes
the in-order read responses back. Reads wait when `OUTSTANDING` reads are in
flight.

## Memory bus

All units use `fim_pkg::mem_req_t {we, addr, wdata}` with `valid/ready`.
Addresses count 32-bit words. Writes are posted. Each read gets exactly one
response (`rsp_valid`, `rsp_data`), in request order, at any latency. There
is no back-pressure on responses. The memory must apply requests in the order
it accepts them, because the controller reads records soon after writing
them.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CORES` | 2 | accelerators (1 = compact configuration) |
| `DEPTH` | 31250 | words per BRAM = 1,000,000 transactions |
| `MAX_K` | 32 | longest itemset the label registers hold |
| `OUTSTANDING` | 16 | reads in flight in the arbiter (at least 2) |

Fixed in `fim_pkg`: 32-bit words and addresses, 16-bit item labels.

## Where this RTL departs from, or adds to, the architecture it implements

* The two stages, the two BRAMs, the AND/count/accumulate/compare datapath,
  the prefix/cardinality join rule, the class split between cores and the
  chunked loading follow the architecture.
* The following are this design's own choices: the memory bus, the result
  record format and stride, storing the support next to each label, the
  16-bit labels, `MAX_K`, the chunk tags, round-robin arbitration, running
  the items stage on core 0, and the host-set `class_start` table.
* The items stage counts bits while the vector is loaded, in one pass, rather
  than in a separate pass after loading.
* An itemset longer than `MAX_K` items is not formed. The core raises
  `k_overflow` and carries on, so the results are then incomplete.
* Item vectors are addressed by multiplying the item index by `W`, which
  costs one multiplier per core.
* The host processor, its UART and the external memory are not part of the
  RTL. The memory is modelled in `tb/offchip_mem_model.sv` for simulation.
* Throughput is as described above. The original design ran at 114 MHz on a
  Zynq-7020; no timing or area figures are claimed for this RTL.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. To run one with Verilator from the
repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fim_pkg.sv rtl/*.sv \
  tb/offchip_mem_model.sv tb/tb_fim_top.sv --top-module tb_fim_top -Mdir obj -o sim
./obj/sim
```

| testbench | what it covers |
|---|---|
| `tb_dp_bram`, `tb_intersect_count`, `tb_support_acc` | datapath units against models |
| `tb_vector_loader`, `tb_result_writer` | transfers with a stalling memory, one word per cycle otherwise |
| `tb_mem_arbiter` | three masters, response routing, no starvation |
| `tb_pe_scheduler` | stage order and class ranges, with stand-in cores |
| `tb_fim_core` | one core on random datasets against a brute-force count of all subsets, including chunked vectors and the count-pass rate |
| `tb_fim_top` | dual core, reduced sizes, and a count of every mechanism: chunk steps, prefix reuse, both flush reasons, frequent and infrequent candidates, cores running together, arbitration conflicts, memory stalls, full read FIFO, the `MAX_K` limit |
| `tb_fim_compact` | single-core configuration, a Chess-sized job (3196 transactions) |
| `tb_fim_full` | all defaults: 1,000,064 transactions and 5 items, so two chunks per vector, in about 3.7 M cycles |

The testbenches check the results, not the order in which they are written:
each record is compared with the brute-force support and AND-vector, and the
set of records must match exactly the set of frequent itemsets.
