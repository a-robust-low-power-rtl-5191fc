# T-SRAM: a ternary CAM built from ordinary SRAM

A ternary content-addressable memory (TCAM) answers the question "which stored
entry matches this key?" in a fixed time. Each stored bit may be 0, 1 or x
(don't care). When several entries match, the lowest address wins. Real TCAM
cells put a comparator next to every storage bit, so they are large, slow and
costly. T-SRAM gives the same search result using only small SRAMs plus a
little glue logic: AND gates and priority encoders.

This RTL models a 512-entry, 8-bit T-SRAM ("512 x 8"). All sizes are
parameters.

## The idea: split the table both ways

The TCAM table is cut in two directions:

* **Horizontally into L layers** of K entries each. Entry `A` lives in layer
  `A / K` as local entry `k = A % K`.
* **Vertically into N partitions** of W bits each. An 8-bit entry becomes
  two 4-bit sub-words.

A W-bit sub-word can take only 2^W values, so each partition of a layer can
simply store, for every possible sub-word value `s`, the answer to "which of
my K entries accept `s` here?". That answer is a K-bit row. Three small
memories per partition hold it:

| memory | size | contents |
|---|---|---|
| VM (validation memory) | 2^W x 1 | `VM[s] = 1` if at least one entry of the layer accepts `s` in this partition |
| OATAM (original address table address memory) | 2^W x W | `OATAM[s]` = the OAT row that holds the K-bit answer for `s` |
| OAT (original address table) | 2^W x K | bit k of the row = entry k accepts `s` in this partition |

A key matches entry k exactly when every one of its sub-words is accepted by
entry k. So a search reads one OAT row per partition and ANDs the N rows bit by
bit. The surviving bits are the matching entries of the layer, and a priority
encoder picks the lowest one. Don't-care bits cost nothing at search time.
They only make more OAT rows carry a 1 for that entry.

The VM is a cheap early exit. If some sub-word of the key is accepted by no
entry of the layer, the AND of the VM bits (the **activation signal**) is 0.
The layer then never reads its OATAMs and OATs, which saves read energy.

## Search path

```
 key ─┬─ sub-word 1 ─► VM1 ─┐                ┌► OATAM1 ─► OAT1 ─┐
      ├─ sub-word 2 ─► VM2 ─┼► 1-bit AND ────┼► OATAM2 ─► OAT2 ─┼► K-bit AND ─► LPE ─► PMA, hit
      └─ ...               ─┘  (activation)  └► ...            ─┘
 all L layers in parallel ─► CPE ─► MA (match address), ma_match
```

Every memory is a synchronous SRAM: the address is registered and the data
comes out one clock later. The layer is therefore a four-stage pipeline:

| clock | what happens (`rtl/tsram_layer.sv`) |
|---|---|
| t0 | each sub-word addresses its VM |
| t1 | 1-bit AND of the VM bits. If it is 1, the OATAMs are read at the same sub-words |
| t2 | the OATAM outputs (OATA) address the OATs |
| t3 | K-bit AND of the N rows (forced to 0 if the layer was not activated); the layer priority encoder (LPE) picks the lowest set bit |
| t4 | `out_hit` / `out_pma` (potential match address) registered |

The CAM priority encoder (CPE, `rtl/tsram_cpe.sv`) takes the lowest layer that
hits and forms `MA = layer * K + PMA`. Its output is registered. A key taken at
clock t0 therefore gives `ma_valid` at t0 + 5. A new key can enter on every
clock, and results come out in key order.

## Writing entries: the mapper

Inserting one TCAM entry means changing bit k of up to 2^W rows in each
partition of one layer. `rtl/tsram_mapper.sv` does this with a
read-modify-write of every sub-word `s = 0 .. 2^W-1`. All N partitions are
handled in parallel:

1. It injects `s` into the target layer's pipeline with a *force* flag. The
   flag bypasses the VM check, so the OATAM and OAT of `s` are read whatever
   the VM says.
2. Three clocks later the layer returns the N OAT rows and the OATAs they came
   from (`upd_rows_valid`).
3. In that same clock the mapper writes bit k of each row back. The bit is 1
   for an insert whose ternary sub-word n covers `s` (value and don't-care
   mask), and 0 otherwise or for a delete. The VM bit of `s` is rewritten as
   the OR of the new row. A delete can therefore clear a VM bit that no other
   entry needs.

One sub-word takes 4 clocks, so an update takes `4 * 2^W` clocks (64 by
default). `upd_done` pulses one clock after the last write. While the mapper
works, `busy` is high and `search_ready` is low. A key taken before the update
request still sees the old table, because all of its reads happen before the
mapper's first write.

After reset the mapper spends `2^W` clocks clearing every VM and OAT row. It
also loads each OATAM with the identity map, `OATAM[s] = s`. The SRAM arrays
themselves are never reset.

## Worked example

The table holds four entries at locations 0 to 3, each of which matches the key
`0101_0101`:

| location | entry |
|---|---|
| 0 | `0101 0101` |
| 1 | `0101 xxxx` |
| 2 | `xxxx 0101` |
| 3 | `xxxx xxxx` |

Location 511 holds `xx11 1111`. In partition 0 (the low nibble), the OAT row
for `0101` has bits 0 to 3 set. In partition 1, the row for `0101` also has
bits 0 to 3 set. Their AND is `...1111`, the LPE returns PMA 0, and layer 0 is
the lowest layer that hits, so `MA = 0`. After location 0 is deleted, the same
key returns `MA = 1`. The key `1111 1111` is accepted only by location 511 in
layer 7 (`MA = 511`). The key `0101 1111` is rejected by the VMs of every layer
before any OAT is read.

## Interface (`rtl/tsram.sv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `search_valid`, `search_ready` | in/out | 1 | key handshake (`search_ready = !busy`) |
| `search_key` | in | N*W | key |
| `ma_valid` | out | 1 | result, 5 clocks after the key was taken |
| `ma_match`, `ma` | out | 1, log2(L*K) | some entry matched; lowest matching address |
| `ma_layer_act` | out | L | per layer: the key passed the 1-bit AND (status) |
| `upd_valid`, `upd_ready` | in/out | 1 | update handshake |
| `upd_addr` | in | log2(L*K) | entry address |
| `upd_value`, `upd_dc` | in | N*W | entry value; don't-care mask (1 = x) |
| `upd_insert` | in | 1 | 1 = write the entry, 0 = delete it |
| `upd_done`, `busy` | out | 1 | update finished; clearing or updating |

Parameters (package `tsram_pkg` holds the defaults):

| parameter | default | meaning |
|---|---|---|
| `W` | 4 | bits per sub-word |
| `N` | 2 | sub-words per entry (word = N*W = 8 bits) |
| `K` | 64 | entries per layer |
| `L` | 8 | layers (L*K = 512 entries) |

Memory at the defaults is 8 layers x 2 partitions x (16x1 + 16x4 + 16x64) bits,
which is 17,664 bits. K and L must be powers of two, because the address is
split into layer and local index by bit slicing. Memory grows as
`L * N * 2^W * (1 + W + K)` bits. Wider words should use more partitions, not
wider sub-words.

## What is specified and what is chosen here

The architecture defines the following, and this RTL follows it:

* the layer and partition structure;
* the sizes of VM (2^W x 1), OATAM (2^W x W) and OAT (2^W x K);
* the 1-bit AND whose activation signal enables the OATAMs;
* the K-bit AND;
* the layer priority encoder, and a CAM priority encoder over the layers'
  PMAs;
* the lowest location winning;
* the 512 x 8 size and W = 4 as the example sub-word width.

The following are choices made for this RTL:

* **N = 2, K = 64, L = 8.** Only the totals (8-bit words, 512 entries) are
  fixed.
* **Priority across layers.** Layer 0, which holds the lowest addresses, wins.
* **Timing.** Each memory is a synchronous SRAM, which gives the 4+1 stage
  search pipeline and the 5-clock latency.
* **Updates.** The update port, the mapper's read-modify-write sequence, the
  identity OATAM map and the force flag used for read-back are all this
  design's own. How a table is "mapped onto the memory blocks" is given only
  as a function.
* **Searches stop during updates.** Searches are not accepted while an update
  runs.
* **Reset.** The reset style, and clearing the memories after reset.

A published FPGA build of this architecture has a different external
interface: a 9-bit address, 32-bit data ports, a "tag" input and an
enable/preset. The roles of those ports are not defined, so they are not
reproduced here. Its reported power (0.024 W on a small Spartan-3) describes
that build and is not modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tsram_tb` | Whole design at default size. Compared with a reference TCAM: matches, addresses, per-layer activation, 5-clock latency, 65-clock update, 16-clock clear. Includes the worked example, then about 250 random inserts, overwrites and deletes and about 800 searches. It counts VM early rejections, K-bit AND misses, LPE and CPE choices between several matches, stalled and back-to-back searches, deletes and overwrites, and fails if any of them never occurs. |
| `tsram_full_table_tb` | All 512 entries written, then all 256 keys searched back to back and compared with the reference. Half the entries are then deleted and every key is searched again. |
| `tsram_layer_tb` | One layer with a random OATAM permutation, compared with a model of its memories. Covers search results and the read-back path. |
| `tsram_mapper_tb` | Mapper against an array model of the layers. After every update, all VM/OATAM/OAT contents are compared with what the entry table implies. |
| `tsram_vm_tb`, `tsram_oatam_tb`, `tsram_oat_tb` | Random reads and writes, read-enable hold, read-before-write. |
| `tsram_and1_tb`, `tsram_andk_tb`, `tsram_lpe_tb`, `tsram_cpe_tb` | Exhaustive or random checks against loops in the testbench. |

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tsram_pkg.sv tb/tsram_tb.sv --top-module tsram_tb -o sim
./obj_dir/sim
```

For any other testbench, replace `tsram_tb` with its name. The full-size
end-to-end test finishes in well under a second.

## Files

`rtl/tsram_pkg.sv` holds the defaults and the sub-word match function. The
modules are:

* `tsram.sv`: top;
* `tsram_layer.sv`: layer;
* `tsram_vm.sv`, `tsram_oatam.sv`, `tsram_oat.sv`: the three memories;
* `tsram_and1.sv`: 1-bit AND;
* `tsram_andk.sv`: K-bit AND;
* `tsram_lpe.sv`, `tsram_cpe.sv`: the priority encoders;
* `tsram_mapper.sv`: mapper.

`tb/` holds one testbench per module.
