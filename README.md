# S-NIC: hardware isolation for network functions on a shared smart NIC

A smart NIC runs network functions (firewalls, NATs, load balancers, DPI
engines) from several cloud tenants on its own cores, accelerators and DRAM.
On commodity smart NICs these functions share physical memory, the
accelerators, the packet buffers and the IO bus. The NIC's management OS can
also see all of it. One tenant can therefore read or corrupt another's
state, or watch it through contention.

This RTL implements the hardware half of S-NIC, which closes those paths. A
small trusted launch controller carves the NIC into up to 12 *virtual NICs*.
Each virtual NIC gets:

- dedicated cores;
- dedicated accelerator thread clusters;
- a share of the RX/TX packet buffers;
- a set of 2 MB DRAM pages.

Every path from a core, an accelerator cluster, a packet scheduler or a DMA
engine into DRAM passes through a TLB. The controller fills that TLB from the
function's page table and then **locks** it. From then on, nothing can change
the mapping, and a miss is a fault, not a page walk. The management OS keeps
running but is locked out: an ownership table acts as its denylist. DRAM
traffic is time-sliced, so that no domain's timing depends on another's.

## Block map

```
             NIC OS (cmd_*) ─────────────┐
                                         ▼
                                ┌──────────────────┐  tmem_* (own DRAM port)
                                │ nf_ctrl          │──────────────────────────►
                                │  page_owner      │
                                │  sha256_core     │
                                └──┬───────────┬───┘
              TLB writes + locks   │           │ rules, shares, ring address
    ┌─────────────┬────────────────┼───────────┼─────────────┬──────────────┐
    ▼             ▼                ▼           ▼             ▼              ▼
 core TLBs   NIC OS TLB       vaccel x3    pkt_input ─► vpp_sched     dma_bank x12
 (lock_tlb   (lock_tlb,       (DPI, ZIP,   (rule match,  (per-VPP      (NIC + host
  x48)        filtered by      RAID; 16     RX shares)    locked TLB,   locked TLBs)
              the denylist)    cluster                    ring writes)
                               TLB banks)  pkt_output (TX shares, round robin to wire)
    │             │                │                          │
    └─────────────┴──────┬─────────┴──────────────────────────┘
                         ▼
                   bus_arbiter (temporal partitioning, 13 domains)
                         ▼
                   bus_* to DRAM
```

| file | role |
|---|---|
| `rtl/snic_pkg.sv` | Shared sizes and types: 2 MB pages, 33-bit physical address, 12-bit PPN, 11-bit VPN, TLB entry, flow key, instruction codes, page-table entry decode. |
| `rtl/lock_tlb.sv` | Fully associative TLB bank that is written while unlocked, then locked read-only. Lookup is combinational; a miss sets a sticky fault. |
| `rtl/page_owner.sv` | Owner of every physical page. It answers the controller's queries and the NIC OS's "may I map this page" check. |
| `rtl/sha256_core.sv` | SHA-256 compression, one round per clock (64 cycles per 512-bit block). |
| `rtl/nf_ctrl.sv` | The three trusted instructions: `nf_launch`, `nf_teardown`, `nf_attest`. |
| `rtl/bus_arbiter.sv` | Epoch-based bus arbiter. One security domain per epoch, with issue cut off for the last `DEAD` cycles. |
| `rtl/vaccel.sv` | One virtualised accelerator: per-cluster locked TLB banks plus a fixed-slot front-end scheduler. |
| `rtl/pkt_input.sv` | RX side: first-match rule on 5-tuple + VNI, per-VPP queue capped at its share. |
| `rtl/vpp_sched.sv` | One scheduler per virtual packet pipeline (VPP). It writes each RX descriptor into the function's ring through its own 3-entry locked TLB. |
| `rtl/pkt_output.sv` | TX side: per-VPP queues capped at their share, round robin onto the wire. |
| `rtl/dma_bank.sv` | One bank of the NIC/host DMA controller: 2 locked NIC-side and 2 locked host-side entries. |
| `rtl/snic_top.sv` | Everything above, wired together. |

Not in the RTL; their connections are ports of `snic_top`:

- the cores themselves and the NIC OS core;
- DRAM;
- the Ethernet MACs;
- the host bus;
- the accelerator engines;
- the RSA signer used for attestation;
- cache partitioning.

## The trusted instructions

All allocation state lives in `nf_ctrl`, and only `nf_ctrl` drives the TLB
write, lock and clear strobes. The NIC OS supplies arguments; the hardware
checks them.

### `nf_launch(core_mask, pt_ptr, pt_count, cfg_ptr, accel_mask)`

1. **Immediate checks.** Every requested core and cluster must be free. A
   function id in 1..12 must be free; the lowest free id is used. Also,
   1 ≤ `pt_count` ≤ `PT_MAX` (183).
2. **Page-table walk.** `pt_count` 64-bit entries are read from `pt_ptr`.
   Each must be valid and name a page with no owner. The entries are copied
   into the controller, so the OS cannot change them between check and use.
3. **Configuration.** Eight words are read from `cfg_ptr`. The RX and TX
   shares must fit in what remains of the buffer pools.
4. **Commit.** This starts only after every check has passed, so a refused
   launch changes nothing. The commit:
   - marks each page owned, which at once denylists it for the NIC OS;
   - writes entry *i* into entry *i* of every TLB the function gets: its
     cores, its clusters, its VPP scheduler and its NIC-side DMA bank. A
     smaller TLB takes only the leading entries;
   - writes the two host-side DMA entries;
   - installs the switching rule and the buffer shares;
   - locks all those TLBs.
5. **Measurement.** A single SHA-256 is computed over three things, in order:
   - the page-table entries;
   - the eight configuration words;
   - the contents of every page (2^`HASH_WORDS_LOG2` words per page; the
     whole 2 MB page by default).

   The digest is stored as the function's launch hash and returned with the
   id.

Page-table entry format, one 64-bit word per 2 MB page:

| bits | field |
|---|---|
| 63 | valid |
| 42:32 | virtual page number |
| 11:0 | physical page number |

Launch configuration (`cfg_ptr`, 8 words):

| word | contents |
|---|---|
| 0 | RX share `[15:0]`, TX share `[31:16]`, in descriptors |
| 1, 2 | 128-bit switching-rule key: src IP, dst IP, proto, src port, dst port, VNI (VNI in word 2 `[23:0]`) |
| 3, 4 | 128-bit mask for the key; a 1 bit must match |
| 5, 6 | host-side DMA mappings, page-table-entry format |
| 7 | virtual address of the function's RX descriptor ring |

### `nf_teardown(nf)`

The controller scans the ownership table. For every page the function owns,
it writes zeros over the hashed words, then frees the page. In the default
configuration that is the whole page. It then:

- clears and unlocks the function's TLBs;
- removes its rule and buffer shares;
- frees its cores and clusters;
- pulses `scrub_cores` for the cores, whose registers and caches are outside
  this design.

### `nf_attest(nf)`

Returns the stored launch hash. Signing it with the attestation key is left
to the external signer.

### Timing

- **Start-up.** After reset the ownership table clears one page per cycle,
  4096 cycles for 8 GB. `cmd_busy` stays high until it is done.
- **Refused launch.** `cmd_busy` also stays high while the SHA-256 engine
  finishes a block left by a refused launch.
- **Launch.** The hash dominates: about 65 cycles per 8 words. A one-page
  launch at default size takes 2.13 M cycles.
- **Teardown.** About one cycle per page of the table, plus one per zeroed
  word.
- **Memory port.** The controller has its own DRAM port (`tmem_*`), with one
  access outstanding, and never contends for the arbitrated bus.

## Memory isolation

- **Cores.** Each of the 48 cores has a 183-entry TLB: 366 MB of 2 MB pages,
  enough for the largest function profiled, a traffic monitor at 360.5 MB.
  Before launch the TLB is empty, so a core translates nothing. A miss sets
  `core_fault[c]` and the request is refused with `core_err`.
- **Fatal misses.** A translation miss by a core or cluster of a live
  function, or by its packet scheduler, is treated as a bug in that
  function, and the hardware destroys it. `snic_top` queues a teardown of the
  function and gives it to the controller ahead of any NIC OS command;
  `cmd_busy` stays high meanwhile. The end of the teardown is reported on
  `kill_valid`/`kill_nf`, not on `resp_valid`.
- **NIC OS core.** Its TLB (`OS_TLB` = 16 entries) stays writable. However,
  every install on `os_inst_*` is checked against `page_owner`: an install of
  a page that any function owns is refused (`os_inst_rej`).
- **Accelerators.** DPI, ZIP and RAID each have 16 thread clusters. Each
  cluster has its own bank of 54, 70 or 5 entries. Several functions can
  share one accelerator by owning different clusters. The front-end
  scheduler gives every cluster a fixed slot in rotation, whether it uses the
  slot or not, so one cluster's load cannot shift another's access times.
- **Packet schedulers and DMA.** Each VPP scheduler has a 3-entry TLB, for
  the packet buffer, descriptor buffer and output buffer. Each DMA bank has
  2 NIC-side entries (packet buffer and DMA instruction queue) and 2
  host-side entries. A transfer is allowed only if both sides translate.

## Bus partitioning

`bus_arbiter` divides time into epochs of `EPOCH` cycles (default 64) and
gives each epoch to one security domain in strict rotation. The domains are
the NIC OS (0) and the 12 functions (1..12), and epochs rotate whether or not
the owner has traffic. Within an epoch, only that domain's clients may issue,
round robin. The last `DEAD` cycles (default 16) of every epoch allow no new
issue, so a request cannot still be in flight when the next domain starts.
DRAM latency must therefore be at most `DEAD`.

A bus client's domain comes from the controller. A core or cluster takes the
id of the function whose launch locked its TLB; VPP scheduler *v* belongs to
function *v*+1.

## Packet path

- **RX.** `pkt_input` compares each arriving key with the enabled rules,
  under the mask. The lowest-numbered match wins.
  - A packet whose VPP queue already holds its share is dropped
    (`rx_drop_full`), so a burst to one function never takes buffer space
    from another.
  - A packet with no matching rule is dropped (`rx_drop_nomatch`).
- **Ring delivery.** `vpp_sched` takes each queued descriptor and writes it
  to `ring_va + 8·slot` through the VPP's own locked TLB, as a bus write in
  that function's epoch. The ring has `RING_SLOTS` slots and wraps. An
  address that does not translate drops the descriptor and sets
  `vpp_fault`.
- **TX.** A function hands descriptors to `pkt_output`. `tx_ready` falls
  when its TX share is full. The port drains the queues round robin whenever
  `wire_ready` is high.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `NUM_CORES` | 48 | programmable cores |
| `CORE_TLB` | 183 | entries per core TLB, and the longest page table a launch accepts |
| `OS_TLB` | 16 | NIC OS TLB entries (own choice) |
| `ACL_CLUSTERS` | 16 | clusters per accelerator (4 threads each) |
| `DPI_TLB` / `ZIP_TLB` / `RAID_TLB` | 54 / 70 / 5 | entries per cluster bank |
| `VPP_TLB` / `DMA_TLB` | 3 / 2 | scheduler and DMA TLB entries |
| `RX_DEPTH` / `TX_DEPTH` | 64 | queue depth per VPP; also the largest share (own choice) |
| `RING_SLOTS` | 64 | RX ring size in descriptors (own choice) |
| `EPOCH` / `DEAD` | 64 / 16 | bus epoch and dead time in cycles (own choice) |
| `HASH_WORDS_LOG2` | 18 | words hashed and scrubbed per page (18 = whole 2 MB page) |

The number of virtual NICs (12), the page size (2 MB) and the physical page
count (4096, so 8 GB) are in `snic_pkg`.

## Where this design departs from S-NIC, or fills gaps

- **Number of schedulers and DMA banks.** S-NIC's text gives one scheduler
  unit and one DMA bank per programmable core. Its cost tables count 12
  VPP/vDMA units, 4 cores per function. The RTL follows the tables: one VPP
  scheduler and one DMA bank per function.
- **Instruction encoding.** S-NIC's `nf_launch` takes six register arguments,
  of which four are described. This design takes the four described ones,
  plus the page-table length. The page-table format and the
  configuration-word layout above are this design's own.
- **Packet scheduling.** The scheduling algorithm is fixed to round robin,
  not chosen at launch. RX delivery writes the 64-bit descriptor only;
  copying payload bytes from the port buffers into the function's packet
  buffer is not built.
- **DMA data mover.** The DMA bank checks and translates both addresses. The
  engine that moves the data over the host bus is not built.
- **Ownership table.** The denylist is a per-page ownership table (4 bits
  per page), consulted on every NIC OS TLB install. It is not a denylist page
  table walked by the OS core's MMU.
- **Controller memory port.** The launch controller reads and writes DRAM on
  its own port, not through the arbitrated bus.
- **What the hash covers.** It covers the page table, the configuration
  words and the page contents. S-NIC describes it as covering code, data
  and switching rules. Here the rules are in the configuration words.
- **Not built:**
  - page sizes other than 2 MB;
  - cache partitioning;
  - attestation signing and key storage;
  - the accelerator engines.
- **Reset.** Reset is synchronous and active low throughout. TLB lookups are
  combinational.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/snic_pkg.sv tb/tb_sha256_pkg.sv tb/tb_snic_top.sv \
  --top-module tb_snic_top -o sim && obj_dir/sim
```

`tb/tb_sha256_pkg.sv` holds the reference SHA-256 that the testbenches use to
predict launch hashes. Any other testbench builds the same way; swap the file
and `--top-module`.

| testbench | what it shows |
|---|---|
| `tb_lock_tlb` | Writes before lock, ignored writes after lock, hit/miss, sticky fault, clear. |
| `tb_page_owner` | Post-reset sweep length and owner updates against a model. Also the install check for random pages. |
| `tb_bus_arbiter` | Domain rotation and dead time. Also one-hot grants and round robin within a domain, under random traffic. |
| `tb_sha256_core` | Standard test vectors, random multi-block messages, and 64 cycles per block. |
| `tb_pkt_input`, `tb_pkt_output` | Matching, masks, priority, shares, drops, FIFO order and round robin, each against a model. |
| `tb_vaccel` | Per-cluster translation, isolation between clusters, faults and the fixed slot rotation. |
| `tb_vpp_sched`, `tb_dma_bank` | Ring addressing and wrap, TLB locking, both-sides-translate rule. |
| `tb_nf_ctrl` | Launch with reference hash and exact TLB contents. Refusals for a taken core, an owned page, an invalid entry, a full pool and a long table, each leaving no trace. Attest, teardown with scrubbing, relaunch. |
| `tb_snic_top` | End to end at reduced size. Two launches, a refusal, attest, denylist, core, accelerator, packet and DMA traffic, and teardown. A bus monitor checks that every grant touches only pages of the domain holding the bus. Finally, a translation miss destroys function 2 without the NIC OS asking. The testbench counts 22 mechanisms (dead-time and cross-domain holds, share overflow, back-pressure, faults, fatal-miss teardown, and more) and fails if any never occurred. |
| `tb_snic_full` | `snic_top` at its default sizes. It launches a one-page function, hashes the whole 2 MB page and checks the hash. Then core traffic, ring delivery, the denylist, and teardown with the whole page zeroed. About 2.4 M cycles, a few minutes in Verilator. |

## Sizing notes

- **Core TLB.** The six profiled functions need 10 to 183 core TLB entries of
  2 MB. All fit in 183.
- **Accelerator banks.** The DPI, ZIP and RAID working sets (101.9 MB,
  132.2 MB and 8.1 MB) fit their banks of 54, 70 and 5 entries.
- **Co-tenancy.** Up to 12 functions can run at once. With 4 cores each, the
  48 cores allow exactly 12.
- **Launch time.** Hashing a 183-page function with the one-round-per-cycle
  SHA-256 takes about 390 M cycles.
