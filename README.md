# E-RoC: RAID-style redundancy for on-chip scratch pads

On-chip SRAM draws much of a chip's power. Lowering its supply voltage saves a
lot of that power, but the cells then start to flip. The usual fix is ECC on
every access, which costs encoder and decoder logic, latency and energy on
every access.

E-RoC (Embedded RAIDs-on-Chip) handles this differently, the way a disk
array does. Several plain, voltage-scaled scratch-pad memories (called
*DSPAMs*, dynamic scratch pad allocatable memories) sit behind one manager.
A master asks the manager for a *logical scratch pad* of a given size and
protection level. The manager spreads copies of that region over different
DSPAMs and writes all copies in parallel. On a read it checks the copies
using only a compare and an XOR. The master just sees a memory-mapped
scratch pad that either returns good data or answers with an error status
(SLV_ERR), after which it refetches the word from main memory.

This repository holds synthesizable SystemVerilog for the manager and the
DSPAMs, plus self-checking testbenches for every unit and for the whole
subsystem.

## Protection levels (E-RAID levels)

Each logical scratch pad is an *E-RAID system* with one of three levels:

| Level | Stored per 32-bit word A | Read rule |
|---|---|---|
| NO E-RAID | copy x = A | return x, unchecked |
| E-RAID 1 | x = A, y = A | x == y: return x. Otherwise answer SLV_ERR. |
| E-RAID 1+P | x = A, y = A, p = A ^ R | x == y: return x. Otherwise read p: return x if x ^ p == R, else y if y ^ p == R, else SLV_ERR. |

R is a large random prime. It is drawn once after reset and kept inside the
manager, so it is not tied to any data pattern.

The parity word is only read when the two copies disagree. A clean
E-RAID 1+P read therefore costs the same as an E-RAID 1 read. A bad parity
word on its own never disturbs a read, because the parity word is not
consulted while x == y.

One double error escapes E-RAID 1+P. If copy x and the parity word flip in
the same bit, x ^ p still equals R, and the bad x is returned as good. The
same holds for y. E-RAID 1 catches any difference between its two copies,
but cannot tell which copy is right.

A correctly returned word is not written back into the bad copy. The next
write to that word repairs it, as does the master's refetch after SLV_ERR.

## Block diagram

```
               bus slave port (one request at a time)
                         |
                  eroc_slave_if  ---- per-master config windows, decode
                         |
   +----------- eroc_manager controller ------------------------------+
   |   eroc_config_mem  (E-RAID descriptors, MEMADDR/RESULT per master)|
   |   eroc_acl         (owner / ACL / range check)                    |
   |   eroc_allocator   eroc_deallocator   eroc_idma --> main memory   |
   |   eroc_raid_read   eroc_raid_write    eroc_prime_gen (R)          |
   |   eroc_addr_xlate  (logical word -> DSPAM, physical word)         |
   |   eroc_slv_rd  eroc_slv_wr  (issue up to 3 accesses, one/DSPAM/cycle)
   |   eroc_master_if   (per-DSPAM port mux)                           |
   +-------------------------------------------------------------------+
           |        |        |            |
         dspam0   dspam1   dspam2  ...  dspamN-1   (point to point,
                                                    or one DSPAM bus)
```

`eroc_top` is the manager plus `NUM_DSPAM` instances of `dspam`. It brings
out these ports:

- the bus slave port;
- the main-memory port of the internal DMA;
- the seed for the prime generator;
- `dspam_retired_i`, a mask of DSPAMs that must no longer receive data
  (for example, DSPAMs found to be failing).

Default sizes:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_MASTERS` | 8 | masters |
| `NUM_DSPAM` | 8 | DSPAMs |
| `DSPAM_WORDS` | 1024 | words per DSPAM (4 KB each) |
| `BLOCK_BYTES` | 64 | allocation block (64, 128, 256 or 512) |
| `NUM_ERAID` | 16 | E-RAID descriptors |
| `DSPAM_BUS` | 0 | 0: DSPAMs point to point; 1: one shared DSPAM bus |

The package `eroc_pkg` holds the shared types. Its field widths set upper
bounds on the parameters:

- 16 DSPAMs;
- 16 master ids;
- 16 masters per ACL;
- 255 blocks per region;
- 65536 words per DSPAM.

## Using a logical scratch pad

### Address map (32-bit bus address)

| Bits | Data access (bit 31 = 0) | Configuration access (bit 31 = 1) |
|---|---|---|
| 23:16 | logical scratch pad (E-RAID index) | – |
| 15:0 | byte offset, must be word aligned | – |
| 11:8 | – | master whose window is addressed |
| 3:2 | – | register: 0 MEMADDR, 1 CMD, 2 RESULT, 3 ACLHI |

Each master has its own configuration window. A request from master *m* into
any window other than *m*'s is refused with SLV_ERR, so no master can create
or delete E-RAIDs in another master's name. The following are also refused:

- unaligned data addresses;
- master ids ≥ `NUM_MASTERS`;
- data accesses by a master that is neither the owner nor in the E-RAID's
  ACL;
- offsets past the end of the E-RAID.

### Command register (write to CMD)

| Bits | Field |
|---|---|
| 31:30 | op: 1 CREATE, 2 DELETE |
| 29:28 | level: 0 NO E-RAID, 1 E-RAID 1, 2 E-RAID 1+P |
| 27 | dma: CREATE loads from MEMADDR; DELETE offloads to MEMADDR |
| 23:16 | ACL: bit *i* lets master *i* read and write the E-RAID |
| 15:8 | E-RAID index (DELETE) |
| 7:0 | size in blocks (CREATE) |

**CREATE**

- The CMD write itself returns the new index in its response data.
- The same outcome is kept in the master's RESULT register: bit 31 is the
  error flag, bits 7:0 the index.
- It fails with SLV_ERR in any of these cases:
  - no free descriptor is left;
  - the size is 0 or larger than one DSPAM;
  - the level is 3;
  - the allocator finds no room.
- The creator is always in the ACL. The ACL field adds masters 0–7 that
  share the region. Masters 8–15 are added through the master's ACLHI
  register: bit *i* of ACLHI names master 8 + *i*. A CREATE uses whatever
  ACLHI holds at that moment, and ACLHI is 0 after reset.

**DELETE**

- Only the owner may delete.
- It optionally offloads the whole region to main memory, word by word and
  checked, before freeing the blocks and invalidating the descriptor.

### Handshake and latency

- A request is taken when `req_valid_i && req_ready_o`. The response is a
  one-cycle `rsp_valid_o` pulse with `rsp_rdata_o` and `rsp_err_o`
  (1 = SLV_ERR, 0 = CHANNEL_OK).
- `req_ready_o` stays low until the prime R exists (`init_done_o`). That is
  about 25–50 thousand cycles after reset, because R is found by trial
  division, one remainder per cycle.
- Latencies, counted from the accepting clock edge to the edge that raises
  `rsp_valid_o`, with copies in different DSPAMs:
  - write (any level): 3 cycles;
  - NO E-RAID or E-RAID 1 read, or clean E-RAID 1+P read: 5 cycles;
  - E-RAID 1+P read that needs the parity word: 8 cycles;
  - refused request (ACL, window, range): 3 cycles.
- Every extra access to a DSPAM that holds two copies adds one cycle.
  For example, an E-RAID 1+P write with all three copies in one DSPAM
  takes 5 cycles.
- With `DSPAM_BUS = 1` every access waits for the bus, so the rule applies
  to all copies:

  | Access | NO E-RAID | E-RAID 1 | E-RAID 1+P |
  |---|---|---|---|
  | write | 3 | 4 | 5 |
  | read | 5 | 6 | 6 |
  | read that needs the parity word | – | – | 9 |
- Configuration commands take as long as the allocation scan or the DMA
  transfer.

## How space is allocated

This is the least obvious part of the design, so it gets more detail here.

Each DSPAM is divided into blocks of `BLOCK_BYTES`. Each block has one free
bit. Each DSPAM also has a *next-fit pointer*: the block just after the last
region handed out in that DSPAM.

An E-RAID needs 1, 2 or 3 regions (x, y, p) of *n* contiguous blocks each.
The regions are placed one at a time:

1. **Pick a DSPAM.** DSPAMs are tried in round-robin order from a global
   pointer. The pointer moves past every DSPAM that receives a region, so
   successive E-RAIDs spread over all DSPAMs. Retired DSPAMs are skipped.
2. **Keep copies apart when possible.** A first pass only considers DSPAMs
   that hold no region of this E-RAID yet. Only if none of those has room
   does a second pass allow a DSPAM to take a second copy. With few DSPAMs
   an E-RAID still gets created, at the price of serialised accesses and a
   weaker guarantee: one failing DSPAM then holds two copies.
3. **Scan inside the DSPAM.** The free bits are scanned circularly from the
   next-fit pointer, one block per cycle, for a run of *n* free blocks that
   does not wrap past the DSPAM's end.
4. **Roll back on failure.** If a region cannot be placed, all regions
   already taken for this request are returned, the round-robin pointer is
   restored, and the request fails.

Example with 4 KB DSPAMs and 64-byte blocks (1 KB = 16 blocks). CPU0 creates
a 1 KB E-RAID 1 and then CPU2 a 1 KB E-RAID 1+P:

| DSPAMs | E-RAID 1 goes to | E-RAID 1+P goes to |
|---|---|---|
| 4 | 0, 1 | 2, 3, and 0 (block 16) |
| 2 | 0, 1 | 0, 1, 0 |
| 1 | both copies in DSPAM 0 | refused: needs 3 KB, 2 KB left |

`tb_eroc_allocator` checks these three cases exactly.

Freeing a region clears its bits in one cycle. There is no compaction, so
the space can fragment.

### Retiring a DSPAM

Setting a bit of `dspam_retired_i` takes that DSPAM out of service:

- **New allocations.** It gets no new regions.
- **Existing copies.** Every copy already in it is moved in the
  background:
  1. While idle, the manager's controller scans one descriptor per cycle
     for a live E-RAID with a copy in a retired DSPAM.
  2. When it finds one, and no bus request is open, it asks the allocator
     for a single region. The DSPAMs holding the E-RAID's other copies are
     passed as an *avoid* mask, so the new copy also lands apart from them
     when possible.
  3. It copies the region word by word:
     - E-RAID 1+P words are read with the full x/y/parity check. The
       retired DSPAM can still be read.
     - Other levels are read from the healthy copy.
     - A moved parity copy is written back as A ^ R.
  4. It updates the descriptor and frees the old region.
- **Bus traffic.** The bus is held off (`req_ready_o` low) only while one
  copy is being moved. Requests are served between copies.
- **No room.** If no region can be found, re-mapping pauses until the
  retired mask changes or a delete frees space.

## Reading and writing the copies

- **Address translation.** A logical word *w* of an E-RAID maps, for each
  copy *c*, to DSPAM `dsp[c]`, word `base[c] * (BLOCK_BYTES/4) + w`. A region
  is contiguous, so the descriptor only needs the DSPAM number and first
  block of each copy.
- **Issuing.** `eroc_slv_rd` and `eroc_slv_wr` take up to three accesses and
  send those to different DSPAMs in the same cycle. Accesses that share a
  DSPAM go one per cycle, lowest copy first.
- **Port sharing.** The manager serves one request at a time, so the read
  and write units are never active together. `eroc_master_if` still gives
  the write unit priority and asserts that the two never meet on one port.
- **DSPAM model.** `dspam` is a single-port synchronous RAM. Read data
  appears one cycle after the request and is held. The model has no reset,
  like an SRAM.

## Departures from the original E-RoC proposal and limits

- **DSPAM attachment.** E-RoC can be placed on a shared system bus, on a
  separate DSPAM bus, or with DSPAMs wired directly to the manager.
  - The direct, point-to-point arrangement is the default.
  - `DSPAM_BUS = 1` gives the separate DSPAM bus. It is modelled by its
    effect: only one DSPAM access per cycle, so the copies of one request
    are handled one after another. The per-DSPAM ports stay as they are.
  - The arrangement with DSPAMs on the shared system bus is not built. That
    bus, and the traffic from the other masters on it, lie outside this
    subsystem.
- **Allocation search.** The original proposal searches the DSPAMs of one
  E-RAID's copies in parallel. Here one scan engine places the copies one
  after another, one block per cycle. The placement is the same; only
  CREATE takes longer for the higher levels.
- **Re-mapping procedure.** The original proposal says unusable DSPAMs are
  dropped and their E-RAIDs re-mapped in the background, but not how. The
  procedure below (one copy at a time, bus held off meanwhile) is this
  design's. How a DSPAM is found unusable is left outside: it arrives as
  the `dspam_retired_i` mask.
- **E-RAID 0+1.** Striping combined with mirroring is not built.
- **Error model.** Voltage scaling and its error rate are not modelled in
  hardware. The testbenches flip stored bits directly.
- **Own choices.** The following are this design's own:
  - the command, register and address encodings;
  - the handshakes and all cycle timings;
  - the LFSR-plus-trial-division prime generator;
  - the two-pass sharing rule and contiguous regions;
  - the decision not to repair a bad copy on read.
- **Concurrency.** Requests are served one at a time. The manager does not
  overlap a configuration command with data traffic.
- **Master count.** `NUM_MASTERS` defaults to 8, the 8-core system the
  design was sized for. It can be raised to 16, the limit of the 4-bit
  master id and the 16-bit ACL.

## Testbenches

Every unit has a self-checking testbench `tb/tb_<unit>.sv`. Each one:

- compares outputs with values computed in the testbench;
- checks cycle counts;
- has a watchdog;
- ends with a line `TB_RESULT checks=N failures=M`.

The end-to-end tests are:

- **`tb_eroc_top`** runs the full default configuration: 8 masters and
  8 × 4 KB DSPAMs. It covers:
  - start-up prime;
  - shared E-RAID 1, E-RAID 1+P and NO E-RAID systems;
  - parallel writes;
  - detection and parity correction of injected bit flips, on copy x and on
    copy y;
  - SLV_ERR when both copies are bad;
  - ACL, window, range and owner refusals;
  - DMA load at create and offload at delete;
  - running out of space;
  - background re-mapping out of a retired DSPAM;
  - retired DSPAMs forcing copies into one DSPAM.

  It counts each of these and fails if one never happened.
- **`tb_eroc_manager`** uses 4 CPUs and 4 DSPAMs with three logical scratch
  pads:
  - a 1 KB E-RAID 1 shared by CPU0 and CPU1;
  - a 2 KB E-RAID 1+P for CPU2;
  - a 2 KB NO E-RAID for CPU3, loaded by DMA.

  It then runs 3000 random requests with random bit flips against a
  reference model. Finally it retires a DSPAM under traffic and checks
  that the moved copies, including a parity copy, stay correct.

- **`tb_eroc_16_eraids`** runs the full default configuration with sixteen
  E-RAIDs managed at once: two per master, random levels and sizes. It
  runs 4000 random requests while injecting errors at a random rate, and
  reports how many errors each level let through, detected or corrected.

- **`tb_eroc_16_cores`** raises `NUM_MASTERS` to 16. Each master creates
  one E-RAID and shares it with master *i* + 8 (mod 16). Masters 8–15 are
  named through ACLHI, and masters 0–7 through the CMD word's ACL field. It
  checks that a third master is refused, then runs 3000 random requests
  from owners and sharers while injecting bit flips.

- **`tb_eroc_dspam_bus`** runs the top with `DSPAM_BUS = 1`. It checks
  the latencies in the table above, checks that no cycle carries two DSPAM
  accesses, and checks correction and detection of injected bit flips.

- **`tb_eroc_block_sizes`** runs four small managers side by side, with
  allocation blocks of 64, 128, 256 and 512 bytes. It checks region
  length, the range check at the end of a region, where each copy lands,
  and the one-DSPAM size limit.

`tb/eroc_main_mem.sv` and `tb/eroc_dspam_bank.sv` are behavioural helpers.
The first is a main memory with latency and back-pressure. The second is a
DSPAM bank with access counters.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/eroc_pkg.sv tb/tb_eroc_top.sv --top-module tb_eroc_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_eroc_top` with any other testbench name. The full-size run
takes a few seconds, most of it spent waiting for the prime.
