# Adaptive fetch size L1 data cache

A cache with a fixed line size is tuned for average locality. When a program has
long sequential runs, a larger line would hide more memory latency. When its accesses
are scattered, a larger line only brings in bytes that are never read, and those bytes
push useful data out. A stream buffer is the usual fix, but it needs a second source
of refill data, extra cache lookups and care to stay coherent with the write buffer.

This design uses a simpler fix. It keeps a small, fixed physical line and changes
only how much is fetched on a miss. The fetch size is a register holding 32, 64 or
128 bytes. Hardware watches how well the fetched data is used over an interval of
memory accesses, and at the end of the interval it doubles, halves or keeps the
fetch size. Only the refill sequencer, a few bits per line and a handful of counters
are added to an otherwise ordinary set-associative cache.

Default configuration (every parameter default matches it):

| item | value |
|---|---|
| capacity, associativity | 16 KB, 4 ways |
| physical line (PCL) | 32 B, giving 128 sets |
| address split (32-bit byte address) | tag 20 bits, index 7 bits, offset 5 bits |
| fetch sizes | 32 B, 64 B, 128 B (1, 2, 4 PCLs) |
| hit latency | 1 cycle |
| bus to next level | 8 B per beat |
| adaptation interval | 200,000 accesses |
| grow / shrink thresholds | 0.7 each (held as 179/256) |

## Physical and virtual lines

The arrays are organised exactly as in a fixed-line cache with 32-byte lines. Tag and
index always come from the 32-byte physical cache line (PCL), so hit detection does
not change.

A miss fills a **virtual cache line (VCL)**: 2^V consecutive PCLs *in the same way*,
where V is the fetch size code (0, 1, 2 for 32, 64, 128 B). The VCL covering a
missing index `i` starts at `base = i & ~(2^V-1)` and ends at `base + 2^V - 1`. All
its PCLs get the tag of the missing address, because the index bits sit below the tag
bits. With V = 2, for example, a miss at index 5 fills indices 4 to 7 of one way.

Two VCLs of the same size are **neighbours** when together they form the VCL of twice
the size. The neighbour of the VCL at `base` starts at `base XOR 2^V`.

The LRU order and the invalid-way test are read at the VCL's base index, and a hit
updates the LRU order at that base index. So at a constant fetch size, every group
of 2^V sets behaves as one set of a fixed-line cache with a line of 32·2^V bytes.
The AFS cache then hits and misses exactly like that larger-line cache. The argument
for the scheme rests on this property, and the cache testbench checks it access by
access.

When the fetch size has just grown, a PCL of the new VCL may already be cached in
another way, left there by an earlier, smaller fetch. The fill drops that older copy
(`ev_dup_inval`), so that no address is ever held twice.

## What a miss does, cycle by cycle

The cache is blocking and serves one miss at a time. The cycles of a load are:

1. **Accept.** The request is registered and the tag and data arrays of every way
   are read at its index.
2. **Lookup.**
   - On a hit, the word goes out on `cpu_resp_valid`, and a new request can be
     accepted in the same cycle. Back-to-back hits therefore run at one per clock.
   - On a miss, the cache latches V. It picks the victim way: an invalid way first,
     otherwise the LRU way at the base index. It checks the VCL it is about to
     overwrite for **poor locality**. It also starts a tag read at the neighbour's
     base index.
3. **Neighbour.** The neighbour's tags from all four ways are compared with the
   missing tag. A match in a valid way means **good locality**.
4. **Memory request.** The cache asks for 4·2^V beats starting at the VCL's first
   byte.
5. **Fill.** Each 8-byte beat is written into the data array as it arrives. At the
   fourth beat of each PCL, the cache does three things:
   - writes that PCL's tag and valid bit;
   - marks it used only if it is the PCL that missed;
   - drops any copy of the PCL in another way.

   The missing word is captured from the beat stream.
6. **Response.** The cycle after the last beat, the word is returned.

With a memory that returns its first beat 30 cycles after accepting a request and
then one beat every 2 cycles, a load miss takes **32 + 2·beats** cycles from
acceptance to response:

| fetch size | beats | miss latency |
|---|---|---|
| 32 B | 4 | 40 cycles |
| 64 B | 8 | 48 cycles |
| 128 B | 16 | 64 cycles |

Stores are write-through without write-allocate. A store hit updates the line, using
its byte enables, and marks it used. Every store is passed to memory as one 8-byte
beat with byte strobes. The store completes (`cpu_resp_valid`) once memory has
accepted it: 3 cycles with an idle memory.

The locality checks use the tag port only while a miss is being served, so the hit
path and hit time are not affected.

## Detecting spatial locality

Both checks are in `locality_detector`, which is purely combinational.

- **Good locality.** The VCL being fetched and its neighbour carry the same tag:
  together they form a block of twice the fetch size. A larger fetch would have
  brought both in with one miss.
- **Poor locality.** The VCL being replaced had its first half or its second half of
  PCLs never referenced. A smaller fetch would not have brought those PCLs in.
  - A PCL counts as referenced when it is valid and has been hit since it was
    filled, or when it is the PCL whose miss filled it.
  - A 32-byte VCL has no halves, so it is never poor.
  - A range holding no valid PCL replaces nothing, so it is not counted.

Each PCL therefore carries a *used* bit next to its valid bit.

## Choosing the next fetch size

`fsz_predictor` holds the interval length register, the two threshold registers, the
fetch size register and three counters: VCLs fetched, VCLs with good locality, and
VCLs with poor locality.

- A good detection adds **two** to the good count, because it shows that two VCLs
  (the fetched one and its neighbour) belong together. With one count per detection,
  a pure sequential stream would score only 50%: only every second VCL finds its
  neighbour already present. It could then never pass a 0.7 threshold.
- A poor detection adds one.

The interval ends with its N-th accepted access, N being the interval length register.
In the next clock (`interval_end`) the predictor does the following:

```
inc = good / fetched,  dec = poor / fetched
if      inc > inc_thresh:  fetch size *= 2   (unless already 128 B)
else if dec > dec_thresh:  fetch size /= 2   (unless already 32 B)
```

It then clears the counters. There is no divider: the test `inc > t` is computed as
`good·256 > t·fetched`, with each threshold held as a 9-bit fraction with 8 fraction
bits. An interval without any miss-fetch keeps the fetch size. Events that arrive in
the decision cycle are counted in the new interval. A miss samples the fetch size when
it starts, so a change never affects a fill in progress.

After reset the fetch size is 32 B and adaptation is on.

### Configuration registers

They are written with `cfg_we`, `cfg_sel` and `cfg_wdata`:

| `cfg_sel` | register | reset value |
|---|---|---|
| 0 `CFG_INTERVAL` | interval length in accesses (0 is taken as 1) | 200,000 |
| 1 `CFG_INC_THRESH` | inc threshold, 9-bit fraction with 8 fraction bits | 179 (0.699) |
| 2 `CFG_DEC_THRESH` | dec threshold, same format | 179 (0.699) |
| 3 `CFG_FETCH_SIZE` | bit 8: adaptation enable; bits 1:0: fetch size code V (clamped to 0..2) | enabled, V = 0 |

Writing register 3 with bit 8 clear gives a cache with a fixed 32, 64 or 128 byte
fetch size.

## Ports of `afs_dcache_top`

| group | signals | notes |
|---|---|---|
| processor | `cpu_req_valid`, `cpu_req_ready`, `cpu_req` (`cpu_req_t`: write, addr, wdata, be) | valid/ready; word-aligned 32-bit accesses |
| | `cpu_resp_valid`, `cpu_resp_rdata` | one pulse per request: load data, or completion of a store |
| memory | `mem_req_valid`, `mem_req_ready`, `mem_req` (`mem_req_t`: write, addr, beats, wdata, wstrb) | a read asks for `beats` 8-byte beats from `addr`; a write is one beat |
| | `mem_rvalid`, `mem_rdata` | read beats in address order; any gap between beats is allowed |
| configuration | `cfg_we`, `cfg_sel`, `cfg_wdata` | see the table above |
| status | `fsz`, `interval_end`, `ev_hit`, `ev_fetch`, `ev_good`, `ev_poor`, `ev_dup_inval`, `good_cnt`, `poor_cnt`, `fetch_cnt` | for observation only |

Reset (`rst_n`) is asynchronous and active low. It clears the valid and used bits,
the LRU order and the predictor. The tag and data arrays themselves are not reset.

## Files

| file | content |
|---|---|
| `rtl/afs_pkg.sv` | constants, the fetch size type, request structs, configuration selector |
| `rtl/afs_dcache_top.sv` | top: cache plus predictor |
| `rtl/afs_cache.sv` | arrays, hit logic, miss/fill sequencer, LRU, valid and used bits |
| `rtl/locality_detector.sv` | good and poor locality tests |
| `rtl/fsz_predictor.sv` | interval counting, counters, threshold test, fetch size register |
| `rtl/cache_sram.sv` | synchronous-read array with a bit-masked write port (tags 128×20, data 512×64 per way) |
| `tb/mem_model.sv` | behavioural next-level memory: 30-cycle latency, 8-byte beats every 2 cycles |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Where this design makes its own choices

The structure follows the adaptive-fetch-size scheme: PCLs and VCLs, the neighbour
and unused-half tests, interval-based doubling and halving, and the numbers in the
table at the top. The following points are not fixed by the scheme and were chosen
here:

- **Stores.** Write-through without write-allocate, and no write buffer: a store
  waits for memory to accept it.
- **Replacement.** True LRU with invalid ways first, kept per VCL base index.
- **Duplicates.** When a fill finds a PCL already held in another way, that copy is
  invalidated.
- **Good-locality count.** A detection credits two VCLs, and the percentages are
  taken over the VCLs fetched in the interval.
- **Thresholds.** Fixed-point, so 0.7 is held as 0.699.
- **Start-up.** The fetch size starts at 32 B.
- **Extras.** The configuration port, the adapt-enable bit, and the observation
  outputs and third counter.
- **Miss handling.** The cache is blocking. It does not return the missing word
  early, and it answers only after the whole VCL is in.
- **Memory interface.** The request/beat protocol and the 8-byte data array word.

Not included:

- The processor core and the instruction cache of the system around the cache.
- The next-level memory, for which only a behavioural model is provided.
- The stream buffer that the scheme is compared against.

## Verification

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **`tb_cache_sram`**: random masked writes and reads against a model, including
  read-during-write returning the old word.
- **`tb_locality_detector`**: 6,000 random cases per run against a reference written
  from the rules, for all three fetch sizes, plus directed cases.
- **`tb_fsz_predictor`** covers:
  - the reset interval of 200,000 accesses;
  - 400 random intervals at two threshold settings, compared with real-number
    percentages;
  - the timing of `interval_end`;
  - counter contents and clearing;
  - clamping at 32 B and 128 B;
  - the fixed-size mode.
- **`tb_afs_cache`** drives the fetch size directly and covers:
  - directed fills of each size, with exact miss latencies;
  - back-to-back hits at one per clock;
  - good locality at 32 and 128 B, and poor locality on eviction (present for an
    unused half, absent for a fully used VCL);
  - dropping duplicates, and byte-enabled stores;
  - a random mix with changing fetch size, every load checked against a shadow
    memory;
  - a hit-for-hit comparison with a reference fixed-line cache at each constant
    fetch size.
- **`tb_afs_dcache_top`** runs the whole design with every default: 16 KB, and
  intervals of 200,000 accesses. It takes about 26 million cycles, roughly 15
  seconds in Verilator.
  - A sequential stream over 256 KB must raise the fetch size to 64 B and then
    128 B in the first two intervals.
  - Scattered single-word loads over 1 MB must bring it back to 64 B and then
    32 B.
  - Short intervals with mixed traffic, fixed-size mode and duplicate-producing
    sequences follow.
  - Every load's data and every access's latency are checked, and each interval end
    must come right after the interval's last access.
  - It fails if any of these mechanisms never occurs: hit, miss-fetch of each size,
    good or poor locality, growth, shrink, duplicate drop, store hit, store miss.

- **`tb_afs_fetch_size_study`** runs three synthetic streams of 200,000 accesses
  each. Each stream runs at fixed fetch sizes of 32, 64 and 128 B, and then with
  adaptation, using intervals shortened to 20,000 accesses. The testbench checks
  that adaptation settles on the fixed size with the fewest cycles, and that its
  cycle count stays within 25% of that size. One run gave:

  | stream | 32 B | 64 B | 128 B | adaptive (settles on) |
  |---|---|---|---|---|
  | sequential words | 1.40 M cycles | 1.01 M | **0.82 M** | 0.90 M (128 B) |
  | whole random 64 B chunks | 1.36 M | **0.98 M** | 1.18 M | 1.02 M (64 B) |
  | one word per random 128 B block | **8.07 M** | 9.66 M | 12.80 M | 8.08 M (32 B) |

The testbenches use synthetic address streams. The media programs the scheme was
designed for are not included, so the quantitative claim (adaptation matching a
stream buffer's miss rate) is not reproduced here.

## Simulating

Each testbench uses Verilator 5 and needs only `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/afs_pkg.sv tb/tb_afs_dcache_top.sv --top-module tb_afs_dcache_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All RTL is synthesizable
SystemVerilog-2017. The arrays are plain memories of `cache_sram` (141,312 bits
in all), which a flow can map onto SRAM macros.

## Changing the design

- Capacity, associativity, line size and the largest fetch size are parameters of
  `afs_dcache_top` and `afs_cache`. The largest VCL must not be bigger than one way.
- The fetch size code is 2 bits wide (`afs_pkg::fsz_t`), which allows V up to 3.
  Widen `VW` for more sizes.
- The bus width and the processor word width are in `afs_pkg`.
- The interval length and thresholds can be changed at run time, or through the
  `INTERVAL`, `INC_THRESH` and `DEC_THRESH` parameters for their reset values.
