# Subarray access counters against thermal attacks on an instruction cache

A processor's thermal sensors usually sit where ordinary programs run hot:
register files, integer issue queues and execution units. The L1 instruction
cache is normally one of the cooler blocks, so it gets no sensor. That leaves a
gap. A small program can keep one part of the instruction cache busy on every
cycle while the back end does almost nothing. One such program is a long loop
of tiny basic blocks, each just a `nop` and a branch to the next, with all
blocks placed so that they fall into the same cache subarray. That subarray
and its tag subarray then become the hottest spot on the die, and no sensor
sees it.

This RTL adds a cheap defence to the cache controller. Each data subarray and
each tag subarray gets two counters. Together they act as a *virtual thermal
sensor*, because how often a subarray is used tracks how hot it gets. When
one subarray has been used almost every cycle for several time slices in a
row, instruction fetch stops long enough for it to cool down. The repository
holds that protection logic and an instruction cache it can watch. The cache
is built from explicit subarrays, so "which subarray did this fetch use?" is a
real signal.

## The protection rule

Time is cut into slices of `T_SLICE` cycles (default 100,000). For every
subarray the design keeps:

* a **block access counter**: the number of cycles in the current slice in
  which the subarray was enabled;
* a **heavy access counter**: the number of consecutive slices in which the
  block access counter ended above `BLOCK_TH` (default 90,000, that is, 90 %
  of the cycles).

On the last cycle of every slice, each subarray is judged on its total for
that slice:

```
total = block_cnt + access_this_cycle
heavy_cnt = (total > BLOCK_TH) ? min(heavy_cnt + 1, H_TH) : 0
block_cnt = 0
```

A single light slice sends the heavy count straight back to zero. Fetch stops
only after `H_TH` heavy slices in a row (default 5). So the rule catches
sustained hammering of one subarray, not a short burst.

When any heavy counter reaches `H_TH`, fetch stops for the **cooling time**

```
Tc = ALPHA * H_TH * T_SLICE        (default 2 * 5 * 100,000 = 1,000,000 cycles)
```

`ALPHA` (default 2) sets how cautious the defence is. The more heavy slices it
took to trigger, the longer the cool-down. At the end of the cooling time,
every heavy counter is cleared and fetch resumes.

### Exact timing

* Slices start in the first cycle after reset. `slice_end` is high in cycle
  `k*T_SLICE - 1`.
* Heavy counters change on a slice boundary. So `fetch_stop` rises in the
  **first cycle of the slice after the `H_TH`-th heavy slice**. At the
  defaults, an attack that starts right after reset is stopped in cycle
  500,000.
* Cooling is counted in whole slices. `fetch_stop` stays high for exactly
  `ALPHA*H_TH*T_SLICE` cycles, and the last of them carries `clear_heavy`.
  Fetch may resume in the first cycle of the following slice.
* Heavy counters hold their value during cooling. Block counters keep
  counting, but nothing accesses the cache then except a refill that was
  already under way.
* A fetch that was already accepted when `fetch_stop` rises still completes.

If the attack keeps running after cooling, it is caught again `H_TH` slices
later. The attacker therefore gets `H_TH` busy slices for every
`ALPHA*H_TH` idle ones, which caps the subarray's long-run duty cycle at
`1/(1+ALPHA)`.

## How the cache is cut into subarrays

This part matters most for understanding what the counters see. It is also
where most of this design's own choices are.

The cache has the geometry of a 21364-class core: 64 KB, 2-way set
associative, 64-byte lines, so 512 sets. Each fetch returns 16 bytes (four
32-bit instructions), and a hit takes 2 cycles. The arrays are split as
follows:

| structure | count | what one holds | index |
|---|---|---|---|
| data subarray (IBA) | `WAYS*LINE_BYTES/FETCH_BYTES` = 8 | one 16-byte chunk of every set of one way: 512 rows x 128 bits | `way*4 + addr[5:4]` |
| tag subarray (ITA) | `WAYS*ITA_PER_WAY` = 4 | one 9-bit slice of the 17-bit tag, plus a valid bit, for every set of one way: 512 rows | `way*2 + slice` |

The `access` vector of the top lists the eight IBAs first (bits 0-7), then
the four ITAs (bits 8-11).

Only the subarrays of **one way** are switched on for a fetch. A per-set way
predictor names the most recently hit way. Only that way's IBA for the
fetch's chunk is read, together with both of that way's ITAs. The way hits
when both tag slices match. This is why a loop can
concentrate all its work on a single IBA. Take the attack loop of 256 blocks
placed 64 bytes apart from `0x20003100`. Every fetch lands on chunk 0, and
all 256 lines sit in different sets. So all lines are filled into way 0, and
every fetch reads IBA0, ITA0 and ITA1. All three subarrays cross the
threshold together. An IBA can hold up to 512 such
blocks (one per set). Beyond that the loop spills into the other way, so
IBA0 serves 512 of every N fetches. Above about 569 blocks (512 / 0.9), no
subarray stays over the 90 % threshold.

These mapping choices are not forced by anything else in the design.
`tap_pkg::iba_index` and `tap_pkg::ita_index` define them, and changing those
functions changes which subarray each access is charged to.

## Cache operation

`icache` is a two-stage pipeline:

1. **Issue.** On an accepted request, it reads the predicted way's IBA and
   its two ITAs. All are synchronous single-port RAMs.
2. **Lookup.** Each ITA's tag match unit compares its stored tag slice with
   the matching slice of the request's tag. On a hit, the 16-byte chunk is registered onto
   `resp_data`. The response is valid 2 cycles after the request was
   accepted, and a new request can be accepted in the same cycle.

On a miss in the predicted way, `req_ready` drops and the next way is read
(the `mispredict` pulse); a hit there answers 3 cycles after acceptance. If
every way misses (the `miss` pulse), the line is requested from the next
level. It comes back as four 16-byte beats, chunk 0 first. Each beat is
written into the victim way's IBA for that chunk, and the last beat also
writes the tag into the victim's ITAs. The victim is the first invalid way
seen, or else the way after the most recently used one. The request is then
replayed from the cache. Refill writes count as subarray accesses, just as
reads do.

Reset clears the valid bits, the way predictor and all counters. It does not
clear the tag and data RAMs.

## Modules

| module | role |
|---|---|
| `tap_pkg` | default sizes and thresholds; subarray index functions |
| `iba_subarray` | one data subarray: single-port synchronous RAM |
| `ita_subarray` | one tag subarray: tags, valid bits, tag match unit |
| `icache` | the cache pipeline, way predictor and refill control over 8 IBAs and 4 ITAs |
| `slice_timer` | cycle counter marking the last cycle of each slice |
| `access_monitor` | block and heavy access counters of one subarray |
| `fetch_throttle` | cooling-time control: `fetch_stop` and `clear_heavy` |
| `thermal_guard` | one slice timer, 12 access monitors, one fetch throttle |
| `protected_icache` | top: `icache` with `thermal_guard`, whose `fetch_stop` drives the cache's stall input |

### Parameters of `protected_icache`

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 65536 | capacity |
| `WAYS` | 2 | associativity |
| `LINE_BYTES` | 64 | line size |
| `FETCH_BYTES` | 16 | bytes per fetch (one IBA word) |
| `ADDR_W` | 32 | address width (own choice) |
| `ITA_PER_WAY` | 2 | tag subarrays per way (own choice) |
| `T_SLICE` | 100000 | cycles per time slice |
| `BLOCK_TH` | 90000 | accesses per slice above which a slice is heavy |
| `H_TH` | 5 | consecutive heavy slices that stop fetch |
| `ALPHA` | 2 | cooling time in units of `H_TH` slices |

### Top-level ports

* `req_valid`, `req_ready`, `req_addr`: fetch request. The low 4 address bits
  are ignored. `req_ready` is low while fetch is stopped or a lookup is
  unresolved.
* `resp_valid`, `resp_addr`, `resp_data`: one response per request, in order.
* `refill_req_valid`, `refill_req_ready`, `refill_req_addr`: line request to
  the next level (line-aligned).
* `refill_valid`, `refill_data`: four refill beats, chunk 0 first. They may
  have gaps between them.
* `fetch_stop`: fetch stopped for cooling.
* `hot`: subarrays whose heavy counter reached `H_TH`.
* `heavy_cnt`: every subarray's heavy counter.
* `access`: subarray enables.
* `mispredict`, `miss`, `slice_end`, `clear_heavy`: one-cycle events.

## What is and is not here

The RTL covers the cache with its subarrays, plus the protection logic that
counts per-subarray accesses and stops fetch for the cooling time. Outside
it, and modelled only in the testbenches:

* the next cache level, by `tb/l2_model.sv`, which has a 12-cycle latency and
  derives its contents from the address;
* the processor core, by fetch-address generators in the testbenches.

Chip thermal sensors, voltage/frequency scaling, the floorplan's decoders,
sense amplifiers and routing, and software scanning for attack code are not
part of the RTL.

Points where this RTL settles something on its own:

* the address-to-subarray mapping and the way predictor, described above;
* "above the threshold" is read as strictly greater (`> BLOCK_TH`). The
  judgement is made once per slice, at its end, not at the moment the count
  crosses the threshold;
* heavy counters hold during cooling and saturate at `H_TH`; block counters
  saturate at their maximum;
* the refill protocol (four beats, chunk order), the replacement rule and the
  reset behaviour;
* `fetch_stop` blocks new requests only. The action taken on a hotspot is to
  stop fetch; no other response (such as lowering the clock) is generated.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_protected_icache \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tap_pkg.sv tb/tb_pkg.sv \
    tb/tb_protected_icache.sv -o sim --Mdir obj
./obj/sim
```

| testbench | what it shows |
|---|---|
| `tb_iba_subarray`, `tb_ita_subarray` | RAM contents against a reference; tag-slice hit/miss; a reset invalidates stored tags |
| `tb_slice_timer` | `slice_end` in exactly the right cycles at the default 100,000-cycle slice |
| `tb_access_monitor` | heavy counting at 900/901 accesses against a 900 threshold, reset on a light slice, saturation, hold, clear |
| `tb_fetch_throttle` | cooling lasts exactly `ALPHA*H_TH*T_SLICE` cycles; single `clear_heavy` |
| `tb_thermal_guard` | stop at the first cycle of slice `H_TH`; only the hammered subarray hot; interrupted runs never stop; two subarrays at once |
| `tb_icache` | full-size cache: data and order of every response, 2-cycle hit latency (3 after a way misprediction), one IBA and the same way's two ITAs per fetch, refill order; the attack loop fetches every cycle and touches only IBA0/ITA0/ITA1 |
| `tb_protected_icache` | end to end with 2,000-cycle slices: normal code never stops; `H_TH-1` heavy slices followed by light ones do not stop; the attack stops twice, each time for exactly 12,000 cycles with exactly IBA0, ITA0 and ITA1 hot, re-triggering exactly `H_TH` slices after resuming; every mechanism (hit, mispredict, miss, heavy increment and reset, stop, resume) is counted and required |
| `tb_attack_sizes` | attack loops of 256 and 512 blocks are stopped; 600 blocks spill out of IBA0 and are not |
| `tb_protected_icache_full` | all defaults: the attack is stopped at cycle 500,000, exactly when the testbench's own per-slice count predicts, and fetch resumes after 1,000,000 cycles (about 1.5 million simulated cycles, a few seconds) |

The thresholds count cycles, not temperatures. Whether 90 % for five
100,000-cycle slices is the right limit for a given chip is a thermal
question this RTL cannot answer. The numbers are parameters so that they can
be re-tuned.
