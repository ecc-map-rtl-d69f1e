# ECC-Map wear-levelling controller in SystemVerilog

Emerging non-volatile memories (PCM, ReRAM, MRAM) wear out after a limited
number of writes per line. A device that maps logical lines to fixed
physical lines dies as soon as one heavily written logical line wears out
its physical home. The extreme case is a host that writes a single address
forever, the *1-LLA workload*. Full indirection through a per-line table of
physical addresses solves this, but the table is large. Cheap global
mappings (Start-Gap and its region variants) cope badly when the
device is large compared with its endurance.

ECC-Map sits between the two. It places each logical line address (LLA) at
a physical line address (PLA) computed by one member `f_i` of a large
family of mapping functions, and stores only which member is used. All
lines use indices from a small sliding window `base .. base+S-1`. The
per-line state is then `log2 S` bits, 5 bits for `S = 32`, instead of a
full `log2 N`-bit address. A line whose physical home is worn is moved
alone, by stepping its index. Only when an index would leave the window
does the whole device move: the window slides by `S` and every line
follows.

This repository holds synthesizable RTL of the controller, its blocks and
self-checking testbenches. The memory medium itself is a behavioural model
in `tb/`.

## The mapping functions

The functions are encoders of a binary cyclic error-correcting code. `N =
2^M` is the number of physical lines, and the code has redundancy `r = M`.
The RTL uses the cyclic Hamming code (the primitive BCH code with `r = M`)
of length `n = 2^M - 1` and `k = n - M` information bits. Its generator
`g(x)` is a primitive polynomial of degree `M`, for example `x^10 + x^3 + 1`
for `M = 10`. A code word is laid out as

```
 forward:  [ LLA (M) | index (k-M) | PLA (M) ]    encoder input LLA|index, parity = PLA
 inverse:  [ index (k-M) | PLA (M) | LLA (M) ]    encoder input index|PLA, parity = LLA
```

The inverse layout is the forward one rotated by `M` positions. A cyclic
code is closed under rotation, so the same encoder also answers "which LLA
does index `i` put at this PLA?". The two layouts give three properties:

* Each `f_i` is injective. Two LLAs that mapped to the same PLA would give
  a non-zero code word whose ones all lie within `M` consecutive
  positions. A cyclic code with redundancy `M` has no such word.
* For different indices `0 < i < j < N`, `f_i(LLA) != f_j(LLA)`. One
  logical line therefore visits `N - 1` different physical lines before
  any repeats. A single hot line can spread its wear over the whole device.
* The mapping is linear, so `PLA = LLA * x^k + i * x^M (mod g)` and
  `LLA = i * x^(2M) + PLA * x^M (mod g)`. The testbenches use these
  identities as independent checks.

`cyclic_encoder` computes the remainder `msg * x^M mod g` as a fully
unrolled LFSR division. This makes it a single combinational XOR network.
Only the low `M` bits of the index field vary (the upper `k - 2M` bits are
tied to zero), so synthesis prunes most of the network. Elaboration still
walks all `k` message bits. That is fine up to `M` around 16, but far from
a 2^30-line device (see *Limitations*).

## Window, compact index and randomisation

A line's index `i` is stored as `i mod S` (its *compact index*). The full
index is recovered as `i = base + ((cidx - base) mod S)`. The compact value
does not change when `base` moves, so sliding the window never rewrites
the table. `map_table` holds one compact index per logical line. A single
`base` register in the controller completes the mapping.

The running indices `1, 2, 3, ...` are not fed to the encoder directly. An
`M`-bit maximal-length LFSR turns index 1 into a random seed, and each
later index into the next LFSR state. This hides the mapping from an
adversary and keeps the "no repeats below `N`" property, because the LFSR
period is `2^M - 1`. Index 0 is skipped, so `base` starts at 1.
`lfsr_window` caches the `S + 1` numbers `LFSR(base) .. LFSR(base+S)`. The
extra entry is the target index of a catch-up. After a catch-up the cache
shifts forward by `S` entries, one LFSR step per cycle.

## Remapping: the hard part

Every physical line also stores, with its data, the compact index it was
written with. This metadata is the key to all remapping decisions.

**Trigger.** A host write first reads the mapped line to obtain its wear
estimate. If the wear is above `PHI`, the logical line is remapped before
the data is written. Otherwise the data is written in place. Writes issued
by a remapping never trigger. `PHI` comes from the threshold formula
`alpha = 1 - N/(S*w_max)` when `N/w_max < S/3`, else `alpha = 2/3`, with
`PHI = alpha*w_max`. The default `N = 1024, S = 32, w_max = 2048` gives
2016. `CAP_PCT` can cap `PHI` at a percentage of `w_max` (80 % is a useful
setting for Zipf-like traffic).

**Is a physical line in use?** Read its stored compact index `c`, and
inverse-map the PLA with the window index `base + ((c - base) mod S)` to
get a candidate LLA'. The line is in use exactly when LLA' < K and the
table holds `c` for LLA'. In that case LLA' really maps to this PLA. If
some LLA maps here, the last write to this line was that LLA's own
placement, so its metadata is current and the test finds it. Lines
vacated by a move therefore never need to be invalidated, and the test
costs one media read.

**Regular remapping.** The hot line moves from index `i` to `i+1`:

* *Non-colliding*: `f_{i+1}(LLA)` is free. Write the data there.
* *Colliding*: the line at `f_{i+1}(LLA)` belongs to LLA' with index `j`.
  Probe `f_{j+1}(LLA')`, `f_{j+2}(LLA')`, ... until a free line is found.
  Copy LLA' there (one internal-copy write), then write the host data over
  its old place. The host line takes priority because its index should
  grow as slowly as possible.

With a spare factor `rho = (N-K)/N`, a regular remapping collides with
probability about `1 - rho`. The victim needs about `1/rho` probes.

**Catch-up.** If `i+1`, or the victim's `j+d`, would reach `base + S`,
the controller sets `base <- base + S` and moves every logical line to the
new base index. The new placement is injective, but the moves must not
overwrite a line that has not been read yet. The controller sweeps LLAs in
address order. For each one not yet moved, it reads its data into a line
buffer and inspects the target `f_{base+S}(LLA)`. If an unmoved line
occupies the target, that line's data is captured during the same read,
the buffered line is written, and the displaced line is moved next. The
chain ends at a free line or at the chain's own starting line. A
one-bit-per-LLA *moved* flag separates moved from unmoved lines, because
`base` and `base + S` have the same compact index. The flag is compared
with an epoch bit that toggles at every catch-up, so it never needs
clearing. After the sweep the LFSR cache slides and the pending host write
goes to the line's new home. A catch-up costs about `K` internal copies.
With the default parameters and a 1-cycle medium it takes about 8 700
cycles (about 10.6 cycles per logical line).

**Format.** After reset the controller places every LLA at
`f_base(LLA)`, with `base = 1`. It writes the table and each line's
metadata, which costs `K` media writes. Only after this does it accept host
requests (`ready`).

## Interfaces and timing (`ecc_map_device`)

| group | signals | protocol |
|---|---|---|
| host request | `h_req_valid`, `h_req_ready`, `h_req_we`, `h_req_lla`, `h_req_wdata` | accepted on a clock edge with both valid and ready high; `ready` only in the idle state |
| host response | `h_rsp_valid`, `h_rsp_rdata` | one-cycle pulse per read, registered 4 edges after acceptance with a 1-cycle medium |
| media | `m_req`, `m_we`, `m_addr`, `m_wdata`, `m_wmeta`, `m_ack`, `m_rdata`, `m_rmeta`, `m_rwear` | request held unchanged until `m_ack`; read data, stored compact index and wear estimate valid in the ack cycle |
| status | `ready`, `base`, `ev_host_write`, `ev_remap_nc`, `ev_remap_col`, `ev_catchup`, `ev_copy` | format done; window base; one-cycle event pulses |
| other | `clk`, `rst_n` (asynchronous, active low), `seed` | `seed` is sampled once after reset (0 is replaced by 1) |

The controller handles one host request at a time. A host write without a
trigger costs one media read and one media write. Requests to `LLA >= K`
are dropped, and such reads return zero.

Parameters (defaults are the reference configuration): `M = 10` (1024
lines), `K = 819` (spare factor 0.2), `S = 32`, `W_MAX = 2048`,
`CAP_PCT = 100`, `DATA_W = 4096` (512-byte lines), `WEAR_W = 16`,
`PHI` = the formula above.

## How well it levels

`tb/tb_ecc_map_workloads.sv` runs each workload until some physical line
would exceed `w_max`. It reports utilization = host writes / (`w_max * N`).
The configuration is `N = 1024`, `K = 819`, `S = 32`, `w_max = 128` (size
to endurance 8, `PHI = 96`):

| workload | this RTL | published reference |
|---|---|---|
| 1-LLA (one address) | 0.64 | 0.61 |
| stress (random 3 % of addresses) | 0.73 | 0.73 |
| uniform | 0.63 | 0.65 |
| Zipf (`p(i) ~ 1/i`) | 0.61 | 0.55 |

Differences come from the choices listed below, such as the format writes,
the catch-up order and the random streams. One run of each workload was
made with one seed.

At the default size (`w_max = 2048`), `tb/tb_ecc_map_full.sv` writes one
address until end of life. It reached utilization 0.97 after 2.04 M host
writes and 32 catch-ups. A run with another address and seed reached 0.92.
The published value is about 0.93, so single runs scatter by a few
hundredths.

Trends over the other system variables run at reduced sizes. The
threshold depends on `N/(S*w_max)`, so the same ratio at a smaller `N` is a
fair stand-in. `tb/wl_harness.sv` wraps the controller, the medium model and
a workload generator for these runs.

| study | testbench | size | result |
|---|---|---|---|
| size to endurance 0.5, 1, 2, 4, 8 | `tb_ecc_map_sweep` | N = 256 | 1-LLA 0.86, 0.84, 0.80, 0.73, 0.59 (falls with the ratio); Zipf 0.44, 0.45, 0.46, 0.50, 0.51 (does not fall) |
| window S = 16, 32, 64 (ratio 0.5) | `tb_ecc_map_sweep` | N = 512 | 1-LLA 0.81, 0.92, 0.87; stress (16, 32) 0.84, 0.92 |
| spare factor 0.10, 0.15, 0.20, 0.25 | `tb_ecc_map_sweep` | N = 256 | 1-LLA 0.40, 0.74, 0.86, 0.86; Zipf (to 0.20) 0.25, 0.32, 0.44 |
| `PHI` capped at 80 % of `w_max` (ratio 0.5) | `tb_ecc_map_phi_cap` | N = 256 | Zipf 0.44 to 0.70; 1-LLA 0.86 to 0.81; stress 0.65 to 0.83 |
| `PHI` 5 % above the formula (ratio 0.5) | `tb_ecc_map_phi_cap` | N = 256 | 1-LLA 0.004, stress 0.03, uniform 0.71 |
| `PHI` at 65, 80, 90, 100 % of the formula (ratio 0.5) | `tb_ecc_map_phi_cap` | N = 256 | 1-LLA 0.67, 0.80, 0.89, 0.86; Zipf 0.66, 0.69, 0.68, 0.44 |

These agree with the published trends:

* 1-LLA drops as the ratio grows.
* Going from S = 16 to S = 32 helps 1-LLA clearly, and stress less.
* Going from 0.10 to 0.15 spare helps 1-LLA and Zipf. Beyond 0.20 there is
  no further gain.
* The 80 % cap lifts Zipf from about 0.4 to over 0.7.
* A threshold above the formula's value lets host writes alone wear a line
  out. Concentrated workloads then die at once, while uniform traffic keeps
  most of its utilization (published: about 0.78).
* Below the formula's value, 1-LLA gains as the threshold rises (published
  0.64, 0.78, 0.87, 0.93). Zipf is best around 80 % (published 0.62, 0.70,
  0.63, 0.38).

Absolute `N` does matter at the larger window sizes. The threshold leaves a
margin of only `N/S` writes per line for catch-up copies. With few lines,
the scatter of those copies costs utilization:

* At N = 256, S = 64 gives 0.74.
* At N = 512, S = 64 gives 0.87.
* At N = 256, 90 % of the formula's threshold beats the full value for
  1-LLA (0.89 against 0.86).
* In separate default-size runs, S = 16, 32, 64 gave 0.75, 0.92, 0.93.

Against the published spare-factor plot:

* 1-LLA (0.37, 0.74, 0.78 published) matches.
* Zipf is lower here (0.48, 0.62, 0.70 published). The published Zipf values
  are those of a capped threshold. Uncapped, the text gives Zipf "around 0.4"
  at 0.20 spare, as here.

## Departures and own choices

Beyond the architecture as described, these points are this
implementation's own choices:

* The code family (cyclic Hamming code) and the primitive polynomials.
* The in-use test above, and never invalidating vacated lines.
* The format pass, and `base` starting at 1.
* The catch-up move order, with its line buffer and moved/epoch bit.
* When a colliding remapping's victim would have to leave the window, the
  whole operation becomes a catch-up. The victim's probe is dropped, and the
  host address moves to the new base with every other address, not to
  `i + 1`.
* The pending host write is not checked against `PHI` again after a
  remapping.
* Wear is read from the medium with every host write.
* `PHI` is an elaboration-time parameter, not a run-time register.
* The threshold formula has two printed forms, splitting at
  `N/(S*w_max) = 1/3` or at `2/3`. The 1/3 form is used: it is continuous,
  and it reproduces the published thresholds (e.g. `PHI = 96` for
  `w_max = 128`).

Not built:

* The table-free forward lookup, which probes all `S` candidate PLAs and
  picks the one whose stored compact index matches. Nothing here keeps
  stale metadata from matching.
* Compact membership data structures for the table.
* The data-ECC decoder that would give a reliability-based wear estimate.
  The medium model returns its write count as the estimate.
* The device random-number generator. The seed is an input.

## Limitations

* `cyclic_encoder` unrolls over all `2^M - 1 - M` message bits. It suits
  `M <= 16`. A 2^30-line device would need a closed form, as two constant
  `GF(2^M)` multiplications.
* Indices past `N - 1` reuse LFSR numbers. By then the device is far past
  its useful life in every simulated workload.
* The map table is a flip-flop array with one combinational read port. A
  real device would use SRAM, with a registered read and one more pipeline
  state.

## Files

| file | contents |
|---|---|
| `rtl/ecc_map_pkg.sv` | primitive polynomials, threshold function |
| `rtl/cyclic_encoder.sv` | combinational systematic cyclic encoder |
| `rtl/ecc_map_fn.sv` | forward and inverse mapping functions |
| `rtl/lfsr_window.sv` | index randomisation LFSR with window cache |
| `rtl/map_table.sv` | compact-index table with moved bit |
| `rtl/remap_trigger.sv` | threshold and trigger rule |
| `rtl/ecc_map_device.sv` | controller, top level |
| `tb/nvm_media_model.sv` | behavioural endurance-limited line memory |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_ecc_map_device` (end to end, small), `tb_ecc_map_full` (default size, through the first catch-up and on to end of life), `tb_ecc_map_workloads` (utilizations at size to endurance 8), `tb_ecc_map_sweep` (ratio, window and spare-factor trends), `tb_ecc_map_phi_cap` (threshold cap and threshold sweep) |
| `tb/wl_harness.sv` | controller, medium model and workload generator for the trend runs |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/ecc_map_pkg.sv tb/tb_ecc_map_device.sv --top-module tb_ecc_map_device
./obj_dir/Vtb_ecc_map_device
```

Replace the testbench name to run another one. Run times:

* block tests: under a second each
* `tb_ecc_map_phi_cap`: 25 s
* `tb_ecc_map_workloads`: 40 s
* `tb_ecc_map_sweep`: about 2 minutes
* `tb_ecc_map_full`: under 3 minutes

To study other sizes, override `M`, `K`,
`S`, `W_MAX` or `CAP_PCT` on `ecc_map_device` and the matching `M`,
`DATA_W`, `SW` and `W_MAX` on `nvm_media_model`.
