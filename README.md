# Check-Sort-Push readout for an iRPC front-end board

A front-end board of the CMS improved RPC (iRPC) chambers reads one half-chamber:
48 strips, each read at both ends, the low-radius (LR) and the high-radius (HR)
end, by three 32-channel TDCs. That is 96 channels sharing one high-speed link, which
carries at most three 32-bit TDC words per bunch crossing (BX, 25 ns). When the
channels are read in a fixed polling order, a word's wait before it is sent depends on
where its channel sits in that order, and the wait grows with the hit rate. The back
end has to wait for the slowest channel before it can rebuild a BX, so its Demux window
must grow with it.

Check-Sort-Push (CSP) sends words in the order of the BX in which their hits were
generated, so that no channel waits longer than any other:

* **Check** (40 MHz): every BX, each channel with a hit stores a word into its own FIFO.
  The word holds the generation BX, the device ID, the channel ID and the TDC value.
* **Sort**, in two steps. The first step (160 MHz) moves words from the 32 channel
  FIFOs of each TDC into that TDC's FIFO, earliest first. The second step (120 MHz)
  moves words from the three TDC FIFOs into one concentrator FIFO, earliest first.
* **Push** (40 MHz): once per BX, the three earliest words waiting go into the
  outgoing frame, each with a valid flag.

This repository holds synthesizable SystemVerilog for the whole chain and two small
back-end blocks. The first measures each word's sending delay and applies the Demux
window. The second pairs the two end words of each strip and computes where along the
strip the hit was.

```
 hit[95:0], tdc[95:0]        40 MHz        160 MHz                 120 MHz          40 MHz
 ───────────────────┐
  device 0 (32 ch) ─┼─ csp_check ─ 32 x chfifo ─ csp_first_sort ─ TDC FIFO ─┐
  device 1 (32 ch) ─┼─ csp_check ─ 32 x chfifo ─ csp_first_sort ─ TDC FIFO ─┼─ csp_second_sort ─ concentrator ─ csp_push ─ frame ─ bee_demux ─ bee_hit_position
  device 2 (32 ch) ─┼─ csp_check ─ 32 x chfifo ─ csp_first_sort ─ TDC FIFO ─┘
                    (csp_tdc_group = one row)                                 (csp_fee = everything left of frame)
```

## Channels and words

Device `d` (0 to 2) serves strips `16d` to `16d+15`. Within a device, channel `c < 16`
is the LR end of strip `c`, and channel `c + 16` is the HR end of the same strip. On the
top-level ports, channel `32d + c` is channel `c` of device `d`.

A word (`csp_pkg::word_t`, 32 bits) is laid out as follows:

| bits  | field | meaning |
|-------|-------|---------|
| 31:24 | `bx`  | BX number at which the hit was presented (8-bit counter, wraps) |
| 23:21 | `dev` | TDC device ID |
| 20:16 | `ch`  | channel within the device |
| 15:0  | `tdc` | TDC value supplied with the hit |

A frame (`frame_t`, 99 bits) is `valid[2:0]` followed by `word[2]`, `word[1]` and
`word[0]`. `word[0]` is the earliest word. Valid flags fill from bit 0 upwards.

## First sorting: finding the two earliest strips

This is the heart of the design and the part with the most detail.

**Search over strips, not channels.** A hit on a strip reaches both ends within a few
nanoseconds. Both of its words therefore carry the same BX. The search looks only at the
16 head words of one end, one key per strip, and then takes both ends of each strip it
picks. This halves the comparator tree.

**Keys.** Each key is 8 bits. An empty channel FIFO gives 255, so it never wins. The
channel FIFOs work in first-word fall-through mode, so their heads can be read without
popping them.

**Tree (`csp_min2_tree`).** Four register stages at 160 MHz:

1. Compare the 16 keys in pairs (0/1, 2/3, and so on). Each pair becomes a group of
   (smaller, larger).
2. to 4. Merge neighbouring groups with the `csp_meg` unit: 8 groups become 4, then 2,
   then 1.

The result is the smallest and second-smallest key, each with its strip index. It
appears four clocks after the keys.

**Merge unit (`csp_meg`).** It merges groups A and B, each given as (min1, min2):

* `min1` is the smaller of `A.min1` and `B.min1`.
* `min2` is the smaller of two candidates: the minimum that lost that comparison, and
  the runner-up of the winning group.

Only two comparisons are needed, not a sort of four values. Example: A = (30, 31) and
B = (32, 255). Then min1 = 30, and min2 is the smaller of 32 and 31, which is 31.

**Pipelined search (`csp_first_sort`).** A new search enters the tree on every
160 MHz clock, so four searches are in flight at once. Each clock:

1. The keys of one end are presented. The end alternates: HR, LR, HR, and so on.
2. The search that entered four clocks ago returns its two earliest strips.
3. A returned strip is used only if its key was not 255, no result was taken for it in
   the last four clocks, and none of its words are still waiting in the pop queue.
   These two masks make sure that a word is never read twice, even though the search
   saw the FIFO heads four clocks earlier. The same masks also set the key of such a
   strip to 255 in new searches.
4. The words of the used strips are listed: the HR and LR heads of the earliest strip,
   then of the second strip. An end is listed only if its FIFO holds a word.
5. The list goes into an 8-entry pop queue if there is room for all of it. If there
   is not, the result is dropped. Its words stay in their FIFOs and a later search
   finds them again.
6. The queue pops one channel FIFO per clock into the TDC FIFO, unless the TDC FIFO
   is full.

One pop per clock is four words per BX for each device. A word in otherwise idle FIFOs
is written 5 or 6 clocks after it becomes visible: four for the search, one for the
queue, and up to one waiting for a search on its end. A strip that becomes free while a
search is in flight can be missed by that one search, so a slightly later word may
overtake it by a few clocks. The next search picks it up.

**HR/LR alternation.** Without it, a word that only the LR end recorded would stay
behind while HR words keep coming: its strip's HR key is 255, so the HR search never
picks that strip. With the end changing every clock, such a word waits at most one
clock for a search that can see it.

## Timestamps that wrap

The BX number is 8 bits and wraps every 256 BX. A plain comparison of stored BX numbers
would briefly send new words ahead of old ones after a wrap. Both sorting steps therefore
compare the key `ts - bx_ref + 250`, clamped to 254:

* `bx_ref` is the BX counter, carried into the sorting clock domain through a Gray-code
  synchronizer.
* A word generated 250 BX ago gets key 0.
* A word stamped a few BX after the synchronized reference, because that reference lags
  by a clock or two, still gets a key below 255.
* 255 stays reserved for "empty".

The comparison stays 8 bits wide. Words older than 250 BX would be misordered. At the
design's rates such words do not exist.

## Second sorting, concentrator and Push

**`csp_second_sort`** looks at the three TDC FIFO heads and skips the empty ones. Every
120 MHz clock it moves the head with the smallest key into the concentrator. On equal
keys the lower device wins. One word per 120 MHz clock is three words per BX, which is
exactly what Push sends.

**`csp_concentrator_fifo`** takes one word per 120 MHz clock and gives up to three per
40 MHz clock. It is built from three dual-clock lanes. Words go into the lanes in turn
(0, 1, 2, 0, and so on) and come out in the same turn. A read of `k` words therefore pops
`k` different lanes once each. Every lane pointer moves by at most one per clock, so its
Gray-coded crossing stays safe. `avail` is a thermometer code: a word is offered only
when all older words are offered too.

**`csp_push`** takes everything offered, up to three words, and registers the frame.

## Back end: sending delay and Demux window

`bee_demux` runs its own BX counter, reset together with the front end's. It computes
each word's sending delay as:

```
delay = bx_backend - word.bx - FIXED_LAT      (mod 256)
```

`FIXED_LAT` (default 4) removes the part of the latency that every word has: the
clock-domain crossings of the front end and the frame register. The window then only
has to cover the part that depends on traffic. `FIXED_LAT` must not exceed the shortest
possible latency. A word that arrived sooner would get a negative delay, which wraps to
a large value and is counted late.

Words with `delay <= DEMUX_WINDOW` are accepted and passed on. The others are counted
as late. The block also keeps a running maximum of the delay. The generation BX in each
word is what places the hit back in its own BX.

## Back end: hit position along the strip

A signal from a hit travels along the strip to both ends. With `t1` the TDC value at
the LR end, `t2` the one at the HR end, strip length `L` and signal speed `v`, the hit
lies at

```
r = L/2 - (t2 - t1) * v / 2          (measured from the LR end)
```

`bee_hit_position` computes this as `(STRIP_LEN - (t2 - t1) * V_PER_TDC) >>> 1` in signed
arithmetic. `STRIP_LEN` is in any length unit. `V_PER_TDC` is the speed in that unit
per TDC count. Both defaults (1600 and 20) are placeholders to be set for a real
chamber.

Pairing works like this:

* The block keeps, for each of the 48 strips and each end, the last word that has not
  found its partner yet.
* Two words pair when they are the two ends of the same strip with the same
  generation BX. The stored word is then released.
* A word that finds no partner is stored. It replaces an older unpaired word of the
  same end, which is counted in `n_unpaired`.
* The three words of a frame are handled in order in one clock, so both ends arriving
  in one frame pair at once.
* The BX number is 8 bits, so an old unpaired word would match a new word of the same
  BX number 256 BX later. A sweep therefore visits one strip per clock, every strip
  every 48 BX, and releases stored words more than 127 BX old. These are also counted
  in `n_unpaired`.

Sorting sends the two ends of a strip close together, usually in the same or the next
frame, so a store of one word per end is enough.

## Timing and capacity

| quantity | value |
|----------|-------|
| Push rate | 3 words per BX |
| Second sorting | 1 word per 120 MHz clock, i.e. 3 per BX |
| First sorting, per device | 1 word per 160 MHz clock, i.e. 4 per BX |
| Tree latency | 4 clocks at 160 MHz |
| Smallest time from hit to frame (idle system) | 5 BX |

The 5 BX floor comes from three crossings and the work between them:

* three dual-clock FIFO crossings, each two synchronizer flops in the receiving domain;
  the concentrator's flops run at 40 MHz, so that crossing alone costs about 2 BX;
* the 5 to 6 clock search and queue;
* the frame register.

Measured results:

* **End-to-end test.** The load is about 1.6 words per BX: muon clusters of 1 to 8
  strips in 12 % of BXs, plus single-strip background. The time from the hit's BX to
  the frame ranges from 5 to 10 BX. The mean is the same, within 0.5 BX, for all three
  devices and for both strip ends. Every strip fired at both ends gives exactly one
  hit position, and each position is correct. The arrival order does not favour any channel.
* **Window comparison.** Four copies of the design with windows of 8, 12, 16 and 23 BX
  receive the same hits. At about 1.0 and 1.7 words per BX, every word falls inside the
  12, 16 and 23 BX windows. About 99.5 % and 97.6 % fall inside the 8 BX window.
  The longest delays come from several clusters arriving close together: the link
  then sends full frames until the backlog is gone.
* **Two clusters.** Two 8-strip clusters in one BX make 32 words. They leave in 11
  consecutive frames, which is the least possible at 3 words per frame.

The loads above are stated in words per BX because the testbenches generate hits per
strip and BX. How they relate to a flux in kHz/cm² depends on strip areas and cluster
statistics that this RTL does not model. So these delays are not a prediction for a
particular chamber. Published CSP measurements quote a largest delay of about 7 BX at
high rate. The window comparison here finds largest delays of 10 and 11 BX after
the fixed 4 BX is removed. These are the same order, but the loads are not known to
match.

## Design choices beyond the base description

The following were decided here, because the base description of the mechanism leaves
them open:

* Word field widths and order. Frame layout.
* FIFO depths:
  * 16 words per channel FIFO (`CH_AW = 4`);
  * 64 words per TDC FIFO (`TDC_AW = 6`);
  * 96 words in the concentrator (`CONC_AW = 5`, 3 lanes of 32).
* A full channel FIFO drops the new word. A saturating counter per device
  (`drop_count`) counts the drops. Full TDC and concentrator FIFOs stall the sorter that
  feeds them, so they lose nothing.
* The pipelined schedule of the first sorting: a search every clock, the masks, the
  8-entry pop queue, and the order of the words of one result.
* `FIXED_LAT` in the back end.
* Where and how the hit position is computed: after the Demux window, the pairing rule,
  the age sweep, and the placeholder strip length and speed.
* Wrap-safe keys (see above).
* Tie rules:
  * in the pairwise compare, the lower index wins;
  * in `csp_meg`, group B wins (strict `<`);
  * in the second sorting, the lower device wins.
* Clock-domain crossings: Gray-coded dual-clock FIFOs and synchronizers throughout. The
  three clocks may come from one PLL, but no phase relation is assumed.
* Reset: one asynchronous active-low `rst_n`, released in each domain through a
  two-flop synchronizer. The BX counter starts at 0. It is not aligned to an orbit
  signal.
* The TDC FIFO is written at 160 MHz and read at 120 MHz. Some drawings of this
  architecture place the first sorting's logic in the 120 MHz domain; here it runs at
  160 MHz.

## Not included

* The discriminators and TDCs that produce `hit` and `tdc`: they are inputs here.
* The GBT link: header, slow-control bits, encoding and serialization. In
  `irpc_csp_top` the frame goes straight to the back-end block, register to register.
* The back-end DAQ readout with its trigger window, the hit-map memory and cluster
  finding.

## Files

All of these are in `rtl/`, one module or package per file:

| file | contents |
|------|----------|
| `csp_pkg.sv` | widths, `word_t`, `cand_t`, `frame_t`, `ts_key`, `gray2bin` |
| `irpc_csp_top.sv` | top: `csp_fee`, `bee_demux` and `bee_hit_position` |
| `csp_fee.sv` | front end: BX counter, 3 x `csp_tdc_group`, second sorting, concentrator, Push |
| `csp_tdc_group.sv` | one device: `csp_check`, 32 channel FIFOs, `csp_first_sort`, TDC FIFO |
| `csp_check.sv` | Check step |
| `csp_first_sort.sv`, `csp_min2_tree.sv`, `csp_meg.sv` | first sorting |
| `csp_second_sort.sv` | second sorting |
| `csp_concentrator_fifo.sv` | three-lane concentrator |
| `csp_push.sv` | Push step |
| `bee_demux.sv` | back-end delay measurement and Demux window |
| `bee_hit_position.sv` | back-end pairing of strip ends and hit position |
| `csp_async_fifo.sv`, `csp_gray_sync.sv`, `csp_rst_sync.sv` | FIFO and synchronizers |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `CH_AW` | 4 | log2 of the channel FIFO depth |
| `TDC_AW` | 6 | log2 of the TDC FIFO depth |
| `CONC_AW` | 5 | log2 of the depth of each concentrator lane |
| `DEMUX_WINDOW` | 23 | window in BX; 8, 12 and 16 are also meaningful settings |
| `FIXED_LAT` | 4 | fixed latency in BX subtracted from every delay in the back end |
| `STRIP_LEN` | 1600 | strip length, in the length unit chosen for positions |
| `V_PER_TDC` | 20 | signal speed along the strip, in length units per TDC count |

The numbers that fix the structure are not parameters: 96 channels, 3 devices, 16
strips per device, 8-bit keys and 3 words per frame.

## Simulation

Every testbench in `tb/` checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
          rtl/csp_pkg.sv tb/tb_irpc_csp_top.sv --top-module tb_irpc_csp_top
./obj_dir/Vtb_irpc_csp_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_irpc_csp_top` | Whole chain at default sizes. Phase 1: 1500 BX of steady hits; every word arrives exactly once, channel order is kept, nothing is late, and delays do not depend on the channel. Phase 2: a 24-BX burst on all channels; generated = accepted + late + dropped. Every strip fired at both ends must give one correct hit position. Counts three-word frames, LR-end results used, single-ended words, BX wraps, overflows, late words, hit positions and replaced unpaired words, and fails if any of them never happened. |
| `tb_bee_hit_position` | Both ends in one frame in either order, ends in different frames, interleaved strips, ends of different BX, replacement, the 256-BX alias, and random traffic; every hit comes back once with the position it was generated with. |
| `tb_csp_workloads` | Four copies with windows 8, 12, 16 and 23 BX on the same hits, at two rates. Checks that nothing is lost, that acceptance grows with the window and is complete at 23 BX, and that two 8-strip clusters leave in 11 to 13 consecutive frames. |
| `tb_csp_fee` | Front end alone: 800 BX of steady hits, delays within 23 BX. |
| `tb_csp_tdc_group` | One device with real clocks, steady and burst traffic. |
| `tb_csp_first_sort` | The 16-strip example, an LR-only word alone and behind 320 pending words, and random content with stalls. Checks that each result is no later than any head its search could see. |
| `tb_csp_min2_tree`, `tb_csp_meg` | Worked examples and random keys against a reference sort. Checks the 4-clock latency. |
| `tb_csp_second_sort`, `tb_csp_concentrator_fifo`, `tb_csp_push`, `tb_csp_async_fifo`, `tb_csp_check`, `tb_bee_demux` | Each block against an independent model. |

The four system-level testbenches (`tb_irpc_csp_top`, `tb_csp_fee`, `tb_csp_tdc_group`,
`tb_csp_workloads`) draw their traffic from their own xorshift generator with a fixed
start value, so the numbers quoted above do not depend on the simulator seed.

The simulator needs two-state semantics only. Every register that is read is reset.
FIFO memories are not reset, because they are only read behind a valid flag.
