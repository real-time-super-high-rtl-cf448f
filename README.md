# Prediction core and stream output of a 4K/8K HEVC encoder chip

An HEVC encoder for 4K and 8K television has to find motion over very wide ranges,
evaluate many block sizes and make its mode decisions in real time. It must also
feed several motion-search engines from a reference picture that does not fit on
chip, and merge the streams of several chips into one MPEG-2 transport stream.
This RTL covers these parts of such a chip:

* a motion-search engine that works on **bit-reduced samples**. Flat picture
  regions are searched with their low-order bits instead of their high-order bits,
  and unusable search points are skipped;
* a **wide-range search** whose centre and downscaling ratio follow the motion
  histogram of the previous picture;
* **SAD aggregation**, which turns the search results of four small blocks into
  the result of their parent block without searching it again;
* the per-CTU choice of block sizes for fractional search. Intra-direction
  estimation from edge histograms. A sequential intra/inter decision;
* a **reference picture cache** of 64 SRAMs that returns any 32x16 sample region in
  one cycle;
* memory-bus QoS arbitration;
* a **distributed TS multiplexer**. Each chip packetises its own video, and the
  chips are chained so that the last one outputs a single valid transport stream.

`nara_top` puts all of these together. Parts that are not built here have their
signals on its ports: the pixel pipelines, the FME engines, the entropy coder, the
DRAM controller and the CPUs.

All code is SystemVerilog-2017. It uses only synthesizable constructs and has no
vendor primitives. `enc_pkg` holds the shared types (`mv_t`, `cost_t`), the TS
constants and the bit-cost function.

## Bit-reduced motion search (`flat_detect`, `bit_reduce`, `adaptive_me`)

This is the least obvious part of the design. Motion search normally computes the
SAD on all M bits of each sample. Here it uses only `B = M - RED` bits (8 - 4 = 4 by
default). This shrinks the window memories and the adders. Dropping the low bits
loses detail in smooth areas, so the design handles those areas separately:

* `flat_detect` scans the picture in raster order. A 64x64 region is **flat** when
  the upper `k` bits of all its samples are equal. That common value is the
  region's **shared value A** (`KMAX` bits, right-aligned). Regions cut by the
  right or bottom picture edge are judged on the samples they have. There is one
  result per region, on the region's last sample.
* `bit_reduce` chooses the bits to keep. In a non-flat region it keeps the top
  `B` bits (`pix >> RED`). In a flat region the top `k` bits carry no information,
  so it keeps the `B` bits just below them (`pix >> (RED - k)`). The lowest
  `x = RED - k` bits are dropped in both cases.
* `adaptive_me` holds the reduced search window (`(2RX+4) x (2RY+4)` samples) and a
  4x4 template. It visits one search point per cycle, row by row. A four-row shift
  register avoids random window reads. For a flat block, a window sample from a
  different flat region, or with a different A, cannot be compared bit for bit. Such
  points, and points whose window rows were never loaded, are **skipped**: they are
  reported with `pt_skip` and get no cost. Flat-block SADs are shifted left by
  `RED - k`, which puts them on the same scale as full-range SADs. The engine then
  forms `Cost = SAD + lambda * BitCost(mv - mvp)`, using signed Exp-Golomb code
  lengths, and keeps the minimum. Every point's SAD is also streamed out
  (`pt_valid`, `pt_dx`, `pt_dy`, `pt_sad`), which the aggregation needs. A search
  takes `(2RX+1)(2RY+1) + 1` cycles after `start`.

## Wide-range search centre (`wme_center`)

The wide-range search (WME) runs `adaptive_me` with a +-48 x +-24 window on a picture
downscaled by 4 or 8, which covers up to +-384 x +-192 full pels. `wme_center`
builds separate x and y histograms of the picture's WME vectors, using 4-pel bins.
At `pic_end` it scans them in `NBX + 2` cycles and outputs the following:

* the new centre: the mode of each axis, stretched by `dcur / dprev` and clipped
  to the range;
* `quarter`: set when the stretched extent of the populated bins, counting only
  bins above `min_count`, fits the 1/4-downscaled range of +-192 x +-96. Otherwise
  the next picture uses 1/8.

In `nara_top`, WME vectors are multiplied by 4 or 8 before they enter the histogram.
The centre is divided back before it returns to the WME engine.

## Multi-block aggregation (`sad_aggregator`, `fme_combo_select`)

The middle-range search (MME) searches a 7x7 area around each child block's
centre. `sad_aggregator` takes the SAD maps of four sibling children. Their areas
overlap only in part, and the parent's area is their intersection (the "AND"
region). The parent centre is the middle of that intersection. Each parent SAD is
the sum of the four child SADs at the same absolute vector, valid only where all
four children had that point. The best parent vector is then chosen with the same
cost rule as in the search engine. It takes one cycle. In `nara_top`, the SAD
stream of four consecutive MME searches is buffered and handed over after the
fourth.

There are three fractional-pel engines, so each CTU can refine only one of two
block-size sets: {8, 16, 32} or {16, 32, 64}. `fme_combo_select` adds up the MME
costs for each block size over the CTU. At `ctu_end` it picks the set with the
lower total; a tie goes to the smaller set.

## Intra direction estimation (`med_edge`, `ipd_select`)

`med_edge` applies the five-tap filter `-1 -2 0 2 1` horizontally and vertically
to each sample of a 4x4 block. The input is an 8x8 patch that includes a 2-sample
border. Samples with `|gx| + |gy| >= EDGE_TH` are edge samples. Each edge sample's
direction is quantised to the nearest HEVC angular mode:

* |gx| >= |gy| gives a mode around 26;
* otherwise, a mode around 10;
* the sign of the offset follows whether gx and gy agree.

The thresholds sit halfway between the HEVC angle steps. The result is a 33-bin
histogram per 4x4 block. `ipd_select` adds four histograms to make the parent's
histogram. It outputs up to five candidates: planar, DC and the three largest bins.

## Sequential intra/inter decision (`iim_decide`)

Costs from the parallel pipelines were computed before the neighbours' final modes
were known. `iim_decide` takes the blocks of a CTU one at a time, in z-order. For
each block it does the following:

1. It recomputes the inter cost with the vector predictor of the final neighbours.
   The predictor is the left neighbour's MV if that neighbour is inter, else the
   above neighbour's MV if inter, else zero. This is a reduced form of the
   standard's rule.
2. It applies `(cost * scale) >> 6 + offset` to both costs. There is a scale and
   offset register pair per mode, which software can rewrite between CTUs.
3. It picks the cheaper mode. The decision appears one cycle after the block.

Neighbour modes and vectors are kept in an 8x8 map for the CTU, a left column and
a line buffer for the CTU row above. This block does not choose between block
partitions. Blocks arrive already partitioned.

## Reference picture cache (`ref_cache`, `ref_cache_arbiter`, `sram_sp`)

The cache holds a band of one reference picture as 10-bit samples. It is built
from 64 single-port SRAMs of 80 bits x 10240 words, 52.4 Mbit in total. One SRAM
word holds a segment of 8 horizontal samples. The segment at segment column
`sx = x/8` and line `y` is placed as follows:

    bank    = (sx mod 4) + 4 * (y mod 16)
    address = ((y/16) mod TILE_ROWS) * TILES_X + sx/4

Any 32x16 region whose x is a multiple of 8 therefore touches each bank exactly
once. It is read or written in one cycle as a 5120-bit word (`rd_data[16][32]`).
The read latency is one cycle. An assertion flags a read and a write in the same
cycle.

`ref_cache_arbiter` owns the single port:

* **Fill mode** runs from `pic_start` to `fill_done`. During fill mode, writes
  always win.
* After that, the port is time-sliced. Slot 0 of every `SLOTS` cycles belongs to
  writes. The other slots serve up to `NREQ` read requesters in round-robin order.
* `rvalid` follows a grant after the cache latency.

## Memory bus QoS (`mbus_qos_arbiter`)

Each requester has a static 2-bit priority class. A requester whose buffer level
is at or below its low threshold (underrun) is raised above all classes for that
arbitration. So is one at or above its high threshold (overrun). Ties are broken
round robin. The grant is combinational.

## Transport stream output (`ts_packetizer`, `ts_mux`)

`ts_packetizer` cuts the video PES bytes into 188-byte packets:

* the header is sync byte 0x47 and the PID;
* the payload-unit-start flag is set on the packet that begins a PES;
* a 4-bit continuity counter counts the packets;
* a new PES or `eop` closes the current packet early. Its free bytes are filled
  with an adaptation-field stuffing area;
* `flushed` pulses once the picture's last packet has left.

`ts_mux` runs in each chip of a daisy chain. Its `ext_*` input comes from the
previous chip and its `out_*` output goes to the next. It switches sources only
at packet boundaries. It has two modes:

* **Concatenation** (`mode=0`): one picture is split into horizontal slices, one
  slice per chip.
  * A chip relays the external stream ("through" state) until it receives the
    token. It then inserts its own video packets as well.
  * When its packetizer reports the slice flushed, the chip sends `token_out` to
    the next chip and returns to relaying.
  * The last chip (`master`) also sends its audio, PSI and PCR packets (`aux_*`).
    It fills idle packet slots with null packets (PID 0x1FFF).
  * The master renumbers the continuity counter of every packet on `video_pid`.
    This is needed because each chip counted its own packets.
* **Mixture** (`mode=1`): several programmes travel in one stream.
  * Every chip forwards external, local video and aux packets as they come, in
    round-robin order.
  * The master fills idle slots with null packets.
  * The master also overwrites every PCR with its own 27 MHz count, taken at the
    packet's start (`pcr_tick` advances it). This removes the jitter that the
    relay chain added.

## Top level (`nara_top`)

Every block above is instantiated once. Parameters default to a 4K picture: a
3840x2160 picture, a +-48 x +-24 WME window, a 7x7 MME area and 4-bit reduced
SADs. The internal connections are:

* **WME:** WME result → `wme_center` → WME centre and downscale ratio.
* **MME:** MME point stream → 4-child buffer → `sad_aggregator`.
* **FME set choice:** `fme_combo_select` receives three kinds of costs. The MME
  child costs are counted as 8x8 and the aggregated costs as 16x16. External
  32x32/64x64 costs come from the `fme_*` ports. Internal costs take priority,
  and `fme_cost_ready` reports when an external cost was taken.
* **Intra direction:** `med_edge` → histograms of four 4x4 blocks → `ipd_select`.
* **Cache:** arbiter → `ref_cache`.
* **Video output:** `ts_packetizer` → `ts_mux`.

The flat detector's results are brought out. The search engines take their
flat/A inputs from ports, because the sample loaders between them are not part of
this design. The single cache instance stands for one reference picture. A chip
configured for several references, or for 8K, replicates it.

## Where the design departs from the original architecture

* The sample loaders, FME engines, intra cost evaluation, transform and entropy
  coding, the DRAM controller and the CPUs are not built.
* The ME engines take their window and template through write ports, one sample
  per cycle. They process one search point per cycle, not a wide systolic array.
* The split of the 4-bit reduction into `k` and `x`, the SAD width, the histogram
  bin width, the edge threshold, the MVP rule, the Q6 scale format and all arbiter
  slot counts are choices of this design.
* The WME and MME instances are generic `adaptive_me` engines. They are not
  sized for throughput.
* For 8K, `PIC_W` must be set to 7680 and four caches are needed (210 Mbit).

## Simulating

Every block `X` has a self-checking testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example:

    verilator --binary --timing --assert --top-module tb_ts_mux \
        rtl/enc_pkg.sv $(ls rtl/*.sv | grep -v enc_pkg) tb/tb_ts_mux.sv
    ./obj_dir/Vtb_ts_mux

The package must come first. `tb_nara_top` runs the top level at its default
(full 4K) parameters and takes a few seconds. It goes through the following, in
order:

* 64 picture lines for flat detection;
* one full WME search and the centre update;
* four MME child searches (two flat, two busy, with skipped points) and their
  aggregation;
* two CTUs of FME set choice (one per set);
* a 4x4 → 8x8 intra-direction estimate;
* an intra and an inter IIM decision;
* a fill-mode cache write, then a slot-mode read with a data check;
* a QoS boost;
* a short picture through the packetizer and multiplexer, with stuffing, null
  packets and the token pass.

It counts each of these events and fails if any never happens. The 1/4 ↔ 1/8
downscaling switch is checked in `tb_wme_center`, not at the top level.
