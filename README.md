# Retroactive Packet Sampling at line rate

Retroactive Packet Sampling (RPS) lets an outside monitor measure the loss and delay that a network
operator's links cause to traffic. The operator cannot cheat by treating sampled packets better.
The trick is that nobody can tell, while a packet is in flight, whether it will be sampled. Every
packet leaves a small *receipt* at the sampling node. Most receipts are thrown away. Now and then a
packet's own hash puts it in a *direct disclosure* range, and it is reported at once. That disclosure
then picks some *older* receipts of the same flow from a buffer and reports them as *delayed
disclosures*. A receipt is eligible only if it is older than a *quiet time* κ−μ, and only if a keyed
hash of the two digests falls in a selection range. Two nodes on either side of a link sample the
same packets, because all the decisions come from packet contents. The monitor compares what the
two nodes report.

This repository holds SystemVerilog for the data-plane half of such a sampler. It takes one packet
per clock and makes exactly one buffer access per packet. Its sizes are those of one pipeline of a
programmable switch ASIC. The other half is a small software controller on the switch CPU. It is
not included, but its interface is brought out and a testbench models it.

## Receipts

Each packet of an installed IPv4 flow produces a 12-byte receipt (`rps_receipt_gen`):

| field  | bits | contents |
|--------|------|----------|
| flowid | 48   | /24 prefix of the source address, then the /24 prefix of the destination |
| ts     | 16   | bits [35:20] of the nanosecond ingress clock: ticks of 2^20 ns ≈ 1.05 ms, wrapping every ≈ 68.7 s |
| digest | 32   | CRC-32 over 48 bytes that no router changes |

The 48 digest bytes are built as follows:
- the IPv4 header without flags/fragment offset and checksum, which leaves 16 of its 20 bytes;
- then the first 32 bytes after the IPv4 header (TCP header plus 12 payload bytes, or UDP header
  plus 24).

TTL stays in. The IPv4 header is taken to be 20 bytes: packets with options are hashed over the same
byte positions. The right shift by 20 bits stands in for a division by 10^6, which the switch
cannot do per packet.

The CRC (`rps_crc32`) is the Ethernet CRC-32: reflected polynomial 0xEDB88320, initial value and
final xor 0xFFFFFFFF, byte 0 first. The same block, 8 bytes wide, computes the selection hash over
{disclosure digest, receipt digest}, with the receipt digest in the low bytes.

## One buffer operation per packet

The textbook algorithm does several things on each direct disclosure:
- it walks the whole buffer;
- it reports the eligible receipts of the flow;
- it deletes the rest.

A switch pipeline can do none of that. This design turns the algorithm around:

1. **The buffer is a plain FIFO** (`rps_receipt_buffer`, 286,733 slots). Each packet writes its
   entry at the write pointer and reads out the entry that was there, which is the oldest one.
   Nothing is ever deleted early.
2. **Each receipt carries the number of the disclosure that will judge it.** `rps_flow_table`
   keeps a per-flow 8-bit *next disclosure number* `next_d`:
   - every receipt is tagged with the current value;
   - a direct disclosure takes that number for itself and then increments it.

   A receipt tagged *k* therefore belongs to the first direct disclosure of its flow that came after
   it.
3. **Judgement happens at eviction time.** When a receipt falls out of the FIFO, the design looks up
   disclosure *k* of its flow in the disclosure tracker (`rps_disc_tracker`). It then checks the
   quiet time and the selection hash (`rps_evict_proc`). If both pass, it reports a delayed
   disclosure. If the tracker has no entry (the disclosure has not happened yet, or the controller
   has not written it), the receipt is dropped.
4. **Markers make lost receipts visible.** A direct disclosure writes a *marker* into the FIFO
   instead of its receipt: digest and timestamp all ones, plus its number. Suppose a marker reaches
   the end of the FIFO while it is still its flow's latest disclosure (`num + 1 == next_d`). Then
   every later receipt of that flow will also leave the buffer before any disclosure could pick it.
   The design reports a *late disclosure warning* carrying the marker, so the monitor does not
   mistake the missing samples for loss.

### The quiet-time check

Receipts hold only 16-bit timestamps, and the data path cannot subtract and compare 16-bit values
modulo wrap-around cheaply. The controller therefore writes each tracker entry with three values:
- the disclosure's ts;
- the earliest time of its quiet window, ts_q = ts − (κ−μ) mod 2^16;
- an `overflow` flag set when that subtraction wrapped.

`rps_quiet_check` then only compares:

- no wrap: in quiet time ⇔ ts_q ≤ r.ts ≤ d.ts
- wrap:    in quiet time ⇔ ts_q ≤ r.ts **or** r.ts ≤ d.ts

A receipt in the quiet time is not eligible. The check is exact as long as a receipt is less than
one timestamp period (≈ 68 s) older than its disclosure.

## Pipeline and timing

| stage | what happens |
|-------|--------------|
| S1 | the header window and clock are registered; `rps_receipt_gen` builds the receipt. The flow table matches the flowid (port A), counts the packet, picks the low- or high-rate range from the flow's rate, decides *direct*, and returns `next_d` |
| S2 | registered. The FIFO swap is issued, with the marker for a direct disclosure. A direct disclosure goes to `direct_o` and into the ring of `rps_disc_regs` |
| S3 | the evicted entry appears. The flow table matches its flowid again (port B, for its slot and current `next_d`). The tracker is read with (slot, number) |
| S4 | `rps_evict_proc` decides delayed / late / nothing |
| S5 | `evict_valid_o` and `evict_report_o` are registered |

For a packet presented on `pkt_valid_i` in cycle *n*:
- its direct disclosure appears on `direct_valid_o` in cycle *n+2*;
- the report for the entry it evicts appears on `evict_valid_o` in cycle *n+5*.

There is no back-pressure: one packet per cycle, always.

Two things are visible to a lookup only after a delay:
- the `next_d` that port B sees includes direct disclosures of packets up to cycle *n+1*;
- tracker writes made up to cycle *n+2* are visible to the lookup for a packet of cycle *n*.

Non-IPv4 frames and packets of flows that are not installed pass without a receipt.

## The controller's part

The controller is not included. Its ports on `rps_sampler` are:

| ports | use |
|-------|-----|
| `ctrl_flow_*` | install or remove a flowid in one of 256 flow slots. Installing clears the slot's counter and `next_d` |
| `ctrl_rd_*`, `ctrl_rate_*` | read a slot's packet counter and `next_d`; write the slot's measured rate (packets/s). A rate at or above `rate_thresh_i` selects `range_high_rate_i` |
| `ctrl_disc_*` | poll the 4000-entry ring of direct disclosures. `ctrl_disc_count_o` counts all disclosures ever written, so new entries and overruns are easy to spot |
| `ctrl_trk_*` | write a tracker entry {digest, ts, ts_q, overflow} for (slot, number), or remove it with `valid = 0` |

Because `next_d` is only 8 bits, a controller should remove entry *k+1* of a flow when it writes
entry *k*. Otherwise a receipt tagged *k+1* could be judged by a disclosure from 256 numbers
earlier. The end-to-end testbenches do this. Typical configuration values, from the parameter set RPS was evaluated with:

| input | value |
|-------|-------|
| `rate_thresh_i` | 437 Kpps |
| `range_high_rate_i` | δ_high · 2^32 = 5,884 (δ = 1.37·10⁻⁶) |
| `range_low_rate_i` | δ_low · 2^32 = 93,844 (δ = 2.185·10⁻⁵) |
| `sel_range_i` | σ · 2^32 = 42,949,673 (σ = 1 %) |
| κ | 100 ms ≈ 95 ticks |

μ has no given value; the tests use κ−μ = 95 ticks.

## Sizes and what they hold

| parameter | default | origin |
|-----------|---------|--------|
| `BUF_DEPTH` | 286,733 | the largest buffer of 12-byte receipts that one switch pipeline holds in 16-bit registers |
| `NUM_FLOWS` | 256 | the flow count of the optimised switch configuration |
| `DISC_REG_DEPTH` | 4,000 | direct-disclosure ring; at 1 Gpps and δ ≈ 10⁻⁵ that is 0.4 s of disclosures |

Each FIFO entry is 104 bits: the 12-byte receipt plus the 1-byte number. The tracker is directly
mapped over all 256 × 256 keys, with one valid bit per entry.

As a rule of thumb, a buffer must hold about 0.24 s of peak traffic to collect enough samples.
With 286,733 slots, the design serves one flow of up to ≈ 700 Kpps. Two or more such flows (≈ 1 Mpps and up), or a small
flow next to one 1×–8× larger, need more buffer. At those loads the sampler still runs correctly,
but receipts leave the FIFO too early, and late warnings and missing samples result. Any clock of
10 MHz or more keeps up with the packet rates involved.

## What is this design's own

The following follow the original design: the algorithm, the field sizes, the marker encoding, the
quiet-time comparison, the sizes above and the split of work between pipeline and controller.
These are choices made here:
- the stage boundaries;
- the second flow-table match port for evicted entries;
- the late-warning test (`num + 1 == next_d`). The original design notifies the controller of every
  marker that leaves the buffer; here only markers that are still their flow's latest disclosure are
  reported, since an earlier one has a successor that can still pick the flow's receipts;
- a direct disclosure also does the buffer swap, writing its marker. The original algorithm in
  pseudo-code swaps only for other packets, while its late-detection scheme puts disclosures in
  the buffer;
- the directly mapped tracker and its remove operation;
- flow lookup as a CAM in which the lowest slot wins;
- the 66-byte header window;
- the byte order of the selection hash;
- the disclosure counter;
- the report encoding (`rep_kind_e`: `REP_DELAYED`, `REP_LATE`).

Out of scope are the controller, finding the disclosure by timestamp range instead of by number,
and other ways to build RPS on a switch: mirroring every header to
the host, sending receipts in digest batches, and the multi-operation "naive" buffer.

## Files

`rtl/`
- `rps_pkg.sv`: widths, the receipt, entry, tracker and report types.
- `rps_sampler.sv` (top) and the blocks named above.

`tb/`
- `rps_tb_pkg.sv`: reference functions. These are a table-driven CRC-32, a packet generator,
  digest/flowid models and a wrap-aware quiet-time model.
- `tb_<block>.sv`: one self-checking testbench per block.
- `tb_rps_sampler.sv`: the whole sampler at small sizes (64 slots, 8 flows, 16 registers, 2-tick
  quiet time, a fast clock) for 6,000 packets.
- `tb_rps_sampler_full.sv`: the sampler at its default sizes for 1.5 M packets, using the published
  ranges after a short phase with wider ranges.

The two end-to-end benches replay the logged traffic and controller writes through a reference
model. They check every report's cycle and contents. Each counts every mechanism and fails if one
never occurred: direct, eviction, delayed, quiet-time rejection with and without wrap, hash
rejection, no disclosure, late warning, high-rate range, unknown flow, non-IPv4, register ring wrap.
Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

How far this goes: the benches prove that the pipeline does what the reference model says, cycle
for cycle, at the default sizes. They cover about 1.5 s of traffic. They do not measure how many
samples a deployment collects over minutes of real traffic, so the sizing statements above are
arithmetic, not simulation results.

To simulate with Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_rps_sampler \
        rtl/rps_pkg.sv tb/rps_tb_pkg.sv $(ls rtl/*.sv | grep -v rps_pkg) tb/tb_rps_sampler.sv -o sim
    obj_dir/sim

Swap in another `tb_*` name for the other benches. The full-size bench builds in seconds and runs
in about 1.5 minutes.

Lint notes:
- The 65,536-bit valid vector of the tracker exceeds Verilator's default replication limit in its
  reset.
- Only timestamp bits [35:20] are used.
- The reset also feeds a `disable iff` in an assertion.
