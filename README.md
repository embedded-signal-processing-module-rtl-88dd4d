# Trigger-validated data fragment builder with matched filtering

In a multi-level trigger system, a *primary* detector decides that something interesting
happened at clock `k`. Often the decision arrives a few clocks late. It should also be
confirmed by a *secondary* instrumentation system whose sensors are read out every clock.
This module keeps a short history of every secondary readout channel. When a primary trigger
arrives, it selects the few samples around the trigger instant from each channel, corrects
each channel for its own cable and converter delay, and runs a matched filter over them. It
then packs the raw samples, the filter outputs and the primary decision into a self-describing
data fragment for the next trigger level.

The RTL follows the architecture of the paper *Embedded Signal Processing Module for Online
Filtering in High-Event Rate Conditions* (an FPGA data fragment builder for a high-energy
physics trigger). Its default sizes are that paper's case study:

* a 40 MHz clock;
* 32 ADC channels of 8 bits;
* 7-sample pulses;
* 256-position history memories;
* second-level buffers for 8 events;
* 16-bit filter coefficients.

Where the paper is silent, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
dsp_top
 ├─ cfg_regs            configuration registers + debug read-back (8-bit address bus)
 ├─ debug_counters      packages sent, filter accepts, lost triggers, triggers, last ID
 ├─ fragment_builder
 │   ├─ trigger_ctrl    L1 write pointer, trigger queue ("waiting system"), dispatch
 │   ├─ packet_ctrl     generic controller: 32-bit external word, sub-fragment 0
 │   ├─ N_ADC x ( packet_ctrl (8-bit ADC controller)
 │   │            matched_filter
 │   │            sync_fifo (filter results) )
 │   └─ packer          idle / header / data_header / data / trailer state machine
 └─ sync_fifo           output link buffer (512 words)
```

`dsp_pkg` holds the fragment constants, the trigger record type and the packer state type.
`l1_mem` is the level-1 ring memory used inside every `packet_ctrl`. `sync_fifo` is a
first-word-fall-through FIFO. It serves as the level-2 memory, the trigger queue, the event
record queue, the filter result queue and the output buffer.

## Life of one trigger

Let the primary trigger be high during clock `k` on an otherwise idle module:

| clock | what happens |
|---|---|
| every clock | each channel's sample is written into its L1 ring at the shared write pointer |
| k | `trigger` is sampled together with `time_index`, `trigger_decision` and the current L1 write pointer (the *reference address*), plus a running trigger ID |
| k+1 | the record is at the head of the trigger queue and is dispatched |
| k+2 | the dispatched time index is visible inside the control unit |
| k+3 | the reference address is driven to all packet controllers |
| k+4 | `store_data` pulses; every controller reads its first window sample from L1 |
| k+5 … k+11 | one window sample per clock flows into L2 and through the matched filter |
| k+12 | the event is complete in every L2 memory; the filter results are queued |
| k+13 | `has_data` is high; the packer leaves idle |
| k+14 | first fragment word (header marker) leaves the packer |
| k+15 | first fragment word appears at `out_data` / `out_valid` of `dsp_top` |

The k+2, k+3 and k+4 steps reproduce the trigger waveform published for the original design.
The testbenches check the k+4 and k+15 numbers exactly.

## Window selection: two memory levels and delay compensation

This is the part that needs the most care when changing parameters.

**Level 1.** Each `packet_ctrl` owns an `l1_mem` of `L1_DEPTH` (256) positions. It is written
every clock at the write pointer `l1_wr_addr`, which is the low 8 bits of a free-running clock
counter in `trigger_ctrl`. The write pointer is not tied to `time_index`. Reads are registered
and have one clock of latency.

**Main sample.** On `store_data`, each controller adds its channel delay to the reference
address. The delay is signed, in clocks, and set in register `0x40 + c`. The sum is the
address of the *main sample*. A delay of −3 selects the sample written three clocks before
the trigger clock. This compensates for the primary decision's latency and for the different
signal paths of the converters.

**Window order.** The window has `WIN` = 7 samples, from offset −`PRE` to +(`WIN`−1−`PRE`),
that is −3 … +3. The L1 address read for offset `o` is `main − o`. The window is therefore read
*newest sample first*: main+3, main+2, … main−3. This matches the published transfer waveform.
With reference 31 and delay −3, that waveform shows addresses 31, 30, 29, **28**, 27, 26, 25,
with the main sample at 28. The same order is used everywhere downstream. Filter coefficient
`coef[i]` multiplies the `i`-th sample read, and byte `i mod 4` of L2 word `i / 4` holds that
sample.

**Level 2.** The samples are packed four to a 32-bit word, first-read sample in bits 7:0. With
7 samples, an event takes 2 words. The words go into a FIFO sized for `L2_EVENTS` (8) events.
The packer later pops them.

**Limits on the delay.** The newest sample read is `main + PRE`. It must already be written
when the first read is issued at k+4. For a lone trigger this means `delay + PRE ≤ 3`,
that is `delay ≤ 0` with the default `PRE` = 3. The oldest sample must still be in the ring when
read. Together with the queue age limit below, this allows delays down to about −110 clocks.
The delay register is 8 bits wide (`DELAY_W`).

The generic controller is the same `packet_ctrl` with `SAMPLE_W` = 32, `WIN` = 1 and delay 0.
It stores the external 32-bit word present at the trigger clock.

## The trigger waiting system

Triggers arrive at random and can come back to back. The L1→L2 transfer takes `WIN` clocks per
trigger, so `trigger_ctrl` queues the triggers (`TRIG_FIFO_DEPTH` = 8 records). It releases
them to the controllers under three conditions:

* **spacing**: at most one dispatch every `DISPATCH_GAP` = `WIN` clocks, so one transfer ends
  before the next begins;
* **room in L2**: no dispatch while 8 events sit in the L2 memories and have not yet been
  packed (`read_done`);
* **discard when full**: `trig_discard` is high while the queue is full. A trigger arriving then
  is dropped, and `trig_overflow` pulses.

In addition, a queued trigger that reaches the head of the queue more than `MAX_AGE` = 128 clocks
after it arrived is dropped (`trig_expired`). By then its samples may already have been
overwritten in the 256-position L1 rings. This can only happen when the output link has been
stalled long enough for the L2 memories to fill. Both kinds of loss are added up in debug
counter 2.

`has_data` is a level: it is high while at least one event is complete in L2 and not yet packed.
ADC channel 0's `event_stored` pulse marks completion. All controllers start on the same
`store_data`, and the 7-sample ADC windows finish last.

## Matched filter

Each ADC channel has a `matched_filter` on its L1→L2 stream. It computes

    Λ = Σ_{i=0}^{WIN-1} y[i] · f[i]      accept  ⇔  Λ > γ

This is the matched filter for a known pulse shape in white Gaussian noise, reduced to a
correlation. The samples `y` are unsigned ADC codes. The template `f` (`COEF_W` = 16 bits,
signed) and the threshold γ (32 bits, signed) are registers. One multiplier and one accumulator
per channel suffice, because the samples arrive one per clock. The result is valid one clock
after the last sample.

The result word `{accept, Λ[30:0]}` is queued next to the channel's L2 memory. It goes out as
the last word of that channel's sub-fragment. The filter does not suppress fragments: every
trigger that is not lost produces a fragment, and the filter decisions travel inside it.

Keep `COEF_W` ≤ 19 so that Λ always fits in the 31 bits carried in the result word. A sample
enters the product as a 9-bit signed value, and 7 taps add 3 more bits. The original study found 16 to 18 coefficient bits to
match a 32-bit reference implementation.

## Fragment format

All words are 32 bits. One fragment per accepted trigger:

| section | words |
|---|---|
| header (8) | `0xEE1234EE` · header size (8) · format version `0x00010000` · source identifier · run number · trigger ID · time index k · primary trigger decision |
| sub-fragment 0, generic (3 + 1) | `0xDD1234DD` · data size (1) · type `0x01000000` · external word at clock k |
| sub-fragment c = 1…N_ADC, ADC (3 + 3) | `0xDD1234DD` · data size (3) · type `0x0200_0000 \| c` · samples 0–3 · samples 4–6 · `{accept, Λ[30:0]}` |
| trailer (3) | number of status elements (0) · number of data elements (1 + 3·N_ADC) · `0xE0DA0E0D` |

With 32 channels a fragment is 207 words. The packer spends one idle clock between fragments,
so it sustains one fragment per 208 clocks: 192 k fragments/s at 40 MHz. That is about twice
the 100 kHz average trigger rate of the target application. The packer stalls in place while
`out_ready` (the output buffer's room) is low.

## Configuration and debug bus

`cfg_we`, `cfg_addr[7:0]`, `cfg_wdata[31:0]`; `cfg_rdata` is registered and valid one clock
after the address. Everything resets to 0.

| address | register |
|---|---|
| `0x00` | run number (header) |
| `0x01` | source identifier (header) |
| `0x02` | filter threshold γ (signed) |
| `0x10 + i` | filter coefficient `f[i]`, i < WIN (signed, read back sign-extended) |
| `0x40 + c` | delay of ADC channel c, c < N_ADC (signed clocks) |
| `0x80` | fragments sent (read only) |
| `0x81` | events in which at least one channel's filter accepted |
| `0x82` | triggers lost: queue-full discards plus expired triggers |
| `0x83` | primary triggers received |
| `0x84` | ID of the last primary trigger |

## Parameters (`dsp_top`)

| parameter | default | meaning |
|---|---|---|
| `N_ADC` | 32 | ADC channels |
| `WIN` | 7 | samples per window (pulse length) |
| `PRE` | 3 | window offsets −PRE … WIN−1−PRE |
| `L1_DEPTH` | 256 | L1 ring positions (power of two) |
| `L2_EVENTS` | 8 | events held in L2 (power of two) |
| `TRIG_FIFO_DEPTH` | 8 | trigger queue records (power of two) |
| `COEF_W` | 16 | coefficient bits |
| `DELAY_W` | 8 | channel delay bits |
| `OUTBUF_DEPTH` | 512 | output buffer words (power of two) |

`N_ADC` ≤ 64, `WIN` ≤ 16 and 5 debug counters fit the register map as laid out.

A generic synthesis at the defaults gives 116,864 memory bits and 5,448 flip-flops.
The memory is:

* L1 rings: 32 × 256 × 8 bits, plus 256 × 32 bits for the generic controller;
* L2: 32 × 16 words, plus 8 generic words;
* filter result queues: 32 × 8 words;
* output buffer: 512 words;
* trigger queue and event record queue: 8 records each.

## Departures and own choices

These follow the published design in its structure and names. The following points are this
implementation's own:

* Marker values, format version, type codes, the meaning of the size word (data words only) and
  the packing of four samples per word. The published format lists the fields but not their
  encodings.
* `has_data` is a level raised when the transfer has ended. The published waveform shows it as a
  pulse together with `store_data`.
* `has_data` is raised by ADC channel 0, whose window completes last. The published design raises
  it from the generic controller.
  This costs about 7 clocks of latency. It guarantees that every channel's window and filter
  result are stored before the packer starts.
* A fragment is built for every trigger that is not lost, with the filter decisions inside it.
  The published text says only that the information is forwarded when the filter points to a
  candidate. A user who wants filter-gated
  output can drop downstream the fragments whose accept bits are all 0.
* The L1 write pointer is an internal counter, independent of `time_index`.
* The filter sits on the L1→L2 transfer stream, one per channel, with its result carried in
  each ADC sub-fragment.
* Dispatch waits for room in L2, and stale triggers expire after `MAX_AGE` clocks. Neither is in
  the published description.
* L2 capacity is 8 events. The published text says both "up to seven" and "eight depth levels";
  eight was used.
* The published figure for the maximum fragment rate is 360 kHz. This layout gives 192 kHz at
  32 channels. The published fragment layout behind that figure is not known.
* Not built: the optical link transceiver (the fragment leaves as a 32-bit valid/ready stream),
  the converters, and the primary trigger system (its decision enters on `trigger` and
  `trigger_decision`).

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dsp_pkg.sv tb/tb_model_pkg.sv tb/tb_dsp_top_full.sv --top-module tb_dsp_top_full
./obj_dir/Vtb_dsp_top_full
```

| testbench | covers |
|---|---|
| `tb_dsp_top_full` | whole module at default sizes (32 channels); all fragments checked word by word |
| `tb_dsp_top` | the same test with 2 channels |
| `tb_fragment_builder` | builder alone, 3 channels, latency 14 to the packer output |
| `tb_trigger_ctrl` | latency k+2/k+3/k+4, spacing, L2 limit, discards, expiry, record order |
| `tb_packet_ctrl` | ADC controller: the delay −3 example, window order, packing, 8 events |
| `tb_generic_packet_ctrl` | 32-bit controller with random reference ages and reader |
| `tb_matched_filter` | 400 random windows against a 64-bit reference |
| `tb_packer` | exact fragment stream, timing, random backpressure |
| `tb_l1_mem`, `tb_sync_fifo`, `tb_cfg_regs`, `tb_debug_counters` | the small blocks |

The end-to-end tests drive every channel with a fixed function of the clock count
(`tb_model_pkg`). The expected fragment of any trigger can then be computed from its clock, the
configuration and the window rule above. The tests run these phases:

1. isolated triggers, with an exact latency check;
2. bursts of 1 to 8 triggers, which must lose nothing;
3. random triggers with random output backpressure;
4. a trigger on every clock with the output flowing;
5. an overload with the output stalled.

The tests count each mechanism and require it to occur at least once: queue wait, queue-full
discard, expiry, output stall, filter accept, filter reject, and several events queued. They
also read the debug counters back over the bus and compare them with their own counts.

`tb_mf_wordlength` repeats the published finite word-length study of the filter.

* It runs 2,000 random windows through filters with 8 to 31 coefficient bits.
* The reference is a double-precision filter using the same template.
* It checks every output bit-exactly.
* It reports the relative mean error and the percentage of decisions that differ from the
  reference.

With its own pulse template and signal model, the error falls from about 0.02 % at 8 bits to
below 0.001 % at 16 bits, and no decision differs. The published template and data are not
available, so the numbers are not directly comparable.
