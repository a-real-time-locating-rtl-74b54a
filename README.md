# UWB TDOA real-time locating system: Tag and Sensor logic

A Tag sends a short burst of UWB pulses at regular intervals. Several Sensors
with independent clocks each note when the burst arrives. The position of the
Tag follows from the time differences of arrival (TDOA) between Sensors. The
Sensor clocks are not shared. Instead, a reference Tag at a known position
lets the host relate the Sensors' time scales to each other.

The burst is on-off keyed. One symbol lasts 50 ns and is either a 2 ns pulse of
a 7 GHz carrier (bit 1) or nothing (bit 0). A burst has 15 symbols: the
Barker-7 preamble `1110010` followed by an 8-bit Tag ID. Optionally it has
23 symbols, for a longer payload.

The Sensor digitizes the envelope of the received signal at 1 GS/s with 8 bits.
It must find these bursts in a continuous stream, time-stamp them to one
125 MHz clock, and pass a 2048-sample snapshot around each one to a processor.
The processor refines the arrival time and reads the Tag ID.

This repository holds the synthesizable SystemVerilog for the two digital
parts:

* **`sensor_fpga`**: the Sensor's FPGA datapath, from the deserialized ADC
  lanes to an AXI-Stream master for a DMA engine.
* **`tag_digital`**: the Tag's digital board, which times the bursts and
  produces the 2 ns drive pulses for the oscillator.

`rtls_top` places both side by side. They only meet over the radio path, so
each keeps its own ports. All sizes are set by parameters whose defaults are
the system's real values: 8 lanes, a 50-sample symbol, a 512-result search
window, k = 8, 2048-sample packets and a 20 MHz Tag clock.

## Sensor datapath

Everything up to the FIFO write port runs on `data_clk`. This is the 125 MHz
frame clock of the ADC, and it carries eight samples per cycle on a 64-bit
bus. Sample 0 of a word is the oldest and sits in bits 7:0.

```
lane_raw[8:0] ─► lvds_frame_align ─► symbol_correlator ─► preamble_correlator ─┬─► peak_threshold ─► trigger
                      │ 64 bit        8 × Del / clk        8 × corr / clk        └─► auto_threshold ─┘ (thr)
                      └─► data_delay_line (111 clk) ─► fifo_write_ctrl ─► async_fifo_w2r ─► axis_fifo_reader ─► m_axis_*
                                                        (TOA + 255 words)    64 → 512 bit        32 beats, TLAST
```

### Lane alignment (`lvds_frame_align`)

The ADC sends eight data lanes plus the frame clock FCLK. Each lane carries
one bit per bit-clock edge, LSB first, and lane k carries sample k of each
group of eight. The input is the raw 8-bit parallel word of each lane from the
FPGA's deserializers. Those words are not yet aligned to sample boundaries.

The block looks at FCLK through an 8-bit window that spans the current and
previous words. It moves that window one bit at a time (a "bitslip") until
FCLK reads `8'h0F` four times in a row, and then reports `locked`. After the
lock it applies the same window to every data lane. A single FCLK mismatch
restarts the search. The output has one clock of latency.

The receivers' delay-tap calibration (eye centring) is analog and is not part
of this RTL.

### Symbol correlation (`symbol_correlator`)

For every sample position p the block computes Del[p] = Σ x[p+j]·MASK[j] over
j = 0..49. MASK is a 0/1 pattern of 50 bits that holds a 2-sample (2 ns) pulse.
The default MASK has ones at bits 24 and 25.

Because MASK is 0/1, each product is a select. The 50 terms are added in a
pipelined tree of two-input adders, 6 levels deep. Eight copies run in
parallel, one per sample phase, over a 57-sample buffer, so eight Del values
come out per clock. Latency is 7 clocks. The output is 14 bits signed.

### Preamble correlation (`preamble_correlator`)

A pulse of the preamble's i-th symbol lies exactly 50·i samples after the
first one. So the full correlation with the 350-sample preamble template is a
signed sum of seven Del values, spaced 50 samples apart:

corr[p] = Σ ±Del[p + 50·i]

The sign is + where the preamble bit is 1 and − where it is 0. A zero symbol
that contains energy therefore counts against a match, which keeps the
sidelobes low.

The block keeps 308 Del values in a register history and produces eight
results per clock, 17 bits signed, with 2 clocks of latency.

### Peak search and threshold (`peak_threshold`, `auto_threshold`)

This is the least obvious part of the design.

A detection is declared when the largest correlation in a moving window of 512
results (64 clocks) lies at the centre of the window, and is at least the
threshold. This suppresses the correlation sidelobes around a true peak.
Within ±256 samples, only the true peak can be the maximum.

The window is a shift register of 64 groups of eight results, which feeds a
9-level registered comparison tree. The centre is group 31 (counted from the
oldest). The centre group's maximum is taken from level 3 of the same tree and
delayed to meet the full-window maximum. When the two values match,
`trigger` (Thresh) pulses for one clock. `peak` and `peak_lane` tell which
result and which sample phase it was. Ties go to the older result. `trigger`
appears 11 clocks after the centre group enters, and 43 clocks after the
correlation that caused it.

The threshold is either `thr_manual` or the automatic value mean + K·std, with
K = 8, selected by `thr_auto_en`.

`auto_threshold` works as follows:

* It keeps moving sums of the correlation values and of their squares over
  1024 results (128 clocks). Each sum is an accumulator that adds the newest
  group and subtracts the oldest one from a 128-entry ring.
* It divides both sums by shifting.
* It forms the variance as E[x²] − E[x]².
* It takes the standard deviation with a bit-serial integer square root,
  which gives a new value every 19 clocks.
* The result saturates rather than wraps.

Until the first window is full, the manual threshold stays in use.

### Capture and hand-off (`data_delay_line`, `fifo_write_ctrl`, `async_fifo_w2r`, `axis_fifo_reader`)

The raw 64-bit words also pass through a shift register. Its length is
111 clocks: the detection latency plus 16 words. Because of this, a packet
starts 16 words (128 samples) before the first pulse of the detected preamble,
to within one word.

On `trigger`, the write process does the following:

1. It samples the free-running 32-bit TOA counter, which counts `data_clk`
   periods (8 ns) from reset. It pulses `bind_tmstmp` and writes
   `{32'b0, toa}` as word 0.
2. It writes the next 255 delayed words.

The total is 256 words of 64 bits, or 2048 bytes. A trigger that arrives
while a packet is being written is ignored. A trigger that finds fewer than
256 free FIFO words is dropped, and `pkt_drop` pulses, so no partial packet
ever enters the FIFO.

The FIFO packs eight 64-bit writes into one 512-bit read word, with the first
write in the low bits. It crosses from `data_clk` to `axis_aclk` with
Gray-coded pointers and two-flop synchronizers. It holds 64 read words, which
is two packets.

The reader raises `rd_en` whenever the FIFO is not empty and its two-entry
output queue has room. That keeps the stream at one beat per clock, and holds
data steady while TREADY is low. TLAST marks beat 32 of each packet, and TSTRB
is all ones. An assertion checks the AXI-Stream rule that a word stays stable
until it is accepted.

### How TOA values are used

Two packets from the same Sensor compare exactly. The difference between their
TOA words, times 8, equals the distance in samples between the starts of their
data. A finer arrival time within the packet comes from the samples
themselves, and that processing belongs to the host software.

## Tag digital board

```
20 MHz ─► tag_srf_gen ──load_n──► tag_seq_gen ──ser_out──► tag_pulse_gen ─► drv (2 ns low pulses)
          (2×12-bit divider,        (24-bit shift reg,        (clock delayed 2 ns,
           SRI compare, 15/23        MSB first)                 U1/U2/U5/U4 + inverter)
           symbol counter)
```

* **`tag_srf_gen`** sets the repetition timing.
  * Counter 1 counts the 20 MHz clock.
  * Counter 2 advances each time counter 1 wraps.
  * When the 8 MSBs of counter 2 equal the resistor-set SRI, a one-clock
    low pulse on not(P=Q) does three things: it clears both counters, loads
    the sequence, and starts a symbol counter.
  * The symbol counter ends the burst after 15 symbols, or 23 when `len23`
    is set.
  * A burst therefore starts every SRI·65536 + 1 clocks. SRI = 15 gives
    49.15 ms, about 20 bursts per second. SRI = 0 is not valid.
* **`tag_seq_gen`** is the 24-bit parallel-load shift register. It sends the
  first symbol from bit 23, one symbol per clock.
* **`tag_pulse_gen`** is a behavioural model with delays, not synthesizable
  logic.
  * The serial bit, the load signal and the clock delayed by 2 ns (two
    inverters) are ANDed into the sequence signal.
  * An inverter, a slower inverter (2 ns, loaded by a capacitor), an XOR and
    an AND turn each rising edge of that signal into a 2 ns pulse.
  * The pulse is inverted onto `drv`.
  * The model reproduces the timing of the discrete gates. Synthesis keeps
    the gates but drops the delays.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `rtls_pkg` | `N_LANES`, `SW`, `PREAMBLE` | 8, 50, `1110010` | samples per clock, samples per symbol, preamble (first symbol in MSB) |
| `symbol_correlator` | `MASK` | ones at bits 24–25 | symbol template |
| `peak_threshold` | `WIN` | 512 | search window (power of two, multiple of 16) |
| `auto_threshold` | `LOG2_N`, `K` | 10, 8 | statistics window 2^10 results, threshold factor |
| `sensor_fpga` | `PKT_WORDS64`, `FIFO_DEPTH_R`, `PRE_WORDS` | 256, 64, 16 | packet size, FIFO depth (512-bit words), pre-trigger words |
| `tag_srf_gen` | `CNT_W` | 12 | divider counter width |
| `tag_pulse_gen` | `CLK_DLY`, `C1_DLY` | 2 ns, 2 ns | clock delay, pulse width |

## Where this design departs from the original system or fills gaps

* **Lane alignment.** Only bit alignment is done. The original system also
  centres each bit in its eye with delay taps, which needs the FPGA's analog
  delay lines.
* **FCLK pattern and lane order.** The FCLK word `0x0F` and the mapping of
  lane k to sample k are assumptions.
* **Symbol mask.** The position of the pulse inside the 50-sample symbol
  (bits 24–25) is a choice. It only shifts all correlation results together.
* **Polarity.** Pulses are taken as positive samples, and the correlation
  maximum is searched for. If the receiver's output goes negative on a pulse,
  negate the samples or the mask.
* **Window centre.** The centre is defined as the group of eight results at
  position 31 of 64. The original only says "the centre of the window".
* **Standard deviation.** The original computes it "with the same moving
  average principle". Here it is the square root of the moving variance over
  1024 results. The window length is a choice.
* **Packet format.** The 2048 bytes include the TOA word, so a packet carries
  2040 samples. The TOA word's format, the TOA unit (8 ns) and the 32-bit
  width are choices.
* **FIFO.** The original uses a vendor FIFO with a 64-bit write port and a
  512-bit read port. This design uses its own FIFO with the same ports. Its
  depth of 2 packets, the drop-on-full policy and the ignore-while-writing
  policy are choices.
* **Tag divider.** This design uses a synchronous enable where the original
  clocks counter 2 from counter 1's MSB. The match also clears the divider,
  so that SRI sets the period.
* **Not included:**
  * The vendor primitives, clocking, DMA engine and processor system.
  * The processor software: Tag ID decoding, ramp-mask TOA refinement, the
    TDOA and position solution, and reference-Tag clock-drift correction.
  * All analog parts: ADC, PLL, RF receiver, antennas, oscillator, power
    supply, and the power gating of the second Tag prototype.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Any of them runs with
plain Verilator:

```
verilator --binary --timing -Irtl rtl/rtls_pkg.sv tb/tb_rtls_top.sv --top tb_rtls_top
./obj_dir/Vtb_rtls_top
```

| Testbench | What it covers |
|---|---|
| `tb_rtls_top` | Whole system at default sizes (about 40 s). Tag → channel model → Sensor. The Tag runs with SRI = 1 (one burst every 3.277 ms). There are 15- and 23-symbol bursts, manual then automatic threshold, TREADY held low so that two packets wait and a third is dropped, then release. Every packet is compared word for word with the sample stream. TOA differences are checked against the data position, and the Tag period seen by the Sensor against 65537·50 ns. Each mechanism must occur at least once. |
| `tb_sensor_fpga` | Sensor alone: 25 bursts in noise, random back-pressure, drops, an automatic-threshold phase and a lane-offset jump that forces a new lock. |
| `tb_lvds_frame_align` | Lock at all eight bit offsets, relock after an offset jump, sample and frame order. |
| `tb_symbol_correlator`, `tb_preamble_correlator` | Bit-exact results against a reference model, with gaps in the valid signal, for the default mask and a random one. |
| `tb_peak_threshold` | Thresh, peak and peak_lane against a reference model of the window rule, at exactly 11 clocks; peaks in noise and stretches where the centre rule alone decides. |
| `tb_auto_threshold` | Manual pass-through, no automatic value before the window fills, mean, std and threshold against exact values for several input distributions, switch back to manual. |
| `tb_data_delay_line`, `tb_fifo_write_ctrl`, `tb_async_fifo_w2r`, `tb_axis_fifo_reader` | Delay, packet framing and drop, clock-crossing integrity, TLAST and stability under random TREADY. |
| `tb_tag_srf_gen`, `tb_tag_seq_gen`, `tb_tag_pulse_gen`, `tb_tag_digital` | Burst period (including two full periods at SRI = 15, the 20 Hz operating point), 15/23 lengths, bit order, 2 ns pulse width and position, decoded bursts. |

The Tag testbenches need `--timing`, because of the delays in the pulse
generator model.
