# Bidirectional neural interface: digital core

This is the synthesizable digital core of a neural interface chip that records and stimulates at the same time. The chip records 64 electrodes through one shared, time-multiplexed recording chain. It drives four H-bridge current stimulators. The hard part is the stimulus artifact. A stimulation pulse puts a voltage of tens of millivolts on the recording electrodes, while the neural signal is about 100 µV. Without help, the recording chain saturates whenever a stimulator fires.

The core deals with this by learning each stimulator's artifact on each affected channel as a short sequence of codes. It replays that sequence into the input CDAC, the same capacitive DAC that already removes each channel's slow signal content. The artifact is therefore subtracted *before* the amplifier, and the 8-bit ADC only sees what is left. An LMS (least-mean-squares) update improves the stored sequence after every pulse, using only that remainder.

The RTL follows a published 65 nm chip description: the block structure, counts, widths and the LMS loop. Everything that description leaves open was decided here. Those decisions are marked as such below and in the opening comment of each source file.

## Block diagram

```
 trigger pads ──► stim_controller x4 ──► IDAC codes, H-bridge switches, pump enables (analog ports)
                        │ pulse start
                        ▼
                  artifact_canceller
                  ┌─────────────────────────────────────────────┐
 adc_code ───────►│ lms_filter_bank x4 (one per stimulator)      │
   (8b, signed)   │   triggered_counter ─► tap n                 │
                  │   canceller_sram (4 slots x 32 taps x 10b)   │
                  │   x <= x + (adc >>> mu)                      │
                  │ Σ of the 4 bank outputs = ART ──┐            │
                  │                                  + ──► cdac_code (10b) ──► CDAC (analog)
 delta_encoder ──►│ DAC (per-channel 10b integrator)─┘            │
                  └─────────────────────────────────────────────┘
 channel_sequencer ─► mux_sel (64:1 multiplexer), sample tick, frame boundary
 serializer ─► ser_clk / ser_data / ser_sync : {channel, ADC, DAC, ART} per sample
 scan_config ─► the whole configuration record (bbci_pkg::cfg_t)
```

`bbci_top` wires these blocks together. Every analog part is outside the core and reaches it through a port. These parts are the electrode multiplexer, CDAC, amplifier, SAR ADC, charge pumps with their resonant oscillators, high-voltage adapters, IDACs, comparators and the 13.56 MHz reference oscillator.

## One recording slot

One channel is converted per slot. A slot is `tick_div` core clock cycles long. With a 13.56 MHz clock and `tick_div = 106`, the slot rate is 128 kHz, which gives 64 channels at 2 kS/s each. Scanning fewer channels (`active_ch`) raises the rate per channel. For example, 8 channels give 16 kS/s.

| cycle    | what happens |
|----------|--------------|
| tick     | `mux_sel` moves to the next channel. The ADC code of the channel selected until now is registered. `adc_sample` marks this edge. The conversion must be finished by then. |
| tick + 1 | "upd" cycle. The finished channel gets its updates: the LMS write-back in every bank that serves it, and the delta-encoder update. The stored words for the new channel are read. The finished sample goes to the serializer. |
| tick + 2 | The delta code and the summed canceller code (ART) for the new channel are valid. |
| tick + 3 | `cdac_code = sat(DAC + ART)` for the new channel is valid. It holds until tick + 3 of the next slot. |

The front-end must therefore sample its input after tick + 3. The serializer needs 2 × 34 cycles per frame, so `tick_div` must be at least 69.

## The canceller in detail

**Tap timing.** Each stimulator has a `triggered_counter`. The stimulator pulses its canceller trigger in the tick cycle that starts its pulse, one cycle before the current flows. The counter then restarts at tap 0, in time for the read of the slot that this tick begins. The tap advances by one on every frame boundary, where a frame is one pass over the scanned channels. After 32 taps the counter goes idle. A channel is sampled once per frame, so tap *n* is that channel's *n*-th sample after the stimulus.

The channel whose slot begins with the pulse, and the channels after it in the frame, use tap 0 in that frame. Channels earlier in the frame first meet the stimulus at tap 1. This alignment repeats from pulse to pulse only if pulses start in the same slot of a frame every time. Because a pulse waits for a sample tick, the trigger only has to fall within the same slot, not on the same cycle. The trigger source must respect that. The testbenches fire at a fixed slot.

**Memory organisation.** The 5120 bits of canceller memory hold 16 artifacts × 32 taps × 10 bits. They are split into one `canceller_sram` per stimulator: 4 slots × 32 taps × 10 bits. The configuration assigns each slot a recording channel (`slot_ch`, `slot_en`). A bank therefore learns its stimulator's artifact on up to four channels of its choice. If two slots name the same channel, the lower slot is used.

**The update.** While a bank serves the selected channel, it reads `x[slot][tap]`, and that word becomes part of ART. One slot later the ADC code for that sample arrives. That code is the residual after the subtraction, and the bank writes back `x + (adc >>> mu_shift)`. The word and its address are held for that slot. These are the two z⁻¹ registers of the loop. Codes saturate at ±511.

One shifter and one adder per bank serve all channels, because only the selected channel is ever worked on.

The four bank outputs are summed, so artifacts of different stimulators that overlap in time are cancelled together. Each bank receives the same residual. When the stimulators fire independently of one another, each bank converges, on average, to its own stimulator's share.

**Step size and units.** One CDAC LSB is 16 ADC LSBs. This follows from reading the 14-bit "8-bit SAR + delta encoding" resolution as 10 + 4 bits. `mu_shift = 4` therefore corrects the whole error in one pulse. Larger shifts average over more pulses. They converge more slowly but tolerate neural signal and a second bank adapting on the same channel.

The shift truncates toward minus infinity, so a bank stops updating once the residual lies in [0, 2^mu_shift − 1] ADC LSB. With `mu_shift = 5` that is about two CDAC steps. This sets the floor of the on-chip cancellation.

**Interaction with delta encoding.** The delta encoder integrates the ADC residual into each channel's slow-content code. If it kept integrating during an artifact, it would absorb part of the artifact one frame late. The LMS error would then be only the change of the residual from frame to frame, and learning would crawl from tap 0 outward.

To avoid this, the delta code of a channel is **held** while any bank applies a stored word to that channel (`live`). The ADC output is then exactly the artifact residual plus the neural signal, which is the error the LMS rule needs. The hold is a decision of this design.

While a channel is held, neural activity and slow drift pass through to the ADC. This is intended, because that is the signal recorded during stimulation. Large drift during a 32-frame hold can push the ADC toward its limits.

**Disabling.** With `cancel_en` low, ART is 0 and no bank adapts. `cancel_clr` (a port) erases all learned codes.

## Stimulators

Each `stim_controller` plays a table of 16 signed 8-bit samples. Each sample is held for `step_len` cycles.

- The magnitude of a sample is the IDAC code.
- The sign is the bridge direction. A positive sample drives P and sinks through the N-side low-side switch. A negative sample does the reverse.
- A zero sample leaves the bridge open, for example as an interphase gap.

A biphasic pulse of any shape is therefore one table: square, half-sine, or rising or falling exponential. While a side sources current, its charge pump is enabled only while the supply-enable comparator reports too little headroom.

After the table, the tracking comparator compares the two electrodes (`track_mode`), and charge is balanced in one of two ways:

- **Active discharge:** the IDAC sinks `dis_code` from the higher electrode until the comparator flips, or until `dis_len` cycles have passed.
- **Passive discharge:** the discharge resistor is switched in for `dis_len` cycles.

A pulse starts after a rising edge on the trigger pad has passed the two-cycle synchroniser, at the next cycle where the `slot_start` input is high. In the core `slot_start` is the recording sample tick, so every pulse begins at a slot boundary. The artifact then falls on the same samples every time. The channel whose slot is running when the pulse begins is already served by the canceller, because its tap-0 read happens after the trigger. With `slot_start` held high the delay is 3 cycles. Edges that arrive during a pulse are ignored.

## Configuration

All settings form one packed record, `bbci_pkg::cfg_t`, of 801 bits. It is loaded through `scan_config`:

1. Hold `scan_en` and shift the record in at `scan_in`, most significant bit first. The previous contents come out at `scan_out`.
2. Pulse `scan_update` to apply the new record.

Reset clears the configuration, which leaves recording stopped (`tick_div = 0`) and everything disabled.

| field | meaning |
|---|---|
| `tick_div` | core cycles per channel slot (0 = recording stopped) |
| `active_ch` | channels scanned, 1 … 64 (0 = 64) |
| `delta_en`, `delta_shift` | delta encoding on; ADC-to-CDAC scaling shift (4 for the 16:1 LSB ratio) |
| `cancel_en` | apply the canceller and let it learn |
| `bank[s].slot_en / slot_ch` | channels learned by stimulator *s*'s bank |
| `bank[s].mu_shift / adapt_en` | LMS step 2^-mu_shift; freeze the bank's codes |
| `stim[s].wave` | 16 signed samples |
| `stim[s].step_len` | cycles per sample |
| `stim[s].dis_active / dis_code / dis_len` | discharge mode, IDAC code, time limit |

## Serial output

Each sample is sent as a 34-bit frame, most significant bit first, in this order: channel (6 bits), ADC code (8), DAC code (10), ART code (10). `ser_clk` runs at half the core clock. Data changes on the falling edge of `ser_clk`, so sample it on the rising edge. `ser_sync` marks the first bit.

The receiver rebuilds the electrode signal in two forms:

- **Input signal:** `(DAC + ART) × 16 + ADC`.
- **Artifact-free recording:** `DAC × 16 + ADC`.

If a sample arrives while a frame is still being sent, it is dropped and counted in `ser_drop_cnt`.

## Where this departs from, or goes beyond, the chip description

- **Choices of this design:**
  - The delta-encoder hold during cancellation.
  - Frame-aligned tap counting that starts at the trigger.
  - Pulses that start only on a recording sample tick.
  - Slot mapping of the memory.
  - Saturating arithmetic.
  - The `cancel_en` and `cancel_clr` behaviour.
  - The waveform-table format.
  - The discharge end rule.
  - The scan-record layout.
  - The serial frame format.
  - A single clock domain.
- **Adder count.** The published description computes the LMS for four stimulators with six adders and four shifts. This RTL uses four update adders, three adders to sum the banks and one at the subtraction point. It does not share hardware across cycles.
- **Memory.** The canceller memory is a reset-able register array, not an SRAM macro. The published chip writes on the opposite clock phase. Here the read and the write happen on the same edge, in a memory with one read port and one write port.
- **Number formats.** The ADC output and the CDAC code are taken as two's-complement numbers. The IDAC code is 8 bits with no stated full scale. A 20 µA pulse on a 2 mA full scale is only about one LSB of a ±128 table.
- **Not included:**
  - The off-chip memory link to an FPGA, which the chip description mentions but does not define.
  - Every analog and high-voltage block.
  - The PTAT reference.
  - The pads.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a `TB_RESULT checks=… failures=…` line and has a watchdog.

- **Unit testbenches.** They compare against reference models written independently in the testbench: the memory, the tap counter, the LMS update, the integrator and the frame format. They also check cycle timing: the tick period, the trigger latency, the pulse length, the discharge end and the 2 × 34-cycle serial frame.
- **`tb_artifact_canceller`.** Runs the four banks in a closed loop with the front-end model `tb/rec_afe_model.sv`. Two stimulators overlap with a varying delay. After learning, the residual falls from the full ADC range to 30 ADC LSB, below two CDAC steps. Then, with learning frozen, it checks in every slot that the output for both stimulators together is the saturated sum of the outputs for each alone.
- **`tb_bbci_top`.** Runs the whole core at its full size: 64 channels, 4 stimulators, 32 taps and 16 slots. A simple tissue model turns the IDAC and bridge outputs into currents and electrode charge, and from them into artifacts on chosen channels, on top of offsets and a slow neural signal. The test:
  - loads and reads back the configuration;
  - records with cancellation off, then on, for 80 stimulation periods;
  - switches to 8-channel 16 kS/s mode;
  - clears the learned codes.

  Every serial frame is decoded. Whenever the ADC did not clip, `(DAC + ART) × 16 + ADC` must equal the electrode value exactly. In the model, the artifact left in the recording falls from clipping to 21 ADC LSB against a 721 ADC LSB artifact, about 31 dB. The limit is the truncating step described above, not the loop. The test also counts each mechanism: pulses per stimulator, supply-gated pumping, active and passive discharge, overlapping artifacts, ADC clipping, both scan modes and clearing. It fails if any of them never happened. It takes about 15 s.

- **`tb_workloads`.** Runs the full-size core at the real clock ratio: a 13.56 MHz core clock and `tick_div` = 106, which gives 128 kS/s in total. It uses the same tissue and front-end models and three set-ups:
  - **A:** 64 channels at 2 kS/s, with a 400 µs biphasic pulse every 20 ms.
  - **B:** 8 channels at 16 kS/s, with pulses at 77 per second (a 13 ms period).
  - **C:** all four stimulators triggered together. They play a rising exponential, a half-sine, a square and a decaying exponential, each as a positive lobe followed by its mirror. Every sample of every stimulator is checked in the middle of its step.

  In A and B, one stimulator puts an artifact of about 250 CDAC steps (about 4000 ADC LSB) on four channels. After 70 pulses with `mu_shift` = 4, the artifact left in the recording must be at most 32 ADC LSB; it ends at 17 (about 47 dB). The test also checks that the 32-tap window is shorter than the pulse period, and that the serializer drops no sample. It takes about 30 s.

What the testbenches cannot show is the analog behaviour. They cannot show the 60 dB of cancellation measured on silicon, which depends on the CDAC, the amplifier and the real artifact shapes.

## Simulating

The package must be read first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_bbci_top rtl/bbci_pkg.sv tb/tb_bbci_top.sv
./obj_dir/Vtb_bbci_top
```

Replace `tb_bbci_top` with any other testbench name to run that test. For the unit tests the bank, counter and memory sizes are module parameters. The top-level sizes are the constants in `rtl/bbci_pkg.sv`. The configuration record follows from them automatically, but the testbenches assume the 16-sample waveform table and a 6-bit channel number.
