# Ring-oscillator TDC with double-buffered serial readout

A time-to-digital converter (TDC) for the front-end of resistive plate chambers
(RPCs), meant to sit on one SiGe BiCMOS chip together with the amplifier and
discriminator of each strip. The idea is to keep the digital part as small as
possible. A 7-inverter ring oscillator clocks one free-running 8-bit counter.
Each of 8 channels takes a snapshot of that counter on the rising edge of its
discriminator pulse. The snapshot goes to the acquisition FPGA over one serial
wire per channel. To avoid losing events while a word is on the wire, each
channel has two memories and two serializers. Odd-numbered events go to one
pair and even-numbered events to the other, and the FPGA reads the pairs in
turn.

```
            +---------+  ck_vco  +--------------+ count[7:0]
 vcont_mv ->| vco_ring|--------->| sync_counter |-------------+------ ... (8 channels)
            +---------+          +--------------+             |
                                                  +-----------v-----------+
 event_i[ch] ------------------------------------>|      tdc_channel      |--> vector_o[ch]
 ck_sync, rn_piso (from the FPGA, shared) ------->|                       |
                                                  +-----------------------+
```

## The time word

The counter is unusual: its least significant bit is the oscillator clock
itself. Bits 1..7 are flip-flops that all share `ck_vco` and form a binary
carry chain. They advance on the falling edge of the clock, which is the moment
bit 0 goes from 1 to 0, so `{Q7..Q1, ck_vco}` counts once per **half** period.
At the nominal 2 GHz, one code is 250 ps and the word wraps every 256 codes,
which is 64 ns. The stamp of an event is the number of oscillator half periods
since reset, modulo 256. Converting it to time needs the oscillator frequency,
which the control voltage sets (`vco_ring`: 0.7 V gives 600 MHz, 3 V gives
3.2 GHz). An absolute time needs an external reference such as the start event.

The flip-flop structure and taking bit 0 from the clock come from the counter
schematic. Using the falling edge is this design's choice: it is the only edge
that makes the word binary.

## One channel: odd/even memories and the line hand-over

`tdc_channel` holds:

* `odd_even_divider`: a toggle flip-flop on the event. `sel` rises on the
  1st, 3rd, … event after reset and `sel_n` on the 2nd, 4th, ….
* Two `event_latch` banks. The "odd" one is clocked by `sel` and the "even"
  one by `sel_n`. Both sample the shared counter word.
* Two `piso` serializers, one per memory, both clocked by `ck_sync`.
* `piso_rw_ctrl`: turns the FPGA's level `rn_piso` into each serializer's
  write/shift signal.
* Two `mem_clear_pulse` blocks, which clear a memory once its word has been
  sent.
* An OR of the two serial lines, which drives `vector_o`.

Only one half owns the line at a time. `rn_piso = 1` gives it to the odd half
and `rn_piso = 0` to the even half. The idle half's serializer is held in
reset at 0, which is why a plain OR can merge the two lines. An assertion in
`tdc_channel` checks this. Each toggle of `rn_piso` is one transfer:

```
rn_piso   ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____  (toggle on a falling ck_sync edge)
ck_sync   _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
mode_odd  ______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____   0 = write, 1 = shift
                  ^ edge 1: load, MSB out
vector_o  --------< b7 >< b6 >< b5 >< b4 >< b3 >< b2 >< b1 >< b0 >
clear odd memory                                            _ (short pulse after rn_piso falls)
```

* The first rising `ck_sync` edge after the toggle loads the memory word and
  puts bit 7 on the line.
* Edges 2..8 present bits 6..0. Sample on the falling edge of `ck_sync`.
* The word takes 8 sync clocks. The FPGA may toggle again on the falling edge
  after it has taken bit 0.
* The toggle also takes the line from the other half. That half's serializer
  is reset, and its memory is cleared by a pulse that lasts until the next
  rising `ck_sync` edge, so a word is never sent twice. A memory that has
  received no event since its last transfer therefore sends 0.

All channels share `ck_sync` and `rn_piso`, so every transfer reads all 8
channels at once.

**What the double buffer buys, and where it stops.** While one half sends,
the next event lands in the other half and waits for the next transfer. If a
second event comes before the FPGA switches over, it reaches the half that is
sending. That half's memory is overwritten, and the word is then cleared at
the switch: the event is lost (pile-up). With both memories full, the
sustained rate is one word per 8 sync clocks. At a 2 GHz sync clock that is
250 M words/s per channel, above the 100 MHz event rate the memory was tested
at. It is not the full sync-clock rate: only a burst of two events can come in
faster than f_sync/8.

## Oscillator model

The ring oscillator is analog, so `vco_ring` is a behavioural timing model.
It is not synthesizable and is the only non-synthesizable file. It keeps the
seven outputs `out[1..7]` of the real ring. A single transition travels round
the ring, one stage delay per inverter, so the period is 14 stage delays. The
control voltage `vcont_mv` (in mV) maps linearly onto 600 MHz…3.2 GHz over
0.7 V…3 V. The measured curve bends (it rises faster at low voltage), so the
model's frequency is only approximate away from the end points. Below 0.7 V
the ring stops. There is no jitter in the model. `ck_vco` is taken after the
first inverter. If a synthesis tool ignores the delays, it sees a
combinational loop of inverters, which is exactly what the ring is.

`tdc_core` is the synthesizable part: counter plus channels, with `ck_vco`
as an input. `tdc_top` adds the oscillator model.

## Where this RTL departs from the circuit it follows

| Item | Here | Circuit / description |
|---|---|---|
| Word width | 8 bits everywhere | The latch drawing labels nine lines (bit0..bit8); the counter, the block diagram and the serializer use eight |
| Event edge | Rising edge only | The overall description says both rising and falling edges, but every detailed circuit uses the rising edge. Stamping the falling edge into the other half would not survive the clear at hand-over unless pulses last longer than a sync clock |
| Resolution | 250 ps per code at 2 GHz (half period) | A 100 ps resolution is claimed for a 2 GHz counter, which this structure does not reach |
| Memory strobe | `sel` / `sel_n` directly | Through analog delay cells and tri-state input buffers, which only give the data time to settle |
| Clear pulse | Lasts until the next `ck_sync` edge (a flip-flop acts as the delay) | An analog delay cell sets the pulse width |
| Global reset | `rst_n` added, asynchronous, active low | Only the serializers' reset is described |
| Bit order | MSB first | Follows the 4-bit serializer drawing, where the highest input sits next to the output |
| Half-to-wire mapping | Odd (`sel`) half uses buffered `rn_piso`; even half uses inverted `rn_piso` | Read from small wire labels |

Not built: the amplifier, the discriminator and the FPGA. Their signals are
the ports of `tdc_top`.

## Interface of `tdc_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `vcont_mv` | in | int | Oscillator control voltage in mV |
| `rst_n` | in | 1 | Global asynchronous reset, active low |
| `event_i` | in | `N_CH` | Discriminator pulses; the rising edge is stamped |
| `ck_sync` | in | 1 | Serial clock from the FPGA |
| `rn_piso` | in | 1 | 1: odd halves talk, 0: even halves talk; each toggle starts a transfer |
| `ck_vco` | out | 1 | Oscillator clock, for monitoring |
| `vector_o` | out | `N_CH` | One serial line per channel |

Parameters: `N_CH = 8` and `WIDTH = 8`. `tdc_pkg` holds the shared constants,
the write/shift enum and a reference function for the expected code.

**Bring-up:** pulse `rn_piso` once, then run `ck_sync` for a few cycles, then
apply a falling edge on `rst_n`. This defines every reset-driven flip-flop.
The first transfer after reset sends zeros.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `tdc_pkg.sv` | Shared constants |
| `vco_ring.sv` | Oscillator model |
| `sync_counter.sv` | Time counter |
| `event_latch.sv` | Event memory |
| `piso.sv` | Serializer |
| `odd_even_divider.sv` | Odd/even event splitter |
| `piso_rw_ctrl.sv` | Serializer write/shift control |
| `mem_clear_pulse.sv` | Memory clear pulse |
| `tdc_channel.sv` | One channel |
| `tdc_core.sv` | Synthesizable core |
| `tdc_top.sv` | Complete TDC with oscillator |

`tb/` has one self-checking bench per module, `<module>_tb.sv`. Each bench
prints `TB_RESULT checks=N failures=M`.

* `tdc_top_tb` runs the full default design end to end at about 2 GHz. It
  counts the oscillator's edges itself and checks every stamp against that
  count.
* `tdc_top_tb` and `tdc_core_tb` fire events on random channels, both between
  and during transfers, and compare every serial word with a reference model
  of the memories. They also check that each mechanism happens at least once:
  stores into both halves of all channels, transfers from both halves, a store
  while the other half sends, pile-up loss, memory clear and counter
  wrap-around.
* During the run, `tdc_top_tb` retunes the oscillator and `tdc_core_tb`
  changes the clock rate.
* `tdc_rate_workload_tb` runs periodic events on single-channel cores. The
  first run uses a 4-bit core: 7107 events at 70 MHz, every word read out and
  histogrammed. The second uses an 8-bit core: 2000 events at 100 MHz. Both
  runs clock the oscillator and the serial line at 2 GHz. The bench checks
  that every word is correct and is in before the next event is due. With
  strictly periodic events only a few codes are hit, so the histogram is
  deliberately not flat.

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -yrtl rtl/tdc_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
./obj_dir/Vtdc_top_tb +verilator+rand+reset+2
```

The benches start with reset high and then drop it, so the asynchronous
resets see an edge. Keep that ordering in any new bench.
