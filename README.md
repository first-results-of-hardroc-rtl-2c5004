# HaRDROC digital part in SystemVerilog

HaRDROC (Hadronic RPC Detector Read-Out Chip) reads 64 pads of a resistive
plate chamber in a digital hadron calorimeter. Each pad only needs a yes/no
answer ("was there a hit above threshold, and above which of two
thresholds?"), so the chip does not digitize charges. Instead it works on its
own during a bunch train: whenever a pad fires it stores a 160-bit snapshot of
all 64 channels with a time stamp in an on-chip memory. Between trains the
data acquisition (DAQ) system reads the chips one after another over a single
shared serial line. This RTL is the digital part of such a chip: the channel
hit memories, the trigger, the event memory and its two state machines, the
serial readout with its daisy chain, and the configuration registers. The
analog front end (preamplifier, shapers, discriminators, DACs, bandgap) is not
included; the two discriminator outputs of each channel are inputs of the top
module.

## How one event is taken

Everything runs on the 40 MHz clock. The bunch clock (5 MHz, one eighth of
40 MHz) is synchronized and used as a one-cycle tick.

1. **Channel hit memories** (`channel_trigger`, 64 copies). Each channel has
   two discriminator outputs, D0 and D1, set by two threshold DACs. While
   `val_evt` (ValEvt) is high and the channel is enabled by its `Valid_trig`
   configuration bit, a discriminator pulse sets that channel's hit bit, which
   then stays set until RazChn clears it. Disabling a channel is how a noisy
   pad is silenced.
2. **Trigger** (`trigger_ctrl`). The internal trigger is the OR of the 64 held
   D1 bits. The trigger can come from it, from the `trigger_ext` pin, or from
   both, depending on two configuration bits. The selected trigger also goes
   out on `out_trig_int`. A D0 hit alone does not trigger: it is only recorded
   if a D1 hit somewhere triggers the chip before RazChn clears it.
3. **Synchronization** (`synchro`). The trigger, StartAcq, StartReadOut and
   the slow clock pass through two flip-flops. Rising edges of the trigger,
   StartReadOut and the slow clock become one-cycle pulses.
4. **WriteEvents state machine** (`write_sm`). A trigger pulse is accepted
   while StartAcq is high and neither this chip's memory nor the shared
   RamFull line says "full". Counting the 40 MHz period after the trigger
   pulse as period 1:

   | period | action |
   |---|---|
   | 0 | trigger pulse sampled, bunch counter value captured |
   | 1-4 | `val_evt_out` (ValEvtOut) high |
   | 5 | frame written to the memory, fill counter incremented |
   | 6 | wait |
   | 7 | RazChnOut high: all channel hit memories cleared (if internal clearing is enabled) |
   | 8 | ready for the next trigger |

   An event therefore takes one bunch period. Triggers during an event are
   ignored. From a discriminator edge to the trigger pulse takes 3 periods
   (hit memory, then two synchronizer stages). So hits arriving up to period
   4 are in the frame.
5. **Bunch counter** (`bunch_counter`). This 24-bit counter counts bunch-clock
   ticks while StartAcq is high. It has its own reset pin (`rst_counter_n`),
   so that all chips can be zeroed together. Its value at the trigger is the
   event's BCID.

The ValEvt and RazChn inputs are separate from ValEvtOut and RazChnOut. On a
board the DAQ can hold ValEvt high for the whole train, or the board can wire
ValEvtOut back into ValEvt. In that case the chip only records hits in a
4-period window after an (external) trigger. The internal clear and the
external RazChn pin each have their own enable bit.

## Frame and memory

One event is one 160-bit frame:

| bits | field |
|---|---|
| 159:152 | chip tag (8 configuration bits, so frames from several chips can be told apart) |
| 151:128 | BCID (24 bits) |
| 127:0 | hits: bits `2*ch+1 : 2*ch` = {D1, D0} of channel `ch` |

The memory (`event_ram`) holds 128 frames (128 x 160 = 20480 bits). One counter
(`ram_addr_counter`) is shared by both state machines. It holds the number of
stored frames: a write goes to address `count` and increments it, and a read
takes address `count-1` and decrements it. When it reaches 128 the chip stops
storing and pulls the RamFull* line low.

## Readout and the daisy chain

Chips on one board share three open-collector lines: Dout*, TransmitOn* and
RamFull*. Each line is pulled up at its end and is low when any chip drives it
(`oc_driver` models a pad as `out_n = !(enable & in)`; several pads on one
line combine as an AND). Each of the three signals also has a buffered,
always-enabled, active-high test-point copy (`dout_007`,
`transmit_on_007`, `ramfull_007`). The readout order comes from a chain:

    DAQ StartReadOut -> chip 0 -> EndReadOut = StartReadOut -> chip 1 -> ... -> last EndReadOut -> DAQ

The readout state machine (`readout_sm`) starts on a rising StartReadOut:

- It reads the most recently stored frame into the serializer (`serializer`).
- At the next slow-clock tick it raises TransmitOn.
- Dout then shows the frame MSB first and moves on one bit per slow-clock
  period.
- While a frame is being sent, the next one is fetched, so frames follow each
  other with no gap.
- Frames come out last-in first-out, and the memory is empty afterwards.
- After the last bit, TransmitOn falls and EndReadOut is high for one
  slow-clock period. A chip with an empty memory gives only the EndReadOut
  pulse, one tick after StartReadOut.

The slow clock sets the bit rate. It is meant to run at 5 MHz, but a 1 MHz
readout also works, because every step waits for a tick: a frame then takes
160 periods of whatever clock is applied. A full memory takes 20480 bits,
4.1 ms at 5 MHz. A chip configured as bypassed (`bypass_chip`) does not send
anything: its EndReadOut is a direct copy of its StartReadOut, so the chain
skips it.

Acquisition and readout exclude each other. A StartReadOut that arrives
while an event is being stored is held until the frame is written, so that
frame is sent too. No new event is started while a readout is pending or
running. The chip therefore ignores triggers during readout, even if StartAcq
is still high.

## Configuration

**Slow control register** (`slow_control_register`): 571 bits, loaded
serially on its own clock (`sc_clk`, `sc_d`, reset `sc_rst_n`). Each clock
moves the word one place toward bit 1, and `sc_d` enters at bit 571. The bit
sent first therefore ends up as bit 1 after 571 clocks. `sc_q` is bit 1, so
571 further clocks read the word back. Bit numbers below are 1-based (vector
index = number - 1):

| bits | setting |
|---|---|
| 1, 2, 3 | output enables of RamFull*, Dout*, TransmitOn* |
| 4 | enable of the probe outputs |
| 5-12 | chip tag, bit 0 first |
| 13 | bypass this chip in the readout chain |
| 14, 15, 16 | enable out_trig_int, internal trigger, external trigger |
| 17, 18, 19 | enable out_raz_chn_int, internal RazChn, external RazChn pin |
| 20 | unused |
| 21-84 | Valid_trig of channels 0-63 |
| 85-94, 95-104 | threshold DAC codes 0 and 1 (10 bits, bit 0 first) |
| 105-107 | DAC and bias amplifier power bits |
| 108-171 | test-input enable of channels 0-63 |
| 172-555 | preamplifier gain, 6 bits per channel (channel `ch` at 172 + 6*ch) |
| 556-571 | bias and shaper switches (ON_pa ... Sw_ssc0) |

Bits 85 and above only steer the analog part. They come out of the top
decoded, as the `cfg_ana` struct (`hardroc_pkg::sc_ana_t`).

**Read register** (`read_register`): 64 bits on its own clock (`r_clk`,
`r_d`, `r_q`, reset `r_rst_n`). `r_d` enters channel 0 and the bits move
toward channel 63, which drives `r_q`. A selected channel (with bit 4 set)
drives its raw D0/D1 outputs onto `out_trig0`/`out_trig1` and its held hits
onto `out_rs_trig0`/`out_rs_trig1`. These four lines are the OR over the
selected channels. They are meant for looking at a few channels on a scope.

## Files

| file | contents |
|---|---|
| `rtl/hardroc_pkg.sv` | sizes, `frame_t`, slow-control structs and `sc_decode()` |
| `rtl/hardroc_top.sv` | one chip: everything below, wired together |
| `rtl/channel_trigger.sv` | one channel's two hit memories and probe gating |
| `rtl/trigger_ctrl.sv` | OR64 and trigger selection |
| `rtl/synchro.sv` | synchronizers and edge pulses |
| `rtl/bunch_counter.sv` | 24-bit BCID counter |
| `rtl/write_sm.sv` | WriteEvents state machine |
| `rtl/ram_addr_counter.sv` | shared fill counter / address |
| `rtl/event_ram.sv` | 128 x 160 memory, registered read |
| `rtl/readout_sm.sv` | readout state machine |
| `rtl/serializer.sv` | 160-to-1 shift register |
| `rtl/slow_control_register.sv`, `rtl/read_register.sv` | serial configuration registers |
| `rtl/oc_driver.sv` | behavioural model of the open-collector output pad |

Parameters default to the chip's sizes (64 channels, 128 frames, 24-bit BCID,
8-bit tag, 571 configuration bits). The memory is a plain array with one
write port and one registered read port. A synthesis tool maps it to a RAM
macro or to flip-flops.

## Choices made in this RTL

The following are decisions of this design, where the chip's description
stops short:

- The set/reset latches of the channels are clocked flip-flops. A
  discriminator pulse must therefore last at least one 25 ns period to be
  seen. Clearing wins over setting.
- Enables combine as AND: hit set = disc & ValEvt & Valid_trig. The trigger is
  (internal & EN_trig_int) | (external & EN_trig_ext).
- The frame field order, the {D1, D0} pairing, MSB-first transmission and
  last-in first-out readout.
- When in the event the frame is written (period 5), BCID capture on the
  trigger cycle, and ignoring triggers during an event.
- The length of EndReadOut (one slow period) and the wait for a tick before
  transmitting.
- Holding off events during readout, and holding a readout request until an
  event in progress is stored.
- The shift direction and all-zero reset of both configuration registers,
  and the chaining order of the read register.
- In the preamplifier gain table, three bits of channel 63 are printed with
  the same name. The regular 6-bits-per-channel pattern is used.
- Two-stage synchronizers. The bunch counter counts only while StartAcq is
  high, and wraps at 2^24.

Not modelled: the analog front end, the threshold DACs, the probe
multiplexing of analog signals (hold, track & hold, DC levels) and the power
pulsing switches. Their configuration bits are decoded and brought out. The
open-collector pads are modelled only by their logic level.

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. With Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_hardroc_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/hardroc_pkg.sv tb/tb_hardroc_top.sv
    ./obj_dir/Vtb_hardroc_top

Swap in any other testbench name; `rtl/hardroc_pkg.sv` must come first.

- `tb_hardroc_top` runs two chips at full size, sharing lines and chained.
  It configures them serially and takes events four ways: internal trigger
  with D0 and D1 hits, external trigger, masked channel, and external RazChn.
  It checks the ValEvtOut/RazChnOut timing on every event and the probe
  lines. It then fills one chip to 128 frames. That pulls RamFull* low, and
  the test checks that the other chip stops too. Next it reads all 130 frames
  through the chain, checking every bit against predicted frames and the
  exact 8-periods-per-bit timing. Last, it bypasses the second chip and reads
  again at 1 MHz, raising StartReadOut in the middle of an event. It counts
  each of these mechanisms and fails if one never happened. It takes about a
  second.
- `tb_daisy4` runs four chained chips, one of them with an empty memory, and
  reads all frames with a single StartReadOut.
- `tb_trains` runs five bunch trains in a row on two chained chips. Each train
  has random events and a readout at a randomly chosen 5 or 1 MHz. It checks
  that every train starts from an empty memory and a zeroed bunch counter.
- Each block has its own testbench, `tb_<module>`. These check cycle-exact
  timing where the design fixes it: the 2-period synchronizer latency, the
  4/2/1-period event sequence, and 160 bits per frame at one bit per tick.
