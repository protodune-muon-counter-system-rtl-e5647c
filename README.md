# Muon counter readout for ProtoDUNE: PMT-board FPGA logic, token-ring readout and trigger box

The muon counter puts planes of scintillator strips in front of, behind and
above a liquid-argon TPC. It tags beam muons and cosmic rays. Each scintillator module is read by a
64-anode photomultiplier. Each tube has one front-end board (the PMT board)
with a Maroc2 front-end chip, an external 12-bit ADC and an FPGA. The FPGA
does four jobs:

* it turns the 64 discriminator outputs into **triggers**: a 96-bit word made of
  a 32-bit time-stamp (16 ns per count) and the 64-bit hit pattern;
* it **digitises the charge** of the channels of each trigger through the
  chip's track-and-hold, multiplexer and the external ADC;
* it takes part in a **token ring**: all boards of a chain and one USB readout
  board are linked by 24-bit serial links. A board may only send while it
  holds the token;
* it produces a **hardware trigger-out** for scalers and for a trigger box,
  which builds the X-view and Y-view triggers for the experiment.

This repository holds synthesizable SystemVerilog for that logic: one PMT
board (`pmt_board`), the link side of the USB board (`usb_link_master`) and the
trigger box (`trigger_box`). They are wired together as one chain in
`muon_counter_top`. Each block has a self-checking testbench.

```
             token, control words                         packets to the PC
  PC <-> usb_link_master --> board 0 --> board 1 --> ... --> board N-1 --+
               ^                                                         |
               +---------------------------------------------------------+
   shared: 62.5 MHz clock, NIM sync/gate pulse, inhibit
   trig_out of every board --> trigger_box --> trig_x, trig_y
```

## One PMT board

```
 comp[63:0] --> disc_latch --> trigger_logic --> sync_fifo (hit FIFO, 96 b x 64)
  (Maroc2)        ^   |hits        | trig_start, copy of the word     |
                  |   v            v                                  v
          disc_clr|  trigout_logic adc_control --> dp_ram (18 b x 1024) --> token_node <-- link_rx <-- from downstream
                  |   -> trig_out   | hold, R port, convert  + sync_fifo (descriptors)    |  --> link_tx --> upstream
 sync_gate --> gate_sync_disc --> timestamp_counter                                       |
                                                    ctrl_regs <-- register writes -------+
                                                    maroc_gport --> Maroc2 G port
```

Everything runs on the 62.5 MHz system clock, 16 ns per cycle. The comparator
outputs, the NIM pulse and the link word clock are asynchronous inputs. Each of
them is synchronised with two flip-flops.

### From comparator edge to trigger word

1. A rising edge on a comparator output clocks that channel's flip-flop, so a
   pulse shorter than a clock period still counts. `disc_latch` passes each
   flip-flop through its own two-stage synchroniser. The bit shows on
   `hits` 2 to 3 cycles after the edge.
2. `trigger_logic`: in the idle state, any bit of `hits` starts a trigger. The
   time-stamp of that cycle is kept, so the time belongs to the earliest
   input. `trig_start` tells the ADC logic.
3. For the **trigger time of 4 cycles** (64 ns), new bits are OR-ed into the
   pattern. On the fourth cycle `{time-stamp, pattern}` goes into the hit FIFO
   in one write, so the FIFO adds no dead-time. A copy goes to the ADC logic.
4. `disc_clr` then holds all 64 flip-flops and synchronisers cleared for
   **5 cycles (80 ns)**. This dead-time suppresses after-pulses. An edge
   that arrives during it is lost.
5. If the FIFO is full, the word is dropped and counted.

A trigger is refused when `inhibit` is high, or in gated mode while the gate is
low. The discriminators are then only cleared.

After reset, the trigger logic starts in the dead-time state, so the first
thing it does is clear the discriminator flip-flops.

### ADC readout (`adc_control`, `dp_ram`)

The Maroc2 slow shaper peaks about 100 ns after the pulse. The fast
discriminator fires after about 10 ns. That difference leaves time to form
the trigger, then freeze the slow-shaper outputs with `hold`.

When a trigger arrives and the ADC logic is free, the sequence is:

* `hold` rises `hold_dly + 2` cycles after `trig_start`. The reset value
  `hold_dly = 1` puts the hold about 100 ns after the comparator edge. The
  right value is a matter of measurement, so it is a register.
* The event's time-stamp goes into the dual-port memory as two words, bits
  31:16 and then 15:0.
* For each channel 0..63:
  * an R-clock steps the Maroc2 read multiplexer. The first R-clock has
    `r_d = 1`, which selects channel 0.
  * 32 cycles (512 ns) of settling follow. The multiplexer needs at least
    0.5 µs.
  * then a convert clock goes to the ADC.
* Four cycles after each convert clock, the result is written as
  `{channel[5:0], adc[11:0]}`.
  * With suppression on, only channels in the hit pattern are written.
  * With suppression off, all 64 are written. This is useful for measuring
    cross-talk and the single-photoelectron peak.
* One channel takes 33 cycles, so one event takes 2112 cycles (33.8 µs).
  Then `hold` drops, and `{start address, word count}` goes into the
  descriptor FIFO.

A trigger that arrives while a readout runs gets no ADC data but is still
in the hit FIFO. The same applies when the memory has no room for a full
66-word event, or when the descriptor FIFO is full. In each case `adc_drop`
pulses and a counter counts it. The memory is a ring buffer: the link node
gives back an event's words after it has sent them.

**Conditional readout** (mode bit 6) lets the trigger box decide which events
keep their ADC data, for example a coincidence of several layers. The board
watches the box's answer for its own view (`box_trig`) for 32 cycles
(512 ns) after the trigger, which is longer than the box's worst-case delay.

* If an answer comes in time, the event is kept as usual.
* If none comes, the readout still runs to the end, because the track-holds
  can only be read while held. Then its words are given back, no descriptor
  is written and `adc_discard` pulses.

The trigger packet is sent either way.

### The link and the token ring (`link_rx`, `link_tx`, `token_node`, `usb_link_master`)

Between boards, 24-bit words travel through a serializer/deserializer pair
running at 1/8 of the system clock: one word every 8 cycles, 7.8 Mwords/s.
`link_tx` presents a word with its word clock. `link_rx` detects the word
clock edge in the local clock domain and samples the word, which is stable
for 8 cycles. In `muon_counter_top` the cable is a direct 24-bit connection.

Bits 23:22 of each word give its type:

| D[23:22] | type | payload D[21:0] |
|---|---|---|
| 0 | idle (nothing to send) | — |
| 1 | control | `addr[6:0]` board, `reg[6:0]`, `data[7:0]` |
| 2 | token | 0 |
| 3 | data | `sub[1:0]`, then header or body fields |

Data words form packets. The header has `sub = 1` for a trigger packet or
`sub = 2` for an ADC packet. It also carries the 7-bit board address and the
number of body words that follow (13 bits). Body words have `sub = 0`:

* trigger packet: 6 body words of 16 bits, in this order:
  * time-stamp 31:16, then 15:0;
  * hits 63:48, 47:32, 31:16, 15:0.
* ADC packet: the memory words of one event, 18 bits each:
  * two time-stamp halves;
  * then one `{channel, value}` word per converted channel.

The time-stamp in the ADC packet is how the PC pairs it with its trigger
packet.

Each board (`token_node`) buffers incoming words in a 16-word FIFO and
handles them in order:

* **data words**, and control words for other boards, are passed upstream
  unchanged;
* a **control word for this board** writes register `reg`. If `reg` is
  0x7F, it is a read request instead: the board sends upstream a control
  word with register 0x7E that holds the value of register `data`;
* the **token**:
  * with both buffers empty, the board passes it on at once;
  * otherwise the board keeps the token. It sends one trigger packet (if
    any), then one ADC packet (if any), and then passes the token.

`usb_link_master` sends one token after reset, and a new one only after the
previous one has come back from the last board. Exactly one token is ever in
the ring. Control words from the PC go into the ring ahead of the next
token. Every data or control word that comes back goes into a 256-word
queue for the PC.

### Sync, gate and the time-stamp (`gate_sync_disc`, `timestamp_counter`)

The clock and a single NIM pulse line are fanned out to all boards. The pulse
width tells sync from gate:

| pulse seen for | meaning |
|---|---|
| 1 cycle (≤ 16 ns) | **sync**: clears the time-stamp counter on every board |
| 2 cycles | nothing |
| ≥ 3 cycles (> 32 ns) | **gate**: level, high until the pulse ends |

The timing system sends the sync at a fixed rate, 0.1 Hz by default, which
is 625,000,000 cycles (`SYNC_PERIOD`). With the check enabled, each sync
whose counter value is not `SYNC_PERIOD-1` counts as a sync error. The 32-bit
counter wraps after 68.7 s, so a 10 s period fits.

### Trigger-out and the trigger box (`trigout_logic`, `trigger_box`)

Each board drives a registered trigger-out, with three modes set by register:

* the OR of its 64 synchronised bits;
* a local coincidence: a hit in channels 0–31 *and* one in 32–63;
* a multiplicity: at least `mult_thr` channels hit.

The trigger box synchronises the trigger-outs of the X-view and Y-view
boards. It has two modes:

* fan-in (mode 0): `trig_x` is the OR of the X boards and `trig_y` the OR of
  the Y boards;
* trigger (mode 1): both outputs require an X *and* a Y signal.

The box starts in fan-in mode. The PC switches it with a control word, as it
does for a board: register 0x48, address 0 (no board uses it), data bit 0 is
the mode. The box gets a copy of the words the USB board sends into the chain
and decodes them with its own `link_rx`. The command also travels round the
ring and comes back to the PC unchanged.

From comparator edge to box output takes 6–7 cycles, about 100 ns. The budget
is 500 ns.

### Registers (`ctrl_regs`, `maroc_gport`)

| reg | access | content |
|---|---|---|
| 0x00–0x02 | r/w | Maroc2 switch bytes |
| 0x03–0x05 | r/w | Maroc2 DAC bytes |
| 0x06–0x45 | r/w | Maroc2 gain bytes, channels 0–63 (reset 16) |
| 0x46 | w | any write: shift 0x00–0x45 into the Maroc2 G port |
| 0x48 | r/w | mode: bit 0 ADC on, 1 suppression, 2 gated mode, 4:3 trigger-out mode (0 OR, 1 coincidence, 2 multiplicity), 5 sync check, 6 conditional ADC readout (reset 0x03) |
| 0x49 | r/w | hold delay in cycles (reset 1) |
| 0x4A | r/w | trigger-out multiplicity (reset 2) |
| 0x4B / 0x4C / 0x4D | r | saturating counts: sync errors, hit-FIFO overflows, triggers without ADC data |

The Maroc2 keeps its set-up registers only while it is powered, so they must
be reloaded after a power cycle. `maroc_gport` shifts the 70 bytes out:

* byte 0 first, most significant bit first;
* `g_d` is taken on the rising edge of `g_clk`, which runs at clk/8;
* a `g_load` pulse follows the last bit.

The whole load takes 72 µs.

Acquisition modes:

* latch-only: hit patterns only (mode bit 0 = 0);
* hit channels only: ADC with suppression;
* all channels on any hit: ADC without suppression;
* gated;
* conditional: ADC data only for events the trigger box confirms.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `muon_counter_top` | `N_PMT` boards per chain | 4 | chosen |
| | `N_X` X-view boards (rest are Y) | 2 | chosen |
| all | channels, time-stamp bits | 64, 32 | system description |
| `trigger_logic` | `TRIG_WIN`, `DEAD_CYC` | 4, 5 | system description (64 ns, 80 ns) |
| `adc_control` | `SETTLE_CYC` | 32 | from the 0.5 µs settling time |
| | `ADC_LAT` | 4 | chosen |
| | `ACC_WIN` trigger-box answer window | 32 (512 ns) | chosen, from the 500 ns box delay |
| `pmt_board` | `HF_DEPTH` hit FIFO | 64 | chosen |
| | `AW` memory address bits | 10 (1024 words) | chosen |
| `timestamp_counter` | `SYNC_PERIOD` | 625,000,000 | from the 0.1 Hz sync rate |
| `link_tx` | `DIV` | 8 | system description |
| `maroc_gport` | `CLK_DIV` | 8 | chosen |
| `trigger_box` | `BOX_ADDR` | 0 | chosen |

## What comes from the system description and what is this design's own

Taken from the description of the system:

* the 62.5 MHz clock and the 32-bit, 16 ns time-stamp cleared by sync;
* sync and gate told apart by pulse width;
* edge-set discriminator flip-flops with individual synchronisers;
* the OR trigger, the time-stamp of the earliest input, the 4-cycle trigger
  time, the 80 ns dead-time and the single-cycle 96-bit FIFO write;
* hold to the Maroc2, 64 R-clocks and 64 convert clocks, 0.5 µs settling,
  and no ADC data while the ADC is busy;
* time-stamp first in the dual-port memory, then ADC value and channel;
  write-enable gated by the hit bits; address and word count in a separate
  FIFO, with the word count in front of the packet;
* 24-bit link words at 1/8 of the clock, and the word types 1/2/3;
* the token rules, with trigger data before ADC data;
* the 7-bit board address, and parameters written and read over the link;
* the 70 set-up bytes of the G port;
* the trigger box's X-OR and Y-OR outputs with a fan-in or trigger mode,
  chosen by a command from the PC;
* ADC data kept only when the trigger box's condition is met;
* a sync check against the known sync period.

This design's own choices, where the description gives no detail:

* the packet and control-word layouts, and the register map with its reset
  values;
* the idle word;
* FIFO and memory depths;
* how the R port and G port wires are used, and the G-port rate;
* the ADC latency, and the 33-cycle channel period;
* the coincidence and multiplicity trigger-out modes;
* the coincidence rule of the trigger box, its address and how its command
  reaches it;
* what the gate does: it enables triggers in gated mode;
* what the inhibit signal does: it blocks triggers;
* dropping a trigger word when the hit FIFO is full;
* ring-buffer management of the ADC memory;
* how conditional readout decides: an answer window, and discarding after
  the conversion;
* the PC-side stream interface of the USB board.

Known differences and parts left out:

* Conditional readout applies only to ADC data. Hit patterns are always
  sent.
* The interlock wire that checks that all modules are present has no logic
  here.
* The serializer/deserializer chips, the USB interface chip, the Maroc2, the
  ADC, the photomultiplier and power parts are outside the FPGA. Their signals
  are ports. `tb/maroc_adc_model.sv` models the Maroc2 read multiplexer and
  the ADC for simulation.
* The full readout of one event takes 33.8 µs, a little more than the nominal
  32 µs. This is because the settling time is rounded up to whole cycles.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog. Block tests
shorten slow parameters where that helps: for example, `SETTLE_CYC = 6` in the
ADC test and a 100-cycle sync period in the time-stamp test.

`tb_pmt_board` runs one board at its default sizes behind a USB link master.
`tb_muon_counter_top` runs the whole chain at the default parameters: 4
boards, the full 33-cycle channel period and the 10 s sync period. It decodes
every packet at the PC side and checks the hit patterns, the time-stamps and
every ADC value against the model. It forces each of these to happen at least
once:

* trigger, dead-time loss, hit-FIFO overflow;
* ADC readout, ADC busy drop, suppressed and full readouts;
* token passed and token held, and trigger plus ADC data in one visit;
* control write and read-back;
* sync, sync error, gate, inhibit;
* G-port load;
* all trigger-out modes, and both trigger-box modes switched over the link;
* conditional readout, with ADC data both discarded and kept.

It runs in a few seconds.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_muon_counter_top.sv --top-module tb_muon_counter_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Adding
`+verilator+rand+reset+2` on the simulator command line starts every
register that is not reset at a random value. The testbenches pass that way
too, because they ignore outputs until reset has been released.

## Files

* `rtl/mc_pkg.sv`: shared constants, link word and trigger word types, the
  register map and the configuration struct.
* `rtl/*.sv`: one module per file, as named above.
* `tb/tb_*.sv`: testbenches.
* `tb/maroc_adc_model.sv`: behavioural Maroc2 multiplexer and ADC model.
