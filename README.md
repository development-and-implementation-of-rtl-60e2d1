# Central Trigger System for TrbNet data acquisition

A data acquisition network needs one place that decides when an event is worth recording. It
must then tell every frontend board at the same moment, and later ask each of them for its data.
This is the central trigger system (CTS) for TrbNet-based setups. It watches up to eight
asynchronous trigger lines, an external trigger source and its own pulsers. It forms one trigger
decision with a 4-bit trigger type. It then runs the complete TrbNet event cycle:
- it distributes the trigger;
- it adds its own counters to the event;
- it waits for the busy release;
- it queues a readout token;
- it schedules the readout of the event.

Everything runs in one 100 MHz clock domain. Software controls the system over a 16-bit
address, 32-bit data register bus.

The design has two halves that share only the trigger decision, the trigger type and the
counters:

```
 trg_in[7:0] ──► sync FF ─► input modules ─┬─────────────► ┐
                                          └─► coincidences ►│
 ext_trg ───────────────────────────────────────────────────►│ 16 ITCs ─► masking ─► type select ─┐
 periodical pulsers, random pulser ─────────────────────────►┘                                    │
                                                                                                  ▼
     CTS endpoint (LVL1) ◄── TD-FSM ─► readout queue (512 tokens) ─► RO-FSM ──► CTS endpoint (readout)
     frontend endpoint  ◄──┘  ▲  ▲
                  throttle ───┘  └─── statistics
```

The **trigger logic** (`cts_trigger_logic`) turns raw signals into a decision. The **network
logic** (`cts_network_logic`) turns decisions into TrbNet transactions. `cts_top` joins the two
halves. `cts_regio_handler` splits the register bus between them: 0xa000–0xa0ff goes to the
network logic and 0xa100–0xa1ff to the trigger logic.

## From an input edge to the time reference

Timing matters most to a trigger system. This is the path an input edge takes, with the
shortest input settings:

| stage | cycles |
|---|---|
| sampling flip-flop (metastability) | 1 |
| input module: inverter register, delay tap 0, spike filter, override | 3 |
| ITC masking + trigger type selection | 2 |
| TD-FSM decision, time reference register | 2 |
| **input edge → `timeref` high** | **8 (80 ns)** |

Each step of input delay or spike rejection adds one cycle. The time reference pulse lasts
`TIMEREF_CYCLES` = 10 cycles (100 ns). The LVL1 trigger is requested in the cycle after the
decision. The TrbNet stack then takes several hundred ns to deliver it, so frontends with tight
timing should use `timeref`.

## Trigger logic

### Input module (`cts_input_module`)

Each sampled input passes four stages. One 11-bit register configures them:

| bits | field | effect |
|---|---|---|
| 3:0 | delay | 0–15 extra cycles from a 15-bit shift register and a tap multiplexer; this aligns inputs with different cable or detector delays |
| 7:4 | spike rejection T | a 4-bit counter counts high cycles; the input counts as high only once it has been high for T cycles. This removes spikes shorter than T and delays the signal by T |
| 8 | invert | for active-low sources |
| 10:9 | override | 0 = pass, 1 = force low, 2 = force high |

Example: the value 0x203 means delay 3, input forced low.

### Coincidence unit (`cts_coincidence`)

Each rising edge of an input starts an internal pulse W+1 cycles long, where W is the 4-bit
window in bits 19:16. The unit fires while the pulses of all inputs in the coincidence mask
(bits 7:0) overlap, that is, while all those inputs rose at most W cycles apart. A second mask,
bits 15:8, lists level inputs that must be high at the same time. This lets an external low-active
veto or inhibit signal block the coincidence. With only one mask set, the unit watches rising
lines alone or levels alone. With both masks empty, the output stays low.

### Pulsers

- `cts_periodic_pulser`: the output is high for one cycle and then low for N cycles (32-bit N).
  N = 0 holds the output high.
- `cts_random_pulser`: a 32-bit CRC register is clocked every cycle with a constant data word.
  The result is a sequence of nearly uniform pseudo-random numbers. The pulser fires whenever the
  number is below a 32-bit threshold T. The average rate is therefore about
  100 MHz · T / 2³². Because the numbers are uniform, the pulses do not bunch together. Bunched
  pulses would lose events to dead time and push the real rate well below the set rate. This
  design's CRC uses polynomial 0x04C11DB7, data word 0, and seed 0xFFFFFFFF XOR the instance
  number.

### Internal trigger channels (ITCs)

All sources end on 16 ITCs:

| ITC | source (default sizes) |
|---|---|
| 0 | external trigger logic (highest priority) |
| 1–2 | periodical pulsers |
| 3 | random pulser |
| 4–11 | conditioned inputs 0–7 |
| 12–13 | coincidence units |
| 14–15 | unused (low) |

`cts_itc_masking` enables each ITC (bits 15:0) and makes it edge- or level-sensitive (bits 31:16,
where 1 = edge). All ITCs are disabled after reset. `cts_event_type_select` asserts the trigger
while any enabled ITC is active. It takes the 4-bit type of the lowest active ITC from two
registers that hold eight types each.

`cts_event_counters` keeps, for each ITC and each sampled input, two counters: cycles asserted
and rising edges. Both are 32 bits and wrap without notice. The input counters sit before the
input modules, so comparing the two counter sets shows how much the spike filter removed.

## Network logic: the event cycle

This is the part that needs the most care. `cts_td_fsm`, the trigger distribution FSM, handles
one event at a time:

1. **IDLE.** It waits for `trg_asserted`. It accepts the trigger only if all of these hold:
   - the throttle is not inhibiting;
   - the stop bit is clear;
   - the readout queue is not full;
   - the LVL1 channel is not busy;
   - the debug trigger limit has not been reached.

   On acceptance it latches a snapshot of every counter that the event will carry.
2. **SEND_TRIGGER.** For one cycle it presents the trigger type, a 16-bit sequential number and
   an 8-bit code to the CTS endpoint. The code follows x ← x + 113 mod 256. The time reference
   starts for the trigger types selected by `TIMEREF_TYPES`, which is all types by default.
3. **WAIT_FEE_RECV_TRIGGER.** It waits until the trigger has come back to the CTS's own frontend
   endpoint (`fee_trg_received`), then writes a header word.
4. **FEE_ENQUEUE_\*.** It writes the data sections enabled in register 0xa009, one word per cycle.
   If external logic is attached and its control bit 0 is clear, it then pulses `ext_ro_start` and
   forwards the external logic's words until `ext_ro_finished`.
5. **FEE_FINISH, FEE_RELEASE.** It closes the data packet and releases the CTS's own busy.
6. **WAIT_TRIGGER_IDLE.** It waits until every frontend has released the LVL1 channel.
7. **ENQUEUE_TOKEN.** It pushes one 32-bit token into the readout queue and returns to IDLE. The
   token holds the type (27:24), the code (23:16) and the number (15:0).

After the number of triggers set in 0xa008 bits 15:0, the FSM parks in DEBUG_LIMIT_REACHED.
A value of 0xFFFF means no limit. Any write to 0xa008 restarts the count.

### Event data of the CTS

The header is `{4'b0, type, 8'(ITCs), 8'(inputs), 2'b0, external, content[4:0]}`. The sections
follow in this order:

| content bit | section | words |
|---|---|---|
| 0 | input counters (asserted, edges) per input | 16 |
| 1 | ITC counters (asserted, edges) per ITC | 32 |
| 2 | last idle time, last dead time | 2 |
| 3 | trigger asserted cycles, rising edges, accepted triggers | 3 |
| 4 | free-running cycle timestamp | 1 |
| — | external logic words | any |

A full packet is 55 words (220 bytes). The TrbNet round trip hides the data transfer only for
packets below about 40 words. So regular events should carry a small subset, and a rare debug
trigger type can carry the full dump.

### Readout (`cts_readout_queue`, `cts_ro_fsm`)

The readout is decoupled from the trigger. The TD-FSM can accept the next event as soon as the
busy release is in. Tokens wait in a 512-entry, 32-bit FIFO. The RO-FSM runs this loop:
- IDLE → SEND_REQUEST: as soon as a token is present, it issues the readout request;
- WAIT_BECOME_BUSY: it waits for the readout channel to become busy;
- WAIT_BECOME_IDLE: it waits for the readout to finish, pops the token, and starts over.

Register 0xa008 bits 31:16 set a readout debug limit that works like the trigger limit. With a
limit of 0, the queue fills until `full` stops new triggers.

### Throttle and statistics

`cts_throttle` counts accepted events in fixed windows of `MS_CYCLES` = 100 000 cycles (1 ms). It
inhibits further triggers once the 10-bit limit is reached, if enabled. Bit 31 of 0xa00c stops
all triggers. `cts_statistics` counts trigger cycles, edges and accepted triggers. It also keeps
three values for the last event:
- dead time: from acceptance to the TD-FSM's return to idle;
- idle time: from the return to idle to the next acceptance;
- period: the time between the last two accepted triggers.

## Registers

The bus carries one-cycle read or write strobes. The answer comes exactly one cycle later, as
`ack` with data or as `unknown`.

Fixed registers (network logic):

| addr | content |
|---|---|
| 0xa000–0xa002 | trigger asserted cycles, rising edges, accepted triggers (ro) |
| 0xa003 | current trigger: ITC bitmask 15:0, type 19:16, asserted 20 (ro) |
| 0xa004 | trigger of the last accepted event: bitmask, type (ro) |
| 0xa005 | TD-FSM state, one-hot (bit 0 IDLE … bit 13 DEBUG_LIMIT_REACHED) |
| 0xa006 | RO-FSM state, one-hot (bits 0–4) |
| 0xa007 | readout queue: tokens 15:0, empty 30, full 31 |
| 0xa008 | debug limits: triggers 15:0, readouts 31:16 (0xFFFF = none, reset) |
| 0xa009 | event content bits 4:0 (reset 0) |
| 0xa00a | dead time of the last trigger |
| 0xa00b | time between the last two accepted triggers |
| 0xa00c | throttle: events per ms 9:0, enable 10, stop 31 |

The trigger logic registers form a chain of blocks from 0xa100. Software can enumerate the chain
without knowing the build. Each block starts with a header:
- block type in bits 7:0;
- number of registers that follow, in bits 15:8;
- first ITC, in bits 20:16;
- number of ITCs, in bits 25:21;
- a last-block flag in bit 31.

The chain holds these blocks in order:

| type | block | registers |
|---|---|---|
| 0x00 | ITC masking | enable / edge mask |
| 0x01 | ITC counters | 32 (asserted, edges per ITC) |
| 0x10 | input configuration | one per input |
| 0x11 | input counters | 16 |
| 0x20 | coincidence configuration | one per unit |
| 0x30 | periodical pulsers | low period per pulser |
| 0x40 | trigger types | 2 |
| 0x50 | random pulsers | threshold per pulser |
| 0x60 | external logic (last) | control (rw), status (ro) |

At the default sizes the chain occupies 0xa100–0xa14c. Writes to read-only words are
acknowledged and ignored. Addresses past the chain answer `unknown`.

## Top-level ports (`cts_top`)

| group | signals |
|---|---|
| clock / reset | `clk` (100 MHz), `rst` (synchronous, active high) |
| trigger inputs | `trg_in[NUM_INPUTS-1:0]`, asynchronous |
| external trigger logic | `ext_trg` (→ ITC 0), `ext_status`, `ext_control`, `ext_busy`, `ext_ro_start`, `ext_ro_data`, `ext_ro_write`, `ext_ro_finished` |
| CTS endpoint, trigger | `lvl1_send` (1 cycle), `lvl1_type`, `lvl1_number`, `lvl1_code`, `lvl1_busy` |
| CTS endpoint, readout | `ipu_start` (1 cycle), `ipu_number`, `ipu_code`, `ipu_type`, `ipu_busy` |
| own frontend endpoint | `fee_trg_received`, `fee_data`, `fee_data_write`, `fee_data_finished`, `fee_trg_release` |
| outputs | `timeref` (100 ns pulse), `busy` |
| slow control | `sc_req` (`regio_req_t`), `sc_rsp` (`regio_rsp_t`) |

Parameters and their defaults:
- `NUM_INPUTS` 8; `NUM_COIN` 2; `NUM_PERIODIC` 2; `NUM_RANDOM` 1 (at most 16 sources in
  total);
- `QUEUE_DEPTH` 512;
- `MS_CYCLES` 100 000;
- `TIMEREF_CYCLES` 10;
- `TIMEREF_TYPES` 16'hffff;
- `EXT_LOGIC` 1: set it to 0 when nothing is connected to the external readout port.

## What comes from the original design and what is filled in

These follow the original CTS:
- the block structure and the 16 ITCs;
- the stage order of the input module and its 15-step delay and spike range;
- the coincidence fields;
- the CRC-based random pulser and its threshold comparison;
- the periodic pulser encoding;
- the fixed register map and the block type IDs;
- the four phases of the TD-FSM and the five RO-FSM states;
- the +113 code sequence;
- the 512-token queue;
- the 8-cycle latency.

These are this implementation's own choices:
- the number of inputs, coincidence units and pulsers;
- the assignment of sources to ITCs beyond ITC 0;
- the names and order of the TD-FSM states between ENQUEUE_INPUT_COUNTER and
  WAIT_TRIGGER_BECOME_IDLE;
- the header word and token layouts;
- the CRC polynomial, seed and data word;
- the coincidence pulse length W+1;
- the edge polarity of the ITC mask;
- "force high" as override code 2;
- the throttle's fixed 1 ms windows;
- the exact boundaries of idle and dead time;
- the bus handshake;
- the reset values other than "all ITCs off" and "event content 0".

The spike filter passes a pulse once it has been high for T cycles. This keeps its delay at
exactly T cycles. A strict "more than T" rule would add one more cycle.

## Not included

- The TrbNet endpoints, hub and media interfaces. Their handshakes are plain ports here.
- Any concrete external trigger logic, for example a decoder for a foreign DAQ's serial
  protocol. Only the CTS side of its interface exists.
- A faster clock domain or TDC for the input and coincidence units. That was an upgrade option,
  not part of the base design.
- Clock generation.
- The control software.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_trbnet_model.sv` is a behavioural
stand-in for the TrbNet side, used for testbench purposes only:
- LVL1 busy until release;
- the trigger returns to the frontend endpoint after 450 ns;
- 300 ns readouts;
- protocol violation counting.

```
verilator --binary --timing --assert -y rtl -y tb rtl/cts_pkg.sv tb/tb_cts_top.sv \
          --top-module tb_cts_top -Mdir obj_top && obj_top/Vtb_cts_top
```

Replace `tb_cts_top` with any other `tb_cts_*` to run that block's test.

`tb_cts_top` runs the whole system with every parameter at its default, for about 250 000 cycles
(under a second). It configures the system through the bus after walking the block chain. Each
ITC gets its own type, so every distributed trigger shows its source. The test makes each
mechanism act and counts it:
- the 8-cycle input latency;
- input delay;
- spike rejection;
- coincidence inside and outside the window;
- periodical, random and external triggers;
- external data on and off;
- triggers lost while busy;
- the throttle;
- the stop bit;
- a full 512-token queue behind a readout limit of 0;
- the trigger debug limit;
- unknown addresses;
- a 100 kHz trigger rate with full 55-word event data, where no trigger may be lost.

Throughout, it checks that every trigger is read out exactly once and in order, that event
headers and lengths match the content setting, and that the statistics registers agree with the
endpoint model.

The unit tests go deeper on their own blocks. Examples:
- `tb_cts_td_fsm` checks every data word of events with random content settings against the
  snapshot;
- `tb_cts_trigger_logic` checks the 6-cycle input-to-decision latency for several delays;
- `tb_cts_random_pulser` checks the pulser rate against its threshold.

For each module, a copy with one deliberate bug was run against its testbench, and every such
copy made the test fail.
