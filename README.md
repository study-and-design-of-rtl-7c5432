# QuAKE: FPGA controller for a two-board quantum key exchange

This design drives a free-space quantum key distribution (QKD) link. It is built
from two FPGA boards that share no clock:

- **Alice**, the transmitter, reads a secret key from RAM. For every bit pair it lights
  one of four polarisation lasers (H, V, +45°, −45°) for a short, precisely timed slot.
- **Bob**, the receiver, watches four single-photon detectors (SPDs). It records which
  detectors clicked in each slot and writes the records to RAM, where software
  compares bases and distils a key.

Both the BB84 and B92 protocols are supported, selected at run time.

The hard part is timing. Each board runs on its own 100 MHz oscillator, and they drift
apart by a few parts per million. So the qubit stream is cut into *frames*: Alice sends a
pulse on a separate synchronisation laser before every frame, and Bob re-aligns its slot
clock to that pulse. If Bob misses a sync pulse, it keeps its RAM aligned with Alice's key
by writing a frame of "error" records instead of stopping.

The processor system (parameter registers, DMA, network) is not part of this RTL. Its
signals are ports: a parameter record, a start level, a reset, and the bus side of each
key RAM.

## Signal chain

```
 Alice (clk_alice)                                   Bob (clk_bob)
 ---------------------------------------------      ---------------------------------------------
 key RAM (8192x32) --> mind_well --> laser_controller --lasers[3:0]--> reflex_photon_translator
      ^ port B            |  data_red <--'   |                           |
      |  (DMA refill      |                  | sync_please               v
      |   on interrupt)   |                  v                        laser_pinball --> bit_ben --> RAM
 start level --> start_key_watchman --> zeus_sync --laser_sync--> hermes_sync -^         (8192x32)
                                     (3 impulses, sync pulses)     (sync_start)            port B
 switches --> system_pointing --+                                                           |  (DMA drain
                 output_laser_mux (pointing or key lasers)                                  v   on interrupt)
```

- `alice_top` and `bob_top` hold one board each.
- `quake_top` places them side by side, next to the clock-drift counter. Alice's laser
  pins and Bob's detector pins are separate ports, so the optical channel lives outside
  the design (in the testbench it is a wire with optional sync-pulse loss).

## Slots, frames and the sync handshake

All times are in cycles of the local 100 MHz clock. The software parameters are:

- `laser_period`: cycles per slot.
- `laser_duty`: cycles the laser is lit.
- `frame_size`: slots per frame.
- `count_before_laser`: cycles from the sync request to the sync-laser pulse.
- `sync_width`: length of the sync-laser pulse.
- `delay_before_sync`: Bob's delay from seeing the sync pulse to opening the first slot.

**Alice's frame:**

1. At the start and after every `frame_size` slots, the laser controller raises `sync_please`.
2. Zeus answers three register stages plus `count_before_laser` cycles later. It raises the
   sync laser for `sync_width` cycles.
3. Exactly 50 cycles (500 ns) after the sync laser rises, Zeus pulses `sync_start`.
4. Two cycles after `sync_start`, the first qubit laser turns on.

So **the first qubit of a frame is lit 52 cycles after the sync laser rises**. After that:

- Slots follow every `laser_period` cycles, with each laser on for `laser_duty` cycles.
- At 100 % duty (duty = period) the laser stays lit across slot borders.
- In BB84, one key unit (2 bits) is consumed per slot. In B92, one unit covers two slots
  (one bit each), so `data_red` comes every second slot.
- No sync is requested after the slot that ends the key.

**Bob's side:**

1. Hermes passes the sync detector through a two-flop synchroniser.
2. It pulses `sync_start` `delay_before_sync + 1` cycles after the first clock edge that
   sees the pulse. The synchroniser cycles count toward the delay.
3. On the edge after `sync_start`, the laser pinball starts slot 1.
4. It opens the detector window (`reflex_enable`) for `laser_duty − 1` cycles.
5. It ORs all clicks seen during the slot into a 4-bit word.
6. It emits the word with `new_data` in the slot's last cycle, then starts the next slot.
7. After `frame_size` slots it goes back to waiting for a sync.

With `delay_before_sync = 50` (the ideal setting, matching Alice's fixed 500 ns), Bob's
window opens in the same cycle in which Alice's laser arrives, whatever the phase between
the two clocks. Bob's window is one cycle shorter than Alice's duty cycle. That cycle is
the margin for the unknown clock phase and for drift inside a frame.

How long a frame may be follows from the drift:

- Each oscillator is about 4 ppm away from ideal (40 ns per 10 ms). Bob only follows
  Alice, though, and two boards differ from each other by about 0.5 ppm (5 ns per 10 ms).
- A 20 ms frame, which is 200 000 slots on a 10 MHz link (period 10), therefore slips
  about 10 ns, or one clock cycle. That fits inside the reading window, so such frames
  are error-free.
- The counters are 32 bits wide, so longer frames are possible, but their slots drift
  out of the window. Around 250 000 slots the readings start to mismatch.

## Lost sync pulses: the emergency frame

After each frame, Bob's pinball waits for the next sync.

- The deadline is `count_before_laser + delay_before_sync + 3` cycles (when the sync
  would arrive on time), plus a tolerance of 5 cycles (50 ns).
- The first frame of a transmission has no deadline. Its sync may come any time after
  the start.

If the deadline passes:

1. The pinball pulses `missed_sync`.
2. It enters an emergency state that writes a word of `1111` for every slot of the frame.
   Software reads all four detectors firing as an invalid slot and drops it.
3. The emergency frame runs on a virtual slot clock that starts from when the sync
   *should* have come. Slots that went by during the 5-cycle wait are emitted at once,
   then one per `laser_period`.

As a result, the emergency frame ends where the real frame would have ended, and Bob is
ready for the following sync on time. Several consecutive losses are handled the same way.
Bob's RAM therefore always holds exactly one record per transmitted slot, and a lost sync
costs one frame of key, not the whole key.

## Starting a transmission

Software starts Alice by raising a start level. The start key watchman turns its rising
edge into a 2-cycle `start_key` pulse. A level already high when reset ends is ignored.
There are two start modes, selected by `start_type` on both boards:

- **Laser start.**
  - Zeus fires three impulses on the sync laser (`start_duty` cycles on, `start_period`
    apart) before the first sync pulse.
  - Hermes counts three rising edges and issues Bob's own start key through its start key
    manager. It gives up if the next impulse does not arrive within `2 × start_period`.
- **External start.** Software on each side raises its start level after agreeing over
  the network. On Bob, a rising `external_start` starts the receiver and is acknowledged
  with `start_red`.

## Key storage: two ring buffers and their interrupts

Each board has a true dual-port RAM of 8192 × 32-bit words:

- Port A belongs to the fabric.
- Port B is the processor's bus side (byte addresses, one-cycle read latency,
  read-before-write).

A key longer than the RAM streams through it as a ring of two halves of 4096 words.

**Alice's Mind Well** prefetches the next word, so a key unit is always ready when the
laser controller asks.

- Units are taken least-significant pair first. Bit 0 of a unit is the key bit, bit 1
  the basis.
- When the reader moves from the last word of a half into the next half, it raises
  `interrupt_out` for `interrupt_time` cycles. The pulse is long, so software can read it
  as a level.
- The DMA then refills the half just finished.
- If port B is still writing in that cycle, the refill is too slow. Mind Well then stops,
  latches `tangled_alarm`, and refuses new starts until reset. The laser controller treats
  the alarm like the end of the key.
- `empty` rises after `data_depth` units.

**Bob's Bit Ben** packs slot records into 32-bit words:

- BB84: eight 4-bit records per word, least-significant first.
- B92: sixteen 2-bit records, taking detectors +45 (bit 1) and H (bit 0).

Each word is written with a single-cycle RAM enable; the write enable is tied high. After
the last word of each half, it raises an interrupt of `interrupt_time` cycles so that the
DMA drains that half. `full` rises after `4 × data_depth` bits, and a partial last word is
zero-padded.

`data_depth` counts Alice's 2-bit units; Bob stores 4 bits per unit in both protocols.
So the same `data_depth` must be written to both boards.

## Qubit encoding

| channel | laser / detector | BB84 {basis, bit} | B92 bit |
|---|---|---|---|
| 0 | H   | {0,0} | 0 |
| 1 | V   | {0,1} | – |
| 2 | +45 | {1,0} | 1 |
| 3 | −45 | {1,1} | – |

Bob stores the raw detector pattern of each slot:

- No click: `0000`.
- One click: one-hot.
- Several clicks or a dark count: several ones.
- Missed sync: `1111`.

Sifting is left to software.

## Catching photons: the reflex photon translator

A detector click is asynchronous to Bob's clock and may be shorter than a clock period.

- Each channel has a flip-flop that the gated click (`spd & reflex_enable`) sets
  asynchronously.
- The flip-flop clears on the second rising edge after it was set, or, for a click still
  high then, on the first edge after the click ends.
- Every accepted click is therefore held for at least one full period before the pinball
  samples it.
- Clicks outside the reading window (dark counts) never set it.

## Alignment, reset and drift measurement

- **System pointing.** With the pointing switch on, `output_laser_mux` gives the laser
  pins to `system_pointing`. The switch-selected lasers then blink at the programmed
  period and duty, and the sync laser follows its own switch, for aiming the optics.
- **Reset handler.** The software reset and a synchronised, debounced push button are
  ORed together. The result clears a two-stage chain asynchronously, so reset is asserted
  at once and released synchronously. The debounce time is 1 ms (`DEBOUNCE_CYCLES`).
- **Clock drift counter.** Two switches select a count of 10⁶, 10⁸ or 10⁹ cycles
  (10 ms, 1 s, 10 s). Single-cycle `go` and `stop` pulses mark its ends. Comparing the
  go-to-stop time of two boards on an oscilloscope gives their relative drift, which sets
  the maximum frame size.

## Parameters

**Run-time parameters** (`alice_params_t` / `bob_params_t` in `quake_pkg`, 32 bits each,
in clock cycles):

- `laser_duty`, `laser_period`
- `start_duty`, `start_period`
- `count_before_laser`, `sync_width`
- `frame_size`
- `data_depth` (2-bit units)
- `interrupt_time`
- `protocol` (`PROTO_BB84` / `PROTO_B92`)
- `start_type` (`START_LASER` / `START_EXTERNAL`)
- Bob only: `delay_before_sync`

**Build-time parameters:**

| parameter | default | meaning |
|---|---|---|
| `BRAM_DEPTH`, `DATA_WIDTH` | 8192, 32 | key RAM size |
| `SYNC_DELAY_CYCLES` | 50 | Alice: sync laser to first slot (500 ns) |
| `SYNC_EXTRA_CYCLES` | 5 | Bob: tolerance before a sync counts as lost (50 ns) |
| `SYNC_LATENCY` | 3 | Bob: fixed cycles between request and sync beyond the two delays |
| `DEBOUNCE_CYCLES` | 100 000 | push-button debounce (1 ms) |
| `COUNT_SHORT/MEDIUM/LONG` | 10⁶ / 10⁸ / 10⁹ | drift counter lengths |

## Files

All modules are in `rtl/`, one per file:

- `quake_pkg`
- `quake_top`, `alice_top`, `bob_top`
- `laser_controller`, `zeus_sync`, `mind_well`, `start_key_watchman`
- `reset_handler`, `system_pointing`, `output_laser_mux`, `block_ram`
- `reflex_photon_translator`, `laser_pinball`, `hermes_sync`, `bit_ben`
- `clock_drift_counter`

Each file opens with a description of its behaviour and timing.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- checks cycle counts wherever a rate or latency is defined (slot period, 52-cycle sync
  offset, interrupt length, start-key length, counter length).

`tb_quake_top` runs the whole link at the default sizes (8192-word RAMs):

- Bob's clock is 4 ppm slow and phase-shifted.
- A behavioural DMA fills, refills and drains the RAMs on interrupts.
- It covers a BB84 laser-start run with a dropped sync pulse and a B92 external-start run
  at 100 % duty with another dropped sync.
- It runs the longest safe frames: two frames of 200 000 slots at 10 MHz, with Bob's
  clock 0.5 ppm slow. It also runs the slowest qubit rate, 10 kHz slots at 20 % duty,
  and the shortest pulse, 2 of 10 cycles at 10 MHz (a 1-cycle receiver window), with
  frames of only 10 slots.
- It also covers a deliberately late refill that must raise the tangled alarm, and
  pointing mode.
- Every received word is compared with the key. The bench fails if any of these
  mechanisms never happened.

It runs in about 20 seconds. To simulate with plain Verilator:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_quake_top \
          -y rtl -y tb +libext+.sv rtl/quake_pkg.sv tb/tb_quake_top.sv
./obj_dir/Vtb_quake_top +verilator+rand+reset+2
```

Use the same command with another `tb_<module>` for a single block. The unit testbenches
shrink the RAMs and counters through parameters.

## Where this design departs from the original description

- **Minimum slot of 2 cycles.** `laser_period` below 2 is treated as 2, so the link runs
  up to 50 MHz. The original system also allowed a 100 MHz mode with one slot per clock
  and no duty control; it is not built here.
- **Prefetching reader.** Mind Well keeps the current word in a register and the RAM
  address on the next word. It is never caught waiting on RAM latency.
- **Synchronised sync detector.** Hermes passes the sync detector through two flip-flops
  before edge detection. Its latency is counted inside `delay_before_sync`.
- **Emergency frame timing.** It is implemented as a virtual slot clock: see the section
  on lost sync pulses.
- **First-frame deadline.** The sync deadline is not applied to the first frame, because
  the first sync follows the start by an unknown time.
- **`interrupt_time`** is taken to be the length of the interrupt pulse in cycles.
- **Bob's tangled alarm.** Bob has none; it was left as future work originally.
- **End of key.** No sync pulse is sent after the final slot of the key.
- **Unrecorded choices.** Other choices were not recorded in the original description:
  - the channel numbering;
  - the B92 use of channels 0 and 2;
  - the 1 ms debounce;
  - the start-decoding timeout;
  - port B winning a same-address RAM collision.
