# Dual redundancy CAN-bus controller

A CAN network that runs on a single bus goes down when that bus is shorted,
cut or swamped with noise. This controller connects one node to **two
independent CAN buses**. It has two complete CAN 2.0 channels and a small
redundancy manager that chooses which bus each message uses. In redundancy
mode the host hands over a message once. The controller sends it on channel 1
and keeps retrying it as CAN does. If channel 1 turns error passive, the
controller aborts the message there and sends the same message on channel 2.
The host takes no part. The host only sees the result:

- the message was sent (`transmission_ack` / `tx_success`), or
- it was lost on both buses (`tx_fail`, plus a latched failure flag).

Messages and status live in two byte-wide RAMs. A memory controller shares
them between the host bus and the controller's own logic.

```
 host address/data bus
        |
  +-----+------+      +-----------+   +-----------+
  | mem_cntrl  |------| memory 1  |   | memory 2  |   (msg_ram x2)
  +-----+------+      +-----------+   +-----------+
        |  (controller port)
  +-----+--------+   tx_frame / tx_req / tx_done   +-------+
  | msg_buf_ctrl |---------------------------------|  rmb  |
  +--------------+<--- rx_frame1 / rx_frame2 --+   +---+---+
                                               |       | requests, aborts
                                   +-----------+-+   +-+-----------+
                                   | can_channel |   | can_channel |
                                   | 1: BSP+BTL  |   | 2: BSP+BTL  |
                                   +------+------+   +------+------+
                                          |                 |
                                        CAN 1             CAN 2
```

All RTL is in `rtl/`, with one module or package per file. `drcc_top` is the
top. Every block has a self-checking testbench in `tb/`.

## The redundancy manager (`rmb`, `rmb_main_fsm`, `rmb_chan_monitor`)

Most of the design's behaviour lives in the main state machine. It has ten
states in two groups: the `*1` states use channel 1 and the `*2` states use
channel 2.

| state  | does | leaves to |
|--------|------|-----------|
| idle1  | waits for a request | wait1 on `chan_1_tx_request`, pulsing `chan_1_tx_start` to channel 1 |
| wait1  | waits until channel 1 has taken the message | ch1 when `chan_1_need_to_tx`=1 |
| ch1    | channel 1 is sending, with its own automatic retries | idle1 on success; abort1 when channel 1 is no longer valid |
| abort1 | drives `chan_1_abort_send` | wait2 |
| wait2  | waits for the abort to complete | idle2 when `chan_1_need_to_tx`=0 |
| idle2  | arriving from wait2, passes the same message on at once; otherwise waits for a request | wait3 |
| wait3  | waits until channel 2 has taken the message | ch2 when `chan_2_need_to_tx`=1 |
| ch2    | channel 2 is sending | idle2 on success; abort2 when channel 2 is no longer valid |
| abort2 | drives `chan_2_abort_send` | wait4 |
| wait4  | waits for the abort to complete | idle1 if channel 1 has recovered; otherwise idle2 with the failure latched |

Points a reader may not expect:

* **No return to channel 1 after a success on channel 2.** After a switch the
  controller keeps using channel 2. It comes back to channel 1 only when
  channel 2 fails and channel 1 is valid again.
* **When a channel counts as "not valid".** Each channel has an auxiliary
  monitor with three states: VALID, PASSIVE and BUS_OFF. It watches the
  channel's fault confinement. "Not valid" means the channel is error passive
  or bus off. With the CAN rule of +8 per failed transmission, a bus without
  any other node gives 16 acknowledgement errors. That brings the transmit
  error counter to 128, and the switch happens then.
* **Senses of the wait1 and wait4 conditions.** The original state diagram
  gives "need_to_tx = 0" as the condition for both staying in and leaving
  wait1. For wait4 it shows staying while `chan_2_need_to_tx`=0 and leaving
  when it is 1. An abort clears `need_to_tx`, so that reading would never
  leave wait4. This design uses the sense that the state descriptions imply,
  the same one as wait3 and wait2:
  - wait1 ends when the channel has *accepted* the message;
  - wait4 ends when the abort has *completed*.
* **Time stamps.** A free-running `TIME_W`-bit counter is latched into
  `tx_time` when a message is sent and into `switch_time` when the machine
  switches channels. Software can read the switching time from these.
* **Normal mode.** With `red_mode`=0 the state machine stays in idle1. Requests
  go to the channel picked by `chan_sel`. `tx_abort` then aborts the pending
  message on that channel. In redundancy mode the state machine owns all
  aborts, and `tx_abort` is ignored.

All result signals (`transmission_ack`, `tx_success`, `tx_fail`, `switched`,
`tx_done`) are one-clock pulses.

## CAN channels (`can_channel` = `can_btl` + `can_bsp`)

Each channel is a full CAN 2.0A/B protocol controller. It handles standard and
extended identifiers, and both data and remote frames.

### Bit timing logic (`can_btl`)

The clock is divided by `BRP` into time quanta. A bit is made of:

- 1 synchronisation quantum;
- `TSEG1` quanta (propagation plus phase 1), ending at the sample point;
- `TSEG2` quanta (phase 2).

The defaults `BRP=2, TSEG1=5, TSEG2=2, SJW=1` give **16 clocks per bit**. The
bit rate is therefore f_clk/16, e.g. 500 kbit/s from 8 MHz.

Synchronisation:

- **Hard sync.** While the bus is idle, a falling edge restarts the bit. It
  also gives a transmit point at once, so that a node with a message waiting
  starts its frame in the same bit as the node that caused the edge.
  Arbitration depends on this.
- **Resynchronisation.** At other times an edge moves the sample point by up
  to `SJW` quanta. An edge that comes late lengthens phase 1. An edge that
  comes early shortens phase 2. An edge that lies within `SJW` of the end of
  the bit starts the next bit.
- The node does not resynchronise on its own dominant bits.
- `SAM=1` takes the majority of three samples.

The outputs are the one-clock strobes `sample` (with `rx_bit`) and `tx_point`.

### Bit stream processor (`can_bsp`)

The BSP has a single parser, which follows both received frames and frames the
node sends. On each sample point it:

- removes stuff bits;
- updates the CRC-15 (polynomial 0x4599);
- advances a field state machine (see `bsp_state_t` in `can_pkg`);
- checks for bit, stuff, CRC, form and acknowledgement errors.

On each transmit point it drives the next bit. That bit is one of:

- SOF;
- a field of the latched message;
- a stuff bit;
- the CRC;
- the acknowledgement slot (driven dominant by a receiver that found no CRC
  error);
- an error flag.

**Arbitration.** A transmitter that sends recessive but reads dominant during
the arbitration field drops to receiver and pulses `arb_lost`. It tries again
after the frame.

Fault confinement follows CAN 2.0:

| event | counter change |
|---|---|
| transmitter detects an error | TEC +8 (none for an error-passive transmitter whose only error is a missing acknowledgement) |
| receiver detects an error | REC +1 |
| successful transmission | TEC −1 |
| successful reception | REC −1, or REC set to 120 if it was above 127 |

The node is error passive above 127 and bus off at a TEC of 256. TEC is
9 bits wide. A bus-off node returns after 128 × 11 recessive bits.

Behaviour around frames:

- Error-passive nodes send recessive error flags.
- An error-passive node that has just transmitted waits 8 extra bits before it
  sends again.
- After reset or `chan_reset` the node waits for 11 recessive bits (bus
  integration).
- A node with a message waiting treats a dominant third bit of the
  intermission as a start of frame.

**Not implemented:**

- Overload frames are never sent. A dominant bit during intermission is taken
  as a start of frame.
- There is no single-shot mode. A failed frame is retried until it succeeds or
  is aborted.

Acceptance filtering: a received frame is passed on when
`((id ^ acc_code) & acc_mask) == 0`. Mask bits set to 1 are compared. Frames
the node sent itself are not passed on.

Abort: `abort_req` takes effect at once if no frame of this node is on the
bus. Otherwise it takes effect when that frame ends, successfully or in error.
`need_to_tx` falls in both cases. This is how the redundancy manager knows that
an abort has completed.

## Message memory (`msg_ram`, `mem_cntrl`, `msg_buf_ctrl`)

The two RAMs are 256 × 8 each (`AW=8`). Writes are synchronous. Read data is
registered and appears one clock after the read strobe. They are organised in
16-byte slots.

Message image (13 bytes, with a 14th byte for received messages):

| byte | content |
|------|---------|
| 0    | `{IDE, RTR, 2'b00, DLC}` |
| 1..4 | `{identifier[28:0], 3'b000}`, most significant byte first. A standard identifier sits in identifier bits 28..18. |
| 5..12 | data bytes 0..7. Only the first DLC bytes are sent. |
| 13   | received messages only: channel it arrived on (1 or 2) |

* **Memory 1** holds transmit messages, in slots 0..15. The host writes a
  message into a slot, then pulses `tx_cmd` with `tx_slot` while `tx_busy` is
  low. The buffer logic reads the image (two clocks per byte). As soon as the
  redundancy manager is ready it hands the message over. `tx_busy` stays high
  until the result pulse.
* **Memory 2** holds a ring of received messages in slots 0..14.
  - `rx_count` gives the number of messages waiting.
  - `rx_rd_slot` gives the oldest one.
  - `rx_release` frees the oldest.
  - Each channel has a one-frame holding register. When both channels have a
    frame waiting, channel 1's is written first.
  - A frame that finds the ring full is dropped, and so is a frame that finds
    its holding register still occupied. Either case sets `rx_overflow` until
    the next `rx_release`.
* **Status block**: slot 15 of memory 2 (bytes 240..247). The controller
  rewrites it whenever it has nothing else to do.

  | byte | content |
  |------|---------|
  | 240 | TEC of channel 1, bits 7..0 |
  | 241 | REC of channel 1 |
  | 242 | TEC of channel 2, bits 7..0 |
  | 243 | REC of channel 2 |
  | 244 | `{tec2[8], tec1[8], bus_off2, passive2, bus_off1, passive1, tx_channel, failure_latched}` |
  | 245 | `{chan_ok[1:0], 2'b00, main state[3:0]}` (state: idle1=0 … wait4=9) |
  | 246, 247 | `switch_time`, high byte then low byte |

**`mem_cntrl`** turns requests into RAM strobes. A request named
`wrIJ`/`rdIJ` means requester I writes or reads memory J:

- requester 1 is the host;
- requester 2 is `msg_buf_ctrl`.

The outputs are the strobes `wr1, rd1, wr2, rd2` and `mem_req`, which is high
while any request is active.

- **The host always wins.** The controller is granted (`gnt2`) only when it
  wants the other memory from the one the host is using.
- **Parallel access.** The host and the controller can work in the same clock
  on different memories.
- **Read data routing.** Read data is sent back to whichever requester issued
  the read.

## Host interface of `drcc_top`

Everything is synchronous to `clk`. `rst_n` is an asynchronous reset, active
low.

* **Memory access.**
  - Write: `host_wr` with `host_mem_sel` (0 = memory 1, 1 = memory 2),
    `host_addr` and `host_wdata`.
  - Read: `host_rd` with the same select and address. Data is on `host_rdata`
    in the next clock.
* **Control.**
  - `red_mode`, `chan_sel`, `tx_cmd`/`tx_slot`, `tx_abort`.
  - `chan_reset[1:0]` restarts a channel: both error counters are cleared and
    bus integration runs again. This is how software brings a failed channel
    back.
  - `clear_failure`, `acc_code`/`acc_mask`, `rx_release`.
* **Status.** Error counters and states, the main state, both time stamps, ring
  pointers, and per-channel event strobes (`ev_tx_error`, `ev_ack_error`,
  `ev_arb_lost`, `ev_rx_error`) for observation.
* **Bus lines.**
  - `canN_tx`: 1 = recessive.
  - `canN_rx`: connect through a transceiver. In simulation, use the wired-AND
    of all nodes' `tx`.

## What was checked

| testbench | what it shows |
|---|---|
| `tb_can_btl` | nominal bit length; sample point after hard sync; late and early edges; no resync on own dominant bits; triple-sampling glitch filter |
| `tb_can_bsp` | two BSPs against an independent frame model with its own CRC and stuffing; standard, extended and remote frames; arbitration; ack errors up to error passive; abort; bus off and recovery |
| `tb_can_channel` | two channels on one bus with real bit timing; frame length in clocks; acceptance filter; 16 acknowledgement errors to error passive |
| `tb_rmb_main_fsm`, `tb_rmb_chan_monitor`, `tb_rmb` | every state transition; monitors; normal-mode routing; time stamps |
| `tb_msg_ram`, `tb_mem_cntrl`, `tb_msg_buf_ctrl` | every byte; every request pattern against a reference; transmit load; receive ring order; overflow; status block; host conflicts |
| `tb_drcc_top` | two full controllers at default parameters on two buses; see below |

`tb_drcc_top` takes the two controllers through this sequence:

1. A normal send.
2. Bus 1 cut: exactly 16 acknowledgement errors, TEC 128, abort, switch,
   delivery on channel 2.
3. The next message goes straight to channel 2.
4. Channel 1 repaired and restarted, bus 2 cut: return to channel 1.
5. Both buses cut: failure latched.
6. Normal mode on channel 2, then arbitration between the two nodes.
7. Normal mode with bus 1 cut: the host aborts after three acknowledgement
   errors (TEC 24). The message is reported lost and never arrives.
8. Sixteen messages sent without reading any: the receiver keeps the first 15
   in order and flags the overflow.

Each mechanism is counted. Received messages are compared byte for byte out of
memory 2.

The measured switching time in step 2 is **25,393 clocks ≈ 1,587 bit times**
for a 3-byte extended frame, made up of 16 failed attempts with their error
frames plus the abort.

Every testbench prints `TB_RESULT checks=N failures=M`. Run one with plain
Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl rtl/can_pkg.sv $(ls rtl/*.sv | grep -v can_pkg) tb/tb_drcc_top.sv \
          --top-module tb_drcc_top -o sim && ./obj_dir/sim +verilator+rand+reset+2
```

The design is two-state clean: every register that is read has a reset, so
random initial values do not change the results.

## Departures and own choices

* Bit timing defaults, RAM size (256 × 8), memory layout, status block,
  `TIME_W=16`, the host interface and `chan_reset` are this design's own. The
  source gives no numbers for them.
* Senses of the wait1/wait4 conditions: see the state table above.
* **TEC width and error-passive threshold.**
  - The transmit error counter is 9 bits wide, so that bus off (256) can be
    reached.
  - Error passive starts at 128 (0x80), as in CAN 2.0.
* Overload frames are not generated.
* `tx_abort` acts in normal mode only.
* The memory controller grants per clock with the host first, and keeps one
  flop per requester to route read data. Its strobes follow the request in the
  same clock.
* **Size.** The redundancy manager holds a 16-bit time counter and two 16-bit
  time stamps, so it is larger than a bare state-machine implementation.
  Narrow `TIME_W` if the time stamps are not needed.
* The bus transceiver and the host processor are outside this RTL.
