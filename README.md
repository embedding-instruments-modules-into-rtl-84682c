# IEEE1451.0 transducer interface module with a step-motor instrument

This RTL builds the FPGA half of a remote laboratory ("weblab") built on the
IEEE1451.0 smart-transducer standard. A networked computer, the **NCAP**
(Network Capable Application Processor), takes IEEE1451-HTTP requests from
remote users. It turns them into IEEE1451.0 *low-level commands* and sends
them over a plain RS-232 link to the **TIM** (Transducer Interface Module).
The TIM is one FPGA. It holds:

* a generic **IEEE1451-module**. It decodes the commands, keeps the
  Transducer Electronic Data Sheets (**TEDSs**) and runs the
  **transducer channels (TCs)**;
* one or more **instruments & modules (I&Ms)**. These are ordinary HDL blocks
  that drive the experiment's I/O. Each one hangs off a TC through a small
  bus with a handshake.

The main idea is that an instrument becomes part of the weblab just by
meeting the TC bus and a fixed set of per-channel *tasks*. Its settings live
in a TEDS that users read and write with standard commands. The instrument
built here is a controller for a **bipolar step motor** on one TC. Its
direction, step count, step mode and speed come from a manufacturer-defined
TEDS (MD-TEDS, code 0x80). A Trigger command starts the motor and
AbortTrigger stops it.

The structure follows the published description of the design (Costa, Alves,
Zenha-Rela, "Embedding Instruments & Modules into an IEEE1451-FPGA-Based
Weblab Infrastructure"). That source gives the block structure, the TC bus
signals, the command-to-task map and the MD-TEDS contents. It does not give
the insides of most blocks: those, and every encoding it leaves open, are this
design's own. The section [Own choices and limits](#own-choices-and-limits)
lists them.

```
            RS-232                          FPGA (ieee1451_tim)
  NCAP  <-----------> uart_rx / uart_tx
                            |
                     decoder_controller  ----- teds_controller (Meta, TC, MD TEDS)
                      (TC tasks)         ----- status_state    (state, status, en)
                            |
                    tc_handshake_master
                            |  TC bus (tc_bus_if): clk out in run end_ exe done access en rst error
                            v
                 step_motor_controller
                   mpp2 (TC slave, parameters)  --go/start-->  mpp1 (step sequences) --> data_out[5:0]
                        \--tdiv--> clk_generator --tick--^          (on clk_external)
```

## Command frames

The NCAP and the TIM exchange binary frames. All multi-octet numbers are
sent MSB first. The UART uses 8 data bits, no parity and 1 stop bit, at
`CLKS_PER_BIT` clocks per bit (434 = 115200 baud at 50 MHz).

| direction   | layout |
|-------------|--------|
| NCAP -> TIM | TC number (2) · class (1) · function (1) · payload length (2) · payload |
| TIM -> NCAP | success (1: 1 ok, 0 failed) · payload length (2) · payload |

TC number 0 addresses the TIM itself. `TC_ID` (default 1) addresses the
step-motor channel. The TIM handles one command at a time. Octets that arrive
while a command runs, or while its reply is being sent, are dropped, because
the NCAP waits for each reply. A UART framing error inside a frame discards
that frame.

| cmd | name | TC tasks run | payload -> reply payload |
|-----|------|--------------|--------------------------|
| 1.2 | ReadTEDSSegment  | –              | code, offset(4) -> offset(4), up to 32 TEDS octets |
| 1.3 | WriteTEDSSegment | –              | code, offset(4), octets -> – |
| 1.8 | ReadStatusEventRegister | –       | – -> 4 octets, status in the last |
| 3.1 | Read TC data set | update, rd     | offset(4) -> offset(4), data-set octets |
| 3.2 | Write TC data set| update, wr     | offset(4), octets -> – |
| 3.3 | Trigger          | update, start  | – -> –; state OPERATING |
| 3.4 | AbortTrigger     | stop           | – -> –; state IDLE |
| 4.4 | Write TC trigger state | update, start (octet ≠ 0) / stop (0) | 1 octet -> – |
| 7.1 | Reset            | init (= rst pulse, update) | – -> –; state IDLE |

TEDS codes are 0x01 for the Meta-TEDS (TC 0 only), 0x03 for the TC-TEDS and
0x80 for the MD-TEDS (the channel only). A command is rejected with
success = 0 in these cases:

* an unknown command;
* a wrong TC number or TEDS code;
* a TEDS write past the end of the image;
* a handshake timeout;
* a non-zero error code from the I&M.

The source fixes the numbers 3.x, 4.4 and 7.1 and which tasks each command
runs. The frame layout, the 1.x numbers and the TEDS codes 1 and 3 are taken
from IEEE1451.0 as this design reads it.

## TC tasks and the TC bus (the part to read first)

The decoder/controller owns a small set of *tasks* for each channel:
`init`, `update`, `start`, `stop`, `rd` and `wr`. Every task talks to the
I&M through the same bus, `tc_bus_if`:

| signal | dir (seen from TIM) | role |
|--------|-----|------|
| `clk`  | out | bus clock (the system clock) |
| `run`  | out | an operation is in progress |
| `end_` | in  | the I&M ends the operation; the TIM then drops `run` |
| `exe`  | out | execute one step operation (only while `run`) |
| `done` | in  | the step operation has finished |
| `access[3:0]` | out | 0: `out`/`in` carry data; otherwise an instruction code for the I&M |
| `out[7:0]` | out | data or instruction operand to the I&M |
| `in[7:0]`  | in  | data or reply from the I&M |
| `event_` | in | I&M event (for event sensors; the motor drives it low) |
| `en`, `rst` | out | I&M enable and initialisation (shared by all TCs of one I&M) |
| `error[3:0]` | in | I&M error code; non-zero fails the command |

(`end` and `event` are SystemVerilog keywords, hence the underscores.)

An **operation** is framed by `run` and `end_`. Inside it, any number of
**step operations** run as a 4-phase `exe`/`done` handshake:

```
clk     _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
run     ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
access  ===X  code A       X  code B    X  15 (end request)
exe     ___/‾‾‾‾‾\_________/‾‾‾‾‾\__________________________
done    _______/‾‾‾‾‾\_________/‾‾‾‾‾\______________________
end_    _____________________________________/‾‾‾‾‾\_____
```

* **Step operation.** The master raises `exe` with `access` and `out` valid.
  The I&M acts and raises `done`, with its answer on `in`. The master drops
  `exe`, then the I&M drops `done`. With an I&M that answers on the next
  clock, one step takes 5 clocks from the task's request to its completion.
* **Ending.** The master puts `access` = 15 with `exe` low, which asks for
  the end. The I&M answers with `end_` and the master drops `run`. An I&M may
  also end an operation on its own: it raises `end_` together with `done`,
  for example after its last data octet. The master then drops `run` at once.
* **Timeout.** If the I&M does not answer within `HS_TIMEOUT` clocks, the
  operation is abandoned and the command fails.

The assertions in `tc_handshake_master` check two rules: `exe` only while
`run` is high, and `access`/`out` stable while `exe` is high.

**What each task does on the bus:**

* `update` walks the channel's MD-TEDS. The TEDS is a 4-octet length followed
  by type/length/value fields and a checksum. Each value octet of fields 4 to
  14 becomes one step operation, with `access` = field number and `out` = the
  octet. Multi-octet fields therefore arrive MSB first, all with the same
  access code. One operation carries all fields and ends with an end request.
  So an I&M is configured by *whatever fields its MD-TEDS holds*. Writing the
  TEDS and then triggering is the only way to change the motor settings,
  which is how the source describes it.
* `start` is one step with access 8, then an end request. `stop` is the same
  with access 9.
* `rd` runs data steps (access 0) until the I&M ends the operation or the
  data set (`MAX_DS` = 16 octets) is full. The octets go back in the Read TC
  reply. Data reach the NCAP only this way, because only the *commanded*
  transmission mode exists.
* `wr` sends the payload octets as data steps.
* `init` pulses `rst` for 4 clocks and then runs `update`. It also runs once
  by itself after power-up. That takes the channel out of `TC_INIT` and
  raises `en`.
* **Events.** A channel built with `EVENT_SENSOR` = 1 in `decoder_controller`
  treats a rising edge of `event_` like a configuration request and runs
  `update`. It sends no reply, because no command asked for one. An I&M error
  found on the way sets status bit 2. An edge that arrives during a command
  is remembered and served after the reply. Octets that arrive while an
  event's update runs are dropped, like those during a command, so an NCAP
  talking to an event sensor must retry a command that gets no reply. The
  step-motor channel is an actuator: it keeps `EVENT_SENSOR` = 0 and drives
  `event_` low.

## TEDS images

`teds_controller` holds three 64-octet images, with combinational reads and
clocked writes. After reset the MD-TEDS is the motor's default data sheet:

| octets | field | value | meaning |
|--------|-------|-------|---------|
| 0–3   | length | 00 00 00 17 | 23 octets follow |
| 4–9   | 3: identification | 03 04 · 00 80 01 01 | family 0, class 0x80, version 1, tuple length 1 |
| 10–12 | 4: direction | 04 01 · 01 | 1 (0 = left, 1 = right) |
| 13–16 | 5: number of steps | 05 02 · FF FF | 0xFFFF = run continuously |
| 17–19 | 6: step mode | 06 01 · 00 | 0 half step, 1 normal drive, 2 wave drive |
| 20–24 | 7: time divider | 07 03 · 01 86 A0 | 100000 |
| 25–26 | checksum | FC 1D | 0x10000 − (sum of octets 0–24) |

So, for example, a direction write goes to offset 12, the step count to
15–16, the mode to 19 and the divider to 22–24. The TEDS writes do not
recompute the checksum. The Meta-TEDS and TC-TEDS start empty (length 2 plus
checksum), because their contents are not specified. Both can be written.

## The step-motor controller

* **mpp2** is the TC-bus slave on the bus clock. It stores the fields as the
  update task delivers them: direction (bit 0), number of steps (16 bits),
  mode and divider (24 bits). On *start* it checks the mode and the divider.
  A mode above 2 gives `error` = 1 and a divider of 0 gives `error` = 2. If
  the values are valid, it raises `go` and flips `start_tgl`. The toggle makes
  a second trigger restart the motor with new settings even when `go` is
  still high, for instance after a finite run has ended by itself. A data
  read returns two status octets: `{running, dir, 0000, mode}` and then
  `{00, data_out}`. The second one ends the operation.
* **clk_generator** runs on `clk_external`. The high and the low level of its
  output each last *time divider* cycles, so the motor makes
  f_step = 0.5 · f(clk_external) / divider steps per second. That is
  250 steps/s at 50 MHz with the default 100000. It gives mpp1 a one-cycle
  tick per period instead of a derived clock.
* **mpp1** runs on `clk_external` and drives
  `data_out = {EN_B, EN_A, B2, B1, A2, A1}`, meaning two H-bridge enables and
  the two ends of each coil. It walks eight half-step positions:

  | pos | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
  |-----|---|---|---|---|---|---|---|---|
  | coils | A+ | A+B+ | B+ | A−B+ | A− | A−B− | B− | A+B− |

  Half-step mode uses all eight positions. Normal drive uses the odd ones
  (two coils on) and wave drive the even ones (one coil on). Direction 1
  counts up and direction 0 counts down. At a start, the current position
  (moved to the mode's parity) is driven at once. The first step follows
  divider + 1 clocks later, the next ones every 2 · divider clocks. With a
  finite count the motor stops by itself after that many steps. With 0xFFFF
  it runs until *stop*. The lines keep their last pattern when stopped, to
  hold the motor's position, and are all low after reset.

`go`, `start_tgl` and the status lines cross between the two clocks through
two-flop synchronisers. The parameters themselves are not synchronised: they
only change before a start and are sampled at the start.

## Status and state

`status_state` keeps the channel state: `TC_INIT` → `TC_IDLE` (after init,
stop or reset) → `TC_OPERATING` (after a trigger). It also keeps an 8-bit
status register, returned by 1.8:

* bit 0: operating;
* bit 1: the last command was rejected;
* bit 2: the I&M reported an error (latched until the register is read);
* bit 3: enabled.

`en` is high whenever the state is not `TC_INIT`. A command that leaves a
finite run to end by itself keeps the state at OPERATING. Use 3.1 to see
whether the motor is still turning.

## Parameters (top `ieee1451_tim`)

| parameter | default | meaning |
|-----------|---------|---------|
| `TC_ID` | 1 | channel number of the step-motor TC |
| `CLKS_PER_BIT` | 434 | system clocks per UART bit |
| `TEDS_BYTES` | 64 | octets per TEDS image (27..256) |
| `MAX_DS` | 16 | data-set octets per Read/Write TC |
| `MAX_SEG` | 32 | TEDS octets per ReadTEDSSegment reply |
| `HS_TIMEOUT` | 65535 | clocks before a silent I&M fails a command |

The source fixes none of these sizes. The MD-TEDS contents, the six motor
lines, the 16-bit step count and the 24-bit divider are the source's values.

## Own choices and limits

Behaviour the source leaves open, chosen here:

* the UART frame format and rate;
* the frame layout;
* the access codes 8, 9 and 15 and the use of field numbers as access codes;
* the 4-phase step handshake and the end request;
* the timeout;
* the status octets, status bits and error codes;
* the motor line assignment and position table;
* the start toggle;
* the checksum rule. The printed default checksum 0xFC1D is 0x10000 minus
  the octet sum; a one's complement would give 0xFC1C.

The direction field only names its values left (0) and right (1). Here right
walks the position table upward; which way the shaft then turns depends on
how the coils are wired.

Not built:

* **Full event-sensor behaviour and the other modes.** An event only runs
  `update` (see the TC tasks above). What an event sensor then does with its data sets is
  not built. Neither are the other sampling modes or the non-commanded
  transmission modes (buffer-full, streaming). The design follows the one
  sampling behaviour and the commanded transmission that the source's
  implementation uses.
* **More than one TC.** The architecture allows several channels, each with
  its own bus, but the only instrument given needs one. More channels would
  need one `tc_handshake_master`, one set of task registers and one TC-TEDS
  and MD-TEDS pair each.
* **TC-TEDS parsing.** The TC-TEDS is stored but not parsed, because its
  fields are not specified.
* **Frame timeout.** A frame cut short waits for its missing octets until a
  UART framing error or more octets arrive.
* **NCAP software, the motor and the board I/O.** These lie outside the
  FPGA. The testbenches play the NCAP on the serial line.

## Files and simulation

`rtl/` holds one module, package or interface per file:

* `ieee1451_pkg` (codes and types) and `tc_bus_if`;
* `uart_rx`, `uart_tx`;
* `decoder_controller`, `tc_handshake_master`;
* `teds_controller`, `status_state`;
* `mpp2`, `clk_generator`, `mpp1`, `step_motor_controller`;
* the top, `ieee1451_tim`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. `tb_decoder_controller` also tests the event option. Three of them are for the
whole TIM:

* `tb_ieee1451_tim` plays the NCAP at 8 clocks per bit. It drives every
  command and mechanism: TEDS read and write, a finite run with automatic
  stop, a continuous run, abort, Read/Write TC, an I&M error, reset, a
  rejected command and a framing error. It counts each one.
* `tb_ieee1451_tim_tc3` builds the TIM with `TC_ID` = 3. It reads TEDS 128
  (the MD-TEDS) of TC 3, checks that TC 1 is now rejected, and triggers and
  aborts the motor through TC 3.
* `tb_ieee1451_tim_full` runs the top with all defaults: 115200 baud and the
  default MD-TEDS. It checks three real motor steps, 4 ms apart at 50 MHz,
  and takes about a second of simulation time.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ieee1451_pkg.sv rtl/tc_bus_if.sv \
          tb/tb_ieee1451_tim.sv --top-module tb_ieee1451_tim -y rtl
./obj_dir/Vtb_ieee1451_tim
```

Swap in any other `tb_<name>` the same way. Verilator finds the modules in
`rtl/` through `-y rtl`.
