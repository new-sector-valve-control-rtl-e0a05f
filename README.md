# Sector Valve Control Unit (SVCU) gateware

A sector valve isolates one vacuum sector of a particle accelerator from the next. Each valve
has its own control card, the SVCU, in a crate of up to eight such cards. The crate's
communication card (the MUX) links the cards to the vacuum PLC. The SVCU card:

* reads the valve's open and closed end switches and ten interlock inputs;
* takes open/close commands from the PLC (remote control) or from its own front-panel buttons
  (local control);
* drives the valve's Open and Close lines;
* drives a beam-dump request and interlock lines to the two neighbouring valves;
* shows its state on front-panel LEDs.

This SystemVerilog is the card's FPGA logic. It redesigns a card whose logic was purely
combinational and unclocked. Here everything runs on one 1 MHz clock. The card can talk to the
MUX over the legacy parallel backplane bus or over a new 16-bit SPI link, and a DIP switch picks
which one.

The block structure, the 1 MHz clock, the two buses, the SPI frame size and speed limit, and the
card's inputs and outputs come from the published description of the card. That description
gives names, pin lists and a few signal meanings, but not the internal rules. The bit layouts,
the protocol details and the protection logic are this design's own choices. They are marked as
such below and in each file's header comment. Read the RTL as a working, tested model of how such
a card can behave, not as a copy of the production logic.

## Block structure

```
 osc_clk ──► clock_module ──► clk, rst (1 MHz, reset released synchronously)

 board inputs ──► sync_bits (2 flops) ──► interlocks, switches, buttons, DIP switches
                                              │
 backplane ◄──► hardware_interface ◄──► parallel_communication ──┐ open/close/remote
                 (spi_en selects)   ◄──► spi_communication ──────┤ requests (ORed)
                                          ├ spi_slave            │
                                          └ user_logic_control   ▼
                      remote_local_switching ──remt──► valve_actuation ──► Open, Close,
                                                            │              beam dump,
                                                            ▼              VVS-1/VVS+1
                                                        status_led ──► LEDs
```

| module | role |
|---|---|
| `svcu_pkg` | shared types: machine select, command byte, status byte, interlock masks, status packing |
| `svcu_top` | wires the blocks together; its ports are the FPGA pins |
| `clock_module` | passes the 1 MHz oscillator clock on; asynchronous-assert, synchronous-release reset |
| `sync_bits` | two-flop synchronisers for asynchronous board inputs |
| `hardware_interface` | routes backplane lines to the parallel or SPI logic; driver and buffer enables |
| `parallel_communication` | legacy parallel bus: 6-bit commands in, 6 status bits out, acknowledge |
| `spi_communication` | SPI unit = `spi_slave` + `user_logic_control` |
| `spi_slave` | 16-bit SPI slave, mode 0, oversampled by the system clock |
| `user_logic_control` | SPI frame contents: command decode, status frame |
| `remote_local_switching` | local/remote control mode |
| `valve_actuation` | open/close decision, interlocks, bypass, beam dump, movement timeout |
| `status_led` | front-panel LEDs |

## The SPI link at half the system clock

This is the timing-critical part of the design. The card has only a 1 MHz clock, and the link
runs at up to 500 kHz, which is half the system clock. So the slave cannot treat SCLK as a clock.
Instead it samples SCLK, MOSI and chip select on every system clock edge:

* `sclk_q1`, `mosi_q1` and `cs_q1` are the sampling flops.
* `sclk_q2` and `cs_q2` are delayed copies, used to find edges.
* A rising SCLK edge is `sclk_q1 & !sclk_q2` while chip select is low.

At 500 kHz each SCLK level lasts exactly one system clock period, so every level is sampled
exactly once. That is why SYSCLK/2 is the hard upper limit.

**Receive direction.** MOSI is sampled in the same flop stage as SCLK. When a rising edge is
detected, `mosi_q1` is the bit that was present at that edge.

**Transmit direction.** A slave that changed MISO only after detecting the *falling* edge would
be too late at 500 kHz, because the detection lags the pin by 1 to 2 system clocks. So the slave
does this instead:

* While chip select is high, the shift register is loaded continuously with `tx_data`. Bit 15 is
  therefore on MISO before the frame starts.
* On every detected *rising* edge the register shifts, and the next bit appears on MISO.
* That happens 1 to 2 system clocks after the master's sampling edge. At 500 kHz the next rising
  edge is 2 system clocks later, so the bit arrives in time.

Edge by edge at 500 kHz (T = 1 µs system clock, SCLK edges between system clock edges):

```
 SCLK rises at t0     master samples MISO bit k
 t0 + 0.5T           sclk_q1 = 1, edge detected
 t0 + 1.5T           shift register shifts; MISO shows bit k+1
 t0 + 2T             next SCLK rise: master samples bit k+1
```

The frame ends when chip select returns high. If exactly 16 bits arrived, `rx_valid` pulses two
system clocks later. Otherwise `frame_err` pulses and the word is dropped.

The design was simulated at 125, 250 and 500 kHz. A single sampling flop is enough for
metastability at this clock rate, because a full 1 µs period is available for it to settle.

## SPI frame contents

Each 16-bit frame (MSB first) carries one byte twice. A glitch that flips a bit therefore makes
the two halves differ, and the frame is rejected instead of moving the valve.

**Command byte** (MUX to card, `svcu_pkg::cmd_t`):

| bit | meaning |
|---|---|
| 7 | must be 1 (marks a real command; an idle line of all 0s is rejected) |
| 6:3 | reserved |
| 2 | go to remote control |
| 1 | close valve |
| 0 | open valve |

`0x8080` is a plain status poll.

* A valid frame gives one-cycle pulses `open_cmd`, `close_cmd` or `spi_cmd`. They appear on the
  third system clock edge after chip select is seen high.
* A rejected frame pulses `cmd_err`, which flashes the Error LED.

**Status byte** (card to MUX, `svcu_pkg::status_t`), sent in both halves of every frame:

| bit | meaning |
|---|---|
| 7 | movement error (end position not reached in time) |
| 6 | valve disconnected |
| 5 | test pin inserted |
| 4 | beam dump requested (BDR input) |
| 3 | local mode |
| 2 | all interlocks of the selected machine OK, temperature OK |
| 1 | closed end switch |
| 0 | open end switch |

## The parallel bus

On the parallel bus the card sees eight lines, `din = {Select, Write, data[5:0]}`. Both strobes
are active low.

* **Write access.** Select is low and Write falls. The six data bits are taken as a command,
  using the same bit meaning as bits 2:0 of the SPI command byte.
* **Read access.** `dout` always shows status bits 5:0. Bits 7:6 (error, disconnected) do not fit
  on the six read lines, which is one practical reason for the SPI link.
* **Back.** The acknowledge line (`back`, FeedBackSelect) goes low three clocks after Select goes
  low. It goes high again three clocks after Select is released.
* **Latency.** All bus inputs pass through two synchronising flops. A command pulse appears three
  clocks after the Write edge. Data must be stable at least as early as the Write edge.

## Sharing the backplane: the hardware interface

`hardware_interface` is purely combinational, so it adds no delay to the SPI timing.

**Parallel mode** (`spi_en` = 0):

* Seven write-data lines plus the card's Select line form `din`.
* `bp_rdata` and `bp_back` are driven only while Select is low (`bp_rdata_oe`, `bp_back_oe`).
  This lets the eight cards of a crate share the lines.
* The SPI side sees an idle bus: chip select high, clock low.

**SPI mode** (`spi_en` = 1):

* The Select line becomes the SPI chip select.
* MISO is driven only while selected.
* The parallel side sees all lines high: not selected, no write.

In both modes, `spi_buf_en` and `prl_buf_en` switch on only the line buffers of the active mode.

## Local and remote control

`remt` = 1 means local control and 0 means remote control. After reset the card is in local mode.

* Pressing the front-panel Local button puts the card in local mode.
* A go-remote request puts it in remote mode. The request must come from the interface selected
  by `spi_en`.
* A button press wins over a simultaneous request.
* Remote open/close requests are obeyed only in remote mode, and the Open/Close buttons only in
  local mode.

## Valve actuation and interlocks

`valve_actuation` holds one bit, the commanded position. The rules, in priority order:

1. **No permission, no open.** The valve may open only if:
   * every interlock used on the selected machine is OK (interlock inputs: 1 = OK);
   * the temperature interlock is OK (`ext_intlk` = 0);
   * the valve is connected (`valve_status` = 0).

   If permission is lost, the valve is closed on the next clock.
2. **Bypass.** With the test pin inserted (`test_pin_n` = 0) *and* the card in local mode,
   permission is bypassed, so an operator can move the valve for tests.
3. **Close before open.** A close request wins over a simultaneous open request.

The outputs:

* `valve_open` and `valve_close` are complementary.
* `beam_dump` = 1 unless the valve is commanded open *and* only its open switch is active.
* `vvs_m1` and `vvs_p1` (interlocks to the neighbouring valves) are 1 unless the valve is
  confirmed open.
* **Movement timeout.** If the end switch of the commanded position is not reached within
  `MOVE_TIMEOUT_CYC` clocks (default 10 s), the error bit is set. It is cleared by the next
  accepted command.

**Machine select.** The 2-bit DIP switch selects LHC, SPS or CPS. What differs between machines
is not known, so this design uses it to choose which interlock inputs count. The masks in
`svcu_pkg` are placeholders:

| code | machine | interlocks that count |
|---|---|---|
| 0 | LHC | all 10 |
| 1 | SPS | 0–7 |
| 2 | CPS | 0–5 |
| 3 | spare | all 10 |

Change the masks to the real interlock assignment before relying on them.

## Front-panel LEDs

* **Interlock LEDs:** one per interlock input, on while that interlock is OK.
* **Local LED:** on in local mode.
* **Valve LED:** on when open, off when closed, blinking at 2 Hz while the valve travels or the
  switches disagree.
* **Error LED:** on during a movement error, blinking while the valve is disconnected, and
  flashing briefly after a rejected SPI frame.

## Pins (`svcu_top`)

| group | ports |
|---|---|
| clock/reset | `osc_clk` (1 MHz), `ext_rst_n` |
| DIP switches | `spi_en`, `machine_sel[1:0]` |
| backplane in | `bp_wdata[6:0]`, `bp_select_n`, `bp_spi_sclk`, `bp_spi_mosi` |
| backplane out | `bp_rdata[7:0]` (bits 7:6 always 0), `bp_back`, `bp_spi_miso`, each with an `_oe` enable; `spi_buf_en`, `prl_buf_en` |
| front panel | `open_btn_n`, `close_btn_n`, `local_btn_n`, `test_pin_n`; `intlk_led[9:0]`, `error_led`, `local_led`, `valve_led` |
| valve side | `intlk[9:0]`, `ext_intlk`, `valve_status`, `beam_dump_req_n`, `valve_open_sw`, `valve_closed_sw`; `valve_open`, `valve_close`, `beam_dump`, `vvs_m1`, `vvs_p1` |

The buttons are assumed to be debounced on the board before they reach the FPGA. Inputs
through galvanic isolation and the drivers with output enables are board parts outside this RTL.

## What is assumed, and what is left out

Taken from the card description:

* the block split and the 1 MHz on-chip clock;
* the DIP switches for the mode and the machine;
* the pin groups, including 10 interlocks, 8 read-data lines and 3 SPI lines;
* the parallel block's inputs and outputs, with the meanings and polarities of VS, EXT, REMT,
  T_PIN and BDR;
* 6 status bits on the parallel bus;
* Write and Select as bits 6 and 7 of the parallel word;
* 16-bit SPI frames and the SYSCLK/2 speed limit;
* the local-button sampling flops of the remote/local block.

This design's own choices:

* the polarity of the strobes and of chip select, and SPI mode 0 with MSB first;
* the command and status bit layouts, and the duplicated-byte frame;
* the acknowledge rule;
* the permission, bypass, priority, beam-dump and neighbour-interlock rules;
* the per-machine interlock masks;
* the movement timeout and all LED behaviour;
* reset into local mode.

Not modelled:

* A *Page Select* signal seen on the parallel bus of the original system. Its role is not
  described.
* A *KEY* input of the original remote/local block. Its function is not described.
* Bypass and interlock signals produced by the gauge controllers upstream of the valve
  controller.
* The MUX card's microcontroller firmware, the Profibus interface, the oscillator primitive, and
  all analog board parts. The testbenches model the MUX's bus behaviour inline.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_spi_slave` | random words at 500/250/125 kHz both ways; `rx_valid` latency; 15- and 17-bit frames rejected |
| `tb_spi_communication` | command decode, corrupted frames, status frames over the pins |
| `tb_parallel_communication` | write timing (3 clocks), Back timing, status bits |
| `tb_valve_actuation` | valve model; per-machine masks, forced close, bypass, priority, timeout cycle count |
| `tb_svcu_top` | end to end with a short timeout; both buses, mode switching; counts every mechanism and fails if one never happened |
| `tb_svcu_crate` | eight cards on one shared backplane; each card answers only its own Select; no two cards ever drive a line at once |
| `tb_svcu_full` | the design at default parameters: remote, open, read back, close, then a stalled valve reaching the real 10 s timeout (about 3 s of simulation) |

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/svcu_pkg.sv tb/tb_svcu_top.sv --top-module tb_svcu_top -Mdir obj
./obj/Vtb_svcu_top
```

Replace `tb_svcu_top` with any testbench name. The testbenches do not depend on the initial
values of flip-flops; they pass with random power-up values
(`+verilator+rand+reset+2 +verilator+seed+N`).

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `MOVE_TIMEOUT_CYC` | `svcu_top`, `valve_actuation` | 10 000 000 | travel timeout in clocks (10 s at 1 MHz) |
| `BLINK_HALF_CYC` | `svcu_top`, `status_led` | 250 000 | LED toggle interval (2 Hz blink) |
| `FRAME_BITS` | `spi_slave` | 16 | SPI frame length |
| `RST_STAGES` | `clock_module` | 2 | reset release synchroniser depth |
| `NUM_INTLK`, masks | `svcu_pkg` | 10, see above | interlock count and per-machine use |

The logic is small: about 160 flip-flops in all. Synthesis reports no latches or combinational
loops.
