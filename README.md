# Run-time reconfiguration controller for FPGA coprocessors in a multi-DSP machine

A multiprocessor built from TMS320C40-class DSPs speeds up a qualitative
simulator by handing its most frequent operations (constraint checks of
types such as MULT, ADD, M+ and M-) to coprocessors implemented in SRAM
FPGAs. Which constraint types matter changes from one simulated model to
the next, and even within one simulation step, so a fixed set of
coprocessors sits idle much of the time. The remedy is to reload the
coprocessor FPGAs while the machine runs, using pre-compiled coprocessor
designs held in the DSPs' RAM.

The only extra hardware this takes is a small **configuration controller**.
One DSP sends it a command word and then the configuration data, 32 bits at
a time. The controller starts the selected FPGAs' configuration with their
PROGRAM lines, turns each word into a serial bit-stream with its own clock
(the FPGA's *slave-serial* configuration mode), watches the FPGAs' INIT and
DONE outputs, and answers with one status word. This repository holds
synthesizable SystemVerilog for that controller and for the subsystem it
forms with up to eight FPGAs. It also holds self-checking testbenches and a
behavioural model of an FPGA's slave-serial port.

```
            32-bit words                         program_o[0] ──► FPGA 0
 DSP ── dsp_rx (valid/ready) ──►┌────────────┐   program_o[1] ──► FPGA 1
     ◄─ dsp_tx (valid/ready) ───│ controller │   ...              ...
                                │            │── cfg_din ──► all FPGAs
                                │            │── cfg_cclk ─► all FPGAs
                                │            │◄─ INIT line (any failure)
                                └────────────┘◄─ DONE line (all done)
```

## The word protocol

Every transfer on the two channels is one 32-bit word. Each direction has a
valid/ready handshake: a word moves on a rising clock edge where both are
high. One reconfiguration is always exactly this exchange:

1. DSP → controller: **command word**
   * `[31:24]` select, one bit per FPGA (bit *i* = `program_o[i]`). Several
     bits may be set: all of those FPGAs receive the same design at once.
   * `[23:0]` size of the configuration data, in 32-bit words.
2. DSP → controller: `size` **data words**. Each word is sent MSB first.
3. Controller → DSP: **status word**
   * `[31]` 1 = success: the DONE line came and INIT never did.
   * `[23:0]` the number of data words completely shifted out to the FPGAs.
   * `[30:24]` zero.

With `N_DEV` other than 8 the select field is `[31 -: N_DEV]` and the size
and count fields are the `32 - N_DEV` bits below it.

The DSP always sends all `size` data words, even after a failure. The
controller then accepts and discards the rest, so the DSP software never
stalls on a dead channel. The count in the status word tells how far the
stream got, which helps when debugging a bad bit-stream.

## One load, step by step

`config_controller` works through these states (`cfg_pkg::ctrl_state_t`):

| state     | what happens | leaves when |
|-----------|--------------|-------------|
| `IDLE`    | `rx_ready` high, waiting for a command word | a word arrives |
| `PROG`    | `program_o` = select field | after `PROG_CYCLES` |
| `CLEAR`   | PROGRAM released; the FPGAs clear their configuration memory | after `CLEAR_CYCLES` |
| `LOAD`    | data words go through the serializer | all `size` words taken |
| `FLUSH`   | the last word is still being shifted out | last bit done |
| `STARTUP` | `cfg_cclk` keeps running with `cfg_din` high | DONE, INIT, or `STARTUP_CLKS` clocks |
| `STATUS`  | status word offered, held unchanged | `tx_ready` |

The INIT line is watched from `LOAD` to `STARTUP`. When it rises, the
stream is cancelled in the same cycle and the controller goes to `STATUS`
once the DSP has delivered its remaining words. If DONE has not come after
`STARTUP_CLKS` free-running clocks, the load is reported as failed.

### Serial timing

`cfg_serializer` holds one word in a holding register while the word before
it leaves the shift register. Each bit lasts `CLK_DIV` system clocks.
`cfg_cclk` is low for the first half of the bit and high for the second, and
`cfg_din` changes only while `cfg_cclk` is low. The FPGA samples on the
rising edge, half a bit after the data changed. Both outputs come straight
from flip-flops.

As long as the DSP refills the holding register within 32 bit times, the
stream runs without gaps at one bit per `CLK_DIV` cycles. A data phase of
`size` words then takes exactly `size × 32 × CLK_DIV` cycles. If the DSP is
slower, `cfg_cclk` simply stops low until the next word arrives; slave-serial
loading allows a stalled clock.

With the defaults (`CLK_DIV = 8` and a 40 MHz system clock) the
configuration clock is 5 MHz. A complete XC4013 configuration is 247,960
bits, sent as 7,749 words. Loading it takes 1,987,862 cycles, or 49.70 ms,
from the command word to the status word. 49.59 ms of that is the serial
transfer itself. For comparison, an overall reconfiguration time of 51 ms
has been measured on hardware of this kind, including the DSP's software
and communication. The clock rate therefore sets the reconfiguration time,
and a faster configuration clock is the lever for shorter times.

## Shared lines: DIN, CLK, INIT and DONE

Every FPGA has its own PROGRAM line. `cfg_din` and `cfg_cclk` go to all of
them, because only FPGAs that have just seen PROGRAM listen to the clock.
The INIT and DONE pins of all FPGAs are each joined into one wired line.
In `qsim_reconfig_top` the two lines are formed as follows:

* **INIT** = OR of `init_i`. Any FPGA that detects a transmission error
  fails the load.
* **DONE** = AND of `done_i`. The DONE pins are open-drain. An FPGA pulls
  the line low from PROGRAM until its configuration has finished, so the
  wire carries the OR of the "still loading" states. Read as "done", that
  is the AND. A plain OR of "done" would not work: any FPGA that was
  configured earlier would report success at once.

Two consequences follow from sharing the lines:

* An FPGA that failed keeps INIT active until it is programmed again. Every
  load fails until that FPGA has been reloaded. Reload the failed device
  first, alone or together with others.
* Positions with no FPGA must read as idle: tie `init_i` low and `done_i`
  high, as the pull-ups would leave an open-drain line.

INIT and DONE are asynchronous to the controller clock. Each passes a
two-flop synchroniser inside the controller, which adds two cycles of
latency to every reaction.

## Modules

| file | contents |
|------|----------|
| `rtl/cfg_pkg.sv` | word width, word type, controller state enum |
| `rtl/cfg_serializer.sv` | word → bit-stream converter with the configuration clock |
| `rtl/config_controller.sv` | command decoding, sequencing, failure handling, status word; instantiates the serializer |
| `rtl/qsim_reconfig_top.sv` | the subsystem: controller plus the combined INIT/DONE lines of `N_DEV` FPGAs |

Parameters (the same on the controller and the top):

| parameter | default | meaning |
|-----------|---------|---------|
| `N_DEV` | 8 | PROGRAM lines, and select-field width |
| `CLK_DIV` | 8 | system clocks per configuration bit (even, ≥ 2) |
| `PROG_CYCLES` | 16 | length of the PROGRAM pulse |
| `CLEAR_CYCLES` | 4096 | wait after PROGRAM before the first bit (≈100 µs at 40 MHz) |
| `STARTUP_CLKS` | 64 | clocks allowed after the data for DONE to appear |

The controller also carries two assertions: the status word stays stable
while the DSP withholds `tx_ready`, and PROGRAM is only driven for selected
devices. All registers reset asynchronously on `rst_n` low.

## What is specified and what is chosen here

These parts are fixed by the architecture being implemented:

* the 32-bit channel words;
* the three word kinds and what the command and status words contain;
* one select bit and one PROGRAM line per device, eight of them;
* slave-serial loading over shared DIN and CLK;
* the wired INIT and DONE lines;
* the 5 MHz configuration clock.

These are this implementation's own decisions:

* the bit positions of the fields, and the size counted in words;
* valid/ready handshakes on the channels. The DSP's communication-port
  signalling is not modelled, and a bridge to a real DSP port is needed.
* active-high "activated" levels on all ports. Pad polarity, such as an
  active-low PROGRAM, belongs to the board.
* the 40 MHz system clock behind `CLK_DIV = 8`;
* the PROGRAM pulse length, the clear wait and the start-up timeout. Set
  them to the FPGA data sheet's values for a real device.
* MSB-first bit order;
* what happens after a failure: cancel the stream, discard the remaining
  words, report the count;
* reading the wired DONE line as "all done".

These are not part of this RTL:

* the DSPs and their software;
* the coprocessors' constraint-check logic;
* the channels between the leaf DSPs and their coprocessors;
* the FPGAs themselves, which `tb/xc4013_slave_model.sv` stands in for.

In the four-DSP machine this subsystem was built for, the root DSP drives
the controller's channels. Three coprocessors, one behind each of three
leaf DSPs, hang on PROGRAM lines 0 to 2.

## Testbenches

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M`,
and it has a watchdog that ends a hung run.

| testbench | what it covers |
|-----------|----------------|
| `tb_cfg_serializer` | bit order and values on every CLK edge; exactly `CLK_DIV` cycles per bit back to back; CLK high time; gaps; free-running clock; cancel |
| `tb_config_controller` | eight FPGA models: status words, stream checksums, PROGRAM length and selection, bit rate, three devices at once, INIT failure with discard and word count, DONE timeout, slow status read |
| `tb_qsim_reconfig_top` | a whole session on the three-coprocessor machine, counting each mechanism: PROGRAM, success, INIT failure, discarded words, timeout, simultaneous load, clock waiting for a slow DSP, start-up clocks, status held back |
| `tb_qsim_full_size` | default parameters, one full 247,960-bit load, with checks on status, checksum and time |

`tb/xc4013_slave_model.sv` is a behavioural model of one FPGA's
configuration port, for simulation only. It has extra test inputs for
length, start-up clocks and error injection, and it folds the bits it
receives into a CRC-style checksum that the testbenches recompute.

To simulate with Verilator (5.x), run this from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_qsim_reconfig_top \
  -y rtl -y tb +libext+.sv rtl/cfg_pkg.sv tb/tb_qsim_reconfig_top.sv
./obj_dir/Vtb_qsim_reconfig_top
```

Replace the top module and file to run any other testbench. The testbenches
drive stimulus on the falling clock edge and never depend on the initial
value of an unreset signal. The full-size load takes a few seconds.
