# TTCL receiver logic for a Pixie-Net XL style digitizer

Large nuclear-physics setups need every digitizer to share one clock, one
notion of time, and one trigger decision. The Trigger, Timing and Control Link
(TTCL) carries all three over a single fiber. A central master sends a
continuous 1 Gb/s stream. The receiver recovers the clock from it, and the
stream carries 16-bit words, one every 20 ns, grouped into frames of five
words. Frames tell every receiver when to clear its timestamp counter and
which timestamps the master has accepted as belonging to a good event.

This RTL is the digital part of such a receiver for a two-FPGA digitizer
module. Each of the two pulse-processing FPGAs ("Kintex") sits next to a small
TTCL interface board. The board carries an optical transceiver, a
deserializer chip and a small FPGA. The logic here is:

* the firmware of the interface-board FPGA (`ttcl_if_fpga`). It aligns and
  decodes frames, keeps a local timestamp counter and turns trigger-accept
  messages into a trigger flag. It produces sync and lock flags, and it holds
  control registers that the Kintex programs over SPI.
* the TTCL part of the Kintex firmware (`kintex_ttcl`). It keeps a timestamp
  counter that is cleared by the sync flag and delays local events. It opens
  an acceptance window on each trigger flag and records only the events that
  fall inside a window. It also contains the SPI master.
* a top level (`pixie_ttcl_top`) with two such board/Kintex pairs.

The main idea is **deferred, timestamp-addressed triggering**. A digitizer
never waits for a trigger signal on a cable. It captures locally and stamps
each event with the common time. The master later says "accept time T". Each
receiver turns T into a local strobe at the right moment. The local data is
delayed just enough to meet that strobe.

## How an accept becomes a recorded event

This is the part that needs care when the design is used. Every quantity
below is in word-clock cycles (20 ns).

1. A local event is captured when the Kintex counter reads `t_e`. It enters
   the input delay line (`in_delay`, 0..255 cycles). The delay works like a
   length of analog delay cable.
2. The master decides, later, to accept time `T_a`. In a synchronised system
   `T_a` is the same number as `t_e`. It sends a trigger-accept frame that
   carries `T_a`.
3. The interface FPGA adds the user `OFFSET` to the timestamp and queues the
   result. The queue holds 16 entries. When its own counter equals
   `T_a + OFFSET`, it creates a trigger strobe. The strobe passes the
   `TRIG_DELAY` line (0..255 cycles) and an output register. So the
   `trig_flag` pin is high in the one cycle in which the counter reads

       t_trig = T_a + OFFSET + TRIG_DELAY + 2

4. On the Kintex, `trig_flag` opens the acceptance window for the next
   `win_len` cycles, which are counter values `t_trig+1 .. t_trig+win_len`.
   A trigger that arrives while the window is open restarts it.
5. The delayed event reaches the validator at `t_e + in_delay`. It is
   recorded if the window is open then. The record carries the channel and
   the stamp `counter - in_delay`, which is `t_e`. The stamp therefore does not
   depend on the delay setting.

The event is recorded when

    OFFSET + TRIG_DELAY + 2  <  in_delay  <=  OFFSET + TRIG_DELAY + 2 + win_len

The accept frame must also reach the queue before the counter passes
`T_a + OFFSET`. If it does not, the entry is dropped and counted as late. From
the last word of the frame at the deserializer, the interface FPGA needs 4
cycles to queue and compare it. So `OFFSET` must cover the master's decision
time, the link latency, the 5-word frame and those 4 cycles. `TRIG_DELAY` and
`in_delay` then trade off against each other. Use `TRIG_DELAY` when the Kintex
processing is slower than the decision, and `in_delay` when it is faster.

Other rules of the trigger matcher:

* Accepts must arrive in increasing time order, because only the head of the
  queue is compared.
* A full queue drops new accepts. These are counted together with the late
  ones in `LATE_CNT`.
* An imperative sync empties the queue.
* With `require_accept` low, the Kintex records every event. This is a bypass
  for running without the master.

## Frames on the link

The five-word frame length and the 16-bit/20 ns word rate are fixed by the
link. The layout inside a frame is this implementation's own. It is defined in
`rtl/ttcl_pkg.sv` and summarised here:

| word | content |
|------|---------|
| 0 | header: `8'hBC` marker in bits 15:8, frame type in bits 7:0 |
| 1-3 | timestamp bits 47:32, 31:16, 15:0 (timestamp and trigger-accept frames); register address and data in words 1 and 2 (command frames) |
| 4 | spare |

| type | code | effect in the receiver |
|------|------|------------------------|
| idle | 0x00 | none |
| system timestamp | 0x01 | stored; readable as `SYS_TS0..2` |
| frame sync | 0x02 | frame-boundary marker for alignment; header followed by `16'hF0F0` |
| imperative sync | 0x03 | `sync_flag`; every timestamp counter clears in the same cycle |
| trigger accept | 0x04 | enqueued for matching (see above) |
| command | 0x05 | writes a control register; all receivers apply it in the same frame |

**Alignment** (`ttcl_frame_aligner`). After reset the receiver does not know
where frames start. It hunts for a frame-sync header word. The word after that
header is taken as position 1, and positions then count 0..4 freely. At each
position 0 the aligner checks the marker byte. Three misses in a row drop
alignment and start the hunt again. The lock flag to the Kintex is
`pll_locked AND aligned`. `pll_locked` is the lock output of the interface
FPGA's clock manager.

**Decoding** (`ttcl_frame_decoder`) acts on word 4 of a complete frame. Its
outputs are registered. A frame broken by a cycle without `rx_valid` is
dropped. A word with `rx_valid` low does not advance the aligner's position.

## One time base everywhere

All counters are 48 bits wide. They count word-clock cycles, which gives
65 days before they wrap. The interface FPGA clears its counter on
`sync_flag`. The Kintex clears its counter on the same flag, in the same clock
edge, so the two always hold the same value. The top-level testbench checks
this with an assertion. Receivers on links of equal latency therefore agree on
every timestamp. `tb_two_unit_timestamp_sync` shows this: 100 pulses are split to
two units, and each pulse gets the same stamp in both.

If an imperative sync arrives while an event is still inside the input delay,
that event is stamped in the new count. Its stamp is the arrival time minus
the delay, which wraps below zero.

## Registers of the interface FPGA

SPI mode 0 is used: SCLK idles low and data is sampled on the rising edge. A
transaction is 24 bits, sent MSB first while CS_N is low:
`{rw, addr[6:0], data[15:0]}`, with `rw = 1` for a read. For a read, the slave
returns the register in the last 16 bits. The slave oversamples SCLK with the
50 MHz word clock, so SCLK must stay below about clk/8. The Kintex master
runs SCLK at clk/16.

| addr | name | access | meaning |
|------|------|--------|---------|
| 0x00 | CTRL | rw | bit 0: accept trigger-accept frames; bit 1: act on imperative sync (reset value 0x0003) |
| 0x01 | OFFSET | rw | added to every accept timestamp |
| 0x02 | TRIG_DELAY | rw | bits 7:0, delay of the trigger flag |
| 0x03 | STATUS | ro | bit 0: aligned; bit 1: lock |
| 0x04 | LATE_CNT | ro | accepts dropped, late or queue full |
| 0x05 | TRIG_CNT | ro | trigger strobes created |
| 0x06-0x08 | SYS_TS0..2 | ro | last distributed system timestamp, low word first |
| 0x09 | ACC_CNT | ro | trigger-accept frames received |
| 0x0F | ID | ro | 0x7C01 |

Command frames write CTRL, OFFSET and TRIG_DELAY too. If a command frame and
an SPI write hit the same register in the same cycle, the command frame wins.
The Kintex-side settings `win_len`, `in_delay` and `require_accept` are plain
ports, because the Kintex's own register bus lies outside this logic.

## Module map

```
pixie_ttcl_top            N_UNITS = 2 board/Kintex pairs
  ttcl_if_fpga            interface-board FPGA
    ttcl_frame_aligner
    ttcl_frame_decoder
    ts_counter
    trigger_matcher       offset, pending queue, compare, late/overflow
    delay_line            TRIG_DELAY
    spi_slave_regs        SPI slave + register file + command write port
  kintex_ttcl             Kintex TTCL logic
    ts_counter
    delay_line            input delay (valid + channel)
    acceptance_window
    event_validator
    spi_master
ttcl_pkg                  frame layout, type codes, register map
```

Everything runs on one clock, the recovered word clock. The interface board
also supplies this clock for ADC sampling. Top-level ports stand in for the
parts that are not logic:
* `rx_word`/`rx_valid` come from the deserializer chip.
* `pll_locked` comes from the clock manager.
* `host_*` are register requests from the host processor.
* `evt_in_*` are local triggers from pulse processing.
* `evt_out_*` are the validated events.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/ttcl_pkg.sv tb/tb_pixie_ttcl_top.sv \
  --top-module tb_pixie_ttcl_top -Mdir obj
obj/Vtb_pixie_ttcl_top
```

Substitute any other `tb_*` name for the top-level test. The testbenches:

* `tb_pixie_ttcl_top` runs the whole design end to end at its default
  parameters. It uses a TTCL master model (`tb/ttcl_master_model.sv`) that
  produces idle, frame-sync, sync, accept, timestamp and command frames, and
  that can insert a stray word (a slip). The run covers: lock, SPI
  writes/reads, imperative sync, 24 split events of which 12 are accepted,
  trigger delay, window, input delay, a late accept, a command frame, a
  timestamp frame, and loss and recovery of lock. It counts each of these and
  fails if one never happens.
* `tb_two_unit_timestamp_sync` sends 100 pulses to both units and checks that the
  timestamp difference between the units is zero.
* The block testbenches compare against models written in the testbench. The
  timing checks include: the trigger firing exactly at the adjusted time, the
  window length, the delay taps, SCLK period and transaction length, and the
  decoder's one-cycle latency.

Verilator has two states only, so every register that is read is reset.

## Where this departs from, or goes beyond, the design description

The following are taken from the description:
* the word rate, the frame length and the frame kinds;
* offset-adjusted accept matching against the local counter, the further user
  delay, the acceptance window, the input delay, and validation of local data;
* clearing all counters on imperative sync;
* the trigger, sync and lock flags;
* SPI-programmed control registers;
* synchronous commands;
* two FPGA/board pairs per module.

The following are this implementation's own choices, and should be checked
against the real protocol before connecting to real hardware:
* the frame layout and type codes; the marker byte, sync pattern and alignment
  rules;
* a 48-bit timestamp in 20 ns units;
* the accept queue (16 entries), with late/overflow dropping and the
  in-order assumption;
* the SPI format and the register map;
* a maximum delay of 255 cycles; window restart on retrigger;
* lock defined as clock-manager lock AND frame alignment;
* the `require_accept` bypass; 16 channel numbers per Kintex;
* a single clock domain for both FPGAs.

The following are not included:
* the output data formatting compatible with Gammasphere, because the format
  is not specified;
* the Kintex pulse processing, including capturing the accelerator RF signal
  whenever a detector triggers;
* ADC and clock circuitry, the transceiver and deserializer chips, Ethernet,
  and the host processor;
* any path from the receiver back to the master. The digitizer link is
  receive-only.
