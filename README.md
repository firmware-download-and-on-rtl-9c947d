# On-board flash PROM programmer over JTAG

An FPGA board keeps its configuration in a flash PROM. Replacing that PROM by
hand for every firmware revision is slow, so this design lets the FPGA
reprogram the PROM in place through the PROM's JTAG port. A second, untouched
PROM holds a known-good image to fall back to.

The programming sequence starts off-board as an SVF file, a text list of JTAG
scans and waits. Software turns it into a compact binary command stream. A
host board sends that stream to the FPGA over a serial link (the C-Link) in
chunks. Each chunk holds only whole commands, because the FPGA cannot store
the whole stream. The FPGA runs each chunk on the PROM's four JTAG pins at
7.5 MHz. Meanwhile the host polls a status word over a second link (the
D-Link). When the chunk is finished, the host sends the next one.

This repository is the FPGA side of that system, in synthesizable
SystemVerilog. The SVF converter, the host and the PROMs are outside it.

## Block diagram

```
 C-Link words ──► clink_rx ──► chunk_fifo ──► svf_engine ──► jtag_driver ──► TCK TMS TDI
 (cl_valid,        arm/clear    1024 x 8       command          7.5 MHz       ◄── TDO
  cl_is_cmd,       on program   show-ahead     decoder,
  cl_data)         command                     tap_tracker,
                                               TDO compare
                                                  │
                                   status_reg ◄───┘ ──► status[7:0]  (read over the D-Link)
```

| module | role |
|---|---|
| `prom_prog_top` | wires the blocks below together |
| `clink_rx` | Recognises the program command and arms the programmer. While armed, it writes C-Link data words into the buffer. An error disarms it. |
| `chunk_fifo` | Byte FIFO for one chunk. The oldest byte is shown at the output (show-ahead). A write into a full FIFO is dropped and reported. |
| `svf_engine` | The command state machine. It decodes commands, routes the TAP, shifts bits, checks TDO and raises errors. |
| `tap_tracker` | A local copy of the PROM's TAP controller state. It also gives the TMS value that leads toward a wanted state. |
| `jtag_driver` | Turns each bit operation into one TCK period. It samples TDO. TCK stays low when no operation is waiting. |
| `status_reg` | The status word the host polls |
| `jtag_pkg` | TAP state and opcode enums, the TAP next-state and routing functions, status bit positions |

## The command stream

Every command starts with a byte `oooo ssss`. `oooo` is the opcode and `ssss`
is a TAP state. The SVF commands `ENDDR` and `ENDIR` are not in the stream.
Instead, each scan carries its own end state in `ssss`.

| opcode | command | bytes after the first | what happens |
|---|---|---|---|
| `0100` | SDR | length, TDI | data-register scan, TDO ignored |
| `0010` | SDRMASK1 | length, TDI, expected | data scan; every TDO bit must match |
| `0110` | SDRMASK | length, TDI, expected, mask | data scan; TDO bits under a 1 in the mask must match |
| `0011` | SIR | length, TDI | instruction-register scan |
| `0001` | SIRMASK1 | length, TDI, expected | instruction scan, all bits checked |
| `0101` | SIRMASK | length, TDI, expected, mask | instruction scan, masked check |
| `1111` | STATE | — | go to stable state `ssss` |
| `1011` | RUNTEST | count | go to `ssss`, then give `count` TCK periods there |

The length and count fields:

* **length** is `SIZE_BYTES` bytes (default 1) and holds *bits − 1*. One byte
  therefore covers scans of 1 to 256 bits, and 256 is the usual length.
* **TDI, expected and mask** fields are each ⌈bits/8⌉ bytes long. They are
  sent first byte first, and bit 0 of a byte is shifted first. The host
  software must reorder SVF's hex strings to match: in SVF, the rightmost hex
  digit is shifted first.
* **count** is `COUNT_BYTES` bytes (default 4, most significant byte first).
  It is the plain number of TCK periods. SVF waits are written for a 1 MHz
  clock, so the converter must multiply them by 7.5.
* Multi-byte length and count fields are sent most significant byte first.

`ssss` must be one of the four SVF stable states. They use the common 1149.1
encoding: `F` Test-Logic-Reset, `C` Run-Test/Idle, `3` Pause-DR, `B` Pause-IR.
Any other nibble, and any unknown opcode, is a stream error. TIR, TDR, HIR and
HDR are not supported: there is always exactly one device on the JTAG chain.

## How a command is executed

The engine never reads the PROM's TAP state. `tap_tracker` follows it instead,
by applying the 1149.1 next-state function to every TMS value that is sent.

**Routing.** Moving between states is a walk. In each TCK period the engine
sends the TMS value `tms_toward(state, target)` until the tracked state equals
the target. The routes are the usual SVF ones:

* Run-Test/Idle → Select-DR → Capture-DR → Shift-DR
* Exit1 → Update → Run-Test/Idle
* Pause-DR → Exit2-DR → Shift-DR (no Capture)

With four stable states as start and end, this gives the 16 stable-to-stable
transitions. A walk to Test-Logic-Reset is always five periods with TMS=1,
whatever the tracked state, so it also works when the copy is wrong.

**Scans.** A scan has three steps:

1. Walk to Shift-DR or Shift-IR.
2. Shift *bits* periods. TMS is 0 until the last bit, which goes out with
   TMS=1 and leaves the shift state.
3. Walk from Exit1 to the end state.

TDI bytes are taken from the buffer one at a time as they are needed. If the
buffer runs empty in the middle of a payload, the engine waits with TCK low.
It continues when the byte arrives. The host should avoid this, but it does
no harm.

**TDO check.** For the checking forms, every sampled TDO bit is stored in a
256-bit capture register (`MAX_CHECK_BITS`). The expected bytes arrive only
after the TDI bytes, so the comparison runs after the shift:

* each expected byte is XORed with the stored bits, and bits past the scan
  length are masked off;
* for `*MASK1`, any 1 left over is a mismatch;
* for `*MASK`, the XOR result is written back, and the mask bytes that follow
  are ANDed with it.

**RUNTEST** walks to its state, then gives `count` periods with TMS held so the
TAP stays there (TMS=1 in Test-Logic-Reset, 0 in the other states).

## Errors and recovery

The status word latches the first error, as two bits:

* bit 1 = 1: an error happened.
* bit 0 = 1: TDO did not match.
* bit 0 = 0: a byte was not a valid command or state, i.e. the engine lost
  track of the stream.

A stream error may be found some time after the real fault, such as a
corrupted or dropped byte. The latched error only says that the stream is bad.

On an error the engine:

1. pulses `stream_abort`, which disarms `clink_rx` so the rest of the broken
   chunk is dropped;
2. empties the buffer;
3. waits for a new command.

No reset is needed. The host sends the program command again, which clears
the error bits, flushes the buffer and restarts the engine at a command
boundary. The TAP copy is kept, because the PROM's TAP was not reset either.

## Host procedure

1. Send the program command: a C-Link command word with value `8'h50`.
2. Send a chunk of whole commands as data words. A chunk must fit in the
   1024-byte buffer.
3. Poll `status` until bit 2 (busy) is 0. Then check bits 1 and 0.
4. Repeat from step 2 until the stream ends.

The JTAG pins are driven all the time and cannot be released: the board has
pull-ups on them, and releasing them would create a false TCK edge. Between
chunks, TCK rests low and the TAP waits in its last stable state. Another JTAG
master must not take over the pins between chunks. If it resets the TAP, the
rest of the programming fails.

## Status word

| bit | meaning |
|---|---|
| 0 | error type: 1 TDO mismatch, 0 stream error |
| 1 | an error is latched |
| 2 | busy: the engine has not finished the data it holds |
| 3 | a byte was lost to a full buffer (cleared by the program command) |
| 4 | armed: C-Link data words are accepted |
| 7:5 | 0 |

The word is registered, so it lags its sources by one clock.

## Timing

* `jtag_driver` builds TCK from the system clock, with `HALF =
  ⌈CLK_HZ/(2·TCK_HZ)⌉` clocks per phase. At the defaults (30 MHz clock,
  7.5 MHz TCK) that is 2 clocks low and 2 clocks high. Rounding up keeps TCK
  at or below `TCK_HZ`. The JTAG pins are rated to 10 MHz, and a parameter
  setting that would give a faster TCK stops elaboration with an error.
* TMS and TDI change while TCK is low. TDO is sampled at the end of the high
  phase. TDO changes after the falling edge, so it is stable there.
* Operations offered back to back give a continuous TCK with no gap. That
  includes the clock the engine spends loading the next TDI byte.
* The engine reads at most one byte per clock. A 256-bit scan takes about
  1024 system clocks for the bits, plus a few periods for routing.
* A `*MASK` check takes one more clock per expected byte and per mask byte.

## Parameters

| parameter | default | where |
|---|---|---|
| `CLK_HZ` | 30 000 000 | top, driver |
| `TCK_HZ` | 7 500 000 | top, driver |
| `FIFO_DEPTH` | 1024 | top |
| `SIZE_BYTES` | 1 (1..4) | top, engine |
| `COUNT_BYTES` | 4 (1..4) | top, engine |
| `MAX_CHECK_BITS` | 256 | top, engine |

The following are this design's own choices:

* the 30 MHz system clock;
* the 1024-byte buffer;
* the one-byte length field;
* the 256-bit capture size;
* the C-Link command code and its command/data word flag;
* the byte and bit order;
* the TAP state encoding;
* status bits 2 to 4.

The opcodes, the field layout, the 7.5 MHz rate, the 32-bit RUNTEST range,
status bits 0 and 1, and the error and recovery behaviour come from the
protocol definition.

A few behaviours are also this design's choices, where the protocol says
nothing:

* A TDO mismatch stops the stream, like an unknown command does.
* The RUNTEST count is the plain number of periods, not count − 1.
* The program command restarts the engine as well as clearing the status.
* The first error is kept until the next program command; later errors do
  not overwrite it.

A checked scan longer than `MAX_CHECK_BITS` is rejected as a stream error.
That cannot happen with a one-byte length field. If you widen `SIZE_BYTES`,
also raise `MAX_CHECK_BITS`.

## Limits

* The C-Link and D-Link are not modelled. The top takes received C-Link words
  and outputs the status word on a port.
* Handing the JTAG pins over to another master is not implemented.
* `tb/prom_tap_model.sv` is a generic JTAG device: a 1149.1 TAP, an 8-bit IR,
  BYPASS, IDCODE and a 16-bit data cell that can be written and read back. It
  is not a model of any real PROM's programming algorithm. Running a real SVF
  image needs the converter software and real hardware.
* `jtag_pkg::tms_toward` reaches every target from every state, but only
  routes from stable and shift states are of the shortest SVF form.

## Simulation

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/jtag_pkg.sv rtl/clink_rx.sv rtl/chunk_fifo.sv rtl/tap_tracker.sv \
    rtl/jtag_driver.sv rtl/svf_engine.sv rtl/status_reg.sv rtl/prom_prog_top.sv \
    tb/prom_tap_model.sv tb/tb_prom_prog_top.sv --top-module tb_prom_prog_top
./obj_dir/Vtb_prom_prog_top
```

For a block testbench, list `rtl/jtag_pkg.sv`, the block's files and the
testbench; `tb_svf_engine` also needs `jtag_driver`, `tap_tracker` and
`prom_tap_model`.

| testbench | what it checks |
|---|---|
| `tb_prom_prog_top` | The full design at default parameters, with the testbench acting as the host. It sends eight chunks with polling: reset, IR capture and IDCODE checks, a data-cell write and masked readback, and RUNTEST (the exact TCK count in Run-Test/Idle is checked). It visits all stable states. It runs a 256-bit scan that is fed too slowly, so the engine starves. It then forces a TDO mismatch, an unknown opcode and a buffer overflow, each followed by recovery. It checks that TCK is never faster than 4 clocks per period, and counts every one of these mechanisms. |
| `tb_svf_engine` | All opcodes against the PROM model, the end states, the Update-DR on leaving Pause-DR, the RUNTEST count, a 256-bit BYPASS scan with a starved buffer (TCK must stop and stay low), the TCK period, both error types with draining, and restart. |
| `tb_svf_engine_wide` | The engine with two-byte length and count fields and a 512-bit capture register. It checks 300-bit checked scans (plain and masked) with their exact TCK count, a 600-bit unchecked scan, a two-byte RUNTEST, and the rejection of a checked scan longer than the capture register. |
| `tb_tap_tracker` | A random TMS walk compared with an independently written TAP, and the route length for every stable start state to every target. |
| `tb_jtag_driver` | TMS and TDI at each TCK rise, one TCK per operation, the 4-clock period, TCK low when idle, and the returned TDO. |
| `tb_chunk_fifo` | Order, level, full and empty, dropped writes, and flush against a reference queue, with depth 16. |
| `tb_clink_rx` | Arming, the clear pulse, data forwarding and disarm against a reference model. |
| `tb_status_reg` | Latching of the first error, clear, and every status bit against a reference model. |

Every testbench finishes in well under a second.
