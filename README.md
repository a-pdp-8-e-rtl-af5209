# PDP-8/E interface for the Heath H10 paper tape reader/punch

This design connects a Heath H10 paper tape reader/punch to the PDP-8/E
OMNIBUS. The H10 is a low-cost unit: it reads 8-level tape at up to 50
characters per second and punches at up to 10. The board imitates DEC's
high-speed reader/punch at the instruction level. It answers to the same
eight IOT (input/output transfer) instructions, so the stock OS/8 handler
for the DEC unit can drive the Heath unit unchanged.

The original board was built from about twenty TTL packages with no clock.
This RTL keeps that structure and behaviour. The decoding and handshake logic
is combinational. The only storage is the 8-bit punch character latch.

## What the processor sees

The PDP-8/E runs an IOT as `6DDO` (octal). MD 3-8 hold the device code DD
and MD 9-11 hold the operation bits O. The reader is device 01 and the punch
is device 02.

| IOT  | Name    | What this board does |
|------|---------|----------------------|
| 6011 | RSF     | Grounds SKIP if the Heath READER READY line is low, meaning a character is under the read head |
| 6012 | RRB     | Gates the character onto DATA 4-11, grounds C0 and C1 so the processor takes it into the AC, and pulses READER START to advance the tape |
| 6014 | RFC     | Same as 6012 |
| 6016 | RRB RFC | Same as 6012 |
| 6021 | PSF     | Grounds SKIP if the Heath PUNCH READY line is high |
| 6022 | PCF     | Clears the punch buffer and pulses PUNCH START, so a blank character (a tape feed) is punched |
| 6024 | PPC     | Latches AC 4-11 from the DATA bus during TP 3 and pulses PUNCH START |
| 6026 | PLS     | Same as 6024 |

This board does **not** reproduce the DEC unit exactly. The DEC unit has a
reader flag flip-flop and a punch flag flip-flop. This board has neither: the
Heath ready lines serve as the flags. As a result:

* 6012 both reads and advances the tape. On the DEC unit it only reads. The
  handler always follows a read with a fetch, so in practice nothing changes.
  A program that issues 6012 twice to read the same character will lose one.
* 6022 does more than clear a flag. It starts a real punch cycle with an
  all-zero buffer, which punches one blank frame. The punch is busy for one
  cycle afterwards, so PSF does not skip until that frame is done.
* Before any read, the "reader flag" is already set if a character is under
  the head. No initial 6014 is needed to load the first character.

Any other device code is ignored. The board then drives none of SKIP, C0,
C1, INTERNAL I/O, READER START or PUNCH START.

## Signal conventions

* OMNIBUS lines are active low, as on the bus. They carry an `_n` suffix:
  `io_pause_n`, `md_n`, `data_in_n`, `data_out_n`, `c0_n`, `c1_n`, `skip_n`
  and `int_io_n`. TP 3 is active high (`tp3`).
* Bus vectors use PDP-8 bit numbering, where bit 0 is the most significant
  bit. They are declared with ascending ranges: `md_n[3:11]`,
  `data_in_n[4:11]`. Verilator's ASCRANGE style warning on these is expected.
* The Heath lines keep the polarity of the Heath connector:
  * READER START and READER READY are active low.
  * PUNCH START is active low.
  * PUNCH READY is active high.
  * The 8 data lines are active high (1 = hole).
* The data vectors `read_hole[7:0]` and `punch_hole[7:0]` are indexed by the
  Heath data line number. Line 7 is READ/PUNCH HOLE 8 and maps to DATA 4.
  Line 0 is HOLE 1 and maps to DATA 11.
* The real board has open-collector bus outputs. Here they are two-state
  values where 1 means "released". Combine them with the other bus drivers
  by a bitwise AND. For the same reason the DATA bus is split into two
  ports:
  * `data_in_n` is the bus as the board sees it, that is, the resolved bus.
  * `data_out_n` is what the board pulls low.

  A system model must form `bus = cpu_drive & data_out_n & ...` and feed the
  result back into `data_in_n`. The testbenches do exactly that.

## How an IOT passes through the board

```
 I/O PAUSE, MD 3-8 --> address_decoder --601X L / 602X L--> operations_decoder <-- MD 9-11
                            |                                   |            |
                       INTERNAL I/O             6011..6016 L (reader)   6021..6026 L (punch)
                                                        |                      |
                                               tape_read_skip          tape_punch_skip <-- TP 3
                                          SKIP, READER START,     SKIP, PUNCH START,
                                          RDR DATA STROBE          PUNCH STROBE
                                                        |                      |
                              READ HOLE --> reader_buffer          punch_buffer <-- DATA 4-11
                                          DATA 4-11, C0, C1        PUNCH HOLE 1-8
```

1. **Address decoder** (`address_decoder`). While I/O PAUSE is low, it
   compares MD 3-8 with 01 and 02. The result is `sel_rdr_n` (601X) or
   `sel_pun_n` (602X). Either one grounds INTERNAL I/O, which tells the
   processor that a device on the OMNIBUS has taken the IOT. It also passes
   on a buffered I/O PAUSE for the operation bits.
2. **Operations decoder** (`operations_decoder`). It has one BCD-to-decimal
   decoder per device (`bcd_decimal_decoder`). MD 9-11, gated by I/O PAUSE,
   drive inputs C, B and A. The device select drives input D, which acts as
   an active-low enable. Outputs 1, 2, 4 and 6 become the IOT lines. Because
   the decoder is one-of-ten, 60x6 is a line of its own and is not the sum of
   60x2 and 60x4. At most one IOT line is ever active, and an assertion
   checks this.
3. **Reader section.**
   * In `tape_read_skip`, 6012, 6014 and 6016 are wired together into one
     node. That node is READER START itself, and its inverse is RDR DATA
     STROBE. 6011 and a low READER READY ground SKIP.
   * In `reader_buffer`, the strobe gates the 8 hole lines onto DATA 4-11.
     The same node grounds C0 and C1.
4. **Punch section.**
   * In `tape_punch_skip`, 6022, 6024 and 6026 form PUNCH START in the same
     way. Together with TP 3 they also form PUNCH STROBE. 6021 and a high
     PUNCH READY ground SKIP.
   * In `punch_buffer`, two quad latches are transparent while PUNCH STROBE
     is low and hold the character afterwards. Gates let DATA 4-11 into the
     latches only while 602X is active. The 6022 line resets the latches,
     and reset wins over enable.

The top module, `heath_interface`, wires these blocks together. It also ANDs
the two open-collector SKIP drivers. The shared constants and the
`iot_lines_t` struct (the four IOT lines of one device) are in `heath_pkg`.

## Timing

Every output follows its inputs combinationally, with zero delay in the RTL.
Real gate delays of a few tens of nanoseconds are not modelled. Timing
therefore comes from the processor's IOT cycle and from the Heath unit:

* **READER START and PUNCH START.** Each is low for as long as the IOT's
  decoder output is low, which is the length of I/O PAUSE. That is far longer
  than the 100 ns the reader needs and longer than the 200 ns minimum the
  punch needs. It is far shorter than the punch's 80 ms maximum.
* **Reader handshake.**
  1. READER READY rises within 200 ns of the start edge.
  2. It falls again about 16.5 ms later, when the next character is in
     place.
  3. Data on the hole lines is valid only while READER READY is low.

  A read IOT samples the character and starts the advance in the same cycle.
  The processor captures the DATA bus at TP 3, which comes before the Heath
  unit changes its data lines.
* **Punch handshake.**
  1. PUNCH READY falls within 200 ns of PUNCH START.
  2. The holes must then stay stable for at least 25 ms.
  3. PUNCH READY returns high when the punch can take the next character.

  The latch holds the character until the next punch IOT. The character is
  written at TP 3, which is a few hundred nanoseconds after PUNCH START has
  already fallen. The design therefore relies on the punch sampling its data
  lines later than that. The testbench model of the punch takes the
  character at the end of the PUNCH START pulse.
* **SKIP.** It must be grounded 50 ns before TP 3. It is combinational from
  the IOT lines and the ready line, so it settles as soon as the instruction
  is on MD.
* **Throughput.** The board adds no wait states. The transfer rate is the
  Heath unit's: one character per read cycle (16.5 ms ready-to-ready in the
  model, 50 characters per second rated) and one per 100 ms punch cycle.

## Files

| File | Contents |
|------|----------|
| `rtl/heath_pkg.sv` | Device codes, operation numbers, `iot_lines_t` |
| `rtl/bcd_decimal_decoder.sv` | One-of-ten decoder with active-low outputs (8251 function) |
| `rtl/address_decoder.sv` | Device select, INTERNAL I/O |
| `rtl/operations_decoder.sv` | IOT line decoding for reader and punch |
| `rtl/tape_read_skip.sv` | READER START, RDR DATA STROBE, reader skip |
| `rtl/tape_punch_skip.sv` | PUNCH START, PUNCH STROBE, punch skip |
| `rtl/reader_buffer.sv` | Reader data gates onto DATA 4-11, C0/C1 |
| `rtl/punch_buffer.sv` | 8-bit punch character latch |
| `rtl/heath_interface.sv` | Top level |
| `tb/h10_model.sv` | Behavioural model of the H10 handshake (simulation only) |
| `tb/tb_<block>.sv` | Self-checking testbench per block |
| `tb/tb_heath_interface.sv` | End-to-end test: reads a 24-character tape and punches 7 characters |
| `tb/tb_tape_copy.sv` | Copies a tape from reader to punch with both running at once |

The top's only parameters are the two device codes, `RDR_DEV` (default 01)
and `PUN_DEV` (default 02). Change them to put the board at another address.

## Simulating

Every file has a `timescale`. Each testbench prints one line
`TB_RESULT checks=N failures=M` and stops. Run from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/heath_pkg.sv \
    tb/tb_heath_interface.sv --top-module tb_heath_interface -Mdir obj -o sim
./obj/sim
```

Use the same command with another `tb_*.sv` file for the other testbenches.
`--timing` is needed because the processor and Heath models use delays.
Full-rate Heath timing simulates quickly because the models only wait. One
simulated second of polling takes about half a second to run.

Lint a block with, for example,
`verilator --lint-only -Wall -Irtl rtl/heath_pkg.sv rtl/heath_interface.sv`.

## What the testbenches establish

* **Per-block tests.** These cover all input combinations of each
  combinational block: every device code, every operation code, every
  character. The punch latch test runs 200 random characters, covering
  transparency, hold, gating by 602X and reset priority.
* **End-to-end test.** The processor model issues IOTs with realistic
  timing: 1.2 us per IOT, TP 3 as a 100 ns pulse. It runs the handler's
  poll-and-transfer loops. It checks:
  * every character read and punched;
  * C0, C1 and INTERNAL I/O on each IOT;
  * that foreign IOTs are ignored;
  * that the reader stops skipping when the tape runs out;
  * the Heath handshake rules: start only when ready, pulse widths (100 ns
    for the reader, 200 ns to 80 ms for the punch), and data hold;
  * that SKIP is valid 50 ns before TP 3;
  * that each character takes one Heath cycle plus at most two poll loops.

  It also counts the following and fails if any never happens:
  * each of the eight instructions;
  * skips taken and not taken;
  * foreign IOTs.

The models of the processor's IOT cycle and of the H10 are this design's own
simplifications. Only the timing figures quoted above come from the original
description.

## Departures and limits

* **Storage elements.** The punch buffer is a level-sensitive latch, as on
  the original board. It is open during TP 3 of a punch IOT. The OMNIBUS
  rules ask for output data to be taken on the leading edge of TP 3 instead.
  The result is the same because the bus is stable throughout TP 3. If you
  port this to a clocked system, replace the latch with a register loaded
  on the TP 3 edge.
* **Reset.** There is no reset input, and OMNIBUS INITIALIZE is not used.
  The punch latch has no defined value until the first 6022.
* **Interrupts.** The board never requests an interrupt. Programs must poll
  with RSF and PSF.
* **Gate-level structure.** The board's NOR/NAND gate structure and its
  wired-OR open-collector nodes are written as equations. The logic
  functions are the same. Gate delays and electrical details are not
  modelled: pull-up values, the 10-foot cable, and connector pins other than
  the bit order.
* **Not included.** The Heath unit, the PDP-8/E processor and OMNIBUS, the
  circuit board and the cable are outside this RTL. The Heath unit exists
  only as the testbench model `tb/h10_model.sv`.
