# X.25 link-level co-processor: X.21 level 1 and HDLC/LAPB level 2 in SystemVerilog

An X.25 packet network terminal has to do a lot of fast, repetitive bit work
before a single packet reaches software:
- follow the X.21 line handshake;
- find flags in the bit stream;
- remove the zeros that were stuffed into it;
- check a 16-bit CRC on every frame;
- answer link-level commands such as SABM or DISC within a few bit times.

This RTL puts that work in hardware. It covers the two lowest layers of X.25 for a single synchronous line, at 48 kbit/s nominally and up to 64 kbit/s:

* **Level 1** is the X.21 interface. It synchronises the network bit
  clock S, filters the R and I lines, runs the DTE side of the
  ready/data handshake on C and T, and has a test loop.
* **Low level 2** is hard-wired, bit-serial hardware for the HDLC frame
  envelope. On transmit it generates flags, aborts and idles, inserts
  zeros and generates the FCS. On receive it recognises flags and
  addresses, deletes zeros, checks the FCS, counts the frame length and
  extracts the control byte.
* **High level 2** is a small microprogrammed controller. It runs the
  link procedure (LAPB) as two time-shared programs, a receive process and
  a transmit process, on a 4-bit register bus.

Level 3, the X.25 packet layer, is not part of this RTL. It connects through:
- a serial data port;
- four command and four status lines;
- an 8-bit register port with an attention output.

The information field of a frame flows straight between low level 2 and level 3. High level 2 only handles addresses, control bytes and sequence numbers. This split keeps the controller slow enough to be microcoded.

```
             S R I                               +-------------------------+
 network --> clk_sync, l1_receiver --rx bits---> | low level 2 receiver    |--info bits--> level 3
 (DCE)   <-- l1_transmitter <------tx bits------ | low level 2 transmitter |<-info bits--- level 3
             C T     (l1_testloop between)       +-----------+-------------+
                                                             | 4-bit registers
                                                 +-----------+-------------+
                                                 | high level 2            |<-register port-> level 3
                                                 | microcontroller + ROM   |<-cmd/status---->
                                                 +-------------------------+
```

## Clocking: one fast clock, the line clock as a strobe

Everything runs on one system clock, nominally 20 MHz (`clk`, with an
asynchronous active-low `rst_n`). The network bit clock S (48 kHz, at most
64 kHz) is never used as a clock.
- `clk_sync` samples it through two flip-flops and produces one-cycle pulses `s_rise` and `s_fall`.
- All bit-serial machines move only on such strobes, so every "bit clock" in the design is really a clock enable.
- At 20 MHz one bit lasts 416 system clocks at 48 kbit/s and 312 at 64 kbit/s.

The transmit chain is demand-driven:
1. Level 1 issues a strobe at the leading edge of S.
2. The strobe travels up through the pattern generator, zero inserter, FCS generator and transmit manager.
3. Each stage either consumes it or passes it on.
4. The data bit travels back down combinationally within the same clock cycle.

This is why `l3_txd` must be valid in the cycle in which `l3_tx_stb` is high.

## Level 1 (X.21)

| Block | What it does |
|---|---|
| `l1_receiver` | Believes R and I only after they have been stable for `STABLE_BITS` (16) bit times. While level 1 is enabled and I is ON it passes R to level 2, sampled at the trailing edge of S. It tells the transmitter it may send when I is ON, or when I is OFF with R = 1 ("DCE ready"). |
| `l1_transmitter` | Three states: not enabled (C OFF, T = 0), ready (C OFF, T = 1) and data (C ON, T = level 2 data). Each state is shown for at least `HOLD_BITS` (24) bit times. C and T change on the leading edge of S. |
| `l1_testloop` | When closed, feeds T back to R and C back to I, and shows C OFF, T = 0 to the network. |

Signals are active high inside the chip, so C = 1 means ON. The inversion to X.21 wire levels is left to the line drivers.

## Low level 2 transmitter

`ll2_transmitter` wraps five blocks:

* `ll2_tx_manager` carries out the commands that high level 2 writes into
  COMMAND TX 1/2:

  | COMMAND TX 1 | Action |
  |---|---|
  | `1000` | flags continuously |
  | `0000` | one frame |
  | `0001` | one frame with a 24-bit FRMR information field |
  | `x1xx` | abort (seven ones), cutting any frame in progress |
  | `xx1x` | idle (fifteen ones) |

  COMMAND TX 2 bit 3 is *frame end*: no more data after the current octet. Bit 2 is a soft reset.

  A frame is sent as:
  1. leading flag;
  2. address;
  3. control;
  4. optional FRMR field;
  5. level 3 data, in whole octets, for as long as frame end is not set;
  6. FCS (16 bits);
  7. closing flag.

  STATUS TX "ready" drops on a command and rises when the command is done.
* `ll2_tx_field_sr` holds the address, control and FRMR nibbles in one
  shift chain. The address octet is `{ADDRESS TX, 0000}`, which covers A, B
  and the multilink addresses C and D.
* `fcs_generator` divides by x^16 + x^12 + x^5 + 1 from an all-ones preset
  and then shifts out the inverted remainder, highest stage first.
* `ll2_zero_inserter` inserts a 0 after five 1s and withholds the upstream
  strobe for that bit time.
* `ll2_pattern_gen` is the flag, abort and idle generator. It sits after the
  zero inserter so its patterns are never stuffed. While it owns the line
  (`mux1`) the machines above it get no strobe.

## Low level 2 receiver

`ll2_receiver` wraps six blocks:

* `ll2_pattern_rec` shifts every bit through an 8-bit register and
  recognises:
  - the flag;
  - the abort (7 ones);
  - idle (15 ones; an idle is also reported as an abort);
  - the A, B, C and D addresses right after a flag.

  After a flag and a valid address it raises `enable` for the frame. The flags themselves never leave the 8-bit register, so later stages see only the frame contents.
* `ll2_zero_deleter` drops the 0 after five 1s by withholding its strobe.
* `fcs_checker` runs the same division over the frame including its FCS. A
  good frame leaves the residue F0B8 hex, read with stage x^15 as the
  least significant bit.
* `ll2_bit_counter` counts the frame bits (address to FCS inclusive). It
  reports < 32 (invalid), = 32 (no information field) and > N1 (too long).
* `ll2_rx_manager` drops the address and shifts the control byte into
  CONTROL RX 1/2. It raises *control valid* after the 8th control bit and
  routes the rest into the delay line.
* `delay_line` is a 16-bit delay between the receiver and level 3. Level 3
  gets a bit only when it falls out of the line, so the FCS, the last
  16 bits of the frame, never reaches level 3.

Events go to high level 2 as sticky bits in STATUS RX 1-3. The frame end event is delayed by a few clocks so that the FCS and length results are settled when it is seen.

## High level 2: the microcontroller

This is the least conventional part of the design.

### Time sharing

`hl2_microcontroller` has one datapath and two program counters, Rx and Tx.
- The active process runs until it executes `CHANGE`. The controller then continues with the other program counter.
- There is no interrupt. Each process must give up the controller often enough for the other to keep pace with the line. The Rx program therefore waits in loops that contain a `CHANGE`, and long handlers are cut into pieces with extra `CHANGE`s.
- The return stack is 4 deep and shared. This is safe because the Rx program never executes `CHANGE` inside a subroutine, so the stack is empty whenever Tx runs.

### Timing

A microcycle is `PHASES` = 5 system clocks, 250 ns at 20 MHz. All state changes happen in its last phase. Instruction costs in microcycles:

| Instruction | Microcycles |
|---|---|
| `CJUMP`, `CCALL` (taken or not) | 2, because a second word holds the target address |
| `CRET` | 2 when it returns, 1 when not |
| `CHANGE` | 2, because the word already fetched behind it is discarded |
| all others | 1 |

An instruction pipeline register holds the word being executed while the next is fetched.

### Instruction set

Words are 10 bits, with the first bit at the MSB.

| Instruction | Encoding | Meaning |
|---|---|---|
| `CJUMP` | `11 sssss mm t` + address word | jump if bit `mm` of register `sssss` equals `t` |
| `CCALL` | `10 sssss mm t` + address word | call, same condition |
| `CRET` | `01 sssss mm t` | return, same condition |
| `MOV` | `001 v w rrrrr` | `v` selects accu (1) or temp (0); `w` = 1 loads it from register `r`, `w` = 0 stores it into `r` |
| `MVI` | `0001 v dddd -` | load a 4-bit constant into accu or temp |
| `AND/OR/ADD/SUB` | `00001 oo ---` | accu = accu op temp, modulo 16, setting the carry and zero flags |
| `CHANGE` | `000001 ----` | switch process |
| `NOP` | `0000000000` | |

Mask code `mm` = 0 selects the first bit (`1000`), 3 the last (`0001`). An unconditional branch tests bit 3 of the FLAGS register, which is always 1.

### Registers

The registers sit on a 5-bit address bus. The map is in `x25_pkg`; read-only and write-only registers share addresses.

| Address | Register |
|---|---|
| 0 | FLAGS {carry, zero, attention, 1} |
| 1-3 | STATUS RX 1-3 |
| 4-5 | CONTROL RX/TX 1-2 |
| 6 | COMMAND RX (busy/reset) |
| 7 | LEVEL 1 ENABLE {enable, loop} |
| 8 | STATUS TX (ready) / COMMAND TX 1 |
| 9 | COMMAND TX 2 |
| 10 | ADDRESS TX |
| 11-15 | FRMR 1-5 on write; connection register, command address and response address on read |
| 16-24 | V(S), V(R), last acknowledged N(S), last frame sent 1/2, next frame 1/2, program status 1/2 |
| 25-28 | communication registers 1-4 with level 3 |
| 29 | retransmission counter |
| 30 | T1 timer |
| 31 | level 3 command lines / level 2 status lines |

`hl2_timers` provides:
- T1, counted in 25 ms ticks: 85 ticks is 2.125 s and 8 ticks is 200 ms;
- a 1-second flag;
- the retransmission counter, compared with N2.

### The microprogram

`rtl/hl2_microcode.hex` holds 324 words. The Rx program occupies addresses 0-206 and the Tx program 512-628.

The Rx process:
1. Initialises levels 1 and 2 and waits for level 3 to set the *enable level 2* bit in the connection register.
2. Starts sending flags.
3. While waiting for a frame, checks the *connection command* bit. When
   level 3 sets it and no call has been made yet, it queues an SABM with
   P = 1 and enters the SABM-sent state.
4. Then handles every correctly received frame:
   * **I frame in sequence** (N(S) = V(R)): it increments V(R) modulo 8,
     sets *pack valid* on the level 3 status lines and queues an RR
     response carrying N(R).
   * **I frame out of sequence:** it queues a REJ carrying the unchanged
     V(R). Level 3 sees no *pack valid*, so it drops the data it has
     received.
   * **Acknowledgements:** for an I, RR, RNR or REJ frame, it compares N(R)
     with LAST ACK. If N(R) acknowledges something new, it stores N(R) and
     writes {flag, N(R)} into communication register 2. The flag raises
     `l3_attention` until level 3 clears it. When N(R) equals V(S),
     everything sent has been acknowledged and T1 is stopped.
   * **Undefined control field** (first nibble 1101 or 1011): it queues
     a frame reject (FRMR) response.
   * **SABM:** it resets V(S), V(R) and LAST ACK, and queues UA, copying
     the P bit into F.
   * **DISC:** it queues UA.
   * **UA in the SABM-sent state:** it resets V(S), V(R) and LAST ACK,
     stops T1 and marks the link as set up. A UA in any other state is
     ignored.

   Frames with a bad FCS are discarded. The level 3 status lines are
   cleared at every frame end and describe only the last frame.

The Tx process:
- sends a queued SABM at the command address and starts T1;
- sends queued responses at the response address. For FRMR it first
  fills the FRMR registers with the 24-bit information field: the rejected
  control field, V(S), V(R), and the W bit (undefined control field);
- otherwise, when level 3 signals *pack ready* and the window allows it, sends an I frame at the command address with the current N(S) and N(R). It restarts T1 with each I frame. The window allows it while fewer than k frames are unacknowledged, that is while (V(S) - LAST ACK) mod 8 < k. k is set by level 3;
- streams the packet from level 3 until level 3 signals *tx pack end*, then closes the frame and increments V(S).

Both processes share the accumulator, the temp register, the flags and
the scratch registers PST1/2. No value in them survives a `CHANGE`, so
every piece of code between two `CHANGE`s reloads what it needs from the
named registers.

Sequence numbers are stored as plain binary values. They are bit-reversed by a small subroutine when placed in a control field, because control fields are held in transmission order.

A new microprogram is written as 10-bit words in the same hex file. Each line holds one word, `@addr` lines place the programs, and `//` comments name each word.

## Level 3 interface

| Signal | Meaning |
|---|---|
| `l3_rxd`, `l3_rx_stb` | received information bits, one strobe per bit |
| `l3_rx_frame_end` | end of a received frame |
| `l3_txd`, `l3_tx_stb` | information bits for transmission; `l3_txd` is sampled in the strobe cycle |
| `l3_command[3:0]` | {busy, tx pack end, pack ready, abort}, read by high level 2 |
| `l3_status[3:0]` | {diagnostic, pack end, pack valid, reset}, written by high level 2 |
| `l3_addr[2:0]`, `l3_we`, `l3_wdata[7:0]`, `l3_rdata[7:0]` | register port; address map below |
| `l3_attention` | high while a communication register flag is set |

Register port addresses:

| Address | Contents |
|---|---|
| 0 | communication registers 1 and 2 |
| 1 | communication registers 3 and 4; writing sets k |
| 2 | N2 and the retransmission status |
| 3 | T1 in ticks |
| 4 | {command address, response address} |
| 5 | connection register: bit 7 enables level 2, bit 6 starts a connection |
| 6, 7 | N1, low and high bits |

The addresses decide the role. A DTE sends commands with address B and responses with A; a DCE does the opposite.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `STABLE_BITS` | 16 | level 1 input filter, bit times |
| `HOLD_BITS` | 24 | minimum time a level 1 state is shown |
| `CW` | 12 | bit counter and N1 width (N1 up to 4095 bits) |
| `TICK_CYCLES` | 500 000 | system clocks per 25 ms timer tick (20 MHz) |
| `TICKS_PER_SEC` | 40 | ticks per second flag |
| `STACK_DEPTH` | 4 | return stack |
| `PHASES` | 5 | clocks per microcycle |
| `TX_START` | 512 | reset value of the Tx program counter |

At reset, N1 = 1080 bits (128 octets of data plus header, address, control and FCS), N2 = 5 and T1 = 85 ticks. Level 3 can overwrite all three.

## Where this RTL differs from the original functional design

* **Clock.** The system clock is 20 MHz, as for the main 48 kbit/s
  configuration. The design also mentions 25 MHz for a 64 kbit/s option. At
  25 MHz, change `TICK_CYCLES` to 625 000.
* **FCS.** The original text describes the FCS register as 15 bits with a
  degree-15 polynomial in one place, and as a 16-bit code elsewhere. This
  RTL uses the standard 16-bit CRC-CCITT, so frames interoperate.
* **FRMR frame FCS.** The command table asks for an 8-bit FCS on FRMR frames;
  16 bits are sent for every frame.
* **Second address nibble.** ADDRESS TX 2 is not a register; the second
  nibble of the address octet is always 0000. This holds for every X.25
  address (A, B and the multilink addresses C and D).
* **Length limit.** One passage of the original names N2 as the length
  limit of a frame. N1 is used, as in the description of the bit counter.
* **Tx program counter.** It resets to 512 rather than 0, so both programs
  share one ROM without a dispatch jump.
* **Data on DCE ready.** Data is passed to level 2 only while I is ON, as
  the prose says. A flow diagram in the original also passes it on
  "DCE ready".
* **Microprogram scope.** The microprogram is a subset of LAPB. It does
  not do:
  - retransmission after a T1 time-out, counted against N2. T1 is started for every I frame sent and stopped when all are acknowledged, but its expiry is only flagged to level 3 (bit 3 of register port address 5);
  - the busy states entered by sending or receiving RNR, beyond taking N(R);
  - the REJ-sent condition, so a REJ is sent for every out-of-sequence frame;
  - the other frame-reject causes (X, Y, Z bits) and the frame-reject condition;
  - handling of received FRMR and DM;
  - host-initiated DISC, and repeating an unanswered SABM when T1 runs out.

  The hardware for these exists: timers, retransmission counter, FRMR
  registers and the state registers. The program that would use it is
  missing.
* **Design choices of this RTL.** The register map, the instruction
  encodings, the command codes and the level 3 port layout are not specified
  in the original and are this design's own.

## Verification

Every block has a self-checking testbench in `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The checks compare against models written
independently of the RTL, for example:
- a bitwise reflected CRC-CCITT;
- a reference HDLC encoder and decoder;
- an instruction-level model of the microcontroller that also checks in which cycle each register write happens.

`tb_x25_l12_top` runs the whole chip at its default parameters, acting as both the network and level 3. The scenario:
1. idle;
2. link set-up with SABM/UA;
3. an I frame answered with RR and delivered to level 3;
4. the same I frame again, answered with REJ;
5. a frame with an undefined control field, answered with FRMR;
6. a frame with a bad FCS, which is ignored;
7. abort and idle;
8. a level 3 packet sent as an I frame;
9. with window k = 1, a second packet that must wait;
10. an RR from the network acknowledging the first frame, reported to level 3, after which the second packet goes out as N(S) = 1;
11. T1 (set to 2 ticks) running out for the unacknowledged second frame;
12. DISC/UA;
13. the connection command from level 3, which sends SABM (P = 1) to the command address; the UA from the other station stops T1, and no second SABM follows.

It counts every mechanism: flags, idles, zero insertion and deletion, good and bad FCS, abort and idle detection, process changes, calls and returns, and level 3 data in both directions. It also checks that the longest run of one process between two `CHANGE`s stays within 35 microcycles, the per-process budget at 64 kbit/s. The measured value is 32. The test takes a few seconds with Verilator.

Run one testbench from the repository root, because the ROM image is read
as `rtl/hl2_microcode.hex`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/x25_pkg.sv \
          tb/tb_x25_l12_top.sv --top-module tb_x25_l12_top
./obj_dir/Vtb_x25_l12_top
```

## Files

* `rtl/x25_pkg.sv` holds shared constants: patterns, FCS taps, register map, instruction fields.
* `rtl/x25_l12_top.sv` is the top. `level1`, `ll2_transmitter`, `ll2_receiver` and `high_level2` group the blocks described above.
* `rtl/hl2_microcode.hex` is the microprogram.
* `tb/` holds one testbench per module.
