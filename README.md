# A backdoor in the 8051 compare instruction

The 8051 has exactly one compare instruction, `CJNE` (compare and jump if
not equal). Any password check written for it has to go through that
instruction. If the hardware of `CJNE` can be made to answer "equal" at the
right moment, every password check on the chip can be opened, with no
change to the program and no trace in it.

This repository holds synthesizable SystemVerilog for such a backdoor and
for the small system it attacks. The system is a password-protected
controller that talks to a PC over a UART. The Trojan sits beside the
serial port and the compare unit. It watches the password attempts that go
by. After a secret sequence of failed attempts it makes `CJNE` report
"equal" for exactly one comparison, so that attempt is granted whatever was
typed. At all other times the system behaves like an honest one.

## System overview

```
             SW[2:1]
                |
 board   +------v---------+  mcu_rxd  +---------+ rx byte  +------------------+
 UART -->| serial_port_  |---------->| uart_rx |--------->| password_checker |--> access_granted
 pins <--| mux           |<----------| uart_tx |<---------|  (prompt, store, |--> access_denied
         |  "10": 8051   |  mcu_txd  +---------+ tx byte  |   match by CJNE) |
 alt  <->|  else: alt    |                |               +--------+---------+
 user    +---------------+                | rx byte           op1,op2 | ^ jump
                                 +--------v-------+          +-----v---+--+
                                 | trojan_trigger |--armed-->| cjne_unit  |
                                 +----------------+          +------------+
```

| Module | Role |
|---|---|
| `ht8051_top` | Wires the system together; this is the design's top. |
| `serial_port_mux` | Gives the board UART pins to the micro-controller when `SW[2:1] = 2'b10`. Otherwise they go to another UART user, brought out as `alt_rxd`/`alt_txd`. |
| `uart_rx`, `uart_tx` | The micro-controller's serial port: 8N1 frames, one byte at a time, with `valid` playing the role of RI and `done` the role of TI. |
| `password_checker` | The protection program, written as a controller. It prints `ENTER PASSWORD`, collects an entry and compares it with the stored password, then prints `ACCESS GRANTED` or `ACCESS DENIED`. |
| `cjne_unit` | The `CJNE` compare, giving the jump and carry flags. This is where the payload sits. |
| `trojan_trigger` | The hidden sequence detector that drives `armed`. |
| `ht8051_pkg` | Character codes, mode enums and message texts. |

The 8051 core itself is not included. The design keeps the two parts of the
core that the attack uses: the serial port and the `CJNE` compare. The
program the core would run is replaced by `password_checker`, a controller
that makes every one of its comparisons through the shared `cjne_unit`,
exactly as 8051 code would have to. That makes the Trojan's behaviour easy
to see at the pins, and `cjne_unit` plus `trojan_trigger` can be moved into
a real core's ALU unchanged.

## The trigger

### Entries

`trojan_trigger` sees every byte the serial port delivers and groups the
bytes into *entries*, which are password attempts. It does this the same
way the program does, chosen by `RX_MODE`:

* `RX_FIXED` (default): an entry is exactly `PW_LEN` bytes. The program
  counts down a register (R0 on the 8051) and compares it with zero.
* `RX_UNROLLED`: also `PW_LEN` bytes, but collected the way straight-line
  code would collect them, with no compare at all while receiving.
* `RX_VARIABLE`: an entry is everything up to Enter. Enter is the line-feed
  byte `0x0A`, and it is not part of the entry.

The trigger does not store an entry. For each entry it keeps only:

* its first character;
* its length, in 4 bits, saturating;
* whether it has held nothing but `#` so far;
* whether it still spells the one-time string.

### Sequential trigger (default, `TRIGGER = TRIG_SEQUENTIAL`)

A 4-bit step counter walks through `n + 3` entries, where `n = PW_LEN`. For
`"MAGIC"` that is 8 entries:

| Step | The entry must | Example for n = 5 |
|---|---|---|
| 0 | begin with `*` | `*AGIC` |
| 1 … n | begin with `#` | `#0000` (five times) |
| n+1 | begin with `*` | `*0000` |
| n+2 | be exactly n `#` characters | `#####` |

Every entry of the sequence is a wrong password, so the system answers each
with `ACCESS DENIED`. The Trojan arms when the last entry closes. In
fixed-length mode the last entry `#####` is also a complete attempt of its
own, and it is the one that gets `ACCESS GRANTED`.

If an entry breaks the sequence, the counter starts again. It restarts at
step 1 if that entry itself began with `*`, and at step 0 otherwise. Near
misses therefore do nothing:

* one `#` entry too few;
* a last entry `####A`;
* six `#` in the last entry.

A user who types normally practically never completes the sequence.

### One-time trigger (`TRIGGER = TRIG_ONE_TIME`)

This variant needs `RX_VARIABLE`. A single entry `*`, n × `#`, `*`
(`*#####*` for n = 5) *primes* the Trojan, and that entry is itself denied.
The entry after it arms the Trojan, whatever it contains, so it is granted.
In fixed-length mode an entry can never be 7 characters long, so this
trigger cannot fire there.

### The armed window

`armed` rises one clock after the byte that closes the arming entry. It
falls with the first byte of the next entry. In between, the program runs
its password comparison for the entry just closed. So exactly one attempt
is forced open, and the Trojan is spent afterwards. While the next entry is
being received, `armed` is low, so comparisons with Enter and the R0 count
are never disturbed.

## The payload in `CJNE`

`cjne_unit` is combinational:

* `jump = (op1 != op2)`;
* `carry = (op1 < op2)`, unsigned, as on the 8051.

While `armed` is high, both outputs are forced to 0. That is the answer for
"equal", so the program falls through to the "granted" path.
`password_checker` checks the entry length with one `CJNE` and then each
character with one `CJNE`. All of these answer "equal" while the Trojan is
armed. The length of the entry and its characters therefore no longer
matter. `equal_true` gives the honest result, for observation only.

## The password program

`password_checker` loops through four phases:

1. Print the prompt.
2. Collect an entry, storing each byte in a 16-byte buffer (`BUF_DEPTH`).
3. Compare the length with `PW_LEN`, then each byte with `PASSWORD`. Any
   "not equal" means denied.
4. Pulse `granted` or `denied` for one clock, print the result, and go back
   to the prompt.

Messages end in CR LF. Bytes that arrive while a message is being printed
are ignored, and the trigger sees them anyway. A terminal should therefore
wait for the prompt, as the testbenches do.

### Timing

* Each received byte takes two clocks to handle.
* In fixed-length mode the result pulse comes `PW_LEN + 5` clocks after the
  `valid` of the last byte (10 clocks for `"MAGIC"`).
* In Enter-terminated mode it comes `PW_LEN + 4` clocks after the `valid`
  of Enter. In `RX_UNROLLED` mode it comes `PW_LEN + 4` clocks after the
  `valid` of the last byte.
* A mismatch ends the comparison early.
* At the default 5208 clocks per bit (9600 baud from 50 MHz), each
  character takes 52 080 clocks on the line. One attempt, covering the
  entry, the reply and the next prompt, is about 1.9 M clocks.

## Parameters (of `ht8051_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `CLKS_PER_BIT` | 5208 | UART bit time in clocks (9600 baud at 50 MHz) |
| `PW_LEN` | 5 | Password length n. It must be 1…12 so that n+2 fits the 4-bit step counter. |
| `PASSWORD` | `"MAGIC"` | Stored password, `8*PW_LEN` bits, first character in the top byte |
| `RX_MODE` | `RX_FIXED` | `RX_FIXED`, `RX_UNROLLED` or `RX_VARIABLE` entries |
| `TRIGGER` | `TRIG_SEQUENTIAL` | `TRIG_SEQUENTIAL` or `TRIG_ONE_TIME` |
| `BUF_DEPTH` | 16 | Entry buffer in bytes, which must be at least `PW_LEN` |

Reset is asynchronous and active low (`rst_n`) throughout.

## What follows the published attack and what is this design's own

These points follow the published description of the attack:

* the `MAGIC` password;
* the sequence `*`, n × `#`, `*`, `#####` of n+2+1 entries;
* the one-time string `*#####*`, which opens the attempt after it;
* the choice of `CJNE` as the place for the payload;
* the three ways of collecting a password: Enter-terminated, fixed length
  counted with `CJNE`, and fixed length without `CJNE`;
* the 4-bit counter of its overhead table;
* `SW[2:1] = "10"` to give the UART to the micro-controller;
* the three message texts.

These points are this design's own choices:

* **Where the trigger listens.** It watches the received byte stream
  rather than the operands of `CJNE`.
* **When `armed` rises and falls, and the restart rule.**
* **The length of the last entry.** It is taken as n `#` characters. For
  n = 5 this matches the published `#####`.
* **Flip-flops only.** The published overhead lists 15 latches; this design
  uses none.
* **The program as a controller.** The password program is a controller
  instead of 8051 code, and there is no 8051 core at all.
* **The serial port.** UART format, baud rate and clock are assumed.
* **Details of the checker.** The buffer depth, the CR LF line ends and
  ignoring input during output are this design's choices.

The published description is not consistent about the last two entries of
the sequence. One sentence has a final entry beginning with `#` and then
`####` (four hashes). The numbered rules and the printed trigger example
have `*` and then `#####`. This design follows the rules and the example.

## Simulation

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module ht8051_top_tb \
    rtl/ht8051_pkg.sv tb/ht8051_top_tb.sv
./obj_dir/Vht8051_top_tb
```

The testbenches:

| Testbench | What it checks |
|---|---|
| `cjne_unit_tb` | The flags against the 8051 definition for 2048 operand pairs, armed and not armed. |
| `serial_port_mux_tb` | Every switch setting against every line level. |
| `uart_tx_tb`, `uart_rx_tb` | Frame format, timing, frame errors and glitches. |
| `trojan_trigger_tb` | Three configurations: the sequence arms; near misses, restarts and the single-use window behave as described. |
| `password_checker_tb` | All three entry styles, the printed texts, the result latency and forced grants while armed. |
| `ht8051_top_tb` | End to end through the UART pins at 8 clocks per bit, with three configurations side by side (fixed, Enter-terminated with the one-time trigger, straight-line reception). It counts honest grants and denials, Trojan grants, armings, disarms, primings, restarts and UART hand-over, and fails if any of them never happened. |
| `ht8051_top_full_tb` | The top at its default parameters (9600 baud). It runs the prompt, a correct and a wrong password, the full 8-entry trigger (last entry granted) and the spent Trojan (denied again), about 21 M clocks. |

To change the password, override `PW_LEN` and `PASSWORD` together, for
example `.PW_LEN(6), .PASSWORD("SESAME")`. The trigger's lengths follow
`PW_LEN` automatically.
