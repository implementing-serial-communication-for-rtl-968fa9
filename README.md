# A memory-mapped UART for a small teaching processor

This design gives a simple microcontroller full-duplex serial communication.
It is a hardware UART (universal asynchronous receiver/transmitter) that the
processor reaches through four memory locations. A program sends a byte by
storing it. It receives a byte by loading it. It paces itself by polling two
flags. The receiver, the transmitter and the baud-rate divider run in
hardware and need no timing loops. So, unlike a UART written in software, the
microcontroller can receive and transmit at the same time.

The line format is standard asynchronous serial: one start bit (0), eight
data bits least significant bit first, one stop bit (1), no parity. With the
default 100 MHz clock the baud rates are nominally 38400 down to 300.

The design follows a classic MC6811-style teaching UART, adapted to a
memory-mapped bus. Its most important detail is in the transmitter (see
[The transmitter and the second stop bit](#the-transmitter-and-the-second-stop-bit)).

## Programming model

The UART takes four consecutive byte addresses starting at `UART_BASE`
(default `0xF0`):

| offset | register | access | meaning |
|---|---|---|---|
| 0 | RDR  | read  | receive data register: the last byte received |
| 1 | TDR  | write (reads back) | transmit data register: the next byte to send |
| 2 | SCSR | read  | status: bit 7 = TDRE (TDR empty), bit 6 = RDRF (RDR full), others 0 |
| 3 | SCCR | read/write | control: bits 2:0 = baud select code, others 0 |

Accessing a register has these side effects:

* **Store to TDR** ("Write TDR") loads TDR and clears TDRE.
* **Load from RDR** ("Read RDR") returns the byte and clears RDRF.
* **Store to SCCR** ("Write BAUD") sets the baud rate.

Other accesses have no side effect. Stores to RDR and SCSR are ignored.

The programs poll the flags:

```
send:    repeat load SCSR until bit 7 (TDRE) = 1;  store byte -> TDR
receive: repeat load SCSR until bit 6 (RDRF) = 1;  load RDR -> byte
```

TDRE is set again as soon as the transmitter copies TDR into its shift
register, which is long before the byte has left the pin. A program can
therefore write the next byte while the current one is still being sent, and
the line stays busy without gaps.

After reset, TDRE = 1, RDRF = 0 and SCCR = 0 (38400 baud). A program writes
the rate it needs before it uses the UART.

### Baud select codes

The rate for code `k` (SCCR bits 2:0) is nominally 38400 / 2^k. With a clock
`CLK_FREQ_HZ`, the prescaler is `PRESCALE = floor(CLK_FREQ_HZ / 614400)`
(162 at 100 MHz), and one bit lasts `PRESCALE * 2^(k+1) * 8` clocks.

| code | nominal baud | bit time at 100 MHz | actual baud |
|---|---|---|---|
| 0 | 38400 | 2592 clocks | 38580 |
| 1 | 19200 | 5184 | 19290 |
| 2 | 9600  | 10368 (103.7 us) | 9645 |
| 3 | 4800  | 20736 | 4823 |
| 4 | 2400  | 41472 | 2411 |
| 5 | 1200  | 82944 | 1206 |
| 6 | 600   | 165888 | 603 |
| 7 | 300   | 331776 | 301 |

The prescaler is rounded down on purpose, so every rate is 0.47% fast rather
than slow. Here is why that matters. Suppose a program echoes a continuous
stream that arrives at exactly the nominal rate. If the UART sent even
slightly slower than it receives, it would fall a whole character behind
after a few hundred characters, and from then on it would drop input. A
0.47% error is far inside what an 8x-oversampling receiver tolerates.

## Structure

```
uart_mmio            address decode, Read RDR / Write TDR / Write BAUD strobes, read mux
└── uart             RDR, TDR, TDRE, RDRF, SCCR; RxD synchroniser
    ├── uart_baud_gen   prescaler + 8-bit counter -> BclkX8 tick, /8 -> Bclk tick
    ├── uart_tx         TSR, bit counter, IDLE / SYNC / TDATA control
    └── uart_rx         RSR, two counters, IDLE / START_DETECTED / RECV_DATA control
uart_pkg             register offsets, flag bit positions, state types, prescaler formula
```

Everything runs on the one system clock. The divider does not produce
derived clocks. It produces single-clock enable pulses (`bclkx8_tick`,
`bclk_tick`) on the rising edges of the 8x clock BclkX8 and of the bit clock
Bclk.

### Clock divider (`uart_baud_gen`)

A counter divides the clock by `PRESCALE` and steps an 8-bit counter. Bit `k`
of the 8-bit counter is BclkX8, so each step of the code halves the rate. A
3-bit counter on BclkX8 gives Bclk (its top bit). Bclk runs freely: it is
not restarted when a byte is written. This is why the transmitter has to
synchronise to it.

### The transmitter and the second stop bit

`uart_tx` holds a 9-bit transmit shift register TSR. `TSR[0]` drives TxD, and
TSR is shifted right with ones filling in from the top. A bit counter Bct
counts the shifts. There are three states:

* **IDLE.** When TDRE = 0 (a byte is waiting), copy TDR into TSR. The
  register block sets TDRE again. Go to SYNC.
* **SYNC.** Wait for the next Bclk edge. On it, drive the start bit
  (`TSR[0] = 0`) and go to TDATA.
* **TDATA.** On each Bclk edge:
  * while Bct ≠ 9, shift and count. Shifts 1 to 8 put the data bits on the
    line and shift 9 puts the stop bit on it;
  * at Bct = 9, the end of the stop bit:
    * if TDRE = 0 (another byte is already waiting), load it, drive its start
      bit at once and clear Bct, staying in TDATA;
    * otherwise clear Bct and go to IDLE.

The direct restart at Bct = 9 is what makes back-to-back transmission
correct. Without it, the machine would always return through IDLE and SYNC.
SYNC waits for the *next* Bclk edge, which is a whole bit time away, so every
byte after the first would get two stop bits. A single byte does not suffer
from this. A continuous stream does: the transmitter then needs 11 bit times
per byte while the receiver needs only 10, and an echo loses characters.
With the restart, consecutive start bits are exactly 10 Bclk periods apart.

The SYNC path is still needed when the line has been idle. In that case a
byte's start bit begins on the first Bclk edge after the transfer. This is
up to one bit time after the store, because Bclk is free-running.

### Receiver (`uart_rx`)

The receiver samples RxD (after a two-flop synchroniser) on BclkX8 ticks:

* **IDLE.** A low level moves to START_DETECTED.
* **START_DETECTED.** If RxD is high again on a tick before the fourth, the
  low level was a glitch and the receiver returns to IDLE. On the fourth tick
  it is in the middle of the start bit, and it moves to RECV_DATA.
* **RECV_DATA.** Every eighth tick falls near the middle of the next bit:
  * the first eight samples shift into RSR from the top, which undoes the
    LSB-first order;
  * the ninth sample, in the stop bit, ends the frame. If RDRF is clear,
    `load_rdr` copies RSR into RDR and sets RDRF. If the program has not read
    the previous byte (RDRF = 1), the new byte is dropped, RDR keeps the
    unread one, and `overrun` pulses. `overrun` is not visible to software.

The receiver returns to IDLE in the middle of the stop bit. So it is ready
for a start bit that follows directly, and back-to-back frames are received
without loss. RDRF rises about 9.5 bit times after the start edge.

The stop bit's level is not checked.

## Timing summary (100 MHz, 9600 baud)

| event | time |
|---|---|
| store to TDR → TDRE set again | 2 clocks |
| store to TDR on idle line → start bit | up to 1 bit time (next Bclk edge) |
| frame length | 10 bit times = 103680 clocks |
| start edge on RxD → RDRF set | about 9.5 bit times, plus 2 clocks for the synchroniser |
| consecutive frames (TDR refilled in time) | start bits exactly 10 bit times apart |

## Where this design makes its own choices

The following follow the UART this design is based on: the registers RDR,
TDR, SCSR and SCCR; the flags TDRE and RDRF; the three control strobes; the
split into divider, transmitter and receiver; the transmitter's states and
its back-to-back restart; and the 9600 baud / 104 us bit timing at 100 MHz.

These are this design's own choices, and worth checking against any software
you plan to run:

* **Addresses.** RDR at offset 0 and TDR at offset 1 match the original
  register bank. The SCSR and SCCR offsets, the base address `0xF0`, the
  8-bit address and the 8-bit data path are assumed.
* **Bus.** A one-clock `mem_we` / `mem_re` strobe per access. `mem_rdata` is
  combinational and is zero outside the window. `uart_sel` marks a hit, so
  the processor's memory can choose between its own data and the UART's.
* **Flag bits.** TDRE is bit 7 and RDRF is bit 6 of SCSR, as on the MC6811.
  There are no overrun or framing-error flags and no interrupt enables.
  Interrupts are not part of this design.
* **Baud codes.** The 3-bit select code and the prescaler-plus-counter
  structure of the divider, including the rounded-down prescaler explained
  above.
* **Receiver details.** The 8x oversampling receiver (start confirmed at
  half a bit, centre sampling), and dropping a byte that arrives while RDRF
  is set.
* **Other details.** Reset values; the RxD synchroniser; same-clock
  priorities. Write TDR wins over the TDR-to-TSR transfer, so TDRE stays
  clear. A new byte wins over Read RDR, so RDRF stays set.

The design does not include the processor, its memory and parallel I/O
ports, or the 7-segment display. The top module's `mem_*` ports are where
the processor's memory model connects.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends with
a line `TB_RESULT checks=N failures=M`.

* `tb_uart_baud_gen` measures the tick spacing for all eight codes.
* `tb_uart_tx` decodes TxD. It checks every frame and the start-to-start
  spacing: exactly 10 bit times when back-to-back, next Bclk edge when idle.
* `tb_uart_rx` covers these cases:
  * frames at random phases;
  * back-to-back frames;
  * glitches, which are rejected;
  * overrun;
  * hand-over latency.
* `tb_uart` loops TxD back to RxD and checks:
  * the registers and flags;
  * a full-duplex stream;
  * overrun;
  * the bit time per code.
* `tb_uart_mmio` runs the whole design with all parameters at their defaults.
  A bus model performs the polling programs. Models stand in for a 9600-baud
  PC terminal and a 2400-baud RFID tag reader (frames of 0x0A, ten ASCII ID
  bytes, 0x0D). The test runs these scenarios in order:
  1. register access;
  2. a loopback of 0x65, with its start bit measured at 103.7 us;
  3. a message received up to carriage return and then retransmitted
     back-to-back;
  4. a 150-character full-duplex echo of a continuous 9600-baud stream, with
     no losses;
  5. a glitch and an overrun;
  6. a switch to 2400 baud and two RFID tags read.

  The test counts each mechanism and fails if any never occurred: TDRE wait,
  RDRF wait, SYNC start, back-to-back restart, false start, overrun and baud
  switch. It simulates about 330 ms of device time.
* `tb_echo_file` echoes a continuous stream of 2000 characters at exactly
  9600 baud through the full design. It shortens the run by clocking the
  design at 10 MHz instead of 100 MHz (bit time 1024 clocks). All characters
  come back, and the echo never lags by more than about two character times.
  With the back-to-back restart removed from the transmitter, this test loses
  characters.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_uart_mmio \
    -y rtl -y tb +libext+.sv -Irtl rtl/uart_pkg.sv tb/tb_uart_mmio.sv
./obj_dir/Vtb_uart_mmio
```

To run another test, replace `tb_uart_mmio` with `tb_echo_file`, `tb_uart_tx`,
`tb_uart_rx`, `tb_uart` or `tb_uart_baud_gen`. `tb_echo_file` takes about
half a minute. The full-size test takes under
a minute. The block tests take well under a second, because they use small
prescalers and tick periods.

## Changing it

* **Clock frequency.** Set `CLK_FREQ_HZ` on `uart_mmio`; the prescaler
  follows from it. For clocks other than 100 MHz, check that the rounded-down
  prescaler keeps the error below about 2%.
* **Address window.** Set `UART_BASE` and `ADDR_W` on `uart_mmio`. The window
  is four-aligned and is decoded from the address bits above bit 1.
* **Flag positions and register offsets.** These live in `uart_pkg`.
