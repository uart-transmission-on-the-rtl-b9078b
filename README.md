# 9600-baud UART transmitter for the DE2-115 board

A minimal serial link from an FPGA to a PC: the FPGA sends bytes over a
single wire (plus ground) using the asynchronous serial format that every PC
COM port and USB-serial adapter understands. The design is a UART transmitter
running on the DE2-115's 50 MHz clock at 9600 baud, 8 data bits, no parity and
one stop bit (8N1). Its output, `UART_TXD`, leaves the FPGA on pin G9, passes
through the board's RS-232 transceiver (U1, a ZT3232, input T1IN pin 11,
output T1OUT pin 14) and reaches the DB9 connector J6. A terminal program on
the PC set to 9600 8N1 receives the bytes.

The receive line and the handshake lines of the board's UART port
(`UART_RXD` on G12, `UART_RTS` on J13, `UART_CTS` on G14) are not used.

## The serial frame

The line idles high. Each byte is sent as ten bits of equal length:

| bit period | 0     | 1..8                    | 9    |
|------------|-------|-------------------------|------|
| line       | 0     | data[0] .. data[7]      | 1    |
|            | start | least significant first | stop |

The receiver needs no clock from the transmitter; it only has to agree on the
bit length. At 9600 baud a bit lasts 1/9600 s, about 104.2 µs.

## Making 9600 baud from 50 MHz

There is no 9600 Hz clock on the board. Instead a counter counts 50 MHz cycles:

    cycles per bit = 50,000,000 / 9600 = 5208.33  ->  5208

`uart_baud_gen` counts 0 .. 5207 and wraps, and raises `tick` for the one
cycle in which it holds 5207. Everything else runs on the 50 MHz clock and only
changes state in cycles where `tick` is high, so there is a single clock domain
and no derived clock. Rounding 5208.33 down to 5208 gives 9600.6 baud, 0.006 %
fast, far inside what any UART receiver tolerates.

The number of cycles is derived from two parameters, `CLK_FREQ_HZ` and
`BAUD_RATE` (rounded to the nearest integer), or can be set directly with
`CLKS_PER_BIT`.

## The transmitter and its timing

`uart_tx` holds a two-state controller, a 10-bit shift register and a bit
counter. At each bit boundary (`tick`):

- **idle**: the line is 1. If `transmit` is high, the register is loaded with
  `{1, data, 0}` (stop, byte, start) and the controller moves to **send**.
- **send**: the line is the register's rightmost bit. While the bit counter is
  below 9 the register shifts right by one and the counter counts up; at 9 the
  stop bit has had its full period, so the counter is cleared and the
  controller returns to **idle**.

Points that matter when using it:

- `transmit` is a level, not a strobe. It is looked at only at bit boundaries,
  so a frame starts 1 to 5208 clock cycles after `transmit` goes high, and a
  pulse on `transmit` shorter than a bit period may be missed. Hold it high
  until the frame has started (the line falls) and drop it before the frame
  ends if only one byte is wanted.
- `data` is sampled once, at the boundary where the frame is loaded. It may
  change as soon as the start bit is on the line.
- While `transmit` stays high, frames follow one another with one extra idle
  bit period between them: one frame per 11 bit periods (57,288 cycles), about
  873 bytes per second. Each new frame takes whatever `data` holds at its load.
- There is no busy or ready output. A frame is finished 10 bit periods after
  the line's falling start edge.
- `rst` (synchronous, active high) returns to idle at the next clock edge, so
  a frame in flight is cut off and the line goes high at once.
- `txd` is decoded from registers (state and shift register) without an extra
  output flip-flop.

## Modules

| file | what it is |
|------|-----------|
| `rtl/uart_pkg.sv` | package: default clock and baud rate, controller state type, `clks_per_bit()` |
| `rtl/uart_baud_gen.sv` | bit-rate enable: one `tick` every `CLKS_PER_BIT` cycles |
| `rtl/uart_tx.sv` | 8N1 transmitter: controller, shift register, bit counter; instantiates `uart_baud_gen` |
| `rtl/de2_115_uart_top.sv` | board top: `CLOCK_50`, `reset`, `transmit`, `data[7:0]` in, `UART_TXD` out |

Parameters of `uart_tx` (defaults): `CLK_FREQ_HZ` = 50,000,000,
`BAUD_RATE` = 9600, `CLKS_PER_BIT` = derived (5208), `DATA_BITS` = 8 (7 also
works; parity is not implemented). The top has no parameters.

For the board, assign `UART_TXD` to PIN_G9 (3.3 V) and the 50 MHz clock to
`CLOCK_50`. Where `reset`, `transmit` and `data` come from (push-buttons,
switches or other logic) is up to the user; if they come from switches or
buttons, note that `reset` is active high and that the inputs are used
without synchronisers, as in the original design.

## How far it follows the original, and where it departs

Taken from the original design: the 50 MHz clock, 9600 baud, the 8N1 frame,
the cycle-counting divider and the figure of 5208 cycles, the two-state
controller with its load / shift / clear operations, the frame register
`{1, data, 0}` shifted right, sampling of `transmit` at bit boundaries only,
the synchronous reset, and the pin of `UART_TXD`.

Choices of this implementation:

- **Bit length of exactly 5208 cycles.** The original's counter compares
  `>= 5208` and then restarts from 0, which makes a bit 5209 cycles long
  (9598.8 baud), while its own arithmetic asks for 5208. This design uses 5208.
  Both are well within tolerance; the difference is one clock cycle per bit.
- The divider is its own module producing an enable pulse, and the counters are
  only as wide as they need to be (13 and 4 bits instead of 32 and 5).
- The stop bit comes out of the shift register rather than from a default
  assignment; the waveform on the line is the same.
- Parameters for clock, baud rate and data width; a package for the shared
  constants and the state type; assertions on the bit counter and the start
  bit.

Not included: the RS-232 transceiver chip (an analog level translator on the
board) and the PC-side terminal program. The testbenches contain their own
receiver in place of the PC.

## Simulation

Three self-checking testbenches, each printing
`TB_RESULT checks=N failures=M` at the end:

- `tb/tb_uart_baud_gen.sv`: tick period of 5208 cycles at the default size,
  one-cycle pulse, restart after reset.
- `tb/tb_uart_tx.sv`: the transmitter with a 16-cycle bit (parameter
  override) so that over 80 random bytes can be sent. Every cycle of every bit
  is compared with the expected frame; it also checks the start latency
  (1..16 cycles), the 11-bit-period spacing of back-to-back frames, that `data`
  is sampled only at load, idle after `transmit` falls, and a mid-frame reset.
- `tb/tb_de2_115_uart_top.sv`: the board top at its real parameters (5208
  cycles per bit). A receiver in the testbench samples each bit in its middle,
  as a PC's UART would, and a monitor checks that every line edge falls on the
  5208-cycle grid of its frame. It counts each mechanism (frame from idle,
  back-to-back frames, return to idle, mid-frame reset) and fails if one never
  happened. It simulates about 0.4 M cycles, in well under a second.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        --top-module tb_de2_115_uart_top rtl/uart_pkg.sv tb/tb_de2_115_uart_top.sv
    ./obj_dir/Vtb_de2_115_uart_top

Replace the top module and file name to run the other two.
