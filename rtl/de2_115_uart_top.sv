// de2_115_uart_top: top level of the UART transmitter for a DE2-115 board.
//
// The board's 50 MHz clock drives a 9600-baud 8N1 transmitter whose serial
// output is the board signal UART_TXD (FPGA pin G9). On the board that pin
// feeds input T1IN of the RS-232 transceiver, whose output T1OUT goes to the
// DB9 connector and on to a PC. The receive and handshake lines (UART_RXD,
// UART_RTS, UART_CTS) are not used by this design and have no ports here.
//
// Interface: CLOCK_50; reset (synchronous, active high); transmit (frames are
// sent back to back while it is high); data (the byte to send); UART_TXD.
// Timing: as uart_tx; one bit every 5208 clock cycles.
//
// The board names of the clock and UART pins follow the board's pin table.
// Where reset, transmit and data come from on the board (keys, switches or
// other logic) is left to the user: they are plain input ports here.
module de2_115_uart_top (
  input  logic       CLOCK_50,
  input  logic       reset,
  input  logic       transmit,
  input  logic [7:0] data,
  output logic       UART_TXD
);

  uart_tx u_tx (
    .clk     (CLOCK_50),
    .rst     (reset),
    .transmit(transmit),
    .data    (data),
    .txd     (UART_TXD)
  );

endmodule
