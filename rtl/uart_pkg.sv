// uart_pkg: constants and types shared by the UART transmitter modules.
//
// The frame format is 8N1: one start bit (0), eight data bits sent least
// significant bit first, one stop bit (1), no parity. The bit period is the
// board clock divided by the baud rate, rounded to the nearest whole cycle:
// 50 MHz / 9600 = 5208.33, so 5208 cycles per bit (9600.6 baud, +0.006 %).
package uart_pkg;

  // Default board clock and line rate.
  localparam int unsigned CLK_FREQ_HZ_DEFAULT = 50_000_000;
  localparam int unsigned BAUD_RATE_DEFAULT   = 9_600;

  // Two-state transmit controller: waiting for 'transmit', or sending a frame.
  typedef enum logic {
    TX_IDLE = 1'b0,
    TX_SEND = 1'b1
  } tx_state_e;

  // Clock cycles per bit period, rounded to the nearest integer.
  function automatic int unsigned clks_per_bit(int unsigned clk_hz, int unsigned baud);
    return (clk_hz + baud / 2) / baud;
  endfunction

endpackage
