// uart_baud_gen: bit-rate enable generator for the UART transmitter.
//
// A free-running counter counts board clock cycles from 0 to CLKS_PER_BIT-1
// and wraps; 'tick' is high for the one cycle in which the counter holds its
// last value. With the defaults (50 MHz clock, 9600 baud) that is one pulse
// every 5208 cycles. The rest of the transmitter runs on the same clock and
// only acts in cycles where 'tick' is high, so no divided clock is created.
//
// Interface: clk, synchronous active-high rst (counter back to 0), tick.
// Timing: the first tick comes CLKS_PER_BIT cycles after the last reset
// cycle (CLKS_PER_BIT-1 clock edges after reset is released), then every
// CLKS_PER_BIT cycles.
//
// Counting clock cycles to divide the 50 MHz clock down to the baud rate, and
// the figure of 5208 cycles per bit, follow the original design. Using a
// clock-enable pulse, rounding the division and sizing the counter to fit are
// choices of this implementation.
module uart_baud_gen #(
  parameter int unsigned CLK_FREQ_HZ  = uart_pkg::CLK_FREQ_HZ_DEFAULT,
  parameter int unsigned BAUD_RATE    = uart_pkg::BAUD_RATE_DEFAULT,
  parameter int unsigned CLKS_PER_BIT = uart_pkg::clks_per_bit(CLK_FREQ_HZ, BAUD_RATE)
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam logic [CW-1:0] LAST = CW'(CLKS_PER_BIT - 1);

  logic [CW-1:0] count_q;

  initial assert (CLKS_PER_BIT >= 2)
    else $error("uart_baud_gen: CLKS_PER_BIT must be at least 2");

  always_ff @(posedge clk) begin
    if (rst)               count_q <= '0;
    else if (count_q == LAST) count_q <= '0;
    else                   count_q <= count_q + 1'b1;
  end

  assign tick = (count_q == LAST);

endmodule
