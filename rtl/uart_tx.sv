// uart_tx: 8N1 UART transmitter.
//
// While 'transmit' is high the transmitter sends frames on 'txd': a start bit
// (0), the DATA_BITS bits of 'data' least significant bit first, and a stop
// bit (1). When 'transmit' is low the line idles at 1. All state changes
// happen only in cycles where the bit-rate enable from uart_baud_gen is high,
// so every bit lasts exactly one bit period (5208 cycles of the 50 MHz clock
// at 9600 baud).
//
// How it works: a two-state controller (idle / send), a frame shift register
// and a bit counter. In idle, at a bit-period boundary with 'transmit' high,
// the register is loaded with {stop, data, start} and the controller moves to
// send. In send, 'txd' is the register's rightmost bit; at each boundary the
// register shifts right by one and the bit counter counts up. When the counter
// shows that the stop bit has been on the line for a full period, the counter
// is cleared and the controller returns to idle. If 'transmit' is still high
// at the next boundary another frame starts, so a held 'transmit' gives one
// frame every DATA_BITS+3 bit periods (one extra idle period between frames).
//
// Interface: clk, synchronous active-high rst (back to idle, line high),
// transmit (level, sampled at bit-period boundaries only), data (sampled at
// the boundary where a frame is loaded), txd.
// Timing: the start bit begins at the first bit-period boundary after
// 'transmit' is seen high, i.e. 1 to CLKS_PER_BIT cycles later. 'txd' is
// decoded from registers only.
//
// The controller, the load/shift/clear operations, the frame layout and the
// bit order follow the original design; the bit-rate enable as a separate
// module and driving the stop bit from the shift register are choices of this
// implementation.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ  = CLK_FREQ_HZ_DEFAULT,
  parameter int unsigned BAUD_RATE    = BAUD_RATE_DEFAULT,
  parameter int unsigned CLKS_PER_BIT = clks_per_bit(CLK_FREQ_HZ, BAUD_RATE),
  parameter int unsigned DATA_BITS    = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 transmit,
  input  logic [DATA_BITS-1:0] data,
  output logic                 txd
);

  // A frame is the data plus one start bit and one stop bit.
  localparam int unsigned FRAME_BITS = DATA_BITS + 2;
  localparam int unsigned BCW        = $clog2(FRAME_BITS);
  localparam logic [BCW-1:0] LAST_BIT = BCW'(FRAME_BITS - 1);

  logic                  tick;
  tx_state_e             state_q;
  logic [FRAME_BITS-1:0] shreg_q;
  logic [BCW-1:0]        bit_cnt_q;

  uart_baud_gen #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .BAUD_RATE   (BAUD_RATE),
    .CLKS_PER_BIT(CLKS_PER_BIT)
  ) u_baud (
    .clk (clk),
    .rst (rst),
    .tick(tick)
  );

  // Controller decisions for the current bit period.
  logic      load, shift, clear;
  tx_state_e state_d;

  always_comb begin
    load    = 1'b0;
    shift   = 1'b0;
    clear   = 1'b0;
    state_d = state_q;
    unique case (state_q)
      TX_IDLE: if (transmit) begin
        load    = 1'b1;
        state_d = TX_SEND;
      end
      TX_SEND: if (bit_cnt_q >= LAST_BIT) begin
        clear   = 1'b1;
        state_d = TX_IDLE;
      end else begin
        shift   = 1'b1;
      end
      default: state_d = TX_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= TX_IDLE;
      shreg_q   <= '1;
      bit_cnt_q <= '0;
    end else if (tick) begin
      state_q <= state_d;
      if (load)  shreg_q   <= {1'b1, data, 1'b0};
      if (shift) shreg_q   <= {1'b0, shreg_q[FRAME_BITS-1:1]};
      if (shift) bit_cnt_q <= bit_cnt_q + 1'b1;
      if (clear) bit_cnt_q <= '0;
    end
  end

  assign txd = (state_q == TX_SEND) ? shreg_q[0] : 1'b1;

  // A frame never shifts past its stop bit.
  a_bitcnt_range: assert property (@(posedge clk) disable iff (rst)
    bit_cnt_q <= LAST_BIT);
  // The controller only leaves idle by loading a frame.
  a_load_on_start: assert property (@(posedge clk) disable iff (rst)
    (state_q == TX_IDLE && tick && transmit) |=> (state_q == TX_SEND && shreg_q[0] == 1'b0));

endmodule
