// tb_uart_baud_gen: self-checking test of the bit-rate enable generator at
// its default size (50 MHz / 9600 baud). Checks that the first tick comes
// exactly 5208 cycles after the last reset cycle, that ticks repeat every 5208 cycles and
// last one cycle, and that a reset in mid-period restarts the count.
// Expected numbers are computed here from the clock and baud rate.
module tb_uart_baud_gen;
  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned BAUD   = 9_600;
  // Nearest whole number of cycles per bit, worked out independently.
  localparam int unsigned P = int'($floor(real'(CLK_HZ) / real'(BAUD) + 0.5));

  logic clk = 1'b0;
  logic rst;
  logic tick;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  uart_baud_gen dut (.clk(clk), .rst(rst), .tick(tick));

  always #10 clk = ~clk;            // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Count cycles until the next tick, sampling between clock edges.
  task automatic cycles_to_tick(output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!tick && n < 3 * P);
  endtask

  initial begin
    #(20ns * 40 * P);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    check(P == 5208, "cycles per bit is 5208 for 50 MHz / 9600");
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // First tick: P cycles after the last reset cycle (which holds count 0),
    // i.e. P-1 clock edges after reset is released.
    cycles_to_tick(n);
    check(n == P - 1, $sformatf("first tick after %0d cycles, expected %0d", n, P - 1));
    // Tick lasts one cycle.
    @(negedge clk);
    check(!tick, "tick lasts exactly one cycle");
    // Following ticks: one every P cycles.
    for (int i = 0; i < 6; i++) begin
      cycles_to_tick(n);
      // The first wait starts one cycle after a tick, the rest right on one.
      check(n == (i == 0 ? P - 1 : P),
            $sformatf("tick period %0d", n));
    end
    // Reset in the middle of a period restarts the count.
    repeat (P / 3) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(!tick, "no tick during reset");
    rst = 1'b0;
    cycles_to_tick(n);
    check(n == P - 1, $sformatf("tick %0d cycles after mid-period reset, expected %0d", n, P - 1));
    // Measure the rate over 10 periods: 10*P cycles for 10 ticks.
    begin
      longint t0;
      int ticks = 0;
      t0 = cyc;
      while (cyc - t0 < 10 * P) begin
        @(negedge clk);
        if (tick) ticks++;
      end
      check(ticks == 10, $sformatf("%0d ticks in %0d cycles", ticks, 10 * P));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
