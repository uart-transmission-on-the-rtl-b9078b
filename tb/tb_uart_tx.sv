// tb_uart_tx: self-checking test of the 8N1 transmitter.
//
// Runs the transmitter with a short bit period (16 cycles) so that many
// random bytes can be sent. A line monitor written here checks every cycle
// of every frame: start bit 0, data LSB first, stop bit 1, each bit exactly
// one bit period long. It also checks the start latency (1..P cycles after
// 'transmit' rises), that a held 'transmit' gives one frame every 11 bit
// periods, that 'data' is sampled only when a frame is loaded, that the line
// stays high once 'transmit' falls, and that reset aborts a frame.
module tb_uart_tx;
  localparam int unsigned P = 16;          // cycles per bit in this test
  localparam int unsigned FRAME = 10;      // start + 8 data + stop

  logic       clk = 1'b0;
  logic       rst;
  logic       transmit;
  logic [7:0] data;
  logic       txd;
  int         checks = 0, failures = 0;
  longint     cyc = 0;

  uart_tx #(.CLKS_PER_BIT(P)) dut (
    .clk(clk), .rst(rst), .transmit(transmit), .data(data), .txd(txd)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Wait (sampling between edges) for the line to fall; returns the cycle of
  // the first low sample, or -1 after 'limit' cycles.
  task automatic wait_start(input int limit, output longint t);
    t = -1;
    for (int i = 0; i < limit; i++) begin
      @(negedge clk);
      if (!txd) begin
        t = cyc;
        return;
      end
    end
  endtask

  // Check a whole frame cycle by cycle; the first (low) cycle of the start
  // bit has already been sampled by wait_start.
  task automatic check_frame(input logic [7:0] b);
    logic [FRAME-1:0] bits;
    int bad;
    bits = {1'b1, b, 1'b0};
    for (int k = 0; k < FRAME; k++) begin
      bad = 0;
      for (int c = (k == 0) ? 1 : 0; c < P; c++) begin
        @(negedge clk);
        if (txd !== bits[k]) bad++;
      end
      check(bad == 0, $sformatf("byte %02h bit %0d: %0d of %0d cycles wrong", b, k, bad, P));
    end
  endtask

  // Line must stay high for n cycles.
  task automatic check_idle(input int n, input string what);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (!txd) bad++;
    end
    check(bad == 0, what);
  endtask

  initial begin
    #(10ns * 400 * FRAME * P);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, t_prev, t_req;
    logic [7:0] b, nb;
    rst = 1'b1; transmit = 1'b0; data = 8'h00;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    check_idle(5 * P, "line idles high with transmit low");

    // Single frames started at random phases of the bit clock.
    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(0, 2 * P)) @(negedge clk);
      b = 8'($urandom);
      data = b;
      transmit = 1'b1;
      t_req = cyc;
      wait_start(2 * P, t);
      check(t >= 0 && t - t_req >= 1 && t - t_req <= longint'(P),
            $sformatf("start latency %0d cycles, expected 1..%0d", t - t_req, P));
      transmit = 1'b0;
      data = ~b;                    // must not affect the frame in flight
      check_frame(b);
      check_idle(2 * P, "line stays high after the frame when transmit is low");
    end

    // Back-to-back frames while transmit is held high.
    b = 8'($urandom);
    data = b;
    transmit = 1'b1;
    wait_start(2 * P, t_prev);
    for (int n = 0; n < 40; n++) begin
      nb = 8'($urandom);
      data = nb;                    // next frame's byte, sampled at its load
      check_frame(b);
      wait_start(3 * P, t);
      check(t - t_prev == longint'((FRAME + 1) * P),
            $sformatf("frame spacing %0d cycles, expected %0d", t - t_prev, (FRAME + 1) * P));
      t_prev = t;
      b = nb;
    end
    transmit = 1'b0;
    check_frame(b);
    check_idle(3 * P, "line high after the last back-to-back frame");

    // Edge bytes.
    for (int n = 0; n < 4; n++) begin
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'h55 : 8'hAA;
      data = b;
      transmit = 1'b1;
      wait_start(2 * P, t);
      transmit = 1'b0;
      check(t >= 0, "edge byte frame starts");
      check_frame(b);
      check_idle(2 * P, "idle after edge byte");
    end

    // Reset in the middle of a frame returns the line to idle at once.
    data = 8'h00;
    transmit = 1'b1;
    wait_start(2 * P, t);
    repeat (3 * P) @(negedge clk);
    transmit = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    check(txd === 1'b1, "line high in the cycle after reset");
    rst = 1'b0;
    check_idle(FRAME * P, "line stays high after a mid-frame reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
