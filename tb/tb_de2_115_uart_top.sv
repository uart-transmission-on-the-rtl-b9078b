// tb_de2_115_uart_top: end-to-end test of the board top level at its default
// parameters (50 MHz clock, 9600 baud, 8N1), with no parameter overrides.
//
// A receiver written here plays the part of the PC at the far end of the
// cable: it waits for a falling edge on UART_TXD, samples each bit in the
// middle of its period using a bit time it computes itself from 50 MHz and
// 9600 baud, checks the stop bit, and compares the byte with what was sent.
// Independently it checks that every bit lasts 5208 cycles (a line edge may
// only come a whole number of bit periods after the start edge).
//
// Mechanisms exercised and counted: a frame loaded from idle, back-to-back
// frames with 'transmit' held, the return to idle when 'transmit' falls (the
// bit counter's clear), and a reset in the middle of a frame. Each must
// happen at least once.
module tb_de2_115_uart_top;
  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned BAUD   = 9_600;
  localparam int unsigned P = int'($floor(real'(CLK_HZ) / real'(BAUD) + 0.5));

  logic       clk = 1'b0;
  logic       reset;
  logic       transmit;
  logic [7:0] data;
  logic       txd;
  int         checks = 0, failures = 0;
  longint     cyc = 0;
  int         n_from_idle = 0, n_back_to_back = 0, n_to_idle = 0, n_reset = 0;

  de2_115_uart_top dut (
    .CLOCK_50(clk), .reset(reset), .transmit(transmit), .data(data), .UART_TXD(txd)
  );

  always #10 clk = ~clk;             // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // PC-side receiver: wait for a start edge, then sample mid-bit.
  // Returns the received byte, the stop bit, the start cycle and whether a
  // frame was seen within 'limit' cycles.
  task automatic receive(input int limit, output logic [7:0] b, output logic stop,
                         output longint t_start, output bit got);
    got = 0; b = '0; stop = 1'b0; t_start = -1;
    for (int i = 0; i < limit; i++) begin
      @(negedge clk);
      if (!txd) begin got = 1; break; end
    end
    if (!got) return;
    t_start = cyc;
    repeat (P / 2) @(negedge clk);
    check(!txd, "start bit still low at its middle");
    for (int k = 0; k < 8; k++) begin
      repeat (P) @(negedge clk);
      b[k] = txd;
    end
    repeat (P) @(negedge clk);
    stop = txd;
    repeat (P - P / 2 - 1) @(negedge clk);   // to the last cycle of the stop bit
  endtask

  // Edge-timing monitor: every edge on the line during a frame must lie a
  // whole number of bit periods after that frame's start edge.
  longint mon_start = -1;
  logic   txd_d = 1'b1;
  int     edge_bad = 0, edge_seen = 0;
  bit     mon_on = 1'b1;                       // off around a deliberate reset
  always @(negedge clk) begin
    txd_d <= txd;
    if (!mon_on) mon_start <= -1;
    else if (txd != txd_d) begin
      if (mon_start < 0 || cyc - mon_start >= longint'(10 * P)) begin
        if (!txd) mon_start <= cyc;          // a new frame's start edge
        else edge_bad++;                      // rising edge outside a frame
      end else begin
        edge_seen++;
        if ((cyc - mon_start) % longint'(P) != 0) edge_bad++;
      end
    end
  end

  initial begin
    #(20ns * 200 * P);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, sent, next;
    logic stop;
    longint t, t_prev;
    bit got;
    check(P == 5208, "bit period is 5208 cycles");
    reset = 1'b1; transmit = 1'b0; data = 8'h00;
    repeat (5) @(negedge clk);
    reset = 1'b0;

    // 1. One byte from idle; data changes right after the frame starts.
    sent = 8'hA7;
    data = sent;
    transmit = 1'b1;
    t = cyc;
    receive(2 * P, b, stop, t_prev, got);
    transmit = 1'b0;
    data = 8'h00;
    check(got && t_prev - t >= 1 && t_prev - t <= longint'(P), "frame starts within one bit period");
    check(b == sent, $sformatf("received %02h, sent %02h", b, sent));
    check(stop, "stop bit is 1");
    if (got) n_from_idle++;
    receive(3 * P, b, stop, t, got);
    check(!got, "no frame once transmit is low");
    if (!got) n_to_idle++;

    // 2. Three bytes back to back with transmit held high.
    sent = 8'h3C;
    data = sent;
    transmit = 1'b1;
    receive(2 * P, b, stop, t_prev, got);
    if (got) n_from_idle++;
    for (int n = 0; n < 3; n++) begin
      next = 8'($urandom);
      data = next;
      check(b == sent && stop, $sformatf("back-to-back byte %0d: got %02h, sent %02h", n, b, sent));
      if (n == 2) transmit = 1'b0;
      sent = next;
      receive(2 * P, b, stop, t, got);
      if (n < 2) begin
        check(got && t - t_prev == longint'(11 * P),
              $sformatf("frame spacing %0d cycles, expected %0d", t - t_prev, 11 * P));
        if (got) n_back_to_back++;
        t_prev = t;
      end else begin
        check(!got, "transmit low: no further frame");
        if (!got) n_to_idle++;
      end
    end

    // 3. Reset in the middle of a frame.
    data = 8'h00;
    transmit = 1'b1;
    repeat (3 * P) @(negedge clk);
    transmit = 1'b0;
    mon_on = 1'b0;
    reset = 1'b1;
    @(negedge clk);
    check(txd, "line high right after reset");
    reset = 1'b0;
    @(negedge clk);
    mon_on = 1'b1;
    n_reset++;
    receive(12 * P, b, stop, t, got);
    check(!got, "no frame after the reset");

    check(edge_bad == 0 && edge_seen > 0,
          $sformatf("%0d of %0d line edges off the 5208-cycle bit grid", edge_bad, edge_seen));
    check(n_from_idle > 0, "frame loaded from idle happened");
    check(n_back_to_back > 0, "back-to-back frames happened");
    check(n_to_idle > 0, "return to idle happened");
    check(n_reset > 0, "mid-frame reset happened");
    $display("mechanisms: from_idle=%0d back_to_back=%0d to_idle=%0d reset=%0d",
             n_from_idle, n_back_to_back, n_to_idle, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
