// tb_uart_rx: self-checking test of the UART receiver.
//
// Supplies an 8x-baud tick every T8 clocks and drives RxD with serial frames
// (start bit, 8 data bits LSB first, stop bit) at exactly the matching bit
// time, starting at random phases against the tick. The testbench plays the
// register block's RDRF flag: load_rdr sets it, a "read" clears it. Checked:
// every byte is handed over with load_rdr carrying the right RSR value, about
// 9.5 bit times after its start edge; frames sent back-to-back with a single
// stop bit are all received; a short low glitch on an idle line is rejected
// as a false start; and a byte that arrives while RDRF is still set is
// dropped with an overrun pulse instead of a load.
module tb_uart_rx;
  localparam int T8 = 4;             // clocks per 8x tick
  localparam int BT = 8 * T8;        // clocks per bit
  localparam longint LAT = 76 * T8;  // start edge to hand-over: 4 + 9 x 8 ticks
  localparam longint TOL = longint'(T8) + 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       bclkx8_tick = 1'b0;
  logic       rxd = 1'b1;
  logic       rdrf = 1'b0;
  logic [7:0] rsr;
  logic       load_rdr, overrun;
  logic       rd = 1'b0;

  int     checks = 0, failures = 0;
  int     n_loads = 0, n_overruns = 0, n_glitch = 0, n_b2b = 0;
  longint cycle = 0;
  int     tick_div = 0;
  logic [7:0] expq [$];
  longint     startq [$];

  always #5 clk = ~clk;

  uart_rx dut (.*);

  always @(posedge clk) begin
    cycle       <= cycle + 1;
    tick_div    <= (tick_div == T8 - 1) ? 0 : tick_div + 1;
    bclkx8_tick <= (tick_div == T8 - 1);
    if (load_rdr)  rdrf <= 1'b1;
    else if (rd)   rdrf <= 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Hand-over monitor.
  always @(posedge clk) begin
    if (load_rdr) begin
      n_loads++;
      check(!overrun, "load and overrun together");
      if (expq.size() == 0) begin
        check(1'b0, $sformatf("unexpected load of %02h", rsr));
      end else begin
        automatic logic [7:0] e = expq.pop_front();
        automatic longint s = startq.pop_front();
        automatic longint lat = cycle - s;
        check(rsr == e, $sformatf("received %02h expected %02h", rsr, e));
        check(lat >= LAT - TOL && lat <= LAT + TOL,
              $sformatf("hand-over %0d clocks after start edge, expected about %0d", lat, LAT));
      end
    end
    if (overrun) n_overruns++;
  end

  task automatic send_frame(input logic [7:0] d);
    rxd <= 1'b0;
    repeat (BT) @(posedge clk);
    for (int b = 0; b < 8; b++) begin
      rxd <= d[b];
      repeat (BT) @(posedge clk);
    end
    rxd <= 1'b1;
    repeat (BT) @(posedge clk);
  endtask

  task automatic send_expect(input logic [7:0] d);
    expq.push_back(d);
    startq.push_back(cycle + 1);
    send_frame(d);
  endtask

  task automatic read_rdr();
    rd <= 1'b1;
    @(posedge clk);
    rd <= 1'b0;
  endtask

  initial begin
    int loads_before;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);

    // isolated frames at random phases, each read before the next
    for (int i = 0; i < 20; i++) begin
      repeat (int'($urandom_range(1, 3 * BT))) @(posedge clk);
      send_expect(i == 0 ? 8'h65 : 8'($urandom));
      repeat (BT) @(posedge clk);
      read_rdr();
    end

    // back-to-back frames, one stop bit each; each read during the next frame
    fork
      for (int i = 0; i < 16; i++) begin
        send_expect(8'($urandom));
        n_b2b++;
      end
      repeat (16) begin
        @(posedge clk iff load_rdr);
        repeat (BT) @(posedge clk);
        read_rdr();
      end
    join
    repeat (2 * BT) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d back-to-back bytes not received", expq.size()));

    // glitches shorter than half a bit are false starts
    loads_before = n_loads;
    for (int i = 0; i < 5; i++) begin
      rxd <= 1'b0;
      repeat (int'($urandom_range(1, 2 * T8))) @(posedge clk);
      rxd <= 1'b1;
      repeat (12 * BT) @(posedge clk);
      n_glitch++;
    end
    check(n_loads == loads_before, "glitch produced a byte");
    send_expect(8'hA5);
    repeat (BT) @(posedge clk);
    read_rdr();

    // overrun: RDRF still set when the next byte completes
    send_expect(8'h3C);
    repeat (BT) @(posedge clk);
    loads_before = n_loads;
    send_frame(8'hC3);
    repeat (BT) @(posedge clk);
    check(n_loads == loads_before, "byte loaded while RDRF set");
    check(n_overruns == 1, $sformatf("overrun pulses %0d, expected 1", n_overruns));
    read_rdr();
    send_expect(8'h5A);
    repeat (BT) @(posedge clk);
    read_rdr();

    check(expq.size() == 0, "all expected bytes received");
    check(n_loads == 39, $sformatf("loads %0d, expected 39", n_loads));
    $display("loads=%0d back_to_back=%0d glitches=%0d overruns=%0d", n_loads, n_b2b, n_glitch, n_overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
