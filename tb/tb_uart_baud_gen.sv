// tb_uart_baud_gen: self-checking test of the UART clock divider.
//
// Runs the divider with a small prescaler (PRESCALE = 3) and, for every baud
// select code 0..7, measures the spacing of successive bclkx8_tick and
// bclk_tick pulses. Expected spacings are PRESCALE * 2**(sel+1) clocks for the
// 8x tick and eight times that for the bit clock; the Bclk level must rise
// together with bclk_tick. A watchdog ends the run if the ticks stop.
module tb_uart_baud_gen;
  localparam int unsigned PRESCALE = 3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] sel = 3'd0;
  logic       bclkx8_tick, bclk_tick, bclk;
  int         checks = 0, failures = 0;
  longint     cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  uart_baud_gen #(.PRESCALE(PRESCALE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycle numbers of the next n pulses of one tick signal.
  task automatic measure(input bit which, input int n, input longint expect_gap);
    longint last = -1;
    int got = 0;
    while (got < n) begin
      @(posedge clk);
      if ((which ? bclk_tick : bclkx8_tick)) begin
        if (which) check(bclk == 1'b1, "bclk level high together with bclk_tick");
        if (last >= 0)
          check(cycle - last == expect_gap,
                $sformatf("sel=%0d %s gap %0d, expected %0d", sel,
                          which ? "bclk" : "bclkx8", cycle - last, expect_gap));
        last = cycle;
        got++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      // let a pulse after the change pass before timing
      repeat (2) begin
        do @(posedge clk); while (!bclkx8_tick);
      end
      measure(1'b0, 6, longint'(PRESCALE) * (64'd2 << s));
      measure(1'b1, 3, longint'(PRESCALE) * (64'd2 << s) * 8);
    end
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
