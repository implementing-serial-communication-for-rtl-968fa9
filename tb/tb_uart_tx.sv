// tb_uart_tx: self-checking test of the UART transmitter.
//
// The testbench plays the register block (TDR and TDRE: a write clears TDRE,
// load_tsr sets it) and supplies a Bclk tick every BT clocks. A software
// polling loop waits for TDRE = 1 and writes the next byte, sometimes at once
// (back-to-back), sometimes after an idle pause. A line monitor decodes TxD by
// sampling each bit in its middle and checks start bit, data (LSB first) and
// stop bit. It also checks the frame timing: a byte written while the
// previous frame is still on the line must start exactly 10 bit times after
// the previous start bit (one stop bit, no re-synchronisation), and a byte
// written while the line is idle must start on the next Bclk tick.
module tb_uart_tx;
  localparam int BT = 16;            // clocks per bit
  localparam int NBYTES = 40;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       bclk_tick = 1'b0;
  logic [7:0] tdr = 8'h00;
  logic       tdre = 1'b1;
  logic       load_tsr, txd;
  logic       wr = 1'b0;
  logic [7:0] wdata = 8'h00;

  int     checks = 0, failures = 0;
  int     n_back_to_back = 0, n_sync = 0;
  longint cycle = 0;
  int     tick_div = 0;

  logic [7:0] sent [NBYTES];
  longint     wr_cycle [NBYTES];
  int         n_rx = 0;

  always #5 clk = ~clk;

  uart_tx dut (.*);

  // Register-block model and Bclk.
  always @(posedge clk) begin
    cycle     <= cycle + 1;
    tick_div  <= (tick_div == BT - 1) ? 0 : tick_div + 1;
    bclk_tick <= (tick_div == BT - 1);
    if (wr) begin
      tdr  <= wdata;
      tdre <= 1'b0;
    end else if (load_tsr) begin
      tdre <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Line monitor.
  initial begin : monitor
    automatic longint start;
    automatic longint prev_start = -1;
    automatic logic [7:0] d;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (!txd) begin
        start = cycle;
        repeat (BT / 2) @(posedge clk);
        check(txd == 1'b0, "start bit low in its middle");
        for (int b = 0; b < 8; b++) begin
          repeat (BT) @(posedge clk);
          d[b] = txd;
        end
        repeat (BT) @(posedge clk);
        check(txd == 1'b1, "stop bit high");
        if (n_rx < NBYTES) begin
          check(d == sent[n_rx], $sformatf("byte %0d: got %02h expected %02h", n_rx, d, sent[n_rx]));
          if (prev_start >= 0 && wr_cycle[n_rx] < prev_start + longint'(10 * BT - 2)) begin
            n_back_to_back++;
            check(start == prev_start + 10 * BT,
                  $sformatf("back-to-back byte %0d starts %0d clocks after previous, expected %0d",
                            n_rx, start - prev_start, 10 * BT));
          end else begin
            n_sync++;
            check(start > wr_cycle[n_rx] && start <= wr_cycle[n_rx] + longint'(BT + 3),
                  $sformatf("idle byte %0d starts %0d clocks after write", n_rx, start - wr_cycle[n_rx]));
          end
        end
        n_rx++;
        prev_start = start;
        // wait out the remaining half of the stop bit
        repeat (BT / 2 - 1) @(posedge clk);
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check(txd == 1'b1, "TxD idles high after reset");
    for (int i = 0; i < NBYTES; i++) begin
      sent[i] = (i == 0) ? 8'h65 : 8'($urandom);
      // every fifth byte waits until the line has gone idle
      if (i % 5 == 0 && i > 0) repeat (25 * BT + int'($urandom_range(0, BT))) @(posedge clk);
      while (!tdre) @(posedge clk);
      wr_cycle[i] = cycle;
      wr    <= 1'b1;
      wdata <= sent[i];
      @(posedge clk);
      wr    <= 1'b0;
      @(posedge clk);
    end
    repeat (25 * BT) @(posedge clk);
    check(n_rx == NBYTES, $sformatf("received %0d frames, expected %0d", n_rx, NBYTES));
    check(n_back_to_back > 0, "back-to-back restart exercised");
    check(n_sync > 0, "start from idle exercised");
    $display("back_to_back=%0d from_idle=%0d", n_back_to_back, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBYTES * 30 * BT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
