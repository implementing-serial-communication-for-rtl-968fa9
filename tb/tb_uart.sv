// tb_uart: self-checking test of the UART register block with its divider,
// transmitter and receiver, TxD looped back to RxD.
//
// Uses a small prescaler (PRESCALE = 2) so a bit takes 32 * 2**sel clocks.
// The testbench issues the control strobes the memory interface would (Write
// TDR, Read RDR, Write BAUD) the way a polling program does. Checked: reset
// values of SCSR and SCCR; SCCR write and read back; TDRE clears on Write TDR
// and sets again when the byte moves to the shift register; RDRF sets when a
// byte arrives and clears on Read RDR; the loopback byte 0x65 comes back; a
// full-duplex stream of back-to-back bytes is received in order and within
// 10 bit times per byte; a byte arriving before RDR is read is dropped and RDR
// keeps the unread one; the bit time follows the baud select code.
module tb_uart;
  import uart_pkg::*;
  localparam int unsigned PRESCALE = 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       rd_rdr = 1'b0, wr_tdr = 1'b0, wr_baud = 1'b0;
  logic [7:0] din = 8'h00;
  logic [7:0] rdr, tdr, scsr, sccr;
  logic       rxd, txd, bclk;

  int     checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  assign rxd = txd;

  uart #(.PRESCALE(PRESCALE)) dut (.*);

  function automatic longint bit_clocks(input int sel);
    return longint'(PRESCALE) * (longint'(2) << sel) * 8;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic strobe_wr_tdr(input logic [7:0] d);
    wr_tdr <= 1'b1; din <= d;
    @(posedge clk);
    wr_tdr <= 1'b0;
    #1;
  endtask

  task automatic strobe_wr_baud(input logic [7:0] d);
    wr_baud <= 1'b1; din <= d;
    @(posedge clk);
    wr_baud <= 1'b0;
    #1;
  endtask

  task automatic read_rdr(output logic [7:0] d);
    d = rdr;
    rd_rdr <= 1'b1;
    @(posedge clk);
    rd_rdr <= 1'b0;
    #1;
  endtask

  task automatic wait_tdre();
    while (!scsr[SCSR_TDRE_BIT]) @(posedge clk);
  endtask

  task automatic wait_rdrf();
    while (!scsr[SCSR_RDRF_BIT]) @(posedge clk);
  endtask

  initial begin
    logic [7:0] d;
    logic [7:0] stream [20];
    longint t0, t1;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(scsr == 8'h80, $sformatf("SCSR after reset %02h, expected 80", scsr));
    check(sccr == 8'h00, $sformatf("SCCR after reset %02h, expected 00", sccr));
    check(txd == 1'b1, "TxD idle high");

    strobe_wr_baud(8'hFA);
    @(posedge clk);
    check(sccr == 8'h02, $sformatf("SCCR reads %02h, expected 02", sccr));
    strobe_wr_baud(8'h00);

    // loopback of one byte
    wait_tdre();
    strobe_wr_tdr(8'h65);
    check(scsr[SCSR_TDRE_BIT] == 1'b0, "TDRE cleared by Write TDR");
    check(tdr == 8'h65, "TDR holds written byte");
    repeat (3) @(posedge clk);
    check(scsr[SCSR_TDRE_BIT] == 1'b1, "TDRE set after transfer to TSR");
    wait_rdrf();
    read_rdr(d);
    check(d == 8'h65, $sformatf("loopback byte %02h, expected 65", d));
    check(scsr[SCSR_RDRF_BIT] == 1'b0, "RDRF cleared by Read RDR");

    // full-duplex stream: writer and reader run together
    foreach (stream[i]) stream[i] = 8'($urandom);
    wait_tdre();
    t0 = cycle;
    fork
      foreach (stream[i]) begin
        wait_tdre();
        strobe_wr_tdr(stream[i]);
      end
      foreach (stream[i]) begin
        logic [7:0] r;
        wait_rdrf();
        read_rdr(r);
        check(r == stream[i], $sformatf("stream byte %0d: %02h expected %02h", i, r, stream[i]));
      end
    join
    t1 = cycle;
    check(t1 - t0 <= 20 * 10 * bit_clocks(0) + 2 * bit_clocks(0),
          $sformatf("20 bytes took %0d clocks, more than 10 bit times each", t1 - t0));

    // overrun: two bytes, none read in between
    wait_tdre();
    strobe_wr_tdr(8'h11);
    wait_tdre();
    strobe_wr_tdr(8'h22);
    repeat (int'(25 * bit_clocks(0))) @(posedge clk);
    check(rdr == 8'h11, $sformatf("RDR after overrun %02h, expected 11", rdr));
    read_rdr(d);

    // bit time per baud code: send 0x00, start bit + 8 zeros = 9 bit times low
    for (int s = 0; s < 3; s++) begin
      strobe_wr_baud(8'(s));
      wait_tdre();
      strobe_wr_tdr(8'h00);
      while (txd) @(posedge clk);
      t0 = cycle;
      while (!txd) @(posedge clk);
      check(cycle - t0 == 9 * bit_clocks(s),
            $sformatf("sel %0d: low for %0d clocks, expected %0d", s, cycle - t0, 9 * bit_clocks(s)));
      wait_rdrf();
      read_rdr(d);
      check(d == 8'h00, "zero byte received");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
