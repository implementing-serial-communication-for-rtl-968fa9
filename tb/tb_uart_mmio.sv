// tb_uart_mmio: end-to-end test of the memory-mapped UART at full size.
//
// The design runs with all parameters at their defaults (100 MHz clock,
// UART window at 0xF0). A bus-master model plays the processor running the
// polling programs of a small microcontroller: it loads SCSR until TDRE or
// RDRF is set, stores to TDR, loads RDR and stores the baud code to SCCR.
// Behavioural models stand in for the outside world on the serial line: a
// PC terminal that sends and receives at exactly 9600 baud, and an RFID card
// reader that sends 12-byte tag frames (0x0A, ten ASCII digits, 0x0D) at
// exactly 2400 baud while its active-low enable is held low.
//
// Scenarios, in order:
//   1. register access: reset values, SCCR write/read back, addresses outside
//      the window do not reach the UART;
//   2. loopback: TxD tied to RxD, byte 0x65 at 9600 baud, bit time checked
//      against 104 us;
//   3. half duplex: a message ending in carriage return is received into a
//      table, then sent back; the retransmitted frames must follow each other
//      at exactly 10 bit times (one stop bit);
//   4. full duplex echo: the terminal streams characters back-to-back while
//      the program echoes each one; every character must come back;
//   5. false start and overrun: a glitch on the idle line yields no byte; two
//      bytes arriving unread leave the first in RDR;
//   6. RFID: baud switched to 2400, two tag frames read into a table.
// Each mechanism (TDRE wait, RDRF wait, SYNC start, back-to-back restart,
// false start, overrun, baud switch) is counted and must occur at least once.
module tb_uart_mmio;
  import uart_pkg::*;

  localparam logic [7:0] A_RDR  = 8'hF0;
  localparam logic [7:0] A_TDR  = 8'hF1;
  localparam logic [7:0] A_SCSR = 8'hF2;
  localparam logic [7:0] A_SCCR = 8'hF3;
  localparam real    CLK_NS   = 10.0;                 // 100 MHz
  localparam real    PC_BIT_NS   = 1.0e9 / 9600.0;
  localparam real    RFID_BIT_NS = 1.0e9 / 2400.0;
  localparam int     N_ECHO = 150;
  localparam longint POLL_LIMIT = 600_000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] mem_addr = 8'h00;
  logic       mem_we = 1'b0, mem_re = 1'b0;
  logic [7:0] mem_wdata = 8'h00;
  logic [7:0] mem_rdata;
  logic       uart_sel;
  logic       rxd, txd;

  // serial line: loopback, or the AND of all idle-high senders
  logic loopback = 1'b0;
  logic pc_txd = 1'b1, rfid_sout = 1'b1, glitch_n = 1'b1;
  logic rfid_enable_n = 1'b1;
  assign rxd = loopback ? txd : (pc_txd & rfid_sout & glitch_n);

  int     checks = 0, failures = 0;
  longint cycle = 0;
  int     n_tdre_wait = 0, n_rdrf_wait = 0, n_sync_start = 0, n_b2b = 0;
  int     n_false_start = 0, n_overrun = 0, n_baud_switch = 0;
  int     n_loopback = 0, n_echo = 0, n_tags = 0;

  always #(CLK_NS / 2.0) clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  uart_mmio dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- processor bus model ----------------
  task automatic store(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk);
    mem_addr = a; mem_wdata = d; mem_we = 1'b1;
    @(posedge clk);
    #1 mem_we = 1'b0;
  endtask

  task automatic load(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk);
    mem_addr = a; mem_re = 1'b1;
    #1 d = mem_rdata;
    @(posedge clk);
    #1 mem_re = 1'b0;
  endtask

  // poll SCSR until the flag is set; counts a wait if it was not set at once
  task automatic poll(input int bitpos, ref int n_wait);
    logic [7:0] s;
    longint n = 0;
    load(A_SCSR, s);
    if (!s[bitpos]) n_wait++;
    while (!s[bitpos] && n < POLL_LIMIT) begin
      load(A_SCSR, s);
      n++;
    end
    check(s[bitpos] == 1'b1, $sformatf("timed out polling SCSR bit %0d", bitpos));
  endtask

  task automatic putc(input logic [7:0] c);
    poll(SCSR_TDRE_BIT, n_tdre_wait);
    store(A_TDR, c);
  endtask

  task automatic getc(output logic [7:0] c);
    poll(SCSR_RDRF_BIT, n_rdrf_wait);
    load(A_RDR, c);
  endtask

  // ---------------- serial line models ----------------
  task automatic serial_send(ref logic line, input logic [7:0] d, input real bit_ns);
    line = 1'b0;
    #(bit_ns);
    for (int b = 0; b < 8; b++) begin
      line = d[b];
      #(bit_ns);
    end
    line = 1'b1;
    #(bit_ns);
  endtask

  // terminal receiver: decodes TxD at 9600 baud (or the RFID rate, unused)
  logic [7:0] pc_rxq [$];
  real        mon_bit_ns = PC_BIT_NS;
  initial begin : pc_receiver
    logic [7:0] d;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      #(mon_bit_ns / 2.0);
      if (txd == 1'b0) begin
        for (int b = 0; b < 8; b++) begin
          #(mon_bit_ns);
          d[b] = txd;
        end
        #(mon_bit_ns);
        check(txd == 1'b1, "stop bit on TxD");
        pc_rxq.push_back(d);
      end
    end
  end

  // frame timing on TxD in clocks: start-to-start spacing
  int     tx_bit_clk;          // expected UART bit time at the current code
  longint last_start = -1;
  logic   txd_q = 1'b1;
  logic   in_frame = 1'b0;
  longint frame_start = 0;
  always @(posedge clk) begin
    txd_q <= txd;
    if (rst_n && !in_frame && txd_q && !txd) begin
      in_frame    <= 1'b1;
      frame_start <= cycle;
      if (last_start >= 0 && cycle - last_start == 10 * longint'(tx_bit_clk)) n_b2b++;
      else n_sync_start++;
      last_start  <= cycle;
    end else if (in_frame && cycle - frame_start >= 19 * longint'(tx_bit_clk) / 2) begin
      in_frame <= 1'b0;        // middle of the stop bit
    end
  end

  function automatic int bit_clocks(input logic [2:0] sel);
    // prescaler of 100 MHz / (16 x 38400), rounded down, times 2^(sel+1) x 8
    return (100_000_000 / 614400) * (2 << sel) * 8;
  endfunction

  // ---------------- programs ----------------
  task automatic set_baud(input logic [2:0] sel);
    logic [7:0] r;
    store(A_SCCR, {5'b0, sel});
    load(A_SCCR, r);
    check(r == {5'b0, sel}, $sformatf("SCCR reads %02h after writing %0d", r, sel));
    tx_bit_clk = bit_clocks(sel);
    n_baud_switch++;
  endtask

  initial begin
    logic [7:0] r;
    logic [7:0] msg [$];
    logic [7:0] table_q [$];
    logic [7:0] sent_q [$];
    string      text;
    string      tag_ids [2];
    longint     t0;
    tx_bit_clk = bit_clocks(0);

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1. register access
    load(A_SCSR, r);
    check(r == 8'h80, $sformatf("SCSR after reset %02h, expected 80", r));
    load(A_SCCR, r);
    check(r == 8'h00, $sformatf("SCCR after reset %02h, expected 00", r));
    load(8'h12, r);
    check(r == 8'h00 && !uart_sel, "address outside the window reads 0, not selected");
    store(8'h11, 8'h5A);   // same offset as TDR, other window
    load(A_SCSR, r);
    check(r == 8'h80, "store outside the window did not reach TDR");
    set_baud(BAUD_9600);

    // 2. loopback of 0x65: start bit alone low (bit 0 of 0x65 is 1)
    loopback = 1'b1;
    putc(8'h65);
    @(negedge txd);
    t0 = cycle;
    @(posedge txd);
    check((cycle - t0) * 10 >= 103_000 && (cycle - t0) * 10 <= 105_000,
          $sformatf("start bit lasts %0d ns, expected about 104 us", (cycle - t0) * 10));
    check(cycle - t0 == longint'(bit_clocks(BAUD_9600)), "start bit is one divider bit time");
    getc(r);
    check(r == 8'h65, $sformatf("loopback byte %02h, expected 65", r));
    if (r == 8'h65) n_loopback++;
    repeat (2 * bit_clocks(BAUD_9600)) @(posedge clk);
    loopback = 1'b0;
    void'(pc_rxq.size());
    pc_rxq.delete();

    // 3. half duplex: receive a message up to CR, then retransmit it
    text = "Hello, Instructional Processor!";
    fork
      begin
        for (int i = 0; i < text.len(); i++) serial_send(pc_txd, text[i], PC_BIT_NS);
        serial_send(pc_txd, 8'h0D, PC_BIT_NS);
      end
      begin
        do begin
          getc(r);
          table_q.push_back(r);
        end while (r != 8'h0D && table_q.size() < 64);
      end
    join
    check(table_q.size() == text.len() + 1, $sformatf("message length %0d", table_q.size()));
    for (int i = 0; i < text.len() && i < table_q.size(); i++)
      check(table_q[i] == text[i], $sformatf("message char %0d: %02h expected %02h", i, table_q[i], text[i]));
    begin
      automatic int b2b_before = n_b2b;
      foreach (table_q[i]) putc(table_q[i]);
      repeat (25 * bit_clocks(BAUD_9600)) @(posedge clk);
      check(n_b2b - b2b_before == table_q.size() - 1,
            $sformatf("%0d of %0d retransmitted frames followed at exactly 10 bit times",
                      n_b2b - b2b_before, table_q.size() - 1));
    end
    check(pc_rxq.size() == table_q.size(), $sformatf("terminal got %0d chars back", pc_rxq.size()));
    foreach (table_q[i])
      if (i < pc_rxq.size()) check(pc_rxq[i] == table_q[i], $sformatf("retransmitted char %0d", i));
    pc_rxq.delete();

    // 4. full duplex echo of a continuous stream
    fork
      for (int i = 0; i < N_ECHO; i++) begin
        automatic logic [7:0] c = 8'($urandom_range(32, 126));
        sent_q.push_back(c);
        serial_send(pc_txd, c, PC_BIT_NS);
      end
      for (int i = 0; i < N_ECHO; i++) begin
        getc(r);
        putc(r);
      end
    join
    repeat (25 * bit_clocks(BAUD_9600)) @(posedge clk);
    check(pc_rxq.size() == N_ECHO, $sformatf("echo returned %0d of %0d chars", pc_rxq.size(), N_ECHO));
    foreach (sent_q[i]) begin
      if (i < pc_rxq.size()) begin
        check(pc_rxq[i] == sent_q[i], $sformatf("echo char %0d: %02h expected %02h", i, pc_rxq[i], sent_q[i]));
        if (pc_rxq[i] == sent_q[i]) n_echo++;
      end
    end
    pc_rxq.delete();

    // 5a. false start: a glitch shorter than half a bit on the idle line
    glitch_n = 1'b0;
    #(PC_BIT_NS / 5.0);
    glitch_n = 1'b1;
    #(3.0 * PC_BIT_NS);
    load(A_SCSR, r);
    check(r[SCSR_RDRF_BIT] == 1'b0, "glitch produced no byte");
    if (r[SCSR_RDRF_BIT] == 1'b0) n_false_start++;

    // 5b. overrun: two bytes arrive, none read in between
    serial_send(pc_txd, 8'h31, PC_BIT_NS);
    serial_send(pc_txd, 8'h32, PC_BIT_NS);
    #(PC_BIT_NS);
    getc(r);
    check(r == 8'h31, $sformatf("after overrun RDR %02h, expected first byte 31", r));
    load(A_SCSR, r);
    check(r[SCSR_RDRF_BIT] == 1'b0, "second byte was dropped");
    if (r[SCSR_RDRF_BIT] == 1'b0) n_overrun++;

    // 6. RFID card reader at 2400 baud
    set_baud(BAUD_2400);
    tag_ids[0] = "0415AB82C9";
    tag_ids[1] = "3F00D1E7A4";
    for (int t = 0; t < 2; t++) begin
      automatic logic [7:0] id [$];
      rfid_enable_n = 1'b0;    // the program enables the reader
      fork
        begin
          #(2.0 * RFID_BIT_NS);
          if (!rfid_enable_n) begin
            serial_send(rfid_sout, 8'h0A, RFID_BIT_NS);
            for (int i = 0; i < 10; i++) serial_send(rfid_sout, tag_ids[t][i], RFID_BIT_NS);
            serial_send(rfid_sout, 8'h0D, RFID_BIT_NS);
          end
        end
        begin
          automatic int guard = 0;
          do begin getc(r); guard++; end while (r != 8'h0A && guard < 20);
          do begin
            getc(r);
            if (r != 8'h0D) id.push_back(r);
          end while (r != 8'h0D && id.size() < 16);
        end
      join
      rfid_enable_n = 1'b1;
      check(id.size() == 10, $sformatf("tag %0d: %0d ID bytes", t, id.size()));
      begin
        automatic bit ok = (id.size() == 10);
        for (int i = 0; i < 10 && i < id.size(); i++) if (id[i] != tag_ids[t][i]) ok = 0;
        check(ok, $sformatf("tag %0d ID matches", t));
        if (ok) n_tags++;
        // the last ID character is what the display would show
        if (id.size() == 10) check(id[9] == tag_ids[t][9], "last ID character");
      end
    end

    // mechanism coverage
    check(n_loopback == 1, "loopback test passed");
    check(n_tdre_wait > 0, "program waited for TDRE");
    check(n_rdrf_wait > 0, "program waited for RDRF");
    check(n_sync_start > 0, "transmitter started from idle via SYNC");
    check(n_b2b > 0, "transmitter restarted back-to-back without a second stop bit");
    check(n_false_start > 0, "false start rejected");
    check(n_overrun > 0, "overrun dropped a byte");
    check(n_baud_switch >= 2, "baud rate switched");
    check(n_echo == N_ECHO, "all echo characters returned");
    check(n_tags == 2, "both RFID tags read");
    $display("loopback=%0d tdre_wait=%0d rdrf_wait=%0d sync_start=%0d back_to_back=%0d false_start=%0d overrun=%0d baud_switch=%0d echo=%0d tags=%0d",
             n_loopback, n_tdre_wait, n_rdrf_wait, n_sync_start, n_b2b, n_false_start,
             n_overrun, n_baud_switch, n_echo, n_tags);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e9 * 0.6);            // 600 ms of simulated time
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
