// tb_echo_file: full-duplex echo of a long text stream through the UART.
//
// A terminal model streams N_CHARS printable characters back-to-back (one
// stop bit, no idle time) at exactly 9600 baud into RxD while a bus-master
// model runs the echo program: poll RDRF, load RDR, poll TDRE, store TDR.
// A second terminal model decodes TxD at exactly 9600 baud. Every character
// must come back, in order, which needs the transmitter to keep one stop bit
// between back-to-back bytes; the test also reports the largest lag between
// a character's arrival and its echo. To keep a stream of thousands of
// characters short to simulate, the design runs from a 10 MHz clock, which
// gives a prescaler of 16 and a bit time of 1024 clocks (9766 baud, 1.7%
// fast); the behaviour is the same as at 100 MHz.
module tb_echo_file;
  import uart_pkg::*;

  localparam longint CLK_HZ  = 10_000_000;
  localparam real    CLK_NS  = 1.0e9 / 10_000_000.0;
  localparam real    BIT_NS  = 1.0e9 / 9600.0;
  localparam int     N_CHARS = 2000;
  localparam logic [7:0] A_RDR = 8'hF0, A_TDR = 8'hF1, A_SCSR = 8'hF2, A_SCCR = 8'hF3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] mem_addr = 8'h00;
  logic       mem_we = 1'b0, mem_re = 1'b0;
  logic [7:0] mem_wdata = 8'h00;
  logic [7:0] mem_rdata;
  logic       uart_sel;
  logic       rxd = 1'b1;
  logic       txd;

  int     checks = 0, failures = 0;
  int     n_back_to_back = 0;
  logic [7:0] sent [N_CHARS];
  realtime    sent_t [N_CHARS];
  logic [7:0] got  [$];
  realtime    max_lag = 0;

  always #(CLK_NS / 2.0) clk = ~clk;

  uart_mmio #(.CLK_FREQ_HZ(CLK_HZ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $realtime, what);
    end
  endtask

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

  // terminal receiver on TxD
  initial begin : terminal_rx
    automatic logic [7:0] d;
    automatic realtime last_start = -1.0;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      if (last_start >= 0 && $realtime - last_start < 10.5 * 1024.0 * CLK_NS) n_back_to_back++;
      last_start = $realtime;
      #(BIT_NS / 2.0);
      for (int b = 0; b < 8; b++) begin
        #(BIT_NS);
        d[b] = txd;
      end
      #(BIT_NS);
      check(txd == 1'b1, "stop bit");
      if (got.size() < N_CHARS && $realtime - sent_t[got.size()] > max_lag)
        max_lag = $realtime - sent_t[got.size()];
      got.push_back(d);
    end
  end

  initial begin
    logic [7:0] r, s;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    store(A_SCCR, {5'b0, BAUD_9600});
    foreach (sent[i]) sent[i] = (i % 64 == 63) ? 8'h0D : 8'($urandom_range(32, 126));
    fork
      // terminal sender: continuous stream
      foreach (sent[i]) begin
        sent_t[i] = $realtime;
        rxd = 1'b0;
        #(BIT_NS);
        for (int b = 0; b < 8; b++) begin
          rxd = sent[i][b];
          #(BIT_NS);
        end
        rxd = 1'b1;
        #(BIT_NS);
      end
      // echo program
      repeat (N_CHARS) begin
        do load(A_SCSR, s); while (!s[SCSR_RDRF_BIT]);
        load(A_RDR, r);
        do load(A_SCSR, s); while (!s[SCSR_TDRE_BIT]);
        store(A_TDR, r);
      end
    join
    #(25.0 * BIT_NS);
    check(got.size() == N_CHARS, $sformatf("echoed %0d of %0d characters", got.size(), N_CHARS));
    foreach (sent[i])
      if (i < got.size()) check(got[i] == sent[i], $sformatf("char %0d: %02h expected %02h", i, got[i], sent[i]));
    check(n_back_to_back > 0, "echo frames sent back-to-back");
    check(max_lag < 3.0 * 10.0 * BIT_NS, $sformatf("echo lag %0t", max_lag));
    $display("echoed=%0d back_to_back=%0d max_lag_us=%0.1f", got.size(), n_back_to_back, max_lag / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(real'(N_CHARS + 50) * 10.0 * BIT_NS * 1.2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
