// uart_mmio: memory-mapped interface between the processor and the UART.
//
// The UART occupies four consecutive byte addresses starting at UART_BASE:
// RDR (offset 0, read), TDR (offset 1, write), SCSR (offset 2, read) and SCCR
// (offset 3, read/write). A store to TDR issues Write TDR, a store to SCCR
// issues Write BAUD, and a load from RDR issues Read RDR, which clears RDRF.
// Other accesses have no side effect; writes to RDR and SCSR are ignored.
// Loads return the addressed register combinationally on mem_rdata, and
// uart_sel tells the processor's memory model that the address belongs to the
// UART (mem_rdata is zero otherwise). RxD and TxD are the serial pins.
//
// Programs use the UART by polling: wait for TDRE = 1 then store to TDR; wait
// for RDRF = 1 then load RDR. Because receiver and transmitter are separate,
// a program can receive one byte while the previous one is still being sent.
//
// Interface timing: mem_we and mem_re are one-clock strobes sampled on the
// rising clock edge; register updates are visible on the next clock.
//
// The register set and the three control signals follow the original design;
// the address window, offsets of SCSR and SCCR, and the bus handshake are this
// design's own.
module uart_mmio
  import uart_pkg::*;
#(
  parameter longint unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned     ADDR_W      = 8,
  parameter logic [ADDR_W-1:0] UART_BASE = ADDR_W'('hF0)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_we,
  input  logic              mem_re,
  input  logic [7:0]        mem_wdata,
  output logic [7:0]        mem_rdata,
  output logic              uart_sel,
  input  logic              rxd,
  output logic              txd
);

  localparam int unsigned PRESCALE = prescale_for(CLK_FREQ_HZ);

  uart_reg_e  reg_idx;
  logic       rd_rdr, wr_tdr, wr_baud;
  logic [7:0] rdr, tdr, scsr, sccr;

  assign uart_sel = (mem_addr[ADDR_W-1:2] == UART_BASE[ADDR_W-1:2]);
  assign reg_idx  = uart_reg_e'(mem_addr[1:0]);
  assign rd_rdr   = uart_sel && mem_re && (reg_idx == REG_RDR);
  assign wr_tdr   = uart_sel && mem_we && (reg_idx == REG_TDR);
  assign wr_baud  = uart_sel && mem_we && (reg_idx == REG_SCCR);

  always_comb begin
    mem_rdata = '0;
    if (uart_sel) begin
      unique case (reg_idx)
        REG_RDR:  mem_rdata = rdr;
        REG_TDR:  mem_rdata = tdr;
        REG_SCSR: mem_rdata = scsr;
        REG_SCCR: mem_rdata = sccr;
        default:  mem_rdata = '0;
      endcase
    end
  end

  uart #(.PRESCALE(PRESCALE)) u_uart (
    .clk, .rst_n,
    .rd_rdr, .wr_tdr, .wr_baud,
    .din (mem_wdata),
    .rdr, .tdr, .scsr, .sccr,
    .rxd, .txd,
    .bclk ()
  );

endmodule
