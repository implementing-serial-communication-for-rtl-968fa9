// uart: the hardware UART with its processor-visible registers.
//
// Holds the receive data register RDR, the transmit data register TDR, the
// status flags TDRE and RDRF (read together as SCSR) and the baud-rate
// control register SCCR, and joins the clock divider (uart_baud_gen), the
// transmitter (uart_tx) and the receiver (uart_rx). Three control strobes from
// the memory interface drive it: Write TDR loads TDR and clears TDRE, Read RDR
// clears RDRF, Write BAUD loads the baud-select code into SCCR. The transmitter
// sets TDRE when it moves TDR into its shift register; the receiver loads RDR
// and sets RDRF when a byte is complete. Transmitter and receiver run at the
// same time, so the UART is full duplex.
//
// Interface: strobes are one clock wide; din is the processor's store data;
// rdr/tdr/scsr/sccr are the register contents for loads. SCSR = {TDRE, RDRF,
// 6'b0}; SCCR = {5'b0, sel}. RxD passes through a two-flop synchroniser first.
// Reset: TDRE = 1, RDRF = 0, SCCR = 0 (38400 baud), RDR = TDR = 0.
//
// The registers, flags, control strobes and the split into divider,
// transmitter and receiver follow the original design; the flag bit positions,
// SCCR encoding, synchroniser and reset values are this design's own.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned PRESCALE = 162
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_rdr,
  input  logic       wr_tdr,
  input  logic       wr_baud,
  input  logic [7:0] din,
  output logic [7:0] rdr,
  output logic [7:0] tdr,
  output logic [7:0] scsr,
  output logic [7:0] sccr,
  input  logic       rxd,
  output logic       txd,
  output logic       bclk
);

  logic                  tdre, rdrf;
  logic [SCCR_SEL_W-1:0] baud_sel;
  logic [1:0]            rxd_sync;
  logic                  bclkx8_tick, bclk_tick;
  logic                  load_tsr, load_rdr;
  logic [7:0]            rsr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdr      <= '0;
      tdr      <= '0;
      tdre     <= 1'b1;
      rdrf     <= 1'b0;
      baud_sel <= '0;
      rxd_sync <= 2'b11;
    end else begin
      rxd_sync <= {rxd_sync[0], rxd};
      if (wr_tdr)        tdr <= din;
      if (wr_baud)       baud_sel <= din[SCCR_SEL_W-1:0];
      // A new byte written while the old one moves to TSR keeps TDRE clear.
      if (wr_tdr)        tdre <= 1'b0;
      else if (load_tsr) tdre <= 1'b1;
      if (load_rdr) begin
        rdr  <= rsr;
        rdrf <= 1'b1;
      end else if (rd_rdr) begin
        rdrf <= 1'b0;
      end
    end
  end

  always_comb begin
    scsr = '0;
    scsr[SCSR_TDRE_BIT] = tdre;
    scsr[SCSR_RDRF_BIT] = rdrf;
    sccr = 8'(baud_sel);
  end

  uart_baud_gen #(.PRESCALE(PRESCALE)) u_baud (
    .clk, .rst_n,
    .sel        (baud_sel),
    .bclkx8_tick,
    .bclk_tick,
    .bclk
  );

  uart_tx u_tx (
    .clk, .rst_n,
    .bclk_tick,
    .tdr,
    .tdre,
    .load_tsr,
    .txd
  );

  uart_rx u_rx (
    .clk, .rst_n,
    .bclkx8_tick,
    .rxd      (rxd_sync[1]),
    .rdrf,
    .rsr,
    .load_rdr,
    .overrun  ()
  );

endmodule
