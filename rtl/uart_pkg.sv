// uart_pkg: types and constants shared by the memory-mapped UART.
//
// The UART exposes four byte registers to the processor through memory-mapped
// I/O: the receive and transmit data registers (RDR, TDR), the status register
// SCSR holding the flags TDRE (transmit data register empty) and RDRF (receive
// data register full), and the control register SCCR holding the baud-rate
// select code. RDR at offset 0 and TDR at offset 1 follow the register layout
// of the original system; SCSR at offset 2, SCCR at offset 3 and the flag bit
// positions (TDRE bit 7, RDRF bit 6, as on the MC6811) are this design's choice.
package uart_pkg;

  // Register offsets inside the UART address window.
  typedef enum logic [1:0] {
    REG_RDR  = 2'd0,
    REG_TDR  = 2'd1,
    REG_SCSR = 2'd2,
    REG_SCCR = 2'd3
  } uart_reg_e;

  localparam int unsigned SCSR_TDRE_BIT = 7;
  localparam int unsigned SCSR_RDRF_BIT = 6;
  localparam int unsigned SCCR_SEL_W    = 3;

  // Baud select codes: nominal rate = 38400 / 2**code.
  localparam logic [2:0] BAUD_38400 = 3'd0;
  localparam logic [2:0] BAUD_9600  = 3'd2;
  localparam logic [2:0] BAUD_2400  = 3'd4;
  localparam logic [2:0] BAUD_300   = 3'd7;

  // Transmitter control states.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,
    TX_SYNC  = 2'd1,
    TX_TDATA = 2'd2
  } tx_state_e;

  // Receiver control states.
  typedef enum logic [1:0] {
    RX_IDLE           = 2'd0,
    RX_START_DETECTED = 2'd1,
    RX_RECV_DATA      = 2'd2
  } rx_state_e;

  // Prescaler for 16 x 38400 Hz from the system clock, rounded down so the
  // UART is never slower than the nominal rate: an echo of a continuous
  // stream at the nominal rate then cannot fall behind its sender.
  function automatic int unsigned prescale_for(input longint unsigned clk_hz);
    return int'(clk_hz / 64'd614400);
  endfunction

endpackage
