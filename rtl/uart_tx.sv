// uart_tx: UART transmitter with its control state machine.
//
// The processor writes a byte into TDR, which clears TDRE. In IDLE the
// transmitter sees TDRE = 0, copies TDR into the transmit shift register TSR
// (load_tsr, which makes the register block set TDRE again so the next byte
// can be written) and moves to SYNC. SYNC waits for the next rising edge of the
// free-running bit clock Bclk and drives the start bit. In TDATA each Bclk
// edge shifts TSR right one place, filling with ones, while the bit counter
// Bct counts: shifts 1..8 put the data bits on TxD LSB first and shift 9 the
// stop bit. At the Bclk edge that ends the stop bit (Bct = 9) the machine
// either starts the next byte at once - loading TSR, driving its start bit and
// clearing Bct without leaving TDATA - when TDRE = 0 shows another byte is
// waiting, or returns to IDLE. The direct restart keeps back-to-back bytes to a
// single stop bit; going through SYNC again would add a second stop bit time
// and let a full-duplex echo fall behind its receiver.
//
// Interface: bclk_tick is a one-clock pulse per Bclk rising edge; tdr/tdre
// come from the register block; load_tsr is a one-clock pulse; txd idles high.
// Timing: a frame is start + 8 data + 1 stop = 10 Bclk periods; the first
// start bit begins on the first Bclk edge after load_tsr.
//
// The states, the TSR shifting, Bct ending at 9 and the back-to-back restart
// follow the original design; the 9-bit TSR layout and reset values are this
// design's own.
module uart_tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bclk_tick,
  input  logic [7:0] tdr,
  input  logic       tdre,
  output logic       load_tsr,
  output logic       txd
);

  tx_state_e  state, nextstate;
  logic [8:0] tsr;        // {data, start-bit position}; tsr[0] drives TxD
  logic [3:0] bct;        // bits shifted since the start bit
  logic       start, shft_tsr, inc, clr;

  always_comb begin
    nextstate = state;
    load_tsr  = 1'b0;
    start     = 1'b0;
    shft_tsr  = 1'b0;
    inc       = 1'b0;
    clr       = 1'b0;
    unique case (state)
      TX_IDLE: begin
        if (!tdre) begin
          load_tsr  = 1'b1;
          nextstate = TX_SYNC;
        end
      end
      TX_SYNC: begin
        if (bclk_tick) begin
          start     = 1'b1;
          nextstate = TX_TDATA;
        end
      end
      TX_TDATA: begin
        if (!bclk_tick) begin
          nextstate = TX_TDATA;
        end else if (bct != 4'd9) begin
          shft_tsr = 1'b1;
          inc      = 1'b1;
        end else if (!tdre) begin
          // Next byte already waiting: start it without a second stop bit.
          load_tsr = 1'b1;
          start    = 1'b1;
          clr      = 1'b1;
        end else begin
          clr       = 1'b1;
          nextstate = TX_IDLE;
        end
      end
      default: nextstate = TX_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      tsr   <= '1;
      bct   <= '0;
    end else begin
      state <= nextstate;
      if (load_tsr)      tsr <= {tdr, ~start};
      else if (start)    tsr[0] <= 1'b0;
      else if (shft_tsr) tsr <= {1'b1, tsr[8:1]};
      if (clr)           bct <= '0;
      else if (inc)      bct <= bct + 4'd1;
    end
  end

  assign txd = tsr[0];

endmodule
