// uart_rx: UART receiver with 8x oversampling.
//
// In IDLE the receiver waits for RxD to go low. In START_DETECTED it counts
// ticks of the 8x-baud clock; if RxD returns high before the fourth tick the
// low level was a glitch and it goes back to IDLE, otherwise the fourth tick
// marks the middle of the start bit and it moves to RECV_DATA. There, every
// eighth tick falls near the middle of the next bit: the first eight samples
// are shifted into the receive shift register RSR from the top (LSB first on
// the line), and the ninth, in the stop bit, ends the frame. If RDRF is clear
// the byte is handed over with load_rdr, which makes the register block copy
// RSR into RDR and set RDRF; if the processor has not yet read the previous
// byte (RDRF = 1) the new byte is dropped and overrun pulses. The receiver is
// back in IDLE in the middle of the stop bit, ready for a start bit that
// follows directly.
//
// Interface: bclkx8_tick is a one-clock pulse at 8x the baud rate; rxd must
// already be synchronised to clk; load_rdr and overrun are one-clock pulses.
// Timing: load_rdr comes about 9.5 bit times after the start bit's falling edge.
//
// That the receiver fills RSR from RxD and loads RDR/sets RDRF follows the
// original design; the oversampling scheme follows the MC6811-style UART the
// design was adapted from, and the overrun handling is this design's choice.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bclkx8_tick,
  input  logic       rxd,
  input  logic       rdrf,
  output logic [7:0] rsr,
  output logic       load_rdr,
  output logic       overrun
);

  rx_state_e  state, nextstate;
  logic [2:0] ct1;        // 8x ticks within a bit
  logic [3:0] ct2;        // bits received
  logic       inc1, clr1, inc2, clr2, shft_rsr;

  always_comb begin
    nextstate = state;
    inc1      = 1'b0;
    clr1      = 1'b0;
    inc2      = 1'b0;
    clr2      = 1'b0;
    shft_rsr  = 1'b0;
    load_rdr  = 1'b0;
    overrun   = 1'b0;
    unique case (state)
      RX_IDLE: begin
        if (!rxd) nextstate = RX_START_DETECTED;
      end
      RX_START_DETECTED: begin
        if (bclkx8_tick) begin
          if (rxd) begin
            clr1      = 1'b1;
            nextstate = RX_IDLE;
          end else if (ct1 == 3'd3) begin
            clr1      = 1'b1;
            nextstate = RX_RECV_DATA;
          end else begin
            inc1 = 1'b1;
          end
        end
      end
      RX_RECV_DATA: begin
        if (bclkx8_tick) begin
          if (ct1 != 3'd7) begin
            inc1 = 1'b1;
          end else if (ct2 != 4'd8) begin
            clr1     = 1'b1;
            inc2     = 1'b1;
            shft_rsr = 1'b1;
          end else begin
            clr1      = 1'b1;
            clr2      = 1'b1;
            nextstate = RX_IDLE;
            if (rdrf) overrun  = 1'b1;
            else      load_rdr = 1'b1;
          end
        end
      end
      default: nextstate = RX_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= RX_IDLE;
      ct1   <= '0;
      ct2   <= '0;
      rsr   <= '0;
    end else begin
      state <= nextstate;
      if (clr1)      ct1 <= '0;
      else if (inc1) ct1 <= ct1 + 3'd1;
      if (clr2)      ct2 <= '0;
      else if (inc2) ct2 <= ct2 + 4'd1;
      if (shft_rsr)  rsr <= {rxd, rsr[7:1]};
    end
  end

endmodule
