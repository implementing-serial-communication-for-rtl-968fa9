// uart_baud_gen: the UART's clock divider.
//
// A prescaler divides the system clock by PRESCALE and advances an 8-bit
// counter. Bit `sel` of that counter is the 8x-baud clock BclkX8, so each step
// of the select code halves the rate; a 3-bit counter on BclkX8 then gives the
// bit clock Bclk. Both clocks are delivered as one-clock enable pulses on their
// rising edges (bclkx8_tick, bclk_tick), so the whole UART stays in the system
// clock domain; the Bclk level is also brought out for observation.
//
// Timing: bclkx8_tick every PRESCALE * 2**(sel+1) clocks, bclk_tick every 8 of
// those. With a 100 MHz clock and PRESCALE = 162, sel = 2 gives a bit time of
// 10432 clocks (104.3 us, 9600 baud) and sel = 4 gives 2396 baud. Bclk runs
// freely; a change of sel takes effect at once.
//
// That the SCCR sets the baud rate and that a clock divider produces Bclk come
// from the original design; the prescaler-plus-counter structure, the select
// code and PRESCALE are this design's own.
module uart_baud_gen #(
  parameter int unsigned PRESCALE = 162
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output logic       bclkx8_tick,
  output logic       bclk_tick,
  output logic       bclk
);

  localparam int unsigned PRE_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PRE_W-1:0] pre_cnt;
  logic [7:0]       div_cnt;
  logic [7:0]       div_next;
  logic [2:0]       x8_cnt;
  logic             pre_wrap;
  logic             x8_rise;

  assign pre_wrap = (pre_cnt == PRE_W'(PRESCALE - 1));
  assign div_next = div_cnt + 8'd1;
  // BclkX8 = div_cnt[sel] rises when the counter advances and that bit goes 0->1.
  assign x8_rise  = pre_wrap && !div_cnt[sel] && div_next[sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt     <= '0;
      div_cnt     <= '0;
      x8_cnt      <= '0;
      bclkx8_tick <= 1'b0;
      bclk_tick   <= 1'b0;
    end else begin
      pre_cnt     <= pre_wrap ? '0 : pre_cnt + PRE_W'(1);
      if (pre_wrap) div_cnt <= div_next;
      bclkx8_tick <= x8_rise;
      bclk_tick   <= 1'b0;
      if (bclkx8_tick) begin
        x8_cnt <= x8_cnt + 3'd1;
        // Bclk = x8_cnt[2]; it rises when the counter steps from 3 to 4.
        bclk_tick <= (x8_cnt == 3'd3);
      end
    end
  end

  assign bclk = x8_cnt[2];

endmodule
