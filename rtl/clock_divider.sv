// Clock divider: makes slow_clock, a square wave DIVISOR*2 times slower than
// clk, as the ADC0809 and the sample-and-hold need (DIVISOR = 15 turns a
// 25.175 MHz board clock into about 840 kHz). It is also used to make the
// 16x baud-rate timing of the UART.
//
// A counter runs from 0 to DIVISOR-1 and slow_clock toggles when it wraps.
// Logic inside the FPGA does not clock on slow_clock: it runs on clk and uses
// the one-cycle strobes rise_tick and fall_tick, which are high in the clk
// cycle whose closing edge makes slow_clock rise or fall. slow_clock itself
// is only meant for the external chips. The tick outputs and the active-low
// asynchronous reset (slow_clock low, counter cleared) are this design's own
// choices; the division ratio 2*DIVISOR follows the published divider.
module clock_divider #(
  parameter int unsigned DIVISOR = 15
) (
  input  logic clk,
  input  logic rst_n,
  output logic slow_clock,
  output logic rise_tick,
  output logic fall_tick
);
  localparam int unsigned CW = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap      = (cnt == CW'(DIVISOR - 1));
  assign rise_tick = wrap && !slow_clock;
  assign fall_tick = wrap &&  slow_clock;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      slow_clock <= 1'b0;
    end else if (wrap) begin
      cnt        <= '0;
      slow_clock <= !slow_clock;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (DIVISOR >= 1) else $error("DIVISOR must be at least 1");
endmodule
