// traffic_light_top: FPGA top level of a two-road traffic-light controller
// with countdown display.
//
// The board clock (50 MHz) enters fenpin, which divides it to a 1 Hz clock;
// that clock runs jiaotongdeng, which sequences the east-west (dx) and
// north-south (nb) red/yellow/green lamps through a 39 s / 4 s / 20 s / 4 s
// cycle and shows the seconds left in the current phase on two common-anode
// seven-segment digits (leds1 tens, leds2 units). reset (active high,
// asynchronous) restarts the cycle at east-west green with 39 s to go.
//
// Timing: everything in jiaotongdeng changes on the rising edge of the
// divided clock, CLK_HZ/TICK_HZ board cycles apart; when the divider starts
// from zero, the first rising edge of the divided clock comes CLK_HZ/TICK_HZ
// board cycles after configuration. The divided clock is used as a clock, as in the original
// two-entity design; this is fine at 1 Hz since nothing crosses between the
// two clock domains except reset, which is asynchronous.
//
// The structure (divider feeding the controller), the ports and the phase
// lengths follow the original design. Parameters: CLK_HZ and TICK_HZ set the
// divider; the four *_S parameters set the phase lengths in ticks.
module traffic_light_top
  import traffic_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned TICK_HZ     = 1,
  parameter int unsigned EW_GREEN_S  = 39,
  parameter int unsigned EW_YELLOW_S = 4,
  parameter int unsigned NS_GREEN_S  = 20,
  parameter int unsigned NS_YELLOW_S = 4
) (
  input  logic       clk,     // board clock, CLK_HZ
  input  logic       reset,   // active high, asynchronous
  output lamp_t      dx,      // east-west lamps  {red, yellow, green}, 1 = lit
  output lamp_t      nb,      // north-south lamps {red, yellow, green}, 1 = lit
  output logic [6:0] leds1,   // countdown tens digit, active low {g..a}
  output logic [6:0] leds2    // countdown units digit, active low {g..a}
);

  logic clk_1hz;

  fenpin #(
    .CLK_HZ (CLK_HZ),
    .OUT_HZ (TICK_HZ)
  ) inst (
    .clk    (clk),
    .clkout (clk_1hz)
  );

  jiaotongdeng #(
    .EW_GREEN_S  (EW_GREEN_S),
    .EW_YELLOW_S (EW_YELLOW_S),
    .NS_GREEN_S  (NS_GREEN_S),
    .NS_YELLOW_S (NS_YELLOW_S)
  ) inst2 (
    .clk   (clk_1hz),
    .reset (reset),
    .dx    (dx),
    .nb    (nb),
    .leds1 (leds1),
    .leds2 (leds2)
  );

endmodule
