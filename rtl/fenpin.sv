// fenpin: frequency divider ("fen pin") from the board clock to the 1 Hz
// clock that paces the traffic lights.
//
// A counter runs from 0 to HALF-1, HALF = CLK_HZ / (2*OUT_HZ); each time it
// wraps, clkout toggles. clkout is therefore a square wave of exactly
// CLK_HZ/OUT_HZ input cycles per period with a 50 % duty cycle: with the
// defaults, 50 MHz in and 1 Hz out, the counter is 25 bits wide and clkout
// toggles every 25 000 000 cycles. clkout is a register output, so it
// changes one clk edge after the counter wraps.
//
// Interface: clk in, clkout out, no reset, as in the original entity. The
// registers start at whatever value configuration gives them (zero on an
// FPGA); the >= compare makes the counter recover from any start value within
// one wrap, so the phase of clkout is arbitrary but its period is exact from
// the first toggle on. The 50 MHz and 1 Hz figures follow the
// original design; the toggle-at-half-period structure is this design's own.
module fenpin #(
  parameter int unsigned CLK_HZ = 50_000_000,  // input clock frequency
  parameter int unsigned OUT_HZ = 1            // output clock frequency
) (
  input  logic clk,
  output logic clkout
);

  localparam int unsigned HALF = CLK_HZ / (2 * OUT_HZ);
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  if (HALF < 1) begin : g_bad_ratio
    $error("fenpin: CLK_HZ must be at least 2*OUT_HZ");
  end

  logic [CW-1:0] cnt;
  logic          out_q;

  always_ff @(posedge clk) begin
    if (cnt >= CW'(HALF - 1)) begin
      cnt   <= '0;
      out_q <= ~out_q;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end

  assign clkout = out_q;

endmodule
