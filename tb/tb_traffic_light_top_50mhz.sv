// tb_traffic_light_top_50mhz: the traffic-light top level with every
// parameter at its default, a 50 MHz board clock divided to 1 Hz and the
// 39/4/20/4 s plan, run for the first TICKS seconds after reset. It checks the
// full-size divider (50 000 000 board cycles per tick) and the first steps of
// the S1 countdown; a whole 67 s cycle at 50 MHz takes about 20 minutes of
// simulation, so the full cycle is covered by tb_traffic_light_top with a
// shortened divider instead.
//
// The testbench samples the outputs every microsecond rather than at every
// board cycle. Each tick of the 1 Hz clock moves the units digit, so each
// output change is one tick: its time must be exactly 1 s (50 000 000 board
// cycles) after the previous one, and the lamps and digits must match the
// reference for that many seconds after reset.
module tb_traffic_light_top_50mhz;
  import seg_ref_pkg::*;

  localparam longint SECOND_NS = 64'd1_000_000_000;
  localparam int     TICKS     = 3;    // seconds simulated after reset

  logic clk = 1'b0;
  logic reset;
  logic [2:0] dx, nb;
  logic [6:0] leds1, leds2;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  traffic_light_top dut (
    .clk(clk), .reset(reset), .dx(dx), .nb(nb), .leds1(leds1), .leds2(leds2));

  initial begin : watchdog
    #(SECOND_NS * (longint'(TICKS) + 3));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint last;
    int ph, left;
    logic [19:0] prev;
    reset = 1'b0;   // a rising edge, so the asynchronous reset acts at once
    #1 reset = 1'b1;
    #1000;
    checks++;
    if (dx !== 3'b001 || nb !== 3'b100 || leds1 !== seg_ca(3) || leds2 !== seg_ca(9)) begin
      failures++;
      $display("during reset: dx=%b nb=%b leds1=%b leds2=%b", dx, nb, leds1, leds2);
    end
    @(negedge clk) reset = 1'b0;
    last = -1;
    for (int t = 1; t <= TICKS; t++) begin
      prev = {dx, nb, leds1, leds2};
      while ({dx, nb, leds1, leds2} == prev) #1000;
      if (last >= 0) begin
        checks++;
        if (longint'($time) - last != SECOND_NS) begin
          failures++;
          $display("tick %0d came %0d ns after the previous one", t, longint'($time) - last);
        end
      end else begin
        checks++;
        if (longint'($time) > SECOND_NS + 2000) begin
          failures++;
          $display("first tick only after %0d ns", longint'($time));
        end
      end
      last = longint'($time);
      phase_at(t % 67, 39, 4, 20, 4, ph, left);
      checks++;
      if ({dx, nb} !== lamps(ph) || leds1 !== seg_ca(left / 10) || leds2 !== seg_ca(left % 10)) begin
        failures++;
        $display("tick %0d: dx=%b nb=%b leds1=%b leds2=%b, expected S%0d with %0d s left",
                 t, dx, nb, leds1, leds2, ph + 1, left);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
