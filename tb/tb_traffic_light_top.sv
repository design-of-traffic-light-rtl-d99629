// tb_traffic_light_top: end-to-end test of the traffic-light top level with
// the divider shortened to 8 board cycles per tick (CLK_HZ=8, TICK_HZ=1) and
// the default 39/4/20/4 phase plan.
//
// The testbench sees each tick as a change of the outputs (every tick moves
// the units digit), checks that ticks come exactly 8 board cycles apart, and
// after every tick compares both lamp groups and both digits with
// a reference computed from the number of ticks since reset. It counts how
// often each mechanism of the design happened and fails any that never did:
// ticks of the divider at the right spacing, entry into each of S1..S4, the
// wrap of the cycle from S4 back to S1, each phase's countdown reaching 01,
// and an asynchronous reset in mid-cycle.
module tb_traffic_light_top;
  import seg_ref_pkg::*;

  localparam int DIV = 8;   // board cycles per tick

  logic clk = 1'b0;
  logic reset;
  logic [2:0] dx, nb;
  logic [6:0] leds1, leds2;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  traffic_light_top #(.CLK_HZ(DIV), .TICK_HZ(1)) dut (
    .clk(clk), .reset(reset), .dx(dx), .nb(nb), .leds1(leds1), .leds2(leds2));

  initial begin : watchdog
    wait (cycles == 4000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_tick = 0, n_enter[4] = '{0, 0, 0, 0}, n_wrap = 0, n_zero[4] = '{0, 0, 0, 0}, n_reset = 0;

  int t = 0;             // ticks since reset was released
  int last_tick = -1;    // board cycle of the previous tick
  int prev_phase = 0;
  logic running = 1'b0;
  logic [19:0] prev_out;

  // Every tick changes the units digit (the countdown steps by one or reloads
  // with a different units digit), so a tick is seen as a change of outputs.
  always @(posedge clk) begin
    #1;
    if (running && {dx, nb, leds1, leds2} !== prev_out) begin
      int ph, left;
      if (last_tick >= 0) begin
        checks++;
        if (cycles - last_tick != DIV) begin
          failures++;
          $display("ticks %0d board cycles apart, expected %0d", cycles - last_tick, DIV);
        end
      end
      last_tick = cycles;
      n_tick++;
      t++;
      phase_at(t % 67, 39, 4, 20, 4, ph, left);
      checks++;
      if ({dx, nb} !== lamps(ph) || leds1 !== seg_ca(left / 10) || leds2 !== seg_ca(left % 10)) begin
        failures++;
        $display("tick %0d: dx=%b nb=%b leds1=%b leds2=%b, expected S%0d with %0d s left",
                 t, dx, nb, leds1, leds2, ph + 1, left);
      end
      if (ph != prev_phase) begin
        n_enter[ph]++;
        if (ph == 0 && prev_phase == 3) n_wrap++;
      end
      if (left == 1) n_zero[ph]++;
      prev_phase = ph;
    end
    prev_out = {dx, nb, leds1, leds2};
  end

  task automatic wait_ticks(input int n);
    int target = t + n;
    while (t < target) @(posedge clk);
    #2;
  endtask

  task automatic release_reset();
    @(negedge clk);
    reset = 1'b0; t = 0; prev_phase = 0; last_tick = -1; running = 1'b1;
    prev_out = {dx, nb, leds1, leds2};
  endtask

  task automatic check_reset_state(input string when);
    checks++;
    if (dx !== 3'b001 || nb !== 3'b100 || leds1 !== seg_ca(3) || leds2 !== seg_ca(9)) begin
      failures++;
      $display("%s: dx=%b nb=%b leds1=%b leds2=%b, expected S1 with 39 s left",
               when, dx, nb, leds1, leds2);
    end
  endtask

  initial begin
    reset = 1'b0;   // a rising edge, so the asynchronous reset acts at once
    #1 reset = 1'b1;
    repeat (3 * DIV) @(posedge clk);
    #1;
    check_reset_state("during reset");
    release_reset();
    // One and a half cycles: 67 + 50 ticks, ending in S3.
    wait_ticks(117);
    // Asynchronous reset in mid-cycle, between ticks.
    repeat (DIV / 4) @(negedge clk);
    running = 1'b0;
    reset = 1'b1;
    #1;
    check_reset_state("right after mid-cycle reset");
    if (dx === 3'b001) n_reset++;
    repeat (2 * DIV) @(posedge clk);
    #1;
    check_reset_state("held in reset");
    release_reset();
    wait_ticks(70);
    // Every mechanism must have happened.
    checks++;
    if (n_tick == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++;
      $display("ticks=%0d wraps=%0d resets=%0d", n_tick, n_wrap, n_reset);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_enter[i] == 0 || n_zero[i] == 0) begin
        failures++;
        $display("S%0d entered %0d times, countdown reached 01 %0d times", i + 1, n_enter[i], n_zero[i]);
      end
    end
    $display("mechanisms: ticks=%0d enter S1..S4=%0d/%0d/%0d/%0d wraps=%0d countdown-ends=%0d/%0d/%0d/%0d resets=%0d",
             n_tick, n_enter[0], n_enter[1], n_enter[2], n_enter[3], n_wrap,
             n_zero[0], n_zero[1], n_zero[2], n_zero[3], n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
