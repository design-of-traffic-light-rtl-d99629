// tb_jiaotongdeng: checks the traffic-light controller against a reference
// computed from the number of clock cycles (seconds) since reset.
//
// Two instances run side by side: one with the default 39/4/20/4 s plan, one
// with a 1/1/1/1 plan, where every phase ends as soon as it starts. After every
// clock edge the lamps and both digits are compared with the reference. The
// testbench also times each lamp state of the default instance (39, 4, 20 and 4
// cycles, a 67-cycle cycle) and applies a reset in the middle of S3, after
// which the cycle must restart at S1 with 39 s to go.
module tb_jiaotongdeng;
  import seg_ref_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic [2:0] dx_a, nb_a, dx_b, nb_b;
  logic [6:0] l1_a, l2_a, l1_b, l2_b;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  jiaotongdeng dut_a (.clk(clk), .reset(reset), .dx(dx_a), .nb(nb_a), .leds1(l1_a), .leds2(l2_a));
  jiaotongdeng #(.EW_GREEN_S(1), .EW_YELLOW_S(1), .NS_GREEN_S(1), .NS_YELLOW_S(1))
    dut_b (.clk(clk), .reset(reset), .dx(dx_b), .nb(nb_b), .leds1(l1_b), .leds2(l2_b));

  initial begin : watchdog
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input string tag, input int t, input int g1, input int y1,
                           input int g2, input int y2, input logic [2:0] dx,
                           input logic [2:0] nb, input logic [6:0] l1, input logic [6:0] l2);
    int ph, left;
    phase_at(t % (g1 + y1 + g2 + y2), g1, y1, g2, y2, ph, left);
    checks++;
    if ({dx, nb} !== lamps(ph) || l1 !== seg_ca(left / 10) || l2 !== seg_ca(left % 10)) begin
      failures++;
      $display("%s t=%0d: dx=%b nb=%b leds1=%b leds2=%b, expected phase S%0d, %0d s left",
               tag, t, dx, nb, l1, l2, ph + 1, left);
    end
  endtask

  // Check both instances at t seconds after reset was released.
  task automatic check_all(input int t);
    check_one("39/4/20/4", t, 39, 4, 20, 4, dx_a, nb_a, l1_a, l2_a);
    check_one("1/1/1/1",   t,  1, 1,  1, 1, dx_b, nb_b, l1_b, l2_b);
  endtask

  // Duration of each east-west lamp state of the default instance.
  int run_len = 0;
  int durations[$];
  logic [5:0] prev_lamps;

  task automatic run(input int n, input int t0);
    for (int k = 1; k <= n; k++) begin
      @(posedge clk); #1;
      check_all(t0 + k);
      if ({dx_a, nb_a} == prev_lamps) run_len++;
      else begin durations.push_back(run_len); run_len = 1; end
      prev_lamps = {dx_a, nb_a};
    end
  endtask

  initial begin
    reset = 1'b0;   // a rising edge, so the asynchronous reset acts at once
    #1 reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check_all(0);               // held in S1 with 39 s to go
    @(negedge clk) reset = 1'b0;
    prev_lamps = {dx_a, nb_a};
    run_len = 1;
    run(3 * 67, 0);             // three full cycles
    // Phase durations: skip the first (S1 after reset) entry, which is complete too.
    begin
      static int expect_d[4] = '{39, 4, 20, 4};
      checks++;
      if (durations.size() < 11) begin
        failures++;
        $display("only %0d lamp changes seen", durations.size());
      end else begin
        for (int i = 0; i < 11; i++)
          if (durations[i] != expect_d[i % 4]) begin
            failures++;
            $display("lamp state %0d lasted %0d cycles, expected %0d", i, durations[i], expect_d[i % 4]);
          end
      end
    end
    // Reset in the middle of S3 (second 50 of the cycle).
    run(50, 3 * 67);
    checks++;
    if (dx_a !== 3'b100 || nb_a !== 3'b001) begin
      failures++;
      $display("not in S3 before the mid-cycle reset");
    end
    @(negedge clk) reset = 1'b1;
    #1;
    check_all(0);               // asynchronous: takes effect without a clock edge
    @(posedge clk); #1;
    check_all(0);
    @(negedge clk) reset = 1'b0;
    prev_lamps = {dx_a, nb_a};
    run(70, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
