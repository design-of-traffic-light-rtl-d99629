// tb_fenpin: checks the frequency divider at two small ratios. After the
// first toggle of clkout (its start phase is arbitrary), every high and every
// low half-period must last exactly CLK_HZ/(2*OUT_HZ) input cycles.
module tb_fenpin;
  logic clk = 1'b0;
  logic out_a, out_b;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // 20 input cycles per output period, 10 per half period.
  fenpin #(.CLK_HZ(20), .OUT_HZ(1)) dut_a (.clk(clk), .clkout(out_a));
  // 1000 Hz in, 10 Hz out: 50 input cycles per half period.
  fenpin #(.CLK_HZ(1000), .OUT_HZ(10)) dut_b (.clk(clk), .clkout(out_b));

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int half, input int n, ref logic sig, input string tag);
    int last;
    logic prev;
    prev = sig;
    // Wait for the first toggle, then time n more.
    @(posedge clk); while (sig == prev) @(posedge clk);
    last = cycles; prev = sig;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); while (sig == prev) @(posedge clk);
      checks++;
      if (cycles - last != half) begin
        failures++;
        $display("%s: half period %0d cycles, expected %0d", tag, cycles - last, half);
      end
      last = cycles; prev = sig;
    end
  endtask

  initial begin
    fork
      measure(10, 40, out_a, "20:1");
      measure(50, 20, out_b, "1000:10");
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
