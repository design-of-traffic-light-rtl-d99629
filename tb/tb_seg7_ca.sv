// tb_seg7_ca: exhaustive test of the common-anode digit decoder. Every one of
// the 16 input codes is applied and the segment pattern compared with the
// reference drawn from segment lists (seg_ref_pkg).
module tb_seg7_ca;
  import seg_ref_pkg::*;

  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seg7_ca dut (.digit(digit), .seg(seg));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== seg_ca(d)) begin
        failures++;
        $display("digit %0d: seg=%b expected %b", d, seg, seg_ca(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
