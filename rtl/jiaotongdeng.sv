// jiaotongdeng: traffic signal and countdown display controller for one
// crossing of an east-west and a north-south road ("jiao tong deng" =
// traffic light).
//
// One clk cycle is one second (the 1 Hz output of fenpin). The controller
// walks a fixed cycle of four phases, S1..S4 (see traffic_pkg):
//   S1  east-west green,  north-south red     EW_GREEN_S  seconds (39)
//   S2  east-west yellow, north-south red     EW_YELLOW_S seconds (4)
//   S3  east-west red,    north-south green   NS_GREEN_S  seconds (20)
//   S4  east-west red,    north-south yellow  NS_YELLOW_S seconds (4)
// and then starts again at S1. East-west is thus red for 24 s and north-south
// for 43 s of every 67 s cycle.
//
// How it works. Three registers, as in the original design:
//   sec     an up-counter over the whole cycle, 0 .. CYCLE-1, that wraps
//           (the cycle counter);
//   state   the phase, advanced when the countdown of the phase runs out;
//   remain  a down-counter loaded with the length of each phase as it
//           starts and counting down to 1 (the per-phase countdowns);
// sec, state and remain always agree: the assertion at the end checks that
// state is the phase sec falls in and remain is the seconds left in it.
// The lamps are decoded from state. remain is split into tens and units and
// shown on two common-anode digits, leds1 (tens) and leds2 (units). The
// display therefore reads 39..01, 04..01, 20..01, 04..01 over a cycle.
//
// Interface: clk, active-high asynchronous reset (S1 with 39 s to go, the
// cycle counter at 0); dx = east-west lamps, nb = north-south lamps, 3 bits
// each {red, yellow, green}, 1 = lit; leds1/leds2 = seven-segment patterns,
// active low, {g..a}. Outputs are decoded from registers without further
// delay: a phase lasts exactly its number of clk cycles.
//
// The phase lengths, the four states and the lamp encoding follow the
// original design. The cycle counter's modulus is the sum of the four phase
// lengths (67). The reset polarity, the asynchronous reset, the display
// running from the full phase length down to 1, the shared two-digit
// countdown and the tens/units split onto leds1/leds2 are this design's own
// choices.
module jiaotongdeng
  import traffic_pkg::*;
#(
  parameter int unsigned EW_GREEN_S  = 39,  // S1 length, seconds
  parameter int unsigned EW_YELLOW_S = 4,   // S2 length, seconds
  parameter int unsigned NS_GREEN_S  = 20,  // S3 length, seconds
  parameter int unsigned NS_YELLOW_S = 4    // S4 length, seconds
) (
  input  logic       clk,     // 1 Hz
  input  logic       reset,   // active high, asynchronous
  output lamp_t      dx,      // east-west lamps  {red, yellow, green}
  output lamp_t      nb,      // north-south lamps {red, yellow, green}
  output logic [6:0] leds1,   // countdown tens digit, active low {g..a}
  output logic [6:0] leds2    // countdown units digit, active low {g..a}
);

  localparam int unsigned CYCLE = EW_GREEN_S + EW_YELLOW_S + NS_GREEN_S + NS_YELLOW_S;
  localparam int unsigned CW    = $clog2(CYCLE);
  // Ends of the phases on the cycle counter (first second of the next phase).
  localparam int unsigned END_S1 = EW_GREEN_S;
  localparam int unsigned END_S2 = END_S1 + EW_YELLOW_S;
  localparam int unsigned END_S3 = END_S2 + NS_GREEN_S;
  localparam int unsigned END_S4 = CYCLE;

  if (EW_GREEN_S < 1 || EW_YELLOW_S < 1 || NS_GREEN_S < 1 || NS_YELLOW_S < 1) begin : g_bad_len
    $error("jiaotongdeng: every phase must last at least one second");
  end
  if (EW_GREEN_S > 99 || EW_YELLOW_S > 99 || NS_GREEN_S > 99 || NS_YELLOW_S > 99) begin : g_bad_disp
    $error("jiaotongdeng: a phase longer than 99 s does not fit two digits");
  end

  function automatic logic [CW-1:0] phase_len(phase_t p);
    unique case (p)
      S1: return CW'(EW_GREEN_S);
      S2: return CW'(EW_YELLOW_S);
      S3: return CW'(NS_GREEN_S);
      S4: return CW'(NS_YELLOW_S);
    endcase
  endfunction

  logic [CW-1:0] sec;
  phase_t        state;
  logic [CW-1:0] remain;
  phase_t        next_state;

  always_comb begin
    unique case (state)
      S1: next_state = S2;
      S2: next_state = S3;
      S3: next_state = S4;
      S4: next_state = S1;
    endcase
  end

  // Cycle counter.
  always_ff @(posedge clk or posedge reset) begin
    if (reset)                        sec <= '0;
    else if (sec == CW'(CYCLE - 1))   sec <= '0;
    else                              sec <= sec + 1'b1;
  end

  // Phase register and per-phase countdown.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state  <= S1;
      remain <= CW'(EW_GREEN_S);
    end else if (remain == CW'(1)) begin
      state  <= next_state;
      remain <= phase_len(next_state);
    end else begin
      remain <= remain - 1'b1;
    end
  end

  // Lamps.
  always_comb begin
    unique case (state)
      S1: begin dx = LAMP_GREEN;  nb = LAMP_RED;    end
      S2: begin dx = LAMP_YELLOW; nb = LAMP_RED;    end
      S3: begin dx = LAMP_RED;    nb = LAMP_GREEN;  end
      S4: begin dx = LAMP_RED;    nb = LAMP_YELLOW; end
    endcase
  end

  // Countdown display: two decimal digits of remain (at most 99).
  logic [6:0] remain7;
  logic [3:0] tens, units;

  assign remain7 = 7'(remain);
  assign tens    = 4'(remain7 / 7'd10);
  assign units   = 4'(remain7 % 7'd10);

  seg7_ca u_tens  (.digit(tens),  .seg(leds1));
  seg7_ca u_units (.digit(units), .seg(leds2));

  // The three counters describe one position in the cycle.
  function automatic logic consistent(logic [CW-1:0] s, phase_t p, logic [CW-1:0] r);
    unique case (p)
      S1: return (s <  CW'(END_S1))                       && (r == CW'(END_S1) - s);
      S2: return (s >= CW'(END_S1)) && (s < CW'(END_S2))  && (r == CW'(END_S2) - s);
      S3: return (s >= CW'(END_S2)) && (s < CW'(END_S3))  && (r == CW'(END_S3) - s);
      S4: return (s >= CW'(END_S3)) && (32'(s) < END_S4)  && (32'(r) == END_S4 - 32'(s));
    endcase
  endfunction

  a_consistent: assert property (@(posedge clk) disable iff (reset) consistent(sec, state, remain))
    else $error("jiaotongdeng: cycle counter %0d, phase %s and countdown %0d disagree",
                sec, state.name(), remain);

endmodule
