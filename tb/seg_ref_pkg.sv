// seg_ref_pkg: reference model for the testbenches of the traffic-light
// controller.
//
// seg_ca(d) gives the active-low common-anode pattern {g..a} of decimal digit d,
// built from the list of segments a human would light to draw the numeral
// (independent of the bit table inside seg7_ca). Codes above 9 are blank.
// phase_at() gives the phase and the seconds left in it at a given second of
// the cycle, from the four phase lengths.
package seg_ref_pkg;

  function automatic logic [6:0] seg_ca(int d);
    string s;
    logic [6:0] lit;
    case (d)
      0: s = "abcdef";
      1: s = "bc";
      2: s = "abdeg";
      3: s = "abcdg";
      4: s = "bcfg";
      5: s = "acdfg";
      6: s = "acdefg";
      7: s = "abc";
      8: s = "abcdefg";
      9: s = "abcdfg";
      default: s = "";
    endcase
    lit = '0;
    for (int i = 0; i < s.len(); i++) lit[3'(s[i] - "a")] = 1'b1;
    return ~lit;
  endfunction

  // Phase 0..3 (= S1..S4) and seconds left at second p of the cycle
  // (p already reduced modulo the cycle length).
  function automatic void phase_at(int p, int g1, int y1, int g2, int y2,
                                   output int phase, output int left);
    if (p < g1)                 begin phase = 0; left = g1 - p; end
    else if (p < g1 + y1)       begin phase = 1; left = g1 + y1 - p; end
    else if (p < g1 + y1 + g2)  begin phase = 2; left = g1 + y1 + g2 - p; end
    else                        begin phase = 3; left = g1 + y1 + g2 + y2 - p; end
  endfunction

  // Expected {dx, nb} lamps of a phase: bit 2 red, bit 1 yellow, bit 0 green.
  function automatic logic [5:0] lamps(int phase);
    case (phase)
      0:       return {3'b001, 3'b100};
      1:       return {3'b010, 3'b100};
      2:       return {3'b100, 3'b001};
      default: return {3'b100, 3'b010};
    endcase
  endfunction

endpackage
