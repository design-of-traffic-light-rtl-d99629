// traffic_pkg: types and constants shared by the traffic-light controller.
//
// A lamp group (one per road direction) is three bits, one per lamp, with
// bit 2 = red, bit 1 = yellow, bit 0 = green. A lit lamp is a 1. This is the
// encoding shown by the controller's simulation waveform (east-west "001" while
// north-south is "100" in the first phase, then "010", "100" ...).
// The four phases of the cycle are the controller's states S1..S4:
//   S1  east-west green,  north-south red
//   S2  east-west yellow, north-south red
//   S3  east-west red,    north-south green
//   S4  east-west red,    north-south yellow
// The 2-bit state encoding is this design's own choice.
package traffic_pkg;

  typedef logic [2:0] lamp_t;

  localparam lamp_t LAMP_GREEN  = 3'b001;
  localparam lamp_t LAMP_YELLOW = 3'b010;
  localparam lamp_t LAMP_RED    = 3'b100;

  typedef enum logic [1:0] {
    S1 = 2'd0,  // east-west green,  north-south red
    S2 = 2'd1,  // east-west yellow, north-south red
    S3 = 2'd2,  // east-west red,    north-south green
    S4 = 2'd3   // east-west red,    north-south yellow
  } phase_t;

endpackage
