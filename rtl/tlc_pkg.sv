// tlc_pkg: types and constants shared by the traffic light controller.
//
// The controller runs a four-road junction whose eight signals are driven in
// pairs that always show the same aspect: L1/L5 and L3/L7 on the straight
// roads, L2/L6 and L4/L8 on the cross roads. The nine states S0..S8 and the
// lamp codes follow the state table and the simulated bit patterns of the
// controller (S0 is the reset state, S1..S8 the repeating cycle).
//
// Straight-road lamp code, 4 bits: bit0 red, bit1 yellow, bit2 green,
// bit3 the signal's second green lamp. The three codes seen while the cycle
// runs are red 4'b1001, yellow 4'b1010 and green 4'b1100, and 4'b0001 in S0.
// Which physical lamp is behind each bit is this design's reading of those
// patterns: bit3 is lit in every state of the cycle and dark only in S0.
// Cross-road lamp code, 2 bits: 2'b10 red, 2'b01 green.
package tlc_pkg;

  typedef enum logic [3:0] {
    S0 = 4'd0,   // reset: all red
    S1 = 4'd1,   // L1/L5 yellow (get ready)
    S2 = 4'd2,   // L1/L5 green
    S3 = 4'd3,   // L1/L5 yellow (clear)
    S4 = 4'd4,   // L2/L6 green
    S5 = 4'd5,   // L3/L7 yellow (get ready)
    S6 = 4'd6,   // L3/L7 green
    S7 = 4'd7,   // L3/L7 yellow (clear)
    S8 = 4'd8    // L4/L8 green
  } state_e;

  typedef logic [3:0] straight_lamp_t;
  typedef logic [1:0] cross_lamp_t;

  localparam straight_lamp_t ST_OFF_RED = 4'b0001;  // S0, before the cycle starts
  localparam straight_lamp_t ST_RED     = 4'b1001;
  localparam straight_lamp_t ST_YELLOW  = 4'b1010;
  localparam straight_lamp_t ST_GREEN   = 4'b1100;

  localparam cross_lamp_t CR_RED   = 2'b10;
  localparam cross_lamp_t CR_GREEN = 2'b01;

  // Lamp outputs of the whole junction.
  typedef struct packed {
    straight_lamp_t l15;  // signals L1 and L5
    cross_lamp_t    l26;  // signals L2 and L6
    straight_lamp_t l37;  // signals L3 and L7
    cross_lamp_t    l48;  // signals L4 and L8
  } lamps_t;

endpackage
