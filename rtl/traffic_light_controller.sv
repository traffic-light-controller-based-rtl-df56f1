// traffic_light_controller: Moore-machine controller for a junction of four
// roads with eight signals, where the busier straight roads get twice the
// green time of the cross roads.
//
// Signals L1..L8 are driven in pairs that face each other: L1/L5 and L3/L7
// (straight roads, four lamps, 4-bit codes) and L2/L6 and L4/L8 (cross roads,
// red and green, 2-bit codes). tlc_fsm holds the state, tlc_dwell_timer
// times each state and tlc_output_logic turns the state into lamp codes.
// With the default times one cycle S1..S8 is 4+16+4+8+4+16+4+8 = 64 clock
// pulses; one pulse is meant to be one second.
//
// Ports: clk (one pulse per second); rst (synchronous, active high; holds S0,
// straight signals at 4'b0001 and cross signals red); L15, L26, L37, L48 (lamp
// codes, see tlc_pkg); state (present state, for observation). The lamp
// codes are decoded from the state register, so they change on the same
// rising clock edge as the state, and a state of N pulses shows its lamps for
// exactly N pulses.
module traffic_light_controller
  import tlc_pkg::*;
#(
  parameter int unsigned T_START          = 4,
  parameter int unsigned T_YELLOW         = 4,
  parameter int unsigned T_GREEN_STRAIGHT = 16,
  parameter int unsigned T_GREEN_CROSS    = 8
) (
  input  logic           clk,
  input  logic           rst,
  output straight_lamp_t L15,
  output cross_lamp_t    L26,
  output straight_lamp_t L37,
  output cross_lamp_t    L48,
  output state_e         state
);

  localparam int unsigned T_MAX01 = (T_START > T_YELLOW) ? T_START : T_YELLOW;
  localparam int unsigned T_MAX23 = (T_GREEN_STRAIGHT > T_GREEN_CROSS) ? T_GREEN_STRAIGHT : T_GREEN_CROSS;
  localparam int unsigned T_MAX   = (T_MAX01 > T_MAX23) ? T_MAX01 : T_MAX23;
  localparam int unsigned CNT_W   = $clog2(T_MAX + 1);

  logic             expire;
  logic [CNT_W-1:0] duration;
  lamps_t           lamps;

  tlc_fsm #(
    .T_START         (T_START),
    .T_YELLOW        (T_YELLOW),
    .T_GREEN_STRAIGHT(T_GREEN_STRAIGHT),
    .T_GREEN_CROSS   (T_GREEN_CROSS),
    .CNT_W           (CNT_W)
  ) u_fsm (
    .clk     (clk),
    .rst     (rst),
    .expire  (expire),
    .state   (state),
    .duration(duration)
  );

  tlc_dwell_timer #(
    .CNT_W(CNT_W)
  ) u_timer (
    .clk     (clk),
    .rst     (rst),
    .duration(duration),
    .expire  (expire)
  );

  tlc_output_logic u_out (
    .state(state),
    .lamps(lamps)
  );

  assign L15 = lamps.l15;
  assign L26 = lamps.l26;
  assign L37 = lamps.l37;
  assign L48 = lamps.l48;

endmodule
