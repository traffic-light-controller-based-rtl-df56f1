// tlc_fsm: state register and next-state logic of the Moore traffic light
// controller.
//
// Nine states: S0 is held while rst is high with all signals red; S1..S8 form
// the repeating cycle L1/L5 yellow, L1/L5 green, L1/L5 yellow, L2/L6 green,
// L3/L7 yellow, L3/L7 green, L3/L7 yellow, L4/L8 green, then back to S1.
// The state advances when the dwell timer reports that the present state's
// time is over. The straight roads get twice the green time of the cross
// roads (16 against 8 pulses by default), yellow lasts 4 pulses.
//
// After rst falls the controller stays in S0 for T_START pulses before the
// cycle begins, as the simulated waveform of the controller shows; the state
// table itself only says that S0 lasts as long as reset is applied. The
// T_START pulses are counted from the last rising edge that saw rst high, so
// the clock period in which rst is released is the first of them.
//
// Ports: clk; rst (synchronous, active high); expire (from tlc_dwell_timer);
// state (the present state, registered); duration (dwell of the present
// state, combinational from state). The state register is a bank of D
// flip-flops updated on the rising clock edge.
module tlc_fsm
  import tlc_pkg::*;
#(
  parameter int unsigned T_START          = 4,
  parameter int unsigned T_YELLOW         = 4,
  parameter int unsigned T_GREEN_STRAIGHT = 16,
  parameter int unsigned T_GREEN_CROSS    = 8,
  parameter int unsigned CNT_W            = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             expire,
  output state_e           state,
  output logic [CNT_W-1:0] duration
);

  state_e next_state;

  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= next_state;
  end

  always_comb begin
    next_state = state;
    if (expire) begin
      unique case (state)
        S0:      next_state = S1;
        S1:      next_state = S2;
        S2:      next_state = S3;
        S3:      next_state = S4;
        S4:      next_state = S5;
        S5:      next_state = S6;
        S6:      next_state = S7;
        S7:      next_state = S8;
        S8:      next_state = S1;
        default: next_state = S0;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      S0:             duration = CNT_W'(T_START);
      S2, S6:         duration = CNT_W'(T_GREEN_STRAIGHT);
      S4, S8:         duration = CNT_W'(T_GREEN_CROSS);
      S1, S3, S5, S7: duration = CNT_W'(T_YELLOW);
      default:        duration = CNT_W'(1);
    endcase
  end

endmodule
