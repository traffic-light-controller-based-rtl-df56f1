// tlc_dwell_timer: counts how long the controller has been in its present
// state.
//
// The counter advances by one on every clock pulse and returns to zero on the
// pulse where 'expire' is high, so 'expire' is high during exactly the last
// pulse of a dwell of 'duration' pulses and the next state begins with a count
// of zero. One clock pulse stands for one second of lamp time, as in the
// controller's timing; a slower or faster clock scales all times alike.
//
// Ports: clk; rst (synchronous, active high, clears the count); duration
// (dwell in pulses, must be 1 or more, sampled every pulse); expire
// (combinational from the count and duration). Latency: a dwell of N pulses
// raises expire N-1 pulses after the count was last cleared.
//
// The counting scheme and the width are this design's choice; the dwell
// times themselves come from the state table and are supplied by tlc_fsm.
module tlc_dwell_timer #(
  parameter int unsigned CNT_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] duration,
  output logic             expire
);

  logic [CNT_W-1:0] count;

  assign expire = (count == duration - CNT_W'(1));

  always_ff @(posedge clk) begin
    if (rst || expire) count <= '0;
    else               count <= count + CNT_W'(1);
  end

  // A dwell of zero pulses cannot be timed.
  a_duration_nonzero: assert property (@(posedge clk) disable iff (rst) duration != '0)
    else $error("tlc_dwell_timer: duration of zero");

endmodule
