// tlc_output_logic: Moore output logic of the traffic light controller.
//
// Decodes the present state alone into the lamp codes of the four signal
// pairs; no input enters, so the lamps change only on clock edges. Which
// pair shows which aspect in each state is the state table's; the bit codes
// are those of tlc_pkg. In each state of the cycle exactly one pair is
// yellow or green and the other three are red.
//
// Ports: state (present state); lamps (struct of L1/L5, L2/L6, L3/L7, L4/L8
// codes). Purely combinational.
module tlc_output_logic
  import tlc_pkg::*;
(
  input  state_e state,
  output lamps_t lamps
);

  always_comb begin
    lamps.l15 = ST_RED;
    lamps.l26 = CR_RED;
    lamps.l37 = ST_RED;
    lamps.l48 = CR_RED;
    unique case (state)
      S0: begin
        lamps.l15 = ST_OFF_RED;
        lamps.l37 = ST_OFF_RED;
      end
      S1, S3:  lamps.l15 = ST_YELLOW;
      S2:      lamps.l15 = ST_GREEN;
      S4:      lamps.l26 = CR_GREEN;
      S5, S7:  lamps.l37 = ST_YELLOW;
      S6:      lamps.l37 = ST_GREEN;
      S8:      lamps.l48 = CR_GREEN;
      default: ;
    endcase
  end

endmodule
