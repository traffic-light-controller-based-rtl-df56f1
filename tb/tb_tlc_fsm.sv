// tb_tlc_fsm: self-checking test of the state register and next-state logic.
//
// 'expire' is driven by the testbench, so the state order and the dwell
// time reported for each state are checked apart from any timer. Checks:
// reset forces S0 from any state; without expire the state holds; with
// expire the order is S0, S1, ..., S8, S1, ... for three full cycles; each
// state reports its dwell from the state table (yellow 4, straight green 16,
// cross green 8) and S0 its start-up time; straight green is twice cross
// green.
module tb_tlc_fsm;
  import tlc_pkg::*;
  localparam int unsigned CNT_W = 5;  // the modules' default width

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic expire = 1'b0;
  state_e state;
  logic [CNT_W-1:0] duration;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tlc_fsm dut (.clk, .rst, .expire, .state, .duration);

  // Expected order and dwell, from the state table: index 0 is S0.
  int unsigned exp_next[9] = '{1, 2, 3, 4, 5, 6, 7, 8, 1};
  int unsigned exp_dur[9]  = '{4, 4, 16, 4, 8, 4, 16, 4, 8};

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned s_ref;
    repeat (2) @(negedge clk);
    check(int'(state), 0, "reset state");
    check(int'(duration), 4, "S0 dwell");
    rst = 1'b0;

    // Hold: no expire, no change.
    repeat (5) begin
      @(negedge clk);
      check(int'(state), 0, "S0 holds without expire");
    end

    s_ref = 0;
    for (int step = 0; step < 3 * 8 + 1; step++) begin
      check(int'(duration), int'(exp_dur[s_ref]), $sformatf("dwell of S%0d", s_ref));
      expire = 1'b1;
      @(negedge clk);
      expire = 1'b0;
      s_ref = exp_next[s_ref];
      check(int'(state), int'(s_ref), $sformatf("step %0d", step));
      // Hold one extra pulse with expire low.
      @(negedge clk);
      check(int'(state), int'(s_ref), $sformatf("hold at step %0d", step));
    end

    // Green time ratio of straight to cross roads.
    check(int'(exp_dur[2]), 2 * int'(exp_dur[4]), "table ratio");
    begin
      int unsigned g_straight = 0, g_cross = 0;
      // Walk once more and read the dwell of green states from the DUT.
      for (int step = 0; step < 8; step++) begin
        if (state == S2 || state == S6) g_straight += duration;
        if (state == S4 || state == S8) g_cross    += duration;
        expire = 1'b1;
        @(negedge clk);
        expire = 1'b0;
      end
      check(int'(g_straight), 2 * int'(g_cross), "straight green twice cross green");
    end

    // Reset from the middle of the cycle.
    expire = 1'b1;
    repeat (3) @(negedge clk);
    expire = 1'b0;
    check(int'(state != S0), 1, "not in S0 before reset");
    rst = 1'b1;
    @(negedge clk);
    check(int'(state), 0, "reset from mid-cycle");
    expire = 1'b1;
    @(negedge clk);
    check(int'(state), 0, "reset dominates expire");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
