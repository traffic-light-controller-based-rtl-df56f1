// tb_tlc_dwell_timer: self-checking test of the dwell timer.
//
// For a series of dwell times, including the extremes 1 and 2^CNT_W-1, the
// timer is reset and then run for several dwells. 'expire' must be high on
// exactly the pulses k = D-1, 2D-1, ... counted from the release of reset.
// A change of duration in the middle of a dwell is also checked: the new
// value applies to the pulse count already reached.
module tb_tlc_dwell_timer;
  localparam int unsigned CNT_W = 5;  // the modules' default width

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [CNT_W-1:0] duration = CNT_W'(4);
  logic expire;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tlc_dwell_timer dut (.clk, .rst, .duration, .expire);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: expire=%0b expected %0b", what, got, exp);
    end
  endtask

  task automatic run_dwell(input int unsigned d);
    @(negedge clk); rst = 1'b1; duration = CNT_W'(d);
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 3 * int'(d) + 2; k++) begin
      check(expire, (k % int'(d)) == int'(d) - 1, $sformatf("D=%0d k=%0d", d, k));
      @(negedge clk);
    end
  endtask

  initial begin
    int unsigned ds[$] = '{1, 2, 4, 8, 16, 31};
    foreach (ds[i]) run_dwell(ds[i]);
    repeat (10) run_dwell(1 + ($urandom % 31));

    // Duration changed mid-dwell: count at 5 when switched from 16 to 8,
    // so expire comes on the 8th pulse (count 7).
    @(negedge clk); rst = 1'b1; duration = CNT_W'(16);
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 5; k++) begin
      check(expire, 1'b0, $sformatf("switch k=%0d", k));
      @(negedge clk);
    end
    duration = CNT_W'(8);
    check(expire, 1'b0, "switch k=5");
    @(negedge clk);
    check(expire, 1'b0, "switch k=6");
    @(negedge clk);
    check(expire, 1'b1, "switch k=7");
    @(negedge clk);
    check(expire, 1'b0, "switch after wrap");

    // Reset holds the count at zero: with D=2 expire stays low under reset.
    duration = CNT_W'(2); rst = 1'b1;
    repeat (3) begin
      @(negedge clk);
      check(expire, 1'b0, "held in reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
