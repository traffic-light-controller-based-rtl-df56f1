// tb_traffic_light_controller: end-to-end test of the controller at its
// default times (the top is instantiated without parameter overrides).
//
// A reference schedule is built from the state table: after reset the
// straight signals read 0001 and the cross signals red for the 4-pulse
// start-up, then the cycle L1/L5 yellow 4, green 16, yellow 4, L2/L6 green
// 8, L3/L7 yellow 4, green 16, yellow 4, L4/L8 green 8 repeats. Every pulse
// the four lamp codes are compared with that schedule. The test runs three
// full cycles, applies reset in the middle of a cycle, holds it, and runs
// again. It counts how often each mechanism happened (reset hold, start-up
// leaving S0, each of the eight cycle states entered, wrap from L4/L8 green
// back to L1/L5 yellow, reset during the cycle) and fails any that never did.
// It also checks the cycle length (64 pulses) and that each straight pair
// gets twice the green pulses of each cross pair.
module tb_traffic_light_controller;
  import tlc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  straight_lamp_t L15, L37;
  cross_lamp_t    L26, L48;
  state_e         state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_light_controller dut (.clk, .rst, .L15, .L26, .L37, .L48, .state);

  // Reference cycle: rows S1..S8, letters for L1, L2, L3, L4 and the dwell.
  string       ref_row[8] = '{"YRRR", "GRRR", "YRRR", "RGRR", "RRYR", "RRGR", "RRYR", "RRRG"};
  int unsigned ref_dur[8] = '{4, 16, 4, 8, 4, 16, 4, 8};
  localparam int unsigned START_PULSES = 4;

  function automatic logic [3:0] st_code(input byte c);
    case (c)
      "R": return 4'b1001;
      "Y": return 4'b1010;
      "G": return 4'b1100;
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic [1:0] cr_code(input byte c);
    return (c == "G") ? 2'b01 : 2'b10;
  endfunction

  // Mechanism counters.
  int n_reset_hold = 0, n_startup = 0, n_wrap = 0, n_mid_reset = 0;
  int n_enter[8] = '{default: 0};
  int green_l15 = 0, green_l26 = 0, green_l37 = 0, green_l48 = 0;

  task automatic check_lamps(input logic [3:0] e15, input logic [1:0] e26,
                             input logic [3:0] e37, input logic [1:0] e48,
                             input string what);
    checks++;
    if ({L15, L26, L37, L48} !== {e15, e26, e37, e48}) begin
      failures++;
      $display("FAIL %s: L15=%b L26=%b L37=%b L48=%b expected %b %b %b %b",
               what, L15, L26, L37, L48, e15, e26, e37, e48);
    end
  endtask

  // Hold reset for n pulses, checking the all-red reset output.
  task automatic hold_reset(input int n);
    rst = 1'b1;
    repeat (n) begin
      @(negedge clk);
      check_lamps(4'b0001, 2'b10, 4'b0001, 2'b10, "under reset");
      n_reset_hold++;
    end
  endtask

  // Release reset and follow the schedule for 'pulses' pulses.
  task automatic run_schedule(input int pulses);
    int row = -1;        // -1: start-up in S0
    int left = START_PULSES - 1;  // the pulse in which rst falls is the first
    int since_wrap = 0;
    rst = 1'b0;
    for (int p = 0; p < pulses; p++) begin
      @(negedge clk);
      if (left == 0) begin
        if (row == -1) n_startup++;
        if (row == 7) begin
          n_wrap++;
          checks++;
          if (since_wrap != 0 && since_wrap != 64) begin
            failures++;
            $display("FAIL cycle length %0d", since_wrap);
          end
          since_wrap = 0;
        end
        row = (row + 1) % 8;
        left = ref_dur[row];
        n_enter[row]++;
      end
      if (row >= 0) since_wrap++;
      if (row == -1)
        check_lamps(4'b0001, 2'b10, 4'b0001, 2'b10, $sformatf("start-up pulse %0d", p));
      else begin
        string r;
        r = ref_row[row];
        check_lamps(st_code(r[0]), cr_code(r[1]), st_code(r[2]), cr_code(r[3]),
                    $sformatf("pulse %0d in S%0d", p, row + 1));
      end
      if (L15 == 4'b1100) green_l15++;
      if (L26 == 2'b01)   green_l26++;
      if (L37 == 4'b1100) green_l37++;
      if (L48 == 2'b01)   green_l48++;
      left--;
    end
  endtask

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    hold_reset(3);
    run_schedule(START_PULSES - 1 + 3 * 64);

    // Green-time balance over three whole cycles.
    checks++;
    if (green_l15 != 3 * 16 || green_l37 != 3 * 16 || green_l26 != 3 * 8 || green_l48 != 3 * 8 ||
        green_l15 != 2 * green_l26) begin
      failures++;
      $display("FAIL green pulses L15=%0d L26=%0d L37=%0d L48=%0d",
               green_l15, green_l26, green_l37, green_l48);
    end

    // Restart, run into the middle of L3/L7 green, then reset.
    hold_reset(2);
    run_schedule(START_PULSES - 1 + 4 + 16 + 4 + 8 + 4 + 7);
    checks++;
    if (state != S6) begin
      failures++;
      $display("FAIL expected S6 before mid-cycle reset, state=%0d", state);
    end
    n_mid_reset++;
    hold_reset(5);
    run_schedule(START_PULSES - 1 + 64 + 10);

    expect_seen(n_reset_hold, "reset hold (pulses)");
    expect_seen(n_startup, "start-up S0 -> S1");
    for (int i = 0; i < 8; i++) expect_seen(n_enter[i], $sformatf("entered S%0d", i + 1));
    expect_seen(n_wrap, "wrap S8 -> S1");
    expect_seen(n_mid_reset, "reset during cycle");

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
