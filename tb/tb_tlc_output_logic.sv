// tb_tlc_output_logic: self-checking test of the Moore output decoder.
//
// Every state S0..S8 is applied and the four lamp codes are compared with the
// state table, written here as one letter per signal L1..L8 (R, Y, G) and
// converted to bit codes: straight signals red 1001, yellow 1010, green 1100,
// cross signals red 10, green 01; in S0 the straight signals read 0001.
// Paired signals (L1/L5, L2/L6, L3/L7, L4/L8) must carry the same letter.
module tb_tlc_output_logic;
  import tlc_pkg::*;

  state_e state;
  lamps_t lamps;
  int checks = 0, failures = 0;

  tlc_output_logic dut (.state, .lamps);

  function automatic logic [3:0] st_code(input byte c, input bit reset_state);
    if (reset_state) return 4'b0001;
    case (c)
      "R": return 4'b1001;
      "Y": return 4'b1010;
      "G": return 4'b1100;
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic [1:0] cr_code(input byte c);
    case (c)
      "R": return 2'b10;
      "G": return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  task automatic check(input logic [11:0] got, input logic [11:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    // Light columns L1..L8 of the state table, rows S0..S8.
    string table_rows[9] = '{
      "RRRRRRRR", "YRRRYRRR", "GRRRGRRR", "YRRRYRRR", "RGRRRGRR",
      "RRYRRRYR", "RRGRRRGR", "RRYRRRYR", "RRRGRRRG"};
    for (int s = 0; s < 9; s++) begin
      string row;
      logic [11:0] exp;
      row = table_rows[s];
      // The table must itself pair the signals.
      if (row[0] != row[4] || row[1] != row[5] || row[2] != row[6] || row[3] != row[7]) begin
        failures++;
        $display("FAIL table row %0d not paired", s);
      end
      exp = {st_code(row[0], s == 0), cr_code(row[1]), st_code(row[2], s == 0), cr_code(row[3])};
      state = state_e'(s);
      #1;
      check(lamps, exp, $sformatf("state S%0d", s));
      check({lamps.l15, lamps.l37}, {st_code(row[4], s == 0), st_code(row[6], s == 0)},
            $sformatf("state S%0d straight pair", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
