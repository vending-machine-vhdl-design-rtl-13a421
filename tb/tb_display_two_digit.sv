// tb_display_two_digit -- self-checking test of display_two_digit.
//
// Every value 0..99, plus a few above 99, is applied in turn. After two
// clocks of settling the testbench watches several display clocks and, in
// the middle of each, decodes what is shown: while anode 1 is lit the
// segments must spell the tens digit, while anode 0 is lit the units digit;
// anodes 2 and 3 must stay dark and exactly one of anodes 0/1 must be lit,
// alternating every clock. The segment reference is a table of which of the
// segments a..g each digit lights, kept here independently of the design.
module tb_display_two_digit;

  import vending_pkg::credit_t;

  logic       clk = 1'b0;
  credit_t    number = '0;
  logic [3:0] anode;
  logic [6:0] cathode;

  int checks   = 0;
  int failures = 0;
  int seen_tens = 0, seen_units = 0;

  always #5ns clk = ~clk;

  display_two_digit dut (.clk_i(clk), .number_i(number), .anode_o(anode), .cathode_o(cathode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Lit segments of each digit, as the strings of segment letters.
  function automatic logic [6:0] expected_segments(int digit);
    string lit;
    logic [6:0] pat;
    case (digit)
      0: lit = "abcdef";
      1: lit = "bc";
      2: lit = "abdeg";
      3: lit = "abcdg";
      4: lit = "bcfg";
      5: lit = "acdfg";
      6: lit = "acdefg";
      7: lit = "abc";
      8: lit = "abcdefg";
      9: lit = "abcdfg";
      default: lit = "";
    endcase
    pat = 7'b111_1111;               // active low: all dark
    for (int i = 0; i < lit.len(); i++)
      pat[6 - (lit[i] - "a")] = 1'b0;  // bit 6 is segment a
    return pat;
  endfunction

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] last_anode;
    for (int v = 0; v < 106; v++) begin
      @(posedge clk);
      number = credit_t'(v);
      repeat (2) @(posedge clk);
      last_anode = anode;
      for (int c = 0; c < 6; c++) begin
        @(posedge clk);
        check(anode[3:2] == 2'b11, "left digits dark");
        check(anode[1:0] == 2'b10 || anode[1:0] == 2'b01, "exactly one right digit lit");
        check(anode != last_anode, "digits alternate every clock");
        last_anode = anode;
        if (anode[1] == 1'b0) begin
          seen_tens++;
          check(cathode == expected_segments(v / 10),
                $sformatf("value %0d tens: %b", v, cathode));
        end else begin
          seen_units++;
          check(cathode == expected_segments(v % 10),
                $sformatf("value %0d units: %b", v, cathode));
        end
      end
    end
    check(seen_tens > 0 && seen_units > 0, "both digits shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
