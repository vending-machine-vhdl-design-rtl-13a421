// tb_top_common.svh -- shared body of the top_model testbenches.
//
// Included inside a testbench module after it has declared
//   localparam int unsigned DIV  -- the divider's COUNT_MAX used by the design
// and before it instantiates top_model on the signals declared here. It
// provides the board clock, a reference model of the machine at the level
// of button presses, monitors of the candy and change LEDs, a reader that
// decodes the multiplexed display, and the tasks the stimulus calls.
//
// Button timing follows the board: a press is held for a whole number of
// slow periods (at least one), and releases last at least one slow period,
// so each press is seen exactly once by the button detector. Stimulus
// changes 3 ns after a board clock edge, never on one.

  localparam realtime T_FAST = 10ns;
  localparam realtime T_SLOW = 2.0 * (DIV + 1) * T_FAST;

  logic       clk = 1'b0;
  logic       reset = 1'b0;
  logic       nickel = 1'b0;
  logic       dime = 1'b0;
  logic       candy, cr;
  logic [3:0] anode;
  logic [6:0] cathode;

  int checks   = 0;
  int failures = 0;

  // Mechanisms exercised.
  int n_nickel = 0, n_dime = 0, n_both = 0, n_long = 0;
  int n_vend40 = 0, n_vend45 = 0, n_reset = 0, n_two_digit = 0;

  always #(T_FAST / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---- LED monitors: count rising edges and the candy pulse width. ----
  int candy_rises = 0, cr_rises = 0;
  int exp_candy = 0, exp_cr = 0;
  longint fast_cycles = 0;
  longint candy_rise_at = 0;

  always @(posedge clk) fast_cycles++;

  always @(posedge candy) begin
    candy_rises++;
    candy_rise_at = fast_cycles;
  end
  always @(negedge candy) begin
    // Candy is lit for exactly one slow period.
    if (candy_rises > 0) check(fast_cycles - candy_rise_at == 2 * (longint'(DIV) + 1),
          $sformatf("candy lit for %0d board clocks", fast_cycles - candy_rise_at));
  end
  always @(posedge cr) cr_rises++;

  // ---- Display reader. ----
  function automatic int seg_to_digit(logic [6:0] seg);
    case (seg)   // active low, bit 6 = segment a
      7'b000_0001: return 0;
      7'b100_1111: return 1;
      7'b001_0010: return 2;
      7'b000_0110: return 3;
      7'b100_1100: return 4;
      7'b010_0100: return 5;
      7'b010_0000: return 6;
      7'b000_1111: return 7;
      7'b000_0000: return 8;
      7'b000_0100: return 9;
      default:     return -100;
    endcase
  endfunction

  task automatic read_display(output int value);
    int tens = -100, units = -100;
    repeat (4) begin
      @(posedge clk);
      if (anode == 4'b1101) tens = seg_to_digit(cathode);
      else if (anode == 4'b1110) units = seg_to_digit(cathode);
      else tens = -1000;
    end
    value = tens * 10 + units;
  endtask

  // ---- Reference model and stimulus tasks. ----
  int credit = 0;

  task automatic check_state(input string where);
    int shown;
    read_display(shown);
    check(shown == credit, $sformatf("%s: display %0d, expected %0d", where, shown, credit));
    check(candy_rises == exp_candy,
          $sformatf("%s: %0d candies, expected %0d", where, candy_rises, exp_candy));
    check(cr_rises == exp_cr,
          $sformatf("%s: %0d change returns, expected %0d", where, cr_rises, exp_cr));
    if (shown >= 10 && shown == credit) n_two_digit++;
  endtask

  // Press nickel and/or dime for hold slow periods, then release for one.
  task automatic press(input bit n, input bit d, input int hold);
    nickel = n;
    dime   = d;
    #(hold * T_SLOW);
    nickel = 1'b0;
    dime   = 1'b0;
    #(T_SLOW);
    if (n && d) begin
      n_both++;
    end else begin
      if (hold >= 3) n_long++;
      credit += n ? 5 : 10;
      if (n) n_nickel++; else n_dime++;
    end
    if (credit >= 40) begin
      exp_candy++;
      if (credit > 40) begin
        exp_cr++;
        n_vend45++;
      end else begin
        n_vend40++;
      end
      credit = 0;
      #(3 * T_SLOW);   // let the vend states pass
    end
    check_state($sformatf("after %s%s press", n ? "nickel" : "", d ? "dime" : ""));
  endtask

  task automatic push_reset();
    reset = 1'b1;
    #(T_SLOW);
    check(cr == 1'b1, "coins returned while reset is held");
    reset = 1'b0;
    #(2 * T_SLOW);
    credit = 0;
    exp_cr++;
    n_reset++;
    check(cr == 1'b0, "return light off after reset");
    check_state("after reset");
  endtask

  task automatic start();
    #(3ns);
    reset = 1'b1;
    #(2 * T_SLOW);
    reset = 1'b0;
    #(2 * T_SLOW);
    // The reset's own return pulse is not counted.
    cr_rises = 0;
    candy_rises = 0;
    check_state("after power-up reset");
  endtask

  task automatic finish(input bit need_all);
    $display("nickel=%0d dime=%0d both=%0d long=%0d vend40=%0d vend45=%0d reset=%0d two_digit=%0d",
             n_nickel, n_dime, n_both, n_long, n_vend40, n_vend45, n_reset, n_two_digit);
    if (need_all) begin
      check(n_nickel > 0, "nickel accepted");
      check(n_dime > 0, "dime accepted");
      check(n_both > 0, "simultaneous coins ignored");
      check(n_long > 0, "long press counted once");
      check(n_vend40 > 0, "candy at 40");
      check(n_vend45 > 0, "candy and change at 45");
      check(n_reset > 0, "reset returned coins");
      check(n_two_digit > 0, "two-digit credit displayed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
