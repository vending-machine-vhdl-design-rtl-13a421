// tb_vending_machine -- self-checking test of vending_machine.
//
// Coin pulses (nickel, dime, both, none) are driven at random between
// rising clock edges, with an occasional asynchronous reset. A reference
// model that tracks the credit in cents, written independently of the
// state encoding, predicts candy_o, cr_o and number_o after every edge:
//   credit >= 40 : show the credit, candy = 1, cr = 1 if credit is 45, credit := 0
//   otherwise    : if credit is 0, candy = cr = 0; add 5 for a lone nickel or
//                  10 for a lone dime; show the new credit
//   reset        : credit = 0, candy = 0, cr = 1, number = 0
// The comparison is cycle by cycle, so it also checks that the candy and
// change outputs come exactly one clock after the credit reaches 40 or 45.
// Each behaviour is counted and must occur at least once.
module tb_vending_machine;

  import vending_pkg::credit_t;

  logic    clk = 1'b0;
  logic    rst = 1'b0;
  logic    nickel = 1'b0;
  logic    dime = 1'b0;
  logic    candy, cr;
  credit_t number;

  int checks   = 0;
  int failures = 0;

  // Behaviour counters.
  int n_nickel = 0, n_dime = 0, n_both = 0, n_vend40 = 0, n_vend45 = 0;
  int n_reset = 0, n_coin_in_vend = 0;

  always #5ns clk = ~clk;

  vending_machine dut (
    .clk_i(clk), .rst_i(rst), .nickel_i(nickel), .dime_i(dime),
    .candy_o(candy), .cr_o(cr), .number_o(number)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int ref_credit = 0;
  bit ref_candy  = 1'b0;
  bit ref_cr     = 1'b1;
  int ref_number = 0;

  always @(posedge clk or posedge rst) begin
    if (rst) begin
      ref_credit = 0;
      ref_candy  = 1'b0;
      ref_cr     = 1'b1;
      ref_number = 0;
    end else if (ref_credit >= 40) begin
      if (nickel || dime) n_coin_in_vend++;
      ref_number = ref_credit;
      ref_candy  = 1'b1;
      if (ref_credit == 45) begin
        ref_cr = 1'b1;
        n_vend45++;
      end else begin
        n_vend40++;
      end
      ref_credit = 0;
    end else begin
      if (ref_credit == 0) begin
        ref_candy = 1'b0;
        ref_cr    = 1'b0;
      end
      if (nickel && dime) n_both++;
      else if (nickel) begin ref_credit += 5;  n_nickel++; end
      else if (dime)   begin ref_credit += 10; n_dime++;   end
      ref_number = ref_credit;
    end
  end

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ns rst = 1'b1;
    #11ns;
    check(cr == 1'b1 && candy == 1'b0 && number == 0, "reset values");
    rst = 1'b0;
    for (int i = 0; i < 20_000; i++) begin
      @(negedge clk);
      // Check the outputs of the last rising edge.
      check(candy == ref_candy, $sformatf("candy=%0b expected %0b", candy, ref_candy));
      check(cr == ref_cr, $sformatf("cr=%0b expected %0b", cr, ref_cr));
      check(int'(number) == ref_number,
            $sformatf("number=%0d expected %0d", number, ref_number));
      // Drive the next coin pattern, mostly single coins.
      case ($urandom_range(0, 9))
        0, 1, 2: begin nickel = 1'b1; dime = 1'b0; end
        3, 4:    begin nickel = 1'b0; dime = 1'b1; end
        5:       begin nickel = 1'b1; dime = 1'b1; end
        default: begin nickel = 1'b0; dime = 1'b0; end
      endcase
      if ($urandom_range(0, 199) == 0) begin
        #1ns rst = 1'b1;
        n_reset++;
        #1ns check(cr == 1'b1 && candy == 1'b0 && number == 0, "asynchronous reset");
        #1ns rst = 1'b0;
      end
    end
    $display("nickel=%0d dime=%0d both=%0d vend40=%0d vend45=%0d reset=%0d coin_in_vend=%0d",
             n_nickel, n_dime, n_both, n_vend40, n_vend45, n_reset, n_coin_in_vend);
    check(n_nickel > 0, "nickel accepted");
    check(n_dime > 0, "dime accepted");
    check(n_both > 0, "simultaneous coins ignored");
    check(n_vend40 > 0, "candy at 40");
    check(n_vend45 > 0, "candy and change at 45");
    check(n_reset > 0, "reset returned coins");
    check(n_coin_in_vend > 0, "coin during a vend state dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
