// tb_top_model_full -- the vending machine at full size: 100 MHz board
// clock, default divider (10 ms machine clock).
//
// Replays the board test's two coin sequences with its timing (presses of
// 20 ms separated by 10 ms releases): two dimes and four nickels buy a
// candy at 40, two more dimes show 20, and a reset returns them; then three
// nickels and two dimes reach 35, a nickel and dime pressed together are
// ignored, and a last dime reaches 45, which gives a candy and a nickel of
// change. The display, candy and change lights are checked after every
// press against a reference model. About 0.7 s of board time is simulated.
module tb_top_model_full;

  localparam int unsigned DIV = 499_999;

  `include "tb_top_common.svh"

  top_model dut (
    .clk_i(clk), .reset_i(reset), .nickel_i(nickel), .dime_i(dime),
    .candy_o(candy), .cr_o(cr), .anode_o(anode), .cathode_o(cathode)
  );

  initial begin : watchdog
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start();
    press(0, 1, 2); press(0, 1, 2);
    repeat (4) press(1, 0, 2);
    press(0, 1, 2); press(0, 1, 2);
    push_reset();
    repeat (3) press(1, 0, 2);
    press(0, 1, 2); press(0, 1, 2);
    press(1, 1, 2);
    press(0, 1, 2);
    check(n_vend40 == 1 && n_vend45 == 1 && n_reset == 1 && n_both == 1,
          "both board sequences completed");
    finish(1'b0);
  end

endmodule
