// tb_top_model -- end-to-end test of the vending machine at a short slow
// clock period.
//
// The divider is set to COUNT_MAX = 49, so the machine clock period is 100
// board clocks (1 us) instead of 10 ms; everything else is the design as
// built. The test first replays the two coin sequences of the original
// board test (two dimes, four nickels, two dimes and a reset; then three
// nickels, two dimes, a nickel and dime together and a final dime), then
// about 300 random presses of random length with occasional resets. After
// every press it decodes the display and compares it, and the number of
// candies and change returns, with a reference model of the credit. Each
// mechanism (nickel, dime, simultaneous coins ignored, long press counted
// once, candy at 40, candy and change at 45, reset, two-digit display) must
// occur at least once.
module tb_top_model;

  localparam int unsigned DIV = 49;

  `include "tb_top_common.svh"

  top_model #(.DIV_COUNT_MAX(DIV)) dut (
    .clk_i(clk), .reset_i(reset), .nickel_i(nickel), .dime_i(dime),
    .candy_o(candy), .cr_o(cr), .anode_o(anode), .cathode_o(cathode)
  );

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start();
    // First board sequence.
    press(0, 1, 2); press(0, 1, 2);
    repeat (4) press(1, 0, 2);
    press(0, 1, 2); press(0, 1, 2);
    push_reset();
    // Second board sequence.
    repeat (3) press(1, 0, 2);
    press(0, 1, 2); press(0, 1, 2);
    press(1, 1, 2);
    press(0, 1, 2);
    // Random presses.
    for (int i = 0; i < 300; i++) begin
      int kind;
      kind = $urandom_range(0, 19);
      if (kind < 9)       press(1, 0, 1 + $urandom_range(0, 4));
      else if (kind < 16) press(0, 1, 1 + $urandom_range(0, 4));
      else if (kind < 19) press(1, 1, 1 + $urandom_range(0, 2));
      else                push_reset();
    end
    finish(1'b1);
  end

endmodule
