// tb_btn_sync -- self-checking test of btn_sync.
//
// The button is driven at random, changing only on rising clock edges so
// that each falling edge samples a settled level. Presses last from one to
// several cycles. The reference is a one-line rule: after a falling edge the
// output must be 1 exactly when the button is sampled pressed now and was
// sampled released one edge earlier (or reset intervened). Resets are
// applied at random, also while the button is held. The test also checks
// that every press, however long, gives exactly one pulse.
module tb_btn_sync;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic btn = 1'b0;
  logic pulse;

  int checks   = 0;
  int failures = 0;
  int long_presses = 0;
  int resets_while_held = 0;

  always #5ns clk = ~clk;

  btn_sync dut (.clk_i(clk), .rst_i(rst), .btn_i(btn), .pulse_o(pulse));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  logic prev_sampled = 1'b0;
  logic expect_pulse = 1'b0;
  int   pulses_in_press = 0;
  int   press_len = 0;

  // Reference model, updated on the same edge as the design.
  always @(negedge clk or posedge rst) begin
    if (rst) begin
      prev_sampled <= 1'b0;
      expect_pulse <= 1'b0;
    end else begin
      expect_pulse <= btn && !prev_sampled;
      prev_sampled <= btn;
    end
  end

  // Compare in the middle of the high phase, well away from both edges.
  always @(posedge clk) begin
    #1ns;
    check(pulse == expect_pulse, $sformatf("pulse=%0b expected %0b", pulse, expect_pulse));
  end

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ns rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int p = 0; p < 400; p++) begin
      int hold, gap;
      bit was_reset;
      hold = 1 + $urandom_range(0, 6);
      gap  = 1 + $urandom_range(0, 3);
      @(posedge clk);
      btn = 1'b1;
      pulses_in_press = 0;
      was_reset = 1'b0;
      for (int c = 0; c < hold; c++) begin
        @(posedge clk);
        if (pulse) pulses_in_press++;
        if (c == hold / 2 && $urandom_range(0, 19) == 0) begin
          rst = 1'b1;
          #2ns rst = 1'b0;
          resets_while_held++;
          was_reset = 1'b1;   // a reset starts the press afresh
        end
      end
      btn = 1'b0;
      @(posedge clk);
      if (pulse) pulses_in_press++;
      if (!was_reset) begin
        check(pulses_in_press == 1,
              $sformatf("press of %0d cycles gave %0d pulses", hold, pulses_in_press));
        if (hold >= 3) long_presses++;
      end
      repeat (gap - 1) @(posedge clk);
    end
    check(long_presses > 0, "a long press was exercised");
    check(resets_while_held > 0, "a reset during a press was exercised");
    $display("long presses=%0d resets while held=%0d", long_presses, resets_while_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
