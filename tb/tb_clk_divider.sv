// tb_clk_divider -- self-checking test of clk_divider.
//
// Two instances run from the same 100 MHz clock: a small one (COUNT_MAX = 4,
// so the output should flip every 5 input falling edges) and one at the
// default COUNT_MAX of 499999 (flip every 500000 edges, 100 Hz out). The
// testbench counts input falling edges between output edges and compares
// with the expected half period, for several periods of the small divider
// and the first full period of the default one. It also checks that reset
// holds the output low and restarts the count.
module tb_clk_divider;

  localparam int unsigned SMALL_MAX = 4;
  localparam int unsigned FULL_MAX  = 499_999;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic clk_small, clk_full;

  int checks   = 0;
  int failures = 0;

  always #5ns clk = ~clk;

  clk_divider #(.COUNT_MAX(SMALL_MAX)) dut_small (.clk_i(clk), .rst_i(rst), .clk_o(clk_small));
  clk_divider                          dut_full  (.clk_i(clk), .rst_i(rst), .clk_o(clk_full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Input falling edges seen since reset release, and at the last output
  // edge of each divider.
  longint edges = 0;

  always @(negedge clk) if (!rst) edges++;

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint last;
    #1ns rst = 1'b1;
    repeat (3) @(posedge clk);
    check(clk_small == 1'b0 && clk_full == 1'b0, "outputs low during reset");
    rst = 1'b0;

    // Small divider: each half period is SMALL_MAX+1 input edges; the
    // first edge comes SMALL_MAX+1 edges after reset release.
    last = 0;
    for (int i = 0; i < 12; i++) begin
      @(clk_small);
      check(edges - last == longint'(SMALL_MAX) + 1,
            $sformatf("small half period %0d: %0d edges", i, edges - last));
      check(clk_small == ((i % 2) == 0), "small divider level");
      last = edges;
    end

    // Reset in the middle of a count restarts it.
    @(posedge clk);
    rst = 1'b1;
    @(posedge clk);
    check(clk_small == 1'b0 && clk_full == 1'b0, "reset clears outputs");
    edges = 0;
    rst = 1'b0;
    @(posedge clk_small);
    check(edges == longint'(SMALL_MAX) + 1, $sformatf("after reset: %0d edges", edges));

    // Default divider: 500000 input edges per half period (10 ms at 100 MHz).
    @(posedge clk_full);
    check(edges == longint'(FULL_MAX) + 1, $sformatf("full rise after %0d edges", edges));
    last = edges;
    @(negedge clk_full);
    check(edges - last == longint'(FULL_MAX) + 1, $sformatf("full high for %0d edges", edges - last));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
