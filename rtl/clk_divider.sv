// clk_divider -- divides the board clock down to the machine's slow clock.
//
// A counter advances on every falling edge of clk_i. When it has reached
// COUNT_MAX it restarts from zero and the output flips, so clk_o is a square
// wave with a period of 2*(COUNT_MAX+1) input cycles. With the default
// COUNT_MAX of 499999 a 100 MHz input gives 100 Hz (10 ms period), slow
// enough that a human button press spans several cycles.
//
// rst_i is asynchronous and active high; it clears the counter and drives
// clk_o low. The vending machine's top level ties it low, so after power-up
// the divider simply runs. The counter also restarts if it is ever found
// above COUNT_MAX (possible only from an uninitialised power-up value); the
// output period is unaffected. The falling-edge counting and the division
// ratio follow the original design; the out-of-range restart is an addition.
module clk_divider #(
  parameter int unsigned COUNT_MAX = 499_999
) (
  input  logic clk_i,
  input  logic rst_i,
  output logic clk_o
);

  localparam int unsigned CW = $clog2(COUNT_MAX + 1) < 1 ? 1 : $clog2(COUNT_MAX + 1);

  logic [CW-1:0] count_q;
  logic          clk_q;

  always_ff @(negedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      count_q <= '0;
      clk_q   <= 1'b0;
    end else if (count_q >= CW'(COUNT_MAX)) begin
      count_q <= '0;
      clk_q   <= ~clk_q;
    end else begin
      count_q <= count_q + 1'b1;
    end
  end

  assign clk_o = clk_q;

endmodule
