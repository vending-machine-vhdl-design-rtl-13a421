// vending_machine -- coin-counting state machine of the candy machine.
//
// A candy costs 40. The customer inserts nickels (5) and dimes (10), each
// arriving as a one-clock pulse on nickel_i or dime_i. The machine has ten
// states ordered by credit, M_INITIAL (0) to M_EIGHTH (35) plus the two vend
// states M_NINTH (40) and M_TENTH (45):
//   * a nickel pulse moves one state up, a dime pulse two;
//   * a nickel and a dime in the same cycle are ignored (state kept);
//   * M_NINTH raises candy_o for one clock and returns to M_INITIAL;
//   * M_TENTH raises candy_o and cr_o (return of the extra nickel) for one
//     clock and returns to M_INITIAL.
// Coins that arrive while in a vend state are not counted.
//
// Timing: all outputs are registered on the rising edge of clk_i. number_o
// shows the credit of the state being entered, so it changes on the same
// edge that accepts the coin. candy_o and cr_o rise on the edge that leaves
// a vend state, one clock after the credit reached 40 or 45, and fall on the
// next edge (taken in M_INITIAL), which also brings number_o back to 0.
//
// rst_i is asynchronous and active high. It puts the FSM in M_INITIAL and
// raises cr_o, returning all inserted coins; cr_o falls on the first clock
// edge after reset is released. As in the original design, reset also
// clears candy_o; clearing number_o on reset (rather than on the first
// clock after it) is this design's choice, so that the display never shows
// a stale or uninitialised credit.
module vending_machine
  import vending_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_i,
  input  logic    nickel_i,
  input  logic    dime_i,
  output logic    candy_o,
  output logic    cr_o,
  output credit_t number_o
);

  vm_state_e state_q, state_d;
  logic      vend;

  // A dime is worth two nickel steps.
  localparam logic [3:0] DIME_STEPS = 4'(DIME_VALUE / NICKEL_VALUE);

  // The vend states are those whose credit covers the price.
  assign vend = credit_of(state_q) >= CANDY_PRICE;

  // Next state: one step per nickel, two per dime, nothing for both at
  // once. The vend states always return to M_INITIAL.
  always_comb begin
    state_d = state_q;
    if (vend) begin
      state_d = M_INITIAL;
    end else if (nickel_i && !dime_i) begin
      state_d = vm_state_e'(state_q + 4'd1);
    end else if (dime_i && !nickel_i) begin
      state_d = vm_state_e'(state_q + DIME_STEPS);
    end
  end

  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      state_q  <= M_INITIAL;
      candy_o  <= 1'b0;
      cr_o     <= 1'b1;
      number_o <= '0;
    end else begin
      state_q <= state_d;
      if (vend) begin
        // Keep showing 40 or 45 while the candy is released.
        number_o <= credit_of(state_q);
        candy_o  <= 1'b1;
        if (credit_of(state_q) > CANDY_PRICE) cr_o <= 1'b1;
      end else begin
        number_o <= credit_of(state_d);
      end
      if (state_q == M_INITIAL) begin
        candy_o <= 1'b0;
        cr_o    <= 1'b0;
      end
    end
  end

  // The largest step is a dime from M_EIGHTH, so the state never passes
  // M_TENTH.
  a_state_in_range: assert property (@(posedge clk_i) state_q <= M_TENTH);

endmodule
