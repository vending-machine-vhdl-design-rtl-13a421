// top_model -- candy vending machine on an FPGA board.
//
// Inputs are the 100 MHz board clock, a reset button and two coin buttons
// (nickel = 5, dime = 10); outputs are a candy LED, a change/coin-return
// LED and a two-digit seven-segment display of the inserted credit. A candy
// costs 40.
//
//   clk_i --> clk_divider --> clk_slow (100 Hz)
//                               |-> btn_sync (nickel) --\
//                               |-> btn_sync (dime)   ----> vending_machine
//                                                              |  credit
//   clk_i ----------------------------------------> display_two_digit
//
// The divider's reset is tied inactive, as in the original design, so the
// slow clock runs from power-up. reset_i resets the two button detectors
// and the vending FSM; it is asynchronous and active high, and while it is
// held cr_o is high (all coins returned). The button detectors sample on
// the falling edge of clk_slow and the FSM acts on the rising edge, half a
// slow period later. A press must therefore last at least one slow period
// (10 ms) to be seen, and each press counts once however long it is held.
// The display runs directly from clk_i.
//
// DIV_COUNT_MAX sets the divider: the slow period is 2*(DIV_COUNT_MAX+1)
// board clocks; its default gives 100 Hz from 100 MHz.
module top_model
  import vending_pkg::*;
#(
  parameter int unsigned DIV_COUNT_MAX = 499_999
) (
  input  logic       clk_i,
  input  logic       reset_i,
  input  logic       nickel_i,
  input  logic       dime_i,
  output logic       candy_o,
  output logic       cr_o,
  output logic [3:0] anode_o,
  output logic [6:0] cathode_o
);

  logic    clk_slow;
  logic    nickel_pulse, dime_pulse;
  credit_t credit;

  clk_divider #(
    .COUNT_MAX(DIV_COUNT_MAX)
  ) u_clk_divider (
    .clk_i (clk_i),
    .rst_i (1'b0),
    .clk_o (clk_slow)
  );

  btn_sync u_btn_nickel (
    .clk_i   (clk_slow),
    .rst_i   (reset_i),
    .btn_i   (nickel_i),
    .pulse_o (nickel_pulse)
  );

  btn_sync u_btn_dime (
    .clk_i   (clk_slow),
    .rst_i   (reset_i),
    .btn_i   (dime_i),
    .pulse_o (dime_pulse)
  );

  vending_machine u_vending_machine (
    .clk_i    (clk_slow),
    .rst_i    (reset_i),
    .nickel_i (nickel_pulse),
    .dime_i   (dime_pulse),
    .candy_o  (candy_o),
    .cr_o     (cr_o),
    .number_o (credit)
  );

  display_two_digit u_display (
    .clk_i     (clk_i),
    .number_i  (credit),
    .anode_o   (anode_o),
    .cathode_o (cathode_o)
  );

endmodule
