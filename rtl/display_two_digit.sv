// display_two_digit -- shows a number 0..99 on two digits of a multiplexed
// four-digit seven-segment display with common anodes.
//
// The number is split into tens and units, and each is decoded to an
// active-low segment pattern {a,b,c,d,e,f,g} (bit 6 = a). Only one digit
// can be lit at a time, so the two rightmost digit enables (anode_o[0] and
// anode_o[1], active low) take turns on every falling edge of clk_i; the
// two left digits stay dark (anode_o[3:2] = 2'b11).
//
// Timing: the segment register is loaded on the same falling edge that
// switches the anodes, from the digit selected before the switch. The
// resulting one-clock lag is what places the digits: while anode_o[1] is
// low the segments carry the tens, while anode_o[0] is low they carry the
// units. Digits therefore alternate every input clock (50 MHz refresh per
// digit from a 100 MHz clock, as in the original design, which leaves a
// slower 1 ms refresh disabled). A tens or units value above 9 (number_i
// above 99) blanks that digit.
//
// The original keeps the two enables in a rotating register preset to
// 2'b10; here one select flip-flop drives both, which behaves the same and
// cannot lock up in an illegal pattern. There is no reset: either select
// value is a legal starting point.
module display_two_digit
  import vending_pkg::*;
(
  input  logic       clk_i,
  input  credit_t    number_i,
  output logic [3:0] anode_o,
  output logic [6:0] cathode_o
);

  logic [3:0] tens, units;
  logic [6:0] seg_tens, seg_units;
  logic       sel_q;   // 0: anode_o[0] lit, 1: anode_o[1] lit

  assign tens      = 4'(number_i / 7'd10);
  assign units     = 4'(number_i % 7'd10);
  assign seg_tens  = seg7_of(tens);
  assign seg_units = seg7_of(units);

  always_ff @(negedge clk_i) begin
    sel_q     <= ~sel_q;
    cathode_o <= sel_q ? seg_units : seg_tens;
  end

  assign anode_o = {2'b11, sel_q ? 2'b01 : 2'b10};

endmodule
