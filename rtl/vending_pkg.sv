// vending_pkg -- types and constants shared by the candy vending machine.
//
// The machine takes two coin kinds, a nickel worth 5 and a dime worth 10,
// and sells one candy for 40. Credit is kept as a plain binary number that
// never exceeds 45, carried on a 7-bit bus so that the display can show any
// value 0..99.
//
// The seven-segment patterns are active low (a 0 lights a segment) and are
// packed with segment a in bit 6 down to segment g in bit 0, which is the
// order the display's cathode port uses.
package vending_pkg;

  // Credit shown on the display, 0..99.
  typedef logic [6:0] credit_t;

  localparam credit_t NICKEL_VALUE = 7'd5;
  localparam credit_t DIME_VALUE   = 7'd10;
  localparam credit_t CANDY_PRICE  = 7'd40;

  // Button edge detector: idle, first sampled press, press still held.
  typedef enum logic [1:0] {
    BTN_INITIAL,
    BTN_SECOND,
    BTN_THIRD
  } btn_state_e;

  // Vending FSM. States are ordered by credit: state k holds 5*k, so a
  // nickel advances one state and a dime two. NINTH (40) and TENTH (45) are
  // the two vend states; TENTH also returns a nickel of change.
  typedef enum logic [3:0] {
    M_INITIAL = 4'd0,
    M_SECOND  = 4'd1,
    M_THIRD   = 4'd2,
    M_FOURTH  = 4'd3,
    M_FIFTH   = 4'd4,
    M_SIXTH   = 4'd5,
    M_SEVENTH = 4'd6,
    M_EIGHTH  = 4'd7,
    M_NINTH   = 4'd8,
    M_TENTH   = 4'd9
  } vm_state_e;

  // Credit held in a state: 5 per step above M_INITIAL.
  function automatic credit_t credit_of(vm_state_e s);
    return credit_t'(s) * NICKEL_VALUE;
  endfunction

  // Active-low segment pattern {a,b,c,d,e,f,g} of a decimal digit; any
  // value above 9 blanks the digit.
  function automatic logic [6:0] seg7_of(logic [3:0] digit);
    case (digit)
      4'd0:    return 7'b000_0001;
      4'd1:    return 7'b100_1111;
      4'd2:    return 7'b001_0010;
      4'd3:    return 7'b000_0110;
      4'd4:    return 7'b100_1100;
      4'd5:    return 7'b010_0100;
      4'd6:    return 7'b010_0000;
      4'd7:    return 7'b000_1111;
      4'd8:    return 7'b000_0000;
      4'd9:    return 7'b000_0100;
      default: return 7'b111_1111;
    endcase
  endfunction

endpackage
