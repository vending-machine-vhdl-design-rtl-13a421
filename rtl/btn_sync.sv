// btn_sync -- turns a held push button into a single one-cycle pulse.
//
// The button is sampled on each falling edge of the slow machine clock
// (100 Hz in the vending machine, so a press lasts several samples). A
// three-state machine remembers whether the button was already seen
// pressed:
//   BTN_INITIAL  button released; a press moves to BTN_SECOND and raises
//                pulse_o for exactly one clock,
//   BTN_SECOND   first cycle after the pulse; held -> BTN_THIRD,
//   BTN_THIRD    still held; stays until the button is released.
// A release in any state returns to BTN_INITIAL. pulse_o is registered, so
// it rises on the falling clock edge that first samples the press and falls
// one clock period later, however long the button is held.
//
// rst_i is asynchronous and active high. The original design clears only
// the output on reset; here the state is also returned to BTN_INITIAL,
// which is the state the original starts in at power-up. The button input
// is sampled directly, without an extra synchroniser stage, as in the
// original.
module btn_sync
  import vending_pkg::*;
(
  input  logic clk_i,
  input  logic rst_i,
  input  logic btn_i,
  output logic pulse_o
);

  btn_state_e state_q, state_d;
  logic       pulse_d;

  always_comb begin
    state_d = state_q;
    pulse_d = 1'b0;
    unique case (state_q)
      BTN_INITIAL: begin
        if (btn_i) begin
          state_d = BTN_SECOND;
          pulse_d = 1'b1;
        end
      end
      BTN_SECOND, BTN_THIRD: begin
        state_d = btn_i ? BTN_THIRD : BTN_INITIAL;
      end
      default: state_d = BTN_INITIAL;
    endcase
  end

  always_ff @(negedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      state_q <= BTN_INITIAL;
      pulse_o <= 1'b0;
    end else begin
      state_q <= state_d;
      pulse_o <= pulse_d;
    end
  end

endmodule
