// state_cell: one bit of internal state held in a nondestructive-readout
// (NDRO) cell, extended with a toggle input so that it supports the four
// state transitions of the state-transition design style: set, reset,
// retain and invert (a modified toggle flip-flop).
//
// The stored bit q is read without being destroyed, so any number of
// downstream gates may sample it every cycle. An action is applied on the
// rising clock edge when `act_valid` is high; with `act_valid` low (no pulse
// arrived) the cell retains its value. Synchronous active-high reset clears
// the cell; the cell's reset behaviour is this design's own choice.
//
// Interface: act (state_action_e), act_valid, q. Timing: q shows the new
// value one cycle after the action is presented.
module state_cell
  import sfq_arith_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  state_action_e act,
  input  logic          act_valid,
  output logic          q
);

  always_ff @(posedge clk) begin
    if (rst)            q <= 1'b0;
    else if (act_valid) q <= apply_action(act, q);
  end

endmodule
