// bit_serial_adder: bit-serial adder built as a state-transition circuit.
//
// A conventional serial adder feeds the carry of bit i back into the
// computation of bit i+1, a loop that limits the rate. Here the carry is kept
// in a nondestructive-readout state cell instead, and the adder never computes
// it combinationally from itself:
//   stage 1  decode the operand bits into kill k = ~(x|y), propagate p = x^y
//            and generate g = x&y (registered);
//   stage 2  g sets the carry cell, k resets it, p leaves it as it is, and
//            the sum bit is p XOR the carry cell as read before this update.
// Operands enter least significant bit first, one bit pair per cycle, so the
// adder accepts a new bit every cycle with a latency of 2 cycles.
//
// Carry controller: `carry_kill` and `carry_set`, presented together with an
// operand bit, override that bit's carry out (kill wins over set, both win
// over the operands' k/g). Asserting `carry_kill` with the most significant
// bit keeps one word's overflow out of the next word. Their priority is this
// design's own choice.
//
// Interface: x, y, in_valid, carry_set, carry_kill in; sum, sum_valid and
// carry (the stored carry out of the last bit) out. Bits with in_valid low
// leave the carry untouched, as if no clock pulse had arrived.
module bit_serial_adder
  import sfq_arith_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic x,
  input  logic y,
  input  logic in_valid,
  input  logic carry_set,
  input  logic carry_kill,
  output logic sum,
  output logic sum_valid,
  output logic carry
);

  // Stage 1: decode into kill / propagate / generate.
  logic k1, p1, g1, set1, kill1, v1;

  always_ff @(posedge clk) begin
    if (rst) begin
      {k1, p1, g1, set1, kill1, v1} <= '0;
    end else begin
      k1    <= ~(x | y);
      p1    <= x ^ y;
      g1    <= x & y;
      set1  <= carry_set;
      kill1 <= carry_kill;
      v1    <= in_valid;
    end
  end

  // Stage 2: state transition of the carry cell (confluence of the operand
  // actions with the external carry controls).
  state_action_e act2;

  always_comb begin
    if (kill1)     act2 = ACT_RESET;
    else if (set1) act2 = ACT_SET;
    else if (g1)   act2 = ACT_SET;
    else if (k1)   act2 = ACT_RESET;
    else           act2 = ACT_HOLD;
  end

  state_cell u_carry (
    .clk      (clk),
    .rst      (rst),
    .act      (act2),
    .act_valid(v1),
    .q        (carry)
  );

  // Output decode: sum from the partial sum and the carry into this bit.
  always_ff @(posedge clk) begin
    if (rst) begin
      sum       <= 1'b0;
      sum_valid <= 1'b0;
    end else begin
      sum       <= p1 ^ carry;
      sum_valid <= v1;
    end
  end

endmodule
