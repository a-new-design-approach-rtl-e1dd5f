// serial_adder_test_circuit: the bit-serial adder with its on-chip test
// fixture, two input shift registers and one output shift register.
//
// A test runs in three phases on one clock:
//   write  with `wr_en` high, one bit of each operand enters per cycle at
//          x_in / y_in, least significant bit first, so after DATA_W cycles
//          each input register holds its word with the LSB at the exit;
//   calc   a burst of fast cycles (`calc_en` high for DATA_W cycles) shifts
//          both words LSB first into the adder; each sum bit that leaves the
//          adder 2 cycles later is shifted into the output register, so the
//          sum word is assembled there without any extra control;
//   read   with `rd_en` high the output register shifts its bits out at
//          sum_out, LSB first; `sum_word` shows it in parallel.
// In the original test chip the burst comes from an on-chip oscillator; here
// `calc_en` marks the cycles that belong to the burst. The carry controls of
// the adder are brought out unchanged and act on the bit being fed in the
// same cycle. Phase signals, the parallel view and reset are this design's
// own choices; the register lengths follow the 4-bit test words. The input
// registers' parallel views are left unused on purpose: only their serial
// end feeds the adder.
module serial_adder_test_circuit #(
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic              x_in,
  input  logic              y_in,
  input  logic              calc_en,
  input  logic              carry_set,
  input  logic              carry_kill,
  input  logic              rd_en,
  output logic              sum_out,
  output logic [DATA_W-1:0] sum_word,
  output logic              carry
);

  logic x_bit, y_bit;
  logic in_shift;
  logic [DATA_W-1:0] x_word, y_word;

  assign in_shift = wr_en | calc_en;

  shift_register #(.LEN(DATA_W)) u_x_reg (
    .clk  (clk),
    .rst  (rst),
    .shift(in_shift),
    .din  (wr_en & x_in),
    .dout (x_bit),
    .q    (x_word)
  );

  shift_register #(.LEN(DATA_W)) u_y_reg (
    .clk  (clk),
    .rst  (rst),
    .shift(in_shift),
    .din  (wr_en & y_in),
    .dout (y_bit),
    .q    (y_word)
  );

  logic s_bit, s_valid;

  bit_serial_adder u_adder (
    .clk       (clk),
    .rst       (rst),
    .x         (x_bit),
    .y         (y_bit),
    .in_valid  (calc_en),
    .carry_set (carry_set),
    .carry_kill(carry_kill),
    .sum       (s_bit),
    .sum_valid (s_valid),
    .carry     (carry)
  );

  shift_register #(.LEN(DATA_W)) u_sum_reg (
    .clk  (clk),
    .rst  (rst),
    .shift(s_valid | rd_en),
    .din  (s_valid & s_bit),
    .dout (sum_out),
    .q    (sum_word)
  );

endmodule
