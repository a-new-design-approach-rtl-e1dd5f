// sfq_adders_top: the two state-transition adders side by side.
//
//  * ser_*  : the bit-serial adder in its test circuit (input shift
//             registers, adder with carry controller, output shift register),
//             DATA_W-bit words, driven in write / calc / read phases as
//             described in serial_adder_test_circuit.
//  * slc_*  : the SLICE_W-bit-slice adder, fed one slice per cycle, least
//             significant slice of a word first, `slc_first` on the first
//             slice of each word; the sum slice appears 6 cycles later for
//             SLICE_W = 4.
// The two share only the clock and reset. The pairing in one top is this
// design's own packaging; the fast clock burst of the serial test circuit is
// the `ser_calc_en` window.
module sfq_adders_top #(
  parameter int unsigned DATA_W  = 4,
  parameter int unsigned SLICE_W = 4
) (
  input  logic               clk,
  input  logic               rst,
  // bit-serial adder test circuit
  input  logic               ser_wr_en,
  input  logic               ser_x_in,
  input  logic               ser_y_in,
  input  logic               ser_calc_en,
  input  logic               ser_carry_set,
  input  logic               ser_carry_kill,
  input  logic               ser_rd_en,
  output logic               ser_sum_out,
  output logic [DATA_W-1:0]  ser_sum_word,
  output logic               ser_carry,
  // bit-slice adder
  input  logic [SLICE_W-1:0] slc_x,
  input  logic [SLICE_W-1:0] slc_y,
  input  logic               slc_valid,
  input  logic               slc_first,
  output logic [SLICE_W-1:0] slc_sum,
  output logic               slc_sum_valid,
  output logic               slc_sum_first,
  output logic               slc_carry_out
);

  serial_adder_test_circuit #(.DATA_W(DATA_W)) u_serial (
    .clk       (clk),
    .rst       (rst),
    .wr_en     (ser_wr_en),
    .x_in      (ser_x_in),
    .y_in      (ser_y_in),
    .calc_en   (ser_calc_en),
    .carry_set (ser_carry_set),
    .carry_kill(ser_carry_kill),
    .rd_en     (ser_rd_en),
    .sum_out   (ser_sum_out),
    .sum_word  (ser_sum_word),
    .carry     (ser_carry)
  );

  bit_slice_adder #(.SLICE_W(SLICE_W)) u_slice (
    .clk        (clk),
    .rst        (rst),
    .x          (slc_x),
    .y          (slc_y),
    .in_valid   (slc_valid),
    .first_slice(slc_first),
    .sum        (slc_sum),
    .sum_valid  (slc_sum_valid),
    .sum_first  (slc_sum_first),
    .carry_out  (slc_carry_out)
  );

endmodule
