// shift_register: serial shift register of the on-chip adder test circuit.
//
// Bits enter at `din` and move one place toward bit 0 on every clock with
// `shift` high, so a word written MSB-last leaves at `dout` (bit 0) least
// significant bit first, which is the order the bit-serial adder consumes.
// The whole content is also visible on `q` so a reader of the register can
// take the result in parallel. Written slowly and shifted at full speed, it
// decouples the slow test equipment from the fast adder. Length, the
// parallel view and the synchronous reset are this design's own choices.
//
// Timing: dout = q[0] is the bit that leaves on the next shift; the register
// content changes one cycle after `shift`.
module shift_register #(
  parameter int unsigned LEN = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           shift,
  input  logic           din,
  output logic           dout,
  output logic [LEN-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {din, q[LEN-1:1]};
  end

  assign dout = q[0];

endmodule
