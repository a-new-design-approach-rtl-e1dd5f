// tb_shift_register: shifts random bits into the register, with random idle
// cycles, and checks the parallel view and the serial output against a
// queue model: a bit written leaves at dout exactly LEN shifts later.
module tb_shift_register;
  localparam int unsigned LEN = 4;

  logic clk = 1'b0;
  logic rst, shift, din, dout;
  logic [LEN-1:0] q;

  int checks = 0, failures = 0;
  logic [LEN-1:0] ref_q;

  shift_register #(.LEN(LEN)) dut (.clk(clk), .rst(rst), .shift(shift), .din(din), .dout(dout), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; shift = 1'b0; din = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    ref_q = '0;
    for (int i = 0; i < 300; i++) begin
      shift = ($urandom_range(0, 3) != 0);
      din   = 1'($urandom);
      checks++;
      if (dout !== ref_q[0]) begin failures++; $display("dout wrong at %0d", i); end
      @(posedge clk);
      #1;
      if (shift) ref_q = {din, ref_q[LEN-1:1]};
      checks++;
      if (q !== ref_q) begin failures++; $display("cycle %0d: q=%b expected %b", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
