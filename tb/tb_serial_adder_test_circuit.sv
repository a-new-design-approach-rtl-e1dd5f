// tb_serial_adder_test_circuit: runs the write / calc / read sequence of the
// test circuit, first with the demonstration operands 9 + 3 (1001 + 0011 =
// 1100), then with every pair of 4-bit operands. Checks the parallel sum
// word after the calc burst, the bits read out serially LSB first, that the
// sum word is complete exactly, and not before, 2 cycles after the burst ends, and that the
// carry kill on the last bit leaves the carry cell clear.
module tb_serial_adder_test_circuit;
  localparam int W = 4;

  logic clk = 1'b0;
  logic rst, wr_en, x_in, y_in, calc_en, carry_set, carry_kill, rd_en;
  logic sum_out, carry;
  logic [W-1:0] sum_word;

  int checks = 0, failures = 0;

  serial_adder_test_circuit #(.DATA_W(W)) dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .x_in(x_in), .y_in(y_in), .calc_en(calc_en),
    .carry_set(carry_set), .carry_kill(carry_kill), .rd_en(rd_en),
    .sum_out(sum_out), .sum_word(sum_word), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_add(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] exp_s, got;
    exp_s = a + b;
    // write phase
    for (int i = 0; i < W; i++) begin
      wr_en = 1; x_in = a[i]; y_in = b[i];
      @(posedge clk); #1;
    end
    wr_en = 0; x_in = 0; y_in = 0;
    @(posedge clk); #1;
    // calc burst
    for (int i = 0; i < W; i++) begin
      calc_en = 1; carry_kill = (i == W-1);
      @(posedge clk); #1;
    end
    calc_en = 0; carry_kill = 0;
    @(posedge clk); #1;
    checks++;
    // one cycle before completion only W-1 sum bits have arrived
    if (sum_word !== {exp_s[W-2:0], 1'b0}) begin
      failures++; $display("%0d+%0d: partial sum word %b at burst end + 1", a, b, sum_word);
    end
    @(posedge clk); #1;
    checks++;
    if (sum_word !== exp_s) begin failures++; $display("%0d+%0d: sum word %b expected %b", a, b, sum_word, exp_s); end
    checks++;
    if (carry !== 1'b0) begin failures++; $display("%0d+%0d: carry not killed", a, b); end
    // read phase
    got = '0;
    for (int i = 0; i < W; i++) begin
      got[i] = sum_out;
      rd_en = 1;
      @(posedge clk); #1;
    end
    rd_en = 0;
    checks++;
    if (got !== exp_s) begin failures++; $display("%0d+%0d: read out %b expected %b", a, b, got, exp_s); end
    checks++;
    if (sum_word !== '0) begin failures++; $display("output register not empty after read"); end
  endtask

  initial begin
    rst = 1; wr_en = 0; x_in = 0; y_in = 0; calc_en = 0; carry_set = 0; carry_kill = 0; rd_en = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run_add(4'b1001, 4'b0011);
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        run_add(W'(a), W'(b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
