// tb_bit_serial_adder: streams random words LSB first through the adder
// back to back, with carry_kill on each word's MSB so words do not interfere,
// and checks every sum bit against integer addition, the 2-cycle latency,
// the stored carry out, and the external carry set (used as carry-in 1 for
// some words by setting the carry on the previous word's MSB).
module tb_bit_serial_adder;
  localparam int W = 8;
  localparam int NWORDS = 60;

  logic clk = 1'b0;
  logic rst, x, y, in_valid, carry_set, carry_kill;
  logic sum, sum_valid, carry;

  int checks = 0, failures = 0;
  int cycle = 0;

  bit_serial_adder dut (
    .clk(clk), .rst(rst), .x(x), .y(y), .in_valid(in_valid),
    .carry_set(carry_set), .carry_kill(carry_kill),
    .sum(sum), .sum_valid(sum_valid), .carry(carry));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sum bits with the cycle they were fed in
  logic exp_bits [$];
  int   exp_cyc  [$];
  int   n_gen = 0, n_kill = 0, n_prop_carry = 0, n_set = 0;

  // checker
  always @(posedge clk) begin
    if (!rst && sum_valid) begin
      checks++;
      if (exp_bits.size() == 0) begin
        failures++; $display("unexpected sum bit");
      end else begin
        logic e; int c;
        e = exp_bits.pop_front();
        c = exp_cyc.pop_front();
        if (sum !== e) begin failures++; $display("cycle %0d: sum=%0b expected %0b", cycle, sum, e); end
        checks++;
        if (cycle - c != 2) begin failures++; $display("latency %0d, expected 2", cycle - c); end
      end
    end
  end

  initial begin
    rst = 1'b1; x = 0; y = 0; in_valid = 0; carry_set = 0; carry_kill = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    begin
      logic cin_next;
      cin_next = 1'b0;
      for (int w = 0; w < NWORDS; w++) begin
        logic [W-1:0] a, b;
        logic [W:0]   s;
        logic         cin, use_set;
        a = W'($urandom); b = W'($urandom);
        if (w % 5 == 0) a = ~b;                 // long propagate chains
        cin = cin_next;
        use_set = ($urandom_range(0, 2) == 0);
        s = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
        for (int i = 0; i < W; i++) begin
          // a gap between bits now and then
          if ($urandom_range(0, 7) == 0) begin
            in_valid = 0; carry_set = 0; carry_kill = 0;
            @(posedge clk); #1;
          end
          x = a[i]; y = b[i]; in_valid = 1;
          carry_kill = (i == W-1) && !use_set;
          carry_set  = (i == W-1) &&  use_set;
          if (a[i] & b[i]) n_gen++;
          if (!a[i] & !b[i]) n_kill++;
          if ((a[i] ^ b[i]) && s[i] == a[i] ^ b[i] ^ 1'b1) n_prop_carry++;
          exp_bits.push_back(s[i]);
          exp_cyc.push_back(cycle + 1);
          @(posedge clk); #1;
        end
        if (use_set) n_set++;
        cin_next = use_set;
        in_valid = 0; carry_set = 0; carry_kill = 0;
        @(posedge clk); #1;
        @(posedge clk); #1;
        checks++;
        if (carry !== use_set) begin failures++; $display("word %0d: carry cell %0b expected %0b", w, carry, use_set); end
      end
      // a word whose carry out is kept (no kill): stored carry equals carry out
      begin
        logic [W-1:0] a, b; logic [W:0] s;
        a = 8'hF0; b = 8'h31;
        s = {1'b0, a} + {1'b0, b} + (W+1)'(cin_next);
        for (int i = 0; i < W; i++) begin
          x = a[i]; y = b[i]; in_valid = 1;
          exp_bits.push_back(s[i]); exp_cyc.push_back(cycle + 1);
          @(posedge clk); #1;
        end
        in_valid = 0;
        repeat (3) @(posedge clk); #1;
        checks++;
        if (carry !== s[W]) begin failures++; $display("carry out %0b expected %0b", carry, s[W]); end
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d sum bits missing", exp_bits.size()); end
    checks++;
    if (n_gen == 0 || n_kill == 0 || n_prop_carry == 0 || n_set == 0) begin
      failures++; $display("a case never occurred: gen %0d kill %0d prop %0d set %0d", n_gen, n_kill, n_prop_carry, n_set);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
