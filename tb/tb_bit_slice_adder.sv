// tb_bit_slice_adder: feeds random multi-slice words (1 to 6 slices each)
// to bit-slice adders with 4-bit and 8-bit slices, slices back to back or
// with bubbles, and checks every sum slice and carry out against integer
// addition of the whole word, plus the fixed latency (log2(SLICE_W) + 4
// cycles). It counts the carry cases the design must handle: a carry passed
// from one slice to the next, a slice that propagates an incoming carry all
// the way through, and a chain broken at a word start after a carry out.
module tb_bit_slice_adder;
  localparam int MAXS = 6;

  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 4-bit slices (default) ----------------
  logic [3:0] x4, y4, s4;
  logic v4, f4, sv4, sf4, co4;
  bit_slice_adder dut4 (.clk(clk), .rst(rst), .x(x4), .y(y4), .in_valid(v4), .first_slice(f4),
                        .sum(s4), .sum_valid(sv4), .sum_first(sf4), .carry_out(co4));

  // ---------------- 8-bit slices ----------------
  logic [7:0] x8, y8, s8;
  logic v8, f8, sv8, sf8, co8;
  bit_slice_adder #(.SLICE_W(8)) dut8 (.clk(clk), .rst(rst), .x(x8), .y(y8), .in_valid(v8), .first_slice(f8),
                        .sum(s8), .sum_valid(sv8), .sum_first(sf8), .carry_out(co8));

  typedef struct { logic [7:0] s; logic c; logic f; int cyc; } exp_t;
  exp_t q4 [$];
  exp_t q8 [$];
  int n_link = 0, n_through = 0, n_break = 0;

  always @(posedge clk) begin
    if (!rst && sv4) begin
      exp_t e;
      checks++;
      if (q4.size() == 0) begin failures++; $display("4: unexpected output"); end
      else begin
        e = q4.pop_front();
        if (s4 !== e.s[3:0] || co4 !== e.c || sf4 !== e.f) begin
          failures++; $display("4: cycle %0d sum %h c %0b f %0b, expected %h %0b %0b", cycle, s4, co4, sf4, e.s[3:0], e.c, e.f);
        end
        checks++;
        if (cycle - e.cyc != 6) begin failures++; $display("4: latency %0d, expected 6", cycle - e.cyc); end
      end
    end
    if (!rst && sv8) begin
      exp_t e;
      checks++;
      if (q8.size() == 0) begin failures++; $display("8: unexpected output"); end
      else begin
        e = q8.pop_front();
        if (s8 !== e.s || co8 !== e.c || sf8 !== e.f) begin
          failures++; $display("8: cycle %0d sum %h c %0b, expected %h %0b", cycle, s8, co8, e.s, e.c);
        end
        checks++;
        if (cycle - e.cyc != 7) begin failures++; $display("8: latency %0d, expected 7", cycle - e.cyc); end
      end
    end
  end

  // Drives one word of n slices of width sw on the selected adder.
  task automatic send_word(input int sw, input int n, input logic [63:0] a, input logic [63:0] b,
                           input bit bubbles, input logic prev_cout);
    logic [64:0] s;
    logic [63:0] mask;
    mask = (n * sw == 64) ? '1 : ((64'd1 << (n * sw)) - 1);
    a &= mask; b &= mask;
    s = {1'b0, a} + {1'b0, b};
    if (prev_cout && sw == 4) n_break++;
    for (int i = 0; i < n; i++) begin
      exp_t e;
      logic [7:0] sa, sb;
      logic cin, cout;
      sa = 8'((a >> (i * sw)) & ((64'd1 << sw) - 1));
      sb = 8'((b >> (i * sw)) & ((64'd1 << sw) - 1));
      cin  = (i == 0) ? 1'b0 : s[i*sw] ^ a[i*sw] ^ b[i*sw];
      cout = s[(i+1)*sw] ^ ((i + 1 == n) ? 1'b0 : a[(i+1)*sw] ^ b[(i+1)*sw]);
      if (sw == 4 && cin) n_link++;
      if (sw == 4 && cin && ((sa ^ sb) & 8'h0F) == 8'h0F) n_through++;
      e.s = 8'((s >> (i * sw)) & ((65'd1 << sw) - 1));
      e.c = cout; e.f = (i == 0); e.cyc = cycle + 1;
      if (bubbles && $urandom_range(0, 3) == 0) begin
        v4 = 0; v8 = 0; f4 = 0; f8 = 0; @(posedge clk); #1; e.cyc = cycle + 1;
      end
      if (sw == 4) begin x4 = sa[3:0]; y4 = sb[3:0]; v4 = 1; f4 = (i == 0); q4.push_back(e); end
      else         begin x8 = sa;      y8 = sb;      v8 = 1; f8 = (i == 0); q8.push_back(e); end
      @(posedge clk); #1;
      v4 = 0; v8 = 0; f4 = 0; f8 = 0;
    end
  endtask

  initial begin
    rst = 1'b1; x4 = 0; y4 = 0; v4 = 0; f4 = 0; x8 = 0; y8 = 0; v8 = 0; f8 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    begin
      logic last_c4;
      last_c4 = 1'b0;
      for (int w = 0; w < 300; w++) begin
        int n; logic [63:0] a, b; logic [64:0] s;
        n = $urandom_range(1, MAXS);
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        if (w % 4 == 1) b = ~a ^ 64'((w % 3) == 0);   // long propagate runs
        if (w % 7 == 3) begin a = '1; b = 64'd1; end  // carry ripples through all slices
        send_word(4, n, a, b, (w % 2) == 1, last_c4);
        a &= (64'd1 << (4 * n)) - 1; b &= (64'd1 << (4 * n)) - 1;
        s = {1'b0, a} + {1'b0, b};
        last_c4 = s[4 * n];
      end
      for (int w = 0; w < 150; w++) begin
        int n; logic [63:0] a, b;
        n = $urandom_range(1, 4);
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        if (w % 4 == 1) b = ~a ^ 64'd1;
        send_word(8, n, a, b, (w % 2) == 1, 1'b0);
      end
    end
    repeat (12) @(posedge clk);
    checks++;
    if (q4.size() != 0 || q8.size() != 0) begin failures++; $display("outputs missing"); end
    $display("slice carry links %0d, full propagate slices %0d, chain breaks after carry %0d", n_link, n_through, n_break);
    checks++;
    if (n_link == 0 || n_through == 0 || n_break == 0) begin failures++; $display("a carry case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
