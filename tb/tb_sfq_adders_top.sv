// tb_sfq_adders_top: end-to-end test of the top at its default parameters
// (4-bit serial words, 4-bit slices). Both adders run at the same time:
//  * the serial test circuit performs write / calc / read for random operand
//    pairs, starting with 9 + 3; the carry control on the last bit either
//    kills the carry out (plain addition) or sets it (the next addition then
//    gets carry-in 1); the result is checked on the parallel word and on the
//    serial read-out;
//  * the bit-slice adder gets random words of 1 to 8 slices, back to back or
//    with bubbles, checked slice by slice against integer addition with the
//    6-cycle latency.
// Each mechanism is counted and must occur: serial carry generate, kill and
// propagate of a stored carry, external carry kill and set; slice-to-slice
// carry passing, a slice propagating its carry-in through all bits, a chain
// break at a word start after a carry out, and a bubble in the slice stream.
module tb_sfq_adders_top;
  localparam int W  = 4;
  localparam int SW = 4;

  logic clk = 1'b0;
  logic rst;
  logic ser_wr_en, ser_x_in, ser_y_in, ser_calc_en, ser_carry_set, ser_carry_kill, ser_rd_en;
  logic ser_sum_out, ser_carry;
  logic [W-1:0] ser_sum_word;
  logic [SW-1:0] slc_x, slc_y, slc_sum;
  logic slc_valid, slc_first, slc_sum_valid, slc_sum_first, slc_carry_out;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit ser_done = 0, slc_done = 0;

  sfq_adders_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_gen = 0, m_kill = 0, m_prop = 0, m_ext_kill = 0, m_ext_set = 0;
  int m_link = 0, m_through = 0, m_break = 0, m_bubble = 0;

  // ---------------- serial test circuit ----------------
  task automatic ser_add(input logic [W-1:0] a, input logic [W-1:0] b, input logic cin,
                         input logic set_out, output logic cout);
    logic [W:0] s;
    logic [W-1:0] got;
    logic c;
    s = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    c = cin;
    for (int i = 0; i < W; i++) begin
      if (a[i] & b[i]) m_gen++;
      if (!a[i] & !b[i]) m_kill++;
      if ((a[i] ^ b[i]) && c) m_prop++;
      c = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    for (int i = 0; i < W; i++) begin
      ser_wr_en = 1; ser_x_in = a[i]; ser_y_in = b[i];
      @(posedge clk); #1;
    end
    ser_wr_en = 0; ser_x_in = 0; ser_y_in = 0;
    for (int i = 0; i < W; i++) begin
      ser_calc_en = 1;
      ser_carry_kill = (i == W-1) && !set_out;
      ser_carry_set  = (i == W-1) &&  set_out;
      @(posedge clk); #1;
    end
    if (set_out) m_ext_set++; else m_ext_kill++;
    ser_calc_en = 0; ser_carry_kill = 0; ser_carry_set = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (ser_sum_word !== s[W-1:0]) begin
      failures++; $display("serial %0d+%0d+%0d: word %b expected %b", a, b, cin, ser_sum_word, s[W-1:0]);
    end
    checks++;
    if (ser_carry !== set_out) begin failures++; $display("serial: carry cell %0b expected %0b", ser_carry, set_out); end
    for (int i = 0; i < W; i++) begin
      got[i] = ser_sum_out; ser_rd_en = 1;
      @(posedge clk); #1;
    end
    ser_rd_en = 0;
    checks++;
    if (got !== s[W-1:0]) begin failures++; $display("serial read-out %b expected %b", got, s[W-1:0]); end
    cout = set_out;
  endtask

  initial begin : serial_side
    logic cin, cnext;
    @(negedge rst); #1;
    cin = 0;
    ser_add(4'b1001, 4'b0011, cin, 1'b0, cnext);
    cin = cnext;
    for (int n = 0; n < 200; n++) begin
      ser_add(W'($urandom), W'($urandom), cin, ($urandom_range(0, 3) == 0), cnext);
      cin = cnext;
    end
    ser_done = 1;
  end

  // ---------------- bit-slice adder ----------------
  typedef struct { logic [SW-1:0] s; logic c; logic f; int cyc; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (!rst && slc_sum_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("slice: unexpected output"); end
      else begin
        e = q.pop_front();
        if (slc_sum !== e.s || slc_carry_out !== e.c || slc_sum_first !== e.f) begin
          failures++; $display("slice: cycle %0d sum %h c %0b expected %h %0b", cycle, slc_sum, slc_carry_out, e.s, e.c);
        end
        checks++;
        if (cycle - e.cyc != 6) begin failures++; $display("slice: latency %0d, expected 6", cycle - e.cyc); end
      end
    end
  end

  initial begin : slice_side
    logic last_c;
    @(negedge rst); #1;
    last_c = 0;
    for (int w = 0; w < 400; w++) begin
      int n; logic [31:0] a, b, mask; logic [32:0] s; logic c;
      n = $urandom_range(1, 8);
      a = $urandom; b = $urandom;
      if (w % 4 == 1) b = ~a ^ 32'd1;
      mask = (n == 8) ? '1 : ((32'd1 << (4 * n)) - 1);
      a &= mask; b &= mask;
      s = {1'b0, a} + {1'b0, b};
      if (last_c) m_break++;
      c = 0;
      for (int i = 0; i < n; i++) begin
        exp_t e;
        logic [SW-1:0] sa, sb;
        sa = SW'(a >> (4 * i)); sb = SW'(b >> (4 * i));
        if (c) m_link++;
        if (c && (sa ^ sb) == '1) m_through++;
        c = s[4 * (i + 1)] ^ ((i + 1 == n) ? 1'b0 : a[4 * (i + 1)] ^ b[4 * (i + 1)]);
        if ((w % 3 == 2) && $urandom_range(0, 2) == 0) begin
          slc_valid = 0; slc_first = 0; m_bubble++;
          @(posedge clk); #1;
        end
        e.s = SW'(s >> (4 * i)); e.c = c; e.f = (i == 0); e.cyc = cycle + 1;
        slc_x = sa; slc_y = sb; slc_valid = 1; slc_first = (i == 0);
        q.push_back(e);
        @(posedge clk); #1;
      end
      slc_valid = 0; slc_first = 0;
      last_c = s[4 * n];
    end
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("slice: %0d outputs missing", q.size()); end
    slc_done = 1;
  end

  initial begin
    rst = 1;
    ser_wr_en = 0; ser_x_in = 0; ser_y_in = 0; ser_calc_en = 0;
    ser_carry_set = 0; ser_carry_kill = 0; ser_rd_en = 0;
    slc_x = 0; slc_y = 0; slc_valid = 0; slc_first = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (ser_done && slc_done);
    $display("serial: generate %0d kill %0d propagate-carry %0d ext-kill %0d ext-set %0d",
             m_gen, m_kill, m_prop, m_ext_kill, m_ext_set);
    $display("slice: carry links %0d full-propagate %0d chain breaks %0d bubbles %0d",
             m_link, m_through, m_break, m_bubble);
    checks += 9;
    if (m_gen == 0)      begin failures++; $display("no carry generate"); end
    if (m_kill == 0)     begin failures++; $display("no carry kill"); end
    if (m_prop == 0)     begin failures++; $display("no carry propagate"); end
    if (m_ext_kill == 0) begin failures++; $display("no external kill"); end
    if (m_ext_set == 0)  begin failures++; $display("no external set"); end
    if (m_link == 0)     begin failures++; $display("no slice carry link"); end
    if (m_through == 0)  begin failures++; $display("no full-propagate slice"); end
    if (m_break == 0)    begin failures++; $display("no chain break"); end
    if (m_bubble == 0)   begin failures++; $display("no bubble"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
