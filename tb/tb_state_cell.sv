// tb_state_cell: drives the state cell with random set / reset / retain /
// invert actions, with and without act_valid, and compares q every cycle
// with a reference bit kept by the testbench.
module tb_state_cell;
  import sfq_arith_pkg::*;

  logic clk = 1'b0;
  logic rst;
  state_action_e act;
  logic act_valid;
  logic q;

  int checks = 0, failures = 0;
  logic ref_q;
  int seen [4];

  state_cell dut (.clk(clk), .rst(rst), .act(act), .act_valid(act_valid), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; act = ACT_HOLD; act_valid = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    ref_q = 1'b0;
    checks++; if (q !== 1'b0) begin failures++; $display("reset value wrong"); end
    for (int i = 0; i < 400; i++) begin
      act       = state_action_e'($urandom_range(0, 3));
      act_valid = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      #1;
      if (act_valid) begin
        seen[act]++;
        case (act)
          ACT_SET:    ref_q = 1'b1;
          ACT_RESET:  ref_q = 1'b0;
          ACT_INVERT: ref_q = ~ref_q;
          default:    ref_q = ref_q;
        endcase
      end
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: act=%0d valid=%0b q=%0b expected %0b", i, act, act_valid, q, ref_q);
      end
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (seen[a] == 0) begin failures++; $display("action %0d never applied", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
