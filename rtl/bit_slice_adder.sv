// bit_slice_adder: bit-slice adder built as a state-transition circuit.
//
// A word is broken into contiguous SLICE_W-bit slices that enter one per
// cycle, least significant slice first. Each bit position j of the slice owns
// a carry state cell that holds c[j+1], the carry into bit j+1. No carry is
// ever computed combinationally from the previous slice's carry; instead
// each slice is turned into set/reset/retain actions on the cells:
//
//   stage 1        p[j] = x[j]^y[j], g[j] = x[j]&y[j]
//   stages 2..L+1  group p[0:j], g[0:j] by the prefix rule
//                    p[i:j] = p[i:k-1] & p[k:j]
//                    g[i:j] = g[k:j] | g[i:k-1] & p[k:j]
//                  one prefix level per stage (L = log2 SLICE_W, two levels
//                  for a 4-bit slice); horizontal DFFs carry the values that
//                  a level does not change, keeping all paths equally deep
//   stage L+2      k[0:j] = ~(p[0:j] | g[0:j]); cell j gets SET on g[0:j],
//                  RESET on k[0:j], and otherwise retains its value
//   stage L+3      the cells are updated
//   stage L+4      sum[j] = p[j] XOR c[j]: c[j] is cell j-1 for j > 0 and the
//                  slice carry-in for j = 0
//
// Passing the carry between slices: a retaining cell j must end up holding
// the slice carry-in, but after the previous slice it holds that slice's
// c[j+1]. So the action of the top cell (the slice-level generate/kill) of
// each slice is captured in a link DFF and applied to every cell together
// with the next slice's own actions, the own SET/RESET taking precedence. If
// the previous slice propagated throughout, all its carries equal its
// carry-in, which is also its carry-out, so a retained cell is already right.
// Marking a slice with `first_slice` replaces the linked action by RESET,
// which breaks the carry chain so the slice starts a new word with carry-in 0.
// The link-by-action scheme and the chain-break encoding are this design's
// reading of the slice-to-slice DFFs; the rest follows the stage plan above.
//
// Interface: x, y (SLICE_W bits), in_valid, first_slice in; sum, sum_valid,
// sum_first (first_slice delayed), carry_out (carry out of the slice whose
// sum is shown) out. Throughput one slice per cycle, latency L+4 cycles
// (6 for SLICE_W = 4). Slices with in_valid low are bubbles and change no
// state; first_slice may only be raised with in_valid (asserted). SLICE_W
// must be a power of two, at least 2.
module bit_slice_adder
  import sfq_arith_pkg::*;
#(
  parameter int unsigned SLICE_W = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SLICE_W-1:0] x,
  input  logic [SLICE_W-1:0] y,
  input  logic               in_valid,
  input  logic               first_slice,
  output logic [SLICE_W-1:0] sum,
  output logic               sum_valid,
  output logic               sum_first,
  output logic               carry_out
);

  localparam int unsigned LVL = $clog2(SLICE_W);
  // Register stages before the output: 0 = p/g, 1..LVL = prefix levels,
  // LVL+1 = decode, LVL+2 = cell update.
  localparam int unsigned NST = LVL + 3;

  // Valid / first-slice and per-bit partial sum travel along every stage.
  logic [NST-1:0]              v_q;
  logic [NST-1:0]              f_q;
  logic [NST-1:0][SLICE_W-1:0] psum_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q    <= '0;
      f_q    <= '0;
      psum_q <= '0;
    end else begin
      v_q[0]    <= in_valid;
      f_q[0]    <= first_slice;
      psum_q[0] <= x ^ y;
      for (int s = 1; s < NST; s++) begin
        v_q[s]    <= v_q[s-1];
        f_q[s]    <= f_q[s-1];
        psum_q[s] <= psum_q[s-1];
      end
    end
  end

  // Stage 1 and prefix levels: pg_q[l][j] holds p/g of bits [max(0,j-2^l+1):j].
  pg_t [LVL:0][SLICE_W-1:0] pg_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pg_q <= '0;
    end else begin
      for (int j = 0; j < SLICE_W; j++) begin
        pg_q[0][j].p <= x[j] ^ y[j];
        pg_q[0][j].g <= x[j] & y[j];
      end
      for (int l = 1; l <= LVL; l++) begin
        for (int j = 0; j < SLICE_W; j++) begin
          if (j >= (1 << (l-1)))
            pg_q[l][j] <= pg_combine(pg_q[l-1][j-(1<<(l-1))], pg_q[l-1][j]);
          else
            pg_q[l][j] <= pg_q[l-1][j];
        end
      end
    end
  end

  // Decode stage: k and the state transition of each carry cell.
  state_action_e [SLICE_W-1:0] act_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      act_q <= {SLICE_W{ACT_HOLD}};
    end else begin
      for (int j = 0; j < SLICE_W; j++) act_q[j] <= carry_action(pg_q[LVL][j]);
    end
  end

  // Cell update stage. Index LVL+1 of the side pipes lines up with act_q.
  localparam int unsigned SD = LVL + 1;

  logic [SLICE_W-1:0] cell_q;
  state_action_e      link_q;     // slice-level action of the previous slice
  state_action_e      link_eff;   // after the chain-break reset
  state_action_e [SLICE_W-1:0] cell_act;
  logic               cin_q;      // carry into bit 0 of the slice being updated

  assign link_eff = f_q[SD] ? ACT_RESET : link_q;

  for (genvar j = 0; j < SLICE_W; j++) begin : g_cell
    // Confluence of the slice's own action with the linked one.
    assign cell_act[j] = (act_q[j] != ACT_HOLD) ? act_q[j] : link_eff;

    state_cell u_cell (
      .clk      (clk),
      .rst      (rst),
      .act      (cell_act[j]),
      .act_valid(v_q[SD]),
      .q        (cell_q[j])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      link_q <= ACT_HOLD;
      cin_q  <= 1'b0;
    end else if (v_q[SD]) begin
      link_q <= act_q[SLICE_W-1];
      cin_q  <= f_q[SD] ? 1'b0 : cell_q[SLICE_W-1];
    end
  end

  // Output decode stage.
  always_ff @(posedge clk) begin
    if (rst) begin
      sum       <= '0;
      sum_valid <= 1'b0;
      sum_first <= 1'b0;
      carry_out <= 1'b0;
    end else begin
      sum       <= psum_q[SD+1] ^ {cell_q[SLICE_W-2:0], cin_q};
      sum_valid <= v_q[SD+1];
      sum_first <= f_q[SD+1];
      carry_out <= cell_q[SLICE_W-1];
    end
  end

  // A word start is only meaningful on a slice that is present.
  a_first_needs_valid: assert property (@(posedge clk) disable iff (rst) first_slice |-> in_valid)
    else $error("bit_slice_adder: first_slice without in_valid");

  initial begin
    assert (SLICE_W >= 2 && (SLICE_W & (SLICE_W - 1)) == 0)
      else $error("bit_slice_adder: SLICE_W must be a power of two >= 2");
  end

endmodule
