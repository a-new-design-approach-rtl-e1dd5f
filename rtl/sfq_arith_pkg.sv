// sfq_arith_pkg: types and functions shared by the state-transition adders.
//
// The adders treat an arithmetic circuit with a feedback loop (the carry) as a
// sequential circuit: the loop state lives in a nondestructive-readout storage
// cell, and each cycle the inputs are decoded into an *action* on that cell
// (set, reset, retain or invert). This package holds the action encoding, the
// function that applies an action to a stored bit, and the group
// propagate/generate combine rule used by the bit-slice adder:
//   p[i:j] = p[i:k-1] & p[k:j]
//   g[i:j] = g[k:j] | (g[i:k-1] & p[k:j])
// Action encoding (2 bits) is this design's own choice.
package sfq_arith_pkg;

  typedef enum logic [1:0] {
    ACT_HOLD   = 2'b00,  // retain the stored bit (carry propagate)
    ACT_SET    = 2'b01,  // force to 1 (carry generate)
    ACT_RESET  = 2'b10,  // force to 0 (carry kill)
    ACT_INVERT = 2'b11   // toggle
  } state_action_e;

  // Group propagate/generate pair.
  typedef struct packed {
    logic p;
    logic g;
  } pg_t;

  // Next value of a stored bit under an action.
  function automatic logic apply_action(input state_action_e act, input logic q);
    unique case (act)
      ACT_HOLD:   return q;
      ACT_SET:    return 1'b1;
      ACT_RESET:  return 1'b0;
      default:    return ~q;
    endcase
  endfunction

  // Combine a lower group lo = [i:k-1] with the adjacent upper group hi = [k:j].
  function automatic pg_t pg_combine(input pg_t lo, input pg_t hi);
    pg_t r;
    r.p = lo.p & hi.p;
    r.g = hi.g | (lo.g & hi.p);
    return r;
  endfunction

  // Carry action from group propagate/generate: generate sets the carry,
  // kill = ~(p | g) resets it, propagate retains it.
  function automatic state_action_e carry_action(input pg_t grp);
    if (grp.g)                return ACT_SET;
    else if (!(grp.p | grp.g)) return ACT_RESET;
    else                      return ACT_HOLD;
  endfunction

endpackage
