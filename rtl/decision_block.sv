// decision_block: single-cycle pairwise ordering of two streams by the DWCS
// rules.
//
// Two 53-bit attribute buses (a, b) come in; the stream with the higher
// priority leaves on `winner`, the other on `loser`. The rules, in order of
// precedence:
//   1. earliest deadline first;
//   2. equal deadlines: lowest window-constraint x/y first;
//   3. equal deadlines and both numerators zero: highest denominator first;
//   4. equal deadlines and equal non-zero window-constraints: lowest
//      numerator first;
//   5. everything else: first-come-first-serve (earliest arrival time).
// Instead of walking the rules in sequence, every compare is evaluated at once
// (the "value bus": deadline, cross-multiplied window-constraint, denominator,
// numerator and arrival-time compares) and a small logic function over the
// equality tests (the "predicate bus") selects the one that decides. The two
// window-constraints are compared without division as x_a*y_b against
// x_b*y_a with two 8x8 multipliers. This structure follows the published
// Decision block. A tie that survives all five rules goes to input a (this
// design's choice), so the result is fully deterministic.
//
// Purely combinational: the recirculating network registers the outputs.
module decision_block
  import sharestreams_pkg::*;
(
  input  attr_t a,
  input  attr_t b,
  output attr_t winner,
  output attr_t loser,
  output logic  a_wins
);

  // value bus: all compares evaluated concurrently
  logic [2*LOSS_W-1:0] xa_yb, xb_ya;
  logic d_lt, w_lt, y_gt, x_lt, arr_le;
  // predicate bus
  logic d_eq, w_eq, x_zero, y_eq, x_eq;

  always_comb begin
    xa_yb  = a.x * b.y;
    xb_ya  = b.x * a.y;

    d_lt   = a.deadline < b.deadline;
    w_lt   = xa_yb < xb_ya;
    y_gt   = a.y > b.y;
    x_lt   = a.x < b.x;
    arr_le = a.arrival <= b.arrival;

    d_eq   = a.deadline == b.deadline;
    w_eq   = xa_yb == xb_ya;
    x_zero = (a.x == '0) && (b.x == '0);
    y_eq   = a.y == b.y;
    x_eq   = a.x == b.x;

    // logic function selecting one value-bus entry
    if (!d_eq)                a_wins = d_lt;
    else if (!w_eq)           a_wins = w_lt;
    else if (x_zero && !y_eq) a_wins = y_gt;
    else if (!x_zero && !x_eq) a_wins = x_lt;
    else                      a_wins = arr_le;

    winner = a_wins ? a : b;
    loser  = a_wins ? b : a;
  end

endmodule
