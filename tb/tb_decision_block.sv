// tb_decision_block: checks the single-cycle Decision block against the
// rule chain of the reference model.
//
// Directed pairs make each of the five ordering rules decide at least once
// (earliest deadline, lowest window-constraint, highest denominator for zero
// constraints, lowest numerator for equal constraints, earliest arrival);
// then random pairs drawn from small value ranges (so that ties are common)
// are compared in both input orders. Winner, loser and a_wins are checked.
module tb_decision_block;
  import sharestreams_pkg::*;
  import ss_ref_pkg::*;

  attr_t a, b, winner, loser;
  logic  a_wins;
  int checks = 0, failures = 0;
  int rule_hits [1:5];

  decision_block u_dut (.*);

  function automatic rstream_t to_ref(input attr_t v);
    rstream_t r;
    r = '{d: int'(v.deadline), x: int'(v.x), y: int'(v.y), xo: 0, yo: 0, t: 0,
          arr: int'(v.arrival), viol: 0, misses: 0};
    return r;
  endfunction

  // which rule decides the pair (independent reading of Table 1)
  function automatic int rule_of(input attr_t p, input attr_t q);
    if (p.deadline != q.deadline) return 1;
    if (int'(p.x) * int'(q.y) != int'(q.x) * int'(p.y)) return 2;
    if (p.x == 0 && q.x == 0 && p.y != q.y) return 3;
    if (!(p.x == 0 && q.x == 0) && p.x != q.x) return 4;
    return 5;
  endfunction

  task automatic try_pair(input attr_t p, input attr_t q);
    bit exp;
    a = p; b = q;
    #1;
    exp = ref_a_first(to_ref(p), to_ref(q));
    rule_hits[rule_of(p, q)]++;
    checks++;
    if (a_wins !== exp || winner !== (exp ? p : q) || loser !== (exp ? q : p)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%p b=%p a_wins=%0b expected %0b", p, q, a_wins, exp);
    end
  endtask

  function automatic attr_t mk(input int d, input int x, input int y, input int arr, input int id);
    attr_t v;
    v = '{deadline: time_t'(d), x: loss_t'(x), y: loss_t'(y), arrival: time_t'(arr), id: sid_t'(id)};
    return v;
  endfunction

  initial begin
    for (int r = 1; r <= 5; r++) rule_hits[r] = 0;
    // rule 1: earlier deadline wins regardless of constraint
    try_pair(mk(10, 7, 8, 5, 1), mk(11, 0, 8, 1, 2));
    try_pair(mk(65535, 0, 0, 0, 1), mk(3, 9, 9, 9, 2));
    // rule 2: 1/4 beats 1/2
    try_pair(mk(5, 1, 2, 0, 1), mk(5, 1, 4, 9, 2));
    try_pair(mk(5, 255, 255, 0, 1), mk(5, 254, 255, 9, 2));
    // rule 3: zero constraints, larger denominator first
    try_pair(mk(5, 0, 3, 0, 1), mk(5, 0, 200, 9, 2));
    // rule 4: 2/4 vs 1/2 equal, lower numerator first
    try_pair(mk(5, 2, 4, 0, 1), mk(5, 1, 2, 9, 2));
    // rule 5: all equal, earlier arrival; full tie goes to a
    try_pair(mk(5, 3, 4, 7, 1), mk(5, 3, 4, 6, 2));
    try_pair(mk(5, 3, 4, 6, 1), mk(5, 3, 4, 6, 2));
    for (int r = 1; r <= 5; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin failures++; $display("FAIL rule %0d never exercised", r); end
    end
    repeat (20000) begin
      attr_t p, q;
      p = mk($urandom_range(0, 3), $urandom_range(0, 4), $urandom_range(0, 4),
             $urandom_range(0, 3), $urandom_range(0, 31));
      q = mk($urandom_range(0, 3), $urandom_range(0, 4), $urandom_range(0, 4),
             $urandom_range(0, 3), $urandom_range(0, 31));
      try_pair(p, q);
      try_pair(q, p);
    end
    repeat (5000) begin
      attr_t p, q;
      p = mk($urandom, $urandom, $urandom, $urandom, $urandom);
      q = mk($urandom, $urandom, $urandom, $urandom, $urandom);
      try_pair(p, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
