// ss_ref_pkg: behavioural reference model of DWCS scheduling for the
// testbenches.
//
// Written independently of the RTL, with plain integers: the Table-1 style
// rule chain evaluated one rule after the other, a recursive binary
// tournament over stream indices (lower indices on the first input), and the
// DWCS window-constraint adjustment of one stream per decision.
package ss_ref_pkg;

  typedef struct {
    int d;      // deadline
    int x, y;   // current loss numerator / denominator
    int xo, yo; // original loss numerator / denominator
    int t;      // request period
    int arr;    // head arrival time
    int viol;   // violation tag
    int misses; // deadline misses
  } rstream_t;

  // 1 when stream a goes before stream b
  function automatic bit ref_a_first(input rstream_t a, input rstream_t b);
    int wa, wb;
    // rule 1: earliest deadline
    if (a.d < b.d) return 1'b1;
    if (b.d < a.d) return 1'b0;
    // rule 2: lowest window-constraint a.x/a.y vs b.x/b.y
    wa = a.x * b.y;
    wb = b.x * a.y;
    if (wa < wb) return 1'b1;
    if (wb < wa) return 1'b0;
    // rule 3: both zero constraints, highest denominator
    if (a.x == 0 && b.x == 0) begin
      if (a.y > b.y) return 1'b1;
      if (b.y > a.y) return 1'b0;
    end else begin
      // rule 4: equal non-zero constraints, lowest numerator
      if (a.x < b.x) return 1'b1;
      if (b.x < a.x) return 1'b0;
    end
    // rule 5: first come first serve (ties to a)
    return a.arr <= b.arr;
  endfunction

  // winner index of the tournament over s[lo .. lo+n-1]
  function automatic int ref_tournament(input rstream_t s[], input int lo, input int n);
    int l, r;
    if (n == 1) return lo;
    l = ref_tournament(s, lo, n / 2);
    r = ref_tournament(s, lo + n / 2, n / 2);
    return ref_a_first(s[l], s[r]) ? l : r;
  endfunction

  // DWCS adjustment; returns 1 when the stream consumes a new arrival time
  // (it won, or it lost, missed its deadline and dropped its packet)
  function automatic bit ref_update(inout rstream_t s, input bit won, input int now);
    bit take;
    take = 1'b0;
    if (won) begin
      take = 1'b1;
      if (s.y > s.x) s.y--;
      if ((s.x == 0 && s.y == 0) || s.viol != 0) begin
        s.x = s.xo;
        s.y = s.yo;
      end
      s.viol = 0;
      s.d = (s.d + s.t) % 65536;
    end else if (s.d <= now) begin
      if (s.x > 0) begin
        take = 1'b1;
        s.x--;
        if (s.y > 0) s.y--;
        if (s.x == 0 && s.y == 0) begin
          s.x = s.xo;
          s.y = s.yo;
        end
      end else begin
        if (s.y < 255) s.y++;
        s.viol = 1;
      end
      s.d = (s.d + s.t) % 65536;
      if (s.misses < 65535) s.misses++;
    end
    return take;
  endfunction

endpackage
