// tb_vertical_tile_network: checks winner selection of the vertically scaled
// (tiled) network.
//
// Random attribute sets with small value ranges (so that every ordering rule
// and many ties occur) are held on the Register Base block buses while the
// network runs its rounds. The expected winner is a tournament inside each
// tile followed by a left-to-right comparison of the tile winners, computed
// with the reference model. winner_now must name it during the last of the
// TILES*log2(NET)+1 cycles, winner after it, and winner must hold when
// advance stays low. Two sizes: 16 streams on an 8-stream network (the
// 3 + 3 + 1 cycle example) and 32 streams on a 4-stream network.
module tb_vertical_tile_network;
  import sharestreams_pkg::*;
  import ss_ref_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  localparam int NA = 16, MA = 8, CA = (NA / MA) * 3 + 1;   // 7 cycles
  localparam int NB = 32, MB = 4, CB = (NB / MB) * 2 + 1;   // 17 cycles

  logic  apply_a, advance_a, apply_b, advance_b;
  attr_t reg_a [NA];
  attr_t reg_b [NB];
  attr_t win_a, now_a, win_b, now_b;

  vertical_tile_network #(.N_STREAMS(NA), .NET_STREAMS(MA)) u_a (
    .clk(clk), .rst_n(rst_n), .apply(apply_a), .advance(advance_a),
    .reg_attr(reg_a), .winner(win_a), .winner_now(now_a));
  vertical_tile_network #(.N_STREAMS(NB), .NET_STREAMS(MB)) u_b (
    .clk(clk), .rst_n(rst_n), .apply(apply_b), .advance(advance_b),
    .reg_attr(reg_b), .winner(win_b), .winner_now(now_b));

  function automatic attr_t rnd(input int id);
    attr_t v;
    v = '{deadline: time_t'($urandom_range(0, 3)), x: loss_t'($urandom_range(0, 3)),
          y: loss_t'($urandom_range(0, 3)), arrival: time_t'($urandom_range(0, 5)),
          id: sid_t'(id)};
    return v;
  endfunction

  function automatic rstream_t to_ref(input attr_t a);
    rstream_t r;
    r = '{d: int'(a.deadline), x: int'(a.x), y: int'(a.y), xo: 0, yo: 0, t: 0,
          arr: int'(a.arrival), viol: 0, misses: 0};
    return r;
  endfunction

  function automatic int tiled_winner(input rstream_t s[], input int n, input int m);
    int w, wr;
    w = ref_tournament(s, 0, m);
    for (int r = 1; r < n / m; r++) begin
      wr = ref_tournament(s, r * m, m);
      if (!ref_a_first(s[w], s[wr])) w = wr;
    end
    return w;
  endfunction

  initial begin
    rstream_t ra [];
    rstream_t rb [];
    int wa, wb;
    rst_n = 0; apply_a = 0; advance_a = 0; apply_b = 0; advance_b = 0;
    ra = new[NA]; rb = new[NB];
    for (int i = 0; i < NA; i++) reg_a[i] = '0;
    for (int i = 0; i < NB; i++) reg_b[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (400) begin
      for (int i = 0; i < NA; i++) begin reg_a[i] = rnd(i); ra[i] = to_ref(reg_a[i]); end
      for (int i = 0; i < NB; i++) begin reg_b[i] = rnd(i); rb[i] = to_ref(reg_b[i]); end
      wa = tiled_winner(ra, NA, MA);
      wb = tiled_winner(rb, NB, MB);
      // both networks start together; A finishes first
      for (int c = 0; c < CB; c++) begin
        apply_a = (c == 0); advance_a = (c < CA);
        apply_b = (c == 0); advance_b = 1;
        #1;
        if (c == CA - 1)
          check(int'(now_a.id) == wa, $sformatf("16/8 winner_now %0d expected %0d", now_a.id, wa));
        if (c == CB - 1)
          check(int'(now_b.id) == wb, $sformatf("32/4 winner_now %0d expected %0d", now_b.id, wb));
        @(negedge clk);
        if (c == CA - 1)
          check(int'(win_a.id) == wa, $sformatf("16/8 winner %0d expected %0d", win_a.id, wa));
        if (c >= CA)
          check(int'(win_a.id) == wa, "16/8 winner held without advance");
      end
      advance_a = 0; advance_b = 0;
      check(int'(win_b.id) == wb, $sformatf("32/4 winner %0d expected %0d", win_b.id, wb));
      @(negedge clk);
      check(int'(win_b.id) == wb, "32/4 winner held without advance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
