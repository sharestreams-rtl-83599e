// tb_winner_only_network: checks winner selection with winner-only routing.
//
// Random attribute sets are applied in cycle 0 and the winners recirculated
// for log2(N) cycles, with 32 and with 8 streams. winner_now must name the
// reference tournament winner during the last cycle and `winner` after it;
// the register buses are scrambled after cycle 0 to show they are no longer
// used, and the result must hold while advance is low.
module tb_winner_only_network;
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

  localparam int NA = 32;
  localparam int NB = 8;
  logic  apply_a, advance_a, apply_b, advance_b;
  attr_t reg_a [NA];
  attr_t reg_b [NB];
  attr_t win_a, now_a, win_b, now_b;

  winner_only_network #(.N_STREAMS(NA)) u_a (
    .clk(clk), .rst_n(rst_n), .apply(apply_a), .advance(advance_a),
    .reg_attr(reg_a), .winner(win_a), .winner_now(now_a));
  winner_only_network #(.N_STREAMS(NB)) u_b (
    .clk(clk), .rst_n(rst_n), .apply(apply_b), .advance(advance_b),
    .reg_attr(reg_b), .winner(win_b), .winner_now(now_b));

  function automatic attr_t rnd(input int id);
    attr_t v;
    v = '{deadline: time_t'($urandom_range(0, 3)), x: loss_t'($urandom_range(0, 3)),
          y: loss_t'($urandom_range(0, 3)), arrival: time_t'($urandom_range(0, 5)),
          id: sid_t'(id)};
    return v;
  endfunction

  function automatic rstream_t to_ref(input attr_t v);
    rstream_t r;
    r = '{d: int'(v.deadline), x: int'(v.x), y: int'(v.y), xo: 0, yo: 0, t: 0,
          arr: int'(v.arrival), viol: 0, misses: 0};
    return r;
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
    repeat (300) begin
      for (int i = 0; i < NA; i++) begin reg_a[i] = rnd(i); ra[i] = to_ref(reg_a[i]); end
      for (int i = 0; i < NB; i++) begin reg_b[i] = rnd(i); rb[i] = to_ref(reg_b[i]); end
      wa = ref_tournament(ra, 0, NA);
      wb = ref_tournament(rb, 0, NB);
      for (int c = 0; c < 5; c++) begin
        apply_a = (c == 0); advance_a = 1;
        apply_b = (c == 0); advance_b = (c < 3);
        #1;
        if (c == 4) check(int'(now_a.id) == wa, $sformatf("N=32 winner_now %0d expected %0d", now_a.id, wa));
        if (c == 2) check(int'(now_b.id) == wb, $sformatf("N=8 winner_now %0d expected %0d", now_b.id, wb));
        @(negedge clk);
        if (c == 0) begin
          for (int i = 0; i < NA; i++) reg_a[i] = rnd(i);
          for (int i = 0; i < NB; i++) reg_b[i] = rnd(i);
        end
        if (c == 2) check(int'(win_b.id) == wb, $sformatf("N=8 winner %0d expected %0d", win_b.id, wb));
      end
      advance_a = 0;
      check(int'(win_a.id) == wa, $sformatf("N=32 winner %0d expected %0d", win_a.id, wa));
      @(negedge clk);
      check(int'(win_a.id) == wa && int'(win_b.id) == wb, "winner held");
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
