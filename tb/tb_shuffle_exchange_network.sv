// tb_shuffle_exchange_network: checks winner selection in the recirculating
// shuffle-exchange network.
//
// Random attribute sets (small value ranges so that every ordering rule and
// many ties occur) are applied in cycle 0 and recirculated for log2(N)
// cycles. winner_now must name the tournament winner of the reference model
// during the last cycle, order[0] after it, and order[] must still hold every
// stream exactly once. Runs with 32 streams and with 4.
module tb_shuffle_exchange_network;
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

  // ---- 32 streams
  localparam int NA = 32;
  logic  apply_a, advance_a;
  attr_t reg_a [NA];
  attr_t order_a [NA];
  attr_t now_a;
  shuffle_exchange_network #(.N_STREAMS(NA)) u_a (
    .clk(clk), .rst_n(rst_n), .apply(apply_a), .advance(advance_a),
    .reg_attr(reg_a), .order(order_a), .winner_now(now_a));

  // ---- 4 streams
  localparam int NB = 4;
  logic  apply_b, advance_b;
  attr_t reg_b [NB];
  attr_t order_b [NB];
  attr_t now_b;
  shuffle_exchange_network #(.N_STREAMS(NB)) u_b (
    .clk(clk), .rst_n(rst_n), .apply(apply_b), .advance(advance_b),
    .reg_attr(reg_b), .order(order_b), .winner_now(now_b));

  function automatic attr_t rnd(input int id);
    attr_t v;
    v = '{deadline: time_t'($urandom_range(0, 3)), x: loss_t'($urandom_range(0, 3)),
          y: loss_t'($urandom_range(0, 3)), arrival: time_t'($urandom_range(0, 5)),
          id: sid_t'(id)};
    return v;
  endfunction

  initial begin
    rstream_t ra [];
    rstream_t rb [];
    int w;
    bit seen [NA];
    rst_n = 0; apply_a = 0; advance_a = 0; apply_b = 0; advance_b = 0;
    ra = new[NA]; rb = new[NB];
    for (int i = 0; i < NA; i++) reg_a[i] = '0;
    for (int i = 0; i < NB; i++) reg_b[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) begin
      for (int i = 0; i < NA; i++) begin
        reg_a[i] = rnd(i);
        ra[i] = '{d: int'(reg_a[i].deadline), x: int'(reg_a[i].x), y: int'(reg_a[i].y),
                  xo: 0, yo: 0, t: 0, arr: int'(reg_a[i].arrival), viol: 0, misses: 0};
      end
      for (int i = 0; i < NB; i++) begin
        reg_b[i] = rnd(i);
        rb[i] = '{d: int'(reg_b[i].deadline), x: int'(reg_b[i].x), y: int'(reg_b[i].y),
                  xo: 0, yo: 0, t: 0, arr: int'(reg_b[i].arrival), viol: 0, misses: 0};
      end
      // 32 streams: 5 cycles
      for (int c = 0; c < $clog2(NA); c++) begin
        apply_a = (c == 0); advance_a = 1;
        if (c == $clog2(NA) - 1) begin
          #1 w = ref_tournament(ra, 0, NA);
          check(int'(now_a.id) == w, $sformatf("N=32 winner_now %0d expected %0d", now_a.id, w));
        end
        // register bus changes after cycle 0 must not matter
        @(negedge clk);
        if (c == 0) for (int i = 0; i < NA; i++) reg_a[i] = rnd(i);
      end
      advance_a = 0;
      check(int'(order_a[0].id) == w, $sformatf("N=32 order[0] %0d expected %0d", order_a[0].id, w));
      for (int i = 0; i < NA; i++) seen[i] = 0;
      for (int i = 0; i < NA; i++) seen[order_a[i].id] = 1;
      for (int i = 0; i < NA; i++) check(seen[i], "stream lost from order list");
      // 4 streams: 2 cycles
      for (int c = 0; c < 2; c++) begin
        apply_b = (c == 0); advance_b = 1;
        if (c == 1) begin
          #1 w = ref_tournament(rb, 0, NB);
          check(int'(now_b.id) == w, $sformatf("N=4 winner_now %0d expected %0d", now_b.id, w));
        end
        @(negedge clk);
      end
      advance_b = 0;
      check(int'(order_b[0].id) == w, "N=4 order[0]");
      // hold: no advance, no change
      @(negedge clk);
      check(int'(order_b[0].id) == w, "N=4 order[0] held");
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
