// tb_register_base_block: checks the per-stream DWCS priority update.
//
// A Register Base block is loaded with random constraints and then put
// through random PRIORITY_UPDATE cycles: the circulated winner ID is its own
// or another one, the current time is before, at or after its deadline, and
// the head of its arrival queue is present or not. After every edge the
// attribute bus, flags and miss counter are compared with the reference
// model, and arrival_pop with the model's "takes a new arrival" result. The
// winner, missed-deadline and met-deadline paths must all occur.
module tb_register_base_block;
  import sharestreams_pkg::*;
  import ss_ref_pkg::*;

  logic        clk = 0, rst_n;
  logic        load_en, update_en, next_valid, arrival_pop, violation, drop;
  sid_t        load_id, winner_id;
  constraint_t load_cons;
  time_t       load_arrival, current_time, next_arrival, misses;
  attr_t       attr;

  register_base_block u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_win = 0, n_miss = 0, n_met = 0, n_pop = 0;
  rstream_t m;
  int       m_arr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare();
    check(int'(attr.deadline) == m.d && int'(attr.x) == m.x && int'(attr.y) == m.y &&
          int'(attr.arrival) == m_arr && attr.id == load_id,
          $sformatf("state %p, model d=%0d x=%0d y=%0d arr=%0d", attr, m.d, m.x, m.y, m_arr));
    check(violation == m.viol[0], "violation flag");
    check(int'(misses) == m.misses, "miss counter");
  endtask

  initial begin
    rst_n = 0; load_en = 0; update_en = 0; next_valid = 0;
    load_id = '0; winner_id = '0; load_cons = '0; load_arrival = '0;
    current_time = '0; next_arrival = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (40) begin
      // LOAD
      @(negedge clk);
      load_en = 1;
      load_id = sid_t'($urandom_range(0, 31));
      load_cons = '{deadline: time_t'($urandom_range(0, 20)), x: loss_t'($urandom_range(0, 5)),
                    y: loss_t'($urandom_range(0, 8)), period: time_t'($urandom_range(1, 4))};
      if ($urandom_range(0, 9) == 0) load_cons.y = 8'd255;
      load_arrival = time_t'($urandom);
      next_valid = 1;
      m = '{d: int'(load_cons.deadline), x: int'(load_cons.x), y: int'(load_cons.y),
            xo: int'(load_cons.x), yo: int'(load_cons.y), t: int'(load_cons.period),
            arr: 0, viol: 0, misses: 0};
      m_arr = int'(load_arrival);
      @(negedge clk);
      load_en = 0;
      compare();
      current_time = '0;
      // updates
      for (int k = 0; k < 60; k++) begin
        bit win, take;
        win = ($urandom_range(0, 3) == 0);
        winner_id = win ? load_id : load_id + sid_t'($urandom_range(1, 31));
        next_arrival = time_t'($urandom);
        next_valid = ($urandom_range(0, 7) != 0);
        update_en = 1;
        #1;
        if (win) n_win++; else if (m.d <= int'(current_time)) n_miss++; else n_met++;
        take = ref_update(m, win, int'(current_time));
        check(arrival_pop == take, "arrival_pop");
        if (take && next_valid) m_arr = int'(next_arrival);
        if (take) n_pop++;
        @(negedge clk);
        update_en = 0;
        compare();
        check(drop == (take && !win), "drop flag");
        current_time = current_time + time_t'($urandom_range(0, 2));
      end
    end
    check(n_win > 0 && n_miss > 0 && n_met > 0 && n_pop > 0, "all update paths exercised");
    $display("paths: winner %0d, missed %0d, met %0d", n_win, n_miss, n_met);
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
