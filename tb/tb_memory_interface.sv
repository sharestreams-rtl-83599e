// tb_memory_interface: checks the scheduler-side memory partitions.
//
// The constraint partition must return what the host wrote for each stream
// (and ignore writes to stream numbers beyond N); load_en must consume the
// head arrival time of every stream at once while sched_pop consumes only the
// selected ones; winner IDs and timestamps written by the scheduler must be
// read back in order, and the bank must report full.
module tb_memory_interface;
  import sharestreams_pkg::*;

  localparam int N = 4;
  localparam int QD = 8;
  localparam int WD = 4;
  logic        clk = 0, rst_n;
  always #5 clk = ~clk;
  logic        cons_wr_valid, arr_push_valid, arr_push_ready;
  sid_t        cons_wr_stream, arr_push_stream;
  constraint_t cons_wr_data;
  time_t       arr_push_time;
  logic [$clog2(QD):0] arr_level [N];
  logic        win_rd_valid, win_rd_pop, load_en, win_wr_valid, win_wr_ready;
  sid_t        win_rd_id, win_wr_id;
  time_t       win_rd_time, win_wr_time;
  constraint_t sched_cons [N];
  time_t       sched_arrival [N];
  logic        sched_valid [N];
  logic        sched_pop [N];
  logic [31:0] underruns;

  memory_interface #(.N_STREAMS(N), .QUEUE_DEPTH(QD), .WINNER_DEPTH(WD)) u_dut (.*);

  int checks = 0, failures = 0;
  constraint_t mc [N];
  int mq [N][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare_heads();
    for (int s = 0; s < N; s++) begin
      check(sched_valid[s] == (mq[s].size() > 0), $sformatf("valid %0d", s));
      if (mq[s].size() > 0) check(int'(sched_arrival[s]) == mq[s][0], $sformatf("head %0d", s));
      check(int'(arr_level[s]) == mq[s].size(), $sformatf("level %0d", s));
      check(sched_cons[s] == mc[s], $sformatf("constraints %0d", s));
    end
  endtask

  initial begin
    rst_n = 0; cons_wr_valid = 0; arr_push_valid = 0; win_rd_pop = 0; load_en = 0;
    win_wr_valid = 0; cons_wr_stream = '0; cons_wr_data = '0; arr_push_stream = '0;
    arr_push_time = '0; win_wr_id = '0; win_wr_time = '0;
    for (int s = 0; s < N; s++) begin sched_pop[s] = 0; mc[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) begin
      // constraints, including a write to a stream that does not exist
      for (int s = 0; s <= N; s++) begin
        cons_wr_valid = 1;
        cons_wr_stream = sid_t'(s == N ? 17 : s);
        cons_wr_data = constraint_t'({$urandom, $urandom});
        if (s < N) mc[s] = cons_wr_data;
        @(negedge clk);
      end
      cons_wr_valid = 0;
      // arrivals
      repeat (5 * N) begin
        arr_push_valid = 1;
        arr_push_stream = sid_t'($urandom_range(0, N - 1));
        arr_push_time = time_t'($urandom);
        #1;
        if (arr_push_ready) mq[arr_push_stream].push_back(int'(arr_push_time));
        @(negedge clk);
      end
      arr_push_valid = 0;
      compare_heads();
      // LOAD consumes every head
      load_en = 1;
      for (int s = 0; s < N; s++) if (mq[s].size() > 0) void'(mq[s].pop_front());
      @(negedge clk);
      load_en = 0;
      compare_heads();
      // selective pops
      repeat (6) begin
        for (int s = 0; s < N; s++) begin
          sched_pop[s] = ($urandom_range(0, 1) == 1);
          if (sched_pop[s] && mq[s].size() > 0) void'(mq[s].pop_front());
        end
        @(negedge clk);
        for (int s = 0; s < N; s++) sched_pop[s] = 0;
        compare_heads();
      end
    end
    // winners: write WD+1, the last must be refused
    for (int k = 0; k <= WD; k++) begin
      win_wr_valid = 1;
      win_wr_id = sid_t'(k + 3);
      win_wr_time = time_t'(100 + k);
      #1 check(win_wr_ready == (k < WD), "winner bank ready");
      @(negedge clk);
    end
    win_wr_valid = 0;
    for (int k = 0; k < WD; k++) begin
      check(win_rd_valid && int'(win_rd_id) == k + 3 && int'(win_rd_time) == 100 + k, "winner read back");
      win_rd_pop = 1;
      @(negedge clk);
    end
    win_rd_pop = 0;
    check(!win_rd_valid, "winner bank empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
