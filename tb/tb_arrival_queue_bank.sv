// tb_arrival_queue_bank: checks the banked per-stream arrival-time queues.
//
// Four streams with eight-entry queues receive random pushes and random
// pops (several streams popped in the same cycle) compared with SV queues:
// head and valid per stream, level, refusal of pushes into a full queue, and
// the underrun counter for pops of empty queues.
module tb_arrival_queue_bank;
  import sharestreams_pkg::*;

  localparam int N = 4;
  localparam int D = 8;
  logic  clk = 0, rst_n;
  always #5 clk = ~clk;
  logic  push_valid, push_ready;
  sid_t  push_stream;
  time_t push_time;
  time_t head [N];
  logic  valid [N];
  logic  pop [N];
  logic [$clog2(D):0] level [N];
  logic [31:0] underruns;

  arrival_queue_bank #(.N_STREAMS(N), .DEPTH(D)) u_dut (.*);

  int checks = 0, failures = 0;
  int mq [N][$];
  int m_under = 0, n_full = 0, n_multi = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; push_valid = 0; push_stream = '0; push_time = '0;
    for (int s = 0; s < N; s++) pop[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      int npop;
      bit can_push;
      @(negedge clk);
      // compare visible state
      for (int s = 0; s < N; s++) begin
        check(valid[s] == (mq[s].size() > 0), $sformatf("valid %0d", s));
        check(int'(level[s]) == mq[s].size(), $sformatf("level %0d", s));
        if (mq[s].size() > 0) check(int'(head[s]) == mq[s][0], $sformatf("head %0d", s));
      end
      check(int'(underruns) == m_under, "underrun count");
      // new stimulus
      push_valid = ($urandom_range(0, 2) != 0);
      push_stream = sid_t'($urandom_range(0, N - 1));
      push_time = time_t'($urandom);
      npop = 0;
      for (int s = 0; s < N; s++) begin
        pop[s] = ($urandom_range(0, 4) == 0);
        npop += int'(pop[s]);
      end
      if (npop > 1) n_multi++;
      #1;
      check(push_ready == (mq[push_stream].size() < D), "push_ready");
      // model the edge: a push is refused when the queue was full before
      // the edge; pops remove the old heads
      can_push = mq[push_stream].size() < D;
      for (int s = 0; s < N; s++)
        if (pop[s]) begin
          if (mq[s].size() > 0) void'(mq[s].pop_front());
          else m_under++;
        end
      if (push_valid) begin
        if (can_push) mq[push_stream].push_back(int'(push_time));
        else n_full++;
      end
    end
    check(n_full > 0 && m_under > 0 && n_multi > 0, "full, underrun and concurrent pops exercised");
    $display("full refusals %0d, underruns %0d", n_full, m_under);
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
