// tb_winner_id_bank: checks the winner ID / timestamp queue.
//
// Random writes and reads, including writes while full and reads while
// empty, are compared with an SV queue model: wr_ready, rd_valid, the head
// entry and the level.
module tb_winner_id_bank;
  import sharestreams_pkg::*;

  localparam int D = 8;
  logic  clk = 0, rst_n;
  always #5 clk = ~clk;
  logic  wr_valid, wr_ready, rd_valid, rd_pop;
  sid_t  wr_id, rd_id;
  time_t wr_time, rd_time;
  logic [$clog2(D):0] level;

  winner_id_bank #(.DEPTH(D)) u_dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  int mq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; wr_valid = 0; rd_pop = 0; wr_id = '0; wr_time = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      int bias;
      bit can_push;
      @(negedge clk);
      check(rd_valid == (mq.size() > 0), "rd_valid");
      check(wr_ready == (mq.size() < D), "wr_ready");
      check(int'(level) == mq.size(), "level");
      if (mq.size() > 0) check({rd_id, rd_time} == 21'(mq[0]), "head entry");
      bias = (k / 200) % 2;   // alternate filling and draining phases
      wr_valid = ($urandom_range(0, 3) < (bias ? 1 : 3));
      rd_pop = ($urandom_range(0, 3) < (bias ? 3 : 1));
      wr_id = sid_t'($urandom);
      wr_time = time_t'($urandom);
      can_push = mq.size() < D;
      if (rd_pop) begin
        if (mq.size() > 0) void'(mq.pop_front()); else n_empty++;
      end
      if (wr_valid) begin
        if (can_push) mq.push_back(int'({wr_id, wr_time}));
        else n_full++;
      end
    end
    check(n_full > 0 && n_empty > 0, "full and empty exercised");
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
