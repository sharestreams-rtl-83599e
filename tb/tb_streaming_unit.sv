// tb_streaming_unit: checks the push-pull streaming unit.
//
// The testbench models four arrival queues behind the unit's queue port.
// It checks that a PIO push has priority over a DMA word on the shared write
// port, that no pull request is raised before pull_start, that afterwards
// every queue that falls below the threshold is requested exactly once until
// it refills, and that a stalled pull_req_ready holds the request.
module tb_streaming_unit;
  import sharestreams_pkg::*;

  localparam int N = 4;
  localparam int QD = 16;
  localparam int TH = 8;
  logic  clk = 0, rst_n;
  always #5 clk = ~clk;
  logic  pio_valid, pio_ready, pull_start, pull_req_valid, pull_req_ready;
  logic  dma_valid, dma_ready, q_push_valid, q_push_ready;
  sid_t  pio_stream, pull_req_stream, dma_stream, q_push_stream;
  time_t pio_time, dma_time, q_push_time;
  logic [$clog2(QD):0] level [N];

  streaming_unit #(.N_STREAMS(N), .QUEUE_DEPTH(QD), .PULL_THRESHOLD(TH)) u_dut (.*);

  int checks = 0, failures = 0;
  int lvl [N];
  int reqs [N];
  int n_req = 0, n_pio_win = 0;
  bit outstanding [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always_comb for (int s = 0; s < N; s++) level[s] = ($clog2(QD)+1)'(lvl[s]);
  assign q_push_ready = 1'b1;

  initial begin
    rst_n = 0; pio_valid = 0; pull_start = 0; pull_req_ready = 1; dma_valid = 0;
    pio_stream = '0; pio_time = '0; dma_stream = '0; dma_time = '0;
    for (int s = 0; s < N; s++) begin lvl[s] = QD; outstanding[s] = 0; reqs[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // port sharing
    repeat (50) begin
      pio_valid = $urandom_range(0, 1); dma_valid = $urandom_range(0, 1);
      pio_stream = sid_t'($urandom_range(0, 3)); dma_stream = sid_t'($urandom_range(0, 3));
      pio_time = time_t'($urandom); dma_time = time_t'($urandom);
      #1;
      check(q_push_valid == (pio_valid || dma_valid), "push valid");
      if (pio_valid) begin
        check(q_push_stream == pio_stream && q_push_time == pio_time && pio_ready && !dma_ready,
              "PIO has the port");
        if (dma_valid) n_pio_win++;
      end else if (dma_valid)
        check(q_push_stream == dma_stream && q_push_time == dma_time && dma_ready, "DMA has the port");
      @(negedge clk);
    end
    pio_valid = 0; dma_valid = 0;
    // no pulls before pull_start even with empty queues
    for (int s = 0; s < N; s++) lvl[s] = 0;
    repeat (20) begin @(negedge clk); check(!pull_req_valid, "pull before pull_start"); end
    for (int s = 0; s < N; s++) lvl[s] = QD;
    pull_start = 1;
    @(negedge clk);
    pull_start = 0;
    // drain queues randomly, refill after a request
    for (int k = 0; k < 2000; k++) begin
      // request handshake
      if (pull_req_valid) begin
        pull_req_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (pull_req_ready) begin
          int s;
          s = int'(pull_req_stream);
          check(lvl[s] < TH, "request for a queue above threshold");
          check(!outstanding[s], "second request for the same queue");
          outstanding[s] = 1;
          reqs[s]++;
          n_req++;
        end
      end
      @(negedge clk);
      pull_req_ready = 1;
      for (int s = 0; s < N; s++) begin
        if (lvl[s] > 0 && $urandom_range(0, 3) == 0) lvl[s]--;
        if (outstanding[s] && $urandom_range(0, 9) == 0) begin
          lvl[s] = QD;          // burst delivered
          outstanding[s] = 0;
        end
      end
    end
    for (int s = 0; s < N; s++) check(reqs[s] > 0, $sformatf("stream %0d never pulled", s));
    check(n_pio_win > 0, "PIO/DMA collision exercised");
    $display("pull requests %0d", n_req);
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
