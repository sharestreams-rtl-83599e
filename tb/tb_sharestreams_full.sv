// tb_sharestreams_full: the scheduler at its default size, end to end.
//
// sharestreams_top is instantiated with every parameter at its default: 32
// streams in the base architecture, 256-entry arrival-time queues and a
// 256-entry winner ID bank. The testbench plays the host with the mixed
// stream set (fair-share, EDF, no-loss and lossy streams): it writes the
// constraints, fills the queues by PIO, enables pull mode and serves the
// streaming unit's pull requests with DMA bursts, pushes extra arrival
// times by PIO while running, starves one stream for a while and pauses
// reading winners so the bank fills. A behavioural model checks every
// decision (winner, timestamp, six clock cycles per decision) and every
// winner read back.
module tb_sharestreams_full;
  import sharestreams_pkg::*;
  import ss_ref_pkg::*;

  localparam int unsigned N_STREAMS    = 32;
  localparam arch_e       ARCH         = ARCH_BA;
  localparam int unsigned QUEUE_DEPTH  = 256;
  localparam int unsigned WINNER_DEPTH = 256;
  localparam int          WORKLOAD     = 0;
  localparam int          NDEC         = 60000;
  localparam int          SP_START     = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int LOG_N    = $clog2(N_STREAMS);
  localparam int SPACING  = (ARCH == ARCH_CA) ? LOG_N : LOG_N + 1;
  localparam int STARVE   = 0;                // starved stream in workload 0
  localparam int BURST    = QUEUE_DEPTH / 2;  // DMA words per pull request
  localparam int PAUSE    = (WINNER_DEPTH + 16) * (SPACING + 1);  // reader pause, cycles

  // ---------------------------------------------------------------- DUT
  logic        rst_n, run;
  logic        cons_wr_valid;
  sid_t        cons_wr_stream;
  constraint_t cons_wr_data;
  logic        pio_valid, pio_ready;
  sid_t        pio_stream;
  time_t       pio_time;
  logic        pull_start, pull_req_valid, pull_req_ready;
  sid_t        pull_req_stream;
  logic        dma_valid, dma_ready;
  sid_t        dma_stream;
  time_t       dma_time;
  logic        win_rd_valid, win_rd_pop;
  sid_t        win_rd_id;
  time_t       win_rd_time;
  logic        busy;
  time_t       current_time;
  logic [31:0] decisions, stall_cycles, underruns;
  logic [N_STREAMS-1:0] violation, dropped;

  sharestreams_top u_dut (.*);

  // ---------------------------------------------------------------- results
  int checks = 0, failures = 0;
  bit done = 0;
  int n_dec = 0, n_drop = 0, n_viol = 0, n_met = 0, n_underrun = 0;
  int n_pio = 0, n_dma = 0, n_pull = 0, n_stall_dec = 0, n_read = 0;
  int wins [N_STREAMS];
  int wins_early [N_STREAMS];   // decisions before SP_START
  int wins_late [N_STREAMS];    // decisions from SP_START on

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%m] %s", what);
    end
  endtask

  // ---------------------------------------------------------------- workload
  function automatic constraint_t cfg(input int s);
    constraint_t c;
    c = '{deadline: 0, x: 0, y: 0, period: 1};
    case (WORKLOAD)
      1: case (s)
           0: begin c.x = 7;  c.y = 8;  end
           1: begin c.x = 14; c.y = 16; end
           2: begin c.x = 6;  c.y = 8;  end
           default: begin c.x = 4; c.y = 8; end
         endcase
      2: begin c.deadline = time_t'(N_STREAMS - s); c.period = time_t'(N_STREAMS); end
      3: case (s)
           0: begin c.x = 2; c.y = 4; end
           1, 2: begin c.x = 3; c.y = 4; end
           default: begin c.x = 0; c.y = 255; c.deadline = time_t'(SP_START); end
         endcase
      4: case (s)
           0: begin c.x = 2; c.y = 3; end
           1: begin c.x = 5; c.y = 6; end
           2: begin c.deadline = 2; c.period = 4; end
           default: begin c.deadline = 1; c.period = 4; end
         endcase
      default: case (s % 4)
           0: begin c.x = loss_t'(s % 7 + 1); c.y = loss_t'(s % 7 + 3); end
           1: begin c.deadline = time_t'(s); c.period = time_t'(N_STREAMS); end
           2: begin c.y = 3; c.deadline = 1; c.period = 2; end
           default: begin c.x = 1; c.y = 4; c.deadline = 2; c.period = 3; end
         endcase
    endcase
    return c;
  endfunction

  // ---------------------------------------------------------------- model
  rstream_t ms [];
  int       mq [N_STREAMS][$];     // mirrored queue contents
  int       exp_id [$];
  int       exp_ts [$];
  int       now = 0;
  int       since_update = 0;
  bit       stalled_since = 0;

  initial ms = new[N_STREAMS];

  always @(posedge clk) begin
    int w;
    bit take;
    if (rst_n) begin
      since_update++;
      if (u_dut.u_ctrl.stall) stalled_since = 1;
      if (u_dut.load_en) begin
        for (int s = 0; s < N_STREAMS; s++) begin
          constraint_t c;
          c = cfg(s);
          ms[s] = '{d: int'(c.deadline), x: int'(c.x), y: int'(c.y), xo: int'(c.x),
                    yo: int'(c.y), t: int'(c.period), arr: 0, viol: 0, misses: 0};
          if (mq[s].size() > 0) ms[s].arr = mq[s].pop_front();
        end
        now = 0;
        since_update = 0;
        stalled_since = 0;
      end else if (u_dut.update_en) begin
        w = ref_tournament(ms, 0, N_STREAMS);
        check(int'(u_dut.winner_id) == w,
              $sformatf("decision %0d: winner %0d, expected %0d", n_dec, u_dut.winner_id, w));
        check(int'(current_time) == now,
              $sformatf("current time %0d, expected %0d", current_time, now));
        if (!stalled_since)
          check(since_update == SPACING,
                $sformatf("decision %0d took %0d cycles", n_dec, since_update));
        else
          n_stall_dec++;
        wins[w]++;
        if (now < SP_START) wins_early[w]++; else wins_late[w]++;
        for (int s = 0; s < N_STREAMS; s++) begin
          bit missed;
          missed = (s != w) && (ms[s].d <= now);
          if (missed && ms[s].x > 0) n_drop++;
          else if (missed) n_viol++;
          else if (s != w) n_met++;
          take = ref_update(ms[s], s == w, now);
          if (take) begin
            if (mq[s].size() > 0) ms[s].arr = mq[s].pop_front();
            else n_underrun++;
          end
        end
        exp_id.push_back(w);
        exp_ts.push_back(now);
        now++;
        n_dec++;
        since_update = 0;
        stalled_since = 0;
      end
      // pushes accepted at this edge land behind the pops
      if (pio_valid && pio_ready) begin
        mq[pio_stream].push_back(int'(pio_time));
        n_pio++;
      end
      if (dma_valid && dma_ready) begin
        mq[dma_stream].push_back(int'(dma_time));
        n_dma++;
        dma_taken = 1;
      end
    end
  end

  // ---------------------------------------------------------------- host
  int next_arr [N_STREAMS];
  int bursts [$];          // streams with a DMA burst owed
  bit reading = 1;

  function automatic time_t gen_arrival(input int s);
    next_arr[s] += 1 + ((s * 7 + next_arr[s]) % 3);
    return time_t'(next_arr[s]);
  endfunction

  // DMA engine: one burst at a time, one word per cycle; a word is replaced
  // once the model has seen it accepted at a clock edge
  bit dma_taken = 0;
  int dma_left = 0;
  always @(negedge clk) begin
    int s;
    if (!rst_n) begin
      dma_valid <= 0;
      dma_stream <= '0;
      dma_time <= '0;
    end else if (dma_valid) begin
      if (dma_taken) begin
        dma_taken = 0;
        dma_left--;
        if (dma_left == 0) dma_valid <= 0;
        else dma_time <= gen_arrival(int'(dma_stream));
      end
    end else if (bursts.size() > 0) begin
      s = bursts.pop_front();
      if (WORKLOAD == 0 && s == STARVE && n_dec >= NDEC / 4 && n_dec < NDEC / 2) begin
        bursts.push_back(s);   // hold this stream's burst back for a while
      end else begin
        dma_left = BURST;
        dma_valid <= 1;
        dma_stream <= sid_t'(s);
        dma_time <= gen_arrival(s);
      end
    end
  end

  // pull-request acceptance
  always @(posedge clk) begin
    if (rst_n && pull_req_valid && pull_req_ready) begin
      bursts.push_back(int'(pull_req_stream));
      n_pull++;
    end
  end
  assign pull_req_ready = 1'b1;

  // winner reader, with pauses in workload 0 so the bank fills up
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (WORKLOAD == 0 && !done)
      reading <= !((cyc % (4 * PAUSE)) >= 2 * PAUSE && (cyc % (4 * PAUSE)) < 3 * PAUSE);
    win_rd_pop <= 0;
    if (rst_n && reading && win_rd_valid) win_rd_pop <= 1;
  end
  always @(posedge clk) begin
    if (rst_n && win_rd_pop && win_rd_valid) begin
      if (exp_id.size() == 0) check(0, "winner read with none expected");
      else begin
        check(int'(win_rd_id) == exp_id[0] && int'(win_rd_time) == exp_ts[0],
              $sformatf("winner bank gave %0d@%0d, expected %0d@%0d",
                        win_rd_id, win_rd_time, exp_id[0], exp_ts[0]));
        void'(exp_id.pop_front());
        void'(exp_ts.pop_front());
      end
      n_read++;
    end
  end

  // main sequence
  initial begin
    rst_n = 0; run = 0;
    cons_wr_valid = 0; cons_wr_stream = '0; cons_wr_data = '0;
    pio_valid = 0; pio_stream = '0; pio_time = '0;
    pull_start = 0;
    win_rd_pop = 0;
    for (int s = 0; s < N_STREAMS; s++) begin
      next_arr[s] = s;
      wins[s] = 0; wins_early[s] = 0; wins_late[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // constraints
    for (int s = 0; s < N_STREAMS; s++) begin
      @(negedge clk);
      cons_wr_valid = 1; cons_wr_stream = sid_t'(s); cons_wr_data = cfg(s);
    end
    @(negedge clk) cons_wr_valid = 0;
    // fill every queue by PIO
    for (int k = 0; k < int'(QUEUE_DEPTH); k++)
      for (int s = 0; s < N_STREAMS; s++) begin
        pio_valid = 1; pio_stream = sid_t'(s); pio_time = gen_arrival(s);
        @(negedge clk);
      end
    pio_valid = 0;
    // one refused push: queue 0 is full
    pio_valid = 1; pio_stream = '0; pio_time = 16'hFFFF;
    @(posedge clk) check(!pio_ready, "push into a full queue accepted");
    @(negedge clk) pio_valid = 0;
    if (WORKLOAD == 0) begin
      pull_start = 1;
      @(negedge clk) pull_start = 0;
    end
    run = 1;
    while (n_dec < NDEC) begin
      @(negedge clk);
      // occasional PIO push while running (competes with DMA words)
      if (WORKLOAD == 0 && (n_dec % 16) == 5 && !pio_valid) begin
        pio_valid = 1; pio_stream = sid_t'((n_dec / 16) % N_STREAMS);
        pio_time = gen_arrival((n_dec / 16) % N_STREAMS);
      end else if (pio_valid) begin
        pio_valid = 0;
      end
    end
    pio_valid = 0;
    run = 0;
    while (busy) @(negedge clk);
    reading = 1;
    repeat (WINNER_DEPTH + 8) @(negedge clk);
    check(exp_id.size() == 0, $sformatf("%0d winners never read", exp_id.size()));
    check(int'(decisions) == n_dec, "decision counter");
    check(int'(underruns) == n_underrun,
          $sformatf("underruns %0d, model %0d", underruns, n_underrun));
    done = 1;
    $display("decisions %0d, drops %0d, violations %0d, stalled decisions %0d, underruns %0d",
             n_dec, n_drop, n_viol, n_stall_dec, n_underrun);
    $display("PIO pushes %0d, pull requests %0d, DMA words %0d", n_pio, n_pull, n_dma);
    check(n_drop > 0 && n_viol > 0 && n_pull > 0 && n_dma > 0 && n_stall_dec > 0 && n_underrun > 0,
          "drops, violations, pulls, stalls and underruns all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog after %0d decisions", n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
