// tb_control_steering_unit: checks the scheduling timeline.
//
// Three units run side by side: eight streams with the base architecture,
// eight with compute-ahead, and sixteen streams with a 7-cycle SCHEDULE
// state (SCHED_CYCLES=7, the length of a 16-stream network tiled over an
// 8-stream one: 3 + 3 + 1). Every cycle the outputs are
// compared with a cycle-level expectation written from the timeline:
// LOAD once, then the SCHEDULE cycles (apply in the first) and, without
// compute-ahead, a PRIORITY_UPDATE cycle, so a winner every 4 cycles for
// the first unit, 3 with compute-ahead (the update rides on the last SCHEDULE
// cycle and the earlier ones precompute) and 8 for the third. Random out_ready=0 stretches must stall the unit
// without advancing anything; the time counter must tick once per decision;
// run=0 must return it to IDLE at a decision boundary.
module tb_control_steering_unit;
  import sharestreams_pkg::*;

  logic clk = 0, rst_n, run, out_ready;
  always #5 clk = ~clk;
  sid_t  net_id, net_now_id;
  int checks = 0, failures = 0;

  localparam int NU = 3;
  localparam int S [NU] = '{3, 3, 7};   // SCHEDULE cycles per unit

  logic  load_en [NU], apply [NU], advance [NU], pre [NU], upd [NU], wvalid [NU], busy [NU];
  sid_t  wid [NU];
  time_t tnow [NU];
  logic [31:0] ndec [NU], nstall [NU];

  control_steering_unit #(.N_STREAMS(8), .COMPUTE_AHEAD(1'b0)) u_ba (
    .clk(clk), .rst_n(rst_n), .run(run), .out_ready(out_ready),
    .net_winner_id(net_id), .net_winner_now_id(net_now_id),
    .load_en(load_en[0]), .net_apply(apply[0]), .net_advance(advance[0]),
    .precompute_en(pre[0]), .update_en(upd[0]), .winner_id(wid[0]),
    .current_time(tnow[0]), .winner_valid(wvalid[0]), .busy(busy[0]),
    .decisions(ndec[0]), .stall_cycles(nstall[0]));
  control_steering_unit #(.N_STREAMS(8), .COMPUTE_AHEAD(1'b1)) u_ca (
    .clk(clk), .rst_n(rst_n), .run(run), .out_ready(out_ready),
    .net_winner_id(net_id), .net_winner_now_id(net_now_id),
    .load_en(load_en[1]), .net_apply(apply[1]), .net_advance(advance[1]),
    .precompute_en(pre[1]), .update_en(upd[1]), .winner_id(wid[1]),
    .current_time(tnow[1]), .winner_valid(wvalid[1]), .busy(busy[1]),
    .decisions(ndec[1]), .stall_cycles(nstall[1]));
  control_steering_unit #(.N_STREAMS(16), .COMPUTE_AHEAD(1'b0), .SCHED_CYCLES(7)) u_vs (
    .clk(clk), .rst_n(rst_n), .run(run), .out_ready(out_ready),
    .net_winner_id(net_id), .net_winner_now_id(net_now_id),
    .load_en(load_en[2]), .net_apply(apply[2]), .net_advance(advance[2]),
    .precompute_en(pre[2]), .update_en(upd[2]), .winner_id(wid[2]),
    .current_time(tnow[2]), .winner_valid(wvalid[2]), .busy(busy[2]),
    .decisions(ndec[2]), .stall_cycles(nstall[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // expected phase per unit: -1 idle, 0 load, 1..S schedule cycles, S+1 update
  int ph [NU];
  int exp_time [NU];
  int exp_stall [NU];
  int n_updates [NU];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int u = 0; u < NU; u++) begin
        bit ca, last_sched, want_upd;
        ca = (u == 1);
        last_sched = (ph[u] == S[u]);
        want_upd = (!ca && ph[u] == S[u] + 1 && out_ready) || (ca && last_sched && out_ready);
        check(load_en[u] == (ph[u] == 0), $sformatf("unit %0d load_en in phase %0d", u, ph[u]));
        check(apply[u] == (ph[u] == 1), $sformatf("unit %0d apply in phase %0d", u, ph[u]));
        check(advance[u] == ((ph[u] >= 1 && ph[u] < S[u]) || (last_sched && (!ca || out_ready))),
              $sformatf("unit %0d advance in phase %0d", u, ph[u]));
        check(pre[u] == (ca && ph[u] >= 1 && ph[u] < S[u]), $sformatf("unit %0d precompute", u));
        check(upd[u] == want_upd && wvalid[u] == want_upd, $sformatf("unit %0d update in phase %0d", u, ph[u]));
        check(wid[u] == (ca ? net_now_id : net_id), $sformatf("unit %0d winner id source", u));
        check(int'(tnow[u]) == exp_time[u], $sformatf("unit %0d time %0d expected %0d", u, tnow[u], exp_time[u]));
        check(busy[u] == (ph[u] >= 0), $sformatf("unit %0d busy", u));
        check(int'(nstall[u]) == exp_stall[u], $sformatf("unit %0d stall count", u));
        // next phase
        if ((!ca && ph[u] == S[u] + 1) || (ca && last_sched)) begin
          if (out_ready) begin
            exp_time[u]++;
            n_updates[u]++;
            ph[u] = run ? 1 : -1;
          end else exp_stall[u]++;
        end else if (ph[u] == 0) begin
          exp_time[u] = 0;
          ph[u] = 1;
        end else if (ph[u] == -1) begin
          if (run) ph[u] = 0;
        end else ph[u]++;
      end
    end
  end

  initial begin
    rst_n = 0; run = 0; out_ready = 1; net_id = '0; net_now_id = '0;
    for (int u = 0; u < NU; u++) begin ph[u] = -1; exp_time[u] = 0; exp_stall[u] = 0; n_updates[u] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    repeat (600) begin
      @(negedge clk);
      net_id = sid_t'($urandom);
      net_now_id = sid_t'($urandom);
      out_ready = ($urandom_range(0, 5) != 0);
    end
    out_ready = 1;
    run = 0;
    repeat (10) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int u = 0; u < NU; u++) begin
      check(!busy[u], $sformatf("unit %0d idle after run=0", u));
      check(int'(ndec[u]) == n_updates[u], $sformatf("unit %0d decision counter", u));
      check(exp_stall[u] > 0, $sformatf("unit %0d stalls exercised", u));
    end
    // restart: LOAD again, time restarts
    run = 1;
    repeat (20) @(negedge clk);
    $display("decisions %0d %0d %0d, stalls %0d %0d %0d", n_updates[0], n_updates[1], n_updates[2],
             exp_stall[0], exp_stall[1], exp_stall[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
