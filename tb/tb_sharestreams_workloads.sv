// tb_sharestreams_workloads: the four-stream scheduling experiments.
//
// Four copies of the base-architecture scheduler with four streams run the
// stream mixes used to demonstrate DWCS on this hardware, each checked
// decision by decision against the behavioural model (winner, timestamp,
// three clock cycles per decision). The arrival-time queues are deep enough
// to hold every arrival time of the run, loaded before scheduling starts, as
// in a bulk transfer. Each run is 64000 decisions long and the
// static-priority stream of mix 3 starts at tick 63810, the sizes of the
// original experiments; the 16-bit time counter does not wrap within a run.
// On top, the share of the link each stream gets is
// checked:
//   1  fair share 7/8, 14/16, 6/8, 4/8         -> 1:1:2:4
//   2  EDF, deadlines one period apart         -> equal counts
//   3  fair share 2/4, 3/4, 3/4, then a 0/255
//      static-priority stream from SP_START    -> 2:1:1 before, the
//                                                 static-priority stream
//                                                 served after
//   4  fair share 2/3, 5/6 with two EDF streams -> 2:1 between the fair-share
//      of period 4                                streams, EDF streams equal
module tb_sharestreams_workloads;
  import sharestreams_pkg::*;

  localparam int NDEC = 64000;
  localparam int SPS  = 63810;
  logic clk = 0;
  always #5 clk = ~clk;

  ss_top_harness #(.N_STREAMS(4), .ARCH(ARCH_BA), .QUEUE_DEPTH(65536), .WINNER_DEPTH(256),
                   .WORKLOAD(1), .NDEC(NDEC)) h_fair (.clk(clk));
  ss_top_harness #(.N_STREAMS(4), .ARCH(ARCH_BA), .QUEUE_DEPTH(65536), .WINNER_DEPTH(256),
                   .WORKLOAD(2), .NDEC(NDEC)) h_edf (.clk(clk));
  ss_top_harness #(.N_STREAMS(4), .ARCH(ARCH_BA), .QUEUE_DEPTH(65536), .WINNER_DEPTH(256),
                   .WORKLOAD(3), .NDEC(NDEC), .SP_START(SPS)) h_sp (.clk(clk));
  ss_top_harness #(.N_STREAMS(4), .ARCH(ARCH_BA), .QUEUE_DEPTH(65536), .WINNER_DEPTH(256),
                   .WORKLOAD(4), .NDEC(NDEC)) h_mix (.clk(clk));

  int checks = 0, failures = 0;

  task automatic near(input int got, input int want, input int tol, input string what);
    checks++;
    $display("  %-34s %5d (expected %5d +- %0d)", what, got, want, tol);
    if (got < want - tol || got > want + tol) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int tot;
    wait (h_fair.done && h_edf.done && h_sp.done && h_mix.done);
    checks   = h_fair.checks + h_edf.checks + h_sp.checks + h_mix.checks;
    failures = h_fair.failures + h_edf.failures + h_sp.failures + h_mix.failures;
    tot = h_fair.n_dec;
    $display("fair share 1:1:2:4 over %0d decisions", tot);
    near(h_fair.wins[0], tot / 8, tot / 50, "stream 1 (7/8)");
    near(h_fair.wins[1], tot / 8, tot / 50, "stream 2 (14/16)");
    near(h_fair.wins[2], tot / 4, tot / 50, "stream 3 (6/8)");
    near(h_fair.wins[3], tot / 2, tot / 50, "stream 4 (4/8)");
    tot = h_edf.n_dec;
    $display("EDF over %0d decisions", tot);
    for (int s = 0; s < 4; s++) near(h_edf.wins[s], tot / 4, 1, $sformatf("stream %0d", s + 1));
    tot = h_sp.wins_early[0] + h_sp.wins_early[1] + h_sp.wins_early[2] + h_sp.wins_early[3];
    $display("fair share 2:1:1 over %0d decisions before the static-priority stream", tot);
    near(h_sp.wins_early[0], tot / 2, tot / 50, "stream 1 (2/4)");
    near(h_sp.wins_early[1], tot / 4, tot / 50, "stream 2 (3/4)");
    near(h_sp.wins_early[2], tot / 4, tot / 50, "stream 3 (3/4)");
    near(h_sp.wins_early[3], 0, 0, "stream 4 (0/255) before its start");
    near(h_sp.wins_late[3], h_sp.n_dec - SPS, (h_sp.n_dec - SPS) / 3,
         "stream 4 (0/255) after its start");
    tot = h_mix.n_dec;
    $display("fair share with EDF over %0d decisions", tot);
    near(h_mix.wins[2], h_mix.wins[3], 1, "EDF stream 3 vs stream 4");
    near(h_mix.wins[3], tot / 4, 2, "EDF stream 4");
    near(h_mix.wins[0], 2 * h_mix.wins[1], tot / 25, "fair share stream 1 vs 2x stream 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
