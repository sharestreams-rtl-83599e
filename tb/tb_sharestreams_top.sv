// tb_sharestreams_top: end-to-end test of the scheduler in all three
// architecture variants.
//
// Three copies of the design run the mixed workload side by side against
// the behavioural DWCS model: the base architecture with four streams,
// winner-only routing with eight and compute-ahead Register Base blocks with
// eight. Each decision's winner, timestamp and cycle spacing (log2 N + 1
// cycles, log2 N with compute-ahead) is checked, and every mechanism the
// design has must occur at least once: packet drops, window-constraint
// violations, losers that met their deadline, stalls on a full winner bank,
// arrival-queue underruns, PIO pushes while running, DMA pull requests and
// DMA words.
module tb_sharestreams_top;
  import sharestreams_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  ss_top_harness #(.N_STREAMS(4), .ARCH(ARCH_BA), .WORKLOAD(0), .NDEC(400)) h_ba (.clk(clk));
  ss_top_harness #(.N_STREAMS(8), .ARCH(ARCH_WR), .WORKLOAD(0), .NDEC(400)) h_wr (.clk(clk));
  ss_top_harness #(.N_STREAMS(8), .ARCH(ARCH_CA), .WORKLOAD(0), .NDEC(400)) h_ca (.clk(clk));
  ss_top_harness #(.N_STREAMS(16), .ARCH(ARCH_VS), .NET_STREAMS(4), .WORKLOAD(0), .NDEC(400))
    h_vs (.clk(clk));

  int checks = 0, failures = 0;

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (h_ba.done && h_wr.done && h_ca.done && h_vs.done);
    checks   = h_ba.checks + h_wr.checks + h_ca.checks + h_vs.checks;
    failures = h_ba.failures + h_wr.failures + h_ca.failures + h_vs.failures;
    $display("decisions BA/WR/CA/VS: %0d %0d %0d %0d", h_ba.n_dec, h_wr.n_dec, h_ca.n_dec,
             h_vs.n_dec);
    need(h_ba.n_drop + h_wr.n_drop + h_ca.n_drop + h_vs.n_drop, "packet drops");
    need(h_ba.n_viol + h_wr.n_viol + h_ca.n_viol + h_vs.n_viol, "violations (x'=0 misses)");
    need(h_ba.n_met + h_wr.n_met + h_ca.n_met + h_vs.n_met, "losers meeting deadline");
    need(h_ba.n_stall_dec, "stalls BA");
    need(h_wr.n_stall_dec, "stalls WR");
    need(h_ca.n_stall_dec, "stalls CA");
    need(h_vs.n_stall_dec, "stalls VS");
    need(h_ba.n_underrun + h_wr.n_underrun + h_ca.n_underrun + h_vs.n_underrun, "queue underruns");
    need(h_ba.n_pio + h_wr.n_pio + h_ca.n_pio + h_vs.n_pio, "PIO pushes");
    need(h_ba.n_pull + h_wr.n_pull + h_ca.n_pull + h_vs.n_pull, "DMA pull requests");
    need(h_ba.n_dma + h_wr.n_dma + h_ca.n_dma + h_vs.n_dma, "DMA words");
    need(h_ba.n_dec, "decisions BA");
    need(h_wr.n_dec, "decisions WR");
    need(h_ca.n_dec, "decisions CA");
    need(h_vs.n_dec, "decisions VS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: decisions %0d %0d %0d %0d", h_ba.n_dec, h_wr.n_dec,
             h_ca.n_dec, h_vs.n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
