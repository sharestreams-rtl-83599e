// memory_interface: the scheduler's side of the memory shared with the host.
//
// It holds three partitions:
//   * the service-constraint partition: one record per stream (first
//     deadline, loss numerator x, loss denominator y, request period T),
//     written by the host before the scheduler starts and presented to all
//     Register Base blocks at once for the LOAD cycle;
//   * the per-stream arrival-time queues (arrival_queue_bank): the host
//     pushes 16-bit arrival offsets, the scheduler sees every stream's head
//     arrival time and pops the ones its Register Base blocks consumed;
//   * the winner ID bank (winner_id_bank): winner ID and timestamp written
//     by the Control unit, read back by the host's transmission side.
// At LOAD every stream's first arrival time is consumed as well (sched_pop
// is ORed with load_en). Host writes and reads are single-cycle register
// accesses; the host bus, its DMA and its arbitration are outside this block.
module memory_interface
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS    = 32,
  parameter int unsigned QUEUE_DEPTH  = 256,
  parameter int unsigned WINNER_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: constraint partition
  input  logic        cons_wr_valid,
  input  sid_t        cons_wr_stream,
  input  constraint_t cons_wr_data,
  // host: arrival times
  input  logic        arr_push_valid,
  input  sid_t        arr_push_stream,
  input  time_t       arr_push_time,
  output logic        arr_push_ready,
  output logic [$clog2(QUEUE_DEPTH):0] arr_level [N_STREAMS],
  // host: winners
  output logic        win_rd_valid,
  output sid_t        win_rd_id,
  output time_t       win_rd_time,
  input  logic        win_rd_pop,
  // scheduler side
  input  logic        load_en,
  output constraint_t sched_cons    [N_STREAMS],
  output time_t       sched_arrival [N_STREAMS],
  output logic        sched_valid   [N_STREAMS],
  input  logic        sched_pop     [N_STREAMS],
  input  logic        win_wr_valid,
  input  sid_t        win_wr_id,
  input  time_t       win_wr_time,
  output logic        win_wr_ready,
  output logic [31:0] underruns
);

  constraint_t cons_q [N_STREAMS];
  logic        pop    [N_STREAMS];
  logic [$clog2(WINNER_DEPTH):0] win_level_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < N_STREAMS; s++) cons_q[s] <= '0;
    end else if (cons_wr_valid && 32'(cons_wr_stream) < N_STREAMS) begin
      cons_q[cons_wr_stream] <= cons_wr_data;
    end
  end

  assign sched_cons = cons_q;

  always_comb begin
    for (int unsigned s = 0; s < N_STREAMS; s++) pop[s] = sched_pop[s] || load_en;
  end

  arrival_queue_bank #(
    .N_STREAMS (N_STREAMS),
    .DEPTH     (QUEUE_DEPTH)
  ) u_arrivals (
    .clk         (clk),
    .rst_n       (rst_n),
    .push_valid  (arr_push_valid),
    .push_stream (arr_push_stream),
    .push_time   (arr_push_time),
    .push_ready  (arr_push_ready),
    .head        (sched_arrival),
    .valid       (sched_valid),
    .pop         (pop),
    .level       (arr_level),
    .underruns   (underruns)
  );

  winner_id_bank #(
    .DEPTH (WINNER_DEPTH)
  ) u_winners (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (win_wr_valid),
    .wr_id    (win_wr_id),
    .wr_time  (win_wr_time),
    .wr_ready (win_wr_ready),
    .rd_valid (win_rd_valid),
    .rd_id    (win_rd_id),
    .rd_time  (win_rd_time),
    .rd_pop   (win_rd_pop),
    .level    (win_level_unused)
  );

endmodule
