// sharestreams_top: ShareStreams hardware packet scheduler (DWCS).
//
// The scheduler picks, once per decision cycle, the stream whose head packet
// should be sent next. Packets stay in host memory; the hardware only sees
// per-stream service constraints and 16-bit packet arrival times, and returns
// 5-bit winner stream IDs with 16-bit timestamps.
//
// Structure:
//   memory_interface       constraint partition, per-stream arrival-time
//                          queues, winner ID bank (host-facing ports)
//   streaming_unit         push/pull transfer of arrival times into the queues
//   control_steering_unit  LOAD / SCHEDULE / PRIORITY_UPDATE sequencing and the
//                          current-time counter
//   N Register Base blocks per-stream DWCS state and priority update
//   network                N/2 Decision blocks in a recirculating
//                          shuffle-exchange (or winner-only) arrangement
//
// ARCH selects the variant:
//   ARCH_BA  base architecture, a winner every log2(N)+1 cycles;
//   ARCH_WR  winner-only routing, same timing;
//   ARCH_CA  base network with compute-ahead Register Base blocks, a winner
//            every log2(N) cycles;
//   ARCH_VS  vertical scaling: the Register Base blocks are tiled over a
//            fixed network of NET_STREAMS positions that runs in rounds, a
//            winner every (N/NET_STREAMS)*log2(NET_STREAMS)+2 cycles.
// NET_STREAMS is used only by ARCH_VS. N_STREAMS must be a power of two from
// 4 to 32 (5-bit IDs).
//
// Host protocol: write each stream's constraints (cons_wr_*), push arrival
// times (directly, or through the streaming unit's DMA pull path), then hold
// run=1. Winners appear on win_rd_* and are removed with win_rd_pop; when the
// winner bank is full the scheduler stalls.
module sharestreams_top
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS    = 32,
  parameter int unsigned QUEUE_DEPTH  = 256,
  parameter int unsigned WINNER_DEPTH = 256,
  parameter arch_e       ARCH         = ARCH_BA,
  parameter int unsigned NET_STREAMS  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // host: service constraints
  input  logic        cons_wr_valid,
  input  sid_t        cons_wr_stream,
  input  constraint_t cons_wr_data,
  // host: programmed-I/O pushes of arrival times
  input  logic        pio_valid,
  input  sid_t        pio_stream,
  input  time_t       pio_time,
  output logic        pio_ready,
  // host: bulk pull of arrival times through the card's DMA engine
  input  logic        pull_start,
  output logic        pull_req_valid,
  output sid_t        pull_req_stream,
  input  logic        pull_req_ready,
  input  logic        dma_valid,
  input  sid_t        dma_stream,
  input  time_t       dma_time,
  output logic        dma_ready,
  // host: winners
  output logic        win_rd_valid,
  output sid_t        win_rd_id,
  output time_t       win_rd_time,
  input  logic        win_rd_pop,
  // status
  output logic        busy,
  output time_t       current_time,
  output logic [31:0] decisions,
  output logic [31:0] stall_cycles,
  output logic [31:0] underruns,
  output logic [N_STREAMS-1:0] violation,
  output logic [N_STREAMS-1:0] dropped
);

  localparam int unsigned QLW = $clog2(QUEUE_DEPTH) + 1;
  // vertical scaling: the fixed network never exceeds the stream count
  localparam int unsigned NET_N = (NET_STREAMS < N_STREAMS) ? NET_STREAMS : N_STREAMS;
  localparam int unsigned SCHED_CYCLES = (ARCH == ARCH_VS)
      ? (N_STREAMS / NET_N) * $clog2(NET_N) + 1 : $clog2(N_STREAMS);

  // elaboration-time check of the supported sizes
  if (N_STREAMS < 4 || N_STREAMS > MAX_STREAMS || (N_STREAMS & (N_STREAMS - 1)) != 0) begin : g_bad_size
    $error("N_STREAMS must be a power of two between 4 and %0d", MAX_STREAMS);
  end
  if (ARCH == ARCH_VS && (NET_STREAMS < 4 || (NET_STREAMS & (NET_STREAMS - 1)) != 0)) begin : g_bad_net
    $error("NET_STREAMS must be a power of two of at least 4");
  end

  // arrival-queue write port, driven by the streaming unit
  logic     q_push_valid, q_push_ready;
  sid_t     q_push_stream;
  time_t    q_push_time;
  logic [QLW-1:0] q_level [N_STREAMS];

  // scheduler side
  constraint_t cons      [N_STREAMS];
  time_t       head_arr  [N_STREAMS];
  logic        head_valid[N_STREAMS];
  logic        pop       [N_STREAMS];
  attr_t       reg_attr  [N_STREAMS];
  attr_t       net_winner, net_winner_now;

  logic  load_en, net_apply, net_advance, precompute_en, update_en, winner_valid;
  logic  win_wr_ready;
  sid_t  winner_id;

  memory_interface #(
    .N_STREAMS    (N_STREAMS),
    .QUEUE_DEPTH  (QUEUE_DEPTH),
    .WINNER_DEPTH (WINNER_DEPTH)
  ) u_mem (
    .clk             (clk),
    .rst_n           (rst_n),
    .cons_wr_valid   (cons_wr_valid),
    .cons_wr_stream  (cons_wr_stream),
    .cons_wr_data    (cons_wr_data),
    .arr_push_valid  (q_push_valid),
    .arr_push_stream (q_push_stream),
    .arr_push_time   (q_push_time),
    .arr_push_ready  (q_push_ready),
    .arr_level       (q_level),
    .win_rd_valid    (win_rd_valid),
    .win_rd_id       (win_rd_id),
    .win_rd_time     (win_rd_time),
    .win_rd_pop      (win_rd_pop),
    .load_en         (load_en),
    .sched_cons      (cons),
    .sched_arrival   (head_arr),
    .sched_valid     (head_valid),
    .sched_pop       (pop),
    .win_wr_valid    (winner_valid),
    .win_wr_id       (winner_id),
    .win_wr_time     (current_time),
    .win_wr_ready    (win_wr_ready),
    .underruns       (underruns)
  );

  streaming_unit #(
    .N_STREAMS   (N_STREAMS),
    .QUEUE_DEPTH (QUEUE_DEPTH)
  ) u_stream (
    .clk             (clk),
    .rst_n           (rst_n),
    .pio_valid       (pio_valid),
    .pio_stream      (pio_stream),
    .pio_time        (pio_time),
    .pio_ready       (pio_ready),
    .pull_start      (pull_start),
    .pull_req_valid  (pull_req_valid),
    .pull_req_stream (pull_req_stream),
    .pull_req_ready  (pull_req_ready),
    .dma_valid       (dma_valid),
    .dma_stream      (dma_stream),
    .dma_time        (dma_time),
    .dma_ready       (dma_ready),
    .level           (q_level),
    .q_push_valid    (q_push_valid),
    .q_push_stream   (q_push_stream),
    .q_push_time     (q_push_time),
    .q_push_ready    (q_push_ready)
  );

  control_steering_unit #(
    .N_STREAMS     (N_STREAMS),
    .COMPUTE_AHEAD (ARCH == ARCH_CA),
    .SCHED_CYCLES  (SCHED_CYCLES)
  ) u_ctrl (
    .clk               (clk),
    .rst_n             (rst_n),
    .run               (run),
    .out_ready         (win_wr_ready),
    .net_winner_id     (net_winner.id),
    .net_winner_now_id (net_winner_now.id),
    .load_en           (load_en),
    .net_apply         (net_apply),
    .net_advance       (net_advance),
    .precompute_en     (precompute_en),
    .update_en         (update_en),
    .winner_id         (winner_id),
    .current_time      (current_time),
    .winner_valid      (winner_valid),
    .busy              (busy),
    .decisions         (decisions),
    .stall_cycles      (stall_cycles)
  );

  // Register Base blocks
  for (genvar s = 0; s < N_STREAMS; s++) begin : g_reg
    time_t misses_unused;
    if (ARCH == ARCH_CA) begin : g_ca
      compute_ahead_register_block u_rb (
        .clk           (clk),
        .rst_n         (rst_n),
        .load_en       (load_en),
        .load_id       (sid_t'(s)),
        .load_cons     (cons[s]),
        .load_arrival  (head_arr[s]),
        .precompute_en (precompute_en),
        .update_en     (update_en),
        .winner_id     (winner_id),
        .current_time  (current_time),
        .next_arrival  (head_arr[s]),
        .next_valid    (head_valid[s]),
        .arrival_pop   (pop[s]),
        .attr          (reg_attr[s]),
        .violation     (violation[s]),
        .drop          (dropped[s]),
        .misses        (misses_unused)
      );
    end else begin : g_ba
      register_base_block u_rb (
        .clk          (clk),
        .rst_n        (rst_n),
        .load_en      (load_en),
        .load_id      (sid_t'(s)),
        .load_cons    (cons[s]),
        .load_arrival (head_arr[s]),
        .update_en    (update_en),
        .winner_id    (winner_id),
        .current_time (current_time),
        .next_arrival (head_arr[s]),
        .next_valid   (head_valid[s]),
        .arrival_pop  (pop[s]),
        .attr         (reg_attr[s]),
        .violation    (violation[s]),
        .drop         (dropped[s]),
        .misses       (misses_unused)
      );
    end
  end

  // Decision block network
  if (ARCH == ARCH_WR) begin : g_wr
    winner_only_network #(
      .N_STREAMS (N_STREAMS)
    ) u_net (
      .clk        (clk),
      .rst_n      (rst_n),
      .apply      (net_apply),
      .advance    (net_advance),
      .reg_attr   (reg_attr),
      .winner     (net_winner),
      .winner_now (net_winner_now)
    );
  end else if (ARCH == ARCH_VS) begin : g_vs
    vertical_tile_network #(
      .N_STREAMS   (N_STREAMS),
      .NET_STREAMS (NET_N)
    ) u_net (
      .clk        (clk),
      .rst_n      (rst_n),
      .apply      (net_apply),
      .advance    (net_advance),
      .reg_attr   (reg_attr),
      .winner     (net_winner),
      .winner_now (net_winner_now)
    );
  end else begin : g_sx
    attr_t order [N_STREAMS];
    shuffle_exchange_network #(
      .N_STREAMS (N_STREAMS)
    ) u_net (
      .clk        (clk),
      .rst_n      (rst_n),
      .apply      (net_apply),
      .advance    (net_advance),
      .reg_attr   (reg_attr),
      .order      (order),
      .winner_now (net_winner_now)
    );
    assign net_winner = order[0];
  end

endmodule
