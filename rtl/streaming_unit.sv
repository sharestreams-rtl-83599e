// streaming_unit: push-pull transfer of packet arrival times into the
// per-stream arrival queues.
//
// Two paths feed the queues:
//   * push: the host writes single arrival times by programmed I/O
//     (pio_valid/pio_stream/pio_time), suited to small or urgent transfers;
//   * pull: after the host has set up the card's DMA engine it pulses
//     pull_start. From then on the unit watches every stream's queue level
//     and, when a queue falls below PULL_THRESHOLD, asks the DMA engine for
//     more arrival times of that stream (pull_req_valid/pull_req_stream,
//     accepted with pull_req_ready). The DMA engine returns words on
//     dma_valid/dma_stream/dma_time, which are written into the queues.
// A stream is not asked for again until its queue has refilled to the
// threshold, so one request is outstanding per stream at most. Streams are
// scanned round-robin, one per cycle. The queue write port is shared: a PIO
// write has priority and holds off the DMA path (dma_ready=0) for that cycle.
// Pull mode ends with reset. The published design gives the two paths and
// the level monitoring; the threshold, the scan order and the handshakes are
// this design's choices.
module streaming_unit
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS      = 32,
  parameter int unsigned QUEUE_DEPTH    = 256,
  parameter int unsigned PULL_THRESHOLD = QUEUE_DEPTH / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // push path
  input  logic  pio_valid,
  input  sid_t  pio_stream,
  input  time_t pio_time,
  output logic  pio_ready,
  // pull path
  input  logic  pull_start,
  output logic  pull_req_valid,
  output sid_t  pull_req_stream,
  input  logic  pull_req_ready,
  input  logic  dma_valid,
  input  sid_t  dma_stream,
  input  time_t dma_time,
  output logic  dma_ready,
  // queue side
  input  logic [$clog2(QUEUE_DEPTH):0] level [N_STREAMS],
  output logic  q_push_valid,
  output sid_t  q_push_stream,
  output time_t q_push_time,
  input  logic  q_push_ready
);

  localparam int unsigned SW = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1;
  localparam int unsigned LW = $clog2(QUEUE_DEPTH) + 1;

  logic                 pull_mode_q;
  logic [N_STREAMS-1:0] pending_q;
  logic [SW-1:0]        scan_q;
  logic                 req_q;
  sid_t                 req_stream_q;
  logic                 low;

  // shared queue write port, PIO first
  always_comb begin
    q_push_valid  = pio_valid || dma_valid;
    q_push_stream = pio_valid ? pio_stream : dma_stream;
    q_push_time   = pio_valid ? pio_time : dma_time;
    pio_ready     = q_push_ready && pio_valid;
    dma_ready     = q_push_ready && !pio_valid;
  end

  assign low             = level[scan_q] < LW'(PULL_THRESHOLD);
  assign pull_req_valid  = req_q;
  assign pull_req_stream = req_stream_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pull_mode_q  <= 1'b0;
      pending_q    <= '0;
      scan_q       <= '0;
      req_q        <= 1'b0;
      req_stream_q <= '0;
    end else begin
      if (pull_start) pull_mode_q <= 1'b1;
      // clear pending requests of refilled streams
      for (int unsigned s = 0; s < N_STREAMS; s++)
        if (level[s] >= LW'(PULL_THRESHOLD)) pending_q[s] <= 1'b0;
      if (req_q) begin
        if (pull_req_ready) req_q <= 1'b0;
      end else if (pull_mode_q) begin
        if (low && !pending_q[scan_q]) begin
          req_q             <= 1'b1;
          req_stream_q      <= sid_t'(scan_q);
          pending_q[scan_q] <= 1'b1;
        end
        scan_q <= (32'(scan_q) == N_STREAMS - 1) ? '0 : scan_q + 1'b1;
      end
    end
  end

endmodule
