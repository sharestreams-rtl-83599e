// arrival_queue_bank: banked per-stream queues of packet arrival times.
//
// One circular buffer per stream, each with its own read and write pointer,
// so the host side can append arrival times while the scheduler consumes
// them, and all streams can be read in the same cycle (one bank per stream).
// Only the 16-bit arrival-time offsets of packets are stored, never the
// packets themselves.
//
// Write side: push_valid with push_stream/push_time appends one entry; when
// that stream's queue is full the entry is refused (push_ready=0 for it).
// Read side: head[s] is the oldest entry of stream s (show-ahead), valid[s]
// says the queue is not empty, pop[s] removes the head at the clock edge. A
// pop of an empty queue is ignored and counted in `underruns`. level[s] is the
// current fill, used by the streaming unit to decide when to pull more.
// DEPTH is this design's choice: 256 x 16 bits is one 4-kbit block RAM.
module arrival_queue_bank
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS = 32,
  parameter int unsigned DEPTH     = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  input  sid_t             push_stream,
  input  time_t            push_time,
  output logic             push_ready,
  output time_t            head  [N_STREAMS],
  output logic             valid [N_STREAMS],
  input  logic             pop   [N_STREAMS],
  output logic [$clog2(DEPTH):0] level [N_STREAMS],
  output logic [31:0]      underruns
);

  localparam int unsigned AW = $clog2(DEPTH);

  time_t         mem   [N_STREAMS][DEPTH];
  logic [AW:0]   wr_q  [N_STREAMS];
  logic [AW:0]   rd_q  [N_STREAMS];
  logic          full  [N_STREAMS];
  logic [31:0]   underrun_inc;

  always_comb begin
    underrun_inc = '0;
    for (int unsigned s = 0; s < N_STREAMS; s++) begin
      level[s] = wr_q[s] - rd_q[s];
      valid[s] = (wr_q[s] != rd_q[s]);
      full[s]  = (level[s] == (AW+1)'(DEPTH));
      head[s]  = mem[s][rd_q[s][AW-1:0]];
      if (pop[s] && !valid[s]) underrun_inc = underrun_inc + 1;
    end
    push_ready = (32'(push_stream) < N_STREAMS) && !full[push_stream];
  end

  // storage: written only, no reset needed
  always_ff @(posedge clk) begin
    if (push_valid && push_ready)
      mem[push_stream][wr_q[push_stream][AW-1:0]] <= push_time;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < N_STREAMS; s++) begin
        wr_q[s] <= '0;
        rd_q[s] <= '0;
      end
      underruns <= '0;
    end else begin
      for (int unsigned s = 0; s < N_STREAMS; s++) begin
        if (push_valid && push_ready && push_stream == sid_t'(s))
          wr_q[s] <= wr_q[s] + 1'b1;
        if (pop[s] && valid[s])
          rd_q[s] <= rd_q[s] + 1'b1;
      end
      underruns <= underruns + underrun_inc;
    end
  end

endmodule
