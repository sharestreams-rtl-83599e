// winner_id_bank: queue of scheduled winner stream IDs with timestamps.
//
// Every decision cycle the Control unit writes the 5-bit winner stream ID and
// the 16-bit current time at which it was chosen; the transmission side reads
// them in order and sends the head packet of each named stream. A circular
// buffer with separate read and write pointers allows both sides to work
// concurrently.
//
// Write: wr_valid/wr_id/wr_time, accepted when wr_ready=1 (not full); the
// Control unit stalls otherwise. Read: rd_valid says an entry is present,
// rd_id/rd_time show it, rd_pop removes it at the clock edge. DEPTH is this
// design's choice (one 256-entry block RAM).
module winner_id_bank
  import sharestreams_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_valid,
  input  sid_t  wr_id,
  input  time_t wr_time,
  output logic  wr_ready,
  output logic  rd_valid,
  output sid_t  rd_id,
  output time_t rd_time,
  input  logic  rd_pop,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    sid_t  id;
    time_t ts;
  } entry_t;

  entry_t      mem [DEPTH];
  logic [AW:0] wr_q, rd_q;

  assign level    = wr_q - rd_q;
  assign wr_ready = (level != (AW+1)'(DEPTH));
  assign rd_valid = (wr_q != rd_q);
  assign rd_id    = mem[rd_q[AW-1:0]].id;
  assign rd_time  = mem[rd_q[AW-1:0]].ts;

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wr_q[AW-1:0]] <= '{id: wr_id, ts: wr_time};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0;
      rd_q <= '0;
    end else begin
      if (wr_valid && wr_ready) wr_q <= wr_q + 1'b1;
      if (rd_pop && rd_valid)   rd_q <= rd_q + 1'b1;
    end
  end

endmodule
