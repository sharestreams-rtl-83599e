// shuffle_exchange_network: single-stage recirculating shuffle-exchange
// network of N/2 Decision blocks.
//
// Position i of the network feeds input (i mod 2) of Decision block i/2
// through a 2:1 mux. In the first SCHEDULE cycle (apply=1) the muxes take the
// attribute buses of the N Register Base blocks; in every later cycle they
// take the recirculated Decision block outputs. The outputs are stored in N
// stage registers with the inverse perfect shuffle: the winner of block k goes
// to position k and its loser to position N/2+k. Winners therefore meet
// winners and losers meet losers in the next cycle, and after log2(N) cycles
// position 0 holds the stream that won every comparison it took part in --
// the same result as a binary tournament tree, with one tree level done per
// cycle. The stage registers (`order`) then hold the streams ranked by how
// many comparisons they won; only the head is a strict ordering.
//
// The N/2 blocks, the muxes with the "attribute bus applied during cycle 1"
// control and the winner/loser recirculation are from the published network;
// the exact position of each returned wire is read from its figure as the
// inverse shuffle above. `winner_now` is the winner output of Decision block 0
// in the current cycle (before the stage register), used by compute-ahead
// register blocks to finish a decision in the last SCHEDULE cycle.
//
// Timing: advance=1 clocks the stage registers; with log2(N) advance cycles,
// the first with apply=1, `order[0]` holds the winner one cycle later and
// `winner_now` already during the last cycle.
module shuffle_exchange_network
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  apply,
  input  logic  advance,
  input  attr_t reg_attr [N_STREAMS],
  output attr_t order    [N_STREAMS],
  output attr_t winner_now
);

  localparam int unsigned HALF = N_STREAMS / 2;

  attr_t mux_out [N_STREAMS];
  attr_t win     [HALF];
  attr_t lose    [HALF];
  attr_t stage_q [N_STREAMS];

  always_comb begin
    for (int unsigned i = 0; i < N_STREAMS; i++)
      mux_out[i] = apply ? reg_attr[i] : stage_q[i];
  end

  for (genvar k = 0; k < HALF; k++) begin : g_db
    logic a_wins_unused;
    decision_block u_db (
      .a      (mux_out[2*k]),
      .b      (mux_out[2*k+1]),
      .winner (win[k]),
      .loser  (lose[k]),
      .a_wins (a_wins_unused)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_STREAMS; i++) stage_q[i] <= '0;
    end else if (advance) begin
      for (int unsigned k = 0; k < HALF; k++) begin
        stage_q[k]        <= win[k];
        stage_q[HALF + k] <= lose[k];
      end
    end
  end

  assign order      = stage_q;
  assign winner_now = win[0];

endmodule
