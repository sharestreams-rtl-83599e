// vertical_tile_network: vertically scaled Decision block network.
//
// Schedules N_STREAMS streams on a fixed shuffle-exchange network of only
// NET_STREAMS positions (NET_STREAMS/2 Decision blocks) by running it in
// rounds over tiles of the Register Base blocks. Tile r holds streams
// r*NET_STREAMS .. r*NET_STREAMS+NET_STREAMS-1, so network input p takes, in
// round r, stream r*NET_STREAMS+p (register bank p holds streams p,
// p+NET_STREAMS, ...). Each round takes log2(NET_STREAMS) cycles and yields a
// round winner, which is stored. One further Decision block folds the stored
// round winners into a best-so-far register: the previous best on input a,
// the new round winner on input b. The fold of a round winner happens in the
// first cycle of the next round, and after the last round one extra cycle
// completes it. A winner is therefore found in
//   TILES * log2(NET_STREAMS) + 1 cycles,   TILES = N_STREAMS / NET_STREAMS,
// e.g. 3 + 3 + 1 = 7 cycles for 16 streams on an 8-stream network.
//
// Tiling the Register Base blocks over a fixed network, running the rounds
// one after the other and taking the winner of each round into one final
// cycle follow the published vertical-scaling scheme. This design keeps every
// tile in on-chip registers and does not save or restore stream state to
// external memory. Which tile a stream belongs to, and the order of the fold,
// are this design's choices. The fold keeps the lower tile on input a, so the
// result matches a tournament inside each tile followed by a left-to-right
// comparison of the tile winners.
//
// Interface and timing match the other networks: apply=1 marks the first
// SCHEDULE cycle and restarts the round counter, advance=1 clocks one cycle.
// `winner` is valid the cycle after the last of the TILES*log2(NET_STREAMS)+1
// advance cycles, and `winner_now` already during that last cycle.
// reg_attr must stay stable during all rounds, which holds because the
// Register Base blocks only change at LOAD and PRIORITY_UPDATE.
module vertical_tile_network
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS   = 32,
  parameter int unsigned NET_STREAMS = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  apply,
  input  logic  advance,
  input  attr_t reg_attr [N_STREAMS],
  output attr_t winner,
  output attr_t winner_now
);

  localparam int unsigned TILES = N_STREAMS / NET_STREAMS;
  localparam int unsigned L     = $clog2(NET_STREAMS);
  localparam int unsigned RW    = $clog2(TILES + 1);
  localparam int unsigned CW    = (L > 1) ? $clog2(L) : 1;

  logic [RW-1:0] round_q, round;
  logic [CW-1:0] cyc_q, cyc;
  logic          in_round, last_cyc;

  attr_t tile_attr [NET_STREAMS];
  attr_t order_unused [NET_STREAMS];
  attr_t round_now;            // winner of the running round (last cycle)
  attr_t round_win_q;          // stored winner of the previous round
  attr_t best_q, fold_win, fold_lose_unused;
  logic  fold_a_wins_unused;

  // apply restarts the round counter in the same cycle
  assign round    = apply ? '0 : round_q;
  assign cyc      = apply ? '0 : cyc_q;
  assign in_round = (32'(round) < TILES);
  assign last_cyc = (cyc == CW'(L - 1));

  always_comb begin
    for (int unsigned p = 0; p < NET_STREAMS; p++) tile_attr[p] = '0;
    for (int unsigned r = 0; r < TILES; r++)
      if (32'(round) == r)
        for (int unsigned p = 0; p < NET_STREAMS; p++)
          tile_attr[p] = reg_attr[r * NET_STREAMS + p];
  end

  shuffle_exchange_network #(
    .N_STREAMS (NET_STREAMS)
  ) u_tile_net (
    .clk        (clk),
    .rst_n      (rst_n),
    .apply      (cyc == '0),
    .advance    (advance && in_round),
    .reg_attr   (tile_attr),
    .order      (order_unused),
    .winner_now (round_now)
  );

  decision_block u_fold (
    .a      (best_q),
    .b      (round_win_q),
    .winner (fold_win),
    .loser  (fold_lose_unused),
    .a_wins (fold_a_wins_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round_q     <= '0;
      cyc_q       <= '0;
      round_win_q <= '0;
      best_q      <= '0;
    end else if (advance) begin
      // fold the previous round's winner in the first cycle of the next
      // round, or in the extra cycle after the last round
      if (round != '0 && cyc == '0)
        best_q <= (round == RW'(1)) ? round_win_q : fold_win;
      if (in_round) begin
        if (last_cyc) begin
          round_win_q <= round_now;
          round_q     <= round + 1'b1;
          cyc_q       <= '0;
        end else begin
          round_q <= round;
          cyc_q   <= cyc + 1'b1;
        end
      end else begin
        round_q <= round;
        cyc_q   <= cyc;
      end
    end
  end

  assign winner     = best_q;
  assign winner_now = (round == RW'(1)) ? round_win_q : fold_win;

endmodule
