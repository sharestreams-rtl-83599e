// compute_ahead_register_block: Register Base block that precomputes its
// priority update.
//
// Same state and interface as register_base_block, plus `precompute_en`.
// While the network is still ordering streams (any SCHEDULE cycle before the
// last one, precompute_en=1) the block evaluates its next state for both
// outcomes -- this stream wins, this stream loses (missed or met deadline,
// judged against the current time, which does not change until the update)
// -- and stores both in a winner-precompute and a loser-precompute register.
// In the last SCHEDULE cycle the winner ID arrives straight from the network
// with update_en=1 and the block only selects one of the two stored states,
// so no separate PRIORITY_UPDATE cycle is needed: a decision takes log2(N)
// cycles instead of log2(N)+1. The idea (both outcomes precomputed, a mux
// driven by "winner or loser?") is the published compute-ahead block; the
// control handshake via precompute_en is this design's choice. The head
// arrival time is taken live at the update, as in register_base_block.
// update_en must follow at least one precompute_en cycle after every LOAD or
// update.
module compute_ahead_register_block
  import sharestreams_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // LOAD
  input  logic        load_en,
  input  sid_t        load_id,
  input  constraint_t load_cons,
  input  time_t       load_arrival,
  // compute ahead during SCHEDULE
  input  logic        precompute_en,
  // PRIORITY_UPDATE, overlapped with the last SCHEDULE cycle
  input  logic        update_en,
  input  sid_t        winner_id,
  input  time_t       current_time,
  input  time_t       next_arrival,
  input  logic        next_valid,
  output logic        arrival_pop,
  // state out
  output attr_t       attr,
  output logic        violation,
  output logic        drop,
  output time_t       misses
);

  sid_t       id_q;
  time_t      period_q;
  loss_t      x_orig_q, y_orig_q;
  time_t      arrival_q;
  dyn_state_t st_q;
  dyn_state_t win_pre_q, lose_pre_q;   // Winner / Loser Precompute registers
  logic       is_winner;

  always_comb begin
    is_winner   = (winner_id == id_q);
    arrival_pop = update_en && (is_winner || lose_pre_q.drop);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q       <= '0;
      period_q   <= '0;
      x_orig_q   <= '0;
      y_orig_q   <= '0;
      arrival_q  <= '0;
      st_q       <= '0;
      win_pre_q  <= '0;
      lose_pre_q <= '0;
    end else if (load_en) begin
      id_q      <= load_id;
      period_q  <= load_cons.period;
      x_orig_q  <= load_cons.x;
      y_orig_q  <= load_cons.y;
      arrival_q <= next_valid ? load_arrival : '0;
      st_q      <= '{deadline: load_cons.deadline, x: load_cons.x, y: load_cons.y,
                     violation: 1'b0, drop: 1'b0, misses: '0};
    end else begin
      if (precompute_en) begin
        win_pre_q  <= dwcs_update(st_q, UPD_WINNER, period_q, x_orig_q, y_orig_q);
        lose_pre_q <= dwcs_update(st_q, classify(1'b0, st_q.deadline, current_time),
                                  period_q, x_orig_q, y_orig_q);
      end
      if (update_en) begin
        st_q <= is_winner ? win_pre_q : lose_pre_q;
        if (arrival_pop && next_valid) arrival_q <= next_arrival;
      end
    end
  end

  assign attr      = '{deadline: st_q.deadline, x: st_q.x, y: st_q.y,
                       arrival: arrival_q, id: id_q};
  assign violation = st_q.violation;
  assign drop      = st_q.drop;
  assign misses    = st_q.misses;

endmodule
