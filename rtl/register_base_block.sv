// register_base_block: per-stream state storage and DWCS priority update.
//
// One block holds the service attributes of one stream: current deadline,
// current loss numerator/denominator x'/y', the arrival time of its head
// packet, its stream ID, the request period T, the original x/y, a violation
// flag, a drop flag and a 16-bit deadline-miss counter. The deadline, x', y',
// arrival time and ID leave on the 53-bit attribute bus to the network.
//
// Timing:
//   * LOAD (load_en=1, one cycle): constraints, ID and the first arrival time
//     are written; the flags and the counter are cleared.
//   * PRIORITY_UPDATE (update_en=1, one cycle): the block compares its ID with
//     the circulated winner ID and its deadline with the current time, and
//     takes one of three update paths -- winner, loser that missed its
//     deadline, loser that met it (no change). A winner, and a loser that
//     drops its late packet, take the new head arrival time `next_arrival`
//     in the same cycle and raise `arrival_pop` so the queue advances. When
//     the stream's queue is empty (next_valid=0) the old arrival time stays.
// The three update paths, the ID and deadline comparators and the final
// selection mirror the published Register Base block; the DWCS arithmetic
// itself is in sharestreams_pkg::dwcs_update.
module register_base_block
  import sharestreams_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // LOAD
  input  logic        load_en,
  input  sid_t        load_id,
  input  constraint_t load_cons,
  input  time_t       load_arrival,
  // PRIORITY_UPDATE
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
  dyn_state_t st_q, st_next;
  upd_kind_e  kind;

  always_comb begin
    kind        = classify(winner_id == id_q, st_q.deadline, current_time);
    st_next     = dwcs_update(st_q, kind, period_q, x_orig_q, y_orig_q);
    arrival_pop = update_en && (kind == UPD_WINNER || st_next.drop);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q      <= '0;
      period_q  <= '0;
      x_orig_q  <= '0;
      y_orig_q  <= '0;
      arrival_q <= '0;
      st_q      <= '0;
    end else if (load_en) begin
      id_q      <= load_id;
      period_q  <= load_cons.period;
      x_orig_q  <= load_cons.x;
      y_orig_q  <= load_cons.y;
      arrival_q <= next_valid ? load_arrival : '0;
      st_q      <= '{deadline: load_cons.deadline, x: load_cons.x, y: load_cons.y,
                     violation: 1'b0, drop: 1'b0, misses: '0};
    end else if (update_en) begin
      st_q <= st_next;
      if (arrival_pop && next_valid) arrival_q <= next_arrival;
    end
  end

  assign attr      = '{deadline: st_q.deadline, x: st_q.x, y: st_q.y,
                       arrival: arrival_q, id: id_q};
  assign violation = st_q.violation;
  assign drop      = st_q.drop;
  assign misses    = st_q.misses;

endmodule
