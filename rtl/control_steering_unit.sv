// control_steering_unit: sequences the ShareStreams scheduling timeline.
//
// States: IDLE -> LOAD -> SCHEDULE (log2(N) cycles) -> PRIORITY_UPDATE ->
// SCHEDULE -> ... A decision cycle of the base architecture therefore takes
// log2(N)+1 clock cycles (3 for four streams, 6 for 32).
//   * LOAD (one cycle): load_en to all Register Base blocks; the current-time
//     counter restarts at zero.
//   * SCHEDULE cycle c (c = 0 .. log2(N)-1): net_advance clocks the network;
//     net_apply=1 in cycle 0 steers the Register Base block attribute buses
//     into the Decision blocks, later cycles recirculate.
//   * PRIORITY_UPDATE: the winner ID from the network (net_winner_id) is
//     circulated with update_en together with the current time; the winner
//     ID and the current time (its timestamp) are written out
//     (winner_valid), and the time counter advances by one tick, so one
//     tick is one decision cycle.
// With COMPUTE_AHEAD=1 the PRIORITY_UPDATE state is skipped: update_en is
// raised in the last SCHEDULE cycle with the winner taken straight from the
// network's Decision block 0 (net_winner_now_id), and precompute_en marks the
// earlier SCHEDULE cycles. A decision cycle then takes log2(N) clock cycles.
//
// Back-pressure: the winner can only be written when out_ready=1 (winner ID
// bank not full). Otherwise the unit stalls in the cycle that would write it,
// holding the network and the Register Base blocks, and counts stall cycles.
// SCHED_CYCLES sets the length of the SCHEDULE state: log2(N) for the
// single-stage networks, more for a vertically scaled network that runs in
// rounds (vertical_tile_network).
// With the default COMPUTE_AHEAD=0, precompute_en is constant 0 and
// winner_id is net_winner_id passed straight through; both only gain logic
// in the compute-ahead configuration.
// `run` is sampled at decision boundaries: run=1 in IDLE starts a LOAD, run=0
// after an update returns to IDLE. The state sequence and the time counter
// follow the published timeline; run/stall handling is this design's choice.
module control_steering_unit
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS     = 32,
  parameter bit          COMPUTE_AHEAD = 1'b0,
  parameter int unsigned SCHED_CYCLES  = $clog2(N_STREAMS)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  out_ready,
  input  sid_t  net_winner_id,
  input  sid_t  net_winner_now_id,
  output logic  load_en,
  output logic  net_apply,
  output logic  net_advance,
  output logic  precompute_en,
  output logic  update_en,
  output sid_t  winner_id,
  output time_t current_time,
  output logic  winner_valid,
  output logic  busy,
  output logic [31:0] decisions,
  output logic [31:0] stall_cycles
);

  localparam int unsigned CW = (SCHED_CYCLES > 1) ? $clog2(SCHED_CYCLES) : 1;

  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,
    S_LOAD     = 2'd1,
    S_SCHEDULE = 2'd2,
    S_UPDATE   = 2'd3
  } state_e;

  state_e        state_q;
  logic [CW-1:0] cyc_q;
  logic          last_cyc;
  logic          stall;

  assign last_cyc = (cyc_q == CW'(SCHED_CYCLES - 1));

  always_comb begin
    load_en       = (state_q == S_LOAD);
    net_apply     = 1'b0;
    net_advance   = 1'b0;
    precompute_en = 1'b0;
    update_en     = 1'b0;
    stall         = 1'b0;
    winner_id     = COMPUTE_AHEAD ? net_winner_now_id : net_winner_id;
    if (state_q == S_SCHEDULE) begin
      net_apply = (cyc_q == '0);
      if (COMPUTE_AHEAD && last_cyc) begin
        net_advance = out_ready;
        update_en   = out_ready;
        stall       = !out_ready;
      end else begin
        net_advance   = 1'b1;
        precompute_en = COMPUTE_AHEAD;
      end
    end else if (state_q == S_UPDATE) begin
      update_en = out_ready;
      stall     = !out_ready;
    end
    winner_valid = update_en;
    busy         = (state_q != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      cyc_q        <= '0;
      current_time <= '0;
      decisions    <= '0;
      stall_cycles <= '0;
    end else begin
      if (stall) stall_cycles <= stall_cycles + 1;
      if (update_en) begin
        current_time <= current_time + 1'b1;
        decisions    <= decisions + 1;
      end
      unique case (state_q)
        S_IDLE: if (run) state_q <= S_LOAD;
        S_LOAD: begin
          current_time <= '0;
          cyc_q        <= '0;
          state_q      <= S_SCHEDULE;
        end
        S_SCHEDULE: begin
          if (!last_cyc) begin
            cyc_q <= cyc_q + 1'b1;
          end else if (!COMPUTE_AHEAD) begin
            state_q <= S_UPDATE;
          end else if (update_en) begin
            cyc_q   <= '0;
            state_q <= run ? S_SCHEDULE : S_IDLE;
          end
        end
        S_UPDATE: if (update_en) begin
          cyc_q   <= '0;
          state_q <= run ? S_SCHEDULE : S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
