// sharestreams_pkg: types, widths and the DWCS priority-update rule shared by
// the ShareStreams packet scheduler.
//
// The scheduler orders streams by DWCS (Dynamic Window-Constrained Scheduling)
// service attributes. The field widths follow the published design: 16-bit
// deadlines, arrival times and request periods (offsets from a 16-bit current
// time counter), 8-bit loss-tolerance numerator and denominator and a 5-bit
// stream ID, so the attribute bus that feeds a Decision block is 53 bits wide.
//
// dwcs_update() is the combinational "arithmetic update logic" of a Register
// Base block: given a stream's state, whether it won the decision cycle and the
// current time, it returns the new state. The exact increment/decrement rules
// are the standard DWCS window-constraint adjustments; the published design only
// says that they are simple increments and decrements, so the rule set below
// (and its saturation at the field limits) is this implementation's choice.
// All time comparisons are plain unsigned 16-bit compares, as in the
// comparators of the Decision block; the time counter is expected to stay
// below 2^16 within one scheduling run.
package sharestreams_pkg;

  localparam int unsigned TIME_W = 16;  // deadlines, arrival times, periods
  localparam int unsigned LOSS_W = 8;   // loss-tolerance numerator/denominator
  localparam int unsigned ID_W   = 5;   // stream / Register Base block ID
  localparam int unsigned MAX_STREAMS = 1 << ID_W;

  typedef logic [TIME_W-1:0] time_t;
  typedef logic [LOSS_W-1:0] loss_t;
  typedef logic [ID_W-1:0]   sid_t;

  // The 53-bit attribute bus from a Register Base block to a Decision block.
  typedef struct packed {
    time_t deadline;  // current packet deadline
    loss_t x;         // current loss numerator x'
    loss_t y;         // current loss denominator y'
    time_t arrival;   // arrival time of the head packet
    sid_t  id;        // stream / Register Base block ID
  } attr_t;

  // Service constraints of one stream, written by the host into the
  // constraint partition and loaded into a Register Base block at LOAD.
  typedef struct packed {
    time_t deadline;  // first deadline
    loss_t x;         // original loss numerator x
    loss_t y;         // original loss denominator y
    time_t period;    // request period T
  } constraint_t;

  // Dynamic per-stream state kept by a Register Base block besides the
  // constants (period, original x and y, ID).
  typedef struct packed {
    time_t deadline;
    loss_t x;
    loss_t y;
    logic  violation;  // tagged when a deadline is missed with x' = 0
    logic  drop;       // the head packet was dropped in the last update
    time_t misses;     // deadline-miss counter
  } dyn_state_t;

  // Architecture variant: base architecture, winner-only routing, or base
  // architecture with compute-ahead Register Base blocks.
  typedef enum logic [1:0] {
    ARCH_BA = 2'd0,
    ARCH_WR = 2'd1,
    ARCH_CA = 2'd2,
    ARCH_VS = 2'd3
  } arch_e;

  // What happened to a stream in a PRIORITY_UPDATE (the three arithmetic
  // update paths of a Register Base block).
  typedef enum logic [1:0] {
    UPD_WINNER    = 2'd0,  // stream won the decision cycle
    UPD_LOSE_MISS = 2'd1,  // stream lost and missed its deadline
    UPD_LOSE_MET  = 2'd2   // stream lost and its deadline has not passed
  } upd_kind_e;

  // A losing stream misses its deadline when the deadline is not later than
  // the current time: it cannot be served in time any more.
  function automatic upd_kind_e classify(input logic is_winner,
                                         input time_t deadline,
                                         input time_t now);
    if (is_winner)            return UPD_WINNER;
    else if (deadline <= now) return UPD_LOSE_MISS;
    else                      return UPD_LOSE_MET;
  endfunction

  // DWCS window-constraint and deadline adjustment.
  function automatic dyn_state_t dwcs_update(input dyn_state_t s,
                                             input upd_kind_e  kind,
                                             input time_t      period,
                                             input loss_t      x_orig,
                                             input loss_t      y_orig);
    dyn_state_t n;
    n = s;
    n.drop = 1'b0;
    unique case (kind)
      UPD_WINNER: begin
        if (s.y > s.x) n.y = s.y - 1'b1;
        if ((n.x == '0 && n.y == '0) || s.violation) begin
          n.x = x_orig;
          n.y = y_orig;
        end
        n.violation = 1'b0;
        n.deadline  = s.deadline + period;
      end
      UPD_LOSE_MISS: begin
        if (s.x != '0) begin
          // a packet may still be lost in this window: drop it
          n.x    = s.x - 1'b1;
          n.y    = (s.y != '0) ? s.y - 1'b1 : '0;
          n.drop = 1'b1;
          if (n.x == '0 && n.y == '0) begin
            n.x = x_orig;
            n.y = y_orig;
          end
        end else begin
          // no loss allowed: window-constraint violation, raise priority
          if (s.y != '1) n.y = s.y + 1'b1;
          n.violation = 1'b1;
        end
        n.deadline = s.deadline + period;
        if (s.misses != '1) n.misses = s.misses + 1'b1;
      end
      default: ;  // UPD_LOSE_MET: not adjusted
    endcase
    return n;
  endfunction

endpackage
