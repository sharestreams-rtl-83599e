// winner_only_network: Winner-only Routing (WR) variant of the recirculating
// Decision block network.
//
// Each of the N/2 Decision blocks keeps only its winner output; losers are not
// routed back, which removes half of the recirculation wiring. Decision block
// j stores its winner in register w[j]. In the first SCHEDULE cycle
// (apply=1) block j compares Register Base blocks 2j and 2j+1. In cycle s
// (s = 1 .. log2(N)-1) only the blocks whose index is a multiple of 2^s are
// active: block j compares its own previous winner w[j] with w[j + 2^(s-1)].
// For eight streams this uses blocks 0 and 2 in the second cycle and block 0
// in the third, as in the published description of winner-only routing
// (blocks "1 and 3", then "1", counting from one). After log2(N) cycles
// w[0] holds the winner. Unlike the base network it yields no ranked list.
//
// The cycle index is tracked here: apply=1 marks cycle 0, each later advance
// moves on by one. Timing otherwise matches shuffle_exchange_network:
// `winner` is valid the cycle after the last advance, `winner_now` during it.
module winner_only_network
  import sharestreams_pkg::*;
#(
  parameter int unsigned N_STREAMS = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  apply,
  input  logic  advance,
  input  attr_t reg_attr [N_STREAMS],
  output attr_t winner,
  output attr_t winner_now
);

  localparam int unsigned HALF  = N_STREAMS / 2;
  localparam int unsigned LOG_N = $clog2(N_STREAMS);
  localparam int unsigned SW    = (LOG_N > 1) ? $clog2(LOG_N) : 1;

  logic [SW-1:0] cycle_q, cycle;
  attr_t in_a [HALF];
  attr_t in_b [HALF];
  attr_t win  [HALF];
  attr_t w_q  [HALF];

  assign cycle = apply ? '0 : cycle_q;

  // input muxes: register buses in cycle 0, recirculated winners afterwards
  always_comb begin
    for (int unsigned j = 0; j < HALF; j++) begin
      in_a[j] = apply ? reg_attr[2*j] : w_q[j];
      in_b[j] = apply ? reg_attr[2*j+1] : w_q[j];
      for (int unsigned s = 1; s < LOG_N; s++) begin
        if (!apply && cycle == SW'(s) && (j % (1 << s)) == 0)
          in_b[j] = w_q[j + (1 << (s - 1))];
      end
    end
  end

  for (genvar j = 0; j < HALF; j++) begin : g_db
    attr_t lose_unused;
    logic  a_wins_unused;
    decision_block u_db (
      .a      (in_a[j]),
      .b      (in_b[j]),
      .winner (win[j]),
      .loser  (lose_unused),
      .a_wins (a_wins_unused)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_q <= '0;
      for (int unsigned j = 0; j < HALF; j++) w_q[j] <= '0;
    end else if (advance) begin
      cycle_q <= cycle + 1'b1;
      for (int unsigned j = 0; j < HALF; j++) w_q[j] <= win[j];
    end
  end

  assign winner     = w_q[0];
  assign winner_now = win[0];

endmodule
