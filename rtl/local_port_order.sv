// local_port_order: the output port's preference list, LOCAL-PORT-ORDER.
//
// For the set A of inputs that hold a cell for this output (active), it ranks
// the inputs in the order in which the cell at the head of each of their VOQs
// would leave this output under the output's port-ordered policy, assuming no
// further arrivals and ignoring VIQs of inputs outside A. This departure-sorted
// list V(x,t) is the output's preference list for the stable matching. Only the
// output's own VIQ counts and policy state are used, plus the request bits.
//
// How: the restricted simulation has a closed form. Input i must send
// n_i = viq_count_i + 1 cells (its queued cells, then the VOQ head). Under
// weighted round robin the policy serves the inputs in turns in priority-list
// order; a turn of input i lasts up to its credit (first turn) or its weight
// (later turns), after which it moves to the bottom. So i finishes in turn
//   T_i = 1                                     if n_i <= credit_i
//   T_i = 1 + ceil((n_i - credit_i) / weight_i) otherwise,
// and V sorts A by (T_i, pos_i). Under strict priority T_i = 1 and V is A in
// static order. Round robin is weighted round robin with all weights 1; it
// sorts by increasing VIQ size with ties broken by list position. (One summary
// of the rule for round robin states "decreasing" order; the simulation the
// rule is defined by gives increasing order, which is used here.)
//
// Interface: combinational. rank[i] is i's position in V for i in A (0 = most
// preferred); rank of an input not in A is 0 and must be ignored. A weight or
// credit of 0 is treated as 1.
module local_port_order #(
  parameter int unsigned N   = flgs_pkg::N_PORTS,
  parameter int unsigned CW  = $clog2(flgs_pkg::Q_DEPTH + 1),
  parameter int unsigned W_W = flgs_pkg::WEIGHT_W,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned TW = CW + 1
) (
  input  flgs_pkg::policy_e     mode,
  input  logic [N-1:0]          active,
  input  logic [N-1:0][CW-1:0]  viq_count,
  input  logic [N-1:0][IW-1:0]  pos,
  input  logic [N-1:0][W_W-1:0] credit,
  input  logic [N-1:0][W_W-1:0] weight,
  output logic [N-1:0][IW-1:0]  rank
);

  logic [N-1:0][TW-1:0] turns;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [TW-1:0] n, c, w;
      n = TW'(viq_count[i]) + 1'b1;
      c = (credit[i] == '0) ? TW'(1) : TW'(credit[i]);
      w = (weight[i] == '0) ? TW'(1) : TW'(weight[i]);
      if (mode == flgs_pkg::POL_SP || n <= c) turns[i] = TW'(1);
      else                                    turns[i] = TW'(1) + (n - c + w - 1'b1) / w;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [IW:0] r;
      r = '0;
      for (int j = 0; j < N; j++) begin
        if (j != i && active[j] &&
            ((turns[j] < turns[i]) || (turns[j] == turns[i] && pos[j] < pos[i])))
          r = r + 1'b1;
      end
      rank[i] = active[i] ? IW'(r) : '0;
    end
  end

endmodule
