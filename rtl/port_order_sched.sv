// port_order_sched: the output link scheduler of one output port.
//
// It implements a port-ordered policy: the output keeps a strict priority order
// of the inputs (pos[i], 0 = highest), and in each departure phase sends the
// oldest cell of the highest-priority non-empty VIQ. The order changes only when
// a cell departs, and only by moving that cell's input down, so it never depends
// on cells still in the switch. Two policies are provided, chosen per output:
//   strict priority      - the configured order never changes;
//   weighted round robin - every input has a credit, loaded with its weight;
//                          each departure spends one credit of the sending input,
//                          and when its credit is used up the input moves to the
//                          bottom of the order and its credit is reloaded.
// Round robin is weighted round robin with all weights 1. The policy class and
// the two policies are the algorithm's; the list-with-credits mechanism is this
// design's choice.
//
// Interface: cfg_mode, cfg_pos (a permutation of 0..N-1) and cfg_weight are
// loaded while rst is high. In the departure cycle (dep_en) dep_valid/dep_sel
// name the chosen input (combinational from viq_nonempty and pos); the order
// and credits update at the clock edge. pos, credit and weight feed
// local_port_order. A weight of 0 acts as 1.
module port_order_sched #(
  parameter int unsigned N   = flgs_pkg::N_PORTS,
  parameter int unsigned W_W = flgs_pkg::WEIGHT_W,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  flgs_pkg::policy_e     cfg_mode,
  input  logic [N-1:0][IW-1:0]  cfg_pos,
  input  logic [N-1:0][W_W-1:0] cfg_weight,
  input  logic                  dep_en,
  input  logic [N-1:0]          viq_nonempty,
  output logic                  dep_valid,
  output logic [IW-1:0]         dep_sel,
  output flgs_pkg::policy_e     mode,
  output logic [N-1:0][IW-1:0]  pos,
  output logic [N-1:0][W_W-1:0] credit,
  output logic [N-1:0][W_W-1:0] weight
);

  // Highest-priority non-empty VIQ.
  always_comb begin
    logic [IW-1:0] best_pos;
    dep_valid = 1'b0;
    dep_sel   = '0;
    best_pos  = '1;
    for (int i = 0; i < N; i++) begin
      if (viq_nonempty[i] && (!dep_valid || pos[i] < best_pos)) begin
        dep_valid = 1'b1;
        dep_sel   = IW'(i);
        best_pos  = pos[i];
      end
    end
  end

  function automatic logic [W_W-1:0] eff_weight(input logic [W_W-1:0] w);
    return (w == '0) ? W_W'(1) : w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mode   <= cfg_mode;
      pos    <= cfg_pos;
      weight <= cfg_weight;
      for (int i = 0; i < N; i++) credit[i] <= eff_weight(cfg_weight[i]);
    end else if (dep_en && dep_valid && mode == flgs_pkg::POL_WRR) begin
      if (credit[dep_sel] <= W_W'(1)) begin
        // Turn used up: the sender moves to the bottom, the rest close the gap.
        for (int i = 0; i < N; i++)
          if (pos[i] > pos[dep_sel]) pos[i] <= pos[i] - 1'b1;
        pos[dep_sel]    <= IW'(N - 1);
        credit[dep_sel] <= eff_weight(weight[dep_sel]);
      end else begin
        credit[dep_sel] <= credit[dep_sel] - 1'b1;
      end
    end
  end

endmodule
