// output_port: one output of the CIOQ switch.
//
// It holds N virtual input queues (VIQ(i,x), one per input), the output link
// scheduler (port_order_sched) that picks the departing cell, and the
// LOCAL-PORT-ORDER unit that turns the scheduler state, the VIQ sizes and the
// request bits into the output's preference list for the stable matching.
// Everything it computes uses its own state plus the request bits only.
//
// Interface: rx_valid/rx_src/rx_data take a cell from the crossbar at the clock
// edge of a transfer cycle. active[i] is the request bit "input i holds a cell
// for this output" (A(x,t)); pref_rank[i] is i's position in the preference
// list (meaningful for active inputs). viq_full[i] tells the matcher that
// VIQ(i) cannot take another cell. In the departure cycle (dep_en) dep_valid,
// dep_src, dep_data present the departing cell combinationally; it is removed
// at the clock edge. The bounded VIQ with back-pressure through viq_full is this
// design's choice; the algorithm assumes unbounded VIQs.
module output_port #(
  parameter int unsigned N      = flgs_pkg::N_PORTS,
  parameter int unsigned DEPTH  = flgs_pkg::Q_DEPTH,
  parameter int unsigned DATA_W = flgs_pkg::CELL_W,
  parameter int unsigned W_W    = flgs_pkg::WEIGHT_W,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  flgs_pkg::policy_e     cfg_mode,
  input  logic [N-1:0][IW-1:0]  cfg_pos,
  input  logic [N-1:0][W_W-1:0] cfg_weight,
  input  logic                  rx_valid,
  input  logic [IW-1:0]         rx_src,
  input  logic [DATA_W-1:0]     rx_data,
  input  logic [N-1:0]          active,
  output logic [N-1:0][IW-1:0]  pref_rank,
  output logic [N-1:0]          viq_full,
  input  logic                  dep_en,
  output logic                  dep_valid,
  output logic [IW-1:0]         dep_src,
  output logic [DATA_W-1:0]     dep_data,
  output logic [N-1:0][CW-1:0]  viq_count
);

  flgs_pkg::policy_e     mode;
  logic [N-1:0][IW-1:0]  pos;
  logic [N-1:0][W_W-1:0] credit, weight;
  logic [N-1:0]          viq_nonempty;
  logic                  sel_valid, rx_drop;

  queue_bank #(.NQ(N), .DEPTH(DEPTH), .DATA_W(DATA_W)) u_viq (
    .clk, .rst,
    .enq_valid (rx_valid),
    .enq_q     (rx_src),
    .enq_data  (rx_data),
    .enq_drop  (rx_drop),
    .deq_valid (dep_en && sel_valid),
    .deq_q     (dep_src),
    .deq_data  (dep_data),
    .count     (viq_count)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      viq_nonempty[i] = (viq_count[i] != '0);
      viq_full[i]     = (viq_count[i] == CW'(DEPTH));
    end
  end

  port_order_sched #(.N(N), .W_W(W_W)) u_sched (
    .clk, .rst,
    .cfg_mode, .cfg_pos, .cfg_weight,
    .dep_en,
    .viq_nonempty,
    .dep_valid (sel_valid),
    .dep_sel   (dep_src),
    .mode, .pos, .credit, .weight
  );

  assign dep_valid = dep_en && sel_valid;

  local_port_order #(.N(N), .CW(CW), .W_W(W_W)) u_lpo (
    .mode, .active, .viq_count, .pos, .credit, .weight,
    .rank (pref_rank)
  );

  // The matcher never sends a cell to a full VIQ.
  a_no_viq_overflow: assert property (@(posedge clk) disable iff (rst) !rx_drop);

endmodule
