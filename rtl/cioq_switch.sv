// cioq_switch: N x N combined input/output queued cell switch scheduled by
// FLGS (fully local Gale-Shapley).
//
// Cells wait at the inputs in virtual output queues and at the outputs in
// virtual input queues. In every time slot at most one cell enters each input,
// the fabric runs SPEEDUP_NUM/SPEEDUP_DEN scheduling phases, and at most one
// cell leaves each output. Each scheduling phase computes a stable marriage of
// inputs and outputs from two kinds of preference list, each built by a port
// from its own state alone:
//   input i  - GBVOQ: its non-empty VOQs, the most recently populated first;
//   output x - LOCAL-PORT-ORDER: the requesting inputs in the order their VOQ
//              head cells would leave x under x's output scheduling policy.
// Matched inputs then send their VOQ head cell across the crossbar. Outputs send
// cells with a port-ordered policy (strict priority or weighted round robin,
// per output). At speedup 2 (the default) every cell leaves at exactly the slot
// an output-queued switch with the same policies would send it, provided no
// queue fills up.
//
// Interface: cfg_* set each output's policy and are loaded while rst is high
// (cfg_pos[x] must be a permutation; input with position 0 has top priority).
// arr_ready is high for the one arrival cycle of a slot; arr_valid[i],
// arr_dst[i], arr_data[i] are sampled then, and arr_drop[i] in the same cycle
// flags a cell refused by a full VOQ. dep_valid[x], dep_src[x], dep_data[x] are
// valid in the departure cycle, which is the last cycle of a slot (slot_done).
// A slot takes 2 + per phase (3 + matching rounds) cycles.
//
// Structure, the slot order and the two preference rules follow the
// algorithm; bounded queues, cycle timing, fractional speedup and the policy
// configuration interface are this design's choices.
module cioq_switch #(
  parameter int unsigned N           = flgs_pkg::N_PORTS,
  parameter int unsigned DEPTH       = flgs_pkg::Q_DEPTH,
  parameter int unsigned DATA_W      = flgs_pkg::CELL_W,
  parameter int unsigned W_W         = flgs_pkg::WEIGHT_W,
  parameter int unsigned SPEEDUP_NUM = flgs_pkg::SPEEDUP_NUM,
  parameter int unsigned SPEEDUP_DEN = flgs_pkg::SPEEDUP_DEN,
  localparam int unsigned IW         = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW         = $clog2(DEPTH + 1)
) (
  input  logic                           clk,
  input  logic                           rst,
  input  flgs_pkg::policy_e [N-1:0]      cfg_mode,
  input  logic [N-1:0][N-1:0][IW-1:0]    cfg_pos,     // [output][input]
  input  logic [N-1:0][N-1:0][W_W-1:0]   cfg_weight,  // [output][input]
  output logic                           arr_ready,
  input  logic [N-1:0]                   arr_valid,
  input  logic [N-1:0][IW-1:0]           arr_dst,
  input  logic [N-1:0][DATA_W-1:0]       arr_data,
  output logic [N-1:0]                   arr_drop,
  output logic [N-1:0]                   dep_valid,
  output logic [N-1:0][IW-1:0]           dep_src,
  output logic [N-1:0][DATA_W-1:0]       dep_data,
  output logic                           slot_done
);

  logic arr_en, gs_start, gs_done, gs_busy, xfer_en, dep_en;
  flgs_pkg::phase_e phase;

  logic [N-1:0][N-1:0]          voq_nonempty;  // [input][output]
  logic [N-1:0][N-1:0][IW-1:0]  in_rank;       // [input][output]
  logic [N-1:0][N-1:0][CW-1:0]  voq_count;     // [input][output]
  logic [N-1:0][DATA_W-1:0]     xfer_data;
  logic [N-1:0][N-1:0]          active;        // [output][input]
  logic [N-1:0][N-1:0][IW-1:0]  out_rank;      // [output][input]
  logic [N-1:0][N-1:0]          viq_full;      // [output][input]
  logic [N-1:0][N-1:0][CW-1:0]  viq_count;     // [output][input]
  logic [N-1:0][N-1:0]          acceptable;    // [input][output]
  logic [N-1:0]                 in_matched, out_matched;
  logic [N-1:0][IW-1:0]         in_match, out_match;
  logic [15:0]                  gs_rounds;
  logic [N-1:0]                 xb_valid;
  logic [N-1:0][DATA_W-1:0]     xb_data;

  flgs_ctrl #(.SPEEDUP_NUM(SPEEDUP_NUM), .SPEEDUP_DEN(SPEEDUP_DEN)) u_ctrl (
    .clk, .rst, .gs_done, .arr_en, .gs_start, .xfer_en, .dep_en, .phase
  );

  assign arr_ready = arr_en;
  assign slot_done = dep_en;

  for (genvar i = 0; i < N; i++) begin : g_in
    input_port #(.N(N), .DEPTH(DEPTH), .DATA_W(DATA_W)) u_in (
      .clk, .rst,
      .arr_en,
      .arr_valid    (arr_valid[i]),
      .arr_dst      (arr_dst[i]),
      .arr_data     (arr_data[i]),
      .arr_drop     (arr_drop[i]),
      .xfer_valid   (xfer_en && in_matched[i]),
      .xfer_dst     (in_match[i]),
      .xfer_data    (xfer_data[i]),
      .voq_nonempty (voq_nonempty[i]),
      .pref_rank    (in_rank[i]),
      .voq_count    (voq_count[i])
    );
  end

  // Request bits seen by the outputs, and pairs the matcher may use.
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int x = 0; x < N; x++) begin
        active[x][i]     = voq_nonempty[i][x];
        acceptable[i][x] = voq_nonempty[i][x] && !viq_full[x][i];
      end
  end

  gs_matcher #(.N(N)) u_gs (
    .clk, .rst,
    .start       (gs_start),
    .acceptable,
    .in_rank,
    .out_rank,
    .busy        (gs_busy),
    .done        (gs_done),
    .in_matched, .in_match,
    .out_matched, .out_match,
    .rounds      (gs_rounds)
  );

  crossbar #(.N(N), .DATA_W(DATA_W)) u_xbar (
    .in_data   (xfer_data),
    .sel_valid (xfer_en ? out_matched : '0),
    .sel       (out_match),
    .out_valid (xb_valid),
    .out_data  (xb_data)
  );

  for (genvar x = 0; x < N; x++) begin : g_out
    output_port #(.N(N), .DEPTH(DEPTH), .DATA_W(DATA_W), .W_W(W_W)) u_out (
      .clk, .rst,
      .cfg_mode   (cfg_mode[x]),
      .cfg_pos    (cfg_pos[x]),
      .cfg_weight (cfg_weight[x]),
      .rx_valid   (xb_valid[x]),
      .rx_src     (out_match[x]),
      .rx_data    (xb_data[x]),
      .active     (active[x]),
      .pref_rank  (out_rank[x]),
      .viq_full   (viq_full[x]),
      .dep_en,
      .dep_valid  (dep_valid[x]),
      .dep_src    (dep_src[x]),
      .dep_data   (dep_data[x]),
      .viq_count  (viq_count[x])
    );
  end

endmodule
