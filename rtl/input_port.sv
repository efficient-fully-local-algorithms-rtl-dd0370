// input_port: one input of the CIOQ switch, with its N VOQs and GBVOQ list.
//
// Arriving cells are sorted into virtual output queues by destination. The
// input keeps the GBVOQ preference list of its non-empty VOQs: a VOQ that
// receives a cell while empty goes to the front of the list, and a VOQ emptied
// by a transfer is removed. voq_nonempty is the input's request vector and
// pref_rank its preference over outputs for the stable matching; both use
// nothing but the input's own state (fully local).
//
// Interface: in the arrival cycle (arr_en) a cell arr_data for output arr_dst is
// taken when arr_valid; arr_drop flags one refused because its VOQ is full. In a
// transfer cycle (xfer_valid) the head cell of VOQ xfer_dst is presented on
// xfer_data (combinational) and popped at the clock edge.
//
// Timing: state updates at the rising edge; rst empties VOQs and list. Dropping
// on a full VOQ is this design's choice (the algorithm assumes unbounded VOQs).
module input_port #(
  parameter int unsigned N      = flgs_pkg::N_PORTS,
  parameter int unsigned DEPTH  = flgs_pkg::Q_DEPTH,
  parameter int unsigned DATA_W = flgs_pkg::CELL_W,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 arr_en,
  input  logic                 arr_valid,
  input  logic [IW-1:0]        arr_dst,
  input  logic [DATA_W-1:0]    arr_data,
  output logic                 arr_drop,
  input  logic                 xfer_valid,
  input  logic [IW-1:0]        xfer_dst,
  output logic [DATA_W-1:0]    xfer_data,
  output logic [N-1:0]         voq_nonempty,
  output logic [N-1:0][IW-1:0] pref_rank,
  output logic [N-1:0][CW-1:0] voq_count
);

  logic enq, enq_drop, ins, del;
  logic [N-1:0] in_list;

  assign enq      = arr_en && arr_valid;
  assign arr_drop = enq_drop;

  queue_bank #(.NQ(N), .DEPTH(DEPTH), .DATA_W(DATA_W)) u_voq (
    .clk, .rst,
    .enq_valid (enq),
    .enq_q     (arr_dst),
    .enq_data  (arr_data),
    .enq_drop  (enq_drop),
    .deq_valid (xfer_valid),
    .deq_q     (xfer_dst),
    .deq_data  (xfer_data),
    .count     (voq_count)
  );

  always_comb begin
    for (int x = 0; x < N; x++) voq_nonempty[x] = (voq_count[x] != '0);
  end

  // GBVOQ list maintenance.
  assign ins = enq && !enq_drop && !voq_nonempty[arr_dst];
  assign del = xfer_valid && (voq_count[xfer_dst] == CW'(1));

  gbvoq_list #(.N(N)) u_list (
    .clk, .rst,
    .ins_valid (ins),
    .ins_q     (arr_dst),
    .del_valid (del),
    .del_q     (xfer_dst),
    .in_list   (in_list),
    .rank      (pref_rank)
  );

  // The list holds exactly the non-empty VOQs.
  a_list_matches: assert property (@(posedge clk) disable iff (rst) in_list == voq_nonempty);
  a_phases: assert property (@(posedge clk) disable iff (rst) !(arr_en && xfer_valid));

endmodule
