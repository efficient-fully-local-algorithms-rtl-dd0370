// gbvoq_list: the GBVOQ ("group by virtual output queue") preference list of
// one input port.
//
// The list orders the input's non-empty VOQs. When a cell arrives into an empty
// VOQ, that VOQ is inserted at the front of the list; a VOQ that becomes empty
// during a scheduling phase is deleted; nothing else changes the order. The list
// is the input's preference list for the stable matching, so a newly populated
// VOQ is preferred first (last-in-first-out at the level of VOQs). This rule is
// the algorithm's; storing the list as one rank per VOQ is this design's choice.
//
// Interface: ins_valid/ins_q inserts VOQ ins_q at the front (the caller only
// inserts a VOQ not in the list); del_valid/del_q removes VOQ del_q (the caller
// only deletes a VOQ in the list). in_list[x] says VOQ x is listed, rank[x] is
// its position, 0 = most preferred; ranks of listed VOQs are 0..count-1.
//
// Timing: updates at the rising edge; rst empties the list. An insert and a
// delete never share a cycle (arrivals and scheduling are separate phases).
module gbvoq_list #(
  parameter int unsigned N  = flgs_pkg::N_PORTS,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ins_valid,
  input  logic [IW-1:0]        ins_q,
  input  logic                 del_valid,
  input  logic [IW-1:0]        del_q,
  output logic [N-1:0]         in_list,
  output logic [N-1:0][IW-1:0] rank
);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_list <= '0;
      rank    <= '0;
    end else if (ins_valid) begin
      // Everyone listed moves one place back; the new VOQ takes the front.
      for (int q = 0; q < N; q++)
        if (in_list[q]) rank[q] <= rank[q] + 1'b1;
      rank[ins_q]    <= '0;
      in_list[ins_q] <= 1'b1;
    end else if (del_valid) begin
      // VOQs behind the deleted one close the gap.
      for (int q = 0; q < N; q++)
        if (in_list[q] && rank[q] > rank[del_q]) rank[q] <= rank[q] - 1'b1;
      in_list[del_q] <= 1'b0;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (rst) !(ins_valid && del_valid));
  a_ins_new: assert property (@(posedge clk) disable iff (rst) ins_valid |-> !in_list[ins_q]);
  a_del_old: assert property (@(posedge clk) disable iff (rst) del_valid |-> in_list[del_q]);

endmodule
