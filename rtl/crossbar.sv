// crossbar: the N x N switching fabric.
//
// During the switching part of a scheduling phase each output that the matching
// paired with an input receives that input's cell; the matching guarantees an
// input feeds at most one output. The fabric is one N-to-1 multiplexer per
// output, selected by the matched input index (sel) with sel_valid marking a
// matched output.
//
// Interface and timing: purely combinational, out_valid[x] = sel_valid[x] and
// out_data[x] = in_data[sel[x]]. Unmatched outputs present zero. The crossbar is
// named by the algorithm; the multiplexer structure is this design's choice.
module crossbar #(
  parameter int unsigned N      = flgs_pkg::N_PORTS,
  parameter int unsigned DATA_W = flgs_pkg::CELL_W,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][DATA_W-1:0] in_data,
  input  logic [N-1:0]             sel_valid,
  input  logic [N-1:0][IW-1:0]     sel,
  output logic [N-1:0]             out_valid,
  output logic [N-1:0][DATA_W-1:0] out_data
);

  always_comb begin
    for (int x = 0; x < N; x++) begin
      out_valid[x] = sel_valid[x];
      out_data[x]  = sel_valid[x] ? in_data[sel[x]] : '0;
    end
  end

endmodule
