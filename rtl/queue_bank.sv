// queue_bank: NQ independent FIFO queues of fixed-size cells held in one array.
//
// An input port uses one bank as its N virtual output queues (VOQ(i,x), indexed
// by output x); an output port uses one as its N virtual input queues (VIQ(i,x),
// indexed by input i). Each queue is a circular buffer of DEPTH cells with its
// own read and write pointer and an occupancy count.
//
// Interface: one enqueue (enq_valid, enq_q, enq_data) and one dequeue (deq_valid,
// deq_q) per clock. deq_data is the head cell of queue deq_q, combinationally,
// so the caller reads and pops in the same cycle. An enqueue into a full queue
// is refused and enq_drop is raised in the same cycle (combinational); the queue
// is unchanged. An enqueue and a dequeue of the same queue in one cycle are both
// performed. Popping an empty queue is an error (asserted).
//
// Timing: counts and contents update at the rising clock edge; rst (synchronous)
// empties every queue. The bounded depth is this design's choice: the algorithm
// itself assumes queues of unbounded capacity.
module queue_bank #(
  parameter int unsigned NQ     = flgs_pkg::N_PORTS,
  parameter int unsigned DEPTH  = flgs_pkg::Q_DEPTH,
  parameter int unsigned DATA_W = flgs_pkg::CELL_W,
  localparam int unsigned QW    = (NQ > 1) ? $clog2(NQ) : 1,
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enq_valid,
  input  logic [QW-1:0]       enq_q,
  input  logic [DATA_W-1:0]   enq_data,
  output logic                enq_drop,
  input  logic                deq_valid,
  input  logic [QW-1:0]       deq_q,
  output logic [DATA_W-1:0]   deq_data,
  output logic [NQ-1:0][CW-1:0] count
);

  logic [DATA_W-1:0] mem [NQ][DEPTH];
  logic [PW-1:0]     wr_ptr [NQ];
  logic [PW-1:0]     rd_ptr [NQ];

  logic enq_ok;
  assign enq_drop = enq_valid && (count[enq_q] == CW'(DEPTH));
  assign enq_ok   = enq_valid && !enq_drop;
  assign deq_data = mem[deq_q][rd_ptr[deq_q]];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Storage: plain array write, no reset needed (counts gate every read).
  always_ff @(posedge clk) begin
    if (enq_ok) mem[enq_q][wr_ptr[enq_q]] <= enq_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int q = 0; q < NQ; q++) begin
        wr_ptr[q] <= '0;
        rd_ptr[q] <= '0;
        count[q]  <= '0;
      end
    end else begin
      for (int q = 0; q < NQ; q++) begin
        logic inc, dec;
        inc = enq_ok && (enq_q == QW'(q));
        dec = deq_valid && (deq_q == QW'(q));
        if (inc) wr_ptr[q] <= next_ptr(wr_ptr[q]);
        if (dec) rd_ptr[q] <= next_ptr(rd_ptr[q]);
        if (inc && !dec)      count[q] <= count[q] + 1'b1;
        else if (dec && !inc) count[q] <= count[q] - 1'b1;
      end
    end
  end

  // A dequeue must name a non-empty queue.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
    deq_valid |-> count[deq_q] != '0);

endmodule
