// tb_queue_bank: random enqueue/dequeue traffic into a 4-queue bank of depth 4,
// checked against per-queue reference FIFOs: head data on every pop, every
// count, and the drop flag on a full queue.
module tb_queue_bank;
  localparam int NQ = 4, DEPTH = 4, DW = 8;
  logic clk = 0, rst = 1;
  logic enq_valid, deq_valid, enq_drop;
  logic [1:0] enq_q, deq_q;
  logic [DW-1:0] enq_data, deq_data;
  logic [NQ-1:0][2:0] count;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_q [NQ][$];

  queue_bank #(.NQ(NQ), .DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    enq_valid = 0; deq_valid = 0; enq_q = 0; deq_q = 0; enq_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      enq_valid = ($urandom % 3) != 0;
      enq_q     = 2'($urandom);
      enq_data  = DW'($urandom);
      deq_q     = 2'($urandom);
      deq_valid = (ref_q[deq_q].size() != 0) && ($urandom % 2);
      #1;
      check(enq_drop == (enq_valid && ref_q[enq_q].size() == DEPTH), "drop flag");
      if (deq_valid) check(deq_data == ref_q[deq_q][0], "head data");
      @(posedge clk);
      if (deq_valid) void'(ref_q[deq_q].pop_front());
      if (enq_valid && !enq_drop) ref_q[enq_q].push_back(enq_data);
      #1;
      for (int q = 0; q < NQ; q++) check(count[q] == 3'(ref_q[q].size()), "count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
