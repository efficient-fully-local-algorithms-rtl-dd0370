// tb_gbvoq_list: random inserts (of unlisted VOQs) and deletes (of listed ones)
// into an 8-entry GBVOQ list, checked against an ordered reference list: after
// every operation each listed VOQ's rank must equal its reference position,
// with the last inserted VOQ at the front.
module tb_gbvoq_list;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic ins_valid, del_valid;
  logic [2:0] ins_q, del_q;
  logic [N-1:0] in_list;
  logic [N-1:0][2:0] rank;
  int checks = 0, failures = 0;
  int ref_l[$];

  gbvoq_list #(.N(N)) dut (.*);
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
    ins_valid = 0; del_valid = 0; ins_q = 0; del_q = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int pick;
      @(negedge clk);
      ins_valid = 0; del_valid = 0;
      pick = $urandom % N;
      if (($urandom % 2) && ref_l.size() < N) begin
        while (in_ref(pick)) pick = (pick + 1) % N;
        ins_valid = 1; ins_q = 3'(pick);
      end else if (ref_l.size() > 0) begin
        del_valid = 1; del_q = 3'(ref_l[$urandom % ref_l.size()]);
      end
      @(posedge clk);
      if (ins_valid) ref_l.push_front(int'(ins_q));
      if (del_valid) begin
        foreach (ref_l[k]) if (ref_l[k] == int'(del_q)) begin ref_l.delete(k); break; end
      end
      #1;
      for (int q = 0; q < N; q++) check(in_list[q] == in_ref(q), "membership");
      foreach (ref_l[k]) check(rank[ref_l[k]] == 3'(k), "rank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_ref(int q);
    foreach (ref_l[k]) if (ref_l[k] == q) return 1;
    return 0;
  endfunction
endmodule
