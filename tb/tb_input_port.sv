// tb_input_port: a 4-output input port with VOQs of depth 3. Arrival cycles and
// transfer cycles alternate at random. A reference keeps the VOQ contents and
// the GBVOQ order as explicit lists; every cycle checks drops, the transferred
// cell, the request bits and the preference ranks.
module tb_input_port;
  localparam int N = 4, DEPTH = 3, DW = 10;
  logic clk = 0, rst = 1;
  logic arr_en, arr_valid, arr_drop, xfer_valid;
  logic [1:0] arr_dst, xfer_dst;
  logic [DW-1:0] arr_data, xfer_data;
  logic [N-1:0] voq_nonempty;
  logic [N-1:0][1:0] pref_rank;
  logic [N-1:0][1:0] voq_count;
  int checks = 0, failures = 0, fronts = 0, deletes = 0, drops = 0;
  logic [DW-1:0] ref_q[N][$];
  int ref_l[$];

  input_port #(.N(N), .DEPTH(DEPTH), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    arr_en = 0; arr_valid = 0; xfer_valid = 0; arr_dst = 0; xfer_dst = 0; arr_data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      arr_en = $urandom % 2;
      arr_valid = arr_en && ($urandom % 4 != 0);
      arr_dst = 2'($urandom); arr_data = DW'($urandom);
      xfer_valid = 0;
      if (!arr_en) begin
        xfer_dst = 2'($urandom);
        xfer_valid = ref_q[xfer_dst].size() > 0 && ($urandom % 3 != 0);
      end
      #1;
      check(arr_drop == (arr_valid && ref_q[arr_dst].size() == DEPTH), "drop");
      if (xfer_valid) check(xfer_data == ref_q[xfer_dst][0], "transfer data");
      @(posedge clk);
      if (arr_valid && ref_q[arr_dst].size() < DEPTH) begin
        if (ref_q[arr_dst].size() == 0) begin ref_l.push_front(int'(arr_dst)); fronts++; end
        ref_q[arr_dst].push_back(arr_data);
      end else if (arr_valid) drops++;
      if (xfer_valid) begin
        void'(ref_q[xfer_dst].pop_front());
        if (ref_q[xfer_dst].size() == 0) begin
          foreach (ref_l[k]) if (ref_l[k] == int'(xfer_dst)) begin ref_l.delete(k); break; end
          deletes++;
        end
      end
      #1;
      for (int x = 0; x < N; x++) check(voq_nonempty[x] == (ref_q[x].size() > 0), "request bit");
      foreach (ref_l[k]) check(pref_rank[ref_l[k]] == 2'(k), "GBVOQ rank");
    end
    if (fronts == 0 || deletes == 0 || drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
