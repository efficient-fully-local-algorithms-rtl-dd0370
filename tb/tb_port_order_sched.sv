// tb_port_order_sched: a 5-port output scheduler under random VIQ occupancy, in
// strict-priority and in weighted-round-robin mode (two runs with a reset and
// new configuration in between). Each departure cycle checks the chosen input
// (highest priority non-empty) and, afterwards, the priority order and credits
// against a reference kept as an explicit ordered list of inputs.
module tb_port_order_sched;
  localparam int N = 5, WW = 3;
  logic clk = 0, rst = 1;
  flgs_pkg::policy_e cfg_mode, mode;
  logic [N-1:0][2:0] cfg_pos, pos;
  logic [N-1:0][WW-1:0] cfg_weight, credit, weight;
  logic dep_en, dep_valid;
  logic [N-1:0] viq_nonempty;
  logic [2:0] dep_sel;
  int checks = 0, failures = 0, moves = 0;

  port_order_sched #(.N(N), .W_W(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input flgs_pkg::policy_e m);
    int lst[$], cr[N], perm[N];
    for (int k = 0; k < N; k++) perm[k] = k;
    perm.shuffle();
    cfg_mode = m;
    for (int i = 0; i < N; i++) begin
      cfg_pos[i] = 3'(perm[i]);
      cfg_weight[i] = WW'(1 + $urandom % 4);
      cr[i] = cfg_weight[i];
    end
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++) if (perm[i] == k) lst.push_back(i);
    rst = 1; dep_en = 0; viq_nonempty = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      int exp_sel;
      @(negedge clk);
      viq_nonempty = N'($urandom);
      dep_en = $urandom % 2;
      exp_sel = -1;
      foreach (lst[k]) if (viq_nonempty[lst[k]]) begin exp_sel = lst[k]; break; end
      #1;
      check(dep_valid == (exp_sel >= 0), "dep_valid");
      if (exp_sel >= 0) check(dep_sel == 3'(exp_sel), "dep_sel");
      @(posedge clk);
      if (dep_en && exp_sel >= 0 && m == flgs_pkg::POL_WRR) begin
        cr[exp_sel]--;
        if (cr[exp_sel] == 0) begin
          foreach (lst[k]) if (lst[k] == exp_sel) begin lst.delete(k); break; end
          lst.push_back(exp_sel);
          cr[exp_sel] = weight[exp_sel];
          moves++;
        end
      end
      #1;
      foreach (lst[k]) check(pos[lst[k]] == 3'(k), "position");
      for (int i = 0; i < N; i++) if (m == flgs_pkg::POL_WRR) check(credit[i] == WW'(cr[i]), "credit");
    end
  endtask

  initial begin
    run(flgs_pkg::POL_SP);
    run(flgs_pkg::POL_WRR);
    if (moves == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
