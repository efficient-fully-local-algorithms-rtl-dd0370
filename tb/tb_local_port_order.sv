// tb_local_port_order: random output states (policy, requesting set, VIQ sizes,
// priority order, weights, credits) for a 6-port output. The expected list is
// obtained by literally running the output policy, step by step, on one cell
// per requesting VOQ behind the queued VIQ cells, and recording the order in
// which those VOQ cells leave.
module tb_local_port_order;
  localparam int N = 6, CW = 3, WW = 3;
  flgs_pkg::policy_e mode;
  logic [N-1:0] active;
  logic [N-1:0][CW-1:0] viq_count;
  logic [N-1:0][2:0] pos, rank;
  logic [N-1:0][WW-1:0] credit, weight;
  int checks = 0, failures = 0;

  local_port_order #(.N(N), .CW(CW), .W_W(WW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    int sp_seen = 0;
    for (int n = 0; n < 3000; n++) begin
      int p[N], c[N], left[N], order[$];
      order.delete();
      mode = ($urandom % 3 == 0) ? flgs_pkg::POL_SP : flgs_pkg::POL_WRR;
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        active[i]    = $urandom % 4 != 0;
        viq_count[i] = CW'($urandom % 7);
        pos[i]       = 3'(perm[i]);
        weight[i]    = WW'(1 + $urandom % 4);
        credit[i]    = WW'(1 + $urandom % weight[i]);
        p[i] = perm[i]; c[i] = credit[i];
        left[i] = active[i] ? viq_count[i] + 1 : 0;
      end
      // Step-by-step simulation of the policy on the restricted cell set.
      while (order.size() < $countones(active)) begin
        int s;
        s = -1;
        for (int i = 0; i < N; i++) if (left[i] > 0 && (s < 0 || p[i] < p[s])) s = i;
        left[s]--;
        if (left[s] == 0) order.push_back(s);
        if (mode == flgs_pkg::POL_WRR) begin
          c[s]--;
          if (c[s] == 0) begin
            for (int i = 0; i < N; i++) if (p[i] > p[s]) p[i]--;
            p[s] = N - 1; c[s] = weight[s];
          end
        end
      end
      #1;
      if (mode == flgs_pkg::POL_SP) sp_seen++;
      foreach (order[k]) begin
        checks++;
        if (rank[order[k]] != 3'(k)) begin
          failures++;
          $display("FAIL mode=%0d input %0d rank %0d expected %0d", mode, order[k], rank[order[k]], k);
        end
      end
      #1;
    end
    if (sp_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
