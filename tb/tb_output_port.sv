// tb_output_port: a weighted-round-robin 4-input output port with VIQs of
// depth 4. Random cells arrive from the crossbar (never into a full VIQ, which
// viq_full must report), random departure cycles take cells, and random request
// sets are applied. Checked against a reference: the departing input and cell
// (oldest of the highest-priority non-empty VIQ) and, every cycle, the
// preference list, obtained by running the reference policy step by step on
// the queued cells plus one cell per requesting input.
module tb_output_port;
  localparam int N = 4, DEPTH = 4, DW = 8, WW = 3;
  logic clk = 0, rst = 1;
  flgs_pkg::policy_e cfg_mode;
  logic [N-1:0][1:0] cfg_pos, pref_rank;
  logic [N-1:0][WW-1:0] cfg_weight;
  logic rx_valid, dep_en, dep_valid;
  logic [1:0] rx_src, dep_src;
  logic [DW-1:0] rx_data, dep_data;
  logic [N-1:0] active, viq_full;
  logic [N-1:0][2:0] viq_count;
  int checks = 0, failures = 0, rotations = 0;
  logic [DW-1:0] viq[N][$];
  int p_m[N], c_m[N], w_m[N];

  output_port #(.N(N), .DEPTH(DEPTH), .DATA_W(DW), .W_W(WW)) dut (.*);
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
    cfg_mode = flgs_pkg::POL_WRR;
    for (int i = 0; i < N; i++) begin
      p_m[i] = (i + 1) % N; w_m[i] = 1 + i; c_m[i] = w_m[i];
      cfg_pos[i] = 2'(p_m[i]); cfg_weight[i] = WW'(w_m[i]);
    end
    rx_valid = 0; dep_en = 0; active = 0; rx_src = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int s, left[N], p[N], c[N], order[$];
      @(negedge clk);
      dep_en = $urandom % 3 == 0;
      rx_src = 2'($urandom); rx_data = DW'($urandom);
      rx_valid = !dep_en && viq[rx_src].size() < DEPTH && ($urandom % 2);
      active = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) check(viq_full[i] == (viq[i].size() == DEPTH), "viq_full");
      // Expected preference list.
      order.delete();
      for (int i = 0; i < N; i++) begin
        left[i] = active[i] ? viq[i].size() + 1 : 0; p[i] = p_m[i]; c[i] = c_m[i];
      end
      while (order.size() < $countones(active)) begin
        s = -1;
        for (int i = 0; i < N; i++) if (left[i] > 0 && (s < 0 || p[i] < p[s])) s = i;
        left[s]--;
        if (left[s] == 0) order.push_back(s);
        c[s]--;
        if (c[s] == 0) begin
          for (int i = 0; i < N; i++) if (p[i] > p[s]) p[i]--;
          p[s] = N - 1; c[s] = w_m[s];
        end
      end
      foreach (order[k]) check(pref_rank[order[k]] == 2'(k), "preference rank");
      // Expected departure.
      s = -1;
      for (int i = 0; i < N; i++) if (viq[i].size() > 0 && (s < 0 || p_m[i] < p_m[s])) s = i;
      check(dep_valid == (dep_en && s >= 0), "dep_valid");
      if (dep_en && s >= 0) check(dep_src == 2'(s) && dep_data == viq[s][0], "departing cell");
      @(posedge clk);
      if (rx_valid) viq[rx_src].push_back(rx_data);
      if (dep_en && s >= 0) begin
        void'(viq[s].pop_front());
        c_m[s]--;
        if (c_m[s] == 0) begin
          for (int i = 0; i < N; i++) if (p_m[i] > p_m[s]) p_m[i]--;
          p_m[s] = N - 1; c_m[s] = w_m[s]; rotations++;
        end
      end
      #1;
      for (int i = 0; i < N; i++) check(viq_count[i] == 3'(viq[i].size()), "viq_count");
    end
    if (rotations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
