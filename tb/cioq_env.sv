// cioq_env: traffic source and output-queued reference for the CIOQ switch
// testbenches.
//
// It configures every output's policy, offers one Bernoulli arrival per input per
// slot, and runs an ideal output-queued (OQ) switch with the same policies on
// the same accepted cells. Every departure of the switch under test must be the
// oldest cell of its (input, output) flow. With EXACT=1 it must also be exactly
// the cell the OQ switch sends from that output in that slot (exact emulation).
// After SLOTS slots of traffic an optional burst of OVERLOAD slots sends every
// input's cells to outputs 0 and 1 (VOQ overflow, full VIQs); exact comparison
// stops there and only flow order is checked. Finally the switch is drained and
// must hand out every accepted cell.
//
// Traffic (TRAFFIC): 0 = uniform random destinations at LOAD per mille;
// 1 = "diagonal 4": input i sends to i, i+1, i+2, i+3 (mod N) at 0.1, 0.2, 0.3
// and LOAD/1000-0.6 cells per slot. Policies (POLICY): 0 = even outputs strict
// priority, odd outputs weighted round robin, random orders and weights 1..4;
// 1 = WRR, at output x input x-d has weight 4-d (d < 4), others weight 1;
// 2 = strict priority, at output x input x-d has position d.
// TAG labels the printed lines. REPORT_OUT selects the output whose per-class mean latencies (class d+1 =
// input REPORT_OUT-d) are printed for both switches.
module cioq_env #(
  parameter int N          = 4,
  parameter int DW         = 16,
  parameter int W_W        = 4,
  parameter int SLOTS      = 200,
  parameter int TRAFFIC    = 0,
  parameter int LOAD       = 900,
  parameter int POLICY     = 0,
  parameter bit EXACT      = 1,
  parameter int OVERLOAD   = 0,
  parameter int REPORT_OUT = 3,
  parameter int TAG        = 0,
  localparam int IW        = (N > 1) ? $clog2(N) : 1
) (
  input  logic                         clk,
  output logic                         rst,
  output flgs_pkg::policy_e [N-1:0]    cfg_mode,
  output logic [N-1:0][N-1:0][IW-1:0]  cfg_pos,
  output logic [N-1:0][N-1:0][W_W-1:0] cfg_weight,
  input  logic                         arr_ready,
  output logic [N-1:0]                 arr_valid,
  output logic [N-1:0][IW-1:0]         arr_dst,
  output logic [N-1:0][DW-1:0]         arr_data,
  input  logic [N-1:0]                 arr_drop,
  input  logic [N-1:0]                 dep_valid,
  input  logic [N-1:0][IW-1:0]         dep_src,
  input  logic [N-1:0][DW-1:0]         dep_data,
  input  logic                         slot_done,
  output int                           checks,
  output int                           failures,
  output int                           slots_run,
  output int                           mismatches,
  output bit                           finished
);

  typedef struct { logic [DW-1:0] id; int t; } cell_t;

  cell_t flow[N][N][$];   // cells of the switch under test, per [input][output]
  cell_t oq[N][N][$];     // reference OQ switch, per [output][input]
  int    pos_m[N][N], cr_m[N][N], w_m[N][N];
  int    lat_sum_dut[4], lat_sum_oq[4], lat_n_dut[4], lat_n_oq[4];
  int    slot = 0, next_id = 0, accepted = 0, departed = 0;
  bit    burst = 0, drain = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL slot %0d: %s", slot, what);
    end
  endtask

  function automatic int pick_dst(int i);
    int r = $urandom % 1000;
    int hi;
    if (burst) return (i % 2);
    if (TRAFFIC == 0) return (r < LOAD) ? int'($urandom % N) : -1;
    hi = LOAD - 600;
    if (r < 100) return i % N;
    if (r < 300) return (i + 1) % N;
    if (r < 600) return (i + 2) % N;
    if (r < 600 + hi) return (i + 3) % N;
    return -1;
  endfunction

  // Configuration and reference policy state.
  initial begin
    int perm[N];
    checks = 0; failures = 0; mismatches = 0; finished = 0; slots_run = 0;
    for (int d = 0; d < 4; d++) begin lat_sum_dut[d] = 0; lat_sum_oq[d] = 0; lat_n_dut[d] = 0; lat_n_oq[d] = 0; end
    for (int x = 0; x < N; x++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      cfg_mode[x] = (POLICY == 2 || (POLICY == 0 && x % 2 == 0)) ? flgs_pkg::POL_SP : flgs_pkg::POL_WRR;
      for (int i = 0; i < N; i++) begin
        int d;
        d = (x - i + N) % N;
        if (POLICY == 0) begin
          pos_m[x][i] = perm[i];
          w_m[x][i]   = 1 + $urandom % 4;
        end else begin
          pos_m[x][i] = d;
          w_m[x][i]   = (d < 4) ? 4 - d : 1;
        end
        cr_m[x][i] = w_m[x][i];
        cfg_pos[x][i]    = IW'(pos_m[x][i]);
        cfg_weight[x][i] = W_W'(w_m[x][i]);
      end
    end
    arr_valid = '0; arr_dst = '0; arr_data = '0;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  // Reference OQ departure from output x; returns the input or -1.
  function automatic int oq_depart(int x, bit update);
    int s = -1;
    for (int i = 0; i < N; i++)
      if (oq[x][i].size() > 0 && (s < 0 || pos_m[x][i] < pos_m[x][s])) s = i;
    if (s >= 0 && update && cfg_mode[x] == flgs_pkg::POL_WRR) begin
      cr_m[x][s]--;
      if (cr_m[x][s] == 0) begin
        for (int i = 0; i < N; i++) if (pos_m[x][i] > pos_m[x][s]) pos_m[x][i]--;
        pos_m[x][s] = N - 1;
        cr_m[x][s]  = w_m[x][s];
      end
    end
    return s;
  endfunction

  function automatic bit all_empty();
    for (int i = 0; i < N; i++) for (int x = 0; x < N; x++) if (flow[i][x].size() > 0) return 0;
    return 1;
  endfunction

  always @(negedge clk) if (!rst && !finished) begin
    if (arr_ready) begin
      arr_valid = '0;
      for (int i = 0; i < N; i++) begin
        int d;
        d = drain ? -1 : pick_dst(i);
        if (d >= 0) begin
          arr_valid[i] = 1'b1;
          arr_dst[i]   = IW'(d);
          arr_data[i]  = DW'(next_id);
          next_id++;
        end
      end
      #1;
      for (int i = 0; i < N; i++) if (arr_valid[i] && !arr_drop[i]) begin
        cell_t c;
        c.id = arr_data[i]; c.t = slot;
        flow[i][arr_dst[i]].push_back(c);
        oq[arr_dst[i]][i].push_back(c);
        accepted++;
      end
    end else begin
      arr_valid = '0;
    end
    if (slot_done) begin
      for (int x = 0; x < N; x++) begin
        int s, d;
        s = oq_depart(x, 1);
        d = (x == REPORT_OUT) ? (REPORT_OUT - s + N) % N : 99;
        if (s >= 0) begin
          cell_t c;
          c = oq[x][s].pop_front();
          if (d < 4) begin lat_sum_oq[d] += slot - c.t; lat_n_oq[d]++; end
        end
        if (EXACT && !burst && !drain) begin
          check(dep_valid[x] == (s >= 0), "departure present as in the OQ switch");
          if (s >= 0 && dep_valid[x]) begin
            check(dep_src[x] == IW'(s), "same input as the OQ switch");
            if (dep_src[x] != IW'(s)) mismatches++;
          end
        end
        if (dep_valid[x]) begin
          int i;
          i = int'(dep_src[x]);
          checks++;
          if (flow[i][x].size() == 0 || flow[i][x][0].id != dep_data[x]) begin
            failures++; mismatches++;
            if (failures < 10) $display("FAIL slot %0d: output %0d cell %0h not head of flow %0d", slot, x, dep_data[x], i);
          end else begin
            cell_t c;
            c = flow[i][x].pop_front();
            departed++;
            d = (x == REPORT_OUT) ? (REPORT_OUT - i + N) % N : 99;
            if (d < 4) begin lat_sum_dut[d] += slot - c.t; lat_n_dut[d]++; end
          end
        end
      end
      slot++;
      slots_run = slot;
      if (slot == SLOTS) burst = (OVERLOAD > 0);
      if (slot == SLOTS + OVERLOAD) begin burst = 0; drain = 1; end
      if (drain && (all_empty() || slot > SLOTS + OVERLOAD + 64 * N * N)) begin
        check(all_empty(), "every accepted cell leaves");
        check(departed == accepted, "departed == accepted");
        $display("[run %0d] slots=%0d offered=%0d accepted=%0d departed=%0d mismatches=%0d", TAG, slot, next_id, accepted, departed, mismatches);
        for (int d = 0; d < 4; d++)
          $display("[run %0d] output %0d class %0d mean latency: switch %0d.%02d  OQ %0d.%02d slots", TAG, REPORT_OUT, d + 1,
                   lat_n_dut[d] ? lat_sum_dut[d] / lat_n_dut[d] : 0, lat_n_dut[d] ? (100 * lat_sum_dut[d] / lat_n_dut[d]) % 100 : 0,
                   lat_n_oq[d] ? lat_sum_oq[d] / lat_n_oq[d] : 0, lat_n_oq[d] ? (100 * lat_sum_oq[d] / lat_n_oq[d]) % 100 : 0);
        finished = 1;
      end
    end
  end

endmodule
