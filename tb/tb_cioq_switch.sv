// tb_cioq_switch: end-to-end test of a 4x4 switch (VOQ/VIQ depth 8, speedup 2)
// against an ideal output-queued switch with the same policies (cioq_env):
// 600 slots of uniform random traffic at load 0.9 with two strict-priority and
// two weighted-round-robin outputs, checked for exact emulation cell by cell;
// then 80 slots of overload towards outputs 0 and 1, then a drain.
// It also counts how often each mechanism of the switch occurred and fails a
// mechanism that never did: GBVOQ front insertion and deletion, a matching
// needing refusals (several request rounds), a second scheduling phase moving
// cells, WRR rotation, strict-priority departure, VOQ overflow and VIQ-full
// back-pressure.
module tb_cioq_switch;
  localparam int N = 4, DEPTH = 8, DW = 16, W_W = 4, IW = 2;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, arr_ready, slot_done;
  flgs_pkg::policy_e [N-1:0] cfg_mode;
  logic [N-1:0][N-1:0][IW-1:0] cfg_pos;
  logic [N-1:0][N-1:0][W_W-1:0] cfg_weight;
  logic [N-1:0] arr_valid, arr_drop, dep_valid;
  logic [N-1:0][IW-1:0] arr_dst, dep_src;
  logic [N-1:0][DW-1:0] arr_data, dep_data;
  int checks, failures, slots_run, mismatches;
  bit finished;

  cioq_switch #(.N(N), .DEPTH(DEPTH), .DATA_W(DW), .W_W(W_W), .SPEEDUP_NUM(2), .SPEEDUP_DEN(1)) dut (.*);

  cioq_env #(.N(N), .DW(DW), .W_W(W_W), .SLOTS(600), .TRAFFIC(0), .LOAD(900), .POLICY(0),
             .EXACT(1), .OVERLOAD(80), .REPORT_OUT(3)) env (.*);

  // Mechanism counters.
  int n_ins = 0, n_del = 0, n_refuse = 0, n_phase2 = 0, n_rotate = 0, n_sp = 0, n_drop = 0, n_bp = 0;
  int xfer_in_slot = 0;
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (dut.g_in[k].u_in.ins) n_ins++;
      if (dut.g_in[k].u_in.del) n_del++;
      if (dut.g_out[k].u_out.dep_valid) begin
        if (dut.g_out[k].u_out.mode == flgs_pkg::POL_SP) n_sp++;
        else if (dut.g_out[k].u_out.credit[dut.g_out[k].u_out.dep_src] <= 1) n_rotate++;
      end
    end
  end
  always @(posedge clk) if (!rst) begin
    if (dut.gs_done && dut.gs_rounds > 2) n_refuse++;
    if (arr_ready && (arr_valid & arr_drop) != '0) n_drop++;
    if (dut.gs_start) begin
      bit bp;
      bp = 0;
      for (int i = 0; i < N; i++)
        for (int x = 0; x < N; x++) if (dut.voq_nonempty[i][x] && dut.viq_full[x][i]) bp = 1;
      if (bp) n_bp++;
    end
    if (arr_ready) xfer_in_slot = 0;
    if (dut.xfer_en) begin
      xfer_in_slot++;
      if (xfer_in_slot == 2 && dut.out_matched != '0) n_phase2++;
    end
  end

  initial begin
    #20000000;
    $display("watchdog: slots run %0d", slots_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    wait (finished);
    f = failures;
    $display("mechanisms: gbvoq_insert=%0d gbvoq_delete=%0d gs_refusal=%0d second_phase=%0d wrr_rotate=%0d sp_depart=%0d voq_drop=%0d viq_backpressure=%0d",
             n_ins, n_del, n_refuse, n_phase2, n_rotate, n_sp, n_drop, n_bp);
    f += (n_ins == 0) + (n_del == 0) + (n_refuse == 0) + (n_phase2 == 0) + (n_rotate == 0) + (n_sp == 0) + (n_drop == 0) + (n_bp == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 8, f);
    $finish;
  end
endmodule
