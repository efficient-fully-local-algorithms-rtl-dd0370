// tb_sp_workload: the strict-priority workload on a 10x10 switch with VOQ/VIQ
// depth 64: "diagonal 4" traffic (input i to outputs i..i+3 at 0.1/0.2/0.3 and
// 0.35 or 0.399 cells per slot) with inputs x, x-1, x-2, x-3 given priority
// classes 1 (highest) to 4 at each output x. Four switches run side by side:
// loads 0.95 and 0.999, each at
// speedup 2, checked for exact emulation of the output-queued switch, and at
// speedup 1.2 (six scheduling phases every five slots), checked for per-flow
// order and loss-free delivery, with mean latencies printed next to the
// output-queued ones for output 3 (class 1 = input 3 ... class 4 = input 0).
module tb_sp_workload;
  localparam int N = 10, DEPTH = 64, DW = 16, W_W = 4, IW = 4, SLOTS = 2000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst [4], arr_ready [4], slot_done [4];
  flgs_pkg::policy_e [N-1:0] cfg_mode [4];
  logic [N-1:0][N-1:0][IW-1:0] cfg_pos [4];
  logic [N-1:0][N-1:0][W_W-1:0] cfg_weight [4];
  logic [N-1:0] arr_valid [4], arr_drop [4], dep_valid [4];
  logic [N-1:0][IW-1:0] arr_dst [4], dep_src [4];
  logic [N-1:0][DW-1:0] arr_data [4], dep_data [4];
  int checks [4], failures [4], slots_run [4], mismatches [4];
  bit finished [4];

  for (genvar k = 0; k < 4; k++) begin : g_sw
    localparam int SNUM = (k % 2 == 0) ? 2 : 6;
    localparam int SDEN = (k % 2 == 0) ? 1 : 5;
    cioq_switch #(.N(N), .DEPTH(DEPTH), .DATA_W(DW), .W_W(W_W), .SPEEDUP_NUM(SNUM), .SPEEDUP_DEN(SDEN)) dut (
      .clk, .rst(rst[k]), .cfg_mode(cfg_mode[k]), .cfg_pos(cfg_pos[k]), .cfg_weight(cfg_weight[k]),
      .arr_ready(arr_ready[k]), .arr_valid(arr_valid[k]), .arr_dst(arr_dst[k]), .arr_data(arr_data[k]),
      .arr_drop(arr_drop[k]), .dep_valid(dep_valid[k]), .dep_src(dep_src[k]), .dep_data(dep_data[k]),
      .slot_done(slot_done[k]));
    cioq_env #(.N(N), .DW(DW), .W_W(W_W), .SLOTS(SLOTS), .TRAFFIC(1), .LOAD((k < 2) ? 950 : 999), .POLICY(2),
               .EXACT(k % 2 == 0), .OVERLOAD(0), .REPORT_OUT(3), .TAG(k)) env (
      .clk, .rst(rst[k]), .cfg_mode(cfg_mode[k]), .cfg_pos(cfg_pos[k]), .cfg_weight(cfg_weight[k]),
      .arr_ready(arr_ready[k]), .arr_valid(arr_valid[k]), .arr_dst(arr_dst[k]), .arr_data(arr_data[k]),
      .arr_drop(arr_drop[k]), .dep_valid(dep_valid[k]), .dep_src(dep_src[k]), .dep_data(dep_data[k]),
      .slot_done(slot_done[k]), .checks(checks[k]), .failures(failures[k]), .slots_run(slots_run[k]),
      .mismatches(mismatches[k]), .finished(finished[k]));
  end

  initial begin
    #400000000;
    $display("watchdog: slots run %0d .. %0d", slots_run[0], slots_run[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3], failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    $display("speedup 2 departures differing from the OQ switch: %0d (load 0.95), %0d (load 0.999)", mismatches[0], mismatches[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3], failures[0] + failures[1] + failures[2] + failures[3]);
    $finish;
  end
endmodule
