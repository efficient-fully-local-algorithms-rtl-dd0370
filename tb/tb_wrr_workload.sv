// tb_wrr_workload: the weighted-round-robin workload on a 32x32 switch with
// VOQ/VIQ depth 64: "diagonal 4" traffic (input i to outputs i..i+3 at
// 0.1/0.2/0.3/0.399 cells per slot, load 0.999) with weights 4,3,2,1 for
// inputs x, x-1, x-2, x-3 at each output x. Two switches run side by side:
// speedup 2, checked for exact emulation of the output-queued switch, and
// speedup 1.2 (six scheduling phases every five slots), checked for per-flow
// order and loss-free delivery, with its mean latencies printed next to the
// output-queued ones for output 3 (class 1 = input 3 ... class 4 = input 0).
module tb_wrr_workload;
  localparam int N = 32, DEPTH = 64, DW = 16, W_W = 4, IW = 5, SLOTS = 1000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst [2], arr_ready [2], slot_done [2];
  flgs_pkg::policy_e [N-1:0] cfg_mode [2];
  logic [N-1:0][N-1:0][IW-1:0] cfg_pos [2];
  logic [N-1:0][N-1:0][W_W-1:0] cfg_weight [2];
  logic [N-1:0] arr_valid [2], arr_drop [2], dep_valid [2];
  logic [N-1:0][IW-1:0] arr_dst [2], dep_src [2];
  logic [N-1:0][DW-1:0] arr_data [2], dep_data [2];
  int checks [2], failures [2], slots_run [2], mismatches [2];
  bit finished [2];

  for (genvar k = 0; k < 2; k++) begin : g_sw
    localparam int SNUM = (k == 0) ? 2 : 6;
    localparam int SDEN = (k == 0) ? 1 : 5;
    cioq_switch #(.N(N), .DEPTH(DEPTH), .DATA_W(DW), .W_W(W_W), .SPEEDUP_NUM(SNUM), .SPEEDUP_DEN(SDEN)) dut (
      .clk, .rst(rst[k]), .cfg_mode(cfg_mode[k]), .cfg_pos(cfg_pos[k]), .cfg_weight(cfg_weight[k]),
      .arr_ready(arr_ready[k]), .arr_valid(arr_valid[k]), .arr_dst(arr_dst[k]), .arr_data(arr_data[k]),
      .arr_drop(arr_drop[k]), .dep_valid(dep_valid[k]), .dep_src(dep_src[k]), .dep_data(dep_data[k]),
      .slot_done(slot_done[k]));
    cioq_env #(.N(N), .DW(DW), .W_W(W_W), .SLOTS(SLOTS), .TRAFFIC(1), .LOAD(999), .POLICY(1),
               .EXACT(k == 0), .OVERLOAD(0), .REPORT_OUT(3), .TAG(k)) env (
      .clk, .rst(rst[k]), .cfg_mode(cfg_mode[k]), .cfg_pos(cfg_pos[k]), .cfg_weight(cfg_weight[k]),
      .arr_ready(arr_ready[k]), .arr_valid(arr_valid[k]), .arr_dst(arr_dst[k]), .arr_data(arr_data[k]),
      .arr_drop(arr_drop[k]), .dep_valid(dep_valid[k]), .dep_src(dep_src[k]), .dep_data(dep_data[k]),
      .slot_done(slot_done[k]), .checks(checks[k]), .failures(failures[k]), .slots_run(slots_run[k]),
      .mismatches(mismatches[k]), .finished(finished[k]));
  end

  initial begin
    #400000000;
    $display("watchdog: slots run %0d / %0d", slots_run[0], slots_run[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    wait (finished[0] && finished[1]);
    $display("speedup 2 departures differing from the OQ switch: %0d", mismatches[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
endmodule
