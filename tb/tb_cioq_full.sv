// tb_cioq_full: the switch at its default size (32x32, VOQ/VIQ depth 64,
// speedup 2) under the weighted-round-robin "diagonal 4" workload: input i
// sends to outputs i..i+3 at 0.1/0.2/0.3/0.35 cells per slot (load 0.95), and
// every output gives weights 4,3,2,1 to inputs x, x-1, x-2, x-3. Every departure
// is compared with an ideal output-queued switch (exact emulation), then the
// switch is drained. Mean latencies at output 3 are printed per class.
module tb_cioq_full;
  localparam int N = flgs_pkg::N_PORTS, DW = flgs_pkg::CELL_W, W_W = flgs_pkg::WEIGHT_W;
  localparam int IW = $clog2(N);
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

  cioq_switch dut (.*);

  cioq_env #(.N(N), .DW(DW), .W_W(W_W), .SLOTS(2000), .TRAFFIC(1), .LOAD(950), .POLICY(1),
             .EXACT(1), .OVERLOAD(0), .REPORT_OUT(3)) env (.*);

  initial begin
    #400000000;
    $display("watchdog: slots run %0d", slots_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
