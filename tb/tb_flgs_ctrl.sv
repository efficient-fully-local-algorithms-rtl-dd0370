// tb_flgs_ctrl: two sequencers, speedup 2/1 and 6/5, with the matcher's done
// answered after a random 1..4 cycles. Each slot must run ARRIVE, then its
// scheduling phases (SCHED, MATCH..., XFER), then DEPART; the 2/1 sequencer must
// give 2 phases in every slot, and the 6/5 one 1,1,1,1,2 in every five slots.
module tb_flgs_ctrl;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic done_a, done_b;
  logic arr_a, st_a, xf_a, dep_a, arr_b, st_b, xf_b, dep_b;
  flgs_pkg::phase_e ph_a, ph_b;

  flgs_ctrl #(.SPEEDUP_NUM(2), .SPEEDUP_DEN(1)) dut_a (
    .clk, .rst, .gs_done(done_a), .arr_en(arr_a), .gs_start(st_a), .xfer_en(xf_a), .dep_en(dep_a), .phase(ph_a));
  flgs_ctrl #(.SPEEDUP_NUM(6), .SPEEDUP_DEN(5)) dut_b (
    .clk, .rst, .gs_done(done_b), .arr_en(arr_b), .gs_start(st_b), .xfer_en(xf_b), .dep_en(dep_b), .phase(ph_b));
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Matcher stand-in: done one cycle, a random 1..4 cycles into MATCH.
  int wait_a = 0, wait_b = 0;
  always_ff @(posedge clk) begin
    if (st_a) wait_a <= 1 + $urandom % 4; else if (wait_a > 0) wait_a <= wait_a - 1;
    if (st_b) wait_b <= 1 + $urandom % 4; else if (wait_b > 0) wait_b <= wait_b - 1;
  end
  assign done_a = (ph_a == flgs_pkg::PH_MATCH) && wait_a == 1;
  assign done_b = (ph_b == flgs_pkg::PH_MATCH) && wait_b == 1;

  // Per-slot bookkeeping from the strobes.
  int ph_cnt_a = 0, ph_cnt_b = 0, slot_a = 0, slot_b = 0, xf_cnt_a = 0, xf_cnt_b = 0;
  bit in_slot_a = 0, in_slot_b = 0;
  always @(posedge clk) if (!rst) begin
    checks++;
    if ($countones({arr_a, st_a, xf_a, dep_a}) > 1) begin failures++; $display("FAIL strobes a"); end
    if (arr_a) begin ph_cnt_a = 0; xf_cnt_a = 0; in_slot_a = 1; end
    if (st_a) ph_cnt_a++;
    if (xf_a) begin
      xf_cnt_a++;
      checks++; if (xf_cnt_a != ph_cnt_a) begin failures++; $display("FAIL xfer order a"); end
    end
    if (dep_a) begin
      checks++;
      if (!in_slot_a || ph_cnt_a != 2 || xf_cnt_a != 2) begin failures++; $display("FAIL a: %0d phases", ph_cnt_a); end
      in_slot_a = 0; slot_a++;
    end
    if (arr_b) begin ph_cnt_b = 0; xf_cnt_b = 0; in_slot_b = 1; end
    if (st_b) ph_cnt_b++;
    if (xf_b) xf_cnt_b++;
    if (dep_b) begin
      checks++;
      if (!in_slot_b || xf_cnt_b != ph_cnt_b || ph_cnt_b != ((slot_b % 5 == 4) ? 2 : 1)) begin
        failures++; $display("FAIL b slot %0d: %0d phases", slot_b, ph_cnt_b);
      end
      in_slot_b = 0; slot_b++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (slot_b >= 100 && slot_a >= 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
