// tb_crossbar: random matchings (a random permutation, some outputs unmatched)
// on an 8x8 crossbar; each matched output must carry its input's cell and each
// unmatched output must be idle.
module tb_crossbar;
  localparam int N = 8, DW = 12;
  logic [N-1:0][DW-1:0] in_data, out_data;
  logic [N-1:0] sel_valid, out_valid;
  logic [N-1:0][2:0] sel;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .DATA_W(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < N; k++) begin
        in_data[k]   = DW'($urandom);
        sel[k]       = 3'(perm[k]);
        sel_valid[k] = ($urandom % 4) != 0;
      end
      #1;
      for (int x = 0; x < N; x++) begin
        checks++;
        if (out_valid[x] != sel_valid[x] ||
            (sel_valid[x] && out_data[x] != in_data[perm[x]]) ||
            (!sel_valid[x] && out_data[x] != '0)) begin
          failures++; $display("FAIL output %0d", x);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
