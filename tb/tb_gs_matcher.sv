// tb_gs_matcher: random 5x5 instances (acceptable pairs, random preference
// permutations on both sides). The result must equal the input-optimal stable
// matching computed by a sequential Gale-Shapley reference, must contain no
// blocking pair and no unacceptable pair, and must take no more than N*N+1
// proposal rounds.
module tb_gs_matcher;
  localparam int N = 5;
  logic clk = 0, rst = 1, start = 0;
  logic [N-1:0][N-1:0] acceptable;
  logic [N-1:0][N-1:0][2:0] in_rank, out_rank;
  logic busy, done;
  logic [N-1:0] in_matched, out_matched;
  logic [N-1:0][2:0] in_match, out_match;
  logic [15:0] rounds;
  int checks = 0, failures = 0, multi_round = 0;

  gs_matcher #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      int perm[N], wife[N], husband[N], next[N];
      int cycles;
      bit progress;
      @(negedge clk);
      for (int a = 0; a < N; a++) begin
        for (int k = 0; k < N; k++) perm[k] = k;
        perm.shuffle();
        for (int b = 0; b < N; b++) in_rank[a][b] = 3'(perm[b]);
        perm.shuffle();
        for (int b = 0; b < N; b++) out_rank[a][b] = 3'(perm[b]);
        for (int b = 0; b < N; b++) acceptable[a][b] = ($urandom % 4) != 0;
      end
      // Sequential input-proposing Gale-Shapley.
      for (int k = 0; k < N; k++) begin wife[k] = -1; husband[k] = -1; end
      do begin
        progress = 0;
        for (int i = 0; i < N; i++) if (wife[i] < 0) begin
          int best;
          best = -1;
          for (int x = 0; x < N; x++)
            if (acceptable[i][x] && !tried(i, x) && (best < 0 || in_rank[i][x] < in_rank[i][best])) best = x;
          if (best >= 0) begin
            progress = 1;
            mark(i, best);
            if (husband[best] < 0) begin husband[best] = i; wife[i] = best; end
            else if (out_rank[best][i] < out_rank[best][husband[best]]) begin
              wife[husband[best]] = -1; husband[best] = i; wife[i] = best;
            end
          end
        end
      end while (progress);
      clear_tried();
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 0;
      while (!done && cycles < 100) begin @(negedge clk); cycles++; end
      check(done, "done");
      check(rounds <= N * N + 1, "round bound");
      if (rounds > 2) multi_round++;
      for (int i = 0; i < N; i++) begin
        check(in_matched[i] == (wife[i] >= 0), "input matched");
        if (wife[i] >= 0) begin
          check(in_match[i] == 3'(wife[i]), "input-optimal partner");
          check(acceptable[i][in_match[i]], "acceptable");
          check(out_matched[in_match[i]] && out_match[in_match[i]] == 3'(i), "consistent");
        end
      end
      // No blocking pair.
      for (int i = 0; i < N; i++)
        for (int x = 0; x < N; x++)
          if (acceptable[i][x]) begin
            bit i_wants, x_wants;
            i_wants = !in_matched[i] || in_rank[i][x] < in_rank[i][in_match[i]];
            x_wants = !out_matched[x] || out_rank[x][i] < out_rank[x][out_match[x]];
            check(!(i_wants && x_wants), "stability");
          end
    end
    if (multi_round == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tried_m[N][N];
  function automatic bit tried(int i, int x); return tried_m[i][x]; endfunction
  function automatic void mark(int i, int x); tried_m[i][x] = 1; endfunction
  function automatic void clear_tried();
    for (int i = 0; i < N; i++) for (int x = 0; x < N; x++) tried_m[i][x] = 0;
  endfunction
endmodule
