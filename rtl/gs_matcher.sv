// gs_matcher: stable marriage of inputs and outputs by the Gale-Shapley
// algorithm, in request / grant / accept rounds.
//
// Each input ranks the outputs it has cells for (in_rank, from its GBVOQ list)
// and each output ranks the inputs requesting it (out_rank, from
// LOCAL-PORT-ORDER). A pair (i,x) may only be matched when acceptable[i][x].
// In every round (one clock):
//   request - each unmatched input requests the best-ranked acceptable output
//             that has not yet refused it;
//   grant   - each output keeps the best-ranked input among its new requests and
//             the input it currently holds, and refuses all others (an input it
//             drops is refused too and becomes unmatched);
//   accept  - the kept input is matched to the output.
// When a round has no request the matching is stable and done pulses. At most
// N*N rounds are needed because every refusal removes one pair for good. The
// use of Gale-Shapley is the algorithm's; letting the inputs request is this
// design's choice.
//
// Interface: pulse start (for one cycle) with the rank and acceptable inputs
// stable until done. busy is high from the cycle after start until done. The
// result (in_matched/in_match per input, out_matched/out_match per output) is
// valid from done until the next start. rounds counts the rounds of the last
// run, the final request-free round included. Ranks must be distinct among the
// acceptable entries of a row (ties go to the lower index).
module gs_matcher #(
  parameter int unsigned N   = flgs_pkg::N_PORTS,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [N-1:0][N-1:0]          acceptable, // [input][output]
  input  logic [N-1:0][N-1:0][IW-1:0]  in_rank,    // [input][output]
  input  logic [N-1:0][N-1:0][IW-1:0]  out_rank,   // [output][input]
  output logic                         busy,
  output logic                         done,
  output logic [N-1:0]                 in_matched,
  output logic [N-1:0][IW-1:0]         in_match,
  output logic [N-1:0]                 out_matched,
  output logic [N-1:0][IW-1:0]         out_match,
  output logic [15:0]                  rounds
);

  logic [N-1:0][N-1:0] refused;      // [input][output]
  logic [N-1:0]        req_valid;
  logic [N-1:0][IW-1:0] req;
  logic [N-1:0]        win_valid;
  logic [N-1:0][IW-1:0] win;

  // Request: best not-yet-refused acceptable output of each free input.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [IW-1:0] best;
      req_valid[i] = 1'b0;
      req[i]       = '0;
      best         = '1;
      if (!in_matched[i]) begin
        for (int x = 0; x < N; x++) begin
          if (acceptable[i][x] && !refused[i][x] &&
              (!req_valid[i] || in_rank[i][x] < best)) begin
            req_valid[i] = 1'b1;
            req[i]       = IW'(x);
            best         = in_rank[i][x];
          end
        end
      end
    end
  end

  // Grant: each output keeps its best among its partner and the requesters.
  always_comb begin
    for (int x = 0; x < N; x++) begin
      logic [IW-1:0] best;
      win_valid[x] = out_matched[x];
      win[x]       = out_match[x];
      best         = out_rank[x][out_match[x]];
      for (int i = 0; i < N; i++) begin
        if (req_valid[i] && req[i] == IW'(x) &&
            (!win_valid[x] || out_rank[x][i] < best)) begin
          win_valid[x] = 1'b1;
          win[x]       = IW'(i);
          best         = out_rank[x][i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      refused     <= '0;
      in_matched  <= '0;
      in_match    <= '0;
      out_matched <= '0;
      out_match   <= '0;
      rounds      <= '0;
    end else if (start) begin
      busy        <= 1'b1;
      done        <= 1'b0;
      refused     <= '0;
      in_matched  <= '0;
      out_matched <= '0;
      rounds      <= '0;
    end else if (busy) begin
      rounds <= rounds + 1'b1;
      if (req_valid == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        // Accept / refuse, seen from each input.
        for (int i = 0; i < N; i++) begin
          if (req_valid[i]) begin
            if (win[req[i]] == IW'(i)) begin
              in_matched[i] <= 1'b1;
              in_match[i]   <= req[i];
            end else begin
              refused[i][req[i]] <= 1'b1;
            end
          end else if (in_matched[i] && win[in_match[i]] != IW'(i)) begin
            in_matched[i]            <= 1'b0;
            refused[i][in_match[i]]  <= 1'b1;
          end
        end
        out_matched <= win_valid;
        out_match   <= win;
      end
    end else begin
      done <= 1'b0;
    end
  end

  a_bounded: assert property (@(posedge clk) disable iff (rst)
    busy |-> rounds <= 16'(N * N + 1));

endmodule
