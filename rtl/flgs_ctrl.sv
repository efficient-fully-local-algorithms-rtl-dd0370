// flgs_ctrl: time-slot sequencer of the CIOQ switch.
//
// A time slot is an arrival phase, a number of scheduling phases and a
// departure phase, in that order. A scheduling phase is a matching (a stable
// marriage computed by gs_matcher) followed by switching (one crossbar transfer
// cycle). The cycle sequence of a slot is
//   ARRIVE, { SCHED, MATCH ... MATCH, XFER } x phases, DEPART.
// The number of scheduling phases gives the speedup. Speedup is a ratio
// SPEEDUP_NUM / SPEEDUP_DEN: an accumulator gains SPEEDUP_NUM per slot and pays
// SPEEDUP_DEN per scheduling phase, so the phases are spread evenly (for 6/5 four
// slots have one phase and every fifth has two). The default 2/1 gives exactly
// two phases per slot, the speedup at which the switch emulates an output-queued
// switch. The slot structure is the algorithm's; the cycle-level sequence and
// the fractional-speedup accumulator are this design's choices.
//
// Interface: arr_en, gs_start, xfer_en and dep_en are one-cycle strobes for the
// phases; gs_done (from the matcher) ends MATCH. phase shows the current state.
// After rst the sequencer starts a slot with ARRIVE.
module flgs_ctrl #(
  parameter int unsigned SPEEDUP_NUM = flgs_pkg::SPEEDUP_NUM,
  parameter int unsigned SPEEDUP_DEN = flgs_pkg::SPEEDUP_DEN
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             gs_done,
  output logic             arr_en,
  output logic             gs_start,
  output logic             xfer_en,
  output logic             dep_en,
  output flgs_pkg::phase_e phase
);
  import flgs_pkg::*;

  logic [15:0] acc, acc_plus;

  assign acc_plus = acc + 16'(SPEEDUP_NUM);
  assign arr_en   = (phase == PH_ARRIVE);
  assign gs_start = (phase == PH_SCHED);
  assign xfer_en  = (phase == PH_XFER);
  assign dep_en   = (phase == PH_DEPART);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_ARRIVE;
      acc   <= '0;
    end else begin
      unique case (phase)
        PH_ARRIVE: begin
          if (acc_plus >= 16'(SPEEDUP_DEN)) begin
            acc   <= acc_plus - 16'(SPEEDUP_DEN);
            phase <= PH_SCHED;
          end else begin
            acc   <= acc_plus;
            phase <= PH_DEPART;
          end
        end
        PH_SCHED: phase <= PH_MATCH;
        PH_MATCH: if (gs_done) phase <= PH_XFER;
        PH_XFER: begin
          if (acc >= 16'(SPEEDUP_DEN)) begin
            acc   <= acc - 16'(SPEEDUP_DEN);
            phase <= PH_SCHED;
          end else begin
            phase <= PH_DEPART;
          end
        end
        PH_DEPART: phase <= PH_ARRIVE;
        default:   phase <= PH_ARRIVE;
      endcase
    end
  end

endmodule
