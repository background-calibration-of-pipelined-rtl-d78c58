// gap_estimator: background estimate of the code gap at one decision boundary.
//
// Receives the raw samples x_k of its stage with the stage decision d_k and
// splits them at boundary BOUNDARY: d_k == BOUNDARY is X_0 (below), d_k ==
// BOUNDARY+1 is X_1 (above), other samples are ignored. Three estimators see
// the same samples side by side: Max-Min, Bin-Reshaping and Cost-Minimizing.
// At `eval` the serial parts run; when both have finished, `gap` takes the
// result of the estimator chosen by est_sel. If the chosen one has no valid
// result (Cost-Minimizing needs one earlier block for its window anchors, and
// its window can miss the edges after a large change), Bin-Reshaping and then
// Max-Min are taken, in that order of robustness to noise; gap_ok is low if
// no estimator had samples on both sides. The gap used for correction is
// kept by the calibrator, which also reports (shift_en, anchor_shift) how far
// the next stage's correction moved, so the Cost-Minimizing window anchors
// can follow. gap_mm, gap_br and gap_cm are the results of the last
// evaluation. The Max-Min extremes of a block, when valid, become the
// Cost-Minimizing anchors of the next. The three estimators follow the
// method; running all three, the fallback order and the anchoring are this
// design's choices, and the gap is 0 after reset.
// Timing: `done` goes high when the evaluation is complete and stays high
// until the next `clear`; `gap` changes only in the cycle `done` rises.
// shift_en must not coincide with the completion of an evaluation.
module gap_estimator
  import dbge_pkg::*;
#(
  parameter int BOUNDARY = 0,
  parameter int BR_S_LOG2 = 3,
  parameter int CM_WIN    = 8,
  parameter int CM_SWEEP  = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     eval,
  input  est_sel_e est_sel,
  input  logic     shift_en,    // gaps of the next stage changed by anchor_shift
  input  gap_t     anchor_shift,
  input  logic     smp_valid,   // tagged sample of the current block
  input  dec_t     smp_d,
  input  sample_t  smp_x,
  output logic     done,
  output gap_t     gap,         // selected estimate of the last block
  output logic     gap_ok,      // gap is a fresh estimate of the last block
  output gap_t     gap_mm,
  output gap_t     gap_br,
  output gap_t     gap_cm,
  output logic [2:0] est_valid  // {cm, br, mm} validity of the last evaluation
);
  logic in_set, hi;
  assign in_set = smp_valid && (smp_d == dec_t'(BOUNDARY) || smp_d == dec_t'(BOUNDARY + 1));
  assign hi     = (smp_d == dec_t'(BOUNDARY + 1));

  sample_t max0, min1;
  logic    mm_valid;
  gap_t    mm_live;
  sample_t anc0, anc1;
  logic    anc_valid;

  maxmin_estimator u_mm (
    .clk, .rst_n, .clear, .smp_valid(in_set), .smp_hi(hi), .smp_x,
    .max0, .min1, .have0(), .have1(), .gap_valid(mm_valid), .gap(mm_live)
  );

  logic br_done, br_valid;
  binreshape_estimator #(.S_LOG2(BR_S_LOG2)) u_br (
    .clk, .rst_n, .clear, .smp_valid(in_set), .smp_hi(hi), .smp_x,
    .start(eval), .done(br_done), .gap_valid(br_valid), .gap(gap_br)
  );

  logic cm_done, cm_valid;
  costmin_estimator #(.WIN(CM_WIN), .SWEEP(CM_SWEEP)) u_cm (
    .clk, .rst_n, .clear, .anchor_valid(anc_valid), .anchor0(anc0), .anchor1(anc1),
    .smp_valid(in_set), .smp_hi(hi), .smp_x,
    .start(eval), .done(cm_done), .gap_valid(cm_valid), .gap(gap_cm)
  );

  logic br_fin, cm_fin, running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_fin <= 1'b0; cm_fin <= 1'b0; running <= 1'b0; done <= 1'b0;
      gap <= '0; gap_ok <= 1'b0; gap_mm <= '0; anc0 <= '0; anc1 <= '0; anc_valid <= 1'b0; est_valid <= '0;
    end else begin
      if (clear) done <= 1'b0;
      if (eval) begin
        running <= 1'b1; br_fin <= 1'b0; cm_fin <= 1'b0; done <= 1'b0;
      end else if (running) begin
        if (br_done) br_fin <= 1'b1;
        if (cm_done) cm_fin <= 1'b1;
        if ((br_fin || br_done) && (cm_fin || cm_done)) begin
          running   <= 1'b0;
          done      <= 1'b1;
          est_valid <= {cm_valid, br_valid, mm_valid};
          gap_mm    <= mm_live;
          gap_ok    <= cm_valid | br_valid | mm_valid;
          if (est_sel == EST_COSTMIN && cm_valid)         gap <= gap_cm;
          else if (est_sel != EST_MAXMIN && br_valid)     gap <= gap_br;
          else                                            gap <= mm_live;
          if (mm_valid) begin
            anc0      <= max0;
            anc1      <= min1;
            anc_valid <= 1'b1;
          end
        end
      end
      // the correction of the next stage moved: samples just below this
      // boundary move down by the change of its gap sum, those above do not
      if (shift_en) anc0 <= anc0 - sample_t'(anchor_shift);
    end
  end

  initial begin
    assert (BOUNDARY == 0 || BOUNDARY == 1) else $error("gap_estimator: BOUNDARY must be 0 or 1");
  end
endmodule
