// dbge_calibrator: digital back end of a 13-stage 1.5-bit/stage pipelined ADC
// with decision boundary gap estimation (DBGE) background calibration.
//
// Gain errors of a stage (capacitor mismatch, finite opamp gain, finite
// current-source output impedance) and offsets leave a block of missing or
// duplicated codes at each decision boundary of that stage. The first
// CAL_STAGES stages are calibrated; the later ones are accurate enough to be
// used as the reference. Correction runs from the last calibrated stage
// toward the first: each stage_corrector places its decision above the
// already corrected code of the later stages (raw sample x_k) and subtracts
// the gaps of the boundaries it lies above (corrected sample y_k). Each of
// the 2*CAL_STAGES boundaries has a gap_estimator that watches x_k and d_k of
// its stage over blocks of BLOCK_LEN samples and, after each block, replaces
// its gap with a fresh estimate (Max-Min, Bin-Reshaping or Cost-Minimizing,
// chosen by est_sel). Stage k is estimated on samples already corrected for
// the stages after it; when a block ends, the new gaps are applied from the
// last calibrated stage forward, each stage's estimate moved by the change of
// the next stage's gap sum, which has the effect of correcting the stages one
// after the other on the same block. No test signal or analog hardware is used:
// the input signal itself must visit the codes around each boundary.
//
// Interface: one raw conversion per cycle with in_valid: dec[i] is the 1.5-bit
// decision of stage i (0 = first stage) and fbit the final comparator bit,
// all of the same sample (time-aligned). out_code is the corrected code and
// raw_code the uncorrected 14-bit code of the same sample, CAL_STAGES+1
// cycles after the input. gap[] holds the gaps in use, gap_mm/br/cm the last
// result of each estimator; block_count counts finished estimation blocks.
// cal_en = 0 freezes the gaps after the current block.
//
// Follows the method: the correction rule, the three estimators, and the
// configuration (13 stages, first 6 calibrated, 200000-sample blocks, 8-bin
// cost window). This design's choices: final 1-bit comparator, integer gaps,
// all boundaries estimated in parallel with the cascaded update, no sample
// collection during the short evaluation after each block.
module dbge_calibrator
  import dbge_pkg::*;
#(
  parameter int NUM_STAGES = 13,
  parameter int CAL_STAGES = 6,
  parameter int BLOCK_LEN  = 200000,
  parameter int CM_WIN     = 8,
  parameter int CM_SWEEP   = 8,
  parameter int BR_S_LOG2  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_en,
  input  est_sel_e   est_sel,
  input  logic       in_valid,
  input  dec_t       dec [NUM_STAGES],
  input  logic       fbit,
  output logic       out_valid,
  output sample_t    out_code,
  output sample_t    raw_code,
  output gap_t       gap    [CAL_STAGES][2],
  output gap_t       gap_mm [CAL_STAGES][2],
  output gap_t       gap_br [CAL_STAGES][2],
  output gap_t       gap_cm [CAL_STAGES][2],
  output logic [2:0] est_valid [CAL_STAGES][2],
  output logic [15:0] block_count
);
  localparam int C = CAL_STAGES;

  // ---- block sequencing ----
  logic clear, collect, eval, update, all_done;
  logic done [C][2];

  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < C; i++)
      for (int j = 0; j < 2; j++) all_done &= done[i][j];
  end

  block_controller #(.BLOCK_LEN(BLOCK_LEN), .DRAIN(C + 2)) u_ctrl (
    .clk, .rst_n, .cal_en, .in_valid, .all_done,
    .clear, .collect, .eval, .update, .block_count
  );

  // ---- back end and raw code ----
  logic    be_valid, raw_valid, be_tag;
  sample_t be_code, raw0;

  backend_combiner #(.NUM_STAGES(NUM_STAGES), .FIRST(C)) u_be (
    .clk, .rst_n, .in_valid, .dec, .fbit, .out_valid(be_valid), .code(be_code)
  );
  backend_combiner #(.NUM_STAGES(NUM_STAGES), .FIRST(0)) u_raw (
    .clk, .rst_n, .in_valid, .dec, .fbit, .out_valid(raw_valid), .code(raw0)
  );

  // decisions of the calibrated stages, delayed to meet their corrector;
  // ddly[t] is the input decision vector delayed by t+1 cycles
  dec_t    ddly [C][C];
  sample_t rdly [C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      be_tag <= 1'b0;
      for (int t = 0; t < C; t++) begin
        rdly[t] <= '0;
        for (int i = 0; i < C; i++) ddly[t][i] <= '0;
      end
    end else begin
      be_tag <= in_valid & collect;
      for (int i = 0; i < C; i++) ddly[0][i] <= dec[i];
      for (int t = 1; t < C; t++) ddly[t] <= ddly[t-1];
      rdly[0] <= raw0;
      for (int t = 1; t < C; t++) rdly[t] <= rdly[t-1];
    end
  end
  assign raw_code = rdly[C-1];

  // ---- correction chain, last calibrated stage first ----
  // chain index c = C..0: y_c is the corrected code of stages c..NUM_STAGES-1
  logic    v_c   [C+1];
  logic    tag_c [C+1];
  sample_t y_c   [C+1];
  dec_t    d_k   [C];
  gap_t    est   [C][2];   // estimates of the last block, stage's own coordinates
  logic    est_ok[C][2];
  sample_t x_k   [C];
  logic    t_k   [C];
  gap_t    gap_new [C][2];
  gap_t    shift   [C];    // change of the stage k+1 gap sum (0 for the last)

  assign v_c[C]   = be_valid;
  assign tag_c[C] = be_tag;
  assign y_c[C]   = be_code;

  for (genvar k = C - 1; k >= 0; k--) begin : g_stage
    stage_corrector #(.SHIFT(NUM_STAGES - 1 - k)) u_corr (
      .clk, .rst_n,
      .in_valid(v_c[k+1]), .in_tag(tag_c[k+1]),
      .d(ddly[C-1-k][k]), .y_in(y_c[k+1]),
      .g0(gap[k][0]), .g1(gap[k][1]),
      .out_valid(v_c[k]), .out_tag(tag_c[k]),
      .d_out(d_k[k]), .x_out(x_k[k]), .y_out(y_c[k])
    );
    assign t_k[k] = tag_c[k];

    for (genvar j = 0; j < 2; j++) begin : g_bnd
      gap_estimator #(.BOUNDARY(j), .BR_S_LOG2(BR_S_LOG2),
                      .CM_WIN(CM_WIN), .CM_SWEEP(CM_SWEEP)) u_est (
        .clk, .rst_n, .clear, .eval, .est_sel,
        .smp_valid(t_k[k]), .smp_d(d_k[k]), .smp_x(x_k[k]),
        .shift_en(update), .anchor_shift(shift[k]),
        .done(done[k][j]), .gap(est[k][j]), .gap_ok(est_ok[k][j]),
        .gap_mm(gap_mm[k][j]), .gap_br(gap_br[k][j]), .gap_cm(gap_cm[k][j]),
        .est_valid(est_valid[k][j])
      );
    end
  end

  // ---- gap update after a block ----
  // Stage k was estimated on samples corrected with the stage k+1 gaps in use
  // during the block. Samples just below a stage-k boundary lie at the top of
  // stage k+1 (both of its gaps subtracted), samples just above at its bottom
  // (none subtracted), so stage k's gap grows by exactly the change of stage
  // k+1's gap sum. Applying this from the last calibrated stage forward gives
  // the result of correcting the stages one after the other on one block.

  always_comb begin
    logic signed [31:0] sh;
    sh = '0;
    for (int k = C - 1; k >= 0; k--) begin
      shift[k] = sat_gap(sh);
      for (int j = 0; j < 2; j++)
        gap_new[k][j] = sat_gap(32'(est_ok[k][j] ? est[k][j] : gap[k][j]) + 32'(shift[k]));
      sh = 32'(gap_new[k][0]) + 32'(gap_new[k][1]) - 32'(gap[k][0]) - 32'(gap[k][1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) gap[k][j] <= '0;
    end else if (update) begin
      gap <= gap_new;
    end
  end

  assign out_valid = v_c[0];
  assign out_code  = y_c[0];

  initial begin
    assert (CAL_STAGES >= 1 && CAL_STAGES < NUM_STAGES && NUM_STAGES + 2 <= DW)
      else $error("dbge_calibrator: stage counts out of range");
  end
endmodule
