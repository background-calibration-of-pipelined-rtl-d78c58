// tb_dbge_calibrator: end-to-end test of the calibrated converter back end at
// its default size (13 stages, first 6 calibrated, 200000-sample blocks).
//
// A behavioural 13-stage pipeline with the example's capacitor mismatch,
// opamp gain, comparator and voltage offsets and ~1 LSB of circuit noise
// converts a zero-mean Gaussian input. Phases:
//  1. calibration with the Cost-Minimizing estimator for 6 blocks; the first
//     block must fall back to Bin-Reshaping (no anchors yet), and the gaps of
//     the last calibrated stage must settle;
//  2. one block each with Max-Min and Bin-Reshaping selected, then back to
//     Cost-Minimizing: the gap in use must follow the selection;
//  3. freeze (cal_en = 0): gaps must hold; a uniform input then measures the
//     code histogram of the raw and corrected outputs. The raw code must show
//     missing and duplicated codes at the decision boundaries, the corrected
//     one (almost) none. Every corrected output is also recomputed here from
//     the raw decisions and the gaps in use, and the latency is checked.
// Counted mechanisms: blocks, fallback, estimator switch, freeze, positive
// gaps, Max-Min noise bias; each must occur. Negative (overlap) gaps are
// counted but this example's errors do not produce them; the estimator
// testbenches cover them.
module tb_dbge_calibrator;
  import dbge_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 13, C = 6;
  localparam int OFS = 2048;

  logic clk = 0, rst_n = 1, cal_en = 0, in_valid = 0, fbit, out_valid;
  est_sel_e est_sel = EST_COSTMIN;
  dec_t dec [N];
  sample_t out_code, raw_code;
  gap_t gap [C][2], gap_mm [C][2], gap_br [C][2], gap_cm [C][2];
  logic [2:0] est_valid [C][2];
  logic [15:0] block_count;
  real vin = 0.0;
  logic sample_en = 0;
  int checks = 0, failures = 0;

  pipeline_adc_model #(.N(N)) u_adc (.clk, .sample_en, .vin, .dec, .fbit);
  dbge_calibrator dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #(64'd10 * 64'd6_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input valid follows the converter by one cycle (decisions appear after the edge)
  always @(posedge clk) in_valid <= sample_en;

  // ---- reference model of the correction datapath ----
  int exp_q [$];
  int lat_first = -1, cyc = 0, first_in = -1, compared = 0, mismatches = 0;
  logic compare_on = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_valid) begin
      int y;
      if (first_in < 0) first_in = cyc;
      y = int'(fbit);
      for (int i = N - 1; i >= 0; i--) begin
        y += int'(dec[i]) << (N - 1 - i);
        if (i < C) y -= (dec[i] >= 1 ? int'(gap[i][0]) : 0) + (dec[i] == 2 ? int'(gap[i][1]) : 0);
      end
      exp_q.push_back(y);
    end
    if (out_valid) begin
      int e;
      if (lat_first < 0) lat_first = cyc - first_in;
      e = exp_q.pop_front();
      if (compare_on) begin
        compared++;
        if (int'(out_code) != e) mismatches++;
      end
    end
  end

  task automatic run_samples(input int n, input bit uniform);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sample_en = 1;
      if (uniform) vin = -0.6 + 1.2 * urand();
      else begin
        vin = 0.35 * gauss();
        if (vin > 0.99) vin = 0.99;
        if (vin < -0.99) vin = -0.99;
      end
    end
  endtask

  task automatic run_blocks(input int nb);
    int target;
    target = int'(block_count) + nb;
    while (int'(block_count) < target) run_samples(1000, 0);
  endtask

  // gap in use = selected estimate + a shift common to both boundaries of a
  // stage (the cascaded update); the last calibrated stage has no shift
  // expected selection with fallback: the chosen one, else Bin-Reshaping, else Max-Min
  function automatic logic follows_sel(input est_sel_e es);
    gap_t sel [C][2];
    for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) begin
      if (es == EST_COSTMIN && est_valid[k][j][2])       sel[k][j] = gap_cm[k][j];
      else if (es != EST_MAXMIN && est_valid[k][j][1])   sel[k][j] = gap_br[k][j];
      else                                               sel[k][j] = gap_mm[k][j];
    end
    return follows(sel);
  endfunction

  function automatic logic follows(input gap_t sel [C][2]);
    for (int k = 0; k < C; k++) begin
      if (int'(gap[k][0]) - int'(sel[k][0]) != int'(gap[k][1]) - int'(sel[k][1])) return 0;
      if (k == C - 1 && gap[k][0] != sel[k][0]) return 0;
    end
    return 1;
  endfunction

  int n_cm_valid = 0, n_fallback = 0, n_switch = 0, n_freeze = 0, n_pos = 0, n_neg = 0, n_bias = 0;
  int prev [C][2];

  initial begin
    int hist_raw [int], hist_cor [int];
    int lo, hi, nmiss_raw, ndup_raw, nmiss_cor, ndup_cor, tot_raw, tot_cor, nb_raw, nb_cor;
    real m_raw, m_cor;
    gap_t frozen [C][2];
    logic ok;
    for (int i = 0; i < N; i++) dec[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cal_en = 1;

    // ---- phase 1: calibration with Cost-Minimizing ----
    run_blocks(1);
    ok = follows(gap_br);
    for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) if (est_valid[k][j][2]) ok = 0;
    checks++;
    if (ok) n_fallback++; else begin failures++; $display("FAIL first block did not fall back to Bin-Reshaping"); end
    for (int b = 1; b < 6; b++) begin
      for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) prev[k][j] = int'(gap[k][j]);
      run_blocks(1);
      $display("block %0d gaps (stage1..6, boundary0/1): %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d", block_count,
               gap[0][0], gap[0][1], gap[1][0], gap[1][1], gap[2][0], gap[2][1],
               gap[3][0], gap[3][1], gap[4][0], gap[4][1], gap[5][0], gap[5][1]);
    end
    // Each stage's gap depends on the gap sum of the next one, so estimation
    // noise of a late stage moves earlier gaps by up to 2^k; only the last
    // calibrated stage, which sees the uncalibrated back end, must be steady.
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (prev[C-1][j] - int'(gap[C-1][j]) > 2 || int'(gap[C-1][j]) - prev[C-1][j] > 2) begin
        failures++; $display("FAIL stage %0d boundary %0d not settled: %0d -> %0d", C, j, prev[C-1][j], gap[C-1][j]);
      end
    end
    for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) begin
      if (gap[k][j] > 2) n_pos++;
      if (gap[k][j] < -2) n_neg++;
      if (int'(gap_cm[k][j]) > int'(gap_mm[k][j])) n_bias++;
    end

    // ---- phase 2: estimator switch ----
    est_sel = EST_MAXMIN;
    run_blocks(1);
    ok = follows(gap_mm);
    checks++;
    if (ok) n_switch++; else begin failures++; $display("FAIL Max-Min selection"); end
    est_sel = EST_BINRESHAPE;
    run_blocks(1);
    ok = follows(gap_br);
    checks++;
    if (ok) n_switch++; else begin failures++; $display("FAIL Bin-Reshaping selection"); end
    $display("estimates stage 1: max-min %0d/%0d  bin-reshaping %0d/%0d  cost-min %0d/%0d",
             gap_mm[0][0], gap_mm[0][1], gap_br[0][0], gap_br[0][1], gap_cm[0][0], gap_cm[0][1]);
    est_sel = EST_COSTMIN;
    run_blocks(2);
    ok = follows_sel(EST_COSTMIN);
    n_cm_valid = 0;
    for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++) if (est_valid[k][j][2]) n_cm_valid++;
    checks++;
    if (n_cm_valid < 2 * C - 2) begin failures++; $display("FAIL Cost-Minimizing valid on only %0d boundaries", n_cm_valid); end
    for (int k = 0; k < C; k++)
      $display("  stage %0d in use %0d/%0d  cost-min %0d/%0d  valid %b/%b", k + 1, gap[k][0], gap[k][1],
               gap_cm[k][0], gap_cm[k][1], est_valid[k][0], est_valid[k][1]);
    checks++;
    if (ok) n_switch++; else begin failures++; $display("FAIL Cost-Minimizing selection"); end

    // ---- phase 3: freeze and measure ----
    cal_en = 0;
    run_blocks(1);                       // the running block completes
    frozen = gap;
    compare_on = 1;
    for (int i = 0; i < 400000; i++) begin
      run_samples(1, 1);
      if (out_valid && i > 20) begin
        if (hist_raw.exists(int'(raw_code))) hist_raw[int'(raw_code)]++; else hist_raw[int'(raw_code)] = 1;
        if (hist_cor.exists(int'(out_code))) hist_cor[int'(out_code)]++; else hist_cor[int'(out_code)] = 1;
      end
    end
    @(negedge clk); sample_en = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (frozen == gap) n_freeze++; else begin failures++; $display("FAIL gaps changed while frozen"); end

    // histogram statistics inside the exercised range (200 codes margin)
    begin
      int k0, k1;
      void'(hist_raw.first(k0)); void'(hist_raw.last(k1));
      lo = k0 + 200; hi = k1 - 200;
      tot_raw = 0; nb_raw = hi - lo + 1;
      for (int c = lo; c <= hi; c++) tot_raw += hist_raw.exists(c) ? hist_raw[c] : 0;
      m_raw = real'(tot_raw) / real'(nb_raw);
      nmiss_raw = 0; ndup_raw = 0;
      for (int c = lo; c <= hi; c++) begin
        int h;
        h = hist_raw.exists(c) ? hist_raw[c] : 0;
        if (h == 0) nmiss_raw++;
        if (real'(h) > 1.8 * m_raw) ndup_raw++;
      end
      void'(hist_cor.first(k0)); void'(hist_cor.last(k1));
      lo = k0 + 200; hi = k1 - 200;
      tot_cor = 0; nb_cor = hi - lo + 1;
      for (int c = lo; c <= hi; c++) tot_cor += hist_cor.exists(c) ? hist_cor[c] : 0;
      m_cor = real'(tot_cor) / real'(nb_cor);
      nmiss_cor = 0; ndup_cor = 0;
      for (int c = lo; c <= hi; c++) begin
        int h;
        h = hist_cor.exists(c) ? hist_cor[c] : 0;
        if (h == 0) nmiss_cor++;
        if (real'(h) > 1.8 * m_cor) ndup_cor++;
      end
    end
    $display("raw:       %0d missing, %0d doubled codes of %0d (mean %0.1f per code)", nmiss_raw, ndup_raw, nb_raw, m_raw);
    $display("corrected: %0d missing, %0d doubled codes of %0d (mean %0.1f per code)", nmiss_cor, ndup_cor, nb_cor, m_cor);
    checks++;
    if (nmiss_raw + ndup_raw < 20) begin failures++; $display("FAIL raw code shows too few gap artefacts"); end
    checks++;
    if (nmiss_cor + ndup_cor > 3) begin failures++; $display("FAIL corrected code still has gaps"); end
    checks++;
    if (compared < 399000 || mismatches != 0) begin
      failures++; $display("FAIL datapath: %0d of %0d outputs differ", mismatches, compared);
    end
    checks++;
    if (lat_first != C + 1) begin failures++; $display("FAIL latency %0d, expected %0d", lat_first, C + 1); end

    $display("mechanisms: blocks=%0d fallback=%0d switch=%0d freeze=%0d positive_gaps=%0d negative_gaps=%0d maxmin_bias=%0d",
             block_count, n_fallback, n_switch, n_freeze, n_pos, n_neg, n_bias);
    checks++;
    if (n_fallback == 0 || n_switch < 3 || n_freeze == 0 || n_pos == 0 || n_bias == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
