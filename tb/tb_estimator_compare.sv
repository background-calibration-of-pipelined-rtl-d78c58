// tb_estimator_compare: converter resolution with each gap estimator, on the
// calibrator at its default size (13 stages, first 6 calibrated,
// 200000-sample blocks).
//
// For each of Max-Min, Bin-Reshaping and Cost-Minimizing, the calibrator is
// reset and calibrates on a zero-mean Gaussian input for CAL_BLOCKS blocks
// (the first Cost-Minimizing block falls back to Bin-Reshaping), then
// cal_en is dropped during the last block, which freezes the gaps once that
// block is done (checked: no block and no gap change afterwards). A sine of MEAS samples
// is then converted. The raw and corrected codes are each fitted to the
// known input by least squares (code = a*vin + b). The residual, which holds
// quantization, circuit noise and every nonlinearity, gives
//   SNDR = 10 log10((a*A)^2/2 / residual power),  ENOB = (SNDR - 1.76)/6.02
// with A the sine amplitude. The pipeline model is the same one the
// end-to-end test uses.
// Checks: the raw code is limited by the stage errors (ENOB below 10.5
// bits); Bin-Reshaping and Cost-Minimizing raise it by more than 2 bits and
// agree within 0.75 bit (each is one block of estimates, so they scatter);
// Max-Min, which its noise bias hurts, improves on the raw code but stays
// below the better of the other two plus 0.2 bit; on a fresh start every
// boundary of the last calibrated block had a valid estimate.
// Drift: after the Cost-Minimizing run every opamp gain of the model falls
// to a third. With the gaps frozen the resolution must drop by more than a
// bit; after DRIFT_BLOCKS more blocks of calibration (no reset) it must be
// back within 0.75 bit of the undrifted result.
module tb_estimator_compare;
  import dbge_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 13, C = 6;
  localparam int CAL_BLOCKS = 4;
  localparam int DRIFT_BLOCKS = 3;
  localparam int MEAS = 200000;
  localparam real AMP = 0.95;
  localparam real FREQ = 0.0072973525693;  // cycles per sample, far from any ratio of small integers
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 1, cal_en = 0, in_valid = 0, fbit, out_valid;
  est_sel_e est_sel = EST_MAXMIN;
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
    #(64'd10 * 64'd8_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) in_valid <= sample_en;

  // ---- least-squares fit of output codes against the converted input ----
  real vq [$];
  logic measuring = 0;
  real sv, svv, sc, scc, svc, sr, srr, svr;
  int  nfit;
  always @(posedge clk) begin
    if (sample_en) vq.push_back(vin);
    if (out_valid && vq.size() > 0) begin
      real v, c, r;
      v = vq.pop_front();
      c = real'(out_code);
      r = real'(raw_code);
      if (measuring) begin
        nfit++;
        sv += v; svv += v * v;
        sc += c; scc += c * c; svc += v * c;
        sr += r; srr += r * r; svr += v * r;
      end
    end
  end

  function automatic real enob_of(input real s_c, input real s_cc, input real s_vc);
    real n, var_v, var_c, cov, a, resid, sig;
    n     = real'(nfit);
    var_v = svv / n - (sv / n) * (sv / n);
    var_c = s_cc / n - (s_c / n) * (s_c / n);
    cov   = s_vc / n - (sv / n) * (s_c / n);
    a     = cov / var_v;
    resid = var_c - cov * cov / var_v;
    sig   = (a * AMP) * (a * AMP) / 2.0;
    return (10.0 * $log10(sig / resid) - 1.76) / 6.02;
  endfunction

  task automatic run_gauss(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sample_en = 1;
      vin = 0.35 * gauss();
      if (vin > 0.99) vin = 0.99;
      if (vin < -0.99) vin = -0.99;
    end
  endtask

  // calibrate for nb blocks (after a reset if asked); cal_en drops during the
  // last block, which still completes, so the gaps are frozen on return
  task automatic calibrate(input est_sel_e es, input int nb, input bit do_reset);
    int target, nvalid;
    if (do_reset) begin
      @(negedge clk); sample_en = 0; cal_en = 0; rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
    end
    est_sel = es; cal_en = 1;
    target = int'(block_count) + nb;
    while (int'(block_count) < target - 1) run_gauss(1000);
    cal_en = 0;
    while (int'(block_count) < target) run_gauss(1000);
    nvalid = 0;
    for (int k = 0; k < C; k++) for (int j = 0; j < 2; j++)
      if (est_valid[k][j][int'(es)]) nvalid++;
    // after a large drift Cost-Minimizing may miss its window and fall back
    // for a block, so its coverage is checked only on a fresh start
    checks++;
    if (do_reset && nvalid < (es == EST_COSTMIN ? 2 * C - 2 : 2 * C)) begin
      failures++; $display("FAIL %s valid on only %0d boundaries", es.name(), nvalid);
    end
  endtask

  // convert MEAS sine samples with the gaps frozen; ENOB of both codes
  task automatic measure(input string what, output real enob_c, output real enob_r);
    gap_t frozen [C][2];
    logic [15:0] bc;
    frozen = gap; bc = block_count;
    // let earlier samples leave the pipeline, then measure
    @(negedge clk); sample_en = 0;
    repeat (C + 8) @(negedge clk);
    vq.delete();
    sv = 0; svv = 0; sc = 0; scc = 0; svc = 0; sr = 0; srr = 0; svr = 0; nfit = 0;
    measuring = 1;
    for (int i = 0; i < MEAS; i++) begin
      sample_en = 1;
      vin = AMP * $sin(2.0 * PI * FREQ * real'(i));
      @(negedge clk);
    end
    sample_en = 0;
    repeat (C + 8) @(negedge clk);
    measuring = 0;
    checks++;
    if (block_count != bc || gap != frozen) begin failures++; $display("FAIL calibration did not stay frozen"); end
    checks++;
    if (nfit != MEAS) begin failures++; $display("FAIL %0d of %0d samples came out", nfit, MEAS); end
    enob_c = enob_of(sc, scc, svc);
    enob_r = enob_of(sr, srr, svr);
    $display("%-32s corrected ENOB %5.2f bits (raw %5.2f), first-stage gaps %0d/%0d",
             what, enob_c, enob_r, gap[0][0], gap[0][1]);
  endtask

  initial begin
    real e_mm, e_br, e_cm, r_mm, r_br, r_cm, e_dr, r_dr, e_rc, r_rc, best;
    repeat (3) @(negedge clk);
    rst_n = 1;
    calibrate(EST_MAXMIN, CAL_BLOCKS, 1);     measure("Max-Min", e_mm, r_mm);
    calibrate(EST_BINRESHAPE, CAL_BLOCKS, 1); measure("Bin-Reshaping", e_br, r_br);
    calibrate(EST_COSTMIN, CAL_BLOCKS, 1);    measure("Cost-Minimizing", e_cm, r_cm);
    // drift: every opamp gain falls to a third; frozen gaps no longer fit,
    // calibration resumed without reset must restore the resolution
    u_adc.gain_scale = 1.0 / 3.0;
    measure("drifted, gaps frozen", e_dr, r_dr);
    calibrate(EST_COSTMIN, DRIFT_BLOCKS, 0);
    measure("drifted, recalibrated", e_rc, r_rc);
    checks++;
    if (e_dr > e_cm - 1.0) begin failures++; $display("FAIL drift did not hurt the frozen gaps"); end
    checks++;
    if (e_rc < e_dr + 1.0 || e_rc < e_cm - 0.75) begin failures++; $display("FAIL recalibration did not follow the drift"); end
    best = (e_br > e_cm) ? e_br : e_cm;

    checks++;
    if (r_br >= 10.5) begin failures++; $display("FAIL raw ENOB %0.2f not limited by the stage errors", r_br); end
    checks++;
    if (e_br < r_br + 2.0) begin failures++; $display("FAIL Bin-Reshaping gains too little"); end
    checks++;
    if (e_cm < r_cm + 2.0) begin failures++; $display("FAIL Cost-Minimizing gains too little"); end
    checks++;
    if (fabs(e_br - e_cm) > 0.75) begin failures++; $display("FAIL Bin-Reshaping and Cost-Minimizing differ"); end
    checks++;
    if (e_mm <= r_mm || e_mm > best + 0.2) begin failures++; $display("FAIL Max-Min out of range"); end
    $display("summary: raw %0.2f  max-min %0.2f  bin-reshaping %0.2f  cost-minimizing %0.2f bits",
             r_br, e_mm, e_br, e_cm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
