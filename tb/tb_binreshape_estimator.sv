// tb_binreshape_estimator: blocks of noisy samples around one boundary with
// integer, fractional and negative gaps. The expected estimate is worked out
// from the complete coarse histograms kept by the testbench (edge bin and its
// neighbour, formula with the same fixed-point rounding); the estimate must
// also land within 1.5 LSB of the true gap, closer than plain Max-Min does.
module tb_binreshape_estimator;
  import dbge_pkg::*;
  import tb_util_pkg::*;
  localparam int S_LOG2 = 3, FRAC = 4, S = 1 << S_LOG2;
  logic clk = 0, rst_n = 1, clear = 0, smp_valid = 0, smp_hi = 0, start = 0, done, gap_valid;
  sample_t smp_x;
  gap_t gap;
  int checks = 0, failures = 0, closer = 0;

  binreshape_estimator #(.S_LOG2(S_LOG2), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int term(input int a, input int b);
    if (b == 0 || a >= b) return 0;
    return (S << FRAC) - ((a << (S_LOG2 + FRAC)) / b);
  endfunction

  initial begin
    real gs [6] = '{9.0, 3.5, 20.25, -6.0, 0.0, 12.7};
    real sg [6] = '{1.0, 0.0, 1.0, 0.8, 1.2, 1.5};
    int h0 [int], h1 [int];
    int q0, q1, mx, mn, exp_fx, exp_gap, x, cyc;
    logic hi;
    smp_x = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      h0.delete(); h1.delete();
      q0 = -1000000; q1 = 1000000; mx = -1000000; mn = 1000000;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 20000; i++) begin
        gen_sample(3000, gs[b], sg[b], 40.0, hi, x);
        smp_valid = 1; smp_hi = hi; smp_x = sample_t'(x);
        if (hi) begin
          if (h1.exists(x >>> S_LOG2)) h1[x >>> S_LOG2]++; else h1[x >>> S_LOG2] = 1;
          if ((x >>> S_LOG2) < q1) q1 = x >>> S_LOG2;
          if (x < mn) mn = x;
        end else begin
          if (h0.exists(x >>> S_LOG2)) h0[x >>> S_LOG2]++; else h0[x >>> S_LOG2] = 1;
          if ((x >>> S_LOG2) > q0) q0 = x >>> S_LOG2;
          if (x > mx) mx = x;
        end
        @(negedge clk);
      end
      smp_valid = 0;
      exp_fx = ((q1 - q0 - 1) << (S_LOG2 + FRAC))
             + term(h1[q1], h1.exists(q1 + 1) ? h1[q1 + 1] : 0)
             + term(h0[q0], h0.exists(q0 - 1) ? h0[q0 - 1] : 0);
      exp_gap = (exp_fx + (1 << (FRAC - 1))) >>> FRAC;
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (!gap_valid || int'(gap) != exp_gap) begin
        failures++; $display("FAIL block %0d gap=%0d expected %0d", b, gap, exp_gap);
      end
      checks++;
      if (fabs(real'(gap) - gs[b]) > 1.5) begin
        failures++; $display("FAIL block %0d gap=%0d true %f", b, gap, gs[b]);
      end
      if (fabs(real'(gap) - gs[b]) < fabs(real'(mn - mx - 1) - gs[b])) closer++;
      $display("block %0d true=%f bin-reshaping=%0d max-min=%0d (%0d cycles)", b, gs[b], gap, mn - mx - 1, cyc);
    end
    // a block where one side is empty gives no valid estimate
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 50; i++) begin
      smp_valid = 1; smp_hi = 1; smp_x = sample_t'(3000 + i); @(negedge clk);
    end
    smp_valid = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (gap_valid) begin failures++; $display("FAIL valid with empty X_0"); end
    checks++;
    if (closer < 3) begin failures++; $display("FAIL bin-reshaping closer than max-min in only %0d blocks", closer); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
