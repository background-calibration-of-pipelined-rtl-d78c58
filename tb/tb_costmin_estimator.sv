// tb_costmin_estimator: noisy samples around one boundary with a known gap.
// Block 1 runs without anchors and must give no estimate; later blocks are
// anchored at the previous block's max{X_0}/min{X_1} (computed here). The
// expected result is an independent sweep in real arithmetic of the RMS DNL of
// the combined histogram over the same window; the estimate must also be
// within 1 LSB of the true gap. Checks the evaluation latency.
module tb_costmin_estimator;
  import dbge_pkg::*;
  import tb_util_pkg::*;
  localparam int WIN = 8, SWEEP = 8;
  logic clk = 0, rst_n = 1, clear = 0, anchor_valid = 0, smp_valid = 0, smp_hi = 0, start = 0;
  logic done, gap_valid;
  sample_t anchor0, anchor1, smp_x;
  gap_t gap;
  int checks = 0, failures = 0;

  costmin_estimator #(.WIN(WIN), .SWEEP(SWEEP)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gs [7] = '{9.0, 9.0, 4.0, -7.0, 15.0, 0.0, 22.0};
    int h0 [int], h1 [int];
    int mx, mn, p0, p1, x, cyc, best_g, g;
    real best_c, s1, s2, c, h;
    logic hi;
    smp_x = 0; anchor0 = 0; anchor1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 7; b++) begin
      h0.delete(); h1.delete();
      p0 = int'(anchor0); p1 = int'(anchor1);
      mx = -1000000; mn = 1000000;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 30000; i++) begin
        gen_sample(2000, gs[b], 1.0, 30.0, hi, x);
        smp_valid = 1; smp_hi = hi; smp_x = sample_t'(x);
        if (hi) begin
          if (h1.exists(x)) h1[x]++; else h1[x] = 1;
          if (x < mn) mn = x;
        end else begin
          if (h0.exists(x)) h0[x]++; else h0[x] = 1;
          if (x > mx) mx = x;
        end
        @(negedge clk);
      end
      smp_valid = 0;
      // reference sweep (windows as defined by the method's combined histogram)
      best_c = 1.0e30; best_g = 0;
      for (int dl = -SWEEP; dl <= SWEEP; dl++) begin
        g = p1 - p0 - 1 + dl;
        s1 = 0.0; s2 = 0.0;
        for (int cc = p0 + 1 - WIN / 2; cc <= p0 + WIN / 2; cc++) begin
          h = real'(h0.exists(cc) ? h0[cc] : 0) + real'(h1.exists(cc + g) ? h1[cc + g] : 0);
          s1 += h; s2 += h * h;
        end
        if (s1 > 0.0) begin
          c = (real'(WIN) * s2 - s1 * s1) / (s1 * s1);
          if (c < best_c - 1.0e-12) begin best_c = c; best_g = g; end
        end
      end
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (2 * SWEEP + 1) * (WIN + 1) + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (gap_valid != (b > 0)) begin failures++; $display("FAIL valid=%0d in block %0d", gap_valid, b); end
      if (b > 0) begin
        checks++;
        if (int'(gap) != best_g) begin failures++; $display("FAIL block %0d gap=%0d expected %0d", b, gap, best_g); end
        // accuracy only where the anchors came from a block with the same gap
        if (gs[b] == gs[b-1]) begin
          checks++;
          if (fabs(real'(gap) - gs[b]) > 1.0) begin failures++; $display("FAIL block %0d gap=%0d true %f", b, gap, gs[b]); end
        end
      end
      $display("block %0d true=%f cost-min=%0d valid=%0d max-min=%0d", b, gs[b], gap, gap_valid, mn - mx - 1);
      // next anchors: this block's extremes
      anchor0 = sample_t'(mx); anchor1 = sample_t'(mn); anchor_valid = 1;
      if (b < 6 && gs[b+1] != gs[b]) begin
        // gap changes: anchor where the next block's edges will be
        anchor1 = sample_t'(2000 + int'(gs[b+1]) - 3);
        anchor0 = sample_t'(1999 + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
