// tb_gap_estimator: the upper boundary (BOUNDARY = 1) of a 1.5-bit stage,
// with samples of decision 0 mixed in that must be ignored. Block by block it
// switches est_sel and checks that the gap in use follows the selected
// estimator, falls back to Bin-Reshaping while Cost-Minimizing has no anchors, and
// reports no estimate when one side had no samples. Before the last block the
// anchors are shifted by the amount a change of the next stage would move
// them, with a matching offset in the samples; Cost-Minimizing must follow. Max-Min is checked against extremes kept
// here, Cost-Minimizing against the true gap.
module tb_gap_estimator;
  import dbge_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, eval = 0, smp_valid = 0, done, gap_ok, shift_en = 0;
  gap_t anchor_shift = '0;
  est_sel_e est_sel;
  dec_t smp_d;
  sample_t smp_x;
  gap_t gap, gap_mm, gap_br, gap_cm;
  logic [2:0] est_valid;
  int checks = 0, failures = 0;

  gap_estimator #(.BOUNDARY(1)) dut (.*);
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
    est_sel_e sels [6] = '{EST_COSTMIN, EST_COSTMIN, EST_BINRESHAPE, EST_MAXMIN, EST_COSTMIN, EST_COSTMIN};
    int mx, mn, x, prev_gap, expect_gap;
    logic hi, empty;
    smp_x = 0; smp_d = 0; est_sel = EST_COSTMIN;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_gap = 0;
    for (int b = 0; b < 6; b++) begin
      empty = (b == 4);
      est_sel = sels[b];
      mx = -1000000; mn = 1000000;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (done) begin failures++; $display("FAIL done not cleared"); end
      for (int i = 0; i < 30000; i++) begin
        gen_sample(6000, 11.0, 1.0, 30.0, hi, x);
        if (b == 5 && !hi) x -= 20;          // lower side moved down by 20
        if ($urandom_range(0, 4) == 0) begin
          smp_d = 2'd0; x = 100 + int'($urandom_range(0, 9000));   // other region: ignored
        end else begin
          smp_d = hi ? 2'd2 : 2'd1;
          if (hi && x < mn) mn = x;
          if (!hi && x > mx) mx = x;
        end
        smp_valid = !(empty && hi); smp_x = sample_t'(x);
        @(negedge clk);
      end
      smp_valid = 0;
      eval = 1; @(negedge clk); eval = 0;
      while (!done) @(negedge clk);
      if (!empty) begin
        checks++;
        if (int'(gap_mm) != mn - mx - 1) begin failures++; $display("FAIL gap_mm=%0d expected %0d", gap_mm, mn - mx - 1); end
      end
      if (empty)                                   expect_gap = int'(gap_mm);
      else if (est_sel == EST_COSTMIN && b > 0)    expect_gap = int'(gap_cm);
      else if (est_sel != EST_MAXMIN)              expect_gap = int'(gap_br);
      else                                         expect_gap = int'(gap_mm);
      checks++;
      if (int'(gap) != expect_gap) begin failures++; $display("FAIL block %0d gap=%0d expected %0d", b, gap, expect_gap); end
      checks++;
      if (gap_ok == empty) begin failures++; $display("FAIL block %0d gap_ok=%0d", b, gap_ok); end
      checks++;
      if (est_valid != (empty ? 3'b000 : (b == 0 ? 3'b011 : 3'b111))) begin
        failures++; $display("FAIL block %0d est_valid=%b", b, est_valid);
      end
      if (b > 0 && !empty && est_sel == EST_COSTMIN) begin
        checks++;
        if (fabs(real'(gap_cm) - (b == 5 ? 31.0 : 11.0)) > 1.0) begin failures++; $display("FAIL cost-min %0d", gap_cm); end
      end
      $display("block %0d sel=%s gap=%0d (mm=%0d br=%0d cm=%0d valid=%b)", b, est_sel.name(), gap, gap_mm, gap_br, gap_cm, est_valid);
      prev_gap = int'(gap);
      if (b == 4) begin
        @(negedge clk); shift_en = 1; anchor_shift = 20; @(negedge clk); shift_en = 0;
      end
      repeat (5) @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL done dropped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
