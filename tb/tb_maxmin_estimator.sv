// tb_maxmin_estimator: feeds random blocks of samples split at a boundary and
// compares max{X_0}, min{X_1} and the gap min-max-1 with values tracked in
// the testbench; also checks clearing between blocks and the invalid case.
module tb_maxmin_estimator;
  import dbge_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, smp_valid = 0, smp_hi = 0;
  sample_t smp_x, max0, min1;
  logic have0, have1, gap_valid;
  gap_t gap;
  int checks = 0, failures = 0;

  maxmin_estimator dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rmax, rmin, g, n0, n1;
    smp_x = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      g = $urandom_range(0, 60) - 20;          // gap incl. overlap
      rmax = -100000; rmin = 100000; n0 = 0; n1 = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 300; i++) begin
        int t;
        t = int'($urandom_range(0, 400)) - 200;
        smp_valid = ($urandom_range(0, 3) != 0);
        smp_hi = (t >= 0);
        smp_x = sample_t'(smp_hi ? 5000 + t + g : 5000 + t);
        if (blk == 19) smp_hi = 1'b1;            // last block: X_0 empty
        if (smp_valid) begin
          if (smp_hi) begin n1++; if (int'(smp_x) < rmin) rmin = int'(smp_x); end
          else        begin n0++; if (int'(smp_x) > rmax) rmax = int'(smp_x); end
        end
        @(negedge clk);
      end
      smp_valid = 0;
      @(negedge clk);
      checks++;
      if (gap_valid != (n0 > 0 && n1 > 0)) begin failures++; $display("FAIL valid blk %0d", blk); end
      if (n0 > 0 && n1 > 0) begin
        checks++;
        if (int'(max0) != rmax || int'(min1) != rmin || int'(gap) != rmin - rmax - 1) begin
          failures++;
          $display("FAIL blk %0d max0=%0d/%0d min1=%0d/%0d gap=%0d", blk, max0, rmax, min1, rmin, gap);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
