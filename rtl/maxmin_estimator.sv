// maxmin_estimator: Max-Min gap estimate for one decision boundary.
//
// Two registers hold the largest sample below the boundary (set X_0) and the
// smallest sample above it (set X_1) within the current block; each incoming
// sample is compared with the register of its set and replaces it if it is
// more extreme. The estimate is the number of codes missing between the two
// sets, gap = min{X_1} - max{X_0} - 1 (negative for overlapping codes), valid
// once both sets have had a sample. `clear` resets both registers at the start
// of a block, which is how the estimate tracks drift.
// Timing: a sample presented with smp_valid is reflected in the outputs on the
// next cycle; clear has priority over a sample in the same cycle.
module maxmin_estimator
  import dbge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    smp_valid,
  input  logic    smp_hi,     // 1: sample is above the boundary (X_1)
  input  sample_t smp_x,
  output sample_t max0,
  output sample_t min1,
  output logic    have0,
  output logic    have1,
  output logic    gap_valid,
  output gap_t    gap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max0  <= '0;
      min1  <= '0;
      have0 <= 1'b0;
      have1 <= 1'b0;
    end else if (clear) begin
      have0 <= 1'b0;
      have1 <= 1'b0;
    end else if (smp_valid) begin
      if (smp_hi) begin
        if (!have1 || smp_x < min1) min1 <= smp_x;
        have1 <= 1'b1;
      end else begin
        if (!have0 || smp_x > max0) max0 <= smp_x;
        have0 <= 1'b1;
      end
    end
  end

  assign gap_valid = have0 & have1;
  assign gap       = sat_gap(32'(min1) - 32'(max0) - 32'sd1);
endmodule
