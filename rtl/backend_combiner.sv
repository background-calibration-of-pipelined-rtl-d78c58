// backend_combiner: digital recombination of redundant 1.5-bit stages.
//
// Each 1.5-bit stage i (0-based, of NUM_STAGES) gives a decision d_i in
// {0,1,2}; its weight is 2^(NUM_STAGES-1-i) LSBs of the final code, so
// neighbouring stages overlap by one bit and the additions absorb comparator
// offsets. A final one-bit comparator on the last residue adds one LSB. The
// module sums stages FIRST..NUM_STAGES-1 and the final bit:
//   code = fbit + sum_{i>=FIRST} d_i * 2^(NUM_STAGES-1-i).
// With FIRST = 0 it is the plain uncalibrated output (14 bits for 13 stages);
// with FIRST = number of calibrated stages it is the back-end code that the
// first stage corrector extends. Registered: one cycle latency.
// The final one-bit comparator and time-aligned decision inputs are this
// design's assumptions.
module backend_combiner
  import dbge_pkg::*;
#(
  parameter int NUM_STAGES = 13,
  parameter int FIRST      = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  dec_t    dec [NUM_STAGES],
  input  logic    fbit,
  output logic    out_valid,
  output sample_t code
);
  sample_t sum;

  always_comb begin
    sum = sample_t'(fbit);
    for (int i = FIRST; i < NUM_STAGES; i++)
      sum += sample_t'({16'd0, dec[i]}) <<< (NUM_STAGES - 1 - i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      code      <= '0;
    end else begin
      out_valid <= in_valid;
      code      <= sum;
    end
  end

  initial begin
    assert (NUM_STAGES + 2 <= DW && FIRST >= 0 && FIRST < NUM_STAGES)
      else $error("backend_combiner: sizes out of range");
  end
endmodule
