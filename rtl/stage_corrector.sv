// stage_corrector: gap correction of one calibrated 1.5-bit stage.
//
// The raw sample of stage k is its decision placed above the corrected output
// of the later stages, x_k = d_k * 2^SHIFT + y_(k+1). Each of the stage's two
// decision boundaries leaves a code gap; the gap estimate of a boundary is
// subtracted from every sample above it:
//   y_k = x_k - (d_k >= 1 ? g0 : 0) - (d_k == 2 ? g1 : 0).
// This is the correction rule of the method, written for the two boundaries
// of a 1.5-bit stage. x_k and d_k go to the boundary estimators, y_k to the
// preceding stage. SHIFT = NUM_STAGES-1-k for stage k (0-based).
// Timing: all outputs registered, one cycle latency; `tag` (sample belongs to
// the current estimation block) travels with the sample.
module stage_corrector
  import dbge_pkg::*;
#(
  parameter int SHIFT = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_tag,
  input  dec_t    d,
  input  sample_t y_in,
  input  gap_t    g0,
  input  gap_t    g1,
  output logic    out_valid,
  output logic    out_tag,
  output dec_t    d_out,
  output sample_t x_out,
  output sample_t y_out
);
  sample_t x, y;

  always_comb begin
    x = (sample_t'({16'd0, d}) <<< SHIFT) + y_in;
    y = x;
    if (d >= 2'd1) y -= sample_t'(g0);
    if (d == 2'd2) y -= sample_t'(g1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= 1'b0;
      d_out     <= '0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_valid & in_tag;
      d_out     <= d;
      x_out     <= x;
      y_out     <= y;
    end
  end

  initial begin
    assert (SHIFT >= 0 && SHIFT + 3 <= DW) else $error("stage_corrector: SHIFT out of range");
  end
endmodule
