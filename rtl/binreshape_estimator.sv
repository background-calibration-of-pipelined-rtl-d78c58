// binreshape_estimator: Bin-Reshaping gap estimate for one decision boundary.
//
// Circuit noise smears samples into the missing-code region, so a plain
// Max-Min estimate comes out too small. This estimator first drops the
// S_LOG2 noisy low bits (coarse bins of s = 2^S_LOG2 codes) and runs Max-Min
// on the coarse codes: q0 = largest coarse bin of X_0, q1 = smallest of X_1.
// For each side it also counts the samples in the innermost coarse bin (a0,
// a1) and in its outer neighbour (b0, b1); these two counters per side follow
// the moving extreme on line (when the extreme moves out by one bin the old
// edge count becomes the neighbour count). A part-filled edge bin means the
// true edge lies inside it; reshaping it to its neighbour's height gives the
// edge, so
//   gap = (q1 - q0 - 1)*s + s*(1 - a1/b1) + s*(1 - a0/b0),
// each edge term clamped to [0, s] (0 if the neighbour is empty), computed
// with FRAC fractional bits and rounded to an integer gap. The two divisions
// run one after the other on one serial divider.
// The on-line edge tracking, the clamping, s = 8 and the rounding are this
// design's choices.
// Timing: samples as in maxmin_estimator; `start` (after the block) launches
// the evaluation, `done` pulses 2*(CW+S_LOG2+FRAC)+7 cycles later (57) with
// gap/gap_valid, which hold until the next evaluation.
module binreshape_estimator
  import dbge_pkg::*;
#(
  parameter int S_LOG2 = 3,
  parameter int FRAC   = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    smp_valid,
  input  logic    smp_hi,
  input  sample_t smp_x,
  input  logic    start,
  output logic    done,
  output logic    gap_valid,
  output gap_t    gap
);
  localparam int NW = CW + S_LOG2 + FRAC;
  localparam logic [NW-1:0] S_FX = NW'(1) << (S_LOG2 + FRAC);  // s in fixed point

  sample_t q, q0, q1;
  count_t  a0, b0, a1, b1;
  logic    have0, have1;

  assign q = smp_x >>> S_LOG2;

  // ---- collection: coarse extremes and edge-bin counters ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= '0; q1 <= '0; a0 <= '0; b0 <= '0; a1 <= '0; b1 <= '0;
      have0 <= 1'b0; have1 <= 1'b0;
    end else if (clear) begin
      have0 <= 1'b0; have1 <= 1'b0;
      a0 <= '0; b0 <= '0; a1 <= '0; b1 <= '0;
    end else if (smp_valid) begin
      if (!smp_hi) begin
        if (!have0 || q > q0) begin
          b0    <= (have0 && q == q0 + 1) ? a0 : '0;
          a0    <= count_t'(1);
          q0    <= q;
          have0 <= 1'b1;
        end else if (q == q0)     a0 <= a0 + 1'b1;
        else if (q == q0 - 1)     b0 <= b0 + 1'b1;
      end else begin
        if (!have1 || q < q1) begin
          b1    <= (have1 && q == q1 - 1) ? a1 : '0;
          a1    <= count_t'(1);
          q1    <= q;
          have1 <= 1'b1;
        end else if (q == q1)     a1 <= a1 + 1'b1;
        else if (q == q1 + 1)     b1 <= b1 + 1'b1;
      end
    end
  end

  // ---- evaluation: two serial divisions, then sum and round ----
  typedef enum logic [2:0] {E_IDLE, E_DIV1, E_WAIT1, E_DIV0, E_WAIT0, E_SUM} est_state_e;
  est_state_e      est;
  logic            div_start, div_done;
  logic [NW-1:0]   div_num, div_q;
  count_t          div_den;
  logic [NW-1:0]   t1;  // s*(1 - a1/b1) in 1/2^FRAC LSB

  // Edge term from a quotient: s - floor(a*s/b), zero when not interpolable.
  function automatic logic [NW-1:0] edge_term(input count_t a, input count_t b,
                                              input logic [NW-1:0] quo);
    if (b == '0 || a >= b) return '0;
    return S_FX - quo;
  endfunction

  always_comb begin
    div_start = (est == E_DIV1) || (est == E_DIV0);
    div_num   = (est == E_DIV1) ? (NW'(a1) << (S_LOG2 + FRAC)) : (NW'(a0) << (S_LOG2 + FRAC));
    div_den   = (est == E_DIV1) ? b1 : b0;
  end

  serial_divider #(.NW(NW), .DWID(CW)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_num), .divisor(div_den),
    .busy(), .done(div_done), .quotient(div_q), .remainder()
  );

  logic signed [31:0] sum_fx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est <= E_IDLE; t1 <= '0; sum_fx <= '0; done <= 1'b0; gap <= '0; gap_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (est)
        E_IDLE:  if (start) est <= E_DIV1;
        E_DIV1:  est <= E_WAIT1;
        E_WAIT1: if (div_done) begin
          t1  <= edge_term(a1, b1, div_q);
          est <= E_DIV0;
        end
        E_DIV0:  est <= E_WAIT0;
        E_WAIT0: if (div_done) begin
          sum_fx <= ((32'(q1) - 32'(q0) - 32'sd1) <<< (S_LOG2 + FRAC))
                    + 32'(t1) + 32'(edge_term(a0, b0, div_q));
          est    <= E_SUM;
        end
        E_SUM: begin
          gap       <= sat_gap((sum_fx + (32'sd1 <<< (FRAC - 1))) >>> FRAC);
          gap_valid <= have0 & have1;
          done      <= 1'b1;
          est       <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end

  initial begin
    assert (FRAC >= 1 && NW <= 30) else $error("binreshape_estimator: FRAC/width out of range");
  end
endmodule
