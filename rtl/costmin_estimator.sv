// costmin_estimator: Cost-Minimizing gap estimate for one decision boundary.
//
// During a block two small histograms are collected: H0 over the WIN codes at
// and just below p0, the previous block's max{X_0}, and H1 over WIN+2*SWEEP
// codes around p1, the previous block's min{X_1}. After the block the gap
// estimate is swept over g = p1 - p0 - 1 + delta, delta = -SWEEP..SWEEP. For
// each candidate the X_1 histogram is shifted down by g and added to the X_0
// histogram, which is the histogram the samples would have after correction
// with g. The cost is the RMS DNL of that combined histogram over the WIN bins
// next to the boundary:
//   RMS DNL^2 = (WIN*S2 - S1^2) / S1^2,  S1 = sum h, S2 = sum h^2,
// and the candidate with the smallest cost wins. Costs are compared by
// cross-multiplying, so no divider is needed. With delta indexing, combined
// bin u (0..WIN-1) is H0[u] + H1[u + delta + SWEEP].
// Anchoring the windows at the previous block's Max-Min extremes, the sweep
// range, tie-breaking (lowest candidate) and skipping empty windows are this
// design's choices. No estimate is produced while anchor_valid is low or
// while either window stayed empty during the block.
// Timing: the anchors are taken at `clear`. `start` launches the sweep; one
// combined bin per cycle plus one compare cycle per candidate, so `done`
// pulses (2*SWEEP+1)*(WIN+1)+1 cycles after the start cycle with gap/gap_valid.
module costmin_estimator
  import dbge_pkg::*;
#(
  parameter int WIN   = 8,
  parameter int SWEEP = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    anchor_valid,
  input  sample_t anchor0,     // previous max{X_0}
  input  sample_t anchor1,     // previous min{X_1}
  input  logic    smp_valid,
  input  logic    smp_hi,
  input  sample_t smp_x,
  input  logic    start,
  output logic    done,
  output logic    gap_valid,
  output gap_t    gap
);
  localparam int L1  = WIN + 2 * SWEEP;
  localparam int HW  = CW + 1;                 // combined bin width
  localparam int S1W = HW + $clog2(WIN) + 1;   // sum of bins
  localparam int S2W = 2 * HW + $clog2(WIN) + 1;
  localparam int NUMW = S2W + $clog2(WIN) + 2; // WIN*S2 - S1^2
  localparam int DENW = 2 * S1W;               // S1^2
  localparam int PW   = NUMW + DENW;
  localparam int UW   = $clog2(WIN + 1);
  localparam int DLW  = $clog2(2 * SWEEP + 2);
  localparam int IW0  = $clog2(WIN);
  localparam int IW1  = $clog2(L1);

  count_t  h0 [WIN];
  count_t  h1 [L1];
  sample_t p0, p1;
  logic    pv;
  logic    seen0, seen1;  // each window received at least one sample

  // ---- collection ----
  logic signed [31:0] i0, i1;
  assign i0 = 32'(smp_x) - (32'(p0) - 32'(WIN / 2) + 32'sd1);
  assign i1 = 32'(smp_x) - (32'(p1) - 32'(WIN / 2) - 32'(SWEEP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WIN; i++) h0[i] <= '0;
      for (int i = 0; i < L1; i++)  h1[i] <= '0;
      p0 <= '0; p1 <= '0; pv <= 1'b0; seen0 <= 1'b0; seen1 <= 1'b0;
    end else if (clear) begin
      seen0 <= 1'b0; seen1 <= 1'b0;
      for (int i = 0; i < WIN; i++) h0[i] <= '0;
      for (int i = 0; i < L1; i++)  h1[i] <= '0;
      p0 <= anchor0; p1 <= anchor1; pv <= anchor_valid;
    end else if (smp_valid && pv) begin
      if (!smp_hi) begin
        if (i0 >= 0 && i0 < WIN) begin
          h0[i0[IW0-1:0]] <= h0[i0[IW0-1:0]] + 1'b1;
          seen0 <= 1'b1;
        end
      end else begin
        if (i1 >= 0 && i1 < L1) begin
          h1[i1[IW1-1:0]] <= h1[i1[IW1-1:0]] + 1'b1;
          seen1 <= 1'b1;
        end
      end
    end
  end

  // ---- evaluation: sweep candidates, one combined bin per cycle ----
  typedef enum logic [1:0] {C_IDLE, C_ACC, C_CMP, C_FIN} cm_state_e;
  cm_state_e              st;
  logic [UW-1:0]          u;
  logic [DLW-1:0]         dl;       // delta + SWEEP
  logic [S1W-1:0]         s1;
  logic [S2W-1:0]         s2;
  logic [NUMW-1:0]        best_num;
  logic [DENW-1:0]        best_den;
  logic [DLW-1:0]         best_dl;
  logic                   best_ok;

  logic [HW-1:0]   hc;
  logic [NUMW-1:0] num;
  logic [DENW-1:0] den;
  logic [PW-1:0]   lhs, rhs;

  assign hc  = HW'(h0[IW0'(u)]) + HW'(h1[IW1'(u) + IW1'(dl)]);
  assign den = DENW'(s1) * DENW'(s1);
  assign num = NUMW'(WIN) * NUMW'(s2) - NUMW'(den);
  assign lhs = PW'(num) * PW'(best_den);
  assign rhs = PW'(best_num) * PW'(den);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; u <= '0; dl <= '0; s1 <= '0; s2 <= '0;
      best_num <= '0; best_den <= '0; best_dl <= '0; best_ok <= 1'b0;
      done <= 1'b0; gap <= '0; gap_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          u <= '0; dl <= '0; s1 <= '0; s2 <= '0; best_ok <= 1'b0;
          st <= C_ACC;
        end
        C_ACC: begin
          s1 <= s1 + S1W'(hc);
          s2 <= s2 + S2W'(hc) * S2W'(hc);
          if (u == UW'(WIN - 1)) st <= C_CMP;
          else u <= u + 1'b1;
        end
        C_CMP: begin
          if (s1 != '0 && (!best_ok || lhs < rhs)) begin
            best_num <= num; best_den <= den; best_dl <= dl; best_ok <= 1'b1;
          end
          u <= '0; s1 <= '0; s2 <= '0;
          if (dl == DLW'(2 * SWEEP)) st <= C_FIN;
          else begin
            dl <= dl + 1'b1;
            st <= C_ACC;
          end
        end
        C_FIN: begin
          gap       <= sat_gap(32'(p1) - 32'(p0) - 32'sd1 + 32'(best_dl) - 32'(SWEEP));
          gap_valid <= pv & seen0 & seen1 & best_ok;
          done      <= 1'b1;
          st        <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  initial begin
    assert (WIN >= 2 && SWEEP >= 0) else $error("costmin_estimator: bad WIN/SWEEP");
  end
endmodule
