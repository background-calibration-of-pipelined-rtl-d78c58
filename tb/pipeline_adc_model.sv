// pipeline_adc_model: behavioural model (not synthesizable) of the analog part
// of a 13-stage 1.5-bit/stage switched-capacitor pipelined ADC, used as the
// signal source of the end-to-end testbench.
//
// Each stage compares its input with +-vref/4 (plus its comparator offset),
// giving d in {0,1,2}, and amplifies the residue
//   v_o = ((2+eps)*v_i - (1+eps)*(d-1)*vref) / (1 + 2/A) + v_off + noise,
// i.e. capacitor mismatch eps = C1/C2 - 1, finite opamp gain A and an output
// offset; a final comparator resolves the sign of the last residue. The error
// values per stage are the ones of the 13-stage simulation example (capacitor
// mismatch, opamp gain, comparator offset, voltage offset; offsets in % of
// vref). Circuit noise of NOISE_LSB (rms, in LSBs of the code the stage's
// residue feeds) is added to every residue. vref = 1, input range [-1, 1].
// gain_scale multiplies every opamp gain; a testbench may change it while
// running to model drift (e.g. with temperature).
// Timing: on each rising clk with sample_en, vin is converted and all
// decisions of that sample appear together (time-aligned) after the edge.
module pipeline_adc_model
  import dbge_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int  N         = 13,
  parameter real NOISE_LSB = 0.25,
  parameter real ERR_SCALE = 1.0    // 0 gives an ideal converter
) (
  input  logic clk,
  input  logic sample_en,
  input  real  vin,
  output dec_t dec [N],
  output logic fbit
);
  // stage 1 first
  localparam real CAP_PCT  [13] = '{-0.12, -0.05, 0.55, -0.54, 0.51, -0.09, 0.21, -0.18, 0.07, -0.15, -0.01, 0.04, 0.19};
  localparam real GAIN     [13] = '{535.0, 705.0, 998.0, 299.0, 243.0, 651.0, 460.0, 762.0, 421.0, 454.0, 597.0, 606.0, 542.0};
  localparam real CMP_PCT  [13] = '{4.19, 3.07, -1.47, -2.16, 3.91, -0.99, 2.69, 0.26, 2.71, -2.07, 4.72, -0.06, 0.24};
  localparam real VOFF_PCT [13] = '{0.35, 0.40, 0.47, -0.26, -0.43, -0.04, -0.48, -0.43, -0.15, 0.39, 0.16, -0.30, -0.41};

  real gain_scale = 1.0;

  initial begin
    for (int i = 0; i < N; i++) dec[i] = '0;
    fbit = 1'b0;
  end

  always @(posedge clk) begin
    if (sample_en) begin
      real v, eps, a, off, lsb_v;
      v = vin;
      for (int i = 0; i < N; i++) begin
        eps = ERR_SCALE * CAP_PCT[i] / 100.0;
        a   = (ERR_SCALE == 0.0) ? 1.0e30 : GAIN[i] * gain_scale;
        off = ERR_SCALE * CMP_PCT[i] / 100.0;
        if (v > 0.25 + off)       dec[i] <= 2'd2;
        else if (v > -0.25 + off) dec[i] <= 2'd1;
        else                      dec[i] <= 2'd0;
        begin
          real dd;
          dd = (v > 0.25 + off) ? 1.0 : (v > -0.25 + off) ? 0.0 : -1.0;
          lsb_v = 2.0 / real'(64'd1 << (N - i));
          v = ((2.0 + eps) * v - (1.0 + eps) * dd) / (1.0 + 2.0 / a)
              + ERR_SCALE * VOFF_PCT[i] / 100.0 + NOISE_LSB * lsb_v * gauss();
        end
      end
      fbit <= (v > 0.0);
    end
  end
endmodule
