// block_controller: sequences the block-based background estimation.
//
// DBGE estimates every gap from a block of BLOCK_LEN samples. This controller
// pulses `clear` (estimators reset their min/max registers and histograms),
// then raises `collect` for the next BLOCK_LEN valid input samples; the
// calibrator tags those samples so each estimator sees them as they leave its
// correction stage. After the last tagged sample it waits DRAIN cycles for the
// correction pipeline to empty, pulses `eval` and waits for `all_done` from
// the estimators, then pulses `update` (new gaps take effect) in the cycle it
// starts the next block. Resetting at every block is how
// the estimates follow drift. Correction itself never stops: only estimation
// pauses during evaluation, which is this design's choice. cal_en = 0 stops
// new blocks after the current one, freezing the gaps.
//
// Timing: clear one cycle after leaving IDLE/WAIT, collect asserted for
// exactly BLOCK_LEN cycles with in_valid high, eval one cycle DRAIN cycles
// after the last collected sample.
module block_controller #(
  parameter int unsigned BLOCK_LEN = 200000,
  parameter int unsigned DRAIN     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cal_en,
  input  logic        in_valid,
  input  logic        all_done,
  output logic        clear,
  output logic        collect,
  output logic        eval,
  output logic        update,
  output logic [15:0] block_count
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_COLLECT, S_DRAIN, S_EVAL, S_WAIT} state_e;
  state_e      state;
  logic [31:0] cnt;

  assign clear   = (state == S_CLEAR);
  assign collect = (state == S_COLLECT);
  assign eval    = (state == S_EVAL);
  assign update  = (state == S_WAIT) && all_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      block_count <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (cal_en) state <= S_CLEAR;
        S_CLEAR: begin
          cnt   <= '0;
          state <= S_COLLECT;
        end
        S_COLLECT: if (in_valid) begin
          if (cnt == BLOCK_LEN - 1) begin
            cnt   <= '0;
            state <= S_DRAIN;
          end else begin
            cnt <= cnt + 1;
          end
        end
        S_DRAIN: begin
          if (cnt == DRAIN - 1) state <= S_EVAL;
          cnt <= cnt + 1;
        end
        S_EVAL: state <= S_WAIT;
        S_WAIT: if (all_done) begin
          block_count <= block_count + 1;
          state       <= cal_en ? S_CLEAR : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (BLOCK_LEN >= 1 && DRAIN >= 1) else $error("BLOCK_LEN and DRAIN must be at least 1");
  end
endmodule
