// tb_stage_corrector: random decisions, back-end codes and gaps; checks the
// raw sample d*2^SHIFT + y and the corrected sample with the gaps of the
// boundaries below the decision removed, one cycle later, tag included.
module tb_stage_corrector;
  import dbge_pkg::*;
  localparam int SHIFT = 9;
  logic clk = 0, rst_n = 1, in_valid = 0, in_tag = 0, out_valid, out_tag;
  dec_t d, d_out;
  sample_t y_in, x_out, y_out;
  gap_t g0, g1;
  int checks = 0, failures = 0;

  stage_corrector #(.SHIFT(SHIFT)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey;
    d = 0; y_in = 0; g0 = 0; g1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      d = dec_t'($urandom_range(0, 2));
      y_in = sample_t'($urandom_range(0, 1023));
      g0 = gap_t'(int'($urandom_range(0, 200)) - 50);
      g1 = gap_t'(int'($urandom_range(0, 200)) - 50);
      in_valid = 1; in_tag = $urandom_range(0, 1);
      ex = int'(d) * (1 << SHIFT) + int'(y_in);
      ey = ex - (d >= 1 ? int'(g0) : 0) - (d == 2 ? int'(g1) : 0);
      @(negedge clk);
      checks++;
      if (!out_valid || out_tag != in_tag || d_out != d || int'(x_out) != ex || int'(y_out) != ey) begin
        failures++;
        $display("FAIL d=%0d y=%0d g=%0d,%0d x=%0d/%0d y=%0d/%0d", d, y_in, g0, g1, x_out, ex, y_out, ey);
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid || out_tag) begin failures++; $display("FAIL valid not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
